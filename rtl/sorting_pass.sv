// sorting_pass: depth-first sorting pass of the block-tree encoder.
//
// Trees are taken one at a time. Their roots are the blocks k = i + j*B0
// (j = 1..3) of the three coarsest high bands, children of the LL_L blocks i.
// A root with SIG_D(k) = 1 is skipped. Otherwise k goes onto LCB and LCB is
// worked off as a stack; for the popped block x:
//  * SIG_B(x) = 0: its four coefficients are coded into Temp (0 or 1 sgn
//    each); for a non-leaf x the descendant set D(x) is then tested. Output
//    is "0" if nothing is significant, else "1 Temp" followed, for a non-leaf,
//    by the D(x) bit. x becomes SIG_B = 1; if D(x) is significant x goes to
//    LPB and its four offspring to LCB.
//  * SIG_B(x) = 1, all offspring SIG_B = 0 (type A): output the D(x) bit; if
//    1, x goes to LPB and its four offspring to LCB.
//  * SIG_B(x) = 1, some offspring significant (type B): no output; x goes to
//    LPB and every offspring that still has work (leaf with SIG_B = 0, or
//    non-leaf with SIG_D = 0) goes to LCB.
// When LCB is empty, LPB is popped (deepest parent first) and SIG_D(y) is set
// for each y whose offspring are all finished. Then the next root follows and
// Sort_end pulses after the last one.
// The rules are the document's sorting-pass listing; treating the root like
// an LCB entry, the stack order and testing D(x) by reading every descendant
// coefficient are this design's own. Coefficients are read via the
// coefficient address generator (2 per cycle); bits leave on emit_n/emit_bits
// (right-aligned, up to 10 bits, one group per coded block).
module sorting_pass
  import sot_pkg::*;
#(
  parameter int unsigned N      = 16,
  parameter int unsigned LEVELS = 3,
  localparam int unsigned BW    = 2 * $clog2(N) - 2
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  output logic          sort_end,
  // state tables
  output logic [BW-1:0] table_addr,
  input  logic          st_sig_b,
  input  logic          st_sig_d,
  input  logic [3:0]    st_child_b,
  input  logic [3:0]    st_child_d,
  output logic          set_b,
  output logic          set_d,
  // list control
  output logic          lcb_push1,
  output logic [BW-1:0] lcb_addr,
  output logic          lcb_push4,
  output logic [BW-1:0] lcb_base,
  output logic [3:0]    lcb_mask,
  output logic          lcb_pop,
  input  logic [BW-1:0] lcb_top,
  input  logic          lcb_empty,
  output logic          lpb_push,
  output logic [BW-1:0] lpb_addr,
  output logic          lpb_pop,
  input  logic [BW-1:0] lpb_top,
  input  logic          lpb_empty,
  // coefficient address generator and compare unit
  output logic          cag_start,
  output scan_mode_t    cag_mode,
  output logic [BW-1:0] blk_addr,
  input  logic          cag_valid,
  input  logic          next_addr,
  input  logic [3:0]    cbg_bits,
  input  logic [2:0]    cbg_n,
  input  logic          cbg_sig,
  // bits to the bitstream generator
  output logic [4:0]    emit_n,
  output logic [15:0]   emit_bits
);
  localparam int unsigned NBLK = N * N / 4;
  localparam int unsigned NPAR = NBLK / 4;
  localparam int unsigned B0   = (N >> LEVELS) * (N >> LEVELS) / 4;

  typedef enum logic [3:0] {IDLE, ROOT, POP, DEC, BLK, DSC, EMIT, LPB_POP, LPB_UPD, FIN} st_t;
  st_t         st;
  logic [BW-1:0] cur, root_i;
  logic [1:0]  root_j;
  logic [BW-1:0] root_k;
  logic        last_root, leaf, child_leaf;
  logic        sb_q, tmax, dsig;
  logic [7:0]  temp_bits;
  logic [3:0]  temp_n;
  logic [3:0]  need;

  always_comb begin
    root_k     = BW'(int'(root_i) + int'(root_j) * B0);
    last_root  = (root_j == 2'd3) && (int'(root_i) == B0 - 1);
    leaf       = (int'(cur) >= NPAR);
    child_leaf = (4 * int'(cur) >= NPAR);
    for (int i = 0; i < 4; i++) need[i] = !(st_child_b[i] && (child_leaf || st_child_d[i]));
  end

  always_comb begin
    table_addr = (st == ROOT) ? root_k : cur;
    set_b      = 1'b0;
    set_d      = 1'b0;
    lcb_push1  = 1'b0;
    lcb_addr   = root_k;
    lcb_push4  = 1'b0;
    lcb_base   = cur;
    lcb_mask   = 4'b1111;
    lcb_pop    = 1'b0;
    lpb_push   = 1'b0;
    lpb_addr   = cur;
    lpb_pop    = 1'b0;
    cag_start  = 1'b0;
    cag_mode   = SCAN_BLOCK;
    blk_addr   = cur;
    emit_n     = '0;
    emit_bits  = '0;
    sort_end   = (st == FIN);
    unique case (st)
      ROOT: lcb_push1 = !st_sig_d;
      POP:  lcb_pop = !lcb_empty;
      DEC: begin
        if (!st_sig_b) begin
          cag_start = 1'b1;
        end else if (st_child_b == 4'b0000) begin
          cag_start = 1'b1;
          cag_mode  = SCAN_DESC;
        end else begin
          lpb_push  = 1'b1;
          lcb_push4 = 1'b1;
          lcb_mask  = need;
        end
      end
      BLK: if (next_addr && !leaf) begin
        cag_start = 1'b1;
        cag_mode  = SCAN_DESC;
      end
      EMIT: begin
        if (!sb_q) begin
          if (leaf) begin
            if (tmax) begin
              emit_n    = 5'(temp_n) + 5'd1;
              emit_bits = (16'd1 << temp_n) | 16'(temp_bits);
              set_b     = 1'b1;
            end else begin
              emit_n = 5'd1;
            end
          end else begin
            if (tmax || dsig) begin
              emit_n    = 5'(temp_n) + 5'd2;
              emit_bits = (16'd1 << (temp_n + 4'd1)) | (16'(temp_bits) << 1) | 16'(dsig);
              set_b     = 1'b1;
            end else begin
              emit_n = 5'd1;
            end
          end
        end else begin
          emit_n    = 5'd1;
          emit_bits = 16'(dsig);
        end
        if (dsig) begin
          lpb_push  = 1'b1;
          lcb_push4 = 1'b1;
        end
      end
      LPB_POP: lpb_pop = !lpb_empty;
      LPB_UPD: set_d = child_leaf ? (&st_child_b) : (&st_child_d);
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= IDLE;
      cur       <= '0;
      root_i    <= '0;
      root_j    <= 2'd1;
      sb_q      <= 1'b0;
      tmax      <= 1'b0;
      dsig      <= 1'b0;
      temp_bits <= '0;
      temp_n    <= '0;
    end else begin
      unique case (st)
        IDLE: if (start) begin
          st     <= ROOT;
          root_i <= '0;
          root_j <= 2'd1;
        end
        ROOT: begin
          if (!st_sig_d) st <= POP;
          else if (last_root) st <= FIN;
          else if (root_j == 2'd3) begin
            root_j <= 2'd1;
            root_i <= root_i + 1'b1;
          end else root_j <= root_j + 1'b1;
        end
        POP: begin
          if (lcb_empty) st <= LPB_POP;
          else begin
            cur <= lcb_top;
            st  <= DEC;
          end
        end
        DEC: begin
          sb_q      <= st_sig_b;
          tmax      <= 1'b0;
          dsig      <= 1'b0;
          temp_bits <= '0;
          temp_n    <= '0;
          if (!st_sig_b) st <= BLK;
          else if (st_child_b == 4'b0000) st <= DSC;
          else st <= POP;
        end
        BLK: begin
          if (cag_valid) begin
            temp_bits <= 8'((16'(temp_bits) << cbg_n) | 16'(cbg_bits));
            temp_n    <= temp_n + 4'(cbg_n);
            tmax      <= tmax | cbg_sig;
          end
          if (next_addr) st <= leaf ? EMIT : DSC;
        end
        DSC: begin
          if (cag_valid) dsig <= dsig | cbg_sig;
          if (next_addr) st <= EMIT;
        end
        EMIT: st <= POP;
        LPB_POP: begin
          if (!lpb_empty) begin
            cur <= lpb_top;
            st  <= LPB_UPD;
          end else if (last_root) st <= FIN;
          else begin
            st <= ROOT;
            if (root_j == 2'd3) begin
              root_j <= 2'd1;
              root_i <= root_i + 1'b1;
            end else root_j <= root_j + 1'b1;
          end
        end
        LPB_UPD: st <= LPB_POP;
        FIN: st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end
endmodule
