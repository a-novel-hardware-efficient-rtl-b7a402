// dwt_control: sequencer of the three-level 2-D DWT stage.
//
// For every level l (line length S = N >> l, H = S/2 pairs per line) it first
// runs the row pass: for each row r, H cycles feed pairs (r,2j),(r,2j+1) into
// the row processor, from Data_in1/2 at level 0 (in_ready high) or from MEM_B
// at higher levels, followed by one border (flush) cycle. Row outputs go to
// MEM_A in raster order: low half to column j, high half to column H+j.
// Then the column pass does the same down each column c, reading MEM_A and
// writing the low/high outputs into MEM_B at their Morton addresses (rows j
// and H+j). After the column pass of the last level DWT_end rises and stays
// high until the next New_tile. A tile takes sum over levels of
// 2*S*(S/2+1) cycles (392 for N=16, three levels).
// The document gives the control outputs (Border_ctrl_row/col, Addr1/2,
// DWT_End); this ordering is this design's own.
module dwt_control
  import sot_pkg::*;
#(
  parameter int unsigned N      = 16,
  parameter int unsigned LEVELS = 3,
  localparam int unsigned NB    = $clog2(N),
  localparam int unsigned AW    = 2 * NB
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          new_tile,
  // row processor
  output logic          row_en,
  output border_ctrl_t  border_ctrl_row,
  output logic          sel_input,       // row source: 1 = Data_in1/2, 0 = MEM_B
  output logic          in_ready,
  // column processor
  output logic          col_en,
  output border_ctrl_t  border_ctrl_col,
  // MEM_A (raster order)
  output logic          mema_we,
  output logic [AW-1:0] mema_addr1,
  output logic [AW-1:0] mema_addr2,
  // MEM_B (Morton order)
  output logic          memb_we,
  output logic [AW-1:0] memb_addr1,
  output logic [AW-1:0] memb_addr2,
  // maximum magnitude calculator qualifiers for the two column outputs
  output logic          mx_clear,
  output logic          mx_inc1,
  output logic          mx_hi1,
  output logic          dwt_end
);
  typedef enum logic [1:0] {IDLE, ROW, COL, DONE} st_t;
  st_t         st;
  logic [3:0]  lvl;
  logic [NB:0] line, j;
  logic [NB:0] len, half;
  logic        last_line, last_j;

  always_comb begin
    len       = (NB+1)'(N >> lvl);
    half      = len >> 1;
    last_j    = (j == half);
    last_line = (line == len - 1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st   <= IDLE;
      lvl  <= '0;
      line <= '0;
      j    <= '0;
    end else if (new_tile) begin
      st   <= ROW;
      lvl  <= '0;
      line <= '0;
      j    <= '0;
    end else if (st == ROW || st == COL) begin
      if (!last_j) j <= j + 1'b1;
      else begin
        j <= '0;
        if (!last_line) line <= line + 1'b1;
        else begin
          line <= '0;
          if (st == ROW) st <= COL;
          else if (lvl == 4'(LEVELS - 1)) st <= DONE;
          else begin
            st  <= ROW;
            lvl <= lvl + 1'b1;
          end
        end
      end
    end
  end

  always_comb begin
    int unsigned jm1;
    jm1             = (j == 0) ? 0 : int'(j) - 1;
    row_en          = (st == ROW);
    col_en          = (st == COL);
    border_ctrl_row = '{first: (j == 0), flush: last_j};
    border_ctrl_col = '{first: (j == 0), flush: last_j};
    sel_input       = (lvl == 0);
    in_ready        = (st == ROW) && (lvl == 0) && !last_j;
    mema_we         = (st == ROW) && (j != 0);
    memb_we         = (st == COL) && (j != 0);
    mema_addr1      = '0;
    mema_addr2      = '0;
    memb_addr1      = '0;
    memb_addr2      = '0;
    if (st == ROW) begin
      // row outputs into MEM_A, row source from MEM_B
      mema_addr1 = AW'(int'(line) * N + jm1);
      mema_addr2 = AW'(int'(line) * N + int'(half) + jm1);
      memb_addr1 = AW'(morton(line, 2 * int'(j), NB));
      memb_addr2 = AW'(morton(line, 2 * int'(j) + 1, NB));
    end else if (st == COL) begin
      // column source from MEM_A, column outputs into MEM_B
      mema_addr1 = AW'((2 * int'(j)) * N + int'(line));
      mema_addr2 = AW'((2 * int'(j) + 1) * N + int'(line));
      memb_addr1 = AW'(morton(jm1, line, NB));
      memb_addr2 = AW'(morton(int'(half) + jm1, line, NB));
    end
    mx_clear = new_tile;
    mx_hi1   = (line >= half);
    mx_inc1  = (line >= half) || (lvl == 4'(LEVELS - 1));
    dwt_end  = (st == DONE);
  end

  // the two ports of a memory never write the same word in one cycle
  a_mema_ports: assert property (@(posedge clk) disable iff (rst) mema_we |-> mema_addr1 != mema_addr2);
  a_memb_ports: assert property (@(posedge clk) disable iff (rst) memb_we |-> memb_addr1 != memb_addr2);
endmodule
