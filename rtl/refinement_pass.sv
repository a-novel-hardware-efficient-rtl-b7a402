// refinement_pass: refinement-pass address unit of the encoder.
//
// On `start` it walks all block addresses in Morton order (a breadth-first
// scan of the whole tile). For each block it reads SIG_B through
// table_addr; a block with SIG_B = 1 is handed to the coefficient address
// generator (cag_start with blk_addr) and the unit waits for Next from the
// control unit before moving on; every coefficient of the block is then coded
// by the compare-and-bit generator straight into the bitstream. A block with
// SIG_B = 0 costs one cycle. After the last block Ref_end pulses for one
// cycle. Cycles per pass: NBLK + 2 per significant block + 1.
// The scan rule is the document's; the one-block-at-a-time handshake is
// this design's own.
module refinement_pass #(
  parameter int unsigned N   = 16,
  localparam int unsigned BW = 2 * $clog2(N) - 2
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic          sig_b,
  input  logic          next_addr,
  output logic [BW-1:0] table_addr,
  output logic [BW-1:0] blk_addr,
  output logic          cag_start,
  output logic          ref_end
);
  localparam int unsigned NBLK = N * N / 4;

  typedef enum logic [1:0] {IDLE, CHECK, WAIT, FIN} st_t;
  st_t       st;
  logic [BW:0] b;

  assign table_addr = BW'(b);
  assign blk_addr   = BW'(b);
  assign cag_start  = (st == CHECK) && (int'(b) < NBLK) && sig_b;
  assign ref_end    = (st == FIN);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= IDLE;
      b  <= '0;
    end else begin
      unique case (st)
        IDLE: if (start) begin
          st <= CHECK;
          b  <= '0;
        end
        CHECK: begin
          if (int'(b) >= NBLK) st <= FIN;
          else if (sig_b) st <= WAIT;
          else b <= b + 1'b1;
        end
        WAIT: if (next_addr) begin
          st <= CHECK;
          b  <= b + 1'b1;
        end
        FIN: st <= IDLE;
      endcase
    end
  end
endmodule
