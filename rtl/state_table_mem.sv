// state_table_mem: the SIG_B and SIG_D state tables.
//
// SIG_B has one bit per 2x2 block (N*N/4 bits), SIG_D one bit per block that
// has descendants (N*N/16 bits), both indexed by Morton block address. `init`
// loads the start state: SIG_B = 1 for the blocks of the coarsest level
// (LL_L and its three sibling bands), 0 elsewhere; SIG_D = 0 everywhere.
// A read at table_addr returns the block's own bits and the bits of its four
// offspring 4x..4x+3 (zero where they do not exist); it is combinational.
// set_b / set_d set the addressed bit at the clock edge. The table sizes and
// the initial state follow the document (see the encoder notes on the
// coarsest level); the read port shape is this design's own.
module state_table_mem #(
  parameter int unsigned N      = 16,
  parameter int unsigned LEVELS = 3,
  localparam int unsigned BW    = 2 * $clog2(N) - 2
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          init,
  input  logic [BW-1:0] table_addr,
  input  logic          set_b,
  input  logic          set_d,
  output logic          sig_b,
  output logic          sig_d,
  output logic [3:0]    child_b,
  output logic [3:0]    child_d
);
  localparam int unsigned NBLK = N * N / 4;
  localparam int unsigned NPAR = NBLK / 4;
  localparam int unsigned PW   = $clog2(NPAR);
  localparam int unsigned NTOP = (N >> (LEVELS - 1)) * (N >> (LEVELS - 1)) / 4;

  logic [NBLK-1:0] sig_b_q;
  logic [NPAR-1:0] sig_d_q;

  always_ff @(posedge clk) begin
    if (rst || init) begin
      for (int i = 0; i < NBLK; i++) sig_b_q[i] <= (i < NTOP);
      sig_d_q <= '0;
    end else begin
      if (set_b) sig_b_q[table_addr] <= 1'b1;
      if (set_d && int'(table_addr) < NPAR) sig_d_q[PW'(table_addr)] <= 1'b1;
    end
  end

  always_comb begin
    int unsigned a;
    a       = int'(table_addr);
    sig_b   = sig_b_q[table_addr];
    sig_d   = (a < NPAR) ? sig_d_q[a] : 1'b0;
    child_b = '0;
    child_d = '0;
    for (int i = 0; i < 4; i++) begin
      if (a < NPAR) child_b[i] = sig_b_q[4 * a + i];
      if (4 * a + i < NPAR) child_d[i] = sig_d_q[4 * a + i];
    end
  end
endmodule
