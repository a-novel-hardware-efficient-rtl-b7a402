// coef_addr_gen: coefficient address generator of the encoder.
//
// On `start` it latches a block address and a scan mode and then issues two
// Morton coefficient addresses per cycle (Coef_Addr1 = a, Coef_Addr2 = a+1)
// with Valid high:
//   SCAN_BLOCK: the four coefficients 4b .. 4b+3 of block b (2 cycles);
//   SCAN_DESC : all coefficients of every descendant block of b, level by
//               level: depth m covers [4^(m+1) b, 4^(m+1) (b+1)).
// Next is high together with Valid in the last cycle of the scan; a new
// start may be given in the following cycle. The block-to-address rule is
// the document's Morton offspring rule; the descendant scan is this design's
// way of testing a set for significance. SCAN_DESC must not be used on a
// block without descendants or on an LL block.
module coef_addr_gen
  import sot_pkg::*;
#(
  parameter int unsigned N      = 16,
  localparam int unsigned AW    = 2 * $clog2(N),
  localparam int unsigned BW    = AW - 2
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  scan_mode_t    mode,
  input  logic [BW-1:0] blk_addr,
  output logic [AW-1:0] coef_addr1,
  output logic [AW-1:0] coef_addr2,
  output logic          valid,
  output logic          next
);
  localparam int unsigned NCOEF = N * N;

  scan_mode_t  mode_q;
  logic        busy;
  logic [31:0] cur, remaining, rstart, rlen;
  logic        range_last, more_ranges;

  always_comb begin
    range_last  = (remaining == 2);
    more_ranges = (mode_q == SCAN_DESC) && ((rstart << 2) < NCOEF);
    valid       = busy;
    next        = busy && range_last && !more_ranges;
    coef_addr1  = AW'(cur);
    coef_addr2  = AW'(cur + 1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      mode_q    <= SCAN_BLOCK;
      cur       <= '0;
      remaining <= '0;
      rstart    <= '0;
      rlen      <= '0;
    end else if (start) begin
      busy   <= 1'b1;
      mode_q <= mode;
      if (mode == SCAN_BLOCK) begin
        cur       <= 32'(blk_addr) << 2;
        remaining <= 4;
        rstart    <= 32'(blk_addr) << 2;
        rlen      <= 4;
      end else begin
        cur       <= 32'(blk_addr) << 4;
        remaining <= 16;
        rstart    <= 32'(blk_addr) << 4;
        rlen      <= 16;
      end
    end else if (busy) begin
      if (!range_last) begin
        cur       <= cur + 2;
        remaining <= remaining - 2;
      end else if (more_ranges) begin
        cur       <= rstart << 2;
        rstart    <= rstart << 2;
        remaining <= rlen << 2;
        rlen      <= rlen << 2;
      end else begin
        busy <= 1'b0;
      end
    end
  end
endmodule
