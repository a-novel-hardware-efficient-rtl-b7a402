// lift53_1d: one-dimensional CDF 5/3 forward lifting processor, used both as
// the row processor and the column processor of the DWT stage.
//
// A line of 2M samples enters as M pairs (x[2j], x[2j+1]), one pair per cycle
// with `en`. The pair with border.first starts a line. After the last pair
// the controller spends one extra cycle with border.flush (and `en`) set.
// From the second pair on, and in the flush cycle, the unit produces the
// low/high pair of the previous position on `s`/`d` with `out_valid`,
// combinationally in the same cycle:
//   d[j] = x[2j+1] - floor((x[2j] + x[2j+2]) / 2)
//   s[j] = x[2j]   + floor((d[j-1] + d[j] + 2) / 4)
// Borders use whole-sample symmetric extension (x[2M] = x[2M-2] and
// d[-1] = d[0]), the usual integer 5/3 filter. The document names the filter
// and the border-control signals; the pair-per-cycle pipeline is this
// design's own. Latency: the output of pair j appears with pair j+1.
module lift53_1d
  import sot_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  border_ctrl_t        border,
  input  logic signed [W-1:0] x_even,
  input  logic signed [W-1:0] x_odd,
  output logic                out_valid,
  output logic signed [W-1:0] s,
  output logic signed [W-1:0] d
);
  logic signed [W-1:0] prev_e, prev_o, prev_d;
  logic                prev_first;   // held pair was the first of its line
  logic signed [W:0]   sum_e, sum_d;
  logic signed [W-1:0] next_e, d_cur, d_left;

  always_comb begin
    next_e    = border.flush ? prev_e : x_even;
    sum_e     = (W+1)'(prev_e) + (W+1)'(next_e);
    d_cur     = prev_o - W'(sum_e >>> 1);
    d_left    = prev_first ? d_cur : prev_d;
    sum_d     = (W+1)'(d_left) + (W+1)'(d_cur) + (W+1)'(2);
    s         = prev_e + W'(sum_d >>> 2);
    d         = d_cur;
    out_valid = en && !border.first;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      prev_e     <= '0;
      prev_o     <= '0;
      prev_d     <= '0;
      prev_first <= 1'b1;
    end else if (en && !border.flush) begin
      prev_e     <= x_even;
      prev_o     <= x_odd;
      prev_d     <= border.first ? '0 : d_cur;
      prev_first <= border.first;
    end
  end
endmodule
