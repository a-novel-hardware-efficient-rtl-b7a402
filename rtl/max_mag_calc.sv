// max_mag_calc: maximum magnitude calculator of the DWT stage.
//
// Watches the two coefficients written by the column processor each cycle.
// `inc1`/`inc2` mark a coefficient as final (it stays in MEM_B), `hi1`/`hi2`
// as belonging to a high-frequency band. It keeps the largest magnitude over
// final coefficients, whose leading-one position is the initial bit plane
// Init_Threshold (threshold 2^init_threshold), and the largest magnitude over
// the high bands, Max_Coeff, which lets the encoder skip sorting passes that
// could find nothing. `clear` restarts both at a new tile. Outputs are
// registered and valid the cycle after the last write.
module max_mag_calc
  import sot_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                clear,
  input  logic                valid,
  input  logic signed [W-1:0] c1,
  input  logic signed [W-1:0] c2,
  input  logic                inc1,
  input  logic                inc2,
  input  logic                hi1,
  input  logic                hi2,
  output logic [W-1:0]        max_coeff,
  output logic [W-1:0]        max_all,
  output logic [3:0]          init_threshold
);
  logic [W-1:0] m1, m2, all_n, hi_n;

  always_comb begin
    m1    = c1[W-1] ? W'(-c1) : W'(c1);
    m2    = c2[W-1] ? W'(-c2) : W'(c2);
    all_n = max_all;
    hi_n  = max_coeff;
    if (inc1 && m1 > all_n) all_n = m1;
    if (inc2 && m2 > all_n) all_n = m2;
    if (hi1 && m1 > hi_n) hi_n = m1;
    if (hi2 && m2 > hi_n) hi_n = m2;
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      max_all   <= '0;
      max_coeff <= '0;
    end else if (valid) begin
      max_all   <= all_n;
      max_coeff <= hi_n;
    end
  end

  assign init_threshold = 4'(msb_index(32'(max_all)));
endmodule
