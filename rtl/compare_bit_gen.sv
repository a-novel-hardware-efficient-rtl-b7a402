// compare_bit_gen: compare-and-bit generator of the encoder.
//
// Codes the two coefficients read from MEM_B in one cycle against bit plane
// n (threshold 2^n). Per coefficient, with m = |c|:
//   bit n of m is 0                      -> "0"
//   bit n is 1 and m >= 2^(n+1)          -> "1"      (already significant)
//   bit n is 1 and m <  2^(n+1)          -> "1 sgn"  (becomes significant)
// sgn is 1 for a negative coefficient. Coefficient 1 comes first. The result
// is Bit_string, right-aligned (bit N_str-1 is sent first), and N_str, the
// number of valid bits (0 to 4, 0 when Valid is low). sig_any reports
// m >= 2^n for either coefficient, used by the sorting pass for Temp and for
// descendant-set tests. Purely combinational. The bit rules are the
// document's; the sign polarity and bit order are this design's choice.
module compare_bit_gen #(
  parameter int unsigned COEF_W = 13
) (
  input  logic                     valid,
  input  logic [3:0]               threshold,
  input  logic signed [COEF_W-1:0] coeff_data1,
  input  logic signed [COEF_W-1:0] coeff_data2,
  output logic [3:0]               bit_string,
  output logic [2:0]               n_str,
  output logic                     sig_any
);
  typedef struct packed {
    logic [1:0] bits;
    logic [1:0] len;
    logic       sig;
  } code_t;

  function automatic code_t code_one(input logic signed [COEF_W-1:0] c, input logic [3:0] n);
    logic [COEF_W:0] m;
    code_t           r;
    m     = c[COEF_W-1] ? (COEF_W+1)'(-c) : (COEF_W+1)'(c);
    r.sig = (m >> n) != 0;
    if (!m[n]) begin
      r.bits = 2'b00;
      r.len  = 2'd1;
    end else if ((m >> n) > 1) begin
      r.bits = 2'b01;
      r.len  = 2'd1;
    end else begin
      r.bits = {1'b1, c[COEF_W-1]};
      r.len  = 2'd2;
    end
    return r;
  endfunction

  code_t k1, k2;

  always_comb begin
    k1         = code_one(coeff_data1, threshold);
    k2         = code_one(coeff_data2, threshold);
    bit_string = '0;
    n_str      = '0;
    sig_any    = 1'b0;
    if (valid) begin
      bit_string = 4'(({2'b00, k1.bits} << k2.len) | {2'b00, k2.bits});
      n_str      = 3'(k1.len) + 3'(k2.len);
      sig_any    = k1.sig | k2.sig;
    end
  end
endmodule
