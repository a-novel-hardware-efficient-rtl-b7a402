// tb_compare_bit_gen: random coefficient pairs and bit planes; the bit string,
// its length and the significance flag are compared with the coding rules
// (0 / 1 / 1 sgn per coefficient, coefficient 1 first).
`timescale 1ns/1ps
module tb_compare_bit_gen;
  logic valid;
  logic [3:0] threshold;
  logic signed [12:0] coeff_data1, coeff_data2;
  logic [3:0] bit_string;
  logic [2:0] n_str;
  logic sig_any;
  int checks = 0, failures = 0;

  compare_bit_gen #(.COEF_W(13)) dut (.*);

  function automatic void code(int c, int n, ref int bits, ref int len, ref bit sig);
    int m = c < 0 ? -c : c;
    sig = m >= (1 << n);
    if (((m >> n) & 1) == 0) begin bits = 0; len = 1; end
    else if (m >= (1 << (n + 1))) begin bits = 1; len = 1; end
    else begin bits = 2 | (c < 0); len = 2; end
  endfunction

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int b1, l1, b2, l2, eb, el;
      bit s1, s2;
      valid = (t % 7) != 0;
      threshold = 4'($urandom_range(0, 11));
      coeff_data1 = 13'(int'($urandom_range(0, 8190)) - 4095);
      coeff_data2 = 13'(int'($urandom_range(0, 1 << (threshold + 2))) - (1 << (threshold + 1)));
      #1;
      code(coeff_data1, threshold, b1, l1, s1);
      code(coeff_data2, threshold, b2, l2, s2);
      eb = valid ? (b1 << l2) | b2 : 0;
      el = valid ? l1 + l2 : 0;
      checks++;
      if (int'(bit_string) != eb || int'(n_str) != el || sig_any != (valid && (s1 || s2))) begin
        failures++;
        $display("FAIL: c=%0d,%0d n=%0d got %b/%0d/%b exp %b/%0d", coeff_data1, coeff_data2, threshold,
                 bit_string, n_str, sig_any, 4'(eb), el);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
