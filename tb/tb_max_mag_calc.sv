// tb_max_mag_calc: random coefficient pairs with random final/high flags;
// the running maxima and the leading-one bit plane are compared with a model.
`timescale 1ns/1ps
module tb_max_mag_calc;
  logic clk = 0, rst = 1, clear = 0, valid = 0, inc1 = 0, inc2 = 0, hi1 = 0, hi2 = 0;
  logic signed [15:0] c1 = 0, c2 = 0;
  logic [15:0] max_coeff, max_all;
  logic [3:0] init_threshold;
  int checks = 0, failures = 0;

  max_mag_calc #(.W(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m_all, m_hi, n0, a1, a2;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int tile = 0; tile < 20; tile++) begin
      int range_ = 1 << (tile % 13 + 1);
      clear = 1; @(negedge clk); clear = 0;
      m_all = 0; m_hi = 0;
      for (int t = 0; t < 100; t++) begin
        valid = $urandom_range(0, 3) != 0;
        c1 = 16'(int'($urandom_range(0, 2 * range_)) - range_);
        c2 = 16'(int'($urandom_range(0, 2 * range_)) - range_);
        inc1 = $urandom_range(0, 1); hi1 = inc1 & 1'($urandom_range(0, 1));
        inc2 = 1; hi2 = $urandom_range(0, 1);
        a1 = c1 < 0 ? -c1 : c1;
        a2 = c2 < 0 ? -c2 : c2;
        if (valid) begin
          if (inc1 && a1 > m_all) m_all = a1;
          if (inc2 && a2 > m_all) m_all = a2;
          if (hi1 && a1 > m_hi) m_hi = a1;
          if (hi2 && a2 > m_hi) m_hi = a2;
        end
        @(negedge clk);
        n0 = 0;
        for (int i = 0; i < 16; i++) if ((m_all >> i) & 1) n0 = i;
        checks++;
        if (int'(max_all) != m_all || int'(max_coeff) != m_hi || int'(init_threshold) != n0) begin
          failures++;
          $display("FAIL: tile %0d step %0d: all %0d/%0d high %0d/%0d n0 %0d/%0d", tile, t,
                   max_all, m_all, max_coeff, m_hi, init_threshold, n0);
        end
      end
      valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
