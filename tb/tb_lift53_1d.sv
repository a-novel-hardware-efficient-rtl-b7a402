// tb_lift53_1d: checks the 1-D 5/3 lifting processor against the reference
// line transform for random lines of 2, 4, 8 and 16 samples, including
// negative inputs, and checks that outputs come exactly one pair late.
`timescale 1ns/1ps
module tb_lift53_1d;
  import sot_pkg::*;
  import sot_ref_pkg::*;
  logic clk = 0, rst = 1, en = 0, out_valid;
  border_ctrl_t border = '0;
  logic signed [15:0] x_even = 0, x_odd = 0, s, d;
  int checks = 0, failures = 0;

  lift53_1d #(.W(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 200; t++) begin
      int   len = 2 << (t % 4);
      int_q x, y;
      x = {};
      for (int i = 0; i < len; i++) x.push_back((t % 3 == 0) ? $urandom_range(0, 255) : int'($urandom_range(0, 2000)) - 1000);
      y = lift_line(x);
      for (int j = 0; j <= len / 2; j++) begin
        en = 1;
        border = '{first: (j == 0), flush: (j == len / 2)};
        x_even = (j < len / 2) ? 16'(x[2 * j]) : 16'sd0;
        x_odd  = (j < len / 2) ? 16'(x[2 * j + 1]) : 16'sd0;
        #1;
        checks++;
        if (out_valid != (j != 0)) begin
          failures++;
          $display("FAIL: out_valid at pair %0d", j);
        end
        if (j != 0) begin
          checks++;
          if (int'(s) != y[j - 1] || int'(d) != y[len / 2 + j - 1]) begin
            failures++;
            $display("FAIL: line %0d pos %0d: s=%0d d=%0d exp %0d %0d", t, j - 1, s, d, y[j - 1], y[len / 2 + j - 1]);
          end
        end
        @(negedge clk);
      end
      en = 0;
      border = '0;
      if (t % 5 == 0) @(negedge clk);   // idle gap between some lines
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
