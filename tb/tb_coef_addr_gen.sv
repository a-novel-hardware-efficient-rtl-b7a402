// tb_coef_addr_gen: block scans of all 64 blocks and descendant scans of all
// 15 blocks that have descendants (16 x 16 tile); the address sequence, the
// Valid/Next timing and the scan length are compared with the expected
// Morton ranges.
`timescale 1ns/1ps
module tb_coef_addr_gen;
  import sot_pkg::*;
  logic clk = 0, rst = 1, start = 0, valid, next;
  scan_mode_t mode = SCAN_BLOCK;
  logic [5:0] blk_addr = 0;
  logic [7:0] coef_addr1, coef_addr2;
  int checks = 0, failures = 0;

  coef_addr_gen #(.N(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic scan(int b, scan_mode_t m);
    int exp[$];
    int k = 0;
    if (m == SCAN_BLOCK) for (int p = 4 * b; p < 4 * b + 4; p++) exp.push_back(p);
    else for (int s = 16 * b, l = 16; s < 256; s *= 4, l *= 4)
      for (int p = s; p < s + l; p++) exp.push_back(p);
    @(negedge clk);
    start = 1; mode = m; blk_addr = 6'(b);
    @(negedge clk);
    start = 0;
    while (1) begin
      checks++;
      if (!valid || int'(coef_addr1) != exp[k] || int'(coef_addr2) != exp[k + 1]) begin
        failures++;
        $display("FAIL: blk %0d mode %0d step %0d: v=%b %0d %0d exp %0d %0d", b, m, k / 2, valid,
                 coef_addr1, coef_addr2, exp[k], exp[k + 1]);
        break;
      end
      k += 2;
      checks++;
      if (next != (k == exp.size())) begin
        failures++;
        $display("FAIL: blk %0d mode %0d: next=%b at %0d of %0d", b, m, next, k, exp.size());
        break;
      end
      if (next) break;
      @(negedge clk);
    end
    @(negedge clk);
    checks++;
    if (valid) begin failures++; $display("FAIL: valid after next"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int b = 0; b < 64; b++) scan(b, SCAN_BLOCK);
    for (int b = 1; b < 16; b++) scan(b, SCAN_DESC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
