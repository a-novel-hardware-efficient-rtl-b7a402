// tb_state_table_mem: checks the initial state (SIG_B set only for the four
// coarsest blocks of a 16 x 16, three-level tile; SIG_D clear), then random
// set_b / set_d operations, reading every address with its four offspring
// after each step against a bit-array model; repeats after a re-init.
`timescale 1ns/1ps
module tb_state_table_mem;
  logic clk = 0, rst = 1, init = 0, set_b = 0, set_d = 0;
  logic [5:0] table_addr = 0;
  logic sig_b, sig_d;
  logic [3:0] child_b, child_d;
  bit mb[64], md[16];
  int checks = 0, failures = 0;

  state_table_mem #(.N(16), .LEVELS(3)) dut (.*);
  always #5 clk = ~clk;

  task automatic check_all();
    for (int a = 0; a < 64; a++) begin
      logic [3:0] eb, ed;
      table_addr = 6'(a);
      #1;
      for (int i = 0; i < 4; i++) begin
        eb[i] = (a < 16) ? mb[4 * a + i] : 1'b0;
        ed[i] = (4 * a + i < 16) ? md[4 * a + i] : 1'b0;
      end
      checks++;
      if (sig_b != mb[a] || sig_d != (a < 16 ? md[a] : 1'b0) || child_b != eb || child_d != ed) begin
        failures++;
        $display("FAIL: addr %0d: b=%b d=%b cb=%b cd=%b exp %b %b %b %b", a, sig_b, sig_d, child_b,
                 child_d, mb[a], (a < 16 ? md[a] : 1'b0), eb, ed);
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int round = 0; round < 2; round++) begin
      @(negedge clk) init = 1;
      @(negedge clk) init = 0;
      foreach (mb[i]) mb[i] = (i < 4);
      foreach (md[i]) md[i] = 0;
      check_all();
      for (int t = 0; t < 40; t++) begin
        @(negedge clk);
        table_addr = 6'($urandom_range(0, 63));
        set_b = $urandom_range(0, 1);
        set_d = $urandom_range(0, 1);
        if (set_b) mb[table_addr] = 1;
        if (set_d && table_addr < 16) md[table_addr] = 1;
        @(negedge clk);
        set_b = 0; set_d = 0;
        check_all();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
