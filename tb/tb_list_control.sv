// tb_list_control: random pushes (single and masked groups of four
// offspring) and pops on LCB and LPB within their depths (7 and 5), compared
// with queue models; checks top, empty and the offspring order (lowest on
// top).
`timescale 1ns/1ps
module tb_list_control;
  logic clk = 0, rst = 1;
  logic lcb_push1 = 0, lcb_push4 = 0, lcb_pop = 0, lpb_push = 0, lpb_pop = 0, lcb_empty, lpb_empty;
  logic [5:0] lcb_addr = 0, lcb_base = 0, lpb_addr = 0, lcb_top, lpb_top;
  logic [3:0] lcb_mask = 0;
  int checks = 0, failures = 0;
  int mlcb[$], mlpb[$];

  list_control #(.BW(6), .LCB_DEPTH(7), .LPB_DEPTH(5)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 4000; t++) begin
      int op;
      #1;
      checks++;
      if (lcb_empty != (mlcb.size() == 0) || lpb_empty != (mlpb.size() == 0) ||
          (mlcb.size() > 0 && int'(lcb_top) != mlcb[$]) || (mlpb.size() > 0 && int'(lpb_top) != mlpb[$])) begin
        failures++;
        $display("FAIL: step %0d lcb top %0d empty %b (model %p) lpb top %0d empty %b (model %p)", t,
                 lcb_top, lcb_empty, mlcb, lpb_top, lpb_empty, mlpb);
      end
      lcb_push1 = 0; lcb_push4 = 0; lcb_pop = 0; lpb_push = 0; lpb_pop = 0;
      op = $urandom_range(0, 2);
      if (op == 0 && mlcb.size() < 7) begin
        lcb_push1 = 1; lcb_addr = 6'($urandom); mlcb.push_back(lcb_addr);
      end else if (op == 1) begin
        lcb_base = 6'($urandom_range(0, 15)); lcb_mask = 4'($urandom);
        if (mlcb.size() + $countones(lcb_mask) <= 7) begin
          lcb_push4 = 1;
          for (int i = 3; i >= 0; i--) if (lcb_mask[i]) mlcb.push_back(4 * lcb_base + i);
        end
      end else if (mlcb.size() > 0) begin
        lcb_pop = 1; void'(mlcb.pop_back());
      end
      if ($urandom_range(0, 1) && mlpb.size() < 5) begin
        lpb_push = 1; lpb_addr = 6'($urandom); mlpb.push_back(lpb_addr);
      end else if (mlpb.size() > 0 && $urandom_range(0, 1)) begin
        lpb_pop = 1; void'(mlpb.pop_back());
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
