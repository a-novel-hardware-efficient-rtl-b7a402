// tb_dp_mem: random writes and reads on both ports of the dual-port memory,
// compared with an array model (distinct addresses when both ports write).
`timescale 1ns/1ps
module tb_dp_mem;
  logic clk = 0, we1 = 0, we2 = 0;
  logic [7:0] addr1 = 0, addr2 = 0;
  logic [15:0] wdata1 = 0, wdata2 = 0, rdata1, rdata2;
  logic [15:0] model [256];
  int checks = 0, failures = 0;

  dp_mem #(.DEPTH(256), .W(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word first so that all reads are defined
    for (int a = 0; a < 256; a += 2) begin
      @(negedge clk);
      we1 = 1; we2 = 1; addr1 = 8'(a); addr2 = 8'(a + 1);
      wdata1 = 16'($urandom); wdata2 = 16'($urandom);
      model[a] = wdata1; model[a + 1] = wdata2;
    end
    @(negedge clk);
    we1 = 0; we2 = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      addr1 = 8'($urandom); addr2 = 8'($urandom);
      #1;
      checks += 2;
      if (rdata1 != model[addr1]) begin failures++; $display("FAIL: port1 read %0d", addr1); end
      if (rdata2 != model[addr2]) begin failures++; $display("FAIL: port2 read %0d", addr2); end
      we1 = $urandom_range(0, 1);
      we2 = (addr1 != addr2) ? 1'($urandom_range(0, 1)) : 1'b0;
      wdata1 = 16'($urandom); wdata2 = 16'($urandom);
      if (we1) model[addr1] = wdata1;
      if (we2) model[addr2] = wdata2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
