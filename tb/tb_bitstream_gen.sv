// tb_bitstream_gen: feeds random bit groups (mostly 0-4 bits, sometimes up to
// 10, with gaps), flushes, and compares the bytes with the same bits packed
// MSB first and zero-padded. Also checks that done follows the last byte.
`timescale 1ns/1ps
module tb_bitstream_gen;
  import sot_ref_pkg::*;
  logic clk = 0, rst = 1, flush = 0, valid_byte, done;
  logic [4:0] in_n = 0;
  logic [15:0] in_bits = 0;
  logic [7:0] byte_out;
  int checks = 0, failures = 0;
  byte unsigned got[$];
  int dones;

  bitstream_gen dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin  // byte collector; the stimulus also clears `got`
    if (valid_byte) got.push_back(byte_out);
    if (done) dones <= dones + 1;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int run = 0; run < 30; run++) begin
      bit_q  sent;
      byte_q exp;
      int    total = 0, w;
      sent = {};
      got = {};
      dones = 0;
      for (int t = 0; t < 200 + run; t++) begin
        w = ($urandom_range(0, 9) == 0) ? $urandom_range(5, 10) : $urandom_range(0, 4);
        if (w > 4) begin
          // a burst is followed by an idle cycle, as in the encoder
          in_n = 5'(w); in_bits = 16'($urandom);
          for (int i = w - 1; i >= 0; i--) sent.push_back(in_bits[i]);
          @(negedge clk);
          in_n = 0;
          @(negedge clk);
        end else begin
          in_n = 5'(w); in_bits = 16'($urandom);
          for (int i = w - 1; i >= 0; i--) sent.push_back(in_bits[i]);
          @(negedge clk);
        end
      end
      in_n = 0;
      flush = 1; @(negedge clk); flush = 0;
      repeat (10) @(negedge clk);
      exp = pack(sent);
      checks++;
      if (dones != 1) begin failures++; $display("FAIL: run %0d done pulses %0d", run, dones); end
      checks++;
      if (got.size() != exp.size()) begin failures++; $display("FAIL: run %0d %0d bytes exp %0d", run, got.size(), exp.size()); end
      for (int i = 0; i < exp.size() && i < got.size(); i++) begin
        checks++;
        if (got[i] != exp[i]) begin failures++; $display("FAIL: run %0d byte %0d %02x exp %02x", run, i, got[i], exp[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
