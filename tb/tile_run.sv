// tile_run: testbench helper that compresses `TILES` random-texture tiles of
// size N x N (three DWT levels) with compressor_top #(.N(N)) and compares
// every byte, Init_Threshold and Max_Coeff with the reference transform and
// coder. Starts when `go` is high (sampled from the first falling clock edge
// on, after every instance has cleared `done`), raises `done` when finished
// and reports its check counts.
`timescale 1ns/1ps
module tile_run #(
  parameter int N     = 32,
  parameter int TILES = 2
) (
  input  logic clk,
  input  logic go,
  output logic done,
  output int   checks,
  output int   failures,
  output int   cycles
);
  import sot_ref_pkg::*;
  localparam int L = 3;
  logic rst = 1, new_tile = 0, in_ready, valid_byte, spiht_end;
  logic [7:0] data_in1, data_in2, byte_out;
  logic [3:0] init_threshold;
  logic [12:0] max_coeff;
  int img[$];
  int pair_idx;
  byte unsigned got[$];

  compressor_top #(.N(N)) dut (.*);

  assign data_in1 = 8'(img.size() == N * N ? img[(pair_idx / (N / 2)) * N + 2 * (pair_idx % (N / 2))] : 0);
  assign data_in2 = 8'(img.size() == N * N ? img[(pair_idx / (N / 2)) * N + 2 * (pair_idx % (N / 2)) + 1] : 0);
  always @(posedge clk) begin  // byte collector; the stimulus also clears `got`
    if (new_tile) pair_idx <= 0;
    else if (in_ready) pair_idx <= pair_idx + 1;
    if (valid_byte) got.push_back(byte_out);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: N=%0d %s", N, what); end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0; cycles = 0;
    @(negedge clk);  // let every instance clear `done` before `go` is looked at
    wait (go);
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < TILES; t++) begin
      int_q  c;
      byte_q exp;
      int    cyc;
      cyc = 0;
      img = {};
      for (int r = 0; r < N; r++) for (int col = 0; col < N; col++)
        img.push_back((t == 0) ? (60 + (r * 100) / N + (col * 60) / N + $urandom_range(0, 20)) : $urandom_range(0, 255));
      c = dwt53(img, N, L);
      clear_counters();
      exp = encode(c, N, L);
      got = {};
      @(negedge clk) new_tile = 1;
      @(negedge clk) new_tile = 0;
      while (spiht_end && cyc < 10) begin @(negedge clk); cyc++; end
      while (!spiht_end && cyc < 50_000_000) begin @(negedge clk); cyc++; end
      repeat (2) @(negedge clk);
      cycles += cyc;
      check(spiht_end, "spiht_end");
      check(init_threshold == 4'(ref_n0), "init_threshold");
      check(int'(max_coeff) == ref_max_high, "max_coeff");
      check(got.size() == exp.size(), $sformatf("tile %0d: %0d bytes, expected %0d", t, got.size(), exp.size()));
      for (int i = 0; i < exp.size() && i < got.size(); i++)
        check(got[i] == exp[i], $sformatf("tile %0d byte %0d", t, i));
      $display("N=%0d tile %0d: %0d bytes in %0d cycles (sorting passes %0d, skipped %0d, type A %0d, type B %0d)",
               N, t, got.size(), cyc, cnt_sp_run, cnt_sp_skipped, cnt_type_a, cnt_type_b);
    end
    done = 1;
  end
endmodule
