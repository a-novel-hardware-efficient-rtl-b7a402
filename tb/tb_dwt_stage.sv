// tb_dwt_stage: transforms random and structured 16 x 16 tiles, then reads
// all of MEM_B through the encoder ports and compares it with the reference
// 3-level 5/3 transform in Morton order. Also checks Max_Coeff (high bands
// only), Init_Threshold, the 128 input pairs and the 392-cycle tile time.
`timescale 1ns/1ps
module tb_dwt_stage;
  import sot_ref_pkg::*;
  localparam int N = 16, L = 3;
  logic clk = 0, rst = 1, new_tile = 0, in_ready, dwt_end;
  logic [7:0] data_in1, data_in2;
  logic [7:0] addr_in1 = 0, addr_in2 = 0;
  logic signed [15:0] data_out1, data_out2;
  logic [15:0] max_coeff;
  logic [3:0] init_threshold;
  int checks = 0, failures = 0;
  int img[$];
  int pair_idx, pairs_taken;

  dwt_stage #(.N(N), .LEVELS(L), .PIX_W(8), .W(16)) dut (.*);
  always #5 clk = ~clk;

  assign data_in1 = 8'(img.size() == N * N ? img[(pair_idx / (N / 2)) * N + 2 * (pair_idx % (N / 2))] : 0);
  assign data_in2 = 8'(img.size() == N * N ? img[(pair_idx / (N / 2)) * N + 2 * (pair_idx % (N / 2)) + 1] : 0);
  always_ff @(posedge clk)
    if (new_tile) pair_idx <= 0;
    else if (in_ready) pair_idx <= pair_idx + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_tile(int t);
    int_q c;
    byte_q dummy;
    int cyc = 0;
    c = dwt53(img, N, L);
    clear_counters();
    dummy = encode(c, N, L);   // fills ref_max_high / ref_n0
    @(negedge clk) new_tile = 1;
    @(negedge clk) new_tile = 0;
    while (!dwt_end && cyc < 5000) begin @(negedge clk); cyc++; end
    check(cyc == 392, $sformatf("tile %0d: %0d cycles", t, cyc));
    check(pair_idx == N * N / 2, $sformatf("tile %0d: %0d pairs taken", t, pair_idx));
    check(int'(max_coeff) == ref_max_high, $sformatf("tile %0d: max_coeff %0d vs %0d", t, max_coeff, ref_max_high));
    check(int'(init_threshold) == ref_n0, $sformatf("tile %0d: init_threshold %0d vs %0d", t, init_threshold, ref_n0));
    for (int a = 0; a < N * N; a += 2) begin
      addr_in1 = 8'(a); addr_in2 = 8'(a + 1);
      #1;
      check(int'(data_out1) == c[a] && int'(data_out2) == c[a + 1],
            $sformatf("tile %0d: coef %0d = %0d,%0d exp %0d,%0d", t, a, data_out1, data_out2, c[a], c[a + 1]));
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
    for (int t = 0; t < 4; t++) begin
      img = {};
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
        case (t)
          0: img.push_back($urandom_range(0, 255));
          1: img.push_back(10 * r + 5 * c);
          2: img.push_back(((r + c) % 2) ? 255 : 0);
          default: img.push_back(c > 7 ? 230 : 20);
        endcase
      run_tile(t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
