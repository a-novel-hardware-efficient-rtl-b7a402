// tb_compressor_top: end-to-end test of the compressor at its default size
// (16 x 16 tile, three DWT levels).
//
// Three tiles are compressed back to back: a smooth gradient (large LL, small
// detail, so the first sorting passes are skipped), a random-noise tile (all
// trees become fully significant, so whole roots get skipped through SIG_D)
// and a tile of edges and texture. For each, the byte stream, Init_Threshold
// and Max_Coeff are compared with the reference transform and coder, and the
// number of pixel pairs taken is checked (the transform time is checked in
// tb_dwt_stage). Every coding case of the
// algorithm is counted and must occur at least once.
`timescale 1ns/1ps
module tb_compressor_top;
  import sot_ref_pkg::*;

  localparam int N = 16, L = 3;

  logic       clk = 0, rst = 1, new_tile = 0;
  logic [7:0] data_in1, data_in2, byte_out;
  logic       in_ready, valid_byte, spiht_end;
  logic [3:0] init_threshold;
  logic [12:0] max_coeff;

  int checks = 0, failures = 0;
  int img[$];
  int pair_idx;
  byte unsigned got[$];

  compressor_top dut (.*);

  always #5 clk = ~clk;

  assign data_in1 = 8'(img.size() == N * N ? img[(pair_idx / (N / 2)) * N + 2 * (pair_idx % (N / 2))] : 0);
  assign data_in2 = 8'(img.size() == N * N ? img[(pair_idx / (N / 2)) * N + 2 * (pair_idx % (N / 2)) + 1] : 0);

  always @(posedge clk) begin  // byte collector; the stimulus also clears `got`
    if (new_tile) pair_idx <= 0;
    else if (in_ready) pair_idx <= pair_idx + 1;
    if (valid_byte) got.push_back(byte_out);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // totals of the coding cases over all tiles
  int t_skip, t_sp, t_a, t_b, t_root, t_sigd, t_new, t_ref, t_leaf, t_node, t_zero;

  task automatic run_tile(string name);
    int_q   c;
    byte_q  exp;
    int     cyc;
    c = dwt53(img, N, L);
    clear_counters();
    exp = encode(c, N, L);
    got = {};
    @(negedge clk) new_tile = 1;
    @(negedge clk) new_tile = 0;
    cyc = 0;
    // spiht_end of the previous tile falls once the transform has restarted
    while (spiht_end && cyc < 10) begin
      @(negedge clk);
      cyc++;
    end
    while (!spiht_end && cyc < 100000) begin
      @(negedge clk);
      cyc++;
    end
    repeat (2) @(negedge clk);
    check(spiht_end, {name, ": spiht_end"});
    check(pair_idx == N * N / 2, $sformatf("%s: %0d pixel pairs taken, expected %0d", name, pair_idx, N * N / 2));
    check(init_threshold == 4'(ref_n0), $sformatf("%s: init_threshold %0d vs %0d", name, init_threshold, ref_n0));
    check(int'(max_coeff) == ref_max_high, $sformatf("%s: max_coeff %0d vs %0d", name, max_coeff, ref_max_high));
    check(got.size() == exp.size(), $sformatf("%s: %0d bytes, expected %0d", name, got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      check(got[i] == exp[i], $sformatf("%s: byte %0d = %02x, expected %02x", name, i, got[i], exp[i]));
    $display("%s: %0d bytes in %0d cycles; n0=%0d max_high=%0d; sp_skip=%0d sp=%0d typeA=%0d typeB=%0d root_done=%0d sigD_set=%0d newsig_rp=%0d refine=%0d leaf=%0d node=%0d zero_tree=%0d",
             name, got.size(), cyc, ref_n0, ref_max_high, cnt_sp_skipped, cnt_sp_run, cnt_type_a,
             cnt_type_b, cnt_root_done, cnt_sig_d_set, cnt_new_sig_rp, cnt_refine, cnt_leaf_coded,
             cnt_node_coded, cnt_tree_zero);
    t_skip += cnt_sp_skipped; t_sp += cnt_sp_run; t_a += cnt_type_a; t_b += cnt_type_b;
    t_root += cnt_root_done; t_sigd += cnt_sig_d_set; t_new += cnt_new_sig_rp; t_ref += cnt_refine;
    t_leaf += cnt_leaf_coded; t_node += cnt_node_coded; t_zero += cnt_tree_zero;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // smooth gradient
    img = {};
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) img.push_back(120 + 3 * r + 2 * c + ((r * c) % 3));
    run_tile("gradient");
    // uniform noise
    img = {};
    for (int i = 0; i < N * N; i++) img.push_back($urandom_range(0, 255));
    run_tile("noise");
    // edges and texture
    img = {};
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
      img.push_back(((c > 9) ? 200 : 40) + ((r > 5 && r < 11) ? 30 : 0) + $urandom_range(0, 12));
    run_tile("edges");
    check(t_skip > 0, "no sorting pass skipped");
    check(t_sp > 0, "no sorting pass run");
    check(t_a > 0, "no type-A node");
    check(t_b > 0, "no type-B node");
    check(t_root > 0, "no root skipped through SIG_D");
    check(t_sigd > 0, "no SIG_D update");
    check(t_new > 0, "no coefficient became significant in a refinement pass");
    check(t_ref > 0, "no refinement bit");
    check(t_leaf > 0, "no leaf block coded");
    check(t_node > 0, "no non-leaf block coded");
    check(t_zero > 0, "no insignificant tree");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
