// tb_spiht_encoder: runs the encoder alone on synthetic Morton-ordered
// coefficient tiles held in a testbench memory and compares the byte stream
// with the reference coder. Tiles: wavelet-like decay (large LL, detail
// shrinking towards level 1) so that sorting passes are skipped; random
// sparse detail; dense random detail that makes trees fully significant;
// an all-zero tile. Also checks that coding ends with SPIHT_end and that all
// coding cases occur.
`timescale 1ns/1ps
module tb_spiht_encoder;
  import sot_ref_pkg::*;
  localparam int N = 16, L = 3;
  logic clk = 0, rst = 1, dwt_end = 0, valid_byte, spiht_end;
  logic [3:0] init_threshold;
  logic [12:0] max_coeff;
  logic [7:0] coef_addr1, coef_addr2, byte_out;
  logic signed [12:0] coeff_data1, coeff_data2;
  int mem[256];
  int checks = 0, failures = 0;
  byte unsigned got[$];
  int t_skip, t_sp, t_a, t_b, t_root, t_sigd, t_new, t_leaf, t_node, t_zero;

  spiht_encoder #(.N(N), .LEVELS(L), .COEF_W(13)) dut (.*);
  always #5 clk = ~clk;
  assign coeff_data1 = 13'(mem[coef_addr1]);
  assign coeff_data2 = 13'(mem[coef_addr2]);
  always @(posedge clk) begin  // byte collector; the stimulus also clears `got`
    if (valid_byte) got.push_back(byte_out);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(string name);
    int_q  c;
    byte_q exp;
    int    cyc = 0;
    for (int i = 0; i < 256; i++) c.push_back(mem[i]);
    clear_counters();
    exp = encode(c, N, L);
    init_threshold = 4'(ref_n0);
    max_coeff = 13'(ref_max_high);
    got = {};
    @(negedge clk) dwt_end = 1;
    while (!spiht_end && cyc < 50000) begin @(negedge clk); cyc++; end
    check(spiht_end, {name, ": no spiht_end"});
    check(got.size() == exp.size(), $sformatf("%s: %0d bytes, expected %0d", name, got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      check(got[i] == exp[i], $sformatf("%s: byte %0d = %02x, expected %02x", name, i, got[i], exp[i]));
    $display("%s: %0d bytes, %0d cycles", name, got.size(), cyc);
    t_skip += cnt_sp_skipped; t_sp += cnt_sp_run; t_a += cnt_type_a; t_b += cnt_type_b;
    t_root += cnt_root_done; t_sigd += cnt_sig_d_set; t_new += cnt_new_sig_rp;
    t_leaf += cnt_leaf_coded; t_node += cnt_node_coded; t_zero += cnt_tree_zero;
    @(negedge clk) dwt_end = 0;
    repeat (3) @(negedge clk);
  endtask

  function automatic int level_of(int p);
    int b = p / 4;
    if (b < 4) return 3;
    if (b < 16) return 2;
    return 1;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 12; t++) begin
      for (int p = 0; p < 256; p++) begin
        int lv = level_of(p);
        int amp;
        case (t % 4)
          0: amp = (p < 4) ? 1500 : (8 << lv);
          1: amp = ($urandom_range(0, 5) == 0) ? (40 << lv) : 2;
          2: amp = (p < 4) ? 400 : 300;
          default: amp = 0;
        endcase
        mem[p] = (p < 4 && t % 4 != 3) ? int'($urandom_range(amp / 2, amp)) : int'($urandom_range(0, 2 * amp)) - amp;
      end
      run($sformatf("tile%0d", t));
    end
    check(t_skip > 0, "no sorting pass skipped");
    check(t_sp > 0, "no sorting pass run");
    check(t_a > 0, "no type-A node");
    check(t_b > 0, "no type-B node");
    check(t_root > 0, "no root skipped through SIG_D");
    check(t_sigd > 0, "no SIG_D update");
    check(t_new > 0, "no newly significant coefficient in a refinement pass");
    check(t_leaf > 0, "no leaf block coded");
    check(t_node > 0, "no non-leaf block coded");
    check(t_zero > 0, "no insignificant tree");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
