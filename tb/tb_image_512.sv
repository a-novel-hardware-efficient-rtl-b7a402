// tb_image_512: a whole 512 x 512, 8-bit image coded as 1024 tiles of
// 16 x 16 by compressor_top at its default parameters, the image size of
// the published PSNR tests.
//
// The image is generated from formulas, one quadrant each:
//   * a smooth ramp;
//   * ring texture;
//   * hard-edged blocks with a little noise;
//   * hashed noise.
// Tiles are fed in raster order, one after another, pixel pairs whenever
// in_ready is high. For every tile the byte stream, Init_Threshold and
// Max_Coeff must match the reference transform and coder. The testbench
// reports:
//   * the total size of the stream coded to bit plane 0, in bits per pixel;
//   * the mean cycles per tile;
//   * the frame rate this gives for 1280 x 720 frames (3600 tiles) at
//     253 MHz.
// It also checks that each tile, transform and coding together, finishes
// within 4000 cycles.
`timescale 1ns/1ps
module tb_image_512;
  import sot_ref_pkg::*;

  localparam int N = 16, L = 3, SIDE = 512, TPL = SIDE / N;

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
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // test image, 0..255
  function automatic int pix(int x, int y);
    int v;
    if (x < SIDE / 2 && y < SIDE / 2) v = 40 + (x + 2 * y) / 4;
    else if (y < SIDE / 2) v = 128 + ((((x - 384) * (x - 384) + (y - 128) * (y - 128)) / 24) % 64) - 32;
    else if (x < SIDE / 2) v = (((((x / 32) + (y / 32)) % 2) != 0) ? 200 : 50) + ((x * 7 + y * 13) % 9);
    else v = ((x * 1103515245 + y * 12345 + x * y) >>> 11) & 255;
    return v;
  endfunction

  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint total_bytes, total_cycles;
    int     worst;
    total_bytes = 0;
    total_cycles = 0;
    worst = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < TPL * TPL; t++) begin
      int_q  c;
      byte_q exp;
      int    cyc;
      cyc = 0;
      img = {};
      for (int r = 0; r < N; r++)
        for (int col = 0; col < N; col++) img.push_back(pix((t % TPL) * N + col, (t / TPL) * N + r));
      c = dwt53(img, N, L);
      exp = encode(c, N, L);
      got = {};
      @(negedge clk) new_tile = 1;
      @(negedge clk) new_tile = 0;
      cyc = 1;
      while (spiht_end && cyc < 10) begin @(negedge clk); cyc++; end
      while (!spiht_end && cyc < 100000) begin @(negedge clk); cyc++; end
      check(spiht_end, $sformatf("tile %0d: spiht_end", t));
      check(cyc <= 4000, $sformatf("tile %0d: %0d cycles", t, cyc));
      check(init_threshold == 4'(ref_n0), $sformatf("tile %0d: init_threshold", t));
      check(int'(max_coeff) == ref_max_high, $sformatf("tile %0d: max_coeff", t));
      check(got.size() == exp.size(), $sformatf("tile %0d: %0d bytes, expected %0d", t, got.size(), exp.size()));
      for (int i = 0; i < exp.size() && i < got.size(); i++)
        check(got[i] == exp[i], $sformatf("tile %0d byte %0d", t, i));
      total_bytes += longint'(got.size());
      total_cycles += longint'(cyc);
      if (cyc > worst) worst = cyc;
    end
    $display("512 x 512: %0d bytes (%0.3f bpp to bit plane 0), %0d cycles, mean %0.1f / worst %0d cycles per tile",
             total_bytes, 8.0 * total_bytes / (SIDE * SIDE), total_cycles,
             real'(total_cycles) / (TPL * TPL), worst);
    $display("1280 x 720 at 253 MHz: about %0.1f frames/s at this mean tile time",
             253.0e6 / (3600.0 * real'(total_cycles) / (TPL * TPL)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
