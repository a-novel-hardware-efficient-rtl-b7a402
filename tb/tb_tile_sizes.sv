// tb_tile_sizes: the transform-block sizes of the resource table, 32 x 32 to
// 256 x 256, each with three DWT levels; each size codes a
// smooth and a random tile (one tile at 256 x 256) and must match the
// reference byte for byte. The sizes run one after another (each starts on
// the previous one's `done`) because the reference coder keeps its counters
// in package variables.
`timescale 1ns/1ps
module tb_tile_sizes;
  logic clk = 0;
  logic d32, d64, d128, d256;
  int c32, c64, c128, c256, f32, f64, f128, f256, y32, y64, y128, y256;

  always #5 clk = ~clk;

  tile_run #(.N(32),  .TILES(2)) r32  (.clk, .go(1'b1), .done(d32),  .checks(c32),  .failures(f32),  .cycles(y32));
  tile_run #(.N(64),  .TILES(2)) r64  (.clk, .go(d32), .done(d64),  .checks(c64),  .failures(f64),  .cycles(y64));
  tile_run #(.N(128), .TILES(2)) r128 (.clk, .go(d64), .done(d128), .checks(c128), .failures(f128), .cycles(y128));
  tile_run #(.N(256), .TILES(1)) r256 (.clk, .go(d128), .done(d256), .checks(c256), .failures(f256), .cycles(y256));

  initial begin
    repeat (20_000_000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c32 + c64 + c128 + c256, f32 + f64 + f128 + f256 + 1);
    $finish;
  end

  initial begin
    @(negedge clk);  // the runs clear `done` at time 0
    wait (d32 && d64 && d128 && d256);
    $display("cycles: N=32 %0d, N=64 %0d, N=128 %0d, N=256 %0d", y32, y64, y128, y256);
    $display("TB_RESULT checks=%0d failures=%0d", c32 + c64 + c128 + c256, f32 + f64 + f128 + f256);
    $finish;
  end
endmodule
