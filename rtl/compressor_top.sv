// compressor_top: tile-based wavelet image compressor.
//
// Stage 1 (dwt_stage) transforms an N x N tile with a LEVELS-deep CDF 5/3
// DWT and finds Init_Threshold and Max_Coeff; stage 2 (spiht_encoder) codes
// the Morton-ordered coefficients with the block-tree algorithm into bytes.
// Operation: pulse new_tile, then supply raster-order pixel pairs on
// data_in1/data_in2 whenever in_ready is high (N*N/2 pairs). The encoder
// starts by itself when the transform ends; bytes appear on byte_out with
// valid_byte and spiht_end rises after the last one. The next tile may start
// with new_tile once spiht_end is high. init_threshold and max_coeff are the
// side information a decoder needs (starting bit plane and sorting-pass skip
// bound). Coefficients are 16 bits inside the DWT; the encoder takes their
// low COEF_W bits, which hold every value an 8-bit tile can produce.
module compressor_top #(
  parameter int unsigned N      = 16,
  parameter int unsigned LEVELS = 3,
  parameter int unsigned PIX_W  = 8,
  parameter int unsigned DWT_W  = 16,
  parameter int unsigned COEF_W = 13,
  localparam int unsigned AW    = 2 * $clog2(N)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              new_tile,
  input  logic [PIX_W-1:0]  data_in1,
  input  logic [PIX_W-1:0]  data_in2,
  output logic              in_ready,
  output logic [7:0]        byte_out,
  output logic              valid_byte,
  output logic              spiht_end,
  output logic [3:0]        init_threshold,
  output logic [COEF_W-1:0] max_coeff
);
  logic [AW-1:0]           addr1, addr2;
  logic signed [DWT_W-1:0] data_out1, data_out2;
  logic [DWT_W-1:0]        max_coeff_w;
  logic                    dwt_end;

  dwt_stage #(.N(N), .LEVELS(LEVELS), .PIX_W(PIX_W), .W(DWT_W)) u_dwt (
    .clk, .rst, .new_tile, .data_in1, .data_in2, .in_ready,
    .addr_in1(addr1), .addr_in2(addr2), .data_out1, .data_out2,
    .dwt_end, .max_coeff(max_coeff_w), .init_threshold
  );

  assign max_coeff = COEF_W'(max_coeff_w);

  spiht_encoder #(.N(N), .LEVELS(LEVELS), .COEF_W(COEF_W)) u_enc (
    .clk, .rst, .dwt_end, .init_threshold, .max_coeff,
    .coef_addr1(addr1), .coef_addr2(addr2),
    .coeff_data1(COEF_W'(data_out1)), .coeff_data2(COEF_W'(data_out2)),
    .byte_out, .valid_byte, .spiht_end
  );
endmodule
