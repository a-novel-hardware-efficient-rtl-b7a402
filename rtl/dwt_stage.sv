// dwt_stage: "DWT and maximum magnitude" stage of the compressor.
//
// Computes a LEVELS-deep 2-D CDF 5/3 DWT of an N x N tile of PIX_W-bit
// pixels with W-bit coefficients. New_tile starts a tile; the pixels then
// enter in raster order, two horizontal neighbours (Data_in1 = even column,
// Data_in2 = odd column) in every cycle in_ready is high. The row processor
// writes MEM_A, the column processor writes MEM_B, and from the second level
// on the row processor reads the previous LL band back from MEM_B. When
// DWT_end rises, MEM_B holds all coefficients in Morton order (LL_L in the
// lowest addresses), and Max_Coeff / Init_Threshold are valid. From then on
// the encoder reads MEM_B through Addr_in1/2 -> Data_out1/2 (combinational).
// The structure follows the document's DWT figure; memory timing and the
// schedule of dwt_control are this design's own choices. The calculator's
// whole-tile maximum (max_all) is left unconnected here: only its bit-plane
// index, Init_Threshold, leaves the stage, so lint reports it as unused.
module dwt_stage
  import sot_pkg::*;
#(
  parameter int unsigned N      = 16,
  parameter int unsigned LEVELS = 3,
  parameter int unsigned PIX_W  = 8,
  parameter int unsigned W      = 16,
  localparam int unsigned AW    = 2 * $clog2(N)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                new_tile,
  input  logic [PIX_W-1:0]    data_in1,
  input  logic [PIX_W-1:0]    data_in2,
  output logic                in_ready,
  input  logic [AW-1:0]       addr_in1,
  input  logic [AW-1:0]       addr_in2,
  output logic signed [W-1:0] data_out1,
  output logic signed [W-1:0] data_out2,
  output logic                dwt_end,
  output logic [W-1:0]        max_coeff,
  output logic [3:0]          init_threshold
);
  border_ctrl_t        border_ctrl_row, border_ctrl_col;
  logic                row_en, col_en, sel_input, mema_we, memb_we;
  logic [AW-1:0]       mema_addr1, mema_addr2, ctl_b_addr1, ctl_b_addr2, memb_addr1, memb_addr2;
  logic                mx_clear, mx_inc1, mx_hi1, row_v, col_v;
  logic signed [W-1:0] row_in_e, row_in_o, row_s, row_d, col_s, col_d;
  logic [W-1:0]        mema_rd1, mema_rd2, memb_rd1, memb_rd2, max_all;

  dwt_control #(.N(N), .LEVELS(LEVELS)) u_ctl (
    .clk, .rst, .new_tile,
    .row_en, .border_ctrl_row, .sel_input, .in_ready,
    .col_en, .border_ctrl_col,
    .mema_we, .mema_addr1, .mema_addr2,
    .memb_we, .memb_addr1(ctl_b_addr1), .memb_addr2(ctl_b_addr2),
    .mx_clear, .mx_inc1, .mx_hi1, .dwt_end
  );

  // input multiplexers in front of the row processor
  assign row_in_e = sel_input ? W'(data_in1) : memb_rd1;
  assign row_in_o = sel_input ? W'(data_in2) : memb_rd2;

  lift53_1d #(.W(W)) u_row (
    .clk, .rst, .en(row_en), .border(border_ctrl_row),
    .x_even(row_in_e), .x_odd(row_in_o), .out_valid(row_v), .s(row_s), .d(row_d)
  );

  dp_mem #(.DEPTH(N * N), .W(W)) u_mem_a (
    .clk,
    .we1(mema_we && row_v), .addr1(mema_addr1), .wdata1(row_s), .rdata1(mema_rd1),
    .we2(mema_we && row_v), .addr2(mema_addr2), .wdata2(row_d), .rdata2(mema_rd2)
  );

  lift53_1d #(.W(W)) u_col (
    .clk, .rst, .en(col_en), .border(border_ctrl_col),
    .x_even(mema_rd1), .x_odd(mema_rd2), .out_valid(col_v), .s(col_s), .d(col_d)
  );

  // MEM_B address multiplexers: DWT control while transforming, encoder after
  assign memb_addr1 = dwt_end ? addr_in1 : ctl_b_addr1;
  assign memb_addr2 = dwt_end ? addr_in2 : ctl_b_addr2;

  dp_mem #(.DEPTH(N * N), .W(W)) u_mem_b (
    .clk,
    .we1(memb_we && col_v), .addr1(memb_addr1), .wdata1(col_s), .rdata1(memb_rd1),
    .we2(memb_we && col_v), .addr2(memb_addr2), .wdata2(col_d), .rdata2(memb_rd2)
  );

  assign data_out1 = memb_rd1;
  assign data_out2 = memb_rd2;

  max_mag_calc #(.W(W)) u_max (
    .clk, .rst, .clear(mx_clear), .valid(memb_we && col_v),
    .c1(col_s), .c2(col_d), .inc1(mx_inc1), .inc2(1'b1), .hi1(mx_hi1), .hi2(1'b1),
    .max_coeff, .max_all, .init_threshold
  );
endmodule
