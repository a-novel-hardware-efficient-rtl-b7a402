// spiht_encoder: the proposed block-tree encoder (second stage).
//
// Works on a tile whose DWT coefficients sit in an external memory (MEM_B of
// the DWT stage) in Morton order, read through coef_addr1/2 -> coeff_data1/2
// combinationally, two per cycle. When DWT_end rises the control unit
// codes bit planes from Init_Threshold down to 0. Each bit plane is a
// refinement pass over all blocks with SIG_B = 1, then, if Max_Coeff reaches
// the threshold, a depth-first sorting pass over the spatial orientation
// trees. The refinement pass and the sorting pass share the coefficient
// address generator (selected by a multiplexer on the block address), the
// compare-and-bit generator and the state-table memory; LCB and LPB live in
// the list control. Refinement bits go from the compare unit to the
// bitstream generator; the sorting pass sends its grouped bits itself.
// Bytes leave on Byte_out/Valid_byte, MSB first; SPIHT_end rises after the
// last (zero-padded) byte and stays high until the next tile.
// Unit split and signal names follow the document's encoder figure.
module spiht_encoder
  import sot_pkg::*;
#(
  parameter int unsigned N      = 16,
  parameter int unsigned LEVELS = 3,
  parameter int unsigned COEF_W = 13,
  localparam int unsigned AW    = 2 * $clog2(N),
  localparam int unsigned BW    = AW - 2
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     dwt_end,
  input  logic [3:0]               init_threshold,
  input  logic [COEF_W-1:0]        max_coeff,
  output logic [AW-1:0]            coef_addr1,
  output logic [AW-1:0]            coef_addr2,
  input  logic signed [COEF_W-1:0] coeff_data1,
  input  logic signed [COEF_W-1:0] coeff_data2,
  output logic [7:0]               byte_out,
  output logic                     valid_byte,
  output logic                     spiht_end
);
  localparam int unsigned LCB_DEPTH = 4 + 3 * (LEVELS - 2);
  localparam int unsigned LPB_DEPTH = 1 + ((1 << (2 * (LEVELS - 1))) - 4) / 3;

  // control unit
  logic       next, next_addr, table_init, rp_start, sp_start, sel_sp, flush, flush_done;
  logic [3:0] threshold;
  // refinement pass
  logic [BW-1:0] rp_table_addr, rp_blk_addr;
  logic          rp_cag_start, ref_end;
  // sorting pass
  logic [BW-1:0] sp_table_addr, sp_blk_addr;
  logic          sp_cag_start, sort_end, set_b, set_d;
  scan_mode_t    sp_cag_mode;
  logic [4:0]    sp_emit_n;
  logic [15:0]   sp_emit_bits;
  // lists
  logic          lcb_push1, lcb_push4, lcb_pop, lcb_empty, lpb_push, lpb_pop, lpb_empty;
  logic [BW-1:0] lcb_addr, lcb_base, lcb_top, lpb_addr, lpb_top;
  logic [3:0]    lcb_mask;
  // state tables
  logic [BW-1:0] table_addr;
  logic          sig_b, sig_d;
  logic [3:0]    child_b, child_d;
  // coefficient path
  logic          cag_start, valid;
  scan_mode_t    cag_mode;
  logic [BW-1:0] blk_addr;
  logic [3:0]    bit_string;
  logic [2:0]    n_str;
  logic          sig_any;
  logic [4:0]    bs_n;
  logic [15:0]   bs_bits;

  enc_control_unit #(.COEF_W(COEF_W)) u_cu (
    .clk, .rst, .dwt_end, .init_threshold, .max_coeff, .ref_end, .sort_end, .next, .flush_done,
    .next_addr, .table_init, .rp_start, .sp_start, .sel_sp, .threshold, .flush,
    .encoding_complete(spiht_end)
  );

  refinement_pass #(.N(N)) u_rp (
    .clk, .rst, .start(rp_start), .sig_b, .next_addr,
    .table_addr(rp_table_addr), .blk_addr(rp_blk_addr), .cag_start(rp_cag_start), .ref_end
  );

  sorting_pass #(.N(N), .LEVELS(LEVELS)) u_sp (
    .clk, .rst, .start(sp_start), .sort_end,
    .table_addr(sp_table_addr), .st_sig_b(sig_b), .st_sig_d(sig_d),
    .st_child_b(child_b), .st_child_d(child_d), .set_b, .set_d,
    .lcb_push1, .lcb_addr, .lcb_push4, .lcb_base, .lcb_mask, .lcb_pop, .lcb_top, .lcb_empty,
    .lpb_push, .lpb_addr, .lpb_pop, .lpb_top, .lpb_empty,
    .cag_start(sp_cag_start), .cag_mode(sp_cag_mode), .blk_addr(sp_blk_addr),
    .cag_valid(valid), .next_addr, .cbg_bits(bit_string), .cbg_n(n_str), .cbg_sig(sig_any),
    .emit_n(sp_emit_n), .emit_bits(sp_emit_bits)
  );

  list_control #(.BW(BW), .LCB_DEPTH(LCB_DEPTH), .LPB_DEPTH(LPB_DEPTH)) u_lists (
    .clk, .rst,
    .lcb_push1, .lcb_addr, .lcb_push4, .lcb_base, .lcb_mask, .lcb_pop, .lcb_top, .lcb_empty,
    .lpb_push, .lpb_addr, .lpb_pop, .lpb_top, .lpb_empty
  );

  assign table_addr = sel_sp ? sp_table_addr : rp_table_addr;

  state_table_mem #(.N(N), .LEVELS(LEVELS)) u_tables (
    .clk, .rst, .init(table_init), .table_addr, .set_b, .set_d,
    .sig_b, .sig_d, .child_b, .child_d
  );

  // block-address multiplexer in front of the coefficient address generator
  assign cag_start = sel_sp ? sp_cag_start : rp_cag_start;
  assign cag_mode  = sel_sp ? sp_cag_mode : SCAN_BLOCK;
  assign blk_addr  = sel_sp ? sp_blk_addr : rp_blk_addr;

  coef_addr_gen #(.N(N)) u_cag (
    .clk, .rst, .start(cag_start), .mode(cag_mode), .blk_addr,
    .coef_addr1, .coef_addr2, .valid, .next
  );

  compare_bit_gen #(.COEF_W(COEF_W)) u_cbg (
    .valid, .threshold, .coeff_data1, .coeff_data2, .bit_string, .n_str, .sig_any
  );

  assign bs_n    = sel_sp ? sp_emit_n : 5'(n_str);
  assign bs_bits = sel_sp ? sp_emit_bits : 16'(bit_string);

  bitstream_gen u_bsg (
    .clk, .rst, .in_n(bs_n), .in_bits(bs_bits), .flush, .byte_out, .valid_byte,
    .done(flush_done)
  );
endmodule
