// enc_control_unit: control unit of the encoder.
//
// Waits for DWT_end to rise, initialises the state tables and sets the bit
// plane n to Init_Threshold (threshold 2^n). For each bit plane it starts the
// refinement pass, waits for Ref_end, and starts the sorting pass only if
// Max_Coeff >= 2^n; otherwise the sorting pass is skipped because no
// high-band coefficient can be significant yet. After the passes of bit
// plane 0 it asks the bitstream generator to flush and, when that is done,
// raises Encoding_Complete until the next tile. Next_Addr passes the
// coefficient address generator's Next to both pass units.
// Pass order and the skip test are the document's; stopping after bit plane
// 0 (lossless for the integer transform) is this design's choice.
module enc_control_unit #(
  parameter int unsigned COEF_W = 13
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              dwt_end,
  input  logic [3:0]        init_threshold,
  input  logic [COEF_W-1:0] max_coeff,
  input  logic              ref_end,
  input  logic              sort_end,
  input  logic              next,
  input  logic              flush_done,
  output logic              next_addr,
  output logic              table_init,
  output logic              rp_start,
  output logic              sp_start,
  output logic              sel_sp,
  output logic [3:0]        threshold,
  output logic              flush,
  output logic              encoding_complete
);
  typedef enum logic [2:0] {IDLE, INIT, RP_GO, RP_WAIT, SP_WAIT, FLUSH, FWAIT, DONE} st_t;
  st_t  st;
  logic dwt_end_q, sp_taken;

  assign sp_taken          = 32'(max_coeff) >= (32'd1 << threshold);
  assign next_addr         = next;
  assign table_init        = (st == INIT);
  assign rp_start          = (st == RP_GO);
  assign sp_start          = (st == RP_WAIT) && ref_end && sp_taken;
  assign sel_sp            = (st == SP_WAIT);
  assign flush             = (st == FLUSH);
  assign encoding_complete = (st == DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= IDLE;
      dwt_end_q <= 1'b0;
      threshold <= '0;
    end else begin
      dwt_end_q <= dwt_end;
      unique case (st)
        IDLE: if (dwt_end && !dwt_end_q) st <= INIT;
        INIT: begin
          threshold <= init_threshold;
          st        <= RP_GO;
        end
        RP_GO: st <= RP_WAIT;
        RP_WAIT: if (ref_end) begin
          if (sp_taken) st <= SP_WAIT;
          else if (threshold == 0) st <= FLUSH;
          else begin
            threshold <= threshold - 1'b1;
            st        <= RP_GO;
          end
        end
        SP_WAIT: if (sort_end) begin
          if (threshold == 0) st <= FLUSH;
          else begin
            threshold <= threshold - 1'b1;
            st        <= RP_GO;
          end
        end
        FLUSH: st <= FWAIT;
        FWAIT: if (flush_done) st <= DONE;
        DONE: if (!dwt_end) st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end
endmodule
