// list_control: the two lists of the sorting pass, LCB (list of child blocks)
// and LPB (list of parent blocks), kept in registers.
//
// Both lists are stacks of block addresses. LCB accepts one address
// (lcb_push1) or the offspring 4*lcb_base + i of one block for every set bit
// i of lcb_mask (lcb_push4), pushed so that the lowest offspring ends on top
// and is taken first, which makes the sorting pass depth-first. LPB accepts
// one address per cycle. A pop removes the top entry at the clock edge; the
// top is visible combinationally. Pushing and popping the same list in one
// cycle is not supported. Depths default to the document's list sizes for a
// three-level transform (7 and 5); overflow is flagged by assertions.
module list_control #(
  parameter int unsigned BW        = 6,
  parameter int unsigned LCB_DEPTH = 7,
  parameter int unsigned LPB_DEPTH = 5
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          lcb_push1,
  input  logic [BW-1:0] lcb_addr,
  input  logic          lcb_push4,
  input  logic [BW-1:0] lcb_base,
  input  logic [3:0]    lcb_mask,
  input  logic          lcb_pop,
  output logic [BW-1:0] lcb_top,
  output logic          lcb_empty,
  input  logic          lpb_push,
  input  logic [BW-1:0] lpb_addr,
  input  logic          lpb_pop,
  output logic [BW-1:0] lpb_top,
  output logic          lpb_empty
);
  logic [BW-1:0] lcb [LCB_DEPTH];
  logic [BW-1:0] lpb [LPB_DEPTH];
  logic [$clog2(LCB_DEPTH+1)-1:0] lcb_cnt;
  logic [$clog2(LPB_DEPTH+1)-1:0] lpb_cnt;

  assign lcb_empty = (lcb_cnt == 0);
  assign lpb_empty = (lpb_cnt == 0);
  assign lcb_top   = lcb_empty ? '0 : lcb[lcb_cnt - 1'b1];
  assign lpb_top   = lpb_empty ? '0 : lpb[lpb_cnt - 1'b1];

  always_ff @(posedge clk) begin
    if (rst) begin
      lcb_cnt <= '0;
      lpb_cnt <= '0;
      for (int i = 0; i < LCB_DEPTH; i++) lcb[i] <= '0;
      for (int i = 0; i < LPB_DEPTH; i++) lpb[i] <= '0;
    end else begin
      if (lcb_push1) begin
        lcb[lcb_cnt] <= lcb_addr;
        lcb_cnt      <= lcb_cnt + 1'b1;
      end else if (lcb_push4) begin
        int unsigned k;
        k = int'(lcb_cnt);
        for (int i = 3; i >= 0; i--) begin
          if (lcb_mask[i] && k < LCB_DEPTH) begin
            lcb[k] <= BW'({lcb_base, 2'b00} + i);
            k++;
          end
        end
        lcb_cnt <= ($bits(lcb_cnt))'(k);
      end else if (lcb_pop && !lcb_empty) begin
        lcb_cnt <= lcb_cnt - 1'b1;
      end
      if (lpb_push) begin
        lpb[lpb_cnt] <= lpb_addr;
        lpb_cnt      <= lpb_cnt + 1'b1;
      end else if (lpb_pop && !lpb_empty) begin
        lpb_cnt <= lpb_cnt - 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (!(lcb_push1 && int'(lcb_cnt) >= LCB_DEPTH)) else $error("LCB overflow");
      assert (!(lcb_push4 && int'(lcb_cnt) + $countones(lcb_mask) > LCB_DEPTH)) else $error("LCB overflow");
      assert (!(lpb_push && int'(lpb_cnt) >= LPB_DEPTH)) else $error("LPB overflow");
    end
  end
endmodule
