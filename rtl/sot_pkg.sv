// sot_pkg: constants and helper functions shared by the DWT stage and the
// block-tree encoder.
//
// The tile is N x N coefficients. Coefficients are stored in Morton (Z) order,
// so that the four coefficients of a 2x2 block are consecutive and the four
// offspring of block x are blocks 4x .. 4x+3. morton() interleaves row and
// column bits with the row bit above the column bit, giving the order
// top-left, top-right, bottom-left, bottom-right inside every quadrant.
package sot_pkg;

  // Morton address of (row, col) for a tile whose side needs `bits` bits.
  function automatic int unsigned morton(input int unsigned row, input int unsigned col,
                                         input int unsigned bits);
    int unsigned a;
    a = 0;
    for (int i = 0; i < 16; i++) begin
      if (i < bits) begin
        a |= ((col >> i) & 1) << (2 * i);
        a |= ((row >> i) & 1) << (2 * i + 1);
      end
    end
    return a;
  endfunction

  // Index of the most significant set bit; 0 for an input of 0.
  function automatic int unsigned msb_index(input logic [31:0] v);
    int unsigned r;
    r = 0;
    for (int i = 0; i < 32; i++) if (v[i]) r = i;
    return r;
  endfunction

  // Border control of a 1-D lifting line: first pair / trailing flush cycle.
  typedef struct packed {
    logic first;
    logic flush;
  } border_ctrl_t;

  // Which kind of scan the coefficient address generator runs.
  typedef enum logic {
    SCAN_BLOCK = 1'b0,   // the four coefficients of one block
    SCAN_DESC  = 1'b1    // every coefficient of all descendant blocks
  } scan_mode_t;

endpackage
