// bp_pkg: sizes and types shared by the tile belief-propagation engine.
//
// The tile is TILE_N x TILE_N pixels with NUM_LABELS disparity labels. A data
// cost is COST_W bits, a single directional message MSG_W bits, and the sum of
// the two messages of one group (left+right or up+down), which is what the
// message memory stores, CMSG_W = MSG_W + 1 bits. These numbers follow the
// 32x32-tile, 64-label, 8-bit-cost, 10-bit-message configuration that the
// memory and gate-count comparison is made for. H_W is the width of the sum
// cost + combined message + incoming message, and BEL_W that of a full belief
// (cost plus all four messages); both are this design's choice, sized so that
// no sum can overflow.
package bp_pkg;
  localparam int unsigned TILE_N     = 32;
  localparam int unsigned NUM_LABELS = 64;
  localparam int unsigned COST_W     = 8;
  localparam int unsigned MSG_W      = 10;
  localparam int unsigned CMSG_W     = MSG_W + 1;

  localparam int unsigned H_W        = CMSG_W + 2;
  localparam int unsigned BEL_W      = H_W + 1;
  localparam int unsigned ITER_W     = 8;
  // Processing lanes (lines swept in parallel); 1 keeps a single line buffer.
  localparam int unsigned LANES      = 1;

  // Direction of one sweep, in the processing order of one iteration:
  // to the right, to the left, down, up.
  typedef enum logic [1:0] {
    PASS_RIGHT = 2'd0,   // horizontal forward
    PASS_LEFT  = 2'd1,   // horizontal backward
    PASS_DOWN  = 2'd2,   // vertical forward
    PASS_UP    = 2'd3    // vertical backward
  } pass_e;
endpackage
