// Shared types and helpers of the sub-pixel motion-estimation design.
//
// sa_op_e is the per-cycle command that moves search-area (SA) samples
// inside the processing array: hold, shift up (a new set of lines enters at
// the bottom), shift right (forward rows of the zig-zag scan) or shift left
// (backward rows). The encoding is this design's own choice.
package me_pkg;

  typedef enum logic [1:0] {
    SA_HOLD  = 2'd0,
    SA_UP    = 2'd1,
    SA_RIGHT = 2'd2,
    SA_LEFT  = 2'd3
  } sa_op_e;

endpackage
