// me_pkg: shared constants and types of the full-search block-matching
// (FSBM) motion estimation processor.
//
// The defaults describe the implemented type I configuration: 16x16
// macroblocks (N = 16), search range -15..+16 (p = 16), one processing core.
// Pixel, column-sum and adder-tree widths follow the growing-operand scheme
// (8-bit pixels, 12-bit column accumulation, 16-bit adder tree).
// The shift-mode encoding below is a choice of this design.
package me_pkg;

  parameter int unsigned PIX_W  = 8;   // pixel width
  parameter int unsigned COL_W  = 12;  // column partial-sum width
  parameter int unsigned TREE_W = 16;  // adder-tree operand width

  // How every search-data register of the array is updated in a cycle.
  typedef enum logic [1:0] {
    SH_HOLD  = 2'd0,  // keep contents
    SH_LEFT  = 2'd1,  // take pixel of right neighbour (data moves left)
    SH_RIGHT = 2'd2,  // take pixel of left neighbour (data moves right)
    SH_UP    = 2'd3   // take pixel of lower neighbour (data moves up)
  } shift_e;

endpackage
