// Shared constants of the carry chain adder.
//
// CCA_WD is the default operand width and CCA_BD the default block width:
// 32 and 4, the widths of the original design. Every module of the design
// takes its parameter defaults from here, so changing the design's default
// size is a one-line edit. GP_MAX_BD bounds the block width accepted by the
// generate/propagate ROM (its tables hold 2**(2*BD) entries each); it is this
// design's own limit.
package cca_pkg;

  localparam int unsigned CCA_WD = 32;
  localparam int unsigned CCA_BD = 4;
  localparam int unsigned GP_MAX_BD = 10;

endpackage
