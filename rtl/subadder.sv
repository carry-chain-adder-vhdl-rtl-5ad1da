// Block adder of the carry chain adder.
//
// A BD-bit ripple carry adder (rca_adder at width BD). In the carry chain
// adder its carry in comes from the carry chain, not from the block below,
// and its own carry out is not used: the chain supplies each block's carry.
//
// Interface: an, bn (BD bits), ci -> cn (BD-bit sum), co (block carry out).
// Timing: purely combinational.
// The block has only the width BD here; the original wrapper also carried an
// unused full-width parameter, dropped in this version.
module subadder #(
  parameter int unsigned BD = cca_pkg::CCA_BD
) (
  input  logic [BD-1:0] an,
  input  logic [BD-1:0] bn,
  input  logic          ci,
  output logic [BD-1:0] cn,
  output logic          co
);

  rca_adder #(.WD(BD)) u_rca (
    .an(an),
    .bn(bn),
    .ci(ci),
    .cn(cn),
    .co(co)
  );

endmodule
