// Carry chain adder (top of the design).
//
// Adds two WD-bit operands and a carry in. The operands are cut into
// ND = WD/BD blocks of BD bits. For each block i:
//   - a gprom looks up, from the block's two operand slices, whether the
//     block generates a carry (g) or propagates its carry in (p);
//   - a carry_chain_cell forms the chain q[i+1] = p[i] ? q[i] : g[i], with
//     q[0] = ci;
//   - a subadder (BD-bit ripple carry adder) adds the slices with carry in
//     q[i] and delivers that block's sum bits.
// The carry out is the chain output of the top block, q[ND]. The carries of
// the block adders are not used: the critical path is one g/p lookup, ND
// chain multiplexers and one BD-bit ripple, instead of WD full adders.
// Those unused block carry outs are collected in bco, which lint reports as
// unread; they stay so that each block adder is the plain BD-bit adder.
//
// Interface: an, bn (WD bits), ci -> cn (WD-bit sum), co (carry out).
// Timing: purely combinational.
// Block structure, chain rule and the defaults WD = 32, BD = 4 follow the
// original design; WD must be a multiple of BD (checked at elaboration).
module cca_adder #(
  parameter int unsigned WD = cca_pkg::CCA_WD,
  parameter int unsigned BD = cca_pkg::CCA_BD
) (
  input  logic [WD-1:0] an,
  input  logic [WD-1:0] bn,
  input  logic          ci,
  output logic [WD-1:0] cn,
  output logic          co
);

  localparam int unsigned ND = WD / BD;

  if (ND * BD != WD) begin : g_width_check
    $error("cca_adder: WD (%0d) must be a multiple of BD (%0d)", WD, BD);
  end

  logic [ND:0]   q;     // q[i]: carry into block i, q[ND]: carry out
  logic [ND-1:0] gen;   // block generates a carry
  logic [ND-1:0] prop;  // block propagates its carry in
  logic [ND-1:0] bco;   // block adder carry outs (not used by the chain)

  assign q[0] = ci;
  assign co   = q[ND];

  for (genvar i = 0; i < ND; i++) begin : g_block
    gprom #(.BD(BD)) u_gp (
      .an(an[i*BD +: BD]),
      .bn(bn[i*BD +: BD]),
      .en(1'b1),
      .g (gen[i]),
      .p (prop[i])
    );

    carry_chain_cell u_cell (
      .qi(q[i]),
      .g (gen[i]),
      .p (prop[i]),
      .qo(q[i+1])
    );

    subadder #(.BD(BD)) u_add (
      .an(an[i*BD +: BD]),
      .bn(bn[i*BD +: BD]),
      .ci(q[i]),
      .cn(cn[i*BD +: BD]),
      .co(bco[i])
    );
  end

endmodule
