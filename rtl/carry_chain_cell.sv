// One cell of the carry chain.
//
// A two-way multiplexer steered by the block's propagate bit: when p is set
// the chain input qi passes to qo unchanged, otherwise qo is the block's
// generate bit g (1 = carry generated, 0 = carry killed). Chaining one cell
// per block gives every block its carry in after one multiplexer delay per
// block instead of BD full-adder delays, the same structure as the dedicated
// carry chain of an FPGA logic block.
//
// Interface: qi, g, p -> qo.
// Timing: purely combinational.
// The selection rule follows the original design.
module carry_chain_cell (
  input  logic qi,
  input  logic g,
  input  logic p,
  output logic qo
);

  assign qo = p ? qi : g;

endmodule
