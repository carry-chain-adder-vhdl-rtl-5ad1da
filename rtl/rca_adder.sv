// Ripple carry adder.
//
// Adds two WD-bit operands and a carry in. One full adder per bit position:
// the sum bit is a ^ b ^ c and the carry passed to the next position is the
// majority of a, b and c, so the carry ripples from bit 0 to bit WD-1 and the
// delay grows linearly with WD. This is the reference adder of the design and,
// at width BD, the block adder inside the carry chain adder.
//
// Interface: an, bn (WD bits), ci -> cn (WD-bit sum), co (carry out).
// Timing: purely combinational, no clock, no latency.
// The structure and the default width of 32 follow the original design.
module rca_adder #(
  parameter int unsigned WD = cca_pkg::CCA_WD
) (
  input  logic [WD-1:0] an,
  input  logic [WD-1:0] bn,
  input  logic          ci,
  output logic [WD-1:0] cn,
  output logic          co
);

  logic [WD:0] c;   // c[i] is the carry into bit i

  assign c[0] = ci;

  for (genvar i = 0; i < WD; i++) begin : g_bit
    assign cn[i]   = an[i] ^ bn[i] ^ c[i];
    assign c[i+1]  = (an[i] & bn[i]) | (an[i] & c[i]) | (bn[i] & c[i]);
  end

  assign co = c[WD];

endmodule
