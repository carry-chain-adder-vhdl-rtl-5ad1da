// Generate/propagate ROM of one block of the carry chain adder.
//
// The block's two BD-bit operand slices form a 2*BD-bit address {an, bn}
// into two one-bit read-only tables of 2**(2*BD) entries (256 for BD = 4):
//   g = 1 when an + bn > 2**BD - 1  (the block makes a carry by itself)
//   p = 1 when an + bn = 2**BD - 1  (the block passes its carry in on)
// When neither holds, the block kills the carry. The tables are built at
// elaboration by the function gp_table, so synthesis sees constant ROMs (in an
// FPGA, a lookup table of 2*BD inputs per output).
//
// Interface: an, bn (BD bits), en -> g, p.
// Timing: purely combinational.
// The tables and their address order follow the original design. With en
// low the original holds the last value, which would infer a latch; here g
// and p are 0 while en is low (the carry chain adder ties en high).
module gprom #(
  parameter int unsigned BD = cca_pkg::CCA_BD
) (
  input  logic [BD-1:0] an,
  input  logic [BD-1:0] bn,
  input  logic          en,
  output logic          g,
  output logic          p
);

  localparam int unsigned DEPTH = 2**(2*BD);

  localparam int unsigned MAXV  = 2**BD - 1;   // largest BD-bit value

  // Bit {i, j} of the table: generate when i + j > MAXV, propagate when
  // i + j == MAXV.
  function automatic logic [DEPTH-1:0] gp_table(input bit want_generate);
    logic [DEPTH-1:0] t;
    t = '0;
    for (int unsigned i = 0; i <= MAXV; i++) begin
      for (int unsigned j = 0; j <= MAXV; j++) begin
        if (want_generate) t[i*(MAXV+1) + j] = ((i + j) >  MAXV);
        else               t[i*(MAXV+1) + j] = ((i + j) == MAXV);
      end
    end
    return t;
  endfunction

  localparam logic [DEPTH-1:0] ROM_G = gp_table(1'b1);
  localparam logic [DEPTH-1:0] ROM_P = gp_table(1'b0);

  logic [2*BD-1:0] addr;

  assign addr = {an, bn};

  always_comb begin
    g = 1'b0;
    p = 1'b0;
    if (en) begin
      g = ROM_G[addr];
      p = ROM_P[addr];
    end
  end

  if (BD < 1 || BD > cca_pkg::GP_MAX_BD) begin : g_bd_check
    $error("gprom: BD must be between 1 and %0d", cca_pkg::GP_MAX_BD);
  end

endmodule
