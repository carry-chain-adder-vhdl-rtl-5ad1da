# Carry chain adder

A WD-bit binary adder (32 bits by default) that does not wait for a carry to
ripple through every bit. The operands are cut into ND = WD/BD blocks of BD
bits (eight 4-bit blocks by default). Each block decides from its own operand
slices alone what it will do to a carry, and a short chain of multiplexers,
one per block, delivers the right carry in to every block. Each block then
adds its slices with an ordinary BD-bit ripple carry adder. This is the same
scheme as the dedicated carry chains in FPGA logic blocks.

The design is purely combinational: no clock, no reset, no latency. Results
are valid one propagation delay after the inputs change.

## Generate, propagate, kill

For a block with operand slices `a` and `b` (each BD bits, values 0 to
2^BD - 1), the carry out of the block is fixed by the slice sum `a + b` in all
but one case:

| slice sum `a + b`      | block behaviour | carry out of the block       |
|------------------------|-----------------|------------------------------|
| greater than 2^BD - 1  | generate (g=1)  | 1, whatever the carry in     |
| exactly 2^BD - 1       | propagate (p=1) | equal to the block's carry in|
| less than 2^BD - 1     | kill            | 0, whatever the carry in     |

With BD = 4, of the 256 slice pairs 120 generate, 16 propagate and 120 kill.
A propagating block adds to all ones, so a carry in of 1 makes every one of
its sum bits roll over and produces a carry out of 1; a carry in of 0 leaves
it all ones with no carry out.

`gprom` computes g and p as two read-only tables of 2^(2*BD) one-bit entries
(256 each for BD = 4), addressed by the concatenation `{a, b}` (a in the high
half). The tables are filled at elaboration by a constant function, entry
`i*2^BD + j` holding `(i + j) > 2^BD - 1` for g and `(i + j) == 2^BD - 1` for
p, so no data file is needed. On an FPGA each table is one lookup table with
2*BD inputs; a synthesis tool may equally turn it into gates.

## The chain

`carry_chain_cell` is a 2-to-1 multiplexer:

    q[i+1] = p[i] ? q[i] : g[i]        q[0] = ci,   co = q[ND]

A propagating block passes the chain value through; any other block replaces
it with its own generate bit (1 for generate, 0 for kill). q[i] is the true
carry into block i, because a block that does not propagate has a carry out
that does not depend on its carry in.

The block adders (`subadder`, a BD-bit `rca_adder`) take q[i] as their carry
in and produce the sum bits of block i. Their own carry outs equal q[i+1] but
are not used; the chain is the only carry path between blocks. The longest
path is therefore one table lookup, ND multiplexers and one BD-bit ripple,
against WD full-adder stages for a plain ripple carry adder of the same
width. The chain is longest when every block propagates, for example
`a = 0xFFFFFFFF, b = 0, ci = 1`: the carry in then travels through all eight
cells to the carry out.

## Modules

| module             | what it is                                              | defaults       |
|--------------------|---------------------------------------------------------|----------------|
| `cca_adder`        | top: ND blocks of gprom + chain cell + subadder         | WD=32, BD=4    |
| `gprom`            | generate/propagate tables of one block                  | BD=4           |
| `carry_chain_cell` | one chain multiplexer                                   | -              |
| `subadder`         | BD-bit block adder (an `rca_adder` of width BD)         | BD=4           |
| `rca_adder`        | WD-bit ripple carry adder, one full adder per bit       | WD=32          |
| `cca_pkg`          | default widths shared by all modules                    | -              |

The ports of `cca_adder` and `rca_adder` are the same: `an`, `bn` (WD bits),
`ci` in; `cn` (WD-bit sum), `co` (carry out) out. A 32-bit `rca_adder` is
the plain reference adder that the carry chain adder replaces; the two are
interchangeable.

`gprom` also has an `en` input. With `en` high it reads its tables; with
`en` low both g and p are 0. The top ties `en` high.

## Choices made in this RTL

- `gprom` with `en` low outputs g = p = 0. Keeping the previous value, the
  other obvious reading, would need a latch in a combinational block. The
  adder never drives `en` low, so its results are unaffected.
- `subadder` has a single width parameter, BD. A separate full-width
  parameter would have no use, since the block adder always has BD bits.
- WD must be a multiple of BD; elaboration stops with an error otherwise.
- `gprom` accepts BD from 1 to 10 (`cca_pkg::GP_MAX_BD`), since its tables
  grow as 4^BD.
- Mapping the tables onto specific FPGA lookup tables is left to synthesis.

## Verification

Every module has a self-checking testbench in `tb/` that compares against
reference arithmetic computed in the testbench and ends with a line
`TB_RESULT checks=N failures=M`:

- `tb_rca_adder`: 32-bit corner cases and 5000 random additions.
- `tb_subadder`: all 512 combinations of two 4-bit operands and a carry in.
- `tb_gprom`: all 256 table entries with `en` high, all 256 with `en` low,
  and the 120/16/120 split between generate, propagate and kill.
- `tb_carry_chain_cell`: all eight input combinations.
- `tb_cca_adder`: the top at its default size, with no parameter overrides.
  It runs 40,009 additions: corner cases, operands built block by block to
  make long propagate runs common, and uniform random operands. It counts
  blocks that generate, blocks that kill, blocks that pass a 1 along the
  chain, and additions whose carry in travels through all eight blocks. It
  fails if any of these never happens.
- `tb_cca_adder_sizes`: the top at 16/2, 12/3, 24/8 and 8/8 (WD/BD), checked
  against a reference addition.

All of them pass. Each takes well under a second. Since the design has no
clock, the testbenches use a clock of their own only to pace the stimulus
and to run a watchdog.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
        rtl/cca_pkg.sv tb/tb_cca_adder.sv --top-module tb_cca_adder -Mdir obj
    obj/Vtb_cca_adder

Put `tb/tb_<module>.sv` and `--top-module tb_<module>` in place of
`tb_cca_adder` to run another module's testbench. To change the default
size, edit `CCA_WD` and `CCA_BD` in `rtl/cca_pkg.sv`, or set `WD` and `BD`
on the `cca_adder` instance.
