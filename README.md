# Sparse Kogge-Stone adder with an FPGA delay-test circuit

A ripple-carry adder is slow in principle, because its carry has to pass through every bit.
On an FPGA, though, it is hard to beat: the dedicated carry chain makes each step of the ripple
very cheap. A parallel-prefix (carry-tree) adder such as Kogge-Stone reaches every carry in
log2(N) levels. On an FPGA, however, each of those levels costs a LUT plus general routing.

The sparse Kogge-Stone adder combines the two. A Kogge-Stone tree computes only every fourth
carry, and 4-bit ripple-carry blocks, which map onto the carry chain, fill in the bits between.
The tree keeps the long-distance carry delay logarithmic. The ripple blocks remove most of the
tree's cells and wires.

This repository holds that adder as parameterised SystemVerilog, plus the small circuit that is
used on an FPGA board to measure an adder's delay. That circuit has a pattern ROM, the adder, and
an output multiplexer with a bypass leg, so the delay of everything except the adder can be
subtracted.

## Carries as a prefix problem

Each column of the addition is described by a pair (g, p):

- `g = a & b`: the column *generates* a carry by itself.
- `p = a ^ b`: the column *propagates* an incoming carry.

The carry-in is treated as one more column below bit 0, with `(g, p) = (cin, 0)`. Column `i+1`
holds operand bit `i`. The generate of the span from column 0 up to column `i` is then exactly
the carry into operand bit `i`. No special case for the carry-in is needed.

Two adjacent spans join with the carry operator:

    (gL, pL) o (gR, pR) = (gL | pL & gR,  pL & pR)

Here L is the upper span and R the span directly below it. The operator is associative, so a tree
can evaluate it in any grouping. Three cells implement it:

| cell | module | computes | used where |
|---|---|---|---|
| black cell | `black_cell` | G and P | the joined span does not yet reach column 0 |
| grey cell | `grey_cell` | G only | the lower span reaches column 0, so P would always be 0 |
| fast-carry cell | `fcl_cell` | `G = pL ? gR : gL`, `P = pL & pR` | every cell, when `FAST_CARRY = 1` |

The mux form in `fcl_cell` is the 2:1 multiplexer an FPGA carry chain is made of. It equals the
AND-OR form only when g and p of a span are never both 1. That is always the case here:
`a&b` and `a^b` exclude each other, `(cin, 0)` does too, and the operator keeps the property.
`fcl_cell` asserts the rule in simulation.

## The trimmed tree (`sparse_ks_carry_tree`)

A full Kogge-Stone tree over columns 0..N has `L = ceil(log2(N+1))` levels. At level `l`, every
column `i >= 2^(l-1)` joins its span with the span that ends `2^(l-1)` columns lower. After level
`L`, every column holds a span that reaches column 0, so every carry is available.

The sparse tree keeps only the cells that the carries into bits `INTERVAL`, `2*INTERVAL`, ..., `N`
depend on. The last of these is the carry-out. The set of cells is not written out by hand.
A constant function (`need_map`) walks backwards from the wanted columns at the last level. A
column needed at level `l` needs itself at level `l-1`. It also needs column `i - 2^(l-1)`, when
that column exists. Every combination of width and interval therefore gets a correct tree.

A needed position then becomes one of three things:

- a grey cell, if its lower span already reaches column 0;
- a black cell, otherwise;
- a plain wire, if its own span already reaches column 0. These are the "white buffers" of a
  drawn tree.

Positions that no wanted carry depends on are not built; they read as 0.

For the default 16-bit adder with `INTERVAL = 4`, the tree is as follows. Column 16 is on the
left and column 0, the carry-in, is on the right. `B` is a black cell, `G` a grey cell, `|` a
wire and `.` a position that is not built.

    column:          16 15 14 13 12 11 10  9  8  7  6  5  4  3  2  1  0
    level 1 (d=1):    B  .  B  .  B  .  B  .  B  .  B  .  B  .  B  .  |
    level 2 (d=2):    B  .  .  .  B  .  .  .  B  .  .  .  B  .  .  .  |
    level 3 (d=4):    B  .  .  .  B  .  .  .  B  .  .  .  G  .  .  .  |
    level 4 (d=8):    B  .  .  .  G  .  .  .  G  .  .  .  |  .  .  .  |
    level 5 (d=16):   G  .  .  .  |  .  .  .  |  .  .  .  |  .  .  .  .

That is 16 black and 4 grey cells. A dense 16-bit Kogge-Stone tree (`INTERVAL = 1`) has 38
black and 16 grey cells. Counts at the other widths with 4-bit blocks:

| width | levels | black | grey |
|---:|---:|---:|---:|
| 4 | 3 | 3 | 1 |
| 8 | 4 | 7 | 2 |
| 16 | 5 | 16 | 4 |
| 32 | 6 | 37 | 8 |
| 64 | 7 | 86 | 16 |
| 128 | 8 | 199 | 32 |
| 256 | 9 | 456 | 64 |

Because the carry-in is a column of its own, the carry-out of an N-bit adder whose width is a
power of two needs one level more than the carries inside the word. In the 16-bit adder, the
carries into bits 4, 8 and 12 are ready after at most 4 levels; the carry-out takes 5.

## Ripple blocks (`rca_block`) and the full adder (`sparse_ks_adder`)

`sparse_ks_adder` connects three stages:

1. `pg_precompute` forms the column (g, p) pairs.
2. `sparse_ks_carry_tree` produces `carry[k]`, the carry into bit `(k+1)*RCA_WIDTH`.
3. `WIDTH/RCA_WIDTH` instances of `rca_block` finish the sum.

Block `k` starts from the carry-in (for `k = 0`) or from `carry[k-1]`. Inside the block the carry
ripples through one carry-chain mux per bit, `c[j+1] = p[j] ? c[j] : g[j]`. The sum is
`s[j] = p[j] ^ c[j]`. A block has no carry-out: the next block takes its carry from the tree,
which is the whole reason the tree can be sparse. The adder's carry-out is the last tree carry.

The adder is purely combinational. Its critical path runs through `ceil(log2(N+1))` cell levels,
then `RCA_WIDTH - 1` ripple muxes, then an XOR.

`RCA_WIDTH = 1` turns the design into a regular, dense Kogge-Stone adder. `FAST_CARRY = 1` builds
the tree from mux-form cells, the variant meant to map onto the FPGA carry logic.

## Delay-test circuit (`adder_test_top`)

On a board, an adder's delay is measured at the pins with a logic analyzer. `adder_test_top`
holds the logic of that set-up:

- `pattern_rom` holds `ROM_DEPTH` words `{cin, b, a}`. The read is synchronous, with one clock of
  latency, as in a block-RAM ROM. The contents are computed at elaboration; no data file is read.
  - The first half of the ROM holds the worst case for a prefix tree. Even words put every column
    into (g,p) = (0,1) (`a` = all ones, `b = 0`, `cin = 0`). Odd words put every column into
    (1,0) (`a = b` = all ones, `cin = 1`). If (1,0) counts as "true" and (0,1) as "false", every
    prefix cell acts as an OR gate. Stepping from one word to the next therefore toggles the
    output of every cell, so the slowest path is exercised.
  - The second half holds pseudo-random operands: 32-bit chunks of a multiplicative hash of the
    word index. `cin` is 1 when the index is a multiple of 3.
- An address counter advances on `step` and wraps at `ROM_DEPTH - 1`. `rst_n` (active low,
  synchronous) returns it to 0.
- `output_select_mux` puts one 2:1 mux on every output bit, all driven by the board switch
  `sel_adder`:
  - `1` drives `{out_cout, out_sum}` with `{cout, sum}` from the adder;
  - `0` drives it with `{cin, a}` straight from the ROM. This path has the same memory, mux and
    wiring but no adder, so measuring both gives the adder's own delay.

Timing: the `step` seen at clock edge k moves the address. The ROM word for that address, and the
adder result computed from it, appear after edge k+1. `pattern_addr` is registered alongside the
ROM data, so it always names the pattern now on the adder.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `WIDTH` | 16 | adder, tree, top, ROM | operand width; must be a multiple of `RCA_WIDTH` |
| `RCA_WIDTH` / `INTERVAL` | 4 | adder / tree | ripple-block width, the spacing of tree carries |
| `FAST_CARRY` | 0 | adder, tree, top | 0: AND-OR black/grey cells; 1: mux-form cells |
| `ROM_DEPTH` / `DEPTH` | 16 | top / ROM | number of test patterns |

The defaults describe the 16-bit sparse adder with 4-bit ripple blocks. `FAST_CARRY = 0` and
`ROM_DEPTH = 16` are choices of this implementation. The tree rejects a width that is not a
multiple of the interval at elaboration.

## Files

- `rtl/adder_pkg.sv`: the `gp_t` (g, p) struct shared by the cells.
- `rtl/black_cell.sv`, `rtl/grey_cell.sv`, `rtl/fcl_cell.sv`: prefix cells.
- `rtl/pg_precompute.sv`, `rtl/sparse_ks_carry_tree.sv`, `rtl/rca_block.sv`: the adder's stages.
- `rtl/sparse_ks_adder.sv`: the adder.
- `rtl/pattern_rom.sv`, `rtl/output_select_mux.sv`, `rtl/adder_test_top.sv`: the test circuit.
  The top is `adder_test_top`.
- `tb/tb_<module>.sv`: one self-checking testbench per module.
- `tb/tb_adder_widths.sv`: the adder at 4 to 256 bits, in both cell styles.
- `tb/pattern_model_pkg.sv`: a reference model of the ROM contents, used by the testbenches.

## Simulating

Every testbench checks the design against values it computes on its own: integer addition, or
the carry-in/carry-out behaviour of a span. It prints `TB_RESULT checks=N failures=M` and stops.
Each one also has a watchdog. To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/adder_pkg.sv tb/pattern_model_pkg.sv tb/tb_adder_test_top.sv \
        --top-module tb_adder_test_top
    ./obj_dir/Vtb_adder_test_top

Replace the testbench name to run another. Every testbench ends within seconds.

| testbench | what it covers |
|---|---|
| `tb_adder_test_top` | the whole circuit at its default parameters |
| `tb_adder_widths` | the adder at 4, 8, 16, 32, 64, 128 and 256 bits, both cell styles |
| `tb_sparse_ks_adder` | default, mux-form and dense 16-bit adders: worst cases and 3000 random vectors |
| `tb_sparse_ks_carry_tree` | seven tree shapes (widths 12/16/32, intervals 1 to 8, both cell styles): every carry |
| `tb_rca_block` | exhaustive |
| `tb_black_cell`, `tb_grey_cell`, `tb_fcl_cell` | exhaustive, by span behaviour |
| `tb_pg_precompute`, `tb_pattern_rom`, `tb_output_select_mux` | their single functions; the ROM test also checks read latency |

`tb_adder_test_top` follows the address counter and the ROM latency with a model of its own.
Under pseudo-random `step` and switch settings, and one reset part-way through, it checks every
output. It also counts how often each mechanism of the circuit happened: adder and bypass
selection, all-propagate and all-generate patterns, the step from one to the other, hashed
patterns, held address, address wrap, and reset. It fails if any of them never happened.

Each testbench has also been run against a copy of its module with one deliberate bug, such as a
swapped mux input or a wrong propagate, and each reported failures.

## How far this follows the published design

The following are taken from the published design:

- the sparse Kogge-Stone structure;
- 16 bits with 4-bit ripple blocks;
- the (g, p) pre-computation, with the carry-in as column 0 and `(cin, 0)`;
- the carry operator and the black/grey cell split;
- the sum as `p ^ carry`;
- the mux-based "fast carry logic" cell form;
- the test circuit, made of a ROM, the adder and a switch-driven output mux;
- the alternating worst-case (g, p) patterns.

The following are choices of this implementation, because the source gives no detail for them:

- which cells the trimmed tree keeps (derived, as described above);
- that the mux-form cells are an option (`FAST_CARRY`) rather than the default;
- the ROM's depth, contents beyond the worst-case pair, and one-clock latency;
- what the bypass leg carries (`{cin, a}`);
- the address counter, `step`, the reset, and the switch polarity.

Not included:

- The adders the sparse design is compared against: ripple-carry, carry-skip, spanning-tree
  carry-lookahead, Brent-Kung, Ladner-Fischer, Han-Carlson, Sklansky and Knowles. The dense
  Kogge-Stone adder is available through `RCA_WIDTH = 1`.
- The measured and predicted delay, power and area figures. They depend on the FPGA, the ASIC
  library and the tools, and a logic simulation has no delay. The characterisation was done with
  synthesis that kept the hierarchy, so that each prefix cell maps to one LUT. The cells here are
  separate modules, so the same setting applies.
- The logic analyzer, the board switch and the probe pads. They appear only as the top's ports:
  `sel_adder` in, `out_sum`/`out_cout` out.
