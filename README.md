# Three 32-bit parallel prefix adders: Kogge-Stone, Brent-Kung, Ladner-Fischer

A ripple-carry adder is slow because bit 31 has to wait for a carry that may
start at bit 0 and pass through every bit in between. A parallel prefix adder
gets every carry in a logarithmic number of logic levels. It does this by
treating carry computation as a prefix problem over (generate, propagate)
pairs. This RTL has three classic ways of wiring that prefix computation, each
as a 32-bit adder with carry input and carry output. They compute the same
function, `{cout, s} = a + b + cin`, and differ in how many cells they use, how
long their wires are, how many inputs each node drives, and how many cell
delays deep they are. A top module puts all three side by side on the same
operands so that they can be compared in simulation and synthesis.

Everything is combinational: no clock, no registers, no latency in cycles.

## Generate, propagate and the prefix operator

For each bit `j` of the operands `x` and `y`:

    P[j] = x[j] xor y[j]      bit j passes an incoming carry on
    G[j] = x[j] and y[j]      bit j creates a carry by itself

A *group* of adjacent bits `[hi..lo]` has the same two properties. Two adjacent
groups combine with the prefix operator. Here `hi` is the upper group and `lo`
is the lower group directly below it:

    P = P_lo and P_hi
    G = (G_lo and P_hi) or G_hi

The operator is associative, so groups can be merged in any tree shape. Once a
group reaches down to bit 0 (here: to the carry input), its `G` is the carry
out of its top bit. The sum is then

    S[0]   = P[0]   xor cin
    S[j+1] = P[j+1] xor C[j]        C[j] = G of the group [j..0]
    cout   = C[31]

Every adder here has three stages:

| stage | module | what it does |
|---|---|---|
| pre-computation | `pg_precompute` | `P` and `G` for all bits in parallel |
| prefix network | inside each adder | merges groups until each bit has `C[j]` |
| post-computation | `sum_postcompute` | the sum XORs and `cout` |

The network is built from two cells:

* `black_cell` is the full operator (two ANDs, one OR). It is used wherever
  the merged group does not yet reach bit 0.
* `gray_cell` computes only `G` (one AND, one OR). It is used where the lower
  group already reaches bit 0, so the result is a finished carry and its `P`
  will never be needed.

`ppa_pkg::pg_t` is the packed `{g, p}` pair passed between cells.

### Carry input

The carry input is folded into bit 0 before the network: one gray cell turns
`G[0]` into `G[0] or (P[0] and cin)`. After that, bit 0's group counts as
complete, and every group that reaches bit 0 already includes `cin`.

## The three prefix networks

In the descriptions below, *level* means one row of cells. That is one cell
delay. "Node `i` merges with node `k`" means that at this level, bit `i`'s
group becomes `i`'s group joined with the group held at bit `k`. Bits that do
not merge pass their value down unchanged. The cell counts are for 32 bits and
include the one gray cell that folds in `cin`.

### Kogge-Stone (`kogge_stone_adder`), 5 levels

At level `l` (`l = 1..5`, span `D = 2^(l-1)` = 1, 2, 4, 8, 16), every bit
`i >= D` merges with bit `i - D`. After level `l`, each bit holds the group of
the `2^l` bits ending at it. Five levels are therefore enough for 32 bits.

This gives the minimum depth, and every node drives at most two cells. The
price is the largest cell count (98 black and 32 gray cells) and many long
wires: at level 5, wires span 16 bits.

### Brent-Kung (`brent_kung_adder`), 2·log2(N) − 1 = 9 levels

* **Up-sweep, levels 1–5.** At span `D`, only the bits with `(i+1)` a
  multiple of `2D` merge with bit `i - D`. This builds prefixes for 2-bit
  groups (bits 1, 3, 5, …), then 4-bit groups (3, 7, 11, …), then 8-bit and
  16-bit groups, and finally the complete 32-bit group. After the up-sweep,
  bits 0, 1, 3, 7, 15 and 31 hold complete carries.
* **Down-sweep, levels 6–9.** The spans are 8, 4, 2, 1. Bit `i` with
  `(i+1) mod 2D = D` and `i >= 3D-1` takes the finished carry of bit `i - D`.
  For 32 bits:
  * level 6 fills in bit 23;
  * level 7 fills in bits 11, 19, 27;
  * level 8 fills in bits 5, 9, …, 29;
  * level 9 fills in every even bit from 2 up.

This uses the fewest cells (26 black and 32 gray), has short wiring, and no
node drives more than one other cell per level. The price is almost twice the
depth of Kogge-Stone.

### Ladner-Fischer (`ladner_fischer_adder`), 5 levels by default

The Ladner-Fischer family lies between Brent-Kung and the Sklansky tree. The
parameter `ODD_EVEN_SPLIT` selects one of two members.

* **`ODD_EVEN_SPLIT = 0` (default, 5 levels).** At level `l`, every bit `i`
  whose bit `l-1` is set merges with the top bit of the block just below. That
  is bit `(i with its low l-1 bits cleared) - 1`. Level by level, complete
  prefixes are formed for aligned blocks of 2, 4, 8, 16 and 32 bits. There
  are 49 black and 32 gray cells. The depth equals Kogge-Stone's, but the
  fan-out doubles at each level: at level 5, bit 15 feeds all 16 bits above
  it.
* **`ODD_EVEN_SPLIT = 1` (6 levels).** Level 1 pairs each odd bit with the
  even bit below it. Levels 2–5 run the same tree over the 16 odd bits only.
  A last level then gives each even bit the finished carry of the odd bit
  below it. This roughly halves the tree's cells and fan-out (32 black and 32
  gray) at the cost of one extra level.

### Comparison

For the coarse synthesis of this RTL (yosys, word-level gates, the operand
isolation included), the cell counts are: Kogge-Stone 457, Ladner-Fischer 310
and Brent-Kung 241. The relative order matches the cell counts listed above.
No timing or power figures come with this RTL. Those depend on the target
library and flow.

## Enable and power gating

The adders are meant to sit behind a power switch that cuts an idle adder's
supply. A power switch is a physical cell, not logic, so it is not part of the
RTL. What the RTL does have is its control: the `enable` input. When `enable`
is low, `pg_precompute` forces both operands and the carry input to zero. The
adder's internal nodes then stop toggling, and `s` and `cout` read zero. When
`enable` is high, the adder works normally. A power-gated implementation would
use the same pin to drive the sleep switch and the output clamps.

## Interfaces

All three adders have the same ports:

| port | dir | width | meaning |
|---|---|---|---|
| `enable` | in | 1 | 1: add. 0: isolated, outputs 0 |
| `a`, `b` | in | `WIDTH` | operands |
| `cin` | in | 1 | carry input |
| `s` | out | `WIDTH` | sum |
| `cout` | out | 1 | carry output |

`WIDTH` defaults to 32. Any power of two of at least 2 works, and an initial
assertion rejects other values. The level counts scale as `log2(WIDTH)`
(Kogge-Stone and Ladner-Fischer) and `2·log2(WIDTH) − 1` (Brent-Kung).

`ppa32_top` has one shared `enable`, `a`, `b` and `cin`, and three output
pairs: `s_ksa/cout_ksa`, `s_bka/cout_bka` and `s_lfa/cout_lfa`.

To subtract, drive `a`, `~b` and `cin = 1`. Then `s = a - b`, and `cout` is 1
when `a >= b` (unsigned).

## Where this RTL makes its own choices

* **Kogge-Stone stage count.** The five stages of the Kogge-Stone network are
  taken to be its five prefix levels. Pre-computation and post-computation sit
  outside them.
* **Brent-Kung depth.** The Brent-Kung adder uses the full `2·log2(N) − 1 = 9`
  levels.
* **Ladner-Fischer default.** The default Ladner-Fischer member is the 5-level
  one. The odd/even-split member, which needs one more level, is available as
  an option.
* **Gray cell.** The gray cell is built with an AND and an OR, as the carry
  equation needs. A single AND would not give a carry.
* **Carry input.** The carry input is folded into bit 0 ahead of the network.
* **Operand isolation.** The `enable` input performs operand isolation. The
  power switch itself is not modelled.
* **Network wiring.** The wiring of each network is the textbook form of that
  network.
* **No registers.** The design is purely combinational. No pipeline registers
  were added.

## Files

| file | contents |
|---|---|
| `rtl/ppa_pkg.sv` | `pg_t`, default width |
| `rtl/black_cell.sv`, `rtl/gray_cell.sv` | prefix cells |
| `rtl/pg_precompute.sv` | per-bit P/G, operand isolation |
| `rtl/sum_postcompute.sv` | sum XORs and carry-out |
| `rtl/kogge_stone_adder.sv`, `rtl/brent_kung_adder.sv`, `rtl/ladner_fischer_adder.sv` | the adders |
| `rtl/ppa32_top.sv` | all three side by side |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench compares the block with a result worked out on its own, mostly
with the simulator's built-in wide addition. Each one prints
`TB_RESULT checks=N failures=M` and stops under a watchdog.

* **Cells.** Exhaustive over all input combinations.
* **Pre- and post-computation.** 2000 random vectors, checked bit by bit,
  including `enable = 0`.
* **Each adder.**
  * Corner cases: a carry chain of every length from 1 to 32, all ones, zero,
    and `0xAAAAAAAA + 0x55555555 + 1`.
  * 20,000 random 32-bit vectors.
  * Vectors with `enable` low.
  * An 8-bit instance tested over all 2^17 operand and carry combinations.
  * For Ladner-Fischer, both members, at 32 and 8 bits.
* **Top (`tb_ppa32_top`).** Default parameters. Every vector goes to all three
  adders at once. The testbench counts five behaviours and fails if any of them
  never occurs:
  * carry out of bit 31;
  * carry input used;
  * a carry running from `cin` through all 32 bits;
  * isolation with `enable` low;
  * subtraction, checked against `a - b`.

Each testbench was also run against a deliberately broken copy of its module,
and each one reported failures. Examples of the breaks:

* an OR in place of an XOR;
* one prefix level missing;
* down-sweep nodes left out;
* wrong merge partners;
* a carry input tied off.

Lint and elaboration are clean in Verilator (`-Wall`) and in the slang front
end of yosys.

### Running a testbench

Verilator 5, from the repository root:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/ppa_pkg.sv tb/tb_ppa32_top.sv --top-module tb_ppa32_top
    ./obj_dir/Vtb_ppa32_top

Replace `tb_ppa32_top` with any other `tb_<module>` to test one block. Each
testbench finishes in well under a second.

### Changing it

* **Width.** `WIDTH` sets the width, and the networks are generated from it.
* **Another prefix network.** A new network is one more generate loop of the
  same form. Level 0 holds `pg_t` nodes, each later level holds a `node`
  vector, and each node is either passed on or merged by a black or gray cell.
  Use a gray cell whenever the lower group reaches bit 0.
