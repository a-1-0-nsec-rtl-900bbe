# Prefix tree adder with the carry input inside the tree

A full prefix (Kogge-Stone style) adder gives every bit position its own
prefix tree, so all carries are ready after log2(N) operator levels. The
usual way to honour a carry input `cin` is to add a separate row after the
tree that applies `cin` to every group: `c_j = G_0^j | T_0^j & cin`. That row
costs a gate level and loads `cin` with a fanout of N.

This design removes that row. Low-order carries are resolved *inside* the
tree, as soon as a row has a group that reaches down to them, and the rows
below reuse those carries instead of the whole-word groups. For N = 32 the
adder has a logic depth of 2 + log2 N = 7 gate levels (bit cell, five tree
rows, sum XOR), one less than the separate-row scheme, with fully static,
purely combinational logic.

Two variants are provided, both 32 bits by default:

| module            | carry out                          | `cin` fanout | tree cells (N = 32) | depth |
|-------------------|------------------------------------|--------------|---------------------|-------|
| `prefix_adder_ci` | `G_0^31 \| T_0^31 & cin`           | 1 + log2 N = 6 | 135               | 7     |
| `prefix_adder_lp` | `g_31 \| t_31 & c_30`              | 3            | 128                 | 7     |

The low-power variant drops the tree column of the top bit and the
`G_0^(2^k-1)` cells, which shortens the long wires that run across half the
word, with no change in depth.

Around the adders sits the measurement logic of a test chip: each adder is
closed into a ring oscillator, and a divide network brings one selected
oscillator off chip at 1/4096 of its frequency. The top module
`prefix_adder_chip` holds both adders and that divide network.

## Arithmetic

For operand bits `a_j`, `b_j` (two's complement, bit 0 least significant):

```
g_j = a_j & b_j          generate
t_j = a_j | b_j          transmit (used in the tree: an OR is faster than an XOR)
p_j = a_j ^ b_j          propagate (used only for the sum)
c_j = g_j | t_j & c_(j-1),  c_(-1) = cin
s_j = p_j ^ c_(j-1)
overflow = c_(N-1) ^ c_(N-2)
```

Groups combine with the associative carry operator

```
(G_hi, T_hi) o (G_lo, T_lo) = (G_hi | T_hi & G_lo,  T_hi & T_lo)
```

and a group resolves to a carry with `c_j = G_i^j | T_i^j & c_(i-1)`.
A handy way to read the whole design: treat `cin` as an extra bit -1 with
`g = cin, t = 0`. Then `c_j` is simply the group generate `G_(-1)^j`, and a
column whose group reaches bit -1 holds a finished carry (its T is 0).

## The carry tree, row by row

This is the part that matters. Rows are numbered k = 1 .. log2 N. Entering
row k, every unresolved column j holds the group of the 2^(k-1) bits ending
at j. In row k:

* columns `2^(k-1)-1 <= j < 2^k-1` **resolve their carry**:
  `c_j = G + T & c_(j-2^(k-1))`. The lower carry is `cin` (for the first
  column of the row) or a carry resolved in an earlier row.
* columns `j >= 2^k-1` **double their span** with the carry operator, taking
  the lower half from column `j-2^(k-1)`.
* columns already resolved pass straight down.

So c_0 appears after row 1, c_1..c_2 after row 2, c_3..c_6 after row 3 and so
on; after log2 N rows every carry up to c_(N-2) is known, and the top column
holds `G_0^(N-1)`. The sum XORs and the carry-out cell work in parallel in
the last level.

Cell map for 16 bits (`o` carry operator, `x` carry resolution from a lower
carry, `X` carry resolution from `cin`, `.` pass-through):

```
prefix_adder_ci, N = 16
bit   15 14 13 12 11 10  9  8  7  6  5  4  3  2  1  0
row 1  o  o  o  o  o  o  o  o  o  o  o  o  o  o  o  X
row 2  o  o  o  o  o  o  o  o  o  o  o  o  o  x  X  .
row 3  o  o  o  o  o  o  o  o  o  x  x  x  X  .  .  .
row 4  o  x  x  x  x  x  x  x  X  .  .  .  .  .  .  .
then   cout = G_0^15 | T_0^15 & cin
```

### Low-power variant

`prefix_adder_lp` makes three changes to the same tree:

1. The carry out is built from its neighbour: `c_(N-1) = g_(N-1) | t_(N-1) & c_(N-2)`.
   c_(N-2) is ready after the last row, so this one gate runs in parallel
   with the sum XORs. The whole tree column of bit N-1, and the wire taking
   `cin` to it, disappear.
2. From row 4 on, the first carry of a row is taken from the first carry of
   the row before: `c_(j-1) = G_(j/2)^(j-1) | T_(j/2)^(j-1) & c_(j/2-1)` for
   j = 8, 16, ... up to N/2 (c_7 from c_3, c_15 from c_7 at N = 32). Both
   inputs are ready in time, so the depth does not change.
3. The operators that would have built `G_0^7`, `G_0^15`, ... are no longer
   needed and are removed; that column passes its half-span group down
   instead.

`cin` now feeds only rows 1 to 3 (fanout 3, for any N of 8 or more).

```
prefix_adder_lp, N = 16
bit   15 14 13 12 11 10  9  8  7  6  5  4  3  2  1  0
row 1  .  o  o  o  o  o  o  o  o  o  o  o  o  o  o  X
row 2  .  o  o  o  o  o  o  o  o  o  o  o  o  x  X  .
row 3  .  o  o  o  o  o  o  o  .  x  x  x  X  .  .  .
row 4  .  x  x  x  x  x  x  x  x  .  .  .  .  .  .  .
then   cout = g_15 | t_15 & c_14
```

The placement rules live in one place, `prefix_pkg::cell_kind()` and
`prefix_pkg::cell_dist()`, and `prefix_carry_tree` builds either tree from
them with generate loops, one node array per row. To try another placement,
change those two functions; the adder testbenches recompute fanout and depth
from them and check every sum.

## Module reference

| file | role |
|------|------|
| `rtl/prefix_pkg.sv` | `gt_t` (G,T pair), `cell_kind_e`, placement functions |
| `rtl/gt_cell.sv` | bit cell: g, t, p |
| `rtl/carry_op.sv` | carry operator `o` |
| `rtl/carry_cell.sv` | carry resolution `c = G \| T & c_lo` |
| `rtl/prefix_carry_tree.sv` | the log2 N rows (parameter `LOW_POWER`) |
| `rtl/prefix_adder_ci.sv` | adder, carry input in every row |
| `rtl/prefix_adder_lp.sv` | low-power adder |
| `rtl/freq_divider.sv` | divide by 2**STAGES (counter, top bit out) |
| `rtl/osc_mux_tree.sv` | 2:1 mux tree steered by one-hot enables |
| `rtl/divide_network.sv` | per-oscillator /4, mux tree, common /1024 |
| `rtl/prefix_adder_chip.sv` | top: both adders and the divide network |

Adder ports: `a[N-1:0]`, `b[N-1:0]`, `cin` in; `sum[N-1:0]`, `cout`, `ovf` out.
No clock, no reset; N must be a power of two (checked at elaboration).

Top ports: the same set twice, suffixed `_ci` and `_lp`, plus `rst_n`,
`osc[15:0]`, `osc_en[15:0]` and `div_out`.

## Speed measurement logic

On silicon an adder's delay is measured by making it oscillate. With
`a` all ones and `b = 0`, the top sum bit is the inverse of `cin`, and the
path from `cin` to `s_31` crosses every tree row. Feeding `s_31` back to
`cin` through an AND gate with an enable gives a ring whose half period is
adder delay plus AND delay. Five reference rings of 7, 11, 15, 19 and 23
inverters behind the same kind of AND gate give the AND delay: plot half
period against inverter count and read off the intercept at zero.

The rings themselves are delay structures, not logic, so they are not in
the RTL. The chip top takes their outputs on `osc[]` and the enables on
`osc_en[]` (one-hot; the same enables are meant to gate the rings).
`divide_network` divides each oscillator by 4 first, so the muxes have
time to switch, then selects one through `osc_mux_tree`, then divides by
1024: `div_out` runs at f_osc / 4096. All dividers reset asynchronously on
`rst_n` low; after a switch of `osc_en` the first `div_out` period is not
meaningful.

`tb/adder_ring_osc_model.sv` and `tb/inv_ring_osc_model.sv` are timed models
of those rings for simulation only. They use an adder delay of 1.0 ns, an
AND delay of 0.38 ns and 50 ps per inverter.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with
`$finish`. With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/prefix_pkg.sv tb/tb_prefix_adder_chip.sv --top-module tb_prefix_adder_chip
./obj_dir/Vtb_prefix_adder_chip
```

Replace the testbench name to run another one. The package must come first
on the command line; everything else is found through `-y`.

| testbench | what it shows |
|-----------|---------------|
| `tb_gt_cell`, `tb_carry_op`, `tb_carry_cell` | exhaustive truth tables; associativity of `o` |
| `tb_prefix_adder_ci`, `tb_prefix_adder_lp` | N = 32 corner cases and 20 000 random adds, N = 16 and N = 64 random, N = 8 exhaustive; `cin` fanout and depth for N = 16, 32, 64 |
| `tb_freq_divider` | /4 and /1024 edge by edge, async reset |
| `tb_osc_mux_tree` | every enable routes its input |
| `tb_divide_network` | 16 clocks of distinct periods; `div_out` period is exactly 4096 times each |
| `tb_prefix_adder_chip` | full size: 5 000 random adds on each adder, then both adder rings and the five inverter rings measured through `div_out`; the AND delay is recovered by a least-squares fit and the adder delays by subtraction, and disabled rings are checked to stay quiet |

The full-size run takes well under a second. Its output ends with the
recovered delays, e.g. `AND gate 0.380 ns, inverter 0.050 ns, ci adder
1.000 ns, lp adder 1.000 ns`. These numbers only confirm that the dividers,
the mux tree and the extraction arithmetic are right: the delays come from
the models, not from the RTL, which has no timing.

After Yosys coarse synthesis, `prefix_adder_ci` is 471 gate cells and
`prefix_adder_lp` 450.

## What this RTL does and does not cover

From the architecture: the g/t/p cells, the carry operator, the placement of
operators, carry cells and buffers in both trees, the carry-out rules, the
sum stage, and the /4, mux tree, /1024 measurement path.

Choices made here, where the architecture leaves things open:

* The carry-out rule of the low-power variant. One formulation of it reuses
  `G_0^(N-1)` together with `c_(N-2)`; this design uses `g_(N-1)`, `t_(N-1)`
  and `c_(N-2)`. That gives the same result, and it is the only form in
  which the top bit's tree column can actually be removed.
* The first-carry reuse rule (change 2 above) stops at j = N/2; c_(N-1) is
  covered by the carry-out rule.
* An overflow output `ovf = c_(N-1) ^ c_(N-2)` on both adders.
* Separate operand ports per adder in the top, since each adder lives in its
  own ring.
* 16 oscillator slots: 11 adder rings (Brent-Kung, carry-skip, Ling, six
  gate-style and wiring variants of the separate-row adder, and the two
  adders here) plus 5 inverter rings. Only the two adders here are built;
  the other slots are plain inputs.
* Dividers as synchronous counters with an asynchronous active-low reset.
  The mux tree is steered by OR-ed enables. A ring's delay is read as its
  half period.

Not modelled: transistor-level choices (mux-style XOR/XNOR, AOI/OAI versus AO
operator gates, buffering, metal layer direction), power, and layout. Only
radix 2 is built. The comparison adders of the test chip (ripple-carry,
carry-skip, Brent-Kung, Ling, the separate-row prefix adder) are not part of
this RTL.
