# Hyper-Parallel Prefix Adder (64-bit, Grouped-Kogge-Stone tree)

A 64-bit binary adder built as two nested parallel-prefix adders. A plain
Kogge-Stone adder is the fastest prefix adder in logic depth. Its weakness
is its wiring: every bit has a node in every level, and the upper levels
carry long wires across the whole word. This design keeps the Kogge-Stone
pattern but runs it on **groups of bits** instead of single bits:

* **Bottom level.** The word is cut into eight 8-bit groups. Each group
  runs on its own and computes three things:
  * its group generate/propagate (G/P);
  * its sum if the carry into the group is 0;
  * its sum if that carry is 1.
  Inside a group the same idea is used again. The group is made of four
  2-bit sub-groups. A small prefix tree over the sub-groups picks between
  two 2-bit ripple sums in each sub-group.
* **Top level.** A Kogge-Stone tree over the eight group G/P pairs gives
  the real carry into every group. A multiplexer per group then takes the
  matching pre-computed sum, as a carry-select adder would.

Only one node per group enters the top-level tree. Its levels therefore
have an eighth of the nodes a bit-level Kogge-Stone tree has at those
levels, and much shorter wires. The result is `sum = (a + b) mod 2^64` and
`cout`, the carry out of bit 63. The adder has no carry-in. It is purely
combinational: no clock, no reset and no pipeline registers.

## Data flow

```
 a[63:0], b[63:0]
     |   cut into 8 groups of 8 bits
     v
 +-----------+  +-----------+        +-----------+
 | group_ppa |  | group_ppa |  ...   | group_ppa |   bottom level (CM0..CM2)
 | group 0   |  | group 1   |        | group 7   |   per group: G/P, s_nc, s_c
 | no carry  |  |           |        |           |   (group 0: G and s_nc only)
 +-----------+  +-----------+        +-----------+
     | G/P, sums      |                    |
     v                v                    v
 +-----------------------------------------------+
 | hppa_top_level                                |   top level (CM3..CM5)
 |   gks_tree over the 8 group G/P -> carry into |
 |   each group; per group 1..7: mux(s_c, s_nc)  |
 +-----------------------------------------------+
     |
     v
 sum[63:0], cout
```

The prefix levels are numbered from the bottom up: CM0 joins the two bits
of each sub-group, CM1 and CM2 work across the sub-groups of a group, and
CM3, CM4 and CM5 work across the groups. The operator at every node is the
usual prefix operator

    (G, P) o (G', P') = (G | P & G',  P & P')

with `G_i = a_i & b_i` and `P_i = a_i ^ b_i` per bit.

## The Grouped-Kogge-Stone tree (`gks_tree`)

The tree works on N columns. Each column is a sub-group inside a group, or
a group in the top level. Level t joins column k with column k - 2^(t-1),
as in Kogge-Stone. Each position holds one of three node kinds:

| node  | where                                             | passes on |
|-------|---------------------------------------------------|-----------|
| black | the joined span does not reach column 0 yet       | G and P   |
| grey  | the joined span reaches column 0 for the first time | G only (it is now a carry) |
| buffer| the column already holds its final carry          | G, re-driven |

After log2 N levels, column k holds the carry out of column k. The top
column holds the G/P of all N columns, which the next level up consumes.

For the top level (N = 8 groups, no carry-in) this gives:

| level | 63:56 .. 31:24 | 23:16 | 15:8  | 7:0    |
|-------|----------------|-------|-------|--------|
| CM3   | black          | black | grey  | buffer |
| CM4   | black (63:56..39:32), grey (31:24) | grey | buffer | buffer |
| CM5   | grey (63:56..39:32), buffer (31:24) | buffer | buffer | buffer |

Over CM3 to CM5 a bit-level Kogge-Stone tree would need 56 + 48 + 32 = 136
nodes; these three levels here have 17, one eighth. The design has 110
prefix nodes in all:
* 12 in each of the seven upper groups;
* 9 in the lowest group;
* 17 in the top level.

## The two group adders and their shared nodes (`group_ppa`)

This is the least obvious part of the design. Every group except the
lowest needs two 8-bit prefix adders: one that assumes a carry-in of 0 (the
*non-carry* adder) and one that assumes a carry-in of 1 (the *carry*
adder). They differ only where a prefix reaches the carry-in, so they are
built as one circuit:

* The non-carry tree is the plain tree described above.
* The carry tree treats the constant 1 carry-in as an extra column -1
  below column 0, with the same Kogge-Stone pattern. A node whose span
  does not reach column -1 computes exactly the same value as the
  non-carry node at that position, so it is **shared**. Only the grey
  nodes and buffers that involve the carry-in are added (`CIN_TREE = 1`).
* The carry tree reads the P of the node at column 2^t - 1 (span
  [0, 2^t - 1]). The plain tree would make that node grey, so in a shared
  tree it is black. Its G serves both trees.

For an 8-bit group (four 2-bit sub-groups) this comes out as:

| level | column 7:6 | column 5:4 | column 3:2 | column 1:0 |
|-------|------------|------------|------------|------------|
| CM0   | black      | black      | black      | black (grey in the lowest group) |
| CM1   | black      | black      | black (grey in the lowest group) | buffer; carry tree: grey with the 1 |
| CM2   | black (group G/P) | grey; carry tree: grey | buffer; carry tree: grey | buffer |

Every 2-bit sub-group has two carry-ripple adders (`rca`), with carry-in 0
and carry-in 1. Both group adders use them. Sub-group k of the non-carry
adder takes the carry-in-1 ripple sum when the non-carry tree says that a
carry leaves sub-group k-1. The carry adder does the same with the carry
tree. Sub-group 0 needs no multiplexer: its carry is the assumed group
carry-in.

The lowest group of the word only ever sees a carry-in of 0, so it is
built with `WITH_CARRY = 0`: no carry tree and no carry-in-1 sum. Its
group propagate is never needed either, so it is not formed: `p_grp` and
`s_c` read 0 there.

## Alternating signal polarity

The node gates follow a static-CMOS scheme in which each prefix level is a
single inverting gate:

* The preprocessing row (`pg_pre`) delivers `~G` and `~P`.
* Even levels (CM0, CM2, CM4) take inverted inputs and give true outputs:
  `P = NOR(~P, ~P')` and `G = OAI21`.
* Odd levels (CM1, CM3, CM5) take true inputs and give inverted outputs:
  `~P = NAND(P, P')` and `~G = AOI21`.
* A buffer that carries a finished column down one level is an inverter,
  so that the column stays in the polarity of its level.

`hppa_pkg::level_inverted(L)` says whether the outputs of level CM`L` are
inverted. Every consumer uses it to undo the inversion where it needs a
true value:
* The sub-group multiplexer selects come from CM2, which is true.
* The group multiplexer selects and `cout` come from CM5, which is
  inverted.

Synthesis will restructure this freely. The RTL keeps it because that is
how the node circuits are meant to be built, and because it makes the
netlist map one-to-one onto the tree diagrams above.

## Modules

| module            | role | interface |
|-------------------|------|-----------|
| `hppa64`          | the adder | `a`, `b` [WIDTH]; `sum` [WIDTH], `cout` |
| `hppa_top_level`  | top-level group tree and group multiplexers | group `g_grp`, `p_grp`, `s_nc[j]`, `s_c[j]` (j >= 1); `sum`, `cout` |
| `group_ppa`       | one group: shared non-carry/carry prefix adders | `a`, `b` [GROUP_BITS]; `g_grp`, `p_grp`, `s_nc`, `s_c` |
| `gks_tree`        | grouped Kogge-Stone carry tree, optional carry-in tree | `g_i`, `p_i` [N], `cin`; `g_all`, `p_all`, `c0`, `c1` [N-1] |
| `rca`             | W-bit carry-ripple adder (W = 2) | `a`, `b`, `cin`; `s` |
| `black_node`      | prefix operator, parameter `EVEN` picks the polarity | `g_hi`, `p_hi`, `g_lo`, `p_lo`; `g_o`, `p_o` |
| `grey_node`       | generate-only prefix operator | `g_hi`, `p_hi`, `g_lo`; `g_o` |
| `pg_pre`          | bit generate/propagate, inverted | `a`, `b`; `g_n`, `p_n` |
| `hppa_pkg`        | default sizes, `level_inverted()` | |

Group G/P travel between `group_ppa` and `hppa_top_level` in the polarity
of the last in-group level. For 8-bit groups that level is CM2, so the
signals are true.

## Parameters

| parameter | module | default | meaning |
|-----------|--------|---------|---------|
| `WIDTH` | `hppa64`, `hppa_top_level` | 64 | word width |
| `GROUP_BITS` | `hppa64`, `group_ppa`, `hppa_top_level` | 8 | bits per group |
| `SUB_BITS` | `hppa_pkg` (fixed) | 2 | bits per sub-group |
| `WITH_CARRY` | `group_ppa` | 1 | build the carry-in-1 adder (0 for the lowest group) |
| `N`, `FIRST_LEVEL`, `CIN_TREE` | `gks_tree` | 4, 1, 0 | columns, CM number of the first level, carry-in tree |

Constraints on the sizes:
* `WIDTH / GROUP_BITS` must be a power of two, at least 2.
* `GROUP_BITS / 2` must be a power of two, at least 2.

`GROUP_BITS = 4` builds the other tree shape of the design family: levels
CM0 and CM1 inside sixteen 4-bit groups, then CM2 to CM5 across them.

## Simulation

The testbenches are self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops. Each also has a watchdog
that counts a failure and stops the run if the test hangs. Example with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module tb_hppa64 rtl/hppa_pkg.sv tb/tb_hppa64.sv
./obj_dir/Vtb_hppa64
```

| testbench | what it checks |
|-----------|----------------|
| `tb_hppa64` | The full adder at its default sizes. Directed corners: carry through all 64 bits, a carry into every group boundary, carry out of every bit. Then 20,000 random pairs, a quarter of them with long propagate runs. The checks: <ul><li>the result against a 65-bit integer sum and a bit-level ripple model;</li><li>zero latency;</li><li>that every group above the lowest took both its carry-in-1 and its carry-in-0 sum;</li><li>that a carry passed through a fully propagating group;</li><li>that sub-group carries and a word carry-out occurred.</li></ul> |
| `tb_hppa64_gks4` | The same test with 4-bit groups. |
| `tb_hppa_top_level` | Random group G/P and arbitrary candidate sums, for 8-bit and 4-bit groups. Checks which sum each group takes and `cout`. |
| `tb_group_ppa` | All 65,536 operand pairs of an 8-bit group, with and without the carry adder, and all pairs of a 4-bit group. Checks both sums, group G and group P. |
| `tb_gks_tree` | Four tree shapes: 4 columns with and without carry-in (every input pattern), 8 columns starting at CM3, and 16 columns with carry-in starting at CM2. Compared with a ripple of `c = g \| p & c`. |
| `tb_rca`, `tb_black_node`, `tb_grey_node`, `tb_pg_pre` | The small cells, exhaustively, in both polarities where they have two. |

## Design decisions and departures

* **No carry-in, but a carry-out.** The adder has no carry into bit 0.
  The lowest group therefore uses only the non-carry adder and needs no
  multiplexer. A carry-in would need a carry-in tree at the top level and
  a multiplexer for the lowest group; that is not built. `cout` is the G
  of all groups.
* **Top-level CM3 row.** Because there is no carry-in, the top-level tree
  has a buffer at group 7:0, a grey node at 15:8 and black nodes above.
  A version with a carry-in would combine the carry-in at 7:0 in CM3.
* **Propagate is `a ^ b`.** The XOR form serves both the carry tree and
  the sums. The inclusive-OR form `a | b` would also give correct carries,
  but not the sums.
* **Buffers invert.** This keeps the alternating polarity in every
  column (see above).
* **Group propagate of the lowest group** is not formed (reads 0). Nothing
  reads it.
* **Multiplexers** are plain `? :` selects.

## Not covered by this RTL

The adder was designed for a custom-circuit implementation:
* dynamic domino gates for the bit G/P;
* pass-transistor multiplexers;
* skewed static CMOS for the rest;
* a 0.13 um layout of roughly 635 um x 40 um.

Its reported worst-case delay is about 0.6 to 0.7 ns at 1.2 V. None of
that is captured here. The RTL fixes the logic structure (tree shape,
node kinds, signal polarity). Delay, power and area depend on the circuit
style and the layout.
