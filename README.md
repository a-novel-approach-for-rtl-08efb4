# Parallel-prefix adders: Kogge-Stone, sparse Kogge-Stone and spanning-tree CLA

A ripple-carry adder is slow because the carry of bit *i* waits for every
bit below it. A parallel-prefix adder removes that wait by treating carry
computation as a prefix problem: each bit contributes a pair
(generate, propagate), pairs are merged by an associative operator, and so
they can be merged in a tree of depth log2(N) instead of a chain of
length N. This repository holds three 16-bit adders built on that idea, in
synthesizable SystemVerilog:

| adder | carry network | sum | outputs |
|---|---|---|---|
| Kogge-Stone (`ks_adder`) | full Kogge-Stone tree, a carry for every bit | XOR of temporary sum and carry | `sum[15:0]`, `cout` |
| sparse Kogge-Stone (`sparse_ks_adder`) | Kogge-Stone network thinned to every 4th carry | four 4-bit ripple adders | `s[15:0]`, carry of every bit `c[15:0]` |
| spanning-tree CLA (`stcla_adder`) | small lookahead tree giving c4, c8, c12 | four 4-bit ripple adders | `sum[15:0]`, carry of every bit `c[15:0]` |

The two hybrids trade a few levels of prefix logic for a short ripple at
the end. That suits FPGAs, which have a dedicated fast ripple-carry chain.
All three are purely combinational: no clock, no reset and no state.
`prefix_adders_top` places them side by side, each with its own ports.

## The prefix formulation

Each bit *i* has a generate and a propagate:

    g_i = a_i & b_i        p_i = a_i ^ b_i   (p_i is also the temporary sum t_i)

A group of adjacent bits (i:k) generates a carry if its upper part
generates one, or if its upper part propagates a carry that its lower part
generates. Merging an upper group L with the adjacent lower group R is the
*fundamental carry operator*:

    (g_L, p_L) o (g_R, p_R) = (g_L | p_L & g_R,  p_L & p_R)

The carry-in is handled as an extra bit -1 with `g_-1 = cin`, `p_-1 = 0`.
The generate of the group (i-1 : -1) is then exactly the carry into bit
*i*, and the sum is `s_i = t_i ^ c_i`. Because the operator is associative,
`((x o y) o z)` and `(x o (y o z))` agree, so the merges may be arranged in
any tree. The choice of tree is what separates the adder families.

Two cells implement the operator:

* **black cell** (`black_cell`) computes the full pair (g, p);
* **gray cell** (`gray_cell`) computes only g. It is used where the lower
  group already reaches bit -1. There the result is a finished carry, and
  its propagate (always 0) is never needed.

## Kogge-Stone tree

`ks_prefix_tree` is the core of `ks_adder`. With WIDTH = 16 it has 16
columns. Column 0 is the carry-in (bit -1) and column *j* is bit *j*-1, so
the columns cover bits 14 down to -1. It has four levels. At level *l*,
every column *j* merges with column *j* - 2^(l-1):

| level | span | column *j* merges with | example group formed |
|---|---|---|---|
| 1 | 1 | *j*-1 | (7:6) = (7:7) o (6:6) |
| 2 | 2 | *j*-2 | (11:8) = (11:10) o (9:8) |
| 3 | 4 | *j*-4 | (14:7) = (14:11) o (10:7) |
| 4 | 8 | *j*-8 | (7:-1) = (7:0) o (-1:-1) |

The cell chosen for a column depends on where its lower partner ends:

* if the column already reaches bit -1 (*j* < 2^(l-1)), it passes straight
  down;
* if only its partner reaches bit -1 (2^(l-1) <= *j* < 2^l), it uses a
  gray cell and becomes a carry;
* otherwise it uses a black cell.

At 16 columns that gives gray cells at (0:-1) on level 1; at (2:-1) and
(1:-1) on level 2; at (6:-1) to (3:-1) on level 3; and at (14:-1) to
(7:-1) on level 4. Each cell output feeds at most two cells on the next
level. After level 4, column *j* holds the carry into bit *j*, and
`c[0] = cin`.

Bit 15 has no column. Its carry out is formed after the tree by one more
gray cell: `cout = g_15 | p_15 & c_15`. So the critical path of `ks_adder`
is one XOR, four cell levels and a final XOR (or gray cell for `cout`).

The tree works for any WIDTH >= 2. It runs ceil(log2(WIDTH)) levels, and
`ks_adder #(.WIDTH(N))` is an N-bit adder. The testbench also runs it at 8
bits.

## Sparse Kogge-Stone adder

`sparse_ks_carry` computes only the carries into bits 4, 8 and 12. The
remaining carries come from the 4-bit ripple adders (`rca`) that follow.
It works in two steps:

1. Each of the lower three 4-bit slices is reduced to one group pair by
   `group_pg`, a binary tree of black cells: pairs (1:0), (3:2), then (3:0).
2. These slice pairs go through a 4-column Kogge-Stone tree. Column 0 is
   the carry-in and the tree has two levels. It yields the carries into
   slices 1, 2 and 3.

Slice 0 is started by `cin`. The carry out of every bit comes from the
ripple adders, and `c[15]` is the adder's carry out. This split into slice
reduction plus a tree over the slices is one reading of "a Kogge-Stone
network thinned to every fourth carry". It produces the same carries as
keeping every fourth column of the full tree. `WIDTH` and `SPARSITY` are
parameters; WIDTH must be a multiple of SPARSITY of at least 2 slices, and
SPARSITY a power of two.

## Spanning-tree carry-lookahead adder

`stcla_carry` follows a fixed 16-bit drawing. Bits are numbered 1..16 there;
in the RTL, bit 1 is index 0.

* Twelve bit cells (gp1..gp12) form g and p for bits 1..12.
* A binary tree of GP cells forms the groups (4:1), (8:5) and (12:9).
  The sparse adder uses the same `group_pg`.
* One more cell, GP10, merges (12:9) with (8:5) into (12:5).
* Three carry cells (gray cells) finish:

      c4  = G(4:1)  | P(4:1)  & cin
      c8  = G(8:5)  | P(8:5)  & c4
      c12 = G(12:5) | P(12:5) & c4

Both c8 and c12 hang off c4, so they are found in parallel. That is the
"spanning tree": the 8:5 group is shared by c8 and by the 12:5 group.
`stcla_adder` then feeds cin, c4, c8 and c12 into four 4-bit ripple adders
(FA1-FA4, FA5-FA8, FA9-FA12, FA13-FA16). Bits 13-16 need no lookahead. This
adder has no width parameter.

## Port conventions

* Operands are unsigned 16-bit vectors, bit 0 least significant. They also
  add two's-complement numbers: -1 + -1 gives sum 0xFFFE.
* `ks_adder` gives one carry out. The two hybrids give instead the carry
  out of **every** bit: `c[i]` is the carry out of bit *i*, and `c[15]` is
  the carry out. For 5 + 6 that vector is 4 (only bit 2 carries); for
  7 + 6 it is 6.
* Pin counts: 16+16+1 in and 16+1 out for Kogge-Stone (50); 16+16+1 in and
  16+16 out for each hybrid (65).

## Module hierarchy

```
prefix_adders_top
├── ks_adder          pg_precompute, ks_prefix_tree (black_cell, gray_cell), gray_cell
├── sparse_ks_adder   pg_precompute, sparse_ks_carry (group_pg, ks_prefix_tree), rca x4 (full_adder)
└── stcla_adder       stcla_carry (pg_precompute, group_pg, black_cell, gray_cell x3), rca x4
```

`adder_pkg` holds the two shared sizes: a 16-bit adder width and a 4-bit
ripple slice.

## How far the RTL follows the published design, and where it departs

Taken from the published design:

* the carry operator and its black and gray cells;
* the Kogge-Stone tree cell by cell: columns, levels, spans and the
  gray/black placement;
* the sum and carry-out equations;
* the 16-bit width and the 4-bit ripple slices;
* the spanning-tree network's cells: gp1..gp12, the GP tree, GP10 and the
  three carry cells;
* the port names and widths.

Choices made here:

* `p = a ^ b`, so that the propagate doubles as the temporary sum. An OR
  propagate would also give correct carries.
* The internal structure of the sparse Kogge-Stone network (see above).
* The exact equations of the spanning-tree carry cells: c12 is formed from
  GP10's (12:5) group and c4.
* Generalisation of the Kogge-Stone adder and of the sparse Kogge-Stone
  adder to other widths.
* Putting the three adders side by side in one top with separate ports.

Not built: the ripple-carry and carry-skip adders that the published design
is compared against. The FPGA resource and power figures are properties of
a particular FPGA flow and cannot be reproduced from RTL.

## Verification

Each module except the small helper `group_pg` has a self-checking
testbench in `tb/`, named `tb_<module>`; `group_pg` is covered through the
two adders that use it.
Results are compared against integer addition or against a serial carry
recurrence, never against another adder of the set:

* The cells are checked exhaustively, and so are the 4-bit ripple slice
  and an 8-bit Kogge-Stone adder (2^17 inputs).
* The 16-bit blocks get corner cases and 3000-5000 random vectors each.
  The corner cases include a carry rippling from cin through all 16 bits,
  and a carry crossing each 4-bit slice boundary.
* `tb_ks_prefix_tree` also probes internal tree nodes (7:6), (11:8),
  (14:7) and (7:-1) against a reference group computation.
* `tb_prefix_adders_top` runs all three adders at full size. It replays
  the example additions (5+15, 7+15, 5+6, 7+6, 5+7, 6+7, -1+-1) with their
  expected sums and carry vectors. It counts that each mechanism occurred:
  a carry out, a full-length ripple and a lookahead carry into each slice.

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with
Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/adder_pkg.sv \
    tb/tb_prefix_adders_top.sv --top-module tb_prefix_adders_top
./obj_dir/Vtb_prefix_adders_top
```

Replace the testbench name to run any other. `verilator --lint-only -Wall` reports
no errors. It leaves two kinds of notes: a tree propagate output at the last
level that nothing reads, and package sizes that a given module does not use.
