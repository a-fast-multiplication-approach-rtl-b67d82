# Tree-based N x N multiplier

An unsigned combinational multiplier organised as a tree of nodes. The
operand bits sit at the top of the tree, every pair of bits meets in an AND
gate one level down, and the resulting partial products are added along the
diagonals of the partial product grid. Each diagonal becomes one bit of the
product. The default size is 4 x 4. Any N >= 1 elaborates, and 8, 16, 32
and 64 bits are simulated.

## The tree

The structure has five layers, read from the top:

| Layer | Nodes | Hardware |
|-------|-------|----------|
| 1 | root node | none; it joins the multiplicand nodes |
| 2 | N multiplicand nodes, `A[N-1]` left-most, `A[0]` right-most | the input bits `a[i]` |
| 3 | N multiplier nodes under each multiplicand node, `B[N-1]` .. `B[0]` | copies (fan-out) of `b[j]` |
| 4 | N*N partial product nodes `P[i][j]` | one AND gate each: `P[i][j] = a[i] & b[j]` |
| 5 | 2N-1 partial product addition nodes, `M[2N-2]` .. `M[0]` | one adder node per diagonal |

Layers 1 to 3 only distribute bits. In the RTL they are the wiring that
carries `a[i]` and `b[j]` into `tree_ppn_array`. Step 1 of a multiplication
is the AND layer. Step 2 is the addition layer.

## Diagonals and the addition nodes

Partial product `P[i][j]` has weight 2^(i+j). All nodes with the same
`k = i + j` lie on one diagonal of the grid and have the same weight.
Diagonal `k` holds `k+1` nodes for `k < N` and `2N-1-k` nodes otherwise.
For 4 x 4 the diagonal sizes are 1, 2, 3, 4, 3, 2, 1.

Each diagonal has one addition node (`tree_ppan_node`). The node counts the
ones on its diagonal and adds the carry from the node on its right. Bit 0 of
this total is product bit `M[k]`. The rest of the total goes as a carry to
the node on its left. The chain starts at the right-most diagonal,
`k = 0`, which holds only `P[0][0]`, so `M[0] = a[0] & b[0]`. The carry out of
the left-most diagonal, `k = 2N-2`, is the top product bit `M[2N-1]`.

The carry is what makes the scheme correct whenever a diagonal holds more than
one 1. Worked example, 0110 x 1110 (6 x 14):

| diagonal k | 6 | 5 | 4 | 3 | 2 | 1 | 0 |
|---|---|---|---|---|---|---|---|
| ones on the diagonal | 0 | 1 | 2 | 2 | 1 | 0 | 0 |
| carry in | 1 | 1 | 1 | 0 | 0 | 0 | 0 |
| total | 1 | 2 | 3 | 2 | 1 | 0 | 0 |
| `M[k]` | 1 | 0 | 1 | 0 | 1 | 0 | 0 |

The final carry is 0, so `M[7] = 0` and `M[7:0] = 0101_0100 = 84`. The carry never exceeds N-1, so a
node's total fits in `$clog2(2N)` bits (`tree_mult_pkg::carry_width`).

Two nodes count as "diagonal" here when `i + j` is equal. They do not
count as diagonal merely because `|i-k| = |j-l|`: that rule would also pair
`P[0][0]` with `P[1][1]`, which have different weights.

## Timing and depth

There is no clock, no register and no handshake. The product is valid once
the operands have passed through one AND level and the addition chain. The
testbenches check the product in the same cycle the operands are applied.

The method counts its cost in abstract steps, 2·log2(N) − 2: 2 steps for
4 x 4, 4 for 8 x 8, 6 for 16 x 16, 8 for 32 x 32 and 10 for 64 x 64. That
count does not include carry propagation between diagonals. In this RTL the
carry goes through all 2N-1 addition nodes in series, so the logic depth
grows linearly with N. Each node also contains a bit count of up to N
inputs. This design does not model or claim the logarithmic step count. A
faster final stage, such as a carry-save tree followed by a prefix adder,
would change the addition layer. It is not part of this design.

## Modules

| File | Module | Role |
|------|--------|------|
| `rtl/tree_mult_pkg.sv` | package | diagonal length, first index on a diagonal, carry width |
| `rtl/tree_ppn_array.sv` | `tree_ppn_array #(N)` | layers 1-4: `pp[i][j] = a[i] & b[j]` |
| `rtl/tree_ppan_node.sv` | `tree_ppan_node #(NB, CW)` | one addition node: `{cout, m} = cin + popcount(diag)` |
| `rtl/tree_diagonal_adder.sv` | `tree_diagonal_adder #(N)` | layer 5: groups `pp` by diagonal, chains 2N-1 nodes |
| `rtl/tree_multiplier.sv` | `tree_multiplier #(N)` | top: `m = a * b` |

Top-level ports of `tree_multiplier`:

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `a` | in | N | multiplicand |
| `b` | in | N | multiplier |
| `m` | out | 2N | product |

`tree_diagonal_adder` computes the weighted sum of any N x N grid,
sum of `pp[i][j]·2^(i+j)`, not only grids that come from two operands. Its
testbench relies on this.

## What follows the method and what is this design's own

The method specifies these parts:
- the five-layer tree and the node ordering, most significant bit left;
- the AND gates forming the partial products;
- grouping the partial products by diagonal;
- adding the diagonals starting from the right;
- reading the product from the addition nodes.

These are this design's own choices:
- The operands are unsigned. The method speaks only of integer multiplication, and all its examples are unsigned.
- Carries pass between addition nodes. The method says only that the diagonal partial products are added, but its 4 x 4 example result requires the carries.
- The internal structure of an addition node is a bit count plus an adder.
- The product is 2N bits wide. The method draws 2N-1 addition nodes, and the extra bit holds the final carry.
- The design uses purely combinational timing, with no registers.
- Both operands have the same width. The method also shows a 3 x 2 example; here it is run with both operands zero-extended to 4 bits.

## Simulating

The testbenches in `tb/` check their own results. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops. Each has a watchdog that
counts a failure if the run does not finish.

| Testbench | Covers |
|-----------|--------|
| `tb_tree_ppn_array` | all 4-bit operand pairs and random 6-bit pairs, every `P[i][j]` |
| `tb_tree_ppan_node` | every diagonal/carry-in combination for a 4-input and a 1-input node |
| `tb_tree_diagonal_adder` | all 2 x 2 grids, random 4 x 4 and 5 x 5 grids, all-ones and one-hot grids |
| `tb_tree_multiplier` | default N = 4: 101 x 10 = 1010 and 0110 x 1110 = 1010100 bit by bit, then all 256 pairs. It also counts four mechanisms: diagonals holding two or more ones, carries into a node, products reaching the top bit, and zero operands. A mechanism that never occurs counts as a failure. |
| `tb_tree_multiplier_sizes` | N = 8, 16, 32, 64 side by side: corner cases and 500 random pairs |

Example with plain Verilator:

```
verilator --binary --timing --assert rtl/tree_mult_pkg.sv rtl/tree_ppn_array.sv \
  rtl/tree_ppan_node.sv rtl/tree_diagonal_adder.sv rtl/tree_multiplier.sv \
  tb/tb_tree_multiplier.sv --top-module tb_tree_multiplier
./obj_dir/Vtb_tree_multiplier
```

To change the size, set `N` on `tree_multiplier`, for example
`tree_multiplier #(.N(16))`. No other change is needed. The carry width and
the diagonal grouping follow from `N`.

## Notes for synthesis

- In `tree_diagonal_adder`, `m[0]` is wired straight to `pp[0][0]`, because the right-most diagonal has one node and no carry in. Tools report it as an output driven directly by an input.
- The design holds no state, so it needs no reset.
- `tree_diagonal_adder` contains an immediate assertion that the carry left over after the last diagonal is 0 or 1. Enable it in simulation with `--assert`.
