# Diminished-1 squarer modulo 2^n + 1

Residue number systems often use the modulus 2^n + 1, and exponentiators built from
square-and-multiply need squaring modulo 2^n + 1 as well. The trouble with this modulus
is that its residues, 0 to 2^n, need n + 1 bits. The diminished-1 code avoids that. A
nonzero residue A is stored as A - 1, which fits in n bits. Zero gets a separate flag
bit, and arithmetic on a zero operand is skipped.

This RTL is a dedicated squarer for that code. It does not use a general modulo
2^n + 1 multiplier. Instead it exploits the symmetry of a square: each cross product
a_i a_j appears twice, so the number of partial-product bits drops by about half. It
also folds every weight of 2^n or more back into the n-bit range, so that the
partial products can be reduced with plain full adders. What comes out is a
carry-save array of full adders followed by one diminished-1 adder. The array is
regular and can be pipelined at any full-adder level.

The design is parameterised by the word length `N` (n). The default is `N = 7`
(modulus 129). It has been simulated for every n from 2 to 13 and for 16, 20, 24, 28
and 32.

## The arithmetic

Write the operand as A_-1 = A - 1 = a_(n-1) ... a_0. Because (A_-1 + 1)^2 =
A_-1^2 + 2 A_-1 + 1, the diminished-1 square is

    Q_-1 = | A_-1^2 + 2*A_-1 |  mod (2^n + 1)

It needs only n-bit quantities. Three identities do all the work:

* **Moving a bit around.** Modulo 2^n + 1, 2^n = -1. So a bit b of weight 2^(n+k)
  is worth -b*2^k, and -b = 2^n + ~b. The bit is therefore placed at column k
  *complemented*, and a constant 2^n*2^k is left over as a "correction".
* **Folding pairs.** a_i a_j (i != j) occurs twice in a column of weight 2^(i+j).
  The pair is replaced by one bit in the next column, 2^(i+j+1). a_i a_i is simply
  a_i. A pair that leaves the top column is complemented into column 0, as above.
* **End-around carries.** A full adder in column n-1 produces a carry of weight
  2^n. It is complemented and fed into column 0, which leaves one more 2^n
  correction.

All the constants left over add up to exactly 1 modulo 2^n + 1:

* the moved product bits give 2^n (2^n - n - 1);
* the folded top-column pairs give 2^n floor(n/2);
* the moved top bit of 2 A_-1 gives 2^n;
* the carries wrapped by the reduction tree give 2^n ceil(n/2).

The total is 2^n * 2^n = 2^(2n), which is 1 modulo 2^n + 1. A diminished-1 adder
computes |x + y + 1| by its nature. It therefore absorbs this +1, and no correction
hardware is needed. This holds only if the tree wraps exactly ceil(n/2) carries,
which is why the matrix contains an all-zero row (see below).

### The matrix for n = 7

After folding, the squarer's operands are these rows (bit 6 on the left, `~` is
complement):

| row | 2^6 | 2^5 | 2^4 | 2^3 | 2^2 | 2^1 | 2^0 |
|---|---|---|---|---|---|---|---|
| pairs | a5a0 | ~a6a5 | ~a6a4 | ~a6a3 | ~a6a2 | ~a6a1 | ~a6a0 |
| pairs | a4a1 | a4a0 | a3a0 | ~a5a4 | ~a5a3 | ~a5a2 | ~a5a1 |
| pairs | a3a2 | a3a1 | a2a1 | a2a0 | a1a0 | ~a4a3 | ~a4a2 |
| diagonal | a3 | ~a6 | a2 | ~a5 | a1 | ~a4 | a0 |
| 2*A_-1 | a5 | a4 | a3 | a2 | a1 | a0 | ~a6 |
| correction | 0 | 0 | 0 | 0 | 0 | 0 | 0 |

(`~a6a5` means the complement of the product a6·a5.) The RTL builds the same
column contents, though not necessarily in the same order within the pair rows.

For odd n every column holds (n+1)/2 + 2 bits. For even n the columns are uneven.
Even columns hold n/2 + 4 bits and odd columns hold n/2 + 1. One full adder per even
column, with its carry going into the odd column above, evens them out to n/2 + 2
bits per column.

### Why the all-zero row matters

A tree of 3:2 carry-save stages turns K operands into 2. Each stage removes one
operand and wraps one carry, so the tree always wraps exactly K - 2 carries. The
zero row brings K up to (n+1)/2 + 2 for odd n, or n/2 + 2 for even n. That makes
K - 2 equal to the number of wrapped carries the correction total assumes. If the
zero row were dropped, the result would be off by one. The stage that receives the
zero row behaves as a row of half adders, and synthesis removes the constant.

## Blocks

```
 a[N:0] ─┬─> sq_pp_gen ──K rows──> dim1_csa_tree ──sum0,sum1──> dim1_adder ─┐
         │   (AND/NAND, fold,      (Dadda-ordered tree of        (|x+y+1|,    │
         │    2A row, zero row)     dim1_csa stages)             prefix)      v
         └──────────── a[N] (zero operand) ─────────────────────────────> override ─> q[N:0]
```

| file | what it is |
|---|---|
| `rtl/dim1_sq_pkg.sv` | elaboration-time functions: the row count K, the contents of every matrix column, the Dadda heights and tree levels |
| `rtl/sq_pp_gen.sv` | partial-product matrix, including the even-n full-adder column stage |
| `rtl/dim1_csa.sv` | one n-bit carry-save stage with a complemented end-around carry |
| `rtl/dim1_csa_tree.sv` | the reduction tree, K operands to 2 |
| `rtl/dim1_adder.sv` | diminished-1 adder modulo 2^n + 1, parallel-prefix |
| `rtl/dim1_squarer.sv` | top level |

### Interface of `dim1_squarer`

| port | width | meaning |
|---|---|---|
| `a` | N+1 | `a[N] = 1`: the operand is zero (the other bits are ignored). Otherwise `a[N-1:0]` = A - 1. |
| `q` | N+1 | the square in the same code: `q[N] = 1` with all other bits 0 means zero, otherwise `q[N-1:0]` = Q - 1 |

The block is purely combinational. Its depth is one AND/NAND level, then D(K)
carry-save levels (one more for even n), then the prefix adder.

### Reduction tree

`dim1_csa_tree` is a Dadda tree built from whole n-bit carry-save stages. Each level
takes the operand count down to the next lower Dadda height (…, 13, 9, 6, 4, 3, 2),
using only as many stages as that needs. It therefore has the Dadda depth:

| operands K | levels |
|---|---|
| 4 | 2 |
| 5-6 | 3 |
| 7-9 | 4 |
| 10-13 | 5 |
| 14-19 | 6 |

For n = 7 (K = 6) the tree works like this:

1. One stage on the three pair rows, and one on diagonal + 2A + zero.
2. One stage on three of the four vectors left.
3. One final stage.

That gives four wrapped carries in total.

### Final adder

`dim1_adder` returns |x + y + 1| modulo 2^n + 1. With x + y = cout*2^n + r, the
result is r + ~cout. The generate and propagate signals go through a Kogge-Stone
prefix network. The group generate of all bits is cout. One more level then feeds
~cout in as the carry into every bit. If x + y = 2^n - 1, the result is 2^n, which
is the code for zero. In that case the low bits are 0 and the `zero` output is set.

## Where this RTL departs from, or goes beyond, the original design

* **Tree granularity.** The original specifies a bit-level Dadda tree. Here the
  tree is built from whole n-bit stages. It has the same depth and, for n = 7, the
  same stage arrangement. Bit-level savings that depend on the operand pattern are
  left to synthesis. One example is the column of weight 2^2 for n = 7, where two
  inputs are both a1.
* **Final adder.** The original takes its diminished-1 adder from prior work, which
  merges the carry-in into the prefix levels. This RTL uses a plainer prefix adder
  with one extra level, which computes the same function. Its gate count and delay
  are therefore not the published ones.
* **Even n.** The full adder in each even column takes the first three bits of that
  column. The original does not say which bits.
* **Zero handling.** A zero operand (flag bit set) forces a zero result. A zero
  square of a nonzero operand is reported through bit n. That case only occurs when
  2^n + 1 has a repeated prime factor, for example n = 3, 9 or 10. The original only
  says that operations on a zero operand are skipped.
* **No pipeline registers.** The array can be cut between any two carry-save
  levels, and between the tree and the adder. This RTL is combinational.
* **No converters.** Converters between binary and diminished-1 code are not
  included.

## Verification

Each testbench checks its block against wide-integer arithmetic and prints
`TB_RESULT checks=<n> failures=<n>`:

| testbench | what it checks |
|---|---|
| `tb/tb_dim1_squarer.sv` | Top, for n = 2…13, 16, 20, 24, 28 and 32: exhaustive up to n = 16, 4000 random operands above that. It also requires each of these to occur at least once: a zero operand, a zero square, both values of the final end-around carry, odd n and even n. |
| `tb/tb_dim1_squarer_full.sv` | The default build (n = 7): all 256 input codes. |
| `tb/tb_sq_pp_gen.sv` | n = 4, 7 and 8, every operand: the row sum plus (K - 2) + 1 must equal A_-1^2 + 2 A_-1 modulo 2^n + 1. For n = 7 it also compares the diagonal, 2A and zero rows bit by bit. |
| `tb/tb_dim1_csa.sv` | Bit-exact against a full-adder model. Also checks that \|s + c\| = \|x + y + z + 1\|. |
| `tb/tb_dim1_csa_tree.sv` | The modular sum identity for several (n, K). Also compares the level count with the Dadda depths for K = 3…94. |
| `tb/tb_dim1_adder.sv` | Exhaustive for n = 5 and 7, random for n = 16 and 32. Must hit at least one zero result. |

`tb/tb_ref_pkg.sv` holds the reference functions.

To run one with Verilator, for example:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_dim1_squarer \
  rtl/dim1_sq_pkg.sv tb/tb_ref_pkg.sv rtl/dim1_csa.sv rtl/dim1_csa_tree.sv \
  rtl/sq_pp_gen.sv rtl/dim1_adder.sv rtl/dim1_squarer.sv tb/tb_dim1_squarer.sv
./obj_dir/Vtb_dim1_squarer
```

Every testbench finishes in well under a second. To build a different word length,
set `N` on `dim1_squarer`. All the internal sizes follow from it. The package
functions assume n < 256, and the testbench reference handles n up to 40.
