# 8x8 Wallace tree multiplier with 7:2 compressors

A multiplier spends most of its area and delay adding up partial products.
An 8x8 multiplier forms 64 partial-product bits; bit `b[i] & a[j]` has weight
2^(i+j), so the bits stand in 15 columns of heights 1, 2, ..., 8, ..., 2, 1.
A Wallace tree multiplier (WTM) reduces those columns in parallel until two
rows are left, then adds the two rows with one carry-propagate adder.

The usual reducing cell is the full adder (a 3:2 compressor: three bits in, a
sum and a carry out). This design uses a wider cell, the **7:2 compressor**,
which swallows a whole column of up to seven bits in one step, so the tree
needs only one compression step after a small pre-reduction. The design is
purely combinational and multiplies unsigned or two's complement 8-bit
operands into a 16-bit product.

## The cells

**3:2 compressor (`compressor_3to2`).** A full adder in XOR/XOR/MUX form:
`t = a ^ b`, `sum = t ^ c`, `carry = t ? c : a`. When `a` and `b` differ the
carry is `c`; when they agree it is their common value. This equals the
majority `ab + bc + ca`.

**Half adder (`half_adder`).** `sum = a ^ b`, `carry = a & b`.

**7:2 compressor (`compressor_7to2`).** Inputs: seven bits `x[6:0]` of one
column and four carry-ins `cin[3:0]` from the compressor one column lower.
Outputs: `sum` (this column's weight), `carry` and four carry-outs `cout[3:0]`
(next column's weight). It is a chain of five full adders:

```
FA0: x0, x1, x2        -> s0,  cout[0]
FA1: cin[0], s0, x3    -> s1,  cout[1]
FA2: cin[1], s1, x4    -> s2,  cout[2]
FA3: cin[2], s2, x5    -> s3,  cout[3]
FA4: cin[3], s3, x6    -> sum, carry
```

It keeps the bit count exactly:
`popcount(x) + popcount(cin) == sum + 2*(carry + popcount(cout))`.
Carry-out `k` depends only on carry-ins `0..k-1`. Compressors can therefore be
chained column to column (`cout` of column w into `cin` of column w+1)
without a combinational loop, and the carry path across columns stays a few
adders deep instead of rippling across the whole row.

## The column plan (`wtm8_7to2`)

This is the part to read carefully. Columns are named by bit weight
`w = 0..15`. Column heights of the raw partial products are
`1 2 3 4 5 6 7 8 7 6 5 4 3 2 1` for w = 0..14.

**Step 1, pre-reduction.** A 7:2 compressor takes at most seven column bits,
so the two columns that would be too tall are trimmed by half adders:

* w=7 (8 bits): two bits go to a half adder. Its sum stays in w=7 (now
  7 bits), its carry moves to w=8.
* w=8 (7 bits + that carry): two bits go to a half adder. Its sum stays in
  w=8 (now 7 bits), its carry moves to w=9 (now 7 bits).

After step 1 no column is taller than seven bits.

**Step 2, compression.**

| column | cell | result |
|---|---|---|
| w=0 | none | the single bit is P0 |
| w=1 | half adder | sum is P1, carry goes to w=2 |
| w=2 | full adder on the 3 bits, then a half adder adding its sum and the w=1 carry | sum is P2; the full-adder carry is `cin[0]` of the w=3 compressor; the half-adder carry goes to the final adder at w=3 |
| w=3..15 | one 7:2 compressor per column, unused `x` tied to 0 | `sum` and `carry` go to the final adder; `cout` goes to the next column's `cin` |

The w=3 compressor has carry-ins `{0, 0, 0, carry of the w=2 full adder}`.
The compressor row runs up to w=15, even though columns w=12..14 hold only
3, 2 and 1 partial products and w=15 holds none. Each compressor passes up to
four carry-outs to the column above, so those columns must absorb them; with
their unused inputs at 0, the cells at w=12 and w=13 begin with a full adder
and a half adder on the column's own bits.

**Step 3, final addition (`ripple_adder`, 13 bits).** Column w (3..15) now
holds two bits: the compressor sum of w, and the compressor carry of w-1. At
w=3 the second bit is the carry of the w=2 half adder instead. A half adder
at w=3 and full adders at w=4..15, with the carry rippling upward, produce
P3..P15.

An 8x8 product fits in 16 bits, so the carries that leave column 15 are
always zero. They are left unconnected, and an immediate assertion in
`wtm8_7to2` checks them.

## Signed operands (`wtm_mult8`, the top)

`wtm_mult8` wraps the unsigned tree. With `is_signed = 1`, a negative operand
is replaced by its magnitude; 8 bits hold every magnitude, including 128. The
tree multiplies the magnitudes, and the 16-bit product is negated when
exactly one operand was negative. With `is_signed = 0` everything passes
through unchanged. The tree and its partial-product array are therefore the
same in both modes.

| port | dir | width | meaning |
|---|---|---|---|
| `a` | in | 8 | multiplicand |
| `b` | in | 8 | multiplier |
| `is_signed` | in | 1 | 1: operands and product are two's complement |
| `p` | out | 16 | product |

There is no clock, register or reset. `p` settles one combinational delay
after the inputs change. The longest path runs through the operand negation,
the tree, the 13-bit ripple adder and the result negation.

## Files

| file | content |
|---|---|
| `rtl/wtm_pkg.sv` | constants: N = 8, product width 16, compressor sizes 7 and 4, operand/product types |
| `rtl/half_adder.sv` | half adder |
| `rtl/compressor_3to2.sv` | XOR/MUX full adder |
| `rtl/compressor_7to2.sv` | 7:2 compressor (five chained full adders) |
| `rtl/pp_gen.sv` | N x N AND array, `pp[i][j] = b[i] & a[j]` |
| `rtl/ripple_adder.sv` | W-bit ripple-carry adder (half adder + full adders) |
| `rtl/wtm8_7to2.sv` | unsigned 8x8 tree: steps 1-3 above |
| `rtl/wtm_mult8.sv` | top: signed/unsigned wrapper |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each also has a watchdog that counts a failure if the run stalls.
For example:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  rtl/wtm_pkg.sv tb/tb_wtm_mult8.sv -y rtl --top-module tb_wtm_mult8
./obj_dir/Vtb_wtm_mult8
```

Replace `tb_wtm_mult8` with any other testbench name. What the tests cover:

* `tb_half_adder`, `tb_compressor_3to2`: all input patterns.
* `tb_compressor_7to2`: all 2^11 input patterns. It checks the bit count and
  that `cout[k]` does not depend on `cin[k..3]`.
* `tb_pp_gen`: all 65536 operand pairs, every bit and the weighted sum.
* `tb_ripple_adder`: corner cases plus 20000 random pairs at W = 13.
* `tb_wtm8_7to2`: all 65536 unsigned products.
* `tb_wtm_mult8`: all 65536 pairs in both modes, at the default size. It
  also counts how often each mechanism fires: the pre-reduction carries, the
  w=1/w=2 carries, each of the four carry-out positions, a compressor carry,
  the top product bit, and operand and result negation. A mechanism that
  never fires counts as a failure.

Every run takes well under a second.

## Where this design fills gaps or departs from the published scheme

The published description of this multiplier is brief, and its dot diagram
does not add up in a few places. These are the choices made here:

* **Inside of the 7:2 compressor.** The published drawing shows the first
  three full adders of the chain, with five inputs and two carry-ins. The
  chain is continued here in the same pattern to seven inputs and four
  carry-ins / carry-outs. The multiplexer input order in the 3:2 cell is also
  this design's choice.
* **Column 2 carry.** The published plan sends the half-adder carry of w=1 and
  the full-adder carry of w=2 both into the w=3 compressor. The w=1 carry
  belongs to w=2, so here a second half adder adds it in column w=2.
* **Upper columns.** The published plan uses compressors up to w=11 and plain
  adders at w=12 and w=13, and takes P15 as the final adder's carry-out. That
  would lose the carry-outs arriving from the compressor below. Here the
  compressor row continues to w=15, and P15 is the sum of the final adder's
  top cell.
* **Signed multiplication.** It is called for, but no method is given. The
  sign-magnitude wrapper is this design's choice. A Baugh-Wooley array would
  be the usual alternative; it would change the column heights of step 1.
* **Sizes are fixed.** The column plan is worked out for 8x8 only. `N` is a
  package constant rather than a module parameter. `pp_gen` and
  `ripple_adder` are generic, but the tree is not.
* **No timing or area results are reproduced.** The design makes no claims
  about delay, power or FPGA resources.
