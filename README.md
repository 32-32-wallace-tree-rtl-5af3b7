# 32×32 compressor-tree multiplier with a Sklansky final adder

An unsigned 32×32-bit multiplier, `p = a * b`. It is fully combinational. It
follows the usual three-part layout of a fast multiplier:

1. **Partial products.** An AND array forms 32 rows, `pp[j] = a & {32{b[j]}}`.
2. **Reduction.** A Wallace-style tree of *high-order compressors* reduces the
   32 rows to two. It uses 7:2, 6:2, 5:2, 4:2 and 3:2 compressors.
3. **Final addition.** A 64-bit Sklansky parallel-prefix adder adds the two rows.

The design's main idea is in step 2. A Wallace tree built from full adders
needs many layers to reduce 32 rows. Compressors that take 7 or 9 bits of a
column at once cut the number of layers. The *input partitioning* scheme then
keeps the first compressor of each chain from waiting on any carry.

## Compressors

Each compressor adds the bits of one column. Its outputs go to the same
column and to the next one or two columns. They all have the same property:
the carries they send sideways (`cout*`) depend only on the column's own data
bits and never on the carries coming in (`cin*`). So a row of compressors
side by side never ripples. A row costs the same delay as one compressor,
whatever the width.

| module    | adds                      | outputs and their weights                                   |
|-----------|---------------------------|-------------------------------------------------------------|
| `fa`      | a, b, c                   | `s` (1), `co` (2)                                           |
| `comp4_2` | x0..x3, cin               | `sum` (1), `carry` (2), `cout` (2)                          |
| `comp5_2` | y0..y4, cin1, cin2        | `sum` (1), `carry` (2), `cout1` (2), `cout2` (4)            |
| `comp6_2` | y0..y5, cin1, cin2        | `sum` (1), `carry` (2), `cout1` (2), `cout2` (4)            |
| `comp7_2` | y0..y6, cin1, cin2        | `sum` (1), `carry` (2), `cout1` (2), `cout2` (4)            |

Weight 2 means "column i+1" and weight 4 means "column i+2". In normal use,
`cin1` of column i is `cout1` of column i-1, and `cin2` is `cout2` of
column i-2.

### 6:2 and 7:2: internal carries built from full adders

The 6:2 compressor splits its six bits into two groups of three. It then
reduces the group carries with one more full adder:

```
CTEMP1 = maj(y0,y1,y2)                  s1 = y0^y1^y2
CTEMP2 = maj(y3,y4,y5)                  s2 = y3^y4^y5
CTEMP3 = s1 & s2                        X  = s1^s2       (= y0^..^y5)
cout1  = CTEMP1 ^ CTEMP2 ^ CTEMP3       cout2 = maj(CTEMP1, CTEMP2, CTEMP3)
sum    = X ^ cin1 ^ cin2                carry = (X^cin1) ? cin2 : X
```

The 7:2 compressor is the same, except that the two group sums and `y6` meet
in a full adder. Its carry is `CTEMP3 = maj(s1, s2, y6)` and its sum is `X`.
Altogether the 6:2 uses three full adders and the 7:2 uses four (`fa`
instances). The `carry` output is a multiplexer, not a majority gate. When
`X^cin1` is already known to be 1, the result is just `cin2`.

There is another way to build the internal carries, with multiplexers in
place of the third full adder. It has less fan-out but is slower, because its
carries wait on multiplexer outputs. It is not used here.

### 4:2 and 5:2

These lower-order compressors are standard circuits:

- **4:2.** `cout = maj(x0,x1,x2)`, `sum = x0^x1^x2^x3^cin`, and
  `carry = (x0^x1^x2^x3) ? cin : x3`.
- **5:2.** Built the same way as the 6:2, with a half adder in place of the
  second full adder: `CTEMP2 = y3&y4` and `CTEMP3 = (y0^y1^y2)&(y3^y4)`.
  This gives it the same two-carry interface as the 6:2 and 7:2, with one
  carry to column i+1 and one to column i+2.

## The reduction tree and input partitioning (`wallace_tree32`)

The tree works on whole rows, 64 bits wide. Partial-product row `j` is
placed at column `j`. A *compressor row* (`comp_row`, `fa_row`,
`comp4_2_row`) puts one compressor in every column. It returns its outputs
as rows that are already shifted to the columns they belong to.

**Input partitioning.** Each stage is split into *chains* of compressor rows.

- **Upper row.** The first row of a chain wires two extra partial-product
  rows to its `cin1`/`cin2` pins. So a 7:2 row there adds 9 bits of its own
  column, and a 5:2 row adds 7. It depends on no other column.
- **Lower rows.** Every row below takes `cin1`/`cin2` from the
  `cout1`/`cout2` of the row above. These come from columns i-1 and i-2.
  Those couts depend only on data bits, so the lower rows wait only one
  compressor's cout delay.
- **End of chain.** The couts of the last row of a chain have no row left to
  go to. They are passed on to the next stage as two more rows.

```
stage 1   32 -> 12 rows
          chain: 7:2 upper (pp rows 0-8) -> 7:2 (9-15) -> 7:2 (16-22) -> 6:2 (23-28)
                 outputs: 4 x (sum, carry) + cout1/cout2 of the 6:2 row = 10 rows
          3:2 row on pp rows 29-31                                    =  2 rows
stage 2   12 -> 6 rows
          chain: 5:2 upper (rows 0-6) -> 5:2 (rows 7-11)
                 outputs: 2 x (sum, carry) + cout1/cout2 of the last row
stage 3    6 -> 4 rows   two 3:2 rows
stage 4    4 -> 2 rows   one 4:2 row, cout(i) -> cin(i+1) inside the row
```

The rows are checked to obey `row_s + row_c = a*b (mod 2^64)`. A bit carried
past column 63 is dropped. That is exact, because the product always fits in
64 bits.

The partitioning and the compressor types come from the design. The number of
stages, and which rows feed which compressor, are this implementation's own
choice. They are a layout that uses every compressor type and brings the
32 rows down to 2.

## Final adder (`sklansky_adder`)

The adder is a W-bit Sklansky (divide-and-conquer) prefix adder, with W = 64
by default. It starts from the bit generate and propagate signals. Prefix
level `l` updates every bit `i` whose bit `l` is set. It combines that bit's
(G,P) with the pair at the top of the lower half of its 2^(l+1)-bit block:

```
G[i] |= P[i] & G[j];  P[i] &= P[j];   j = ((i >> l) << l) - 1
```

After log2(W) = 6 levels, `G[i]` is the carry out of bits `i..0`, and
`sum[i] = p[i] ^ G[i-1]`. The depth is minimal, at the cost of fan-out of up
to W/2 at the last level. A carry in is folded into `g[0]`. The multiplier
ties it to 0 and leaves `cout` unused, because `cout` is always 0 there.
W need not be a power of two.

## Interface and timing

```systemverilog
module wallace_mult32 (input logic [31:0] a, input logic [31:0] b,
                       output logic [63:0] p);
```

The multiplier has no clock, reset or handshake. `p` is valid one
combinational delay after `a` and `b` settle. To use it in a clocked design,
register the inputs and/or the output around it. Shared sizes and types
(`N = 32`, `W = 64`, `operand_t`, `product_t`, `pp_rows_t`) are in
`mult_pkg`.

Operands are unsigned. For signed operands, you would need Baugh-Wooley
correction rows or Booth recoding in `pp_gen`.

## Files

| file | contents |
|------|----------|
| `rtl/mult_pkg.sv` | sizes and types |
| `rtl/wallace_mult32.sv` | top: `pp_gen` → `wallace_tree32` → `sklansky_adder` |
| `rtl/pp_gen.sv` | AND array |
| `rtl/wallace_tree32.sv` | four-stage compressor tree |
| `rtl/comp_row.sv`, `rtl/fa_row.sv`, `rtl/comp4_2_row.sv` | compressor rows across all columns |
| `rtl/comp7_2.sv`, `rtl/comp6_2.sv`, `rtl/comp5_2.sv`, `rtl/comp4_2.sv`, `rtl/fa.sv` | compressors |
| `rtl/sklansky_adder.sv` | prefix adder |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench checks against values that it computes itself. It ends with
the line `TB_RESULT checks=<n> failures=<n>`.

- **Compressors.** These are tested exhaustively (up to 512 input patterns
  for the 7:2). Each pattern is checked against the arithmetic identity
  `sum + 2*carry + 2*cout1 + 4*cout2 = number of ones in the inputs`. The
  tests also check that the couts do not change with the carry inputs. For
  5:2, 6:2 and 7:2 they also compare the couts with the `CTEMP` equations
  above.
- **Sklansky adder.** This is tested with corner patterns (all ones,
  alternating bits, `b = ~a` for full-length propagate chains) and 2000
  random sums. It runs at W = 64 and at W = 13.
- **Tree.** This is tested with 3000+ operand pairs. It checks that the
  two rows add up to the product. It also counts whether each carry path
  carried a 1: the upper→lower couts, the chain-end couts, the stage-2 couts
  and the 4:2 lateral carries.
- **Multiplier.** This is tested with about 21,000 products: a corner-pattern
  cross product, a walking-one × walking-zero sweep and 20,000 random pairs.
  It also counts the tree's carry paths and carries in the adder that cross
  bit 32.

A broken copy of each module was made, for example a carry multiplexer with
swapped inputs, or the last prefix level left out. Each broken copy made its
testbench fail.

Not verified here: timing and area. The design's own estimate is about
103.5 ns and about 15,400 gate equivalents for a 32×32 multiply with this
structure. Synthesis-level results will depend entirely on the cell library.

## Where this implementation makes its own choices

- The tree layout (stages, row assignment, and where chain-end couts go) is
  this implementation's own, as described above. The partitioning rule and
  the compressor types follow the design.
- The 4:2 and 5:2 compressors are standard circuits, not taken from the
  design. The 5:2 is built to match the 6:2's carry interface.
- In the 6:2/7:2 `carry` equation, the multiplexer form is used:
  `(X^cin1)&cin2 | ~(X^cin1)&X`. This is the only reading for which the
  compressor sums correctly.
- The multiplier uses an AND array, not Booth recoding, and its operands are
  unsigned.
- It has no pipeline registers.

## Simulating

Use Verilator 5, running from the repository root. For example:

```sh
verilator --binary --timing --assert -Irtl -y rtl rtl/mult_pkg.sv \
          tb/tb_wallace_mult32.sv --top-module tb_wallace_mult32 -Mdir obj -o sim
./obj/sim
```

To test any other module, replace the testbench name with that module's
testbench (`tb_comp7_2`, `tb_sklansky_adder`, …).

## Changing it

- **Compressors and rows.** These are independent of the operand size.
  `comp_row` takes `K` = 5, 6 or 7 and any width `W`.
- **Adder width.** `sklansky_adder` works for any `W`.
- **Operand size.** `wallace_tree32` is laid out for exactly 32 rows, and an
  assertion checks `N == 32`. For another operand size, write a new row
  schedule. Follow the same rule: an upper row takes K+2 same-column rows,
  each lower row takes K rows plus the couts of the row above, and the last
  couts are passed on as two rows.
