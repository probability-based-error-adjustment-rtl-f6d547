# Hybrid approximate 8x8 multiplier with a four-gate 4-2 compressor

Most of a multiplier's area and power goes into reducing the partial-product
matrix. Error-tolerant workloads such as image filtering can accept a small,
well-behaved error in exchange for a smaller reduction tree. This design builds
an 8-bit unsigned approximate multiplier that combines three things in the low
half of the product:

1. **A 4-2 compressor made of only four gates** (two NOR, one XOR, one OR).
   It is wrong in 6 of its 16 input patterns. Every pattern where it comes out
   too low has its last two inputs set, so one AND gate can flag all of them.
2. **A two-level hybrid placement.** Raw partial products are 1 only a
   quarter of the time. On such inputs the new compressor's most likely error
   is +1, and that error is hard to correct. So the first level uses Esposito's
   equal-weight approximate compressors (3-2 and 4-2), which make few errors on
   sparse inputs. Their outputs are 1 about half the time. The new compressor
   sits at the second level, where its errors lean towards the −1 cases that
   the AND gate can see.
3. **Truncation with a constant.** The four least significant columns are not
   computed. Product bits 3..0 are the constant `0110`.

The high half of the product (columns 8..14) is reduced exactly. A
ripple-carry adder does the final addition.

Over all 65536 operand pairs the multiplier has a mean relative error
distance (MRED) of 2.59 % and a normalised mean error distance (NMED) of
1.15·10⁻³. That is in line with the 2.5 % MRED published for this
architecture. 588 of the 65536 products are exact. The largest result is
64214, so 16 output bits always suffice.

## The four-gate compressor (`prop_c42`)

    C = P1 | P2
    S = NOR( P1 ^ P2 , NOR(P3, P4) ) = (P1 xnor P2) & (P3 | P4)

The compressor's value is `2C + S`, compared here with the true count of ones
(patterns are written P1 P2 P3 P4):

| pattern | ones | C S | error |
|---------|------|-----|-------|
| 0000 | 0 | 00 | |
| 0001, 0010 | 1 | 01 | |
| 0011 | 2 | 01 | −1 |
| 0100, 1000 | 1 | 10 | +1 |
| 0101, 0110, 1001, 1010, 1100 | 2 | 10 | |
| 0111, 1011 | 3 | 10 | −1 |
| 1101, 1110 | 3 | 11 | |
| 1111 | 4 | 11 | −1 |

The −1 rows are exactly the rows with `P3 & P4`. The +1 rows are a single
one in P1 or P2. Assume every input is 1 with probability 1/4, as a raw
partial product is. Then the error probability is 70/256: +1 has 54/256 and
−1 has 16/256. That is why this compressor is kept away from raw partial
products.

## The equal-weight compressors (`esposito_c42`, `esposito_c32`)

Both outputs of these compressors carry the weight of the inputs, so they
shrink a column without sending anything to the next one.

* 4-2: `W2 = (p1|p2) | (p3&p4)` and `W1 = (p3|p4) | (p1&p2)`. The result
  `W1+W2` is the count of ones, capped at 2.
* 3-2: `W1 = x1|x2` and `W2 = x3 | (x1&x2)`. It is exact except for `111`,
  which gives 2.

With two or more ones at the input, both compressors output `11`. On
quarter-probability inputs, each 4-2 output is 0 with probability 135/256.
The 3-2 outputs are 0 with probabilities 36/64 and 45/64.

## How the partial-product matrix is reduced (`hybrid_mult8`)

Partial product `a[i] & b[j]` lies in column `k = i + j`. Inside a column the
dots are ordered by increasing `i`. That order is this implementation's
choice; the error metrics above belong to it.

```
column  14 13 12 11 10  9  8 |  7  6  5  4 |  3  2  1  0
height   1  2  3  4  5  6  7 |  8  7  6  5 |  4  3  2  1
         ---- exact part ---  | C4 C3 C2 C1 |  truncated -> 0110
```

**Approximate part, level 1.** Esposito compressors reduce the columns
C1..C4 to four signals each. These signals become the inputs P1..P4 of the
second-level compressor, from top to bottom:

| column | dots | P1 P2 | P3 P4 |
|---|---|---|---|
| C4 (7) | 8 | 4-2 on dots 0..3 (W2, W1) | 4-2 on dots 4..7 (W2, W1) |
| C3 (6) | 7 | 3-2 on dots 0..2 (W1, W2) | 4-2 on dots 3..6 (W2, W1) |
| C2 (5) | 6 | raw dots 0, 1 | 4-2 on dots 2..5 (W2, W1) |
| C1 (4) | 5 | raw dots 0, 1 | 3-2 on dots 2..4 (W1, W2) |

This grouping matches the published per-column pattern probabilities. Those
tables give, in order, P(0) = 0.527 for a 4-2 output, 36/64 and 45/64 for
the two 3-2 outputs, and 3/4 for a raw partial product.

**Approximate part, level 2.** Each column has one `prop_c42`. Its S stays
in the column and its C moves one column up.

**Error correction.** `corr = P3 & P4` of the C4 compressor (column 7). This
is true exactly when that compressor errs by −1. The signal enters the exact
part as the third input of the column-8 full adder, so it adds 2⁸ rather
than 2⁷. Level 1 and the other compressors also err downwards on average,
and this larger correction offsets that drift. Adding it at 2⁷ instead would
give an MRED of 2.64 %.

**Exact part (columns 8..14).** Each level below lists its cells by column.
An exact 4-2 compressor is two full adders. Its `cout` does not depend on its
`cin`, so a row of them, each `cout` feeding the next column's `cin`, does
not ripple.

* Level 1:
  * col 8: 4-2 (top four dots) and a full adder (bottom three);
  * col 9: 4-2 with `cin` from col 8, and a half adder;
  * col 10: 4-2 with `cin` from col 9; one dot passes;
  * col 11: full adder on two dots plus the `cout` of col 10;
  * cols 12..14 pass.
* Level 2:
  * col 8: full adder (two dots plus `corr`);
  * cols 9..12: a chain of exact 4-2 compressors, with col 9 taking `cin = 0`;
  * col 13: full adder (two dots plus the `cout` of col 12);
  * col 14 passes.

**Final addition.** Two rows are left over columns 4..14. Column 4 holds only
one dot. An 11-bit ripple-carry adder (`rca`) adds them. Its 12-bit sum is
`p[15:4]`, and `p[3:0] = TRUNC_CONST = 4'b0110`.

The whole multiplier is combinational. It has no clock, reset or pipeline
stage, so `p` follows `a` and `b` after one combinational delay.

## Where this RTL makes its own choices

* **Esposito 3-2 equations.** No equations are published for the 3-2
  compressor. These are the simplest that satisfy both published facts: two
  or more ones give `11`, and the outputs are zero with probabilities 36/64
  and 45/64.
* **Orders inside a column.** The dot order within a column is this
  implementation's choice. So is which of W1 and W2 feeds the upper input of
  a pair. The published probabilities fix only the 3-2 order, not the 4-2
  order.
* **Exact cells.** The cells of the exact part (full adder, half adder, exact
  4-2 compressor) were worked out by counting the dots and carry arrows of
  the published structure. The internal structure of the exact 4-2
  compressor is the standard one.
* **AND correction weight.** The correction enters at column 8 because that
  is where the published structure routes it. The description in words only
  says that the AND output "makes up for the error". Column 7 would cancel
  the C4 compressor's error exactly but measures slightly worse overall.
* **Not built: the 16-bit multiplier.** It is only outlined: ten approximate
  columns, six constant columns, Esposito compressors at levels 1 and 3, and
  two AND gates. Its column-by-column structure and its constant are not
  given.

## Files

| file | what it is |
|---|---|
| `rtl/hybrid_mult8.sv` | the multiplier (top), parameter `TRUNC_CONST` |
| `rtl/prop_c42.sv` | four-gate approximate 4-2 compressor |
| `rtl/esposito_c42.sv`, `rtl/esposito_c32.sv` | equal-weight approximate compressors |
| `rtl/exact_c42.sv`, `rtl/full_adder.sv`, `rtl/half_adder.sv` | exact reduction cells |
| `rtl/rca.sv` | ripple-carry adder, parameter `WIDTH` (11) |
| `tb/tb_<module>.sv` | exhaustive or randomised self-checking test per module |
| `tb/tb_hybrid_mult8.sv` | all 65536 operand pairs against a column-level reference model; prints MRED/NMED and counts each mechanism |
| `tb/tb_sharpen.sv` | image-sharpening workload: three generated 512x512 images, 5x5 Gaussian unsharp filter, PSNR against exact products (about 41 dB, threshold 30 dB) |

Each testbench ends with one line `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module tb_hybrid_mult8 tb/tb_hybrid_mult8.sv
./obj_dir/Vtb_hybrid_mult8
```

Replace the module name to run any other testbench. The exhaustive test
takes well under a second and the sharpening workload a few seconds.

Any other bit-exact model of this multiplier can be checked against
`tb_hybrid_mult8`. Its `reference` function spells out the column-level
computation independently of the RTL cells: compressor truth tables, the
correction term, integer sums for the exact columns and the constant.
