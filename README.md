# A 1/(1+x) special function unit: non-uniform segments, Booth-3 multipliers

A GPU's special function unit computes functions such as reciprocals and square
roots for the shader cores. This unit computes one of them, f(x) = 1/(1+x) for
x in [0,1). It uses a second-order polynomial per segment of the input range:

    f(x) ~ C0 + C1*x + C2*x^2

It is built around three ideas:

* **Non-uniform segmentation.** Where the function is nearly straight, a segment
  can be wider for the same error. Seven segments of 1/8 or 1/4 cover [0,1) with
  an error of about 2^-13. A uniform split would need more table entries for the
  same error. Every segment size is a power of two, and the segments are sorted
  by size, so the table address comes from a few comparators and a shift.
* **Radix-8 (Booth-3) multipliers.** Each partial product covers three multiplier
  bits, so a 10-bit multiplier gives four partial products instead of ten. The
  multiplicand is first sign-extended by two bits, which lets the simple
  "unsigned" sign-extension template be used for signed operands. No extra logic
  is needed to work out each row's sign.
* **Fast reduction.** The partial products are reduced to two rows by a Wallace
  tree of 4:2 compressors and full adders. A hybrid adder adds the two rows: 4-bit
  carry-lookahead blocks, with the carry rippling between blocks.

The unit is purely combinational: one input in, one result out, with no clock
and no latency in cycles.

## Number formats

| signal | width | meaning |
|---|---|---|
| `x` | 9 | input, x = X / 2^9, X = 0..511 |
| `z` | 13 | output, f = Z / 2^13; Z ranges over 4098..8191 |
| C0 | 14 | C0 * 2^14, unsigned |
| C1 | 18 | C1 * 2^18 + 2^18 |
| C2 | 14 | C2 * 2^14, unsigned |

Every C1 of this function is negative and greater than -1. The table therefore
stores only the low 18 bits of C1's 19-bit two's-complement form. The datapath
puts back the constant sign bit 1 when C1 enters its multiplier.

The coefficients apply to the global x, not to the offset inside the segment.

## Segments and the address encoder

| address | x range (in 1/128) | C0 | C1 | C2 |
|---|---|---|---|---|
| 0 | 0 - 16 | 0.9999389648 | -0.9927825928 | 0.8372802734 |
| 1 | 16 - 32 | 0.9963989258 | -0.935333252 | 0.5992431640 |
| 2 | 32 - 48 | 0.9868774414 | -0.8586997986 | 0.4434814453 |
| 3 | 48 - 64 | 0.9722290039 | -0.7798805237 | 0.3374023437 |
| 4 | 64 - 80 | 0.9537353516 | -0.7055931091 | 0.2626342773 |
| 5 | 80 - 112 | 0.9228515625 | -0.609462738 | 0.1877441406 |
| 6 | 112 - 128 | 0.8764038086 | -0.5019607544 | 0.1256103515 |

The last segment was fitted over 112..144, which is wider than the input range
reaches.

`address_encoder` takes the top 7 bits of x (`xm`, in units of 1/128). The
segments fall into size classes, and each class is a contiguous run of
same-size segments. For a class with start `S`, segment size `2^L` and first
table address `B`, the address is:

    addr = B + ((xm - S) >> L)

The class used is the last one whose start `xm` has reached. The defaults hold
two classes: `{S=0, L=4, B=0}` and `{S=80, L=5, B=5}`. For another segment list
of the same kind, change `N_CLASS`, `CLASS_START`, `CLASS_LOG2` and `CLASS_BASE`
and the contents of `coeff_rom`. Finding the segments and coefficients is
design-time work, and no hardware for it is included. That work is a minimax
fit per segment, merging of uniform segments while the error stays within
bounds, splitting into power-of-two sizes, sorting by size, and truncating the
coefficients to the smallest widths that still meet the error.

## Data path (`sfu`)

```
 x[8:2] -> address_encoder -> coeff_rom -> C0, C1, C2
 x      -> squarer (10x10 Booth-3)       -> x^2 (18 bits)
 C1 (19b signed)  x  x   (10x10 group pattern) -> C1*x   (Booth-3, 19x10)
 C2 (15b)         x  x^2 (19 bits, recoded)    -> C2*x^2 (Booth-3, 15x19)
 terms, each cut to 13 fractional bits:
   C0 >> 1,  (C1*x) >>> 14,  (C2*x^2) >> 19
 -> multi_operand_adder (Wallace tree + hybrid CLA) -> z
```

Each multiplier resolves its product with its own adder. The three products are
then truncated to 13 fractional bits and summed. With this truncation the unit
gives exactly these results:

| X | x | 1/(1+x) | Z | Z/2^13 |
|---|---|---|---|---|
| 0 | 0 | 1 | 8191 | 0.999878 |
| 219 | 0.4277 | 0.700410 | 5736 | 0.700195 |
| 68 | 0.1328 | 0.882759 | 7230 | 0.882568 |
| 28 | 0.0547 | 0.948148 | 7766 | 0.947998 |
| 178 | 0.3477 | 0.742029 | 6077 | 0.741821 |

Summing the untruncated products would give one LSB more for four of these.
Over all 512 inputs, the largest error against 1/(1+x) is 3.02 LSB of the
output (3.7e-4). The polynomial alone, before any truncation, stays within
2^-13.

## The Booth-3 multiplier (`booth3_multiplier`)

This is the most involved part. It is built from three modules:
`booth3_ppgen`, `wallace_tree` and `hybrid_adder`.

### Grouping and decoding

The signed multiplier b (WB bits) is read in NG = ceil(WB/3) overlapping groups
of four bits. Group g is {b[3g+2], b[3g+1], b[3g], b[3g-1]}, with b[-1] = 0 and
the sign bit repeated above the MSB. For WB = 10 the groups are:

    {m2 m1 m0 0}  {m5 m4 m3 m2}  {m8 m7 m6 m5}  {m9 m9 m9 m8}

Group {b3 b2 b1 b0} stands for the digit d = -4*b3 + 2*b2 + b1 + b0, in
-4..4. `booth3_decoder` outputs one select among M, 2M, 3M and 4M for |d|, and
the sign S = b3. It computes |d| as 2*c2 + c1 + c0, where c = b[2:0] XOR b3.

### Partial product bits and the hard multiple

Bit k of a partial product is:

    ((M[k] & selM) | (3M[k] & sel3M) | (M[k-1] & sel2M) | (M[k-2] & sel4M)) ^ S

Here M is the multiplicand sign-extended to P = WA+2 bits, which leaves room for
3M and 4M. A negative multiple is the one's complement from this XOR, plus S
added at the row's LSB.

3M = M + 2M needs a real adder (`hard_multiple`, a hybrid CLA). It is shared
by all groups of one multiplier. For each group,
`Disable = NAND(b3 XOR b2, b1 XOR b0)`, which is low exactly when the digit is
+3 or -3. If every group's Disable is high, the adder's operands are forced to
zero, so it does not switch and `m3` reads 0. The `hm_active` output shows
whether the adder was on. In the 512-input test, the three multipliers' adders
were on for 296, 296 and 354 inputs.

### Sign template

Sign-extending every partial product to the full width would load each sign bit
heavily. Instead, each P-bit row is taken as an unsigned number with a constant
correction. Let C be the MSB of the row after the XOR with S. Then the rows are:

```
row 0:        C' C C C | pp0
row 1..NG-2:  1  1  C' | ppg      (shifted 3g bits)
row NG-1:          C'  | pp       (shifted 3(NG-1) bits)
S bits:       S_g at bit 3g
```

Why this works: a P-bit signed row equals its unsigned reading minus C*2^P,
which is C'*2^P - 2^P. The C' bits are placed at bit P+3g. The constants
-2^P * (1 + 2^3 + ... + 2^(3(NG-1))), taken modulo 2^W, fold into the ones and
the `C C C` pattern shown. Since C is simply a bit of the row, no logic is
needed per row to work out the sign of the extension. The array is
W = P + 3(NG-1) + 1 bits wide, and its low WA+WB bits are the product. For
10x10 this gives 12-bit rows and a 22-bit array. The S bits never share a
column, so they form one extra row: NG+1 rows go into the tree.

### Reduction and final addition

`wallace_tree` reduces N rows in stages. It sends four rows at a time through a
row of `compressor42` cells, and three leftover rows through a row of full
adders. One or two leftover rows pass through unchanged. Stages repeat until two
rows remain. For example, 5 rows become 3 rows and then 2.

A 4:2 compressor is two full adders. Its inter-column carry `cout` does not
depend on `cin`, so nothing ripples within a stage. The reduction works on
whole rows. Bits that are always zero (the ragged edges of the partial product
array) simplify to half adders or wires in synthesis. This is not a
hand-placed column-by-column layout.

`hybrid_adder` chains `cla4` blocks with a rippling carry. Widths that are not a
multiple of 4 are padded.

## Files

| file | content |
|---|---|
| `rtl/sfu_pkg.sv` | widths, `coeff_t`, `booth_sel_t`, Booth group and array width functions |
| `rtl/sfu.sv` | top: the whole unit |
| `rtl/address_encoder.sv` | segment address from x's MSBs |
| `rtl/coeff_rom.sv` | 7 x 46-bit coefficient table |
| `rtl/booth3_multiplier.sv` | partial products + tree + adder |
| `rtl/booth3_ppgen.sv` | grouping, bit cells, sign template |
| `rtl/booth3_decoder.sv` | radix-8 digit decoder |
| `rtl/hard_multiple.sv` | 3M adder with its disable circuit |
| `rtl/wallace_tree.sv` | 4:2 / 3:2 row reduction |
| `rtl/compressor42.sv`, `rtl/full_adder.sv` | reduction cells |
| `rtl/cla4.sv`, `rtl/hybrid_adder.sv` | 4-bit CLA and the block-ripple adder |
| `rtl/multi_operand_adder.sv` | final sum of the three terms |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulation

Each testbench ends with a line `TB_RESULT checks=N failures=M` and stops itself.
For example, the end-to-end test:

```
verilator --binary --timing -Irtl rtl/sfu_pkg.sv tb/tb_sfu.sv --top-module tb_sfu
./obj_dir/Vtb_sfu
```

`tb_sfu` tries all 512 inputs against an integer reference model. It also checks
the five example points above, the error bound, the segment address and the
zero latency. It checks that every segment and both states of every 3M adder
occur. `tb_booth3_ppgen` and `tb_booth3_multiplier` cover every pair of 10-bit
operands (about 1 s each). The multiplier test also tries the 19x10 and 15x19
sizes with random operands.

## Limits and departures

* The unit computes only 1/(1+x). Reciprocal, square root, reciprocal square
  root, log2, exp2, division and similar functions would use the same data path
  with other segments and coefficients, but no tables for them are included. The
  unit also has no range reduction for inputs outside [0,1).
* Truncating each term to 13 fractional bits before the final sum is this
  design's choice. It was chosen because it gives exactly the reference outputs
  above. The adder then works on resolved products, not on carry-save pairs, so
  each multiplier has its own final adder.
* The squarer is a general 10x10 Booth-3 multiplier of x by itself, not a
  dedicated squaring circuit. The C2 multiplier recodes x^2 and uses C2 as the
  multiplicand.
* The gate-level Booth decoder here is its own; only its function is fixed.
* The older signed sign template, which derives a separate sign-extension
  signal from the selects and the multiplicand sign for every row, is not
  included. The pre-extended template above replaces it.
* The Wallace tree reduces whole rows, not columns allocated by hand, so its
  stage count and cell placement differ from a custom layout.
* The 3M adder is switched off by forcing its operands to zero. This is one
  adder per multiplier, enabled when any group needs 3M.
* Timing and area (about 5.3 ns and 0.014 mm^2 in a 45 nm process) belong to a
  full layout flow. They cannot be checked from RTL. There are no registers.
  Put registers around `sfu` if it has to sit in a pipeline.
