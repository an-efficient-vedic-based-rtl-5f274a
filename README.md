# Vedic 16x16 multiplier as a systolic-array processing element

A systolic array for matrix multiplication is only as fast as its processing
elements, and the multiplier is what sets a processing element's critical
path. This design makes that multiplier an exact (not approximate)
Urdhva Tiryagbhyam ("vertically and crosswise") Vedic multiplier. A 16x16
product is split into four 8x8 cross products that are computed in
parallel and then merged by three 16-bit carry-lookahead adders. Each 8x8
multiplier is built the same way from four 4x4 multipliers. The recursion
stops at 4x4. Going down to 2x2 blocks would multiply the number of partial
products, so the 4x4 leaves use a conventional fast multiplier instead.

All logic is combinational and unsigned. There are no clocks, registers or
parameters at the top.

```
                 a[15:0], b[15:0]
      +-------------+-------------+-------------+
  aH*bH         aH*bL         aL*bH         aL*bL          (vedic_mul8 x4)
    Q3            Q2            Q1            Q0
    |             |             |             |
    |             +--CLA1(Q1+Q2)+             |
    |                  Q4, C1                 |
    |                    +----CLA2(Q4 + Q0[15:8])
    |                           Q5, C2        |
    +--CLA3(Q3 + {6'b0, C1+C2, Q5[15:8]})     |
         |                      |             |
      S[32:16]              S[15:8]=Q5[7:0]  S[7:0]=Q0[7:0]
```

## Module hierarchy

| module          | what it is                                                        | count in the top |
|-----------------|-------------------------------------------------------------------|------------------|
| `vedic_pe16`    | top: 16x16 multiplier, output `s[32:0]`                            | 1                |
| `vedic_mul8`    | 8x8 Vedic multiplier                                              | 4                |
| `array_mul4`    | 4x4 carry-save array multiplier (leaf)                            | 16               |
| `vedic_combine` | the three-adder merging network, parameter `HALF` (8 or 4)        | 1 + 4            |
| `cla_adder`     | carry-lookahead adder, parameter `WIDTH` (16, 8 or 4)              | 3 + 12 + 16      |

## The merging network (`vedic_combine`)

This is the heart of the design and the part that is easiest to get wrong.
Write the operands as `a = aH*2^H + aL` and `b = bH*2^H + bL`, with `H` the
half width (8 at the top level, 4 inside `vedic_mul8`). Then

```
a*b = Q3*2^(2H) + (Q1 + Q2)*2^H + Q0
Q0 = aL*bL   Q1 = aL*bH   Q2 = aH*bL   Q3 = aH*bH      (each 2H bits)
```

The three adders, each 2H bits wide, evaluate this from the bottom up:

1. **CLA1** forms the crosswise sum `Q4 = Q1 + Q2` and its carry out `C1`.
   `Q4` has weight `2^H` and `C1` has weight `2^(3H)`.
2. **CLA2** adds the upper half of `Q0`, zero-extended by H bits, to `Q4`.
   The result `Q5` has weight `2^H` and its carry out `C2` has weight
   `2^(3H)`. The lower half of `Q5` is final and becomes `S[2H-1:H]`.
   The lower half of `Q0` goes to `S[H-1:0]` without passing an adder.
3. **CLA3** adds `Q3` to the word `{zeros, C1+C2, Q5[2H-1:H]}`. That word
   is the part of steps 1 and 2 that lies at or above `2^(2H)`. The sum is
   `S[4H-1:2H]`, and the carry out is brought out as `S[4H]`.

At H = 8 the second operand of CLA3 is a 6-bit zero pad, two carry bits
and `Q5[15:8]`.

**How the carries enter CLA3.** `C1` and `C2` have the same weight,
`2^(3H)`, which is bit H of CLA3's operand. They cannot be placed side by
side as two separate bits, because that would double `C1`'s weight. Instead
they enter as the two-bit sum `{C1 & C2, C1 ^ C2}` at bits `H+1:H`. This is
what keeps the 6-bit pad. For unsigned operands `C1` and `C2` are never both
1: when `C1` is set, `Q4` is at most `2*(2^H-1)^2 - 2^(2H)`, which is too
small for CLA2 to overflow. So in practice the sum is a single bit, but the
sum form is exact for any input.

**`S[32]`.** CLA3's carry out is always 0 for a 16x16 unsigned product,
because the product is below 2^32. It is still brought out, so the top's
output is 33 bits wide. `vedic_mul8` drops the corresponding bit 16.

## The 4x4 leaf (`array_mul4`)

The design asks only for "another fast multiplier" at 4x4. This
implementation uses a carry-save array:

- Row 0 holds the partial products `a & b[0]`.
- Rows 1 to 3 each have four full adders. The adder in row `i`, column `j`
  adds three bits:
  - `a[j] & b[i]`
  - the previous row's sum from column `j+1`
  - the previous row's carry from column `j`
- Carries move down to the next row, never along a row.
- Product bit `i` is the column-0 sum of row `i`.
- A 4-bit `cla_adder` adds the last row's sums and carries to give bits 7:4.

You can swap in any other 4x4 multiplier with the same ports.

## The adder (`cla_adder`)

The adder uses two lookahead levels over 4-bit groups:

- Each bit forms a generate and a propagate signal.
- Each group forms a group generate and a group propagate.
- The carry into every group comes straight from `cin` and the group signals.
- The carry into every bit comes from its group's carry in.

Both levels write each carry in flat sum-of-products form, for example
`c3 = g2 | p2 g1 | p2 p1 g0 | p2 p1 p0 c0`, so no carry ripples between
groups. `WIDTH` must be a multiple of 4. `cin` is tied to 0 everywhere in
this design.

## Interface and timing

| port | dir | width | meaning                                        |
|------|-----|-------|------------------------------------------------|
| `a`  | in  | 16    | unsigned multiplicand                          |
| `b`  | in  | 16    | unsigned multiplier                            |
| `s`  | out | 33    | `s[31:0] = a*b`; `s[32]` is always 0           |

The path is purely combinational, so the product is valid once the inputs
have propagated. To use the element in a systolic array cell, put the cell's
operand and accumulator registers around it. The cell registers, the
forwarding to neighbour cells and the array itself are not part of this
design, because their size and dataflow are not defined.

## Where this RTL follows the reference design and where it chooses

These parts follow the reference block diagram:

- the four 8x8 sub-multipliers and their operand byte pairs
- the three 16-bit carry-lookahead adders with their operands, carries and
  zero pads
- the output slices `S[32]`, `S[31:16]`, `S[15:8]` and `S[7:0]`
- the use of the same Vedic scheme one level down
- a non-Vedic 4x4 leaf

These are this implementation's own choices:

- **Second cross product.** The reference labels it `Q2[15:8]` at the first
  adder. An exact product needs all 16 bits of `Q2`, so the full `Q2` is
  used.
- **Carries into CLA3.** `C1` and `C2` enter as their sum, as explained
  above.
- **4x4 leaf.** It is a carry-save array. The reference does not name the
  fast multiplier.
- **Adder internals.** The reference gives no 4-bit grouping or two-level
  lookahead.
- **Signedness.** The operands are unsigned. The reference's examples are
  all unsigned.
- **Sub-block naming.** The reference calls the 8x8 sub-blocks "systolic
  array multipliers" but also says that Vedic multiplication is kept for
  every level above 4x4. This design follows the second statement.

The reference evaluates delay and LUT count on Spartan-3 and Virtex-4 FPGAs
for 4x4 and 8x8 versions. Those figures depend on the vendor flow and are not
reproduced here. The approximate processing elements it compares against are
not included.

## Verification

Each module has a self-checking testbench in `tb/`. It compares the module
against arithmetic the testbench computes itself, prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs.

| testbench          | what it covers                                                                          |
|--------------------|-----------------------------------------------------------------------------------------|
| `tb_cla_adder`     | widths 16, 8 and 4; full-length carry chains; 20,000 random vectors with random `cin`    |
| `tb_array_mul4`    | all 256 operand pairs, plus 10 x 14 = 140                                               |
| `tb_vedic_mul8`    | all 65,536 operand pairs, plus 173 x 58 = 10034                                         |
| `tb_vedic_combine` | HALF = 8 and 4 with true cross products; counts how often `C1` and `C2` occur            |
| `tb_vedic_pe16`    | top at its only configuration (see below)                                               |

`tb_vedic_pe16` runs the whole design end to end:

- both worked examples
- corner cases: zero, one, all ones, single bytes, and shifted masks
- 200,000 random pairs
- a count of how often `C1` and `C2` occur at the 16-bit level and inside an
  8x8 multiplier; a carry that never occurs counts as a failure

`C2` is rare with random operands, at about 1 in 1,500 vectors. The
16-bit operands are too wide for an exhaustive test, so the 16x16 result
rests on the exhaustive 8x8 test and on random testing.

To run one testbench with Verilator (from the directory that holds `rtl/`
and `tb/`):

```
verilator --binary --timing -Irtl tb/tb_vedic_pe16.sv --top-module tb_vedic_pe16
./obj_dir/Vtb_vedic_pe16
```

## Changing the design

- **Narrower or wider elements.** Build them the same way: four
  multipliers of half the width plus `vedic_combine #(.HALF(n/2))`.
  `HALF` must be even and at least 4, so that the adders are a multiple of
  4 bits wide and the carry operand has room for its zero pad.
- **Another leaf multiplier.** Replace `array_mul4`, keeping the ports
  `a[3:0]`, `b[3:0]` and `p[7:0]`.
