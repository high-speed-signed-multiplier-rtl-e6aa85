# Signed Q15 / Q31 multiplier on a vertical-and-crosswise (Urdhva Tiryakbhyam) array

Fixed-point DSPs keep samples and coefficients as signed fractions in Q15
(16 bits) or Q31 (32 bits): one sign bit, then 15 or 31 fraction bits, so that
every value, and every product of two values, lies in [-1, 1). A product of
two such words therefore fits in a word of the same size, once the redundant
bits are dropped. This RTL multiplies two Q15 words, or two Q31 words, by
turning them into magnitudes and feeding these to an unsigned multiplier of
the Urdhva Tiryakbhyam kind ("vertically and crosswise"). That multiplier
forms all partial products at the same time, from a regular tree of small
blocks: 2x2 → 4x4 → 8x8 → 16x16 → 32x32. The sign of the result is restored
at the end.

The top, `qmul_top`, holds one Q15 lane and one Q31 lane side by side. Each
lane registers its operands and its product.

## How a signed product is formed

For an N-bit word (N = 16 or 32), `qmul` does the following:

1. **Operands to magnitudes.** Each operand whose sign bit is 1 goes through a
   2's complementer, which the sign bit enables. Bit N-1 of the result is then
   forced to 0, leaving an (N-1)-bit magnitude.
2. **Unsigned multiplication.** An NxN Urdhva multiplier forms the 2N-bit
   product P of the two magnitudes. Both magnitudes are below 2^(N-1), so
   P[2N-1] is always 0. This bit is the redundant sign bit.
3. **Back to Q format.** P is shifted left by one and its upper N bits are
   kept: `P[2N-2 : N-1]`. For Q15 these are P30..P15; for Q31, P62..P31. The
   lower bits are discarded without rounding.
4. **Sign.** `x[N-1] ^ y[N-1]` enables a second 2's complementer on this
   N-bit magnitude.

Two consequences should be known before relying on the numbers:

* **Truncation toward zero.** The magnitude is truncated, and negation comes
  after it. Every result therefore lies within one LSB of the exact product,
  on the side of zero. For example, 0x7FFF × 0x7FFF gives 0x7FFE.
* **-1.0 is treated as 0.** The word with only the sign bit set (0x8000,
  0x8000_0000) is its own 2's complement. Once its MSB is forced to 0 it has
  magnitude 0, so any product that has -1.0 as an operand is 0. This follows
  the sign-magnitude scheme exactly as it is defined. If you need -1.0,
  saturate it to -1.0 + LSB before the multiplier.

Worked examples, all checked by the testbenches:

| lane | x | y | product |
|------|---|---|---------|
| Q15 | 0xA000 (-0.75) | 0xE000 (-0.25) | 0x1800 (0.1875) |
| Q15 | 0xA000 (-0.75) | 0xC000 (-0.5)  | 0x3000 (0.375) |
| Q31 | 0xAAAAB042 (≈ -0.666666) | 0x2AAAA7DF (≈ 0.333333) | 0xE38E3C9E (≈ -0.2222218) |

In the Q31 example the magnitude before the final negation is 0x1C71C362. The
result differs from the exact product by less than 2^-31.

## The multiplier tree

**2x2 (`ut_mul2x2`).** This block uses the step rule directly:
`r0 = a0·b0` (vertical), then `c1 r1 = a1·b0 + a0·b1` (crosswise), then
`c2 r2 = c1 + a1·b1` (vertical). It takes four AND gates and two half adders.

**4x4 (`ut_mul4x4`).** This is the basic block of both lanes. The operands are
split into 2-bit halves, and four 2x2 blocks produce the high, low and two
crosswise products at once. Three 4-bit ripple carry adders combine them:

```
adder 1:  HL + LH                          -> s1, carry ca1
adder 2:  s1 + {00, LL[3:2]}               -> s2, carry ca2
adder 3:  HH + {0, ca1|ca2, s2[3:2]}       -> p[7:4]
p[3:2] = s2[1:0]        p[1:0] = LL[1:0]
```

**8x8, 16x16, 32x32 (`ut_mul8x8`, `ut_mul16x16`, `ut_mul32x32`).** Each of
these uses the same pattern one level up. Four half-size multipliers feed
`ut_combine`, which holds two ADDER stages of W-bit ripple carry adders
(W = the operand width):

```
middle ADDER:  AH*BL + AL*BH + (AL*BL >> W/2)   -> W-bit sum s2 and one carry
left ADDER:    AH*BH + ({carry, s2} >> W/2)     -> p[2W-1:W]
p[W-1:W/2] = s2[W/2-1:0]      p[W/2-1:0] = (AL*BL)[W/2-1:0]
```

The middle ADDER adds three inputs, so it is built as two chained adders. Each
of them can produce a carry, but the middle sum is always below 2^(W+1), so the
two carries are never both 1. The OR of the two carries is therefore an exact
carry. The left adder cannot overflow, because the product fits in 2W bits.

The Q15 lane uses `ut_mul16x16` (four 8x8 blocks). The Q31 lane uses
`ut_mul32x32` (four 16x16 blocks). The same `twos_complementer` (XOR with the
enable, then a ripple incrementer) is used three times per lane: once on each
operand and once on the result.

The multiplier is purely combinational, and its depth is set mostly by the
ripple chains. The choice of adder is local to `rca.sv` and `ut_combine.sv`. A
faster adder can be dropped in there without touching anything else.

## Clocking and interface of `qmul_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | asynchronous active-low reset; clears all registers to 0 |
| `q15_x`, `q15_y` | in | 16 | Q15 operands |
| `q15_p` | out | 16 | Q15 product |
| `q31_x`, `q31_y` | in | 32 | Q31 operands |
| `q31_p` | out | 32 | Q31 product |

Operands are captured on one rising edge. Their product is on the outputs
after the second rising edge (latency `qmul_pkg::TOP_LATENCY` = 2). A new pair
can be presented on every cycle. There is no valid or enable signal, so the
lanes run every cycle. The two lanes share only the clock and the reset.

Which choices are this design's own:

* **Registers.** The register placement (inputs and output) and the reset
  behaviour are this design's own. The architecture is only specified as fully
  clocked, with an unpipelined multiplier between registers.
* **Wide adders.** Ripple carry for the wide ADDER stages is an own choice.
  Only the 4-bit adders are specified as ripple carry.
* **Carry merge.** Merging the two middle carries with an OR is an own choice,
  and is exact (see above).
* **Small cells.** The insides of the 2x2 cell, the full adder and the
  2's complementer are the simplest circuits that do the specified job.

## Files

| file | content |
|------|---------|
| `rtl/qmul_pkg.sv` | word widths, Q15/Q31 types, top latency |
| `rtl/qmul_top.sv` | clocked top, Q15 and Q31 lanes |
| `rtl/qmul.sv` | signed Q(N-1) multiplier, N = 16 or 32 |
| `rtl/ut_mul32x32.sv`, `ut_mul16x16.sv`, `ut_mul8x8.sv` | unsigned Urdhva multipliers |
| `rtl/ut_combine.sv` | middle and left ADDER stages |
| `rtl/ut_mul4x4.sv`, `ut_mul2x2.sv` | basic blocks |
| `rtl/rca.sv`, `full_adder.sv`, `half_adder.sv` | adders |
| `rtl/twos_complementer.sv` | enabled 2's complementer |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Every testbench is self-checking. Each one compares the design against values
it computes itself with integer arithmetic, and ends with a
`TB_RESULT checks=N failures=M` line.

* **Exhaustive tests.** The 2x2, 4x4 and 8x8 multipliers, the 4-bit adder and
  the 4-bit 2's complementer are tested exhaustively. `ut_combine` is tested
  exhaustively at W = 8.
* **Random and corner tests.** The 16x16 and 32x32 multipliers and the wide
  adders get corner words plus 20,000 random pairs.
* **`tb_qmul`.** It checks both word sizes, bit-exactly against the rule
  above. It also checks every result against the exact product: within one
  LSB and toward zero, for operands other than -1.0.
* **`tb_qmul_top`.** It streams 20,000 operand pairs per lane, one per cycle,
  and checks every product exactly two cycles later. It also checks that reset
  clears the outputs, including in mid-stream. It counts the negative results,
  the both-negative operand pairs, the -1.0 operands, the zero products and the
  resets, and fails if any of these never occurred.

Each testbench was also run against a deliberately broken copy of its module,
and each one reports failures there.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -y rtl rtl/qmul_pkg.sv tb/tb_qmul_top.sv \
          --top-module tb_qmul_top -Mdir obj_tb && ./obj_tb/Vtb_qmul_top
```

To run another testbench, change the testbench file and `--top-module`. The
full top-level run takes well under a second. `qmul` accepts only N = 16 or
N = 32. The unsigned multipliers are fixed-size modules, so another word size
means adding one more level to the tree, in the same pattern as
`ut_mul32x32`.

## Limits

* **No pipelining.** The multiplier is not pipelined. The critical path runs
  through two 2's complementers and the whole ripple-carry tree.
* **No FPGA timing or area figures.** Timing or area on an FPGA has not been
  measured for this RTL.
* **No rounding.** Products are truncated toward zero. A rounding variant would
  add half an LSB (bit N-2 of P) before the truncation.
