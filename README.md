# Vectorized fused dot product unit

This is a pipelined hardware unit that computes the accumulating dot product

    d = a · b + c

It is the core step of a matrix-multiplication accelerator. The operands a and b are 256-bit
vectors of low-precision numbers:

- 16 elements of FP16 or BF16;
- or 32 elements of FP8 (E4M3 or E5M2, as in the OCP MX specification);
- or 32 elements of FP4 (E2M1), which are widened to E4M3 on entry;
- or 32 elements of INT8, each operand signed or unsigned.

The accumulator c/d is FP32, FP16 or INT32. The unit takes one new operation every clock.

Two ideas keep it small. First, the dot product is **fused**. All products are aligned to the
largest product exponent and each is rounded once to a fixed internal precision. The aligned
terms are then added exactly, and the sum is normalized and rounded to FP32 only once, at the
end. There is no normalization or rounding between individual additions. Second, the datapath
is **vectorized**. One set of multipliers, shifters and adder trees serves every format.

- A 16-bit format fills each of the 16 processing lanes with one "full-width" term.
- An 8-bit format fills each lane with two "half-width" terms.
- Integers use the same multipliers and adder trees and skip alignment.

The result is 16-deep dot products for 16-bit inputs and 32-deep ones for 8-bit inputs,
through the same hardware.

## Internal formats

Every input is first converted into one of three unified internal formats:

| internal | used for | exponent | mantissa (with leading 1) | product exponent | product mantissa | aligned term | sum |
|---|---|---|---|---|---|---|---|
| E8N10 | FP16, BF16 | 8 bits, bias 127 | 11 bits | 9 bits | 22 bits | 32 bits | 36 bits |
| E5N3  | E4M3, E5M2 | 5 bits, bias 16  | 4 bits  | 6 bits | 8 bits  | 16 bits | 21 bits |
| INT8  | INT8       | –                | 8 bits  | –      | 16 bits | 16 bits | 21 bits |

The internal formats are *normalized*: subnormal inputs are rewritten as normal numbers with a
smaller exponent. No alignment precision is lost because of leading zeros.

- FP16 subnormals reach down to 2^-24. That fits the 8-bit exponent.
- E5M2 values lie in [2^-16, 2^15]. With bias 16 they fit a 5-bit exponent.
- E4M3 subnormals also fit with bias 16.
- BF16 subnormals are flushed to zero.

FP4 is the MX E2M1 format: sign, 2-bit exponent with bias 1, one fraction bit, no infinity or
NaN. Its eight magnitudes (0, 0.5, 1, 1.5, 2, 3, 4, 6) are exact in E4M3. So `fp4_converter`
rewrites each FP4 element as an E4M3 byte: exponent e + 6, fraction {f, 00}, and 0.5 becomes
2^-1. The operation then runs as a 32-deep E4M3 dot product. The 32 FP4 elements sit in the lower
128 bits of a and b.

E4M3 follows OCP: it has no infinity, and S.1111.111 is NaN. E5M2, FP16 and BF16 use the IEEE
rules for infinity and NaN. Each converted value carries `isnan`, `isinf` and `iszero` flags.

The sum widths come from the term widths plus log2 of the depth: 32 + 4 = 36, and 16 + 5 = 21.

## Datapath

```
 a,b ──► (fp4_converter) ──► 32 × fmt_converter ─┬─► 16 × mul_pe ──────────────┐
         (combinational)                        └─► exp_max (add + max trees) ─┤ stage 1
                                                            ▼
                          16 × align_pe (difference, vec_shifter, round, sign)   stage 2
                                                            ▼
                          summation (2 CSA trees, 4:2 compressor, CPA)           stage 3
                                                            ▼
                          normalizer (LZC, shift, round to FP32 / INT32)         stage 4 ─► dp_result
                                                            ▼
                          accumulator (FP32 / FP16 / INT32, 1-cycle loop)        stage 5 ─► d
```

### Multiplication (`mul_pe`)

Each of the 16 processing elements holds two signed multipliers.

- **12×12 multiplier.** This is an 11-bit array plus a sign bit. It makes the E8N10 product, the
  first E5N3 product, or the first INT8 product.
- **9×9 multiplier.** This is an 8-bit array plus a sign bit. It makes the second E5N3 or INT8
  product.

Operand bits that the current format does not use are held at zero, so the unused parts of the
arrays do not toggle. At full width the second multiplier sees zeros. In E5N3 mode only the low
4×4 corner of the first array is driven. The converters likewise zero the views of the formats
not in use. In INT8 mode all product exponents are forced to zero, so the exponent stage is
idle.

The extra sign bit lets signed and unsigned INT8 share the arrays. The sign of a floating-point
product is kept separately. Products with a zero, infinite or NaN operand are forced to zero, and
their exponent is forced to zero as well. Infinities and NaNs reach the output through a
separate exception summary (see below).

### Exponent maximum (`exp_max`)

Product exponents are sums of the two operand exponents. They keep the double bias: 254 for
E8N10 and 32 for E5N3.

- A 9-bit adder per lane serves E8N10 and the first E5N3 term.
- A dedicated 6-bit adder serves the second E5N3 term.

Two independent max trees reduce the exponents, one 9 bits wide and one 6 bits wide. In E5N3
mode a final compare combines the two results. A zero product has exponent 0, so it can never be
the maximum.

### Alignment (`align_pe`, `vec_shifter`)

Each term is shifted right by its distance from the maximum exponent. This stage holds the most
subtle part of the design.

**Shift amounts.** Each lane computes `max − exp`. A shared 10-bit subtractor covers the full
term or the first half term. A dedicated 7-bit subtractor covers the second half term.

**Operand placement.** The 22-bit E8N10 product is padded with zeros at the bottom to 32 bits.
Each 8-bit E5N3 product is padded to 16 bits and placed in its own 16-bit half: the first term
in bits 15:0 and the second in bits 31:16.

**The vectorized barrel shifter** has stages for 1, 2, 4, 8 and 16 positions.

- With `vec = 1` it is an ordinary 32-bit right shifter driven by `shift_high`.
- With `vec = 0` the two halves move independently. The upper half follows `shift_high` and the
  lower half follows `shift_low`. At every stage, the bits that would cross from the upper half
  into the lower half are ANDed with `vec`, so no data leaks between the two terms.
- The 16-position stage is used only at full width. A half-width shift of 16 or more simply
  clears that half.
- A full-width shift of 32 or more clears the whole word.

Bits shifted out of a stage are ORed into a sticky bit, one per half. Over-shifting a non-zero
operand also sets the sticky bit.

**Rounding.** The shifted value is rounded to nearest, ties to even, using the sticky bit.

- At full width it goes from 2.30 to 2.29: 32 bits with one bit of sign headroom.
- At half width it goes from 2.14 to 2.13.

**Sign.** Two's complement needs a "+1" when a term is negative. Rounding needs a "+1" when it
rounds up. The two are never needed together for the same magnitude. A negative term is
therefore emitted as the one's complement of the truncated magnitude. A single increment bit
`inc = sign XOR round_up` completes it, since −(m+1) = ~m. The adder tree adds these increment
bits, so no carry chain is needed in the lane.

**Integers** pass through the shifter with both shift amounts forced to zero. No rounding
or sign step is applied: the two 16-bit INT8 products leave as the two half-width terms.

### Summation (`summation`, `csa_tree`)

Every 32-bit term is split into its upper and lower 16-bit halves. Each half feeds its own
carry-save tree of 16 terms. The trees are 21 bits wide, so the sum of 16 signed 16-bit values
(plus increments) is exact. The increment bits of each tree enter as one extra operand: their
population count.

A configurable 4:2 compressor then merges the two carry-save pairs, and one 36-bit carry-propagate
adder resolves the result.

- **Full width:** the upper pair is shifted left 16 bits before the 4:2 step. The result is the
  sum of the sixteen 32-bit terms. Lower halves are zero-extended here, because they are
  unsigned parts of a wider number.
- **Half width:** the two pairs are stacked without a shift. The result is the sum of all 32
  half-width terms. Halves are sign-extended, except for unsigned × unsigned INT8, whose products
  can reach 65025 and are zero-extended.

### Normalization (`normalizer`)

The normalizer takes the absolute value of the sum and counts leading zeros. It shifts the sum up
and sets the exponent to `max_exp − bias − fraction bits + position of the leading one`. The
subtracted values are 254 and 29 at full width, and 32 and 13 at half width. The value is then
rounded to FP32: nearest, ties to even, with FP32 subnormals and overflow to infinity.

- An exactly zero sum gives +0.
- INT8 sums bypass all of this. They are sign-extended (or zero-extended) to INT32.

**Exceptions.** In stage 1 every product is classified, and the result is overridden as follows:

| case | result |
|---|---|
| any NaN operand, ∞ × 0, or both +∞ and −∞ products | NaN 0x7FC00000 |
| otherwise, an infinite product | ±∞ |

### Late accumulation (`accumulator`)

The FP32 dot product result is added to the accumulator. The accumulator keeps its own format.

- **FP32 + FP32 → FP32**, IEEE round to nearest even.
- **FP16 + FP32 → FP16**, rounded *once*. The FP32 value is not first rounded to FP16.
- **INT32 + INT32**, wrapping.

The floating-point adds are exact before rounding. They use a 64-bit window with 38 guard bits
and a jammed sticky bit, and a shared round-and-pack routine with the normalizer. The result
register feeds straight back, so back-to-back operations accumulate without stalls.

## Interface and timing (`vfdp_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` | in | 1 | an operation is presented this cycle |
| `in_fmt` | in | 3 | 0 INT8, 1 E4M3, 2 E5M2, 3 FP16, 4 BF16, 5 FP4 (`fdp_pkg::in_fmt_e`) |
| `a_signed`, `b_signed` | in | 1 | INT8 signedness of a and b |
| `out_fmt` | in | 2 | accumulator format: 0 FP32, 1 FP16 (in bits 15:0), 2 INT32 |
| `acc_load` | in | 1 | start from `c_in` instead of the previous `d` |
| `c_in` | in | 32 | initial accumulator value c |
| `a`, `b` | in | 16·K | element i in bits 16i+15:16i (16-bit formats), 8i+7:8i (8-bit) or 4i+3:4i (FP4) |
| `dp_valid`, `dp_result` | out | 1, 32 | a·b as FP32 (INT32 for INT8), 4 clocks after `in_valid` |
| `d_valid`, `d` | out | 1, 32 | accumulated result, 5 clocks after `in_valid` |

Each operation carries its own formats, so modes can change every clock. Pair INT8 inputs with
`out_fmt` INT32, and floating-point inputs with FP32 or FP16. Nothing checks this.

Accumulation chains through `d`. Operation n+1 adds to the `d` produced by operation n,
whatever cycles lie between them. Only the valid bits and the accumulator are reset. The other
pipeline registers hold whatever was last clocked in and are qualified by the valid bits.

A concurrent assertion in `vfdp_top` checks that no product exponent entering alignment exceeds
the maximum, so the shift-amount subtractors never borrow. Simulate with `--assert` to enable it.

The parameter `K` (default 16) sets the depth: K full-width or 2K half-width terms. The internal
widths follow from it.

## Accuracy and how far to trust the result

Rounding happens in three places:

1. Each aligned product is rounded to 29 fraction bits (full width) or 13 (half width) below
   the largest product.
2. The sum is rounded to FP32.
3. The accumulator addition rounds.

So the result equals a precisely defined reference, but it is not the correctly rounded dot
product. Products far below the maximum lose bits or vanish.

The alignment error is bounded. With n terms, largest product exponent g and p fraction bits
per aligned term (29 or 13), it is at most (n − 1) · 2^(g − p − 1). On top of that come the
final roundings.

`tb_vfdp_accuracy` measures the forward error on 100,000 random dot products per configuration.
Every input bit is independent and uniformly random. Results that are infinite, NaN or exactly
zero are left out, for the unit or for any of the reference methods. The unit is compared with
three references. All of them form the products exactly:

- *recursive*: the products are added one after another into an accumulator in the output
  format, with one correct rounding per addition;
- *pairwise*: the products are added in a balanced binary tree in the output format, with the
  same rounding;
- *correctly rounded*: the exact dot product, rounded once.

The averages, in ulp of the output format:

| multiply | depth | accumulate | kept | recursive | pairwise | this unit | correctly rounded |
|---|---|---|---|---|---|---|---|
| FP16 | 16 | FP32 | 36,095 | 0.860 | 0.800 | 0.254 | 0.248 |
| BF16 | 16 | FP32 | 10,215 | 0.173 | 0.170 | 0.143 | 0.143 |
| E4M3 | 32 | FP16 | 46,105 | 2.474 | 1.953 | 0.487 | 0.251 |
| E5M2 | 32 | FP16 | 132 | 1.263 | 1.065 | 0.319 | 0.239 |

The testbench checks that the unit is more accurate on average than both baselines, and that it
exceeds 0.5 ulp less often. It also prints P(error > x) for x = 0.5, 1, 2 and 4 ulp. For FP16, the
unit exceeds 0.5 ulp in 1.2% of cases, against 45% for recursive summation. Beyond 1 ulp it is
below 0.1%.

The unit's averages are close to the values published for this architecture: 0.259 (FP16),
0.145 (BF16), 0.490 (E4M3) and 0.406 (E5M2). The published baselines are higher for FP16 (1.373 recursive,
1.310 pairwise). The ordering of the methods is the same in every row.

E5M2 needs care. With uniformly random bits, almost every E5M2 dot product overflows FP16, so
only about 0.1% of the samples are kept. Those are mostly cancellations between large products.
That row therefore says more about the input distribution than about the unit. If the baselines'
overflows are not excluded, the average of the unit over its own finite results rises to about
2.9 ulp.

Every measured result stays within the bound above. The testbenches also compare the unit bit
for bit against an independent model of exactly this definition.

## Choices made in this implementation

The architecture fixes the stages, the internal widths and the vectorization. The following
details are this implementation's own:

- the E8N10 exponent bias (127);
- round to nearest, ties to even, at every rounding point;
- the NaN encodings (0x7FC00000, and 0x7E00 for FP16) and the exception rules above;
- +0 for an exact zero sum;
- one register after each of the five steps, with the converters combinational in front of
  stage 1;
- the `c_in`/`acc_load` interface and the extra `dp_result` output;
- a single input format shared by a and b;
- increments entering the trees as a population count;
- the structure of the accumulator adder.

The partial-product array sharing of the multipliers is left to synthesis. The RTL describes
two signed multipliers.

FP4 support assumes the MX E2M1 encoding, with E4M3 as the FP8 target.

Not included: application of MX block scale factors. Those would act on the result, outside
the unit.

Also not included: single-format (scalar) and INT8/E5N3-only (merged) variants of the unit.
The RTL builds only the full multiprecision, vectorized configuration.

## Files

| file | content |
|---|---|
| `rtl/fdp_pkg.sv` | types (formats, internal values, exception summary) and shared functions (leading-zero count, FP32/FP16 round-and-pack) |
| `rtl/fp4_converter.sv` | FP4 (E2M1) to E4M3 widening |
| `rtl/fmt_converter.sv` | input conversion of one 16-bit slot |
| `rtl/mul_pe.sv` | multiplication processing element |
| `rtl/exp_max.sv` | exponent adders and max trees |
| `rtl/vec_shifter.sv` | vectorized barrel shifter with sticky |
| `rtl/align_pe.sv` | alignment, rounding, sign |
| `rtl/csa_tree.sv` | carry-save reduction tree |
| `rtl/summation.sv` | two trees, 4:2 compressor, CPA |
| `rtl/normalizer.sv` | normalization and FP32 rounding |
| `rtl/accumulator.sv` | late accumulation |
| `rtl/vfdp_top.sv` | the whole pipeline |
| `tb/tb_fp_pkg.sv` | real-number reference arithmetic for the testbenches |
| `tb/tb_<block>.sv` | one self-checking testbench per block |

## Simulation

The testbenches use Verilator 5 with timing support. Each prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. For example:

```
verilator --binary --timing --assert --top-module tb_vfdp_top -y rtl -y tb +libext+.sv \
    rtl/fdp_pkg.sv tb/tb_fp_pkg.sv tb/tb_vfdp_top.sv -o sim
./obj_dir/sim
```

Replace `vfdp_top` with any block name to run that block's testbench.

| testbench | what it checks |
|---|---|
| `tb_fp4_converter` | all 16 FP4 codes in every position and random vectors, checked by value and sign |
| `tb_fmt_converter` | all FP16 and BF16 codes, all FP8 codes, INT8 pass-through, against real-number decoding |
| `tb_mul_pe` | random and corner products in all three modes and every INT8 signedness |
| `tb_exp_max` | product exponents and the maximum, with zero products, in both float modes |
| `tb_vec_shifter` | every full-width shift 0..511, and independent half-width lanes with no leakage |
| `tb_align_pe` | aligned, rounded and signed terms and increments against a real-number model |
| `tb_summation` | exact sums of random and extreme terms at both widths, signed and unsigned |
| `tb_normalizer` | FP32 rounding, including subnormal and overflowing results; exception overrides; integer bypass |
| `tb_accumulator` | long FP32, FP16 and INT32 accumulation chains with reloads, cancellation and inf/NaN; one-cycle latency |
| `tb_vfdp_top` | the whole unit at its default size |
| `tb_vfdp_accuracy` | forward-error statistics of the whole unit (see above) |
| `tb_vfdp_matmul` | 4 x 4 matrix products built from four chained dot products per element, through the accumulator return path, in INT8/INT32 (exact), FP16/FP32 and E4M3/FP16 (bit-exact accumulation, bounded error) |

`tb_vfdp_top` runs 6000 random back-to-back operations, mixing every input and accumulator
format. It checks `dp_result` and `d` bit for bit against a model built on real numbers, and
checks the 4- and 5-cycle latencies. It also counts how often each mechanism occurs, and fails
if any never occurs. The mechanisms are:

- each input format (FP4 included) and accumulator format;
- reloads and back-to-back accumulation;
- subnormal inputs;
- terms rounded or shifted out entirely in alignment;
- cancellation to zero;
- NaN, infinite and subnormal results;
- a maximum exponent coming from the second half-width tree.
