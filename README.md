# Single-precision fused multiply-add: carry-save product, one carry-propagate add, one rounding

This RTL computes `result = a + b * c` on IEEE-754 single-precision numbers
and rounds only once, to nearest with ties to even. It is a classic
("conventional") fused multiply-add organisation, pipelined in three stages:

1. **Multiply and align.** The 24×24 significand product is left in
   carry-save form (two 48-bit vectors) and never resolved on its own. In
   parallel, the addend significand is inverted for an effective
   subtraction and right-shifted into place. A row of 3:2 counters then
   folds it into the two product vectors.
2. **Add and anticipate.** A single 75-bit carry-propagate adder produces
   the sum. Alongside it, a leading-zero anticipator (LZA) predicts where the
   sum's leading digit will be, so that the normalization count is ready
   when the sum is. A negative sum is inverted to its magnitude before the
   stage register.
3. **Normalize and round.** Two normalize-and-round paths then run side by side, because the prediction
   may be one position short: one path shifts by the predicted count, the
   other by one more. A 2:1 multiplexer picks the correct path, so no
   shift is needed after rounding.

The organisation, widths, formulas, LZA equations, LZD tree and the
duplicated rounding paths come from a published FPGA design of this unit.
That design left some things open: where the registers go, the special
values, and a few exactness details. Those are this implementation's
choices, listed in [Departures and choices](#departures-and-choices).

## Interface and timing

| port     | dir | width | meaning |
|----------|-----|-------|---------|
| `clk`    | in  | 1     | clock; everything is updated on the rising edge |
| `a`      | in  | 32    | addend (IEEE single) |
| `b`, `c` | in  | 32    | multiplicands (IEEE single) |
| `result` | out | 32    | `a + b*c` (IEEE single) |

- One operation is accepted every clock. There is no handshake and no
  valid signal.
- The operands are sampled on one rising edge (edge *n*). The result is in
  the output register after edge *n+2*. There are registers after stage 1,
  after stage 2 and on the output, so the latency is 3 edges, counting the
  sampling edge.
- There is no reset. The pipeline holds only data, so after three clocks of
  valid inputs the output is valid.
- There is no op-code. To compute `a - b*c`, flip the sign of `b` or `c`.
  To compute `b*c - a`, flip the sign of `a`.

Numeric behaviour:

| case | behaviour |
|------|-----------|
| normal operands | exact `a + b*c`, rounded once to nearest even |
| subnormal operand | read as zero (sign kept for zero-sign rules) |
| result below 2^-126 after rounding | signed zero (flush) |
| result at or above 2^128 after rounding | signed infinity |
| exact zero result | +0, except two zero terms of the same sign, which give that signed zero |
| NaN operand, ∞·0, ∞ − ∞ | quiet NaN `7fc00000` |
| other infinities | infinity with the sign of the infinite term |

## The 74-bit alignment field (stage 1)

This is the part that is hardest to follow, so here it is in detail. All
bit numbers count up from the LSB.

```
 bit: 73            50 49 48 47                             0
      +---------------+--+--+--------------------------------+
      | addend (24 b) |g |g |  product b*c  (48 b, 2.46 fmt) |
      +---------------+--+--+--------------------------------+
       unshifted addend       bit 46 has weight 2^(exp_b+exp_c-127)
```

- The product of two `1.f` significands lies in [1, 4), so its leading one
  is at bit 46 or 47. The addend's leading one, unshifted, is at bit 73,
  which is 27 positions above bit 46.
- Let `d = exp_a − (exp_b + exp_c − 127)`. To line the two terms up, the
  addend is shifted right by `shamt = 27 − d` (`align_shift_calc`).
- The two guard positions (bits 49 and 48) let a product sitting just
  below an unshifted addend still be rounded correctly.

The shift is limited at both ends:

- **shamt > 74.** The addend lies entirely below the field. It is clamped
  to 74, and whatever falls off the bottom is caught by `align_shifter`'s
  `sticky` output.
- **shamt < 0.** The product is more than 27 binades below the addend. The
  shift becomes 0 and `prod_small` is raised. The product's sum and carry
  vectors are then replaced by a single 1 in bit 0. The product can only
  affect rounding as a sticky bit, and a 1 at the LSB has that effect, with
  the right sign for a subtraction as well.
- **Zero product.** The shift becomes 0, so the addend simply passes
  through.

Inversion:

- On an effective subtraction (`sign_a ≠ sign_b ^ sign_c`, decided in
  `sign_logic`), the addend
  significand is inverted *before* it is shifted. The bits shifted in are
  1s, which keeps the one's-complement sign extension.
- The +1 that completes the two's complement is the adder's carry-in.
  It is left out when `sticky` is set. The in-field value then equals the
  exact sum rounded down, and the lost fraction is carried by the sticky
  bit.

Only the field's 48 LSBs go through the 3:2 row (`csa32`) with the
multiplier's two vectors. The 26 upper bits, plus the sign bit 74, bypass
it and go straight into the adder's upper part.

Why the multiplier can be truncated to 48 bits: `array_multiplier` reduces
24 AND-array rows (no Booth recoding) with a tree of 4:2 compressor rows
(24 → 12 → 6 → 4 → 2). Every row is non-negative and the true product is
below 2^48. So neither output vector can have a bit at 2^48 or above, and
dropping the tree's top carries loses nothing. The identity
`sum + carry = b_sig * c_sig` is therefore exact, and the 3:2 row can work
on 48 bits.

## The final adder and the leading-zero anticipator (stage 2)

The adder operands are:

- `x = {sign, field[73:48], csa_sum}`
- `y = csa_carry << 1`

`cpa` is a compound adder that produces both `x + y` and `x + y + 1`. The
true sum is `x + y + cin`. Its MSB is the sign of the result relative to
the product's sign.

- **Positive result.** The complementer receives the true sum.
- **Negative result.** The complementer receives `x + y`. A negative sum only
  occurs with `cin = 1`, so its magnitude is `−(x + y + 1) = NOT(x + y)`.
  The complementer therefore needs only inverters and no incrementer, and
  the LZA predicts exactly the quantity that gets inverted.

The LZA (`lza`) numbers the bits from the MSB (index 0 = bit 74), so that a
position equals a left-shift count. For each position it computes
`p = x^y`, `z = ~x&~y`, `g = x&y` and then:

```
pos[i] = p[i] XNOR z[i+1]        (string for a positive sum)
neg[i] = p[i] XNOR g[i+1]        (string for a negative sum)
```

The last position has no right neighbour and is forced to 1 in both
strings. Without this, a sum such as `0 + carry-in` would leave both
strings empty.

If the first 1 of the string that matches the sign is at index *c*, the
magnitude's leading one is at index *c* or *c + 1*. It is never elsewhere.
`tb_lza` checks this property on adder-shaped operands and checks that both
outcomes occur.

Two hierarchical leading-one detectors (`lzd`, 128 wide, with the strings
zero-padded) encode the two strings at once:

- The leaf is a 2-bit cell: `pos = ~b0`, `valid = b0|b1`.
- Each level combines two halves: `pos = {~v_left, v_left ? p_left : p_right}`.
- The sign of the completed sum selects one of the two counts through a
  2:1 multiplexer, and that count is registered.
- `complementer` inverts the sum when it is negative, and the result's
  sign (product sign XOR sum sign) is formed here too. The stage-2
  register therefore holds a magnitude, a sign and a count.

## Dual normalize-and-round, packing (stage 3)

Each `norm_round_path` works as follows:

- It shifts the 75-bit magnitude left by `cnt + EXTRA` and assumes the
  leading one is now at bit 74.
- It takes the significand from bits 74..51, the round bit from bit 50, and
  the sticky bit as the OR of bits 49..0 with the alignment sticky.
- It rounds to nearest even (`ieee_round`). If the round-up carries out,
  the significand becomes `1.000…` and the exponent goes up by one.
- It computes the exponent (`exponent_adjust`) as
  `exp = exp_ref + 28 − (cnt + EXTRA)`, where `exp_ref` is the biased
  exponent of field bit 46.

`norm_round_dual` runs two paths, `EXTRA = 0` and `EXTRA = 1`. It keeps the
first one when that path's shifted MSB is set, and the second otherwise.
The post-normalization shift is gone: what remains is a 2:1 multiplexer
after two copies of the shifter and rounder.

Finally, `fma_top` applies, in order: special values, exact zero,
exponent ≥ 255 (gives infinity), exponent ≤ 0 (gives a signed zero). Then
it packs the result. Exponents travel as signed 11-bit biased values, so
intermediate overflow and underflow are never ambiguous.

## Worked examples

These are the operand sets of the published simulation runs, with the
correctly rounded results this RTL produces. All of them are in
`tb_fma_top`.

| a | b | c | result |
|---|---|---|--------|
| 0 (`00000000`) | 0 | 0 | `00000000` |
| 0 | 3555 (`455E3000`) | 47600 (`4739F000`) | `4D2160FD` |
| 1 (`3F800000`) | 857687 (`49516570`) | −850000 (`C94F8500`) | `D329BDCF` |
| 1e-10 (`2EDBE6FF`) | 857687 | −850000 | `D329BDCF` |
| 54000 (`4752F000`) | 0 | 47600 | `4752F000` |
| 54000 | 3555 | −47600 (`C739F000`) | `CD2153CE` |
| −23567 (`C6B81E00`) | −4599 (`C58FB800`) | −0.00237 (`BB1B5200`) | `C6B80833` |

The published waveforms show results one unit in the last place higher for
the third, fourth and last rows (`D329BDD0`, `…834`). That matches a
rounding step that adds one ulp rather than rounding to nearest even; the
later, optimized version of the design specifies round to nearest even,
which this RTL implements. The published panels also show a few operand
bit patterns that differ in one bit from the decimal values named with
them. The decimal values above reproduce the printed results of the second
and sixth rows exactly.

## Departures and choices

What follows the published design:

- The three phases and their blocks.
- The 24-bit significands and the 74-bit alignment field with two guard
  positions.
- The shift formula `27 − d` and the product exponent `exp_b + exp_c − 127`.
- The inversion before alignment, with the fill equal to the inversion
  flag.
- The 48-bit 3:2 row.
- The multiplier: 4:2 compressors, no Booth recoding.
- The 75-bit adder.
- The LZA string equations and the LZD cell and tree.
- The 2:1 selection of the LZD count by the sign of the sum.
- The complementer as inverters acting on negative results only. It sits
  in stage 2 with the sign logic, as in the pipelined version of the
  design; the earlier, unpipelined drawing places it with normalization.
- The duplicated normalize-and-round paths with a 2:1 multiplexer.
- Round to nearest even.
- The port list: 32 × 4 + clock = 129 pins, the same count as the published
  FPGA build.

This implementation's own choices:

- **Register placement.** Registers sit at the three stage boundaries. The
  published build reports more flip-flops than this, but does not say where
  they are.
- **Compound adder.** The adder also produces `x + y + 1`, which makes the
  inverter-only complementer exact.
- **Alignment sticky.** A sticky bit for addend bits shifted out of the
  field, together with suppression of the carry-in when it is set.
- **Clamping and the small-product replacement.** The clamping rules for
  `shamt` and the replacement of a far-too-small product by a sticky 1.
- **LZA last position.** The last position of both LZA strings is forced
  to 1.
- **Special values.** Subnormal flushing, overflow to infinity, and NaN and
  infinity handling. None of these is described for the original.
- **Tree grouping.** How the multiplier tree groups its rows. The original
  says only "a tree of 4:2 compressors".

Not built:

- The earlier, unpipelined version of the same unit. It differs in its
  rounding step and its overflow output.
- The counting-style LZA described for that version.

## How far it has been checked

- **Every block has a self-checking testbench** that compares it with an
  independent model: exhaustive checks for the 4:2 slice, arithmetic
  identities, bit loops, or a quarter-ulp rounding model.
- **`tb_fma_top`** runs the published operand sets, 18 directed cases and
  30,000 random operations back to back. It compares each result, at
  exactly three edges, with a 720-bit exact fixed-point model that shares
  no structure with the datapath.
- **Mechanism counts.** `tb_fma_top` also counts how often each mechanism
  fires: effective subtraction, negative sum, one-more-shift path, small
  product, alignment sticky, clamped shift, round-up, rounding carry-out,
  overflow, underflow, special values, zero result and zero product. A
  mechanism that never fires is counted as a failure.
- **Not checked:** timing or area on any FPGA. Generic synthesis of
  `fma_top` gives about 4,600 word-level cells and 272 flip-flop bits.

## Files

`rtl/` (one module or package per file):

| file | role |
|------|------|
| `fma_pkg.sv` | widths, constants, `fp32_t`, operand classes, stage-register structs |
| `fma_top.sv` | the three stages, special values, packing, pipeline registers |
| `sign_logic.sv` | product sign, effective subtraction, sign of an exact zero |
| `array_multiplier.sv`, `pp_tree.sv`, `compressor42_row.sv`, `compressor42.sv` | AND array and 4:2 compressor tree |
| `csa32.sv` | 3:2 carry-save row |
| `align_shift_calc.sv`, `align_shifter.sv` | exponent compare and shift count; inverter and 74-bit shifter |
| `cpa.sv` | 75-bit compound adder |
| `lza.sv`, `lzd.sv` | leading-zero anticipator and detector |
| `complementer.sv` | inversion of negative sums |
| `norm_shifter.sv`, `sticky_logic.sv`, `exponent_adjust.sv`, `ieee_round.sv`, `norm_round_path.sv`, `norm_round_dual.sv` | normalization, exponent and rounding |

`tb/` holds one testbench per block, named `tb_<module>.sv`, and
`tb_fma_top.sv` for the whole unit. Each testbench ends by printing
`TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl \
    rtl/fma_pkg.sv tb/tb_fma_top.sv --top-module tb_fma_top
./obj_dir/Vtb_fma_top
```

Any block testbench is built the same way: swap in its file and top-module
name. The full-unit run takes well under a second once it is built.
Verilator lint reports ascending-range warnings for `lza` and `lzd`. These
are intended: those modules number bits from the MSB, as the shift counts
do.

To change the unit:

- The widths live in `fma_pkg`. They are tied to single precision:
  `ALIGN_W = 24 + 2 + 48`, the shift base 27, and the exponent offset 28 in
  `exponent_adjust`.
- The block modules (`array_multiplier`, `csa32`, `cpa`, `lza`, `lzd`,
  `align_shifter`) are parameterized by width and can be reused for other
  formats.
