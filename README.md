# Multi-mode IEEE 754 floating point unit

A floating point co-processor that adds, subtracts and multiplies in any of
the three IEEE 754 binary formats a program is likely to mix: half (16-bit),
single (32-bit) and double (64-bit) precision. A 2-bit mode input picks the
precision and a 2-bit function input picks the operation. Each precision has
its own adder/subtractor and its own multiplier. All six are built from the
same parameterized RTL, so one set of arithmetic code serves all three
formats.

| format | width | exponent bits | fraction bits | bias | operands |
|--------|-------|---------------|---------------|------|----------|
| half   | 16    | 5             | 10            | 15   | `a_short`, `b_short` |
| single | 32    | 8             | 23            | 127  | `a_single`, `b_single` |
| double | 64    | 11            | 52            | 1023 | `a_double`, `b_double` |

Results are **truncated**, which is IEEE 754 round-toward-zero. Subnormal
numbers are fully supported as inputs and as results.

## Using the unit (`fpu_top`)

| `mode` | precision | | `fpf` | operation |
|--------|-----------|-|-------|-----------|
| 00 | half   | | 00 | a + b |
| 01 | single | | 01 | a - b |
| 11 | double | | 10 | a * b |
| 10 | reserved: `illegal` | | 11 | reserved: `illegal` |

The mode codes and the add/subtract codes are those of the original
description. The multiply code `10` is this design's own choice.

Timing is a two-stage pipeline. On a rising edge with `start` high, the
unit registers `mode` and `fpf`, plus the two operands of the selected
precision. The operand registers of the other two precisions keep their old
values, so their units do not switch. The arithmetic between the two
register stages is purely combinational. On the next edge the selected
result and its flags are registered, and `done` is high for one cycle.

* Latency: the result appears two cycles after the cycle in which `start`
  was high.
* Throughput: one operation per cycle. `start` may stay high.
* `result` is 64 bits wide, with half and single results right-aligned and
  the upper bits zero. `result`, `flags` and `illegal` hold their values
  until the next `done`.
* For a reserved code, `result` and `flags` are zero and `illegal` is 1.
* `rst_n` is an asynchronous, active-low reset that clears every register.

### Flags (`fpu_pkg::fp_flags_t`)

| flag | meaning |
|------|---------|
| `overflow`  | the exact result is larger than the largest finite number; the result is then the largest finite number with the right sign (round-toward-zero) |
| `underflow` | the exact result is non-zero but smaller than the smallest normal number; the result is the truncated subnormal, or zero |
| `zero`      | the delivered result is +0 or -0 |
| `infinity`  | at least one operand is an infinity |
| `invalid`   | inf - inf (as an effective subtraction) or 0 * inf |

Special operands follow IEEE 754. An infinite operand gives an infinity. A
NaN operand, inf - inf or 0 * inf gives the quiet NaN `0 11..1 10..0`. An
exact zero difference is +0, except when both effective addends are -0.

## How the adder/subtractor works (`fp_addsub`)

The hard part of a floating point adder is lining the two operands up, then
bringing the sum back into normal form without losing the correct
truncation. The datapath has four steps.

1. **Unpack** (`fp_unpack`). The unpacker splits each operand into sign,
   exponent and fraction. For normal numbers it puts the hidden leading 1
   back. A subnormal gets a leading 0 and the effective exponent 1, so it
   can be aligned like any other number. For a subtraction the sign of `b`
   is flipped here. From then on everything is an addition of signed
   magnitudes.
2. **Compare and shift** (`fp_align`). The comparator finds the operand
   with the larger magnitude. It compares exponents first, then
   significands when the exponents are equal. That operand comes first, so
   an effective subtraction never gives a negative result. The smaller
   significand is shifted right by the exponent difference *e*. Both
   significands carry three extra bits below the LSB: guard, round and
   sticky. Every bit shifted past the sticky position is ORed into it. For
   *e* of 1 or less, nothing falls off the end. For larger *e*, the result
   can need at most a one-bit left shift, so guard and round are enough.
   The sticky bit records that something below was non-zero. That is
   exactly what truncation needs: a - (b + tiny) must truncate one unit
   below a - b.
3. **Add or subtract** the aligned significands, in a field one bit wider
   for the carry.
4. **Normalize and pack** (`fp_normalize`). A leading-zero count moves the
   first 1 to the hidden-bit position. The count covers the one-bit right
   shift after a carry and any left shift after cancellation. The exponent
   is adjusted by the same amount. Then:
   * If the exponent is too large, the result is the largest finite number
     and `overflow` is set.
   * If the exponent is below 1, the significand is shifted right until the
     exponent is 1. The result is then a subnormal or zero, and `underflow`
     is set.
   * Otherwise the bits below the fraction are dropped.

   The unit never rounds up, so no second normalization is needed.

The sign of the result is the sign of the larger operand.

## How the multiplier works (`fp_mul`)

The multiplier works in four sections.

* **Sign**: the result sign is the XOR of the input signs.
* **Exponent**: the exponent is `ea + eb - bias`, where the bias is
  2^(exponent bits - 1) - 1.
* **Mantissa**: the product of the two (MAN_W+1)-bit significands is
  2·(MAN_W+1) bits wide. That is 22 bits for half precision, 48 for single
  and 106 for double.
* **Flags**: the flags are set as described above.

The product goes to the same `fp_normalize` stage as the adder's sum. If
the product has a 1 in its MSB, the normalizer shifts it right by one and
increments the exponent. With subnormal inputs the product can have leading
zeros, and the leading-zero count handles that. Results that are too small
become subnormals or zero, with `underflow` set.

## Files

| file | contents |
|------|----------|
| `rtl/fpu_pkg.sv` | mode and function enums, flag struct, format widths |
| `rtl/fpu_top.sv` | mode/function decode, operand and result registers, six arithmetic units, result select |
| `rtl/fp_addsub.sv` | adder/subtractor of one precision (`EXP_W`, `MAN_W`) |
| `rtl/fp_mul.sv` | multiplier of one precision |
| `rtl/fp_align.sv` | exponent comparator and alignment shifter, with guard/round/sticky bits |
| `rtl/fp_normalize.sv` | leading-zero normalization, truncation, overflow/underflow, packing |
| `rtl/fp_unpack.sv` | field extraction and operand classification |
| `tb/fp_ref_pkg.sv` | reference model and operand generator used by the testbenches |
| `tb/fp_unit_checker.sv` | random and corner-case driver for one adder and one multiplier |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_fpu_top` runs the whole unit |

The arithmetic modules default to single precision (`EXP_W=8`,
`MAN_W=23`). `fpu_top` sets the parameters of each instance from the
constants in `fpu_pkg`. Any other IEEE-style format works too: set `EXP_W`
and `MAN_W`.

## Verification

The testbenches do not use a floating point library. The reference model
(`tb/fp_ref_pkg.sv`) turns every finite operand into an exact integer
multiple of the format's smallest subnormal. It holds these integers in a
vector of 2^(EXP_W+1) + 2·MAN_W + 8 bits, which is about 4,200 bits for
double precision. Sums and products are formed exactly, and the exact value
is then truncated into the format. The model therefore shares no structure
with the hardware: no alignment shifter, no sticky bit and no exponent
arithmetic. Each testbench also checks a few values worked out by hand.

| testbench | what it checks |
|-----------|----------------|
| `tb_fp_unpack` | fields and classes for single and half operands: 56,000 checks |
| `tb_fp_align` | operand order and the aligned significand with sticky bit, against exact division: 120,000 checks |
| `tb_fp_normalize` | single and half packing of random exponents and significands, with flags: 80,000 checks |
| `tb_fp_addsub` | all three precisions: 31,000 random and corner-case vectors, each of which must at some point cause cancellation, far-apart exponents, overflow and underflow |
| `tb_fp_mul` | all three precisions: 31,000 vectors, each of which must cause overflow and underflow |
| `tb_fpu_top` | 30,000 cycles of random issue through the real top. It covers every mode and function including the reserved codes, back-to-back issue and mode switches, and every flag. A scoreboard checks each result, its flags and the exact 2-cycle latency |

`fpu_top` also contains concurrent assertions. They check that `done`
follows `start` by two cycles, and that a precision's operand registers
hold their values whenever that precision is not selected. Simulate with
assertions enabled (`--assert`) to get these checks.

The random operands are built to hit corner cases. They favour exponents
near each other, which causes cancellation. They also favour exponents far
apart, extreme exponents, subnormals, zeros, infinities and NaNs, and equal
or nearly equal fractions.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_fpu_top rtl/fpu_pkg.sv tb/fp_ref_pkg.sv tb/tb_fpu_top.sv
./obj_dir/Vtb_fpu_top
```

Every testbench ends with a line `TB_RESULT checks=N failures=M`. Replace
`tb_fpu_top` with any other `tb_*` name to run that testbench. The
`-Wno-fatal` option is needed only because Verilator reports the implicit
width extensions in the testbenches' check calls as warnings.

## Where this design makes its own choices

The original description gives the formats, the mode and add/subtract
codes, the compare/shift/add structure of the adder and the four sections of
the multiplier. Everything below was decided here.

* **Rounding.** The multiplier was specified to truncate. The adder was not
  specified, and it truncates too. Both give exactly the IEEE 754
  round-toward-zero result. The guard/round/sticky bits exist for that
  reason. No other rounding mode is offered.
* **Overflow value.** On overflow the result is the largest finite number,
  not infinity. This follows from round-toward-zero.
* **Subnormals and NaNs.** Full gradual underflow and NaN handling follow
  IEEE 754. The `invalid` flag is an addition.
* **Flag definitions.** The infinity flag reports an infinite *operand*.
  The zero flag reports a zero *result*. The underflow flag is raised when
  the exact result is below the smallest normal number, whether or not it
  is exact. This is the "exponent sum below the bias" rule, extended to
  subnormal operands.
* **Interface.** The multiply code, the reserved codes, the start/done
  handshake, the pipeline registers, the reset, the shared 64-bit result
  bus and the names `a_double`/`b_double` are all choices of this design.
* **One unit per precision.** The three precisions use separate hardware
  rather than one shared datapath. The description calls each one a
  precision "unit" that the mode bits enable. Only the selected precision's
  operand registers load.
* **Not covered.** There are no exception traps, no division or square
  root, no conversion between formats and no signalling-NaN distinction.
  All NaNs are treated alike.
