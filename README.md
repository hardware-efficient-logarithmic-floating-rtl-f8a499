# Logarithmic floating-point multipliers with double-sided error

A conventional floating-point multiplier spends most of its area and power
on the mantissa multiplier and the rounding unit. A *logarithmic* multiplier
removes both. It takes an approximate base-2 logarithm of each mantissa,
adds the two logarithms, and takes an approximate anti-logarithm of the sum.
With Mitchell's classic approximation (log2(1+x) ≈ x, 2^l ≈ 1+l) this needs
only an adder and a little wiring. However, it always *underestimates* the
product, and in long sums of products (DCTs, neural-network layers) these
one-sided errors accumulate.

This RTL implements five multipliers in IEEE-754 style formats. They use
only adders, multiplexers and a handful of gates, and four of them give a
**double-sided** error: some products are too large and some too small, so
errors largely cancel in accumulations.

| Multiplier  | Logarithm                    | Anti-logarithm              | Radix-4 |
|-------------|------------------------------|-----------------------------|---------|
| FPLM-1      | method 1 (nearest power of two) | Mitchell, with renormalisation of negative sums | no  |
| FPLM-2      | method 2 (halved upper mantissas) | four-region piecewise    | no      |
| FPLM-1-r4   | method 1                     | as FPLM-1                   | yes     |
| FPLM-2-r4   | method 2                     | as FPLM-2                   | yes     |
| CLM-r4      | Mitchell                     | Mitchell                    | yes     |

All five are purely combinational and parameterised by the exponent width
`W` and the mantissa width `Q`. The default is IEEE single precision
(`W=8, Q=23`). Half precision (5, 10), bfloat16 (8, 7) and FP8 (5, 2) are
parameter settings, and all four formats are verified.

## Number format and the shared exponent path

Operands and products are `{sign, W-bit biased exponent, Q-bit mantissa}`,
with bias `2^(W-1)-1` and a hidden leading 1. Write `x` for the mantissa
fraction (0 ≤ x < 1), so the significand is `1+x`.

Every multiplier ends in the same stage, `fp_exp_exc`:

* sign = `S_A xor S_B`;
* exponent = `E_A + E_B + Carry_E − bias`, computed in **one** adder. The
  multiplier-specific `Carry_E` bit absorbs all exponent corrections (operand
  conversion and renormalisation). The adder is `W+2` bits wide and signed,
  so overflow and underflow are visible;
* exception handling and packing (see *Exceptions* below).

There is no rounding: the anti-logarithm bits are used as they are.

## FPLM-1: nearest-one logarithm

**Idea.** Rather than always using the power of two just below the operand
(which makes Mitchell's logarithm too small), use the *nearest* power of
two. For `x ≥ 0.5` the operand is rewritten as `2^(e+1) · (1+x)/2`. The
significand `(1+x)/2` lies in [0.75, 1), so its logarithm
`(1+x)/2 − 1` is negative. The logarithm then over- or underestimates
depending on the operand.

**Logarithm estimator (`fp_le1`).** One 2:1 multiplexer selected by
`M[Q-1]`, producing a (Q+1)-bit two's complement value with Q fraction bits:

| `M[Q-1]` | value           | bits                 |
|----------|-----------------|----------------------|
| 0        | x               | `0 . M[Q-1] … M[0]`  |
| 1        | (1+x)/2 − 1     | `1 . 1 M[Q-1] … M[1]`|

The halving is wiring. `M[0]` is dropped in the upper case.

**Sum and anti-logarithm (`antilog1`).** A (Q+1)-bit adder gives
`l = log_A + log_B` in [−0.5, 1). Mitchell's `2^l ≈ 1+l` is used for both
signs:

* `l ≥ 0` (`sum[Q]=0`): the product mantissa is `sum[Q-1:0]`;
* `l < 0` (`sum[Q]=1`): `1+l = 0.1 sum[Q-2:0]` lies in [0.5, 1). It is
  doubled to `1.sum[Q-2:0]0`, so the mantissa is `{sum[Q-2:0], 0}` and the
  exponent drops by one.

**Carry_E — the subtle part.** The exponent must be
`E_A + E_B − bias + c_A + c_B − s`. Here `c_A = M_A[Q-1]` and
`c_B = M_B[Q-1]` are the +1s from the nearest-one conversion, and
`s = sum[Q]` is the −1 from doubling. Only one carry bit is available, but
the cases reduce to one bit:

| `M_A[Q-1] M_B[Q-1]` | possible `s` | correction | Carry_E  |
|---------------------|--------------|------------|----------|
| 00                  | always 0     | 0          | 0        |
| 11                  | always 1     | +1+1−1     | 1        |
| 01 / 10             | 0 or 1       | +1−s       | NOT s    |

In gates this is `Carry_E = NOT((s OR NOT(a OR b)) AND NOT(a AND b))`
(`fplm_pkg::carry_e_m1`). The expression inside the outer NOT is the form
often quoted for this circuit. It equals `NOT Carry_E` in every row, so the
RTL uses the inverted form that the case table requires. The published
accuracy figures confirm this choice (see below).

Maximum product error is ±0.25 on a significand product in [1, 4).

## FPLM-2: four-region anti-logarithm

**Logarithm (`fp_le2`).** `log2(1+x) ≈ x` for `x < 0.5` and `(1+x)/2`
for `x ≥ 0.5`. This is the FPLM-1 logarithm with the +1 on the exponent
and the −1 on the logarithm cancelled, so no operand conversion is needed.
Both cases have integer bit 0, so the estimator is a Q-bit multiplexer:
`M` or `{1, M[Q-1:1]}`.

**Sum.** A Q-bit adder with carry-out gives `l = {C_out, sum}` in [0, 2).
`C_out` is `Carry_E` directly.

**Anti-logarithm (`antilog2`).** For large `l` both approximations
overestimate, so the top of the range is pulled down:

| region          | `C_out sum[Q-1] sum[Q-2]` | 2^l ≈      | product mantissa (after /2 if `C_out`) |
|-----------------|---------------------------|------------|-----------------------------------------|
| l < 1           | 0 x x                     | 1 + l      | `1.sum`                                 |
| 1 ≤ l < 1.5     | 1 0 x                     | 2l         | `1.sum`                                 |
| 1.5 ≤ l < 1.75  | 1 1 0                     | 2l − 0.5   | `1.01 sum[Q-3:0]`                       |
| 1.75 ≤ l < 2    | 1 1 1                     | 2l − 0.25  | `1.101 sum[Q-4:0]` or `1.110 sum[Q-4:0]` (by `sum[Q-3]`) |

Only the top three mantissa bits depend on the region. Bits Q-1 and Q-2 come
from a multiplexer selected by `C_out & sum[Q-1]`, bit Q-3 from one selected
by `C_out & sum[Q-1] & sum[Q-2]`, and all lower bits pass straight through.
For `Q < 3` (FP8) the sum is padded with zero bits to three fraction bits,
the same multiplexers act, and the result is truncated back. This is a choice
of this implementation, and it reproduces the published FP8 figures.

Maximum product error is ±0.5. The average error is −0.042 (slightly
overestimating) at single precision, compared with +0.083 for Mitchell.

## Radix-4 variants and CLM-r4

Because `log2 N = 2·log4 N`, the mantissa logarithm can be carried one bit
narrower. Each multiplier drops the LSB of both logarithms, adds them in an
adder one bit narrower, and appends a 0 to the sum (`{sum, 0}`) before the
unchanged anti-logarithm stage. The exponent is not converted.

* **FPLM-1-r4** (`fplm1_r4`): Q-bit adder on `lg[Q:1]`. Dropping the LSB of
  a negative two's complement logarithm rounds it *down*. `Carry_E` uses the
  sign of the appended sum.
* **FPLM-2-r4** (`fplm2_r4`): the method-2 logarithm's integer bit is always
  0, so the adder is (Q−1) bits on `lg[Q-1:1]`, and its carry-out takes the
  integer position.
* **CLM-r4** (`clm_r4`): Mitchell's method, where the mantissa is its own
  logarithm. A (Q−1)-bit adder on `M[Q-1:1]`, with the product mantissa
  `{sum, 0}` and `Carry_E = C_out`. It needs no anti-logarithm logic at all:
  for `l ≥ 1`, `2^l ≈ 2l` normalises back to the same sum bits. It is the
  smallest design, and it always underestimates.

A corner case appears only at very small `Q`. At FP8 (`Q=2`), flooring two
logarithms of −0.25 in FPLM-1-r4 gives a sum of exactly −1.0. The
`antilog1` multiplexer assumes `sum[Q-1]=1` for negative sums, so it returns
mantissa 1.0 (with the doubled-case exponent) instead of 0. This is
what the circuit does, and it is what the published FP8 figures for
FPLM-1-r4 show (MRED 0.437, AE 1.0).

## Exceptions

Exception handling is this implementation's own choice. The design only
requires that inputs are checked first and that overflow, underflow and NaN
are reported. `flags` is `fplm_pkg::fp_flags_t` = `{invalid, overflow,
underflow, zero}`:

* exponent 0 (zero or subnormal) counts as zero: the result is signed zero,
  with `zero` set;
* a NaN operand, or Inf × 0, gives quiet NaN `{0, all-ones, 1, 0…}` with
  `invalid` set;
* Inf × finite non-zero gives signed Inf;
* an exponent ≥ `2^W−1` gives signed Inf with `overflow` set;
* an exponent ≤ 0 gives signed zero with `underflow` and `zero` set.

## How far it can be trusted

The testbenches reproduce the published error figures of
this design in all four formats. That is strong evidence that the bit-level
choices (logarithm truncation, `Carry_E`, the four-region multiplexers,
radix-4 rounding) match the original circuits. The tables below show
results from uniformly distributed operands in [1, 2), truncated to the
format, measured against the exact product of the untruncated operands.

| MRED (measured / published) | FPLM-1        | FPLM-2        | FPLM-1-r4     | FPLM-2-r4     | CLM-r4        |
|-----------------------------|---------------|---------------|---------------|---------------|---------------|
| single (8,23)               | 0.0287/0.0288 | 0.0368/0.0368 | 0.0287/0.0288 | 0.0368/0.0368 | 0.0383/0.0384 |
| half (5,10)                 | 0.0291/0.0289 | 0.0365/0.0365 | 0.0292/0.0290 | 0.0362/0.0362 | 0.0400/0.0397 |
| bfloat16 (8,7)              | 0.0303/0.0302 | 0.0349/0.0348 | 0.0331/0.0330 | 0.0340/0.0341 | 0.0491/0.0488 |
| FP8 (5,2)                   | 0.2310/0.2311 | 0.1624/0.1626 | 0.4368/0.4367 | 0.3194/0.3201 | 0.3194/0.3201 |

With standard-normal operands at single precision, the measured MREDs are
0.0289, 0.0377, 0.0289, 0.0377 and 0.0381; the published values are
0.0288, 0.0373, 0.0288, 0.0373 and 0.0381.

In a JPEG-style DCT → quantise (quality 50) → IDCT round trip on a generated
32×32 image, every product goes through the multiplier. The measured PSNR in
dB is:

| format   | exact | FPLM-1 | FPLM-2 | FPLM-1-r4 | FPLM-2-r4 | CLM-r4 |
|----------|-------|--------|--------|-----------|-----------|--------|
| single   | 33.0  | 31.9   | 31.8   | 31.9      | 31.8      | 27.6   |
| half     | 33.1  | 32.0   | 31.8   | 32.0      | 31.8      | 27.6   |
| bfloat16 | 33.0  | 32.0   | 31.8   | 31.4      | 31.3      | 27.1   |
| FP8      | 20.8  | 20.5   | 20.7   | 17.0      | 17.3      | 17.3   |

The double-sided designs stay close to exact, while the one-sided CLM-r4
loses several dB. At FP8, FPLM-2 is best and the radix-4 designs fall
behind. The same pattern is reported for 256×256 photographs (about 30 dB
against 24–25 dB, and 15.3 against 13.4–13.6 dB at FP8).

Departures and limits:

* **Not built:** the bfloat16 artificial neuron used for the system-level
  cost estimate. Its structure is not specified, and it relies on a vendor
  floating-point adder.
* **Own choices:** exception handling, NaN encoding, flags, the `Q < 3`
  padding in `antilog2`, and the requirement `Q ≥ 2`.
* **Timing:** the design is combinational with no pipeline registers. The
  original multipliers were synthesised with a 250 MHz clock constraint, and
  only their combinational delay was reported.
* Not reproduced: the neural-network training results and the 28 nm
  power/area/delay figures.

## Files

`rtl/` (synthesizable):

| file            | content |
|-----------------|---------|
| `fplm_pkg.sv`   | `fp_flags_t`, `mul_e` (multiplier index), `carry_e_m1()` |
| `fp_le1.sv`, `fp_le2.sv` | logarithm estimators, methods 1 and 2 |
| `antilog1.sv`, `antilog2.sv` | anti-logarithm and adjustment, methods 1 and 2 |
| `fp_exp_exc.sv` | sign, exponent adder with `Carry_E`, exceptions, packing |
| `fplm1.sv`, `fplm2.sv`, `fplm1_r4.sv`, `fplm2_r4.sv`, `clm_r4.sv` | the five multipliers, each with ports `a`, `b`, `p`, `flags` |
| `fplm_top.sv`   | all five on shared operands; outputs `p[5]`, `flags[5]` indexed by `mul_e` |

`tb/` (self-checking; each prints `TB_RESULT checks=… failures=…`):

| testbench | what it checks |
|-----------|----------------|
| `tb_fp_le1`, `tb_fp_le2`, `tb_antilog1`, `tb_antilog2` | building blocks, exhaustive at small `Q`, random at `Q=23`, all `antilog2` regions |
| `tb_fp_exp_exc` | exception cases and exponent boundaries |
| `tb_fplm1` … `tb_clm_r4` | each multiplier: hand-worked products, 50 000 random operands bit-exact against a reference model, an error bound, exhaustive FP8 |
| `tb_fplm_top` | all five at default parameters: bit-exact comparison, every mechanism counted (negative log sum, four regions, carries, radix-4 drop, NaN, Inf, zero, overflow, underflow), single-precision MRED/AE against the published values |
| `tb_fplm_formats` | half, bfloat16 and FP8 accuracy against the published values |
| `tb_fplm_jpeg` | DCT/IDCT image compression with each multiplier in all four formats |
| `fplm_ref_pkg`  | the arithmetic reference model shared by the testbenches |

## Simulating

With Verilator 5 (two-state; `--timing` is needed for the testbench delays):

```sh
verilator --binary --timing -Wno-fatal --top-module tb_fplm_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/fplm_pkg.sv tb/fplm_ref_pkg.sv tb/tb_fplm_top.sv
./obj_dir/Vtb_fplm_top
```

Replace `tb_fplm_top` with any other testbench name. Each testbench runs in
well under a second. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/fplm_pkg.sv rtl/<module>.sv`. The
only warnings are the unused logarithm LSBs in the radix-4 multipliers,
which are dropped on purpose.

## Changing it

* **Format:** set `W` and `Q` on any multiplier or on `fplm_top`, e.g.
  `fplm_top #(.W(8), .Q(7))` for bfloat16. `Q ≥ 2` is required.
* **Pipelining:** the multipliers are combinational. Register `a`, `b` and
  `p` around them if a clocked stage is needed.
* **Choosing one multiplier:** instantiate `fplm1` … `clm_r4` directly. They
  share only `fp_exp_exc` and the package.
