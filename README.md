# Single-precision IIR notch filter (direct form II)

A notch filter removes one narrow band of frequencies, such as a power-line
hum or an interfering tone, and leaves the rest of the spectrum untouched.
This RTL implements a second-order IIR notch filter whose samples,
coefficients and internal state are IEEE-754 single-precision (binary32)
floating-point numbers. The arithmetic is done by dedicated binary32 adders
and multipliers, wired together as a direct-form-II biquad. With its default
coefficients the filter suppresses 300 Hz in a signal sampled at
1000 samples/s, with a pole radius of 0.992.

## How the notch is made

The filter starts from a second-order all-pass section with poles at
`r·e^{±jα}`, where α is the notch angle and r the pole radius (r < 1). Its
numerator is the mirror image of its denominator, so its magnitude is 1 at
every frequency, and only its phase turns through 360° around α. Averaging
the input with the all-pass output, `T(z) = (1 + Q(z)) / 2`, cancels the
signal exactly where the all-pass phase is 180°. That happens at α, and
nowhere else does much happen. The result is

```
            1   (1 + r²) − 4 r cos α · z⁻¹ + (1 + r²) · z⁻²
   T(z) =  --- · -------------------------------------------
            2        1 − 2 r cos α · z⁻¹ + r² · z⁻²
```

The zeros lie on the unit circle, at an angle β just beside α
(cos β = 2r cos α / (1 + r²)). The poles lie just inside the circle at angle α.
As r approaches 1, β approaches α and the notch becomes narrower. Away from
the notch the gain is 1. Because the zeros are at β rather than exactly at α,
the gain at α itself is small but not zero. It is about 0.001 for
r = 0.992 and about 0.017 for r = 0.9.

In the usual form `B(z)/A(z) = (b0 + b1 z⁻¹ + b2 z⁻²) / (1 + a1 z⁻¹ + a2 z⁻²)`:

| coefficient | formula | default value | binary32 |
|---|---|---|---|
| B0, B2 | (1 + r²) / 2 | 0.992032 | `0x3F7DF5CF` |
| B1 | −2 r cos α | 0.6130897 | `0x3F1CF373` |
| A1 | −2 r cos α | 0.6130897 | (−A1 = `0xBF1CF373`) |
| A2 | r² | 0.984064 | (−A2 = `0xBF7BEB9E`) |

The defaults use r = 0.992 and α = 2π·300/1000 = 0.6π. Each value is rounded
to the nearest binary32 number. To move the notch to frequency `f0` at sample
rate `fs`, set α = 2π·f0/fs and recompute the five values. A smaller r gives a
wider notch and a shorter settling transient: the transient decays roughly as
rⁿ, which is about 125 samples per factor e at r = 0.992.

## Datapath

Direct form II keeps one delay line of an internal signal `w`, so a
second-order filter needs only two delay registers:

```
   w[n] = x[n] + ( (−A1)·w[n−1] + (−A2)·w[n−2] )
   y[n] = B0·w[n] + ( B1·w[n−1] + B2·w[n−2] )
```

```
 x_in ──►(+)──┬──── w[n] ────► ×B0 ───────────►(+)──►[reg]──► y_out
          ▲   │                                 ▲
          │ [z⁻¹]                               │
          │   ├──── w[n−1] ──► ×B1 ──►(+)───────┘
         (+)◄──── ×−A1 ◄── w[n−1]      ▲
          ▲ [z⁻¹]                      │
          │   └──── w[n−2] ──► ×B2 ────┘
          └────── ×−A2 ◄── w[n−2]
```

Floating-point addition is not associative, so the order of the additions
is part of the design. The two feedback products are summed first and then
added to the input. The two delayed feed-forward products are summed first
and then added to `B0·w[n]`. The feedback multipliers get the negated
coefficients −A1 and −A2, so every node is a plain adder. The datapath has
five `fp_mul` instances and four `fp_add` instances.

## Binary32 arithmetic

Both units are purely combinational. They round to nearest, with ties to
even, and handle infinities and NaN. They use flush-to-zero:
subnormal inputs are read as zero, and results below 2⁻¹²⁶ become a
signed zero. For a filter that works on signals of order 1 this never
matters. It does mean that the units are not fully IEEE-754 compliant.

**`fp_mul`** restores the hidden one and multiplies the two 24-bit
significands into a 48-bit product. It adds the exponents and subtracts the
bias. The product lies in [1, 4), so it is normalised by at most one place.
A guard bit and a sticky bit (the OR of all lower bits) decide the rounding.
If rounding carries out, the exponent goes up by one. If the exponent is then
255 or more, the result is ±∞; if it is 0 or less, the result is ±0.

**`fp_add`** orders the operands by magnitude. It shifts the smaller
significand right by the exponent difference into a 27-bit field: 24
significand bits plus guard, round and sticky bits. Every bit shifted out is
ORed into the sticky bit. The significands are added, or subtracted if the
signs differ. A carry moves the result right by one place. Otherwise a
leading-zero count moves it left. Three extra bits are enough. The reason is
that a left shift of more than one place happens only after a cancellation
between operands whose exponents differ by at most one, and then nothing was
shifted out. An exact zero sum is +0, and (−0) + (−0) is −0.

Special cases: NaN input, ∞ − ∞ and ∞ × 0 give the quiet NaN `0x7FC00000`.
NaN payloads are not propagated.

## Interface and timing of `iir_notch_df2`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous active-low reset; clears `w1`, `w2`, `y_out` to +0 |
| `in_valid` | in | 1 | `x_in` carries a sample this clock |
| `x_in` | in | 32 | x[n], binary32 |
| `out_valid` | out | 1 | `y_out` was updated on the last clock edge |
| `y_out` | out | 32 | y[n], binary32, registered |

Parameters: `B0`, `B1`, `B2`, `NEG_A1` and `NEG_A2`, each a 32-bit binary32
pattern (defaults in the table above).

The whole difference equation is one combinational path: two multipliers
and three adders deep (`×−A1 → + → + → ×B0 → +`). It accepts one sample per
clock, and `y_out` appears one clock later. While `in_valid` is low, the
delay line and `y_out` hold. No sample rate is built in: at 1000 samples/s,
any clock of 1 kHz or faster keeps up. A floating-point build of this filter
structure on an Artix-7 FPGA has been reported at a 29.2 ns minimum clock
period (34.25 MHz). The long path is the structure's main weakness. Pipelining or
retiming the multiplier and adder chain would raise the clock rate. That
is not done here. Note that the feedback loop (`w1 → ×−A1 → + → + → w1`)
limits how far pipelining can go without interleaving several channels.

## Files

| file | contents |
|---|---|
| `rtl/fp32_pkg.sv` | binary32 struct type, operand classes, constants |
| `rtl/fp_add.sv` | binary32 adder |
| `rtl/fp_mul.sv` | binary32 multiplier |
| `rtl/iir_notch_df2.sv` | the notch filter (top) |
| `tb/fp32_ref_pkg.sv` | testbench reference model for binary32 add/multiply |
| `tb/tb_fp_add.sv`, `tb/tb_fp_mul.sv` | unit testbenches |
| `tb/tb_iir_notch_df2.sv` | end-to-end filter testbench at default parameters |
| `tb/tb_notch_response.sv` | magnitude-response sweep for r = 0.992, 0.99 and 0.9 |

## Verification

The reference model in `tb/fp32_ref_pkg.sv` does each operation in double
precision and rounds the result to binary32 in SystemVerilog. It does not use
`shortreal`, because some simulators compute `shortreal` in double precision
and never round it to single. Double has at least 2·24 + 2 significand bits,
so rounding the double-precision sum or product once more gives the correctly
rounded binary32 result.

* `tb_fp_add` and `tb_fp_mul` each run about 70,000 operations and compare
  every result bit for bit. The operations cover signed zeros, infinities,
  NaN, overflow, flush-to-zero, rounding ties and carries. Random operands
  cover close exponents (cancellation), far-apart exponents (sticky
  rounding), the full normal range and both ends of it.
* `tb_iir_notch_df2` uses the default coefficients. It filters 2000
  samples of `0.7·sin(2π·100t) + sin(2π·300t) + 0.4·sin(2π·400t)` at
  fs = 1000. Then it resets mid-stream and filters a 100/300/700 Hz mix.
  700 Hz folds onto 300 Hz at this sample rate, so it is removed as well.
  Random idle cycles are inserted between samples. Every clock, the testbench
  checks `out_valid` against a one-clock latency and checks that `y_out`
  holds. It compares each output bit for bit with a model that evaluates the
  same equation in the same order. On the last 1000 outputs of each run,
  the 300 Hz amplitude must fall below 0.02 (measured: 1.0 → 0.0013). The
  100 Hz and 400 Hz amplitudes must stay within 3 % (measured 0.69999 and
  0.39998). The testbench also counts samples, idle cycles, resets of a live
  delay line, notch suppressions and passband passes. Each count must be at
  least one.
* `tb_notch_response` measures the magnitude response. It runs three
  filters side by side, all with the notch at 0.6π: the default r = 0.992,
  and r = 0.9 and r = 0.99 to show how the radius sets the notch width. It
  applies unit sines at 13 frequencies from 0.1π to 0.9π, clustered around
  the notch. Each measured gain must match |T(e^jω)| within 0.003 + 1 %,
  where |T| is computed from the same binary32 coefficients. The
  measurements agree to about 1e-4. The gain at 0.6π is 0.0013 for
  r = 0.992, 0.0016 for r = 0.99 and 0.017 for r = 0.9. The gain at 0.58π
  is 0.99, 0.99 and 0.50 respectively. The testbench also recomputes every
  coefficient constant from r and α.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
    rtl/fp32_pkg.sv tb/fp32_ref_pkg.sv rtl/fp_add.sv rtl/fp_mul.sv \
    rtl/iir_notch_df2.sv tb/tb_iir_notch_df2.sv --top-module tb_iir_notch_df2
./obj_dir/Vtb_iir_notch_df2
```

Each testbench ends with `TB_RESULT checks=N failures=M`. For the unit
testbenches, list only `fp32_pkg.sv`, `fp32_ref_pkg.sv`, the unit and its
testbench.

## What follows the filter's specification and what is this design's own

Taken from the specification:
* the second-order notch transfer function derived from an all-pass section;
* r = 0.992 and the 300 Hz notch at 1000 samples/s;
* the direct-form-II structure, including the placement of its summing
  nodes and the negated feedback coefficients;
* binary32 arithmetic for all data;
* the test signals.

This design's own choices:
* the valid handshake, the synchronous reset and the single-clock schedule
  with a registered output;
* the inner organisation of the adder and multiplier;
* round to nearest even and flush-to-zero;
* fixed coefficients as parameters (no run-time coefficient load).

Not included:
* the analog parts around the filter: A/D converter, D/A converter and
  reconstruction low-pass filter. `x_in` and `y_out` are where they would
  connect;
* the direct-form-I alternative;
* any pipelined or retimed variant.
