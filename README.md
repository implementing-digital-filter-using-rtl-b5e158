# First-order IIR filter with run-time coefficients

This is a small bit-parallel IIR (recursive) digital filter of first order, meant for teaching:

    H(z) = b (1 + z^-1) / (1 - a z^-1)

The coefficients `a` and `b` are not built into the logic. They are 4-bit input pins, along with two
sign controls. A student can take a filter designed in a tool such as MATLAB, round its
coefficients to the nearest sixteenth, apply them to the pins, and watch a low-pass or high-pass
response come out of the same hardware. The filter has two sections that can be observed on their
own:

* The **zeros section** computes `K(n) = b·X(n) ± b·X(n-1)` and places a zero at z = -1 or at z = +1.
* The **poles section** computes `Y(n) = K(n) ± a·Y(n-1)` and places a pole at z = +a or at z = -a.

Both sections use one multiplier each, plus adders and an 8-bit register. One input sample is
taken and one output sample produced every clock.

## Number formats

| Signal | Width | Format |
|---|---|---|
| `x` (X), `k` (K), `o` (O) | 8 | two's complement, -128 … 127 |
| `b`, `a` | 4 | unsigned fraction `0.b3b2b1b0`, value = code / 16, 0 … 0.9375 |
| `as`, `as2` | 1 | 1 = add, 0 = subtract |

A coefficient of 0.3125 is code `4'b0101`, and 0.5 is `4'b1000`. The largest coefficient is
15/16, so a pole can never reach the unit circle and the filter is always stable.

## The multiplier: sign and magnitude (`coef_mult`)

The multiplier is unsigned, so both sections multiply a magnitude and handle the sign apart:

1. An absolute-value stage turns the 8-bit signed sample into an 8-bit unsigned magnitude.
   Because |-128| = 128 still fits in 8 unsigned bits, every input value works.
2. The magnitude is multiplied by the 4-bit coefficient into a 12-bit product.
3. Only product bits 11..4 are kept. This divides by 16, which is what turns the 4-bit code into
   a fraction below one.
4. The sign of the sample is passed on beside the magnitude.

The magnitude is truncated before the sign goes back on, so every product is **rounded toward
zero**. For example, 63 × 5/16 = 19.69 gives 19, and -63 × 5/16 gives -19 (not -20). This
matters when you compare the output with a floating-point model: the hardware's output is a
little smaller in magnitude. It also explains most of the difference from an ideal filter. The
rest comes from rounding the coefficients to sixteenths.

## Zeros section (`zeros_circuit`)

Both feed-forward coefficients are the same value (b0 = b1 = b), so one multiplier is enough.
The product is formed once, and the product itself is delayed, not the input:

```
X ──|abs|──[× b]──bits 11..4──[0 ± m]── p(n) ──────────────┐
                                 ▲           │              ▼
                            sign of X        └─[reg]─ p(n-1)─[±]── K
                                                             ▲
                                                            AS
```

* The first add/subtract unit computes `0 + m` for a positive sample and `0 - m` for a negative
  one. This restores the two's-complement product `p(n)`.
* A register holds `p(n-1)`.
* The second add/subtract unit gives `K = p(n) + p(n-1)` when `as = 1`, which puts the zero at
  z = -1 (low pass). It gives `K = p(n) - p(n-1)` when `as = 0`, which puts the zero at z = +1
  (high pass).

`k` is combinational from `x` and the register. It is a port of the top so the section can be
observed on its own.

## Poles section (`poles_circuit`)

The poles section needs the most care, because its feedback value is signed while the multiplier
is not.

```
K ─────────────────────────[±]── Y ──[reg]──┬── O (filter output)
                            ▲                │
        AS2 xor sign(O) ────┘   m ◄─bits 11..4─[× a]─|abs|─┘
```

* The output register holds `O = Y(n-1)`. Its magnitude is multiplied by `a`, which gives `m`.
* The sign of the term `±a·Y(n-1)` depends on two things: the sign of the coefficient (`as2`)
  and the sign of `Y(n-1)`. One add/subtract unit handles both, under the control
  `add = as2 XOR sign(O)`:

  | `as2` | sign of O | operation | meaning |
  |---|---|---|---|
  | 1 | + | K + m | +a × positive |
  | 1 | − | K − m | +a × negative |
  | 0 | + | K − m | −a × positive |
  | 0 | − | K + m | −a × negative |

* The filter output is taken from the register, not from the adder. The output therefore changes
  only at a clock edge and never shows the adder settling. The same register supplies `Y(n-1)`.

## Timing

Apply `x(n)` during clock period n. After the rising edge that ends that period, `o` holds `y(n)`.
The latency is therefore one clock, and the rate is one sample per clock. A reset (`rst_n`,
asynchronous, active low) clears both registers, so a response starts from rest.

Example (impulse of 63, `b = 4'b1000`, `a = 0`, `as = as2 = 1`): `o` reads 31, 31, 0, 0, 0 after
successive edges. With a step of 63 it reads 31, 62, 62, 62, 62.

## Choosing coefficients

| Filter | `as` | `as2` | zero | pole |
|---|---|---|---|---|
| low pass | 1 | 1 | z = -1 | z = +a |
| high pass | 0 | 0 | z = +1 | z = -a |

Worked example: a first-order Butterworth low pass with cutoff 0.15·Fs has a ≈ 0.325 and
b ≈ 0.3375. Both round to 0.3125, so use `a = b = 4'b0101` with `as = as2 = 1`.

The DC gain is 2b/(1 − a). The sums are plain 8-bit adders and **wrap on overflow**, with no
saturation and no overflow flag. Keep the input amplitude times the gain below 128. With
amplitude 63 and the example coefficients above, the gain is 0.91, which is safe. With
a = b = 15/16, the gain is 30, which is not.

## Files

| File | Contents |
|---|---|
| `rtl/iir_pkg.sv` | widths (8-bit samples, 4-bit coefficients, 12-bit product), sample/coefficient types, add/subtract enum |
| `rtl/coef_mult.sv` | absolute value, 8×4 unsigned multiply, bits 11..4, sign out |
| `rtl/zeros_circuit.sv` | zeros section |
| `rtl/poles_circuit.sv` | poles section and output register |
| `rtl/iir1_filter.sv` | top: zeros section followed by poles section |
| `tb/tb_*.sv` | one self-checking testbench per module |

The design has no parameters: its widths are fixed at the sizes above.

## Verification

Each testbench computes expected values with its own integer model (products as
`(x * c) / 16`, truncating toward zero) and prints `TB_RESULT checks=N failures=M`.

* `tb_coef_mult` tries all 256 × 16 combinations of sample and coefficient.
* `tb_zeros_circuit` and `tb_poles_circuit` each run 2000 random samples while changing the
  coefficients and controls at random. They include a reset in the middle of a run and extreme
  inputs (-128, 127).
* `tb_iir1_filter` runs the whole filter at its only size. It checks:
  * the impulse and step responses above, exactly;
  * low-pass sine responses with `a = b = 0.3125` and amplitude 63 at 0.025·Fs (41 samples),
    0.15·Fs (nominally 0.154·Fs) and 0.25·Fs. Each output sample is checked exactly against the model. It is also
    checked within 0.05 of full scale against the published response of the original hardware
    (peak 0.86 at 0.025·Fs; sample by sample at the two higher frequencies);
  * a high-pass setting, then 3000 random samples with random coefficients and controls.

  It counts how often each mechanism was used and fails if one never was. The mechanisms are:
  zero at ±1, positive and negative pole, negative input samples through the absolute-value
  stage, and negative feedback values.

Run one with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl rtl/iir_pkg.sv rtl/coef_mult.sv \
  rtl/zeros_circuit.sv rtl/poles_circuit.sv rtl/iir1_filter.sv tb/tb_iir1_filter.sv \
  --top-module tb_iir1_filter
./obj_dir/Vtb_iir1_filter
```

Each run takes well under a second.

## What is this design's own choice

The structure follows the original design: the two sections, one shared multiplier for b0 = b1,
the absolute-value stage, the bits 11..4, the AS and AS2 controls, and the output register. The
following details were not specified there and were chosen here:

* **Reset.** An asynchronous active-low reset of the two registers, on the rising clock edge.
* **Sign restore in the zeros section.** It is done as 0 ± magnitude, controlled by the sign bit
  of X.
* **Poles control.** The poles add/subtract control is `as2 XOR sign(O)`. Among the obvious ways
  to combine the two, this one reproduces the published responses.
* **Add/subtract polarity.** The control pin is 1 for add.
* **Overflow.** Sums wrap modulo 256.

The published responses at 0.15·Fs and 0.25·Fs show a few samples that differ from this model by
up to about 0.03 of full scale. The testbench tolerance covers them.

Not included: filters of higher order. The same zeros/poles split extends to them in principle,
using more delay taps and multipliers, but only the first-order filter is specified.
