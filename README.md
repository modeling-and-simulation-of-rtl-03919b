# Six-band FRM hearing-aid filter bank with a shift-based approximate multiplier

A hearing aid splits sound into frequency bands and amplifies each band by the listener's
hearing loss at that frequency. This RTL does that with a six-band, non-uniform FIR filter bank
built by *frequency-response masking* (FRM): one 41-tap prototype low-pass filter `H(z)` is reused
as `H(z^2)` and `H(z^4)`, and as its mirror image, and sums and differences of these cascades
give six bands covering 0–8 kHz at a 16 kHz sample rate. Every multiplication is done by an
*approximate multiplier* that cuts each 16-bit operand down to the 8 bits that start at its
leading one. It then uses a single exact 8×8 multiplier and shifts the product back into place.
On uniformly random 16-bit operands the relative error averages about 0.53 % and never reaches
2 %. The multiplier needs much less logic than a full 16×16 array.

## The approximate multiplier

### Unsigned version (`approx_mult_unsigned`)

Each operand goes through wordlength-reduction logic (`wlr_unsigned`):

1. `priority_encoder` finds the leading one `p` in the operand's upper half `A[15:8]`.
2. `excess_one_converter` forms `p + 1`, the right shift that leaves exactly 8 significant bits.
3. A 2:1 multiplexer, selected by the OR of `A[15:8]`, passes `p + 1`, or 0 when the upper half is
   empty. Operands below 256 are not shifted and stay exact.
4. `right_barrel_shifter` shifts the operand and keeps the low 8 bits.

`wallace_multiplier` multiplies the two 8-bit values exactly. `left_barrel_shifter` is the
correction logic: it widens the 16-bit product to 32 bits and shifts it left by the sum of the
two right shifts. The bits dropped by truncation are lost, so the result is never above the exact
product.

### Signed version (`approx_mult_signed`), the one the filters use

The signed path works on magnitudes:

- `sign_twos_complement` splits off each operand's sign and negates negative operands.
- `sign_ext_encoder` counts the zeros `z` between the (zero) sign position and the leading one
  within `|A|[15:8]`. The count runs from 0 to 7, and is 7 when the upper half is empty.
- `shift_control` makes the right shift `7 − z`. In three bits that is simply `~z`, so the
  control logic is a row of inverters. It also adds the two shifts.
- Two right barrel shifters, the Wallace multiplier and the left barrel shifter work as in the
  unsigned version.
- `sign_set` negates the result when the operand signs differ.

Worked example: −259 × 517. The magnitudes are 259 = `0000_0001_0000_0011` and
517 = `0000_0010_0000_0101`. Their shifts are 1 and 2, so the truncated operands are 129 and 129.
129 × 129 = 16641, shifted left by 3, gives 133128. Negated, the result is −133128; the exact
product is −133903.

The value −32768 has no positive counterpart. It is outside the signed multiplier's range and
multiplies as 0. Every saturating stage in the bank therefore clips symmetrically to ±32767, so
no internal stage produces −32768. External input samples and gains of −32768 should be clipped to
−32767 upstream.

Both multipliers are purely combinational and parameterised by `N` (default 16; 8 and 32 are
also exercised). The Wallace tree works out its reduction schedule (column heights per layer)
from `W` at elaboration time. Each reduction layer is therefore a fixed net of full adders, half
adders and wires, followed by one carry-propagate `+`.

### Accuracy

Measured by `tb_mult_error_metrics` on 100,000 uniform random operand pairs:

| version   | error rate | NMED    | MRED    | RE < 0.5 % | RE < 1 % | RE < 2 % |
|-----------|-----------:|--------:|--------:|-----------:|---------:|---------:|
| unsigned 16 | ≈ 99.96 % | ≈ 0.13 % | ≈ 0.53 % | ≈ 47 % | ≈ 97 % | 100 % |
| signed 16   | ≈ 99.87 % | ≈ 0.13 % ¹ | ≈ 0.52 % | ≈ 48.5 % | ≈ 97.3 % | 100 % |
| 32-bit (both) | | | ≈ 0.002 % | 100 % | | |

¹ This is normalised by the largest signed product (2^15−1)^2. Normalised by (2^16−1)^2 instead,
the same error is 0.032 %.

The error rate is almost 100 % because nearly every random 16-bit operand has a set bit in its
upper half and is truncated. The errors are small, though: each truncated operand keeps 8
significant bits, so its relative error is below 2^−7.

## The FRM filter bank (`frm_filter_bank`)

### Prototype and its variants

`H(z)` is a 41-tap (order-40) linear-phase low-pass filter. Its pass-band edge is 0.45π and its
stop-band edge 0.65π, a normalised transition width of 0.2. It was designed by least squares and
has about 58 dB of stop-band attenuation. The integer coefficients (real value × 2^15, rounded)
are listed in `frm_pkg.sv`. To change the filter, replace `H_COEF`: any symmetric 41-tap set
scaled by 2^15 works.

- `H(z^L)` inserts L−1 zeros between the taps. Its pass band is compressed by L and repeats
  around multiples of 2π/L.
- The mirror filter `Hc(z) = H(−z)` has coefficients `h[k]·(−1)^k`. It is the high-pass image
  of `H(z)`, with its pass band from π−0.45π up to π.
- `fir_subfilter` computes `H(z^L)` and, when `DUAL = 1`, `H(−z^L)` from the same 41 products. It
  does this by summing even and odd taps separately: `H = E + O` and `Hc = E − O`.

### Structure

```
x ─┬─ H(z^4) ─ H(z^2) ─ H(z)/Hc(z) ──────────── B1, B6
   ├─ H(z^2) ─ H(z)/Hc(z) ─ delay 81 ─────────── a, b
   └─ H(z)/Hc(z) ─ delay 122 ─────────────────── c, d

B2 = a − B1    B3 = c − a    B4 = d − b    B5 = b − B6
```

| band | transfer function | approx. range (this prototype) |
|---|---|---|
| B1 | H(z^4)H(z^2)H(z) | 0 – 1.1 kHz |
| B2 | H(z^2)H(z) − H(z^4)H(z^2)H(z) | 1.1 – 2.2 kHz |
| B3 | H(z) − H(z^2)H(z) | 2.2 – 4.4 kHz |
| B4 | Hc(z) − H(z^2)Hc(z) | 3.6 – 5.8 kHz |
| B5 | H(z^2)Hc(z) − H(z^4)H(z^2)Hc(z) | 5.8 – 6.9 kHz |
| B6 | H(z^4)H(z^2)Hc(z) | 6.9 – 8 kHz |

The bands are narrow at both ends of the spectrum and wide in the middle.

### Delay alignment

The band differences only form band-pass responses if the two responses being subtracted are
time-aligned. A linear-phase `H(z^L)` delays by 20·L samples, so the branches delay by 140, 60
and 20 samples. In addition, every FIR section registers its output, which adds one sample per
section. The `delay_line` instances therefore hold branch 2 back by 80 + 1 = 81 samples and
branch 3 by 120 + 2 = 122 samples. All six bands then leave with the same latency.

### Word lengths

Samples are 16-bit two's complement. Each FIR section accumulates its 41 products of 32 bits in
40 bits. It then rounds (adds 2^14), shifts right by 15 and saturates to ±32767. The
coefficients' absolute sum is about 1.8, so full-scale input can saturate a section. The band
differences are saturated too. `sat` reports any saturation in the bank.

## Gains and output (`band_gain_sum`, `hearing_aid_top`)

Each band is multiplied by a programmable 16-bit gain with 4 fractional bits, using the signed
approximate multiplier. A gain of 16 is 0 dB, and the maximum of 32767 is about 66 dB. The six
products are summed, rounded, shifted right by 4 and saturated to the 16-bit output. Fitting the
gains to an audiogram is the user's job. A gain in dB converts as
`round(16 · 10^(dB/20))`.

`hearing_aid_top` connects the bank to the gain stage. It also instantiates the unsigned
multiplier on its own ports (`um_a`, `um_x` → `um_p`), because the unsigned multiplier is part
of the multiplier design but not used by the filters.

### Timing

There is one input sample per `en` pulse, at most one per clock. The clock can run at any rate at
or above the sample rate, because each FIR section does all 41 multiplications in one clock.

| signal | latency |
|---|---|
| `band[b]` | updated on the clock edge of each `en`; peak of the impulse response 143 enables after the impulse |
| `y_out` | one `en` after `band` |
| `y_valid` | pulses the clock after every `en` |
| `sat_bank`, `sat_out` | flags for the sample just registered |

All state uses an asynchronous active-low reset `rst_n`.

## Where this departs from, or adds to, the original design

The following follow the original design:

- the multiplier architectures, including the sign-extension encoder with inverter control and
  the excluded most-negative operand
- the Wallace tree
- the 16-bit operand size
- the six-band FRM structure and its band equations
- the 40th-order least-squares prototype with transition width 0.2 and coefficients scaled by
  2^n
- fs = 16 kHz

The following are choices made here:

- **Prototype coefficients.** The published coefficients are not available. The band edges
  (0.45π / 0.65π) were chosen so that the six bands tile 0–8 kHz. The scale factor is 2^15.
- **Mirror filter.** `Hc(z)` is implemented as `H(−z)`. The alternative complement
  `z^−20 − H(z)` does not yield six bands covering the spectrum with these band equations.
- **Delay-alignment lines.** These are needed for the subtractions but are not shown in the
  original structure.
- **Numerics and control.** Rounding and saturation after every section, the sample-enable
  interface, output registers and reset.
- **Filter form.** A fully parallel direct form with one multiplier per tap (246 filter
  multipliers). Coefficient symmetry is not used to halve them, and the multipliers are not
  time-shared.
- **Gain stage.** The gain format (Q11.4), the summation, and the use of the approximate
  multiplier for the gains.
- **Pipelining.** The multipliers are combinational, with no pipeline registers.

## Files

| file | contents |
|---|---|
| `rtl/frm_pkg.sv` | widths, prototype coefficients, saturation helper |
| `rtl/priority_encoder.sv`, `excess_one_converter.sv`, `right_barrel_shifter.sv`, `left_barrel_shifter.sv`, `wallace_multiplier.sv` | multiplier building blocks |
| `rtl/wlr_unsigned.sv`, `approx_mult_unsigned.sv` | unsigned approximate multiplier |
| `rtl/sign_twos_complement.sv`, `sign_ext_encoder.sv`, `shift_control.sv`, `sign_set.sv`, `approx_mult_signed.sv` | signed approximate multiplier |
| `rtl/fir_subfilter.sv`, `delay_line.sv`, `frm_filter_bank.sv` | filter bank |
| `rtl/band_gain_sum.sv`, `hearing_aid_top.sv` | gains, output, top |
| `tb/approx_ref_pkg.sv` | arithmetic reference models (multiplier, FIR section, whole bank, gain sum) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_mult_error_metrics` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. From the directory that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/frm_pkg.sv tb/approx_ref_pkg.sv tb/tb_hearing_aid_top.sv --top tb_hearing_aid_top
./obj_dir/Vtb_hearing_aid_top
```

Replace the testbench name to run another one. The package files must come first.

- `tb_hearing_aid_top` runs the full-size design (defaults, no overrides) for 700 samples. The
  input is an impulse, noise, a quiet passage and a full-scale tone, with two gain sets. It
  compares every band, the output and both flags against the reference model on every sample.
  It also counts exact products, truncated products, bank saturation, output saturation and the
  gain change, and requires each of them to occur. It builds in under a minute.
- `tb_frm_filter_bank` also checks that all six impulse responses peak at sample 143.
- `tb_fir_subfilter` uses `L = 2`.

The reference models in `tb/approx_ref_pkg.sv` compute the approximate product arithmetically:
they drop bits below the top 8 significant ones. They do not reuse the RTL's
encoder/shifter structure.
