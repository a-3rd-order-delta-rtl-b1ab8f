# Third-order, 15-level delta-sigma audio DAC

This is a 24-bit, 44.1 kHz audio digital-to-analog converter built on oversampling and
noise shaping. A 64x interpolation filter raises the sample rate to 2.8224 MHz. A third-order
modulator then reduces each 24-bit sample to one of 15 levels, and it shapes the resulting
quantisation noise so that almost none of it stays in the 0–20 kHz audio band. The 15 levels
drive 15 equal unit capacitors of a switched-capacitor DAC. Because the capacitors never
match exactly, a data-weighted-averaging (DWA) selector rotates which capacitors are used on
each clock. This moves the mismatch error out of the audio band. A simple RC filter removes
the shaped noise above the band.

The digital path, from the serial input pin to the 15 element-select lines, is
synthesizable SystemVerilog. The two analog stages, the charge-transfer DAC and the RC post
filter, are behavioural models that use `real` values. With them the whole converter can be
simulated from bits in to volts out.

```
 sdata ─► s2p ─► 44.1k reg ─► hbf1 ─► hbf2 ─► sinc^3 ─► dsm3_ciff ─► thermo_enc ─► dwa_enc ─► dct_src_dac ─► rc_lpf ─► vout
          24b     44.1 kHz    2x      2x      16x        15 levels   15-bit          rotated     (model)        (model)
                              88.2k   176.4k  2.8224M                thermometer     selects
```

| Quantity | Value |
|---|---|
| Input | 24-bit two's complement, 44.1 kHz, serial MSB-first |
| Master clock | 2.8224 MHz = 64 × 44.1 kHz; the only clock |
| Oversampling ratio | 64 (2 × 2 × 16) |
| Modulator | 3rd order, feed-forward (CIFF) with one resonator, 15 levels |
| Unit elements | 15, selected by DWA |
| Output range (model) | 0.8 Vpp around 0.9 V |
| Latency, sample instant to element selects | ≈ 975 clocks (≈ 15 input samples) |

## Clocking and the input port

Every register runs on the 2.8224 MHz master clock. The slower stages are paced by
one-cycle valid strobes, so there are no clock dividers and no clock domain crossings.

- **`s2p`** shifts in `sdata` MSB first whenever `bit_en` is high. `sync` must be high with
  the MSB; it restarts the bit count, so a lost bit costs at most one word. `word_valid`
  pulses for one clock when the 24th bit has arrived.
- A free-running 6-bit counter in `ds_dac_core` produces `fs_tick` once every 64 clocks. On
  each tick, the most recently completed word goes to the interpolator. The serial source
  must therefore supply one word per 64 clocks. If words arrive faster, some are dropped;
  if they arrive slower, the last word is repeated.

This framing (bit strobe, sync on the MSB, a word register read at a fixed phase) is this
design's own choice. The only requirement the design starts from is a 1-bit serial input
that saves pins.

## Interpolation filter (44.1 kHz → 2.8224 MHz)

The filter has three stages. The first two are half-band filters that remove the images
around 44.1 kHz and 88.2 kHz. The last stage is a cheap sinc filter for the final 16x.

### Half-band stages, `halfband_interp` (used by `hbf1` and `hbf2`)

In a half-band filter, every other coefficient is zero except the centre one, which is
exactly 1/2. A 2x interpolator built from one therefore splits into two phases:

- the **even phase**, the symmetric FIR of the non-zero outer taps (K distinct values, each
  used twice);
- the **odd phase**, the input delayed by half the filter length and multiplied by 1/2.

`halfband_interp` computes the even phase in transposed form. Each new input is multiplied
by the K coefficients, and the products are added into a chain of 2K−1 registers. Both
phases are multiplied by the interpolation gain of 2. As a result the odd sample is simply
an older input, and the even sample is the FIR sum with coefficients doubled.

Timing:

- The even output is registered on the clock after `x_valid`.
- The odd output follows `OUT_SPACING` clocks later. This is 32 for hbf1 and 16 for hbf2, so
  the output samples are evenly spaced at the doubled rate.
- `y_phase` tells which of the two a sample is.
- Coefficients are integers scaled by 2^16. Outputs are rounded half up and saturated to 24
  bits; `sat_evt` flags a clip.

| Stage | Taps | Distinct outer coefficients | Coefficients from |
|---|---|---|---|
| `hbf1` | 55 | 14 (+ centre) | designed for this implementation (see below) |
| `hbf2` | 11 | 3 (+ centre) | sums of signed powers of two (CSD), 2^-16 grid |

The hbf2 coefficients are written in the package as their CSD expressions:

- h0 = 2^-6 − 2^-8 − 2^-11 + 2^-15
- h2 = −2^-4 + 2^-9 − 2^-11 + 2^-14 − 2^-16
- h4 = 2^-2 + 2^-4 − 2^-6 + 2^-8 − 2^-10 + 2^-12 + 2^-14 + 2^-16

The hbf1 coefficients are an equiripple half-band design:

- passband 0–20 kHz and stopband from 24.1 kHz, at 88.2 kHz;
- quantised to 2^-16;
- ±0.03 dB passband ripple and about −49 dB stopband.

Only the tap count and the required ripple were given for hbf1, so its coefficient values
are this design's. The multiplications are by constants, and synthesis reduces them to
shift-and-add networks. The CSD digits of hbf1 are not written out by hand.

### Sinc stage, `sinc_interp`

This is a cascaded integrator-comb (CIC) filter with R = 16 and N = 3. It realises
((1 − z^-16) / (16 (1 − z^-1)))^3:

1. Three combs run at 176.4 kHz.
2. The comb output is inserted into the 2.8224 MHz stream once every 16 clocks, with zeros
   in between.
3. Three integrators run on every clock.

The integrators are allowed to wrap around. Two's-complement wrap-around cancels across the
combs, so 24 + 3·4 + 1 bits are enough. The gain 16^2 is removed by an 8-bit shift with
rounding. The order N = 3 was chosen to match a first sidelobe of about −39.5 dB, three
times the −13.3 dB of a single sinc.

### Response of the whole chain

Measured by `tb_interp_response`:

| Tone | Gain | Largest image (relative to tone) |
|---|---|---|
| 1.03 kHz | +0.02 dB | −64.3 dB |
| 9.99 kHz | −0.17 dB | −54.9 dB |
| 18.95 kHz | −0.51 dB | −55.0 dB |

All images are far below the 36.67 dB attenuation that was specified. The passband,
however, is not flat to ±0.03 dB over the whole band. The sinc³ stage has an uncompensated
droop of 0.50 dB at 19 kHz, and no compensator is part of the design. The ±0.03 dB figure
holds for the two half-band stages alone. Group delay is 973.5 clocks. Most of it is hbf1
(27 samples at 88.2 kHz, 864 clocks). hbf2 adds 80 clocks, the CIC 22.5, and the rest is
register stages.

## Noise shaper, `dsm3_ciff`

This part is the least obvious, so it is described in full. All quantities are in units of
one quantiser step. x1..x3 are the accumulators, u is the scaled input and v is the output
code:

```
y   = a1·x1 + a2·x2 + a3·x3 + b4·u         v = clamp(round(y), −7, +7)
x1 ← x1 + c1·(b1·u − v)
x2 ← x2 + c2·x1 − g1·x3
x3 ← x3 + c3·x2
```

The coefficients are:

- a1 = a2 = 1/2 + 1/16, a3 = 1/2 − 1/16
- b1 = 1, b4 = 1/2
- c1 = 2, c2 = 1/2, c3 = 1/4
- g1 = 1/256 + 1/512

Each is a shift or the sum of two shifts, so the loop has no multipliers.

The feed-forward paths (a1..a3, b4) let the integrators process only the error between
input and output. This keeps their swing small. The −g1 feedback around the second and third
integrators turns them into a resonator. That places a pair of noise-transfer zeros near
17 kHz, which deepens the noise notch at the top of the audio band. The peak out-of-band
gain of the noise transfer function is 1.8, a common stability margin for multi-bit loops.

**Word lengths.** Each accumulator keeps a fixed number of fraction bits, and each increment
is truncated to it:

| Accumulator | Fraction bits | Integer bits incl. sign |
|---|---|---|
| x1 | 13 | 5 |
| x2 | 9 | 4 |
| x3 | 6 | 6 |

The fraction-bit counts come from a standard bound: the truncation noise of each
accumulator, shaped by the loop, must stay 120 dB below a full-scale sine. The integer bits
are this design's choice. They were sized from simulation with margin. The accumulators
saturate, and `acc_sat` reports it.

**Input scaling.** A full-scale 24-bit input maps to ±6 steps (`IN_GAIN = 6`). This leaves
one level of headroom each side, and with the DAC model's step size it gives a 0.8 Vpp
output. The quantiser clamps at ±7, and `clip_evt` reports a clamp.

**Measured performance.** These are bit-true figures for the digital path only, from
`tb_sndr_levels`: 1 kHz tone, 20 kHz band, Hann window.

| Input level | In-band SNDR |
|---|---|
| 0 dBFS | 67.6 dB (the interpolator output clips, see below) |
| −1 dBFS | 114.2 dB |
| −6 dBFS | 109.4 dB |
| −20 dBFS | 95.9 dB |
| −40 dBFS | 75.4 dB |
| −60 dBFS | 52.9 dB (≈ 113 dB dynamic range) |
| −85 dBFS | 19.0 dB |

A full-scale sine does not fit. The half-band stages have a passband gain of about
+0.02 dB at 1 kHz, so a 0 dBFS sine overshoots the 24-bit range and the interpolator
saturates. Keep inputs at or below about −0.1 dBFS.

These figures fall a few dB short of the 120 dB design target for the noise shaper; the
13/9/6 fraction bits are the main limit. In a real chip, analog distortion and noise limit
the output far below this. Figures around 66–70 dB SNDR and 87–91 dB dynamic range are what
the analog section reaches, and the behavioural models below do not reproduce them.

## Element selection: `thermo_enc` and `dwa_enc`

**`thermo_enc`** is combinational. It turns the signed 4-bit code q into a 15-bit
thermometer word with q + 8 ones, filled from bit 0:

- +7 → all 15 ones;
- 0 → 8 ones;
- −8 → none. The modulator never produces −8.

**`dwa_enc`** rotates that word left by a pointer p, taken modulo 15. It registers the
result as `sel`, then advances p by the number of ones. Each code therefore uses the
elements that follow the ones used last time, wrapping from element 15 to element 1, and
`wrap` pulses on the wrap.

Over any stretch of time, every element is used within one time of every other. The
register gives one clock of latency from code to `sel`. The rotation is a double-width
shift, so there is no loop over elements.

With a ±1 % spread of the unit elements in the DAC model, a −6 dBFS tone reaches these
in-band SNDR figures (`tb_dwa_mismatch`):

| Element selection | In-band SNDR |
|---|---|
| Perfectly matched elements | 108.7 dB |
| ±1 % mismatch, through the DWA | 104.8 dB |
| ±1 % mismatch, fixed assignment | 64.7 dB |

## Analog section (behavioural models, not synthesizable)

**`dct_src_dac`** models the direct-charge-transfer switched-RC DAC. In each clock it forms
the target

    VCM + VSTEP·(Σ wᵢ·selᵢ − 7.5)

with VCM = 0.9 V and VSTEP = 0.8/12 V. The output moves toward that target with a 170 kHz
single-pole step response, which stands for the hold capacitor. The element weights are
wᵢ = 1 + MISMATCH·eᵢ. The `MISMATCH` parameter (0 by default) imposes a fixed pattern eᵢ of
unit-capacitor errors, so the DWA's effect can be studied.

**`rc_lpf`** is the first-order post filter at 150 kHz. It is modelled as the exact
response of the pole to an input held constant over each clock.

Neither model includes noise, op-amp settling or distortion. The op-amps themselves, and the
generator of the non-overlapping switch phases, are not modelled.

## Top level

**`ds_dac_core`** is the synthesizable chain, from `sdata` to `dac_sel`. **`ds_dac_top`**
adds the two models and brings out the following:

- `dsm_code` and `dac_sel`;
- `vdac` and `vout` (`real`, in volts);
- event strobes for observing each mechanism: `fs_tick`, `word_evt`, `hb1_odd_evt`,
  `hb2_odd_evt`, `interp_sat`, `dsm_clip`, `dsm_acc_sat` and `dwa_wrap`.

Synthesis tools that do not accept `real` ports should use `ds_dac_core` as the top.

Shared widths, types (`sample_t`, `code_t`, `therm_t`) and the filter coefficients are in
`rtl/dac_pkg.sv`. It must be compiled first.

## Where this design departs from or fills in its specification

- **Levels.** The 4-bit code could express 16 levels (−8..+7), but the converter is
  specified with 15. The quantiser is clamped to ±7. The encoder still maps −8 to "no
  element" for completeness.
- **Level 0.** Code 0 selects 8 of the 15 elements, as in the encoder's specified mapping.
  The DAC model centres the output by subtracting 7.5 steps. A remark that code 0 selects no
  capacitors conflicts with that mapping and was not followed.
- **Post filter.** The filter is first order, as its RC description implies. A quality factor
  of 0.707, which would need a second-order section, was not followed.
- **Design choices.** The hbf1 coefficients, the sinc order (3), the accumulator integer
  bits, the input gain, rounding modes and the serial framing are all this design's own.
- **Passband ripple.** It is ±0.03 dB for the half-band stages only. The chain as a whole
  droops 0.5 dB at 19 kHz (see above).

## Simulation

All testbenches are self-checking. Each prints `TB_RESULT checks=N failures=M` and stops by
itself, and each has a watchdog. With Verilator 5:

```
verilator --binary --timing -Irtl rtl/dac_pkg.sv tb/tb_ds_dac_top.sv --top-module tb_ds_dac_top
./obj_dir/Vtb_ds_dac_top
```

The same pattern works for every other `tb/tb_*.sv`.

| Testbench | What it checks |
|---|---|
| `tb_s2p` | 300 random words with random bit gaps; a stray partial word must be discarded at the next sync |
| `tb_hbf1`, `tb_hbf2` | every output against a direct convolution of the zero-stuffed input; output spacing |
| `tb_sinc_interp` | every output against a direct sinc³ convolution; one output per clock |
| `tb_interpolator` | whole chain on a sine: group delay 973.5 clocks, error < 0.4 % of full scale |
| `tb_interp_response` | passband gain at 1/10/19 kHz and every image up to 1.41 MHz |
| `tb_dsm3_ciff` | each code against an independent fixed-point model of the loop, including overload |
| `tb_thermo_enc` | all 16 codes |
| `tb_dwa_enc` | rotation, pointer and wrap against a pointer model; per-element usage balance |
| `tb_dct_src_dac`, `tb_rc_lpf` | model outputs against step-by-step pole responses and settling |
| `tb_ds_dac_top` | end to end at default sizes: analog output tracks a sine within 15 mV; clipping, ±6 codes, DWA wrap, mid-scale return; each mechanism counted |
| `tb_sndr_levels` | in-band SNDR at −1, −6 and −60 dBFS |
| `tb_dwa_mismatch` | in-band SNDR with ±1 % element mismatch, with and without DWA |

`tb_ds_dac_top` runs the full-size design with no parameter overrides.
