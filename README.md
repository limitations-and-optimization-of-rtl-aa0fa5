# Blind background calibration of ADC nonlinearity

An ADC whose transfer curve bends adds harmonics of its input to its output.
This RTL estimates and removes that distortion in the digital domain, while
the converter is in normal use, without a test signal. It is the digital
backend of the blind calibration algorithm studied in the 2015 thesis
*Limitations and Optimization of a Blind Calibration Algorithm for
Nonlinearity in Analog to Digital Converters* (Oregon State University). The
thesis describes the algorithm with block diagrams and equations and evaluates
it in floating-point simulation. This RTL is a fixed-point hardware reading of
that description. Where the description is open or self-contradictory, the
choices made here are flagged below.

The central trick uses two identical ADCs that convert the same input, the
second one at half amplitude. A linear signal scales exactly with amplitude,
so doubling the second converter's output and subtracting it from the first
cancels the wanted signal. What is left, called `D_nosig`, is only the part
that does not scale linearly: the distortion. The residue is correlated with
the ADC output to get an error term. A least-mean-squares (LMS) loop then
moves the correction coefficient until the residue is gone. The wanted signal
never enters the error, so any input can be calibrated, including multi-tone
signals.

## Signal flow

For third-order distortion, an ADC code is modelled as
`D_out = x + a3*x^3`. The second ADC produces
`D_out2 = x/2 + a3*(x/2)^3`. Each sample pair passes through these steps:

1. **Offset removal** (optional, `offset_en`). An ADC offset would leak into
   `D_nosig` and bias the estimate, so each stream can first be centred on
   zero. The offset is tracked by a leaky average with a time constant of
   `2^OFFSET_AVG` samples and subtracted. This cannot tell an ADC offset from
   a DC component of the input, so converters with small offsets remain
   preferable.
2. **Correction of both channels** with the current estimate `alpha`:
   `D_cal = D_out - alpha*D_out^3` and `D_cal2 = D_out2 - alpha*D_out2^3`.
   `D_cal` is the calibrated output of the whole design.
3. **Signal-free residue**: `D_nosig = D_cal - 2*D_cal2`. With `alpha = 0`
   this equals `0.75*a3*x^3`. As `alpha` approaches `a3` it shrinks towards
   zero.
4. **Windowed correlation**: `err` is the sum, over a window of `w = 32`
   positions, of `D_nosig * D_out`. The positions are taken every third
   sample. This is the downsampling by the harmonic order.
5. **LMS step**: `alpha <- alpha + mu*err`, with `mu` a power of two.

With `HARM5 = 1` a second coefficient `alpha5` corrects `D_out^5` in both
channels. It has its own stride-5 buffers, its own correlator and its own
update loop (see the limitations below).

## The finite window and how its samples are paired

This is the part that needs the most care. The ideal algorithm pairs each
`D_nosig[m]` with the downsampled sample `D_out[3m]`. To keep that pairing
while the window slides, the buffer has to keep growing without limit. The
thesis therefore replaces it with a finite buffer of `3w-2` samples. The
downsampled window is read out of that buffer: every third entry, starting
from the oldest. When one new sample enters, the window moves by one sample.
With `w = 4` the stride-3 indices go `[1 4 7 10] -> [2 5 8 11] -> [3 6 9 12]`.

`window_buffer` implements exactly this buffer. The thesis does not state
which `D_nosig` samples are paired with the stride-3 `D_out` samples in the
finite version. Two readings were modelled in floating point:

* **`D_nosig` at the same positions as the `D_out` taps.** This is the
  reading used here. Both streams go through identical 94-entry buffers, and
  tap k of each is the sample at `oldest + 3k`. The estimate settles at 0.0442
  for a true `a3 = 0.05` at amplitude 0.9. This matches the "about 0.044" the
  thesis reports. It falls short of 0.05 because the correction itself creates
  fifth- and higher-order terms. The hardware settles at 0.0438.
* **`w` consecutive `D_nosig` samples against the stride-3 taps.** This does
  not converge: the correlation swings sign with the input phase, so its
  average is zero.

Consequences of the chosen pairing that a user should know:

* **Sign of the update.** The thesis prints `alpha[n] = alpha[n-1] - mu*err`.
  With its own definitions of `D_cal`, `D_nosig` and `err`, that sign diverges
  for the finite buffer. The RTL therefore adds `mu*err`. The subtracting form
  belongs to the ideal growing-buffer algorithm; it converges there (to 0.042
  in the model).
* **Odd orders only.** The error sum of the chosen pairing is, in effect,
  the correlation of the residue with the signal itself. For an even order
  (`ORDER = 2`) with a sinusoidal input it averages to zero. The second-order
  path elaborates but does not calibrate.
* **Little dependence on frequency.** The thesis reports that the estimate
  degrades when the input does not complete a whole number of periods in the
  window. It also reports dips near 0.125 fs and 0.375 fs and a peak at
  0.25 fs. With this pairing the estimate lies between 0.0425 and 0.0439 at
  every frequency tested. There are small dips at 0.125, 0.25 and 0.375 fs,
  but no peak and no degradation between grid points.
* **Third and fifth order are not separated.** With `HARM5 = 1` both error
  sums measure much the same correlation, so `alpha3` and `alpha5` share the
  correction. On a purely cubic input they settle at about 0.014 and 0.033.
  They are not 0.044 and 0. The third harmonic still falls to 16% of its
  uncorrected level.

`D_nosig` is computed once, when a sample arrives, using the coefficient
value at that moment. It is then buffered. It is not recomputed when the
coefficient changes. The thesis does not say which of the two it intends.

## Coefficient update, step size and window sliding

`lms_update` holds the coefficient: 24 bits, 20 of them fractional. It
saturates at ±8. The step is `mu = 2^-MU_SHIFT`, applied to the real value of
`err`, so an update is a shift and an add. The thesis sweeps `mu` from 2^-2
to 2^2 but does not give the scale of `err`. Here that sweep is mapped to
`MU_SHIFT` 12 down to 8. The default, 9, stands for `mu = 2^1`. With
`MU_SHIFT = 7` the loop oscillates and runs into the saturation limits.
Settling times at `w = 32` (first sample with `alpha >= 0.039`) range from
130 samples (`MU_SHIFT = 8`) to about 1320 samples (`MU_SHIFT = 12`).

`SLIDE` sets how far the window moves between updates. The coefficient is
updated on every `SLIDE`-th sample once the buffer is full. `SLIDE = 1` is the
baseline. `SLIDE = 2`, `3` and `w` settle at the same value, only later: 300,
469 and about 5250 samples. The thesis suggests sliding so that the hardware
has several ADC cycles per update. This RTL still computes all 32 products
every clock and only updates less often. A cheaper engine with fewer
multipliers was not built.

## Window shape

`WINDOW` selects a rectangular window (plain sum, the default) or a Hann,
Hamming or Blackman window. A tapered window weights both `D_nosig` and
`D_out` at tap k by `w(k)`, so each product is scaled by `w(k)^2`:

* Hann: `w(k) = 0.5 - 0.5*cos(2*pi*k/(N-1))`
* Hamming: `w(k) = 0.54 - 0.46*cos(2*pi*k/(N-1))`
* Blackman: `w(k) = 0.42 - 0.5*cos(2*pi*k/(N-1)) + 0.08*cos(4*pi*k/(N-1))`

Here N is the window length `w`. The weights are computed at elaboration from
these formulas and rounded to 15 fractional bits. Because this pairing shows
no frequency-resolution problem, the windows change the settled value by at
most 0.0002.

## Number formats

| quantity | bits | fraction bits | note |
|---|---|---|---|
| ADC codes `D_out`, `D_out2` | `DATA_W` = 12 | 11 | full scale ±1 |
| powers, `D_cal` | 20 | 16 | `D_cal` saturates |
| `D_nosig` | 22 | 16 | no overflow possible |
| `err` | 40 | 27 | exact sum for the rectangular window |
| `alpha`, `alpha5` | 24 | 20 | saturates |
| window weights | 16 unsigned | 15 | `w(k)^2` |

Products are truncated towards minus infinity. The thesis fixes none of these
widths. They were chosen so that a 12-bit ADC loses nothing that matters to
the loop.

## Modules

```
blind_cal_top            the whole backend
 |- offset_remover  x2   leaky-average DC removal, 1 cycle
 |- nl_corrector    x2   D_cal = D_out - alpha*D_out^ORDER (- alpha5*D_out^5)
 |   '- power_unit       x^n, combinational
 |- nosig_combiner       D_nosig = D_cal - 2*D_cal2
 |- window_buffer   x2   (x4 with HARM5) finite buffer with stride taps
 |- err_correlator       (x2 with HARM5) sum of tapered products
 '- lms_update           (x2 with HARM5) coefficient register
bc_pkg                   formats, window enum, window formulas
```

### `blind_cal_top` interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset, clears everything, `alpha = 0` |
| `in_valid` | in | 1 | a sample pair is present (at most one per clock) |
| `d_out1`, `d_out2` | in | 12 | full-scale ADC and half-input ADC codes |
| `offset_en` | in | 1 | enable offset removal on both channels |
| `out_valid` | out | 1 | `d_cal` valid, two clocks after `in_valid` |
| `d_cal` | out | 20 | calibrated sample (16 fraction bits) |
| `d_nosig` | out | 22 | residue of the same sample, for monitoring |
| `alpha`, `upd` | out | 24, 1 | main coefficient, and a pulse after each update |
| `alpha5`, `upd5` | out | 24, 1 | fifth-order coefficient (zero when `HARM5 = 0`) |

Parameters: `DATA_W` (12), `WIN_LEN` (32, the thesis's `w = 2^5`), `ORDER`
(3), `MU_SHIFT` (9), `SLIDE` (1), `WINDOW` (`WIN_RECT`), `HARM5` (0),
`OFFSET_AVG` (10, the offset averaging time constant is 2^10 samples).

Timing: a sample leaves the offset stage one clock after `in_valid`. There it
is corrected with the coefficient held at that moment and shifted into the
buffers. `d_cal` is registered one clock later. The coefficient update on
that same edge uses the window that ends with the previous sample. Updates
start once the buffers hold a full window. For the defaults that is 94
samples, so the first `upd` pulse follows the 96th input sample. The
correlator is a single combinational sum of 32 products, fed by registers and
feeding the coefficient register. Its path is long. Pipelining it would add
delay to the loop but would not change its behaviour.

The two ADCs and the 0.5 input attenuator are analog and not part of the RTL.
The testbenches model them as `x + a3*x^3`, quantised to 12 bits.

## Verification

Every module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line:

* `tb_power_unit`: all 4096 codes, cube and fifth power, exact.
* `tb_nl_corrector`: random codes and coefficients against real arithmetic,
  plus the saturation corners.
* `tb_nosig_combiner`: random and extreme operands; a linear pair cancels.
* `tb_window_buffer`: the `[1 4 7 10] -> [2 5 8 11] -> [3 6 9 12]` sequence,
  then a 94-entry buffer against a queue model with random enables.
* `tb_err_correlator`: exact integer sum for the rectangular window, and
  real-valued references for the three tapered windows.
* `tb_lms_update`: reference model with random strobes, `SLIDE` 1 and 3,
  and saturation.
* `tb_offset_remover`: the estimate tracks +150 and -90 LSB offsets; the
  output mean is zero; bypass works.
* `tb_blind_cal_top`: five configurations side by side: default; with an
  offset and removal enabled; Hann window with `SLIDE = 4`; `HARM5`; and an
  offset with removal disabled. It checks the settled coefficient, the drop
  of the third harmonic (to 2% of its uncorrected level), the two-clock
  latency and the update counts. It also counts how often each mechanism
  occurred. Two further checks cover known side effects. A 100 LSB offset
  that is left in pulls the estimate from 0.0438 down to 0.0325. The
  correction creates a fifth harmonic of its own, at about 2.4e-4 of full
  scale.
* `tb_blind_cal_full`: default parameters, two input frequencies, from reset
  to a settled coefficient.
* `tb_workloads`: the sweeps of the thesis. These are input frequency (k/32,
  odd k/64, odd k/128 of fs), step size, window slide and window shape. It
  also checks that an oversized step fails to settle. It takes about 20 s.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/bc_pkg.sv tb/tb_blind_cal_top.sv \
          --top-module tb_blind_cal_top -o sim
./obj_dir/sim
```

Verilator finds the other modules in `rtl/` through `-Irtl`. `bc_pkg.sv` must
be listed first.

## What is not here

* The analog front end: two matched ADCs and the 0.5 attenuator.
* Any separation of the third- and fifth-order coefficients, and even-order
  calibration (see the pairing section).
* A reduced-multiplier correlator that would exploit `SLIDE > 1`.
* Calibration of the higher-order harmonics that the correction itself
  creates. The thesis mentions this only as a possible extension.
