# Lifting-wavelet ECG denoiser with R-peak detection

A streaming, multiplier-free hardware ECG cleaner. The design splits the ECG
into octave bands with an 8-level integer lifting wavelet transform. It
soft-thresholds the four finest detail bands, where power-line hum, muscle
noise and other high-frequency noise sit. It discards the coarsest
approximation band, which holds the baseline wander. Then it rebuilds the
signal with the inverse lifting transform. An R-peak detector runs on the
cleaned signal. It reports the R-R interval and the heart rate.

There is no multiplier anywhere. The lifting steps need only additions and
one-bit shifts. The single non-trivial constant, the scale factor of the
universal threshold, is applied as a canonical-signed-digit (CSD) shift-and-add.
The median that the threshold is built from is found without magnitude
comparators.

The architecture follows a published FPGA design for wearable ECG monitors.
That source gives the band structure, the thresholding scheme and the
building blocks, but not the filter coefficients, the timing or the internals
of most blocks. Everything it leaves open is filled in here and listed under
[Where this RTL departs from, or adds to, the source](#where-this-rtl-departs-from-or-adds-to-the-source).

## Signal flow

```
            sample_tick (1 in DIV clocks)
 clk ──> clk_div ────────────────────────────────┐ (every block advances on it)
                                                 v
 ecg_in ──> lift_dwt ──D0..D3──> coef_shrink ──> lift_idwt ──> saturate ──> ecg_out
  (11 b)   (8 levels)  D4..D7 ──(unchanged)────>  (8 levels)   (13 b→11 b)    │
                       A7 ──────── zeroed ─────>  (a_top = 0)                 v
                │                     ^                                 rpeak_detect ──> r_peak,
                └─D0..D3─> mad_thresh ┘ (thr_auto=1)                         │           rr_interval
                           thr_in ────┘ (thr_auto=0)                   heart_rate ──> heart_rate_bpm
```

| Band | Produced every | Frequency range at 360 samples/s | Treatment |
|------|----------------|----------------------------------|-----------|
| D0   | 2 samples      | 90 – 180 Hz                      | soft threshold |
| D1   | 4              | 45 – 90 Hz                       | soft threshold |
| D2   | 8              | 22.5 – 45 Hz                     | soft threshold |
| D3   | 16             | 11 – 22.5 Hz                     | soft threshold |
| D4 … D7 | 32 … 256    | 0.7 – 11 Hz                      | passed unchanged |
| A7   | 256            | 0 – 0.7 Hz (baseline wander)     | replaced by 0 |

The sample rate only scales the frequency column; the hardware does not
depend on it.

## The lifting arithmetic

One forward level (`lift_fwd_stage`) takes the stream two samples at a time:

```
d = odd - even                 predict odd from even, keep the error
a = even + (d >>> 1)           update: a = floor((even + odd) / 2)
```

This is the integer Haar lifting pair. `a` is the floor of a mean, so it stays
within the 11-bit input range at every level. `d` needs 12 bits. Level *j*
runs on the approximation stream of level *j-1*, so it works at 1/2^j of the
sample rate.

One inverse level (`lift_inv_stage`) undoes the two steps in reverse order:

```
even = a - (d >>> 1)
odd  = even + d
```

With unmodified coefficients the inverse reproduces the input bit-exactly,
floors and all; `tb_lift_idwt` checks this. After thresholding and zeroing,
the reconstruction can leave the input range, because removing the baseline
can push a sample up to twice full scale. So the inverse path is 13 bits wide
and the final output is saturated to 11 bits.

Haar is the shortest lifting pair, and its only constant is 1/2. Longer
predictors (CDF 5/3, for example) would fit the same stage interfaces, but
they need neighbouring samples, so frames would overlap and the buffers would
grow.

## Timing: why the output is 271 samples late

This is the least obvious part of the design.

**One clock enable for everything.** `clk_div` raises `sample_tick` for one
clock in every `DIV`. Every register in the datapath advances only on that
cycle, so the whole pipeline behaves as if it were clocked at the sample
rate. A `valid` flag that is high "during tick *t*" holds for all `DIV`
cycles of that tick.

**Forward path.** Each forward stage registers its output. A level-*j*
coefficient pair that ends with input sample *n* therefore appears during
tick *n + 1 + j*.

**The coarsest level needs a whole frame.** The top approximation and the D7
coefficient depend on 2^8 = 256 input samples. So the first output sample
cannot be rebuilt before sample 255 has arrived. Every finer detail
coefficient must wait in a buffer until the approximation it pairs with has
been rebuilt from above.

**Detail buffers.** `lift_idwt` holds bands D0 … D6 in first-word-fall-through
buffers (`coef_fifo`). A buffer is popped when its inverse stage receives an
approximation sample, so no delay has to be computed. Band *j* holds at most
about 2^(7-j) coefficients, plus a few made while the pipeline fills. The
depth used is `2^(LEVELS-j-1) + (2*LEVELS >> (j+1)) + 2`, which is 138 words
for D0. D7 arrives with A7 and is used directly. Assertions flag overflow or
underflow.

**Inverse pacing.** Inverse stage *j* receives one (a, d) pair every
2·2^j ticks and must hand on one sample every 2^j ticks. It puts out `even`
on the tick after the pair arrives. It holds `odd` and puts it out exactly
2^j ticks later, counting sample ticks. Stage 7 is fed at a perfectly regular
rate, so by induction every stage below it is as well. Stage 0 then delivers
one sample per tick with no gaps. An assertion checks that a new pair never
arrives while `odd` is still held.

**Result.** Input sample *n* leaves as `ecg_out` during tick

```
n + 2^LEVELS + 2*LEVELS - 1   = n + 271 with 8 levels
```

That is 0.75 s at 360 samples/s, essentially the 256-sample frame of the
transform. `tb_lwt` checks the exact tick of every output sample.

## Threshold estimation (`mad_thresh`)

With `thr_auto = 1`, each thresholded band gets the universal threshold
λ = σ·√(2 ln N), where σ = median(|d|)/0.6745 (the usual robust noise
estimate). The median is taken per band over each frame of N = 256 input
samples, so the threshold is level-dependent:

* **Median without comparators.** The magnitudes of a frame are written into
  one half of a two-bank buffer. The other half holds the previous frame and
  is searched by radix selection, one bit at a time from the MSB. For each bit
  the block scans the buffer once, one word per system clock. It counts the
  words whose upper bits equal the bits chosen so far and whose current bit is
  0. Only this equality test and the sign of `rank - count` are used. The
  result is the lower median (rank N/2 - 1). The search takes 12 × 128 + 1
  cycles for D0, which is why `DIV` must be at least 7 (default 8).
* **CSD constant.** √(2 ln 256)/0.6745 = 4.937 ≈ 4.9375 = 2² + 2⁰ - 2⁻⁴. So
  `thr = (m << 2) + m - (m >> 4)`, saturated to 11 bits. The constant is fixed
  for 8 levels; for another frame length, change the shift-and-add terms.
* **Lag.** The estimate from frame *f* is ready during frame *f+1*. It is
  applied to the coefficients of frame *f+2*, switching exactly at the band's
  frame boundary. During the first two frames the estimated threshold is 0.

With `thr_auto = 0`, the external per-band thresholds `thr_in[0..3]` are used
as they are.

## R-peak detection (`rpeak_detect`)

Output sample *k* is an R peak when all three of these hold:

1. It is above `amp_thr` (amplitude test).
2. It is greater than sample *k-1* and not smaller than sample *k+1*
   (local maximum).
3. At least `MIN_RR` samples have passed since the last accepted peak
   (time-interval test). The default of 72 is 200 ms at 360 samples/s.

The peak is reported one tick after sample *k+1*. It comes with the distance
to the previous peak (`rr_interval`, in samples), `rr_valid` (low for the
first peak) and the peak amplitude.

`heart_rate` turns each interval into beats per minute, `floor(60 * FS / rr)`,
saturated at 255, with `FS = 360`. It is a restoring divider that makes one
quotient bit per system clock. The dividend is a constant, so the result is
ready 16 cycles after the peak is reported.

## Top-level interface (`lwt`)

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | system clock |
| `rst` | in | 1 | synchronous reset, active high |
| `enb` | in | 1 | engine enable; low pauses the sample tick and so the whole pipeline |
| `ecg_in` | in | 11 signed | ECG sample, taken on each cycle with `sample_tick` high |
| `thr_in[4]` | in | 11 each | external soft thresholds for D0..D3 |
| `thr_auto` | in | 1 | 1: estimated universal thresholds, 0: `thr_in` |
| `amp_thr` | in | 11 signed | R-peak amplitude threshold |
| `sample_tick` | out | 1 | one-cycle sample strobe (present the next sample by then) |
| `ecg_out`, `ecg_out_valid` | out | 11 signed, 1 | denoised signal, one sample per tick after the 271-tick latency |
| `r_peak` | out | 1 | one-tick R-peak flag |
| `rr_interval`, `rr_valid` | out | 12, 1 | samples since the previous R peak |
| `peak_value` | out | 11 signed | amplitude of the last R peak |
| `heart_rate_bpm`, `heart_rate_valid` | out | 8, 1 | heart rate, updated 16 cycles after each R peak that has a predecessor |

Parameters: `DATA_W = 11`, `LEVELS = 8`, `THR_LEVELS = 4`, `DIV = 8`,
`MIN_RR = 72`, `RR_W = 12`, and `FS = 360` (used only for the heart rate).
`LEVELS` and `THR_LEVELS` may be changed, but the CSD constant in
`mad_thresh` is correct only for `LEVELS = 8`.

For real time at 360 samples/s on a 166 MHz clock, set `DIV` to 461111.

## Size

Yosys coarse synthesis of `lwt` at the defaults gives about 830 word-level
cells and 990 flip-flop bits. Memory is about 9.2 kbit: 3396 bits in the
detail buffers and 5760 in the two-bank magnitude buffers of the four
threshold estimators. None of it is a multiplier.

The published design reports far less: 92 registers and no memory bits on a
Cyclone II. An 8-level transform with exact reconstruction must store about
one frame of detail coefficients, so that figure cannot be reached with this
band structure. How the original aligns its bands is not known.

## Where this RTL departs from, or adds to, the source

Taken from the source: the forward/inverse lifting structure (split, predict,
update; undo update, undo predict, merge); 8 decomposition levels with bands
D0..D7 and A7; soft thresholding of D0..D3, with D4..D7 passed and A7
zeroed; a universal, level-dependent threshold built from a median without
comparators; a CSD constant instead of multipliers; an external threshold
input; a clock divider that times the stages; amplitude plus time-interval
R-peak detection; 11-bit samples; the top-level name `lwt`.

Chosen here, because the source does not specify them:

* Haar predict/update filters. The source speaks of "adapted filters" but
  gives no coefficients.
* A clock enable instead of derived clocks, and `DIV = 8`.
* A 12-bit detail path, a 13-bit reconstruction path, and output saturation.
* FIFO alignment of the detail bands, and the inverse-stage output pacing.
* Radix selection for the median, the lower median, a 256-sample frame, and
  the two-frame threshold lag.
* `thr_auto`, which chooses between the estimated and the external
  thresholds. The source shows both, but not how one is chosen.
* The local-maximum rule and `MIN_RR = 72` in the R-peak detector.
* The heart-rate divider and `FS = 360`. The source mentions arrhythmia
  detection but does not describe it, so it is not built.
* Synchronous active-high reset.

Not built: analog-to-digital conversion and pre-processing, which the source
does offline; SNR/MSE performance analysis, also offline. The source quotes
a 1.2 ms processing latency without defining it. This design's latency is
271 samples, inherent in an 8-level frame.

## Verification

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference model
(`tb/tb_haar_pkg.sv`) is written separately with integers and loops. It
transforms each 256-sample frame on its own (Haar frames do not overlap),
then applies the soft threshold, zeroing, inverse transform and saturation.

| Testbench | What it shows |
|-----------|---------------|
| `tb_clk_div` | tick period, pause with `enb`, reset |
| `tb_lift_fwd_stage` | pair arithmetic on random and full-scale data, one-tick latency, gaps in the stream |
| `tb_soft_thresh` | corners (−2048, \|d\| = thr, thr = 0 and full scale) and 20 000 random pairs |
| `tb_coef_shrink` | per-band thresholds on D0..D3, pass-through of D4..D7 |
| `tb_lift_dwt` | all 8 bands of four frames, bit-exact, on the exact tick, no stray valids |
| `tb_lift_inv_stage` | perfect reconstruction of one level, even/odd output ticks |
| `tb_lift_idwt` | perfect reconstruction of four frames through all 8 levels, latency 271, gap-free |
| `tb_mad_thresh` | median and CSD threshold against sorting, two-frame lag, saturation |
| `tb_rpeak_detect` | peaks, RR intervals, spikes at exactly `MIN_RR` and `MIN_RR - 1`, flat tops, stream gaps |
| `tb_heart_rate` | 2000 random and corner intervals against integer division, 16-cycle latency, saturation, start while busy ignored |
| `tb_lwt` | whole design at default parameters (see below) |

`tb_lwt` streams 22 frames (5632 samples) of synthetic ECG through `lwt`
with no parameter overrides. The signal has R waves every 290 samples,
baseline wander, a 60 Hz-like ripple, noise, ectopic spikes and one frame
driven to the rails. It pauses the engine once. Partway through it switches
from external to estimated thresholds. Every output sample and every R-peak
flag is compared with the reference on its exact tick. The test also counts
each mechanism and fails if any never occurred: coefficient cut, coefficient
shrunk, A7 removed, output saturation, R peak, RR interval, peak rejected by
the interval rule, pause, threshold switch, and cut by an estimated
threshold. Every heart-rate result is checked too. It runs in well under a
second.

No recorded ECG is included. SNR/MSE figures on the MIT-BIH records were not
reproduced.

To run a testbench with plain Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    tb/tb_haar_pkg.sv tb/tb_lwt.sv --top-module tb_lwt
./obj_dir/Vtb_lwt
```

Replace `tb_lwt` with any testbench name. `tb_rpeak_detect`, `tb_clk_div`,
`tb_mad_thresh` and `tb_heart_rate` do not need the package, but including
it is harmless.

## Files

`rtl/`: `lwt` (top), `clk_div`, `lift_fwd_stage`, `lift_dwt`,
`soft_thresh`, `coef_shrink`, `mad_thresh`, `lift_inv_stage`, `coef_fifo`,
`lift_idwt`, `rpeak_detect`, `heart_rate`. Each file opens with a
description of its function, interface and timing.
`tb/`: one testbench per module (except `coef_fifo`, covered by
`tb_lift_idwt`), plus the reference package `tb_haar_pkg`.
