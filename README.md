# Cartesian soft-clipping peak-to-average reducer for OFDM

An OFDM symbol is a sum of many sub-carriers. When many of them add up in
phase, the time signal has peaks far above its mean power. The power
amplifier then has to be backed off a long way, and efficiency suffers. Soft
clipping cuts the peaks digitally before the amplifier, then repairs the
damage in the frequency domain. Each sub-carrier is pulled back towards the
constellation point it was meant to carry, but not all the way, because that
would rebuild the peak.

The usual repair step is a *polar* limiter. It converts every bin to
magnitude and phase, limits both, and converts back. This design uses a
*cartesian* limiter instead. I and Q are each clamped on their own to a
window of ±δ around the wanted point. This costs a little more phase error.
In exchange it needs no square roots, no arctangents and no polar-to-cartesian
conversion. Two comparators per axis are enough. The clamp is fitted as one
more pipeline stage behind a radix-4 FFT butterfly. It therefore runs while
the last FFT stage runs and adds no cycles of its own.

This RTL builds the whole chain for one IEEE 802.11a-sized symbol: 64
sub-carriers, 4x oversampling to 256 samples. It runs from constellation
points in to corrected time samples out, sequenced by a small hardware
controller.

## Processing chain

```
 X_k (64 bins) ─► IFFT 256, 4x up ─► power limit ─► FFT 256, 4x down ─► IFFT 64 ─► out
                  (zero padded,       (iterated      (decimating,
                   first stage         max search     cartesian clamp
                   skipped)            + polar        in last stage)
                                       scaling)
```

1. **Load.** The 64 points X_k are stored as reference points. They are also
   written into the sample memory, laid out for the IFFT (see below).
2. **Oversampled IFFT.** This is a 256-point inverse FFT of the 64 bins
   followed by 192 zeros. It produces 4x interpolated time samples, so the
   peaks between the Nyquist-rate samples are visible too.
3. **Power limit.** The limit is L = mean power × `par_factor`, which is the
   allowed peak-to-average ratio. The unit repeats two steps. First it finds
   the sample with the largest power. If that power is above L, it multiplies
   I and Q by the same real factor so that the magnitude becomes √L. This
   keeps the phase ("polar scaling"). It stops when no sample exceeds L, or
   after `MAX_PEAKS` (32) scalings.
4. **Decimating FFT with cartesian clamp.** A 256-point forward FFT computes
   only bins 0..63. In its last stage every bin is clamped to
   `X_k ± delta` in I and in Q independently.
5. **IFFT 64.** This turns the corrected bins back into 64 Nyquist-rate time
   samples, which are streamed out.

Used as-is, the zero padding interpolates the band 0..63 *shifted in
frequency*. To get the right peaks, supply the 64 bins as one contiguous band:
for 802.11a, sub-carriers −32..31 in that order, with the nulls as zeros. A
frequency shift does not change sample magnitudes, so the peak search sees
exactly the peaks of the real signal.

## The memory layout trick (the part worth reading twice)

All three transforms run in place in one 256-word memory. One radix-4
butterfly per cycle reads four words and writes four words. The order of the
data between transforms is chosen so that no reordering pass is ever needed.

* **IFFT 256 is decimation in time (DIT).** It wants its input in base-4
  digit-reversed order. A first-stage butterfly combines memory words 4m..4m+3.
  These hold input indices rev(m) + 64·i, i = 0..3. Only i = 0 is non-zero,
  because indices 64..255 are the zero padding. So every first-stage
  butterfly has one non-zero input, and its four outputs are all equal to that
  input. The loader therefore writes X_k straight into the four words
  4·rev3(k)+0..3, and the engine starts at stage 1. This saves all 64
  first-stage butterflies. (`rev3` reverses the three base-4 digits of a
  6-bit index.) The output comes out in natural order.
* **FFT 256 is decimation in frequency (DIF).** It takes natural-order input,
  which is what the IFFT left behind. Its last-stage butterfly m would produce
  bins rev(4m+q). Only bins below 64 are kept, and that is exactly lane q = 0,
  bin rev3(m). So only lane 0 is written back, to address m. The limiter's
  reference point for that lane is fetched from the reference array at
  rev3(m).
* **IFFT 64 is DIT again.** Address m now holds bin rev3(m), which is the
  digit-reversed order a 64-point DIT transform wants. It runs on addresses
  0..63 and leaves the 64 output samples in natural order.

The twiddle table holds W₂₅₆^m = e^(−j2πm/256) in Q1.14. It is computed at
elaboration time from `$cos`/`$sin` in `par_pkg`. Inverse transforms use its
conjugate. The 64-point transform uses every fourth entry.

## Numbers and scaling

* Samples are 16-bit two's-complement I and Q (`cplx_t`). Twiddles are Q1.14.
* The butterfly works on 20-bit intermediates. It rounds twiddle products,
  shifts right by a per-stage amount with rounding, and saturates to 16 bits.
* Shifts: 1 per computed stage for the inverse transforms, and 2, 2, 1, 0 for
  the forward 256-point transform. When nothing is limited, the chain gives
  out[n] = (1/8) Σ_k X_k e^(+j2πkn/64). This is also every fourth sample of
  the oversampled signal.
* Keep constellation coordinates within about ±2^11 so no stage saturates.
  The testbenches use 16-QAM at ±400/±1200 and 64-QAM with a 256-LSB step
  (largest coordinate 1792).
* `par_factor` is unsigned Q8.8. Useful values: 12 dB = 0x0FDA, 9 dB = 0x07F1,
  6 dB = 0x03FC, 3 dB = 0x0200. `delta` is in LSBs of the constellation scale.
  The reference setting is 0.15 × the largest coordinate.
* Scaled samples are truncated toward zero. The magnitude used for the factor
  is rounded up. Together these guarantee that a scaled sample never lands
  above the limit, so the next search cannot pick the same sample again.

## Modules

| file | role |
|---|---|
| `par_pkg.sv` | widths, `cplx_t`/`twid_t`, transform enum, twiddle table, helpers |
| `real_limiter.sv` | clamp of one coordinate to [ref−δ, ref+δ], edges saturated |
| `cartesian_limiter.sv` | two real limiters, one for I and one for Q |
| `r4_butterfly.sv` | 3-stage radix-4 butterfly: DFT with DIT pre-twiddle; DIF post-twiddle, scale and saturate; limiter stage |
| `sample_memory.sv` | 256 × 32-bit, 4 asynchronous read and 4 write ports |
| `fft_engine.sv` | address/twiddle generation and stage sequencing for the three transforms |
| `max_search.sv` | 4-lane scan for the sample of largest power, plus the power sum |
| `isqrt.sv` | bit-serial integer square root |
| `polar_scaler.sv` | √, divide, multiply: scales one sample to a magnitude limit |
| `power_limiter.sv` | threshold from mean power, search/scale loop |
| `par_reducer.sv` | top: memory port multiplexing, reference array, phase controller |

## Top-level interface and timing (`par_reducer`)

* `start` (one cycle) samples `par_factor` and `delta`. Then `in_ready` rises.
  64 points are accepted on `in_valid`, bin 0 first.
* When processing ends, 64 samples appear on `out_data` on consecutive cycles
  with `out_valid`. `out_last` marks the final one. `done` pulses with it.
  There is no back-pressure on the output.
* `n_scaled` gives the number of time samples the power limiter scaled.
  `n_limited` gives the number of bins the cartesian clamp changed. `cycles`
  gives the number of cycles from `start` to `done`.
* The reset `rst_n` is asynchronous and active low.

Cycle counts (1 butterfly per cycle, 3 drain cycles per stage):

| phase | cycles |
|---|---|
| load | 64 |
| IFFT 256 (3 of 4 stages) | 201 |
| power limit, with phase hand-over | about 95 + about 103 per scaled sample (≤ 32) |
| FFT 256 with clamp | 268 |
| IFFT 64 | 57 |
| output | 64 |

A symbol with nothing to scale takes 749 cycles. Symbols take about 1130
cycles at a 6 dB limit and about 3900 at 3 dB, where the 32-scaling bound is
usually reached. A DSP running the same algorithm with a butterfly
instruction was estimated at about 1250 cycles. That estimate counts 112
cycles per 256-point transform, 384 for the power limit and 512 for the
cartesian limit.

## Measured behaviour

From `tb_par_workloads`: 64-QAM, δ = 0.15 × the largest coordinate, 6 symbols
per row.

| limit | SNR of the bins | PAR before → after (4x oversampled) |
|---|---|---|
| 12 dB | 47 dB | 7.3 → 7.3 dB (nothing to clip) |
| 9 dB | 47 dB | 6.8 → 6.8 dB |
| 6 dB | 38 dB | 6.9 → 6.6 dB |
| 3 dB | 18 dB | 7.4 → 5.1 dB |

About 47 dB is the fixed-point floor of the three transforms. For comparison,
floating-point simulations of the cartesian method on real 802.11a data
reported 31.1, 24.2 and 19.3 dB at 9, 6 and 3 dB. Those figures come from a
different data set and peak statistics. The random symbols here rarely have
peaks above 9 dB, so the looser limits barely act.

## Where this design makes its own choices

The soft-clipping algorithm, the cartesian clamp rule, fitting the clamp into
a butterfly as an extra pipeline stage, DIT for the inverse and DIF for the
forward transform, and skipping the zero-padded work all follow the published
method. The following are this design's own:

* The method assumes a programmable DSP that has the butterfly and limiter
  as instructions. Here a fixed controller sequences the steps, and no
  processor is included.
* The memory has 4 read and 4 write ports (one butterfly per cycle), and the
  reference points are in a separate 64-entry array.
* Word widths, Q formats, per-stage shifts, rounding and saturation.
* The power limit is relative to the symbol's measured mean power, given as
  a PAR factor. The loop is bounded by `MAX_PEAKS` = 32.
* The polar factor is formed with a bit-serial square root and divider.
* Null sub-carriers are clamped around zero like any other bin.
* The clamp exists only inside the butterfly. A separate vector-limit pass
  over memory, the other way of attaching the limiter, is not built.
* Only one pass of clip-and-repair is made. Repeated passes would lower the
  regrown peaks further, but they are not built.
* The published savings estimate (160 butterflies) and DSP cycle figures are
  not reproduced. This engine skips the 64 first-stage IFFT butterflies, and
  in the last FFT stage it writes one output of four, but it still spends a
  cycle on each of those butterflies.

## Simulating

Every testbench is self-checking and ends with a `TB_RESULT checks=N failures=M`
line. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/par_pkg.sv tb/tb_par_reducer.sv \
          -y rtl --top-module tb_par_reducer -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_real_limiter`, `tb_cartesian_limiter` | clamp rule, edge saturation, flags |
| `tb_r4_butterfly` | all modes against a floating-point butterfly, 3-cycle latency, clamp flags |
| `tb_sample_memory` | 4-port writes and reads against a shadow copy |
| `tb_fft_engine` | each transform against direct DFT sums (±8 LSB), clamp count, busy cycles 57/201/268 |
| `tb_max_search`, `tb_polar_scaler`, `tb_power_limiter` | search results and timing, phase-preserving scaling never above the limit, threshold and scaled set against a model, `MAX_PEAKS` bound |
| `tb_par_reducer` | whole chain at default size against a floating-point model of the algorithm (±24 LSB): no limiting, 6 dB, 3 dB, tight window; each mechanism must occur |
| `tb_par_workloads` | the 12/9/6/3 dB settings: SNR, PAR before and after, window and cycle bounds |

All testbenches run in well under a second. The arithmetic was checked
against floating-point models, not against bit-exact reference vectors, so
results are trusted to a few LSB. Timing closure and area have not been
studied. The butterfly's first stage has a multiplier followed by the
4-point adder in one cycle, which is the path to watch.
