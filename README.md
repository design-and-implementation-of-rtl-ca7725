# IEEE 802.11a preamble synchronizer

An 802.11a (OFDM WLAN) receiver has to do three things before it can run its FFT. It must notice
that a packet has started. It must measure the carrier frequency offset between transmitter and
receiver. It must find where the OFDM symbols begin. This design does all three from the packet
preamble, one complex baseband sample per clock at 20 Msample/s.

It uses two properties of the preamble:

* **Repetition.** The preamble starts with ten identical 16-sample short symbols. Correlating the
  signal with itself delayed by 16 samples therefore gives a large value while the short symbols
  last. The angle of that value is the phase that the frequency offset adds over 16 samples.
* **A known waveform.** The preamble ends with two identical, known 64-sample long symbols.
  Correlating the input with a stored copy gives a sharp peak exactly where a long symbol ends.

The design keeps hardware cost low in three ways:

* Packet detection compares against a threshold of one half, so it needs a shift, not a divider.
* One shift-and-add CORDIC computes every angle, one iteration per clock.
* The 64-tap cross-correlator uses power-of-two coefficients, so it has no multipliers.

## The preamble and what happens when

```
 sample  0        16       ...      144      160      192              256              320
         | s1 | s2 | ... | s9 | s10 | GI (32) |  long symbol 1  |  long symbol 2  | data ...
         '------ short training: 10 x 16 ------'-- guard --'------ 2 x 64 -----------'
```

| Event (noise-free, sample numbers from the preamble start) | Output |
|---|---|
| Lag-16 correlation builds up during the first 32 samples. Once 8 of the last 32 comparator decisions are set, `pd` rises (about sample 36). | `pd` |
| While `fo_sel = 0`, the estimator converts the lag-16 correlation every 20 clocks. Each result is good while the 32-sample correlation window lies inside the short symbols. | `f_off`, `f_off_ready` |
| The lag-16 correlation falls below half the power in the guard interval, at about sample 164. The dropoff detector then outputs the number of samples since `pd`. | `t_off_coarse`, `t_coarse_valid` |
| The dropoff pulse starts a 100-sample search for the largest cross-correlation magnitude. The true peak is the window that ends at sample 255 (end of long symbol 1). | `t_off_fine`, `t_fine_valid` |
| While `fo_sel = 1`, the estimator uses the lag-64 correlation. That correlation is clean when its 128-sample window lies in guard + long symbols, i.e. ending at samples 287 to 319. | `f_off` |

## Block structure

```
              +-------------------- packet_detector ---------------------+
              | autocorr L=16 --R16--+                                    |
 x ---------->|                      +--> |R|^2*2 > P^2 --metric--> 8-of-32 averager --> pd
  |           | power_calc L=16 -P16-+                                    |
  |           +---------------------------------------------------------+
  |                 | R16                          | metric, pd
  |                 v                              v
  +--> autocorr L=64 --R64--> freq_offset_estimator     dropoff_detector --> t_off_coarse
  |                          (mux, scale, CORDIC,            | done
  |                           quadrant, Hz, hold) --> f_off  v
  +--> qxcorr (64 taps, shift-add) -- |Lambda|^2 --> max_detector --> t_off_fine
```

`ofdm_sync_top` wires these parts as shown. The gain control that normally comes before the
synchronizer is not part of the design. Its "settled" signal enters as `agc_done`. While
`agc_done` is low:

* packet detection is held off;
* the frequency estimator stops;
* the cross-correlator chain holds its contents.

## Packet detection without a divider

The detection metric is the normalised correlation M(d) = |R(d)|² / P(d)². Its terms are:

* R(d) = Σₘ r*(d+m)·r(d+m+16), summed over m = 0..15;
* P(d) = Σₘ |r(d+m+16)|², the power of the newer half of the window.

The packet is declared present when M(d) > 0.5. The comparator instead tests
`|R|² << TH_SHIFT > P²` (with `TH_SHIFT = 1`), which needs no division.

Both R and P are sliding sums kept recursively: add the newest term and subtract the one that
leaves the window. `autocorr` stores the last L samples and the last L lag products, so each
sample costs one complex multiply. Reset clears every delay line. The integer recursion is
therefore exact and accumulates no error.

Short bursts of raw decisions are filtered out. `pd_averager` keeps the last 32 decisions and sets
`pd` only when at least 8 of them are set. This delays `pd` by a few samples and removes isolated
spikes.

Known weakness: P covers only the newer half of the window. Right after a strong signal stops
(the end of a packet), R still contains strong-times-weak products while P is already small. The
comparator then reports a packet for about 16 samples, and the averager may pass it. The
end-to-end testbench sees this at the end of every burst. Logic downstream should ignore `pd` for
a while after a packet ends.

## Frequency offset estimation

An offset Δf adds a phase of 2π·Δf·L·Ts between samples L apart, so Δf = ∠R / (2π·L·Ts). The
lag-16 correlation measures offsets up to ±625 kHz (coarse). The lag-64 correlation is four
times finer but only covers ±156.25 kHz. The 802.11a worst case is ±200 kHz (±20 ppm at 5 GHz),
so the coarse estimate comes first and the fine one is optional.

`freq_offset_estimator` works as follows:

1. **Select.** `sel` (`fo_sel` at the top) picks R16 or R64.
2. **Scale.** The value is shifted right to 20-bit signed components, with saturation
   (`SHIFT16 = 9`, `SHIFT64 = 11` for the default widths). The angle does not depend on the
   scale.
3. **Fold.** Both components are replaced by their absolute values. The two sign bits travel
   with the conversion as a tag.
4. **CORDIC.** `cordic_vectoring` rotates the vector towards the x axis by ±atan(2⁻ⁱ), for
   i = 0..19, one iteration per clock. The rotation direction follows the sign of y, and the
   angle is accumulated. Angles are binary angles: 2²⁴ = one turn. The arctangent constants are
   `round(atan(2⁻ⁱ)/(2π)·2²⁴)`, stored in `sync_pkg`.
5. **Restore quadrant.** The sign bits give θ, π−θ, θ−π or −θ.
6. **Convert and hold.** The angle becomes Hz: `f = angle · (20 MHz / L) / 2²⁴`, rounded. The
   constants are 1 250 000 for L = 16 and 312 500 for L = 64. The result is held in `f_off`.

Timing:

* While `en` is high, a conversion starts every 20 clocks.
* `ready` pulses 21 clocks after the clock whose correlation value was taken: 20 CORDIC
  iterations plus the hold register.
* `f_off` only changes on `ready`, so the reader always sees a settled value.
* Changing `fo_sel` takes effect at the next conversion. Each conversion carries its own selector
  value.

Accuracy: the testbench drives ideal correlations, and results are within 20 Hz over both ranges
and all four quadrants. On generated preambles with light noise, the coarse error is about 2 kHz
and the fine error a few hundred Hz.

## Coarse timing: the dropoff detector

`dropoff_detector` starts a counter when `pd` rises. The counter advances each sample while the
comparator decision stays set, which is the same "above half the power" test used for detection.
At the first sample where the decision is clear, the count is the coarse timing offset:

* it is published on `t_off`;
* `t_valid` stays high for `HOLD = 16` samples;
* `done` pulses in the first clock.

The detector then waits for `pd` to fall before re-arming, so each packet gives one estimate. An
8-bit count saturates at 255; saturation also ends the count.

On a clean preamble the count ends about 128 samples after `pd`, at preamble sample 164. Noise and
multipath move this point by tens of samples, so this estimate alone is too coarse for the FFT.

## Fine timing: quantized cross-correlator and maximum detector

`qxcorr` computes Λ(d) = Σₘ q*(m)·r(d+m) over 64 taps. The reference q*(m) is the conjugated long
symbol.

**Coefficients.** Every real and imaginary part of q*(m) is 0 or ±1, ±2, ±4, ±8. A product is
then a shift by 0..3 plus a sign choice, so there are no multipliers. Each component is stored as
a 4-bit `qlevel_t {zero, neg, shift[1:0]}`, and a tap as a `qcoef_t {re, im}`. The coefficients
are computed from the ideal long symbol c(m) as

```
q(m) = Q(8 · c*(m) / max|c*|),  per real and imaginary component,
Q(v) = 0                          if |v| <= 0.5
     = sign(v) · 2^ceil(log2 |v|)  otherwise           (levels 1, 2, 4, 8)
```

and are written through `coef_we / coef_addr / coef_data` before use. The register file resets to
zero, so **the cross-correlator does nothing until it is loaded**. `tb/tb_ofdm_sync_top.sv` shows
how to build the long symbol from its 52 subcarriers and quantize it.

**Structure.** Each tap computes `Sum(m) = q*(m)·x + z⁻¹·Sum(m−1)`. This is the transposed form:
every tap sees the newest sample in the same clock, and the last partial sum is the correlation.
Timing:

* after the edge that takes sample x[n], `lam_re/lam_im` hold the correlation of window
  x[n−63..n], with q*(0) applied to x[n−63];
* `mag_sq = |Λ|²` follows one clock later.

The squared magnitude keeps the order of |Λ| and needs no square root.

**Maximum detector.** `max_detector` is started by the dropoff pulse. It scans the next 100
magnitudes and reports the index of the largest (the earliest one on ties). Index 0 is the
magnitude present in the start clock. On a clean preamble:

* the dropoff pulse comes at about sample 165 and starts the search;
* the true peak, the window that ends at sample 255, reaches the detector 2 clocks later at
  sample 257;
* `t_off_fine` is therefore about 91;
* the end of long symbol 1 is at `start + t_off_fine − 2`.

The search ends before the second long symbol's peak.

## Top-level interface (`ofdm_sync_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | sample clock; asynchronous active-low reset |
| `agc_done` | in | 1 | gain settled; enables detection, estimation, correlation |
| `x` | in | `sample_t` (2×12) | complex sample, signed I and Q |
| `fo_sel` | in | `fo_sel_e` | 0: coarse (lag 16), 1: fine (lag 64) frequency estimate |
| `coef_we`, `coef_addr`, `coef_data` | in | 1, 6, `qcoef_t` | cross-correlator coefficient write |
| `pd` | out | 1 | packet detected |
| `f_off`, `f_off_ready` | out | 32, 1 | frequency offset in Hz (signed), update pulse |
| `t_off_coarse`, `t_coarse_valid` | out | 8, 1 | samples from `pd` to correlation dropoff |
| `t_off_fine`, `t_fine_valid` | out | 7, 1 | index of the correlation peak in the 100-sample search |

Top-level parameters and their defaults:

* `XC_TAPS = 64`, `XC_WINDOW = 100`;
* `AVG_N = 32`, `AVG_M = 8`, `TH_SHIFT = 1`;
* `COARSE_W = 8`, `HOLD = 16`.

The sample width, 12 bits, is `sync_pkg::SAMPLE_W`. Internal widths follow from it at full
precision:

* R16: 29 bits;
* R64: 31 bits;
* P16: 28 bits;
* Λ: 23 bits.

## Simulating

Every testbench is self-checking and ends with a line `TB_RESULT checks=N failures=M`. Put the
package first in the file list. Example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sync_pkg.sv tb/tb_ofdm_sync_top.sv \
          --top-module tb_ofdm_sync_top -o sim && ./obj_dir/sim
```

| Testbench | What it checks |
|---|---|
| `tb_autocorr`, `tb_power_calc` | recursive sums against direct sums, for L = 16 and 64, full-scale inputs |
| `tb_pd_averager` | 8-of-32 rule against a count; spike trains rejected |
| `tb_packet_detector` | R16, P16, comparator and averager against a model; a burst sent while `agc_done` is low is ignored |
| `tb_cordic_vectoring` | angle against `$atan2`, magnitude against the 1.6468 gain; 20-clock latency and period |
| `tb_freq_offset_estimator` | offsets in all four quadrants, both selectors, within 20 Hz; 21-clock latency |
| `tb_dropoff_detector` | count value, 16-sample hold, one estimate per `pd`, saturation |
| `tb_qxcorr` | exact complex correlation with random power-of-two coefficients; reload; hold when disabled |
| `tb_max_detector` | arg-max within 100 samples, ties, the sample just outside the window ignored |
| `tb_ofdm_sync_top` | whole design at default parameters (see below) |
| `tb_sync_workloads` | frequency offsets 0/100/200 kHz over multipath channels at 10 and 20 dB SNR (see below) |

`tb_ofdm_sync_top` builds the preambles from the 802.11a subcarrier definitions. It applies
carrier offsets of +100, −150, +20 and −40 kHz, adds light noise, and loads the quantized
coefficients. It checks:

* detection;
* coarse and fine frequency;
* the dropoff point;
* the fine timing point;
* rejection of a spike train;
* that a packet is ignored while `agc_done` is low.

It counts how often each of these happened, and each must happen at least once.

`tb_sync_workloads` sends 20 packets for each condition: 2 channels × 3 offsets (0, 100, 200 kHz) ×
2 SNRs (10, 20 dB), 240 packets in all. The channels are static tapped delay lines. Their tap
powers are the ETSI A (office, 50 ns RMS delay spread) and ETSI C (open space, 150 ns) profiles,
with each path summed into its 50 ns sample bin. Each packet draws new Rayleigh gains and adds
Gaussian noise. Typical results:

| Quantity | 20 dB | 10 dB |
|---|---|---|
| packets detected | 120/120 | 120/120 |
| fine timing within ±8 samples, 0 and 100 kHz | 80/80 | 62/80 |
| variance of those timing errors (samples²) | 0.2 – 2.9 | 0.2 – 2.6 |
| fine frequency error, 0 and 100 kHz | < 2 kHz | < 6.3 kHz |
| coarse frequency error, one reading late in the short symbols | < 21 kHz | up to 62 kHz |
| fine timing within ±8 samples, 200 kHz | 17/40 | 15/40 |
| early dropoff (before preamble sample 120) | 0/120 | up to 7/20 per condition |

The weak spots are plain in this table:

* **10 dB SNR.** The normalized metric sometimes dips below one half during the short symbols. The
  dropoff then fires early, and the 100-sample fine search window closes before the long-symbol
  peak. Fine timing then misses.
* **200 kHz offset.** The carrier turns 0.64 of a cycle across the 64-sample reference. This halves
  the correlation peak, and the fine timing often locks onto a sidelobe.
* **Deep fades.** A single 16-sample window can give a poor coarse frequency estimate in a deep
  fade. The estimator output is continuous, so averaging several readings would help, but the
  design does not average.

The bench checks these bounds:

* detection: all packets at 20 dB, and at least 90 % at 10 dB, where a deep fade can hide one;
* at 20 dB, coarse error below 50 kHz, and every dropoff point within preamble samples 120 to
  200;
* fine frequency error below 10 kHz where the offset is within the fine range;
* for 0 and 100 kHz, at least 90 % (20 dB) or 40 % (10 dB) of fine timing errors within ±8
  samples, and a variance of those below 5.

The channels and noise come from a fixed-seed generator, so every run gives the same numbers.
The 10 dB dropoff, the coarse error at 10 dB and the 200 kHz fine timing are reported but not
checked.

## Trust and departures

* **Fixed point.** The sample width (12 bits) is a choice; the accumulators are wide enough never
  to overflow. The CORDIC input (20 bits) and iteration count (20) are the reference values.
* **Sign convention.** Δf = +∠R / (2π·L·Ts), with R = Σ r*(d)·r(d+L). A positive offset gives a
  positive `f_off`.
* **Scaling.** The 20-bit CORDIC input is taken by a fixed right shift. Very weak signals lose
  angle precision. There is no normalisation.
* **Fine search start.** The search starts at the dropoff pulse itself, with no added delay. On a
  clean preamble this is about preamble sample 166, so the peak lands near index 91 of the
  100-sample window. A design that starts the search 8 samples into the long symbols would see it
  near index 88. If the dropoff fires more than about 90 samples early, the window closes before
  the peak.
* **Control choices.** The following are this design's own: starting the fine search on the
  dropoff pulse, the 16-sample hold, re-arming on `pd` low, the 8-bit counter, and the continuous
  20-clock CORDIC restart.
* **Not included.**
  * Gain control.
  * The minimum-threshold detector and the unquantized cross-correlator: alternatives to the
    chosen maximum detector and quantized correlator.
  * The auto-correlation difference and sum coarse-timing methods: alternatives to the chosen
    dropoff method.
* **Channel testing.** Multipath is tested only with the simple tapped-delay channel in
  `tb_sync_workloads`, which bins the ETSI A/C power-delay profiles to 50 ns taps. It is not a
  calibrated reproduction of those channel models.
* **Resource figures.** FPGA resource counts of other implementations of this architecture do not
  carry over to this RTL.

## Files

`rtl/sync_pkg.sv` holds the shared types, constants and the arctangent table. Each other file in
`rtl/` is one module named after the file. `tb/` holds one self-checking testbench per module plus
the workload testbench.
