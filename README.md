# Low-complexity preamble synchronizer for OFDM-based UWB

An MB-OFDM UWB receiver samples at 528 MS/s. Its synchronizer has to find
the packet, measure the carrier-frequency offset (CFO), locate the FFT
window and find the point in the preamble where the frame sequence
begins. The obvious design is four parallel auto-correlators and four
165-tap matched filters running over 165 stored samples. This design does
all four tasks with one auto-correlator, one set of four 41-tap add/subtract
matched filters and 41 stored samples. Three ideas make that possible:

* **Data partition.** Only one sample in four (ω = 4) of each 165-sample
  preamble symbol is used for correlation. Multipliers, taps and storage
  all shrink to a quarter.
* **Moving-average-free matched filter.** The preamble symbol repeats,
  so a window starting at any timing k can be rebuilt from *one* stored
  symbol by wrapping around it. All 165 matched-filter outputs come from
  the same 41 stored samples. Only the coefficient pattern moves, and no
  sliding window of samples is needed.
* **Dynamic threshold** for preamble-timing detection. The decision
  threshold is rescaled, symbol by symbol, from the previous correlation
  ratio. It therefore follows the channel instead of being a fixed number.

The RTL follows the structure of the synchronizer published as "A
Low-Complexity Synchronizer for OFDM-Based UWB System". Where that
description gives no widths, encodings, control or reset behaviour, this
implementation makes its own choices. Each is listed below and in the
module headers.

## The preamble and the order of work

A packet starts with 21 packet-sequence symbols (PS), then 3 frame-sequence
symbols (FS, which are the PS negated), then 6 channel-estimation symbols.
Each symbol is N = 165 samples long: a 128-point FFT symbol plus a
37-sample guard interval. The synchronizer works through the PS part in
a fixed order:

| step | what happens | uses |
|---|---|---|
| PD  | correlate each symbol with the previous one; a packet is present when the correlation power is large relative to the symbol power | auto-correlator on raw samples |
| CFO | the angle of the next correlation result, divided by N, gives the phase step per sample; the compensators start rotating | CORDIC, per-lane NCO + complex multipliers |
| FWD | capture one symbol of compensated samples, sweep the matched filter over all 165 timings, take the earliest of the two strongest peaks | shared registers, matched filter, peak search |
| realign | move the symbol framing so that offset 0 is the FFT-window boundary | data-partition controller |
| PTD | sum consecutive correlation results; the sum collapses when the second correlated pair straddles PS20/FS0 | auto-correlator on compensated samples, PT detector |

In the default-size end-to-end test, with a random point in noise where
the preamble starts, the packet is detected about 2–2.5 symbols into the
preamble. The CFO is known at about 3.5 symbols and the FFT window at
about 6.5 symbols. The PS/FS decision arrives at 22.0 symbols, the end of
FS0, which is where it must be. That leaves much of the PS section unused.

## Data partition: one sample in four

The four lanes carry samples 4t … 4t+3. The data-partition controller
keeps a counter `pos`: the symbol offset (0 … 164) of lane 0. It passes
on only the samples at offsets 0, 4, 8, …, 160, which are
41 = ⌊165/4⌋ samples. With each selected sample it sends the index
n = offset/4 and flags for n = 0 and n = 40. Offset 164 is never used.

Because 165 is not a multiple of 4, the selected lane changes from
symbol to symbol. Four consecutive samples always contain exactly one
offset that is a multiple of 4. A vector that crosses a symbol boundary
can contain two of them (164 and 0), but 164 is not selected. So there is
never more than one selection per cycle, and one multiplier is enough.

Until the FFT window is known, the framing is arbitrary, and that is
enough for PD and CFO estimation. After the matched filter has found the
boundary at offset k, a `realign` pulse subtracts k from `pos`. From then
on, offset 0 is the true start of a symbol, `fft_sym_start` marks it on
the output, and PTD correlates whole symbols.

## One register bank, two users

`sample_registers` holds 41 4-bit complex samples as a shift register.

* **As the auto-correlator's delay line.** A shift happens on every
  selected sample. The sample leaving the tail is the one with the same
  index n from the previous symbol. The auto-correlator multiplies it by
  the conjugate of the new sample and accumulates over n = 0 … 40:
  `A(m) = Σ r(m·N+4n) · conj(r((m+1)·N+4n))`. In the same pass it sums
  the power of the new symbol, P(m+1).
* **As the matched filter's taps.** After a capture of exactly one symbol
  (n = 0 … 40), shifting stops. Entry l then holds r(4l), and all 41
  entries feed the matched filter in parallel.

The bank is used by one task at a time. Before CFO compensation it
carries raw samples (the 4 MSBs of the 5-bit input). From the CFO step
onwards it carries compensated samples (the 4 MSBs of the 6-bit output).
PTD therefore runs in the same framing the matched filter found. After
a realignment, the first two correlation results mix the old and new
framings, and the sequencer drops them.

## The matched filter without a moving average

The conventional filter is `M(k) = Σ_{n<N} r(k+n)·C(n)`, which needs the
165 samples starting at every candidate k. Because the PS symbol repeats,
r(k+n) for k+n ≥ N can be replaced by r(k+n−N). Every timing then uses
the same stored samples r(0 … N−1). With the data partition only r(4l)
remains:

```
M(k) = Σ_{l=0}^{40} r(4l) · C((4l − k) mod 165)
```

The preamble coefficients have constant magnitude and only vary in sign.
So each tap adds or subtracts its sample (`mf_unit`: 41 add/sub cells and
an adder tree), and there are no multipliers. Four units share the 41
samples and compute four timings per cycle. In step c, unit j computes
k = 4c + j, and all 165 timings take 42 steps.

The add/sub control bits come from a 165-bit circular register `rot`
that holds `rot[i] = C((i − 4c) mod 165)` in step c. Unit j, tap l reads
the fixed bit `rot[(4l − j) mod 165]`, which is plain wiring, and `rot`
turns by four places per step. The coefficient signs are an input of the
design (`coef_neg`). The standard's preamble patterns depend on the time-
frequency code, so they are supplied from outside, not built in.

## Picking the FFT window: the earliest of two peaks

With one sample in four, the strongest matched-filter peak is not always
at the window boundary. In multipath, a later path can correlate more
strongly. The rule used is the sub-optimal timing location: keep the two
strongest peaks and take the earlier one. `fw_detector` implements it on
the 4-per-cycle stream as follows:

* A *peak* is a local maximum: P(k) > P(k−1) and P(k) ≥ P(k+1), where
  P is |M(k)|². Timings outside 0 … 164 count as zero. Each lane is judged
  one step late, once its right-hand neighbour is known, and one extra
  cycle judges the last step.
* The two strongest peaks are kept in a sorted two-entry list. On equal
  power the earlier peak stays.
* *Earliest* is measured on the circle of 165 timings, relative to the
  strongest peak: the offset is wrapped into (−82, 82]. A negative offset
  means the other peak lies before the strongest one.
* A peak competes only if its power is at least `PEAK_RATIO`/256
  (default 0.5) of the strongest. This rule is an addition of this
  implementation. Without it, in a clean single-path channel the second
  "peak" is a random correlation sidelobe, and half the time it would lie
  before the main peak and be chosen.
* A peak also competes only if it lies at most `MAX_LEAD` timings
  (default 37, the guard-interval length) before the strongest. This
  rule is also an addition of this implementation. In a channel with
  several paths, the filter's energy spreads over a few timings and the
  main peak drops. A sidelobe of the 41-tap filter can then come within
  the power ratio. In a 5 ns RMS multipath sweep without this limit,
  such a sidelobe 43–64 timings ahead of the true boundary won in 1 to 4
  of the 16 multipath packets of a run. A real earlier path is never
  further ahead than the guard interval the window must absorb.
* On equal power the earlier timing is kept, including for an entry
  pushed down the list.

The end-to-end test includes two-path channels in which the second path
is the stronger one. There the filter's maximum is 2 or 3 samples late,
and the rule picks the first path. The correlator inputs are only the
4 MSBs of the compensated samples. With that coarse quantization, the
first path's peak now and then falls below half of the second's, and
then the later path is taken.

## Dynamic threshold for the PS/FS boundary

FS symbols are negated PS symbols. For the pair PS20/FS0 the correlation
result flips sign, and the sum of two consecutive results,
S(m) = A(m) + A(m−1), nearly cancels. `pt_detector` declares the
boundary when

```
|S(m)|² ≤ λ2 · Q(m)²,   Q(m) = P(m) + P(m−1),   λ2 = ε · |S(m−1)|² / Q(m−1)²
```

The threshold therefore tracks the ratio seen one symbol earlier. In a
clean channel that ratio is near 1, and with noise it is lower. ε is an
input (unsigned Q0.8, the tests use 0.25). The comparison needs no
division:

```
256 · |S(m)|² · Q(m−1)²  ≤  ε · |S(m−1)|² · Q(m)²
```

The correlator delivers P(m+1) together with A(m), so the detector keeps
the two previous powers. Its first decision is on the fourth result after
it is cleared. The packet detector uses the same ratio with a fixed
λ1 (input `lambda1`, Q0.8): |A(m)|² ≥ λ1·P(m+1)², and P must be non-zero.

## CFO estimation and compensation

With A = Σ r(m)·conj(r(m+1)), an offset of f rotates A by −2πfNT. The
phase step that cancels it is therefore +angle(A)/N per sample.

* `cfo_estimator` finds angle(A) with a 12-iteration CORDIC in vectoring
  mode, one iteration per 132 MHz cycle, as a 16-bit angle where 2^16 is
  2π. It then multiplies by a rounded 2^8/165 to get a 24-bit phase step.
  `done` comes 13 enabled cycles after `start`.
* `cfo_compensator` runs a 24-bit phase accumulator. Lane i uses
  phase + i·step, and the accumulator advances by 4·step per vector. The
  top 8 phase bits, rounded, address a 256-entry cos/sin table of
  amplitude 127, which is computed at elaboration from `$cos`/`$sin`.
  Each lane then does a complex multiply with rounding by 2^7 (gain
  127/128) and saturates to 6 bits. Latency is two vectors.

The estimate is unambiguous up to ±π per symbol, about ±1.5 MHz. That is
well above a 40 ppm offset at the top of the UWB band, which is about
412 kHz or 0.81 rad per symbol. Only one 41-sample result is used, so
the estimate has noise. In the sweep test its error was 0.001–0.12 rad
per symbol, down to 4 dB SNR.

## Number formats

| signal | format |
|---|---|
| ADC input | 5-bit signed I and Q |
| compensated output (to FFT) | 6-bit signed I and Q, gain 127/128 |
| samples in the registers / correlators | 4 MSBs of the above |
| auto-correlation result | 8-bit signed I and Q = 15-bit sum / 2^4, rounded, saturated at ±127 |
| symbol power P | 8-bit unsigned = sum / 2^4, rounded, saturated at 255 |
| matched-filter output | 11-bit signed I and Q; power 22 bits |
| λ1, ε, PEAK_RATIO | unsigned Q0.8 (value/256) |
| phase step | 24-bit signed, 2^24 = 2π per sample |

The ω factor in the partitioned sums is left out everywhere, because it
cancels in every ratio. The 2^4 scaling of the correlator output puts a
preamble at about half the input range well inside 8 bits. Truncating
that output instead of rounding it was tried, and it is wrong: it turns
the tiny negative correlation sums of noise into −1, and noise then
passes the packet detector.

Taking the 4 MSBs of the input truncates, and truncation biases every
sample by −½ LSB. When the noise is far below 1 LSB, the correlator
inputs become a steady stream of 0 and −1. That stream correlates like a
repeated signal and triggers the packet detector. The design therefore
expects the noise floor in front of a packet to be at least a few LSB,
which is what an AGC that has settled on the noise delivers. The
alternative is to hold `sync_en` low until the AGC has settled on the
packet.

## Clocking and the top-level interface

The hardware it models has four paths at 132 MHz behind a 528 MS/s
serial-to-parallel converter. This RTL uses **one clock**. `adc_valid`
qualifies one input sample per cycle. The serial-to-parallel converter
(lane 0 = oldest sample) pulses a vector-valid once per four samples,
and that pulse is the enable of everything downstream: the CORDIC
iterations and the matched-filter steps advance once per vector. To run
the quarter-rate part on a real 132 MHz clock, move the converter's
output register into that domain and tie the enables high.

`uwb_sync_top` ports:

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset (all registers reset to 0) |
| `sync_en` | in | high once the AGC has settled; low returns the sequencer to idle (used to restart between packets) |
| `adc_valid`, `adc_sample` | in | input sample (`adc_sample_t`: signed 5-bit `re`, `im`) |
| `coef_neg[164:0]` | in | matched-filter coefficient signs of the PS symbol, 1 = −1 |
| `lambda1`, `eps` | in | PD threshold and PTD ratio, Q0.8 |
| `fft_valid`, `fft_vec[4]` | out | compensated 4-lane vectors (`comp_sample_t`, 6-bit) |
| `fft_sym_start[3:0]` | out | after FWD: lane holding the first sample of a symbol |
| `pd_found`, `fwd_found`, `sync_done` | out | progress levels |
| `ptd_pulse` | out | one-cycle pulse on the PS/FS decision (at the end of FS0) |
| `cfo_phase_inc`, `fw_k`, `state` | out | estimated phase step, window offset in the capture framing, sequencer state |

Parameters of the top are `N_P` (165), `OMEGA_P` (4), `LANES_P` (4) and
`NUM_PEAKS` (2). The datapath assumes `OMEGA_P ≥ LANES_P`, so that at
most one sample is selected per vector. Smaller reduction factors would
need more correlators.

## What is this implementation's own

The published description gives the algorithm, the block structure and
the sizes above (N = 165, ω = 4, 41 registers and taps, four 132 MHz
paths, 5-bit input, 6-bit compensated output, 4-bit MSB correlator
inputs, 8-bit correlator output, two-peak window search). The following
are choices made here:

* single clock with a vector enable; lane order; reset to zero;
* CORDIC for the arctangent, NCO + table for the compensators, and all
  internal widths and scalings;
* one data-partition controller and register bank with an input
  multiplexer (raw before CFO, compensated after), and PTD on
  compensated samples;
* the realign mechanism and the two dropped correlation results after it;
* the first correlation result after PD is the one used for the CFO;
* the local-maximum peak definition, the circular "earliest" rule and
  the `PEAK_RATIO` and `MAX_LEAD` qualifications;
* power indices: the packet detector pairs A(m) with P(m+1) and the PT
  detector with P(m) + P(m−1), as written in the respective equations;
* thresholds and coefficients as inputs rather than constants;
* the sequencer's states and the restart on `sync_en`.

Not included: the blocks around the synchronizer (ADC, AGC, FFT,
equalizer, demapper, FEC decoder, descrambler). The top's ports stand in
for them.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares
against values computed independently in the testbench, has a watchdog,
and ends with a `TB_RESULT checks=… failures=…` line.

| testbench | what it checks |
|---|---|
| `tb_uwb_sync_top` | four packets at full size (N = 165, ω = 4): noise lead-in of random length, 21 PS + 3 FS + 6 CES + data, CFO 0.30/−0.45/0.80/0.55 rad per symbol, two two-path channels (delay 3 and 2 samples) with the later path stronger, restart via `sync_en`. Checks no early detection, CFO within 0.1 rad per symbol, every symbol mark on the true symbol grid (for two-path packets either path's grid), the PS/FS decision at the end of FS0, and that PD, CFO load, earliest-not-strongest window choice, realign, skipped results, PTD and restart each occur. Passes on 40 of 40 random seeds |
| `tb_uwb_sync_sweep` | 24 packets at full size under the conditions a receiver must handle: CFO uniform over ±0.81 rad per symbol (±40 ppm) including both extremes; single path or 12-tap Rayleigh multipath with 5 ns RMS delay spread; Gaussian noise at 4, 8, 12 and 20 dB SNR. A packet is *locked* when it is detected inside its preamble, the CFO error is ≤ 0.15 rad per symbol, every symbol mark lies 24 samples early to 8 samples late of the first path (an ISI-free window), and the PS/FS decision comes at the end of FS0. It prints lock counts per SNR and checks that there are no early detections, that every single-path packet at ≥ 12 dB locks, and that at least 75% of all packets lock |
| `tb_matched_filter` | all 165 outputs of four sweeps against the direct sum; 42 steps, one per enabled cycle |
| `tb_fw_detector` | directed window cases (sidelobe before a dominant peak, weaker earlier path, wrap-around, earlier peak exactly at and one beyond the guard-interval span, ends) and 200 random profiles against a reference model |
| `tb_pt_detector` | preamble-like sequences fire exactly on the PS/FS pair; random sequences against the threshold rule in real arithmetic |
| `tb_auto_correlator`, `tb_packet_detector` | integer reference sums with rounding and saturation; threshold decisions in real arithmetic |
| `tb_cfo_estimator` | angle within 0.11° and phase step for about 300 random vectors plus the axes; 13-cycle latency |
| `tb_cfo_compensator` | rotation against real-valued `cos`/`sin` within 1 LSB, with and without increment; two-cycle latency |
| `tb_data_partition_controller`, `tb_sample_registers`, `tb_serial_to_parallel`, `tb_sync_controller` | selection pattern and realign, delay line and taps, lane packing, state sequence |

Running one with plain Verilator (from the directory holding `rtl/` and
`tb/`):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/sync_pkg.sv tb/tb_uwb_sync_top.sv --top-module tb_uwb_sync_top
./obj_dir/Vtb_uwb_sync_top
```

Replace the testbench name to run another one. The full-size end-to-end
test runs in well under a second and the sweep in about ten seconds.

Repeated with 15 random seeds (`+verilator+seed+N
+verilator+rand+reset+2`), the sweep locked every single-path packet at
8 dB and above. It locked 177 of 180 multipath packets at 8 dB and
above:

* In two of the misses, a sidelobe of the 41-tap filter was stronger
  than the spread-out main peak. No rule for choosing among peaks can
  undo that.
* In the third miss, the CFO error was 0.150 rad, at the limit.

At 4 dB, 3 to 6 of the 6 packets locked.

All modules pass `verilator --lint-only -Wall` without circuit warnings.
The only notes are about unused signals, such as status signals of the
top. All modules also elaborate in Yosys with the slang front end.

Not verified: timing at 132 MHz, packet-error rate (that needs the FFT,
equalizer and decoder that follow the synchronizer), and operation with
the standard's actual preamble patterns. The tests use random ±1
patterns of the same length. The standard's patterns may have lower or
higher sidelobes after the one-in-four selection.
