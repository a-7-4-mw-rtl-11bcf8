# Wideband spectrum-sensing baseband processor

A cognitive radio may transmit only in channels that no licensed ("primary")
user occupies. This processor looks at a 200-MHz band and decides, for each
of its 1024 channels of 200 kHz, whether the channel is busy. It detects
energy: it averages the power of each FFT bin over many frames and compares
the result with a threshold.

Plain energy detection fails in two ways. A weak user at -5 dB SNR needs
hundreds of averages. A strong signal in a nearby channel leaks into its
neighbours and looks like a user there. The design deals with both:

* a **multitap window** in front of the FFT cuts the leakage, so a 30-dB
  interferer two bins away no longer matters;
* per channel, the leakage that is left (the *interfering power*) sets **how
  many frames to average**, M(k) (sensing-time adaptation, STA), and **the
  threshold**, gamma(k) (threshold adaptation, DTA). A clean channel is decided
  after about 100 frames (0.5 ms). A channel next to an interferer gets up to
  9765 frames (50 ms).

Everything runs at a 25-MHz clock with eight samples per cycle, so one
sample stream of 200 MS/s is processed with no back-pressure. Per-channel
values (averaged power, noise power, interfering power) are stored as small
floating-point numbers: a 10-bit mantissa and a 5-bit exponent.

```
 ADC 8 x (I,Q) / cycle
   |
 mw_window x8 ──> fft1024 ──> power_est ──> M1 (PSD sums)   M2 (noise sums)
 (2 taps)        (8 x fft128_sdf,      |
                  twiddles, fft8_par)  |        host: reads M1, writes M3 (interfering power)
                                       v
                   ss_ctrl ──> STA pass: M1..M3 ─> sta ─> M(k) store
                           ──> residual averaging, limited to M(k) per channel
                           ──> DTA pass: dta ─> power_detect ─> decisions
```

## The eight-lane sample stream

Lane l carries sample 8t + l in cycle t. A 1024-sample frame therefore takes
128 cycles, or 5.12 µs. `in_pos` in `ss_top` counts those 128 cycles. Every
block downstream keeps the rate of one frame per 128 cycles. Blocks that
need the position in the frame carry it with the data (`in_pos`, `out_pos`,
`out_k2`).

At the FFT output, a cycle holds eight bins with the same k2. Lane k1 holds
bin k = k2 + 128·k1. So the per-channel stores are split into eight banks
of 128 words: bank k1, address k2. Each bank is written by one lane only.
The k2 order is bit-reversed (0, 64, 32, 96, ...), and so `k2 == 0` marks
the start of an output frame. The controller uses this to count frames.

## Multitap window (`mw_window`)

Without a window, the FFT of a frame has sidelobes at -13 dB, and an
interferer 30 dB up masks its neighbours. A plain window lowers the
sidelobes but widens the main lobe. A multitap window makes the window
longer than the FFT instead. Each frame of N = 1024 outputs is the sum of
P = `TAPS` input blocks of N samples, each multiplied by its slice of a
P·N-sample window:

    y_m[n] = sum_p w[n + pN] · x[n + pN + mN]

Here P = 2: a 2048-sample window, folded onto 1024 points. Per lane this is
a delay line of (P-1)·128 words (one frame of that lane), plus P coefficient
multipliers and an adder. The coefficients are not fixed: the host writes
them through `cw_*` (lane, tap, position, 12-bit unsigned fraction). The
testbench of the top loads a sine window. The output is held back until the
delay line holds real samples ((P-1)·128 cycles after the first input).

## 1024-point FFT (`fft1024`, `fft128_sdf`, `fft8_par`)

This is the largest part of the chip, and its structure comes from a
power-area search: parallel banks allow a low clock and voltage, and a mixed
radix cuts the multipliers.

**Decomposition 1024 = 128 × 8.** Write n = 8·n1 + l and k = k2 + 128·k1.
Then

    X[k2 + 128 k1] = sum_l W8^(l·k1) · [ W1024^(l·k2) · sum_n1 x[8 n1 + l] W128^(n1·k2) ]

The inner sum is a 128-point FFT of lane l's own samples. Each lane has its
own `fft128_sdf`, so no data moves between lanes before this point. Then
comes one complex multiplier per lane, by W1024^(l·k2) (`fft_twiddle`). The
outer sum is an 8-point FFT across the lanes in one cycle (`fft8_par`:
three radix-2 levels, with constant W8 rotations).

**The 128-point pipeline** uses a single delay feedback (SDF). It has seven
butterfly stages with delays 64, 32, 16, 8, 4, 2 and 1. Each stage holds the
first half of a block in its delay line. It then outputs the sum and feeds
the difference back. The stages are grouped as radix 2² / 2² / 2³:

| group | stages (delay) | rotation inside the group | multiplier after it |
|---|---|---|---|
| PE1, radix 2² | 64, 32 | −j before the 2nd butterfly | W128^(n·bitrev2(c)), n = pos[4:0], c = pos[6:5] |
| PE2, radix 2² | 16, 8 | −j | W32^(n·bitrev2(c)), n = pos[2:0], c = pos[4:3] |
| PE3, radix 2³ | 4, 2, 1 | −j; W8^1..3 before the last | none |

Inside a group, the rotations are by −j (swap and negate) and by W8
(1/√2 ≈ 181/256, a shift-add constant). Only the two multipliers between
groups are general complex multipliers. Their cos/sin table (16 bits) is
computed at elaboration from `$cos`/`$sin`. No data file is needed.

In each stage, the rotation is applied to the operand that arrives second.
Its exponent is the bit-reversed value of the position bits already used.
For the multipliers between groups, the exponent is the product of the
position inside the group (n) and the bit-reversed group index (c). Getting
these indices right is the delicate part. The `fft128_sdf_tb` check against
a direct DFT catches a swap of two bits in them (see the fault list below).

Word lengths grow by one bit per stage (13 → 20 in the banks, +3 in the
8-point FFT). The 23-bit result is cut to its top 20 bits. Rotations
saturate. All other right shifts truncate.

**Delay.** A frame leaves about 128 + 12 cycles after it enters. The output
rate equals the input rate. `ss_top_tb` checks that the FFT delivers one
output cycle per input cycle.

### Partial mode: sensing only some sub-bands

If fewer channels need sensing, the same hardware can be reconnected
(`partial` = 1). For example, 128 channels are enough to find 80 free ones
in a sparse spectrum. In this mode the 8-point FFT comes first and acts as a
filter bank:

1. Each lane passes a two-tap window with a one-cycle delay. Together, the
   lanes form a 16-sample sine prototype.
2. The 8-point FFT then splits the band into eight 25-MHz sub-bands. Each
   lane now carries one sub-band at 25 MS/s.
3. 128-point bank b channelizes sub-band b into 128 channels. The twiddle
   array is bypassed.

`band_en` switches off sub-bands: their banks get zeros and so do not
toggle. Output lane b, bin k2 holds channel 128·b + k2 for k2 < 64 and
128·b + k2 − 128 for k2 ≥ 64 (modulo 1024). The rest of the processor is
unchanged. The 2048-sample window in front of the FFT still applies, and
the host loads it with coefficients equal across lanes. Change the mode
only while idle; frames in flight are lost.

## Floating-point numbers (`ss_pkg`, `fix2flt`, `flt_add`, `flt_mul`, `flt_sq`)

Per-channel powers span a huge range. A single frame of noise is small. A
9765-frame sum next to a 30-dB interferer is larger by 10^7 or more. Fixed
point would need about 30 bits per stored word. Instead, a value is m·2^e.
The mantissa m (10 bits) and the exponent e (5 bits) are both two's
complement. So a stored word is 15 bits.

* **Normal form:** the two top bits of m differ, so |m| is in 256..511.
* **Limits:** the smallest exponent (−16) keeps a denormal mantissa. An
  overflow saturates to the largest mantissa at exponent +15.
* **Rounding:** right shifts truncate (towards −∞). There is no rounding.
* **`flt_norm`** (in `ss_pkg`) turns a wide two's-complement integer and
  its exponent into this form. All operators share it.
* **`fix2flt`** is a priority encoder, which counts the redundant sign bits,
  plus a barrel shifter. `EBASE` is the exponent of the input's LSB.
* **`flt_add`** shifts the operand with the smaller exponent right by the
  exponent difference, adds the mantissas and renormalizes.
* **`flt_mul`** multiplies the mantissas and adds the exponents.
  **`flt_sq`** is the same for a single operand.

Truncation has a visible effect on long sums. Once a running sum's
mantissa is full, each addition loses on average half of the smallest step.
A 128-frame noise sum therefore comes out about 8% low. Adding a rounding
bit to `flt_add` would be the first improvement to make (see the limits
below).

## Power estimation and the stores (`power_est`, `ss_ram`)

For every FFT output, each lane converts real and imaginary parts to
floating point. It squares both and adds them, giving |X|²·2^-12. The
2^-12 comes from `AMP_EBASE` = −6. It centres typical noise and strong
interferers in the 5-bit exponent range. The lane then does a
read-modify-write on its bank:

* `tgt` selects M1 (the PSD sum T(k)) or M2 (the noise sum).
* `first` writes instead of adding, so no clearing pass is needed.
* `lim_en` with `frame_idx` skips a channel once it has had M(k) frames. The
  limit comes from the M(k) store, read one cycle ahead at `lim_raddr`.

Sums are stored, not means. The noise power is the M2 sum over 2^7 frames.
Dividing by the frame count is therefore only an exponent change
(`flt_scale2`) when the value is read.

The stores are plain simple-dual-port arrays (`ss_ram`, 8 banks × 128 words
each):

| store | content | bits |
|---|---|---|
| M1 | T(k), then the coarse PSD | 1024 × 15 |
| M2 | noise sum | 1024 × 15 |
| M3 | interfering power, written by the host | 1024 × 15 |
| M(k) | sensing time per channel | 1024 × 14 |

Together these are 60 kb.

## One sensing period (`ss_ctrl`)

`start` begins a period. The controller follows the FFT output stream and
moves through these phases (`ss_state_t`):

| phase | what happens | length |
|---|---|---|
| `ST_CAL` | `rf_off` = 1; noise sums into M2 | 2 + 128 frames (0.67 ms) |
| `ST_COARSE` | PSD into M1, to see the interferers | 2 + 32 frames |
| `ST_WAIT_INTF` | host reads M1 (`psd_*`), writes M3 (`intf_*`), raises `intf_ready` | host |
| `ST_STA`, `ST_STA_DRAIN` | 256 cycles, 4 channels/cycle through `sta`; M(k) into its store | 256 + 16 cycles |
| `ST_RESID` | PSD into M1 again, channel k limited to M(k) frames | 2 + max M(k) frames |
| `ST_DTA`, `ST_DTA_DRAIN` | 256 cycles through `dta` and `power_detect`; decisions on `dec_*` | 256 + 16 cycles |
| `ST_DONE` | M1 readable by the host; `start` begins the next period | |

Each accumulating phase first lets 2 frames pass (`SETTLE`). That way, the
window and FFT pipelines hold only samples taken in the new phase; this
matters after `rf_off` changes. The accumulation controls are registered.
They apply to the FFT output of the cycle before, and `ss_top` delays the
FFT output by one register to meet them. In a pass, lane u reads bank
2u + `pass_sub` at `pass_addr`. So four lanes cover the 1024 channels in
256 cycles. The controller keeps the largest M(k) seen in the STA pass,
and this sets the length of the residual phase. The two passes together
take 2 × 272 cycles, about 22 µs. That is the whole processing-time cost of
the adaptation, small against the 0.5 ms or more spent averaging.

## Sensing-time adaptation (`sta`, `nr_recip`)

The number of frames needed for the target detection and false-alarm rates
(Pd ≥ 0.9, Pfa ≤ 0.1 at −5 dB SNR) grows with the interference-to-noise
ratio ψ(k) = σ_if²(k) / σ_nf²(k). Once those targets are fixed, the formula
becomes

    M(k) = 74.25 · (1.1581 + ψ(k))²

Per lane, the steps are:

1. **1/σ_nf²** by Newton-Raphson: x ← x(2 − d·x). The mantissa of d, seen as
   d' in [0.5, 1), starts from x0 = 1. This corresponds to a starting value
   of 1/512 in mantissa units. The error is at most 1/2 at the start and is
   squared by each iteration, so four iterations give the 14 fraction bits
   used. The loop is unrolled into four pipeline stages, which take one new
   channel per cycle.
2. **ψ = σ_if² · (1/σ_nf²)**: a mantissa product and an exponent sum. An
   arithmetic shift gives a 10-bit fixed-point ψ with 4 integer and 6
   fraction bits (Q4.6), saturating at 1023/64. A wider ψ would not change
   M(k) by a whole frame.
3. **M(k)**: add 74/64 (≈ 1.1581), square, multiply by 297/4 = 74.25
   (shift-add: 256 + 32 + 8 + 1). Then truncate, and clamp to 1..9765.
   With ψ = 0 this gives M = 99 frames, about 0.5 ms.

Delay: 9 cycles; one channel per cycle per lane. A noise power of zero
gives M = 9765.

## Threshold adaptation and decision (`dta`, `nr_isqrt`, `power_detect`)

The threshold for a sum of M(k) frames is

    gamma(k) = (M(k) + 1.3624 · sqrt(M(k))) · (σ_nf²(k) + σ_if²(k))

Here 1.3624 = Q⁻¹(0.1)·√α, with α = 1.1302 taken from the same fit as
74.25.

* **sqrt(M)** comes from a Newton-Raphson inverse square root (`nr_isqrt`).
  M is normalized by an even shift into [0.25, 1). The inverse square root
  starts from 1.7 or 1.2 and takes four iterations. Then sqrt = M·r, with 8
  fraction bits.
* **The bracket** is formed in fixed point, converted with `fix2flt` and
  multiplied by Σ0 = σ_nf² + σ_if² (`flt_add`, `flt_mul`).
* **The sum T(k)** read from M1 travels with the data. So `power_detect`
  (T ≥ gamma → occupied, one register) decides in the same pass.

Delay: 8 cycles for `dta`, plus 1 for the detector.

## Host interface

* **Mode:** `partial` and `band_en` (see partial mode above). Set them
  before `start`.
* **Window coefficients:** `cw_en`, `cw_lane`, `cw_tap`, `cw_pos`,
  `cw_data`, any time.
* **Interfering power:** `intf_we`, `intf_addr` (channel), `intf_data`
  (float). Write any time before `intf_ready`. This design does not estimate
  the in-band interfering power itself. The host, or a block added later,
  derives it from the coarse PSD read through `psd_raddr` / `psd_rdata`
  (data one cycle after the address, valid in `ST_WAIT_INTF` and
  `ST_DONE`). The testbench's host model takes, for each channel, the excess
  of its two neighbours over the noise floor, divided by 256.
* **Results:** `sta_valid` / `sta_chan` / `sta_m` / `sta_psi` show each
  channel's M(k) and ψ(k). `dec_valid` / `dec_chan` / `dec_bit` give the
  decisions, four per cycle, 1 = occupied.

## Departures from the original processor and known limits

* **No interfering-power estimator.** The host port replaces it, as
  described above.
* **Partial mode shares the window in front of the FFT.** In the original,
  a second multitap window sits between the filter bank and the 128-point
  FFTs. Here, the window in front of the FFT serves both modes instead. Its
  coefficients must be loaded equal across lanes for partial mode. Unused
  sub-bands are fed zeros, which stands in for clock gating.
* **The Newton-Raphson loops are unrolled.** The original shares one loop
  among interleaved channels. It also reuses the reciprocal across passes.
  Here each period has one STA pass.
* **Constants.** The offset inside the M(k) formula is 1.1581. A rounder
  form of the same formula uses 1.15. 1.1581 is the value consistent with
  74.25 and α. The reciprocal's starting value is 1/512; with 1/256 the
  iteration would not converge for every normalized mantissa.
* **Word lengths are this design's own.** This covers the FFT stages, the
  12-bit ADC and window coefficients, the twiddles, ψ, and the square-root
  and reciprocal formats. Only the 10-bit/5-bit float and the 10-bit ψ come
  from the original.
* **Calibration length.** The original calls for 0.5 ms of calibration.
  Here it is 2^7 frames (0.66 ms), so that the division is a shift.
* **Delay lines and memories are plain register arrays.** The original
  mixes register files and flip-flops, on two supply voltages with level
  shifters. That is a physical-design choice with no RTL counterpart.
* **False-alarm rate.** `ss_top_tb` observes about 23% false alarms on
  empty channels, against a design target of 10%. Three effects add up:
  * the noise power is itself an estimate from 128 overlapping frames,
    with about 10% spread between channels;
  * the truncating float sum reads it about 8% low;
  * with M = 99 frames the threshold sits only 14% above the mean.

  A rounding `flt_add` and a longer calibration would both help. Detection
  and false-alarm probabilities over many periods have not been measured.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares against
values computed independently in the testbench. Each has a watchdog and
ends with a `TB_RESULT checks=… failures=…` line.

| testbench | what it checks |
|---|---|
| `fix2flt_tb`, `flt_add_tb`, `flt_mul_tb`, `flt_sq_tb` | bit-exact against reference functions (`ss_tb_pkg`) and, for in-range values, against real arithmetic |
| `fft128_sdf_tb` | random frames against a direct 128-point DFT; bit-reversed output order; latency |
| `fft8_par_tb` | random vectors against a direct 8-point DFT |
| `fft1024_tb` | random and two-tone frames against a direct 1024-point DFT; lane/bin mapping; partial mode against a direct filter-bank + 128-point model, disabled sub-bands exactly zero |
| `mw_window_tb` | the folded windowed sum, for 2 taps × 128 and 3 taps × 8 |
| `power_est_tb` | accumulation into M1/M2, first-frame overwrite, per-channel frame limit |
| `sta_tb`, `dta_tb` | M(k) and gamma(k) against real-valued formulas; latency |
| `power_detect_tb` | decisions against float comparison |
| `ss_ctrl_tb` | phase order, frames per phase, pass coverage, handshake, residual length |
| `ss_ram_tb` | read-before-write and one-cycle read delay against a model |
| `ss_top_tb` | one full period at the default sizes (below) |

`ss_top_tb` runs the processor with its default parameters. The input is
complex Gaussian noise, a strong interferer in channel 300, and two weak
users in channels 600 and 700. A host model answers the handshake. The
testbench checks:

* every channel gets one decision;
* the weak users are found;
* the false-alarm rate stays below 0.3;
* the interferer's neighbours get more than the minimum sensing time;
* every M(k) matches the ψ formula;
* the residual phase lasts max M(k) frames;
* the frame counts per phase are right;
* the FFT keeps pace with the input.

It also counts, and requires at least once, each of these mechanisms:

* calibration, coarse and residual frames;
* the handshake;
* adapted channels;
* skipped accumulations;
* decisions of both kinds;
* a frame in partial mode, with only sub-band 2 on. The tone at channel 300
  must show in lane 2, bin 44, and the other lanes must stay zero.

It takes about 131,000 cycles and well under a minute to simulate.

Each block's testbench was also run against a copy of the block with one
deliberate bug, for example:

* a swapped twiddle index bit;
* a wrong term in the M(k) shift-add;
* an off-by-one in the frame limit;
* a dropped first frame;
* the detector fed from the wrong store.

Every such copy made its testbench fail.

### Simulating

With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl +libext+.sv \
    rtl/ss_pkg.sv tb/ss_tb_pkg.sv tb/ss_top_tb.sv --top-module ss_top_tb
./obj_dir/Vss_top_tb
```

Replace `ss_top_tb` with any other testbench name. `ss_pkg` and
`ss_tb_pkg` must come first on the command line. Modules are found in
`rtl/` by name.

## Files

* `rtl/ss_pkg.sv`: float type, phase enum, shared functions.
* `rtl/ss_top.sv`: top level.
* `rtl/ss_ctrl.sv`: period sequencer.
* `rtl/mw_window.sv`: multitap window.
* FFT: `rtl/fft1024.sv`, `rtl/fft128_sdf.sv`, `rtl/fft_sdf_stage.sv`,
  `rtl/fft_twiddle.sv`, `rtl/fft8_par.sv`.
* Floating point: `rtl/fix2flt.sv`, `rtl/flt_add.sv`, `rtl/flt_mul.sv`,
  `rtl/flt_sq.sv`.
* Power estimation: `rtl/power_est.sv`, `rtl/ss_ram.sv`.
* STA and DTA: `rtl/sta.sv`, `rtl/nr_recip.sv`, `rtl/dta.sv`,
  `rtl/nr_isqrt.sv`, `rtl/power_detect.sv`.
* `tb/`: one testbench per module, plus `tb/ss_tb_pkg.sv` (reference float
  functions).
