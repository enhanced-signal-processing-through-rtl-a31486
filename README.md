# CORDIC-NCO digital downconverter for a five-channel direction finder

An ADC that samples an intermediate-frequency (IF) signal produces far more
samples than a baseband processor can handle. A digital downconverter (DDC)
closes that gap. It multiplies the sampled signal by a complex local
oscillator, which moves the wanted band to zero frequency. It then low-pass
filters and decimates the result, so only the band of interest is left, at a
much lower rate.

This RTL implements such a DDC in the form published for an FPGA
direction-finding receiver:

* a numerically controlled oscillator (NCO) whose sine and cosine come from a
  21-stage pipelined CORDIC, not from a lookup table;
* a complex (IQ) mixer;
* a filter bank of a CIC decimator, a half-band decimator and a symmetric FIR
  shaping filter.

Five identical channels run in lockstep, one per antenna of an array. Each
channel's decimated output goes through a 64-point FFT. The strongest bin of
channel 0 gives the signal's frequency and amplitude. At that bin, a
phase-difference unit measures each channel's phase against channel 0. A
correlator removes the channels' own phase errors, which it learns from a
calibration frame. It then compares the differences with the pattern that a
five-element circular array sees from each of 72 directions, and reports the
best match as the bearing.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). There is one
sample per clock at the input and one output every 64 clocks.

## Signal chain

```
                 ddc_module (x5, identical, shared i_nco / clock / reset)
 i_signal_i ─┐   ┌─────────────────────────────────────────────────────────────┐
 i_signal_q ─┼──►│ complex_modulate_module  I = i*cos + q*sin ─► ddc_round ─► cic_dec_module ─► o_ddc_i
             │   │ complex_modulate_module  Q = q*cos - i*sin ─► ddc_round ─► cic_dec_module ─► o_ddc_q
             │   │        ▲ cos, sin                                  (CIC ↓32 ─► HB ↓2 ─► FIR)
 i_nco ──────┴──►│   dds_module: phase acc ─► fold to ±π/2 ─► cordic_rotate (21 stages) ─► round
                 └─────────────────────────────────────────────────────────────┘

 o_ddc_i/q, o_ddc_fp of each channel ─► fft_core (x5, 64 points) ─► peak_select ─► phase_diff
                                                                     │ o_peak_bin,    │ o_phase,
                                                                     ▼ o_peak_power   ▼ o_phase_diff
                                                                 i_cal ─► correlation_azimuth ─► o_azimuth, o_az_score
```

| Module | Role |
|---|---|
| `ddc_df_top` | Top level: five DDC channels, five FFTs, peak-bin selection, the phase-difference unit and the correlator. |
| `ddc_module` | One DDC channel: NCO, I and Q mixers, rounding and filter module for each path. |
| `dds_module` | CORDIC NCO. |
| `cordic_rotate` | Unrolled rotation-mode CORDIC, one register per iteration. |
| `complex_modulate_module` | Mixer (8 × 8 → 16 bits). |
| `ddc_round` | Mixer output back to 8 bits: round, shift by 7, saturate, register. |
| `cic_dec_module` | Decimation and shaping filter module (CIC → HB → FIR → 8 bits). |
| `cic_decimator` | 3-stage CIC, decimation 32. |
| `hb_decimator` | 11-tap half-band, decimation 2. |
| `fir_shaping` | 15-tap symmetric pipelined FIR, no decimation. |
| `fft_core` | 64-point radix-2 FFT, one butterfly per clock, double-buffered. |
| `peak_select` | Strongest bin of channel 0, and that bin of every channel. |
| `phase_diff`, `cordic_vector` | Per-channel phase by vectoring CORDIC, and differences to channel 0. |
| `correlation_azimuth` | Calibration correction and correlation over 72 candidate azimuths. |
| `ddc_pkg` | Widths, the sample and IQ types, the CORDIC angle table and the filter coefficients. |

The port names of the NCO, mixer and filter module follow the published RTL
schematic. Examples are `i_fpga_clk`, `i_rst_n`, `i_nco[8:0]`, `i_dds_cos`,
`o_ddc_modulate[15:0]`, `i_cic_data`, `o_cic_data` and `o_cic_fp`. All
registers use an asynchronous, active-low reset (`i_rst_n`).

## The CORDIC NCO (`dds_module`, `cordic_rotate`)

The NCO is the core of this design, and the least obvious part.

**Phase accumulator.** A 24-bit register adds `i_nco << 14` every clock. The
full 24-bit range is one turn, so the output frequency is

    f_nco = i_nco * f_clk / 1024          (i_nco = 0 .. 511, step f_clk/1024)

The shift of 14 sets the tuning step. It is this design's choice, made so that
the 9-bit word covers 0 to f_clk/2. The published design prints only the
word width and the fact that frequency is proportional to the word: words 10
and 8 give 0.5 MHz and 0.4 MHz in its simulation. With this scaling that
corresponds to a 51.2 MHz clock.

**Folding.** CORDIC rotation converges only for angles within about ±99.7°.
The phase word is therefore read as a signed number, which puts it in
[-π, π). One pre-processing register then adds π to any angle outside
[-π/2, π/2). It also sets a flag saying that both results must be negated.

**Rotation.** `cordic_rotate` starts from x = 127/K, y = 0 and the folded
angle z. K = 1.6468 is the CORDIC gain of 21 iterations. Stage i computes:

    d  = +1 if z >= 0 else -1
    x' = x - d * (y >>> i)
    y' = y + d * (x >>> i)
    z' = z - d * atan(2^-i)

Each stage uses two shifters and three adder/subtractors, and ends in a
register. After 21 stages, x ≈ 127·cos z and y ≈ 127·sin z. The angle
constants are atan(2^-i)·2^24/2π, rounded. `ddc_pkg::atan24` lists them, and
`atan_w` rounds them for narrower angle words. The last angle step,
atan(2^-20), is about 3 phase LSBs. That is where 21 iterations matches a
24-bit phase.

**Output.** The output register rounds x and y from 24 to 8 bits, negates
them when the fold flag is set, and clips them to ±127. Clipping to ±127
means `-sin` never overflows. The Q mixer depends on this.

**Timing.** One sample per clock. The output after clock edge *m* belongs to
the accumulator value present after edge *m* − 23: 1 fold register, 21 CORDIC
stages and 1 output register. The measured accuracy is within ±1 LSB of
`round(127·cos)`.

## Mixing and rounding

`complex_modulate_module` computes the real part of
(i + jq)·(cos − j·sin) = i·cos + q·sin. This is the input multiplied by the
conjugate oscillator. A tone at f_in therefore comes out at f_in − f_nco.
There is no image at f_in + f_nco, because the input is complex. The mixer
registers the two products first and their sum second, so its latency is
2 clocks.

The Q path uses a second instance of the same mixer: its inputs are swapped
and its sine is negated, giving q·cos − i·sin. The published schematic draws
only the I path. Its block diagram has both.

`ddc_round` converts the 16-bit product back to 8 bits, in one register. It
computes `(x + 64) >>> 7` and saturates the result. A full-scale oscillator
(127) times an input of amplitude A gives an output of amplitude ≈ A.

## Decimation and shaping filter (`cic_dec_module`)

| Stage | Rate in → out | Arithmetic | Gain handling |
|---|---|---|---|
| `cic_decimator` N=3, R=32, M=1 | f_clk → f_clk/32 | 3 integrators at the high rate, 3 combs at the low rate, 23-bit wrap-around words | gain 32³ = 2¹⁵; output `>>> 7` gives 16 bits = input·256 |
| `hb_decimator` | f_clk/32 → f_clk/64 | 11 taps [3 0 −25 0 150 256 150 0 −25 0 3]/512: 3 pre-adds, 3 multiplies and the centre tap | unity DC gain, rounded |
| `fir_shaping` | f_clk/64 → f_clk/64 | 15-tap symmetric FIR: pre-adders, multipliers and a sum, each stage registered | coefficients sum to 1024, rounded, saturated |
| output register | | `(y + 128) >>> 8`, saturated to 8 bits | |

The chain as a whole has a DC gain of exactly 1: a constant input of 50
comes out as 50. `o_cic_fp` is a one-clock pulse that comes with each new
`o_cic_data`, every 64 clocks. In a CIC, the decimator follows the
integrators and the combs run at the low rate. This is the efficient
arrangement, and it keeps the combs' delay lines one word long.

The half-band filter uses the fact that every second coefficient is zero:
only the non-zero taps are computed.

The FIR follows the published folded structure. A delay line runs out and
back. Samples that share a coefficient are added before the multiplier.
Registers sit between the sections. Its 15 coefficients are a
Hamming-windowed sinc with a cut-off of 0.2 cycles per output sample:
[2 6 0 −34 −41 79 295 410 295 79 −41 −34 0 6 2]/1024.

**Settling.** After a reset or an NCO change, the filters need about 25
output samples to settle. A tone at f_clk/1024 passes with amplitude
99 out of 100. A tone at 0.2·f_clk is suppressed to 0.

## Five channels and the phase difference (`ddc_df_top`)

All five `ddc_module` instances share the clock, the reset and `i_nco`. Their
phase accumulators therefore hold identical values at all times, and the
relative phases of the five inputs survive the downconversion unchanged.

**FFT (`fft_core`).** Each channel collects 64 decimated samples into one of
two register banks, written at bit-reversed addresses as they arrive. When a
frame is complete the banks swap: the full bank is transformed in place while
the other one collects the next frame. A single radix-2 butterfly does the
transform, one butterfly per clock: 6 stages of 32 butterflies each, so 192
clocks. The twiddle address for butterfly *j* of stage *s* is
`(j mod 2^s) · 32 / 2^s`. The cosine and sine table (scaled by 2¹⁴) is computed at
elaboration from `$cos` and `$sin`; no table file is needed. Every
butterfly halves both of its results, so the output is the DFT divided by 64
and cannot overflow. The 8-bit input is placed at 16 bits with a gain of 128. A
complex tone of amplitude A that falls exactly on a bin therefore reads
|X| ≈ 128·A there. The 64 bins then leave in natural order, one per clock,
with `o_bin` and `o_last`. The whole frame takes 194 clocks from its last
sample to the first bin. A new frame arrives only every 64 × 64 = 4096 clocks,
so a sequential butterfly is amply fast; an assertion checks that a frame
never overruns the previous one.

Bin *k* corresponds to the baseband frequency k·f_clk/4096 for k < 32 and
(k − 64)·f_clk/4096 above. One NCO step (f_clk/1024) is 4 bins.

**Peak selection (`peak_select`).** The five FFTs run in lockstep. For each
frame, `peak_select` follows |X₀[k]|² on channel 0, keeps the largest (ties
keep the lower bin) and stores that bin of all five channels. One clock after
the last bin it outputs the bin index, the power and the five complex values.
The power is the amplitude measurement; reading the phases at the peak bin
keeps noise and other signals in other bins out of the phase measurement.

**Phase difference (`phase_diff`).** For the five selected bins it computes:

* the phase of each channel, using a 14-stage vectoring CORDIC
  (`cordic_vector`). A left-half-plane vector is first rotated by π.
* `o_phase_diff[k] = o_phase[k] − o_phase[0]`, as 16-bit signed fractions of a
  turn (2¹⁶ = 360°). The difference wraps naturally into [−180°, 180°).

`o_phase_valid` pulses once per frame, 194 + 1 + 16 = 211 clocks after the
frame's 64th decimated sample. `o_peak_bin`, `o_peak_power`, `o_phase` and
`o_phase_diff` are valid with it and hold until the next frame. The decimated
I/Q samples are also brought out to ports.

## From phase differences to a bearing (`correlation_azimuth`)

**Calibration.** Cables, filters and ADCs add a different, fixed phase to
each channel. To measure these errors, a calibration source feeds one signal
to all five inputs with equal phase. Hold `i_cal` high while such a frame's
result appears (`o_phase_valid`). Its phase differences then contain only the
channel errors. They are stored, `o_cal_valid` pulses one clock later, and
they are subtracted from the differences of every later frame. Until the
first calibration, nothing is subtracted.

**Correlation.** The array model is a uniform circular array: element *k* at
angle 72°·*k*, radius *R* = 0.5 wavelength. A plane wave from azimuth θ
reaches element *k* with phase 2π·R·cos(θ − 72°·k). The expected difference
to element 0, ref_k(θ), is therefore R·(cos(θ − 72°·k) − cos θ) turns. For a
measured frame, the correlator scans θ = 0°, 5°, …, 355°, one candidate per
clock, and scores each as

    score(θ) = Σ_{k=1..4} cos(d_k − ref_k(θ))

where d_k is the corrected difference. Each cosine comes from a 256-entry table
(values ×256), so a perfect match scores 1024. The highest score wins (ties
keep the lower azimuth). Using the cosine of the residual, not its square,
makes the score indifferent to 360° wraps in the differences. The ref_k
table (72 × 5 words) and the cosine table are computed at elaboration from
`$cos`.

**Timing.** `o_df_busy` is high for 72 clocks after each non-calibration
frame. Then `o_az_valid` pulses with `o_azimuth` (in 5° steps) and
`o_az_score`. The next frame comes 4096 clocks later, so the scan never
overlaps one; an assertion checks this.

To use a different array, change the `ref_k` formula in
`correlation_azimuth` (or `R_MILLI`, the radius in thousandths of a
wavelength). With the 0.5-wavelength radius, the test resolves each of the
72 directions correctly, even with ±2° of phase noise.

## Where this RTL departs from the published receiver

* **FFT form is this design's own.** The published receiver runs a pipelined
  FFT on each channel but gives neither its size nor its arithmetic. Here the
  size is 64 points, with scaling by ½ per stage. The architecture is a
  sequential single-butterfly transform, not a pipeline: at one sample per
  64 clocks a pipeline would be idle most of the time. The five FFTs still
  run in parallel, one per channel.
* **Bin choice is this design's own.** The published receiver measures
  amplitude with the FFT but does not say which bin it uses for the phase.
  Here it is the strongest bin of channel 0.
* **Array and correlation are this design's own.** The published receiver
  corrects the channels with calibration data and takes the azimuth of the
  highest correlation. It does not give the array geometry, the stored
  patterns, the grid or the correlation measure. The circular 0.5-wavelength
  array, the 5° grid, the cosine score and the `i_cal` calibration protocol
  are chosen here.
* **Not included:** the RF-module control (SPI), the host (PCIe) interface
  and the published receiver's start/busy control sequence. `o_df_busy` and
  `o_az_valid` give the busy flag and the result-write strobe of the
  correlator.
* **Phase method is this design's own.** The published receiver computes
  phases but does not say how. Here a vectoring CORDIC does it.
* **Sample width is 8 bits.** This follows the published schematic. The
  board's ADCs deliver 16 bits, so only their upper 8 bits can be used
  unchanged.
* **Q path added.** See *Mixing and rounding*.
* **Filter coefficients are this design's own.** The published half-band
  and FIR coefficients came from a filter-design tool and are not printed.
  The FIR is built with multipliers, following the published pipelined
  structure; a distributed-arithmetic version would compute the same function.
* **CIC settings are partly this design's choice.** The three stages follow
  the published example. That example quotes factors from 1 to 32, and the
  decimation factor is set to the top of that range. The differential delay
  (1) is chosen here. With the half-band stage, the total decimation is 64.
* **The CORDIC is fully unrolled.** The published text describes a
  21-stage pipeline. Its NCO drawing, however, shows an iterative CORDIC with
  iteration-count multiplexers, and its resource figures (about 150 registers
  for the CORDIC and about 1,000 for a DDC) match such a folded form. This
  RTL follows the pipeline, which delivers one sample per clock. It is much
  larger: one `ddc_module` holds about 3,500 flip-flop bits, of which about
  1,500 are the NCO's CORDIC.
* **Word widths, latencies and the 9-bit tuning scale are chosen here.**
  Among them are the rounding constant of `ddc_round` and the 16-bit words
  inside the filter chain.

**Capacity.** With the default decimation of 64, the output bandwidth is
about ±0.2·f_clk/64. That is ±0.53 MHz at a 170 MHz clock. It is enough for
narrow-band direction finding, but not for a 20 MHz-wide signal. The
smallest decimation this CIC supports, `CIC_R` = 2, gives only ±8.5 MHz at a
170 MHz clock. A 20 MHz signal would need the CIC bypassed (total decimation
2).

## Parameters

| Parameter | Default | Where |
|---|---|---|
| `NCH` | 5 | `ddc_df_top`, `peak_select`, `phase_diff`, `correlation_azimuth` |
| `NAZ`, `R_MILLI` | 72, 500 | `ddc_df_top` / `correlation_azimuth` (azimuth grid, array radius) |
| `FFT_N` / `N` | 64 | `ddc_df_top` / `fft_core`, `peak_select` (a power of two) |
| `CIC_R` | 32 | `ddc_df_top`, `ddc_module`, `cic_dec_module` |
| `CIC_N`, `CIC_M` | 3, 1 | `cic_dec_module` |
| `PHASE_W`, `STAGES` | 24, 21 | `dds_module` |
| `FCW_SHIFT`, `XY_W` | 14, 24 | `dds_module` |
| sample / mixer / filter widths | 8 / 16 / 16 | `ddc_pkg` |

`CIC_R` must be a power of two, at least 2. The CIC word width, and the shift that removes
the CIC gain, follow from `CIC_R` automatically. The filter coefficients live in
`ddc_pkg`, as functions `hb_coef` and `fir_coef`.

## Verification

Every module has a self-checking testbench in `tb/`, except the helper
`cordic_vector`, which is tested through `phase_diff`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. All of them
build with the plain command below, with no warnings waived.

| Testbench | What it checks |
|---|---|
| `tb_cordic_rotate` | 400 random vectors against a floating-point rotation, with the 21-clock latency |
| `tb_dds_module` | every output against `127·cos/sin` of the ideal phase (±1 LSB), 23-clock latency, for words 8 and 123; quadrant folding |
| `tb_complex_modulate_module` | random operands, exact products, 2-clock latency |
| `tb_ddc_round` | rounding and saturation against an integer model |
| `tb_cic_decimator` | exact match to the direct-form triple box-car convolution, with gaps in the input and the output timing |
| `tb_hb_decimator`, `tb_fir_shaping` | exact match to direct convolution, latency, output count, saturation |
| `tb_cic_dec_module` | output every 64 clocks, exact unity DC gain, pass-band and stop-band tones |
| `tb_ddc_module` | downconversion of tones at words 10 and 6 with the NCO at 8: magnitude, ±45° phase step per output, rate |
| `tb_fft_core` | 6 frames of random samples, 5 to 8 clocks apart; every bin against a floating-point DFT/64 (times 128) within 4 LSB; natural bin order, `o_last`, 194-clock latency |
| `tb_peak_select` | 60 random frames with a planted peak at a random bin, idle cycles in between, and ties (the lower bin must win), against a model: bin, power, all five values, 1-clock latency |
| `tb_phase_diff` | 2000 random five-channel sets against `atan2`, with wrap-around, within 0.2° and a 16-clock latency |
| `tb_workload_bandpass` | one channel on a real, band-pass sampled input: 384 MHz carrier sampled at 170 MHz (alias at 44 MHz), NCO word 265. Tones 0.3 MHz either side pass at magnitude ≈ 47 of 50 with the right frequency; a tone 3 MHz away is suppressed below 0.5 |
| `tb_correlation_azimuth` | all 72 azimuths, off-grid by up to ±2°, with random channel errors removed by a calibration frame and ±2° noise: azimuth, score ≥ 90 %, 72-clock busy and latency, calibration strobe |
| `tb_ddc_df_top` | the full design at its default parameters, 6 FFT frames: five tones with channel phase errors, first as a calibration source, then from azimuth 130°. Checks the peak bin (8, then 56 after the NCO word is switched mid-run), its magnitude within 85–105 % of the expected value, the phase differences within 3°, and the azimuth. Counts decimated outputs, FFT frames, NCO folds, wrapped differences, the NCO switch, the move of the peak bin, calibrations and azimuth results |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/ddc_pkg.sv tb/tb_ddc_df_top.sv \
          -y rtl -y tb --top-module tb_ddc_df_top -o sim
./obj_dir/sim
```

The full five-channel test at default parameters runs in about a minute,
mostly compilation. Synthesized with Yosys, the top reports about 6,100
word-level cells and 43,400 flip-flop bits. The five FFTs account for about
20,800 of those bits (two 64-word complex banks each), and the five DDC
channels for about 17,700. The correlator's two tables become ROM. Timing on
a real FPGA has not been checked.
