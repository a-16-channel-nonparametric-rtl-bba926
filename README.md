# EC-PC spike detector, 16 channels

Extracellular neural recordings contain spikes buried in background noise.
This detector needs no hand-set amplitude threshold: it gives every sample a
*probability* of being part of a spike. It works in the squared envelope
Z = |V + i·H(V)|² of the band-passed signal V, where H is the Hilbert
transform. There the probability density of Z splits into two parts:

* the noise follows an **exponential component (EC)**, a straight line of
  log f against Z;
* the spikes follow a **polynomial component (PC)**, a straight line of
  log f against log Z.

Each channel has a histogram of its own normalised Z. A line is fitted to
each part, and the spiking probability of a sample is

    p = f_d(Z) / (f_d(Z) + f_n(Z))

A threshold on p then sets the expected precision directly: at 0.5, about
half of the detections are true spikes. All of these parameters are learnt
from the data, channel by channel, and refreshed continuously.

The RTL implements the digital chip of the published design "A 16-Channel
Nonparametric Spike Detection ASIC Based on EC-PC Decomposition" at its
published sizes. The original source gives the structure and the numbers.
Many details inside the blocks (number formats, the variance estimator, the
placement of the polynomial bins, the serial bit layout) are this design's own
choices. They are listed in [Departures and own choices](#departures-and-own-choices).

## Outputs and clocking

One 20.48 MHz clock runs everything. The 16 channels are sampled at 40 kHz
and time-division multiplexed. Each channel owns a slot of **32 clocks**, and
one sample period is **512 clocks**. Every datapath block is shared by all 16
channels and keeps its per-channel state in register arrays. Between blocks a
sample travels as a `(valid, channel, data)` triple, pulsed once per slot.
Channels always come in the order 0..15.

| port | direction | meaning |
|---|---|---|
| `sin` | in | serial input frames, 1 bit per clock |
| `spi_sclk/cs_n/mosi` | in | band-pass coefficient writes |
| `lfp_sout` | out | field potentials: raw data low-passed at 250 Hz |
| `bpf_sout` | out | band-passed spike signal |
| `prob_sout` | out | probability map: one score per channel per 64 samples |
| `trained[15:0]` | out | channel has EC-PC parameters |
| `frame_err` | out | an input frame had non-zero padding bits |

### Serial framing (`frame_encoder`, `frame_decoder`)

Every 16-bit sample goes out as one 32-bit frame, MSB first:

    header(8) | d15..d10 0 0 | d9..d4 0 0 | d3..d0 0 0 0 0

The header is `10101011` for channel 0 and `10111101` for every other channel.
The headers contain no "00", and the data part has "00" after every six bits.
A header therefore cannot be mistaken inside the data. The input is assumed
to use the same framing. The decoder re-synchronises on every header: a
channel-0 header resets the channel count.

Three streams leave the chip. The band-pass and LFP streams are continuous
(20.48 Mb/s each). The probability stream carries only 16 frames every 64
sample periods: 160 kb/s of scores against 10.24 Mb/s of raw data.

## Datapath

    sin ─ frame_decoder ─┬─ lfp_filter ─────────────────────────── frame_encoder ─ lfp_sout
                         └─ bandpass_filter ─┬──────────────────── frame_encoder ─ bpf_sout
                              ▲ spi_slave    └─ hilbert_transform ─ variance_normalizer ─┐
                                                                                          │
                 ┌──────────────────────────────────────────────────────────────────────┤
                 │  4 × ecpc_regression_engine (histogram + line fit) ── parameters ─┐   │
                 │                                                                     ▼   ▼
                 └───────────────────────────────────────────── probability_estimator ─ frame_encoder ─ prob_sout

### Band-pass filter (`bandpass_filter`)

The filter is a 16th-order elliptic IIR in cascade form: eight biquads with
three coefficients each, plus one overall gain. That makes 25 coefficients of
20 bits (Q2.18), with 40-bit intermediate data (Q22.18). An elliptic band-pass
has all its zeros on the unit circle, so each section is

    H_k(z) = (1 + b1 z⁻¹ + z⁻²) / (1 + a1 z⁻¹ + a2 z⁻²)

Each section is computed in direct form II, with the gain applied at the input.
One section is computed per clock, so a sample takes 10 clocks.

The reset coefficients give the default band: 300 Hz – 8 kHz, 0.08 dB ripple,
64 dB stop band. They were designed with a standard elliptic routine and
rounded to Q2.18. Coefficient addresses over SPI are `3k` for b1, `3k+1` for
a1 and `3k+2` for a2 of section k, and `24` for the gain. The sharpest section
has a pole radius of 0.9985. Its ring-down lasts several hundred samples,
which matters when coefficients are changed on the fly.

The SPI frame is 32 bits, mode 0, MSB first: `000 addr[4:0] 0000 data[19:0]`.
SCLK is oversampled, so it must be below clk/4.

### LFP filter (`lfp_filter`)

A first-order IIR low-pass, y += α(x − y), with α = 1 − e^(−2π·250/40000).
The original chip states only the 250 Hz corner; the filter order is this
design's choice.

### Hilbert transform (`hilbert_transform`, `r2sdf_fft_stage`, `r2sdf_ifft_stage`)

This block is the hardest part to follow. It works on consecutive,
non-overlapping blocks of 16 samples per channel.

1. **FFT.** This is a 16-point radix-2 decimation-in-frequency FFT with four
   single-path delay-feedback (SDF) stages, delays D = 8, 4, 2, 1. For the
   first D samples of each 2D group, a stage stores the input in its feedback
   delay and emits the difference term of the previous group, multiplied by
   the twiddle W_{2D}^j. For the last D samples it emits the sum and feeds the
   difference back. Each stage adds one bit of word length (16 → 20 bits).
   The output comes out in bit-reversed bin order.
2. **Rotation.** Bin k is multiplied by H(k): −i for k = 1..7, 0 for k = 0
   and 8, +i for k = 9..15. This is a swap of real and imaginary parts plus a
   sign change. The design then forms Y = X + i·H·X. The inverse transform
   then gives the analytic signal V + i·H(V) directly, and no delay line is
   needed to re-align V with its Hilbert transform.
3. **IFFT.** This is the transpose of the FFT: decimation in time with delays
   D = 1, 2, 4, 8 and conjugate twiddles. It takes the bit-reversed order as
   it comes and delivers natural time order. Each stage halves its result,
   which gives the 1/16 of the inverse transform at a constant 21 bits.
4. **Magnitude.** Z = re² + im² (42 bits).

**Interleaving.** Channels are interleaved sample by sample. A delay of D
samples of one channel is therefore a shift register of 16·D words, and it
advances once per valid input. Each sample carries a 4-bit tag, its position
in the block. A stage takes its control from the tag. The tag leaving a stage
is `tag − D`, the position of the element now emitted. A sample's analytic
value appears **30 sample periods** after the sample entered (0.75 ms), which
is the sum of the two SDF fill delays. It leaves 10 clocks after the valid of
the sample entering at that time.

### Normalisation (`variance_normalizer`)

Z is divided by the channel's variance, so that the histogram bins have a
fixed meaning. E[Z] is twice the variance of V. Each channel therefore keeps an
exponential moving average m of Z (time constant 4096 samples). It outputs
Zn = 2Z/m in unsigned Q8.8, saturating at 255.996, from a 16-step restoring
divider. The first sample of a channel only initialises m.

### Training: regression engines (`ecpc_regression_engine`)

Four engines serve the 16 channels. Engine e trains channels 4e .. 4e+3 in
turn.

* **Accumulation.** For T_TRAIN = 100000 samples (2.5 s), the samples of the
  channel in training are counted into a histogram of bin width 0.25 of Zn.
  There are 4 EC bins of 14 bits (Zn 0 – 1) and 32 PC bins of 10 bits
  (Zn 12 – 20 by default, `PC_FIRST_BIN = 48`). Counters saturate. Total bin
  storage is 4 × (4·14 + 32·10) = 1504 bits.
* **Fit.** The 36 bins are then read one per clock, and y = log2(count) is
  formed. Two least-squares lines are fitted: EC as y against Zn, and PC as y
  against log2 Zn. The bin positions are constants, so each slope is
  Σ W_k·y_k. The weights W_k = (x_k − x̄)/Σ(x − x̄)² are computed at
  elaboration by constant functions. The intercept is ȳ − slope·x̄. The fit
  takes 38 clocks.
* **Write-back.** The four Q8.8 parameters (a_ec, b_ec, a_pc, b_pc) go to the
  probability estimator. The histogram is cleared and the next channel starts.
  Each channel therefore keeps its parameters for 3 × 2.5 s. All 16 channels
  are first ready after 10 s.

All logarithms are Mitchell approximations: the leading-one position plus the
next 8 bits as the fraction (`ecpc_pkg::log2_fx`). The same function places
the bin centres at elaboration, so the fitted lines and the run-time
evaluation agree. An empty bin counts as log2 1 = 0.

### Probability and winner-take-all (`probability_estimator`)

For each sample of a trained channel, the estimator computes:

    Ln = a_ec + b_ec·Zn          (log2 f_n)
    Ld = a_pc + b_pc·log2 Zn     (log2 f_d)
    p  = 1 / (1 + 2^(Ln − Ld))   Q0.16, 65535 = certain spike

2^−u uses a shift for the integer part and 1 − f/2 for the fraction, followed
by a restoring division. A channel without parameters scores 0. For each
channel, the largest p of every 64-sample window (non-overlapping) is sent on
`prob_sout`. The window position is not sent.

## Departures and own choices

Taken from the original: the 16-channel interleaving; the 40 kHz rate and
the 20.48 MHz framing with its two headers and "00" padding; the 8-biquad
band-pass with 3 coefficients per section, 20/40-bit words and SPI
programming; the 250 Hz LFP corner; the 16-point Hilbert transform as
R2SDF FFT, ±π/2 rotation and IFFT, with one bit of growth per FFT stage; the
4 engines × 4 channels schedule; T_train = 2.5 s with T_retain = 3·T_train;
4 EC bins of 14 bits and 32 PC bins of 10 bits, of width 0.25; the two
regressions (linear-log and log-log); the probability formula; and the
64-sample winner-take-all.

This design's own choices:

* The bit positions of the "00" padding inside the frame, and the assumption
  that the input is framed like the outputs.
* The SPI frame format and the coefficient address map.
* The biquad form: unit numerator end coefficients, gain at the input, and
  Q2.18 formats.
* The first-order LFP filter.
* Y = X + i·H·X before the IFFT. The original rotates only, and must then
  align V_bpf with a separate delay.
* The moving-average variance estimate, and normalisation to the variance of
  V, i.e. Z / (E[Z]/2).
* PC bins at Zn 12 – 20. The original does not say where they lie. Here the
  Gaussian-noise tail has mostly died out (about 30 counts in the first bin
  after 2.5 s), so the log-log fit sees the spikes. Starting the bins at Zn
  6, 8, 10 or 16 separated spikes from noise worse on the detection workload
  below.
* Fixed-point fitting with Mitchell logarithms. The original used
  floating-point arithmetic here.
* Engine e serving channels 4e..4e+3.
* Empty bins counted as log2 1.
* Samples of the next channel that arrive during a 38-clock fit are not
  counted.
* The 2^−u approximation. Non-overlapping windows. No sample position in the
  probability stream.
* **Storage of the Hilbert buffers.** Interleaving 16 channels turns the SDF
  delays into 16·15 complex words per transform: 18592 bits in all. The
  original quotes 370 bits for its buffers.

Not part of the RTL: the on-die analog front ends and ADCs, and the
evaluation board. The board consists of an FPGA, ping-pong SRAM pairs, a USB
link and power regulators. The detector's input is the ADCs' serialised
output.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_frame_encoder` | every serial bit against frames built from the header strings; back-to-back samples |
| `tb_frame_decoder` | decoded samples and channels; idle gaps; a corrupted frame is flagged and dropped |
| `tb_spi_slave` | address and data of each write; an aborted frame writes nothing |
| `tb_lfp_filter` | floating-point model within 2 LSB; 20 Hz passes, 2 kHz attenuated |
| `tb_bandpass_filter` | bit-exact against a 64-bit model; pass and stop bands; 10-clock latency; SPI-style coefficient writes |
| `tb_hilbert_transform` | analytic signal against a floating-point DFT/rotation/IDFT within 6 LSB; 30-sample delay; flat envelope for an on-bin sine |
| `tb_variance_normalizer` | exact quotient against a model; mean Zn ≈ 2 for exponential Z |
| `tb_ecpc_regression_engine` | channel order, fit latency, parameters against a floating-point least-squares fit of an independently built histogram |
| `tb_probability_estimator` | scores against an approximate model (2 LSB) and the exact formula (0.12); window maxima and count |
| `tb_ecpc_top` | end to end with T_TRAIN = 1024: bit-exact band-pass stream, LFP stream, untrained channels score 0, every channel trained and retrained, windows with spikes score higher (about 65535 against 18600 here) |
| `tb_workload_detection` | detection rates with T_TRAIN = 4096: 16 channels at SNR 0, 2.5, 5, 10 dB and 30–110 Hz firing; TPR/FPR at p ≥ 0.5 and at the best swept threshold; at 10 dB TPR ≥ 0.8 and FPR ≤ 0.1 required; about 20 M clocks, under a minute |
| `tb_workload_rate_step` | firing rate stepping from 5 Hz to 45 Hz with T_TRAIN = 10000, read back by counting 100 % windows over 1 s; at 10 dB the estimate must end within 30–60 Hz and above its pre-step value; about 72 M clocks, under 2 minutes |
| `tb_ecpc_top_full` | all defaults (T_TRAIN = 100000): nothing trained before 2.5 s, then channels 0, 4, 8, 12 trained, scores appear; about 51 M clocks, 1–2 minutes |

To simulate one block with Verilator:

    verilator --binary --timing -Irtl -y rtl rtl/ecpc_pkg.sv tb/tb_bandpass_filter.sv \
              --top-module tb_bandpass_filter -o sim && obj_dir/sim

The same command works for any testbench. Put `rtl/ecpc_pkg.sv` first; the
other modules are found through `-y rtl`.

How far to trust it: every block matches an independent model, and the whole
chain runs end to end. `tb_workload_detection` measures detection quality on
synthetic spikes in Gaussian noise. There, SNR is the spike peak over three
noise standard deviations, in dB. With the best swept threshold it measured:

| SNR | TPR | FPR |
|---|---|---|
| 10 dB | 1.00 | 0.01 |
| 5 dB | 1.00 | 0.01 |
| 2.5 dB | 0.95 | 0.01 |
| 0 dB | 0.87 | 0.58 |

That is in line with the original chip, which is reported to detect over 82 %
of spikes with under 8 % false alarms above 2.5 dB. The numbers come from
one seed, four channels per SNR and about 0.5 s of scored data. They are not
the original's in vivo noise segments or its 100-trial averages.

Above 0 dB the best thresholds lie at p ≥ 0.998. With p ≥ 0.5, 18 – 49 % of spike-free
windows are flagged above 2.5 dB, so a 50 % score here does not mean a 50 %
chance of a spike. Two things likely cause this. The fitted PC line
extrapolates below its bins, to where noise dominates. And the EC line is
fitted over only Zn 0 – 1. These choices, and the Mitchell logarithms, are
the first things to revisit.

The same weakness shows when the firing rate is read back from the map by
counting windows that score 100 %. `tb_workload_rate_step` steps the rate
from 5 Hz to 45 Hz. At 10 dB the estimate moves from about 12 Hz to 44 Hz
and gets within 10 % of its final value about 1 s after the step. That
second is the length of the counting window. At 0 – 5 dB, noise windows also
reach 100 %, and the estimates run at 20 – 95 Hz. The original chip is
reported to follow the step in about 0.47 s at all of 0, 2.5, 5 and 10 dB.

## Changing it

* `ecpc_top #(.T_TRAIN(n))` shortens training for simulation.
* `ecpc_regression_engine` parameters `PC_FIRST_BIN`, `N_PC`, `PC_W` and
  `EC_W` move and resize the histograms. The fit weights follow automatically.
* `variance_normalizer #(.EMA_SHIFT())` sets the averaging time.
* `probability_estimator #(.WTA_LEN())` sets the window; use a power of two.
* To change the default band, replace `DEF_B1/DEF_A1/DEF_A2/DEF_G` in
  `bandpass_filter`. They are the second-order sections of an elliptic design,
  each numerator divided by its b0, with the product of the b0s as the gain,
  all × 2^18. Or write new values over SPI at run time.
* `hilbert_transform` is written for 16 points; its stage list would need
  extending for other lengths.
