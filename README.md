# DFT-based received signal strength detector for single-bit delta-sigma receivers

A low-IF receiver whose ADC is a single-bit complex delta-sigma modulator
needs a signal strength figure (RSSI) for energy detection and clear-channel
assessment. The usual way, the AGC of the digital baseband filters, costs
the full decimation and demodulation chain. This design reads the raw
one-bit I/Q stream directly. It computes the single DFT coefficient S_k at
the intermediate frequency and the DC coefficient S_0, and reports

    RSSI = 64 * ( log2|S_0| - avg4( log2|S_k| ) )

Both coefficients grow with the number of samples summed. Their log ratio
therefore does not depend on the run length, and no divider is needed. The
DFT bin is itself a very narrow filter, so no channel filter is needed
either. Because the inputs are +/-1, the complex multiplier reduces to sign
selection of table values. The run goes on for as long as needed: the
detector watches how the RSSI changes from one period to the next and stops
once that change (the *slope*) is small. Strong signals therefore finish
sooner than weak ones.

The RSSI falls as input power rises: a larger |S_k| gives a smaller
difference. One RSSI step is 1/64 of a factor two in amplitude, which is
about 0.094 dB, or 10.63 steps per dB.

## Block structure

```
          DFT core (one sample per clock)          |  post-processing (once per period)
 d_i,d_q ─┬─> sign select x LUT ─> Σ S_k ─> [WE reg] ─> L1 ─> log2 ─> avg4 ─┐
          │        ▲ cos_lut (phase)                |                         (-)
          └──────────────────────> Σ S_0 ─> [WE reg] ─> L1 ─> log2 ──────────(+)─> RSSI
                                                                               │
                              slope = avg4( RSSI[i] - RSSI[i-1] ) <─ z^-1, z^-1 ┘
```

| module | role |
|---|---|
| `rssi_pkg` | shared constants (192-entry period, 8-bit table, 6-bit log fraction) and types |
| `cos_lut` | quarter-wave cosine table, separate cosine and sine outputs |
| `dft_bin` | sign-selection complex multiplier, S_k accumulator, WE pipeline register |
| `dc_accumulator` | S_0 accumulator and its WE pipeline register |
| `l1_norm` | abs(Re) + abs(Im), two instances |
| `log2_unit` | thermometer encoder, shift-per-clock mantissa, 32-entry log table, two instances |
| `moving_average` | length-four average (log2 S_k, and the slope) |
| `slope_unit` | two delay registers, difference, average, threshold test |
| `rssi_ctrl` | start/clear, phase stepping, capture timing, stop |
| `rssi_detector` | top level |

## The DFT core

**Phase and bin selection.** A cosine period has 192 entries. That is the
96 MHz maximum sample rate divided by the lowest IF, 0.5 MHz. Each sample
advances the phase index by `k_step = 192 * f_IF / f_s` modulo 192. At
96 MHz this gives 1, 2 and 4 for IFs of 0.5, 1 and 2 MHz. Other values
select other bins. An off-bin tone is strongly rejected: in simulation a
2 MHz tone seen through the 0.5 MHz bin reads about 540 steps (50 dB) weaker.

**Quarter-wave table.** Only entries 0..47 are stored:
`Q[r] = round(255 * cos(2*pi*r/192))`. The other quadrants come from negating
the value or reading the quarter backwards (`-Q[48-r]`, `-Q[r]`, `+Q[48-r]`).
`Q[48] = 0` is implied and not stored. The sine is the cosine 48 entries
earlier. Cosine and sine read the table in opposite orders at the same time,
so each has its own multiplexer tree. The table delivers a magnitude and a
separate negate flag.

**Sign-selection multiplier.** The input is read as `D_IF = I - jQ`, with bit
1 meaning +1 and bit 0 meaning -1. Then

    Re = I*cos - Q*sin        Im = I*sin + Q*cos

Each product is a table value with a sign. The sign is the XOR of the input
bit's sign and the table's negate flag. A negative term enters the
accumulator adder bit-inverted, and a carry-in of one completes the two's
complement. No separate negation stage is needed. The imaginary part's
overall sign (the true value is `-(I*sin + Q*cos)`) is dropped, because only
magnitudes are used afterwards.

**Whole periods only.** The accumulators run on every sample. A pipeline
register behind each one is written (`we`) only on the sample that arrives
with the phase back at 0. It takes the accumulator value before that sample
is added, so it always holds a whole number of periods of the exponential.
At `k_step = 1` that happens every 192 samples. The S_0 path is written at
the same moment. S_0 is the plain sum of the +/-1 samples (k = 0).

## Post-processing

**L1 norm.** abs(Re) + abs(Im) replaces the Euclidean magnitude. The result
depends slightly on the phase of the coefficient: it is between 1 and
sqrt(2) times the true magnitude. Within one run the phase is fixed, so this
only shifts the RSSI by a constant.

**Logarithm** (`log2_unit`), for `X = x_int.x_frac`:
1. A thermometer encoder sets every bit of `x_int` at or below the leading
   one. Its count of ones minus one is `e = floor(log2 x_int)`.
2. A shift register moves X right by one bit per clock, e times. This leaves
   the mantissa m in [1, 2).
3. The five bits below m's leading one address a 32-entry table,
   `T[i] = round(64 * log2(1 + (i + 0.5)/32))`.
4. The result is the concatenation `{e, T[i]}`, which is 64*log2(X).

X < 1 gives 0. The latency is e + 2 clocks, at most 24 at the default
widths. The S_k norm carries the table's 8 fraction bits in `x_frac`, so
both logarithms are in the same units.

**Average, subtraction, slope.**
- log2 S_k is averaged over the last four captures.
- The subtracter forms the RSSI.
- The slope unit delays the RSSI twice, subtracts the two delayed values
  (newest minus previous) and averages that difference over four.
- The first value after a start fills each average's history.
- The run stops once at least `MinUpdates` (8) RSSI values exist and
  `|slope| < slope_threshold`.
- `slope` is given out with the RSSI as a quality figure.

## Control and timing

- Pulse `start` in any state. It clears the accumulators, the averages and
  any logarithm in progress, and starts a run.
- While `busy`, every clock with `sample_en` high takes one sample.
- Each capture produces `rssi_valid` about e_max + 5 clocks later. e_max is
  the larger of the two exponents. `slope_valid` follows two clocks after
  that.
- A period boundary that arrives while the previous capture is still being
  processed is skipped, and `we_skipped` pulses. This happens only when the
  period, 192/gcd(192, `k_step`) samples, is shorter than about 29 samples.
  At the IFs above, every period is captured.
- The run ends in `done`, and all outputs hold. It ends either on
  convergence, or after 2**20 - 1 samples with `timeout` set.
  `slope_threshold = 0` never converges, so every run goes to the maximum
  length.
- `n_samples` shows the run length so far.

| parameter | default | meaning |
|---|---|---|
| `RunW` | 20 | log2 of the maximum run length; sets S_k (30 b) and S_0 (21 b) accumulator widths |
| `MinUpdates` | 8 | RSSI values needed before a stop |

The RSSI is 12 bits signed. `log_s0` and `log_sk_avg` are 11 bits
(5 exponent bits and 6 fraction bits). `slope` is 13 bits signed.

## What follows the source design and what is chosen here

These follow the source design:
- the block structure and order;
- the 192/48-entry quarter-wave table with two multiplexer trees;
- the XOR sign control folded into the accumulator;
- the write-enabled registers that pass only whole periods;
- the L1 norm;
- the logarithm built from a thermometer encoder, a shift-per-clock register
  and a 32-entry table;
- the length-four average of log2 S_k;
- the slope from the last two RSSI values, with a threshold stop.

These are choices made here:
- all word widths: 8-bit table, 6 log-fraction bits, 2**20-sample maximum run;
- the contents of both tables;
- the `k_step` encoding;
- `sample_en`, and the start/done/timeout protocol;
- skipping a capture when the post-processing is busy;
- averaging the slope over four values;
- `MinUpdates`;
- filling the averages' history from the first value;
- asynchronous active-low reset.

The 6-bit log fraction fits the published transfer curve, which spans about
650 RSSI steps over 65 dB.

Two points depart from, or go beyond, the source design:
- **RSSI sign.** One formula in the source writes the RSSI as
  log2|S_k| - log2|S_0|. Its block diagram and its measured curves use
  log2|S_0| - avg log2|S_k|, with the RSSI falling as power rises. This
  design follows the diagram and the curves.
- **Slope scaling.** The published slope is shown normalized, in percent;
  the normalization is not given. Here the slope is given in raw RSSI steps
  per capture.

Not built:
- the RF front end (LNAs, mixers, LO dividers, band switch, complex band-pass
  filter) and the delta-sigma modulator itself: `d_i`/`d_q` are top-level
  inputs;
- the mapping of the RSSI to an 8-bit IEEE 802.15.4 energy-detection value;
- sharing the down-conversion with a demodulator.

## Verification

Every module has a self-checking testbench in `tb/` that compares it with a
reference computed independently in the testbench (floating point or 64-bit
integers). Each testbench prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_cos_lut` | all 192 phases against 255*cos and 255*sin |
| `tb_dft_bin`, `tb_dc_accumulator` | 20 000 random samples and table values, random `we`, gaps, clear |
| `tb_l1_norm` | random and extreme operands |
| `tb_log2_unit` | 400+ operands over the whole range: value and latency e + 2 |
| `tb_moving_average`, `tb_slope_unit` | random sequences; convergence flag exactly when due |
| `tb_rssi_ctrl` | phase sequence for several `k_step`, capture and skip timing, convergence and timeout stops |
| `tb_rssi_detector` | top at default parameters (see below) |
| `tb_power_sweep` | transfer curve over 66 dB in 3 dB steps, and 15 000-sample runs 20 dB apart |

**End-to-end test (`tb_rssi_detector`).** Stimulus comes from
`tb/dsm_model.sv`, a behavioural second-order single-bit modulator pair. It
is driven by a complex tone, a small DC offset and noise. For every capture
the bench recomputes S_0 and S_k in floating point from the same bits, with
an exact exponential, and compares the RSSI within 5 steps. About 11 000
captures are compared. The runs cover:
- amplitude halvings, each of which must raise the RSSI;
- the 1 and 2 MHz settings;
- an off-bin tone;
- a restart while a capture is still in the logarithm units;
- gaps in `sample_en`;
- skipped captures at a very high bin;
- convergence stops;
- two maximum-length runs whose RSSI must differ by 64 +/- 8 steps for a 6 dB
  step.

**Transfer curve (`tb_power_sweep`).** A line is fitted to RSSI over input
power. Its slope is 10.61 steps per dB, against 10.63 ideal. The largest
deviation from the line is 0.16 dB. These figures come from the modulator
model, not from silicon. A real front end adds noise and nonlinearity.

Each testbench runs at default parameters unless it sets its own block's
widths. To build and run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_rssi_detector \
    rtl/rssi_pkg.sv tb/tb_rssi_detector.sv -o sim && ./obj_dir/sim
```

`tb_rssi_detector` runs in about 2 seconds and `tb_power_sweep` in about
20 seconds.
