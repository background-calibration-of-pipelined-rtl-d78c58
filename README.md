# DBGE: background calibration of a pipelined ADC from its own output codes

A pipelined ADC resolves a sample one coarse decision at a time. Each stage
compares its input with one or two thresholds, subtracts the chosen reference
and amplifies the rest by two for the next stage. If that gain is not exactly
two, the output code jumps at each threshold of the stage: codes are skipped,
or codes are produced twice. Causes include capacitor mismatch, finite opamp
gain, finite current-source output impedance, comparator offset and charge
injection. This error is the dominant static nonlinearity of such converters.
It sits exactly at the known thresholds, and its size is constant.

Decision boundary gap estimation (DBGE) measures that jump from the ordinary
conversion results. No test signal and no extra analog circuit are used.
Samples just below a threshold and samples just above it are kept apart. The
size of the empty (or overlapping) code range between the two groups is
estimated. That size is then subtracted from every code above the threshold.
The stages are corrected from the back of the pipeline toward the front. The
last stages are assumed accurate, and each corrected stage then serves as the
reference for the one before it.

This repository holds synthesizable SystemVerilog for the digital side of
such a converter:
- 13 stages of 1.5 bits each, giving a 14-bit code;
- the first 6 stages calibrated in the background;
- 12 thresholds, each with its own estimator hardware;
- estimation blocks of 200,000 samples.

The analog pipeline itself is not here. The testbenches drive the RTL from a
behavioural model of one.

## Codes and gaps

Stage `i` (0 = first) gives a decision `d_i` of 0, 1 or 2, worth
`d_i * 2^(12-i)` LSB. A final comparator adds 0 or 1 LSB. The raw output is
the sum of these contributions, a code of 0 to 16383. Because each stage has
extra headroom (1.5 bits), a stage with too much gain produces overlapping
codes rather than codes out of range. The calibrator therefore sees both
missing codes (positive gap) and duplicated codes (negative gap).

For calibrated stage `k` the calibrator forms two codes:
- the **raw sample** `x_k = (d_k << (12-k)) + y_{k+1}`, where `y_{k+1}` is the
  already-corrected code of all later stages;
- the **corrected sample**
  `y_k = x_k - (d_k >= 1 ? g[k][0] : 0) - (d_k == 2 ? g[k][1] : 0)`.

Here `g[k][j]` is the gap at the boundary between decisions `j` and `j+1`. It
is defined as

    g = min{ x_k : d_k = j+1 } - max{ x_k : d_k = j } - 1

so that an ideal boundary gives 0 and an overlap gives a negative number.
Gaps are whole codes. The output's LSB is the limit of what can be measured
anyway, so finer gaps would gain little.

## The three estimators

Every boundary has all three, fed the same samples. `est_sel` chooses which
one sets the gap.

**Max-Min** (`maxmin_estimator`) keeps the largest sample below the boundary
and the smallest above it. It costs two registers and one subtraction.
Circuit noise pushes samples into the gap, so this estimator underestimates.
The error grows with the number of samples near the edge. In the end-to-end
test it reads about 7 codes low at stage 6, which sees the most samples.

**Bin-Reshaping** (`binreshape_estimator`) drops the 3 noisy low bits (coarse
bins of `s = 8` codes) and runs Max-Min on the coarse codes. It also counts the
outermost coarse bin (`A`) and its neighbour (`B`) on each side. A partly
filled outer bin means the true edge lies inside it, at the fraction `A/B` of
a full bin. The gap is

    (q1 - q0 - 1) * s  +  s (1 - A1/B1)  +  s (1 - A0/B0)

The two ratios come from one shared serial shift-subtract divider
(`serial_divider`, one bit per cycle). The result is rounded to a whole code
from 4 fraction bits. The bin counts are kept on line as the coarse extreme
moves, so there is no histogram memory. Bin width 8 is this design's choice:
the bins must be well wider than the noise, and a power of two makes them a
bit slice.

**Cost-Minimizing** (`costmin_estimator`) works the way a code-density
linearity test does. It builds a histogram of the codes just below the
boundary (8 bins) and of those just above (24 bins). For every candidate gap
`g` it shifts the upper histogram down by `g`, adds it to the lower one, and
measures how uneven the 8 merged bins are. The RMS DNL squared is
`(W*S2 - S1^2) / S1^2`, where `S1` and `S2` are the sum and the sum of squares
of the bin counts. The flattest candidate wins. Candidates are compared by
cross-multiplication, so no divider is needed.

The windows are placed at the previous block's Max-Min extremes. The sweep
covers the previous Max-Min gap ±8. Max-Min's bias is one-sided and a few
codes wide, so ±8 covers it. This estimator therefore has no result in the
first block after reset. It is the most robust to noise.

**Fallback.** `gap_estimator` uses the selected result if it is valid.
Otherwise it uses Bin-Reshaping, then Max-Min. If no estimator saw samples on
both sides, the gap is held and `gap_ok` is 0.

## Updating twelve gaps at once: the cascade

This is the least obvious part of the design.

A stage-`k` estimate is measured on samples corrected with the stage `k+1`
gaps that were in use during the block. Consider a sample just below a
stage-`k` boundary. Its residue is at the top of stage `k+1`'s range, so both
stage-`k+1` gaps were subtracted from it. A sample just above the boundary
sits at the bottom of stage `k+1`, so neither was subtracted. The stage-`k` gap
therefore depends on the stage-`k+1` gaps. If stage `k+1`'s gap sum changes by
Δ, stage `k`'s gap grows by exactly Δ. This is an identity of the digital
correction; it does not depend on the analog errors.

All 36 estimators run in parallel on the same block. When the block is
evaluated, `dbge_calibrator` forms the new gaps from the last calibrated stage
forward:

    shift[C-1] = 0
    g_new[k][j] = estimate[k][j] + shift[k]
    shift[k-1]  = (g_new[k][0] + g_new[k][1]) - (g[k][0] + g[k][1])

This gives the same result as correcting stage 6, re-estimating stage 5 on the
corrected data, and so on, all from one block. It is done in one
combinational pass and one register load per block. The Cost-Minimizing
anchors of stage `k` are moved by `shift[k]` in the same cycle, so its windows
follow the move.

Without the cascade, each update is one block stale per stage. The front
stages then never settle: in simulation the corrected output was worse than
the raw one.

**Consequence.** The gaps set continuity, not absolute gain. A one-code change
in a late stage's estimate moves the first-stage gap by up to about 2^5 codes.
The code stays linear, but its gain steps by up to a fraction of a percent.

With Bin-Reshaping or Cost-Minimizing, the first-stage gaps move by about ±10
codes per block in the test (values about 112–132). With Max-Min the noise
bias at stage 6 is amplified the same way, and the first-stage gaps can be
hundreds of codes away. This is the reason Max-Min is only the last fallback.

The residual offset and gain error of the corrected code are not removed.
A system that needs absolute gain must correct it separately.

## Block sequence and timing

`block_controller` runs a loop:

    CLEAR -> COLLECT (BLOCK_LEN valid samples tagged) -> DRAIN (C+2 cycles)
          -> EVAL (start the serial estimators) -> WAIT (all done)
          -> update

Every sample is corrected, but only tagged samples feed the estimators.
Samples are not collected during the drain and evaluation. These take about
165 cycles per 200,000-sample block: the Cost-Minimizing sweep is
`(2*8+1)*(8+1)+1 = 154` cycles, and Bin-Reshaping takes 57.

With `cal_en` low, the current block finishes and the gaps stay frozen.

`dbge_calibrator` takes one conversion per cycle with `in_valid`. The inputs
are all 13 stage decisions and the final comparator bit of the same sample,
already time-aligned. After `CAL_STAGES + 1 = 7` cycles it gives:
- `out_code`, the corrected code;
- `raw_code`, the uncorrected code;
- `out_valid`.

Also visible:
- the gaps in use;
- every estimator's last result and its valid bit;
- `block_count`.

The gaps start at 0 after reset. There is no foreground start-up
calibration.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| dbge_calibrator | NUM_STAGES | 13 | pipeline stages |
| | CAL_STAGES | 6 | calibrated front stages (2 gaps each) |
| | BLOCK_LEN | 200000 | samples per estimation block |
| | CM_WIN | 8 | Cost-Minimizing window, bins |
| | CM_SWEEP | 8 | Cost-Minimizing sweep half-range |
| | BR_S_LOG2 | 3 | Bin-Reshaping: bits dropped (bin = 8 codes) |
| dbge_pkg | DW / GW / CW | 18 / 12 / 18 | sample, gap, counter widths |

- **From the method:** 13 stages, 6 calibrated, 200,000-sample blocks, and the
  8-bin cost window.
- **This design's choices:** the sweep range, the bin width, the widths, the
  final comparator and the block sequencing.

Synthesized with yosys at the defaults, the calibrator is about 6,600
word-level cells and 14,800 flip-flop bits. Most of that is the 12
Cost-Minimizing histograms (32 counters of 18 bits each).

## Files

- `rtl/dbge_pkg.sv`: widths, types, `est_sel` encoding, gap saturation.
- `rtl/dbge_calibrator.sv`: top (correction chain, estimators, cascade
  update).
- `rtl/block_controller.sv`: block sequencing.
- `rtl/backend_combiner.sv`: weights the uncalibrated stages into a code.
- `rtl/stage_corrector.sv`: `x_k` and `y_k` of one stage.
- `rtl/gap_estimator.sv`: the three estimators of one boundary and the
  selection.
- `rtl/maxmin_estimator.sv`, `rtl/binreshape_estimator.sv`,
  `rtl/serial_divider.sv`, `rtl/costmin_estimator.sv`: the estimators.
- `tb/pipeline_adc_model.sv`: behavioural 13-stage 1.5-bit pipeline with
  per-stage capacitor mismatch, opamp gain, comparator and residue offsets,
  and Gaussian noise.
- `tb/tb_util_pkg.sv`: random helpers.
- `tb/tb_*.sv`: one self-checking testbench per module, plus
  `tb_estimator_compare.sv` (ENOB with each estimator).

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. For example:

    verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
      --top-module tb_dbge_calibrator -y rtl -y tb +libext+.sv -Irtl -Itb \
      rtl/dbge_pkg.sv tb/tb_util_pkg.sv tb/tb_dbge_calibrator.sv
    ./obj_dir/Vtb_dbge_calibrator +verilator+rand+reset+2

Replace the top module name to run any other testbench. Every testbench
applies an asynchronous reset, and every value it reads is initialised.

**End-to-end test.** `tb_dbge_calibrator` runs the top at its defaults and
takes about 7 s. The pipeline model uses this per-stage error set, from stage
1 to stage 13:

| Error | Values |
|---|---|
| capacitor mismatch (%) | -0.12, -0.05, 0.55, -0.54, 0.51, -0.09, 0.21, -0.18, 0.07, -0.15, -0.01, 0.04, 0.19 |
| opamp gain | 535, 705, 998, 299, 243, 651, 460, 762, 421, 454, 597, 606, 542 |
| comparator offset (% of reference) | 4.19, 3.07, -1.47, -2.16, 3.91, -0.99, 2.69, 0.26, 2.71, -2.07, 4.72, -0.06, 0.24 |
| residue offset (% of reference) | 0.35, 0.40, 0.47, -0.26, -0.43, -0.04, -0.48, -0.43, -0.15, 0.39, 0.16, -0.30, -0.41 |

Noise is 0.25 LSB per stage.

The test:
1. Calibrates on zero-mean Gaussian input for six blocks. It checks that the
   first block falls back to Bin-Reshaping and that the last stage's gaps
   settle.
2. Switches `est_sel` through Max-Min, Bin-Reshaping and Cost-Minimizing. For
   each, it checks that every gap equals the selected estimate plus the
   cascade shift.
3. Freezes calibration and feeds 400,000 uniform samples. It counts missing
   and doubled codes in the raw and corrected output.

Typical result:
- raw code: 135 missing and 42 doubled codes;
- corrected code: 0 missing and 2 doubled codes.

The test also checks every output code against an independent software model
of the correction and checks the 7-cycle latency. It counts:
- blocks;
- fallbacks;
- estimator switches;
- freezes;
- positive gaps;
- cases of Max-Min reading below Cost-Minimizing.

This error set produces no negative gaps at the front stages. The estimator
testbenches cover overlaps directly.

**Estimator comparison.** `tb_estimator_compare` also runs the top at its
defaults and takes about 11 s. For each estimator it resets the calibrator
and calibrates for 4 Gaussian blocks. It drops `cal_en` during the last
block, then converts 200,000 samples of a 0.95-full-scale sine. The raw and
corrected codes are each fitted to the known input by least squares. The fit
residual gives SNDR and ENOB = (SNDR - 1.76) / 6.02.

Results over six random seeds:

| Code | ENOB (bits) |
|---|---|
| raw | 9.15 |
| Max-Min | 10.2–10.3 |
| Bin-Reshaping | 11.5–11.9 |
| Cost-Minimizing | 11.6–12.1 |

The ceiling is set by the model's circuit noise. Max-Min is last because of
its noise bias, which the cascade carries into the front stages. The other
two estimators scatter by a few tenths of a bit from one calibration block to
the next.

The same test then models drift: every opamp gain falls to a third.
- With the gaps frozen, ENOB drops to about 8.7 bits.
- Three more blocks of Cost-Minimizing calibration, without reset, bring it
  back to about 11.8 bits.
- Meanwhile the first-stage gaps grow from about 126 to about 305 codes.

That change is far outside the ±8 Cost-Minimizing sweep. Its windows
therefore miss for a block on some boundaries, and Bin-Reshaping stands in.

## Limits and departures

- Only the digital back end is built. The analog stages exist only as the
  behavioural testbench model.
- The pipeline is 1.5 bits per stage. A 1-bit-per-stage pipeline, which needs
  a reduced stage gain, would need a different code weighting in
  `backend_combiner`. `gap_estimator` itself works for a single boundary
  unchanged (`BOUNDARY = 0`).
- All boundaries have their own estimators, running in parallel. Sharing one
  estimator serially across stages would save area at the cost of update
  rate; it is not built.
- The update uses the cascade described above rather than a loop of separate
  per-stage passes. The result is the same, in one step per block.
- Cost-Minimizing needs the previous block to place its windows. If a window
  misses the edges after a large change, that block uses Bin-Reshaping.
- Input statistics matter. A boundary the input never visits keeps a
  meaningless gap, which is harmless because those codes never occur. An
  input with a real hole in its distribution at a boundary would be "closed"
  by mistake.
- The testbenches measure missing and doubled codes and a sine-fit ENOB.
  SFDR, INL and DNL plots are not computed.
