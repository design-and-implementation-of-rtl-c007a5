# Cubic spline interpolation for on-chip spike sorting

Spike sorting sorts the spikes on a neural recording by the neuron that fired them. It
works better with a high sampling rate. The main reason is sampling skew: a neuron fires at
random moments relative to the sampling clock, so two spikes of the same neuron are sampled
at different phases, look different, and blur the clusters in feature space. Sampling fast
(around 100 ksps) fixes this, but it costs power in the analog front end and the radio of an
implanted recorder.

This RTL recovers most of that benefit at a low recording rate. Each detected spike is
up-sampled with a cubic spline. It is re-aligned at the fine rate, then down-sampled again,
so that feature extraction and classification run at a low rate on samples whose phase is
consistent. The engine does only the work that is needed:

* **Event-triggered.** Nothing runs until a detected spike is queued. Between spikes the
  processing units are idle (their clock-enable, `pu_clk_en`, is low).
* **Window-based.** The spline is never solved over a whole spike. For each segment
  `y_i .. y_{i+1}` a natural spline is fitted to a six-sample window
  `y_{i-2} .. y_{i+3}`, and only its middle segment is used. Moving to the next segment
  shifts one new sample into a six-register window.
* **Two-step.**
  * Step 1 interpolates densely, but only over the two segments around the detector's
    alignment point, to find the refined alignment point.
  * Step 2 interpolates only the samples that survive down-sampling, over the whole spike.

The design is based on a published 90 nm implementation (1 MHz clock, 5.6 µW). The block
structure, the queue size, the window length, the three spline stages, the two-step
schedule, the alignment criteria and the throughput target follow that architecture. The
port protocol, word lengths, edge handling and cycle-level schedule are this design's own;
they are listed under "Choices and departures".

## Data flow

```
 detector ──► spike_queue ──rd──► window_fifo ──► interp_pipeline ──► out_* (step 2 samples)
  in_*        32 x 45 x 8 bit     y_{i-2}..y_{i+3}  D_i, D_{i+1} │
                  ▲                                 a,b,c,d      └──► decision_unit (step 1 samples)
                  │ rd_en/rd_idx/pop                a+bt+ct²+dt³          │ new alignment point P
              interp_fsm ◄─────────────────────────────────────────────────┘
   cfg_up_log, cfg_dn_log ─┘      (t and position of every operation travel with it as a tag)
```

| module | role |
|---|---|
| `spline_pkg` | word lengths, `align_mode_e`, the per-operation tag `op_tag_t`, the spline weights |
| `spike_queue` | queue of detected spikes: 32 slots of 45 signed 8-bit samples (11,520 bits). Each slot also holds the spike's length, alignment index and channel. |
| `interp_fsm` | the two-step controller: window loads, `t` generation, step control |
| `window_fifo` | the six shift registers of the window |
| `interp_pipeline` | three registered stages: the two derivative units `pu_deriv`, then `pu_coef`, then `pu_eval` |
| `decision_unit` | picks the refined alignment point from the step-1 samples |
| `cubic_spline_interp` | top level |

## The arithmetic of one segment

A spline segment is `Y(t) = a + b t + c t² + d t³` with `t ∈ [0,1)`. Up-sampling by
`U ∈ {1,2,4,8}` evaluates it at `t = k/8` for multiples of `8/U`.

**Derivatives (`pu_deriv`).** The natural spline through six samples `w0..w5` has first
derivatives `D` that solve

```
[2 1 0 0 0 0]       [3(w1-w0)]
[1 4 1 0 0 0]       [3(w2-w0)]
[0 1 4 1 0 0] D  =  [3(w3-w1)]
[0 0 1 4 1 0]       [3(w4-w2)]
[0 0 0 1 4 1]       [3(w5-w3)]
[0 0 0 0 1 2]       [3(w5-w4)]
```

The window length is fixed, so the inverse of this matrix is a constant. The two
derivatives at the ends of the middle segment are fixed linear combinations of the window:

```
D_i     = ( 26 w0 - 156 w1 -   3 w2 + 168 w3 -  42 w4 +  7 w5) / 209
D_{i+1} = ( -7 w0 +  42 w1 - 168 w2 +   3 w3 + 156 w4 - 26 w5) / 209
```

`D_{i+1}` is `D_i` of the mirrored window, negated. `pu_deriv` therefore has one
parameter, `UPPER`, and is instantiated twice. The weights are rounded to 12 fractional
bits (`spline_pkg::d_weight` computes them from the integer numerators above). The result
is rounded to 8 fractional bits. The weight error is below 0.1 LSB of a sample.

**Coefficients (`pu_coef`).** The unit computes, exactly:

```
a = y_i
b = D_i
c = 3(y_{i+1} - y_i) - 2 D_i - D_{i+1}
d = 2(y_i - y_{i+1}) +   D_i + D_{i+1}
```

**Evaluation (`pu_eval`).** The unit evaluates `((d t + c) t + b) t + a` exactly: `t = k/8`
is a 3-bit multiply plus three more fractional bits. The result is rounded to 2 fractional
bits and saturated to 12 bits. With 8-bit inputs the spline can overshoot to about ±201,
so saturation never occurs in practice.

Number formats (two's complement):

| quantity | format |
|---|---|
| samples | 8-bit integer |
| `D`, `b`, `c`, `d` | 20-bit, 8 fractional bits |
| output samples | 12-bit, 2 fractional bits: value = `out_sample / 4` |

Compared with an ideal floating-point spline over the same window, an output is off by at
most 0.3 LSB (checked).

## The schedule

Time inside a spike is counted in **positions**: eighths of an original sample period.
Position `p` lies in segment `p >> 3` at `t = (p mod 8)/8`. Let `L` be the spike's length,
`A` the detector's alignment index (clamped to `1 .. L-2`), `U = 2^cfg_up_log`,
`D = 2^cfg_dn_log`, and `S = 8/U·D` the output spacing in positions.

| phase | cycles | what happens |
|---|---|---|
| start | 1 | queue not empty: latch `U`, `D`; start the decision unit |
| load 1 | 6 | read the window of segment `A-1` (samples `A-3 .. A+2`) |
| step 1 | 2U | evaluate positions `8(A-1) + j·8/U`, `j = 0..2U-1`; the decision unit sees each result |
| load 2 | 6 | read the window of segment 0, while step 1 drains from the pipeline |
| step 2 | Σ max(1, n_seg) | walk segments `0..L-2`; evaluate positions `P mod S + kS < 8(L-1)` |

In step 2, `n_seg` is the number of kept positions in a segment. The spike is popped with
the last operation, and the next spike starts one cycle later.

Key points:

* One operation is issued per cycle. The window moves to the next segment with one SRAM
  read, issued in the same cycle as the segment's last evaluation. That evaluation still
  sees the old window, because the window shift and the operation both take effect one
  cycle after issue. This matches the SRAM's read latency.
* The refined alignment point `P` is ready 5 cycles after the last step-1 operation. That
  is inside the 6-cycle load of step 2, so the engine never waits for it.
* Worst case, with `L = 45`, `U = 8`, `D = 1`: 1 + 6 + 16 + 6 + 352 = **381 cycles per
  spike**. At 1 MHz that is 2,624 spikes/s, enough for 128 channels at 20 spikes/s each
  (2,560 spikes/s).
* Example with `U = D = 8`: step 2 produces one sample per segment, at the same `t` in
  every segment: a 45-sample spike in 73 cycles.
* Outputs leave `interp_pipeline` 3 cycles after their operation is issued (plus the one
  issue register). `out_valid` is never throttled: the consumer must take a sample every
  cycle it is offered.

## Alignment (`decision_unit`)

`cfg_align_mode` selects the criterion. It is applied to the `2U` step-1 samples as they
leave the pipeline:

| mode | refined alignment point |
|---|---|
| `ALIGN_PEAK` | the sample with the largest magnitude |
| `ALIGN_SLOPE` | the sample that ends the largest step `abs(y[k] - y[k-1])` |
| `ALIGN_THRESH` | the first sample with magnitude ≥ `cfg_threshold` (integer sample units). If none crosses, the detector's point `8A` is kept. |

Ties keep the earliest sample. Magnitudes are used so that spikes of either polarity work.
The chosen point is always one of the step-2 output positions; that sample is flagged with
`out_align`.

## Interface of `cubic_spline_interp`

Parameters: `N_SPIKES = 32`, `MAX_LEN = 45` (spike slots and samples per slot),
`CH_W = 7` (channel tag).

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid`, `in_ready` | in / out | 1 | one original sample per cycle with both high. `in_ready` is low while all 32 slots are full. |
| `in_sample` | in | 8 | signed sample |
| `in_last` | in | 1 | last sample of a spike |
| `in_align`, `in_channel` | in | 6, 7 | the spike's original alignment index and channel; sampled with `in_last` |
| `in_dropped` | out | 1 | the spike just ended had fewer than 3 samples and was discarded |
| `cfg_up_log`, `cfg_dn_log` | in | 2 | log2 of `U` and `D`, 0..3. Taken when a spike starts. |
| `cfg_align_mode`, `cfg_threshold` | in | 2, 8 | alignment criterion and threshold. Taken when a spike starts. |
| `out_valid` | out | 1 | `out_sample` is valid |
| `out_sample` | out | 12 | interpolated sample, 2 fractional bits |
| `out_first`, `out_last` | out | 1 | bracket the samples of one spike, in time order |
| `out_align` | out | 1 | this sample is at the refined alignment point |
| `out_channel` | out | 7 | channel of the spike being output |
| `queue_empty` | out | 1 | no spike waiting |
| `pu_clk_en` | out | 1 | the controller or the pipeline is active: the enable for a clock gate on the processing units |

A spike is written sample by sample. It becomes visible to the engine only after its last
sample. Samples beyond 45 are ignored, and a spike shorter than 3 samples is discarded.
Spikes are processed in arrival order.

## Choices and departures

* **Sign of `d`.** The term in `d` is `2(y_i - y_{i+1})`. This is the sign that makes each
  segment end exactly at `y_{i+1}`, as spline continuity requires. The opposite sign, which
  appears in some statements of these formulas, does not.
* **Solving the tridiagonal system.** A constant inverse is used, i.e. a weighted sum of
  six samples. No iterative solver is built.
* **Clock gating.** Gating is expressed as clock enables: pipeline registers load only for
  valid operations, the controller is quiet in IDLE, and `pu_clk_en` is brought out. No
  clock-gating cell is instantiated; a library ICG can be driven from `pu_clk_en`.
* **Window at the spike ends.** The first and last two segments need samples outside the
  spike. The nearest end sample is repeated.
* **Alignment index.** The original alignment point comes from the detector (`in_align`).
  It is clamped so that both step-1 segments lie inside the spike.
* **Extra factor.** Besides 2, 4 and 8, a factor of 1 is accepted for `U` and `D`; the
  worst-case throughput figure assumes no down-sampling.
* **Queue.** The queue is written as an array with one write and one synchronous read
  port, with a fixed 45-word slot per spike. The tags (length, alignment index, channel:
  19 bits per slot) sit beside the 11,520-bit sample array.
* **Output.** There is no back-pressure, and the output format has 2 fractional bits. If
  `S > 8` and the spike is very short (e.g. `U = 1`, `D = 8`, `L ≤ 8`), a spike can
  produce no output at all.
* **Not included.** The analog front end, the spike detector, feature extraction,
  classification and the radio are not part of this RTL. Only the detector's load
  interface and the aligned output stream are defined here.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The reference values come from `tb/tb_spline_ref_pkg.sv`,
a floating-point natural-spline solver (Thomas algorithm, Hermite evaluation) that shares
nothing with the RTL.

| testbench | checks |
|---|---|
| `tb_pu_deriv`, `tb_pu_coef`, `tb_pu_eval` | random and extreme operands against floating point; also that each segment ends at `y_{i+1}` |
| `tb_window_fifo` | shift/hold behaviour |
| `tb_interp_pipeline` | values within 0.3 LSB, tags, and exactly 3 cycles of latency |
| `tb_spike_queue` | fill to full, back-pressure, short/long spikes, read-back of data and tags, FIFO order |
| `tb_decision_unit` | all three criteria, ties, the threshold fallback, timing of `done` |
| `tb_interp_fsm` | for 300 random spikes and factor settings: every operation sees the correct window indices (clamped at the spike ends); the exact set of step-1 and step-2 positions and flags; the exact cycle count |
| `tb_cubic_spline_interp` | end to end at the default size, described below |

`tb_interp_fsm` includes the 381-cycle worst case.

`tb_cubic_spline_interp` sends synthetic spikes through every combination of `U`, `D` and
alignment mode. It checks every output sample against the reference, at the positions
implied by an alignment point that the criterion allows. It also checks:

* the idle state with an empty queue;
* worst-case back-to-back throughput (spike interval ≤ 385 cycles; 381 measured);
* queue overflow with back-pressure;
* discarded short spikes;
* a threshold that nothing reaches;
* alignment indices at the spike edges;
* one simulated second of the intended operating point: 128 channels × 20 spikes/s of 45
  samples at 1 MHz, `U = 8`, `D = 1`. That is 2,560 evenly spaced spikes. The queue must
  never push back; the worst in-to-out latency measured is 384 cycles.

Each of these mechanisms is counted, and the test fails if one never happens.

To run a testbench with Verilator (5.x), from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/spline_pkg.sv tb/tb_spline_ref_pkg.sv \
    tb/tb_cubic_spline_interp.sv --top-module tb_cubic_spline_interp
./obj_dir/Vtb_cubic_spline_interp
```

For another block, replace the testbench file and top module (e.g. `tb/tb_interp_fsm.sv`,
`--top-module tb_interp_fsm`). The end-to-end test runs in about ten seconds.

## Size

After generic synthesis the top level holds:

* the 12,128-bit queue memory (11,520 sample bits + 608 tag bits);
* about 390 flip-flops.

Most of the logic is the two constant-weight derivative units and the three small
multipliers of the Horner evaluation.
