# Mixed synchronous/asynchronous ECG delineator

This is a low-power circuit that reads one ECG lead sampled at 250 Hz and
marks five points of every heartbeat: the P wave, the QRS onset, the R peak,
the QRS end and the T wave. It is meant for a wearable sensor. The sensor
sends these few numbers instead of the raw waveform, and the circuit itself
must use only microwatts.

Two ideas keep the energy low:

* **One slow clock for almost everything.** The wavelet filter bank, the QRS
  detectors, the adaptive thresholds and the coefficient memory all advance
  once per ECG sample, so the clock runs at 250 Hz. No logic needs a faster
  clock.
* **A clockless search engine for P and T.** Finding a P or T wave means
  scanning up to 100 stored coefficients. This is an iterative job that would
  need a fast clock. Here it is done by a self-timed (asynchronous) kernel.
  - A two-phase handshake ring paces it at the speed of its own logic.
  - The kernel is switched on only for the few hundred nanoseconds of a search.
  - Its supply can be gated the rest of the time.

  Because the kernel finishes the P search before the T window arrives, one
  100-word memory serves both searches, half of what two buffers would need.

The RTL follows the architecture of a published cardiac-delineator design. It
is SystemVerilog with one module per file. Synthesizable blocks are marked
`rtl`. The few analog-like timing parts (gate delays, delay lines) are
behavioural models with `#` delays.

## The signal path at 250 Hz

```
ecg_in ─► dwt_qswt ─► w2, w3, w4 ─┬─► qrs_fsm ×3 ─► r_peak_vote ─► R
                                  ├─► boundary_detector ─► QRSon, QRSend
                                  ├─► thr_win_engine ─► thresholds, windows
                                  └─► coef_memory (w4, 100 words)
                                            │
            pt_controller ─► sync_async_if ─► pt_search_kernel ─► P, T
                                            ▲
                          delay_tuning ─────┘ (delay-line code)
```

### Wavelet transform (`dwt_qswt`)

The transform is the quadratic-spline wavelet in its "à trous" (undecimated)
form.

* Every scale uses the same two short filters, with the taps spread apart by
  2^(k−1):
  - low-pass {1,3,3,1}/8
  - high-pass 2·{1,−1}
* There are no multipliers: ×3 is `v + 2v` and /8 is a shift.
* Only scales 2, 3 and 4 are produced. Scale 1 is mostly noise, and scale 5 is
  not needed.

A wavelet coefficient is the slope of a smoothed ECG. A peak in the ECG
therefore shows up as a zero crossing between a positive and a negative lobe.

The three scales have different group delays: 2.5, 6.5 and 14.5 samples. The
block delays scales 2 and 3 (by 14 and 9 samples), so all three outputs
describe the same instant. That instant is DWT_LAT = 18 samples behind the
input. The top keeps a 16-bit sample counter that is aligned to it, so every
reported location is a true sample index of `ecg_in`. Outputs saturate to
12 bits.

### QRS detection (`qrs_fsm`, `r_peak_vote`)

Each scale has a small state machine: IDLE, then PEAK1, then PEAK2.

1. It waits for a coefficient over the positive or negative peak threshold.
2. It follows that lobe to its zero crossing.
3. It then needs the opposite lobe to exceed its threshold and fall back.

At that point it reports a candidate: the crossing location and both peak
amplitudes. A pair that takes longer than 40 samples, or that swings back to
the first sign, is dropped.

`r_peak_vote` confirms an R peak when at least two of the three scales report
within 24 samples of each other.
* The R location is the scale-2 crossing, or the scale-3 crossing when scale 2
  did not vote.
* After an R, candidates are ignored for 50 samples (200 ms), the refractory
  period.
* A lone candidate is cleared after 24 samples.

### QRS boundaries (`boundary_detector`)

Both boundaries are runs of three or more scale-2 samples inside a narrow band
around zero. The band is ±(scale-2 peak threshold >> 4).

* **Onset.** The detector watches all the time. The latest run before the
  scale-2 machine started a peak pair is held as the onset candidate. When an
  R is confirmed, the candidate becomes QRSon, so no sample history is needed.
* **End.** After R, the same comparators look for the first quiet run that
  also has scale 4 below its threshold. A wide (ventricular) complex still
  shows on scale 4, so this check stops a false early end. The end is the
  first sample of that run.
* **Time limit.** If no quiet run comes within 50 samples, the end is forced.

### Adaptive thresholds and search windows (`thr_win_engine`)

There are six thresholds: positive and negative for each of the three scales.

* Each ends a lobe by comparing the lobe's peak with its threshold. A peak at
  or above the threshold becomes the signal peak SP; a peak below it becomes
  the noise peak NP.
* On every confirmed R, each threshold moves a quarter of the way towards a
  level between noise and signal:

  `thr' = (3·thr + NP + (SP − NP)/2) / 4`  (floor 16, start 200).
* The boundary band is the scale-2 threshold >> 4.
* The P/T wave threshold is the scale-4 positive threshold >> 2.

The P and T search windows follow from a running average of the QRS width:
`avg' = (3·avg + width)/4`, with the width measured from QRSon to QRSend. All
distances are relative to R:

| window | left edge | right edge |
|---|---|---|
| P | R − SW_pl | R − 10 |
| T | R + 15 | R + SW_tr |

* `SW_pl = min(100, 10 + 0.375·QRS)`
* `SW_tr = min(100, 15 + 0.4·QRS)`
* QRS is the average width **in milliseconds**. In samples this is 1.5·avg and
  51/32·avg, computed with shifts and adds.

The millisecond reading is this design's interpretation. Read in samples, a
normal 100 ms QRS would give a P window only 19 samples (76 ms) deep, which is
shorter than the ~0.1 s delay between atria and ventricles that the window is
meant to cover.

## The asynchronous P/T search

This is the least conventional part of the design.

### What is searched

For a window of scale-4 coefficients, the kernel works in two phases.

1. **SCAN.** It finds the global maximum and minimum in the window. If neither
   passes the P/T threshold, there is no wave: `found = 0`.
2. **ZC.** Otherwise it walks from the earlier extreme towards the later one.
   It stops at the first word whose sign differs from the earlier extreme,
   which is the zero crossing marking the wave.

Each word costs one iteration. A 100-word window takes at most about 200
iterations.

### How it is paced (`mmouse_ring`, `tunable_delay_line`)

The kernel has no clock. Its pace comes from a two-stage ring, a modified
MOUSETRAP pipeline closed on itself:

```
 EN ─┐
     NAND ─► delay line ─► A ─► [latch 1: en = XNOR(B,C)] ─► B ─► [latch 2: en = XOR(B,C)] ─► C ─┐
      ▲                                                                                          │
      └──────────────────────────────────────────────────────────────────────────────────────────┘
```

* Every transition of A passes through both latches.
* It gives one low pulse on `en1` (XNOR) and one high pulse on `en2` (XOR).
* The NAND then inverts and launches the next transition.
* There is no return-to-zero phase, so each iteration costs one trip through
  the delay line.

The datapath state (phase, counter, max/min and their positions, result) sits
in two latch banks:
* **Slave** latches are open while `en1` is high and follow the next-state
  logic.
* **Master** latches open on the `en2` pulse and take one step.

The delay line is matched to the datapath's critical path. It must be slower
than that path, but not by much.

The kernel drops its own ring enable once it reaches DONE. If that moment
coincides with a falling C, the NAND can let one more, empty, iteration
through. The datapath just holds its DONE state during it.

### How it meets the clocked world (`sync_async_if`)

Inputs need no handshake: the window start, length and threshold are
registered on the slow clock before the kernel is enabled. The sequence is:

| clock | action |
|---|---|
| 0 | Request accepted: window registered, kernel power enable (`kernel_pwr_en`) set. |
| 1 | `EN` raised; the kernel runs for well under a microsecond. |
| — | The kernel's `VALID` goes through an isolation AND (with the power enable) and its rising edge clocks the output register. |
| 3 | `VALID`, through a two-flop synchronizer, is seen on the clock. |
| 4 | The result is presented; `EN` and power enable drop together. |

The isolation cells make a powered-down kernel read as all zeros, so floating
outputs cannot clock the output register. The memory's read decoder lives
inside the kernel, so it can also be powered down between searches.

### Sharing one memory (`pt_controller`, `coef_memory`)

`coef_memory` is a 100 × 12-bit register file written circularly, one scale-4
word per sample. `pt_controller` sequences the two searches of a beat:

* When a beat's QRS end is known, the P window already lies in memory, so the
  P search is issued on the next clock.
* The T search waits until the sample at R + SW_tr has been written.

Windows become (first slot, length) pairs. A P window is clipped to the
newest 96 words, leaving 3 words of margin for the writes made while the
request is in flight. A T search still waiting when the next beat ends is
dropped and flagged. The kernel answers within one sample period, so the
P result is back long before T words can overwrite the P window.

### Delay tuning (`delay_tuning`, `critical_path_replica`)

At start-up, `tune_start` picks the shortest delay-line setting that still
covers the critical path:

1. A lead-lag detector is a single flip-flop. Its D input is the end of the
   critical path and its clock is the end of a copy of the delay line.
2. The state machine starts at code 0 and sends one rising edge into both
   paths.
3. A 0 in the flip-flop means the delay line won the race, so it is too
   short: the code steps up and the test repeats.
4. A 1 ends the tuning.

There are 8 steps, so the code is 3 bits. If even code 7 is too short, `fail`
is raised in `status[5]`.

In silicon the detector watches the real datapath.
`critical_path_replica` stands in for it with a fixed 3.2 ns delay. The delay
line model is 2.0 ns + 0.5 ns per step, so the tuning settles on code 3.

### FIR test vehicle (`fir16_iter`)

The same ring and latch style drives a 16-tap iterative FIR filter: one
8×8+16-bit multiply-accumulate step per ring iteration. The source
architecture used it to compare asynchronous and synchronous energy.

* It sits in the top with its own `fir_*` ports and is not connected to the
  delineator.
* No coefficient set is specified for it, so the coefficients are an input.
* The accumulator wraps at 16 bits.

## Top-level interface (`ecg_delineator`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 250 Hz sample clock, asynchronous active-low reset |
| `ecg_in` | in | 12 | ECG sample, two's complement, one per clock |
| `tune_start` | in | 1 | run delay-line tuning |
| `r_peak`, `qrs_on`, `qrs_end` | out | `fid_t` | `{valid, loc[15:0]}` one-cycle strobes |
| `p_wave`, `t_wave` | out | `wave_t` | `{valid, found, loc[15:0]}`; `found = 0` means no wave in the window |
| `kernel_pwr_en` | out | 1 | control for the kernel's power switch (the switch itself is not modelled) |
| `tune_done`, `tune_code` | out | 1, 3 | tuning finished, code in use |
| `status` | out | 8 | [0] refractory reject, [1] QRS end forced, [2] T dropped, [3] window at 100-sample cap, [4] tuning busy, [5] tuning failed, [6] lone candidate cleared, [7] a QRS FSM busy |
| `fir_en`, `fir_x`, `fir_h`, `fir_dly_code` | in | 1, 16×8, 16×8, 3 | FIR test vehicle |
| `fir_valid`, `fir_y` | out | 1, 16 | FIR result |

`loc` is the index of the marked sample counted from reset, with 16 bits that
wrap. Results come after the point they mark:
* R comes roughly 10–30 samples after the peak, because of the DWT latency and
  the vote.
* P is reported with the QRS end.
* T comes about SW_tr samples after R.

Parameters of the top: `DEPTH` (memory words, default 100) and `STEPS` (delay
steps, default 8). Shared sizes and types are in `ecg_pkg`.

## Where this design departs from, or adds to, its source

Several things are this design's own choices:
* **Threshold update.** The update rule was published without its ÷4. It is
  read as a weighted average, as the accompanying text describes.
* **Window slopes.** The QRS width is taken in milliseconds (see above).
* **Unpublished details.**
  - the QRS state-machine graph;
  - the run length of three samples for a boundary;
  - the 24-sample vote window, 50-sample refractory period and 50-sample
    QRS-end timeout;
  - the initial threshold and window values;
  - the P/T threshold of scale-4 threshold >> 2.

  None of these were published. The values chosen are physiologically
  plausible, not tuned on clinical data.
* **Handshake stages.** The ring uses one handshake latch per stage. The
  original draws several handshake elements per stage, joined by C-elements.
* **Interface and scheduling.**
  - the two-flop synchronizer and the 4-clock request-to-result latency;
  - P-window clipping and T-search dropping;
  - the empty extra ring iteration.
* **Models.** Gate and delay values (0.1 ns gate, 2.0 + 0.5·code ns line,
  3.2 ns critical path) are model numbers, not from a process.

Not built:
* the power-switch transistor, which has no logic function;
* the microcontroller-based wireless prototype, which is built from
  commercial parts and software;
* the synchronous and Muller-pipeline versions of the FIR filter, which are
  only comparison baselines.

Energy, voltage (0.5 V) and area claims can only be checked in silicon and
are not addressed here.

## How far it has been verified

Each block has a self-checking testbench in `tb/` that compares it with values
computed independently:
* an exact integer model of the filter bank;
* hand-worked threshold and window values;
* a reference search for the kernel on 400 random windows;
* 40 random wavelet lobe pairs for the QRS state machine;
* a sum of products for the FIR;
* and so on.

Each block was also broken on purpose in one way, and its testbench was
confirmed to fail. The testbenches also pass when every register and latch
starts at a random value (Verilator's `+verilator+rand+reset+2` with
`--x-initial unique`).

The end-to-end test `tb_ecg_delineator` runs the top at its default sizes on
a synthetic 14-beat ECG. The ECG has P, Q, R, S and T waves, baseline wander,
noise, one beat without a P wave and one artefact spike. The test checks:
* every R within 6 samples;
* QRSon and QRSend ranges;
* P/T results inside their windows and on a zero crossing of an independently
  computed scale-4 wavelet;
* every kernel run shorter than half a sample period;
* the tuning code;
* the FIR output.

It also counts each mechanism and fails on one that never happened.

The design has **not** been run on the public ECG databases the source
evaluated on (MIT-BIH Arrhythmia, QT Database). Their records would need to be
resampled to 250 Hz and streamed through `ecg_in`. The design's state does not
depend on record length, so nothing prevents this, but no detection-accuracy
claim is made here. On the synthetic ECG, the beat without a P wave still gets
a P reported "found": baseline wander and noise in its window pass the
adaptive P/T threshold.

## Simulating

With Verilator 5 (the behavioural models need `--timing`):

```
verilator --binary --timing -Irtl -Itb rtl/ecg_pkg.sv tb/tb_ecg_delineator.sv \
          --top-module tb_ecg_delineator -Mdir obj_top -o sim
./obj_top/sim
```

Any other testbench runs the same way, with its own name. `rtl/` holds the
library of modules, so `-Irtl` is enough for Verilator to find them. Each
testbench ends with a line `TB_RESULT checks=N failures=M`.

For synthesis:
* the behavioural modules (`mmouse_ring`, `tunable_delay_line`,
  `critical_path_replica`) stand for hand-built standard-cell structures;
* the kernel and FIR datapaths are deliberately latch-based, so a synthesis
  tool reports latches and combinational loops through them.

## Files

| file | content |
|---|---|
| `rtl/ecg_pkg.sv` | widths, constants, `fid_t` / `wave_t` types |
| `rtl/ecg_delineator.sv` | top level |
| `rtl/dwt_qswt.sv` | 3-scale à trous wavelet filter bank |
| `rtl/qrs_fsm.sv`, `rtl/r_peak_vote.sv` | QRS candidates and 2-of-3 vote |
| `rtl/boundary_detector.sv` | QRS onset / end |
| `rtl/thr_win_engine.sv` | adaptive thresholds, P/T windows |
| `rtl/coef_memory.sv` | 100 × 12 circular memory |
| `rtl/pt_controller.sv` | P/T search scheduling |
| `rtl/sync_async_if.sv` | clocked ↔ clockless interface |
| `rtl/pt_search_kernel.sv` | asynchronous P/T search |
| `rtl/mmouse_ring.sv` | handshake ring (behavioural) |
| `rtl/tunable_delay_line.sv` | matched delay line (behavioural) |
| `rtl/critical_path_replica.sv` | critical path stand-in (behavioural) |
| `rtl/delay_tuning.sv` | lead-lag delay tuning |
| `rtl/fir16_iter.sv` | asynchronous 16-tap FIR test vehicle |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
