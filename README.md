# Run-time anomaly detector for a RISC-V core (NIRVANA method)

Embedded firmware is highly regular: a main loop calls a fixed set of
algorithms, each running from a fixed place in memory. This means the
firmware's behaviour can be summarised with a few numbers. Injected or
tampered code changes those numbers. This design watches a RISC-V core from
the outside. It uses only the core's retirement trace, the program counter
and the instruction word of each retired instruction. Every time the program
switches from one algorithm to another, it condenses the run that just
ended into a four-number feature vector. A small self-organizing map (SOM),
trained on vectors from known-good runs, then classifies each new vector.
A vector that lies far from everything the map has learned is flagged as
abnormal.

The detector never stalls, modifies or instruments the core. It needs no
hardware performance counters, so it fits any core whose trace gives PC
and instruction. The method follows the NIRVANA detector
(non-invasive real-time vulnerability analysis), which was evaluated
on a Piccolo RV32 core. Widths, thresholds, encodings and the control
interface are this implementation's own choices. They are listed under
"Departures and own choices" below.

## Data path

```
 trace_valid/pc/instr
        |
      [ccm]  frame = {instr, pc, clock count}; now_cnt
        |
   +----+-----------------+
[insn_filter MEMIO]  [insn_filter JUMP]
   |                      |
[feature_lane]       [feature_lane]        (inside feature_extractor)
   +----------+-----------+
   window close -> range test -> keep / discard
              |
   4 x seq_divider -> sample = {avg mem PC, avg mem interval,
              |                 avg jump PC, avg jump interval}
        [som_classifier]
   collect -> som_train_mem
   train   -> lfsr, som_dist_pipe, som_lr_lut, weight update
   classify-> som_dist_pipe -> res_idx, res_dist, res_anomaly
```

| File | Role |
|---|---|
| `nirvana_pkg.sv` | shared widths, `frame_t`, `sample_t`, instruction-class enum, opcodes |
| `ccm.sv` | continuous collection module: frames and the clock count since reset |
| `insn_filter.sv` | picks loads/stores or unconditional jumps (RV32 and compressed encodings) |
| `feature_lane.sv` | per-type window statistics and the run accumulators |
| `feature_extractor.sv` | windows, switch detection, averages |
| `seq_divider.sv` | restoring divider used for the averages |
| `som_dist_pipe.sv` | 5-stage L1 distance + argmin over all neurons |
| `som_lr_lut.sv` | step learning rates mu0 (time) and mu1 (neighbour distance) |
| `som_train_mem.sv` | 512-entry training-sample buffer |
| `lfsr.sv` | 64-bit LFSR for random initial weights and random sample choice |
| `som_classifier.sv` | neuron registers, training controller, inference |
| `nirvana_top.sv` | the whole detector |

## Why only loads, stores and jumps

Analysing every retired instruction would need a classifier as fast as the
core. The detector instead looks at two instruction types that every
program has in quantity:

* memory I/O: `LOAD`, `LOAD-FP`, `STORE`, `STORE-FP`, `AMO`, and the
  compressed loads and stores (including the SP-relative forms);
* unconditional jumps: `JAL`, `JALR`, `C.J`, `C.JAL`, `C.JR`, `C.JALR`.

Conditional branches are not counted. For each type, two quantities describe
a run: where the instructions are (their average PC) and how often they
occur (the average number of cycles between two neighbouring ones). With two
types, that gives four features.

## Windows and algorithm switches

This is the part that decides what a "sample" is, so its timing is
spelled out here.

1. **Windows.** Time is cut into windows of `2**WIN_LOG2` cycles (1024 by
   default), using the collector's clock count. A window ends in the cycle
   where the low `WIN_LOG2` bits of `now_cnt` are all ones. A frame in that
   cycle still belongs to the ending window. The filters are combinational,
   so a frame's clock count always equals `now_cnt` in the cycle it reaches
   the lanes.
2. **Per-window statistics.** Each `feature_lane` keeps, for its type, the
   minimum and maximum PC, the PC sum and count, and the sum and count of
   intervals between neighbouring selected frames. Intervals are counted only
   inside one window; the first frame of a window opens no interval.
3. **Close.** At the window end, the statistics move into a "closed" copy
   and the window restarts empty. There is no gap between windows.
4. **Decide (next cycle).** The PC range of the closed window is taken
   over the selected frames of both types together: the largest PC of
   either lane minus the smallest. If it exceeds `RANGE_THRESH` (4 KiB),
   the window is discarded. A range that wide means a long jump, that is,
   the main loop called another algorithm. Otherwise the closed statistics
   are added to the run accumulators.
5. **Emit.** A discarded window that follows kept data ends a run. In that
   same cycle the four accumulated sums and counts go to four dividers in
   parallel, and the accumulators are cleared. 56 cycles later
   `sample_valid` pulses. Counting from the decision cycle, the sample
   arrives 57 cycles later. A type with no frames gives 0 for its
   features.

So one algorithm run gives one sample, built only from the windows that lie
wholly inside it. A run shorter than about two windows may give no sample.
Because decisions are a whole window apart, the dividers are always free in
time. Windows shorter than the divider latency are rejected at elaboration.
Counts saturate at 2^24 frames per run: a kept window that would overflow
them is ignored, so sums and counts stay consistent.

## The self-organizing map

The map holds `NN = 14` neurons, twice the seven programs the method was
evaluated on. Each neuron is a 4-D vector of 32-bit weights held in
flip-flops. All distances are L1 (Manhattan): sums of absolute
differences, with no multipliers and no square roots.

**Nearest-neuron pipeline (`som_dist_pipe`).** It has five registered
stages: input, |K_l - w_jl| for all neurons and dimensions, per-neuron sums,
minimum within groups of four, and the final minimum. It accepts one input
per cycle and returns the result 5 cycles later. On a tie, the lowest
index wins. Training and inference share this pipeline, and a tag bit
tells their results apart.

**Training (`som_classifier`).** `train_start` is accepted when the buffer
is not empty and the pipeline is idle. Training then runs these steps:

1. Initialisation: one neuron per cycle. Each weight is drawn uniformly
   from the stored data's range in that dimension:
   `w = min + (r * (max - min) >> 16)`, where `r` is a 16-bit slice of the
   LFSR.
2. `2 * n_samples` iterations (`ITER_MULT`). Each iteration:
   * picks a random stored sample K, at index `(r * n_samples) >> 16` for a
     16-bit random `r`;
   * runs K through the pipeline to find the winner;
   * forms the L1 distance M_j from the winner to every neuron (the
     winner's row of the neuron distance matrix);
   * updates every neuron in one cycle:
     `w_jl += ((K_l - w_jl) * mu0 >>> 8) >>> s_j`.

   Every iteration takes exactly 9 cycles: pick, read, issue, 5 pipeline
   cycles and update. Training therefore lasts `NN + 9 * 2 * n_samples`
   cycles, about 9,250 cycles for a full buffer.
3. `trained` is set when the iterations are done.

**Learning rates (`som_lr_lut`).** Both rates are step functions, so no
division is needed.

* `mu0` falls over the run in eight equal steps from 0.5 to 0. In Q0.8 the
  steps are 128, 110, 91, 73, 55, 37, 18, 0. The step index is the number
  of k in 1..7 with `8*iter >= k*total`.
* `mu1` falls with the neighbour distance M in four steps: 1 below R, 1/2
  below 2R, 1/4 below 4R, 0 beyond. `R = NEIGH_R = 1024`. It is applied as
  a right shift `s_j` (3 means no update).

The winner itself always has M = 0, so it moves by `mu0`.

**Classification.** With `collect = 0` and a trained map, each sample
enters the pipeline as it arrives. `res_valid` comes 5 cycles later with
the nearest neuron (`res_idx`), its distance (`res_dist`), and
`res_anomaly = res_dist > anomaly_thresh`. Samples that arrive before
training, or while it runs, are not classified and pulse `infer_dropped`.

## Using the top level

1. Reset, then set `collect = 1` while the monitored program runs normally.
   Each sample is appended to the buffer (`n_samples`). Samples beyond 512
   pulse `set_full`. `clear_set` empties the buffer.
2. Set `collect = 0` and pulse `train_start`. Wait for `training` to fall.
3. Keep `collect = 0`. Every later run is classified. Set `anomaly_thresh`
   from the distances seen on known-good runs.

`win_kept` and `win_discarded` pulse once per window, for monitoring.

| Parameter | Default | Meaning | Origin |
|---|---|---|---|
| `WIN_LOG2` | 10 | window = 1024 cycles | own choice |
| `RANGE_THRESH` | 0x1000 | PC range that marks an algorithm switch | own choice |
| `NN` | 14 | neurons | method: 2 x expected programs (7) |
| `DEPTH` | 512 | training buffer entries | own choice (holds a 257-sample set) |
| `ITER_MULT` | 2 | iterations per stored sample | method |
| `NEIGH_R` | 1024 | mu1 distance step | own choice |
| `CNT_W` (package) | 48 | clock count width | own choice |

## Departures and own choices

* **Update sign.** The method's update rule is written with a minus sign,
  `w = w - mu0*mu1*(K - w)`. Taken literally, it pushes neurons away from
  the data they are meant to learn. This design moves them towards it,
  which is the standard SOM rule.
* **Distance matrix.** Only the winner's row of the neuron distance matrix
  is used by the update, so only that row is computed. It is computed for
  all neurons in parallel.
* **Trace port.** The collector takes one generic retirement trace
  (valid, PC, instruction). Decoders for specific debug ports, such as the
  Piccolo verification interface, are not included.
* **What counts as a sample.** One sample per algorithm run, produced at the
  switch that ends it. Intervals are measured inside a window only.
* **Anomaly rule.** Nearest-neuron distance above a run-time threshold. No
  labels are attached to neurons; mapping neurons to program names is left
  to software.
* **Not included:** the monitored core itself, and the board-level program
  generator and AXI link used for the FPGA evaluation.

## How far to trust it

Every block has a self-checking testbench that compares it with a reference
model written independently in the testbench. The SOM testbench checks
every training iteration exactly: the new weights must equal the update rule
applied to the old weights for one of the stored samples. The end-to-end
testbench runs at full default size. It drives a synthetic trace: seven
algorithms in separate 1 KiB code regions called from a main loop, plus
runs of "injected" code elsewhere in memory. It fills the buffer past 512
samples, trains while the program keeps running, and classifies 60 further
runs. It checks the following:

* every sample's average PCs lie inside the code that just ran;
* every result matches a reference nearest-neuron search, 5 cycles after
  its sample;
* every injected run is flagged.

A second full-size testbench, `tb_workload_autobench`, repeats the shape of
the method's evaluation with a synthetic trace. Seven kernels stand in for
the automotive benchmark set. Their run lengths come from the benchmark
iteration-count ranges; the cycles per iteration are invented. Each round
calls one to four random kernels until 257 samples are collected. The bench
then trains the map (514 iterations) and labels each neuron with the kernel
that wins most of its training samples. Finally it classifies 70 new kernel
runs and 10 injected runs. In that run, 59 of 71 kernel runs got the right
kernel, 12 were flagged as abnormal, and all 10 injected runs were
flagged.

The map itself is only as good as the method's short schedule allows. With
two passes over the data and random initial weights, some clusters of
normal behaviour can end up without a neuron close by. Samples from those
clusters are then flagged too. In the end-to-end test, all injected runs are
flagged, but so are 12 of 46 normal runs. The same happens in the SOM unit
test, where 3 of 7 clusters get a close neuron. Detection quality on real
firmware therefore depends on `NEIGH_R`, `RANGE_THRESH`, the window length
and the threshold, which are not tuned here.

**Size.** A generic yosys synthesis gives about 209 flip-flops for the
collector (most of them the 48-bit counter and the registered frame),
about 1,900 for the feature extractor and about 4,250 for the SOM, plus a
64 Kbit sample buffer. The published FPGA build of the method reports about
200, 1,170 and 1,770 flip-flops for the same three parts. The collector
matches. The other two are larger here because this RTL keeps four
separate 56-bit accumulators and dividers, and because the SOM's
distance pipeline registers every stage for all 14 neurons in parallel.
Narrower accumulators, a shared divider, or a pipeline that steps through
the neurons would bring both down, at the cost of more latency.

## Simulating

All testbenches are self-checking and print `TB_RESULT checks=N failures=M`.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
  rtl/nirvana_pkg.sv tb/tb_nirvana_top.sv --top-module tb_nirvana_top
./obj_dir/Vtb_nirvana_top
```

Replace `nirvana_top` with `workload_autobench` for the evaluation-style run,
or with `ccm`, `insn_filter`, `feature_lane`, `feature_extractor`,
`som_dist_pipe`, `som_lr_lut`, `som_train_mem` or `som_classifier` for the
unit tests. The end-to-end test simulates about
2.4 million cycles and takes a few seconds.
