# Composite confidence estimation for speculation control

A branch predictor says which way a branch will go. A *confidence estimator*
says how likely that guess is to be right. With that estimate, a processor can
spend effort only where it pays. For example, it can stop fetching while
several doubtful branches are unresolved, so that it burns less energy on
instructions that will be thrown away.

Classic estimators each produce a small integer "raw output" and compare it
with a fixed threshold. Two examples are the JRS miss-distance counters and
Up/Down counters. The trouble is that one 4-bit counter gives only 16
operating points, so there is little choice in the trade-off between the two
figures that matter:

* **SPEC**: the share of mispredicted branches that are flagged low confidence.
* **PVN**: the share of low-confidence flags that really are mispredictions.

The idea behind this design is to treat each estimator as a classifier and
**add their raw outputs**, then threshold the sum. A JRS counter (0..15), an
Up/Down counter (0..15) and the predictor's own "self" estimate (0..15) sum
to 0..45. That gives about three times as many thresholds to choose from, and
the sum is more accurate than any single term. In hardware this costs two
small adders and a comparator on top of the tables.

This repository holds synthesizable SystemVerilog for:

* the composite estimator with its component tables;
* the three branch predictors it is paired with (gshare, a McFarling-style
  hybrid and a perceptron predictor), each with its self-estimator;
* a pipeline-gating controller that stops fetch while three or more
  unresolved branches are low confidence;
* a top level that combines them.

## Structure

```
cce_top
 ├─ u_perc   : cce_frontend #(PRED_PERCEPTRON) ──┐ low-confidence flag
 ├─ u_gate   : pipeline_gating  <────────────────┘ + resolve/squash   -> p_fetch_gate
 ├─ u_gshare : cce_frontend #(PRED_GSHARE)      (stand-alone lane, g_* ports)
 └─ u_hybrid : cce_frontend #(PRED_HYBRID)      (stand-alone lane, h_* ports)

cce_frontend (one lane)
 ├─ speculative global history register (GHR) with checkpoint repair
 ├─ predictor: gshare_predictor | hybrid_predictor | perceptron_predictor
 ├─ self-estimator: self_estimator (counter fold) | perceptron_self_est (|y| scaled)
 ├─ jrs_estimator     512 x 4-bit miss distance counters
 ├─ updown_estimator  512 x 4-bit up/down counters
 └─ composite_estimator  sum of three 4-bit values, compared with `threshold`
```

`cce_pkg` holds the shared types: the checkpoint struct `bp_ckpt_t`, the
predictor-kind enum and the history helper.

## How a branch moves through a lane

**Predict (combinational, same cycle).** The front end raises `pred_valid`
with `pred_pc`. In the same cycle the lane returns:

* `pred_taken`, the prediction;
* the three component raw outputs;
* their sum `pred_raw` and `pred_high_conf = pred_raw > threshold`;
* a checkpoint `pred_ckpt`, which holds the history before this branch, the
  predicted direction and, for the perceptron, the dot product `y`.

At the clock edge the prediction is shifted into the GHR.

**Carry the checkpoint.** The pipeline keeps `pred_ckpt` with the branch. The
lane itself stores nothing per branch.

**Resolve.** When the branch executes, the pipeline presents `upd_valid`,
`upd_pc`, `upd_taken` and the checkpoint. At the clock edge:

* the predictor trains;
* the JRS and Up/Down tables train. "Correct" means the outcome matches the
  checkpointed prediction.

`upd_mispredict` is raised combinationally when the prediction was wrong. The
GHR is then rebuilt as the checkpointed history plus the real outcome. This
repair takes priority over a prediction in the same cycle, because such a
prediction is on the wrong path.

**The "enhanced JRS" detail.** Both counter tables are indexed with the
branch's *own* prediction already shifted into the history:
`index = PC[..:2] XOR {ghist, pred_taken}`. The same index is recomputed at
resolve from the checkpoint, so lookup and training always touch the same
counter.

## The three components of the composite

| component | raw output | training at resolve |
|---|---|---|
| JRS (`jrs_estimator`) | 4-bit counter: correct predictions since the last miss in this entry | +1 (saturating at 15) if correct, **cleared** on a miss |
| Up/Down (`updown_estimator`) | 4-bit counter | +1 (saturating at 15) if correct, **−1** (saturating at 0) on a miss |
| Self, gshare | c′ of the 2-bit counter used | (the predictor's own training) |
| Self, hybrid | c′(global 2-bit) + c′(local 3-bit), 0..10 | (the predictor's own training) |
| Self, perceptron | min(\|y\| >> 3, 15) | (the predictor's own training) |

For an n-bit counter c, the fold is c′ = c if the branch is predicted taken,
and 2ⁿ−1−c if it is predicted not taken. A strongly saturated counter
therefore always gives a large c′, whichever direction it predicts.

Both hybrid components are folded towards the **final** (chooser-selected)
prediction. A component that disagrees with the final prediction therefore
lowers the confidence.

`composite_estimator` is generic (`N_IN` inputs of `IN_W` bits). For three
4-bit inputs it produces a 6-bit sum: a 4+4→5-bit add followed by a 5-bit add
with carry out. The threshold is an input. It is meant to be held static and
set to suit the application: a higher threshold flags more branches as low
confidence, which raises SPEC and lowers PVN.

## Pipeline gating (`pipeline_gating`)

The controller tracks every fetched branch in an age-ordered ring of `DEPTH`
(32) slots, recording whether the branch is low confidence.

* `lc_count` is the number of unresolved low-confidence slots.
* `fetch_gate = lc_count >= GATE_COUNT` (3).
* Fetch resumes by itself once enough of those branches resolve.

When a branch resolves as mispredicted, every younger slot is squashed and
stops counting, and the tail moves back to just after that branch. Resolved
slots retire from the head at one per cycle. A resolved slot therefore still
takes up ring space for one cycle, so the ring can refuse a new branch with
31 unresolved branches in flight.

`alloc_ready` is low when the ring is full or when a misprediction resolves
in the same cycle. An assertion checks that every resolve names a slot that
is in flight.

In `cce_top`, every branch accepted by the perceptron lane
(`p_pred_valid && p_pred_ready`) is allocated with
`low_conf = !p_pred_high_conf`. `p_pred_tag` must come back as `p_upd_tag`.
`p_fetch_gate` is an output: the fetch unit must stop issuing `p_pred_valid`
while it is high.

## The predictors

* **gshare**: 16K two-bit counters, indexed by `PC XOR history` (14 history
  bits). The prediction is the counter's MSB.
* **Hybrid** (Alpha 21264 shape):
  * a 4K two-bit global PHT indexed by 12 history bits;
  * 1024 ten-bit local histories selected by PC, indexing a 1K three-bit
    local PHT;
  * a 4K two-bit chooser indexed by global history. Its MSB selects the
    global side. It trains towards the component that was right when the two
    disagree.
* **Perceptron**: 128 perceptrons of 29 signed 8-bit weights (a bias plus one
  weight per history bit, 28 bits of history).
  * Output: `y = w0 + Σ ±wi`. A value `y >= 0` predicts taken.
  * Training happens on a misprediction or when `|y| <= 68`. The bias moves
    towards the outcome, and each weight moves up when its history bit agreed
    with the outcome and down otherwise, saturating at −128..127.
  * Training uses the `y` carried in the checkpoint.

Each table is a plain array with combinational reads and one write port.
After reset, a counter sweeps it to its initial value at one entry per cycle,
and the lane's `ready` output stays low until all tables are done. The
slowest lane is gshare, at 16384 cycles. The initial values are: counters
weakly not-taken, hybrid chooser weakly local, weights and confidence
counters zero.

## Parameters and sizes

| where | parameter | default | origin |
|---|---|---|---|
| `jrs_estimator`, `updown_estimator` | `ENTRIES`, `CTR_W` | 512, 4 | from the published scheme (512 + 512 counters = 512 bytes) |
| `gshare_predictor` | `ENTRIES`, `HIST_LEN` | 16384, 14 | table size published; history length chosen here |
| `hybrid_predictor` | G/L/C entries, local histories | 4096, 1024×10, 1024, 4096 | published |
| `perceptron_predictor` | `N_PERC`, `HIST`, `W_BITS`, `THETA` | 128, 28, 8, 68 | chosen here for a ~4 KB budget; θ = ⌊1.93·h + 14⌋ |
| `perceptron_self_est` | `SHIFT` | 3 | chosen here |
| `pipeline_gating` | `DEPTH`, `GATE_COUNT` | 32, 3 | gate count published; depth chosen here |

Storage per lane is 2×2048 bits for the two estimator tables. The predictors
take 32768 bits (gshare), 29696 bits (hybrid) and 29696 bits (perceptron).

## Departures and design choices

These points go beyond, or differ from, the published description. Treat them
as this implementation's decisions:

* **Hash functions.** The tables combine history and PC by XOR. The history
  is speculative and repaired from a checkpoint.
* **When tables are read and written.** Everything is read at predict time
  and written at resolve. The gshare and hybrid tables are re-read at
  resolve. Only the perceptron's `y` is carried with the branch.
* **Hybrid local histories** are updated at resolve, not speculatively.
* **Perceptron sizes** and the self-estimate shift were chosen here. The
  shift is 3 with saturation at 15, which places θ = 68 mid-scale. The
  published work gives only "scaled by shifting to between 0 and 15".
* **Gating bookkeeping.** The ring, its depth, the one-per-cycle retirement
  and the squash rule are this implementation's choices. Only the rule "gate
  while three or more unresolved branches are low confidence" comes from the
  published scheme.
* **Lanes in the top.** `cce_top` puts a gshare lane and a hybrid lane beside
  the perceptron lane. They show the same estimator on the other two
  predictors, and only the perceptron lane drives gating. The
  `pred_ckpt.perc_y` field of those two lanes is always zero.
* **Other estimator configurations.** JRS alone, Up/Down alone, JRS + Self
  and Up/Down + Self use 1024-entry tables. They are not built as separate
  lanes. Each lane exposes the three component raw outputs, and
  `JRS_ENTRIES`/`UD_ENTRIES` can be set to 1024; `tb_threshold_sweep` does
  exactly that for two of its four lanes.
* **Not included.** The surrounding processor is not part of this RTL: caches,
  BTB and the out-of-order core with its fetch unit.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_self_estimator` | exhaustive c′ for 2- and 3-bit counters |
| `tb_perceptron_self_est` | scaled, saturated \|y\| for edge and random values |
| `tb_composite_estimator` | sum and strict `>` at the threshold boundary |
| `tb_jrs_estimator`, `tb_updown_estimator` | every lookup against a software table; reset sweep length |
| `tb_gshare_predictor`, `tb_hybrid_predictor`, `tb_perceptron_predictor` | predictions, self outputs and training against software models; both perceptron training paths; both chooser sides |
| `tb_pipeline_gating` | tags, `lc_count`, gate, squash and full-ring refusal against a queue model |
| `tb_cce_frontend` (with `frontend_checker`) | all three lane kinds on a loop program with wrong-path fetch and repair; component raws, sum and GHR against models; high-confidence predictions must be more accurate than low-confidence ones |
| `tb_cce_top` | full-size end-to-end run; see below |
| `tb_gating_sweep` | pipeline gating driven by JRS, JRS + Up/Down, the full composite or the perceptron self-estimate alone, at every threshold; throughput loss vs. wrong-path reduction |
| `tb_threshold_sweep` | SPEC/PVN for every threshold of every estimator on gshare and perceptron lanes, with 512- and 1024-counter tables; see below |

`tb_cce_top` runs the top at its default parameters. A pipeline model:

* fetches a synthetic eight-branch loop program;
* resolves branches in order, 7 cycles after fetch;
* fetches wrong-path branches after a misprediction, then squashes and
  refetches them;
* obeys `p_fetch_gate`.

It checks `p_lc_count`, the gate, the tags and the misprediction flags every
cycle. It requires each of these mechanisms to occur at least once: gate
raised, gate released, squash, history repair, and ring full (driven by a
long-latency phase).

It then runs the program with threshold 0, where gating is nearly off, and
with threshold 24. Gating must reduce the number of wrong-path branches
fetched per misprediction. A typical run gives 3578 → 2665 wrong-path
branches for about the same cycle count.

`tb_threshold_sweep` records, for every resolved branch, the raw output of
each estimator and whether the prediction was right. It then prints the
share of branches flagged low confidence, SPEC and PVN for every threshold.
The estimators are JRS, Up/Down, Self, JRS + Self, Up/Down + Self,
JRS + Up/Down and JRS + Up/Down + Self. It runs four lanes: gshare and
perceptron, each at 512- and at 1024-counter tables. The eight-branch program
does not alias in either size, so both sizes give the same tables; a real
program with many branches would be needed to see the difference.

On the perceptron lane of the synthetic program:

* JRS alone gives 16 operating points.
* The three-term composite gives 46.

The composite also reaches better points. For example:

| estimator | threshold | SPEC | PVN |
|---|---|---|---|
| JRS | 3 | 0.69 | 0.25 |
| JRS + Up/Down + Self | 25 | 0.61 | 0.34 |
| JRS + Up/Down + Self | 20 | 0.45 | 0.46 |

The testbench checks three things:

* the composite offers more distinct operating points than JRS;
* its PVN at the lowest useful threshold beats the base misprediction rate;
* SPEC never falls as the threshold rises.

For gshare, the self-estimate can only be 2 or 3. The counter's MSB is the
prediction, so the folded value is always in the upper half. Its
contribution to the composite is therefore a single bit of information.

`tb_gating_sweep` wires a perceptron lane directly to a `pipeline_gating`
controller. It computes the low-confidence flag itself from JRS,
JRS + Up/Down, the full sum or the perceptron self-estimate alone, so all four
can gate the same pipeline model.
For each threshold it reports two figures, both relative to a run without
gating:

* the loss in branch throughput, which stands in for IPC;
* the cut in wrong-path branches fetched, which stands in for extra work.

On the synthetic program the results are:

* JRS gives 15 distinct operating points and the composite gives 46.
* The composite's wrong-path reduction climbs in small steps, from about 22 %
  to about 66 %, with throughput loss within noise (about ±2 % on this short
  program).
* Only the top few composite thresholds cost real throughput, 45 % at t = 43.
* The self-estimate alone, which needs no table of its own, already cuts
  wrong-path fetch by about half at low thresholds. Wrong-path branches here
  come from random addresses, where the perceptron output is small. From
  t = 10 upward it also gates correct-path branches and throughput drops
  steeply.

This is a small synthetic model, so treat the numbers as a demonstration of
the mechanism, not as a performance prediction.

To run any testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/cce_pkg.sv tb/tb_cce_top.sv --top-module tb_cce_top -o sim
./obj_dir/sim
```

Replace `tb_cce_top` with any other testbench name. The RTL is lint-clean
apart from unused-bit warnings: the tables use only the PC and history bits
their index needs.

## Trust and limits

The tests exercise the RTL against independent behavioural models and a
synthetic program. They have not been run on real branch traces, so no
SPEC/PVN figures from real workloads are reproduced.

The single-cycle combinational lookup includes a 29-term adder tree for the
perceptron and the 16K-entry gshare read. This is behavioural timing, not a
timing-closed implementation. A real front end would pipeline these lookups
and would probably build the tables as SRAM macros.
