# HMM phone recognizer with adaptive approximate arithmetic

This is an accelerator that recognizes isolated phonemes. An utterance arrives
as a sequence of 39-dimensional feature frames (13 MFCCs plus their deltas and
double deltas). The accelerator scores it against 28 monophone hidden Markov
models, each with three left-to-right states, and reports the index of the
best-matching model. Scoring uses the log-domain Viterbi algorithm with Gaussian
output densities that have diagonal covariance. All arithmetic is integer.

Two ideas shape the hardware:

* **Cheap arithmetic where the bits carry little information.** Several
  additions keep only the lower 24 bits of a 48-bit result and pass the upper
  24 bits through unchanged. The final comparison across models looks only
  at the upper 24 bits. In the faster mode, two adders are also replaced by
  carry-predicting approximate adders.
* **An adaptive safety net.** By default the datapath runs in the faster,
  approximate mode ("Technique-2", intended for a 110 MHz clock). If the two
  best models end up closer than a programmable threshold, the result is
  flagged. The utterance is then recomputed in the exact mode
  ("Technique-1", intended for 95 MHz).

The RTL follows the structure of the thesis *Hardware Accelerator for HMM Based
Speech Recognition Using Approximate Computing Techniques*. The places where
this implementation had to choose for itself are listed in the last section.

## The arithmetic, and where precision is dropped

Every score is a **cost**: the magnitude of a log probability, so smaller is
better. Every comparator therefore keeps the minimum. The model parameters and
features are real numbers multiplied by K = 100 and rounded to 16-bit integers.
Every other term is then implicitly scaled by K³. The hardware only sees
integers, and preparing them is the host's job.

For state j of a model and frame t:

```
logb_j(t)  = omega_j + sum_{d=0..38} sigma_jd * (o_td - mu_jd)^2
delta_0(j) = logb_j(0)                 with omega'_j = omega_j + log pi_j in place of omega_j
delta_t(j) = min( delta_{t-1}(j-1) + a_(j-1)j , delta_{t-1}(j) + a_jj ) + logb_j(t)
P(O|model) = min_j delta_T(j)
phone      = argmin over the 28 models of P(O|model)[47:24]
```

Widths and truncations, exactly as built:

| operation | width | notes |
|---|---|---|
| `o + (-mu)` | 16 | wraps like a 16-bit adder, then read as signed. Approximate in Technique-2 |
| `(o-mu)^2` | 32 | |
| `sigma * (o-mu)^2` | 48 | |
| accumulate 39 terms | 48 | exact, wraps modulo 2^48 |
| `+ omega` | 24 | only bits 23:0 are added. Bits 47:24 are the accumulator's. The carry into bit 24 is lost |
| `delta + a` | 24 | only bits 23:0 are added. Bits 47:24 are delta's. Approximate in Technique-2 |
| `min(...) + logb` | 48 | exact |
| per-model termination | 48 | two cascaded comparators |
| across models | 24 | bits 47:24 only |

Folding `log pi` into a second constant `omega'` removes the separate
initialization adder. For a left-to-right model, `log pi` is 0 for the first
state and a large penalty for the others. `omega'` is stored next to `omega`,
and the unit picks `omega'` on the first frame.

## Carry-predicting approximate adders

`approx_adder16` (used for `o - mu`) and `approx_adder24` (used for
`delta + a`) split the operands into six blocks:

* 16-bit adder: 2, 2, 2, 2, 4 and 4 bits, from the least significant end.
* 24-bit adder: six blocks of 4 bits.

Each block has two parts:

* A **carry generator** computes the block's carry-out as if its carry-in were
  0, and the block propagate P (all bits of the block propagate).
* An **adder** does the block sum: two full adders for a 2-bit block, a 4-bit
  CLA for a 4-bit block.

No carry ripples between blocks. The carry into block k+1 is predicted from
the two blocks below it:

```
cin[k+1] = P[k] ? cout[k-1] : cout[k]        cin[0] = cin[1] = 0
```

The sum is wrong when a carry has to cross more than one fully propagating
block. It is also wrong when a carry out of block 0 would enter block 1,
because block 1's carry-in is tied to 0. The carry-out port is the top block's
own carry-out.

This has a practical consequence that the simulations show clearly. The
subtraction `o + (-mu)` with a small positive difference gives operands like
`0x0005 + 0xFFFD`. Here the carry must cross every upper block, and the
prediction drops it. The result is off by 2^8 or 2^12. Such a small difference
is exactly what happens when a frame matches a model well, so Technique-2
often penalizes the correct model heavily. In the end-to-end test, the
Technique-2 pass misranks most utterances made from the correct model. In
`tb_recognition_workload` (28 synthetic utterances, one per phone), Technique-1
recognises 28 and Technique-2 alone only 4. The threshold is calibrated as the
smallest Technique-1 margin plus 10 %. With it, every Technique-2 margin falls
below the threshold, so the trigger fires on all 28 utterances. The adaptive
mode then recognises all 28, but always at the cost of a replay (about 785 ns
per frame instead of 364 ns). This is what the adaptive fall-back is for, but
on data like this it gains no speed. Before relying on Technique-2 alone, judge
the error on real, scaled feature data.

## One HMM, one frame, one cycle plan

`hmm_unit` holds one model:

* `hmm_param_mem` stores the model.
* Three `logb_unit`s do one multiply-accumulate each per clock.
* Three `delta_unit`s hold the Viterbi registers.
* `viterbi_term` reduces the three state costs to the model's cost.

All 28 `hmm_unit`s receive the same feature dimension every clock.
`phone_compare` is a comparator tree over the 28 model costs.

Cycle plan, set by `recog_ctrl`:

* A frame's 39 dimensions enter one per clock (`acc_en`). The first one
  restarts the accumulators.
* In the clock after the frame's last dimension, `delta_en` updates every
  Viterbi register. `init` is high for the utterance's first frame. The next
  frame's first dimension may enter in that same clock, so frames can be sent
  back to back.
* After the last frame's update, the comparator tree settles in one clock,
  and the result is captured.
* `result_valid` rises **39·T + 1 clock edges** after the edge that takes the
  first dimension. For a one-frame utterance that is 40 cycles: 421 ns at
  95 MHz or 364 ns at 110 MHz.

Only the three delta registers per model carry state between frames, so the
utterance length T has no limit.

## Adaptive mode and the replay protocol

`phone_compare` tracks the best and the second-best model cost through the
tree. Each node keeps its winner and the smaller of the loser and the winner's
own runner-up. The difference between the two is the *margin*, and
`too_close = margin < threshold`.

With `adaptive_en = 1`:

1. The mode after reset is Technique-2, and `mode_o = MODE_T2`.
2. If a Technique-2 result has `too_close`, it is delivered with
   `result_redo = 1`, and the mode switches to Technique-1.
3. The host replays the same utterance. That result arrives with
   `result_redo = 0` and `result_mode = MODE_T1`. The mode then returns to
   Technique-2.

`mode_o` is meant to select the clock frequency. The clock source is not part
of this RTL. With `adaptive_en = 0`, the mode is simply `mode_sel` and
`result_redo` stays low.

The design keeps no copy of the utterance. Recomputation relies on the host
sending it again.

## Interfaces of `hmm_recognizer`

**Model load.** The host writes `param_wr` (type `hmm_pkg::param_wr_t`) with
`param_we`, one word per clock, before recognition starts. The fields are:

* `hmm`: model 0..27.
* `state`: 0..2.
* `dim`: 0..38.
* `data`: 48 bits.
* `kind`: one of the kinds in the table below.

| kind | per | width used | meaning |
|---|---|---|---|
| `PK_MU` | state, dim | 16 | scaled mean |
| `PK_SIGMA` | state, dim | 16 | scaled magnitude of −1/(2·variance) |
| `PK_OMEGA` | state | 48 | cost constant, frames t > 0 |
| `PK_OMEGA0` | state | 48 | cost constant incl. initial-state penalty, frame 0 |
| `PK_A_SELF` | state | 48 (24 used) | self-transition cost |
| `PK_A_PRED` | state | 48 (24 used) | cost of entering from state j−1, unused for state 0 |

A full model set is 28 × 246 = 6,888 writes. The memories are not reset.

**Feature stream.** `feat_data` is taken on every clock where `feat_valid` and
`feat_ready` are both high, in dimension order 0..38. Raise `feat_last`
throughout the utterance's last frame. `feat_ready` falls after the last
dimension and rises again with `result_valid`.

**Result.** `result_valid` is a one-cycle pulse. With it come:

* `result_phone`: the winning model index. Ties go to the lower index.
* `result_score`: the upper 24 bits of the winning cost.
* `result_margin`: the margin to the runner-up.
* `result_redo`: the utterance must be replayed.
* `result_mode`: the mode the result was computed in.

Reset is asynchronous and active low.

## Files

| file | role |
|---|---|
| `rtl/hmm_pkg.sv` | sizes (28 models, 3 states, 39 dims, 16/32/48/24-bit widths), mode and write types |
| `rtl/hmm_recognizer.sv` | top level |
| `rtl/recog_ctrl.sv` | dimension/frame sequencing, adaptive mode state |
| `rtl/hmm_unit.sv` | one HMM |
| `rtl/hmm_param_mem.sv` | one HMM's parameter storage |
| `rtl/logb_unit.sv` | output-probability multiply-accumulate |
| `rtl/delta_unit.sv` | Viterbi cell |
| `rtl/viterbi_term.sv` | min over the final state costs |
| `rtl/phone_compare.sv` | comparator tree, runner-up, too-close flag |
| `rtl/min_cmp.sv` | subtract-and-select comparator |
| `rtl/approx_adder16.sv`, `rtl/approx_adder24.sv` | carry-predicting adders |
| `rtl/carry_gen.sv`, `rtl/cla4.sv`, `rtl/full_adder.sv` | their cells |
| `tb/tb_ref_pkg.sv` | behavioural reference: block-wise approximate adder model, a log-Viterbi model class |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_recognition_workload` (recognition-rate experiment on the full design) |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/hmm_pkg.sv tb/tb_ref_pkg.sv tb/tb_hmm_recognizer.sv --top-module tb_hmm_recognizer
./obj_dir/Vtb_hmm_recognizer
```

Replace the last file and the top name for another testbench. The end-to-end
test `tb_hmm_recognizer` runs the design at its full default size:

* It loads 28 random models.
* It sends ten utterances of 1–3 frames, each made from one model's means
  plus noise.
* It predicts every result with the reference model and checks it bit for
  bit: phone, score, margin, redo and mode. It also checks the
  39·T + 1 latency.
* It sets the threshold so that half of the Technique-2 results trigger a
  redo, and replays those.
* It also runs both fixed modes.

It counts every mechanism (Technique-2 results, redo triggers,
recomputations, multi-frame recursion, fixed modes, stream gaps, and
Technique-1 vs Technique-2 differences). If one of them never happened, that
is a failure. It builds in about half a minute and runs in under a second.

`tb_recognition_workload` is a recognition-rate experiment on the same
full-size design:

* It makes one 3-frame test utterance per phone.
* It recognises each utterance in fixed Technique-1, in fixed Technique-2 and
  in adaptive mode. The adaptive threshold is the smallest Technique-1 margin
  over the test set plus 10 %. Utterances that fire the trigger are replayed.
* It checks every result bit for bit against the reference and prints the
  recognition count of each mode, the trigger count and the resulting
  average time per frame.
* Technique-1 must recognise all 28, each replay must equal the Technique-1
  result, and the trigger must fire at least once.

How far to trust it:

* Every module except `full_adder` has its own testbench, checked against an independent behavioural model. `full_adder` is covered through `tb_approx_adder16`.
* The adders and the small carry cells are checked exhaustively or with
  random operands, and the approximate adders with tens of thousands of
  random operands.
* The datapaths are checked on random models, in both modes.
* Nothing has been run on real speech features or trained models. No timing
  or area has been measured.

## Departures and open points

* **Main configuration only.** The first, unoptimized variant (a separate
  `log pi` adder, full 48-bit additions and comparisons) is not built. The
  RTL is the optimized datapath, with runtime switching between exact and
  approximate adders.
* **Costs and minimum.** The source design's diagrams draw "greater-than"
  comparators, while its text switches to absolute log values and minimum.
  This RTL uses costs and minimum throughout.
* **First-level comparators.** The comparator tree has 14 first-level
  comparators for 28 inputs. The tree is padded to 32 leaves with the
  largest cost.
* **The trigger.** It is defined here as the gap between the best and the
  second-best model. The source design only says "too close, based on a
  threshold". The extra runner-up comparator per tree node is this design's
  addition.
* **The threshold** is an input. The source design derives it from
  Technique-1 results (the smallest observed margin, with 10 % tolerance);
  that calibration is done by the host. `tb_recognition_workload` shows it.
* **Recomputation** needs the host to replay the utterance. There is no frame
  buffer.
* **The parameter memory** (organisation, write port, asynchronous read) is
  this design's own. The source design leaves storage unspecified.
* **State 0** has no predecessor path. The source design does not say how
  the first state is handled.
* **Out of scope:**
  * feature extraction (MFCC), which is done in software upstream;
  * model training;
  * the clock source that changes frequency with `mode_o`.
* **Exact adders** are written with `+` and left to synthesis. The source
  design used carry-look-ahead adders for them.
