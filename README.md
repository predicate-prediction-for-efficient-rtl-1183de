# Predicate prediction at register rename

This is the rename stage of an out-of-order IA64-style core that runs predicated
code. It predicts predicate values and recovers when a prediction turns out wrong.

## The problem

In predicated code (an IA64 "conditional writer"), an instruction such as
`(p6) add r33 = 1, r33` writes `r33` only if predicate `p6` is true. An if-converted
region usually holds several such writers of one register, each guarded by a
different predicate. When a later instruction reads `r33`, rename must pick one
of them as its producer. Until the guarding predicates are computed, nobody knows
which writer is the real one. This is the *multiple-definition problem*. Without
extra help, rename has to stall until the compare that defines the predicate
executes.

This unit does not wait. It **predicts** every predicate-defining compare at
decode, with a branch-predictor-like table indexed by the compare's PC. Rename then
treats each predicated instruction as qualified true or false according to the
real value if it is known, or else the predicted one:

* an instruction qualified **true** is renamed normally and becomes the current
  definition of its destination;
* an instruction qualified **false** is a no-op. It does not enter the issue
  queue, and it does not change the map.

When the compare executes, its real values are checked against the predictions
that were used. On a mismatch only rename has to be repaired. No instructions are
fetched again, because both sides of the if-converted region are already in the
pipeline. Two recovery schemes are built:

* **rename-replay** (the default), where the affected instructions pass through
  rename again;
* **selective replay**, where the scheduler re-executes only the dependent
  instructions.

## Pipeline

```
 decode ──► REN1 ───────────────► REN2 ────────────────────────► dispatch (registered)
            predictor lookup      early evaluation                 disp_*
            (speculative history  rename (GR map, predicate map)
             update)              RecQ allocation, checkpoints
                                  broadside-vector allocation
 write-back (wb_*) ──► compare results checked ──► misprediction ──► recovery
 commit (RecQ head, in order) ──► predictor training, architectural predicates
```

* **REN1.** A compare arriving from decode looks up the predictor. The
  prediction is ready one cycle later, when the compare is in REN1.
* **REN2.** The instruction's qualifying predicate is looked up in the predicate
  map. It comes from one of three places:
  * the architectural file;
  * an in-flight compare, whose value is known or predicted;
  * an in-flight broadside write (see below).

  The early evaluator (`pred_early_eval`) then decides whether the instruction is
  qualified true. It also decides whether it goes to the issue queue, what values
  a compare's two destinations are predicted to take, and whether that decision
  rested on a prediction.
* **Dispatch.** Every instruction gets a slot in the recovery queue (RecQ), and
  that slot number is its tag. The dispatch port is a register one cycle after
  REN2 and has no back-pressure.
* **Write-back.** Completions arrive on `wb_*`, one per cycle, and are always
  accepted. A compare's real values are compared with the used predictions in the
  same cycle.
* **Commit.** The RecQ head commits when it is complete, one instruction per
  cycle. A committing compare does three things:
  * trains the predictor;
  * writes its two predicates into the architectural predicate file;
  * clears map entries that still name it.

## Predicting a compare

An IA64 compare `(qp) cmp pd1, pd2 = ...` in its unconditional form writes
`pd1 = cond, pd2 = !cond` if `qp` is true, and writes false to both if `qp` is
false. So only one boolean is predicted, the value of `pd1`. The other follows:

| qualifying predicate | predicted `pd1` | predicted `pd2` |
|---|---|---|
| true | prediction | not prediction |
| false | 0 | 0 |

The predictor (`predicate_predictor`) is a tournament predictor:

* a 16K-entry bimodal table of 2-bit counters, indexed by PC;
* a 16K-entry local two-level table. A 1024-entry table of 10-bit per-PC
  histories selects a counter in a 16K pattern table; the index is 4 PC bits
  followed by the history;
* a 16K-entry chooser of 2-bit counters, indexed by PC, which picks one of the
  two.

Only local history is used. Unlike branches, predicate predictions do not depend
on each other, so a global path history adds little.

The lookup writes the predicted bit into the local history straight away (a
speculative update). Commit trains the following:

* the bimodal counter and the pattern counter;
* the chooser, but only when the two components disagreed;
* on a misprediction, the history is repaired to the history used at prediction
  followed by the real outcome.

After reset the tables are cleared one entry per cycle. `ready` stays low for
16384 cycles while this happens.

## Early evaluation rules

| instruction | qualifying predicate | goes to issue queue | effect at rename |
|---|---|---|---|
| ALU | true (real or predicted) | yes | becomes the definition of its destination |
| ALU | false (real or predicted) | no; completes at once | none (no-op) |
| compare | any | yes (it must compute the real values) | both destinations map to `{slot, 0/1}` with predicted values |
| broadside write | (unpredicated) | yes | all 64 predicates map to one vector |

If the qualifying predicate comes from a broadside write that has not executed,
the instruction waits in REN2. Broadside-written predicates are never predicted.
`p0` always reads true.

## Rename-replay recovery

This is the heart of the design and the default (`RECOVERY = REC_RENAME_REPLAY`).

**The recovery queue.** Every renamed instruction is written to the RecQ in
program order, whether it was qualified true or false and whether or not it went
to the issue queue. The RecQ is the 256-entry commit window, and its slot index
is the instruction's tag. An entry keeps the decoded instruction, the compare's
prediction record (predicted bit, history, component predictions) and the
broadside vector if it has one. So the RecQ is both the reorder buffer and the
source of replays.

**Checkpoints at the first use.** A prediction costs nothing until some
instruction's rename depends on it. The first time an instruction is qualified
using a particular predicted (not yet resolved) compare output, the unit does
three things:

* saves a checkpoint of both maps (general registers and predicates) as they were
  *before* that instruction;
* records that instruction's slot as the compare's *first user*;
* marks the output as used.

Later users of the same output take no checkpoint. There are 8 checkpoints
(`NUM_CKPT`). A first use that finds none free stalls in REN2 until a compare
resolves and frees one. A checkpoint is freed when its compare writes back.

**Detecting a misprediction.** When a compare writes back, each of its outputs
that was used is checked against the prediction. A difference on a used output
is a misprediction. A difference on an unused output is ignored, because nothing
depends on it.

**Recovery.** In the write-back cycle that finds the misprediction:

1. `squash_valid`/`squash_start` tell the issue queue to drop everything from the
   first user on.
2. Both maps are restored from the first user's checkpoint.
3. The RecQ's completion flags are cleared from the first user to the tail. The
   same goes for in-range compare results, uses (and their checkpoints), and
   broadside vector contents. All of these are produced again by the replay.
4. Fetch and decode are held (`in_ready` low), and REN1 keeps what it holds.

The replay controller waits `RECOVERY_LAT` = 7 cycles. Then it feeds the RecQ
entries, from the first user to the old tail, back into REN2, one per cycle. They
are evaluated again, now seeing the compare's real values, and renamed again with
the restored map. They are dispatched again in their original slots, with
`disp_replay` set. Instructions that were wrongly treated as no-ops now go to the
issue queue, and the reverse. Normal renaming resumes after the last one. The
compare itself is older than the first user, so it is not replayed and goes on
towards commit.

Timing: if the misprediction is seen in cycle *t*, the first replayed instruction
is in REN2 in cycle *t*+7 and appears on the dispatch port in cycle *t*+8.

A misprediction found *while a replay is running* restarts the recovery from its
own first user. That user is older than anything the running replay has renamed
since. Its checkpoint still holds the map from before it, and the restart covers
whatever the old replay had left.

## Selective-replay recovery (build option)

With `RECOVERY = REC_SELECTIVE_REPLAY`, every instruction goes to the issue queue,
including those predicted qualified false. Each carries, besides its normal
(predicted) source tags, *recovery tags* from a second, conservative map
(`selective_replay_tags`). Every writer updates that map whatever its predicate:

* a source recovery tag names the nearest older writer of that register;
* a destination recovery tag names the previous writer of the destination.

An instruction that turns out qualified false can then pass the old value along
its destination. This chains all the definitions of a register, so a replay always
delivers the right value:

```
mov r33 = 1              dst_rec: none
(p6) add r33 = 1, r33    src_rec: mov   dst_rec: mov
(p7) sub r33 = 2, r33    src_rec: add   dst_rec: add
(p8) shl r33 = r33, 3    src_rec: sub   dst_rec: sub
st   [] = r33            src_rec: shl
```

On a misprediction the unit does three things:

* raises `sel_replay_valid`/`sel_replay_start`, the first user, for the scheduler;
* replaces the predicted register map with the conservative map;
* clears the RecQ completion flags from the first user on.

The scheduler re-executes the dependent instructions over the recovery tags. It
then reports every instruction from `sel_replay_start` on complete again, as soon
as any re-execution is done. Nothing is renamed again and no checkpoint is used.

The scheduler that performs the replay is not part of this RTL.

## Broadside predicate writes

An instruction that writes all 64 predicates at once (the IA64 "move to
predicates") would need 64 new names. Instead the predicate file has two extra
*vectors* of 64 physical predicates (`NUM_VEC = 2`). A broadside write takes a
free vector at rename. All 64 predicate-map entries then name that vector, and a
reader indexes it with its predicate number. Three stalls come with this:

* with no vector free, rename stalls;
* readers stall until the vector has been written;
* a vector is copied into the architectural file and freed when its write
  commits.

## Top-level interface (`pp_rename_unit`)

| group | signals | timing |
|---|---|---|
| decode | `in_valid`, `in_uop`, `in_ready` | valid/ready. `in_ready` is low during predictor initialisation and whenever REN1 is held: during recovery, while REN2 stalls, or while the RecQ is full |
| dispatch | `disp_valid`, `disp_tag`, `disp_uop`, `disp_qual`, `disp_replay`, `disp_src1/2`, `disp_src1/2_rec`, `disp_dst_rec`, `disp_qp_inflight`, `disp_qp_tag`, `disp_vec` | registered, one cycle after REN2, no back-pressure |
| recovery | `squash_valid/start` (rename-replay), `sel_replay_valid/start` (selective) | combinational, in the write-back cycle that finds the misprediction |
| write-back | `wb_valid`, `wb_tag`, `wb_is_cmp`, `wb_pvals`, `wb_is_bsw`, `wb_vec`, `wb_bsw_value` | one per cycle, always accepted |
| commit | `commit_valid`, `commit_tag`, `commit_uop`, `arch_pr` | registered, one per cycle |
| events | `ev_mispredict`, `ev_ckpt`, `ev_stall_ckpt`, `ev_stall_vec`, `ev_stall_sync`, `ev_qual_false` | one-cycle pulses, for counting |

Instructions are `pp_pkg::uop_t`. Each has:

* a class: ALU, compare, or broadside write;
* its PC and qualifying predicate;
* a general-register destination and two sources;
* the two predicate destinations of a compare.

Tags are RecQ slots: 8 bits for the 256-entry window. A predicate tag adds a flag
for "vector" and a bit for which of the compare's two outputs.

Contract for the execution side:

* write back only instructions that were dispatched and not squashed since;
* for a compare, send both real values;
* for a broadside write, send its vector number (from `disp_vec`) and the 64
  values.

## Choices made here, and departures from the evaluated machine

* **Width.** The evaluated machine issues 6 instructions per cycle and needs at
  least six predictions per cycle. This unit renames, writes back and commits
  **one** instruction per cycle, with one predictor lookup port. The mechanisms
  do not depend on width. A wider version needs more map and predictor ports and
  intra-group dependency checks.
* **Tags are RecQ slots.** There is no separate physical-register free list.
  A value lives under its producer's slot until it commits, then in the
  architectural file.
* **Checkpoints:** 8. The evaluated machine does not give a number.
* **Local predictor geometry** (1024 histories of 10 bits, pattern index = 4 PC
  bits and the history), counter initial values and chooser training rule: own
  choices. The sizes of the three 16K tables are the evaluated ones.
* **Recovery latency** is 7 cycles, as evaluated, from the misprediction to the
  first replayed instruction in REN2. How those cycles would divide among real
  stages is not modelled.
* **Registers renamed:** the 128 general registers and the 64 predicates.
  Floating-point and branch registers, loads and stores, and non-unconditional
  compare forms (AND/OR compares) are not handled.
* **Broadside reads** (saving all 64 predicates into a register) are not a
  separate instruction class. Such an instruction would have to wait until every
  in-flight predicate is real. Only broadside writes are modelled.
* **Not included:** fetch and branch prediction, the issue queue and scheduler,
  the execution units and register file, the memory hierarchy, the register stack
  engine. The top brings the signals to and from these out as ports.
* Flush recovery, rename-stall and select-µop schemes are the comparison points
  the approach was measured against. They are not implemented.

## Files

| file | content |
|---|---|
| `rtl/pp_pkg.sv` | sizes, instruction and tag types |
| `rtl/predicate_predictor.sv` | bimodal / local / chooser predictor |
| `rtl/pred_early_eval.sv` | qualification and compare-value derivation at REN2 |
| `rtl/rename_map.sv` | map with checkpoints, broadside write-all, commit clear, bulk load |
| `rtl/recovery_queue.sv` | RecQ: in-order window, replay read port, completion flags |
| `rtl/predicate_state.sv` | per-compare predicted/real values, first users, checkpoint pool, misprediction detection |
| `rtl/replay_controller.sv` | recovery delay and replay sequencing |
| `rtl/broadside_pred_rf.sv` | architectural predicate file plus broadside vectors |
| `rtl/selective_replay_tags.sv` | conservative map for recovery tags |
| `rtl/pp_rename_unit.sv` | top: the rename unit |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_pp_rename_unit.sv` | end to end, default parameters, rename-replay |
| `tb/tb_pp_rename_unit_selective.sv` | end to end, selective replay |
| `tb/tb_pp_rename_unit_replay_example.sv` | directed six-instruction rename-replay walk-through |

## Simulating

With Verilator 5, from the folder holding `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl +libext+.sv -Irtl \
          rtl/pp_pkg.sv tb/tb_pp_rename_unit.sv --top-module tb_pp_rename_unit -o sim
./obj_dir/sim
```

Any other testbench builds the same way: replace the testbench file and the top
module name. Every testbench ends by printing `TB_RESULT checks=<n>
failures=<m>`, and each has a watchdog.

**End-to-end tests.** Both run a generated loop of 120 static instructions for
4000 dynamic instructions. The loop mixes compares with stable, alternating,
random and mostly-true outcomes, predicated ALU operations, and three broadside
writes per iteration. A sequential reference model gives every instruction's
real qualification, compare results and source producers. The execution side
writes instructions back after random latencies: 1–6 cycles for ALU operations,
4–120 for compares, 20–60 for broadside writes.

`tb_pp_rename_unit` (default parameters) checks:

* commit order;
* that exactly the qualified-true ALU instructions (and all compares and
  broadside writes) were last dispatched;
* that every source tag names the real producer;
* the final architectural predicate file;
* that no replay is dispatched sooner than 8 cycles after its misprediction, and that replays do start at 8.

A typical run: 34,511 cycles, 201 mispredictions, 3,144 replayed dispatches,
1,558 checkpoints, and stalls for checkpoints, vectors and broadside
synchronisation.

`tb_pp_rename_unit_selective` checks:

* that each instruction is dispatched exactly once;
* the source and destination recovery tags against the conservative reference;
* that no squash or checkpoint occurs;
* the final predicate file.

`tb_pp_rename_unit_replay_example` runs a six-instruction case by hand: a
compare, two writers of `r33` under opposite predicates, and their readers. The
compare is predicted one way and resolves the other. The test checks:

* which instructions are dispatched before and during the replay;
* the source tags in both passes;
* the replay start and its latency;
* the final predicate values.

**Unit tests.**

* The predictor, map and queue tests are randomised against reference models.
* The early-evaluation test is exhaustive.
* The replay-controller test checks the 7-cycle latency and restarts.
* The selective-tag test replays the five-instruction example above.

The predictor test shrinks its tables through parameters so it runs quickly.
