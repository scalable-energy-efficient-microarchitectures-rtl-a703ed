# A thread-level RRNS core: arithmetic that corrects its own errors

Near-threshold and millivolt switches save a lot of energy, but their logic makes
transient errors. Triple modular redundancy hides those errors at three times the area
and energy. This design uses a cheaper code instead: a **redundant residue number system
(RRNS)**. Each 32-bit integer is stored as its remainders modulo six small, pairwise
co-prime moduli. Four of them carry the value and two are redundant. Add, subtract and
multiply work on each remainder on its own, with no carries between them. So one faulty
9-bit lane corrupts only its own residue. Two redundant residues are enough to find and
repair any single wrong residue, and to detect two.

The RTL has two parts:

* **A residue-parallel core.** It runs one instruction stream on six independent
  9-bit subcores, one per residue. Only the operations that need the whole number
  (compare, check, convert, fractional multiply) meet in a shared *residue interaction
  unit*.
* **Checkpointing, for errors that cannot be corrected.**
  * Two interval controllers decide when complete and incremental checkpoints are
    taken, based on how often errors have been seen recently. Both are instantiated side
    by side in `rrns_top`; a system would use one of them.
  * Two buffers hold the checkpoints. One keeps a complete checkpoint's evicted lines;
    the other streams incremental checkpoints to and from memory.
  * A sequencer runs verification, commit and rollback.

## The number system

Default configuration, (4,2)-RRNS:

| | value |
|---|---|
| non-redundant moduli m1..m4 | 139, 349, 128, 379 |
| redundant moduli m5, m6 | 503, 509 |
| legitimate range M = m1·m2·m3·m4 | 2 353 365 632 (just over 2^31) |
| residue width | 9 bits |

All of these come from `rrns_pkg`. Every derived constant and table (inverses, weights,
correction tables, log/antilog tables) is computed from `MODS` by constant functions at
elaboration. So another base set, or another (n, r), only needs that package changed.

**Signed values.** These use an excess-M/2 code: v is stored as v + M/2, and the
signed range is [−M/2, M/2). With H = |M/2|_m, the per-channel operations are:

* ADD: `x + y − H`
* SUB: `x − y + H`
* MUL: `x·y − C(x + y)`. C is a table of 2m−1 entries computed from
  |(M/2)² + (s − M − 1)·M/2|_m.
* CMP: the plain difference `x − y`, which is not corrected back into the code.

H is 0 for the odd non-redundant moduli, because they divide M/2, so those channels need
no correction for ADD and SUB.

**Multiplier (`index_sum_mul`).** This is an index-sum multiplier:

* Prime moduli: a product is exp(log x + log y), using a primitive root found at
  elaboration.
* The power-of-two modulus 128: each odd factor is written as ±5^b·2^a (the
  ⟨α, β, γ⟩ triple code), and the code parts are added.

## Checking, correcting and comparing

**Consistency check (`consistency_check`).** This is the core of error handling. It
converts the four non-redundant residues to mixed-radix digits, one subtract cycle and
one scale cycle per digit. While it does so, it carries the same steps through the two
redundant channels. The two values left in the redundant channels are the deltas Δ5, Δ6:
each is the stored redundant residue minus the one the non-redundant residues imply.

* Both deltas 0: the value is consistent.
* The check takes 2N = 8 cycles.

**Classifying a nonzero delta pair (`error_handling_unit`).**

1. A pair with **one** nonzero delta means a redundant residue is wrong.
2. A pair equal to (|M|_m5, |M|_m6) = (155, 60) means **overflow**. That value left the
   legitimate range upwards, and no single error produces this pair.
3. The pair (|−M|_m5, |−M|_m6) = (348, 449) means **underflow**.
4. Any other pair goes to the **correction unit** (`error_correction_unit`, 2 more
   cycles).

**Correction unit.**

1. It looks up Δ5 in a table for each non-redundant channel i and each k ∈ {0, 1}.
   Entry Δ5 holds the error e that would give this Δ5 together with the Δ6 it must give.
   The tables are built from W = |e·B_i|_M and Δ = |kM − W| over the redundant moduli,
   where B_i is channel i's CRT basis value.
2. It subtracts e from residue i only if both deltas match.
3. If no entry matches, or more than one does, the error is **uncorrectable**.

A check therefore takes 8 cycles when the value is clean and 10 cycles when it is
corrected.

**Comparison.** Compare has no cheap residue form. The subcores compute the uncorrected
difference X − Y, and the same check classifies it: the underflow pattern means X < Y,
zero deltas mean X ≥ Y. An error in a comparison is reported, not corrected.

**Conversion and fractional multiply.**

* `rbcu` turns the mixed-radix digits into binary (Σ a_j·m1…m_j, minus M/2). Binary
  to RRNS is one reduction per channel.
* `fcu` computes ⌊X·Y/M⌋, the product of two fractions X/M and Y/M. It does this by
  converting both operands, multiplying in binary and dividing by the constant M, which
  is the simplest way to get that result. The algorithm behind the original fractional
  unit is not specified.

## The thread-level core

The six subcores do not run in lock-step. Each has:

* a micro-instruction buffer (MIB),
* an EXE stage with its residue ALU,
* a MEM stage with its own slice of the data memory (one residue per word),
* a WB stage into its slice of the register file.

Fetch and decode are shared, with one PC adder. A 32-bit instruction becomes six
micro-instructions that carry the operand residues, so a subcore never reads the register
file and never stalls once an entry has issued. The pipeline is IF → ID → IBUF → EXE →
MEM → WB. The stalls and buffers of the design are:

* **MIB full.** Each MIB is a circular buffer with `beg_ptr`/`end_ptr` and a valid bit
  per entry. Decode inserts at `end_ptr+1` only if that slot's valid bit is clear, so
  fetch and decode stall while any subcore's MIB is full. The default depth is 8.
* **Memory address buffer (MAB).** A subcore holds only a residue of an address, but
  memory needs the whole address. Decode therefore puts each load or store address into
  a shared MAB entry (A_ID, Addr, Remaining#, valid) and passes the 2-bit A_ID to the
  subcores. Each subcore reads the address in its MEM stage and decrements Remaining#
  (which starts at 6), and the entry frees itself at 0. Decode stalls when all 4
  entries are in use.
* **Register hazards.** A scoreboard keeps one pending bit per register and channel.
  Decode waits until every residue of a source register has been written back; there is
  no forwarding. Results from the interaction unit (corrections, FMUL) are written through
  a full-width register-file port and lock their register until then.
* **Interaction unit (`residue_interaction_unit`).** Residues of CMP, CHK, OUT and FMUL
  arrive from the subcores at different times. An auxiliary register gathers them with an
  arrived bit per subcore, then starts the check, conversion or fractional unit. The unit
  handles one operation at a time.
* **Compare barrier.** A CMP that is not followed by a branch is a barrier: decode waits
  for its result.
* **Branch Predictor Combination.** Most compares feed a branch, so a CMP immediately
  followed by BLT/BGE is combined. A table of 2-bit counters (`branch_predictor`) predicts
  the branch, and fetch continues on the predicted path. Everything decoded after it is
  marked speculative and stays *unissued* in the MIBs; MAB entries are marked as well.
  When the compare resolves, a correct prediction releases those entries. A wrong one
  squashes them (each MIB rewinds `end_ptr`) and redirects fetch, so no speculative result
  ever reaches a register. Holding the entries back, rather than executing and flushing
  them, is this design's way to make the squash exact.

### Instruction set

The instruction set is this design's own; only the ADD split into micro-instructions
follows the original description. Fields: `[31:26]` opcode, `[25:21]` rd, `[20:16]` rs1,
`[15:11]` rs2, `[15:0]` signed immediate.

| op | meaning |
|---|---|
| ADD/SUB/MUL rd, rs1, rs2 | residue-parallel arithmetic |
| LI rd, imm | load a signed 16-bit constant |
| LD rd, imm / ST rs1, imm | absolute word address imm |
| CMP rs1, rs2 | sets the less-than flag (barrier, or combined with the next branch) |
| BLT/BGE imm, JMP imm | absolute targets |
| CHK rs1 | check, and correct if enabled, a register |
| OUT rs1 | check, convert and present a register on `out_valid`/`out_value` |
| FMUL rd, rs1, rs2 | ⌊X·Y/M⌋ of the unsigned codes |
| HALT | stop when the pipeline has drained |

`correct_en` selects correction (the "1EC" configuration) or detection only. An
uncorrectable error, in either mode, pulses `err_detect`. Overflow and underflow found by
a CHK pulse `ovf_detect`. The core keeps event counters (`core_stats_t`): cycles,
issued instructions, each kind of stall, combined branches, mispredictions, corrections,
errors and overflows.

## Checkpoint intervals (`eih_controller`)

Errors that escape correction are handled by rolling back to a checkpoint. The interval
controllers decide *when* checkpoints are taken. The buffers and the sequencer described
below hold and restore them.

* A **complete checkpoint (CC)** ends each long interval (LI).
* **Incremental checkpoints (IC)** split an LI into short intervals (SI).

The controller applies Error Interval Heuristics:

1. Let EI be the number of cycles between the last two detected errors. The first LI is
   EI/2, with no IC.
2. After each error-free CC, LI halves and the IC count doubles (0, 1, 2, 4, …). This
   stops at LI_MIN, and the IC count is clamped so that SI stays ≥ SI_MIN.
3. An error makes the elapsed cycles the new EI, and the sequence restarts.

With the defaults (EI 200k, LI_MIN 30k, SI_MIN 10k) the sequence is:

* 100k with no IC,
* 50k with one IC at 25k,
* then 30k with ICs every 10k, from then on.

`hold` (the top's `ckpt_busy`) freezes the interval counters while a checkpoint is being
made. In `rrns_top` the core's `err_detect` drives the controller's error input, and
`cc_req`/`ic_req` are brought out to whatever stores the checkpoints.

## Checkpoint intervals by overhead estimate (`soe_controller`)

The second controller, Stochastic Overhead Estimation, keeps SI fixed (5000 cycles) and
re-chooses LI after every committed CC. Over the interval between the last two errors it
knows the cycles spent on CCs (Sum_CCs), on ICs (Sum_ICs) and the mean LI (ave_LI). It
estimates the total overhead of keeping, doubling and halving LI. With n = LI/SI and
f = 1 − E(X)/LI:

| choice | estimate |
|---|---|
| keep | (⌊f·n⌋+1)/n · ave_LI + Sum_CCs + Sum_ICs |
| double | (⌊f·2n⌋+1)/(2n) · 2·ave_LI + Sum_CCs/2 + Sum_ICs |
| halve | (⌊f·n/2⌋+1)/(n/2) · ave_LI/2 + 2·Sum_CCs + Sum_ICs |

The cheapest one wins; ties keep LI. E(X) is the expected cycle of the first error in an
LI. It depends on the per-cycle error probability and is costly to compute exactly, so
software supplies it as `soe_ex_frac` = E(X)/LI, a 16-bit fraction. The decision takes
two cycles after `cc_done` and is shown on `soe_decided`/`soe_choice`/`soe_li`. The start
value 100k and the bounds 5k..1.28M cycles are this design's choices. In `rrns_top` its
`soe_cc_done`/`soe_ic_done` inputs, with their costs in cycles, come from the checkpoint
storage.

## Incremental checkpoint buffer (`incremental_checkpoint_buffer`)

Incremental checkpoints live in a reserved memory segment. The ICB is the streaming
buffer in front of it. When the core rolls back, the ICs are applied oldest first. IC i can
be applied to the machine state while IC i+1 streams in and is verified, because the
buffer has two FIFO halves of 1 KB (256 32-bit words) with separate read and write ports.

* The writer fills one half until it writes a word flagged `last`, then moves to the
  other half.
* The reader follows the same rule.
* Since ICs alternate between the halves, words come out in the order they went in. An IC
  larger than a half just streams through it.
* Reads are first-word fall-through.
* `flush` empties both halves, for example when a committed CC invalidates the ICs.

In `rrns_top` its ports are brought out as `icb_*`. The logic that prefetches ICs from
memory, creates them and applies them is not included.

## Complete-checkpoint buffer (`checkpoint_buffer`)

Between two complete checkpoints, main memory keeps the state of the last CC. Dirty lines
the data cache evicts during an LI must not reach memory yet, so they are parked here as
(line address, 64-byte line) records:

* **CCB.** 8-way, 32 KB (64 sets). A line goes to the lowest free way of its set. A second
  eviction of the same line in the same LI overwrites the first.
* **CCB-O.** 8-way, 1 KB (2 sets). It takes lines whose CCB set is full. If its set is
  full too, `ovf` pulses one cycle after the eviction, and the LI must end early.
* **Lookups.** `lk_addr` → `lk_hit`/`lk_data` answers a cache miss with the newest copy,
  like a store buffer.
* **Commit.** Every held line becomes committed and is offered on the drain port
  (`dr_valid`/`dr_ready`), one per cycle, while the next LI runs.
  * A new eviction of a line that is still waiting to drain is stored beside it, and the
    old copy is marked superseded.
  * A superseded copy is dropped at the next commit if it has not drained by then.
* **Rollback.** The lines of the failed LI are dropped. Committed ones stay.
* **Saved state.** `save` captures the PC and a flattened 32×32-bit register file, as the
  copies taken when a CC is created.

The 64-byte line, the placement rule and the committed/superseded bookkeeping are this
design's choices. In `rrns_top` the ports are brought out as `ccb_*`.

## Checkpoint/restart sequencing (`checkpoint_restart_unit`)

This state machine ties the interval controller, the error reports and the two buffers
together. Each piece of work is an external step. The unit starts it with a one-cycle
`*_start` pulse, and the step answers with `*_done`. `busy` is high while a step runs; it
should stall the core and drive the interval controller's hold.

| trigger | steps |
|---|---|
| `cc_req` (end of LI) | verify: sweep written lines and RF. Clean → commit: lines to CCB, CR/CW cleared, ICs invalid. Then `save`: RF/PC copy for the new CC. Error → rollback |
| `ic_req` (every SI) | IC creation: snapshot and stores into the ICB |
| `error` | rollback: RF/PC restored, written/read lines refetched, CCB lines of the LI dropped. Then, for each IC since the CC, oldest first: verify, apply |

* **Order of requests.** An error outranks a due CC, which outranks a due IC. Requests
  that arrive during a step wait.
* **Replay.** Replay stops at the first IC that fails verification. That IC and the later
  ones are discarded, so a later error replays only the good ones.
* **Sequential IC steps.** The two ICB halves would allow IC i+1 to be verified while IC i
  is applied. This unit runs those steps one after the other.

In `rrns_top` the sequencer is driven by the EIH controller's `cc_req`/`ic_req` and the
core's `err_detect`. Its step handshakes are brought out as `crs_*`.

## Where this departs from the original description

* **MAB size.** The MAB has 4 entries (2-bit A_ID, as drawn). The text suggests 5–10
  entries.
* **MIB depth.** The MIB depth is 8, picked from the suggested 5–10.
* **Delta sign.** Deltas are stored minus regenerated, as in the correction table and its
  worked example. One overflow example is written with the opposite sign; both signs
  carry the same information.
* **Memory.** Each subcore has a plain data slice of 256 words, and instructions come from
  a 256-word memory loaded through `prog_we`. There are no caches, no ECC instruction
  cache and no main memory.
* **Instruction set.** There are no bit operations, shifts, division or square root, even
  though the original routes them through the conversion unit.
* **Not built:**
  * the data cache with its CR/CW bits, and the logic that carries out the sequencer's
    steps (the cache sweep, writing lines to the CCB, IC save/verify/apply, restoring
    RF/PC),
  * rollback inside the core. The core only reports an uncorrectable error; the sequencer
    runs the rollback steps, but the core's own restore path is not built.
* **Test hooks.** `inj_valid`/`inj_ch`/`inj_offset` add an offset to the next register
  write of one subcore. They exist for testing and are not part of the original.

## Simulating

Every testbench in `tb/` checks its results against a reference and prints
`TB_RESULT checks=… failures=…`. Build one with Verilator 5, putting the packages first:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/rrns_pkg.sv rtl/rrns_isa_pkg.sv tb/rrns_test_prog_pkg.sv \
    tb/tb_rrns_top.sv --top-module tb_rrns_top -o sim
./obj_dir/sim
```

`tb_rrns_top` runs the whole design at its default sizes. It runs a program
(`rrns_test_prog_pkg`) that exercises every mechanism above, with a fault injected into
one subcore:

* The OUT values must match the reference.
* Barrier, MIB-full, MAB-full and hazard stalls, correct and wrong predictions, one
  correction and one overflow must all occur.
* It then lets 180k cycles pass and checks the checkpoint schedule to the cycle.
* It reruns in detection-only mode and checks that the error restarts the schedule.
* It reports checkpoint costs to the SOE controller and checks that LI adapts within its
  bounds.
* It writes two ICs into the ICB and reads them back in order across both halves.
* It evicts lines into the CCB, rolls back, commits and drains them.
* The sequencer must commit once per EIH CC, and after the detection-only error it must
  roll back and replay the ICs it holds.

The block testbenches use random stimulus against models. They check latencies where the
design has fixed ones:

| block | latency |
|---|---|
| check | 8 cycles |
| corrected check | 10 cycles |
| conversion | 8 cycles |
| fractional multiply | 9 cycles |
| subcore, push to write-back | 4 cycles |
