# SYRANT: symmetric resource allocation on the taken and not-taken paths

When an out-of-order processor mispredicts a branch, it throws away every
instruction fetched after it. Many of those instructions come after the point
where the two paths of the branch join again (the *reconvergence point*):
they are *control independent* (CI), and those whose operands do not depend
on the branch outcome (*control and data independent*, CIDI) computed exactly
the same result on the wrong path. Reusing such results usually needs
complex hardware to find the reconvergence point and to slot the correct-path
instructions in between the saved ones.

SYRANT avoids that. It makes the two paths of a branch consume **the same
number of ROB entries, physical registers and LSQ entries**, by inserting
unused entries, called *gaps*, on the path that needs fewer. After the
reconvergence point, an instruction then gets the same ROB entry, the same
destination register and the same LSQ entry whichever way the branch went.
When the correct path is fetched again after a misprediction, each
instruction lands on its own wrong-path copy. A simple comparison at rename
then tells whether the old result can be kept.

This repository holds synthesizable SystemVerilog for the SYRANT additions to
the rename stage of a superscalar core. It covers:

- the branch lists that measure the gaps;
- the gap table and its filters;
- in-order allocation with gaps;
- the rename rules that decide what to keep;
- the LSQ checks for loads and stores;
- the reuse of wrong-path branch outcomes as predictions.

The fetch unit, the main branch predictor, the scheduler, the execution units
and the caches are not part of it. Their decisions arrive on ports.

## How a gap is measured

Every branch in flight has an entry in the **Active Branch List** (ABL,
`abl_sbl`). The entry holds:

- the branch PC;
- its predicted direction;
- three counters of how many registers, ROB entries and LSQ entries had been
  allocated before it.

Allocation is strictly in order, so these counters are simply the
allocator's pointers.

When a branch turns out to be mispredicted, the ABL entries younger than it
(the wrong-path branches) are copied into the **Shadow Branch List** (SBL),
and the ABL is cut back to the branch. Each branch fetched afterwards on the
correct path is compared with the SBL. The first match is the first branch
after the reconvergence point. The difference between its counters on the
two paths is the resource difference between them:

    gap = (counters now - counters in the SBL copy)
          - gap inserted after the branch on the correct path
          + gap inserted after the branch on the wrong path
    stored oriented as   taken-path need - not-taken-path need

Because the counters include gaps that were themselves inserted after the
branch, the measurement takes them out. The three signed values go into the
**RANT table** (`rant_table`, 4K entries, indexed by the branch PC) together
with a **stability counter**:

- a new entry starts at 1;
- the counter goes up when the same gap is measured again;
- it is reset to 0 when the gap changes.

## When a gap is inserted

A gap is inserted right after a branch, at one of two moments:

- **On a correction.** When a mispredicted branch is resolved, if the RANT
  knows the branch and the corrected path is the less demanding one, the gap
  is inserted after it. The wrong-path copies of the CI instructions are then
  reached again.
- **At decode, before anything is known.** When a branch is fetched, a gap on
  the predicted path pays off only if the prediction later proves wrong. It
  costs entries otherwise.

`gap_filter` decides between these. The mode input `mode` selects the policy:

| mode             | on a correction | at decode                                         |
|------------------|-----------------|---------------------------------------------------|
| `FILT_NONE`      | no              | no                                                |
| `FILT_ON_CORR`   | yes             | no                                                |
| `FILT_STAB_CONF` | yes             | stable **and** (low confidence **or** small gap)  |
| `FILT_ALWAYS`    | yes             | yes                                               |

The terms in the `FILT_STAB_CONF` row are:

- *Stable*: the stability counter is at least 2.
- *Small*: the gap is strictly below 4 registers, 4 ROB entries and 2 LSQ
  entries.
- *Low confidence*: comes from the main predictor's confidence estimate
  (`in_low_conf`).

Every time a gap is inserted at decode, the branch's stability counter is
also decremented with probability 1/32. A 16-bit LFSR makes the draw: a
decrement happens when its five low bits are zero. Decode-time gaps that no
longer help therefore die out.

The resource allocator (`resource_allocator`) inserts a gap by advancing a
pointer:

- the ROB tail;
- the LSQ tail;
- the head of the circular free list of physical registers.

The skipped entries stay unused. On a rollback, all three pointers return to
the values recorded in the branch's ABL entry, so the refetched path is handed
the very same entries again. The ROB and LSQ gaps are freed when the branch
commits: the heads jump over them. The gap registers are read back from their
free-list slots and pushed at the free-list tail, one per cycle. The ring has
one slot per physical register, so those slots cannot have been overwritten
in the meantime. A gap that does not fit in the free space is dropped, and
the measurement then accounts for what was actually inserted.

## What is kept at rename: RS-tags

`ci_rename` is a map table in which each name carries a **rename-sequence
tag** (RS-tag). The current tag is incremented at every misprediction
recovery. Each ROB entry remembers:

- the PC;
- the renamed sources, physical register plus tag;
- the destination;
- the tag of the result;
- an executed bit.

A squashed entry stays in place as a *phantom*.

When an instruction is renamed into a phantom entry:

1. **Different PC, or a different destination register.** The instruction is
   not CI. It gets the new tag, its register becomes invalid and it is marked
   unexecuted.
2. **Same PC, and every renamed source including its tag equal to the stored
   ones.** This covers an instruction with no source. The instruction is
   CIDI: it keeps the old tag, the register's valid bit and the executed bit.
   The wrong-path result is reused.
3. **Otherwise.** The instruction is CI but data dependent (CIDD). It gets the
   new tag and must execute again.

The tag comparison makes reuse spread along a chain of instructions: a kept
result keeps its old tag, so its consumers see identical source names and
are kept as well. A write-back is accepted only if its tag equals the one now
in the ROB entry. A late result of a phantom that has since been renamed
again therefore cannot validate a register. The destination-register check
in rule 1 is this design's own addition. With symmetric allocation it always
holds; it protects the case where a gap could not be inserted.

## Loads and stores (`lsq_ci`)

A load may have taken its data from an older store still in the LSQ, so each
load records the LSQ index of the store that forwarded to it. A kept load
(rule 2, and `mem_ok` from the LSQ) also requires the following:

- the LSQ entry holds the same PC and the same kind (load or store);
- if it was fed by a store, that store is valid on the correct path. It is
  valid if it is not a phantom, or if it was renamed again and kept with its
  data.

When a store executes, it checks the younger loads that have data and the
same address but did not take their data from it. The first such load is
invalidated, in the LSQ and in the ROB (`ev_viol`, `ev_viol_rob`), and must
execute again. This check covers preserved wrong-path loads too. Only that
load is invalidated; re-issuing its dependants is left to the scheduler.

## Wrong-path branch outcomes as predictions (`sbl_chooser`)

A branch that was computed on the wrong path has its real direction in the
SBL. After a reconvergence, the correct-path branches are matched against the
next SBL entries in order. If the matching entry was computed, its direction
is offered as a prediction. A single global 4-bit counter decides whether
this prediction overrides the main predictor:

- the SBL prediction is used while the counter's top bit is set;
- when only one of the two predictions proves right, the counter moves
  towards it.

The counter resets to 8.

## The top: `syrant_top`

`syrant_top` wires the blocks together around one rename slot. It takes one
instruction per cycle in program order.

| ports   | meaning |
|---------|---------|
| `in_*`  | instruction at rename: PC, branch flag, main prediction and confidence, sources, destination, load/store. Accepted when `in_ready`. |
| `out_*` | what it got: ROB entry, LSQ entry, physical register, ABL slot, the direction fetch must follow (`out_dir`, which may come from the SBL), CI/keep decision and RS-tag |
| `br_*`  | a branch resolves: ABL slot, outcome, mispredicted. A misprediction rolls back the ABL, allocator, map table and LSQ in the same clock edge and may insert a gap; nothing is renamed in that cycle. |
| `wb_*`  | a result is written back: ROB entry and RS-tag; `wb_accepted` says whether it counts |
| `mx_*`  | a load or store executes: LSQ entry, address, forwarding store |
| `com_*` | retire the ROB head when `com_ready` (it has executed) |
| `ev_*`  | one-cycle event flags: reconvergence (with the branch PC and the measured gaps), decode gap, correction gap, dropped gap, SBL prediction used, stability decrement, violation, recycling |
| `mode`  | gap filter policy |
| `ready` | low during the start-up fill of the free list (NPHYS-NARCH cycles) |

Default sizes (parameters of `syrant_top`, defined in `syrant_pkg`):

| parameter | value | |
|---|---|---|
| `NROB`  | 1024 | ROB entries |
| `NLSQ`  | 512  | LSQ entries |
| `NPHYS` | 2048 | physical registers (one unified file) |
| `NARCH` | 64   | architectural registers (32 integer + 32 floating point) |
| `NABL`  | 256  | ABL and SBL entries |
| `NRANT` | 4096 | RANT entries |
| `PC_W`  | 64   | PC width |

The RS-tag is 8 bits wide and the stability counter 3 bits. The size
thresholds are `gap_filter` parameters.

## Where this departs from the original proposal

- **Width.** The proposal evaluates an 8-wide machine (fetch up to two basic
  blocks per cycle, rename and commit 8 per cycle). This RTL renames and
  commits one instruction per cycle. The structures and rules are the same;
  the allocation logic would need an 8-way prefix version.
- **Not included.** The main predictor (TAGE) and its confidence estimator,
  the store-sets dependence predictor, the scheduler with its lower priority
  for phantom instructions, the execution units and the caches.
  Selective invalidation of a violating load's whole dependence chain through
  RS-tags is not built either.
- **This design's own choices**, where the proposal gives no detail:
  - the RANT is direct-mapped with a full-PC tag;
  - new RANT entries start with stability 1, saturating at 7;
  - the LFSR for the 1/32 draw;
  - the update rule and reset value of the SBL chooser;
  - one map checkpoint per ABL slot for recovery;
  - a gap that does not fit is dropped;
  - one gap register recycled per cycle;
  - only the first violating load is reported per store;
  - exact word address comparison;
  - the start-up fill of the free list.
- **Register file.** The evaluated configuration is described both as 2048
  physical integer and floating-point registers and as 1024 integer plus
  1024 floating-point registers. This RTL uses one unified free list of 2048.

## Files

| file | contents |
|---|---|
| `rtl/syrant_pkg.sv` | sizes, filter mode enum |
| `rtl/abl_sbl.sv` | ABL, SBL, reconvergence detection, gap measurement, SBL directions |
| `rtl/rant_table.sv` | gap table with stability counters and random decrement |
| `rtl/gap_filter.sv` | gap insertion policy (combinational) |
| `rtl/sbl_chooser.sv` | global SBL-versus-main-predictor counter |
| `rtl/resource_allocator.sv` | ROB, LSQ and free-list pointers with gaps, rollback, recycling |
| `rtl/ci_rename.sv` | map table with RS-tags, keep/invalidate rules, write-back filter |
| `rtl/lsq_ci.sv` | LSQ validity, forwarding index, store-address check |
| `rtl/syrant_top.sv` | everything wired together |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_syrant_top.sv` | end-to-end test at a reduced size (16-entry ROB, 8-entry LSQ, 96 registers) |
| `tb/tb_syrant_top_full.sv` | the same test with every parameter at its default |
| `tb/tb_syrant_top_body.svh` | stimulus and checks shared by the two top-level tests |

## Testing

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. Each
also has a watchdog that fails the run if it hangs.

- `tb_abl_sbl` replays a seven-branch example with known counter values. It
  then runs random pushes, mispredictions and commits against a queue model.
- `tb_rant_table`, `tb_gap_filter` and `tb_sbl_chooser` compare against
  reference models on random stimulus. The RANT model uses the same LFSR.
- `tb_resource_allocator` plays the renamer. It checks that no busy register
  is handed out and that a rollback hands out the same registers again.
- `tb_ci_rename` replays a small rename example and checks which instructions
  keep their result. It also checks stale write-backs and the keep rule for
  instructions with no source.
- `tb_lsq_ci` covers forwarding validity, the PC match and the store-address
  check.

The top-level tests act as the rest of the processor. They run a loop with a
reconvergent if-then-else whose two paths need (4 registers, 5 instructions,
1 LSQ entry) and (2, 2, 0). The branch is mispredicted about half the time
and resolves 20 cycles late. They check:

- commit order;
- write-back acceptance;
- that every kept register result equals what the correct path computes;
- that every measured gap is (-2, -3, -1).

They require every mechanism to have happened at least once: reconvergence,
both kinds of gap, recycling, SBL prediction, keep and re-execute, stale
write-back rejection, violation and forwarding. The run goes through the
modes `FILT_STAB_CONF`, `FILT_ON_CORR` and `FILT_NONE`.
The reduced-size test also requires an allocation stall and a stability
decrement.

With Verilator 5, for example:

    verilator --binary --timing -Irtl -Itb rtl/syrant_pkg.sv rtl/abl_sbl.sv \
      rtl/rant_table.sv rtl/gap_filter.sv rtl/sbl_chooser.sv \
      rtl/resource_allocator.sv rtl/ci_rename.sv rtl/lsq_ci.sv \
      rtl/syrant_top.sv tb/tb_syrant_top.sv --top-module tb_syrant_top
    ./obj_dir/Vtb_syrant_top

A block testbench needs only the package and its block, for example
`verilator --binary --timing -Irtl rtl/syrant_pkg.sv rtl/gap_filter.sv
tb/tb_gap_filter.sv --top-module tb_gap_filter`.
