# Precise runahead execution — rename-stage RTL

An out-of-order core that misses in the last-level cache eventually fills its
reorder buffer (ROB) with work that waits on the missing load, and then sits
idle for the rest of the memory latency. Runahead execution uses that idle time
to execute future code speculatively, only so that the loads it meets
reach memory early and act as accurate prefetches.

Classic runahead pays heavily for this. It throws away the whole instruction window to
enter runahead mode, then flushes the pipeline and fetches everything again
when the missing load returns. *Precise runahead execution* (PRE) avoids
both costs:

* **Nothing is flushed.** The ROB keeps its contents through the whole
  interval. Only the register allocation table (RAT) is checkpointed. Runahead
  micro-ops run on the physical registers and issue slots that happen to be
  free, and they never enter the ROB or commit. When the load returns, the RAT
  is restored and commit restarts at once with that load.
* **Only address-generating code runs.** A small fully associative table of
  PCs, the *stalling slice table* (SST), learns which instructions compute
  the addresses of loads that stall the ROB. In runahead mode only micro-ops
  that hit in the SST are executed. The others are skipped.
* **Decoded work is kept.** The micro-op queue between decode and rename is
  enlarged into an *extended micro-op queue* (EMQ). Everything decoded during
  runahead mode stays in it, so after the exit those micro-ops are dispatched
  from the queue without being fetched or decoded again.

This repository holds synthesizable SystemVerilog for the structures that
PRE adds to or changes in a core: the SST, the EMQ, the extended RAT, the
register free lists, the *precise register deallocation queue* (PRDQ), the
logic that learns slices, and the mode controller. All of them are wired
together in `pre_core`. The fetch unit, decoder, ROB, issue queues, register
file, execution units and caches belong to the surrounding core. They are
not here: `pre_core` exposes ports where they connect, and the end-to-end
testbench stands in for them with a behavioural model.

## One runahead interval

1. **Entry.** `runahead_ctrl` watches the ROB head. A *full-window stall* is:
   the ROB cannot take another dispatch group (`rob_full`), and its oldest
   micro-op is a load that missed in the LLC and has not returned. In that
   cycle `ra_enter` pulses. The RAT and both free lists save a checkpoint,
   the stalling load's PC is written into the SST, and renaming pauses for
   that one cycle. From the next cycle `ra_mode` is high and `commit_en` is
   low.
2. **Running ahead.** Rename now reads the EMQ through a separate runahead
   pointer. In each group of up to 4 micro-ops, those in a slice are renamed,
   given a PRDQ entry and a runahead id, and dispatched with
   `disp_uop.runahead = 1`. The back end executes them and reports each
   one's id on `exec_valid/exec_ra_id` when it finishes. Micro-ops outside
   the slices are stepped over and left in the EMQ. Decode keeps filling
   the EMQ. When the EMQ is full, decode stalls until the interval ends.
3. **Exit.** When the stalling load returns (`rob_head_done`), `ra_exit`
   pulses. The RAT and the free lists are restored from their checkpoints,
   the PRDQ is emptied, and the back end drops any runahead micro-ops still in
   flight. From the next cycle the core is in normal mode: commit starts with
   the stalling load, and rename resumes at the EMQ head, which has not
   moved since the entry.

There is no predictor that skips short intervals. Because nothing is flushed,
an interval costs only the two cycles in which renaming pauses. Even a stall
of a few cycles is worth entering.

## Learning stalling slices

Each RAT entry holds the physical register and also the PC of the
instruction that last wrote that architectural register (`prod_pc`).
Slices are learned backwards, one step per loop iteration:

* The stalling load's PC is inserted when it stalls the ROB.
* The next time that PC is decoded, it hits in the SST. When it is renamed,
  the RAT gives the PCs of the producers of its source registers, and
  `slice_tracker` writes them into the SST.
* In later iterations those producers hit in turn and add their own
  producers, and so on. The whole address chain of the load ends up in the
  table.

This happens in normal mode and in runahead mode alike. The SST holds every
slice it has learned, so several independent load chains are pre-executed
in the same interval. Rename can offer 8 producer PCs per cycle, but the
SST has 2 write ports. The stalling-load PC always gets a port. The producer
PCs share the rest, starting from a rotating position, and any left over
are dropped (`n_slice_dropped` counts them). Dropping only delays learning,
because the next iteration offers the same PCs again.

The SST is looked up twice, on its 8 read ports. Four ports check each
decoded micro-op, and the hit bit is stored with it in the EMQ. The other
four check each micro-op again as rename reads it from the EMQ. Without the
second lookup, micro-ops queued before the stalling load's PC entered the
table would all be skipped in the first interval.

## Freeing registers while nothing commits

This is the subtle part. An ordinary core frees a physical register when the
next writer of the same architectural register commits. Runahead micro-ops
never commit, so without another mechanism each one would hold a register
until the interval ended, and runahead mode would run out of registers
after a few dozen micro-ops.

The PRDQ solves this. Every runahead micro-op that is renamed gets an
entry, in program order, holding:

* its runahead id;
* the register its destination mapping replaced;
* an *executed* bit.

The executed bit is set when the back end reports that id, possibly out of
order. Entries leave the head in order, up to 4 per cycle, and only once
their bit is set. Each entry's register then goes back to the free list. In-order release is
what makes this safe. By the time an entry leaves, every older runahead
micro-op has executed. Those are the only micro-ops that could have read
the replaced register, because younger ones read the new mapping.

Two details keep the state of the preserved ROB intact:

* **Only runahead-made mappings are freed.** Each RAT entry also records
  whether its current mapping was created in runahead mode (`old_is_ra`).
  Suppose the first runahead writer of `r1` replaces the mapping that normal
  mode made before the entry. That physical register still belongs to the
  ROB's instructions and to the state restored at the exit, so this PRDQ
  entry carries no register (`has_reg = 0`). If it were freed, a later
  allocation could overwrite a value the ROB still needs, and committed
  values would be wrong.
* **Free lists are checkpointed with the RAT.** Nothing commits in runahead
  mode, so the only changes to a free list during an interval are runahead
  allocations and PRDQ releases. Restoring the bitmap saved at the entry
  therefore returns every register that runahead mode still holds, including
  those of PRDQ entries discarded at the exit. The end-to-end test checks
  that the free counts after each exit equal those at the entry.

Registers come in two classes, integer and floating point, each with 168
physical registers. Architectural registers 0–31 are integer and 32–63 are
floating point. A physical tag is `{class, index}`, 9 bits wide. The PRDQ
and the commit port route each released tag to the free list of its class.

## The extended micro-op queue

`emq` is one circular buffer of 768 entries with two read pointers:

* the **head**, used by normal-mode rename; entries behind it are free;
* the **runahead pointer**, which follows the head in normal mode and runs
  ahead of it in runahead mode without freeing anything.

In normal mode the queue admits only `NORMAL_CAP` (64) micro-ops, the size of
an ordinary micro-op queue, so decode does not race far ahead of rename. In
runahead mode it may fill up to all 768 entries. At the exit the
head is still at the oldest micro-op not yet dispatched, so normal mode
simply continues from there. Each entry holds the micro-op (`uop_t`) and its
decode-time SST hit bit.

## Modules

| file | role |
|---|---|
| `rtl/pre_pkg.sv` | sizes, `uop_t`, `emq_entry_t`, `ren_uop_t` |
| `rtl/pre_core.sv` | top: wires everything, holds the rename-group logic |
| `rtl/runahead_ctrl.sv` | normal/runahead mode, entry and exit pulses, commit enable |
| `rtl/sst.sv` | fully associative PC table, true LRU (rank per entry), N_RD lookups, N_WR inserts |
| `rtl/emq.sv` | micro-op queue with head and runahead pointer |
| `rtl/rat.sv` | mapping + producer PC + runahead bit per register, same-group forwarding, checkpoint |
| `rtl/free_list.sv` | free bitmap of one register class, lowest-first allocation, checkpoint |
| `rtl/prdq.sv` | in-order register deallocation queue |
| `rtl/slice_tracker.sv` | chooses the PCs written into the SST |

### `pre_core` ports

* Decode side: `dec_valid[4]`, `dec_uop[4]` (`uop_t`: PC, opaque 8-bit op,
  load flag, two sources, one destination), `dec_ready`. A group is taken
  whole when `dec_ready` is high.
* Dispatch side: `disp_valid[4]` and `disp_uop[4]` (`ren_uop_t`: the micro-op,
  its physical sources, destination and replaced destination, the slice bit,
  the runahead flag and id), plus `disp_ready` from the back end. In normal
  mode the back end lowers `disp_ready` when the ROB is full. In runahead
  mode dispatch bypasses the ROB.
  Runahead micro-ops must not change architectural or memory state. The
  back end must keep runahead stores out of the data cache. It also
  discards every runahead micro-op when `ra_exit` pulses.
* Back end to PRE: `exec_valid/exec_ra_id` (runahead completions, up to 4 per
  cycle), the ROB head (`rob_full`, `rob_head_valid`, `rob_head_is_load`,
  `rob_head_llc_miss`, `rob_head_done`, `rob_head_pc`), and normal commit
  releases (`commit_valid`, `commit_old_ptag`, accepted while `commit_en`).
* Status: `ra_mode`, `ra_enter`, `ra_exit`, `n_ra_intervals`,
  `n_slice_dropped`, `sst_occupancy`, `prdq_count`, `emq_count`, `emq_full`,
  `int_free`, `fp_free`.

### Timing

Everything between the EMQ read and dispatch is combinational, in one cycle:

1. SST re-lookup;
2. group formation;
3. register offers from the free lists;
4. RAT lookup with forwarding;
5. PRDQ id assignment.

All state updates at the rising edge. Reset is asynchronous and active low.

* **SST.** A lookup sees the table as it stood at the start of the cycle.
  An insert becomes visible one cycle later.
* **PRDQ.** An entry can leave the cycle after its executed bit is set.
* **Modes.** `ra_enter` and `ra_exit` are combinational pulses, and
  `ra_mode` follows at the next edge.
* **Commit after exit.** The stalling load can commit in the cycle after
  `ra_exit`. The end-to-end test checks this: the first commit comes no more
  than 2 cycles after the exit.

## Sizes

| parameter | default | origin |
|---|---|---|
| width `W` | 4 | evaluated core (4-wide) |
| SST entries / read / write ports | 256 / 8 / 2 | evaluated configuration |
| SST tag | 32-bit PC | 4-byte tags |
| PRDQ entries / ports | 192 / 4+4 | evaluated configuration |
| EMQ entries / ports | 768 / 4+4 | evaluated configuration (4 × ROB) |
| EMQ normal-mode capacity | 64 | this design |
| RAT entries | 64, +32-bit producer PC | evaluated configuration |
| physical registers | 168 int + 168 fp | evaluated core |
| runahead id | 8 bits | this design (exceeds the 192 PRDQ entries) |

All of these are the defaults the RTL is built and simulated with. Nothing
is scaled down.

## Where this RTL goes beyond or departs from the PRE proposal

The proposal describes each structure's role, its size and its ports. It
does not give their circuits. Everything below is this design's choice.

* **Organisation.** The two-pointer EMQ, the rank-based true LRU of the SST,
  the PRDQ's id match for the executed bit, and the checkpointed free-list
  bitmaps.
* **Only runahead-made mappings are freed.** A PRDQ entry never frees a
  mapping made before the entry, and the RAT tracks which mappings are which.
* **Second SST lookup.** Micro-ops are looked up again at the EMQ output.
* **Widths.** The front end is 4 wide, not the 8 micro-ops per cycle used in
  the evaluation, because every decoded micro-op must pass through the
  EMQ's 4 write ports.
* **EMQ always present.** The EMQ is built in, although the proposal also
  evaluates PRE without it. That variant refetches runahead micro-ops after
  the exit and is not provided.
* **Whole groups.** Rename takes a group all at once or not at all, and
  pauses in the entry and exit cycles.
* **SST write ports.** Producer PCs beyond the 2 write ports are dropped,
  with rotating priority.
* **Issue queue.** The proposal marks the issue stage as modified but does
  not say how. The issue queue is outside this RTL. The back end is assumed
  to have room for runahead micro-ops (`disp_ready`).
* **Invalid results.** The proposal says nothing about runahead micro-ops
  whose sources never become ready, for example because they depend on the
  stalling load. Their PRDQ entries then stay at the head until the exit.
  Invalid-result propagation, as in classic runahead, is not part of this
  RTL.
* **Entry-format width.** The proposal's storage figures (4 bytes per EMQ
  entry) suggest a more compact entry than this design's, which carries the
  full PC and register fields.

## Verification

Each block has a self-checking testbench in `tb/` with an independent
reference model. Each one ends with `TB_RESULT checks=N failures=M` and has a
cycle watchdog.

| testbench | what is compared |
|---|---|
| `tb_sst` | hit vector and occupancy against a queue ordered by recency; insert visible one cycle later |
| `tb_prdq` | released registers against a reference queue: in order, executed prefix only, flush |
| `tb_emq` | read window, `in_ready`, `full`; entries consumed in runahead mode are read again after it |
| `tb_free_list` | lowest-first offers, free count, checkpoint/restore |
| `tb_rat` | all lookups against a micro-op-by-micro-op reference (forwarding), checkpoint |
| `tb_slice_tracker` | port use, candidate validity, drop count, fairness within 4 cycles |
| `tb_runahead_ctrl` | entry conditions, single pulses, commit blocking, random stream |
| `tb_pre_core` | end to end, all defaults (see below) |
| `tb_pre_core_chase` | end to end on a pointer-chasing loop: runahead copies of the chase load wait on the stalling load and block PRDQ releases until the exit; results stay correct and the loop completes |

### `tb_pre_core`

`tb_pre_core` runs `pre_core` at its default sizes. It models the rest of
the core:

* a 192-entry ROB;
* a physical register file holding real values;
* single-cycle ALU operations;
* loads that take 400 cycles unless a runahead load has already prefetched
  their address.

The program is a loop of 10 micro-ops with two independent address streams,
so there are two slices, run for 15,000 micro-ops. Every committed value is
compared with a sequential execution of the program. The test also checks
each of these:

* only slice micro-ops run ahead;
* both slices are learned and non-slice micro-ops are never executed in
  runahead mode;
* nothing commits in runahead mode;
* the free lists are restored at each exit;
* commit resumes within 2 cycles of the exit.

Each mechanism must occur at least once, or the test counts a failure:

* entry and exit;
* runahead dispatch;
* PRDQ releases;
* a full EMQ and the decode stall it causes;
* prefetches used by later loads.

A typical run takes about 11,300 cycles and 166 runahead intervals, most of
them under 20 cycles.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pre_pkg.sv tb/tb_pre_core.sv \
          --top-module tb_pre_core -Mdir obj_pre && obj_pre/Vtb_pre_core
```

Substitute any other testbench name. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/pre_pkg.sv rtl/<module>.sv`.

### What is not covered

* Nothing here has been compared against a cycle-level core model, so
  performance numbers for real programs cannot be measured with this RTL
  alone.
* The back-end model in `tb_pre_core` is idealised:
  * unlimited issue bandwidth;
  * an issue queue that never fills;
  * runahead loads that complete in 2 cycles while their prefetch proceeds.
