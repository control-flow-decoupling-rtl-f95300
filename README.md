# Control-flow decoupling: branch, value and trip-count queues for an out-of-order front end

Some branches cannot be predicted well because their outcome depends on data, but their
condition can be computed well before the branch is needed. Control-flow decoupling (CFD)
exploits that in software and hardware together. A loop containing such a branch is split in
two. The first loop computes the conditions and pushes them onto an architectural **branch queue
(BQ)**. The second loop holds the branch's control-dependent work and pops each condition with a
`Branch_on_BQ` instruction. Because the pushes run a whole loop ahead of the pops, the predicate
is normally already in the queue when the fetch unit meets the pop. The branch is then steered by
the real outcome, in the fetch stage, with no prediction and no misprediction.

Two extensions use the same idea:

* a **value queue (VQ)** carries values computed in the first loop to the second loop, so the
  second loop does not recompute them. It is implemented only as a renaming structure: values
  live in the ordinary physical register file.
* a **trip-count queue (TQ)** with a **trip-count register (TCR)** handles inner loops whose trip
  count is data-dependent but computable early. The fetch unit then runs each inner loop exactly
  the right number of times.

This repository holds synthesizable SystemVerilog for the three hardware structures CFD adds to
a superscalar out-of-order core, the decode sequencer for saving and restoring the VQ, and a top
level that ties them together:

| structure | where | default size | entry |
|---|---|---|---|
| `branch_queue` | fetch | 128 entries | predicate, pushed, popped, 3-bit checkpoint id (6 bits) |
| `vq_renamer` | rename | 128 entries | 8-bit physical register number |
| `trip_count_queue` | fetch | 256 entries + 4-bit TCR | 4-bit trip count, pushed bit (5 bits) |
| `vq_ctx_cracker` | decode | — | cracks Save_VQ / Restore_VQ into VQ micro-operations |
| `cfd_frontend` | — | all of the above, 4-wide, 8 checkpoints | — |

The core itself is not included:

* branch predictor and BTB;
* freelist and rename map table;
* reorder buffer and checkpoint manager;
* execution units.

`cfd_frontend` exposes the signals these parts exchange with the queues.

## Instructions served

| instruction | effect | structure |
|---|---|---|
| `Push_BQ rs` | append predicate `rs != 0` | BQ |
| `Branch_on_BQ target` | pop a predicate and branch on it | BQ |
| `Mark` | remember the current BQ tail | BQ |
| `Forward` | pop everything up to the remembered tail | BQ |
| `Push_VQ rs` | append a value | VQ renamer |
| `Pop_VQ rd` | pop a value into `rd` | VQ renamer |
| `Push_TQ rs` | append a trip count | TQ |
| `Pop_TQ` | pop a trip count into the TCR | TQ |
| `Branch_on_TCR target` | if TCR ≠ 0: decrement it and continue; otherwise exit | TCR |

Software guarantees that a pop never runs ahead of its push, and that the number of outstanding
entries never exceeds the queue size. Long loops are strip-mined into chunks of at most 128
(BQ/VQ) or 256 (TQ) iterations.

## The branch queue: pushes and pops at different pipeline stages

This is the subtle part of the design. Pushes and pops meet at different pipeline stages:

* A `Push_BQ` **allocates** its entry when it is *fetched* (the tail advances in fetch, in program
  order). It only **produces** its predicate when it *executes*, many cycles later.
* A `Branch_on_BQ` **consumes** its entry when it is *fetched* (the head advances in fetch).

A pop can therefore reach fetch before or after its push has executed. Each entry carries two
bits that record which happened first.

**Early push (the normal case).**
1. At fetch, the push clears the *pushed* and *popped* bits of its tail entry.
2. At execute, the push sees *popped* = 0. It writes the predicate and sets *pushed*.
3. Later the pop reads its head entry and sees *pushed* = 1: a **BQ hit**. The pop uses the
   predicate directly. It never goes to the predictor and can never mispredict.

**Late push (rare).**
1. The pop arrives while *pushed* = 0: a **BQ miss**. The pop does not stall. It takes the branch
   predictor's direction, writes that direction into the entry's predicate bit and sets *popped*.
2. Later, when its checkpoint is assigned, it records the **checkpoint id** in the entry through
   the `r_ckpt_*` port.
3. When the push finally executes it sees *popped* = 1 and compares its true predicate with the
   stored prediction:
   * `x_late` is raised in any case;
   * on a mismatch `x_misp` is raised, and `x_misp_ckpt` names the checkpoint the core must roll
     back to.
4. Either way the push writes its predicate and sets *pushed*.

On a hit, all pops of one fetch bundle are served in parallel from consecutive entries starting
at the head. The hit/miss decision is made per slot (`f_pop_hit`). A push that executes in the
same cycle as its pop is fetched is forwarded to the pop, so that pop is a hit.

### Length and the push stall

The fetch unit must not allocate an entry whose previous occupant has not retired. The length is
the sum of two counters:

* `net_push_ctr` — retired pushes minus retired pops. This is the part that is certainly in the
  queue.
* `pending_push_ctr` — pushes fetched but not yet retired.

A fetch bundle stalls (`f_stall`) when its pushes would take the length past the size.

Pops are *not* subtracted at fetch. A popped entry stays allocated until the pop retires, because
a misprediction can bring the pop back. Software guarantees that, at such a stall, 128 older pops
are in flight, and the first one to retire releases the stall.

### Mark and Forward (bulk pop)

When the original loop has an early exit that can only be evaluated in the second loop, the
first loop has pushed more predicates than the second loop pops. `Mark` (before the second loop)
copies the tail into a *mark* pointer. `Forward` (after it) moves the head to the mark, discarding
the unused predicates. When `Forward` retires, `net_push_ctr` drops by the number of entries it
skipped.

### Recovery

The head, tail and mark pointers have two kinds of saved copies:

* a snapshot held per branch checkpoint (written through `ck_*`);
* a committed copy that follows retirement.

On a misprediction (`rc_kind = RC_CHECKPOINT`) the core names a checkpoint. On an exception
(`RC_COMMITTED`) the committed copy is used. Recovery then:
1. restores the pointers;
2. clears every *popped* bit between the restored head and tail, because the pops that set them
   were squashed;
3. reduces `pending_push_ctr` by the number of squashed pushes, which is the distance the tail
   moved back.

Predicates already written by surviving pushes are kept. A refetched pop therefore usually hits.

### Context switch: Save_BQ and Restore_BQ

Architecturally, the BQ state is only its length and the predicates between head and tail. The
physical head and tail positions are not part of it. An operating system saves this state as an
image of `1 + SIZE/8` bytes (17 bytes at 128 entries):

* byte 0 holds the length;
* the following bytes hold the predicates from head to tail, eight per byte, with the first
  predicate in bit 0.

The BQ provides a combinational read port over the image (`cx_rd_idx` → `cx_rd_byte`) and a write
port (`cx_wr_*`). The core's load/store path moves the bytes to and from memory. Restoring works
as follows:
1. Writing byte 0 places the head at entry 0 and the tail at entry `length`. It marks the whole
   length as retired (`net_push_ctr = length`, `pending_push_ctr = 0`) and clears the popped bits.
2. The predicate bytes fill entries 0 … length−1 and set their pushed bits.

Both directions must run with no BQ instruction in flight, which an assertion checks. The mark
pointer is not architectural; a restore leaves it equal to the tail.

## The value-queue renamer

The renamer is a circular buffer of physical register numbers. It does not move values; it only
links each `Pop_VQ` to its `Push_VQ` through a physical register:

* **`Push_VQ`** gets a destination register from the core's freelist, as any register-writing
  instruction would. That mapping is written at the renamer tail, not into the rename map table.
* **`Pop_VQ`** takes the mapping at the renamer head as its source operand. The unchanged issue
  queue and register file then deliver the value.
* A pop in the same rename bundle as its push receives that push's register directly.
* The register of a push is freed when the **pop that read it retires**. The renamer hands the
  committed-head mappings of the retiring pops back to the freelist (`rt_free_*`).

Recovery restores only head and tail. The registers of squashed pushes are reclaimed by the
core's ordinary freelist recovery.

Example: the map table holds r5 → p67, and the freelist supplies p99, p2, p35, p7, p51, p22.
1. The first loop renames `add r5,r5,1; Push_VQ r5` twice, writing p2 and p7 into the renamer.
2. The second loop's two `Pop_VQ r5` read p2 and p7 and are given p51 and p22.
3. When the pops retire, p2 and p7 return to the freelist.

`tb_vq_renamer` replays this example.

A push stalls the rename bundle (`r_stall`) when it would overwrite a mapping whose pop has not
retired yet: `tail − committed head > 128`. The core must then hold fetch as well, which it does
through `f_hold` on `cfd_frontend`.

### Context switch: Save_VQ and Restore_VQ

The VQ's values live in physical registers, so the VQ has no image port. Instead,
`vq_ctx_cracker` sits in decode and expands each macro-instruction into ordinary VQ operations:

* `Save_VQ base` becomes a store of the VQ length at `base`, then `length` pairs of
  (`Pop_VQ`, store). Value *i*, counted from the head, goes to `base + 4(i+1)`.
* `Restore_VQ base` becomes a load of the length from `base`. Once that load returns, it issues
  `length` pairs of (load, `Push_VQ`) from the same slots, so the values re-enter in their
  original order.

Each pair is one micro-operation (`u_kind`, `u_addr`). The core expands it and renames the
`Pop_VQ`/`Push_VQ` half through the renamer's usual rename ports, with the usual freelist
allocation and freeing at retirement. The cracker issues one micro-operation per cycle under a
valid/ready handshake. Decode stalls while `busy` is high. Because the length is sampled when
`Save_VQ` starts, no older VQ operation may still be in flight.

## The trip-count queue and TCR

The TQ works like the BQ, with 4-bit trip counts instead of predicates. The TCR sits next to it
in fetch:

* `Pop_TQ` loads the head entry's trip count into the TCR.
* `Branch_on_TCR` reads the TCR:
  * non-zero: the branch continues and the TCR is decremented;
  * zero: the branch exits.
  A trip count *t* therefore produces *t* continues and one exit.
* A `Pop_TQ` and a `Branch_on_TCR` in the same bundle act in that order.

One entry stands for up to 16 branch outcomes, so speculating on a missing trip count is not
worthwhile. A `Pop_TQ` whose entry has not yet been pushed (**TQ miss**) stalls fetch until the
push executes. There is consequently no popped bit and no checkpoint id in a TQ entry.

Length counting, the full stall and pointer recovery are the same as in the BQ. In addition:
* each checkpoint snapshot includes the TCR;
* a committed TCR follows the retired `Pop_TQ` and `Branch_on_TCR` instructions.

With `OVERFLOW = 1` each entry gets a software-visible overflow bit. A pushed value of 16 or more
is not stored; the overflow bit is set instead. The pop reports the bit (`f_pop_ovf`) so that a
`Pop_TQ_and_Branch_on_Overflow` can leave for a conventional loop. The default is off, matching
5-bit entries.

## Integrating `cfd_frontend` into a core

All state changes on the rising edge of `clk`, with an asynchronous active-low `rst_n`. Every
output is combinational from state and the current cycle's inputs. The ports are grouped by
pipeline stage.

**Fetch (one bundle per cycle, up to 4 instructions).** The core presents the bundle:
* the number of `Push_BQ` and `Branch_on_BQ` instructions;
* the predictor direction for each pop slot;
* `Mark`/`Forward`;
* at most one each of `Push_TQ`, `Pop_TQ`, `Branch_on_TCR`.

It gets back:
* BQ entry numbers for the pushes (carried to execute);
* per-slot pop directions and hit flags;
* the TQ entry of a push and the `Branch_on_TCR` outcome;
* `f_stall`.

A stalled bundle changes nothing and must be presented again. `f_hold` holds a bundle for a
reason outside the queues; the core must drive it while `r_vq_stall` is high.

**Rename.** Per slot, the core presents a VQ operation and, for a push, the register the freelist
allocated. It gets back the pops' source registers and `r_vq_stall`. A stalled rename bundle must
not be presented to the fetch queues either.

**Checkpoints.** A checkpoint taken after a bundle stores `f_bq_next`, `f_tq_next` and
`r_vq_next`, which are the queue states after that bundle. They are written with `ck_we`/`ck_id`.
For a BQ miss, the pop's checkpoint id goes in through `r_bq_ckpt_*`. It must be written **no
later than the cycle in which the matching push executes**. A write in that cycle is forwarded;
a later one leaves the push comparing against an old id. A core whose rename stage can lag behind
the push's execution should write the id from fetch, as the end-to-end testbench does.

**Execute.** An executing `Push_BQ` or `Push_TQ` presents its entry and value.
`bq_late`/`bq_misp`/`bq_misp_ckpt` are valid in the same cycle.

**Retire.** The core gives per-cycle counts of the retired pushes and pops of each queue, plus
`Mark`/`Forward`. It receives the registers to free and the committed TCR.

**Recovery.** `rc_valid` with `rc_kind` and `rc_ckpt_id` rolls back all three queues at once.
Retirement of older instructions in the same cycle is honoured. All other inputs of that cycle
are ignored.

**Context switch.** With the pipeline drained, `Save_BQ` reads the image through
`bq_cx_rd_idx`/`bq_cx_rd_byte`. `Restore_BQ` writes it through `bq_cx_wr_*`, byte 0 first.
`cx_vq_save`/`cx_vq_restore` start the VQ cracker. Its micro-operations come out on `cx_vq_u_*`,
and the restored length goes back in on `cx_vq_ld_len*`.

Bundle rules the core must respect (the first three are design choices):
* `Mark` and `Forward` are the last BQ operation of their bundle.
* A bundle holds at most one of each TQ instruction.
* A `Push_TQ` and a `Pop_TQ` never share a bundle. This is checked by an assertion.
* `cfd_frontend` asserts that each fetch queue's length equals `net_push_ctr + pending_push_ctr`
  and never exceeds its size.

## Where this design departs from, or adds to, the published scheme

* **Pointer width.** Every head, tail and mark pointer, and every copy of one, carries one wrap
  bit beyond log2(size), so a full queue and an empty queue differ. The published storage
  budget uses 7-bit BQ/VQ and 8-bit TQ pointers. Here they are 8 and 9 bits, about 8 bytes more
  than the published 450 bytes in total.
* **Added in this design:**
  * the forwarding of an executing push to a same-cycle pop;
  * the in-bundle push-to-pop forwarding in the VQ renamer;
  * applying the `Forward` length decrement when the `Forward` retires;
  * the VQ renamer stall rule;
  * the save-area layout for the VQ: the length in a 4-byte slot ahead of the values.
* **Not included:**
  * the memory side of `Save_BQ`/`Restore_BQ` and of the VQ cracker's loads and stores
    (address translation, page faults), which belongs to the load/store path;
  * the predictor, BTB, freelist, map table, ROB, checkpoint manager and caches, which are
    ordinary core parts.
* **Checkpoint-id timing** is a constraint on the core, described above. The scheme itself only
  says that the speculative pop places the id in the entry.

## Verification

Each structure has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_branch_queue` covers:
  * early push;
  * late push with a right and a wrong prediction;
  * same-cycle forwarding;
  * the full stall and its release by a retiring pop;
  * a 128-entry FIFO drain;
  * Mark/Forward;
  * checkpoint and exception recovery;
  * a context switch: the saved image is checked byte by byte, an empty image is restored over
    it, then the saved one is restored and popped.
* `tb_vq_renamer` covers:
  * the worked rename example above;
  * in-bundle forwarding;
  * 3000 random cycles against a FIFO model, including the freed registers;
  * the stall at 128 live mappings;
  * both recoveries.
* `tb_trip_count_queue` covers:
  * trip counts 3, 0 and 9 (continue/exit counts and the TCR);
  * the TQ-miss stall;
  * `Pop_TQ` + `Branch_on_TCR` in one bundle;
  * the committed TCR;
  * the full stall;
  * both recoveries;
  * a second instance with the overflow bit.
* `tb_vq_ctx_cracker` saves and restores 5 values, an empty VQ and a full VQ (128 values). A
  small memory and VQ model apply each micro-operation, with `u_ready` randomly held low. It
  checks the addresses, the order, the length-first rule, the wait for the length load, and that
  the restored VQ equals the saved one.
* `tb_cfd_frontend` runs the top at its default sizes inside a small behavioural core:
  * a 10-cycle fetch-to-execute latency;
  * in-order 4-wide retirement;
  * a 236-register freelist and register file;
  * a random predictor for BQ misses;
  * random mispredicting checkpointed branches;
  * one exception;
  * long-latency instructions that hold retirement so the queues fill;
  * a context switch between the two loops of a 30-iteration chunk. The BQ image is saved and
    restored. All 30 values go through the VQ cracker, via real `Pop_VQ` renames and frees, and
    then `Push_VQ` into new registers. The second loop must then read them unchanged.

  It runs a generated program of about 4000 instructions, with strip-mined BQ/VQ loops, a
  Mark/Forward early exit and separable inner loops with trip counts from 0 to 9. It checks
  every predicate, value, freed register and `Branch_on_TCR` outcome against a software model of
  the queues. It counts 19 mechanisms (hit, miss, late push right/wrong, each stall, Mark,
  Forward, TCR continue/exit, both recoveries, forwarding, holds, the BQ context switch, values
  moved by Save_VQ/Restore_VQ). It fails if any of them never occurs.

* `tb_cfd_workloads` runs the same core model over loops shaped like the evaluated
  applications. The applications' data is not available, so the predicates, values and trip
  counts are random. The workloads are:
  * BQ-only loops strip-mined to 128 (astar region 1, namd, tiff-median);
  * BQ loops carrying one value (soplex, mcf, eclat, bzip2);
  * loops carrying two values in chunks of 64, which fills the renamer;
  * the astar TQ nest: an outer loop of 400 strip-mined to 256, inner trip counts 0 to 9;
  * one loop run at a 10-cycle and then a 20-cycle fetch-to-execute latency.

  For each workload it prints the cycles and the `Branch_on_BQ` hits and misses. It checks the
  same values as the end-to-end test. It also requires at least 80 % hits for each BQ workload
  and exactly one exit for each retired inner loop. Over 40 random seeds, BQ-only loops saw 89 % hits or more. Their misses come from the full-BQ
  stall at each chunk boundary. Loops carrying values saw 93 % or more. In 37 of the 40 seeds, the
  20-cycle latency missed more often than the 10-cycle one.

To run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  --top-module tb_cfd_frontend -y rtl -y tb +libext+.sv \
  rtl/cfd_pkg.sv tb/tb_cfd_frontend.sv -o sim
./obj_dir/sim
```

Substitute `tb_cfd_workloads`, `tb_vq_ctx_cracker`, `tb_branch_queue`, `tb_vq_renamer` or `tb_trip_count_queue` to run
the others. Each
finishes in seconds.

## Files

* `rtl/cfd_pkg.sv` — the checkpoint count and the recovery-kind, VQ-operation and cracker
  micro-operation enums.
* `rtl/branch_queue.sv`, `rtl/vq_renamer.sv`, `rtl/trip_count_queue.sv` — the three structures.
* `rtl/vq_ctx_cracker.sv` — the Save_VQ / Restore_VQ decode sequencer.
* `rtl/cfd_frontend.sv` — the top: the shared fetch stall and hold, and the shared checkpoint,
  retire and recovery ports.
* `tb/tb_*.sv` — the testbenches described above.

Parameters:
* sizes: `SIZE`/`BQ_SIZE`/`VQ_SIZE`/`TQ_SIZE` must be powers of two;
* `N`/`TQ_N` is the trip-count width;
* `N_CKPT` is the number of checkpoints;
* `FETCH_W`/`RENAME_W`/`WIDTH` is the bundle width;
* `PREG_W` is the physical register number width. Raise it to 9 for register files of more than
  256 entries.
