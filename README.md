# TEA: branch precomputation with a second, chain-only thread

A handful of static branches ("hard to predict", H2P) cause most of the
mispredictions of a wide out-of-order core. Their outcome is usually
computed by a short chain of instructions buried among many unrelated ones.
This design extracts those chains from the retired instruction stream,
caches them per basic block, and runs them as a second speculative thread
(the TEA thread) next to the program. The TEA thread fetches only chain
micro-ops, so it runs ahead of the main thread, and when one of its branches
shows that the predictor was wrong it triggers an ordinary misprediction
flush, early, at the branch's place in the program order.

Two ideas keep the hardware simple:

* **Shared fetch addresses.** The TEA thread does not predict anything. It
  follows the same fetch blocks that the branch predictor produces for the
  main thread, read from a second copy of the fetch queue, and looks up the
  chain micro-ops of each block in a Block Cache. Because each fetch block
  carries the predictor's branch timestamp, a TEA branch and its main-thread
  copy have the same timestamp.
* **Flush by timestamp.** A TEA branch result is written into the in-flight
  branch queue entry of its main-thread copy. If it disagrees with the
  prediction, the core flushes everything younger than that timestamp, with
  the machinery it already has for mispredictions, wherever the main branch
  happens to be (still in the fetch queue, in rename, or waiting to execute).

The RTL covers the TEA hardware. The core around it is only present as
ports: the branch predictor, the main fetch, decode and rename stages, the
ROB, the execution units and the caches.

## How chains are found

`h2p_table` counts mispredictions per branch PC. It has 256 entries, is
8-way, and holds 3-bit saturating counters. A mispredicting branch gets an
entry with count 1, and further mispredictions increment it. A branch is H2P
when its count is above 1. Every 50,000 retired micro-ops all counters are
decremented, so branches that mispredict rarely fall back to 0 and are
replaced first.

`fill_buffer` collects 512 retired micro-ops, one per cycle. Each entry holds
the PC, the decoded registers, the memory address and a *chain bit*. The
chain bit is set on entry for H2P branches. It is also set for micro-ops that
the TEA thread itself executed, which the main thread learns from the Block
Cache bit-masks. These extra seeds let a chain grow longer than the buffer
over several walks. When the buffer is full, a state machine performs the
**backward dataflow walk**: from youngest to oldest, one entry per cycle,
using `source_list`. The source list is a bit vector of live architectural
registers plus 16 live memory addresses. A micro-op joins the chain if any of
these holds:

* its chain bit is already set;
* it writes a live register;
* it stores to a live address.

A micro-op that joins removes its destination from the live set and adds its
sources; a load also adds its address. Micro-ops that retire during the walk
are dropped, so the buffer samples the retired stream.

The walked buffer is then streamed out oldest first. `segment_builder` cuts
the stream into basic-block segments. A segment ends after a branch, at a
non-sequential PC, after 32 positions, or before a ninth chain micro-op. Each
segment carries:

* its first PC, which is the tag;
* its length;
* a 32-bit mask with one bit per position (1 = chain micro-op);
* up to 8 chain micro-ops with their positions.

`block_cache` stores the segments: 512 entries, 8 ways, indexed by the
64-byte code line of the first PC. A segment with no chain micro-op only gets
a tag in a separate 256-entry zero-tag store. A zero-tag hit tells the TEA
thread that the chain continues beyond this empty block. A segment that is
written again has its mask OR-ed with the stored one. Every 500,000 retired
micro-ops all masks are cleared, so chains from an old program phase stop
being fetched.

## How the TEA thread runs

The predictor pushes each fetch block (start, end, timestamp) into the main
`fetch_queue` (128 entries) and into a shadow queue. `tea_fetch` walks the
shadow queue's head block one segment per cycle:

* **Data hit:** sends the segment's chain micro-ops, tagged with the block's
  timestamp, to rename. It also queues the mask for the main thread.
* **Zero-tag hit:** continues with the next segment.
* **Miss:** ends the thread.

The first data hit starts a thread (`tea_controller`). At that moment
`pr_ref_table` is initialised and `shadow_rat` loads a copy of the main RAT.

`shadow_rat` renames 8 micro-ops per cycle into a static partition of 192
physical registers (numbers 208-399 of 400). It bypasses within the group and
takes a checkpoint at every TEA branch. `issue_arbiter` merges the TEA group
and the main rename group into 8 issue slots, with TEA micro-ops first. While
a thread is active, 192 of the 352 reservation stations belong to TEA and the
main thread is limited to the other 160.

TEA micro-ops never enter the ROB. Their registers are freed by
`pr_ref_table`, which keeps a Valid bit and a 5-bit reader count per physical
register (2,400 bits):

* renaming a destination clears the Valid bit of the old mapping;
* each renamed source read increments the count;
* each operand read just before execution decrements it;
* a register is freed as soon as it is both unmapped and unread.

TEA stores may not change memory. They write into `store_data_cache`
(16 lines of 32 bytes, with byte-valid bits), which TEA loads check.

## Flushes, checking and termination

This is the least obvious part of the design.

**Early flush.** `inflight_branch_queue` has one entry per predicted branch,
indexed by the low timestamp bits, holding the predicted direction and
target. When a TEA branch executes, its result is stored in the entry of the
same timestamp. If the result differs from the prediction, the queue raises
`flush_valid` with `flush_early` and the timestamp. The stored prediction
becomes the TEA outcome, because the frontend has now been redirected.

**Partial frontend flush.** The frontend is flushed *by timestamp*, not
emptied. Each holding stage keeps what is not younger than the flushing
branch. The stages are:

* both fetch queues;
* the TEA group waiting between fetch and rename;
* the renamed TEA group waiting for issue.

When the main branch is still in the fetch queue, the blocks before it
survive, and that branch's whole misprediction penalty is saved.
`fq_partial_flush` reports this case.

**Shadow RAT recovery.** If a checkpoint exists for the flushing timestamp,
the shadow RAT restores it. This happens when the TEA thread is ahead of the
main thread. Otherwise the shadow RAT takes the recovered main RAT, which the
core supplies on `main_rat`. Checkpoints of flushed branches are discarded.

**Main branch check.** When the main-thread branch executes, the queue
compares its outcome with the stored state:

* **Covered:** a correct TEA result means nothing more to do (`tea_covered`
  if an early flush was issued).
* **Wrong:** a wrong TEA result causes a second, corrective flush. The thread
  ends and all further TEA flushes are blocked while it drains.
* **No TEA result:** an ordinary misprediction flush when needed.
* **Late:** a TEA result arriving after its main branch is reported as late.
  The fifth late result ends the thread.

**RAT poisoning.** `poison_tracker` keeps a poison bit per architectural
register, all cleared at thread start. Each main-thread micro-op at rename
carries its Block Cache mask bit:

* a micro-op outside the chain (bit 0) poisons its destination;
* a chain micro-op (bit 1) clears its destination;
* a chain micro-op that reads a poisoned register proves that the chain
  misses a producer.

On such a violation the thread ends, and TEA flushes of branches younger than
the violating micro-op are blocked.

**Draining.** `tea_controller` is idle, active or draining. A thread ends on:

* a Block Cache miss;
* a wrong result;
* a poison violation;
* too many late results.

While draining, fetch addresses are discarded. After a miss, the TEA branches
already in flight may still flush. The controller returns to idle when no TEA
micro-op is left in fetch, rename or the stations.

## Interface of `tea_top`

| Group | Signals | Direction and use |
|---|---|---|
| Retire | `ret_valid`, `ret_uop`, `retire_cnt`, `mispred_valid/pc` | One retired micro-op per cycle to the Fill Buffer. The total retired count drives the periodic counters. Mispredictions train the H2P table. |
| Predictor | `bp_valid`, `bp_addr`, `bp_dir`, `bp_tgt`, `bp_ready` | One fetch block per cycle with its timestamp and its predicted ending branch. |
| Main fetch | `mfq_*`, `mq_*` | Main fetch queue head, and the bit-mask queue (segment PC, length, mask) for marking main micro-ops. |
| Main rename | `m_valid`, `m_uops`, `m_mask`, `main_rat`, `main_take` | The main group offered to issue, its mask bits, and the (recovered) main RAT. |
| Issue | `issue_valid`, `issue_uops`, `*_rs_release`, `rd_v`, `rd` | The merged issue group, station releases, and operand reads of TEA registers. |
| Branches | `tea_br_*`, `main_br_*` | Executed TEA and main branches: timestamp, direction, target. |
| TEA memory | `st_*`, `ld_addr`, `ld_bvalid`, `ld_data` | TEA stores and TEA load forwarding. |
| Flush | `flush_valid`, `flush_ts`, `flush_dir`, `flush_tgt`, `flush_early` | Flush request for the core. |
| Status | `tea_active`, `tea_covered`, `tea_late`, `tea_blocked`, `walk_done`, `bc_mask_reset`, `h2p_decay`, `n_*` | Events and counters. |

Shared types and sizes are in `rtl/tea_pkg.sv`:

* 40-bit PCs and addresses;
* 32 architectural registers;
* 400 physical registers;
* 10-bit wrap-around timestamps, compared with `ts_younger`;
* 8-wide groups;
* micro-op records with opcode, branch/load/store flags and up to one
  destination and two sources.

Most interfaces are valid/ready or single-cycle pulses. Lookups in the H2P
table, the Block Cache and the branch queue are combinational. The TEA fetch
and rename stages each register their output group.

## What follows the source design and what is this implementation's choice

These sizes and rules come from the source design:

* 8-wide TEA fetch, rename and issue.
* H2P table: 256 entries, 8-way, 3-bit counters; allocate at 1, H2P above 1,
  decay every 50K, counters at 0 replaced first.
* Fill Buffer: 512 entries with one access port. The walk takes about 500
  cycles and uses a register bit vector plus 16 memory addresses. Micro-ops
  executed by TEA are extra seeds.
* Block Cache: 512 entries, 8-way, 40-bit PC tags, 32-bit masks, at most 8
  chain micro-ops per entry, 256 zero tags, mask reset every 500K.
* Fetch queue of 128 blocks; TEA starts on a hit and ends on a miss.
* Shadow RAT copied from the main RAT, with shadow checkpoints.
* Issue priority for TEA; 192 stations and 192 registers reserved.
* Valid bit plus 5-bit reference counter per register.
* 16 x 32-byte store data cache.
* Timestamp-based early flush and partial frontend flush.
* In-flight branch queue check and termination rules, including the limit
  of 4 late results and RAT poisoning with flush blocking.

These are choices of this implementation:

* Retired micro-ops are accepted one per cycle. After each walk there is a
  512-cycle drain into the Block Cache writer, which drops retirements like
  the walk does.
* Segments are also cut at non-sequential PCs. Memory addresses are compared
  at 8-byte granularity. Full source-list and store-cache buffers replace
  their oldest entry.
* Block Cache replacement is round-robin per set. The zero-tag store is
  8-way.
* Each fetch block carries one timestamp, that of its ending branch.
* Shadow fetch queue and mask queue are 16 deep. The shadow RAT has 8
  checkpoints. There are 8 register-read ports.
* The in-flight branch queue has 256 entries indexed by timestamp. Timestamps
  are 10 bits.
* The TEA register partition is numbers 208-399.
* The drain condition for ending a thread.

## Known departures and limits

* **One segment per cycle.** The source design reads every Block Cache entry
  of two consecutive code lines from two banks, and delivers up to 8 micro-ops
  per cycle from several sequential segments up to the first taken branch.
  Here `tea_fetch` handles one segment per cycle, and `block_cache` has a
  single-segment read port. A fetch block with several segments therefore
  takes several cycles.
* **Frontend latency.** The TEA frontend latency of the source design (8-9
  cycles) is not modelled. Fetch and rename are one registered stage each.
* **Register leak on restore.** When the shadow RAT is restored, registers
  allocated after the restored point are only returned at the next thread
  start.
* **Reference counter overflow.** The reference counter wraps after 31
  readers. As in the source design, this can only corrupt a precomputation,
  never the main thread.
* **No real workloads.** The source design was evaluated on SPEC CPU2017 and
  the GAP graph suite. None of that can be simulated here. The structures are
  caches and sampling windows, so any program runs; their sizes only limit
  coverage.

## Verification

Each block in `rtl/` has a self-checking testbench `tb/tb_<block>.sv`, which
compares against values worked out in the testbench. Notable checks:

* `tb_fill_buffer` compares the chain bits after a walk with a reference walk
  over a random 32-entry stream.
* `tb_store_data_cache` compares with a byte-level model.
* `tb_inflight_branch_queue` covers early, covered, late, wrong and blocked
  cases.

`tb/tb_tea_top.sv` runs the whole design at its default sizes (about 36,000
cycles, under a second). It uses a loop with one H2P branch:

```
A: r1 <- load[r4+r5]; flags <- cmp r1; jne C   (H2P)
B: r7 <- r8; jmp C
C: r9 <- r9; r5 <- r5+1; flags <- cmp r5,r7; jne A
```

The test runs in three phases:

1. It trains the H2P table and retires the loop until a walk has filled the
   Block Cache.
2. A behavioural predictor, a slow main thread and a backend model run the
   TEA thread for 3,000 cycles. Along the way the test injects a block
   without a cache entry, a poisoned read, one wrong TEA result, a window of
   late TEA results, and a TEA store and load.
3. It retires in bulk until the H2P decay and the Block Cache mask reset have
   happened.

The test checks the following:

* Only the chain micro-ops are fetched by TEA: the three micro-ops of A and
  `r5 <- r5+1`.
* TEA micro-ops come before main ones in every issue group.
* Every early flush corrects a real misprediction.
* Early-flushed branches resolve as covered.
* Late results flush nothing.

It counts each mechanism and fails if one never happened:

* thread start;
* issue priority;
* early flush;
* partial fetch-queue flush;
* covered branches;
* termination by miss, wrong result, poisoning and late results;
* blocked flushes;
* zero-tag skip;
* checkpoint restore;
* register freeing;
* store forwarding;
* mask reset;
* H2P decay;
* run-ahead, meaning a TEA branch issued before the main thread fetched its
  block.

Run a testbench with plain Verilator from the repository root:

```
verilator --binary --timing --assert -Irtl rtl/tea_pkg.sv tb/tb_tea_top.sv --top-module tb_tea_top
./obj_dir/Vtb_tea_top
```

Each testbench prints `TB_RESULT checks=<n> failures=<m>`.
