# A speculative instruction scheduler that predicts load latency and sorts instructions before they reach the issue queue

A deep out-of-order core has several pipeline stages between the cycle the
scheduler picks an instruction and the cycle the instruction executes. To run
dependent instructions back to back anyway, the scheduler must wake a
consumer up *before* its producer has finished. It does that by assuming a
latency for the producer. For most operations the latency is fixed. For loads
it is not: a load may take 2 cycles or 200. Today's schedulers assume an L1
hit. When the load misses, every dependent picked on that assumption reaches
execution without its operand. It has read the register file for nothing, and
it must be replayed. Meanwhile everything waiting on the missing value sits in
the associative issue queue and burns energy.

This RTL attacks both costs:

* **Load latency is predicted before rename completes.** Dependents are then
  woken after the predicted latency, not the L1 latency. A correctly predicted
  miss causes no replays.
* **Expected waiting times are worked out in rename.** Instructions that will
  wait a long time are parked in cheap FIFOs (the *sorting queues*). They
  enter the issue queue only shortly before they can run. The issue queue
  stays nearly empty of instructions that cannot issue, so its occupancy and
  energy drop.

The design follows the proposal in "Reducing the Energy of Speculative
Instruction Schedulers". The sizes are those of that proposal's main
configuration: an 8-wide core with a 32-entry issue queue. Where the proposal
says what a part does but not how, this RTL picks the simplest structure that
does it. Each such choice is listed under
[Where this RTL makes its own choices](#where-this-rtl-makes-its-own-choices).

## The pipeline

```
             cycle t        t+1             t+2                    t+3 ...            ...                 +STE
 rename ──► [ s1: LHT,  ]─►[ s2: SILO,   ]─►[ timing table ]─►[ sorting engine ]─►[ PIB ]─►[ issue queue ]─►(7 stages)─► execute
 in_instr   [ addr pred ]  [ miss detect ]   waiting time      8 FIFOs + locks    64 FIFO   32 entries,        register file
                                            + rename map                                   8-wide select       read (2 copies)
```

One instruction per cycle enters. It comes with its physical destination
register already allocated, because the free list and reorder buffer belong
to the surrounding core. Each stage has a valid/ready handshake, so a full
structure stalls everything before it.

| Module | Role |
|---|---|
| `sched_pkg` | Types (`instr_t`, `uop_t`, `perf_t`), latencies, widths |
| `latency_pred` | Two-stage load latency predictor, built from `lht`, `addr_pred`, `silo` and `miss_detect` |
| `timing_table` | Rename map plus a 10-bit "cycles until ready" count per architectural register |
| `sorting_engine` | Eight FIFOs (`sort_queue`) sorted by waiting time, with parent locking |
| `pib` | 64-entry preissue buffer |
| `issue_queue` | Speculative scheduler with selective replay |
| `dup_regfile` | Physical register file kept twice, 8 read ports per copy |
| `lp_sched_top` | Everything wired together, plus training of the predictors and event counters |

## Predicting how long a load will take

The predictor is read with the load's PC when the load enters. Its answer is
registered at the end of the second cycle. Those are the two extra cycles a
branch misprediction costs this front end.

1. **Latency history table (LHT)**, 2K entries, tagless, indexed by PC. Each
   entry holds the load's last measured latency and a 2-bit confidence
   counter. The counter rises when the same latency repeats and resets when it
   changes. At confidence 2 or more, the last latency *is* the prediction.
2. Otherwise the **load address predictor** supplies an address. It has 8K
   tagless entries, each holding a last address and an 8-bit stride (40 bits),
   and predicts `last + stride`. It is read in the same first cycle as the
   LHT. In the second cycle that address is looked up in two places:
   * the **SILO** (status of in-flight loads). This is 8 fully associative
     entries, one per cache block currently being fetched, each with its
     arrival time. If the load's block is already on its way, the prediction is
     the time left until it arrives, and at least an L1 hit.
   * the **cache miss detection engine**. This is one direct-mapped table of
     8-bit partial tags per cache level, written on every fill. The lowest
     level whose table holds the block gives the prediction: L1 2, L2 12 or
     memory 164 cycles.

The output is the latency and which source gave it. The top counts the
sources in `perf.pred_lht`, `perf.pred_silo` and `perf.pred_md`.

**Training, in `lp_sched_top`:**

* The address predictor learns the address of each load that executes. When
  several loads execute in one cycle, only the first slot's load trains it.
* The LHT learns each load's measured latency. This is the number of cycles
  from execution to `ld_done`, using a per-physical-register timestamp taken
  when the load executed.
* The miss detection engine learns from `fill_*`.
* The SILO gets an entry on `miss_*` and loses it on the L1 fill.

## Waiting times: the timing table

The rename map is extended: every architectural register holds its current
physical register and a 10-bit count of the cycles until that value is
expected.

* An instruction's **waiting time** is the larger of its two sources' counts.
* Its own result is expected `waiting time + latency` cycles later. The
  latency is the fixed unit latency, or the predicted one for a load.
* That count is written into its destination's entry, and all counts
  decrease by one every cycle.

The table also hands on each source's producer sequence number. The sorting
queues need it for locking.

Fixed latencies follow the modelled core:

| Operation | Latency (cycles) |
|---|---|
| Integer add / multiply / divide | 1 / 5 / 25 |
| FP add / multiply / divide | 2 / 10 / 30 |
| Loads | predicted |

## Sorting: letting instructions into the window out of order

This part departs most from a conventional core.

**Release time.** An instruction with waiting time `w`, dispatched at time
`t`, should reach the issue queue just in time for its operands. It still
needs about `LEAD = STE + 2` cycles after leaving the sorting engine: one
through the PIB, one to be written into the issue queue, and STE from select
to execute. So its release time is `t + w − LEAD`.

**Placement.** The sorting engine has eight FIFOs:

| Queue | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| Length | 1 | 1 | 1 | 5 | 5 | 10 | 20 | 150 |

An instruction with remaining delay `d = release − now` goes to the class of
the shortest length `L` with `d ≤ L`. Anything longer than 20 cycles goes to
the 150-entry queue. Within a class, the least-occupied queue with room is
used. If its class is full, the input stalls (`perf.sort_full`).

A FIFO only lets its head go. So the queue of an instruction bounds how late
it can be held up by instructions ahead of it: the short queues carry
instructions that are nearly ready, and the long queue carries the dependents
of memory misses.

**Release.** A head whose release time has passed is *due*. One due head
leaves per cycle, picked round-robin among the queues.

**Locking.** An instruction must never reach the issue queue before its
producers. Otherwise it could be selected before the producer and be
misscheduled. Its producers may sit in another FIFO with a later release
time, because predictions are imperfect. So every instruction carries its
producers' sequence numbers, and the engine keeps a bitmap of the sequence
numbers it holds. The bitmap is indexed by the low 8 bits, and the full
number is compared as well. A due head whose parent is still inside stays
where it is (`perf.lock_stalls`). Producers are always older than their
consumers, so the wait cannot become circular. An arriving instruction whose
bitmap slot is still taken by an instruction 256 sequence numbers older
waits at the input.

## The preissue buffer

The preissue buffer (PIB) is a plain 64-entry FIFO between the sorting engine
and the issue queue. When the issue queue is full, released instructions wait
in the PIB instead of blocking the sorting queues (`perf.pib_used`).
Instructions cannot issue from it. They always go through the issue queue.

## Speculative scheduling and selective replay

The issue queue holds 32 instructions. Each cycle it selects up to 8 whose
operands are *expected* to be ready, at most 2 of them loads or stores, with
the lowest entry index first. Seven stages later (`STE = 7`), the
instructions reach execute and read the duplicated register file.

Readiness is kept per physical register, in two versions.

* **Speculative readiness** is used by select. When a producer with latency
  `L` is selected in cycle `c`, its consumers become selectable in cycle
  `c + L`, so they arrive at execute exactly when the result does. For a load,
  `L` is the *predicted* latency carried in the uop.
* **Real readiness** is used at execute:
  * a fixed-latency result becomes real `L` cycles after its producer
    executed;
  * a load result becomes real in the cycle `ld_done` names it.

At execute, every instruction is checked against real readiness. If an
operand is missing, the instruction is **misscheduled**:

* `ex_replay` is raised for it;
* its destination loses its speculative readiness, so its own consumers are
  not picked on its account;
* it becomes selectable again 12 cycles later (`REPLAY_T`, the L2 hit
  latency), and repeats until it executes correctly.

Only instructions that depend on the missing value replay: this is selective
replay.

With a good latency prediction, a load's consumers are selected once and
execute on time. With a bad one, they cycle through the queue every 12 cycles
and read the register file each time. The proposal aims to save those reads.

Each cycle the queue also reports `n_issued`, `n_replays` and its occupancy.
These are the quantities an energy model charges for.

## The duplicated register file

An 8-wide core needs 16 read ports. Instead, `dup_regfile` keeps two copies of
the 192 × 64-bit physical register file, each with 8 read ports. Execute slots
0–3 read copy 0 and slots 4–7 read copy 1. All 8 write ports write both
copies. Reads are combinational, and writes happen at the clock edge.

## Using the top

`lp_sched_top` is the scheduling window of a core. The core around it must
supply the following:

| Port group | Direction | Meaning |
|---|---|---|
| `in_valid`, `in_ready`, `in_instr` | in / out | Instructions in program order. Holds the architectural sources and destination, the allocated physical destination, and the effective address of a load. |
| `ex_valid`, `ex_replay`, `ex_uop`, `ex_opnd` | out | The 8 execute slots, with their two operands each. A slot with `ex_replay` set must be ignored. |
| `wb_en`, `wb_addr`, `wb_data` | in | Results from the functional units. |
| `ld_done`, `ld_tag` | in | Up to 2 loads whose data arrives this cycle. A load that executes without replay counts as issued to memory. |
| `fill_en`, `fill_level`, `fill_addr` | in | A block filled L1 or L2. |
| `miss_en`, `miss_addr`, `miss_lat` | in | A load missed. Gives its block and expected latency. |
| `perf` | out | Running counts: cycles, dispatched, issued, replays, occupancy sums of the issue queue / sorting queues / PIB, lock stalls, prediction sources, cycles the sorting engine / PIB / issue queue were full. |

A physical register must not be handed out again while an instruction that
reads its old value is still in the window. This is the usual free-list rule,
and the top relies on it.

Synthesised with yosys at the default sizes, the top comes to about 9,000
cells and 12,900 flip-flop bits, plus about 464 Kbit of table memory. Most of
that memory is the address predictor, the LHT and the register file.

## Parameters

Defaults are the sizes of the proposal's main configuration:

| Parameter | Default | Origin |
|---|---|---|
| `IQ_ENTRIES` | 32 | Proposal. It also evaluates 64. |
| `ISSUE_W` | 8 | Proposal |
| `LDST_W` | 2 | Proposal |
| `STE` | 7 | Proposal's example of a current core |
| `REPLAY_T` | 12 | Proposal (the L2 latency) |
| `PIB_DEPTH` | 64 | Proposal |
| `AP_ENTRIES` | 8192 | Proposal |
| `LHT_ENTRIES` | 2048 | Proposal |
| `SILO_ENTRIES` | 8 | Proposal |
| `DATA_W` | 64 | Own choice |
| `NUM_PREGS` | 192 | Own choice: 128 reorder-buffer entries + 64 architectural registers |
| Sorting FIFO lengths | 1, 1, 1, 5, 5, 10, 20, 150 | Proposal |

## Where this RTL makes its own choices

The proposal names these mechanisms without giving their insides, or leaves
these details open:

* **Miss detection engine.** Partial-tag mirrors of L1 and L2, which do not
  see evictions. A real engine could be more precise.
* **LHT.** Confidence is a 2-bit counter with a threshold of 2. An entry holds
  12 bits: a 10-bit latency and the counter.
* **Priority between SILO and miss detection.** When both answer, the SILO
  wins, since a block in flight is not in the cache yet.
* **SILO.** Entries are filled from `miss_*` and freed by the L1 fill. When
  all are in use, the earliest arrival is replaced.
* **Sorting engine.**
  * The waiting-time-to-queue mapping and the value of `LEAD`.
  * Round-robin release of one instruction per cycle.
  * The lock, implemented as a sequence-number bitmap.
* **Issue queue.**
  * Readiness is kept as per-register countdowns rather than broadcast tag
    comparators; the behaviour is the same.
  * Selection takes the lowest index first, not the oldest first.
  * Only the two load/store units are a per-type limit. The other functional
    unit counts are not enforced.
* **Throughput.** One instruction per cycle enters the predictor, the sorting
  engine, the PIB and the issue queue.
* **Training.** Each predictor table takes at most one update per cycle.
* **Branch recovery.** Flushing on a branch mispredict is not built. The
  window drains only by execution.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops, and a watchdog ends it if it
hangs. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/sched_pkg.sv tb/tb_lp_sched_top.sv \
  --top-module tb_lp_sched_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other. The testbench works out its
expected values independently of the RTL it checks.

| Testbench | What it checks | Checks |
|---|---|---|
| `tb_addr_pred` | Stride prediction against a model of the table, including strides that do not fit | 314 |
| `tb_lht` | Last-latency prediction and the confidence rules | 607 |
| `tb_miss_detect` | Predicted level against a model of both partial-tag tables | 2007 |
| `tb_silo` | Hits, remaining time, refresh, replacement of the earliest arrival, release on fill | 18 |
| `tb_latency_pred` | Source priority (LHT, then SILO, then miss detection) and the two-cycle timing, directed and for 120 random loads | 249 |
| `tb_timing_table` | Renaming, waiting times and saturation against a cycle model | 3000 |
| `tb_sort_queue` | FIFO order, release times, full/empty, simultaneous push and pop | 4008 |
| `tb_sorting_engine` | Queue class chosen for each delay, no early release, no child before its parent, class-full stall | 1524 |
| `tb_pib` | Order, full and empty, 64 entries | 6001 |
| `tb_dup_regfile` | Both copies against a model, with all 16 read and 8 write ports busy | 48000 |
| `tb_issue_queue` | Exact replay flags against a model of when values exist, and exactly 7 cycles from select to execute; see below | about 16500 |
| `tb_lp_sched_top` | The whole window at default sizes; see below | about 12500 |
| `tb_lp_sched_iq64` | The same test with a 64-entry issue queue, built through the pass-through wrapper `lp_sched_top_sized` | about 13200 |

The `tb_issue_queue` cases, each checked to the cycle:

* an ALU consumer executes 1 cycle after its producer, and a multiply
  consumer 5 cycles after;
* a correctly predicted 30-cycle load gives no replays;
* a load predicted as a 2-cycle hit that takes 30 cycles makes its consumer
  replay twice, 12 cycles apart, and execute 42 cycles after the load;
* 8-wide issue, and 2 memory operations per cycle;
* a random mix that fills the queue.

`tb_lp_sched_top` runs the top with default parameters, inside a model of the
rest of the core: renaming with a free list, functional units writing
results, and L1/L2/memory with blocks in flight. It runs four synthetic
loops:

* **Memory-bound:** a load streams through memory, missing every iteration.
* **Compute-bound:** the same load mostly hits L1.
* **Mispredicted load:** the load alternates between a resident block and a
  new one, so its history always predicts wrong.
* **L2 hits:** the load reads the halves of L2 blocks that L1 does not hold,
  and its address comes from a multiply. Several of its dependents then sit
  in the 5-entry sorting queues at the same time.

Every execution's replay flag and operand values are checked. Every
instruction must execute exactly once. The testbench also counts each
mechanism and fails if one never happened:

* each prediction source;
* replays and lock stalls;
* a full sorting class, the PIB buffering for a full issue queue, and a full
  issue queue;
* 8-wide issue;
* use of each of the eight sorting queues.

One run of the four loops reported the following. The numbers vary a
little with the simulator's random seed.

| Loop | Instructions | Cycles | Mean issue-queue occupancy | Replays |
|---|---|---|---|---|
| Memory-bound | 1800 | 2342 | 8.4 | 4 |
| Compute-bound | 1800 | 2422 | 9.8 | 310 |
| Mispredicted load | 900 | 1639 | 24.0 | 1331 |
| L2 hits | 600 | 822 | 10.1 | 10 |

In the memory-bound loop, the dependents of every memory miss wait in the
sorting queues, not in the issue queue.

With a 64-entry issue queue, the mispredicted-load loop keeps about 35
entries occupied and replays about 2100 times. The issue queue never fills,
so the two full-queue mechanisms are reported there but not required.

## Limits

* The 64-entry issue queue (`IQ_ENTRIES = 64`) is simulated only with the
  synthetic loops above. None of them fills it.
* Energy is not modelled. The `perf` counters give the activity an energy
  model would weigh.
* The caches, memory, functional units, fetch, reorder buffer and free list
  are outside this RTL. The testbench models them only behaviourally.
