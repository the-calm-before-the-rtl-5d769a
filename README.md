# Zephyr: coarse-grain sorting in front of a Cyclone scheduler

A Cyclone scheduler has no wakeup broadcast. Each instruction gets a
predicted delay. It then travels out along a *countdown queue* and back
along a *main queue*, and it reaches the execute stage when the delay
runs out. There it checks the physical-register ready bits. If a source is
not ready yet, the instruction goes round again: a *replay*.

That works while the queues are lightly used. On an SMT core they fill up.
An instruction that should switch from the countdown queue to the main
queue can find its slot taken: a *switchback hazard*. It then arrives late,
its dependents arrive too early and replay, and the replays fill the queues
even more. This feedback loop, a "typhoon", can leave the scheduler busy
with replays while very little useful work issues.

Zephyr breaks the loop by letting instructions into the Cyclone queues only
shortly before their operands should be ready:

```
 renamed dispatch group (one thread, up to 8 instr/cycle)
        |
        v
 +--------------------- prediction_engine ----------------------+
 | timing_table (ready cycle per thread x logical register)     |
 | latency_predictor: LHT | addr_predictor -> SILO, miss_detector|
 | MAX(sources) -> predicted issue cycle -> classifier          |
 +---------------------------------------------------------------+
        |  up to one instruction per queue per cycle
        v
 +------------------ coarse_sort_engine ---------------+
 | 6 x 0-cycle, 4 x 5-cycle, 2 x 10-cycle,              |
 | 2 x 20-cycle, 2 x 150-cycle delay FIFOs + parent lock|
 +------------------------------------------------------+
        |
        v
 pib (thread 0) pib (thread 1) pib (thread 2) pib (thread 3)
        \        ICOUNT (icount_select) picks one        /
         v
 +-------------------- cyclone_queue ---------------------+
 | countdown/replay queue <-> main queue (100 columns x 8)  |
 | preg_ready_table check at the head: issue or replay      |
 +----------------------------------------------------------+
        |  issue (up to 8/cycle)       ^ writeback
        v                              |
   functional units, caches (outside this design)
```

`stall_ctrl` adds the optional *stall mode*. In it, a thread that dispatches
a load of unpredictable latency is held until that load issues.

## Predicting the issue cycle

All times are absolute 32-bit cycle numbers (`now` counts from reset).
Differences are taken as signed values, so wrap-around is harmless.

* **Timing table** (`timing_table`). For each thread and logical register
  it stores the cycle at which the newest value is expected and the
  sequence number of its producer. Dispatch reads both sources of every
  lane. If an earlier lane of the same group writes a source, the reader
  takes that lane's new value instead: dependences inside a group are
  chained lane by lane.
* **Issue cycle.** The issue cycle is `MAX(now + MIN_PIPE, ready(src1),
  ready(src2))`. The destination becomes ready at issue cycle + latency.
  `MIN_PIPE` = 3 is the shortest path from prediction to the execute check.
* **Load latency** (`latency_predictor`). At most two loads per cycle are
  predicted; a third load ends the accepted part of the group. The paths
  are tried in this order:
  1. **LHT**, a last-value table indexed by PC. It is used when its 2-bit
     counter shows the same latency three times in a row.
  2. Otherwise, if the **stride address predictor** is confident, its
     address is looked up in two places at once:
     * the **SILO**, a table of in-flight miss blocks with their completion
       cycles. On a hit the load gets the cycles that remain;
     * the **miss detector**, 512 counters of resident L1 blocks indexed by
       the low block-address bits. A count of zero is a *definite miss* and
       gives L1 + L2 = 14 cycles; any other count is a *maybe hit* and gives
       2 cycles.
  3. If neither predictor is confident, the load is *unpredictable*. It is
     given the 2-cycle hit latency and, in stall mode, it is tagged.
* **Completion updates.** Writebacks correct the timing table with the
  real completion cycle. This happens only while the writer is still the
  register's latest producer.

## Coarse sorting and the parent lock

The wait (issue cycle − now) is **rounded down** to a queue delay of 0, 5,
10, 20 or 150 cycles. Rounding down means an instruction is never held past
its estimate. `classifier` gives each lane, in program order, the lowest
free queue of that class. If all queues of the class are busy, it tries the
next lower class. If no queue is left, that lane and the rest of the group
are offered again in the next cycle.

Each `sort_fifo` records when each entry arrived. Its head is *ripe* after
the queue's delay; a 0-cycle queue lets an instruction leave in the next
cycle. Instructions enter the queues in program order but leave them out of
order. Two rules keep this safe:

* A ripe head may leave only when neither of its parents is still inside
  the sorting engine. The engine keeps one bit per thread and sequence
  number, and each instruction carries its parents' sequence numbers, taken
  from the timing table.
* A parent that left a cycle earlier is already ahead in the PIB, so the
  PIB order follows the predicted execution order.

This lock cannot deadlock. A blocking chain would need an instruction that
is older than one of its own parents.

Up to `PIB_WR` = 4 heads per thread go to that thread's PIB each cycle.
Queues are served in index order, and only as far as the PIB has room.

## PIBs and ICOUNT

Each thread has a 32-entry `pib`. Each cycle, `icount_select` picks the
thread with a non-empty PIB and the fewest instructions in the Cyclone
queues; ties go to the lowest thread. Up to 8 instructions are moved from
that PIB into the Cyclone queue. An empty PIB is never picked. So a thread
with nothing close to ready gives its Cyclone slots to the others, which
makes ICOUNT aware of how much parallelism each thread has.

## The Cyclone queue

`cyclone_queue` has two arrays of `QLEN` = 100 columns × 8 rows. Each row
works on its own:

```
 column:        99 ... k ... 2   1   0
 countdown  <-  [ ] . [e] . [ ] [ ] [ ]  <- injection / replay enters col 0
                       | switchback (col k -> col k)
 main       ->  [ ] . [ ] . [ ] [ ] [h]  -> head: ready check -> issue
```

* Every entry carries `rem`, the cycles left until it should be at the
  head. A countdown entry moves one column outward per cycle, and `rem`
  drops by one each time.
* An entry in countdown column k **switches back** into main column k once
  `rem <= k+1`. It then needs k more cycles to reach the head, so it
  arrives on time or one cycle late.
* The switch **fails** when that main slot is filled by an entry coming
  down the main queue. This is the switchback hazard (`hazards` counts them
  per cycle). The entry keeps going outward and tries again at every later
  column, losing two cycles per column it goes past. In the last column the
  switch always succeeds, because nothing flows into the main queue's tail.
  As a result the longest delay the queue can hold is 2 × QLEN cycles.
* At the head, the ready bits of both sources are read from
  `preg_ready_table`:
  * all ready: the instruction **issues** (`iss_v`/`iss_d`);
  * not ready: it **replays**. It goes back into countdown column 0 of its
    row with `rem = REPLAY_DELAY` (4). Replays take precedence over new
    instructions in column 0.
* The shortest path from injection to the check is two cycles. A
  destination's ready bit is cleared when the instruction is dispatched and
  set by writeback.

Replay is selective: only instructions whose own sources are missing go
round again. Their dependents may replay in turn.

## Stall mode

When `stall_en` is set and dispatch accepts an unpredictable load, the load
is marked with `stall_tag`. The rest of its group is cut off, and the thread
is held at the prediction stage. When an issued instruction carries the tag
and the recorded sequence number, the load's address is being computed, and
the thread is released. With `stall_en` low the design is plain Zephyr.

## Top-level interface (`zephyr_top`)

| port | dir | meaning |
|---|---|---|
| `d_v[8]`, `d_i[8]` (`instr_t`) | in | dispatch group: renamed instructions of **one** thread in program order |
| `acc_n` | out | number of leading lanes taken this cycle; the rest must be offered again |
| `iss_v[8]`, `iss_d[8]` (`sinstr_t`) | out | instructions issued to the functional units this cycle |
| `wb_en/thr/ldst/seq/preg[8]` | in | writebacks: set the ready bit and correct the timing table |
| `res_*` | in | a resolved load (PC, address, latency): trains the LHT and the address predictor |
| `miss_*` | in | a miss has started (block address, completion cycle): allocates a SILO entry |
| `fill_*`, `evict_*` | in | L1 fill (frees the SILO entry, counts the block resident) and eviction |
| `stall_en` | in | enables stall mode |
| `now`, `hazards`, `replays`, `cq_occupancy`, `sort_occupancy`, `icount[4]`, `stalled[4]`, `lock_hold` | out | status and statistics |

Timing: all state changes on the rising edge of `clk`; `rst_n` is an
asynchronous active-low reset. `acc_n`, `iss_*` and the status outputs are
valid during the cycle. A source is responsible for:

* sequence numbers: they must not be reused while an older instruction
  with the same number is still in flight. ROB-index allocation does this;
* physical registers: a physical register must not be reassigned while it
  can still be read.

`instr_t`, `sinstr_t` and the constants live in `zephyr_pkg`.

## Sizes

| item | value | origin |
|---|---|---|
| threads / PIBs | 4 | modelled machine |
| issue width, Cyclone rows, dispatch lanes | 8 | modelled machine (8-way) |
| Cyclone queue length | 100 | modelled configuration |
| sorting queues | 6×0, 4×5, 2×10, 2×20, 2×150 | modelled configuration |
| load latency predictions per cycle | 2 | modelled configuration |
| L1 / L2 latency used for predictions | 2 / 12 | modelled machine |
| logical / physical registers | 32 / 256 | chosen |
| sequence number | 7 bits | chosen |
| LHT, address predictor | 1024 entries, direct mapped | chosen |
| SILO | 16 entries, fully associative | chosen |
| miss detector | 512 × 3-bit counters | chosen (matches a 16 KB, 4-way, 32 B-block L1) |
| PIB | 32 entries, 4 writes / 8 reads per cycle | chosen |
| `REPLAY_DELAY`, `MIN_PIPE` | 4, 3 | chosen |

## Own choices and departures

The Zephyr scheme fixes the structure: timing table, hybrid load latency
prediction, the rounded-down delay FIFOs with a parent lock, per-thread
PIBs with ICOUNT, a Cyclone queue with switchback and selective replay, and
the stall option. It also fixes the sizes marked above. It does not give
the circuits of these parts. Everything below is this design's own choice:

* the exact switchback rule (`rem <= k+1`, same column, per row) and the
  replay delay;
* how the address predictor, SILO and miss detector are built, and the LHT
  confidence rule;
* falling back to a lower queue class when a class is busy, and one entry
  per queue per cycle;
* the lock built from bit vectors of sequence numbers;
* the port counts;
* timestamps stored as absolute cycle numbers.

Some parts of the surrounding processor are not included: rename, fetch,
functional units and the cache hierarchy. Their signals are ports of the
top. Prediction and classification happen in a single combinational step,
whose result is written into the sorting FIFOs. A pipelined version would
add register stages there.

Other limits: a delay longer than 2 × QLEN cycles that reaches the Cyclone
queue comes out early and replays. A miss that finds the SILO full is not
tracked.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each ends by
printing `TB_RESULT checks=N failures=M` and has a watchdog. The unit tests
compare against reference models in the testbench. Some use reduced sizes,
for example the Cyclone queue with 12 columns × 2 rows. Each of these tests
fails when a deliberate bug is put into its module.

`tb_zephyr_top` runs the whole design at its default size. It models four
threads with renaming, the functional units and a small memory system with
L2 and memory misses. It runs 1500 instructions without stall mode and 1500
with it (about 7,800 cycles in all, a few seconds of simulation). It checks
that:

* every instruction issues exactly once, and only after its sources were
  written back;
* all queues drain.

It also requires each of these to happen at least once:

* switchback hazards and replays;
* every sorting-queue class;
* the parent lock holding a head;
* the two-load cut;
* an ICOUNT choice between several non-empty PIBs;
* every load-prediction path;
* thread stalls and their release.

To run a test with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/zephyr_pkg.sv tb/tb_zephyr_top.sv --top-module tb_zephyr_top -Mdir obj
./obj/Vtb_zephyr_top
```

Replace `tb_zephyr_top` with any other testbench name. For a lint check:
`verilator --lint-only -Wall -Irtl -y rtl rtl/zephyr_pkg.sv rtl/<module>.sv`.

Not verified:

* performance against real workloads (IPC, hazard and replay rates);
* timing closure: the dispatch path (timing table, load prediction,
  classification) is long.
