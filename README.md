# Low-quality instruction prediction and Low-LQ fetch scheduling for an SMT core

A simultaneous multithreaded (SMT) processor fetches from several threads
into one shared back end, and the fetch unit must keep deciding which threads
to feed. This design makes that decision from a prediction of how long each
thread's instructions will sit in the instruction queue.

An instruction's **issue delay (IID)** is the number of cycles it waits in an
instruction queue between dispatch and issue. An instruction with an IID of
**5 cycles or more** is called **low quality (LQ)**. LQ instructions occupy
queue entries and hold up the instructions that depend on them. A thread with
many of them in the queues gains little from extra fetch bandwidth, and a
thread with few of them turns fetched instructions into throughput quickly.

The design has two halves:

* **Prediction.** A 64-entry table remembers the PCs of instructions that
  recently turned out to be LQ. At dispatch each instruction looks its PC up
  in the table, and a hit marks it *predicted LQ*. At commit the table learns
  from the IID each instruction actually had. A PC with IID >= 5 is stored.
  A PC with IID < 5 is removed.
* **Scheduling (the Low-LQ policy).** For each thread, the design counts the
  predicted-LQ instructions waiting in the integer and floating-point queues.
  Each cycle the fetch unit may fetch 8 instructions from up to 2 threads, and
  the threads with the **fewest** predicted-LQ instructions are chosen first.

All RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. The testbenches
are self-checking.

## Block map

```
             rename ──► disp_ins[8] ──┬─────────────► iid_table ◄──── commit[12] (PC, IID)
                                      │  lookup_pc        │ hit          from the reorder buffer
                                      │                   ▼
                                      │             disp_lq_pred[8]
                                      ▼                   │
                        ┌──────────────────────────┐      │
      wake_tag[10] ───► │ instruction_queue (int)  │◄─────┤
   (functional units)   │ 64 entries, 6 issue/cyc  │──► int_issue[6] (+LQ bit, IID)
                        ├──────────────────────────┤      │
                        │ instruction_queue (FP)   │◄─────┘
                        │ 64 entries, 4 issue/cyc  │──► fp_issue[4]  (+LQ bit, IID)
                        └───────────┬──────────────┘
                                    │ per-entry valid / thread / LQ bit (128 entries)
                                    ▼
                              lq_counter ──► lq_count[4]
                                    │
 thread_active[4], fetch_avail[4] ─►│
                                    ▼
                         lowlq_fetch_scheduler ──► fetch_tid[2], fetch_n[2]
```

| File | Contents |
|---|---|
| `rtl/lq_pkg.sv` | shared widths, the LQ threshold, and the `instr_t`, `issued_t` and `commit_t` records |
| `rtl/iid_table.sv` | the PC table that predicts LQ instructions |
| `rtl/instruction_queue.sv` | out-of-order queue that measures each instruction's IID (two instances) |
| `rtl/lq_counter.sv` | per-thread count of predicted-LQ instructions in the queues |
| `rtl/lowlq_fetch_scheduler.sv` | picks the fetch threads and splits the fetch slots |
| `rtl/lq_smt_sched_top.sv` | top level: wires the blocks together and brings the surrounding pipeline out as ports |

## The life of one instruction

The feedback loop runs across three pipeline points, which is the hardest
part to follow:

1. **Dispatch, cycle d.** The renamed instruction is on `disp_ins[k]`. Its
   PC goes through the IID-table combinationally, and `disp_lq_pred[k]` is
   the prediction. If `disp_ready` is high, the instruction is written into
   the integer or FP queue at the edge that ends cycle d, together with its
   prediction bit.
2. **Waiting, cycles d+1 ...** The entry's IID counter reads 1 in cycle
   d+1 and gains one per cycle. While the entry is valid and predicted LQ,
   it counts towards its thread's `lq_count`. The count is registered, so it
   shows one cycle later.
3. **Issue, cycle i.** Once both source operands are ready, the entry
   issues, and the issue slot carries the counter's value: IID = i − d. An
   instruction that is ready right away issues in cycle d+1 with IID 1. The
   counter saturates at 15, which is far above the threshold.
4. **Commit.** The reorder buffer, which is outside this design, keeps the
   IID with the instruction and sends PC and IID to `commit[]` when the
   instruction retires. The table is updated at the edge that ends that cycle.
   The next dispatch of the same PC sees the result.

Training happens at commit, not at issue, so wrong-path instructions never
train the table.

## IID-table (`iid_table`)

* 64 entries, **direct mapped**. PC bits [7:2] select the entry, and PC bits
  [63:8] are stored as a tag. A lookup hits only on an exact PC match.
  Instructions are assumed to be 4-byte aligned.
* **Store** (IID >= 5): the entry gets the PC and becomes valid. If the
  entry held another PC, that PC is replaced.
* **Remove** (IID < 5): the entry is cleared only if it holds this exact PC.
  A different PC that maps to the same entry is left alone.
* Up to 12 commits per cycle are applied in slot order, with slot 0 the
  oldest. When two commits touch one entry, the younger one wins.
* 8 lookup ports, one per dispatch slot. A lookup sees the table as of the
  start of the cycle.
* `occupancy` reports the number of valid entries.

## Instruction queues and IID measurement (`instruction_queue`)

Each queue has 64 entries. One instance takes integer instructions and
issues up to 6 per cycle. The other takes floating-point instructions and
issues up to 4 per cycle (one slot per functional unit).

* **Collapsing queue.** Each cycle, the entries that remain move down
  towards entry 0 in order, and the newly dispatched instructions are
  appended behind them. Entry order is therefore age order.
* **Select.** The oldest ready entries issue, up to the issue width. An
  entry is ready when both of its source-ready bits are set.
* **Wakeup.** The functional units broadcast result tags on `wake_tag[10]`.
  A tag seen in cycle t sets the matching ready bits at the end of cycle t.
  This includes instructions dispatched in cycle t, so no wakeup is missed.
  A dependent instruction can issue in cycle t+1, so a 1-cycle operation
  should broadcast in the cycle it issues.
* **Dispatch.** The queue accepts up to 8 instructions per cycle, but only
  while at least 8 entries are free (`disp_ready`). The top accepts a
  dispatch group only when *both* queues are ready. A group that is held back
  is therefore never written into one queue only.
* **Flush.** `flush[t]` drops all of thread t's instructions in the same
  cycle: those in the queue, those at dispatch and those being issued. The
  LQ counts stay exact because they are formed from the queue contents.

## LQ counts and fetch choice

`lq_counter` adds up, per thread, the valid and predicted-LQ entries of both
queues (128 entries) and registers the result.

`lowlq_fetch_scheduler` considers each thread with `thread_active` set and a
non-zero `fetch_avail`. `fetch_avail` is the number of instructions the
thread can supply this cycle, for example up to the end of its fetch block.
The scheduler orders these threads by `lq_count`, fewest first. Equal
counts are ordered by a round-robin pointer that advances every cycle. The
first thread gets `min(fetch_avail, 8)` slots, and the second thread gets
whatever slots are left. A thread that would get no slot is not reported. The
selection is combinational and valid in the same cycle.

## Top-level interface (`lq_smt_sched_top`)

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock and synchronous active-low reset (empties the table and the queues) |
| `disp_valid[8]`, `disp_ins[8]` | in | renamed instructions: thread, PC, FP flag, source tags and ready bits, destination tag, sequence tag |
| `disp_ready` | out | a group offered in this cycle is taken |
| `disp_lq_pred[8]` | out | prediction for each dispatch slot |
| `int_issue_valid[6]`, `int_issue[6]` | out | issued integer instructions with LQ bit and IID |
| `fp_issue_valid[4]`, `fp_issue[4]` | out | issued FP instructions with LQ bit and IID |
| `wake_valid[10]`, `wake_tag[10]` | in | result tags from the functional units |
| `commit_valid[12]`, `commit[12]` | in | PC and IID of retiring instructions, oldest in slot 0 |
| `flush[4]` | in | per-thread squash |
| `thread_active[4]`, `fetch_avail[4]` | in | which threads could fetch, and how many instructions each |
| `fetch_valid[2]`, `fetch_tid[2]`, `fetch_n[2]` | out | fetch choice, highest priority first |
| `lq_count[4]`, `table_occupancy`, `int_iq_count`, `fp_iq_count` | out | observation |

The sequence tag (`instr_t.seq`) is not interpreted inside the design. The
reorder buffer can use it to find the issued instruction and attach the IID.

## Parameters

| Parameter | Default | Where it comes from |
|---|---|---|
| IID-table entries | 64 | the scheme's configuration |
| LQ threshold | 5 cycles | the scheme's configuration |
| queue entries (int, FP) | 64, 64 | base processor |
| issue width (int, FP) | 6, 4 | base processor (functional units) |
| commit width | 12 | base processor (retirement bandwidth) |
| fetch | 8 instructions from up to 2 threads | base processor |
| threads | 4 | largest mix evaluated (four programs) |
| dispatch width | 8 | own choice (equal to the fetch width) |
| wake ports | 10 | own choice (one per functional unit) |
| PC / physical tag / sequence tag / IID widths | 64 / 8 / 8 / 4 bits | own choice |

The thread count and the record widths live in `lq_pkg`. The sizes are module
parameters.

## What is built and what is not

The design covers the logic that the prediction and scheduling scheme adds to
an SMT core. The surrounding core is not built, and its connections are
ports: the fetch unit and its per-thread PCs, the instruction cache, decode,
register renaming, the register files, the functional units, the data and L2
caches, the branch predictor and BTB, and the reorder buffer and commit.

Choices made here that the scheme leaves open:

* the table is direct mapped, with full-PC tags and replace-on-store;
* the queue design: collapsing, oldest-ready-first, tag broadcast wakeup, and
  dispatch only with 8 free entries;
* the IID counting convention (1 in the first cycle the instruction can
  issue) and the 4-bit saturating counter;
* how the fetch slots are split between the two threads, and the round-robin
  tie-break;
* LQ counts formed by counting the queue contents, with one cycle of latency,
  over both queues;
* the per-thread flush.

The round-robin and "most LQ first" (High-LQ) policies are comparison
points, not part of the design. Flipping the comparison in
`lowlq_fetch_scheduler` gives High-LQ.

## Verification

Each block has a self-checking testbench in `tb/`. Each one compares the
block against a model written independently in the testbench, has a
watchdog, and ends with a `TB_RESULT checks=N failures=M` line.

| Testbench | What it checks |
|---|---|
| `tb_iid_table` | directed cases: IID 4 vs 5, replacement, a removal that must not touch another PC, slot order within a cycle, reset; then 3000 random cycles against a reference table |
| `tb_instruction_queue` | the exact issue selection each cycle, the IID of every issued instruction, `disp_ready`, the per-entry view and flushes, against a queue model; requires stalls, flushes and IIDs >= 5 to occur |
| `tb_lq_counter` | per-thread counts, including the empty and full (128) cases and the one-cycle latency |
| `tb_lowlq_fetch_scheduler` | the thread choice and slot split against a sorting model with its own round-robin pointer; requires both count-decided and tie-decided choices |
| `tb_lq_smt_sched_top` | the full design at its default sizes (see below) |

`tb_lq_smt_sched_top` puts a model of the rest of an SMT core around the top:

* fetch into a dispatch latch;
* rename with 256 physical tags;
* functional units with latencies of 1 (integer), 3 (load hit), 4 (FP) and
  20 (cache miss) cycles;
* in-order commit of 12 instructions per cycle;
* thread squashes.

It runs a two-thread mix and then a four-thread mix of synthetic 32-instruction
loop programs, with a reset in between. It checks every prediction against a
reference table, every issued instruction (operands ready, IID equal to issue
cycle minus dispatch cycle), the per-thread LQ counts, and that every fetch
choice respects the fewest-LQ rule. It also requires each mechanism to occur
at least once: LQ prediction, table store, table removal, IID >= 5, dispatch
stall, flush, a count-decided fetch, a tie, a two-thread fetch and FP issue.
For each mix it also reports prediction accuracy and effectiveness:

* accuracy is the share of predicted-LQ instructions that really had
  IID >= 5;
* effectiveness is the share of LQ instructions that had been predicted.

On these programs about a quarter of the instructions are LQ, with accuracy
near 80% and effectiveness between 50% and 60%. The programs are synthetic.
They show that the mechanism works. They do not reproduce the behaviour or
throughput of real benchmark mixes.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  rtl/lq_pkg.sv rtl/iid_table.sv rtl/instruction_queue.sv rtl/lq_counter.sv \
  rtl/lowlq_fetch_scheduler.sv rtl/lq_smt_sched_top.sv tb/tb_lq_smt_sched_top.sv \
  --top-module tb_lq_smt_sched_top -Mdir obj_top
./obj_top/Vtb_lq_smt_sched_top
```

For a single block, list `rtl/lq_pkg.sv`, the block's file and its
testbench. The simulations finish within seconds.
