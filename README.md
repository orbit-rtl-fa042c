# ORBIT: readiness-based dispatch for an SMT issue queue

In an out-of-order core, a soft error that flips a bit in the issue queue can corrupt the program. The risk is highest while the queue holds many bits that matter, for a long time. In a simultaneous-multithreading (SMT) core the shared issue queue is large and full. Most of what it holds is instructions that are only waiting for a source operand. Such waits last tens of cycles; an instruction whose operands are ready leaves within a cycle or two.

ORBIT (operand-readiness-based instruction dispatch) removes most of those waiting instructions from the queue. An instruction still gets its ROB entry, its load/store-queue entry and a *reserved* issue-queue entry at allocation. It only moves into the issue queue once its operands are ready, or one cycle before they will be. Until then it waits in the ROB. Instructions that wait in the ROB are exposed there too, but the queue's share of exposure drops sharply, and performance barely changes because ready instructions still reach the queue in time.

This repository holds synthesizable SystemVerilog for that back end: per-thread ROBs with readiness checking, the shared register ready-bit array, the per-register completion timers, the dispatch arbiter, the issue queue and a timing model of the function units. All six ORBIT dispatch schemes can be selected at run time.

## The six dispatch schemes

`scheme` (type `orbit_pkg::scheme_e`) selects the rule by which a ROB entry becomes *eligible* to enter the issue queue:

| `scheme` | name | an entry may enter the issue queue when |
|---|---|---|
| 0 `S_DELAY_ALL` | DelayALL | both sources are written back |
| 1 `S_DELAY_ACE` | DelayACE | as DelayALL, but an instruction tagged un-ACE may enter at once |
| 2 `S_PREDICT_ALL` | PredictALL (Predict_DelayALL) | each source is written back or its timer says it will be next cycle |
| 3 `S_PREDICT_NON_LOAD` | Predict_non_load | as PredictALL, but load results are never predicted |
| 4 `S_PREDICT_ALL_DELAY_ACE` | PredictALL_DelayACE (Predict_DelayACE) | PredictALL rule, un-ACE instructions enter at once |
| 5 `S_PREDICT_NON_LOAD_DELAY_ACE` | Predict_non_load_DelayACE | Predict_non_load rule, un-ACE instructions enter at once |

The best trade-off reported for the technique is scheme 4: the largest drop in issue-queue vulnerability for about 1 % lower throughput.

"ACE" (required for architecturally correct execution) is a 1-bit tag carried in every instruction (`inst_t.ace`). The tag is set ahead of time by offline profiling of each static instruction. An un-ACE instruction, such as a NOP, a prefetch or a dynamically dead instruction, holds few bits that matter. Under the `*_DELAY_ACE` schemes it is therefore not held back.

## Dispatch in two steps

1. **Allocation** (`alloc_v`, `alloc_inst`, up to 8 per cycle, any mix of threads). Each instruction goes into its thread's ROB (`orbit_rob`) and claims one issue-queue entry. The core keeps one counter of claimed entries (occupied + reserved): it rises at allocation and falls at issue. So the queue can never overflow, although entries arrive later and out of order. `alloc_ready` is high when every ROB and the issue queue have room for a full group of 8.
2. **Dispatch into the issue queue.** Every cycle, every ROB entry looks up its two source registers. There is one AND gate per entry. Each ROB offers its oldest eligible entries, up to 8, whether or not older entries are still waiting. So dispatch is out of order within a thread, and commit stays in order. `dispatch_select` grants at most 8 of all offers per cycle. It takes one offer per thread per round, starting from a thread that rotates every cycle.

When more instructions are eligible than the dispatch width allows, some wait a cycle longer ("dispatch congestion"). This is the main performance cost of the Predict schemes.

## Readiness: ready bits and timers

Two arrays answer the ROB's lookups. Each is kept as four identical copies (banks), one per thread's ROB. Each bank has 192 read ports, two per ROB entry, so all 384 entries check both sources every cycle.

* **`ready_bit_array`**: one bit per physical register. It is cleared when rename hands out the register and set when a result is written back. This is the *actual* readiness and it is the only input of the Delay schemes.
* **`reg_timer_array`**: an 8-bit countdown timer and a "set" flag per physical register. A register is *predicted ready* when its timer is set and reads 1 or 0.
  * rename: the timer is unset and does not count;
  * the producer enters the issue queue: load the predicted completion time (`complete_time_pred`);
  * every cycle: a set, non-zero timer counts down by one;
  * write-back: the timer goes to 0, so a prediction that is too late never holds a consumer back past the real readiness.

### Why "reads 1" is the right moment

The predicted time is *dispatch-to-issue delay + issue-to-execute delay + unit latency*, with the delays 1 and 0 in this pipeline. An example with a 1-cycle ALU producer P and its consumer C:

| cycle | P | timer of P's destination | C |
|---|---|---|---|
| d | granted into the issue queue; timer loaded with 1+0+1 = 2 | – | waiting in ROB |
| d+1 | issues | 2 | not eligible |
| d+2 | executes, writes back at the end of the cycle | 1 → predicted ready | granted into the issue queue |
| d+3 | – | 0 | issues: ready on arrival |

C spends one cycle in the issue queue and issues as early as the queue's wake-up allows. Under DelayALL, C is granted only at d+3, when the ready bit is visible, and issues at d+4. A dependent ALU chain therefore issues every 2 cycles under the Predict schemes and every 3 under the Delay schemes. The testbench checks both intervals.

An instruction that enters the issue queue only through the un-ACE rule is not ready itself, so a time counted from its dispatch would be too early. Its timer is therefore left unset, and its consumers wait for its write-back.

Function-unit conflicts and issue-bandwidth contention are left out of the prediction. When they delay the producer, the consumer waits a little in the issue queue and is woken by the normal tag broadcast.

### Loads

A load's latency is unknown until its cache access. When a load enters the issue queue, its destination timer gets the all-ones value (255), which is longer than any real latency. After address generation the load leaves on `mem_req_*`. The memory side then reports the remaining latency `R` on `mem_upd_*` and the completion `R` cycles later on `mem_done_*`. The update re-times the timer to `R`, so the consumer is dispatched one cycle before the data arrives. Under `*_NON_LOAD` the load's timer is never set and updates are ignored. Consumers of a load then wait for its write-back, but their own results are predicted again. Stores have no destination and get no prediction.

## Module map

```
orbit_core                      top: allocation, IQ reservation, commit, statistics
├── orbit_rob  x NTHREADS       per-thread ROB, per-entry AND gate, candidates, commit window
├── ready_bit_array             actual readiness, NTHREADS bank copies
├── reg_timer_array             predicted readiness, NTHREADS bank copies
├── dispatch_select             8-wide dispatch arbiter across threads
├── complete_time_pred x WIDTH  timer value for each dispatched instruction
├── issue_queue                 96-entry shared queue, wake-up, 8-wide issue
└── fu_pool                     8 ALU, 4 int MUL/DIV, 8 FP ALU, 4 FP MUL/DIV, 4 LD/ST
orbit_pkg                       sizes, scheme decode, op classes, latencies, records
```

Each file starts with a comment giving its interface and cycle timing.

## Interface of `orbit_core`

* `scheme`: static during operation; change it only under reset.
* Rename side: `alloc_v[8]`, `alloc_inst[8]` (`inst_t`: identifier `pc`, thread, op class, ACE tag, destination and up to two source physical registers). Accepted in any cycle where `alloc_ready` is high.
* Memory side:
  * `mem_req_v/op[4]`: a load or store has its address;
  * `mem_upd_v/preg/val[4]`: for a load, the number of cycles until its data arrives;
  * `mem_done_v/done[4]`: completion of a load or store (`wb_t`). For a load it writes the destination register back.
* Commit: `commit_n[t]` instructions of thread `t` retire this cycle; they are `commit_inst[t][0..]`. The 8 commit slots are shared round-robin among the threads.
* Statistics: issue-queue occupancy, waiting entries (all and ACE), dispatches per cycle split into early (predicted) and un-ACE, issues, and instructions held in the ROBs. The time integral of `stat_iq_wait_ace` is a first-order measure of what the technique reduces.

## Sizes and where they come from

| parameter | default | origin |
|---|---|---|
| threads | 4 | four-program workloads of the evaluation |
| ROB entries per thread | 96 | evaluated machine |
| issue-queue entries | 96 | evaluated machine (32 to 128 also studied) |
| fetch/dispatch/issue/commit width | 8 | evaluated machine |
| units: int ALU, int MUL/DIV, LD/ST, FP ALU, FP MUL/DIV | 8, 4, 4, 8, 4 | evaluated machine |
| physical registers | 640 | own choice: 4 × 64 architectural + 4 × 96 rename |
| timer width | 8 bits | own choice: all ones (255) exceeds the 200-cycle memory latency |
| unit latencies (cycles) | ALU/branch 1, int mul 3, int div 20, FP add 2, FP mul 4, FP div 12, address 1 | own choice (usual simulator defaults) |
| dispatch-to-issue / issue-to-execute delay | 1 / 0 | own choice, exact for this pipeline |

## Departures and limits

* **No squash.** Branch-misprediction recovery and exception flushes are not modelled. Every allocated instruction is assumed to commit.
* **Timing only.** No operand values are stored or computed. `fu_pool` holds an instruction for its latency and reports completion. Units are not pipelined (a multiplier takes one op per 3 cycles).
* **Outside the RTL:** the front end (fetch queue with the ICOUNT policy, branch prediction), rename, the load/store queue and caches, and the offline ACE profiling. They connect through `alloc_*` and `mem_*`.
* **Own policies** where the original gives none: oldest-first candidate order within a ROB, round-robin thread interleaving at dispatch and commit, issue priority by issue-queue slot index, tag-broadcast wake-up in the issue queue, the conservative `alloc_ready`.
* The scheme is a run-time input, so one build carries all six techniques. A product would fix it. Under scheme 4 (PredictALL_DelayACE), which was reported as the best, the un-ACE bypass and the Predict logic are both active.
* **One bank per ROB.** The readiness arrays may be split into any number of copies, each read by one segment of the ROB space. Here each thread's ROB is one segment with its own copy, which gives 192 read ports per copy. Smaller segments would need more copies with fewer ports each.
* The banks are modelled as real copies. Synthesis will merge them unless told to keep them.

## Simulation

Each block has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/orbit_pkg.sv rtl/*.sv tb/tb_orbit_core.sv \
          --top-module tb_orbit_core -Mdir obj && obj/Vtb_orbit_core
```

For a block, replace the testbench file and top module, e.g. `tb/tb_orbit_rob.sv` / `tb_orbit_rob`.

* `tb_ready_bit_array`, `tb_reg_timer_array`: random operations against a per-register model. The timer test also checks the directed sequence: unset after rename, ready exactly at 1, load all-ones then update, write-back override.
* `tb_complete_time_pred`: every op class under every scheme.
* `tb_orbit_rob`: the eligibility rule of all six schemes, oldest-first candidates, commit order.
* `tb_dispatch_select`: bandwidth, prefix grants, fair share.
* `tb_issue_queue`: wake-up, no early issue, issue as soon as possible, unit limits, counts.
* `tb_fu_pool`: exact completion cycles and free-unit counts.
* `tb_orbit_core`: the whole back end at its default size, with a testbench rename stage and a memory model answering loads in 2, 12 or 200 cycles. For each scheme it checks three things:
  * the dependent-chain issue interval: 2 cycles with prediction, 3 without;
  * the issue of a load's consumer: 1 cycle after the load data with load prediction, 2 cycles after without;
  * a random four-thread run of 1200 instructions: in-order commit, no issue before the operands are written back, no waiting instruction in the issue queue under DelayALL, and no waiting ACE instruction under the Delay schemes.

  It also requires that early dispatch, un-ACE bypass, out-of-order dispatch, dispatch congestion, load re-timing and reservation-limited allocation each occur at least once. It runs in under a second.

* `tb_orbit_workloads`: three kinds of four-thread mix under all six schemes, with the same correctness checks:
  * CPU: four compute-bound threads, 15 % loads, nearly all L1 hits;
  * MEM: four memory-bound threads, 30 % loads, a quarter of them going to memory;
  * MIX: two of each.

  It prints cycles and mean waiting issue-queue entries per run.

A typical random run of `tb_orbit_core` prints the mean number of waiting issue-queue entries per scheme. This number is close to zero for DelayALL and the Predict schemes. It is larger for the DelayACE variants, whose un-ACE instructions may wait in the queue. These runs use a synthetic instruction mix, not real programs, and say nothing about the reported speed or reliability numbers.
