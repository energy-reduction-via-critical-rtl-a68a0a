# Criticality-steered integer core: energy saving through critical path prediction

Only the instructions on a program's critical path set its execution time: a
chain of dependent instructions that the machine must execute one after the
other. Every other instruction has slack, so it can take longer without
delaying the program. This core uses that slack to save energy. It has two
kinds of integer functional unit built from the same circuit:

* **fast units** run at full supply voltage and clock, with a latency of 1 cycle;
* **slow units** run at a lower voltage and half the clock, with a latency of 2 cycles.

A small predictor guesses, per static instruction, whether the instruction is
critical. Predicted-critical instructions go to the fast units and everything
else to the slow ones. If the prediction is good, most instructions run on
low-voltage units and the execution time barely grows. The main configuration
is:

* an 8-wide out-of-order core built around a 64-entry register update unit (RUU);
* 3 fast and 3 slow integer units, with the slow units pipelined;
* a 4096-entry predictor of 3-bit counters with a threshold of 5.

The RTL covers this integer execution core. It does not include the rest of a
processor: fetch, branch prediction, caches, loads and stores, and
floating point.

## How an instruction moves through the core

```
            decoded group (<= 8)            commit (<= 8, in order)
                  |                                   ^
                  v                                   |
   lk_pc --> +-----------+  predictions  +-------------------------+
   CPP buffer|cpp_buffer |-------------->|           ruu           |
   training  |  4K x 3b  |<--------------|  64 entries, renaming,  |
             +-----------+  up_pc/up_crit|  wakeup, QOLD marking   |
                                         |  crit_steer select      |
                                         +-------------------------+
                                           |  fu_req      ^ fu_res (result buses)
                          +----------------+--------------+---------------+
                          v                v              v               v
                    fast_fu x3 (1 cycle)               slow_fu x3 (2 cycles)
```

1. **Insert.** When at least 8 RUU entries are free (`in_ready`), a group of
   up to 8 decoded instructions is written at the RUU tail.
   * Each source register is renamed to the RUU entry that will produce it.
     The source instead gets its value straight away from one of three
     places: the register file, a producer that has already finished, or a
     result bus active in the same cycle.
   * Dependences inside the group are handled in slot order.
   * The CPP buffer is looked up with each PC in the same cycle, and the
     prediction is stored in the entry.
2. **Wake up and bypass.** Every functional unit drives a result bus. A
   waiting operand takes its value from the bus that carries its tag. An
   instruction whose last operand appears on a bus can issue in that same
   cycle, using the bus value. So dependent instructions behind a fast unit
   issue back to back, and behind a slow unit every second cycle.
3. **Issue and steer** (`crit_steer`). Ready instructions are considered
   oldest first, up to 8 per cycle.
   * A predicted-critical instruction takes a free fast unit.
   * A non-critical instruction takes a free slow unit.
   * If no unit of the preferred kind is left, the instruction takes a unit
     of the other kind.

   This gives four outcomes:

   | prediction | unit | name | effect |
   |---|---|---|---|
   | non-critical | slow | NS | the intended saving |
   | critical | slow | CS | may lengthen execution |
   | non-critical | fast | NF | wastes energy |
   | critical | fast | CF | the intended speed |

   A CS outcome needs more than three predicted-critical instructions ready in
   the same cycle. That is rare, because the QOLD heuristic (below) trains
   only about one instruction per cycle as critical.
4. **QOLD marking** (`qold_detector`). Each cycle, the oldest RUU entry not
   yet dispatched to a unit has its sticky `crit_mark` bit set. This is the
   instruction the machine is waiting for. Entries that are executing or
   finished are skipped: in an RUU they stay in the queue until commit, but
   they are no longer holding anything up.
5. **Commit and train.** Up to 8 finished instructions leave from the head in
   program order. Each one writes the register file and trains the CPP
   buffer: its counter goes up by one if it was ever marked, and down by one
   otherwise.

## The CPP buffer

`cpp_buffer` is a direct-mapped table of `CPP_ENTRIES` saturating up/down
counters, each `CPP_CTR_BITS` wide. PC bits `[log2(CPP_ENTRIES)+1 : 2]` form
the index: instructions are 4 bytes, and no tag is stored. So two PCs that are
a multiple of 16 KB apart share a counter. This aliasing is deliberate in the
end-to-end test, which uses it to create bursts of predicted-critical
instructions.

An instruction is predicted critical when its counter is at least
`CPP_THRESH` (5 of 0..7). With 3-bit counters, an instruction must have been
marked in most of its recent executions before it counts as critical. One
unmarked execution (7 to 6) does not change the prediction.

The ports are:

* 8 lookup ports: combinational, and they see the table as it was before this
  cycle's training;
* 8 training ports: written at the clock edge.

Several training requests to one counter in one cycle are applied one after
the other in port order, so the result is the same as if they came in
consecutive cycles.

The table has no per-counter reset, so it can map onto a RAM. After reset it
clears itself, one counter per cycle, for `CPP_ENTRIES` cycles (4096 by
default). During that sweep every lookup answers non-critical and training is
ignored. `cpp_ready` then rises. The core runs correctly during the sweep, only
without steering.

## Fast and slow units

Both kinds instantiate the same `alu_core`. It provides add, sub, and, or,
xor, sll, srl, sra, slt and sltu on 32-bit operands. The second operand is
either a register or a 32-bit immediate.

* `fast_fu` registers the ALU result. The result is on its bus one cycle after
  issue.
* `slow_fu` adds a second register stage, so the result is on its bus two
  cycles after issue. The slow unit runs at half speed, and in the core's
  clock that is simply two cycles.
  * With `PIPELINED=1` (the default) it accepts an operation every cycle.
  * With `PIPELINED=0` it drops `ready` for the cycle after an issue, so its
    throughput is halved.

The steering logic treats a not-ready slow unit as taken.

The whole core runs on one clock. The separate supply voltage and clock of the
slow units are physical properties, and the RTL shows them only as latency.
The RTL does not contain:

* level converters between the supply domains;
* the clock generator.

## Timing summary

| event | cycle |
|---|---|
| group presented with `in_ready`=1 | t (accepted at the edge ending t) |
| earliest issue | t+1 |
| fast result on bus / dependant issues | issue+1 |
| slow result on bus / dependant issues | issue+2 |
| earliest commit (`cm_valid`) | cycle after the result bus |
| counter updated | edge ending the commit cycle |

A chain of 64 dependent instructions that are all predicted critical takes 67
cycles from insertion to the last commit. The same chain predicted
non-critical takes 131 cycles.

## Parameters (`crit_core`)

| parameter | default | meaning |
|---|---|---|
| `ENTRIES` | 64 | RUU entries (power of two) |
| `DISPATCH_W`, `ISSUE_W`, `COMMIT_W` | 8 | instructions per cycle inserted / issued / committed |
| `N_FAST`, `N_SLOW` | 3, 3 | functional units of each kind (each at least 1) |
| `SLOW_PIPELINED` | 1 | slow units accept one operation per cycle (0: one per two cycles) |
| `CLUSTERED` | 0 | 1 selects the split-queue variant |
| `FAST_Q`, `SLOW_Q` | 16, 48 | queue sizes of the split variant (any size up to 128) |
| `SLOW_Q_HALF` | 1 | split variant: the slow queue issues only every second cycle |
| `CPP_ENTRIES` | 4096 | predictor counters (power of two) |
| `CPP_CTR_BITS`, `CPP_THRESH` | 3, 5 | counter width and prediction threshold |

Other predictor sizes, for example 65536 entries, are a parameter change. So
are other mixes of fast and slow units, as long as each kind has at least one
unit. The data width (32) and the register count (32) are in `cpp_pkg`.

## Interface of `crit_core`

* `in_valid[8]`, `in_instr[8]` (`instr_t`: `pc`, `op`, `rd`, `rs1`, `rs2`,
  `use_imm`, `imm`), `in_ready`: the whole group is accepted at the next edge
  when `in_ready` is 1. Valid slots need not be contiguous: they take
  consecutive entries in slot order.
* `cm_valid[8]`, `cm_pc`, `cm_rd`, `cm_value`: the instructions committing at
  the next edge, in program order.
* `fast_issue`, `fast_req_crit`, `fast_req_byp` (per fast unit) and the
  `slow_*` equivalents report, for each cycle:
  * whether the unit issued;
  * the prediction of the instruction it received;
  * whether an operand came off a result bus.

  Counting these gives the NS/CS/NF/CF distribution.
* `ins_cross` (split variant only, otherwise 0): see above.
* `qold_found`: an instruction is marked critical this cycle.
* `cpp_ready`: the predictor's clear sweep has finished.

Reset (`rst_n`) is asynchronous and active low. The register file, the rename
map and all RUU entries reset to zero.

## What is this design's own choice

The following points are design decisions of this RTL, not given by the
technique itself:

* The PC hash (plain bit selection).
* The threshold is read as "counter >= 5". The table is described both as
  predicting critical when the counter "exceeds" the threshold and as having a
  threshold "at which" an instruction becomes critical; the second reading was
  followed.
* Counter clearing after reset.
* Training at commit.
* Oldest-first select, and allocating the lowest-numbered free unit first.
* An instruction being dispatched is still marked by QOLD in that cycle.
* A group is accepted only when 8 entries are free.
* The ALU operation set and encoding.
* All registers are ordinary registers: there is no hard-wired zero.
* The slow clock domain is folded into the core clock as a 2-cycle latency.
* Split variant: the 8-free-entries rule for each queue, the sequence-number
  merge at commit, and a half-rate slow queue made by issuing every second
  cycle.

## Split-queue variant (`CLUSTERED=1`)

The central RUU above is the default. Setting `CLUSTERED=1` builds a variant
that splits the instruction queue into two. The queue is one of the most
power-hungry structures, so this lets most of it run at low voltage too.

* **Two clusters.** Each cluster has its own queue (`cluster_queue`) and its
  own units:
  * fast: `FAST_Q`=16 entries and the 3 fast units;
  * slow: `SLOW_Q`=48 entries and the 3 slow units.

  About 70-80% of instructions are expected to be predicted non-critical,
  which is why the slow queue is the larger one.
* **Queue chosen at insert.** The prediction picks the queue when an
  instruction is inserted. After that there is no fallback: a fast unit
  only ever receives predicted-critical instructions.
* **Half-rate slow queue.** The slow queue sits in the half-speed domain, so
  it selects instructions only every second cycle (`SLOW_Q_HALF=1`). This is
  the main performance cost of the split.
* **Inter-cluster bypass delay.** A result produced in one cluster reaches
  waiting instructions in the other cluster one cycle later than in its own
  cluster. `split_core` keeps a registered copy of each cluster's result
  buses for this.
* **Shared parts.** `split_core` keeps one rename map, one register file and
  the CPP buffer for both clusters.
  * Each instruction gets an 8-bit sequence number.
  * Commit merges the two queue heads back into program order by sequence
    number.
  * QOLD marks the older of the two queues' oldest undispatched
    instructions.
* **Insert stall.** A group is accepted only when each queue has 8 free
  entries. Entries stay in a queue until commit.
* **`ins_cross` output.** It flags inserted instructions that wait for a value
  still in flight in the other cluster. Counting it gives the share of
  inter-cluster dependences.

In the default test program, the split core needs about 14,000 cycles where
the central RUU needs about 11,000. That cost is why the central RUU is the
default.

The whole variant runs on one clock. The real slow cluster would have its
own clock domain, which brings two extra parts that are not modelled:

* the small synchronising FIFOs between the clusters;
* the extra synchronising delay they add when the slow units are not
  pipelined.

## Not included

* Fetch, branch prediction, caches, the load/store queue, floating-point units
  and memory instructions.
* Level converters, supply and clock generation.
* Clusters with zero units of one kind (the 0fast/6slow mix): each kind needs
  at least one unit.

## Files

| file | content |
|---|---|
| `rtl/cpp_pkg.sv` | widths, `alu_op_t`, `instr_t`, unit request/result structs |
| `rtl/crit_core.sv` | top: CPP buffer + RUU + 3 fast + 3 slow units, or `split_core` |
| `rtl/split_core.sv` | split-queue variant: renaming, commit merge, inter-cluster delay |
| `rtl/cluster_queue.sv` | instruction queue of one cluster |
| `rtl/ruu.sv` | register update unit |
| `rtl/crit_steer.sv` | oldest-first select with criticality steering |
| `rtl/qold_detector.sv` | oldest undispatched entry (RUU or one cluster queue) |
| `rtl/cpp_buffer.sv` | critical path prediction buffer |
| `rtl/fast_fu.sv`, `rtl/slow_fu.sv`, `rtl/alu_core.sv` | functional units |
| `tb/*_tb.sv` | one self-checking testbench per module; `tb/alu_ref_pkg.sv` is an independent ALU model |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It has
a watchdog. For example, for the full core at its default size:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cpp_pkg.sv tb/crit_core_tb.sv \
          --top-module crit_core_tb
./obj_dir/Vcrit_core_tb
```

For the unit-level testbenches, also put `tb/alu_ref_pkg.sv` after
`rtl/cpp_pkg.sv`. The other files are found through `-Irtl -Itb`.

`crit_core_tb` runs the default configuration end to end in two phases, and
checks every committed value against a sequential model:

* **Phase 1:** 150 iterations of a 64-instruction random loop body.
* **Phase 2:** 150 iterations of a loop made of a 48-instruction dependence
  chain followed by 16 independent instructions. The independent
  instructions alias onto the chain's counters, which forces critical-to-slow
  fallbacks.

The test also requires each of these to happen at least once: CF, CS, NF, NS,
bypass, QOLD marking and a full RUU. A typical run commits 19,200
instructions in about 11,000 cycles.

`split_core_tb` runs the same two-phase program on `split_core` at its
default size and checks every commit the same way. It also checks that no
instruction ever issues to the other cluster's units, and that the slow
queue never issues in two consecutive cycles. It requires each of these to
happen at least once: critical-to-fast and non-critical-to-slow issues,
bypass, QOLD marking, a full queue and an inter-cluster dependence.
