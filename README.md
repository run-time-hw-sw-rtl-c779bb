# Run-time HW/SW scheduler for data-flow graphs

A data-flow application (one image per period, for example) is a graph of tasks.
A run-time partitioner decides, period by period, which task runs on the
**master processor**, on the **slave processor** or on a **reconfigurable unit
(RCU)**, and the tasks' execution times change with the input data. After every
such change the system needs a new schedule: an order of the tasks on each
processor and the resulting total execution time, which tells whether the new
mapping meets the real-time budget.

Computing that schedule in software costs milliseconds, a large fraction of the
period itself. This RTL computes it in hardware, in **one clock cycle per
graph level or per software task**: 11 cycles for the 20-task example graph.
The result is the total time, the start order (as a dependency matrix an
executive can turn into task queues), and the number of tasks on each processor.

## The scheduling rule

Hardware tasks each get their own tile on the RCU, so they never wait for each
other: a hardware task starts as soon as all its predecessors have finished.

A processor runs one task at a time. Whenever several tasks could be started on
the same processor, the scheduler picks one by three criteria, in order:

1. **earliest start (ASAP)**: `max(latest predecessor finish, time at which the
   processor becomes free)`;
2. **largest urgency** (below);
3. **execution time**: by default the *shorter* task first (see "Tie rule").

Remaining ties go to the lowest task number.

### Urgency

A software task is urgent when work on *another* unit waits for it. Its urgency
is the largest execution time among its successors that run on a different
unit. If a successor runs on the same unit, that successor's own urgency is
passed back instead, so a chain of same-unit tasks inherits the urgency of the
first other-unit task behind it:

    urgency(t) = max over successors s of
                   Texe(s)        if unit(s) != unit(t)
                   urgency(s)     if unit(s) == unit(t)

Example: A (master, 5) feeds B (slave, 3) and C (slave, 7); C feeds D (RCU, 13).
B and C are both ready at time 5 on the slave. Urgency(C) = 13, urgency(B) = 0,
so C runs first: C 5-12, D 12-25, B 12-15, total 25. The other order would give
B 5-8, C 8-15, D 15-28, total 28.

### Tie rule

The rule for the third criterion is stated two ways in the original description:
as "longest task first" in the algorithm, and as a minimum over the tasks'
finishing times in the manager's block diagram. Only the second reproduces the
published schedule and total (58) of the 20-task example, so it is the default
(`TIE_MAX_TEXE = 0`). `TIE_MAX_TEXE = 1` gives "longest task first", which is
what the published 6-task example shows. Both are tested.

## How the hardware evaluates the rule

The scheduler does not simulate time; it walks the graph. Every task has a node
(`task_ip`) with two registers, *done* and *finishing time*. In each clock cycle:

* every task whose predecessors are all done is *ready*;
* every ready **RCU** task is scheduled at once: finishing time =
  latest predecessor finish + Texe;
* each processor manager (`task_manager`) picks **one** ready task of its
  processor by the three criteria; its finishing time = ASAP + Texe, and the
  processor's total-time register takes this value, so the next task on that
  processor cannot start earlier.

So a cycle schedules all ready RCU tasks plus up to one master and one slave
task. A run takes at least as many cycles as the longest chain of the graph (all
on the RCU: 10 cycles for the 20-task graph) and at most the number of tasks
(all on one processor: 20 cycles).

"Ready" here means *ready in scheduling order*, not in time. Times enter only
through the ASAP value, which includes both the predecessors' finishing times
and the processor's total time. That is why a task that becomes ready a cycle
later can still win over tasks that were already waiting: in the 20-task
example, task 6 becomes ready one cycle after tasks 15 and 16, but all three
have ASAP 29 (the master is busy until then), and task 6 wins on urgency.

### The scheduled matrix

Dependencies are an N x N bit matrix, **row = predecessor, column = successor**.
`dfg_update` keeps a second matrix of added edges: when a processor schedules
task t, row t gets a 1 for every other task that was ready on the same processor
in that cycle, since those now run after t. The output is the OR of the graph and
the added edges. For the 20-task example the added edges are 5->15, 5->16,
6->15, 6->16 and 16->15. An executive reads the rows to fill per-unit queues:
a task may start when every task in its column is done.

### Module structure

    hw_scheduler              top
      dfg_ip_sched  u_nodes   one task_ip per task + graph wiring:
                              predecessor AND/max, urgency network, Texe_Total, all_done
      task_manager  u_ms      master processor manager
      task_manager  u_sl      slave processor manager
      dfg_update    u_update  added-edge matrix
    sched_pkg                 unit encoding, graph type, default 20-task graph

The graph is a **parameter**: the wiring between nodes is generated from it, so
a different graph means a new elaboration (the mapping and the execution times
are run-time inputs). The urgency network is combinational and follows the
graph only along real edges, so it has no loops for an acyclic graph; its depth
is the longest chain of same-unit tasks.

## Interface of `hw_scheduler`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous, active high; scheduling starts the cycle after it is released |
| `sw` | in | N | 1: task runs on the master |
| `hw` | in | N | with `sw`=0: 1 = RCU, 0 = slave |
| `texe` | in | N x W | execution time of each task (0 = deleted task) |
| `texe_total` | out | W | total execution time (max finishing time) |
| `all_done` | out | 1 | every task scheduled; outputs valid |
| `scheduled_dfg` | out | N x N | graph plus added order edges |
| `nb_task`, `nb_task_slave` | out | clog2(N+1) | tasks placed on master / slave |

Usage: hold `sw`, `hw`, `texe` stable, pulse `rst`, wait for `all_done`. To
reschedule with new inputs, pulse `rst` again. Times are unsigned W-bit values in
any unit (the examples use milliseconds); they wrap at 2^W, so W must cover the
total.

Parameters: `N` (20), `W` (16), `DFG` (default `sched_pkg::ICAM_COMPLEX_DFG`,
the 20-task graph; the graph type holds up to 32 tasks, task k of a drawing is
index k-1), `TIE_MAX_TEXE` (0).

To use another graph, build a `sched_pkg::dfg_t` with a constant function
(see `icam_complex_dfg` and `add_edge` in `sched_pkg`) and pass it as `DFG`.

## Verified results

| case | tasks | result | cycles |
|---|---|---|---|
| 20-task motion detection, 9 RCU / 8 master / 3 slave tasks | 20 | total 58, five added edges as published | 11 |
| same graph, all on the RCU | 20 | longest path | 10 |
| same graph, all on the master | 20 | sum of times | 20 |
| 10-task sequential motion detection | 10 | total 47 | 10 |
| 30-task robotic vision (3-scale keypoint pyramid) | 30 | total 10939 | 11 |
| 20-task case built with 10-bit and 32-bit times | 20 | total 58, same matrix | 11 |
| 6-task example, both tie rules | 6 | B->C plus F->E (longest first) or E->F (default) | - |
| 300 random mappings/times, some tasks deleted | 20 | equal to a behavioural model | equal, within 10..20 |

The 11 cycles of the 20-task case equal the published hardware scheduling time
of that application at its published clock (0.563 us at 19.54 MHz); the 10
cycles of the 10-task chain match likewise (0.418 us at 23.94 MHz). For the
robotic-vision graph the published total is 10943; the graph as used here gives
10939, exactly the sum of its longest chain
(1+115+2500+2500+4700+180+900+43), so the 4 ms difference lies in the graph
data, not in the scheduling. Its published scheduling time corresponds to 16
cycles averaged over several mappings; the one mapping simulated here takes 11.

## Where this RTL departs from, or adds to, the original description

* **Communication times** on graph edges are ignored: the per-task node has no
  input for them, and the published 58 is reached without them.
* **Tie rule**: default follows the block diagram and the published results, not
  the algorithm text (see above).
* **Final tie** after the three criteria: lowest task index (unspecified).
* **SW/HW coding** of the three units: `sw`=1 master, `sw`=0 `hw`=1 RCU,
  `sw`=0 `hw`=0 slave (the pair is given, its coding is not).
* **Added edges** are written per processor; the update diagram merges both
  processors' writes through one OR, which would create master/slave edges in a
  cycle that schedules on both.
* **Scheduled matrix** is an output port, not a pointer into memory.
* **Reset**: synchronous, active high, also used to start a new run.
* The graph is stored as a parameter rather than a loadable register matrix.

Not part of this RTL: the two processors, the RCU fabric and its partial
reconfiguration, the shared and context memories, the DMA and buses, the
run-time partitioner that produces the mapping, and the executive that turns the
matrix into task queues.

## Files

* `rtl/sched_pkg.sv` - unit encoding, graph type, default graph.
* `rtl/task_ip.sv` - one task node.
* `rtl/dfg_ip_sched.sv` - node array and graph wiring.
* `rtl/task_manager.sv` - processor manager (used for master and slave).
* `rtl/dfg_update.sv` - added-edge matrix.
* `rtl/hw_scheduler.sv` - top.
* `tb/sched_ref_pkg.sv` - behavioural reference model used by the testbenches.
* `tb/tb_task_ip.sv`, `tb/tb_task_manager.sv`, `tb/tb_dfg_update.sv`,
  `tb/tb_dfg_ip_sched.sv` - block tests.
* `tb/tb_hw_scheduler.sv` - end-to-end test at the default size.
* `tb/tb_workloads.sv` - the 10-, 30- and 6-task graphs, and the 20-task graph at
  10- and 32-bit time widths.

Each testbench prints `TB_RESULT checks=<n> failures=<m>`.

## Simulating

With Verilator 5: name the packages and the testbench, and let `-y` find the
modules:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
      rtl/sched_pkg.sv tb/sched_ref_pkg.sv tb/tb_hw_scheduler.sv \
      --top-module tb_hw_scheduler -o sim
    ./obj_dir/sim

Replace `tb_hw_scheduler` by any other testbench name. Every test finishes in
well under a second. `task_manager` carries assertions that exactly one ready
task is selected whenever one is ready.
