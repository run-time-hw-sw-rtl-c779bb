// hw_scheduler: run-time hardware scheduler for a data-flow graph mapped onto a
// master processor, a slave processor and a reconfigurable unit (RCU).
//
// Given, for every task, where it runs (sw/hw bits) and its measured execution
// time, the scheduler computes a start order and start/finish times for all
// tasks, the total execution time of one period of the application (longest
// path of the mapped graph including the order imposed on each processor), and
// the scheduled dependency matrix that an executive uses to fill its task queues.
//
// Structure:
//   u_nodes  (dfg_ip_sched): one node per task, wired like the graph; schedules
//            every ready hardware task in the same cycle.
//   u_ms     (task_manager): master manager, schedules one ready master task per
//            cycle (min ASAP, then max urgency, then execution time).
//   u_sl     (task_manager): slave manager, the same for the slave.
//   u_update (dfg_update): adds the per-processor order as new edges.
//
// Operation: hold sw, hw and texe stable and release rst; the scheduler starts in
// the first cycle after reset and raises all_done when every task is scheduled.
// Each clock cycle schedules all ready hardware tasks plus at most one master and
// one slave task, so a run takes between the length (in tasks) of the longest
// graph path and the number of tasks, in cycles. To schedule again, e.g. with new
// execution times or a new mapping, pulse rst. A task with texe = 0 is scheduled
// but takes no time (a deleted task). nb_task / nb_task_slave count the tasks
// placed on the master / slave.
//
// Parameters: N tasks, W-bit time values (16 in the reference configuration), the
// graph DFG (default: the 20-task motion-detection graph), and the tie-break rule
// TIE_MAX_TEXE of the managers (see task_manager). The graph is part of the
// hardware: a different graph needs a new elaboration, as with the original
// scheduler; the mapping and the times are run-time inputs.
module hw_scheduler
  import sched_pkg::*;
#(
  parameter int unsigned         N            = 20,
  parameter int unsigned         W            = 16,
  parameter dfg_t                DFG          = ICAM_COMPLEX_DFG,
  parameter bit                  TIE_MAX_TEXE = 1'b0
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [N-1:0]           sw,
  input  logic [N-1:0]           hw,
  input  logic [N-1:0][W-1:0]    texe,
  output logic [W-1:0]           texe_total,
  output logic                   all_done,
  output logic [N-1:0][N-1:0]    scheduled_dfg,
  output logic [$clog2(N+1)-1:0] nb_task,
  output logic [$clog2(N+1)-1:0] nb_task_slave
);

  logic [N-1:0]        done, sw_ready, sl_ready, hw_ready;
  logic [N-1:0][W-1:0] asap, finish_cand, finish_time, urgency;
  logic [N-1:0]        task_sched_sw, task_sched_sl;
  logic                sw_enable, sl_enable;
  logic [W-1:0]        sw_total_time, sl_total_time;

  dfg_ip_sched #(.N(N), .W(W), .DFG(DFG)) u_nodes (
    .clk, .rst, .sw, .hw, .texe,
    .sw_total_time, .sl_total_time,
    .task_sched_sw, .task_sched_sl,
    .done, .sw_ready, .sl_ready, .hw_ready,
    .asap, .finish_cand, .finish_time, .urgency,
    .texe_total, .all_done
  );

  task_manager #(.N(N), .W(W), .TIE_MAX_TEXE(TIE_MAX_TEXE)) u_ms (
    .clk, .rst,
    .ready       (sw_ready),
    .asap, .urgency, .texe, .finish_cand,
    .task_sched  (task_sched_sw),
    .enable      (sw_enable),
    .total_time  (sw_total_time),
    .nb_task     (nb_task)
  );

  task_manager #(.N(N), .W(W), .TIE_MAX_TEXE(TIE_MAX_TEXE)) u_sl (
    .clk, .rst,
    .ready       (sl_ready),
    .asap, .urgency, .texe, .finish_cand,
    .task_sched  (task_sched_sl),
    .enable      (sl_enable),
    .total_time  (sl_total_time),
    .nb_task     (nb_task_slave)
  );

  dfg_update #(.N(N), .DFG(DFG)) u_update (
    .clk, .rst,
    .sw_ready, .sl_ready,
    .task_sched_sw, .task_sched_sl,
    .sw_enable, .sl_enable,
    .scheduled_dfg
  );

endmodule
