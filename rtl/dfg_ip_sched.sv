// dfg_ip_sched: the array of task nodes wired in the shape of the data-flow graph.
//
// There is one task_ip per task. The graph is fixed at elaboration time (DFG
// parameter, row = predecessor, column = successor), so the wiring between nodes
// is plain generate logic; the mapping (sw/hw) and the execution times are
// run-time inputs. For each task t the interconnect provides:
//   * preds_done   = AND of the "done" flags of its predecessors;
//   * max_texe_pred = max of the finishing times of its predecessors;
//   * urgency = max over its successors s of
//       Texe(s)     when s runs on a different unit than t,
//       urgency(s)  when s runs on the same unit (the urgency of a later task on
//                   another unit is fed back through a chain of same-unit tasks).
// Hardware tasks are scheduled by their node as soon as they are ready, so all
// ready hardware tasks go in the same cycle. The urgency output of a task is its
// critical time: the urgency while it is ready on a processor, else 0 (the
// ungated value is kept inside for the feedback). Texe_Total is the largest finishing
// time of all tasks and all_done is the AND of all "done" flags.
//
// Timing: all_done rises one clock edge after the last task is scheduled;
// texe_total is valid from then on. The urgency network is combinational and
// follows the graph, so its depth is the longest chain of same-unit tasks.
//
// The node-per-task structure, the use of predecessors' finishing times and unit
// totals, and the urgency rule follow the scheduler's description. Ignoring the
// communication times on the graph edges is this design's reading: the per-task
// node has no input for them.
module dfg_ip_sched
  import sched_pkg::*;
#(
  parameter int unsigned         N   = 20,
  parameter int unsigned         W   = 16,
  parameter dfg_t                 DFG = ICAM_COMPLEX_DFG
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [N-1:0]        sw,
  input  logic [N-1:0]        hw,
  input  logic [N-1:0][W-1:0] texe,
  input  logic [W-1:0]        sw_total_time,
  input  logic [W-1:0]        sl_total_time,
  input  logic [N-1:0]        task_sched_sw,
  input  logic [N-1:0]        task_sched_sl,
  output logic [N-1:0]        done,
  output logic [N-1:0]        sw_ready,
  output logic [N-1:0]        sl_ready,
  output logic [N-1:0]        hw_ready,
  output logic [N-1:0][W-1:0] asap,
  output logic [N-1:0][W-1:0] finish_cand,
  output logic [N-1:0][W-1:0] finish_time,
  output logic [N-1:0][W-1:0] urgency,
  output logic [W-1:0]        texe_total,
  output logic                all_done
);

  unit_e unit [N];

  for (genvar t = 0; t < N; t++) begin : g_task
    logic         preds_done;
    logic [W-1:0] max_pred;
    logic [W-1:0] urg;
    logic [W-1:0] contrib [N];

    // Predecessor side: readiness and latest predecessor finishing time.
    always_comb begin
      preds_done = 1'b1;
      max_pred   = '0;
      for (int p = 0; p < N; p++)
        if (DFG[p][t]) begin
          preds_done = preds_done & done[p];
          if (finish_time[p] > max_pred) max_pred = finish_time[p];
        end
    end

    // Successor side: urgency. Only real edges are wired, so the network is
    // acyclic whenever the graph is.
    for (genvar s = 0; s < N; s++) begin : g_succ
      if (DFG[t][s]) begin : g_edge
        assign contrib[s] = (unit[s] != unit[t]) ? texe[s] : g_task[s].urg;
      end else begin : g_none
        assign contrib[s] = '0;
      end
    end

    always_comb begin
      urg = '0;
      for (int s = 0; s < N; s++)
        if (contrib[s] > urg) urg = contrib[s];
    end

    task_ip #(.W(W)) u_ip (
      .clk           (clk),
      .rst           (rst),
      .sw            (sw[t]),
      .hw            (hw[t]),
      .texe          (texe[t]),
      .preds_done    (preds_done),
      .max_texe_pred (max_pred),
      .max_succ_urg  (urg),
      .sw_total_time (sw_total_time),
      .sl_total_time (sl_total_time),
      .sw_sched_done (task_sched_sw[t]),
      .sl_sched_done (task_sched_sl[t]),
      .done          (done[t]),
      .sw_ready      (sw_ready[t]),
      .sl_ready      (sl_ready[t]),
      .hw_ready      (hw_ready[t]),
      .asap          (asap[t]),
      .finish_cand   (finish_cand[t]),
      .finish_time   (finish_time[t]),
      .critical_time (urgency[t]),
      .unit          (unit[t])
    );
  end

  always_comb begin
    texe_total = '0;
    for (int t = 0; t < N; t++)
      if (finish_time[t] > texe_total) texe_total = finish_time[t];
  end

  assign all_done = &done;

endmodule
