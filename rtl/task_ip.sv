// task_ip: the scheduling node of one task of the data-flow graph.
//
// One instance exists per task. It decides when its task is scheduled and what
// start and finishing time the task gets:
//   * ready       = all predecessors are already scheduled (computed outside, from
//                   the graph, and given as preds_done).
//   * ASAP        = max(latest finishing time of the predecessors, current total
//                   time of the task's processing unit). The unit time is the
//                   master's or the slave's running total; a hardware task sees 0,
//                   because every hardware task gets its own tile and runs in
//                   parallel with the others.
//   * a hardware task is scheduled in the first cycle it is ready; a software task
//     is scheduled in the cycle its processor manager selects it (sw_sched /
//     sl_sched).
//   * when scheduled, the "done" register is set and the finishing-time register
//     takes ASAP + Texe.
// The node also publishes its ready flags per unit, its ASAP, its candidate
// finishing time (ASAP + Texe) for the managers, and its critical time: the
// urgency collected from its successors (max_succ_urg), given only while the
// task is ready on a processor and 0 otherwise.
//
// Interface: all times are W-bit unsigned values in the same unit as Texe.
// Timing: synchronous, active-high reset clears "done" and the finishing time;
// scheduling happens at the clock edge at which the node is selected. Outputs
// other than done/finish_time are combinational.
//
// The split into ready logic, done register, ASAP max/mux, adder and
// finishing-time register, and the AND that gates the urgency with the software
// ready flags into the critical time, follow the scheduler's per-task block
// diagram; the exact widths and the reset style are this design's choices.
module task_ip
  import sched_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  // task description (stable during one scheduling run)
  input  logic         sw,             // task mapped to the master processor
  input  logic         hw,             // task mapped to the RCU (when sw = 0)
  input  logic [W-1:0] texe,           // measured execution time
  // from the graph interconnect
  input  logic         preds_done,     // every predecessor is scheduled
  input  logic [W-1:0] max_texe_pred,  // latest finishing time of the predecessors
  input  logic [W-1:0] max_succ_urg,   // urgency collected from the successors
  // from the processor managers
  input  logic [W-1:0] sw_total_time,
  input  logic [W-1:0] sl_total_time,
  input  logic         sw_sched_done,  // master manager picks this task now
  input  logic         sl_sched_done,  // slave manager picks this task now
  // status
  output logic         done,
  output logic         sw_ready,
  output logic         sl_ready,
  output logic         hw_ready,
  output logic [W-1:0] asap,
  output logic [W-1:0] finish_cand,    // ASAP + Texe, offered to the managers
  output logic [W-1:0] finish_time,    // registered finishing time
  output logic [W-1:0] critical_time,  // urgency while ready on a processor
  output unit_e        unit
);

  logic [W-1:0] unit_time;
  logic         sched_now;

  assign unit = unit_of(sw, hw);

  always_comb begin
    sw_ready = (unit == UNIT_MS) && preds_done && !done;
    sl_ready = (unit == UNIT_SL) && preds_done && !done;
    hw_ready = (unit == UNIT_HW) && preds_done && !done;
  end

  always_comb begin
    unique case (unit)
      UNIT_MS: unit_time = sw_total_time;
      UNIT_SL: unit_time = sl_total_time;
      default: unit_time = '0;
    endcase
    asap        = (max_texe_pred > unit_time) ? max_texe_pred : unit_time;
    finish_cand = asap + texe;
  end

  assign critical_time = (sw_ready || sl_ready) ? max_succ_urg : '0;
  assign sched_now = hw_ready || (sw_ready && sw_sched_done) || (sl_ready && sl_sched_done);

  always_ff @(posedge clk) begin
    if (rst) begin
      done        <= 1'b0;
      finish_time <= '0;
    end else if (sched_now) begin
      done        <= 1'b1;
      finish_time <= finish_cand;
    end
  end

endmodule
