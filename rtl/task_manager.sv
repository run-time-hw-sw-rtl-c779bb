// task_manager: picks, each clock cycle, the one software task that a processor
// runs next, and keeps that processor's running total time.
//
// One instance serves the master processor and one the slave; both work the same.
// Among the tasks that are ready on this processor (ready[i] = 1) it selects:
//   1. the tasks with the smallest ASAP time;
//   2. among those, the tasks with the largest urgency;
//   3. among those, the task with the smallest finishing time ASAP + Texe, which
//      for equal ASAP is the shortest task (TIE_MAX_TEXE = 0), or the longest
//      task (TIE_MAX_TEXE = 1);
//   4. remaining ties go to the lowest task index.
// The selected task is reported one-hot in task_sched and the total time
// register takes its finishing time at the clock edge. "enable" is high in every
// cycle in which some task is ready, so one software task is scheduled per cycle.
// nb_task counts the tasks scheduled on this processor since reset.
//
// Timing: selection is combinational in the cycle the ready flags are seen; the
// total time and the count are registered (synchronous active-high reset to 0).
//
// The three criteria, their order, and the Min/Max/Comp/And structure follow the
// scheduler's manager block. The step-3 rule is stated two ways: the algorithm
// text keeps the longer task, the manager's diagram takes a minimum over the
// task end times. The default follows the diagram (it reproduces the published
// schedule of the 20-task example); TIE_MAX_TEXE selects the text's rule. The
// lowest-index rule of step 4 is this design's choice.
module task_manager #(
  parameter int unsigned N            = 20,
  parameter int unsigned W            = 16,
  parameter bit          TIE_MAX_TEXE = 1'b0
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [N-1:0]           ready,
  input  logic [N-1:0][W-1:0]    asap,
  input  logic [N-1:0][W-1:0]    urgency,
  input  logic [N-1:0][W-1:0]    texe,
  input  logic [N-1:0][W-1:0]    finish_cand,
  output logic [N-1:0]           task_sched,
  output logic                   enable,
  output logic [W-1:0]           total_time,
  output logic [$clog2(N+1)-1:0] nb_task
);

  logic [W-1:0] min_asap, max_urg, best_tie;
  logic [N-1:0] min_asap_tasks, max_ct_tasks, tie_tasks;
  logic [W-1:0] sel_finish;

  // Criterion 1: minimum ASAP among ready tasks.
  always_comb begin
    min_asap = '1;
    for (int i = 0; i < N; i++)
      if (ready[i] && asap[i] < min_asap) min_asap = asap[i];
    for (int i = 0; i < N; i++)
      min_asap_tasks[i] = ready[i] && (asap[i] == min_asap);
  end

  // Criterion 2: maximum urgency among those.
  always_comb begin
    max_urg = '0;
    for (int i = 0; i < N; i++)
      if (min_asap_tasks[i] && urgency[i] > max_urg) max_urg = urgency[i];
    for (int i = 0; i < N; i++)
      max_ct_tasks[i] = min_asap_tasks[i] && (urgency[i] == max_urg);
  end

  // Criterion 3: execution time.
  always_comb begin
    if (TIE_MAX_TEXE) begin
      best_tie = '0;
      for (int i = 0; i < N; i++)
        if (max_ct_tasks[i] && texe[i] > best_tie) best_tie = texe[i];
      for (int i = 0; i < N; i++)
        tie_tasks[i] = max_ct_tasks[i] && (texe[i] == best_tie);
    end else begin
      best_tie = '1;
      for (int i = 0; i < N; i++)
        if (max_ct_tasks[i] && finish_cand[i] < best_tie) best_tie = finish_cand[i];
      for (int i = 0; i < N; i++)
        tie_tasks[i] = max_ct_tasks[i] && (finish_cand[i] == best_tie);
    end
  end

  // Final pick: lowest index among the remaining tasks.
  always_comb begin
    task_sched = '0;
    sel_finish = '0;
    for (int i = N - 1; i >= 0; i--)
      if (tie_tasks[i]) begin
        task_sched    = '0;
        task_sched[i] = 1'b1;
        sel_finish    = finish_cand[i];
      end
  end

  assign enable = |ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      total_time <= '0;
      nb_task    <= '0;
    end else if (enable) begin
      total_time <= sel_finish;
      nb_task    <= nb_task + 1'b1;
    end
  end

  // Exactly one task is selected whenever one is ready, and it is a ready one.
  a_one_hot: assert property (@(posedge clk) disable iff (rst)
                              enable |-> ($onehot(task_sched) && (task_sched & ~ready) == '0));
  a_idle:    assert property (@(posedge clk) disable iff (rst) !enable |-> task_sched == '0);

endmodule
