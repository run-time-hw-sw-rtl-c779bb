// dfg_update: builds the scheduled dependency matrix.
//
// The original graph is a constant N x N matrix (row = predecessor, column =
// successor). Scheduling imposes a total order on each processor, which this
// block records as extra edges in a "new successors" register matrix: in every
// cycle where the master manager schedules task t, row t receives a 1 in the
// column of every other master task that was ready in that cycle
// (sw_ready XOR task_sched_sw); the same is done for the slave. The output is the
// OR of the original and the new matrix.
//
// Interface: one-hot task_sched_* and the enable of each manager, the ready
// vectors seen by the managers. Timing: the new edges appear one clock edge after
// the scheduling decision; synchronous active-high reset clears them.
//
// XOR of ready and scheduled vectors, OR of the enables, the new-successors
// register matrix and the final OR with the original matrix follow the update
// block's diagram. Writing master and slave edges into their own rows separately
// (the diagram merges both through one OR) is this design's choice, so that a
// cycle scheduling on both processors cannot create a cross-processor edge.
module dfg_update
  import sched_pkg::*;
#(
  parameter int unsigned N   = 20,
  parameter dfg_t        DFG = ICAM_COMPLEX_DFG
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [N-1:0]        sw_ready,
  input  logic [N-1:0]        sl_ready,
  input  logic [N-1:0]        task_sched_sw,
  input  logic [N-1:0]        task_sched_sl,
  input  logic                sw_enable,
  input  logic                sl_enable,
  output logic [N-1:0][N-1:0] scheduled_dfg
);

  logic [N-1:0][N-1:0] new_succ;
  logic [N-1:0]        sw_others, sl_others;

  assign sw_others = sw_ready ^ task_sched_sw;
  assign sl_others = sl_ready ^ task_sched_sl;

  always_ff @(posedge clk) begin
    if (rst) begin
      new_succ <= '0;
    end else if (sw_enable || sl_enable) begin
      for (int t = 0; t < N; t++) begin
        if (sw_enable && task_sched_sw[t]) new_succ[t] <= new_succ[t] | sw_others;
        if (sl_enable && task_sched_sl[t]) new_succ[t] <= new_succ[t] | sl_others;
      end
    end
  end

  for (genvar r = 0; r < N; r++) begin : g_row
    assign scheduled_dfg[r] = new_succ[r] | DFG[r][N-1:0];
  end

endmodule
