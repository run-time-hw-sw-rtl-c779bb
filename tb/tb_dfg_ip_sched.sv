// tb_dfg_ip_sched: self-checking test of the task-node array.
//
// The testbench plays the two processor managers itself, so the node array is
// tested on its own. Four small graphs (A..E = tasks 0..4):
//   (a) A(MS,5) -> B(SL,3), A -> C(SL,7), C -> D(HW,13):   urgency(C) = 13
//   (b) A(MS,5) -> B(SL,3), A -> C(SL,7), B -> D(MS,5):    urgency(B) = 5
//   (c) A(MS,5) -> B(MS,3), A -> C(MS,7), B -> D(HW,8), C -> E(SL,2):
//       urgency(B) = 8, urgency(C) = 2
//   (d) A(MS,4) -> B(MS,6) -> C(HW,9), D, E unconnected:  urgency(A) = 9
//       (fed back through B, which runs on the same unit as A)
// On graph (a) it replays two slave orders: B before C must give a total of 28,
// C before B a total of 25; all_done must rise and the cycle counts must be
// 4 (B, C one after the other on the slave, D after C). Per-task finishing times
// are checked against hand-computed values.
module tb_dfg_ip_sched;
  import sched_pkg::*;

  localparam int N = 5;
  localparam int W = 16;

  function automatic dfg_t mk(input int which);
    dfg_t g;
    g = '0;
    case (which)
      0: begin g[0][1] = 1; g[0][2] = 1; g[2][3] = 1; end
      1: begin g[0][1] = 1; g[0][2] = 1; g[1][3] = 1; end
      2: begin g[0][1] = 1; g[0][2] = 1; g[1][3] = 1; g[2][4] = 1; end
      default: begin g[0][1] = 1; g[1][2] = 1; end
    endcase
    return g;
  endfunction

  logic clk = 1'b0, rst;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Per-graph signal bundles.
  logic [3:0][N-1:0]        sw, hw, done, sw_ready, sl_ready, hw_ready, sched_sw, sched_sl;
  logic [3:0][N-1:0][W-1:0] texe, asap, fcand, ftime, urg;
  logic [3:0][W-1:0]        sw_tot, sl_tot, total;
  logic [3:0]               all_done;

  for (genvar k = 0; k < 4; k++) begin : g_dut
    dfg_ip_sched #(.N(N), .W(W), .DFG(mk(k))) dut (
      .clk, .rst, .sw(sw[k]), .hw(hw[k]), .texe(texe[k]),
      .sw_total_time(sw_tot[k]), .sl_total_time(sl_tot[k]),
      .task_sched_sw(sched_sw[k]), .task_sched_sl(sched_sl[k]),
      .done(done[k]), .sw_ready(sw_ready[k]), .sl_ready(sl_ready[k]), .hw_ready(hw_ready[k]),
      .asap(asap[k]), .finish_cand(fcand[k]), .finish_time(ftime[k]), .urgency(urg[k]),
      .texe_total(total[k]), .all_done(all_done[k]));
  end

  // Manager stand-in: select, in priority order prio (task indices), the first
  // ready task of each processor; update the processor totals at the edge.
  int prio [4][N];
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      sched_sw[k] = '0;
      sched_sl[k] = '0;
      for (int j = N - 1; j >= 0; j--) begin
        if (sw_ready[k][prio[k][j]]) begin sched_sw[k] = '0; sched_sw[k][prio[k][j]] = 1'b1; end
        if (sl_ready[k][prio[k][j]]) begin sched_sl[k] = '0; sched_sl[k][prio[k][j]] = 1'b1; end
      end
    end
  end
  always_ff @(posedge clk)
    for (int k = 0; k < 4; k++) begin
      if (rst) begin
        sw_tot[k] <= '0; sl_tot[k] <= '0;
      end else begin
        for (int t = 0; t < N; t++) begin
          if (sched_sw[k][t]) sw_tot[k] <= fcand[k][t];
          if (sched_sl[k][t]) sl_tot[k] <= fcand[k][t];
        end
      end
    end

  // unit: 0 = MS, 1 = SL, 2 = HW
  task automatic set_task(input int k, input int t, input int unit, input int tx);
    sw[k][t] = (unit == 0);
    hw[k][t] = (unit == 2);
    texe[k][t] = W'(tx);
  endtask

  task automatic run(output int cycles);
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    cycles = 0;
    while (!(&all_done) && cycles < 50) begin
      @(posedge clk); #1 cycles++;
    end
  endtask

  initial begin
    int cycles;
    rst = 1'b1;
    sw = '0; hw = '0; texe = '0;
    for (int k = 0; k < 4; k++) for (int j = 0; j < N; j++) prio[k][j] = j;
    // (a)
    set_task(0, 0, 0, 5); set_task(0, 1, 1, 3); set_task(0, 2, 1, 7); set_task(0, 3, 2, 13); set_task(0, 4, 2, 0);
    // (b)
    set_task(1, 0, 0, 5); set_task(1, 1, 1, 3); set_task(1, 2, 1, 7); set_task(1, 3, 0, 5); set_task(1, 4, 2, 0);
    // (c)
    set_task(2, 0, 0, 5); set_task(2, 1, 0, 3); set_task(2, 2, 0, 7); set_task(2, 3, 2, 8); set_task(2, 4, 1, 2);
    // (d)
    set_task(3, 0, 0, 4); set_task(3, 1, 0, 6); set_task(3, 2, 2, 9); set_task(3, 3, 2, 1); set_task(3, 4, 1, 1);
    #1;
    // Ungated urgencies, read inside the node array.
    check(g_dut[0].dut.g_task[2].urg == 13, "(a) urgency C, expected 13");
    check(g_dut[0].dut.g_task[1].urg == 0,  "(a) urgency B = 0");
    check(g_dut[1].dut.g_task[1].urg == 5,  "(b) urgency B, expected 5");
    check(g_dut[1].dut.g_task[2].urg == 0,  "(b) urgency C = 0");
    check(g_dut[2].dut.g_task[1].urg == 8,  "(c) urgency B, expected 8");
    check(g_dut[2].dut.g_task[2].urg == 2,  "(c) urgency C, expected 2");
    check(g_dut[3].dut.g_task[0].urg == 9,  "(d) urgency A, expected 9 (feedback)");
    check(g_dut[3].dut.g_task[1].urg == 9,  "(d) urgency B = 9");

    // Gated urgency (critical time) at the outputs: only ready processor tasks.
    // After a reset edge no task is done, so tasks without predecessors are ready.
    @(posedge clk); #1;
    check(urg[0][0] == 7 && urg[3][0] == 9, "critical time: ready A of (a) shows 7, of (d) shows 9");
    check(urg[0][2] == 0, "critical time: C of (a) not ready shows 0");
    // Graph (a), B before C on the slave.
    prio[0] = '{0, 1, 2, 3, 4};
    run(cycles);
    check(all_done[0], "(a) B first: all_done");
    check(total[0] == 28, $sformatf("(a) B first: total %0d, expected 28", total[0]));
    check(ftime[0][1] == 8 && ftime[0][2] == 15 && ftime[0][3] == 28, "(a) B first: finishing times 8/15/28");
    check(cycles == 4, $sformatf("(a) B first: %0d cycles, expected 4", cycles));
    // Graph (a), C before B.
    prio[0] = '{0, 2, 1, 3, 4};
    run(cycles);
    check(total[0] == 25, $sformatf("(a) C first: total %0d, expected 25", total[0]));
    check(ftime[0][2] == 12 && ftime[0][1] == 15 && ftime[0][3] == 25, "(a) C first: finishing times 12/15/25");
    check(ftime[0][0] == 5, "(a) A finishes at 5");
    // Graph (d): sequential master chain then hardware.
    check(ftime[3][0] == 4 && ftime[3][1] == 10 && ftime[3][2] == 19, "(d) finishing times 4/10/19");
    check(total[3] == 19, "(d) total 19");
    // Graph (c): all master tasks in order A, B, C; D on the RCU after B; E on the slave after C.
    check(ftime[2][1] == 8 && ftime[2][2] == 15 && ftime[2][3] == 16 && ftime[2][4] == 17, "(c) finishing times");
    // Reset clears the node state.
    rst = 1'b1; @(posedge clk); #1;
    check(done == '0 && total == '0, "reset clears done and times");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
