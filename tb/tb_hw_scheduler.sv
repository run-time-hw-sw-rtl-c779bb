// tb_hw_scheduler: end-to-end test of the scheduler at its default size
// (20 tasks, 16-bit times, the 20-task motion-detection graph).
//
// Runs:
//   1. the published mapping of the 20-task graph (tasks 3,4,7,8,11,12,17,18,20 on
//      the RCU, 2,10,13 on the slave, the rest on the master) with the published
//      execution times: total 58, 8 master / 3 slave tasks, the five added order
//      edges 5->15, 5->16, 6->15, 6->16, 16->15, and 11 scheduling cycles
//      (the published hardware scheduling time, 0.56274 us at 19.54 MHz);
//   2. every task on the RCU: 10 cycles (the longest chain of the graph);
//   3. every task on the master: 20 cycles, total = sum of execution times;
//   4. random mappings and times, some tasks deleted (time 0), each compared
//      with the behavioural reference model: total, matrix, counts, cycles.
// It counts how often each mechanism happened (parallel hardware scheduling,
// both processors in one cycle, urgency and execution-time tie-breaks, urgency
// feedback, deleted tasks, rescheduling) and fails any that never did. Every run
// must take between 10 cycles (longest chain of the graph) and 20 (one task per
// cycle).
module tb_hw_scheduler;
  import sched_pkg::*;
  import sched_ref_pkg::*;

  localparam int N = 20;
  localparam int W = 16;

  logic                   clk = 1'b0;
  logic                   rst;
  logic [N-1:0]           sw, hw;
  logic [N-1:0][W-1:0]    texe;
  logic [W-1:0]           texe_total;
  logic                   all_done;
  logic [N-1:0][N-1:0]    scheduled_dfg;
  logic [$clog2(N+1)-1:0] nb_task, nb_task_slave;

  hw_scheduler dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Watchdog.
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism monitors on the DUT.
  int m_hw_par = 0, m_both = 0, m_urg = 0, m_texe = 0, m_fb = 0, m_del = 0, m_resched = 0;
  always @(posedge clk) if (!rst && !all_done) begin
    if ($countones(dut.hw_ready) >= 2) m_hw_par++;
    if (dut.sw_enable && dut.sl_enable) m_both++;
    if ($countones(dut.u_ms.min_asap_tasks) >= 2 && dut.u_ms.max_ct_tasks != dut.u_ms.min_asap_tasks) m_urg++;
    if ($countones(dut.u_ms.max_ct_tasks) >= 2 && dut.u_ms.tie_tasks != dut.u_ms.max_ct_tasks) m_texe++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Drive a mapping, reset, run to all_done; return measured cycles.
  task automatic run(input int unit[MAXN], input int t[MAXN], output int cycles);
    for (int i = 0; i < N; i++) begin
      sw[i]   = (unit[i] == U_MS);
      hw[i]   = (unit[i] == U_HW);
      texe[i] = W'(t[i]);
    end
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    cycles = 0;
    while (!all_done && cycles < 10 * N) begin
      @(posedge clk);
      #1 cycles++;
    end
    m_resched++;
  endtask

  function automatic bit same_matrix(input graph_t g);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        if (scheduled_dfg[r][c] != g[r][c]) return 0;
    return 1;
  endfunction

  task automatic compare_ref(input int unit[MAXN], input int t[MAXN], input string tag);
    ref_result_t r;
    int cycles;
    graph_t g;
    for (int a = 0; a < MAXN; a++) for (int b = 0; b < MAXN; b++) g[a][b] = ICAM_COMPLEX_DFG[a][b];
    r = run_ref(N, g, unit, t, 1'b0);
    run(unit, t, cycles);
    check(all_done, {tag, ": all_done"});
    check(int'(texe_total) == r.total, $sformatf("%s: total %0d expected %0d", tag, texe_total, r.total));
    check(cycles == r.cycles, $sformatf("%s: cycles %0d expected %0d", tag, cycles, r.cycles));
    check(int'(nb_task) == r.nb_ms && int'(nb_task_slave) == r.nb_sl,
          $sformatf("%s: counts %0d/%0d expected %0d/%0d", tag, nb_task, nb_task_slave, r.nb_ms, r.nb_sl));
    check(same_matrix(r.sdfg), {tag, ": scheduled matrix"});
    // Bounds: the longest chain (10 tasks) and the task count.
    check(cycles >= 10 && cycles <= N, $sformatf("%s: %0d cycles outside 10..%0d", tag, cycles, N));
    m_fb += r.n_feedback;
  endtask

  initial begin
    int unit[MAXN];
    int t[MAXN];
    int cycles;
    graph_t expect_g;
    int sum;
    // Published mapping and times of the 20-task graph (tasks numbered from 1).
    automatic int hw_ids[9] = '{3, 4, 7, 8, 11, 12, 17, 18, 20};
    automatic int sl_ids[3] = '{2, 10, 13};
    automatic int times[20] = '{8, 2, 3, 6, 4, 7, 9, 2, 5, 1, 8, 3, 4, 6, 9, 5, 6, 1, 2, 2};

    rst = 1'b1;
    sw = '0; hw = '0; texe = '0;

    // 1. Published example.
    for (int i = 0; i < MAXN; i++) begin unit[i] = U_MS; t[i] = 0; end
    foreach (hw_ids[k]) unit[hw_ids[k] - 1] = U_HW;
    foreach (sl_ids[k]) unit[sl_ids[k] - 1] = U_SL;
    for (int i = 0; i < N; i++) t[i] = times[i];
    run(unit, t, cycles);
    check(texe_total == 58, $sformatf("example: total %0d, expected 58", texe_total));
    check(nb_task == 8, $sformatf("example: nb_task %0d, expected 8", nb_task));
    check(nb_task_slave == 3, $sformatf("example: nb_task_slave %0d, expected 3", nb_task_slave));
    check(cycles == 11, $sformatf("example: %0d cycles, expected 11", cycles));
    expect_g = '0;
    for (int a = 0; a < N; a++) for (int b = 0; b < N; b++) expect_g[a][b] = ICAM_COMPLEX_DFG[a][b];
    expect_g[4][14] = 1; expect_g[4][15] = 1; expect_g[5][14] = 1; expect_g[5][15] = 1;
    expect_g[15][14] = 1;
    check(same_matrix(expect_g), "example: scheduled matrix differs from the published one");
    compare_ref(unit, t, "example-ref");

    // 2. All tasks on the RCU: one cycle per level, longest chain 10.
    for (int i = 0; i < N; i++) unit[i] = U_HW;
    run(unit, t, cycles);
    check(cycles == 10, $sformatf("all-HW: %0d cycles, expected 10", cycles));
    check(nb_task == 0 && nb_task_slave == 0, "all-HW: processor counts not zero");
    compare_ref(unit, t, "all-HW");

    // 3. All tasks on the master: fully sequential.
    for (int i = 0; i < N; i++) unit[i] = U_MS;
    run(unit, t, cycles);
    sum = 0;
    for (int i = 0; i < N; i++) sum += t[i];
    check(cycles == N, $sformatf("all-MS: %0d cycles, expected %0d", cycles, N));
    check(int'(texe_total) == sum, $sformatf("all-MS: total %0d expected %0d", texe_total, sum));
    check(nb_task == N, "all-MS: nb_task");

    // 4. Random mappings, times and deleted tasks against the reference model.
    for (int run_i = 0; run_i < 300; run_i++) begin
      for (int i = 0; i < N; i++) begin
        unit[i] = $urandom_range(2);
        t[i]    = (run_i % 3 == 0) ? $urandom_range(3) : $urandom_range(40);
        if ($urandom_range(9) == 0) begin t[i] = 0; m_del++; end
      end
      compare_ref(unit, t, $sformatf("random %0d", run_i));
    end

    $display("mechanisms: hw_parallel=%0d both_cpus=%0d urgency_tiebreak=%0d texe_tiebreak=%0d urgency_feedback=%0d deleted=%0d runs=%0d",
             m_hw_par, m_both, m_urg, m_texe, m_fb, m_del, m_resched);
    check(m_hw_par > 0, "no cycle scheduled several hardware tasks");
    check(m_both > 0, "no cycle scheduled on both processors");
    check(m_urg > 0, "urgency never broke an ASAP tie");
    check(m_texe > 0, "execution time never broke an urgency tie");
    check(m_fb > 0, "urgency never fed back through a same-unit successor");
    check(m_del > 0, "no task deleted");
    check(m_resched > 1, "no rescheduling");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
