// tb_workloads: runs the scheduler on the evaluated applications and on the
// 6-task example graph, each with its own elaborated graph.
//
//   icam_simple   10 tasks, the sequential motion-detection chain, mapped as in
//                 the 20-task example (1,5,6,9 master; 2,10 slave; others RCU):
//                 total 47, 10 cycles (0.41764 us at 23.94 MHz).
//   robotic       30 tasks, keypoint extraction on a 3-level image pyramid, with
//                 the published mapping and times. Expected: the longest chain
//                 of the graph, 1+115+2500+2500+4700+180+900+43 = 10939 (the
//                 published total is 10943), and the cycle count of the reference
//                 model.
//   example6      6 tasks (A..F) with B, C on the slave, A, E, F on the master,
//                 D on the RCU. With TIE_MAX_TEXE = 1 the scheduler must add
//                 B->C and F->E (longer task F first); with the default rule it
//                 adds B->C and E->F (shorter task E first).
//   bus widths    the 20-task graph with its published mapping built with 10-bit
//                 and 32-bit times: total 58 in 11 cycles with both.
// Every result is also compared with the behavioural reference model.
module tb_workloads;
  import sched_pkg::*;
  import sched_ref_pkg::*;

  localparam int W = 16;

  function automatic dfg_t chain10();
    dfg_t g;
    g = '0;
    for (int i = 0; i < 9; i++) g[i][i+1] = 1;
    return g;
  endfunction

  function automatic dfg_t robotic30();
    dfg_t g;
    automatic int e[34][2] = '{'{1,2}, '{1,3}, '{1,4}, '{2,13}, '{13,14}, '{13,16}, '{14,15}, '{14,17},
                     '{14,16}, '{15,17}, '{16,20}, '{17,18}, '{18,19}, '{20,21}, '{3,5}, '{3,7},
                     '{5,6}, '{5,7}, '{5,8}, '{6,8}, '{7,9}, '{9,10}, '{8,11}, '{11,12},
                     '{4,22}, '{22,23}, '{22,24}, '{24,23}, '{24,25}, '{24,26}, '{25,26},
                     '{23,27}, '{27,28}, '{26,29}};
    g = '0;
    foreach (e[k]) g = add_edge(g, e[k][0], e[k][1]);
    g = add_edge(g, 29, 30);
    return g;
  endfunction

  function automatic dfg_t example6();
    dfg_t g;
    g = '0;
    g[0][1] = 1; g[0][2] = 1; g[1][3] = 1; g[2][4] = 1; g[2][5] = 1;
    return g;
  endfunction

  localparam dfg_t G10 = chain10();
  localparam dfg_t G30 = robotic30();
  localparam dfg_t G6  = example6();

  logic clk = 1'b0, rst;
  always #5 clk = ~clk;

  // icam_simple
  logic [9:0]         sw10, hw10;
  logic [9:0][W-1:0]  tx10;
  logic [W-1:0]       tot10;
  logic               done10;
  logic [9:0][9:0]    sd10;
  logic [3:0]         nb10, nbs10;
  hw_scheduler #(.N(10), .W(W), .DFG(G10)) u_simple (
    .clk, .rst, .sw(sw10), .hw(hw10), .texe(tx10), .texe_total(tot10), .all_done(done10),
    .scheduled_dfg(sd10), .nb_task(nb10), .nb_task_slave(nbs10));

  // robotic vision
  logic [29:0]        sw30, hw30;
  logic [29:0][W-1:0] tx30;
  logic [W-1:0]       tot30;
  logic               done30;
  logic [29:0][29:0]  sd30;
  logic [4:0]         nb30, nbs30;
  hw_scheduler #(.N(30), .W(W), .DFG(G30)) u_robot (
    .clk, .rst, .sw(sw30), .hw(hw30), .texe(tx30), .texe_total(tot30), .all_done(done30),
    .scheduled_dfg(sd30), .nb_task(nb30), .nb_task_slave(nbs30));

  // 6-task example, both tie rules
  logic [5:0]         sw6, hw6;
  logic [5:0][W-1:0]  tx6;
  logic [W-1:0]       tot6a, tot6b;
  logic               done6a, done6b;
  logic [5:0][5:0]    sd6a, sd6b;
  logic [2:0]         nb6a, nbs6a, nb6b, nbs6b;
  hw_scheduler #(.N(6), .W(W), .DFG(G6), .TIE_MAX_TEXE(1'b1)) u_ex_max (
    .clk, .rst, .sw(sw6), .hw(hw6), .texe(tx6), .texe_total(tot6a), .all_done(done6a),
    .scheduled_dfg(sd6a), .nb_task(nb6a), .nb_task_slave(nbs6a));
  hw_scheduler #(.N(6), .W(W), .DFG(G6)) u_ex_min (
    .clk, .rst, .sw(sw6), .hw(hw6), .texe(tx6), .texe_total(tot6b), .all_done(done6b),
    .scheduled_dfg(sd6b), .nb_task(nb6b), .nb_task_slave(nbs6b));

  // 20-task graph at other time widths
  logic [19:0]        sw20, hw20;
  logic [19:0][9:0]   tx20n;
  logic [19:0][31:0]  tx20w;
  logic [9:0]         tot20n;
  logic [31:0]        tot20w;
  logic               done20n, done20w;
  logic [19:0][19:0]  sd20n, sd20w;
  logic [4:0]         nb20n, nbs20n, nb20w, nbs20w;
  hw_scheduler #(.W(10)) u_w10 (
    .clk, .rst, .sw(sw20), .hw(hw20), .texe(tx20n), .texe_total(tot20n), .all_done(done20n),
    .scheduled_dfg(sd20n), .nb_task(nb20n), .nb_task_slave(nbs20n));
  hw_scheduler #(.W(32)) u_w32 (
    .clk, .rst, .sw(sw20), .hw(hw20), .texe(tx20w), .texe_total(tot20w), .all_done(done20w),
    .scheduled_dfg(sd20w), .nb_task(nb20w), .nb_task_slave(nbs20w));

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Cycle counters: edges after reset release until all_done.
  int cyc10 = 0, cyc30 = 0, cyc6 = 0, cyc20n = 0, cyc20w = 0;
  always @(posedge clk) if (!rst) begin
    if (!done20n) cyc20n++;
    if (!done20w) cyc20w++;
    if (!done10) cyc10++;
    if (!done30) cyc30++;
    if (!done6a) cyc6++;
  end

  initial begin
    int u10[MAXN], t10[MAXN], u30[MAXN], t30[MAXN], u6[MAXN], t6[MAXN];
    automatic int unit10[10] = '{U_MS, U_SL, U_HW, U_HW, U_MS, U_MS, U_HW, U_HW, U_MS, U_SL};
    automatic int time10[10] = '{8, 2, 3, 6, 4, 7, 9, 2, 5, 1};
    automatic int time30[30] = '{1, 20, 600, 115, 600, 1100, 70, 45, 100, 25, 100, 25, 200, 200, 300,
                       10, 10, 20, 22, 20, 22, 2500, 260, 2500, 4700, 180, 800, 43, 900, 43};
    automatic int ms30[8] = '{1, 5, 6, 9, 14, 15, 16, 19};
    automatic int sl30[3] = '{2, 10, 13};
    ref_result_t r10, r30, r6a, r6b;
    graph_t g;

    for (int i = 0; i < MAXN; i++) begin u10[i] = U_HW; t10[i] = 0; u30[i] = U_HW; t30[i] = 0; u6[i] = U_HW; t6[i] = 0; end
    for (int i = 0; i < 10; i++) begin u10[i] = unit10[i]; t10[i] = time10[i]; end
    for (int i = 0; i < 30; i++) t30[i] = time30[i];
    foreach (ms30[k]) u30[ms30[k] - 1] = U_MS;
    foreach (sl30[k]) u30[sl30[k] - 1] = U_SL;
    u6[0] = U_MS; t6[0] = 5; u6[1] = U_SL; t6[1] = 3; u6[2] = U_SL; t6[2] = 7;
    u6[3] = U_HW; t6[3] = 18; u6[4] = U_MS; t6[4] = 2; u6[5] = U_MS; t6[5] = 13;

    for (int i = 0; i < 10; i++) begin sw10[i] = (u10[i] == U_MS); hw10[i] = (u10[i] == U_HW); tx10[i] = W'(t10[i]); end
    for (int i = 0; i < 30; i++) begin sw30[i] = (u30[i] == U_MS); hw30[i] = (u30[i] == U_HW); tx30[i] = W'(t30[i]); end
    for (int i = 0; i < 6; i++)  begin sw6[i]  = (u6[i] == U_MS);  hw6[i]  = (u6[i] == U_HW);  tx6[i]  = W'(t6[i]);  end

    begin
      automatic int time20[20] = '{8, 2, 3, 6, 4, 7, 9, 2, 5, 1, 8, 3, 4, 6, 9, 5, 6, 1, 2, 2};
      for (int i = 0; i < 20; i++) begin
        sw20[i]  = (i + 1 == 1 || i + 1 == 5 || i + 1 == 6 || i + 1 == 9 || i + 1 == 14 ||
                    i + 1 == 15 || i + 1 == 16 || i + 1 == 19);
        hw20[i]  = !(sw20[i] || i + 1 == 2 || i + 1 == 10 || i + 1 == 13);
        tx20n[i] = 10'(time20[i]);
        tx20w[i] = 32'(time20[i]);
      end
    end

    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    repeat (40) @(posedge clk);
    #1;

    for (int a = 0; a < MAXN; a++) for (int b = 0; b < MAXN; b++) g[a][b] = G10[a][b];
    r10 = run_ref(10, g, u10, t10, 1'b0);
    for (int a = 0; a < MAXN; a++) for (int b = 0; b < MAXN; b++) g[a][b] = G30[a][b];
    r30 = run_ref(30, g, u30, t30, 1'b0);
    for (int a = 0; a < MAXN; a++) for (int b = 0; b < MAXN; b++) g[a][b] = G6[a][b];
    r6a = run_ref(6, g, u6, t6, 1'b1);
    r6b = run_ref(6, g, u6, t6, 1'b0);

    $display("icam_simple: total=%0d cycles=%0d | robotic: total=%0d cycles=%0d ms=%0d sl=%0d | example6: %0d/%0d",
             tot10, cyc10, tot30, cyc30, nb30, nbs30, tot6a, tot6b);
    // icam_simple
    check(done10 && tot10 == 47, $sformatf("icam_simple total %0d, expected 47", tot10));
    check(cyc10 == 10, $sformatf("icam_simple %0d cycles, expected 10", cyc10));
    check(nb10 == 4 && nbs10 == 2, "icam_simple processor counts");
    check(int'(tot10) == r10.total && cyc10 == r10.cycles, "icam_simple vs reference");
    // robotic vision
    check(done30 && tot30 == 10939, $sformatf("robotic total %0d, expected 10939", tot30));
    check(nb30 == 8 && nbs30 == 3, "robotic processor counts");
    check(int'(tot30) == r30.total && cyc30 == r30.cycles,
          $sformatf("robotic vs reference: %0d/%0d cycles %0d/%0d", tot30, r30.total, cyc30, r30.cycles));
    for (int a = 0; a < 30; a++) for (int b = 0; b < 30; b++)
      check(sd30[a][b] == r30.sdfg[a][b], $sformatf("robotic matrix [%0d][%0d]", a + 1, b + 1));
    // 6-task example
    check(sd6a[1] == 6'b001100 && sd6a[5] == 6'b010000 && sd6a[4] == 6'b000000,
          "example6, longest-first rule: expected B->C and F->E");
    check(sd6b[1] == 6'b001100 && sd6b[4] == 6'b100000 && sd6b[5] == 6'b000000,
          "example6, default rule: expected B->C and E->F");
    check(int'(tot6a) == r6a.total && int'(tot6b) == r6b.total, "example6 totals vs reference");
    // Slave order B then C: A 0-5, B 5-8, C 8-15, D 8-26; master E, F after C.
    check(tot6a == 30 && tot6b == 30, $sformatf("example6 totals %0d/%0d, expected 30", tot6a, tot6b));
    // bus widths
    check(done20n && tot20n == 58 && cyc20n == 11, $sformatf("W=10: total %0d in %0d cycles", tot20n, cyc20n));
    check(done20w && tot20w == 58 && cyc20w == 11, $sformatf("W=32: total %0d in %0d cycles", tot20w, cyc20w));
    check(sd20n == sd20w && nb20n == 8 && nbs20w == 3, "W=10/32: same matrix and counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
