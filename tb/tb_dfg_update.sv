// tb_dfg_update: self-checking test of the scheduled-matrix update.
//
// Uses the 6-task example graph (A->B, A->C, B->D, C->E, C->F). Each cycle it
// drives random ready vectors for both processors, picks one ready task per
// processor as the scheduled one (or none) and keeps its own copy of the added
// edges: row of the scheduled task |= the other ready tasks of that processor.
// The output must always equal the original graph OR the added edges, and a
// reset must clear the added edges. A directed case reproduces the example:
// scheduling B while C is ready on the slave and F while E is ready on the
// master gives the extra edges B->C and F->E.
module tb_dfg_update;
  import sched_pkg::*;

  localparam int N = 6;

  function automatic dfg_t example6();
    dfg_t g;
    g = '0;
    g[0][1] = 1; g[0][2] = 1; g[1][3] = 1; g[2][4] = 1; g[2][5] = 1;
    return g;
  endfunction
  localparam dfg_t G = example6();

  logic                clk = 1'b0, rst;
  logic [N-1:0]        sw_ready, sl_ready, task_sched_sw, task_sched_sl;
  logic                sw_enable, sl_enable;
  logic [N-1:0][N-1:0] scheduled_dfg;

  dfg_update #(.N(N), .DFG(G)) dut (.*);

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

  logic [N-1:0][N-1:0] model;

  function automatic logic [N-1:0] pick_one(input logic [N-1:0] v);
    int k, cnt;
    cnt = $countones(v);
    if (cnt == 0) return '0;
    k = $urandom_range(cnt - 1);
    for (int i = 0; i < N; i++)
      if (v[i]) begin
        if (k == 0) return N'(1) << i;
        k--;
      end
    return '0;
  endfunction

  task automatic compare(input string what);
    for (int r = 0; r < N; r++)
      check(scheduled_dfg[r] == (model[r] | G[r][N-1:0]), $sformatf("%s row %0d", what, r));
  endtask

  initial begin
    int added = 0;
    rst = 1'b1;
    {sw_ready, sl_ready, task_sched_sw, task_sched_sl, sw_enable, sl_enable} = '0;
    model = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    compare("after reset");

    // Directed: the example schedule.
    sl_ready = 6'b000110; task_sched_sl = 6'b000010; sl_enable = 1;   // B before C
    sw_ready = 6'b110000; task_sched_sw = 6'b100000; sw_enable = 1;   // F before E
    @(posedge clk); #1;
    {sw_ready, sl_ready, task_sched_sw, task_sched_sl, sw_enable, sl_enable} = '0;
    check(scheduled_dfg[1] == 6'b001100, "B row must be B->C, B->D");
    check(scheduled_dfg[5] == 6'b010000, "F row must be F->E");
    check(scheduled_dfg[0] == 6'b000110 && scheduled_dfg[2] == 6'b110000, "original rows kept");
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    compare("after second reset");

    // Random sequences.
    for (int c = 0; c < 2000; c++) begin
      sw_ready = N'($urandom);
      sl_ready = N'($urandom) & ~sw_ready;
      task_sched_sw = pick_one(sw_ready);
      task_sched_sl = pick_one(sl_ready);
      sw_enable = |task_sched_sw;
      sl_enable = |task_sched_sl;
      for (int t = 0; t < N; t++) begin
        if (task_sched_sw[t]) model[t] |= sw_ready & ~task_sched_sw;
        if (task_sched_sl[t]) model[t] |= sl_ready & ~task_sched_sl;
      end
      @(posedge clk); #1;
      compare("random");
      if (c % 25 == 24) begin
        for (int r = 0; r < N; r++) if (model[r] & ~G[r][N-1:0]) added++;
        rst = 1'b1; model = '0; @(posedge clk); #1 rst = 1'b0;
        compare("random reset");
      end
    end
    check(added > 0, "coverage: edges were added");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
