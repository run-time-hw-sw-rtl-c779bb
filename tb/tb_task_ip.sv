// tb_task_ip: self-checking test of one task node.
//
// Random mappings, times, predecessor state and manager selections are applied;
// each cycle the ready flags, the ASAP time and the candidate finishing time are
// compared with values computed here, and after the clock edge the done flag and
// the registered finishing time are checked (set only when the node is
// scheduled, then held). Hardware tasks must schedule themselves as soon as
// their predecessors are done; software tasks only when their manager selects
// them.
module tb_task_ip;
  import sched_pkg::*;

  localparam int W = 16;

  logic         clk = 1'b0, rst;
  logic         sw, hw;
  logic [W-1:0] texe, max_texe_pred, max_succ_urg, sw_total_time, sl_total_time;
  logic         preds_done, sw_sched_done, sl_sched_done;
  logic         done, sw_ready, sl_ready, hw_ready;
  logic [W-1:0] asap, finish_cand, finish_time, critical_time;
  unit_e        unit;

  task_ip #(.W(W)) dut (.*);

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

  initial begin
    int n_hw = 0, n_ms = 0, n_sl = 0, n_hold = 0;
    rst = 1'b1;
    {sw, hw, preds_done, sw_sched_done, sl_sched_done} = '0;
    {texe, max_texe_pred, max_succ_urg, sw_total_time, sl_total_time} = '0;
    repeat (2) @(posedge clk);
    for (int trial = 0; trial < 400; trial++) begin
      int kind;
      logic [W-1:0] exp_asap, exp_fin, ut;
      bit exp_sched;
      // New task: reset, then pick a mapping and times.
      #1 rst = 1'b1;
      @(posedge clk);
      #1 rst = 1'b0;
      kind = $urandom_range(2);
      sw = (kind == 0);
      hw = (kind == 1);
      texe = W'($urandom_range(500));
      max_succ_urg = W'($urandom_range(500));
      check(!done && finish_time == 0, "reset state");
      // A few cycles with predecessors pending or the manager elsewhere.
      for (int c = 0; c < 4; c++) begin
        preds_done    = ($urandom_range(3) == 0);
        max_texe_pred = W'($urandom_range(1000));
        sw_total_time = W'($urandom_range(1000));
        sl_total_time = W'($urandom_range(1000));
        sw_sched_done = $urandom_range(1);
        sl_sched_done = $urandom_range(1);
        #1;
        ut = (kind == 0) ? sw_total_time : (kind == 2) ? sl_total_time : W'(0);
        exp_asap = (max_texe_pred > ut) ? max_texe_pred : ut;
        exp_fin  = exp_asap + texe;
        check(asap == exp_asap, $sformatf("asap %0d expected %0d", asap, exp_asap));
        check(finish_cand == exp_fin, "finish_cand");
        check(critical_time == (((kind == 0 || kind == 2) && preds_done && !done) ? max_succ_urg : W'(0)), "critical time");
        check(sw_ready == (kind == 0 && preds_done && !done), "sw_ready");
        check(hw_ready == (kind == 1 && preds_done && !done), "hw_ready");
        check(sl_ready == (kind == 2 && preds_done && !done), "sl_ready");
        exp_sched = !done && preds_done &&
                    (kind == 1 || (kind == 0 && sw_sched_done) || (kind == 2 && sl_sched_done));
        begin
          bit was_done;
          logic [W-1:0] old_fin;
          was_done = done; old_fin = finish_time;
          @(posedge clk); #1;
          if (exp_sched) begin
            check(done && finish_time == exp_fin, $sformatf("scheduled: fin %0d expected %0d", finish_time, exp_fin));
            if (kind == 0) n_ms++; else if (kind == 1) n_hw++; else n_sl++;
          end else begin
            check(done == was_done && finish_time == old_fin, "not scheduled: state must hold");
            if (was_done) n_hold++;
          end
        end
      end
    end
    check(n_hw > 0 && n_ms > 0 && n_sl > 0 && n_hold > 0, "coverage of all units");
    $display("scheduled hw=%0d ms=%0d sl=%0d hold=%0d", n_hw, n_ms, n_sl, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
