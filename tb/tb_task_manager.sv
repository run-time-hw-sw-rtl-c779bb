// tb_task_manager: self-checking test of the processor manager.
//
// Random ready vectors, ASAP times, urgencies and execution times (drawn from
// small ranges so that ties are frequent) are applied to two managers, one with
// the default rule (shortest task wins the last tie) and one with TIE_MAX_TEXE
// (longest task wins). The selected task is compared with a selection computed
// here by a plain scan; the total time register and the task counter are checked
// after each clock edge. It also checks that one task is scheduled per cycle.
module tb_task_manager;

  localparam int N = 8;
  localparam int W = 16;
  localparam int CW = $clog2(N + 1);

  logic                clk = 1'b0, rst;
  logic [N-1:0]        ready;
  logic [N-1:0][W-1:0] asap, urgency, texe, finish_cand;
  logic [N-1:0]        sched_a, sched_b;
  logic                en_a, en_b;
  logic [W-1:0]        tot_a, tot_b;
  logic [CW-1:0]       nb_a, nb_b;

  task_manager #(.N(N), .W(W), .TIE_MAX_TEXE(1'b0)) dut_min (
    .clk, .rst, .ready, .asap, .urgency, .texe, .finish_cand,
    .task_sched(sched_a), .enable(en_a), .total_time(tot_a), .nb_task(nb_a));
  task_manager #(.N(N), .W(W), .TIE_MAX_TEXE(1'b1)) dut_max (
    .clk, .rst, .ready, .asap, .urgency, .texe, .finish_cand,
    .task_sched(sched_b), .enable(en_b), .total_time(tot_b), .nb_task(nb_b));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int pick(input bit longest);
    int b;
    b = -1;
    for (int i = 0; i < N; i++)
      if (ready[i]) begin
        if (b < 0) b = i;
        else if (asap[i] < asap[b]) b = i;
        else if (asap[i] == asap[b] && urgency[i] > urgency[b]) b = i;
        else if (asap[i] == asap[b] && urgency[i] == urgency[b] &&
                 (longest ? texe[i] > texe[b] : texe[i] < texe[b])) b = i;
      end
    return b;
  endfunction

  initial begin
    int exp_nb_a = 0, exp_nb_b = 0, idle = 0, diff_rules = 0;
    rst = 1'b1;
    ready = '0; asap = '0; urgency = '0; texe = '0; finish_cand = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(tot_a == 0 && nb_a == 0, "reset");
    for (int c = 0; c < 3000; c++) begin
      int ba, bb;
      logic [W-1:0] fa, fb;
      for (int i = 0; i < N; i++) begin
        ready[i]       = ($urandom_range(2) != 0);
        asap[i]        = W'($urandom_range(3));
        urgency[i]     = W'($urandom_range(2));
        texe[i]        = W'($urandom_range(4));
        finish_cand[i] = asap[i] + texe[i];
      end
      if (c % 17 == 0) ready = '0;
      #1;
      ba = pick(1'b0);
      bb = pick(1'b1);
      if (ba < 0) begin
        check(sched_a == 0 && sched_b == 0 && !en_a && !en_b, "idle: nothing selected");
        idle++;
      end else begin
        check(en_a && en_b, "enable");
        check(sched_a == (N'(1) << ba), $sformatf("min rule: got %b expected task %0d", sched_a, ba));
        check(sched_b == (N'(1) << bb), $sformatf("max rule: got %b expected task %0d", sched_b, bb));
        if (ba != bb) diff_rules++;
        fa = finish_cand[ba]; fb = finish_cand[bb];
        exp_nb_a++; exp_nb_b++;
      end
      begin
        logic [W-1:0] old_a, old_b;
        old_a = tot_a; old_b = tot_b;
        @(posedge clk); #1;
        if (ba < 0) check(tot_a == old_a && tot_b == old_b, "idle: totals hold");
        else check(tot_a == fa && tot_b == fb, "total time register");
        check(int'(nb_a) == exp_nb_a % (1 << CW) && int'(nb_b) == exp_nb_b % (1 << CW), "task count");
      end
      if (c % 7 == 0) begin
        #1 rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
        exp_nb_a = 0; exp_nb_b = 0;
      end
    end
    check(idle > 0 && diff_rules > 0, "coverage: idle cycles and differing tie rules");
    $display("idle=%0d rule_differs=%0d", idle, diff_rules);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
