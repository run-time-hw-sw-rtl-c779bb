// sched_ref_pkg: behavioural reference model of the run-time HW/SW scheduler,
// used by the testbenches to work out expected results independently of the RTL.
//
// It replays the scheduling cycle by cycle with plain integers: in each cycle
// every ready hardware task is placed at max(predecessor finish) and at most one
// ready task per processor is placed at max(predecessor finish, processor time),
// picked by smallest start time, then largest urgency, then execution time
// (shortest by default, longest with tie_max), then lowest index. It returns
// the total time, the cycle count, the scheduled matrix and event counts used
// by the testbenches to prove that each mechanism was exercised.
package sched_ref_pkg;

  localparam int MAXN = 32;
  // Unit codes of the model (independent of the RTL encoding).
  localparam int U_MS = 0;
  localparam int U_SL = 1;
  localparam int U_HW = 2;

  typedef bit [MAXN-1:0][MAXN-1:0] graph_t;

  typedef struct {
    int     total;
    int     cycles;
    graph_t sdfg;
    int     nb_ms;
    int     nb_sl;
    int     n_hw_parallel;  // cycles placing two or more hardware tasks
    int     n_both_cpus;    // cycles placing a task on both processors
    int     n_urg_decides;  // picks where urgency broke an ASAP tie
    int     n_texe_decides; // picks where execution time broke an urgency tie
    int     n_feedback;     // tasks whose urgency came through a same-unit successor
  } ref_result_t;

  function automatic ref_result_t run_ref(input int n, input graph_t g, input int unit[MAXN],
                                          input int texe[MAXN], input bit tie_max);
    ref_result_t r;
    int  urg[MAXN];
    bit  from_fb[MAXN];
    bit  done[MAXN];
    int  fin[MAXN];
    int  tot[2];
    int  ndone;
    r = '{default: 0};
    r.sdfg = g;
    // Urgency: fixed point over the graph.
    for (int t = 0; t < n; t++) begin urg[t] = 0; from_fb[t] = 0; end
    for (int it = 0; it < n; it++)
      for (int t = 0; t < n; t++) begin
        int u; bit fb;
        u = 0; fb = 0;
        for (int s = 0; s < n; s++)
          if (g[t][s]) begin
            if (unit[s] != unit[t]) begin
              if (texe[s] > u) begin u = texe[s]; fb = 0; end
            end else if (urg[s] > u) begin
              u = urg[s]; fb = 1;
            end
          end
        urg[t] = u; from_fb[t] = fb;
      end
    for (int t = 0; t < n; t++) if (from_fb[t] && unit[t] != U_HW) r.n_feedback++;
    for (int t = 0; t < n; t++) begin done[t] = 0; fin[t] = 0; end
    tot[0] = 0; tot[1] = 0; ndone = 0;
    while (ndone < n) begin
      bit rdy[MAXN];
      int st[MAXN];
      bit nd[MAXN];
      int nfin[MAXN];
      int ntot[2];
      int nhw;
      int npicked;
      for (int t = 0; t < n; t++) begin
        int mp;
        rdy[t] = !done[t];
        mp = 0;
        for (int p = 0; p < n; p++)
          if (g[p][t]) begin
            if (!done[p]) rdy[t] = 0;
            if (fin[p] > mp) mp = fin[p];
          end
        st[t] = (unit[t] == U_HW) ? mp : ((tot[unit[t]] > mp) ? tot[unit[t]] : mp);
        nd[t] = done[t]; nfin[t] = fin[t];
      end
      ntot[0] = tot[0]; ntot[1] = tot[1];
      nhw = 0;
      for (int t = 0; t < n; t++)
        if (rdy[t] && unit[t] == U_HW) begin
          nd[t] = 1; nfin[t] = st[t] + texe[t]; nhw++;
        end
      if (nhw >= 2) r.n_hw_parallel++;
      npicked = 0;
      for (int cpu = 0; cpu < 2; cpu++) begin
        int best; int cnt_asap; int cnt_urg;
        best = -1; cnt_asap = 0; cnt_urg = 0;
        for (int t = 0; t < n; t++)
          if (rdy[t] && unit[t] == cpu) begin
            if (best < 0) best = t;
            else if (st[t] < st[best]) best = t;
            else if (st[t] == st[best] && urg[t] > urg[best]) best = t;
            else if (st[t] == st[best] && urg[t] == urg[best] &&
                     (tie_max ? (texe[t] > texe[best]) : (texe[t] < texe[best]))) best = t;
          end
        if (best >= 0) begin
          for (int t = 0; t < n; t++)
            if (rdy[t] && unit[t] == cpu && st[t] == st[best]) begin
              cnt_asap++;
              if (urg[t] == urg[best]) cnt_urg++;
            end
          if (cnt_asap >= 2 && cnt_urg < cnt_asap) r.n_urg_decides++;
          if (cnt_urg >= 2) begin
            int same_texe;
            same_texe = 0;
            for (int t = 0; t < n; t++)
              if (rdy[t] && unit[t] == cpu && st[t] == st[best] && urg[t] == urg[best] &&
                  texe[t] == texe[best]) same_texe++;
            if (same_texe < cnt_urg) r.n_texe_decides++;
          end
          for (int t = 0; t < n; t++)
            if (rdy[t] && unit[t] == cpu && t != best) r.sdfg[best][t] = 1;
          nd[best] = 1; nfin[best] = st[best] + texe[best]; ntot[cpu] = nfin[best];
          if (cpu == U_MS) r.nb_ms++; else r.nb_sl++;
          npicked++;
        end
      end
      if (npicked == 2) r.n_both_cpus++;
      for (int t = 0; t < n; t++) begin
        if (nd[t] && !done[t]) ndone++;
        done[t] = nd[t]; fin[t] = nfin[t];
      end
      tot[0] = ntot[0]; tot[1] = ntot[1];
      r.cycles++;
      if (r.cycles > 4 * n) break;
    end
    for (int t = 0; t < n; t++) if (fin[t] > r.total) r.total = fin[t];
    return r;
  endfunction

endpackage
