// tb_top_common.svh: shared body of the end-to-end testbenches of
// hc_sched_top. The including module defines N (cores), NDIR, MAXR (largest
// replica count used) and instantiates hc_sched_top as "dut" on the signals
// declared here.
//
// It provides behavioural cores (a replica runs DUR_MIN..DUR_MAX cycles after
// core_start, then the core pulses core_done), a scoreboard that checks every
// replica when it starts on a core against the definition of each directive
// naming its task and against whole-task prerequisites, per-task in-order
// starts, completion checks per task graph, and counters of how often each
// scheduling mechanism acted.

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic run, cfg_task_we, cfg_dir_we;
  task_id_t cfg_task_idx;
  task_cfg_t cfg_task;
  logic [$clog2(NDIR)-1:0] cfg_dir_idx;
  dir_cfg_t cfg_dir;
  logic     [N-1:0] core_start, core_busy, core_done;
  task_id_t [N-1:0] core_tid;
  rep_t     [N-1:0] core_rep;
  rep_t     [NUM_TASKS-1:0] task_s, task_c;
  logic all_done;

  int checks = 0, failures = 0;
  int dur_min = 1, dur_max = 6;

  // testbench copy of the configuration
  int tn [NUM_TASKS];
  logic [NUM_TASKS-1:0] tpre [NUM_TASKS];
  dir_cfg_t dirs [NDIR];

  // true replica state
  bit completed [NUM_TASKS][];
  int ts [NUM_TASKS];      // replicas started on a core
  int tc [NUM_TASKS];      // replicas completed
  int tes [NUM_TASKS];     // lowest index not completed
  longint first_start [NUM_TASKS];   // cycle of the task's first start, -1 before

  int remaining [N];
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  typedef enum int {
    EV_BURST, EV_BURST_CUT, EV_CORES_FULL, EV_SAC, EV_SAS_B, EV_SAS_A, EV_SAMC,
    EV_LNAR, EV_ACF, EV_LNR, EV_ES_TREE, EV_ES_LAG, EV_SLOT_WAIT, EV_PREREQ,
    EV_PRIORITY, EV_MULTI_DONE, EV_MULTI_TASK, EV_SPLIT, EV_COUNT
  } ev_e;
  longint ev [EV_COUNT];
  bit     ev_needed [EV_COUNT];
  string  ev_name [EV_COUNT] = '{"burst dispatch", "burst cut by idle cores", "all cores busy",
    "SAC hold", "SAS hold of B", "SAS hold of A", "SAMC hold", "LNAR hold", "ACF hold", "LNR hold",
    "es from buffer tree", "es from lag history", "wait for buffer slot", "prerequisite wait",
    "priority decides", "several completions in a cycle", "several tasks in a cycle",
    "one task over several sub-trees"};

  function automatic bit all_complete(int t); return tc[t] == tn[t]; endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("cycle %0d: %s", cyc, msg);
  endtask

  // Check replica r of task t when it starts; ts[] counts starts before it.
  task automatic check_replica(int t, int r);
    checks++;
    if (r != ts[t]) fail($sformatf("task %0d replica %0d started out of order (expected %0d)", t, r, ts[t]));
    for (int p = 0; p < NUM_TASKS; p++)
      if (tpre[t][p] && tn[p] > 0 && !all_complete(p)) fail($sformatf("task %0d before prerequisite %0d", t, p));
    for (int d = 0; d < NDIR; d++) begin
      int a, b, p1, p2, last;
      if (!dirs[d].valid) continue;
      a = dirs[d].a; b = dirs[d].b; p1 = dirs[d].p1; p2 = dirs[d].p2;
      case (dirs[d].kind)
        DIR_SAC: if (b == t) begin
          last = r + p1;
          if (last >= tn[a]) last = tn[a] - 1;
          if (last >= 0 && tes[a] <= last) fail($sformatf("SAC: B%0d before A%0d completed", r, last));
        end
        DIR_SAS: begin
          if (b == t && ts[a] < tn[a] && !(ts[a] - r > p1)) fail($sformatf("SAS: B%0d with A.s=%0d", r, ts[a]));
          if (a == t && ts[b] < tn[b] && !(r - ts[b] < p2)) fail($sformatf("SAS: A%0d with B.s=%0d", r, ts[b]));
        end
        DIR_SAMC: if (b == t) begin
          last = p1 * (r + 1) - 1;
          if (last >= tn[a]) last = tn[a] - 1;
          if (tes[a] <= last) fail($sformatf("SAMC: B%0d before A%0d completed", r, last));
        end
        DIR_LNAR: if (b == t && ts[t] - tc[t] >= p1) fail($sformatf("LNAR: %0d active", ts[t] - tc[t] + 1));
        DIR_LNR:  if (b == t && r >= tes[t] + p1) fail($sformatf("LNR: replica %0d with es %0d", r, tes[t]));
        default: ;  // ACF is checked at dispatch in the scheduler's own test
      endcase
    end
  endtask

  // behavioural cores and start-time scoreboard
  always @(negedge clk) begin
    if (rst_n) begin
      int ndone;
      ndone = 0;
      for (int k = 0; k < N; k++) begin
        if (core_done[k]) ndone++;
        core_done[k] = 1'b0;
      end
      if (ndone > 1) ev[EV_MULTI_DONE]++;
      for (int k = 0; k < N; k++) begin
        if (core_start[k]) begin
          check_replica(int'(core_tid[k]), int'(core_rep[k]));
          if (first_start[core_tid[k]] < 0) first_start[core_tid[k]] = cyc;
          ts[core_tid[k]]++;
          remaining[k] = $urandom_range(dur_min, dur_max);
        end else if (core_busy[k] && remaining[k] > 0) begin
          remaining[k]--;
          if (remaining[k] == 0) begin
            int t, r;
            t = int'(core_tid[k]); r = int'(core_rep[k]);
            core_done[k] = 1'b1;
            completed[t][r] = 1'b1;
            tc[t]++;
            while (tes[t] < tn[t] && completed[t][tes[t]]) tes[t]++;
          end
        end
      end
    end
  end

  // mechanism counters, sampled from the scheduler's decision each cycle
  always @(posedge clk) begin
    if (rst_n && run) begin
      int ntasks, nfree, nburst, hi_prio;
      bit split;
      ntasks = 0; nfree = 0; nburst = 0; hi_prio = -1; split = 0;
      for (int p = 0; p < dut.ROOT_FANOUT; p++) begin
        nfree += int'(dut.u_sched.free[p]);
        if (dut.u_sched.disp[p].valid) begin
          if (dut.u_sched.disp[p].cnt > 1) nburst++;
          if (int'(dut.u_sched.tcfg[dut.u_sched.disp[p].tid].prio) > hi_prio)
            hi_prio = int'(dut.u_sched.tcfg[dut.u_sched.disp[p].tid].prio);
          if (p > 0 && dut.u_sched.disp[p-1].valid && dut.u_sched.disp[p-1].tid == dut.u_sched.disp[p].tid)
            split = 1;
        end
      end
      for (int t = 0; t < NUM_TASKS; t++) begin
        if (dut.u_sched.add_cnt[t] != 0) begin
          ntasks++;
          if (lim_t'(dut.u_sched.add_cnt[t]) < dut.u_sched.t_lim[t]) ev[EV_BURST_CUT]++;
        end
        if (dut.u_sched.t_elig[t] && !dut.u_sched.t_used[t] &&
            int'(dut.u_sched.tcfg[t].prio) < hi_prio) ev[EV_PRIORITY]++;
      end
      if (nburst > 0) ev[EV_BURST]++;
      if (ntasks > 1) ev[EV_MULTI_TASK]++;
      if (split) ev[EV_SPLIT]++;
      if (dut.u_sched.t_elig != '0 && nfree == 0) ev[EV_CORES_FULL]++;
      for (int d = 0; d < NDIR; d++) begin
        int b, a;
        b = dut.u_sched.dcfg[d].b; a = dut.u_sched.dcfg[d].a;
        if (!dut.u_sched.dcfg[d].valid) continue;
        if (dut.u_sched.s_q[b] < dut.u_sched.tcfg[b].n && dut.u_sched.d_lim_b[d] <= 0)
          case (dut.u_sched.dcfg[d].kind)
            DIR_SAC:  ev[EV_SAC]++;
            DIR_SAS:  ev[EV_SAS_B]++;
            DIR_SAMC: ev[EV_SAMC]++;
            DIR_LNAR: ev[EV_LNAR]++;
            DIR_ACF:  ev[EV_ACF]++;
            DIR_LNR:  ev[EV_LNR]++;
            default: ;
          endcase
        if (dut.u_sched.s_q[a] < dut.u_sched.tcfg[a].n && dut.u_sched.d_lim_a[d] <= 0 &&
            dut.u_sched.dcfg[d].kind inside {DIR_SAS, DIR_ACF})
          ev[dut.u_sched.dcfg[d].kind == DIR_SAS ? EV_SAS_A : EV_ACF]++;
      end
      for (int k = 0; k < dut.NUM_ROB; k++)
        if (dut.u_sched.slot_used[k] && !dut.u_sched.t_done[dut.u_sched.slot_tid[k]]) begin
          if (dut.u_sched.rob_es_valid[k] && dut.u_sched.rob_es_tid[k] == dut.u_sched.slot_tid[k] &&
              lim_t'(dut.u_sched.rob_es_min[k]) < lim_t'(dut.u_sched.slot_hist[k][dut.ES_LAG-1]))
            ev[EV_ES_TREE]++;
          else if (dut.u_sched.slot_hist[k][dut.ES_LAG-1] != dut.u_sched.s_q[dut.u_sched.slot_tid[k]])
            ev[EV_ES_LAG]++;
        end
      for (int t = 0; t < NUM_TASKS; t++) begin
        if (dut.u_sched.tcfg[t].valid && dut.u_sched.s_q[t] < dut.u_sched.tcfg[t].n) begin
          if (!dut.u_sched.t_ready[t]) ev[EV_PREREQ]++;
          else if (dut.u_sched.t_lim[t] > 0 && dut.u_sched.t_needs_es[t] && !dut.u_sched.has_slot[t] &&
                   !dut.u_sched.free_slot_any) ev[EV_SLOT_WAIT]++;
        end
      end
    end
  end

  task automatic clear_all();
    run = 0;
    @(negedge clk);
    for (int d = 0; d < NDIR; d++) begin
      dirs[d] = '0;
      cfg_dir_we = 1; cfg_dir_idx = $bits(cfg_dir_idx)'(d); cfg_dir = '0;
      @(negedge clk);
    end
    cfg_dir_we = 0;
    for (int t = 0; t < NUM_TASKS; t++) begin
      tn[t] = 0; tpre[t] = '0; ts[t] = 0; tc[t] = 0; tes[t] = 0; first_start[t] = -1;
      completed[t] = new[1];
      cfg_task_we = 1; cfg_task_idx = task_id_t'(t); cfg_task = '0;
      @(negedge clk);
    end
    cfg_task_we = 0;
  endtask

  task automatic add_task(int t, int n, int prio, logic [NUM_TASKS-1:0] pre);
    tn[t] = n; tpre[t] = pre;
    completed[t] = new[n];
    cfg_task_we = 1; cfg_task_idx = task_id_t'(t);
    cfg_task = '{valid: 1'b1, n: rep_t'(n), prio: prio_t'(prio), prereq: pre};
    @(negedge clk);
    cfg_task_we = 0;
  endtask

  task automatic add_dir(int d, dir_kind_e k, int b, int a, int p1, int p2);
    dirs[d] = '{valid: 1'b1, kind: k, b: task_id_t'(b), a: task_id_t'(a), p1: dparam_t'(p1), p2: dparam_t'(p2)};
    cfg_dir_we = 1; cfg_dir_idx = $bits(cfg_dir_idx)'(d); cfg_dir = dirs[d];
    @(negedge clk);
    cfg_dir_we = 0;
  endtask

  // Run the configured graph to completion; returns the cycle count.
  task automatic run_graph(string name, longint limit, output longint cycles);
    longint c0;
    c0 = cyc;
    run = 1;
    @(negedge clk);
    while (!all_done && cyc - c0 < limit) @(negedge clk);
    cycles = cyc - c0;
    run = 0;
    checks++;
    if (!all_done) fail($sformatf("%s: did not complete", name));
    for (int t = 0; t < NUM_TASKS; t++) begin
      if (tn[t] == 0) continue;
      checks++;
      if (!all_complete(t) || int'(task_s[t]) != tn[t] || int'(task_c[t]) != tn[t])
        fail($sformatf("%s: task %0d s=%0d c=%0d of %0d", name, t, task_s[t], task_c[t], tn[t]));
    end
    repeat (4) @(negedge clk);
    checks++;
    if (core_busy != '0 || dut.u_net.free != {dut.ROOT_FANOUT{burst_t'(N / dut.ROOT_FANOUT)}}) fail($sformatf("%s: cores not all released", name));
    $display("%s: finished in %0d cycles", name, cycles);
  endtask

  task automatic report_events();
    for (int e = 0; e < EV_COUNT; e++) begin
      $display("  %-32s %0d", ev_name[e], ev[e]);
      if (ev_needed[e]) begin
        checks++;
        if (ev[e] == 0) fail($sformatf("mechanism never exercised: %s", ev_name[e]));
      end
    end
  endtask

  task automatic init_tb();
    run = 0; cfg_task_we = 0; cfg_dir_we = 0; cfg_task_idx = '0; cfg_task = '0;
    cfg_dir_idx = '0; cfg_dir = '0; core_done = '0;
    for (int k = 0; k < N; k++) remaining[k] = 0;
    for (int e = 0; e < EV_COUNT; e++) begin ev[e] = 0; ev_needed[e] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
  endtask
