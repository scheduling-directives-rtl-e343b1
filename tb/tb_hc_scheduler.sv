// tb_hc_scheduler: self-checking test of the scheduler on its own.
//
// The testbench stands in for the distribution network (two sub-tree ports
// of 4 cores each, free = idle cores of the sub-tree, a dispatched replica
// starts at once), for 8 behavioural cores (each replica
// runs 1..5 cycles) and for the thread re-order buffers (exact es of the task
// on each dup_id, no delay). Several task graphs run one after the other,
// each using one directive kind (SAC, SAS, SAMC, LNAR, ACF, LNR) plus whole-
// task prerequisites and priorities. At every dispatch a scoreboard checks
// each replica of the burst against the directive's definition on the true
// started/completed sets, in-order dispatch and the free-core bound of each
// port; at the end of every graph all replicas must have completed, and over
// the run both ports must have carried different tasks in one cycle.
module tb_hc_scheduler;
  import sched_pkg::*;

  localparam int N = 8, NROB = 2, NDIR = 8, F = 2, S = N / F;
  localparam int MAXR = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic run, cfg_task_we, cfg_dir_we;
  task_id_t cfg_task_idx;
  task_cfg_t cfg_task;
  logic [$clog2(NDIR)-1:0] cfg_dir_idx;
  dir_cfg_t cfg_dir;
  disp_req_t [F-1:0] disp;
  burst_t    [F-1:0] free;
  logic [N-1:0] core_done;
  task_id_t [N-1:0] core_tid;
  task_id_t [NROB-1:0] rob_dup_id, rob_es_tid;
  logic [NROB-1:0] rob_es_valid;
  rep_t [NROB-1:0] rob_es_min;
  rep_t [NUM_TASKS-1:0] task_s, task_c;
  logic all_done;

  hc_scheduler #(.NUM_CORES(N), .NUM_PORTS(F), .NUM_ROB(NROB), .NUM_DIR(NDIR), .ES_LAG(2)) dut (
    .clk(clk), .rst_n(rst_n), .run(run),
    .cfg_task_we(cfg_task_we), .cfg_task_idx(cfg_task_idx), .cfg_task(cfg_task),
    .cfg_dir_we(cfg_dir_we), .cfg_dir_idx(cfg_dir_idx), .cfg_dir(cfg_dir),
    .disp(disp), .free(free), .core_done(core_done), .core_tid(core_tid),
    .rob_dup_id(rob_dup_id), .rob_es_tid(rob_es_tid), .rob_es_valid(rob_es_valid),
    .rob_es_min(rob_es_min), .task_s(task_s), .task_c(task_c), .all_done(all_done));

  int checks = 0, failures = 0;
  int two_tasks = 0;   // cycles in which the ports carried different tasks

  // testbench copy of the configuration
  int tn [NUM_TASKS];
  logic [NUM_TASKS-1:0] tpre [NUM_TASKS];
  dir_cfg_t dirs [NDIR];

  // true replica state
  bit started [NUM_TASKS][MAXR];
  bit completed [NUM_TASKS][MAXR];
  int ts [NUM_TASKS];

  // cores
  bit   cbusy [N];
  int   ctask [N], crep [N], cleft [N];

  function automatic int n_started(int t);  return ts[t]; endfunction
  function automatic int n_done(int t);
    int c = 0;
    for (int r = 0; r < tn[t]; r++) c += completed[t][r];
    return c;
  endfunction
  function automatic int es_of(int t);  // lowest index not completed
    for (int r = 0; r < tn[t]; r++) if (!completed[t][r]) return r;
    return tn[t];
  endfunction
  function automatic bit all_complete(int t); return n_done(t) == tn[t]; endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("t=%0t %s", $time, msg);
  endtask

  // check replica r of task t, the i-th of its burst (ts[t] already counts
  // the burst's earlier replicas)
  task automatic check_replica(int t, int r, int i);
    checks++;
    for (int p = 0; p < NUM_TASKS; p++)
      if (tpre[t][p] && tn[p] > 0 && !all_complete(p)) fail($sformatf("task %0d before prerequisite %0d", t, p));
    for (int d = 0; d < NDIR; d++) begin
      int a, b, p1, p2;
      if (!dirs[d].valid) continue;
      a = dirs[d].a; b = dirs[d].b; p1 = dirs[d].p1; p2 = dirs[d].p2;
      case (dirs[d].kind)
        DIR_SAC: if (b == t)
          for (int k = 0; k <= r + p1 && k < tn[a]; k++)
            if (!completed[a][k]) fail($sformatf("SAC: B%0d before A%0d completed", r, k));
        DIR_SAS: begin
          if (b == t && ts[a] < tn[a] && !(ts[a] - r > p1)) fail($sformatf("SAS: B%0d with A.s=%0d", r, ts[a]));
          if (a == t && ts[b] < tn[b] && !(r - ts[b] < p2)) fail($sformatf("SAS: A%0d with B.s=%0d", r, ts[b]));
        end
        DIR_SAMC: if (b == t)
          for (int k = p1 * r; k < p1 * (r + 1) && k < tn[a]; k++)
            if (!completed[a][k]) fail($sformatf("SAMC: B%0d before A%0d completed", r, k));
        DIR_LNAR: if (b == t && (ts[t] - n_done(t)) >= p1) fail($sformatf("LNAR: too many active (%0d)", ts[t] - n_done(t) + i + 1));
        DIR_ACF: begin
          if (b == t && ts[a] < tn[a] && (ts[b] - n_done(b)) > (ts[a] - n_done(a))) fail($sformatf("ACF: B ahead r=%0d i=%0d actB=%0d actA=%0d cnt=%0d", r, i, ts[b]-n_done(b), ts[a]-n_done(a), i));
          if (a == t && ts[b] < tn[b] && (ts[a] - n_done(a)) > (ts[b] - n_done(b))) fail("ACF: A ahead");
        end
        DIR_LNR: if (b == t && r >= es_of(t) + p1) fail($sformatf("LNR: replica %0d with es %0d", r, es_of(t)));
        default: ;
      endcase
    end
  endtask

  // network + core + buffer model
  always @(posedge clk) begin
    int nfree;
    if (rst_n) begin
      if (disp[0].valid && disp[1].valid && disp[0].tid != disp[1].tid) two_tasks++;
      for (int p = 0; p < F; p++) if (disp[p].valid) begin
        checks++;
        if (int'(disp[p].base) != ts[disp[p].tid]) fail("out-of-order dispatch");
        if (disp[p].cnt > free[p]) fail("burst larger than free cores");
        for (int i = 0; i < int'(disp[p].cnt); i++) begin
          int r;
          r = int'(disp[p].base) + i;
          check_replica(int'(disp[p].tid), r, i);
          started[disp[p].tid][r] = 1;
          ts[disp[p].tid]++;
          for (int k = p * S; k < (p + 1) * S; k++)
            if (!cbusy[k]) begin
              cbusy[k] = 1; ctask[k] = disp[p].tid; crep[k] = r; cleft[k] = $urandom_range(1, 5);
              break;
            end
        end
      end
      // completions the scheduler counts at this edge (it decided without them)
      for (int k = 0; k < N; k++)
        if (core_done[k]) begin
          cbusy[k] = 0;
          completed[ctask[k]][crep[k]] = 1;
        end
      // next cycle's completions
      for (int k = 0; k < N; k++) begin
        core_done[k] <= 1'b0;
        if (cbusy[k]) begin
          cleft[k]--;
          if (cleft[k] == 0) core_done[k] <= 1'b1;
        end
        core_tid[k] <= task_id_t'(ctask[k]);
      end
      for (int p = 0; p < F; p++) begin
        nfree = 0;
        for (int k = p * S; k < (p + 1) * S; k++) nfree += !cbusy[k];
        free[p] <= burst_t'(nfree);
      end
      for (int j = 0; j < NROB; j++) begin
        int mn;
        mn = -1;
        for (int k = 0; k < N; k++)
          if (cbusy[k] && ctask[k] == rob_dup_id[j] && (mn < 0 || crep[k] < mn)) mn = crep[k];
        rob_es_tid[j]   <= rob_dup_id[j];
        rob_es_valid[j] <= (mn >= 0);
        rob_es_min[j]   <= rep_t'(mn < 0 ? 0 : mn);
      end
    end
  end

  task automatic clear_all();
    run = 0;
    @(negedge clk);
    for (int d = 0; d < NDIR; d++) begin
      dirs[d] = '0;
      cfg_dir_we = 1; cfg_dir_idx = 3'(d); cfg_dir = '0;
      @(negedge clk);
    end
    cfg_dir_we = 0;
    for (int t = 0; t < NUM_TASKS; t++) begin
      tn[t] = 0; tpre[t] = '0; ts[t] = 0;
      for (int r = 0; r < MAXR; r++) begin started[t][r] = 0; completed[t][r] = 0; end
      cfg_task_we = 1; cfg_task_idx = task_id_t'(t); cfg_task = '0;
      @(negedge clk);
    end
    cfg_task_we = 0;
  endtask

  task automatic add_task(int t, int n, int prio, logic [NUM_TASKS-1:0] pre);
    tn[t] = n; tpre[t] = pre;
    cfg_task_we = 1; cfg_task_idx = task_id_t'(t);
    cfg_task = '{valid: 1'b1, n: rep_t'(n), prio: prio_t'(prio), prereq: pre};
    @(negedge clk);
    cfg_task_we = 0;
  endtask

  task automatic add_dir(int d, dir_kind_e k, int b, int a, int p1, int p2);
    dirs[d] = '{valid: 1'b1, kind: k, b: task_id_t'(b), a: task_id_t'(a), p1: dparam_t'(p1), p2: dparam_t'(p2)};
    cfg_dir_we = 1; cfg_dir_idx = 3'(d); cfg_dir = dirs[d];
    @(negedge clk);
    cfg_dir_we = 0;
  endtask

  task automatic run_graph(string name);
    int cyc = 0;
    run = 1;
    @(negedge clk);
    while (!all_done && cyc < 5000) begin @(negedge clk); cyc++; end
    run = 0;
    checks++;
    if (!all_done) fail($sformatf("%s: did not complete", name));
    for (int t = 0; t < NUM_TASKS; t++) begin
      if (tn[t] == 0) continue;
      checks++;
      if (!all_complete(t) || int'(task_s[t]) != tn[t] || int'(task_c[t]) != tn[t])
        fail($sformatf("%s: task %0d s=%0d c=%0d of %0d", name, t, task_s[t], task_c[t], tn[t]));
    end
    $display("%s finished in %0d cycles", name, cyc);
    repeat (8) @(negedge clk);
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run = 0; cfg_task_we = 0; cfg_dir_we = 0; cfg_task_idx = '0; cfg_task = '0;
    cfg_dir_idx = '0; cfg_dir = '0; core_done = '0; core_tid = '0; free = {F{burst_t'(S)}};
    rob_es_tid = '0; rob_es_valid = '0; rob_es_min = '0;
    for (int k = 0; k < N; k++) begin cbusy[k] = 0; ctask[k] = 0; crep[k] = 0; cleft[k] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;

    clear_all();   // SAC with l = 1, B of higher priority
    add_task(0, 40, 1, '0); add_task(1, 40, 3, '0);
    add_dir(0, DIR_SAC, 1, 0, 1, 0);
    run_graph("SAC");

    clear_all();   // SAS (2, 4)
    add_task(0, 40, 2, '0); add_task(1, 40, 2, '0);
    add_dir(0, DIR_SAS, 1, 0, 2, 4);
    run_graph("SAS");

    clear_all();   // SAMC M = 2, |A| = 5, |B| = 3, p_A < p_B
    add_task(0, 5, 1, '0); add_task(1, 3, 2, '0);
    add_dir(0, DIR_SAMC, 1, 0, 2, 0);
    run_graph("SAMC");

    clear_all();   // LNAR K = 3 and LNR K = 5
    add_task(2, 30, 1, '0); add_task(3, 30, 1, '0);
    add_dir(0, DIR_LNAR, 2, 0, 3, 0);
    add_dir(1, DIR_LNR, 3, 0, 5, 0);
    run_graph("LNAR+LNR");

    clear_all();   // ACF and a task-level prerequisite
    add_task(0, 30, 1, '0); add_task(1, 30, 1, '0); add_task(4, 6, 5, 16'b11);
    add_dir(0, DIR_ACF, 1, 0, 0, 0);
    run_graph("ACF+prereq");

    clear_all();   // three es users on two buffer slots
    add_task(0, 20, 3, '0); add_task(1, 20, 2, '0); add_task(2, 20, 1, '0); add_task(3, 20, 1, '0);
    add_dir(0, DIR_SAC, 1, 0, 0, 0);
    add_dir(1, DIR_SAC, 3, 2, -2, 0);
    add_dir(2, DIR_LNR, 1, 0, 4, 0);
    run_graph("slots");

    checks++;
    if (two_tasks == 0) fail("never two tasks in one cycle");
    $display("cycles with two tasks dispatched: %0d", two_tasks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
