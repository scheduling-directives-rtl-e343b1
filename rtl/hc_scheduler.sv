// hc_scheduler: synchronizer/scheduler with scheduling directives for
// duplicable tasks.
//
// A task table holds, per task, its replica count n, priority and task-level
// predecessors (Start-After-Complete between whole tasks), and tracks s (replicas
// started) and c (replicas completed). A directive table holds up to NUM_DIR
// directives (SAC, SAS, SAMC, LNAR, ACF, LNR, see sched_pkg) between pairs of
// tasks. Every cycle each task's dispatch allowance is the minimum of its
// remaining replicas and of what every directive naming it allows
// (directive_eval); of the tasks whose predecessors have completed and whose
// allowance is positive, the highest-priority one (lowest task ID on a tie)
// is dispatched first. The scheduler is the root of the distribution tree and
// drives NUM_PORTS sub-trees, each reporting how many of its cores are idle.
// It walks the ports in order and gives each port with idle cores a burst of
// the current task, min(what is left of its allowance, idle cores in that
// sub-tree), with consecutive replica indices; once that task's allowance is
// used up, the next port gets the next eligible task by priority. So one
// cycle can dispatch one task over several sub-trees, several tasks to
// different sub-trees, or both. Replicas of a task are always dispatched in
// index order, lowest first. Directive allowances are computed from the state
// at the start of the cycle; every directive only gets looser when the other
// task of the pair is dispatched, so dispatching both in one cycle is safe.
//
// es, the earliest incomplete replica, comes from the thread re-order buffers.
// A task that a SAC, SAMC or LNR directive needs es of is given a buffer slot
// (dup_id) when its first replica is dispatched and gives it back when all its
// replicas have completed; while no slot is free such a task waits. At most
// one slot is handed out per cycle. Because a
// buffer result is ES_LAG cycles behind the dispatches (distribution tree plus
// buffer pipeline), the scheduler uses es = min(buffer result, s as it was
// ES_LAG cycles ago), which never overstates the true es.
//
// The dispatch formulas follow the document; the table sizes, the slot
// allocation policy, the tie-break, the configuration port and the lag
// correction are this design's choices. Configuration: a write to task entry t
// (cfg_task_we) also clears its s and c; the scheduler dispatches only while
// run is high. Completions arrive as core_done with the finishing core's
// task ID in core_tid; any number may complete in one cycle.
module hc_scheduler
  import sched_pkg::*;
#(
  parameter int unsigned NUM_CORES = 64,
  parameter int unsigned NUM_PORTS = 4,
  parameter int unsigned NUM_ROB   = 4,
  parameter int unsigned NUM_DIR   = 8,
  parameter int unsigned ES_LAG    = 10
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         run,
  // configuration
  input  logic                         cfg_task_we,
  input  task_id_t                     cfg_task_idx,
  input  task_cfg_t                    cfg_task,
  input  logic                         cfg_dir_we,
  input  logic [$clog2(NUM_DIR)-1:0]   cfg_dir_idx,
  input  dir_cfg_t                     cfg_dir,
  // distribution network
  output disp_req_t [NUM_PORTS-1:0]    disp,
  input  burst_t    [NUM_PORTS-1:0]    free,
  // completions
  input  logic     [NUM_CORES-1:0]     core_done,
  input  task_id_t [NUM_CORES-1:0]     core_tid,
  // thread re-order buffers
  output task_id_t [NUM_ROB-1:0]       rob_dup_id,
  input  task_id_t [NUM_ROB-1:0]       rob_es_tid,
  input  logic     [NUM_ROB-1:0]       rob_es_valid,
  input  rep_t     [NUM_ROB-1:0]       rob_es_min,
  // status
  output rep_t     [NUM_TASKS-1:0]     task_s,
  output rep_t     [NUM_TASKS-1:0]     task_c,
  output logic                         all_done
);

  localparam int unsigned SLOT_W = (NUM_ROB > 1) ? $clog2(NUM_ROB) : 1;

  // ---------------- state ----------------
  task_cfg_t [NUM_TASKS-1:0] tcfg;
  rep_t      [NUM_TASKS-1:0] s_q, c_q;
  logic      [NUM_TASKS-1:0] has_slot;
  logic [NUM_TASKS-1:0][SLOT_W-1:0] slot_of;
  dir_cfg_t  [NUM_DIR-1:0]   dcfg;

  logic     [NUM_ROB-1:0] slot_used;
  task_id_t [NUM_ROB-1:0] slot_tid;
  rep_t     [NUM_ROB-1:0][ES_LAG-1:0] slot_hist;  // s of the slot's task, [0] newest

  // ---------------- derived per-task state ----------------
  logic [NUM_TASKS-1:0] t_done, t_needs_es, t_ready, t_elig;
  lim_t [NUM_TASKS-1:0] t_es, t_lim;
  task_state_t [NUM_TASKS-1:0] t_st;
  lim_t [NUM_ROB-1:0] slot_es;

  always_comb begin
    for (int t = 0; t < NUM_TASKS; t++)
      t_done[t] = tcfg[t].valid && (c_q[t] == tcfg[t].n);
  end

  // es seen through each buffer slot, corrected for the pipeline lag
  always_comb begin
    for (int k = 0; k < NUM_ROB; k++) begin
      slot_es[k] = lim_t'(slot_hist[k][ES_LAG-1]);
      if (rob_es_valid[k] && rob_es_tid[k] == slot_tid[k] &&
          lim_t'(rob_es_min[k]) < slot_es[k])
        slot_es[k] = lim_t'(rob_es_min[k]);
    end
  end

  always_comb begin
    for (int t = 0; t < NUM_TASKS; t++) begin
      if (t_done[t])          t_es[t] = LIM_INF;
      else if (has_slot[t])   t_es[t] = slot_es[slot_of[t]];
      else                    t_es[t] = '0;
      t_st[t].n  = tcfg[t].n;
      t_st[t].s  = s_q[t];
      t_st[t].c  = c_q[t];
      t_st[t].es = t_es[t];
    end
  end

  always_comb begin
    t_needs_es = '0;
    for (int d = 0; d < NUM_DIR; d++) begin
      if (dcfg[d].valid) begin
        if (dcfg[d].kind == DIR_SAC || dcfg[d].kind == DIR_SAMC) t_needs_es[dcfg[d].a] = 1'b1;
        if (dcfg[d].kind == DIR_LNR)                             t_needs_es[dcfg[d].b] = 1'b1;
      end
    end
  end

  // ---------------- directives ----------------
  lim_t [NUM_DIR-1:0] d_lim_b, d_lim_a;

  for (genvar d = 0; d < NUM_DIR; d++) begin : g_dir
    directive_eval u_eval (
      .dir   (dcfg[d]),
      .st_b  (t_st[dcfg[d].b]),
      .st_a  (t_st[dcfg[d].a]),
      .lim_b (d_lim_b[d]),
      .lim_a (d_lim_a[d])
    );
  end

  logic              free_slot_any;
  logic [SLOT_W-1:0] free_slot;

  always_comb begin
    free_slot_any = 1'b0;
    free_slot     = '0;
    for (int k = NUM_ROB - 1; k >= 0; k--) begin
      if (!slot_used[k]) begin
        free_slot_any = 1'b1;
        free_slot     = SLOT_W'(k);
      end
    end
  end

  always_comb begin
    for (int t = 0; t < NUM_TASKS; t++) begin
      t_lim[t] = lim_t'(tcfg[t].n) - lim_t'(s_q[t]);
      for (int d = 0; d < NUM_DIR; d++) begin
        if (dcfg[d].valid && dcfg[d].b == task_id_t'(t) && d_lim_b[d] < t_lim[t]) t_lim[t] = d_lim_b[d];
        if (dcfg[d].valid && dcfg[d].a == task_id_t'(t) && d_lim_a[d] < t_lim[t]) t_lim[t] = d_lim_a[d];
      end
      t_ready[t] = 1'b1;
      for (int p = 0; p < NUM_TASKS; p++)
        if (tcfg[t].prereq[p] && tcfg[p].valid && !t_done[p]) t_ready[t] = 1'b0;
      t_elig[t] = run && tcfg[t].valid && t_ready[t] && (t_lim[t] > 0) &&
                  (!t_needs_es[t] || has_slot[t] || free_slot_any);
    end
  end

  // ---------------- selection ----------------
  logic [NUM_TASKS-1:0] t_used;    // tasks picked this cycle
  rep_t [NUM_TASKS-1:0] add_cnt;   // replicas dispatched this cycle, per task
  logic                 claim;     // a new buffer slot is handed out
  task_id_t             claim_tid;

  always_comb begin
    logic     cur_ok, found;
    task_id_t cur, best;
    lim_t     rem, burst;
    rep_t     base;
    t_used    = '0;
    add_cnt   = '0;
    claim     = 1'b0;
    claim_tid = '0;
    cur_ok    = 1'b0;
    found     = 1'b0;
    best      = '0;
    burst     = '0;
    cur       = '0;
    rem       = '0;
    base      = '0;
    for (int p = 0; p < NUM_PORTS; p++) begin
      disp[p] = '0;
      if ((!cur_ok || rem == '0) && free[p] != '0) begin
        found = 1'b0;
        best  = '0;
        for (int t = 0; t < NUM_TASKS; t++) begin
          if (t_elig[t] && !t_used[t] && !(claim && t_needs_es[t] && !has_slot[t]) &&
              (!found || tcfg[t].prio > tcfg[best].prio)) begin
            found = 1'b1;
            best  = task_id_t'(t);
          end
        end
        cur_ok = found;
        cur    = best;
        rem    = t_lim[best];
        base   = s_q[best];
        if (found) begin
          t_used[best] = 1'b1;
          if (t_needs_es[best] && !has_slot[best]) begin
            claim     = 1'b1;
            claim_tid = best;
          end
        end
      end
      if (cur_ok && rem != '0 && free[p] != '0) begin
        burst = rem;
        if (lim_t'(free[p]) < burst) burst = lim_t'(free[p]);
        disp[p].valid = 1'b1;
        disp[p].tid   = cur;
        disp[p].base  = base;
        disp[p].cnt   = burst_t'(burst);
        base          = base + rep_t'(burst);
        rem           = rem - burst;
        add_cnt[cur]  = add_cnt[cur] + rep_t'(burst);
      end
    end
  end

  // ---------------- completions ----------------
  rep_t [NUM_TASKS-1:0] done_cnt;
  always_comb begin
    for (int t = 0; t < NUM_TASKS; t++) begin
      done_cnt[t] = '0;
      for (int k = 0; k < NUM_CORES; k++)
        if (core_done[k] && core_tid[k] == task_id_t'(t)) done_cnt[t] = done_cnt[t] + 1'b1;
    end
  end

  // ---------------- state update ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tcfg      <= '0;
      dcfg      <= '0;
      s_q       <= '0;
      c_q       <= '0;
      has_slot  <= '0;
      slot_of   <= '0;
      slot_used <= '0;
      slot_tid  <= '0;
      slot_hist <= '0;
    end else begin
      for (int t = 0; t < NUM_TASKS; t++) begin
        c_q[t] <= c_q[t] + done_cnt[t];
        s_q[t] <= s_q[t] + add_cnt[t];
      end

      // buffer slots: history of s, release when the task has completed
      for (int k = 0; k < NUM_ROB; k++) begin
        slot_hist[k] <= {slot_hist[k][ES_LAG-2:0], s_q[slot_tid[k]]};
        if (slot_used[k] && (t_done[slot_tid[k]] || !tcfg[slot_tid[k]].valid)) begin
          slot_used[k]           <= 1'b0;
          has_slot[slot_tid[k]]  <= 1'b0;
        end
      end
      if (claim) begin
        slot_used[free_slot]  <= 1'b1;
        slot_tid[free_slot]   <= claim_tid;
        slot_hist[free_slot]  <= '0;
        has_slot[claim_tid]   <= 1'b1;
        slot_of[claim_tid]    <= free_slot;
      end

      if (cfg_task_we) begin
        tcfg[cfg_task_idx] <= cfg_task;
        s_q[cfg_task_idx]  <= '0;
        c_q[cfg_task_idx]  <= '0;
      end
      if (cfg_dir_we)
        dcfg[cfg_dir_idx] <= cfg_dir;
    end
  end

  always_comb begin
    all_done = 1'b1;
    for (int t = 0; t < NUM_TASKS; t++)
      if (tcfg[t].valid && !t_done[t]) all_done = 1'b0;
  end

  assign task_s     = s_q;
  assign task_c     = c_q;
  assign rob_dup_id = slot_tid;

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port_chk
    a_burst_fits : assert property (@(posedge clk) disable iff (!rst_n)
      disp[p].valid |-> (disp[p].cnt != '0) && (disp[p].cnt <= free[p]));
    a_in_order : assert property (@(posedge clk) disable iff (!rst_n)
      disp[p].valid |-> (lim_t'(disp[p].base) + lim_t'(disp[p].cnt) <= lim_t'(tcfg[disp[p].tid].n)));
  end

endmodule
