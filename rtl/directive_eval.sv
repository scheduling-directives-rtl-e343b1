// directive_eval: dispatch allowance of one scheduling directive.
//
// Combinational. Given a directive entry and the state (n, s, c, es) of its
// constrained task B and reference task A, it returns how many further
// replicas of B (lim_b) and of A (lim_a) the directive allows to be
// dispatched now. LIM_INF means "not constrained"; a value <= 0 means none.
// The scheduler takes the minimum over all directives that name a task.
//
// The formulas are the document's dispatch expressions, with 0-based indices
// (es counts the completed prefix of A):
//   SAC  (l)          lim_b = A.es - B.s - l
//   SAS  (lmin, lmax) lim_b = (A.s - B.s) - lmin,  lim_a = lmax - (A.s - B.s)
//   SAMC (M)          lim_b = floor(A.es / M) - B.s
//   LNAR (K)          lim_b = K - (B.s - B.c)
//   LNR  (K)          lim_b = K - (B.s - B.es)
//   ACF               lim_b = (A.s-A.c) - (B.s-B.c) + 1, lim_a symmetric
// Choices of this design: a dependence on a replica beyond the last one of
// the reference task counts as met once that task has started (SAS, ACF) or
// completed (SAC, SAMC: es is LIM_INF then) all its replicas. ACF lets a task
// dispatch while its active count does not exceed the other's, one replica
// past equality. M = 0 is treated as M = 1. SAC takes B and A to be different
// tasks; LNAR and LNR use only task B.
module directive_eval
  import sched_pkg::*;
(
  input  dir_cfg_t    dir,
  input  task_state_t st_b,
  input  task_state_t st_a,
  output lim_t        lim_b,
  output lim_t        lim_a
);

  lim_t sb, cb, sa, ca, p1, p2, gap, act_a, act_b, m, q;
  logic a_all_started, b_all_started;

  always_comb begin
    sb = lim_t'(st_b.s);  cb = lim_t'(st_b.c);
    sa = lim_t'(st_a.s);  ca = lim_t'(st_a.c);
    p1 = lim_t'(dir.p1);
    p2 = lim_t'(dir.p2);
    gap   = sa - sb;
    act_a = sa - ca;
    act_b = sb - cb;
    a_all_started = (st_a.s == st_a.n);
    b_all_started = (st_b.s == st_b.n);
    m = (p1 <= 0) ? lim_t'(1) : p1;
    q = '0;
    lim_b = LIM_INF;
    lim_a = LIM_INF;
    if (dir.valid) begin
      unique case (dir.kind)
        DIR_SAC:  if (st_a.es != LIM_INF) lim_b = st_a.es - sb - p1;
        DIR_SAS: begin
          if (!a_all_started) lim_b = gap - p1;
          if (!b_all_started) lim_a = p2 - gap;
        end
        DIR_SAMC: begin
          if (st_a.es != LIM_INF) begin
            q     = st_a.es / m;
            lim_b = q - sb;
          end
        end
        DIR_LNAR: lim_b = p1 - act_b;
        DIR_ACF: begin
          if (!a_all_started) lim_b = act_a - act_b + 1;
          if (!b_all_started) lim_a = act_b - act_a + 1;
        end
        DIR_LNR: begin
          if (st_b.es != LIM_INF) lim_b = p1 - (sb - st_b.es);
        end
        default: ;
      endcase
    end
  end

endmodule
