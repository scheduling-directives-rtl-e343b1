// sched_pkg: types and widths shared by the task scheduler, its directive
// evaluators, the dispatch distribution tree and the thread re-order buffers.
//
// Replica indices are 0-based throughout: replica k of a task is the (k+1)-th
// replica in dispatch order. Per-task state follows the scheduler's state
// variables n (replica count), s (replicas started), c (replicas completed)
// and es (lowest index that is started but not completed, or s when none is).
//
// Widths are this design's choice. REP_W = 24 holds 4,000,000 replicas, the
// replica count of the image-derivative workload; TASK_W = 4 gives a 16-entry
// task table; CORE_CNT_W = 8 counts up to 255 cores per burst; directive
// parameters are signed and as wide as a replica index plus sign, so a gap
// can span the whole replica range.
package sched_pkg;

  localparam int unsigned TASK_W     = 4;            // task ID width
  localparam int unsigned NUM_TASKS  = 1 << TASK_W;  // task table entries
  localparam int unsigned REP_W      = 24;           // replica index / count width
  localparam int unsigned CORE_CNT_W = 8;            // replicas in one burst
  localparam int unsigned PRIO_W     = 4;            // task priority, larger is higher
  localparam int unsigned PARAM_W    = REP_W + 1;    // signed directive parameter (l, K, M)
  localparam int unsigned LIM_W      = REP_W + 3;    // signed dispatch-count arithmetic

  typedef logic [TASK_W-1:0]     task_id_t;
  typedef logic [REP_W-1:0]      rep_t;
  typedef logic [CORE_CNT_W-1:0] burst_t;
  typedef logic [PRIO_W-1:0]     prio_t;
  typedef logic signed [PARAM_W-1:0] dparam_t;
  typedef logic signed [LIM_W-1:0]   lim_t;

  // "No constraint" value of a dispatch limit.
  localparam lim_t LIM_INF = lim_t'({1'b0, {(LIM_W-1){1'b1}}});

  // Scheduling directives between duplicable tasks B (constrained) and A.
  typedef enum logic [2:0] {
    DIR_SAC  = 3'd0,  // B_j after completion of A_0..A_{j+l}          p1 = l
    DIR_SAS  = 3'd1,  // lmin < A.s - B.s < lmax, paces both tasks      p1 = lmin, p2 = lmax
    DIR_SAMC = 3'd2,  // B_j after completion of A_{Mj}..A_{M(j+1)-1}   p1 = M
    DIR_LNAR = 3'd3,  // at most K active replicas of B                 p1 = K
    DIR_ACF  = 3'd4,  // B and A share the cores evenly                 -
    DIR_LNR  = 3'd5   // B's active replicas span at most K indices     p1 = K
  } dir_kind_e;

  typedef struct packed {
    logic      valid;
    dir_kind_e kind;
    task_id_t  b;      // constrained task
    task_id_t  a;      // reference task (unused by LNAR and LNR)
    dparam_t   p1;
    dparam_t   p2;
  } dir_cfg_t;

  typedef struct packed {
    logic                  valid;   // entry takes part in scheduling
    rep_t                  n;       // number of replicas (1 = regular task)
    prio_t                 prio;
    logic [NUM_TASKS-1:0]  prereq;  // task-level Start-After-Complete predecessors
  } task_cfg_t;

  // Per-task dynamic state as seen by a directive evaluator.
  typedef struct packed {
    rep_t n;
    rep_t s;
    rep_t c;
    lim_t es;   // lowest incomplete index as known; LIM_INF once all completed
  } task_state_t;

  // A burst of cnt replicas of task tid, indices base .. base+cnt-1.
  typedef struct packed {
    logic     valid;
    task_id_t tid;
    rep_t     base;
    burst_t   cnt;
  } disp_req_t;

endpackage
