// hc_sched_top: task dispatch subsystem of a shared-cache many-core processor
// with scheduling directives for duplicable tasks.
//
// Three parts, wired as in the processor's block diagram: the scheduler
// (hc_scheduler) decides each cycle which tasks to dispatch and how many of
// their replicas, one burst for each of the ROOT_FANOUT sub-trees it feeds;
// the distribution network (dispatch_network) carries each burst down its
// sub-tree to idle cores and records what each core runs; NUM_ROB thread
// re-order buffers (thread_rob) reduce the cores' (task ID, replica index)
// pairs to es, the earliest incomplete replica of the task the scheduler names
// on each buffer's dup_id, which SAC, SAMC and LNR directives need.
//
// The cores themselves, the memory interconnect and the shared cache are
// outside this block: each core sees core_start (one-cycle pulse) with
// core_tid/core_rep, runs the replica and answers with a one-cycle core_done.
// core_busy shows which cores hold a replica.
//
// Defaults: 64 cores and a 3-cycle buffer pipeline as in the 64-core figures
// the document gives, and a fan-out of 4 at the root as in its sketch of the
// tree; 4 buffers and 8 directive entries are this design's choice. ES_LAG, the scheduler's allowance for buffer and tree latency, is
// derived from them.
module hc_sched_top
  import sched_pkg::*;
#(
  parameter int unsigned NUM_CORES        = 64,
  parameter int unsigned ROOT_FANOUT      = 4,
  parameter int unsigned NUM_ROB          = 4,
  parameter int unsigned NUM_DIR          = 8,
  parameter int unsigned LEVELS_PER_STAGE = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       run,
  input  logic                       cfg_task_we,
  input  task_id_t                   cfg_task_idx,
  input  task_cfg_t                  cfg_task,
  input  logic                       cfg_dir_we,
  input  logic [$clog2(NUM_DIR)-1:0] cfg_dir_idx,
  input  dir_cfg_t                   cfg_dir,
  output logic     [NUM_CORES-1:0]   core_start,
  output logic     [NUM_CORES-1:0]   core_busy,
  output task_id_t [NUM_CORES-1:0]   core_tid,
  output rep_t     [NUM_CORES-1:0]   core_rep,
  input  logic     [NUM_CORES-1:0]   core_done,
  output rep_t     [NUM_TASKS-1:0]   task_s,
  output rep_t     [NUM_TASKS-1:0]   task_c,
  output logic                       all_done
);

  // node levels below the root, and the buffer pipeline depth
  localparam int unsigned LEVELS  = $clog2(NUM_CORES / ROOT_FANOUT);
  localparam int unsigned ROB_LAT = ($clog2(NUM_CORES) + LEVELS_PER_STAGE - 1) / LEVELS_PER_STAGE;
  localparam int unsigned ES_LAG  = LEVELS + ROB_LAT + 1;

  disp_req_t [ROOT_FANOUT-1:0] disp;
  burst_t    [ROOT_FANOUT-1:0] free;
  logic [NUM_CORES-1:0] done_q;

  task_id_t [NUM_ROB-1:0] rob_dup_id, rob_es_tid;
  logic     [NUM_ROB-1:0] rob_es_valid;
  rep_t     [NUM_ROB-1:0] rob_es_min;

  // A completion counts only for a core that holds a replica.
  assign done_q = core_done & core_busy;

  hc_scheduler #(
    .NUM_CORES (NUM_CORES),
    .NUM_PORTS (ROOT_FANOUT),
    .NUM_ROB   (NUM_ROB),
    .NUM_DIR   (NUM_DIR),
    .ES_LAG    (ES_LAG)
  ) u_sched (
    .clk          (clk),
    .rst_n        (rst_n),
    .run          (run),
    .cfg_task_we  (cfg_task_we),
    .cfg_task_idx (cfg_task_idx),
    .cfg_task     (cfg_task),
    .cfg_dir_we   (cfg_dir_we),
    .cfg_dir_idx  (cfg_dir_idx),
    .cfg_dir      (cfg_dir),
    .disp         (disp),
    .free         (free),
    .core_done    (done_q),
    .core_tid     (core_tid),
    .rob_dup_id   (rob_dup_id),
    .rob_es_tid   (rob_es_tid),
    .rob_es_valid (rob_es_valid),
    .rob_es_min   (rob_es_min),
    .task_s       (task_s),
    .task_c       (task_c),
    .all_done     (all_done)
  );

  dispatch_network #(
    .NUM_CORES   (NUM_CORES),
    .ROOT_FANOUT (ROOT_FANOUT)
  ) u_net (
    .clk        (clk),
    .rst_n      (rst_n),
    .req        (disp),
    .free       (free),
    .core_done  (done_q),
    .core_start (core_start),
    .core_busy  (core_busy),
    .core_tid   (core_tid),
    .core_rep   (core_rep)
  );

  for (genvar k = 0; k < NUM_ROB; k++) begin : g_rob
    thread_rob #(
      .NUM_CORES        (NUM_CORES),
      .LEVELS_PER_STAGE (LEVELS_PER_STAGE)
    ) u_rob (
      .clk        (clk),
      .rst_n      (rst_n),
      .dup_id     (rob_dup_id[k]),
      .core_valid (core_busy),
      .core_tid   (core_tid),
      .core_rep   (core_rep),
      .es_tid     (rob_es_tid[k]),
      .es_valid   (rob_es_valid[k]),
      .es_min     (rob_es_min[k])
    );
  end

endmodule
