// thread_rob: thread re-order buffer for one duplicable task.
//
// Every core reports the task ID and replica index it is executing (valid
// low when idle). The unit keeps only the cores whose task ID equals dup_id
// and reduces their replica indices with a binary tree of minimum nodes. The
// root is es, the lowest-index replica of that task that has started and not
// completed; es_valid is low when no core runs a replica of the task.
//
// As in the document, the tree has the cores as leaves and min nodes inside,
// and for several concurrently active tasks the unit is replicated (one per
// task, selected by dup_id) or one copy is time-multiplexed by changing dup_id
// every cycle; es_tid names the task a result belongs to. The task filter sits
// at the leaves. The pipeline depth is this design's choice: a register after
// every LEVELS_PER_STAGE tree levels and after the root, so 64 cores (6
// levels) give the 3-cycle latency quoted for the 64-core unit.
//
// Timing: es_* reflect core_* and dup_id sampled LATENCY cycles earlier.
// NUM_CORES must be a power of two, at least 2.
module thread_rob
  import sched_pkg::*;
#(
  parameter int unsigned NUM_CORES        = 64,
  parameter int unsigned LEVELS_PER_STAGE = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  task_id_t                dup_id,
  input  logic     [NUM_CORES-1:0] core_valid,
  input  task_id_t [NUM_CORES-1:0] core_tid,
  input  rep_t     [NUM_CORES-1:0] core_rep,
  output task_id_t                es_tid,
  output logic                    es_valid,
  output rep_t                    es_min
);

  localparam int unsigned LEVELS = $clog2(NUM_CORES);

  // Filtered leaves: only replicas of task dup_id take part.
  logic [NUM_CORES-1:0] leaf_v;
  always_comb begin
    for (int k = 0; k < NUM_CORES; k++)
      leaf_v[k] = core_valid[k] && (core_tid[k] == dup_id);
  end

  // Level L has NUM_CORES >> L min nodes; a level ends in a pipeline
  // register when L is a multiple of LEVELS_PER_STAGE and at the root.
  for (genvar L = 1; L <= LEVELS; L++) begin : g_level
    localparam int unsigned NODES = NUM_CORES >> L;
    localparam bit          REG   = ((L % LEVELS_PER_STAGE) == 0) || (L == LEVELS);

    logic [2*NODES-1:0] in_v;
    rep_t [2*NODES-1:0] in_r;
    task_id_t           in_tid;
    logic [NODES-1:0]   v_d, out_v;
    rep_t [NODES-1:0]   r_d, out_r;
    task_id_t           out_tid;

    if (L == 1) begin : g_first
      assign in_v   = leaf_v;
      assign in_r   = core_rep;
      assign in_tid = dup_id;
    end else begin : g_next
      assign in_v   = g_level[L-1].out_v;
      assign in_r   = g_level[L-1].out_r;
      assign in_tid = g_level[L-1].out_tid;
    end

    always_comb begin
      for (int k = 0; k < NODES; k++) begin
        v_d[k] = in_v[2*k] || in_v[2*k+1];
        if (in_v[2*k] && (!in_v[2*k+1] || in_r[2*k] <= in_r[2*k+1])) r_d[k] = in_r[2*k];
        else                                                          r_d[k] = in_r[2*k+1];
      end
    end

    if (REG) begin : g_reg
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          out_v   <= '0;
          out_r   <= '0;
          out_tid <= '0;
        end else begin
          out_v   <= v_d;
          out_r   <= r_d;
          out_tid <= in_tid;
        end
      end
    end else begin : g_comb
      assign out_v   = v_d;
      assign out_r   = r_d;
      assign out_tid = in_tid;
    end
  end

  assign es_valid = g_level[LEVELS].out_v[0];
  assign es_min   = g_level[LEVELS].out_r[0];
  assign es_tid   = g_level[LEVELS].out_tid;

endmodule
