// dispatch_network: distribution tree from the scheduler to the cores.
//
// The scheduler is the root of the tree and feeds ROOT_FANOUT sub-trees
// directly, one burst request per sub-tree per cycle (a task ID, the first
// replica index and a replica count no larger than that sub-tree's free
// count). So in one cycle different tasks can go to different sub-trees, and
// one duplicable task can spread over several sub-trees with consecutive base
// indices. Each sub-tree is a binary tree of dispatch_node instances that
// splits its burst over idle cores, one level per cycle; a replica reaches its
// core log2(NUM_CORES/ROOT_FANOUT)+1 clock edges after the request. A regular
// task is a burst of one.
//
// Each leaf holds the (task ID, replica index) its core is executing
// (core_busy/core_tid/core_rep), which is what the thread re-order buffers
// read. core_start pulses for one cycle when a replica arrives; the core
// answers with a one-cycle core_done pulse when it finishes, which frees the
// leaf and returns a credit up the tree.
//
// From the document: a tree rooted at the dispatcher with the cores as
// leaves, one cycle per node, a dispatcher fan-out that is left to the
// implementation (four in its sketch, hence the default), and the two ways of
// using it: one task per sub-tree, or many replicas of one task per sub-tree.
// The binary nodes below the root, the credit scheme and the leaf registers
// are this design's. NUM_CORES and ROOT_FANOUT must be powers of two with
// NUM_CORES / ROOT_FANOUT between 2 and 128.
module dispatch_network
  import sched_pkg::*;
#(
  parameter int unsigned NUM_CORES   = 64,
  parameter int unsigned ROOT_FANOUT = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  disp_req_t [ROOT_FANOUT-1:0] req,
  output burst_t    [ROOT_FANOUT-1:0] free,
  input  logic      [NUM_CORES-1:0]   core_done,
  output logic      [NUM_CORES-1:0]   core_start,
  output logic      [NUM_CORES-1:0]   core_busy,
  output task_id_t  [NUM_CORES-1:0]   core_tid,
  output rep_t      [NUM_CORES-1:0]   core_rep
);

  localparam int unsigned S = NUM_CORES / ROOT_FANOUT;   // cores per sub-tree

  for (genvar p = 0; p < ROOT_FANOUT; p++) begin : g_sub
    // Heap numbering inside a sub-tree: node 1 is its root, node i has
    // children 2i and 2i+1, the leaf of its j-th core is S + j.
    disp_req_t req_at  [2*S];
    burst_t    done_at [2*S];
    burst_t    free_at [S];

    assign req_at[0]  = '0;
    assign done_at[0] = '0;
    assign free_at[0] = '0;
    assign req_at[1]  = req[p];
    assign free[p]    = free_at[1];

    for (genvar i = 1; i < S; i++) begin : g_node
      localparam int unsigned DEPTH = $clog2(i + 1) - 1;
      dispatch_node #(.SUB(S >> (DEPTH + 1))) u_node (
        .clk    (clk),
        .rst_n  (rst_n),
        .req    (req_at[i]),
        .done_l (done_at[2*i]),
        .done_r (done_at[2*i+1]),
        .req_l  (req_at[2*i]),
        .req_r  (req_at[2*i+1]),
        .free   (free_at[i])
      );
      assign done_at[i] = done_at[2*i] + done_at[2*i+1];
    end

    for (genvar j = 0; j < S; j++) begin : g_leaf
      localparam int unsigned K = p * S + j;
      disp_req_t lreq;
      assign lreq = req_at[S + j];
      assign done_at[S + j] = burst_t'(core_done[K] && core_busy[K]);

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          core_busy[K]  <= 1'b0;
          core_start[K] <= 1'b0;
          core_tid[K]   <= '0;
          core_rep[K]   <= '0;
        end else begin
          core_start[K] <= lreq.valid;
          if (lreq.valid) begin
            core_busy[K] <= 1'b1;
            core_tid[K]  <= lreq.tid;
            core_rep[K]  <= lreq.base;
          end else if (core_done[K]) begin
            core_busy[K] <= 1'b0;
          end
        end
      end

      a_leaf_one : assert property (@(posedge clk) disable iff (!rst_n)
        lreq.valid |-> (lreq.cnt == burst_t'(1)) && !core_busy[K]);
    end
  end

endmodule
