// dispatch_node: one internal node of the dispatch distribution tree.
//
// A request carries a burst of cnt consecutive replicas (base .. base+cnt-1)
// of one task. The node fills its left sub-tree first, up to the number of
// idle cores it believes that sub-tree has, and sends the rest to the right
// sub-tree with the base index advanced accordingly; both outputs are
// registered, so every level adds one cycle, as the document states for the
// nodes of this network. A single (regular) task is a burst of one.
//
// How a node knows where the idle cores are is this design's choice: it keeps
// a credit count per sub-tree, starting at the sub-tree's core count, taking
// off what it sends down and adding back done_l/done_r, the number of cores in
// that sub-tree whose replica completed this cycle. The parent never sends more
// than credit_l + credit_r, exported as free.
//
// SUB is the number of cores below each child (a power of two).
module dispatch_node
  import sched_pkg::*;
#(
  parameter int unsigned SUB = 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  disp_req_t req,
  input  burst_t    done_l,
  input  burst_t    done_r,
  output disp_req_t req_l,
  output disp_req_t req_r,
  output burst_t    free
);

  burst_t credit_l, credit_r;
  burst_t cnt_l, cnt_r, take;

  always_comb begin
    take  = req.valid ? req.cnt : '0;
    cnt_l = (take < credit_l) ? take : credit_l;
    cnt_r = take - cnt_l;
  end

  assign free = credit_l + credit_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      credit_l <= burst_t'(SUB);
      credit_r <= burst_t'(SUB);
      req_l    <= '0;
      req_r    <= '0;
    end else begin
      credit_l    <= credit_l - cnt_l + done_l;
      credit_r    <= credit_r - cnt_r + done_r;
      req_l.valid <= cnt_l != '0;
      req_l.tid   <= req.tid;
      req_l.base  <= req.base;
      req_l.cnt   <= cnt_l;
      req_r.valid <= cnt_r != '0;
      req_r.tid   <= req.tid;
      req_r.base  <= req.base + rep_t'(cnt_l);
      req_r.cnt   <= cnt_r;
    end
  end

  // The parent must not send more replicas than there are idle cores below.
  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
    req.valid |-> (req.cnt <= credit_l + credit_r));
  a_credit_bound : assert property (@(posedge clk) disable iff (!rst_n)
    (credit_l <= burst_t'(SUB)) && (credit_r <= burst_t'(SUB)));

endmodule
