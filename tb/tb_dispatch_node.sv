// tb_dispatch_node: self-checking test of one distribution-tree node.
//
// A node with 4 cores below each child receives random bursts no larger than
// its free count and random completion counts from both sides. A reference
// credit model in the testbench predicts the split (left first), the right
// half's base index, the one-cycle output delay and the free count.
module tb_dispatch_node;
  import sched_pkg::*;

  localparam int SUB = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  disp_req_t req, req_l, req_r;
  burst_t    done_l, done_r, free;
  int checks = 0, failures = 0;

  dispatch_node #(.SUB(SUB)) dut (
    .clk(clk), .rst_n(rst_n), .req(req), .done_l(done_l), .done_r(done_r),
    .req_l(req_l), .req_r(req_r), .free(free));

  int cred_l, cred_r;
  int exp_cl, exp_cr;
  logic [REP_W-1:0] exp_base;
  task_id_t exp_tid;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; done_l = '0; done_r = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    cred_l = SUB; cred_r = SUB;
    exp_cl = 0; exp_cr = 0; exp_base = '0; exp_tid = '0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // outputs of the previous cycle's request
      checks++;
      if (int'(free) != cred_l + cred_r ||
          req_l.valid != (exp_cl != 0) || (exp_cl != 0 && (int'(req_l.cnt) != exp_cl || req_l.base != exp_base || req_l.tid != exp_tid)) ||
          req_r.valid != (exp_cr != 0) || (exp_cr != 0 && (int'(req_r.cnt) != exp_cr || req_r.base != exp_base + rep_t'(exp_cl) || req_r.tid != exp_tid))) begin
        failures++;
        if (failures < 10)
          $display("cyc %0d: free=%0d(%0d) L v%0d c%0d b%0d (%0d) R v%0d c%0d b%0d (%0d)", cyc,
                   free, cred_l + cred_r, req_l.valid, req_l.cnt, req_l.base, exp_cl,
                   req_r.valid, req_r.cnt, req_r.base, exp_cr);
      end
      // new stimulus
      done_l = burst_t'($urandom_range(0, SUB - cred_l));
      done_r = burst_t'($urandom_range(0, SUB - cred_r));
      req.valid = ($urandom_range(0, 3) != 0) && (cred_l + cred_r > 0);
      req.cnt   = req.valid ? burst_t'($urandom_range(1, cred_l + cred_r)) : '0;
      req.base  = rep_t'($urandom_range(0, 100000));
      req.tid   = task_id_t'($urandom_range(0, 15));
      // reference model
      exp_cl = req.valid ? ((int'(req.cnt) < cred_l) ? int'(req.cnt) : cred_l) : 0;
      exp_cr = req.valid ? int'(req.cnt) - exp_cl : 0;
      exp_base = req.base;
      exp_tid  = req.tid;
      cred_l = cred_l - exp_cl + int'(done_l);
      cred_r = cred_r - exp_cr + int'(done_r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
