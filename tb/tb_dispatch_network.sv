// tb_dispatch_network: self-checking test of the distribution tree.
//
// An 8-core tree with two root sub-trees of 4 cores gets, on each sub-tree
// port, random bursts (random task, base index and count up to that port's
// free count); both ports often carry requests in the same cycle. Behavioural
// cores run each replica for 1..6 cycles and pulse core_done. A scoreboard
// checks that every replica of every burst starts on exactly one core of the
// sub-tree it was sent to, exactly log2(4)+1 = 3 cycles after the request,
// that no unexpected replica starts, and that all cores are free at the end.
module tb_dispatch_network;
  import sched_pkg::*;

  localparam int N   = 8;
  localparam int F   = 2;
  localparam int S   = N / F;
  localparam int LAT = $clog2(S) + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  disp_req_t [F-1:0] req;
  burst_t    [F-1:0] free;
  logic     [N-1:0] core_done, core_start, core_busy;
  task_id_t [N-1:0] core_tid;
  rep_t     [N-1:0] core_rep;

  dispatch_network #(.NUM_CORES(N), .ROOT_FANOUT(F)) dut (
    .clk(clk), .rst_n(rst_n), .req(req), .free(free), .core_done(core_done),
    .core_start(core_start), .core_busy(core_busy), .core_tid(core_tid), .core_rep(core_rep));

  int checks = 0, failures = 0;
  int cyc = 0;
  int due [logic [TASK_W+REP_W-1:0]];
  int due_port [logic [TASK_W+REP_W-1:0]];
  int remaining [N];
  int bursts_multi = 0, both_ports = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural cores
  always @(negedge clk) begin
    for (int k = 0; k < N; k++) begin
      core_done[k] <= 1'b0;
      if (rst_n && core_start[k]) remaining[k] = $urandom_range(1, 6);
      else if (rst_n && core_busy[k] && remaining[k] > 0) begin
        remaining[k]--;
        if (remaining[k] == 0) core_done[k] <= 1'b1;
      end
    end
  end

  // scoreboard of arrivals
  always @(negedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < N; k++) begin
        if (core_start[k]) begin
          logic [TASK_W+REP_W-1:0] key;
          key = {core_tid[k], core_rep[k]};
          checks++;
          if (!due.exists(key)) begin
            failures++;
            $display("core %0d started unexpected task %0d replica %0d", k, core_tid[k], core_rep[k]);
          end else begin
            if (due[key] != cyc) begin
              failures++;
              $display("replica %0d arrived at cycle %0d, expected %0d", core_rep[k], cyc, due[key]);
            end
            checks++;
            if (due_port[key] != k / S) begin
              failures++;
              $display("replica %0d arrived on core %0d, outside sub-tree %0d", core_rep[k], k, due_port[key]);
            end
            due_port.delete(key);
            due.delete(key);
          end
        end
      end
    end
  end

  initial begin
    int next_base;
    req = '0; core_done = '0;
    for (int k = 0; k < N; k++) remaining[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    next_base = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      #1;
      req = '0;
      for (int p = 0; p < F; p++) begin
        if (free[p] != 0 && $urandom_range(0, 2) != 0) begin
          req[p].valid = 1'b1;
          req[p].tid   = task_id_t'($urandom_range(0, 15));
          req[p].base  = rep_t'(next_base);
          req[p].cnt   = burst_t'($urandom_range(1, int'(free[p])));
          if (req[p].cnt > 1) bursts_multi++;
          for (int r = 0; r < int'(req[p].cnt); r++) begin
            due[{req[p].tid, rep_t'(next_base + r)}] = cyc + LAT;
            due_port[{req[p].tid, rep_t'(next_base + r)}] = p;
          end
          next_base += int'(req[p].cnt);
        end
      end
      if (req[0].valid && req[1].valid) both_ports++;
    end
    @(negedge clk); #1 req = '0;
    repeat (40) @(negedge clk);
    checks++;
    if (due.num() != 0 || free[0] != burst_t'(S) || free[1] != burst_t'(S) || core_busy != '0) begin
      failures++;
      $display("end: %0d replicas never arrived, free=%0d/%0d busy=%b", due.num(), free[0], free[1], core_busy);
    end
    checks++;
    if (bursts_multi == 0 || both_ports == 0) begin
      failures++;
      $display("no multi-replica burst or no cycle with both ports");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
