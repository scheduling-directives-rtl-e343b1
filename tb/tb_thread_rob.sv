// tb_thread_rob: self-checking test of the thread re-order buffer.
//
// Part 1 drives an 8-core buffer with the eight (task, replica) pairs of the
// worked example (task A = ID 0, task B = ID 1) and expects es = 4 for A and
// es = 1 for B. Part 2 drives the 64-core default buffer with random core
// states and a random dup_id every cycle (time-multiplexed use) and compares
// each result with a reference minimum taken LATENCY = 3 cycles earlier,
// which also checks the 3-cycle latency of the 64-core configuration.
module tb_thread_rob;
  import sched_pkg::*;

  localparam int N  = 64;
  localparam int LAT = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---- 8-core example ----
  task_id_t        dup8;
  logic     [7:0]  v8;
  task_id_t [7:0]  t8;
  rep_t     [7:0]  r8;
  task_id_t        es_tid8;
  logic            es_v8;
  rep_t            es_min8;

  thread_rob #(.NUM_CORES(8)) u_rob8 (
    .clk(clk), .rst_n(rst_n), .dup_id(dup8), .core_valid(v8), .core_tid(t8),
    .core_rep(r8), .es_tid(es_tid8), .es_valid(es_v8), .es_min(es_min8));

  // ---- 64-core default ----
  task_id_t        dup;
  logic     [N-1:0] v;
  task_id_t [N-1:0] t;
  rep_t     [N-1:0] r;
  task_id_t        es_tid;
  logic            es_v;
  rep_t            es_min;

  thread_rob u_rob (
    .clk(clk), .rst_n(rst_n), .dup_id(dup), .core_valid(v), .core_tid(t),
    .core_rep(r), .es_tid(es_tid), .es_valid(es_v), .es_min(es_min));

  // reference pipeline
  logic     ref_v   [LAT+1];
  rep_t     ref_min [LAT+1];
  task_id_t ref_tid [LAT+1];

  function automatic void ref_calc(output logic ov, output rep_t omin);
    ov = 0; omin = '0;
    for (int k = 0; k < N; k++)
      if (v[k] && t[k] == dup && (!ov || r[k] < omin)) begin
        ov = 1; omin = r[k];
      end
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v = '0; t = '0; r = '0; dup = '0;
    // cores 1..8 of the example: (A,4) (B,1) (A,7) (A,9) (A,6) (A,10) (B,3) (B,4)
    v8 = '1;
    t8 = {4'd1, 4'd1, 4'd0, 4'd0, 4'd0, 4'd0, 4'd1, 4'd0};
    r8 = {24'd4, 24'd3, 24'd10, 24'd6, 24'd9, 24'd7, 24'd1, 24'd4};
    dup8 = 4'd0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); dup8 = 4'd0;
    @(negedge clk); dup8 = 4'd1;
    @(negedge clk);
    // 3 levels: registers after level 2 and at the root -> 2 cycles
    checks++;
    if (!(es_v8 && es_min8 == 24'd4 && es_tid8 == 4'd0)) begin
      failures++; $display("example: A es=%0d v=%0d tid=%0d", es_min8, es_v8, es_tid8);
    end
    @(negedge clk);
    checks++;
    if (!(es_v8 && es_min8 == 24'd1 && es_tid8 == 4'd1)) begin
      failures++; $display("example: B es=%0d v=%0d tid=%0d", es_min8, es_v8, es_tid8);
    end
    // no core runs task 2
    dup8 = 4'd2;
    repeat (2) @(negedge clk);
    checks++;
    if (es_v8) begin failures++; $display("example: task 2 should be idle"); end

    // random 64-core run
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      if (cyc >= LAT) begin
        checks++;
        if (es_v !== ref_v[LAT] || es_tid !== ref_tid[LAT] || (es_v && es_min !== ref_min[LAT])) begin
          failures++;
          if (failures < 10)
            $display("cyc %0d: got v=%0d min=%0d tid=%0d, want v=%0d min=%0d tid=%0d",
                     cyc, es_v, es_min, es_tid, ref_v[LAT], ref_min[LAT], ref_tid[LAT]);
        end
      end
      // new stimulus; few task IDs so that matches are common
      dup = task_id_t'($urandom_range(0, 3));
      for (int k = 0; k < N; k++) begin
        v[k] = ($urandom_range(0, 3) != 0);
        t[k] = task_id_t'($urandom_range(0, 3));
        r[k] = rep_t'($urandom_range(0, (cyc % 3 == 0) ? 20 : 100000));
      end
      if (cyc % 50 == 7) v = '0;
      #1;
      for (int i = LAT; i > 0; i--) begin
        ref_v[i] = ref_v[i-1]; ref_min[i] = ref_min[i-1]; ref_tid[i] = ref_tid[i-1];
      end
      ref_calc(ref_v[1], ref_min[1]);
      ref_tid[1] = dup;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
