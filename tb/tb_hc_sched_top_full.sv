// tb_hc_sched_top_full: the dispatch subsystem at its default size (64 cores
// in four root sub-trees of 16, 4 thread re-order buffers, 8 directive
// entries) running the image-derivative workload: an x-derivative task and
// a y-derivative task over a 2000 x 2000 single-byte image, one replica per element (4,000,000 replicas
// each), paced by SAS(y, x) with lmin = 80,000 and lmax = lmin + 2 * 64.
// Replicas run 2..8 cycles on the behavioural cores (no memory model).
// A short SAC/SAMC/LNR graph first exercises the re-order buffers at full
// width. The scoreboard checks every replica start; the test also checks
// that the SAS gap stayed inside its range and that bursts were used.
module tb_hc_sched_top_full;
  import sched_pkg::*;

  localparam int N = 64, NDIR = 8;
  localparam int ROWS = 2000, COLS = 2000;
  localparam int NREP = ROWS * COLS;
  localparam int LMIN = 80000, LMAX = LMIN + 2 * N;

  `include "tb_top_common.svh"

  hc_sched_top dut (
    .clk(clk), .rst_n(rst_n), .run(run),
    .cfg_task_we(cfg_task_we), .cfg_task_idx(cfg_task_idx), .cfg_task(cfg_task),
    .cfg_dir_we(cfg_dir_we), .cfg_dir_idx(cfg_dir_idx), .cfg_dir(cfg_dir),
    .core_start(core_start), .core_busy(core_busy), .core_tid(core_tid), .core_rep(core_rep),
    .core_done(core_done), .task_s(task_s), .task_c(task_c), .all_done(all_done));

  // largest and smallest dispatch gap seen while both tasks were dispatching
  int gap_max = -1, gap_min = NREP;
  always @(posedge clk) begin
    if (rst_n && run && tn[0] == NREP && task_s[1] > 0 && int'(task_s[0]) < NREP) begin
      int g;
      g = int'(task_s[0]) - int'(task_s[1]);
      if (g > gap_max) gap_max = g;
      if (g < gap_min) gap_min = g;
    end
  end

  initial begin
    #100000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint cycles;
    init_tb();

    clear_all();
    add_task(0, 3000, 2, '0); add_task(1, 1500, 3, '0); add_task(2, 3000, 1, '0);
    add_dir(0, DIR_SAMC, 1, 0, 2, 0);
    add_dir(1, DIR_SAC, 2, 0, 64, 0);
    add_dir(2, DIR_LNR, 2, 0, 200, 0);
    run_graph("SAMC/SAC/LNR at 64 cores", 100000, cycles);
    checks++;
    if (ev[EV_ES_TREE] == 0 || ev[EV_SAMC] == 0 || ev[EV_SAC] == 0) fail("buffers or directives idle");

    dur_min = 2; dur_max = 8;
    clear_all();
    add_task(0, NREP, 1, '0);   // x derivative
    add_task(1, NREP, 1, '0);   // y derivative
    add_dir(0, DIR_SAS, 1, 0, LMIN, LMAX);
    run_graph("image derivatives, SAS gap 80000", 64'd20_000_000, cycles);
    $display("gap range seen: %0d .. %0d", gap_min, gap_max);
    checks++;
    if (gap_max > LMAX || gap_min < LMIN) fail("SAS gap left its range");
    checks++;
    if (ev[EV_BURST] == 0 || ev[EV_SAS_A] == 0 || ev[EV_SAS_B] == 0) fail("no bursts or no SAS pacing");

    report_events();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
