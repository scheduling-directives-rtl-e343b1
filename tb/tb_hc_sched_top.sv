// tb_hc_sched_top: end-to-end test of the dispatch subsystem at reduced size
// (8 cores in two root sub-trees of 4, 2 thread re-order buffers, 8
// directive entries).
//
// Task graphs run one after the other through scheduler, distribution tree,
// behavioural cores and re-order buffers:
//   1. SAMC with M = 2, |A| = 5, |B| = 3, once with p_A < p_B, once p_A = p_B
//   2. SAC with l = 1 (B_j needs A_0..A_{j+1}), B of higher priority
//   3. SAS with lmin = 2, lmax = 4 (pacing example)
//   4. LNAR K = 3, LNR K = 5 and ACF on four tasks
//   5. four tasks that need es on two buffers, plus a task-level
//      prerequisite and a regular (single-replica) task
//   6. SAS between regular tasks, expressed as shared prerequisites and
//      priorities, next to independent regular tasks
// The scoreboard (tb_top_common.svh) checks every replica start against the
// directives; at the end every mechanism in the list must have acted at
// least once.
module tb_hc_sched_top;
  import sched_pkg::*;

  localparam int N = 8, NROB = 2, NDIR = 8;

  `include "tb_top_common.svh"

  hc_sched_top #(.NUM_CORES(N), .ROOT_FANOUT(2), .NUM_ROB(NROB), .NUM_DIR(NDIR)) dut (
    .clk(clk), .rst_n(rst_n), .run(run),
    .cfg_task_we(cfg_task_we), .cfg_task_idx(cfg_task_idx), .cfg_task(cfg_task),
    .cfg_dir_we(cfg_dir_we), .cfg_dir_idx(cfg_dir_idx), .cfg_dir(cfg_dir),
    .core_start(core_start), .core_busy(core_busy), .core_tid(core_tid), .core_rep(core_rep),
    .core_done(core_done), .task_s(task_s), .task_c(task_c), .all_done(all_done));

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint cycles;
    init_tb();
    for (int e = 0; e < EV_COUNT; e++) ev_needed[e] = 1;

    for (int round = 0; round < 3; round++) begin
      clear_all();
      add_task(0, 5, 1, '0); add_task(1, 3, 2, '0);
      add_dir(0, DIR_SAMC, 1, 0, 2, 0);
      run_graph("SAMC M=2 pA<pB", 2000, cycles);

      clear_all();
      add_task(0, 5, 1, '0); add_task(1, 3, 1, '0);
      add_dir(0, DIR_SAMC, 1, 0, 2, 0);
      run_graph("SAMC M=2 pA=pB", 2000, cycles);

      clear_all();
      add_task(0, 60, 1, '0); add_task(1, 60, 3, '0);
      add_dir(0, DIR_SAC, 1, 0, 1, 0);
      run_graph("SAC l=1", 5000, cycles);

      clear_all();
      add_task(0, 80, 2, '0); add_task(1, 80, 2, '0);
      add_dir(0, DIR_SAS, 1, 0, 2, 4);
      run_graph("SAS (2,4)", 5000, cycles);

      clear_all();
      add_task(0, 40, 1, '0); add_task(1, 40, 1, '0); add_task(2, 40, 2, '0); add_task(3, 40, 2, '0);
      add_dir(0, DIR_LNAR, 2, 0, 3, 0);
      add_dir(1, DIR_LNR, 3, 0, 5, 0);
      add_dir(2, DIR_ACF, 1, 0, 0, 0);
      run_graph("LNAR/LNR/ACF", 5000, cycles);

      clear_all();
      add_task(0, 30, 3, '0); add_task(1, 30, 2, '0); add_task(2, 30, 1, '0);
      add_task(3, 30, 1, '0); add_task(4, 1, 4, 16'b0000_0000_0000_0011);
      add_task(5, 12, 1, 16'b0000_0000_0001_0000);
      add_dir(0, DIR_SAC, 1, 0, 0, 0);
      add_dir(1, DIR_SAC, 3, 2, -2, 0);
      add_dir(2, DIR_LNR, 5, 0, 4, 0);
      add_task(6, 20, 1, '0);
      add_dir(3, DIR_LNR, 6, 0, 3, 0);
      add_dir(4, DIR_LNR, 0, 0, 2, 0);
      add_dir(5, DIR_LNR, 2, 0, 2, 0);
      run_graph("buffer slots + prerequisites", 5000, cycles);

      // SAS between regular tasks, built from prerequisites and priorities:
      // B (task 2) takes A's (task 1) prerequisite and a lower priority, so
      // it may not start before A. Four independent regular tasks share the
      // first cycles with the duplicable prerequisite.
      clear_all();
      add_task(0, 24, 1, '0);
      add_task(1, 1, 3, 16'b0000_0000_0000_0001);
      add_task(2, 1, 2, 16'b0000_0000_0000_0001);
      for (int t = 3; t < 7; t++) add_task(t, 1, 1 + t % 2, '0);
      run_graph("SAS between regular tasks", 2000, cycles);
      checks++;
      if (first_start[2] < first_start[1])
        fail($sformatf("regular SAS: B started at %0d, A at %0d", first_start[2], first_start[1]));
      dur_max = 12;   // later rounds: longer replicas
    end

    report_events();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
