// tb_directive_eval: self-checking test of the directive dispatch formulas.
//
// Directed cases: the SAS pacing example with lmin = 2, lmax = 4 on two cores
// (A.s, B.s) = (2,0), (4,0), (4,2), and a SAMC case with M = 2. Then random
// directive entries and task states are compared with a reference model
// written with plain integers in this file.
module tb_directive_eval;
  import sched_pkg::*;

  dir_cfg_t    dir;
  task_state_t sb, sa;
  lim_t        lim_b, lim_a;
  int checks = 0, failures = 0;

  directive_eval dut (.dir(dir), .st_b(sb), .st_a(sa), .lim_b(lim_b), .lim_a(lim_a));

  localparam longint INF = (longint'(1) << (LIM_W - 1)) - 1;

  function automatic void model(input dir_cfg_t d, input task_state_t b, input task_state_t a,
                                output longint lb, output longint la);
    longint bs, bc, as_, ac, p1, p2, aes, bes, m;
    bs = b.s; bc = b.c; as_ = a.s; ac = a.c;
    p1 = d.p1; p2 = d.p2;
    aes = (a.es == LIM_INF) ? -1 : longint'(a.es);
    bes = (b.es == LIM_INF) ? -1 : longint'(b.es);
    lb = INF; la = INF;
    if (!d.valid) return;
    case (d.kind)
      DIR_SAC:  if (aes >= 0) lb = aes - bs - p1;
      DIR_SAS: begin
        if (a.s != a.n) lb = (as_ - bs) - p1;
        if (b.s != b.n) la = p2 - (as_ - bs);
      end
      DIR_SAMC: begin
        m = (p1 < 1) ? 1 : p1;
        if (aes >= 0) lb = aes / m - bs;
      end
      DIR_LNAR: lb = p1 - (bs - bc);
      DIR_ACF: begin
        if (a.s != a.n) lb = (as_ - ac) - (bs - bc) + 1;
        if (b.s != b.n) la = (bs - bc) - (as_ - ac) + 1;
      end
      DIR_LNR:  if (bes >= 0) lb = p1 - (bs - bes);
      default: ;
    endcase
  endfunction

  task automatic check(input string what);
    longint eb, ea;
    #1;
    model(dir, sb, sa, eb, ea);
    checks++;
    if (longint'(lim_b) != eb || longint'(lim_a) != ea) begin
      failures++;
      if (failures < 10)
        $display("%s kind=%0d: lim_b=%0d (want %0d) lim_a=%0d (want %0d)",
                 what, dir.kind, lim_b, eb, lim_a, ea);
    end
  endtask

  task automatic expect_vals(input longint eb, input longint ea, input string what);
    #1;
    checks++;
    if (longint'(lim_b) != eb || longint'(lim_a) != ea) begin
      failures++;
      $display("%s: lim_b=%0d (want %0d) lim_a=%0d (want %0d)", what, lim_b, eb, lim_a, ea);
    end
  endtask

  initial begin
    // SAS, lmin = 2, lmax = 4, 100 replicas each
    dir = '{valid: 1'b1, kind: DIR_SAS, b: 4'd1, a: 4'd0, p1: 16'sd2, p2: 16'sd4};
    sa = '{n: 24'd100, s: 24'd2, c: 24'd0, es: '0};
    sb = '{n: 24'd100, s: 24'd0, c: 24'd0, es: '0};
    expect_vals(0, 2, "SAS t=1");
    sa.s = 24'd4;
    expect_vals(2, 0, "SAS t=2");
    sb.s = 24'd2;
    expect_vals(0, 2, "SAS t=3");
    // SAMC, M = 2: A has completed replicas 0..2 (es = 3) -> B_0 only
    dir = '{valid: 1'b1, kind: DIR_SAMC, b: 4'd1, a: 4'd0, p1: 16'sd2, p2: 16'sd0};
    sa = '{n: 24'd5, s: 24'd4, c: 24'd3, es: lim_t'(3)};
    sb = '{n: 24'd3, s: 24'd0, c: 24'd0, es: '0};
    expect_vals(1, INF, "SAMC es=3");
    sa.es = lim_t'(4);
    expect_vals(2, INF, "SAMC es=4");
    sa.es = LIM_INF;   // all of A completed: B's last replica is free too
    expect_vals(INF, INF, "SAMC done");

    for (int i = 0; i < 20000; i++) begin
      int unsigned na, nb;
      dir.valid = ($urandom_range(0, 9) != 0);
      dir.kind  = dir_kind_e'($urandom_range(0, 5));
      dir.b     = 4'd1;
      dir.a     = 4'd0;
      dir.p1    = dparam_t'($signed($urandom_range(0, 40)) - 8);
      dir.p2    = dparam_t'($urandom_range(0, 40));
      na = $urandom_range(1, 3000);
      nb = $urandom_range(1, 3000);
      sa.n = rep_t'(na); sa.s = rep_t'($urandom_range(0, na)); sa.c = rep_t'($urandom_range(0, sa.s));
      sb.n = rep_t'(nb); sb.s = rep_t'($urandom_range(0, nb)); sb.c = rep_t'($urandom_range(0, sb.s));
      if (i % 3 == 0) sa.s = sa.n;
      if (i % 5 == 0) sb.s = sb.n;
      sa.es = (sa.c == sa.n) ? LIM_INF : lim_t'($urandom_range(sa.c, sa.s));
      sb.es = (sb.c == sb.n) ? LIM_INF : lim_t'($urandom_range(sb.c, sb.s));
      if (i % 7 == 0) sa.es = LIM_INF;
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
