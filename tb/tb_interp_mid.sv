// tb_interp_mid: the end-to-end test of tb_interp_top at a larger size
// (K = 16, dy = 4, NX = 64, multiplicities up to 4, 24 points).
//
// Run 1 interpolates a point set with distinct nonzero x-coordinates, random
// y-coordinates and random multiplicities, plus a repeated point (all of whose
// discrepancies are zero, so its iteration is skipped). Every coefficient of
// every polynomial is compared with the software reference, the result
// polynomial is checked to meet every interpolation constraint and to be
// nonzero, and the cycles taken per point are compared with the schedule
// 1 + sum(3*NPOLY + LOGNX + 4 | 2*NPOLY + LOGNX + 3).
// Run 2 restarts the processor and feeds points until the polynomials outgrow
// NX coefficients, and checks that overflow is raised when the reference
// model says so. Each mechanism (update, skip, overflow, restart) must occur.
module tb_interp_mid;
  import interp_pkg::*;
  import interp_ref_pkg::*;

  localparam int unsigned K     = 16;
  localparam int unsigned NPOLY = 5;
  localparam int unsigned LOGNX = 6;
  localparam int unsigned NX    = 2 ** LOGNX;
  localparam int unsigned MMAX  = 4;
  localparam int unsigned WDW   = 16;
  localparam int unsigned NPT   = 24;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             start = 1'b0;
  logic             pt_valid = 1'b0;
  logic             pt_ready;
  gf_t              pt_alpha = '0, pt_beta = '0;
  logic [RW-1:0]    pt_mult = '0;
  logic             pt_last = 1'b0;
  logic             busy, done, overflow, ev_update, ev_skip;
  logic [JW-1:0]    best_j;
  logic [WDW-1:0]   best_wdeg;
  logic [JW-1:0]    rd_j = '0, rd_b = '0;
  logic [LOGNX-1:0] rd_a = '0;
  gf_t              rd_data;

  interp_top #(.K(K), .NPOLY(NPOLY), .LOGNX(LOGNX), .MMAX(MMAX), .WDW(WDW)) u_dut (
    .clk, .rst_n, .start, .pt_valid, .pt_ready, .pt_alpha, .pt_beta, .pt_mult,
    .pt_last, .busy, .done, .overflow, .best_j, .best_wdeg, .ev_update, .ev_skip,
    .rd_j, .rd_b, .rd_a, .rd_data
  );

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  longint      cyc = 0;
  int unsigned hw_upd = 0, hw_skip = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && ev_update) hw_upd++;
    if (rst_n && ev_skip)   hw_skip++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  koetter_ref ref_m;
  koetter_ref hw_m;   // holds the coefficients read back from the processor
  int unsigned pa[$], pb[$], pm[$];

  // Feed one point; returns the cycles from acceptance until the processor
  // is ready again (or done).
  task automatic send_point(int unsigned al, int unsigned be, int unsigned m, bit last,
                            output longint took);
    longint t0;
    @(negedge clk);
    pt_valid = 1'b1; pt_alpha = gf_t'(al); pt_beta = gf_t'(be);
    pt_mult = RW'(m); pt_last = last;
    do @(posedge clk); while (!pt_ready);
    t0 = cyc;
    @(negedge clk);
    pt_valid = 1'b0;
    while (!(pt_ready || done)) @(negedge clk);
    took = cyc - t0;
  endtask

  task automatic do_start();
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
  endtask

  int unsigned al, be;
  int unsigned upd_before, skip_before, exp_cyc, bj, n_ovf_runs;
  longint      took;
  bit          coef_ok, cons_ok, nonzero;

  initial begin
    gf_tables();
    ref_m = new(K, NPOLY, NX);
    hw_m  = new(K, NPOLY, NX);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---------------- run 1: normal interpolation
    for (int i = 0; i < int'(NPT); i++) begin
      pa.push_back(gexp[(i * 37 + 3) % 255]);
      pb.push_back($urandom_range(0, 255));
      pm.push_back($urandom_range(1, MMAX));
    end
    pm[0] = MMAX;
    pa.push_back(pa[0]); pb.push_back(pb[0]); pm.push_back(1);  // repeated point

    do_start();
    for (int i = 0; i < pa.size(); i++) begin
      upd_before  = ref_m.n_upd;
      skip_before = ref_m.n_skip;
      ref_m.point(pa[i], pb[i], pm[i]);
      send_point(pa[i], pb[i], pm[i], i == pa.size() - 1, took);
      exp_cyc = 1 + (ref_m.n_upd - upd_before) * (3 * NPOLY + LOGNX + 4)
                  + (ref_m.n_skip - skip_before) * (2 * NPOLY + LOGNX + 3);
      check(took == longint'(exp_cyc),
            $sformatf("point %0d took %0d cycles, expected %0d", i, took, exp_cyc));
    end
    check(!ref_m.ovf, "reference overflowed in run 1 (test sizes too small)");
    @(negedge clk);
    check(done, "done not raised");
    check(!overflow, "unexpected overflow in run 1");
    check(hw_upd == ref_m.n_upd, $sformatf("updates %0d vs %0d", hw_upd, ref_m.n_upd));
    check(hw_skip == ref_m.n_skip, $sformatf("skips %0d vs %0d", hw_skip, ref_m.n_skip));
    bj = ref_m.best();
    check(best_j == JW'(bj), $sformatf("best_j %0d vs %0d", best_j, bj));
    check(best_wdeg == WDW'(ref_m.wdeg[bj]), $sformatf("best_wdeg %0d vs %0d", best_wdeg, ref_m.wdeg[bj]));

    coef_ok = 1'b1;
    for (int j = 0; j < int'(NPOLY); j++)
      for (int b = 0; b < int'(NPOLY); b++)
        for (int a = 0; a < int'(NX); a++) begin
          rd_j = JW'(j); rd_b = JW'(b); rd_a = LOGNX'(a);
          #1;
          hw_m.q[hw_m.idx(j, b, a)] = int'(rd_data);
          if (rd_data != gf_t'(ref_m.coef(j, b, a))) begin
            if (coef_ok) $display("FAIL: q[%0d] x^%0d y^%0d = %h, expected %h",
                                  j, a, b, rd_data, ref_m.coef(j, b, a));
            coef_ok = 1'b0;
          end
        end
    check(coef_ok, "coefficients differ from reference");

    // the read-back result must vanish with the given multiplicity at every point
    cons_ok = 1'b1;
    for (int i = 0; i < pa.size(); i++)
      for (int r = 0; r < int'(pm[i]); r++)
        for (int s = 0; r + s < int'(pm[i]); s++)
          if (hw_m.hasse(best_j, r, s, pa[i], pb[i]) != 0) cons_ok = 1'b0;
    check(cons_ok, "result does not satisfy all constraints");
    nonzero = 1'b0;
    for (int b = 0; b < int'(NPOLY); b++)
      for (int a = 0; a < int'(NX); a++) if (hw_m.coef(best_j, b, a) != 0) nonzero = 1'b1;
    check(nonzero, "result polynomial is zero");

    // ---------------- run 2: restart and overflow
    ref_m.init();
    hw_upd = 0;
    do_start();
    @(negedge clk);
    check(!overflow, "overflow not cleared by start");
    n_ovf_runs = 0;
    for (int i = 0; i < 200 && !ref_m.ovf; i++) begin
      al = gexp[(i * 11 + 1) % 255];
      be = $urandom_range(0, 255);
      ref_m.point(al, be, MMAX);
      send_point(al, be, MMAX, ref_m.ovf, took);
      check(overflow == ref_m.ovf, $sformatf("overflow %0b after point %0d, reference %0b",
                                             overflow, i, ref_m.ovf));
      n_ovf_runs++;
    end
    @(negedge clk);
    check(done, "done not raised after run 2");
    check(hw_upd == ref_m.n_upd, $sformatf("run 2 updates %0d vs %0d", hw_upd, ref_m.n_upd));
    $display("mechanisms: updates=%0d skips=%0d overflow_runs=%0d restarts=1",
             hw_upd, hw_skip, overflow ? 1 : 0);
    check(hw_upd > 0,  "no update happened");
    check(hw_skip > 0, "no skipped iteration happened");
    check(overflow,    "overflow never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
