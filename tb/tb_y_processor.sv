// tb_y_processor: the controller on its own, with the PE rows replaced by a
// behavioural model that executes its commands (OP_INIT, OP_EVAL with a
// LOG2(NX)-cycle result delay, OP_UPD_J, OP_UPD_STAR). After a point set with
// random multiplicities the model's polynomials must equal the software
// reference of Koetter's algorithm coefficient for coefficient, and best_j,
// best_wdeg and the update/skip event counts must agree. Also checks the
// point handshake and that overflow is sticky and cleared by start.
module tb_y_processor;
  import interp_pkg::*;
  import interp_ref_pkg::*;

  localparam int unsigned K     = 4;
  localparam int unsigned NPOLY = 3;
  localparam int unsigned LOGNX = 4;
  localparam int unsigned NX    = 2 ** LOGNX;
  localparam int unsigned MMAX  = 2;
  localparam int unsigned WDW   = 12;

  logic           clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic           pt_valid = 1'b0, pt_ready, pt_last = 1'b0;
  gf_t            pt_alpha = '0, pt_beta = '0;
  logic [RW-1:0]  pt_mult = '0;
  pe_ctrl_t       ctrl;
  gf_t            pw [LOGNX];
  logic           row_valid = 1'b0, ovf_in = 1'b0;
  gf_t            row_result [NPOLY];
  logic           busy, done, overflow, ev_update, ev_skip;
  logic [JW-1:0]  best_j;
  logic [WDW-1:0] best_wdeg;

  y_processor #(.K(K), .NPOLY(NPOLY), .LOGNX(LOGNX), .MMAX(MMAX), .WDW(WDW)) u_dut (
    .clk, .rst_n, .start, .pt_valid, .pt_ready, .pt_alpha, .pt_beta, .pt_mult, .pt_last,
    .ctrl, .pw, .row_valid, .row_result, .ovf_in, .busy, .done, .overflow,
    .best_j, .best_wdeg, .ev_update, .ev_skip
  );

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0, hw_upd = 0, hw_skip = 0;
  int unsigned q [NPOLY][NPOLY][NX];   // [j][b][a]
  logic [NPOLY*8-1:0] sched [longint];
  logic [NPOLY-1:0]   sched_v [longint];
  longint c = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural PE rows
  always @(negedge clk) if (rst_n) begin
    int unsigned al, hi;
    logic [NPOLY*8-1:0] rv;
    c = c + 1;
    al = int'(pw[0]);
    if (ev_update) hw_upd++;
    if (ev_skip)   hw_skip++;
    unique case (ctrl.op)
      OP_INIT:
        for (int j = 0; j < int'(NPOLY); j++)
          for (int b = 0; b < int'(NPOLY); b++)
            for (int a = 0; a < int'(NX); a++) q[j][b][a] = (a == 0 && b == j) ? 1 : 0;
      OP_EVAL: begin
        for (int b = 0; b < int'(NPOLY); b++) begin
          int unsigned e;
          e = 0;
          for (int a = 0; a < int'(NX); a++)
            if (bodd(a, ctrl.r)) e ^= mul(q[ctrl.j][b][a], pow(al, a));
          rv[b*8 +: 8] = 8'(e);
        end
        sched[c + LOGNX] = rv;
        sched_v[c + LOGNX] = '1;
      end
      OP_UPD_J:
        for (int b = 0; b < int'(NPOLY); b++)
          for (int a = 0; a < int'(NX); a++)
            q[ctrl.j][b][a] ^= mul(ctrl.f, q[ctrl.jstar][b][a]);
      OP_UPD_STAR:
        for (int b = 0; b < int'(NPOLY); b++)
          for (int a = int'(NX) - 1; a >= 0; a--)
            q[ctrl.jstar][b][a] = mul(ctrl.alpha, q[ctrl.jstar][b][a]) ^
                                  ((a > 0) ? q[ctrl.jstar][b][a-1] : 0);
      default: ;
    endcase
    if (sched_v.exists(c)) begin
      row_valid = 1'b1;
      for (int b = 0; b < int'(NPOLY); b++) row_result[b] = sched[c][b*8 +: 8];
    end else begin
      row_valid = 1'b0;
    end
  end

  koetter_ref ref_m;

  task automatic send_point(int unsigned al, int unsigned be, int unsigned m, bit last);
    @(negedge clk);
    pt_valid = 1'b1; pt_alpha = gf_t'(al); pt_beta = gf_t'(be); pt_mult = RW'(m); pt_last = last;
    do @(posedge clk); while (!pt_ready);
    @(negedge clk);
    pt_valid = 1'b0;
    if (m != 0) check(!pt_ready, "pt_ready stayed high after a point was accepted");
    while (!(pt_ready || done)) @(negedge clk);
  endtask

  initial begin
    bit ok;
    int unsigned bj;
    gf_tables();
    for (int b = 0; b < int'(NPOLY); b++) row_result[b] = '0;
    ref_m = new(K, NPOLY, NX);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    for (int i = 0; i < 5; i++) begin
      int unsigned al, be, m;
      al = gexp[i * 50 + 9];
      be = $urandom_range(0, 255);
      m  = (i == 0) ? 2 : $urandom_range(1, MMAX);
      ref_m.point(al, be, m);
      send_point(al, be, m, 1'b0);
    end
    ref_m.point(gexp[7], 0, 0);
    send_point(gexp[7], 5, 0, 1'b0);            // multiplicity 0: no constraint
    ref_m.point(gexp[57], 0, 1);
    send_point(gexp[57], 0, 1, 1'b0);           // y-coordinate 0
    ref_m.point(gexp[57], 0, 1);
    send_point(gexp[57], 0, 1, 1'b1);           // repeated point: skipped
    @(negedge clk);
    check(done && !busy, "done/busy after the last point");
    check(!ref_m.ovf, "reference overflowed (test sizes too small)");
    ok = 1'b1;
    for (int j = 0; j < int'(NPOLY); j++)
      for (int b = 0; b < int'(NPOLY); b++)
        for (int a = 0; a < int'(NX); a++)
          if (q[j][b][a] != ref_m.coef(j, b, a)) ok = 1'b0;
    check(ok, "polynomials differ from the reference");
    bj = ref_m.best();
    check(best_j == JW'(bj), $sformatf("best_j %0d vs %0d", best_j, bj));
    check(best_wdeg == WDW'(ref_m.wdeg[bj]), "best_wdeg");
    check(hw_upd == ref_m.n_upd, $sformatf("updates %0d vs %0d", hw_upd, ref_m.n_upd));
    check(hw_skip == ref_m.n_skip && hw_skip > 0, $sformatf("skips %0d vs %0d", hw_skip, ref_m.n_skip));
    // overflow: sticky, cleared by start
    @(negedge clk); ovf_in = 1'b1;
    @(negedge clk); ovf_in = 1'b0;
    repeat (2) @(negedge clk);
    check(overflow, "overflow not held");
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    @(negedge clk);
    check(!overflow && pt_ready, "start did not clear overflow / reach the point wait");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
