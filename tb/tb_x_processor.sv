// tb_x_processor: one x-processor row (B = 1, 8 PEs, three polynomials)
// under random update commands. A model of the row's polynomials checks
//   * OP_UPD_J   q_j  += f * q_jstar,
//   * OP_UPD_STAR q_jstar *= (x + alpha) across the linear array, with the
//     overflow output when a nonzero top coefficient is shifted out,
//   * OP_EVAL    the tree result sum_a C(a,r) q_(j,a) alpha^a, LOG2(NX) = 3
//     cycles later,
// and reads every coefficient back through the read port.
module tb_x_processor;
  import interp_pkg::*;
  import interp_ref_pkg::*;

  localparam int unsigned NPOLY = 3;
  localparam int unsigned LOGNX = 3;
  localparam int unsigned NX    = 2 ** LOGNX;
  localparam int unsigned B     = 1;

  logic             clk = 1'b0, rst_n = 1'b0;
  pe_ctrl_t         ctrl;
  gf_t              pw [LOGNX];
  logic             row_valid, overflow;
  gf_t              row_result, rd_data;
  logic [JW-1:0]    rd_j = '0;
  logic [LOGNX-1:0] rd_a = '0;

  x_processor #(.NPOLY(NPOLY), .LOGNX(LOGNX), .B(B)) u_dut (
    .clk, .rst_n, .ctrl, .pw, .row_valid, .row_result, .overflow, .rd_j, .rd_a, .rd_data
  );

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  int unsigned m [NPOLY][NX];
  int unsigned exp_q[$];
  longint      t_q[$];
  longint      cyc = 0;
  int unsigned n_eval = 0, n_ovf = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n && row_valid) begin
    int unsigned e;
    longint t;
    e = exp_q.pop_front();
    t = t_q.pop_front();
    check(row_result == gf_t'(e) && cyc - t == longint'(LOGNX),
          $sformatf("row result %h expected %h latency %0d", row_result, e, cyc - t));
    n_eval++;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned al;
    gf_tables();
    ctrl = '0; ctrl.op = OP_NOP;
    for (int k = 0; k < int'(LOGNX); k++) pw[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < int'(NPOLY); j++)
      for (int a = 0; a < int'(NX); a++) m[j][a] = (a == 0 && j == B) ? 1 : 0;
    for (int blk = 0; blk < 40; blk++) begin
      al = $urandom_range(1, 255);
      @(negedge clk);
      ctrl = '0; ctrl.op = OP_NOP;
      for (int k = 0; k < int'(LOGNX); k++) pw[k] = gf_t'(pow(al, 1 << k));
      ctrl.alpha = gf_t'(al);
      repeat (LOGNX + 1) @(negedge clk);
      for (int it = 0; it < 30; it++) begin
        int unsigned opn, j, js, e, hi;
        opn = $urandom_range(0, 9);
        j   = $urandom_range(0, NPOLY - 1);
        js  = $urandom_range(0, NPOLY - 1);
        ctrl.j     = JW'(j);
        ctrl.jstar = JW'(js);
        ctrl.f     = gf_t'($urandom_range(1, 255));
        ctrl.r     = RW'($urandom_range(0, 3));
        ctrl.op    = (opn < 4) ? OP_UPD_J : (opn < 7) ? OP_UPD_STAR : OP_EVAL;
        if (blk == 0 && it == 0) ctrl.op = OP_INIT;
        #1;
        unique case (ctrl.op)
          OP_INIT: ;
          OP_UPD_J:
            for (int a = 0; a < int'(NX); a++) m[j][a] ^= mul(ctrl.f, m[js][a]);
          OP_UPD_STAR: begin
            hi = m[js][NX-1];
            check(overflow == (hi != 0), "overflow flag");
            if (hi != 0) n_ovf++;
            for (int a = int'(NX) - 1; a >= 0; a--)
              m[js][a] = mul(al, m[js][a]) ^ ((a > 0) ? m[js][a-1] : 0);
          end
          OP_EVAL: begin
            e = 0;
            for (int a = 0; a < int'(NX); a++)
              if (bodd(a, ctrl.r)) e ^= mul(m[j][a], pow(al, a));
            exp_q.push_back(e);
            t_q.push_back(cyc);
          end
          default: ;
        endcase
        @(negedge clk);
      end
      ctrl.op = OP_NOP;
      repeat (LOGNX + 1) @(negedge clk);
      for (int j = 0; j < int'(NPOLY); j++)
        for (int a = 0; a < int'(NX); a++) begin
          rd_j = JW'(j); rd_a = LOGNX'(a);
          #1;
          check(rd_data == gf_t'(m[j][a]), $sformatf("q[%0d][%0d]", j, a));
        end
    end
    check(n_eval > 100, "too few evaluations");
    check(n_ovf > 0, "overflow never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
