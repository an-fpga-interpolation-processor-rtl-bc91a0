// tb_interp_pe: random command sequence on one processing element (monomial
// x^3 y^1, three polynomials). A model of the stored coefficients is updated
// with table-based GF arithmetic; the PE's star, leaf and read outputs are
// compared with it every cycle, including the Hasse mask C(3, r) mod 2.
module tb_interp_pe;
  import interp_pkg::*;
  import interp_ref_pkg::*;

  localparam int unsigned NPOLY = 3;
  localparam int unsigned A     = 3;
  localparam int unsigned B     = 1;

  logic          clk = 1'b0, rst_n = 1'b0;
  pe_ctrl_t      ctrl;
  gf_t           left_in, star_out, leaf_out, rd_data;
  logic [JW-1:0] rd_j;

  interp_pe #(.NPOLY(NPOLY), .A(A), .B(B)) u_dut (
    .clk, .rst_n, .ctrl, .left_in, .star_out, .leaf_out, .rd_j, .rd_data
  );

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  int unsigned m [NPOLY];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    gf_tables();
    ctrl = '0; ctrl.op = OP_NOP; left_in = '0; rd_j = '0;
    for (int j = 0; j < int'(NPOLY); j++) m[j] = (A == 0 && B == j) ? 1 : 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 3000; it++) begin
      int unsigned opn, j, js;
      @(negedge clk);
      opn  = $urandom_range(0, 9);
      j    = $urandom_range(0, NPOLY - 1);
      js   = $urandom_range(0, NPOLY - 1);
      ctrl.j     = JW'(j);
      ctrl.jstar = JW'(js);
      ctrl.f     = gf_t'($urandom_range(0, 255));
      ctrl.alpha = gf_t'($urandom_range(1, 255));
      ctrl.r     = RW'($urandom_range(0, 7));
      left_in    = gf_t'($urandom_range(0, 255));
      rd_j       = JW'($urandom_range(0, NPOLY - 1));
      ctrl.op = (opn == 0) ? OP_INIT : (opn < 4) ? OP_UPD_J : (opn < 7) ? OP_UPD_STAR :
                (opn < 9) ? OP_EVAL : OP_NOP;
      #1;
      check(star_out == gf_t'(m[js]), "star_out");
      check(rd_data == gf_t'(m[rd_j]), "rd_data");
      check(leaf_out == (bodd(A, ctrl.r) ? gf_t'(m[j]) : gf_t'(0)),
            $sformatf("leaf_out r=%0d", ctrl.r));
      unique case (ctrl.op)
        OP_INIT:     for (int i = 0; i < int'(NPOLY); i++) m[i] = (A == 0 && B == i) ? 1 : 0;
        OP_UPD_J:    m[j]  = m[j] ^ mul(ctrl.f, m[js]);
        OP_UPD_STAR: m[js] = left_in ^ mul(ctrl.alpha, m[js]);
        default: ;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
