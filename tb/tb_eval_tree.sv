// tb_eval_tree: streams random coefficient vectors into an 8-leaf evaluation
// tree, one per cycle, for several points alpha, and checks that each result
// equals sum_a c_a alpha^a and appears exactly LOGN = 3 cycles after its
// leaves were presented.
module tb_eval_tree;
  import interp_pkg::*;
  import interp_ref_pkg::*;

  localparam int unsigned LOGN = 3;
  localparam int unsigned N    = 2 ** LOGN;

  logic clk = 1'b0, rst_n = 1'b0, valid_in = 1'b0, valid_out;
  gf_t  leaves [N];
  gf_t  pw [LOGN];
  gf_t  result;

  eval_tree #(.LOGN(LOGN)) u_dut (.clk, .rst_n, .valid_in, .leaves, .pw, .valid_out, .result);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned exp_q[$];
  longint      t_q[$];
  int unsigned e, nout;
  longint      t;

  // collect outputs
  always @(posedge clk) if (rst_n && valid_out) begin
    e = exp_q.pop_front();
    t = t_q.pop_front();
    checks++;
    if (result != gf_t'(e) || cyc - t != longint'(LOGN)) begin
      failures++;
      $display("FAIL: result %h expected %h, latency %0d", result, e, cyc - t);
    end
    nout++;
  end

  initial begin
    gf_tables();
    nout = 0;
    for (int a = 0; a < int'(N); a++) leaves[a] = '0;
    for (int k = 0; k < int'(LOGN); k++) pw[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 6; p++) begin
      int unsigned al;
      al = (p == 0) ? 1 : $urandom_range(1, 255);
      @(negedge clk);
      for (int k = 0; k < int'(LOGN); k++) pw[k] = gf_t'(pow(al, 1 << k));
      for (int v = 0; v < 20; v++) begin
        int unsigned acc;
        acc = 0;
        for (int a = 0; a < int'(N); a++) begin
          leaves[a] = gf_t'($urandom_range(0, 255));
          acc ^= mul(leaves[a], pow(al, a));
        end
        valid_in = 1'b1;
        exp_q.push_back(acc);
        t_q.push_back(cyc);
        @(negedge clk);
      end
      valid_in = 1'b0;
      repeat (LOGN + 1) @(negedge clk);
    end
    checks++;
    if (nout != 120) begin
      failures++;
      $display("FAIL: %0d results, expected 120", nout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
