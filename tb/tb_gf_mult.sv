// tb_gf_mult: exhaustive test of the GF(2^8) multiplier. All 65536 operand
// pairs are compared with products taken from exponent/logarithm tables.
module tb_gf_mult;
  import interp_pkg::*;
  import interp_ref_pkg::*;

  gf_t a, b, p;
  int unsigned checks = 0, failures = 0;

  gf_mult u_dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gf_tables();
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = gf_t'(i);
        b = gf_t'(j);
        #1;
        checks++;
        if (p != gf_t'(mul(i, j))) begin
          failures++;
          if (failures < 5) $display("FAIL: %h * %h = %h, expected %h", a, b, p, mul(i, j));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
