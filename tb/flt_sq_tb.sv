// flt_sq_tb: squares of random floats against the reference multiplier model
// and real arithmetic.
module flt_sq_tb;
  import ss_pkg::*;
  import ss_tb_pkg::*;
  flt_t a, y, r;
  int checks = 0, failures = 0;
  flt_sq dut (.a(a), .y(y));
  initial begin
    for (int i = 0; i < 4000; i++) begin
      a = rand_any();
      if (i % 2 == 0) a = rand_pos(-6, 2);
      #1;
      r = ref_mul(a, a);
      checks++;
      if (y !== r) begin
        failures++;
        if (failures < 10) $display("FAIL a=(%0d,%0d) got (%0d,%0d) exp (%0d,%0d)", a.m, a.e, y.m, y.e, r.m, r.e);
      end
      if (i % 2 == 0) begin
        real ex;
        ex = flt_to_real(a) * flt_to_real(a);
        checks++;
        if ((ex - flt_to_real(y)) / ex > 1.0 / 256.0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
