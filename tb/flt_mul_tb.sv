// flt_mul_tb: random products against the reference model and against real
// arithmetic (relative error below one mantissa step).
module flt_mul_tb;
  import ss_pkg::*;
  import ss_tb_pkg::*;
  flt_t a, b, y, r;
  int checks = 0, failures = 0;
  flt_mul dut (.a(a), .b(b), .y(y));
  initial begin
    for (int i = 0; i < 5000; i++) begin
      a = rand_any(); b = rand_any();
      if (i % 2 == 0) begin a = rand_pos(-6, 2); b = rand_pos(-6, 2); end
      #1;
      r = ref_mul(a, b);
      checks++;
      if (y !== r) begin
        failures++;
        if (failures < 10) $display("FAIL a=(%0d,%0d) b=(%0d,%0d) got (%0d,%0d) exp (%0d,%0d)",
                                    a.m, a.e, b.m, b.e, y.m, y.e, r.m, r.e);
      end
      if (i % 2 == 0) begin
        real ex;
        ex = flt_to_real(a) * flt_to_real(b);
        checks++;
        if ((ex - flt_to_real(y)) / ex > 1.0 / 256.0 || flt_to_real(y) > ex) failures++;
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
