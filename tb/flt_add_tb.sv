// flt_add_tb: random operand pairs (equal, close and distant exponents, both
// signs) against a reference aligned-add-and-normalise model; also checks the
// result against real arithmetic within the truncation bound.
module flt_add_tb;
  import ss_pkg::*;
  import ss_tb_pkg::*;
  flt_t a, b, y, r;
  int checks = 0, failures = 0;
  flt_add dut (.a(a), .b(b), .y(y));
  initial begin
    for (int i = 0; i < 5000; i++) begin
      a = rand_any();
      b = (i % 3 == 0) ? rand_pos(int'(a.e) - 2, int'(a.e) + 2 > 15 ? 15 : int'(a.e) + 2) : rand_any();
      #1;
      r = ref_add(a, b);
      checks++;
      if (y !== r) begin
        failures++;
        if (failures < 10) $display("FAIL a=(%0d,%0d) b=(%0d,%0d) got (%0d,%0d) exp (%0d,%0d)",
                                    a.m, a.e, b.m, b.e, y.m, y.e, r.m, r.e);
      end
    end
    // exact small case: 300*2^0 + 300*2^-1 = 450
    a = '{e: 5'sd0, m: 10'sd300}; b = '{e: -5'sd1, m: 10'sd300}; #1;
    checks++; if (flt_to_real(y) != 450.0) failures++;
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
