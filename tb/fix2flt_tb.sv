// fix2flt_tb: drives the converter with signed 20-bit values of every
// magnitude and compares mantissa and exponent with a reference normaliser.
module fix2flt_tb;
  import ss_pkg::*;
  import ss_tb_pkg::*;
  logic signed [19:0] x;
  flt_t y, r;
  int checks = 0, failures = 0;
  fix2flt #(.IN_W(20), .EBASE(0)) dut (.x(x), .y(y));
  initial begin
    for (int i = 0; i < 4000; i++) begin
      int nb = 1 + int'($urandom % 20);
      x = 20'($signed($urandom) >>> (32 - nb));
      if (i < 3) x = (i == 0) ? 20'sd0 : (i == 1) ? -20'sd524288 : 20'sd524287;
      #1;
      r = ref_norm(longint'(x), 0);
      checks++;
      if (y !== r) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d got m=%0d e=%0d exp m=%0d e=%0d", x, y.m, y.e, r.m, r.e);
      end
    end
    // EBASE shifts the exponent only
    checks++;
    x = 20'sd1000; #1;
    if (y.e != 5'sd1 || y.m != 10'sd500) failures++;
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
