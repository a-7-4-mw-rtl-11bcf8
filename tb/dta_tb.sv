// dta_tb: random sensing times M (1..9765) and noise/interference powers on
// four lanes; gamma is compared with (1.36243 sqrt(M) + M)(noise + interf.)
// computed in real arithmetic (relative error below 1.5 %, the bound of four
// truncating 10-bit float operations and the root).  Also checks that the
// side value and channel travel with the result, and the latency.
module dta_tb;
  import ss_pkg::*;
  import ss_tb_pkg::*;
  localparam int L = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [9:0] in_chan [L], out_chan [L];
  logic [13:0] in_m [L];
  flt_t noise [L], intf [L], in_tag [L], gamma [L], out_tag [L];
  int checks = 0, failures = 0;
  real gref [1024];
  flt_t tags [1024];
  int nout = 0, t_in0 = -1, t_out0 = -1, cyc = 0;

  dta #(.LANES(L)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 256; c++) begin
      @(negedge clk);
      in_valid = 1;
      if (t_in0 < 0) t_in0 = cyc;
      for (int u = 0; u < L; u++) begin
        int ch, m;
        ch = c * L + u;
        m = (c < 8) ? (c * L + u + 1) : 1 + int'($urandom % 9765);
        in_chan[u] = 10'(ch);
        in_m[u] = 14'(m);
        noise[u] = rand_pos(-12, -4);
        intf[u] = (ch % 5 == 0) ? FLT_ZERO : rand_pos(-14, -4);
        in_tag[u] = rand_any();
        tags[ch] = in_tag[u];
        gref[ch] = (1.36243 * $sqrt(real'(m)) + m) * (flt_to_real(noise[u]) + flt_to_real(intf[u]));
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (nout != 256) begin failures++; $display("FAIL nout=%0d", nout); end
    checks++;
    if (t_out0 - t_in0 != 4 + 4) begin failures++; $display("FAIL latency %0d", t_out0 - t_in0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    if (t_out0 < 0) t_out0 = cyc;
    nout++;
    for (int u = 0; u < L; u++) begin
      int ch;
      real g, rel;
      ch = int'(out_chan[u]);
      g = flt_to_real(gamma[u]);
      rel = (g - gref[ch]) / gref[ch];
      checks += 2;
      if (rel > 0.015 || rel < -0.015) begin
        failures++;
        if (failures < 10) $display("FAIL ch=%0d gamma=%g exp %g", ch, g, gref[ch]);
      end
      if (out_tag[u] !== tags[ch]) failures++;
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
