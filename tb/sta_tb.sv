// sta_tb: random noise and interference powers (ratios from 0 to beyond the
// 4-integer-bit psi range) on all four lanes.  psi is compared with the exact
// ratio (within one LSB, as the Newton-Raphson reciprocal is truncated), and
// M(k) with the closed form 74.25 (1.1581 + psi)^2 clamped to 1..9765.  Also
// checks the pipeline latency and throughput (one channel per lane per cycle).
module sta_tb;
  import ss_pkg::*;
  import ss_tb_pkg::*;
  localparam int L = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [9:0] in_chan [L], out_chan [L];
  flt_t noise [L], intf [L];
  logic [13:0] out_m [L];
  logic [9:0] out_psi [L];
  int checks = 0, failures = 0;
  real ratio [1024];
  int nout = 0, t_in0 = -1, t_out0 = -1, cyc = 0;

  sta #(.LANES(L)) dut (.*);
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
        int ch;
        ch = c * L + u;
        in_chan[u] = 10'(ch);
        noise[u] = rand_pos(-12, 8);
        if (ch % 7 == 0) intf[u] = FLT_ZERO;
        else intf[u] = rand_pos(int'(noise[u].e) - 10, (int'(noise[u].e) + 4 > 15) ? 15 : int'(noise[u].e) + 4);
        ratio[ch] = flt_to_real(intf[u]) / flt_to_real(noise[u]);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (nout != 256) begin failures++; $display("FAIL nout=%0d", nout); end
    checks++;
    if (t_out0 - t_in0 != 4 + 5) begin failures++; $display("FAIL latency %0d", t_out0 - t_in0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    if (t_out0 < 0) t_out0 = cyc;
    nout++;
    for (int u = 0; u < L; u++) begin
      int ch, pe, mexp;
      real r;
      ch = int'(out_chan[u]);
      r = ratio[ch] * 64.0;
      pe = (r >= 1023.0) ? 1023 : $rtoi(r);
      mexp = ((int'(out_psi[u]) + 74) * (int'(out_psi[u]) + 74) * 297) / 16384;
      if (mexp > 9765) mexp = 9765;
      if (mexp < 1) mexp = 1;
      checks += 2;
      if (int'(out_psi[u]) < pe - 1 || int'(out_psi[u]) > pe + 1) begin
        failures++;
        if (failures < 10) $display("FAIL ch=%0d psi=%0d exp %0d", ch, out_psi[u], pe);
      end
      if (int'(out_m[u]) != mexp) begin
        failures++;
        if (failures < 10) $display("FAIL ch=%0d M=%0d exp %0d", ch, out_m[u], mexp);
      end
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
