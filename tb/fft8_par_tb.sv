// fft8_par_tb: random 8-sample complex vectors against a direct 8-point DFT
// in real arithmetic; checks the one-cycle latency.
module fft8_par_tb;
  localparam int IW = 20, OW = 23;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [IW-1:0] in_re [8], in_im [8];
  logic signed [OW-1:0] out_re [8], out_im [8];
  int checks = 0, failures = 0;
  real er [8], ei [8];
  fft8_par #(.IW(IW)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      for (int n = 0; n < 8; n++) begin
        in_re[n] = IW'(int'($urandom % 400001) - 200000);
        in_im[n] = IW'(int'($urandom % 400001) - 200000);
        if (t == 0) begin in_re[n] = IW'(n == 1 ? 100000 : 0); in_im[n] = '0; end
      end
      for (int k = 0; k < 8; k++) begin
        er[k] = 0.0; ei[k] = 0.0;
        for (int n = 0; n < 8; n++) begin
          real a;
          a = -2.0 * 3.14159265358979 * n * k / 8.0;
          er[k] += in_re[n] * $cos(a) - in_im[n] * $sin(a);
          ei[k] += in_re[n] * $sin(a) + in_im[n] * $cos(a);
        end
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) failures++;
      for (int k = 0; k < 8; k++) begin
        real dr, di;
        dr = out_re[k] - er[k]; di = out_im[k] - ei[k];
        checks++;
        if (dr * dr + di * di > 400.0 * 400.0) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d k=%0d got (%0d,%0d) exp (%0.0f,%0.0f)", t, k, out_re[k], out_im[k], er[k], ei[k]);
        end
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
