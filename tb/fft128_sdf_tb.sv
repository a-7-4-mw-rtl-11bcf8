// fft128_sdf_tb: streams consecutive 128-sample frames of random complex data
// (plus one frame with a single tone) through the pipelined FFT and compares
// every output bin with a direct DFT computed in real arithmetic.  Also checks
// the fill latency (first valid output after the 127-sample delay-line fill)
// and that the stream keeps one output per input once full.
module fft128_sdf_tb;
  localparam int IW = 13, OW = 20, N = 128, FRAMES = 5;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [6:0] in_pos = 0;
  logic signed [IW-1:0] in_re = 0, in_im = 0;
  logic out_valid;
  logic [6:0] out_bin;
  logic signed [OW-1:0] out_re, out_im;
  int checks = 0, failures = 0;
  int xr [FRAMES][N], xi [FRAMES][N];
  real er [FRAMES][N], ei [FRAMES][N];
  int out_cnt = 0, cyc = 0, first_out = -1, in_cnt = 0;

  fft128_sdf #(.IW(IW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    for (int f = 0; f < FRAMES; f++)
      for (int n = 0; n < N; n++) begin
        if (f == 2) begin
          xr[f][n] = $rtoi(1500.0 * $cos(2.0 * 3.14159265358979 * 9 * n / N));
          xi[f][n] = $rtoi(1500.0 * $sin(2.0 * 3.14159265358979 * 9 * n / N));
        end else begin
          xr[f][n] = int'($urandom % 4001) - 2000;
          xi[f][n] = int'($urandom % 4001) - 2000;
        end
      end
    for (int f = 0; f < FRAMES; f++)
      for (int k = 0; k < N; k++) begin
        er[f][k] = 0.0; ei[f][k] = 0.0;
        for (int n = 0; n < N; n++) begin
          real a;
          a = -2.0 * 3.14159265358979 * n * k / N;
          er[f][k] += xr[f][n] * $cos(a) - xi[f][n] * $sin(a);
          ei[f][k] += xr[f][n] * $sin(a) + xi[f][n] * $cos(a);
        end
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++)
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        // one idle cycle now and then: the pipeline must hold its state
        if (n == 40 && f == 1) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_pos = 7'(n);
        in_re = IW'(xr[f][n]); in_im = IW'(xi[f][n]);
        in_cnt++;
      end
    @(negedge clk); in_valid = 0;
    repeat (50) @(posedge clk);
    checks++;
    if (out_cnt < (FRAMES - 1) * N || out_cnt > FRAMES * N) begin
      failures++; $display("FAIL out_cnt=%0d", out_cnt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (out_valid && rst_n) begin
    int f;
    real dr, di;
    f = out_cnt / N;
    if (first_out < 0) begin
      first_out = in_cnt;
      checks++;
      // first output appears once the 127-sample fill is done (+ pipeline)
      if (in_cnt < 128 || in_cnt > 140) begin failures++; $display("FAIL latency %0d", in_cnt); end
    end
    checks++;
    if (out_bin != {<<{7'(out_cnt % N)}}) begin
      failures++;
      if (failures < 10) $display("FAIL order: got bin %0d expected sequence %0d", out_bin, out_cnt % N);
    end else begin
      dr = real'(out_re) - er[f][out_bin];
      di = real'(out_im) - ei[f][out_bin];
      checks++;
      if (dr * dr + di * di > 300.0 * 300.0) begin
        failures++;
        if (failures < 10) $display("FAIL f=%0d bin=%0d got (%0d,%0d) exp (%0.1f,%0.1f)",
                                    f, out_bin, out_re, out_im, er[f][out_bin], ei[f][out_bin]);
      end
    end
    out_cnt++;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
