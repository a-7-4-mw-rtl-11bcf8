// fft1024_tb: streams four consecutive 1024-sample frames (random complex
// data, then a two-tone frame) at eight samples per cycle and compares every
// output bin with a direct 1024-point DFT (scaled by 1/8, as the block's
// output is).  Checks that each frame gives 128 output cycles and that the
// bin mapping (lane k1, cycle k2 -> bin k2 + 128 k1) is right.
// Then, after a reset, the same block in partial mode: three frames through
// the filter-bank window, the 8-point FFT and the 128-point banks with two
// sub-bands switched off.  Each enabled lane b is compared with a direct
// model (window, 8-point DFT over the lanes, scaling by 1/8, 128-point DFT
// over time); disabled lanes must be exactly zero; and a tone in channel 300
// must peak in sub-band 2, bin 44.
module fft1024_tb;
  localparam int IW = 13, OW = 20, N = 1024, FRAMES = 4;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic partial = 0;
  logic [7:0] band_en = 8'hff;
  localparam int PF = 3;
  localparam logic [7:0] BAND_EN_P = 8'b1110_1101;
  real pr [PF][8][128], pim [PF][8][128];
  int pcyc = 0, pk2_peak = -1, pb_peak = -1, zero_bad = 0;
  real peak = 0.0;
  logic [6:0] in_pos = 0;
  logic signed [IW-1:0] in_re [8], in_im [8];
  logic out_valid;
  logic [6:0] out_k2;
  logic signed [OW-1:0] out_re [8], out_im [8];
  int checks = 0, failures = 0;
  int xr [FRAMES][N], xi [FRAMES][N];
  real er [FRAMES][N], ei [FRAMES][N];
  int ocyc = 0, fcnt [FRAMES];
  logic [6:0] prev_k2;

  fft1024 #(.IW(IW), .OW(OW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int f = 0; f < FRAMES; f++) begin
      fcnt[f] = 0;
      for (int n = 0; n < N; n++) begin
        if (f == 2) begin
          xr[f][n] = $rtoi(1500.0 * $cos(2.0 * 3.14159265358979 * 300 * n / N) + 800.0 * $cos(2.0 * 3.14159265358979 * 77 * n / N));
          xi[f][n] = $rtoi(1500.0 * $sin(2.0 * 3.14159265358979 * 300 * n / N) - 800.0 * $sin(2.0 * 3.14159265358979 * 77 * n / N));
        end else begin
          xr[f][n] = int'($urandom % 2001) - 1000;
          xi[f][n] = int'($urandom % 2001) - 1000;
        end
      end
      for (int k = 0; k < N; k++) begin
        er[f][k] = 0.0; ei[f][k] = 0.0;
        for (int n = 0; n < N; n++) begin
          real a;
          a = -2.0 * 3.14159265358979 * ((n * k) % N) / N;
          er[f][k] += xr[f][n] * $cos(a) - xi[f][n] * $sin(a);
          ei[f][k] += xr[f][n] * $sin(a) + xi[f][n] * $cos(a);
        end
        er[f][k] /= 8.0; ei[f][k] /= 8.0;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++)
      for (int t = 0; t < 128; t++) begin
        @(negedge clk);
        in_valid = 1; in_pos = 7'(t);
        for (int l = 0; l < 8; l++) begin
          in_re[l] = IW'(xr[f][8 * t + l]);
          in_im[l] = IW'(xi[f][8 * t + l]);
        end
      end
    @(negedge clk); in_valid = 0;
    repeat (20) @(posedge clk);
    for (int f = 0; f < FRAMES - 1; f++) begin
      checks++;
      if (fcnt[f] != 128) begin failures++; $display("FAIL frame %0d gave %0d cycles", f, fcnt[f]); end
    end

    // ---------------- partial mode ----------------
    // frame 0 and 1 random, frame 2 a tone in channel 300; frames reuse xr/xi
    for (int n = 0; n < N; n++) begin
      xr[2][n] = $rtoi(1500.0 * $cos(2.0 * 3.14159265358979 * 300 * n / N));
      xi[2][n] = $rtoi(1500.0 * $sin(2.0 * 3.14159265358979 * 300 * n / N));
    end
    for (int f = 0; f < PF; f++) begin
      real ur [128][8], ui [128][8], sr [8][128], si [8][128];
      for (int t = 0; t < 128; t++)
        for (int l = 0; l < 8; l++) begin
          real w0, w1, x0r, x0i;
          w0 = real'(int'($rtoi($sin(3.14159265358979 * (l + 0.5) / 16.0) * 4095.0 + 0.5))) / 4096.0;
          w1 = real'(int'($rtoi($sin(3.14159265358979 * (l + 8.5) / 16.0) * 4095.0 + 0.5))) / 4096.0;
          if (t > 0)      begin x0r = xr[f][8 * (t - 1) + l];   x0i = xi[f][8 * (t - 1) + l];   end
          else if (f > 0) begin x0r = xr[f - 1][8 * 127 + l];   x0i = xi[f - 1][8 * 127 + l];   end
          else            begin x0r = 0.0; x0i = 0.0; end
          ur[t][l] = w0 * x0r + w1 * xr[f][8 * t + l];
          ui[t][l] = w0 * x0i + w1 * xi[f][8 * t + l];
        end
      for (int b = 0; b < 8; b++)
        for (int t = 0; t < 128; t++) begin
          sr[b][t] = 0.0; si[b][t] = 0.0;
          for (int l = 0; l < 8; l++) begin
            real a;
            a = -2.0 * 3.14159265358979 * ((l * b) % 8) / 8.0;
            sr[b][t] += ur[t][l] * $cos(a) - ui[t][l] * $sin(a);
            si[b][t] += ur[t][l] * $sin(a) + ui[t][l] * $cos(a);
          end
          sr[b][t] /= 8.0; si[b][t] /= 8.0;
        end
      for (int b = 0; b < 8; b++)
        for (int k = 0; k < 128; k++) begin
          pr[f][b][k] = 0.0; pim[f][b][k] = 0.0;
          for (int t = 0; t < 128; t++) begin
            real a;
            a = -2.0 * 3.14159265358979 * ((t * k) % 128) / 128.0;
            pr[f][b][k]  += sr[b][t] * $cos(a) - si[b][t] * $sin(a);
            pim[f][b][k] += sr[b][t] * $sin(a) + si[b][t] * $cos(a);
          end
        end
    end
    @(negedge clk);
    rst_n = 0; partial = 1; band_en = BAND_EN_P;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < PF; f++)
      for (int t = 0; t < 128; t++) begin
        @(negedge clk);
        in_valid = 1; in_pos = 7'(t);
        for (int l = 0; l < 8; l++) begin
          in_re[l] = IW'(xr[f][8 * t + l]);
          in_im[l] = IW'(xi[f][8 * t + l]);
        end
      end
    for (int t = 0; t < 128; t++) begin    // flush frame
      @(negedge clk);
      in_valid = 1; in_pos = 7'(t);
    end
    @(negedge clk); in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (pcyc < PF * 128) begin failures++; $display("FAIL partial mode gave %0d output cycles", pcyc); end
    checks++;
    if (pb_peak != 2 || pk2_peak != 44) begin failures++; $display("FAIL tone peak at sub-band %0d bin %0d", pb_peak, pk2_peak); end
    checks++;
    if (zero_bad != 0) begin failures++; $display("FAIL %0d nonzero outputs on disabled sub-bands", zero_bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid && partial) begin
    int f;
    f = pcyc / 128;
    if (f < PF) begin
      for (int b = 0; b < 8; b++) begin
        if (BAND_EN_P[b]) begin
          real dr, di;
          dr = out_re[b] - pr[f][b][out_k2]; di = out_im[b] - pim[f][b][out_k2];
          checks++;
          // bin 0 sums 128 truncation errors of the same sign (window and
          // 1/8 scaling both round down): allow for that bias there
          if (dr * dr + di * di > (out_k2 == 7'd0 ? 200.0 * 200.0 : 60.0 * 60.0)) begin
            failures++;
            if (failures < 10) $display("FAIL partial f=%0d band=%0d bin=%0d got (%0d,%0d) exp (%0.1f,%0.1f)", f, b, out_k2, out_re[b], out_im[b], pr[f][b][out_k2], pim[f][b][out_k2]);
          end
          if (f == 2 && real'(out_re[b]) ** 2 + real'(out_im[b]) ** 2 > peak) begin
            peak = real'(out_re[b]) ** 2 + real'(out_im[b]) ** 2;
            pb_peak = b; pk2_peak = int'(out_k2);
          end
        end else if (out_re[b] != 0 || out_im[b] != 0) zero_bad++;
      end
    end
    pcyc++;
  end

  always @(posedge clk) if (rst_n && out_valid && !partial) begin
    int f;
    f = ocyc / 128;
    if (f < FRAMES) begin
      fcnt[f]++;
      for (int l = 0; l < 8; l++) begin
        int k;
        real dr, di;
        k = int'(out_k2) + 128 * l;
        dr = out_re[l] - er[f][k]; di = out_im[l] - ei[f][k];
        checks++;
        if (dr * dr + di * di > 60.0 * 60.0) begin
          failures++;
          if (failures < 10) $display("FAIL f=%0d bin=%0d got (%0d,%0d) exp (%0.1f,%0.1f)", f, k, out_re[l], out_im[l], er[f][k], ei[f][k]);
        end
      end
    end
    ocyc++;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
