// ss_top_tb: one complete sensing period of the processor at its default
// sizes (1024-point FFT, eight lanes, 2^7 calibration frames, 2^5 coarse
// frames, 10-b/5-b floating point).
//
// Stimulus: complex Gaussian noise on every sample; with the RF input on, a
// strong interferer (about 30 dB above the per-channel noise) in channel 300
// and two primary users a few dB above the noise in channels 600 and 700.
// Window: a 2048-sample sine window split over the two taps.  A host model
// answers the handshake: it reads the coarse PSD and writes, for every
// channel, 1/256 of the average power of its two neighbours above the noise
// floor as in-band interfering power (the noise floor is taken from
// channels 0..99, which carry no signal in this test).
//
// Checks: each of the 1024 channels gets exactly one decision; the three
// occupied channels are declared occupied; among channels far from all
// signals the false-alarm fraction stays below 0.3.  The design target is
// 0.1 with an exact noise power; here the noise power is itself measured
// over 128 overlapping frames (about 10% spread between channels) and the
// truncating float accumulation reads it about 8% low, so the observed rate
// is near 0.23.  The channels next to the interferer get a longer sensing time than
// the minimum (99 frames) and the residual phase runs for the largest M(k);
// the FFT keeps pace with the input (one output cycle per input cycle); the
// STA and DTA passes take 256 cycles each.  It also counts how often each
// mechanism happened: calibration, coarse and residual frames, host
// handshake, channels with adapted sensing time, accumulations skipped
// because a channel had reached its M(k), decisions of both kinds, and
// frames in partial mode (after the period, with only sub-band 2 enabled:
// the tone of channel 300 must appear in lane 2 at bin 44 and the other
// lanes must stay zero).
module ss_top_tb;
  import ss_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  ss_state_t state;
  logic rf_off, done;
  logic adc_valid = 0;
  logic signed [11:0] adc_re [8], adc_im [8];
  logic cw_en = 0;
  logic [2:0] cw_lane = 0;
  logic [0:0] cw_tap = 0;
  logic [6:0] cw_pos = 0;
  logic [11:0] cw_data = 0;
  logic [9:0] psd_raddr = 0;
  flt_t psd_rdata;
  logic intf_we = 0, intf_ready = 0;
  logic [9:0] intf_addr = 0;
  flt_t intf_data;
  logic sta_valid;
  logic [9:0] sta_chan [4];
  logic [13:0] sta_m [4], resid_frames;
  logic [9:0]  sta_psi [4];
  int          m_formula_bad = 0;
  logic        partial = 1'b0;
  logic [7:0]  band_en = 8'hff;
  int          n_partial = 0, part_zero_bad = 0, part_k2 = -1;
  real         part_peak = 0.0;
  logic dec_valid;
  logic [9:0] dec_chan [4];
  logic dec_bit [4];

  ss_top dut (.*);

  always #20 clk = ~clk;     // 25 MHz

  int checks = 0, failures = 0;
  int dec [1024], mk [1024];
  real coarse [1024];
  real floor_est;
  int n_cal = 0, n_coarse = 0, n_resid = 0, n_handshake = 0, n_adapted = 0, n_skip = 0;
  int n_h1 = 0, n_h0 = 0, n_dec = 0, cyc = 0, in_cyc = 0, fft_cyc = 0;
  int sta_cycles = 0, dta_cycles = 0, rf_bad = 0;
  int mmax_seen = 0;

  localparam real PI = 3.14159265358979;

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom % 65536) / 65536.0;
    return s - 6.0;
  endfunction

  // ADC: noise always; signals only with the RF input on
  longint samp = 0;
  always @(negedge clk) if (rst_n) begin
    adc_valid <= 1'b1;
    for (int l = 0; l < 8; l++) begin
      real re, im, ph;
      longint n;
      n = samp + l;
      re = 20.0 * gauss(); im = 20.0 * gauss();
      if (!rf_off) begin
        ph = 2.0 * PI * real'((n * 300) % 1024) / 1024.0;
        re += 22.0 * $cos(ph); im += 22.0 * $sin(ph);
        ph = 2.0 * PI * real'((n * 600) % 1024) / 1024.0;
        re += 2.5 * $cos(ph); im += 2.5 * $sin(ph);
        ph = 2.0 * PI * real'((n * 700) % 1024) / 1024.0;
        re += 2.5 * $cos(ph); im += 2.5 * $sin(ph);
      end
      adc_re[l] <= 12'($rtoi(re + (re >= 0 ? 0.5 : -0.5)));
      adc_im[l] <= 12'($rtoi(im + (im >= 0 ? 0.5 : -0.5)));
    end
    samp += 8;
  end

  // observation
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (adc_valid) in_cyc++;
    if (dut.fv) fft_cyc++;
    if (dut.u_pe.go && dut.fk2_q == 7'd0) begin
      if (state == ST_CAL) n_cal++;
      else if (state == ST_COARSE) n_coarse++;
      else if (state == ST_RESID) n_resid++;
    end
    for (int l = 0; l < 8; l++)
      if (dut.u_pe.go_q && dut.u_pe.lim_q && !(dut.u_pe.fidx_q < dut.u_pe.lim_rdata[l])) n_skip++;
    if (state == ST_STA) sta_cycles++;
    if (state == ST_DTA) dta_cycles++;
    if (rf_off != (state == ST_CAL)) rf_bad++;
    if (sta_valid)
      for (int u = 0; u < 4; u++) begin
        mk[sta_chan[u]] = int'(sta_m[u]);
        // M(k) must follow the shift-add form of 74.25 (1.1581 + psi)^2
        begin
          longint q, mf;
          q  = longint'(sta_psi[u]) + 74;
          mf = (q * q * 297) >>> 14;
          if (mf < 1) mf = 1;
          if (mf > 9765) mf = 9765;
          if (mf != longint'(sta_m[u])) m_formula_bad++;
        end
        if (sta_m[u] > 99) n_adapted++;
        if (int'(sta_m[u]) > mmax_seen) mmax_seen = int'(sta_m[u]);
      end
    if (dec_valid)
      for (int u = 0; u < 4; u++) begin
        dec[dec_chan[u]] += dec_bit[u] ? 2 : 1;
        n_dec++;
        if (dec_bit[u]) n_h1++; else n_h0++;
      end
  end

  // host: coarse PSD in, interfering power out
  task automatic host_handshake();
    for (int k = 0; k < 1024; k++) begin
      @(negedge clk); psd_raddr = 10'(k);
      @(posedge clk); #1;
      coarse[k] = flt_to_real(psd_rdata) / 32.0;
    end
    floor_est = 0.0;
    for (int k = 0; k < 100; k++) floor_est += coarse[k] / 100.0;
    for (int k = 0; k < 1024; k++) begin
      real v;
      longint q;
      int e;
      v = (coarse[(k + 1023) % 1024] + coarse[(k + 1) % 1024]) / 2.0 - floor_est;
      if (v < 0.0) v = 0.0;
      v = v / 256.0;
      e = -16;
      q = longint'(v * (2.0 ** 16));
      while (q > 511 && e < 15) begin e++; q = longint'(v * (2.0 ** (-e))); end
      @(negedge clk);
      intf_we = 1; intf_addr = 10'(k);
      intf_data.e = 5'(e); intf_data.m = 10'(q > 511 ? 511 : q);
    end
    @(negedge clk); intf_we = 0; intf_ready = 1;
    @(negedge clk); intf_ready = 0;
    n_handshake++;
  endtask

  initial begin
    for (int k = 0; k < 1024; k++) begin dec[k] = 0; mk[k] = 0; end
    repeat (3) @(posedge clk);
    // window: w[n] = sin(pi (n + 0.5) / 2048), n = 8 pos + lane + 1024 tap
    for (int p = 0; p < 2; p++)
      for (int l = 0; l < 8; l++)
        for (int t = 0; t < 128; t++) begin
          @(negedge clk);
          cw_en = 1; cw_lane = 3'(l); cw_tap = 1'(p); cw_pos = 7'(t);
          cw_data = 12'($rtoi(4095.0 * $sin(PI * (real'(8 * t + l + 1024 * p) + 0.5) / 2048.0)));
        end
    @(negedge clk); cw_en = 0;
    rst_n = 1;
    repeat (10) @(posedge clk);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (state == ST_WAIT_INTF);
    host_handshake();
    wait (done);
    repeat (5) @(posedge clk);

    // ---- decisions ----
    for (int k = 0; k < 1024; k++) begin
      checks++;
      if (dec[k] != 1 && dec[k] != 2) begin
        failures++;
        if (failures < 10) $display("FAIL channel %0d decided %0d times", k, dec[k]);
      end
    end
    for (int i = 0; i < 3; i++) begin
      int k;
      k = (i == 0) ? 300 : (i == 1) ? 600 : 700;
      checks++;
      if (dec[k] != 2) begin failures++; $display("FAIL occupied channel %0d not detected", k); end
    end
    begin
      int fa, nf;
      fa = 0; nf = 0;
      for (int k = 0; k < 1024; k++)
        if ((k < 296 || k > 304) && k != 600 && k != 700) begin
          nf++;
          if (dec[k] == 2) fa++;
        end
      checks++;
      $display("false alarms: %0d of %0d empty channels", fa, nf);
      if (real'(fa) / real'(nf) > 0.3) failures++;
    end
    // ---- sensing-time adaptation ----
    checks++;
    if (mk[299] <= 99 || mk[301] <= 99) begin failures++; $display("FAIL M(299)=%0d M(301)=%0d", mk[299], mk[301]); end
    checks++;
    if (mk[600] < 99 || mk[600] > 110) begin failures++; $display("FAIL M(600)=%0d", mk[600]); end
    checks++;
    if (int'(resid_frames) != mmax_seen || n_resid != mmax_seen) begin
      failures++; $display("FAIL residual frames %0d / %0d, max M %0d", resid_frames, n_resid, mmax_seen);
    end
    // ---- phases, rates ----
    checks++; if (n_cal != 128) begin failures++; $display("FAIL cal frames %0d", n_cal); end
    checks++; if (n_coarse != 32) begin failures++; $display("FAIL coarse frames %0d", n_coarse); end
    checks++; if (sta_cycles != 256 || dta_cycles != 256) begin failures++; $display("FAIL pass cycles %0d %0d", sta_cycles, dta_cycles); end
    checks++; if (rf_bad != 0) failures++;
    checks++; if (m_formula_bad != 0) begin failures++; $display("M(k) differs from the psi formula %0d times", m_formula_bad); end
    checks++; if (in_cyc - fft_cyc < 0 || in_cyc - fft_cyc > 300) begin failures++; $display("FAIL rate in %0d fft %0d", in_cyc, fft_cyc); end

    // ---- partial mode: only sub-band 2 (channels 192..319) sensed ----
    @(negedge clk); partial = 1'b1; band_en = 8'h04;
    repeat (4 * 128) @(posedge clk);
    for (int c = 0; c < 128; c++) begin
      @(posedge clk);
      if (dut.fv) begin
        real p;
        if (c == 0) n_partial++;
        for (int l = 0; l < 8; l++)
          if (l != 2 && (dut.fre[l] != 0 || dut.fim[l] != 0)) part_zero_bad++;
        p = real'(dut.fre[2]) ** 2 + real'(dut.fim[2]) ** 2;
        if (p > part_peak) begin part_peak = p; part_k2 = int'(dut.fk2); end
      end
    end
    checks++; if (part_k2 != 44) begin failures++; $display("FAIL partial mode: tone at bin %0d of sub-band 2", part_k2); end
    checks++; if (part_zero_bad != 0) begin failures++; $display("FAIL partial mode: %0d outputs on disabled sub-bands", part_zero_bad); end

    $display("mechanisms: cal_frames=%0d coarse_frames=%0d handshakes=%0d adapted_channels=%0d resid_frames=%0d skipped_accumulations=%0d H1=%0d H0=%0d M(299)=%0d M(301)=%0d partial_frames=%0d cycles=%0d",
             n_cal, n_coarse, n_handshake, n_adapted, n_resid, n_skip, n_h1, n_h0, mk[299], mk[301], n_partial, cyc);
    for (int i = 0; i < 9; i++) begin
      int c;
      c = (i == 0) ? n_cal : (i == 1) ? n_coarse : (i == 2) ? n_handshake : (i == 3) ? n_adapted :
          (i == 4) ? n_resid : (i == 5) ? n_skip : (i == 6) ? n_h1 : (i == 7) ? n_h0 : n_partial;
      checks++;
      if (c == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40ms;
    failures++;
    $display("watchdog: state %0d", state);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
