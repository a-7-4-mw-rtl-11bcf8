// ss_ctrl_tb: runs the sequencer through one sensing period with small frame
// counts (4 calibration frames, 2 coarse frames) against a continuous FFT
// output stream whose bin index k2 follows the bit-reversed order of the
// real FFT.  A model of the STA returns random sensing times during the STA
// pass; a host model raises intf_ready some time after the coarse phase.
// Checks: the phase order; rf_off only during calibration; the number of
// accumulated frames per phase and their target (noise store, PSD store,
// PSD store with per-channel limit); one "first frame" per phase; the frame
// index running 0..M-1 in the residual phase; no progress before
// intf_ready; 256 pass cycles per pass covering every (address, sub-bank)
// pair once; resid_frames equal to the largest sensing time returned; done
// at the end.
module ss_ctrl_tb;
  import ss_pkg::*;
  localparam int CAL_LOG2 = 2, COARSE_LOG2 = 1, SETTLE = 2, DRAIN = 16, MK_W = 14, LANES = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, intf_ready = 1'b0;
  logic fft_valid = 1'b0;
  logic [6:0] fft_k2 = '0;
  logic sta_valid = 1'b0;
  logic [MK_W-1:0] sta_m [LANES];
  ss_state_t state;
  logic rf_off, acc_en, acc_tgt, acc_first, lim_en, pass_valid, pass_dta, pass_sub, done;
  logic [MK_W-1:0] frame_idx, resid_frames;
  logic [6:0] pass_addr;

  ss_ctrl #(.CAL_LOG2(CAL_LOG2), .COARSE_LOG2(COARSE_LOG2), .SETTLE(SETTLE), .DRAIN(DRAIN),
            .MK_W(MK_W), .LANES(LANES)) dut (
    .clk, .rst_n, .start, .intf_ready, .fft_valid, .fft_k2, .sta_valid, .sta_m,
    .state, .rf_off, .acc_en, .acc_tgt, .acc_first, .lim_en, .frame_idx,
    .pass_valid, .pass_dta, .pass_addr, .pass_sub, .resid_frames, .done);

  always #20 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FFT output stream: position counter, k2 = bit-reversed position
  logic [6:0] pos = '0;
  always @(negedge clk) if (rst_n) begin
    fft_valid <= 1'b1;
    fft_k2    <= {<<{pos}};
    pos       <= pos + 1'b1;
  end

  // STA model: answers each STA pass cycle three cycles later
  logic [2:0] pv_d = '0;
  int mmax_model = 0;
  always @(negedge clk) begin
    pv_d <= {pv_d[1:0], pass_valid && !pass_dta};
    sta_valid <= pv_d[2];
    for (int u = 0; u < LANES; u++) begin
      automatic int m = 3 + ($urandom % 12);
      sta_m[u] <= MK_W'(m);
      if (pv_d[2] && m > mmax_model) mmax_model = m;
    end
  end

  // observation
  ss_state_t prev_state = ST_IDLE;
  ss_state_t order [$];
  int acc_cal = 0, acc_coarse = 0, acc_resid = 0, firsts = 0;
  int sta_cyc = 0, dta_cyc = 0, wait_cyc = 0;
  int sta_seen [256], dta_seen [256];
  int next_idx = 0, idx_bad = 0;
  initial for (int i = 0; i < 256; i++) begin sta_seen[i] = 0; dta_seen[i] = 0; end
  always @(posedge clk) if (rst_n) begin
    if (state != prev_state) order.push_back(state);
    prev_state <= state;
    check(rf_off == (state == ST_CAL), "rf_off outside calibration");
    if (acc_en) begin
      if (acc_tgt) acc_cal++;
      else if (lim_en) acc_resid++;
      else acc_coarse++;
      if (acc_first && fft_k2 == 7'd64) firsts++;
      if (lim_en && int'(frame_idx) != next_idx / 128) idx_bad++;
      if (lim_en) next_idx++;
    end
    if (state == ST_WAIT_INTF) wait_cyc++;
    if (pass_valid && !pass_dta) begin sta_cyc++; sta_seen[{pass_addr, pass_sub}]++; end
    if (pass_valid && pass_dta)  begin dta_cyc++; dta_seen[{pass_addr, pass_sub}]++; end
  end

  initial begin
    for (int u = 0; u < LANES; u++) sta_m[u] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);
    check(state == ST_IDLE, "not idle after reset");
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (state == ST_WAIT_INTF);
    repeat (300) @(posedge clk);
    check(state == ST_WAIT_INTF, "left WAIT_INTF without intf_ready");
    @(negedge clk) intf_ready = 1'b1;
    @(negedge clk) intf_ready = 1'b0;
    wait (done);
    repeat (5) @(posedge clk);
    begin
      ss_state_t exp_order [9] = '{ST_CAL, ST_COARSE, ST_WAIT_INTF, ST_STA, ST_STA_DRAIN,
                                   ST_RESID, ST_DTA, ST_DTA_DRAIN, ST_DONE};
      check(order.size() == 9, $sformatf("%0d phase changes, expected 9", order.size()));
      for (int i = 0; i < 9 && i < order.size(); i++)
        check(order[i] == exp_order[i], $sformatf("phase %0d is %s", i, order[i].name()));
    end
    check(acc_cal == 128 * (2 ** CAL_LOG2), $sformatf("calibration accumulated %0d samples", acc_cal));
    check(acc_coarse == 128 * (2 ** COARSE_LOG2), $sformatf("coarse accumulated %0d samples", acc_coarse));
    check(acc_resid == 128 * mmax_model, $sformatf("residual accumulated %0d samples, M max %0d", acc_resid, mmax_model));
    check(int'(resid_frames) == mmax_model, "resid_frames is not the largest M");
    check(firsts == 3 * 1, $sformatf("%0d first-frame marks", firsts));
    check(idx_bad == 0, $sformatf("%0d wrong frame indices", idx_bad));
    check(sta_cyc == 256 && dta_cyc == 256, $sformatf("pass cycles %0d / %0d", sta_cyc, dta_cyc));
    for (int i = 0; i < 256; i++) check(sta_seen[i] == 1 && dta_seen[i] == 1, "pass address not covered once");
    check(wait_cyc >= 300, "too short wait for the host");
    $display("phases=%0d acc cal/coarse/resid=%0d/%0d/%0d M max=%0d", order.size(), acc_cal, acc_coarse, acc_resid, mmax_model);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
