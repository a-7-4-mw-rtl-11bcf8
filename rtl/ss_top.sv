// ss_top: wideband spectrum-sensing baseband processor.
//
// Eight complex ADC samples per clock (200 MS/s at a 25-MHz clock) pass
// through the multitap window (one mw_window per lane), the 1024-point FFT
// (eight 128-point pipelined banks, twiddle multiplier array, 8-point FFT)
// and the floating-point power estimator, which accumulates |X(k)|^2 per
// 200-kHz channel into the PSD store M1 or the noise store M2.  ss_ctrl runs
// the sensing period: noise calibration (rf_off), coarse sensing, a host
// handshake in which the host reads the coarse PSD (psd_*) and writes the
// in-band interfering power of each channel into M3 (intf_*), the STA pass
// (M(k) into the sensing-time store), the residual PSD with M(k) frames per
// channel, and the DTA pass, whose thresholds go straight to the detector.
// Decisions leave on dec_* (four channels per cycle, 1 = occupied).
//
// Passes: lane u of the STA/DTA reads bank 2u or 2u+1 (pass_sub) of every
// store at pass_addr; the noise store holds a sum of 2^CAL_LOG2 frames, so
// sigma_nf^2 is that sum scaled by 2^-CAL_LOG2 (an exponent subtraction).
//
// Host ports: intf_we/intf_addr/intf_data write M3 (any time before
// intf_ready); psd_raddr reads M1 with psd_rdata one cycle later, valid
// while the processor is in ST_WAIT_INTF or ST_DONE.  Window coefficients
// are written through cw_* (lane, tap, position).  sta_* shows each
// channel's computed number of averages M(k) and its ratio psi(k).
//
// Partial mode: with partial = 1 the FFT works as a filter bank followed by
// 128-point channelizers (see fft1024), and band_en switches off the
// sub-bands that need not be sensed.  Lane b, bin k2 then holds the channel
// 128 b + k2 (k2 < 64) or 128 b + k2 - 128 (k2 >= 64); the rest of the chain
// is unchanged and treats the lanes as before, so the channel numbers on
// dec_chan follow that mapping.  For this mode the host loads window
// coefficients that are equal across lanes (one value per position), which
// makes the 2048-sample window act on each sub-band's samples.  Set the mode
// while the processor is idle, at least two frames before start.
//
// From the source design: the chain window -> FFT -> power estimation ->
// STA/DTA -> detector, the eight lanes at 25 MHz, the 10-b/5-b floating
// point, the three per-channel stores and the phase order.  This design's
// own: the host handshake standing in for the interfering-power estimator,
// the separate store for M(k), the frame counts of calibration and coarse
// sensing, and the output format of the decisions.
module ss_top
  import ss_pkg::*;
#(
  parameter int ADC_W       = 12,
  parameter int CW          = 12,
  parameter int TAPS        = 2,
  parameter int CAL_LOG2    = 7,
  parameter int COARSE_LOG2 = 5,
  parameter int MMAX        = 9765,
  parameter int MK_W        = 14
) (
  input  logic              clk,
  input  logic              rst_n,
  // control
  input  logic              start,
  input  logic              partial,   // channelizer mode: 0 full band, 1 selected sub-bands
  input  logic [7:0]        band_en,   // sub-bands sensed in partial mode
  output ss_state_t         state,
  output logic              rf_off,
  output logic              done,
  // ADC samples: sample 8t + l on lane l
  input  logic              adc_valid,
  input  logic signed [ADC_W-1:0] adc_re [8],
  input  logic signed [ADC_W-1:0] adc_im [8],
  // window coefficients
  input  logic              cw_en,
  input  logic [2:0]        cw_lane,
  input  logic [$clog2(TAPS)-1:0] cw_tap,
  input  logic [6:0]        cw_pos,
  input  logic [CW-1:0]     cw_data,
  // host: coarse PSD read, interfering power write
  input  logic [9:0]        psd_raddr,
  output flt_t              psd_rdata,
  input  logic              intf_we,
  input  logic [9:0]        intf_addr,
  input  flt_t              intf_data,
  input  logic              intf_ready,
  // sensing times and decisions
  output logic              sta_valid,
  output logic [9:0]        sta_chan [4],
  output logic [MK_W-1:0]   sta_m    [4],
  output logic [9:0]        sta_psi  [4],
  output logic [MK_W-1:0]   resid_frames,
  output logic              dec_valid,
  output logic [9:0]        dec_chan [4],
  output logic              dec_bit  [4]
);
  localparam int WOW = ADC_W + $clog2(TAPS);

  // ---------------- input position counter ----------------
  logic [6:0] in_pos;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         in_pos <= '0;
    else if (adc_valid) in_pos <= in_pos + 1'b1;
  end

  // ---------------- multitap window ----------------
  logic                  wv [8];
  logic [6:0]            wp [8];
  logic signed [WOW-1:0] wr [8], wi [8];
  for (genvar l = 0; l < 8; l++) begin : g_win
    mw_window #(.DW(ADC_W), .CW(CW), .TAPS(TAPS), .D(128)) u_mw (
      .clk, .rst_n,
      .cw_en(cw_en && cw_lane == 3'(l)), .cw_tap, .cw_pos, .cw_data,
      .in_valid(adc_valid), .in_pos(in_pos), .in_re(adc_re[l]), .in_im(adc_im[l]),
      .out_valid(wv[l]), .out_pos(wp[l]), .out_re(wr[l]), .out_im(wi[l]));
  end

  // ---------------- 1024-point FFT ----------------
  logic              fv;
  logic [6:0]        fk2;
  logic signed [19:0] fre [8], fim [8];
  fft1024 #(.IW(WOW), .OW(20)) u_fft (
    .clk, .rst_n, .partial, .band_en,
    .in_valid(wv[0]), .in_pos(wp[0]), .in_re(wr), .in_im(wi),
    .out_valid(fv), .out_k2(fk2), .out_re(fre), .out_im(fim));

  // one register so the controller's registered decisions meet the data
  logic              fv_q;
  logic [6:0]        fk2_q;
  logic signed [19:0] fre_q [8], fim_q [8];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fv_q <= 1'b0;
    else        fv_q <= fv;
  end
  always_ff @(posedge clk) begin
    fk2_q <= fk2;
    fre_q <= fre;
    fim_q <= fim;
  end

  // ---------------- controller ----------------
  logic            acc_en, acc_tgt, acc_first, lim_en, pass_valid, pass_dta, pass_sub;
  logic [MK_W-1:0] frame_idx;
  logic [6:0]      pass_addr;
  ss_ctrl #(.CAL_LOG2(CAL_LOG2), .COARSE_LOG2(COARSE_LOG2), .MK_W(MK_W), .LANES(4)) u_ctrl (
    .clk, .rst_n, .start, .intf_ready, .fft_valid(fv), .fft_k2(fk2),
    .sta_valid, .sta_m, .state, .rf_off, .acc_en, .acc_tgt, .acc_first, .lim_en,
    .frame_idx, .pass_valid, .pass_dta, .pass_addr, .pass_sub, .resid_frames, .done);

  // ---------------- memory read addressing ----------------
  logic       host_rd;
  logic [6:0] rd_addr [8];
  assign host_rd = (state == ST_WAIT_INTF) || (state == ST_DONE);
  for (genvar b = 0; b < 8; b++) begin : g_ra
    assign rd_addr[b] = host_rd ? psd_raddr[6:0] : pass_addr;
  end

  // ---------------- power estimation (M1, M2) ----------------
  logic [6:0]      lim_raddr;
  logic [MK_W-1:0] mk_rdata [8];
  flt_t            rd_m1 [8], rd_m2 [8];
  power_est #(.IW(20), .MK_W(MK_W)) u_pe (
    .clk, .rst_n, .in_valid(fv_q), .in_k2(fk2_q), .in_re(fre_q), .in_im(fim_q),
    .acc_en, .tgt(acc_tgt), .first(acc_first), .lim_en, .frame_idx,
    .lim_raddr, .lim_rdata(mk_rdata), .rd_addr, .rd_m1, .rd_m2);

  // ---------------- interfering power (M3) and sensing time stores --------
  flt_t m3_rdata [8];
  logic sta_we [8];
  for (genvar b = 0; b < 8; b++) begin : g_store
    ss_ram #(.DW($bits(flt_t)), .DEPTH(128)) u_m3 (.clk,
      .we(intf_we && intf_addr[9:7] == 3'(b)), .waddr(intf_addr[6:0]), .wdata(intf_data),
      .raddr(pass_addr), .rdata(m3_rdata[b]));
    // bank b is written by STA lane b/2
    assign sta_we[b] = sta_valid && (sta_chan[b/2][9:7] == 3'(b));
    ss_ram #(.DW(MK_W), .DEPTH(128)) u_mk (.clk,
      .we(sta_we[b]), .waddr(sta_chan[b/2][6:0]), .wdata(sta_m[b/2]),
      .raddr(lim_en && state == ST_RESID ? lim_raddr : pass_addr), .rdata(mk_rdata[b]));
  end

  // host PSD read: bank chosen one cycle after the address
  logic [2:0] psd_bank_q;
  always_ff @(posedge clk) psd_bank_q <= psd_raddr[9:7];
  assign psd_rdata = rd_m1[psd_bank_q];

  // ---------------- pass data selection ----------------
  logic       pv_q, pdta_q, psub_q;
  logic [6:0] paddr_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pv_q <= 1'b0;
    else        pv_q <= pass_valid;
  end
  always_ff @(posedge clk) begin
    pdta_q  <= pass_dta;
    psub_q  <= pass_sub;
    paddr_q <= pass_addr;
  end

  logic [9:0]      l_chan  [4];
  flt_t            l_noise [4], l_intf [4], l_t [4];
  logic [MK_W-1:0] l_m [4];
  for (genvar u = 0; u < 4; u++) begin : g_lane
    logic [2:0] bk;
    assign bk         = 3'(2 * u) + 3'(psub_q);
    assign l_chan[u]  = {bk, paddr_q};
    assign l_noise[u] = flt_scale2(rd_m2[bk], -CAL_LOG2);
    assign l_intf[u]  = m3_rdata[bk];
    assign l_t[u]     = rd_m1[bk];
    assign l_m[u]     = mk_rdata[bk];
  end

  // ---------------- sensing-time adaptation ----------------
  sta #(.LANES(4), .MK_W(MK_W), .MMAX(MMAX)) u_sta (
    .clk, .rst_n, .in_valid(pv_q && !pdta_q), .in_chan(l_chan), .noise(l_noise), .intf(l_intf),
    .out_valid(sta_valid), .out_chan(sta_chan), .out_m(sta_m), .out_psi(sta_psi));

  // ---------------- threshold adaptation and detection ----------------
  logic       dv;
  logic [9:0] dchan [4];
  flt_t       gam [4], tpow [4];
  dta #(.LANES(4), .MK_W(MK_W)) u_dta (
    .clk, .rst_n, .in_valid(pv_q && pdta_q), .in_chan(l_chan), .in_m(l_m),
    .noise(l_noise), .intf(l_intf), .in_tag(l_t),
    .out_valid(dv), .out_chan(dchan), .gamma(gam), .out_tag(tpow));

  power_detect #(.LANES(4)) u_det (
    .clk, .rst_n, .in_valid(dv), .in_chan(dchan), .t_pow(tpow), .gamma(gam),
    .out_valid(dec_valid), .out_chan(dec_chan), .decision(dec_bit));
endmodule
