// fft1024: 1024-point FFT at eight samples per clock.
//
// Sample x[8t + l] of a 1024-sample frame enters lane l in cycle t
// (t = in_pos = 0..127).  The frame is decomposed as 1024 = 128 x 8:
//   1. lane l runs a 128-point pipelined FFT (fft128_sdf) over its own
//      samples, giving Y_l[k2] in bit-reversed k2 order;
//   2. a multiplier array scales Y_l[k2] by W1024^(l * k2);
//   3. the 8-point parallel FFT across the lanes gives, on output lane k1,
//      X[k2 + 128 k1].
// So each output cycle carries eight bins, out_k2 tells which k2, and lane k1
// of the output holds bin k2 + 128*k1.  At a 25-MHz clock this is 200 MS/s.
// The structure (eight 128-point banks, multipliers, 8-point FFT) follows the
// source design.  Word lengths are this design's: IW-bit input, +7 bits in the
// banks, +3 in the 8-point FFT, and the 23-bit result is truncated to its top
// OW = 20 bits (an overall scaling by 1/8).
//
// Partial mode (partial = 1) reconnects the same hardware as a two-level
// channelizer for sensing only some 25-MHz sub-bands: the 8-point FFT comes
// first and works as a filter bank, splitting the band into eight sub-bands
// of 25 MHz (one per lane, decimated to 25 MS/s), and the 128-point bank l
// then resolves sub-band l into 128 channels.  In front of the 8-point FFT a
// two-tap window with a one-cycle delay per lane (a 16-sample prototype,
// w[n] = sin(pi (n + 0.5) / 16) in CW-bit fractions, the newest block on taps
// 8..15) shapes the sub-band responses.  band_en selects the sub-bands: a
// disabled bank gets zeros and so does not toggle.  Output lane b, bin k2
// then holds the channel at 128 b + k2 for k2 < 64 and at 128 b + k2 - 128
// for k2 >= 64 (modulo 1024); the twiddle array is bypassed; the overall
// scaling is again 1/8.  The rearrangement of the 8-point and 128-point
// FFTs and the sub-band switches follow the source design; the prototype
// window and the scaling are this design's choices.  Change the mode only
// between sensing periods: the frames in flight at a change are lost.
module fft1024
  import ss_pkg::*;
#(
  parameter int IW = 13,
  parameter int OW = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 partial,
  input  logic [7:0]           band_en,
  input  logic                 in_valid,
  input  logic [6:0]           in_pos,
  input  logic signed [IW-1:0] in_re [8],
  input  logic signed [IW-1:0] in_im [8],
  output logic                 out_valid,
  output logic [6:0]           out_k2,
  output logic signed [OW-1:0] out_re [8],
  output logic signed [OW-1:0] out_im [8]
);
  localparam int BW = IW + 7;          // bank output width
  localparam int FW = BW + 3;          // 8-point FFT output width
  localparam int CW = 12;              // filter-bank window coefficient width

  typedef logic [CW-1:0] fb_tab_t [16];
  function automatic fb_tab_t mk_fb_tab();
    fb_tab_t t;
    for (int n = 0; n < 16; n++)
      t[n] = CW'($rtoi($sin(3.14159265358979 * (real'(n) + 0.5) / 16.0) * real'(2 ** CW - 1) + 0.5));
    return t;
  endfunction
  localparam fb_tab_t FB_W = mk_fb_tab();

  // ---- partial mode: filter-bank window in front of the 8-point FFT ----
  logic signed [IW-1:0] prev_re [8], prev_im [8];
  logic signed [BW-1:0] fb_re [8], fb_im [8];
  logic signed [BW-1:0] f8_in_re [8], f8_in_im [8];
  logic                 f8_in_v;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < 8; l++) begin prev_re[l] <= '0; prev_im[l] <= '0; end
    end else if (in_valid && partial) begin
      prev_re <= in_re;
      prev_im <= in_im;
    end
  end
  always_comb begin
    for (int l = 0; l < 8; l++) begin
      logic signed [31:0] ar, ai;
      ar = (32'(prev_re[l]) * $signed({1'b0, FB_W[l]}) + 32'(in_re[l]) * $signed({1'b0, FB_W[l + 8]})) >>> CW;
      ai = (32'(prev_im[l]) * $signed({1'b0, FB_W[l]}) + 32'(in_im[l]) * $signed({1'b0, FB_W[l + 8]})) >>> CW;
      fb_re[l] = BW'(sat_w(ar, IW));
      fb_im[l] = BW'(sat_w(ai, IW));
    end
  end

  // bank inputs: the lanes (full mode) or the filter-bank outputs (partial)
  logic                 pv_q;
  logic [6:0]           ppos_q;
  logic                 bin_v;
  logic [6:0]           bin_pos;
  logic signed [IW-1:0] bin_re [8], bin_im [8];

  logic                 bv [8];
  logic [6:0]           bk [8];
  logic signed [BW-1:0] br [8], bi [8];
  logic                 tv [8];
  logic [6:0]           tk [8];
  logic signed [BW-1:0] tr [8], ti [8];
  logic                 fv;
  logic [6:0]           fk;
  logic signed [FW-1:0] fr [8], fi [8];

  for (genvar l = 0; l < 8; l++) begin : g_bank
    fft128_sdf #(.IW(IW)) u_fft128 (
      .clk, .rst_n, .in_valid(bin_v), .in_pos(bin_pos),
      .in_re(bin_re[l]), .in_im(bin_im[l]),
      .out_valid(bv[l]), .out_bin(bk[l]), .out_re(br[l]), .out_im(bi[l]));

    // multiplier array: W1024^(l * k2)
    logic [9:0] idx;
    assign idx = 10'(l) * 10'(bk[l]);
    fft_twiddle #(.W(BW), .L(1024), .PW(7)) u_tw (
      .clk, .rst_n, .in_valid(bv[l]), .in_pos(bk[l]), .idx(idx),
      .in_re(br[l]), .in_im(bi[l]),
      .out_valid(tv[l]), .out_pos(tk[l]), .out_re(tr[l]), .out_im(ti[l]));
  end

  // 8-point FFT input: twiddled bank outputs (full) or windowed lanes (partial)
  assign f8_in_v = partial ? in_valid : tv[0];
  always_comb begin
    for (int l = 0; l < 8; l++) begin
      f8_in_re[l] = partial ? fb_re[l] : tr[l];
      f8_in_im[l] = partial ? fb_im[l] : ti[l];
    end
  end
  fft8_par #(.IW(BW)) u_fft8 (
    .clk, .rst_n, .in_valid(f8_in_v), .in_re(f8_in_re), .in_im(f8_in_im),
    .out_valid(fv), .out_re(fr), .out_im(fi));

  // the 8-point FFT output (IW + 3 significant bits in partial mode) is
  // scaled by 1/8 back to IW bits for the banks; pos follows with its delay
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pv_q <= 1'b0;
    else        pv_q <= in_valid && partial;
  end
  always_ff @(posedge clk) ppos_q <= in_pos;
  assign bin_v   = partial ? (fv && pv_q) : in_valid;
  assign bin_pos = partial ? ppos_q : in_pos;
  always_comb begin
    for (int l = 0; l < 8; l++) begin
      bin_re[l] = partial ? (band_en[l] ? IW'(fr[l] >>> 3) : '0) : in_re[l];
      bin_im[l] = partial ? (band_en[l] ? IW'(fi[l] >>> 3) : '0) : in_im[l];
    end
  end

  always_ff @(posedge clk) fk <= tk[0];

  assign out_valid = partial ? bv[0] : fv;
  assign out_k2    = partial ? bk[0] : fk;
  for (genvar l = 0; l < 8; l++) begin : g_out
    assign out_re[l] = partial ? OW'(br[l] >>> (BW - OW)) : OW'(fr[l] >>> (FW - OW));
    assign out_im[l] = partial ? OW'(bi[l] >>> (BW - OW)) : OW'(fi[l] >>> (FW - OW));
  end
endmodule
