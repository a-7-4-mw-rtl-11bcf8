// mw_window: multitap time-domain window for one datapath lane.
//
// Multitap windowing lets a window longer than the FFT (TAPS * N samples)
// suppress spectral leakage while a single N-point FFT channelises the band:
// output block m is
//     y_m[n] = sum_{p=0}^{TAPS-1} w[n + pN] * x[n + pN + mN],   n = 0..N-1,
// i.e. the TAPS most recent N-sample blocks are weighted and added (overlap
// and add).  In the eight-lane datapath, lane l sees samples n = 8t + l, so
// the per-lane delay lines are N/8 = D words long and the lane holds its own
// share of the window coefficients, indexed by position t and tap.
//
// Coefficients are unsigned CW-bit fractions (w = coef / 2^CW) written through
// the cw_* port; the product sum is scaled back by 2^-CW, giving a
// DW + clog2(TAPS)-bit output.  Timing: one register stage; the first valid
// output comes once (TAPS-1) blocks are buffered; out_pos = in_pos.
// Two taps, the D-sample delay and the two weight multipliers and adder per
// lane follow the source design's datapath figure; the coefficient values,
// their word length and the write port are this design's (the source design
// does not give the window).
module mw_window #(
  parameter int DW   = 12,
  parameter int CW   = 12,
  parameter int TAPS = 2,
  parameter int D    = 128,
  parameter int OW   = DW + $clog2(TAPS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // coefficient write port: w[(pos*8 + lane) + tap*N]
  input  logic                     cw_en,
  input  logic [$clog2(TAPS)-1:0]  cw_tap,
  input  logic [$clog2(D)-1:0]     cw_pos,
  input  logic [CW-1:0]            cw_data,
  // sample stream
  input  logic                     in_valid,
  input  logic [$clog2(D)-1:0]     in_pos,
  input  logic signed [DW-1:0]     in_re,
  input  logic signed [DW-1:0]     in_im,
  output logic                     out_valid,
  output logic [$clog2(D)-1:0]     out_pos,
  output logic signed [OW-1:0]     out_re,
  output logic signed [OW-1:0]     out_im
);
  localparam int PW = DW + CW + 1;                 // one product (signed)
  localparam int SW = PW + $clog2(TAPS);           // sum of TAPS products

  logic [CW-1:0]        coef [TAPS][D];
  // dl[j] holds the block that arrived j+1 blocks ago
  logic signed [DW-1:0] dl_re [TAPS-1][D];
  logic signed [DW-1:0] dl_im [TAPS-1][D];
  logic [$clog2((TAPS-1)*D+1)-1:0] seen;

  logic signed [SW-1:0] acc_re, acc_im;

  always_comb begin
    logic signed [DW-1:0] xr, xi;
    acc_re = '0;
    acc_im = '0;
    for (int p = 0; p < TAPS; p++) begin
      // tap p sees the block that arrived TAPS-1-p blocks ago
      if (p == TAPS - 1) begin
        xr = in_re; xi = in_im;
      end else begin
        xr = dl_re[TAPS-2-p][in_pos];
        xi = dl_im[TAPS-2-p][in_pos];
      end
      acc_re += SW'(xr * $signed({1'b0, coef[p][in_pos]}));
      acc_im += SW'(xi * $signed({1'b0, coef[p][in_pos]}));
    end
  end

  always_ff @(posedge clk) begin
    if (cw_en) coef[cw_tap][cw_pos] <= cw_data;
    if (in_valid) begin
      for (int j = TAPS - 2; j > 0; j--) begin
        dl_re[j][in_pos] <= dl_re[j-1][in_pos];
        dl_im[j][in_pos] <= dl_im[j-1][in_pos];
      end
      dl_re[0][in_pos] <= in_re;
      dl_im[0][in_pos] <= in_im;
      out_re  <= OW'(acc_re >>> CW);
      out_im  <= OW'(acc_im >>> CW);
      out_pos <= in_pos;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && (int'(seen) >= (TAPS - 1) * D);
      if (in_valid && int'(seen) < (TAPS - 1) * D) seen <= seen + 1'b1;
    end
  end
endmodule
