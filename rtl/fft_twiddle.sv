// fft_twiddle: full-precision complex twiddle multiplier, y = x * W_L^idx with
// W_L = exp(-j 2 pi / L).
//
// The cosine/sine table (TW-bit, scaled by 2^(TW-2)) is computed at
// elaboration time from the closed form, so no table file is needed.  The
// product is rounded to nearest and saturated to the input width W.
// Timing: one register stage; valid and position travel with the data.
// Used between the processing elements of the 128-point FFT and as the
// multiplier array between the 128-point banks and the 8-point FFT.
module fft_twiddle #(
  parameter int W  = 20,
  parameter int L  = 128,
  parameter int TW = 16,
  parameter int PW = 7
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [PW-1:0]           in_pos,
  input  logic [$clog2(L)-1:0]    idx,
  input  logic signed [W-1:0]     in_re,
  input  logic signed [W-1:0]     in_im,
  output logic                    out_valid,
  output logic [PW-1:0]           out_pos,
  output logic signed [W-1:0]     out_re,
  output logic signed [W-1:0]     out_im
);
  typedef logic signed [TW-1:0] tab_t [L];
  localparam real PI = 3.14159265358979323846;

  function automatic tab_t mk_tab(input logic is_sin);
    tab_t t;
    real  v;
    for (int k = 0; k < L; k++) begin
      v    = is_sin ? $sin(2.0 * PI * k / L) : $cos(2.0 * PI * k / L);
      t[k] = TW'($rtoi(v * (2.0 ** (TW - 2)) + (v >= 0.0 ? 0.5 : -0.5)));
    end
    return t;
  endfunction

  localparam tab_t COS_T = mk_tab(1'b0);
  localparam tab_t SIN_T = mk_tab(1'b1);

  logic signed [TW-1:0] c, s;
  logic signed [W+TW:0] pr, pi_;
  logic signed [31:0]   rr, ri;

  assign c = COS_T[idx];
  assign s = SIN_T[idx];

  // (a + jb)(c - js) = (ac + bs) + j(bc - as)
  always_comb begin
    pr  = (W+TW+1)'(in_re * c) + (W+TW+1)'(in_im * s);
    pi_ = (W+TW+1)'(in_im * c) - (W+TW+1)'(in_re * s);
    rr  = 32'((pr  + (W+TW+1)'(2 ** (TW - 3))) >>> (TW - 2));
    ri  = 32'((pi_ + (W+TW+1)'(2 ** (TW - 3))) >>> (TW - 2));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    out_pos   <= in_pos;
    out_re    <= W'(ss_pkg::sat_w(rr, W));
    out_im    <= W'(ss_pkg::sat_w(ri, W));
  end
endmodule
