// sta: sensing-time adaptation.  For each channel k it computes the number of
// FFT frames to average,
//     M(k) = 74.25 * (1.1581 + psi(k))^2,   psi(k) = sigma_if^2(k) / sigma_nf^2(k),
// which is the closed form of M(k) = alpha((1+psi)(Qinv(PFA)-Qinv(PD))/SNR
// - Qinv(PD))^2 once the specification (PD = 0.9, PFA = 0.1, SNR = -5 dB) is
// fixed, so only constant multipliers remain.
//
// Per lane: the noise power is inverted by a Newton-Raphson reciprocal
// (nr_recip), multiplied by the interfering power (floating-point multiply:
// mantissa product, exponent add), and an arithmetic shifter turns the product
// into a 10-bit fixed-point psi with four integer and six fraction bits
// (saturating at 1023/64).  The sensing-time calculation adds 1.1581
// (74/64), squares, multiplies by the CSD constant 74.25 = 297/4 and
// truncates to an integer number of frames, clamped to 1..MMAX (MMAX frames =
// the 50-ms sensing-time bound at 1024 samples per 5.12-us frame).
// A channel whose noise power is zero or negative gets MMAX.
//
// LANES lanes work in parallel, each taking one channel per cycle; the lane
// is fully pipelined (latency ITERS + 5 cycles).  chan travels with the data.
// Four lanes, the constants, the 10-b psi and the reciprocal method follow
// the source design; pipelining the Newton-Raphson loop instead of iterating
// it on interleaved channel pairs is this design's choice.
module sta
  import ss_pkg::*;
#(
  parameter int LANES = 4,
  parameter int ITERS = 4,
  parameter int MK_W  = 14,
  parameter int MMAX  = 9765
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [9:0]      in_chan   [LANES],
  input  flt_t            noise     [LANES],   // sigma_nf^2(k)
  input  flt_t            intf      [LANES],   // sigma_if^2(k)
  output logic            out_valid,
  output logic [9:0]      out_chan  [LANES],
  output logic [MK_W-1:0] out_m     [LANES],
  output logic [9:0]      out_psi   [LANES]
);
  localparam int PSI_W   = 10;
  localparam int PSI_OFS = 74;      // 1.1581 * 64

  logic lv [LANES];

  for (genvar u = 0; u < LANES; u++) begin : g_lane
    logic             rv;
    logic [15:0]      rx;
    logic signed [7:0] rex;
    logic             rbad;
    logic [9:0]       rchan;
    flt_t             rintf;

    nr_recip #(.ITERS(ITERS), .TAG_W(10 + $bits(flt_t))) u_rcp (
      .clk, .rst_n, .in_valid(in_valid), .d(noise[u]), .in_tag({in_chan[u], intf[u]}),
      .out_valid(rv), .x(rx), .rexp(rex), .bad(rbad), .out_tag({rchan, rintf}));

    // floating-point multiply and arithmetic shifter -> psi (Q4.6)
    logic [PSI_W-1:0] psi;
    always_comb begin
      logic signed [63:0] prod, sh;
      int s;
      prod = 64'(rintf.m) * 64'(signed'({1'b0, rx}));
      s    = -(int'(rintf.e) + int'(rex) + 6);
      if (prod <= 0)      sh = '0;
      else if (s >= 48)   sh = '0;
      else if (s >= 0)    sh = prod >>> s;
      else if (s > -24)   sh = prod <<< (-s);
      else                sh = 64'(2 ** PSI_W);
      if (rbad || sh >= 64'(2 ** PSI_W - 1)) psi = '1;
      else                                   psi = PSI_W'(sh);
    end

    logic             v1, v2, v3;
    logic [9:0]       c1, c2, c3;
    logic [PSI_W-1:0] p1, p2, p3;
    logic [PSI_W:0]   s1;
    logic [2*PSI_W+1:0] q2;
    logic [31:0]      m3;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; end
      else begin v1 <= rv; v2 <= v1; v3 <= v2; end
    end
    always_ff @(posedge clk) begin
      // arithmetic shifter output, + 1.1581
      c1 <= rchan; p1 <= psi; s1 <= (PSI_W+1)'(psi) + (PSI_W+1)'(PSI_OFS);
      // squaring
      c2 <= c1; p2 <= p1; q2 <= (2*PSI_W+2)'(s1) * (2*PSI_W+2)'(s1);
      // x 74.25 (CSD: 256 + 32 + 8 + 1 = 297, then / 4), back to integer
      c3 <= c2; p3 <= p2;
      m3 <= ((32'(q2) << 8) + (32'(q2) << 5) + (32'(q2) << 3) + 32'(q2)) >> 14;
    end

    assign lv[u] = v3;
    assign out_chan[u] = c3;
    assign out_psi[u]  = p3;
    assign out_m[u]    = (m3 == 0) ? MK_W'(1) : (m3 > 32'(MMAX)) ? MK_W'(MMAX) : MK_W'(m3);
  end

  assign out_valid = lv[0];
endmodule
