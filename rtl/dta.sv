// dta: detection-threshold adaptation.  For each channel k it computes
//     gamma(k) = (Qinv(PFA) sqrt(alpha M(k)) + M(k)) * Sigma0(k),
//     Sigma0(k) = sigma_nf^2(k) + sigma_if^2(k),
// the threshold that the accumulated power T(k) = sum of M(k) frames must
// reach to declare the channel occupied.  With PFA = 0.1 (Qinv = 1.28155)
// and the fitting factor alpha = 1.1302 implied by the sensing-time constant
// 74.25 (alpha ((Qinv(PFA) - Qinv(PD)) / SNR)^2 = 74.25 for PD = 0.9 and
// SNR = -5 dB), Qinv(PFA) sqrt(alpha) = 1.3624, a constant multiplier.
//
// Per lane: Sigma0 is one floating-point addition; sqrt(M) comes from a
// Newton-Raphson square root (nr_isqrt, 8 fraction bits); the bracket is
// formed in fixed point, converted to floating point (fix2flt) and
// multiplied by Sigma0 (flt_mul).  LANES lanes each take one channel per
// cycle; latency ITERS + 4.  chan and a side value tag (the accumulated
// power T(k), so the decision can follow the threshold directly) travel
// with the data.  Equation (5) is the source design's; the constants'
// derivation, lane count and number formats are this design's.
module dta
  import ss_pkg::*;
#(
  parameter int LANES = 4,
  parameter int ITERS = 4,
  parameter int MK_W  = 14
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [9:0]      in_chan [LANES],
  input  logic [MK_W-1:0] in_m    [LANES],
  input  flt_t            noise   [LANES],
  input  flt_t            intf    [LANES],
  input  flt_t            in_tag  [LANES],
  output logic            out_valid,
  output logic [9:0]      out_chan [LANES],
  output flt_t            gamma   [LANES],
  output flt_t            out_tag [LANES]
);
  localparam int KSQ = 5580;        // 1.36243 * 4096
  localparam int SF  = 8;
  localparam int GW  = MK_W + SF + 2;

  logic lv [LANES];

  for (genvar u = 0; u < LANES; u++) begin : g_lane
    flt_t sig0;
    flt_add u_sig (.a(noise[u]), .b(intf[u]), .y(sig0));

    localparam int TW = 10 + MK_W + 2 * $bits(flt_t);
    logic             sv;
    logic [MK_W/2+SF:0] root;
    logic [9:0]       sc;
    logic [MK_W-1:0]  sm;
    flt_t             ss0, st;

    nr_isqrt #(.IN_W(MK_W), .SF(SF), .ITERS(ITERS), .TAG_W(TW)) u_sqrt (
      .clk, .rst_n, .in_valid(in_valid), .a(in_m[u]),
      .in_tag({in_chan[u], in_m[u], sig0, in_tag[u]}),
      .out_valid(sv), .root(root), .out_tag({sc, sm, ss0, st}));

    // bracket in fixed point (SF fraction bits), to float, times Sigma0
    logic [GW-1:0] g;
    flt_t gf, gm;
    assign g = (GW'(sm) << SF) + GW'((32'(KSQ) * 32'(root)) >> 12);
    fix2flt #(.IN_W(GW + 1), .EBASE(-SF)) u_cv (.x(signed'({1'b0, g})), .y(gf));
    flt_mul u_mul (.a(gf), .b(ss0), .y(gm));

    logic v1;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v1 <= 1'b0;
      else        v1 <= sv;
    end
    always_ff @(posedge clk) begin
      out_chan[u] <= sc;
      gamma[u]    <= gm;
      out_tag[u]  <= st;
    end
    assign lv[u] = v1;
  end

  assign out_valid = lv[0];
endmodule
