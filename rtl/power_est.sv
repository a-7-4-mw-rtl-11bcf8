// power_est: power estimation for the eight FFT output lanes.
//
// For every bin the complex FFT output is converted to floating point
// (fix2flt on real and imaginary part), each part is squared in floating
// point (flt_sq) and the two squares are added (flt_add), giving |X(k)|^2.
// The power is then accumulated, per channel, into one of two stores held
// here as eight 128-word banks each: M1, the PSD accumulator
// T(k) = sum_m |X_m(k)|^2, and M2, the noise-calibration accumulator.  Bank l
// holds channels k = 128 l + k2 and is addressed by k2.
//
// Control (aligned with the input sample): acc_en enables accumulation, tgt
// selects M1 (0) or M2 (1), first writes the power instead of adding it (the
// first frame of an estimate), and lim_en restricts accumulation to channels
// whose limit M(k) (read by the caller at lim_raddr = in_k2, returned on
// lim_rdata one cycle later) is larger than frame_idx: this is the
// channel-specific number of averages.  Read-modify-write: the stores are
// read at the input cycle and written one cycle later; one bin address
// returns only every 128 cycles, so there is no hazard.
// When acc_en is low the read port rd_addr serves the controller and the
// host: both stores are read at once (rd_m1, rd_m2, one cycle later).
// Floating-point squaring and accumulation and the M1/M2 stores follow the
// source design; the amplitude scaling AMP_EBASE (value = |X|^2 * 2^(2 AMP_EBASE))
// is this design's choice, made so the 5-b exponent covers weak noise and
// strong interferers.
module power_est
  import ss_pkg::*;
#(
  parameter int IW        = 20,
  parameter int AMP_EBASE = -6,
  parameter int MK_W      = 14
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [6:0]           in_k2,
  input  logic signed [IW-1:0] in_re [8],
  input  logic signed [IW-1:0] in_im [8],
  input  logic                 acc_en,
  input  logic                 tgt,
  input  logic                 first,
  input  logic                 lim_en,
  input  logic [MK_W-1:0]      frame_idx,
  output logic [6:0]           lim_raddr,
  input  logic [MK_W-1:0]      lim_rdata [8],
  input  logic [6:0]           rd_addr [8],
  output flt_t                 rd_m1   [8],
  output flt_t                 rd_m2   [8]
);
  // stage 0: power, read of the old sums
  flt_t pw [8];
  for (genvar l = 0; l < 8; l++) begin : g_pw
    flt_t fr, fi, sr, si;
    fix2flt #(.IN_W(IW), .EBASE(AMP_EBASE)) u_cr (.x(in_re[l]), .y(fr));
    fix2flt #(.IN_W(IW), .EBASE(AMP_EBASE)) u_ci (.x(in_im[l]), .y(fi));
    flt_sq u_sr (.a(fr), .y(sr));
    flt_sq u_si (.a(fi), .y(si));
    flt_add u_ad (.a(sr), .b(si), .y(pw[l]));
  end

  logic            go;
  logic [6:0]      raddr [8];
  assign go        = in_valid && acc_en;
  assign lim_raddr = in_k2;
  for (genvar l = 0; l < 8; l++) begin : g_ra
    assign raddr[l] = go ? in_k2 : rd_addr[l];
  end

  // stage 1 registers
  logic            go_q, tgt_q, first_q, lim_q;
  logic [6:0]      k2_q;
  logic [MK_W-1:0] fidx_q;
  flt_t            pw_q [8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) go_q <= 1'b0;
    else        go_q <= go;
  end
  always_ff @(posedge clk) begin
    tgt_q   <= tgt;
    first_q <= first;
    lim_q   <= lim_en;
    k2_q    <= in_k2;
    fidx_q  <= frame_idx;
    pw_q    <= pw;
  end

  // banks
  for (genvar l = 0; l < 8; l++) begin : g_bank
    flt_t m1_q, m2_q, old, sum;
    logic wr;
    ss_ram #(.DW($bits(flt_t)), .DEPTH(128)) u_m1 (.clk,
      .we(wr && !tgt_q), .waddr(k2_q), .wdata(first_q ? pw_q[l] : sum),
      .raddr(raddr[l]), .rdata(m1_q));
    ss_ram #(.DW($bits(flt_t)), .DEPTH(128)) u_m2 (.clk,
      .we(wr && tgt_q), .waddr(k2_q), .wdata(first_q ? pw_q[l] : sum),
      .raddr(raddr[l]), .rdata(m2_q));
    assign old = tgt_q ? m2_q : m1_q;
    flt_add u_acc (.a(old), .b(pw_q[l]), .y(sum));
    assign wr = go_q && (!lim_q || (fidx_q < lim_rdata[l]));
    assign rd_m1[l] = m1_q;
    assign rd_m2[l] = m2_q;
  end
endmodule
