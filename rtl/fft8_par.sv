// fft8_par: 8-point parallel FFT across the eight datapath lanes.
//
// All eight inputs arrive in the same cycle; X[k] = sum_n x[n] W8^(nk) is
// produced for all k in the same cycle and registered.  Three radix-2
// decimation-in-frequency butterfly ranks are used; the rotations between
// them are the constants -j and W8^1/W8^3 (one CSD 1/sqrt(2) multiplier,
// ss_pkg::rot_w8), so no general multiplier is needed.  Words grow by one bit
// per rank (IW in, IW+3 out).  Latency: one cycle.
// The block's function and its position after the eight 128-point banks come
// from the source design; the butterfly arrangement is this design's choice.
module fft8_par
  import ss_pkg::*;
#(
  parameter int IW = 20,
  parameter int OW = IW + 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_re [8],
  input  logic signed [IW-1:0] in_im [8],
  output logic                 out_valid,
  output logic signed [OW-1:0] out_re [8],
  output logic signed [OW-1:0] out_im [8]
);
  logic signed [31:0] ar [8], ai [8], br [8], bi [8], cr [8], ci [8];

  always_comb begin
    logic signed [63:0] r;
    // rank 1: pairs (n, n+4), bottom rotated by W8^n
    for (int n = 0; n < 4; n++) begin
      ar[n] = 32'(in_re[n]) + 32'(in_re[n+4]);
      ai[n] = 32'(in_im[n]) + 32'(in_im[n+4]);
      r = rot_w8(32'(in_re[n]) - 32'(in_re[n+4]), 32'(in_im[n]) - 32'(in_im[n+4]), 3'(n));
      ar[n+4] = r[63:32]; ai[n+4] = r[31:0];
    end
    // rank 2: pairs (h+n, h+n+2), bottom rotated by W8^(2n)
    for (int h = 0; h < 8; h += 4)
      for (int n = 0; n < 2; n++) begin
        br[h+n] = ar[h+n] + ar[h+n+2];
        bi[h+n] = ai[h+n] + ai[h+n+2];
        r = rot_w8(ar[h+n] - ar[h+n+2], ai[h+n] - ai[h+n+2], 3'(2 * n));
        br[h+n+2] = r[63:32]; bi[h+n+2] = r[31:0];
      end
    // rank 3: pairs (2i, 2i+1)
    for (int i = 0; i < 8; i += 2) begin
      cr[i]   = br[i] + br[i+1];  ci[i]   = bi[i] + bi[i+1];
      cr[i+1] = br[i] - br[i+1];  ci[i+1] = bi[i] - bi[i+1];
    end
  end

  // outputs in natural order: c[j] holds X[bitrev3(j)]
  always_ff @(posedge clk) begin
    for (int j = 0; j < 8; j++) begin
      out_re[{j[0], j[1], j[2]}] <= OW'(sat_w(cr[j], OW));
      out_im[{j[0], j[1], j[2]}] <= OW'(sat_w(ci[j], OW));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
endmodule
