// fft128_sdf: 128-point pipelined FFT, single-delay-feedback, radix-2^2 /
// radix-2^2 / radix-2^3.
//
// Seven SDF butterfly stages with delay lines 64, 32, 16, 8, 4, 2, 1 form
// three processing elements (PEs):
//   PE1 (radix-2^2): stages D=64, D=32 (-j rotation before the 2nd butterfly)
//   full twiddle multiplier W128^(n * bitrev2(c))   n = pos[4:0], c = pos[6:5]
//   PE2 (radix-2^2): stages D=16, D=8  (-j rotation)
//   full twiddle multiplier W32^(n * bitrev2(c))    n = pos[2:0], c = pos[4:3]
//   PE3 (radix-2^3): stages D=4, D=2 (-j), D=1 (W8^0..3: -j, C1, C2)
// Only the two inter-PE multipliers are general complex multipliers; the
// rotations inside the PEs are swaps, negations and one CSD constant.
//
// Interface: one complex sample per valid cycle in natural order with its
// position in_pos (0..127).  Output: one sample per valid cycle, bin index
// out_bin = bit-reverse(position) (the output is in bit-reversed order).
// Word growth one bit per stage: IW in, IW+7 out.  Latency: 127 samples of
// delay-line fill plus 9 register stages.  Radix choice (A10 of the source
// design's radix exploration) and SDF architecture follow the source design;
// word lengths, rounding and saturation are this design's choices.
module fft128_sdf #(
  parameter int IW = 13,
  parameter int OW = IW + 7
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [6:0]           in_pos,
  input  logic signed [IW-1:0] in_re,
  input  logic signed [IW-1:0] in_im,
  output logic                 out_valid,
  output logic [6:0]           out_bin,
  output logic signed [OW-1:0] out_re,
  output logic signed [OW-1:0] out_im
);
  // stage s output width IW+s
  logic              v1, v2, v2t, v3, v4, v4t, v5, v6, v7;
  logic [6:0]        p1, p2, p2t, p3, p4, p4t, p5, p6, p7;
  logic signed [IW:0]   r1, i1;
  logic signed [IW+1:0] r2, i2, r2t, i2t;
  logic signed [IW+2:0] r3, i3;
  logic signed [IW+3:0] r4, i4, r4t, i4t;
  logic signed [IW+4:0] r5, i5;
  logic signed [IW+5:0] r6, i6;
  logic signed [IW+6:0] r7, i7;
  logic [6:0] idx1, idx2;

  // PE1
  fft_sdf_stage #(.IW(IW),   .D(64), .PE_LOG(7), .ROT(0)) s1 (.clk, .rst_n,
    .in_valid(in_valid), .in_pos(in_pos), .in_re(in_re), .in_im(in_im),
    .out_valid(v1), .out_pos(p1), .out_re(r1), .out_im(i1));
  fft_sdf_stage #(.IW(IW+1), .D(32), .PE_LOG(7), .ROT(4)) s2 (.clk, .rst_n,
    .in_valid(v1), .in_pos(p1), .in_re(r1), .in_im(i1),
    .out_valid(v2), .out_pos(p2), .out_re(r2), .out_im(i2));
  assign idx1 = 7'(p2[4:0]) * 7'({p2[5], p2[6]});
  fft_twiddle #(.W(IW+2), .L(128)) t1 (.clk, .rst_n,
    .in_valid(v2), .in_pos(p2), .idx(idx1), .in_re(r2), .in_im(i2),
    .out_valid(v2t), .out_pos(p2t), .out_re(r2t), .out_im(i2t));
  // PE2
  fft_sdf_stage #(.IW(IW+2), .D(16), .PE_LOG(5), .ROT(0)) s3 (.clk, .rst_n,
    .in_valid(v2t), .in_pos(p2t), .in_re(r2t), .in_im(i2t),
    .out_valid(v3), .out_pos(p3), .out_re(r3), .out_im(i3));
  fft_sdf_stage #(.IW(IW+3), .D(8),  .PE_LOG(5), .ROT(4)) s4 (.clk, .rst_n,
    .in_valid(v3), .in_pos(p3), .in_re(r3), .in_im(i3),
    .out_valid(v4), .out_pos(p4), .out_re(r4), .out_im(i4));
  assign idx2 = (7'(p4[2:0]) * 7'({p4[3], p4[4]})) << 2;     // W32^x = W128^(4x)
  fft_twiddle #(.W(IW+4), .L(128)) t2 (.clk, .rst_n,
    .in_valid(v4), .in_pos(p4), .idx(idx2), .in_re(r4), .in_im(i4),
    .out_valid(v4t), .out_pos(p4t), .out_re(r4t), .out_im(i4t));
  // PE3
  fft_sdf_stage #(.IW(IW+4), .D(4), .PE_LOG(3), .ROT(0)) s5 (.clk, .rst_n,
    .in_valid(v4t), .in_pos(p4t), .in_re(r4t), .in_im(i4t),
    .out_valid(v5), .out_pos(p5), .out_re(r5), .out_im(i5));
  fft_sdf_stage #(.IW(IW+5), .D(2), .PE_LOG(3), .ROT(4)) s6 (.clk, .rst_n,
    .in_valid(v5), .in_pos(p5), .in_re(r5), .in_im(i5),
    .out_valid(v6), .out_pos(p6), .out_re(r6), .out_im(i6));
  fft_sdf_stage #(.IW(IW+6), .D(1), .PE_LOG(3), .ROT(8)) s7 (.clk, .rst_n,
    .in_valid(v6), .in_pos(p6), .in_re(r6), .in_im(i6),
    .out_valid(v7), .out_pos(p7), .out_re(r7), .out_im(i7));

  assign out_valid = v7;
  assign out_bin   = {p7[0], p7[1], p7[2], p7[3], p7[4], p7[5], p7[6]};
  assign out_re    = OW'(r7);
  assign out_im    = OW'(i7);
endmodule
