// fft_sdf_stage: one radix-2 single-delay-feedback (SDF) butterfly stage.
//
// Samples of a frame stream in one per valid cycle together with their
// position POS (0..2^PW-1) in the frame.  Bit log2(D) of the position decides
// the phase: while it is 0 the sample is written into the D-entry feedback
// delay line and the stage outputs the differences stored during the previous
// phase; while it is 1 the butterfly adds the arriving sample to the one
// leaving the delay line, outputs the sum and stores the difference.  The
// output stream therefore carries, D samples later, decimation-in-frequency
// results in the same position order.
//
// Before the butterfly, the second operand (bit = 1) can be rotated by a
// trivial or constant factor, which is how the radix-2^2 and radix-2^3
// processing elements avoid full multipliers: ROT = 4 rotates by -j when the
// first frequency bit of the PE is set, ROT = 8 rotates by W8^(c1 + 2 c2)
// (-j, C1 = W8^1, C2 = W8^3), where c1, c2 are the PE's earlier frequency bits
// found in the position bits above bit log2(D) inside the PE's 2^PE_LOG-sample
// block.  The rotation saturates to IW bits; the butterfly grows the word by
// one bit (output IW+1).
//
// Timing: output registered; out_pos = in_pos - D; out_valid starts once D
// samples have been taken in.  The stage only advances on in_valid, so gaps in
// the input are allowed.  SDF structure and the radix-2^k constant rotations
// follow the source design; bit growth and saturation are this design's.
module fft_sdf_stage
  import ss_pkg::*;
#(
  parameter int IW     = 13,
  parameter int D      = 64,
  parameter int PE_LOG = 7,
  parameter int ROT    = 0,
  parameter int PW     = 7
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [PW-1:0]        in_pos,
  input  logic signed [IW-1:0] in_re,
  input  logic signed [IW-1:0] in_im,
  output logic                 out_valid,
  output logic [PW-1:0]        out_pos,
  output logic signed [IW:0]   out_re,
  output logic signed [IW:0]   out_im
);
  localparam int DB = $clog2(D);           // butterfly bit

  logic signed [IW:0] dl_re [D];
  logic signed [IW:0] dl_im [D];
  logic [(D > 1 ? DB : 1)-1:0] ptr;
  logic [DB:0] seen;
  logic        phase;
  logic [2:0]  k8;
  logic signed [IW-1:0] xr_re, xr_im;
  logic signed [IW:0]   a_re, a_im, sum_re, sum_im, dif_re, dif_im;

  assign phase = in_pos[DB];

  // constant rotation of the second butterfly operand
  always_comb begin
    logic signed [63:0] rr;
    logic [1:0] c;
    k8 = 3'd0;
    if (ROT == 4 && PE_LOG - 1 > DB) begin
      k8 = in_pos[PE_LOG-1] ? 3'd2 : 3'd0;                       // -j
    end else if (ROT == 8 && PE_LOG - 2 > DB) begin
      c  = {in_pos[PE_LOG-2], in_pos[PE_LOG-1]};                 // bit-reversed (c2 c1)
      k8 = {1'b0, c};
    end
    if (!phase) k8 = 3'd0;
    rr    = rot_w8(32'(in_re), 32'(in_im), k8);
    xr_re = IW'(sat_w(rr[63:32], IW));
    xr_im = IW'(sat_w(rr[31:0], IW));
  end

  assign a_re   = dl_re[ptr];
  assign a_im   = dl_im[ptr];
  assign sum_re = a_re + (IW+1)'(xr_re);
  assign sum_im = a_im + (IW+1)'(xr_im);
  assign dif_re = a_re - (IW+1)'(xr_re);
  assign dif_im = a_im - (IW+1)'(xr_im);

  always_ff @(posedge clk) begin
    if (in_valid) begin
      dl_re[ptr] <= phase ? dif_re : (IW+1)'(in_re);
      dl_im[ptr] <= phase ? dif_im : (IW+1)'(in_im);
      out_re     <= phase ? sum_re : a_re;
      out_im     <= phase ? sum_im : a_im;
      out_pos    <= in_pos - PW'(D);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr       <= '0;
      seen      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && (int'(seen) >= D);
      if (in_valid) begin
        ptr <= (int'(ptr) == D - 1) ? '0 : ptr + 1'b1;
        if (int'(seen) < D) seen <= seen + 1'b1;
      end
    end
  end
endmodule
