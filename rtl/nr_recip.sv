// nr_recip: pipelined Newton-Raphson reciprocal of a positive float.
//
// For d = m * 2^e with a normalised mantissa m in [256, 511], d' = m/512 lies
// in [0.5, 1).  Starting from x0 = 1 (that is 1/512 in mantissa units), ITERS
// iterations x <- x (2 - d' x) converge quadratically to 1/d' in (1, 2]; the
// error 1 - d' x is at most 1/2 at the start and squares every iteration, so
// four iterations reach the 14 fraction bits used here.  The result is
// 1/d = x * 2^(-14) * 2^(-9-e), returned as the 16-bit fraction x (Q2.14) and
// the exponent rexp = -23 - e.  A zero or negative d raises bad.
// Timing: one register per iteration plus an input register (latency
// ITERS + 1), one new operand per cycle; TAG_W bits of side information
// travel with each operand.
// The Newton-Raphson reciprocal and its 1/512 starting value follow the source
// design; the pipelined (unrolled) loop and the fixed-point formats are this
// design's choices.
module nr_recip
  import ss_pkg::*;
#(
  parameter int ITERS = 4,
  parameter int TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  flt_t             d,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [15:0]      x,
  output logic signed [7:0] rexp,
  output logic             bad,
  output logic [TAG_W-1:0] out_tag
);
  logic             v   [ITERS+1];
  logic [8:0]       dm  [ITERS+1];
  logic signed [7:0] re [ITERS+1];
  logic             bd  [ITERS+1];
  logic [15:0]      xs  [ITERS+1];
  logic [TAG_W-1:0] tg  [ITERS+1];

  // input register and initial value
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v[0] <= 1'b0;
    else        v[0] <= in_valid;
  end
  always_ff @(posedge clk) begin
    bd[0] <= (d.m <= 0) || (d.m[MANT_W-1:MANT_W-2] != 2'b01);
    dm[0] <= d.m[8:0];
    re[0] <= -8'sd23 - 8'(d.e);
    xs[0] <= 16'd16384;                  // 1.0
    tg[0] <= in_tag;
  end

  for (genvar i = 0; i < ITERS; i++) begin : g_it
    logic [39:0] p, t, xn;
    always_comb begin
      p  = 40'(dm[i]) * 40'(xs[i]);               // d' x, scaled 2^23
      t  = (40'd2 << 23) - p;                     // 2 - d' x
      xn = (40'(xs[i]) * t) >> 23;
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v[i+1] <= 1'b0;
      else        v[i+1] <= v[i];
    end
    always_ff @(posedge clk) begin
      xs[i+1] <= 16'(xn);
      dm[i+1] <= dm[i];
      re[i+1] <= re[i];
      bd[i+1] <= bd[i];
      tg[i+1] <= tg[i];
    end
  end

  assign out_valid = v[ITERS];
  assign x         = xs[ITERS];
  assign rexp      = re[ITERS];
  assign bad       = bd[ITERS];
  assign out_tag   = tg[ITERS];
endmodule
