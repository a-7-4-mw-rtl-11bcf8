// nr_isqrt: pipelined Newton-Raphson square root of an unsigned integer.
//
// The input a (IN_W <= 14 bits) is shifted left by an even amount 2j so that
// mm = a * 4^j / 2^14 lies in [0.25, 1).  The inverse square root
// r = 1/sqrt(mm) is refined by ITERS iterations r <- r (3 - mm r^2) / 2 from
// a two-entry starting value (1.7 below mm = 0.5, 1.2 above), and
// sqrt(mm) = mm * r.  The output is sqrt(a) with SF fraction bits:
// sqrt(a) = sqrt(mm) * 2^7 / 2^j.  a = 0 gives 0.
// Timing: one register per iteration, one at the input and one at the output
// (latency ITERS + 2); one operand per cycle; TAG_W bits travel along.
// Fixed-point formats, starting values and the inverse-square-root form of
// the iteration are this design's choices (the source design only names
// Newton-Raphson square root).
module nr_isqrt #(
  parameter int IN_W  = 14,
  parameter int SF    = 8,
  parameter int ITERS = 4,
  parameter int TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [IN_W-1:0]  a,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [IN_W/2+SF:0] root,
  output logic [TAG_W-1:0] out_tag
);
  logic             v  [ITERS+2];
  logic [13:0]      mm [ITERS+1];
  logic [3:0]       jj [ITERS+1];
  logic [15:0]      r  [ITERS+1];
  logic             z  [ITERS+1];
  logic [TAG_W-1:0] tg [ITERS+2];

  // normalisation by an even shift
  logic [13:0] an;
  logic [3:0]  j0;
  always_comb begin
    an = 14'(a);
    j0 = '0;
    for (int i = 0; i < 7; i++) begin
      if (an[13:12] == 2'b00 && an != '0) begin
        an = an << 2;
        j0 = j0 + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v[0] <= 1'b0;
    else        v[0] <= in_valid;
  end
  always_ff @(posedge clk) begin
    mm[0] <= an;
    jj[0] <= j0;
    z[0]  <= (a == '0);
    r[0]  <= an[13] ? 16'd19661 : 16'd27853;   // 1.2 : 1.7 in Q2.14
    tg[0] <= in_tag;
  end

  for (genvar i = 0; i < ITERS; i++) begin : g_it
    logic [63:0] t, rn;
    always_comb begin
      t  = (64'(mm[i]) * 64'(r[i]) * 64'(r[i])) >> 28;      // mm r^2, Q14
      rn = (64'(r[i]) * ((64'd3 << 14) - t)) >> 15;          // r (3 - mm r^2) / 2
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v[i+1] <= 1'b0;
      else        v[i+1] <= v[i];
    end
    always_ff @(posedge clk) begin
      r[i+1]  <= 16'(rn);
      mm[i+1] <= mm[i];
      jj[i+1] <= jj[i];
      z[i+1]  <= z[i];
      tg[i+1] <= tg[i];
    end
  end

  // sqrt(mm) in Q14, then scale: sqrt(a) * 2^SF = s * 2^(7 + SF - 14 - j)
  logic [31:0] s, o;
  always_comb begin
    s = (32'(mm[ITERS]) * 32'(r[ITERS])) >> 14;
    if (7 + SF - 14 >= 0) o = (s << (7 + SF - 14)) >> jj[ITERS];
    else                  o = (s >> (14 - 7 - SF)) >> jj[ITERS];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v[ITERS+1] <= 1'b0;
    else        v[ITERS+1] <= v[ITERS];
  end
  always_ff @(posedge clk) begin
    root          <= z[ITERS] ? '0 : (IN_W/2+SF+1)'(o);
    tg[ITERS+1]   <= tg[ITERS];
  end

  assign out_valid = v[ITERS+1];
  assign out_tag   = tg[ITERS+1];
endmodule
