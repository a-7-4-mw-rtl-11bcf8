// fix2flt: fixed-point to floating-point converter.
//
// A priority encoder counts the redundant sign bits at the top of the IN_W-bit
// two's-complement input; that count sets both the exponent and the amount by
// which a barrel shifter moves the input so that the MANT_W most significant
// bits become the mantissa.  The output value is m * 2^e and equals the input
// times 2^EBASE, truncated to the mantissa width.  EBASE lets the caller give
// the input an implicit binary point (default 0: input is an integer).
// The 20-b input, 10-b mantissa and 5-b exponent follow the source design; the
// signed treatment of the input and truncation are this design's choices.
// Purely combinational.
module fix2flt
  import ss_pkg::*;
#(
  parameter int IN_W  = 20,
  parameter int EBASE = 0
) (
  input  logic signed [IN_W-1:0] x,
  output flt_t                   y
);
  // priority encoder: index of the first bit (from the top) that differs
  // from the sign bit
  logic [$clog2(IN_W+1)-1:0] red;
  always_comb begin
    red = '0;
    for (int i = IN_W - 2; i >= 0; i--) begin
      if (x[i] == x[IN_W-1] && int'(red) == IN_W - 2 - i) red = red + 1'b1;
    end
  end

  // barrel shifter and exponent
  always_comb begin
    int sh, e;
    logic signed [IN_W+MANT_W-1:0] xs;
    sh = (IN_W - int'(red)) - MANT_W;
    e  = EBASE + sh;
    if (e < EXP_MIN) begin
      sh = EXP_MIN - EBASE;
      e  = EXP_MIN;
    end
    xs = (IN_W+MANT_W)'(x);            // sign-extended, room for left shifts
    if (sh >= 0) xs = xs >>> sh;
    else         xs = xs <<< (-sh);
    if (x == '0) begin
      y = FLT_ZERO;
    end else if (e > EXP_MAX) begin
      y.e = EXP_W'(EXP_MAX);
      y.m = x[IN_W-1] ? MANT_W'(-(2 ** (MANT_W - 1))) : MANT_W'((2 ** (MANT_W - 1)) - 1);
    end else begin
      y.e = EXP_W'(e);
      y.m = xs[MANT_W-1:0];
    end
  end
endmodule
