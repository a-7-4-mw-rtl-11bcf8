// flt_add: floating-point adder.
//
// Exponent matching: the exponents are compared, a pair of multiplexers swaps
// the operands so that the one with the larger exponent comes first, and a
// barrel shifter moves the other mantissa right by the exponent difference.
// The aligned mantissas are added by an ordinary two's-complement adder and
// the sum is renormalised (see ss_pkg::flt_norm) with the larger exponent as
// its base.  This structure follows the source design; renormalisation of the
// sum and truncation of shifted-out bits are this design's choices.
// Combinational.
module flt_add
  import ss_pkg::*;
(
  input  flt_t a,
  input  flt_t b,
  output flt_t y
);
  flt_t opl, ops;
  int   diff;
  logic signed [MANT_W+1:0] aligned, sum;

  always_comb begin
    // swap multiplexers: opl has the larger exponent
    if (a.e >= b.e) begin opl = a; ops = b; end
    else            begin opl = b; ops = a; end
    diff = int'(opl.e) - int'(ops.e);
    // barrel shifter
    if (diff > MANT_W + 1) aligned = (ops.m < 0) ? '1 : '0;
    else                   aligned = (MANT_W+2)'(ops.m) >>> diff;
    sum = (MANT_W+2)'(opl.m) + aligned;
    y   = flt_norm(NORM_W'(sum), int'(opl.e));
  end
endmodule
