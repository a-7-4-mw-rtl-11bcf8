// flt_mul: floating-point multiplier.
//
// The exponents are added and the mantissas multiplied with ordinary
// two's-complement arithmetic; no exponent matching is needed.  The
// 2*MANT_W-bit product is renormalised to MANT_W bits (ss_pkg::flt_norm).
// Structure from the source design; renormalisation and truncation are this
// design's choices.  Combinational.
module flt_mul
  import ss_pkg::*;
(
  input  flt_t a,
  input  flt_t b,
  output flt_t y
);
  logic signed [2*MANT_W-1:0] prod;
  always_comb begin
    prod = a.m * b.m;
    y    = flt_norm(NORM_W'(prod), int'(a.e) + int'(b.e));
  end
endmodule
