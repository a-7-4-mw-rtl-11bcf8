// flt_sq: floating-point squarer, the special case of flt_mul with equal
// operands.  The exponent is shifted left by one (doubled) and the mantissa
// squared; the product is renormalised to MANT_W bits (ss_pkg::flt_norm).
// Structure from the source design; renormalisation is this design's choice.
// Combinational.
module flt_sq
  import ss_pkg::*;
(
  input  flt_t a,
  output flt_t y
);
  logic signed [2*MANT_W-1:0] prod;
  always_comb begin
    prod = a.m * a.m;
    y    = flt_norm(NORM_W'(prod), int'(a.e) <<< 1);
  end
endmodule
