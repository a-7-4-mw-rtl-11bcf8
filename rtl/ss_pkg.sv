// ss_pkg: types, constants and helper functions shared by the spectrum-sensing
// processor.
//
// Floating point.  A value is m * 2^e.  The mantissa m (MANT_W = 10 bits) and
// the exponent e (EXP_W = 5 bits) are both two's complement, as in the
// processor's floating-point datapath.  A normalised mantissa has its two top
// bits different (|m| in [256,511] for MANT_W = 10).  Values too small for the
// smallest exponent keep e = EXP_MIN with a denormal mantissa; values too large
// saturate to the largest mantissa at EXP_MAX.  Right shifts truncate towards
// minus infinity.  Rounding, saturation and denormals are this design's
// choices: only the 10-b/5-b word lengths and two's-complement fields are
// taken from the source design.
//
// Complex fixed-point samples travel as a {re, im} pair; widths vary per stage
// and are given by the modules' parameters.
package ss_pkg;

  localparam int MANT_W  = 10;
  localparam int EXP_W   = 5;
  localparam int EXP_MIN = -(2 ** (EXP_W - 1));
  localparam int EXP_MAX = (2 ** (EXP_W - 1)) - 1;

  typedef struct packed {
    logic signed [EXP_W-1:0]  e;
    logic signed [MANT_W-1:0] m;
  } flt_t;

  localparam flt_t FLT_ZERO = '{e: EXP_W'(EXP_MIN), m: '0};

  // Phases of one sensing period.
  typedef enum logic [3:0] {
    ST_IDLE,       // waiting for start
    ST_CAL,        // RF off: noise-power calibration into M2
    ST_COARSE,     // coarse PSD into M1 (adjacent-band interferer power)
    ST_WAIT_INTF,  // host reads the coarse PSD and writes M3
    ST_STA,        // sensing-time adaptation pass over all channels
    ST_STA_DRAIN,
    ST_RESID,      // residual PSD with channel-specific number of averages
    ST_DTA,        // threshold adaptation and decision pass
    ST_DTA_DRAIN,
    ST_DONE
  } ss_state_t;

  // Width of the wide integer the normaliser accepts.
  localparam int NORM_W = 48;

  // Normalise an integer mantissa x (value x * 2^eb) into an flt_t.
  // Leading redundant sign bits are counted (priority encoder), the word is
  // shifted so MANT_W significant bits remain (barrel shifter), and the
  // exponent absorbs the shift.
  function automatic flt_t flt_norm(input logic signed [NORM_W-1:0] x, input int eb);
    flt_t r;
    int   red;   // redundant sign bits
    int   sh;    // right-shift amount (negative: left shift)
    int   e;
    logic signed [NORM_W-1:0] y;
    red = 0;
    for (int i = NORM_W - 2; i >= 0; i--) begin
      if (x[i] == x[NORM_W-1] && red == NORM_W - 2 - i) red++;
    end
    if (x == '0) return FLT_ZERO;
    sh = (NORM_W - red) - MANT_W;
    e  = eb + sh;
    if (e > EXP_MAX) begin
      r.e = EXP_W'(EXP_MAX);
      r.m = x[NORM_W-1] ? MANT_W'(-(2 ** (MANT_W - 1))) : MANT_W'((2 ** (MANT_W - 1)) - 1);
      return r;
    end
    if (e < EXP_MIN) begin
      sh = EXP_MIN - eb;
      e  = EXP_MIN;
    end
    if (sh >= 0) y = x >>> sh;
    else         y = x <<< (-sh);
    r.e = EXP_W'(e);
    r.m = y[MANT_W-1:0];
    return r;
  endfunction

  // a >= b for non-negative values (powers, thresholds).  Normalised values
  // order by exponent first; denormals share EXP_MIN and order by mantissa.
  function automatic logic flt_ge(input flt_t a, input flt_t b);
    if (a.m == '0) return (b.m == '0);
    if (b.m == '0) return 1'b1;
    if (a.e != b.e) return (a.e > b.e);
    return (a.m >= b.m);
  endfunction

  // Multiply by 2^k (exponent adjust only), saturating and flushing like flt_norm.
  function automatic flt_t flt_scale2(input flt_t a, input int k);
    return flt_norm(NORM_W'(a.m), int'(a.e) + k);
  endfunction

  // Constant multiplication by 1/sqrt(2) in canonic-signed-digit form:
  // 181/256 = (128 + 32 + 16 + 4 + 1) / 256 = 0.70703.
  function automatic logic signed [31:0] mul_inv_sqrt2(input logic signed [31:0] v);
    logic signed [39:0] t;
    t = (40'(v) <<< 7) + (40'(v) <<< 5) + (40'(v) <<< 4) + (40'(v) <<< 2) + 40'(v);
    return 32'(t >>> 8);
  endfunction

  // Rotation of (re, im) by W8^k = exp(-j*pi*k/4), k = 0..7.  The trivial
  // cases are swaps and negations; odd k use the 1/sqrt(2) constant multiplier.
  function automatic logic signed [63:0] rot_w8(input logic signed [31:0] re,
                                                 input logic signed [31:0] im,
                                                 input logic [2:0] k);
    logic signed [31:0] r, i, a, b;
    // W8^4 = -1 first, then remaining 0..3
    a = k[2] ? -re : re;
    b = k[2] ? -im : im;
    unique case (k[1:0])
      2'd0: begin r = a; i = b; end
      2'd1: begin r = mul_inv_sqrt2(a + b); i = mul_inv_sqrt2(b - a); end
      2'd2: begin r = b; i = -a; end
      default: begin r = mul_inv_sqrt2(b - a); i = mul_inv_sqrt2(-a - b); end
    endcase
    return {r, i};
  endfunction

  // Saturate a 32-bit value to W bits (returned sign-extended in 32 bits).
  function automatic logic signed [31:0] sat_w(input logic signed [31:0] v, input int w);
    logic signed [31:0] hi, lo;
    hi = (32'sd1 <<< (w - 1)) - 32'sd1;
    lo = -(32'sd1 <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

  // Real value of a float (testbench and assertion use only).
  function automatic real flt_to_real(input flt_t a);
    return real'(a.m) * (2.0 ** real'(a.e));
  endfunction

endpackage
