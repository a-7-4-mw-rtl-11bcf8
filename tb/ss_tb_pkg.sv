// ss_tb_pkg: reference models shared by the testbenches.  They are written
// independently of the RTL (loops of single-bit shifts instead of a priority
// encoder and barrel shifter; real arithmetic for transforms).
package ss_tb_pkg;
  import ss_pkg::*;

  // Reference normalisation of v * 2^eb into the floating-point format.
  function automatic flt_t ref_norm(input longint v, input int eb);
    flt_t r;
    longint m = v;
    int e = eb;
    if (v == 0) return FLT_ZERO;
    while (m >= 512 || m < -512) begin m = m >>> 1; e++; end
    while (m >= -256 && m <= 255 && e > EXP_MIN) begin m = m * 2; e--; end
    while (e < EXP_MIN) begin m = m >>> 1; e++; end
    if (e > EXP_MAX) begin
      r.e = 5'(EXP_MAX);
      r.m = (v < 0) ? -10'sd512 : 10'sd511;
      return r;
    end
    r.e = 5'(e);
    r.m = 10'(m);
    return r;
  endfunction

  function automatic flt_t ref_add(input flt_t a, input flt_t b);
    longint ma = a.m, mb = b.m;
    int ea = a.e, eb = b.e;
    if (ea >= eb) begin
      if (ea - eb > 11) mb = (mb < 0) ? -1 : 0; else mb = mb >>> (ea - eb);
      return ref_norm(ma + mb, ea);
    end else begin
      if (eb - ea > 11) ma = (ma < 0) ? -1 : 0; else ma = ma >>> (eb - ea);
      return ref_norm(ma + mb, eb);
    end
  endfunction

  function automatic flt_t ref_mul(input flt_t a, input flt_t b);
    return ref_norm(longint'(a.m) * longint'(b.m), int'(a.e) + int'(b.e));
  endfunction

  // random normalised positive float with exponent in [elo, ehi]
  function automatic flt_t rand_pos(input int elo, input int ehi);
    flt_t r;
    r.m = 10'(256 + ($urandom % 256));
    r.e = 5'(elo + int'($urandom % unsigned'(ehi - elo + 1)));
    return r;
  endfunction

  function automatic flt_t rand_any();
    flt_t r;
    r = rand_pos(-16, 15);
    if ($urandom % 2) r.m = -r.m;
    if ($urandom % 8 == 0) r.m = 10'($urandom);   // occasionally denormal/odd
    return r;
  endfunction
endpackage
