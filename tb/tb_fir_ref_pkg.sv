// tb_fir_ref_pkg: golden model for the FIR core testbenches.
//
// Computes the filter output straight from the direct-form equation Y_j = sum_k c_k X_{j-k}
// over the base Q15 coefficients, independently of the DECOR coefficient differences and
// output recursion, and then applies the core's output scaling: accumulator bits 30..14
// (modulo 2^32) rounded to nearest, ties up, saturating at +32767.
package tb_fir_ref_pkg;

  // Round a 17-bit value to 16 bits as the core's ROUND stage is specified to.
  function automatic int round17(input int r);
    int t;
    t = r + 1;
    t = (t >= 0) ? t / 2 : -((-t + 1) / 2);   // floor((r+1)/2)
    if (t > 32767) t = 32767;
    return t;
  endfunction

  // Scale a full-precision direct-form sum to the 16-bit output.
  function automatic int scale_out(input longint s);
    logic [31:0]        w;
    logic signed [16:0] r;
    w = s[31:0];
    r = signed'(w[30:14]);
    return round17(int'(r));
  endfunction

  // xs[0] is the newest sample, xs[k] = X_{j-k}.
  function automatic int direct_form(input int xs[fir_pkg::NTAPS]);
    longint s;
    s = 0;
    for (int k = 0; k < fir_pkg::NTAPS; k++) s += longint'(fir_pkg::BASE_COEF[k]) * xs[k];
    return scale_out(s);
  endfunction

  // 1 when the bit dropped by ROUND is set (the output was rounded up).
  function automatic bit rounds_up(input int xs[fir_pkg::NTAPS]);
    longint s;
    logic [31:0] w;
    s = 0;
    for (int k = 0; k < fir_pkg::NTAPS; k++) s += longint'(fir_pkg::BASE_COEF[k]) * xs[k];
    w = s[31:0];
    return w[14];
  endfunction

endpackage
