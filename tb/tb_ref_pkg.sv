// tb_ref_pkg: reference arithmetic for the testbenches.
//
// Single-precision results are obtained by computing in double precision
// (the SystemVerilog real type) and rounding the double once to single,
// to nearest even, with results below the smallest normal flushed to zero.
// For +, -, *, / and square root this equals the correctly rounded single
// result, because a double carries more than twice the single precision
// plus two bits. The FIR model and the default coefficient formula are
// written here again from the filter's description, independently of the
// RTL.
package tb_ref_pkg;

  function automatic logic [31:0] r2f(real r);
    logic [63:0] b;
    logic        s;
    int          e;
    logic [52:0] m;
    logic [24:0] q;
    logic        g, rest;
    if (r == 0.0) return 32'd0;
    b = $realtobits(r);
    s = b[63];
    e = int'(b[62:52]) - 1023 + 127;
    m = {1'b1, b[51:0]};
    q = {1'b0, m[52:29]};
    g = m[28];
    rest = |m[27:0];
    if (g && (rest || q[0])) q = q + 25'd1;
    if (q[24]) begin q = q >> 1; e = e + 1; end
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0)   return {s, 31'd0};
    return {s, 8'(e), q[22:0]};
  endfunction

  function automatic real f2r(logic [31:0] f);
    if (f[30:23] == 8'd0) return 0.0;
    return $bitstoreal({f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0});
  endfunction

  function automatic logic [31:0] f_add(logic [31:0] a, logic [31:0] b); return r2f(f2r(a) + f2r(b)); endfunction
  function automatic logic [31:0] f_sub(logic [31:0] a, logic [31:0] b); return r2f(f2r(a) - f2r(b)); endfunction
  function automatic logic [31:0] f_mul(logic [31:0] a, logic [31:0] b); return r2f(f2r(a) * f2r(b)); endfunction
  function automatic logic [31:0] f_div(logic [31:0] a, logic [31:0] b); return r2f(f2r(a) / f2r(b)); endfunction
  function automatic logic [31:0] f_sqrt(logic [31:0] a);                return r2f($sqrt(f2r(a)));      endfunction

  // x, y and SUM exactly as the x/y unit orders its operations
  function automatic void xy_ref(input logic [31:0] va, vb, vc, vd, kx, ky, xo, yo,
                                 output logic [31:0] x, y, sum);
    logic [31:0] ad, bc, ab, cd;
    ad = f_add(va, vd); bc = f_add(vb, vc); ab = f_add(va, vb); cd = f_add(vc, vd);
    sum = f_add(ad, bc);
    x = f_add(f_mul(f_div(f_sub(ad, bc), sum), kx), xo);
    y = f_add(f_mul(f_div(f_sub(ab, cd), sum), ky), yo);
  endfunction

  // a random normal float with exponent in [emin, emax] (unbiased)
  function automatic logic [31:0] rand_f(int emin, int emax, bit allow_neg);
    int e;
    e = emin + int'($urandom_range(0, emax - emin));
    return {allow_neg ? 1'($urandom) : 1'b0, 8'(e + 127), 23'($urandom)};
  endfunction

  // default DC-blocking coefficients of the FIR, Q1.15
  function automatic int fir_default(int ntaps, int k);
    int c;
    c = (32768 + ntaps / 2) / ntaps;
    return (k == (ntaps - 1) / 2) ? (ntaps - 1) * c : -c;
  endfunction

  // one FIR output: round(sum h[k] x[n-k] / 2^15), saturated to 16 bits;
  // hist[0] is the newest sample
  function automatic int fir_out(int ntaps, const ref int h[], const ref int hist[]);
    longint acc;
    longint r;
    acc = 0;
    for (int k = 0; k < ntaps; k++) acc += longint'(h[k]) * longint'(hist[k]);
    r = (acc + 16384) >>> 15;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  // 47-bit (or narrower) unsigned to float: exact in double, then rounded
  function automatic logic [31:0] u2f(longint unsigned u);
    return r2f(real'(u));
  endfunction

endpackage
