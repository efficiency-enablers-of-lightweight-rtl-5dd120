// tb_fp_pkg: testbench helpers for the napCore floating-point format.
// Conversion between `real` and the s1m12e6 word (truncating, like the
// hardware), complex helpers and a relative-error comparison used as the
// independent reference model in the testbenches.
package tb_fp_pkg;
  import napcore_pkg::*;

  function automatic real pow2(input int e);
    real r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real fp2r(input fp_t f);
    real m;
    if (f.exp == '0) return 0.0;
    m = 1.0 + real'(f.man) / real'(1 << MW);
    m = m * pow2(int'(f.exp) - int'(BIAS));
    return f.sgn ? -m : m;
  endfunction

  function automatic fp_t r2fp(input real r);
    fp_t  f;
    real  a;
    int   e;
    f = FP_ZERO;
    if (r == 0.0) return f;
    a = (r < 0.0) ? -r : r;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    if (e + int'(BIAS) <= 0) return f;
    if (e + int'(BIAS) > (1 << EW) - 1) begin
      f.exp = '1; f.man = '1; f.sgn = (r < 0.0); return f;
    end
    f.sgn = (r < 0.0);
    f.exp = EW'(e + int'(BIAS));
    f.man = MW'(longint'((a - 1.0) * real'(1 << MW)));
    return f;
  endfunction

  function automatic cplx_t c2fp(input real re, input real im);
    cplx_t c;
    c.re = r2fp(re);
    c.im = r2fp(im);
    return c;
  endfunction

  // random real with magnitude in [0.25, 4) and random sign
  function automatic real rnd();
    real v;
    v = (1.0 + real'($urandom_range(0, 4095)) / 4096.0) * pow2(int'($urandom_range(0, 3)) - 2);
    return ($urandom_range(0, 1) != 0) ? -v : v;
  endfunction

  // |got - exp| <= tol * scale, scale = max(|exp|, floor)
  function automatic bit near(input real got, input real expv, input real tol, input real floor_v);
    real d, s;
    d = got - expv; if (d < 0.0) d = -d;
    s = (expv < 0.0) ? -expv : expv;
    if (s < floor_v) s = floor_v;
    return d <= tol * s;
  endfunction
endpackage
