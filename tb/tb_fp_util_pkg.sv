// Reference arithmetic for the testbenches: the values of BSD floating-point
// numbers, redundant products and IEEE-754 single bit patterns as reals
// (double precision), worked out independently of the design.
package tb_fp_util_pkg;
  import bsd_fp_pkg::*;

  function automatic real pow2(input int e);
    real r;
    r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real bsd_real(input bsdfp_t b);
    longint v;
    v = longint'(b.pos) - longint'(b.neg);
    return real'(v) * pow2(int'(b.exp) - int'(SIG_F));
  endfunction

  function automatic real prod_real(input bsdprod_t p);
    longint v;
    v = longint'(p.pos) - longint'(p.neg);
    return real'(v) * pow2(int'(p.exp) - int'(PROD_F));
  endfunction

  function automatic real fp32_real(input fp32_t f);
    real r;
    if (f[30:23] == 8'd0) return 0.0;
    r = real'({1'b1, f[22:0]}) * pow2(int'(f[30:23]) - 127 - 23);
    return f[31] ? -r : r;
  endfunction

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // random BSD floating-point number with a normalized-looking significand
  function automatic bsdfp_t rand_bsd(input int emin, input int emax);
    bsdfp_t b;
    b.pos = SIG_D'($urandom);
    b.neg = SIG_D'($urandom);
    b.exp = EXP_W'($urandom_range(emax - emin) + emin);
    return b;
  endfunction
endpackage
