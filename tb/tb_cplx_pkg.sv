// tb_cplx_pkg - real-valued complex arithmetic for the testbenches.
//
// Provides conversion between the fixed-point words of mpf_pkg and reals,
// construction of a channel from a chosen set of roots, the exact
// minimum-phase equivalent of such a channel (every root r outside the unit
// circle replaced by 1/conj(r), gain chosen so the magnitude response is
// unchanged), and a Schur-Cohn (reflection coefficient) test that tells
// whether all roots of a sequence lie inside the unit circle. None of it
// uses the design's own arithmetic, so it serves as an independent
// reference.
package tb_cplx_pkg;
  import mpf_pkg::*;

  typedef struct {
    real re;
    real im;
  } rc_t;

  function automatic rc_t rc(real re, real im);
    rc_t r;
    r.re = re;
    r.im = im;
    return r;
  endfunction

  function automatic rc_t r_add(rc_t a, rc_t b);
    return rc(a.re + b.re, a.im + b.im);
  endfunction

  function automatic rc_t r_sub(rc_t a, rc_t b);
    return rc(a.re - b.re, a.im - b.im);
  endfunction

  function automatic rc_t r_mul(rc_t a, rc_t b);
    return rc(a.re * b.re - a.im * b.im, a.re * b.im + a.im * b.re);
  endfunction

  function automatic rc_t r_conj(rc_t a);
    return rc(a.re, -a.im);
  endfunction

  function automatic real r_abs2(rc_t a);
    return a.re * a.re + a.im * a.im;
  endfunction

  function automatic real r_abs(rc_t a);
    return $sqrt(r_abs2(a));
  endfunction

  function automatic rc_t r_div(rc_t a, rc_t b);
    real d;
    d = r_abs2(b);
    return rc((a.re * b.re + a.im * b.im) / d, (a.im * b.re - a.re * b.im) / d);
  endfunction

  function automatic rc_t r_scale(rc_t a, real s);
    return rc(a.re * s, a.im * s);
  endfunction

  function automatic fx_t fx_of(real r);
    return fx_t'(longint'(r * (2.0 ** FW)));
  endfunction

  function automatic real real_of(fx_t v);
    return real'(longint'(v)) / (2.0 ** FW);
  endfunction

  function automatic cplx_t to_cplx(rc_t a);
    return '{re: fx_of(a.re), im: fx_of(a.im)};
  endfunction

  function automatic rc_t from_cplx(cplx_t a);
    return rc(real_of(a.re), real_of(a.im));
  endfunction

  // Coefficients (of z^-h) of K * prod_r (1 - z_r z^-1), r = 0..n-1.
  function automatic void poly_from_roots(input rc_t roots[$], input rc_t k, output rc_t c[$]);
    rc_t nc[$];
    c = {k};
    foreach (roots[r]) begin
      nc = {};
      for (int h = 0; h <= c.size(); h++) begin
        rc_t t;
        t = (h < c.size()) ? c[h] : rc(0.0, 0.0);
        if (h > 0) t = r_sub(t, r_mul(roots[r], c[h-1]));
        nc.push_back(t);
      end
      c = nc;
    end
  endfunction

  // Minimum-phase equivalent: a factor (1 - z_r z^-1) with |z_r| > 1 becomes
  // -z_r (1 - z^-1 / conj(z_r)), which has the same magnitude on |z| = 1.
  function automatic void min_phase_from_roots(input rc_t roots[$], input rc_t k,
                                               output rc_t c[$]);
    rc_t nr[$];
    rc_t kk;
    kk = k;
    foreach (roots[r]) begin
      if (r_abs2(roots[r]) > 1.0) begin
        kk = r_mul(kk, rc(-roots[r].re, -roots[r].im));
        nr.push_back(r_div(rc(1.0, 0.0), r_conj(roots[r])));
      end else begin
        nr.push_back(roots[r]);
      end
    end
    poly_from_roots(nr, kk, c);
  endfunction

  // Schur-Cohn step-down: all roots of c_0 + c_1 z^-1 + ... + c_n z^-n lie
  // strictly inside the unit circle iff every reflection coefficient has
  // magnitude below one.
  function automatic bit is_min_phase(input rc_t c_in[$]);
    rc_t a[$];
    rc_t b[$];
    rc_t k;
    a = c_in;
    while (a.size() > 1 && r_abs2(a[a.size()-1]) == 0.0) void'(a.pop_back());
    if (r_abs2(a[0]) == 0.0) return 1'b0;
    for (int h = a.size() - 1; h >= 0; h--) a[h] = r_div(a[h], a[0]);
    while (a.size() > 1) begin
      int n;
      n = a.size() - 1;
      k = r_div(a[n], a[0]);
      if (r_abs2(k) >= 1.0) return 1'b0;
      b = {};
      for (int h = 0; h < n; h++)
        b.push_back(r_scale(r_sub(a[h], r_mul(k, r_conj(a[n-h]))), 1.0 / (1.0 - r_abs2(k))));
      a = b;
    end
    return 1'b1;
  endfunction

  function automatic real energy(input rc_t c[$]);
    real e;
    e = 0.0;
    foreach (c[h]) e += r_abs2(c[h]);
    return e;
  endfunction

  // |a - b| / |b|
  function automatic real rel_diff(real a, real b);
    return ((a > b) ? a - b : b - a) / ((b > 0.0) ? b : -b);
  endfunction

  // random root with magnitude in [lo, hi] at a random angle
  function automatic rc_t rand_root(real lo, real hi);
    real m, ang;
    m   = lo + (hi - lo) * real'($urandom_range(0, 10000)) / 10000.0;
    ang = 6.283185307179586 * real'($urandom_range(0, 9999)) / 10000.0;
    return rc(m * $cos(ang), m * $sin(ang));
  endfunction

endpackage
