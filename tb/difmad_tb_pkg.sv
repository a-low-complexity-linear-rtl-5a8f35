// difmad_tb_pkg: double-precision reference arithmetic for the detector
// testbenches: conversion to and from the cpf_t pseudo-floating-point
// format, complex arithmetic, a Gauss-Jordan matrix inverse, and the
// textbook linear and iterative MMSE detectors computed with a true
// inverse and true division (independent of the division-free hardware).
package difmad_tb_pkg;
  import difmad_pkg::*;

  localparam int MAXN = 4;

  typedef struct {
    real re;
    real im;
  } cplx_t;

  function automatic cplx_t cx(real re, real im);
    cplx_t c;
    c.re = re;
    c.im = im;
    return c;
  endfunction
  function automatic cplx_t cadd(cplx_t a, cplx_t b); return cx(a.re + b.re, a.im + b.im); endfunction
  function automatic cplx_t csub(cplx_t a, cplx_t b); return cx(a.re - b.re, a.im - b.im); endfunction
  function automatic cplx_t cmul(cplx_t a, cplx_t b);
    return cx(a.re * b.re - a.im * b.im, a.re * b.im + a.im * b.re);
  endfunction
  function automatic cplx_t cconj(cplx_t a); return cx(a.re, -a.im); endfunction
  function automatic real cabs2(cplx_t a); return a.re * a.re + a.im * a.im; endfunction
  function automatic cplx_t cdiv(cplx_t a, cplx_t b);
    real d;
    d = cabs2(b);
    return cx((a.re * b.re + a.im * b.im) / d, (a.im * b.re - a.re * b.im) / d);
  endfunction

  function automatic real pow2(int e);
    real r;
    r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  // nearest cpf_t (value = m * 2^(e - (BM-1)))
  function automatic cpf_t to_cpf(cplx_t v);
    cpf_t x;
    real  mx, sc;
    int   e;
    mx = (v.re < 0 ? -v.re : v.re);
    if ((v.im < 0 ? -v.im : v.im) > mx) mx = (v.im < 0 ? -v.im : v.im);
    if (mx == 0.0) return CPF_ZERO;
    e = 0;
    while (mx >= pow2(e)) e++;
    while (mx < pow2(e - 1)) e--;
    sc = pow2(BM - 1 - e);
    x.re = BM'($rtoi(v.re * sc));
    x.im = BM'($rtoi(v.im * sc));
    x.e  = BE'(e);
    return x;
  endfunction

  function automatic cplx_t from_cpf(cpf_t x);
    real sc;
    sc = pow2(int'(x.e) - (BM - 1));
    return cx($itor(x.re) * sc, $itor(x.im) * sc);
  endfunction

  typedef cplx_t mat_t [MAXN][MAXN];
  typedef cplx_t vec_t [MAXN];

  // inverse of the n x n matrix a (Gauss-Jordan, partial pivoting)
  function automatic mat_t minv(mat_t a, int n);
    cplx_t w [MAXN][2*MAXN];
    mat_t  r;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < 2 * n; j++)
        w[i][j] = (j < n) ? a[i][j] : cx((j - n == i) ? 1.0 : 0.0, 0.0);
    for (int c = 0; c < n; c++) begin
      int   p;
      cplx_t piv, f, tmp;
      p = c;
      for (int i = c + 1; i < n; i++) if (cabs2(w[i][c]) > cabs2(w[p][c])) p = i;
      for (int j = 0; j < 2 * n; j++) begin
        tmp = w[c][j]; w[c][j] = w[p][j]; w[p][j] = tmp;
      end
      piv = w[c][c];
      for (int j = 0; j < 2 * n; j++) w[c][j] = cdiv(w[c][j], piv);
      for (int i = 0; i < n; i++) if (i != c) begin
        f = w[i][c];
        for (int j = 0; j < 2 * n; j++) w[i][j] = csub(w[i][j], cmul(f, w[c][j]));
      end
    end
    for (int i = 0; i < n; i++) for (int j = 0; j < n; j++) r[i][j] = w[i][j + n];
    return r;
  endfunction

  // R = diag(s2) + sum_{j in mask} h_j h_j^H ; h is NR x NT
  function automatic mat_t build_r(mat_t h, real s2 [MAXN], logic [MAXN-1:0] mask, int nr, int nt);
    mat_t r;
    for (int i = 0; i < nr; i++)
      for (int j = 0; j < nr; j++) begin
        r[i][j] = cx((i == j) ? s2[i] : 0.0, 0.0);
        for (int k = 0; k < nt; k++)
          if (mask[k]) r[i][j] = cadd(r[i][j], cmul(h[i][k], cconj(h[j][k])));
      end
    return r;
  endfunction

  // z_i = h_i^H Rinv y, s_i = h_i^H Rinv h_i (real)
  function automatic void est(mat_t h, mat_t rinv, vec_t y, int i, int nr,
                              output cplx_t z, output real s);
    vec_t  w;
    cplx_t sc;
    for (int r = 0; r < nr; r++) begin
      w[r] = cx(0.0, 0.0);
      for (int c = 0; c < nr; c++) w[r] = cadd(w[r], cmul(rinv[r][c], h[c][i]));
    end
    z  = cx(0.0, 0.0);
    sc = cx(0.0, 0.0);
    for (int r = 0; r < nr; r++) begin
      z  = cadd(z, cmul(cconj(w[r]), y[r]));
      sc = cadd(sc, cmul(cconj(h[r][i]), w[r]));
    end
    s = sc.re;
  endfunction

  function automatic int levels(mod_t m);
    case (m)
      MOD_QAM16: return 4;
      MOD_QAM64: return 8;
      default:   return 2;
    endcase
  endfunction

  // nearest odd integer in [-(m-1), m-1] (ties to the lower level)
  function automatic int slice_ref(real v, int m);
    int best;
    best = -(m - 1);
    for (int l = -(m - 1); l <= m - 1; l += 2)
      if (v > real'(l) - 1.0) best = l;
    return best;
  endfunction

endpackage
