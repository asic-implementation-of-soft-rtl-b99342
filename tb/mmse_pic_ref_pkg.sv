// mmse_pic_ref_pkg: floating-point reference model of the detector, used by
// the testbenches only.
//
// Every step is computed in double precision straight from its definition,
// independently of the hardware's shortcuts:
//  - soft symbols and variances by enumerating all constellation points with
//    their a-priori probabilities P[x = 1] = (1 + tanh(L/2)) / 2,
//  - the matrix inverse by Gauss-Jordan elimination with row pivoting,
//  - the max-log LLRs by a search over the whole 2-D constellation.
// It also generates random test vectors: channel, symbols, received vector,
// a-priori LLRs, all quantised to the detector's input formats.
package mmse_pic_ref_pkg;
  import mmse_pic_pkg::*;

  typedef struct { real re; real im; } rcx;
  typedef rcx  rcvec [MT];
  typedef rcx  rcmat [MT][MT];
  typedef real rrvec [MT];

  function automatic rcx mk(input real a, input real b);
    rcx r; r.re = a; r.im = b; return r;
  endfunction
  function automatic rcx radd(input rcx a, input rcx b);
    return mk(a.re + b.re, a.im + b.im);
  endfunction
  function automatic rcx rsub(input rcx a, input rcx b);
    return mk(a.re - b.re, a.im - b.im);
  endfunction
  function automatic rcx rmul(input rcx a, input rcx b);
    return mk(a.re * b.re - a.im * b.im, a.re * b.im + a.im * b.re);
  endfunction
  function automatic rcx rconj(input rcx a);
    return mk(a.re, -a.im);
  endfunction
  function automatic real rabs2(input rcx a);
    return a.re * a.re + a.im * a.im;
  endfunction
  function automatic rcx rdiv(input rcx a, input rcx b);
    real d;
    d = rabs2(b);
    return mk((a.re * b.re + a.im * b.im) / d, (a.im * b.re - a.re * b.im) / d);
  endfunction

  function automatic real fx2r(input fx_t v);
    return real'(v) / real'(1 << F);
  endfunction
  function automatic rcx cfx2r(input cfx_t v);
    return mk(fx2r(v.re), fx2r(v.im));
  endfunction
  function automatic fx_t r2fx(input real v);
    real s;
    s = v * real'(1 << F);
    if (s > 134217727.0) s = 134217727.0;
    if (s < -134217728.0) s = -134217728.0;
    return fx_t'($rtoi(s < 0 ? s - 0.5 : s + 0.5));
  endfunction
  function automatic cfx_t r2cfx(input rcx v);
    cfx_t r; r.re = r2fx(v.re); r.im = r2fx(v.im); return r;
  endfunction

  function automatic real urand(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 1000000)) / 1000000.0;
  endfunction

  // Gaussian sample (Box-Muller)
  function automatic real grand();
    real u1, u2;
    u1 = urand(1.0e-6, 1.0);
    u2 = urand(0.0, 1.0);
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  function automatic real tanh_r(input real x);
    real e2;
    e2 = $exp(2.0 * x);
    return (e2 - 1.0) / (e2 + 1.0);
  endfunction

  function automatic int nbits(input mod_e m);
    return bits_per_sym(m);
  endfunction

  function automatic real kmod_r(input mod_e m);
    case (m)
      MOD_BPSK:  return 1.0;
      MOD_QPSK:  return 1.0 / $sqrt(2.0);
      MOD_QAM16: return 1.0 / $sqrt(10.0);
      default:   return 1.0 / $sqrt(42.0);
    endcase
  endfunction

  // constellation point of symbol index sym (bits, first bit = MSB of the
  // in-phase label) following the 802.11n Gray mapping
  function automatic rcx point(input mod_e m, input int sym);
    int md, nbi, li, lq, ki, kq;
    real ai, aq;
    md = bits_per_dim(m);
    if (m == MOD_BPSK) return mk(sym[0] ? 1.0 : -1.0, 0.0);
    li = (sym >> md) & ((1 << md) - 1);
    lq = sym & ((1 << md) - 1);
    // inverse Gray: label -> index k
    ki = li; kq = lq;
    for (int s = 1; s < 4; s++) begin ki = ki ^ (li >> s); kq = kq ^ (lq >> s); end
    nbi = (1 << md) - 1;
    ai = real'(2 * ki - nbi);
    aq = real'(2 * kq - nbi);
    return mk(ai * kmod_r(m), aq * kmod_r(m));
  endfunction

  // bit b (0 = first) of symbol index sym in a mode with q bits
  function automatic int symbit(input int q, input int sym, input int b);
    return (sym >> (q - 1 - b)) & 1;
  endfunction

  // ---- reference steps ----
  function automatic void ref_gram(input det_in_t d, output rcmat g, output rcvec ymf);
    rcx h [MR][MT];
    rcx y [MR];
    for (int k = 0; k < MR; k++) begin
      for (int c = 0; c < MT; c++)
        h[k][c] = mk(real'(d.h[k][c].re) / 2048.0, real'(d.h[k][c].im) / 2048.0);
      y[k] = mk(real'(d.y[k].re) / 2048.0, real'(d.y[k].im) / 2048.0);
    end
    for (int r = 0; r < MT; r++) begin
      for (int c = 0; c < MT; c++) begin
        g[r][c] = mk(0.0, 0.0);
        for (int k = 0; k < MR; k++) g[r][c] = radd(g[r][c], rmul(rconj(h[k][r]), h[k][c]));
      end
      ymf[r] = mk(0.0, 0.0);
      for (int k = 0; k < MR; k++) ymf[r] = radd(ymf[r], rmul(rconj(h[k][r]), y[k]));
    end
  endfunction

  function automatic void ref_soft(input la_arr_t la, input mod_e m,
                                   output rcvec shat, output rrvec e);
    int q;
    real p, pb, m2;
    rcx s, a;
    q = nbits(m);
    for (int i = 0; i < MT; i++) begin
      s  = mk(0.0, 0.0);
      m2 = 0.0;
      for (int sym = 0; sym < (1 << q); sym++) begin
        p = 1.0;
        for (int b = 0; b < q; b++) begin
          pb = 0.5 * (1.0 + tanh_r(0.5 * real'(la[i][b]) / 2.0));
          p  = p * (symbit(q, sym, b) ? pb : 1.0 - pb);
        end
        a  = point(m, sym);
        s  = radd(s, mk(p * a.re, p * a.im));
        m2 = m2 + p * rabs2(a);
      end
      shat[i] = s;
      e[i]    = m2 - rabs2(s);
    end
  endfunction

  function automatic void ref_amat(input rcmat g, input rrvec e, input real n0, output rcmat a);
    for (int r = 0; r < MT; r++)
      for (int c = 0; c < MT; c++) begin
        a[r][c] = mk(g[r][c].re * e[c], g[r][c].im * e[c]);
        if (r == c) a[r][c].re = a[r][c].re + n0;
      end
  endfunction

  function automatic void ref_inv(input rcmat a, output rcmat x);
    rcx m [MT][2*MT];
    rcx f, pv, t;
    int p;
    for (int r = 0; r < MT; r++)
      for (int c = 0; c < 2 * MT; c++)
        m[r][c] = (c < MT) ? a[r][c] : mk((c - MT == r) ? 1.0 : 0.0, 0.0);
    for (int k = 0; k < MT; k++) begin
      p = k;
      for (int r = k + 1; r < MT; r++) if (rabs2(m[r][k]) > rabs2(m[p][k])) p = r;
      for (int c = 0; c < 2 * MT; c++) begin t = m[k][c]; m[k][c] = m[p][c]; m[p][c] = t; end
      pv = m[k][k];
      for (int c = 0; c < 2 * MT; c++) m[k][c] = rdiv(m[k][c], pv);
      for (int r = 0; r < MT; r++)
        if (r != k) begin
          f = m[r][k];
          for (int c = 0; c < 2 * MT; c++) m[r][c] = rsub(m[r][c], rmul(f, m[k][c]));
        end
    end
    for (int r = 0; r < MT; r++)
      for (int c = 0; c < MT; c++) x[r][c] = m[r][c + MT];
  endfunction

  function automatic void ref_pic(input rcvec ymf, input rcmat g, input rcvec shat,
                                  output rcmat yhat);
    for (int i = 0; i < MT; i++)
      for (int r = 0; r < MT; r++) begin
        yhat[i][r] = ymf[r];
        for (int j = 0; j < MT; j++)
          if (j != i) yhat[i][r] = rsub(yhat[i][r], rmul(g[r][j], shat[j]));
      end
  endfunction

  function automatic void ref_mmse(input rcmat ainv, input rcmat g, input rcmat yhat,
                                   input rrvec e, output rcvec z, output rrvec rho);
    rcx mu, u;
    for (int i = 0; i < MT; i++) begin
      mu = mk(0.0, 0.0);
      u  = mk(0.0, 0.0);
      for (int k = 0; k < MT; k++) begin
        mu = radd(mu, rmul(ainv[i][k], g[k][i]));
        u  = radd(u, rmul(ainv[i][k], yhat[i][k]));
      end
      z[i]   = mk(u.re / mu.re, u.im / mu.re);
      rho[i] = mu.re / (1.0 - e[i] * mu.re);
    end
  endfunction

  // max-log extrinsic LLR without prior, exhaustive search
  function automatic real ref_llr(input rcx z, input real rho, input mod_e m, input int b);
    int q;
    real d, d0, d1;
    q = nbits(m);
    d0 = 1.0e30; d1 = 1.0e30;
    for (int sym = 0; sym < (1 << q); sym++) begin
      d = rabs2(rsub(z, point(m, sym)));
      if (symbit(q, sym, b) == 1) begin if (d < d1) d1 = d; end
      else begin if (d < d0) d0 = d; end
    end
    return rho * (d0 - d1);
  endfunction

  // LLR in units of the 0.5 LSB, rounded and saturated to 6 bits
  function automatic int quant_llr(input real l);
    real s;
    int  q;
    s = 2.0 * l;
    if (s > 40.0) s = 40.0;
    if (s < -40.0) s = -40.0;
    q = $rtoi(s + 100.5) - 100;
    if (q > 31) q = 31;
    if (q < -32) q = -32;
    return q;
  endfunction

  // ---- random stimulus ----
  // sym: transmitted symbol indices; h scaled so entries stay inside Q2.11
  function automatic void gen_vector(input mod_e m, input real n0, input int prior,
                                     output det_in_t d, output int sym [MT]);
    rcx h [MR][MT];
    rcx y;
    int q, bit_v, l;
    real sg;
    q = nbits(m);
    sg = $sqrt(n0 / 2.0);
    for (int k = 0; k < MR; k++)
      for (int c = 0; c < MT; c++) begin
        h[k][c] = mk(0.7 * grand(), 0.7 * grand());
        if (h[k][c].re > 1.9) h[k][c].re = 1.9;
        if (h[k][c].re < -1.9) h[k][c].re = -1.9;
        if (h[k][c].im > 1.9) h[k][c].im = 1.9;
        if (h[k][c].im < -1.9) h[k][c].im = -1.9;
        d.h[k][c].re = hw_t'($rtoi(h[k][c].re * 2048.0));
        d.h[k][c].im = hw_t'($rtoi(h[k][c].im * 2048.0));
        h[k][c] = mk(real'(d.h[k][c].re) / 2048.0, real'(d.h[k][c].im) / 2048.0);
      end
    for (int c = 0; c < MT; c++) sym[c] = $urandom_range(0, (1 << q) - 1);
    for (int k = 0; k < MR; k++) begin
      y = mk(sg * grand(), sg * grand());
      for (int c = 0; c < MT; c++) y = radd(y, rmul(h[k][c], point(m, sym[c])));
      if (y.re > 15.9) y.re = 15.9;
      if (y.re < -15.9) y.re = -15.9;
      if (y.im > 15.9) y.im = 15.9;
      if (y.im < -15.9) y.im = -15.9;
      d.y[k].re = yw_t'($rtoi(y.re * 2048.0));
      d.y[k].im = yw_t'($rtoi(y.im * 2048.0));
    end
    // a-priori LLRs: zero (first iteration) or partly reliable, sign mostly right
    for (int c = 0; c < MT; c++)
      for (int b = 0; b < QMAX; b++) begin
        l = 0;
        if (prior != 0 && b < q) begin
          bit_v = symbit(q, sym[c], b);
          l = $urandom_range(0, 15);
          if ($urandom_range(0, 9) == 0) l = -l;
          if (bit_v == 0) l = -l;
        end
        d.la[c][b] = la_t'(l);
      end
    d.n0   = N0W'($rtoi(n0 * 65536.0));
    d.mode = m;
  endfunction

endpackage
