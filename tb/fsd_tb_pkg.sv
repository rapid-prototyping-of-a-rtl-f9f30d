// fsd_tb_pkg: reference models and channel generation for the decoder
// testbenches.
//
// Two kinds of reference:
//  - a bit-accurate model of the decoder's fixed-point arithmetic, written
//    directly from the equations with 64-bit integers (zfu_ref, fsd_ref), to
//    compare outputs cycle-exact against the RTL;
//  - a floating-point channel model: a random complex Gaussian 4x4 channel,
//    the host-side column ordering (the level detected first takes the signal
//    with the largest noise amplification, every later level the smallest,
//    recomputing the pseudoinverse after each choice), the pseudoinverse and
//    the Cholesky factor, converted to the decoder's coefficient format.
// Quantities use the decoder's scaling: data with FRAC fractional bits,
// coefficients (pseudoinverse, ratios) with CFRAC,
// 16-QAM points on the odd integers per axis.
package fsd_tb_pkg;
  import fsd_pkg::*;

  // ---------------------------------------------------------------- fixed point
  function automatic longint sat16(input longint v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic cplx_t mk(input longint re, input longint im);
    cplx_t c;
    c.re = fx_t'(sat16(re));
    c.im = fx_t'(sat16(im));
    return c;
  endfunction

  function automatic cplx_t cmul_ref(input cplx_t a, input cplx_t b);
    longint ar, ai, br, bi;
    ar = longint'(a.re); ai = longint'(a.im);
    br = longint'(b.re); bi = longint'(b.im);
    return mk((ar*br - ai*bi) >>> CFRAC, (ai*br + ar*bi) >>> CFRAC);
  endfunction

  function automatic cplx_t sub_ref(input cplx_t a, input cplx_t b);
    return mk(longint'(a.re) - longint'(b.re), longint'(a.im) - longint'(b.im));
  endfunction

  function automatic int slice_ref(input fx_t x);
    // nearest odd level (ties upwards): index = clamp(floor(x/2) + L/2)
    longint q;
    q = (longint'(x) >>> (FRAC + 1)) + L / 2;
    if (q < 0) q = 0;
    if (q > L - 1) q = L - 1;
    return int'(q);
  endfunction

  function automatic cplx_t point_ref(input int s);
    return mk(longint'(2*((s >> AB) % L) - (L-1)) <<< FRAC, longint'(2*(s % L) - (L-1)) <<< FRAC);
  endfunction

  // Squared Euclidean distance u2 |q|^2, or with l1 set the Manhattan
  // distance u2 (|re q| + |im q|), where u2 then holds u_ii.
  function automatic longint dist_ref(input cplx_t q, input longint u2, input bit l1 = 0);
    longint sq;
    if (l1) sq = ((q.re < 0) ? -longint'(q.re) : longint'(q.re)) +
                 ((q.im < 0) ? -longint'(q.im) : longint'(q.im));
    else    sq = (longint'(q.re)*longint'(q.re) + longint'(q.im)*longint'(q.im)) >>> FRAC;
    sq = (sq * u2) >>> FRAC;
    return (sq > 64'hffff_ffff) ? 64'hffff_ffff : sq;
  endfunction

  function automatic cvec_t zfu_ref(input cplx_t [M-1:0][M-1:0] h, input cvec_t r);
    cvec_t s;
    for (int i = 0; i < M; i++) begin
      longint re, im;
      re = 0; im = 0;
      for (int j = 0; j < M; j++) begin
        cplx_t p;
        p = cmul_ref(h[i][j], r[j]);
        re += longint'(p.re);
        im += longint'(p.im);
      end
      s[i] = mk(re, im);
    end
    return s;
  endfunction

  // Extend a path given its symbols at levels > lvl; returns the new symbol
  // and updates e and the distance.
  function automatic void level_ref(input int lvl, input cvec_t shat, input coef_t cf,
                                    inout cvec_t e, inout int sym [M], inout longint acc,
                                    input bit l1 = 0);
    int k;
    longint zr, zi;
    cplx_t z, pt;
    k = lvl - 1;
    zr = longint'(shat[k].re);
    zi = longint'(shat[k].im);
    for (int j = k + 1; j < M; j++) begin
      cplx_t p;
      p = cmul_ref(cf.ratio[k][j], e[j]);
      zr -= longint'(p.re);
      zi -= longint'(p.im);
    end
    z = mk(zr, zi);
    sym[k] = L * slice_ref(z.re) + slice_ref(z.im);
    pt = point_ref(sym[k]);
    e[k] = sub_ref(pt, shat[k]);
    acc += dist_ref(sub_ref(pt, z), longint'(cf.uii2[k]), l1);
    if (acc > 64'hffff_ffff) acc = 64'hffff_ffff;
  endfunction

  // Distance of candidate p (top-level point p, nearest points below).
  function automatic longint path_ref(input int p, input cvec_t shat, input coef_t cf,
                                      output int sym [M], input bit l1 = 0);
    cvec_t  e;
    longint acc;
    e = '0;
    sym[M-1] = p;
    e[M-1] = sub_ref(point_ref(p), shat[M-1]);
    acc = dist_ref(e[M-1], longint'(cf.uii2[M-1]), l1);
    for (int lvl = M - 1; lvl >= 1; lvl--) level_ref(lvl, shat, cf, e, sym, acc, l1);
    return acc;
  endfunction

  // Full fixed-sphere decoder: best of the P paths, lowest index on ties.
  function automatic longint fsd_ref(input cvec_t shat, input coef_t cf, output int best [M],
                                     input bit l1 = 0);
    longint bacc;
    bacc = -1;
    for (int p = 0; p < P; p++) begin
      int     sym [M];
      longint acc;
      acc = path_ref(p, shat, cf, sym, l1);
      if (bacc < 0 || acc < bacc) begin
        bacc = acc;
        best = sym;
      end
    end
    return bacc;
  endfunction

  function automatic logic [M*BPS-1:0] bits_ref(input int sym [M]);
    logic [M*BPS-1:0] b;
    // Gray code per axis, a ^ (a >> 1): for 16-QAM 0,1,2,3 -> 00,01,11,10
    for (int i = 0; i < M; i++) begin
      int a, q;
      a = (sym[i] >> AB) % L;
      q = sym[i] % L;
      b[i*BPS +: BPS] = BPS'(L * (a ^ (a >> 1)) + (q ^ (q >> 1)));
    end
    return b;
  endfunction

  // ------------------------------------------------------------ floating point
  localparam real RSCALE = 4.0;   // received vectors are scaled by 1/RSCALE

  function automatic fx_t q1(input real x, inout bit clipped);
    longint n;
    n = longint'($floor(x * real'(1 << CFRAC) + 0.5));
    if (n > 32767 || n < -32768) clipped = 1;
    return fx_t'(sat16(n));
  endfunction

  function automatic cplx_t qc(input real re, input real im, inout bit clipped);
    cplx_t c;
    c.re = q1(re, clipped);
    c.im = q1(im, clipped);
    return c;
  endfunction

  typedef struct { real re; real im; } cr_t;
  typedef cr_t cmat_t [M][M];

  function automatic cr_t cm(input cr_t a, input cr_t b);
    cr_t c; c.re = a.re*b.re - a.im*b.im; c.im = a.re*b.im + a.im*b.re; return c;
  endfunction
  function automatic cr_t cconj(input cr_t a);
    cr_t c; c.re = a.re; c.im = -a.im; return c;
  endfunction
  function automatic cr_t cdiv(input cr_t a, input cr_t b);
    cr_t c; real d;
    d = b.re*b.re + b.im*b.im;
    c.re = (a.re*b.re + a.im*b.im) / d;
    c.im = (a.im*b.re - a.re*b.im) / d;
    return c;
  endfunction

  function automatic real urand01();
    return (real'($urandom) + 1.0) / 4294967297.0;
  endfunction
  function automatic real gauss();
    return $sqrt(-2.0 * $ln(urand01())) * $cos(6.283185307179586 * urand01());
  endfunction

  // Pseudoinverse of the n columns cols[0..n-1] of h: (Hc^H Hc)^-1 Hc^H,
  // returned as n rows of M entries. Gauss-Jordan on the n x n Gram matrix.
  function automatic void pinv(input cmat_t h, input int cols [M], input int n, output cmat_t pi);
    cr_t g [M][2*M];
    for (int a = 0; a < n; a++)
      for (int b = 0; b < n; b++) begin
        cr_t s; s.re = 0; s.im = 0;
        for (int r = 0; r < M; r++) begin
          cr_t t; t = cm(cconj(h[r][cols[a]]), h[r][cols[b]]);
          s.re += t.re; s.im += t.im;
        end
        g[a][b] = s;
        g[a][n+b].re = (a == b) ? 1.0 : 0.0;
        g[a][n+b].im = 0.0;
      end
    for (int c = 0; c < n; c++) begin
      cr_t piv; piv = g[c][c];
      for (int k = 0; k < 2*n; k++) g[c][k] = cdiv(g[c][k], piv);
      for (int r = 0; r < n; r++) if (r != c) begin
        cr_t f; f = g[r][c];
        for (int k = 0; k < 2*n; k++) begin
          cr_t t; t = cm(f, g[c][k]);
          g[r][k].re -= t.re; g[r][k].im -= t.im;
        end
      end
    end
    for (int a = 0; a < n; a++)
      for (int r = 0; r < M; r++) begin
        cr_t s; s.re = 0; s.im = 0;
        for (int b = 0; b < n; b++) begin
          cr_t t; t = cm(g[a][n+b], cconj(h[r][cols[b]]));
          s.re += t.re; s.im += t.im;
        end
        pi[a][r] = s;
      end
  endfunction

  // Channel realisation prepared as the host would: ordered columns, then the
  // coefficient bank. order[i] is the original antenna at level i+1.
  // Returns 1 if any coefficient had to be saturated.
  function automatic bit make_channel(output cmat_t h, output int order [M], output coef_t cf);
    int     rem [M];
    int     nrem;
    cmat_t  ho, pi, u;
    bit     clipped;
    for (int r = 0; r < M; r++)
      for (int c = 0; c < M; c++) begin
        h[r][c].re = gauss() * 0.7071067811865476;
        h[r][c].im = gauss() * 0.7071067811865476;
      end
    // Ordering.
    nrem = M;
    for (int c = 0; c < M; c++) rem[c] = c;
    for (int lvl = M; lvl >= 1; lvl--) begin
      int  pick;
      real best;
      pinv(h, rem, nrem, pi);
      pick = 0;
      for (int a = 0; a < nrem; a++) begin
        real nrm; nrm = 0;
        for (int r = 0; r < M; r++) nrm += pi[a][r].re**2 + pi[a][r].im**2;
        if (a == 0 || (lvl == M ? nrm > best : nrm < best)) begin best = nrm; pick = a; end
      end
      order[lvl-1] = rem[pick];
      for (int a = pick; a < nrem - 1; a++) rem[a] = rem[a+1];
      nrem--;
    end
    for (int r = 0; r < M; r++)
      for (int c = 0; c < M; c++) ho[r][c] = h[r][order[c]];
    // Pseudoinverse of the ordered channel.
    for (int c = 0; c < M; c++) rem[c] = c;
    pinv(ho, rem, M, pi);
    // Cholesky: G = U^H U.
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++) begin u[i][j].re = 0; u[i][j].im = 0; end
    for (int i = 0; i < M; i++) begin
      real d; d = 0;
      for (int r = 0; r < M; r++) d += ho[r][i].re**2 + ho[r][i].im**2;
      for (int k = 0; k < i; k++) d -= u[k][i].re**2 + u[k][i].im**2;
      u[i][i].re = $sqrt(d);
      for (int j = i + 1; j < M; j++) begin
        cr_t s; s.re = 0; s.im = 0;
        for (int r = 0; r < M; r++) begin
          cr_t t; t = cm(cconj(ho[r][i]), ho[r][j]);
          s.re += t.re; s.im += t.im;
        end
        for (int k = 0; k < i; k++) begin
          cr_t t; t = cm(cconj(u[k][i]), u[k][j]);
          s.re -= t.re; s.im -= t.im;
        end
        u[i][j].re = s.re / u[i][i].re;
        u[i][j].im = s.im / u[i][i].re;
      end
    end
    // Fixed point. r is scaled by 1/RSCALE before quantisation, so the
    // pseudoinverse carries RSCALE.
    clipped = 0;
    cf = '0;
    for (int i = 0; i < M; i++) begin
      for (int j = 0; j < M; j++) begin
        cf.hpinv[i][j] = qc(pi[i][j].re * RSCALE, pi[i][j].im * RSCALE, clipped);
        if (j > i)
          cf.ratio[i][j] = qc(u[i][j].re / u[i][i].re, u[i][j].im / u[i][i].re, clipped);
      end
      begin
        real v; v = u[i][i].re**2 * real'(1 << FRAC);
        if (v > 65535.0) begin v = 65535.0; clipped = 1; end
        cf.uii2[i] = ufx_t'(longint'($floor(v + 0.5)));
      end
    end
    return clipped;
  endfunction

  // Coefficients for the Manhattan metric: the u_ii^2 words replaced by u_ii
  // (same format), derived from the squared values.
  function automatic coef_t l1_coef(input coef_t cf);
    coef_t c;
    c = cf;
    for (int i = 0; i < M; i++)
      c.uii2[i] = ufx_t'(longint'($floor($sqrt(real'(cf.uii2[i]) * real'(1 << FRAC)) + 0.5)));
    return c;
  endfunction

  // Received vector for the ordered channel: r = H x / RSCALE + noise,
  // x the 16-QAM points of syms (level order). sigma per real dimension.
  function automatic cvec_t make_rx(input cmat_t h, input int order [M], input int sym [M],
                                    input real sigma);
    cvec_t r;
    for (int row = 0; row < M; row++) begin
      real re, im;
      re = 0; im = 0;
      for (int i = 0; i < M; i++) begin
        cr_t t, x;
        x.re = real'(2*((sym[i] >> AB) % L) - (L-1));
        x.im = real'(2*(sym[i] % L) - (L-1));
        t = cm(h[row][order[i]], x);
        re += t.re; im += t.im;
      end
      re = re / RSCALE + sigma * gauss();
      im = im / RSCALE + sigma * gauss();
      r[row] = mk(longint'($floor(re * real'(1 << FRAC) + 0.5)),
                  longint'($floor(im * real'(1 << FRAC) + 0.5)));
    end
    return r;
  endfunction
endpackage
