// mmse_tb_pkg: floating-point reference models for the detector testbenches.
//
// Complex 2x2 and 4x4 arithmetic in double precision (products, Hermitian
// transpose, inversion by Gauss-Jordan elimination) and the MMSE filter
// G = (A A^H + sigma^2 I)^-1 A computed directly on the 4x4 matrix, without
// the block decomposition the hardware uses. Also conversions between the
// fixed-point types of mmse_pkg and reals, and random stimulus.
package mmse_tb_pkg;
  import mmse_pkg::*;

  typedef struct { real re; real im; } rc_t;
  typedef rc_t rm2_t [2][2];
  typedef rc_t rm4_t [4][4];

  localparam real LSB = 1.0 / (2.0 ** FRAC);

  function automatic real fx2r(input fx_t v);
    return real'(v) * LSB;
  endfunction

  function automatic fx_t r2fx(input real v);
    return fx_t'($rtoi(v * (2.0 ** FRAC) + (v >= 0 ? 0.5 : -0.5)));
  endfunction

  function automatic rc_t c2r(input cplx_t c);
    rc_t r;
    r.re = fx2r(c.re);
    r.im = fx2r(c.im);
    return r;
  endfunction

  function automatic cplx_t r2c(input rc_t c);
    cplx_t r;
    r.re = r2fx(c.re);
    r.im = r2fx(c.im);
    return r;
  endfunction

  function automatic rm2_t m2r(input mat2_t m);
    rm2_t r;
    r[0][0] = c2r(m.m11); r[0][1] = c2r(m.m12);
    r[1][0] = c2r(m.m21); r[1][1] = c2r(m.m22);
    return r;
  endfunction

  function automatic mat2_t r2m(input rm2_t r);
    mat2_t m;
    m.m11 = r2c(r[0][0]); m.m12 = r2c(r[0][1]);
    m.m21 = r2c(r[1][0]); m.m22 = r2c(r[1][1]);
    return m;
  endfunction

  function automatic rm4_t m4r(input mat4_t m);
    rm4_t r;
    rm2_t b [2][2];
    b[0][0] = m2r(m.b11); b[0][1] = m2r(m.b12);
    b[1][0] = m2r(m.b21); b[1][1] = m2r(m.b22);
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        r[i][j] = b[i/2][j/2][i%2][j%2];
    return r;
  endfunction

  function automatic rc_t cm(input rc_t a, input rc_t b);
    rc_t r;
    r.re = a.re * b.re - a.im * b.im;
    r.im = a.re * b.im + a.im * b.re;
    return r;
  endfunction

  function automatic rc_t cdiv(input rc_t a, input rc_t b);
    rc_t r;
    real d;
    d = b.re * b.re + b.im * b.im;
    r.re = (a.re * b.re + a.im * b.im) / d;
    r.im = (a.im * b.re - a.re * b.im) / d;
    return r;
  endfunction

  function automatic rm2_t mul2(input rm2_t a, input rm2_t b);
    rm2_t r;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        r[i][j].re = 0.0; r[i][j].im = 0.0;
        for (int k = 0; k < 2; k++) begin
          rc_t p;
          p = cm(a[i][k], b[k][j]);
          r[i][j].re += p.re; r[i][j].im += p.im;
        end
      end
    return r;
  endfunction

  function automatic rm2_t herm2(input rm2_t a);
    rm2_t r;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        r[i][j].re = a[j][i].re;
        r[i][j].im = -a[j][i].im;
      end
    return r;
  endfunction

  function automatic rm2_t inv2(input rm2_t a);
    rm2_t r;
    rc_t det, one;
    det = cm(a[0][0], a[1][1]);
    begin
      rc_t q;
      q = cm(a[0][1], a[1][0]);
      det.re -= q.re; det.im -= q.im;
    end
    one.re = 1.0; one.im = 0.0;
    det = cdiv(one, det);
    r[0][0] = cm(a[1][1], det);
    r[1][1] = cm(a[0][0], det);
    r[0][1] = cm(a[0][1], det); r[0][1].re = -r[0][1].re; r[0][1].im = -r[0][1].im;
    r[1][0] = cm(a[1][0], det); r[1][0].re = -r[1][0].re; r[1][0].im = -r[1][0].im;
    return r;
  endfunction

  // G = (A A^H + s2 I)^-1 A, by Gauss-Jordan elimination on [B | A]
  function automatic rm4_t mmse_ref(input rm4_t a, input real s2);
    rc_t aug [4][8];
    rm4_t g;
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        aug[i][j].re = (i == j) ? s2 : 0.0;
        aug[i][j].im = 0.0;
        for (int k = 0; k < 4; k++) begin
          rc_t ah, p;
          ah.re = a[j][k].re; ah.im = -a[j][k].im;
          p = cm(a[i][k], ah);
          aug[i][j].re += p.re; aug[i][j].im += p.im;
        end
        aug[i][4+j] = a[i][j];
      end
    end
    for (int c = 0; c < 4; c++) begin
      rc_t piv;
      piv = aug[c][c];
      for (int j = 0; j < 8; j++) aug[c][j] = cdiv(aug[c][j], piv);
      for (int i = 0; i < 4; i++)
        if (i != c) begin
          rc_t f;
          f = aug[i][c];
          for (int j = 0; j < 8; j++) begin
            rc_t p;
            p = cm(f, aug[c][j]);
            aug[i][j].re -= p.re; aug[i][j].im -= p.im;
          end
        end
    end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) g[i][j] = aug[i][4+j];
    return g;
  endfunction

  // uniform random value in [-amp, amp] on the fixed-point grid
  function automatic fx_t rnd_fx(input real amp);
    real u;
    u = (real'($urandom_range(0, 1 << 20)) / real'(1 << 20)) * 2.0 - 1.0;
    return r2fx(u * amp);
  endfunction

  function automatic mat2_t rnd_m2(input real amp);
    mat2_t m;
    m.m11.re = rnd_fx(amp); m.m11.im = rnd_fx(amp);
    m.m12.re = rnd_fx(amp); m.m12.im = rnd_fx(amp);
    m.m21.re = rnd_fx(amp); m.m21.im = rnd_fx(amp);
    m.m22.re = rnd_fx(amp); m.m22.im = rnd_fx(amp);
    return m;
  endfunction

  function automatic mat4_t rnd_m4(input real amp);
    mat4_t m;
    m.b11 = rnd_m2(amp); m.b12 = rnd_m2(amp);
    m.b21 = rnd_m2(amp); m.b22 = rnd_m2(amp);
    return m;
  endfunction

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // largest absolute component difference
  function automatic real err2(input mat2_t m, input rm2_t r);
    rm2_t q;
    real e;
    q = m2r(m);
    e = 0.0;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        if (rabs(q[i][j].re - r[i][j].re) > e) e = rabs(q[i][j].re - r[i][j].re);
        if (rabs(q[i][j].im - r[i][j].im) > e) e = rabs(q[i][j].im - r[i][j].im);
      end
    return e;
  endfunction

  function automatic rm2_t blk(input rm4_t r, input int bi, input int bj);
    rm2_t q;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) q[i][j] = r[2*bi+i][2*bj+j];
    return q;
  endfunction
endpackage
