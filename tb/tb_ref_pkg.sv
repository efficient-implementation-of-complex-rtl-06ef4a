// tb_ref_pkg: reference arithmetic for the testbenches.
//
// Real-valued complex numbers, a general 4x4 complex matrix inverse by
// Gauss-Jordan elimination with partial pivoting (independent of the
// closed-form inversion used in the design), the Alamouti channel matrix
// built from a1..a8, and conversions from the fixed-point words.
package tb_ref_pkg;

  typedef struct {
    real re;
    real im;
  } cr_t;

  typedef cr_t cmat_t [4][4];

  function automatic cr_t cr(real re, real im);
    cr_t z;
    z.re = re;
    z.im = im;
    return z;
  endfunction

  function automatic cr_t cadd(cr_t x, cr_t y);
    return cr(x.re + y.re, x.im + y.im);
  endfunction

  function automatic cr_t csub(cr_t x, cr_t y);
    return cr(x.re - y.re, x.im - y.im);
  endfunction

  function automatic cr_t cmul(cr_t x, cr_t y);
    return cr(x.re * y.re - x.im * y.im, x.re * y.im + x.im * y.re);
  endfunction

  function automatic cr_t cconj(cr_t x);
    return cr(x.re, -x.im);
  endfunction

  function automatic cr_t cdiv(cr_t x, cr_t y);
    real m;
    m = y.re * y.re + y.im * y.im;
    return cr((x.re * y.re + x.im * y.im) / m, (x.im * y.re - x.re * y.im) / m);
  endfunction

  function automatic real cabs2(cr_t x);
    return x.re * x.re + x.im * x.im;
  endfunction

  // Fixed-point Q(.F) word to real
  function automatic real q2r(longint v, int f);
    return real'(v) / real'(longint'(1) << f);
  endfunction

  // H of the two-user Alamouti channel from a[0..7] = a1..a8
  function automatic cmat_t alamouti_h(cr_t a [8]);
    cmat_t h;
    for (int r = 0; r < 2; r++) begin
      h[2*r][0]   = a[4*r];       h[2*r][1]   = a[4*r+1];
      h[2*r][2]   = a[4*r+2];     h[2*r][3]   = a[4*r+3];
      h[2*r+1][0] = cr(-a[4*r+1].re, a[4*r+1].im);   // -a2*
      h[2*r+1][1] = cconj(a[4*r]);                    //  a1*
      h[2*r+1][2] = cr(-a[4*r+3].re, a[4*r+3].im);   // -a4*
      h[2*r+1][3] = cconj(a[4*r+2]);                  //  a3*
    end
    return h;
  endfunction

  function automatic cmat_t herm(cmat_t x);
    cmat_t y;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        y[i][j] = cconj(x[j][i]);
    return y;
  endfunction

  function automatic cmat_t matmul(cmat_t x, cmat_t y);
    cmat_t z;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        z[i][j] = cr(0.0, 0.0);
        for (int k = 0; k < 4; k++) z[i][j] = cadd(z[i][j], cmul(x[i][k], y[k][j]));
      end
    return z;
  endfunction

  // Gauss-Jordan inverse with partial pivoting
  function automatic cmat_t inv4(cmat_t x);
    cr_t m [4][8];
    cr_t t, f;
    cmat_t y;
    int piv;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 8; j++)
        m[i][j] = (j < 4) ? x[i][j] : cr((j - 4 == i) ? 1.0 : 0.0, 0.0);
    for (int c = 0; c < 4; c++) begin
      piv = c;
      for (int r = c + 1; r < 4; r++)
        if (cabs2(m[r][c]) > cabs2(m[piv][c])) piv = r;
      for (int j = 0; j < 8; j++) begin
        t = m[c][j]; m[c][j] = m[piv][j]; m[piv][j] = t;
      end
      f = m[c][c];
      for (int j = 0; j < 8; j++) m[c][j] = cdiv(m[c][j], f);
      for (int r = 0; r < 4; r++) begin
        if (r != c) begin
          f = m[r][c];
          for (int j = 0; j < 8; j++) m[r][j] = csub(m[r][j], cmul(f, m[c][j]));
        end
      end
    end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        y[i][j] = m[i][j+4];
    return y;
  endfunction

endpackage
