// tb_bref_pkg: exact integer reference for the entries of
// B = H^H H + sigma^2 I of the Alamouti channel, with a[0..7] = a1..a8 as
// Q8.12 integers and b1..b4 as Q16.24 integers. b1..b4 are formed here as
// inner products of the columns of H, not from the closed-form sums used
// by the design.
package tb_bref_pkg;

  typedef struct {
    longint re;
    longint im;
  } ci_t;

  function automatic ci_t ci(longint re, longint im);
    ci_t z;
    z.re = re;
    z.im = im;
    return z;
  endfunction

  function automatic ci_t imul(ci_t x, ci_t y);
    return ci(x.re * y.re - x.im * y.im, x.re * y.im + x.im * y.re);
  endfunction

  function automatic ci_t iconj(ci_t x);
    return ci(x.re, -x.im);
  endfunction

  // H[r][k] of the Alamouti channel
  function automatic ci_t hel(ci_t a [8], int r, int k);
    int  g;
    ci_t x;
    g = (r / 2) * 4;
    if (r % 2 == 0) return a[g + k];
    case (k)
      0: x = ci(-a[g+1].re, a[g+1].im);  // -a2*
      1: x = iconj(a[g]);                //  a1*
      2: x = ci(-a[g+3].re, a[g+3].im);  // -a4*
      default: x = iconj(a[g+2]);        //  a3*
    endcase
    return x;
  endfunction

  // (H^H H)[i][j] = sum_r conj(H[r][i]) H[r][j]
  function automatic ci_t hhh(ci_t a [8], int i, int j);
    ci_t s, p;
    s = ci(0, 0);
    for (int r = 0; r < 4; r++) begin
      p = imul(iconj(hel(a, r, i)), hel(a, r, j));
      s.re += p.re;
      s.im += p.im;
    end
    return s;
  endfunction

  // b1 = B[0][0], b2 = B[2][2], b3 = B[0][2], b4 = B[0][3]
  function automatic void bref(ci_t a [8], longint s2, output longint b1, output longint b2,
                               output ci_t b3, output ci_t b4);
    b1 = hhh(a, 0, 0).re + (s2 <<< 12);
    b2 = hhh(a, 2, 2).re + (s2 <<< 12);
    b3 = hhh(a, 0, 2);
    b4 = hhh(a, 0, 3);
  endfunction

endpackage
