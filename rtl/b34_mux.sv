// b34_mux: Method II computation of b3 or b4 with one shared unit.
//
//   b3 = a1* a3 + a2 a4* + a5* a7 + a6 a8*
//   b4 = a1* a4 - a2 a3* + a5* a8 - a6 a7*
// The first factors (a1*, a2, a5*, a6) are the same for b3 and b4, so only
// the second factors are multiplexed (four complex 2:1 multiplexers, i.e.
// eight real ones):
//   sel = 0 : a3, a4*, a7, a8*  -> b3
//   sel = 1 : a4, a3*, a8, a7*  -> b4
// and the adders of the 2nd and 4th terms switch to subtraction for b4.
// Four complex multipliers replace the eight of Method I. The exact
// multiplexer placement is this design's reading of the equations.
// Interface: a[0..7] are a1..a8 (Q8.12); b is Q16.24 complex.
// Timing: b registered, valid one clock after sel/a.
module b34_mux
  import lmmse_pkg::*;
(
  input  logic   clk,
  input  logic   sel,
  input  cdata_t a [8],
  output cacc_t  b
);
  cdata_t ac [8];
  cdata_t x [4], y [4];
  cacc_t  p [4];

  for (genvar k = 0; k < 8; k++) begin : g_conj
    assign ac[k].re = a[k].re;
    twos_comp #(.W(DW)) u_neg (.a(a[k].im), .y(ac[k].im));
  end

  always_comb begin
    x[0] = ac[0];
    x[1] = a[1];
    x[2] = ac[4];
    x[3] = a[5];
    y[0] = sel ? a[3]  : a[2];
    y[1] = sel ? ac[2] : ac[3];
    y[2] = sel ? a[7]  : a[6];
    y[3] = sel ? ac[6] : ac[7];
  end

  for (genvar k = 0; k < 4; k++) begin : g_mul
    cplx_mult #(.W(DW)) u_m (.a_re(x[k].re), .a_im(x[k].im), .b_re(y[k].re), .b_im(y[k].im),
                             .y_re(p[k].re), .y_im(p[k].im));
  end

  always_ff @(posedge clk) begin
    if (sel) begin
      b.re <= p[0].re - p[1].re + p[2].re - p[3].re;
      b.im <= p[0].im - p[1].im + p[2].im - p[3].im;
    end else begin
      b.re <= p[0].re + p[1].re + p[2].re + p[3].re;
      b.im <= p[0].im + p[1].im + p[2].im + p[3].im;
    end
  end
endmodule
