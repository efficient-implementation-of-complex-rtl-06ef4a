// b34_par: Method I computation of the complex off-diagonal entries of B.
//
//   b3 = a1* a3 + a2 a4* + a5* a7 + a6 a8*
//   b4 = a1* a4 - a2 a3* + a5* a8 - a6 a7*
// Two's complement units on the imaginary parts produce the conjugates,
// eight complex multipliers form all product terms at once, and separate
// 40-bit adders sum the real and the imaginary parts.
// Interface: a[0..7] are a1..a8 (Q8.12); b3/b4 are Q16.24.
// Timing: outputs registered, valid one clock after a (register placement
// is this design's choice).
module b34_par
  import lmmse_pkg::*;
(
  input  logic   clk,
  input  cdata_t a [8],
  output cacc_t  b3,
  output cacc_t  b4
);
  cdata_t ac [8];          // conjugates a1*..a8*
  cacc_t  p3 [4], p4 [4];  // product terms of b3 and b4

  for (genvar k = 0; k < 8; k++) begin : g_conj
    assign ac[k].re = a[k].re;
    twos_comp #(.W(DW)) u_neg (.a(a[k].im), .y(ac[k].im));
  end

  // b3 terms: a1* a3, a2 a4*, a5* a7, a6 a8*
  cplx_mult #(.W(DW)) u_m30 (.a_re(ac[0].re), .a_im(ac[0].im), .b_re(a[2].re),  .b_im(a[2].im),
                             .y_re(p3[0].re), .y_im(p3[0].im));
  cplx_mult #(.W(DW)) u_m31 (.a_re(a[1].re),  .a_im(a[1].im),  .b_re(ac[3].re), .b_im(ac[3].im),
                             .y_re(p3[1].re), .y_im(p3[1].im));
  cplx_mult #(.W(DW)) u_m32 (.a_re(ac[4].re), .a_im(ac[4].im), .b_re(a[6].re),  .b_im(a[6].im),
                             .y_re(p3[2].re), .y_im(p3[2].im));
  cplx_mult #(.W(DW)) u_m33 (.a_re(a[5].re),  .a_im(a[5].im),  .b_re(ac[7].re), .b_im(ac[7].im),
                             .y_re(p3[3].re), .y_im(p3[3].im));
  // b4 terms: a1* a4, a2 a3*, a5* a8, a6 a7*
  cplx_mult #(.W(DW)) u_m40 (.a_re(ac[0].re), .a_im(ac[0].im), .b_re(a[3].re),  .b_im(a[3].im),
                             .y_re(p4[0].re), .y_im(p4[0].im));
  cplx_mult #(.W(DW)) u_m41 (.a_re(a[1].re),  .a_im(a[1].im),  .b_re(ac[2].re), .b_im(ac[2].im),
                             .y_re(p4[1].re), .y_im(p4[1].im));
  cplx_mult #(.W(DW)) u_m42 (.a_re(ac[4].re), .a_im(ac[4].im), .b_re(a[7].re),  .b_im(a[7].im),
                             .y_re(p4[2].re), .y_im(p4[2].im));
  cplx_mult #(.W(DW)) u_m43 (.a_re(a[5].re),  .a_im(a[5].im),  .b_re(ac[6].re), .b_im(ac[6].im),
                             .y_re(p4[3].re), .y_im(p4[3].im));

  always_ff @(posedge clk) begin
    b3.re <= p3[0].re + p3[1].re + p3[2].re + p3[3].re;
    b3.im <= p3[0].im + p3[1].im + p3[2].im + p3[3].im;
    b4.re <= p4[0].re - p4[1].re + p4[2].re - p4[3].re;
    b4.im <= p4[0].im - p4[1].im + p4[2].im - p4[3].im;
  end
endmodule
