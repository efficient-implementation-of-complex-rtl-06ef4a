// b12_par: Method I computation of the real diagonal entries of B.
//
//   b1 = |a1|^2 + |a2|^2 + |a5|^2 + |a6|^2 + sigma^2
//   b2 = |a3|^2 + |a4|^2 + |a7|^2 + |a8|^2 + sigma^2
// Eight square units work in parallel, one per channel entry, and two
// 40-bit adder trees form b1 and b2 at the same time. sigma^2 arrives as a
// Q8.12 data word and is aligned to Q16.24 before it is added.
// Interface: a[0..7] are a1..a8. Timing: b1/b2 are registered, valid one
// clock after a and sigma2. The output register is this design's choice.
module b12_par
  import lmmse_pkg::*;
(
  input  logic   clk,
  input  cdata_t a [8],
  input  data_t  sigma2,
  output acc_t   b1,
  output acc_t   b2
);
  acc_t sq [8];

  for (genvar k = 0; k < 8; k++) begin : g_sq
    cplx_sqabs #(.W(DW)) u_sq (.a_re(a[k].re), .a_im(a[k].im), .y(sq[k]));
  end

  always_ff @(posedge clk) begin
    b1 <= sq[0] + sq[1] + sq[4] + sq[5] + d2a(sigma2);
    b2 <= sq[2] + sq[3] + sq[6] + sq[7] + d2a(sigma2);
  end
endmodule
