// b12_mux: Method II computation of b1 or b2 with one shared unit.
//
// b1 and b2 have the same form (four squared magnitudes plus sigma^2), so
// one set of four square units serves both. Eight 2:1 multiplexers (real
// and imaginary part of each square-unit input) choose the operands:
//   sel = 0 : a1, a2, a5, a6  -> b1
//   sel = 1 : a3, a4, a7, a8  -> b2
// Interface: a[0..7] are a1..a8 (Q8.12); b is Q16.24.
// Timing: b is registered, valid one clock after sel/a (register is this
// design's choice). Computing both entries takes two cycles.
module b12_mux
  import lmmse_pkg::*;
(
  input  logic   clk,
  input  logic   sel,
  input  cdata_t a [8],
  input  data_t  sigma2,
  output acc_t   b
);
  cdata_t op [4];
  acc_t   sq [4];

  // operand multiplexers
  always_comb begin
    op[0] = sel ? a[2] : a[0];
    op[1] = sel ? a[3] : a[1];
    op[2] = sel ? a[6] : a[4];
    op[3] = sel ? a[7] : a[5];
  end

  for (genvar k = 0; k < 4; k++) begin : g_sq
    cplx_sqabs #(.W(DW)) u_sq (.a_re(op[k].re), .a_im(op[k].im), .y(sq[k]));
  end

  always_ff @(posedge clk) b <= sq[0] + sq[1] + sq[2] + sq[3] + d2a(sigma2);
endmodule
