// cplx_sqabs: square unit, y = ar^2 + ai^2.
//
// Squared magnitude of a complex operand built from two real multipliers
// and one adder. The products are kept at full precision (2W bits, Q16.24
// for W = 20 data words) and added by a 2W-bit adder; nothing is rounded.
// Combinational. The only input that overflows the 2W-bit sum is
// ar = ai = most negative code; it wraps.
module cplx_sqabs #(
  parameter int W = 20
) (
  input  logic signed [W-1:0]   a_re,
  input  logic signed [W-1:0]   a_im,
  output logic signed [2*W-1:0] y
);
  logic signed [2*W-1:0] p_re, p_im;

  always_comb begin
    p_re = (2*W)'(a_re) * (2*W)'(a_re);
    p_im = (2*W)'(a_im) * (2*W)'(a_im);
    y    = p_re + p_im;
  end
endmodule
