// cplx_mult: complex multiplier, y = a * b.
//
//   yr = ar*br - ai*bi,   yi = ar*bi + ai*br
// Four real multipliers and two adders, all at full precision: each part of
// the result has 2W bits (Q16.24 for W = 20 data words). Combinational.
module cplx_mult #(
  parameter int W = 20
) (
  input  logic signed [W-1:0]   a_re,
  input  logic signed [W-1:0]   a_im,
  input  logic signed [W-1:0]   b_re,
  input  logic signed [W-1:0]   b_im,
  output logic signed [2*W-1:0] y_re,
  output logic signed [2*W-1:0] y_im
);
  logic signed [2*W-1:0] rr, ii, ri, ir;

  always_comb begin
    rr   = (2*W)'(a_re) * (2*W)'(b_re);
    ii   = (2*W)'(a_im) * (2*W)'(b_im);
    ri   = (2*W)'(a_re) * (2*W)'(b_im);
    ir   = (2*W)'(a_im) * (2*W)'(b_re);
    y_re = rr - ii;
    y_im = ri + ir;
  end
endmodule
