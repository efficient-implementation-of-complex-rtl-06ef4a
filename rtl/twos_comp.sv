// twos_comp: the two's complement unit, y = -a.
//
// Used wherever the datapath needs a complex conjugate (negate the
// imaginary part) or a minus sign in front of an operand. Purely
// combinational, no latency. Negating the most negative code would
// overflow; it saturates to the most positive code instead (a choice of
// this design: the unit is otherwise specified only as y = -a).
module twos_comp #(
  parameter int W = 20
) (
  input  logic signed [W-1:0] a,
  output logic signed [W-1:0] y
);
  localparam logic signed [W-1:0] MINV = {1'b1, {(W-1){1'b0}}};
  localparam logic signed [W-1:0] MAXV = {1'b0, {(W-1){1'b1}}};

  always_comb y = (a == MINV) ? MAXV : -a;
endmodule
