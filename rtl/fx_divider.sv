// fx_divider: pipelined signed fixed-point divider, q = num * 2^SHIFT / den.
//
// Used by the inversion stage for the two reciprocals alpha = 100/b1 and
// gamma = 100/(b1 b2 - beta). With num and den in the same format and
// SHIFT equal to their fraction bits, q comes out in that format as well.
//
// How it works: the magnitudes are divided by restoring long division, one
// quotient bit per compare-and-subtract step, from the most significant
// bit down. The QW-1 magnitude bits are spread evenly over LAT pipeline
// stages. A quotient that does not fit QW signed bits, or a zero divisor,
// saturates to the largest value of the quotient's sign. The quotient is
// truncated toward zero.
//
// Interface and timing: fully pipelined, one division may start every
// cycle; q belongs to the operands presented LAT cycles earlier. No reset
// (pure datapath, no control state).
// The divider's structure and widths are this design's own choice.
module fx_divider #(
  parameter int NW    = 40,  // dividend width
  parameter int DW    = 40,  // divisor width
  parameter int QW    = 40,  // quotient width
  parameter int SHIFT = 24,  // dividend is scaled by 2^SHIFT
  parameter int LAT   = 3    // pipeline stages
) (
  input  logic                 clk,
  input  logic signed [NW-1:0] num,
  input  logic signed [DW-1:0] den,
  output logic signed [QW-1:0] q
);
  localparam int M   = QW - 1;               // quotient magnitude bits
  localparam int BPS = (M + LAT - 1) / LAT;  // quotient bits per stage
  localparam int IW  = ((NW + SHIFT > DW + M) ? NW + SHIFT : DW + M) + 1;

  typedef logic [IW-1:0] wide_t;

  typedef struct packed {
    wide_t        r;    // partial remainder
    logic [M-1:0] q;    // quotient bits found so far
    wide_t        d;    // divisor magnitude
    logic         neg;  // sign of the quotient
    logic         ovf;  // saturate
  } st_t;

  st_t st0;
  st_t st_q [1:LAT];

  function automatic wide_t mag_n(logic signed [NW-1:0] x);
    logic [NW-1:0] m;
    m = x[NW-1] ? NW'(-x) : NW'(x);
    return wide_t'(m);
  endfunction

  function automatic wide_t mag_d(logic signed [DW-1:0] x);
    logic [DW-1:0] m;
    m = x[DW-1] ? DW'(-x) : DW'(x);
    return wide_t'(m);
  endfunction

  // quotient bits handled by stage s: (M-1-i)/BPS == s
  function automatic st_t step(st_t x, int s);
    st_t y;
    y = x;
    for (int i = M - 1; i >= 0; i--) begin
      if ((M - 1 - i) / BPS == s) begin
        if (y.r >= (y.d << i)) begin
          y.r    = y.r - (y.d << i);
          y.q[i] = 1'b1;
        end
      end
    end
    return y;
  endfunction

  always_comb begin
    st0.r   = mag_n(num) << SHIFT;
    st0.d   = mag_d(den);
    st0.q   = '0;
    st0.neg = num[NW-1] ^ den[DW-1];
    st0.ovf = (den == '0) || (st0.r >= (st0.d << M));
  end

  always_ff @(posedge clk) begin
    for (int s = 0; s < LAT; s++) begin
      st_q[s+1] <= step((s == 0) ? st0 : st_q[s], s);
    end
  end

  always_comb begin
    if (st_q[LAT].ovf)
      q = st_q[LAT].neg ? {1'b1, {(QW-1){1'b0}}} : {1'b0, {(QW-1){1'b1}}};
    else if (st_q[LAT].neg)
      q = -$signed({1'b0, st_q[LAT].q});
    else
      q = $signed({1'b0, st_q[LAT].q});
  end
endmodule
