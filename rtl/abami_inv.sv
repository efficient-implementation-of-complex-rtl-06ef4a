// abami_inv: Alamouti blockwise analytic matrix inversion (ABAMI) of B.
//
// B = [[b1 I, M], [M^H, b2 I]] with the Alamouti block M = [[b3, b4],
// [-b4*, b3*]], for which M M^H = beta I. The blockwise inverse then
// collapses to four scalars:
//   alpha = 1/b1                beta  = |b3|^2 + |b4|^2
//   gamma = 1/(b1 b2 - beta)
//   c1 = alpha + beta gamma alpha      c2 = gamma b1
//   c3 = -gamma b3                     c4 = -gamma b4
//             [ c1   0    c3   c4  ]
//   B^-1 =    [ 0    c1  -c4*  c3* ]
//             [ c3* -c4   c2   0   ]
//             [ c4*  c3   0    c2  ]
// The top-right block is -A^-1 M S^-1 with S = (b2 - beta/b1) I, which is
// -gamma M; c3 and c4 are therefore scaled by gamma, not by alpha.
//
// All four results carry a common scaling factor SCALE (100): both
// reciprocals are computed as SCALE/x by fx_divider, and the product
// beta*gamma*alpha, which would otherwise carry SCALE twice, is multiplied
// by the constant 1/SCALE. Intermediate values are Q16.24 product words;
// the outputs are rounded and saturated to Q8.12 data words. With unit
// scale entries this holds any B whose inverse entries stay below 1.27.
//
// Pipeline (edge k counted from the in_valid cycle):
//   e1          b1*b2, |b3|^2, |b4|^2           ; alpha divider starts
//   e2          beta                            e1..e3: alpha divider
//   e3          det = b1 b2 - beta
//   e4..e6      gamma divider
//   e7          c2, c3, c4, t1 = beta*gamma
//   e8          t2 = t1*alpha
//   e9          t3 = t2/SCALE
//   e10         c1 = alpha + t3, rounding of c1..c4, out_valid
// b1..b4 are sampled only in the in_valid cycle. out_valid is a one-cycle
// strobe; c1..c4 are held until the next result. Fully pipelined: a new
// B may enter every cycle. Stage boundaries are this design's choice.
module abami_inv
  import lmmse_pkg::*;
#(
  parameter int SCALE   = 100,
  parameter int DIV_LAT = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  acc_t   b1,
  input  acc_t   b2,
  input  cacc_t  b3,
  input  cacc_t  b4,
  output logic   out_valid,
  output data_t  c1,
  output data_t  c2,
  output cdata_t c3,
  output cdata_t c4
);
  localparam int   NST     = 4 + 2 * DIV_LAT;  // pipeline depth (10)
  localparam int   G0      = 3 + DIV_LAT;      // stage after which gamma is ready
  localparam acc_t SCALE_Q = acc_t'(SCALE) <<< PF;
  localparam acc_t INV_SCALE_Q = acc_t'(((64'd1 << PF) + 64'(SCALE / 2)) / 64'(SCALE));

  logic [NST:1] vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[NST-1:1], in_valid};
  end

  // ---- stage 1: products of the inputs ----------------------------------
  logic signed [2*PW-1:0] sq3_w, sq4_w;
  acc_t  p12_1, sq3_1, sq4_1;
  acc_t  b1_p [1:G0];
  cacc_t b3_p [1:G0], b4_p [1:G0];

  cplx_sqabs #(.W(PW)) u_sq3 (.a_re(b3.re), .a_im(b3.im), .y(sq3_w));
  cplx_sqabs #(.W(PW)) u_sq4 (.a_re(b4.re), .a_im(b4.im), .y(sq4_w));

  function automatic acc_t rescale(logic signed [2*PW-1:0] p);
    logic signed [2*PW-1:0] r;
    r = (p + ((2*PW)'(1) <<< (PF-1))) >>> PF;
    if (r > (2*PW)'(ACC_MAX)) return ACC_MAX;
    return acc_t'(r);  // squared magnitudes are never negative
  endfunction

  always_ff @(posedge clk) begin
    p12_1   <= mulq(b1, b2);
    sq3_1   <= rescale(sq3_w);
    sq4_1   <= rescale(sq4_w);
    b1_p[1] <= b1;
    b3_p[1] <= b3;
    b4_p[1] <= b4;
    for (int k = 2; k <= G0; k++) begin
      b1_p[k] <= b1_p[k-1];
      b3_p[k] <= b3_p[k-1];
      b4_p[k] <= b4_p[k-1];
    end
  end

  // ---- alpha = SCALE / b1 -----------------------------------------------
  acc_t alpha_w;

  fx_divider #(.NW(PW), .DW(PW), .QW(PW), .SHIFT(PF), .LAT(DIV_LAT)) u_div_alpha (
    .clk, .num(SCALE_Q), .den(b1), .q(alpha_w)
  );

  // ---- stages 2 and 3: beta and the determinant of the Schur term --------
  acc_t p12_2, beta_p [2:G0], det_3;

  always_ff @(posedge clk) begin
    p12_2     <= p12_1;
    beta_p[2] <= sq3_1 + sq4_1;
    for (int k = 3; k <= G0; k++) beta_p[k] <= beta_p[k-1];
    det_3     <= p12_2 - beta_p[2];
  end

  // ---- gamma = SCALE / det ----------------------------------------------
  acc_t gamma_w;

  fx_divider #(.NW(PW), .DW(PW), .QW(PW), .SHIFT(PF), .LAT(DIV_LAT)) u_div_gamma (
    .clk, .num(SCALE_Q), .den(det_3), .q(gamma_w)
  );

  // alpha is ready after stage DIV_LAT; hold it in a delay line until the
  // stages that use it
  acc_t alpha_p [DIV_LAT+1:NST-1];

  always_ff @(posedge clk) begin
    alpha_p[DIV_LAT+1] <= alpha_w;
    for (int k = DIV_LAT + 2; k <= NST - 1; k++) alpha_p[k] <= alpha_p[k-1];
  end

  // ---- stage G0+1: products with gamma ------------------------------------
  acc_t  c2_p [G0+1:NST-1];
  cacc_t c3_p [G0+1:NST-1], c4_p [G0+1:NST-1];
  acc_t  t1, t2, t3;

  always_ff @(posedge clk) begin
    c2_p[G0+1]    <= mulq(gamma_w, b1_p[G0]);
    c3_p[G0+1].re <= neg_a(mulq(gamma_w, b3_p[G0].re));
    c3_p[G0+1].im <= neg_a(mulq(gamma_w, b3_p[G0].im));
    c4_p[G0+1].re <= neg_a(mulq(gamma_w, b4_p[G0].re));
    c4_p[G0+1].im <= neg_a(mulq(gamma_w, b4_p[G0].im));
    t1            <= mulq(beta_p[G0], gamma_w);
    for (int k = G0 + 2; k <= NST - 1; k++) begin
      c2_p[k] <= c2_p[k-1];
      c3_p[k] <= c3_p[k-1];
      c4_p[k] <= c4_p[k-1];
    end
    t2 <= mulq(t1, alpha_p[G0+1]);
    t3 <= mulq(t2, INV_SCALE_Q);
  end

  // ---- last stage: c1 and rounding to data words -------------------------
  always_ff @(posedge clk) begin
    if (vld[NST-1]) begin
      c1    <= a2d(alpha_p[NST-1] + t3);
      c2    <= a2d(c2_p[NST-1]);
      c3.re <= a2d(c3_p[NST-1].re);
      c3.im <= a2d(c3_p[NST-1].im);
      c4.re <= a2d(c4_p[NST-1].re);
      c4.im <= a2d(c4_p[NST-1].im);
    end
  end

  assign out_valid = vld[NST];
endmodule
