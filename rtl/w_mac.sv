// w_mac: one multiply-accumulate circuit of the W = B^-1 H^H multiplier.
//
// Every row of B^-1 holds one real entry (c1 or c2) and two complex entries
// (from c3, c4 and their conjugates/negatives). An element of W in that row
// is therefore
//   y = d * xd[sel] + p * xp[sel] + q * xq[sel]
// with d real and p, q complex. 4:1 multiplexers pick the entries of
// column sel of H^H, a real-by-complex multiplier and two complex
// multipliers form the three products at full precision (Q16.24), and
// 40-bit adders sum them. Stepping sel over 0..3 yields the four elements
// of the row, one per cycle.
//
// Timing: four register stages (multiplexer outputs, products, sum, result
// rounded to a Q8.12 data word); y belongs to the sel presented four
// cycles earlier. d, p and q must be stable meanwhile. A new sel may be
// given every cycle. The stage split is this design's choice.
module w_mac
  import lmmse_pkg::*;
(
  input  logic       clk,
  input  logic [1:0] sel,
  input  data_t      d,
  input  cdata_t     p,
  input  cdata_t     q,
  input  cdata_t     xd [4],
  input  cdata_t     xp [4],
  input  cdata_t     xq [4],
  output cdata_t     y
);
  cdata_t xd_r, xp_r, xq_r;   // stage 1: multiplexer outputs
  cacc_t  pd_w, pp_w, pq_w;
  cacc_t  pd_r, pp_r, pq_r;   // stage 2: products
  cacc_t  sum_r;              // stage 3: sum

  always_ff @(posedge clk) begin
    xd_r <= xd[sel];
    xp_r <= xp[sel];
    xq_r <= xq[sel];
  end

  // real-by-complex product: two real multipliers
  always_comb begin
    pd_w.re = PW'(d) * PW'(xd_r.re);
    pd_w.im = PW'(d) * PW'(xd_r.im);
  end

  cplx_mult #(.W(DW)) u_mp (.a_re(p.re), .a_im(p.im), .b_re(xp_r.re), .b_im(xp_r.im),
                            .y_re(pp_w.re), .y_im(pp_w.im));
  cplx_mult #(.W(DW)) u_mq (.a_re(q.re), .a_im(q.im), .b_re(xq_r.re), .b_im(xq_r.im),
                            .y_re(pq_w.re), .y_im(pq_w.im));

  always_ff @(posedge clk) begin
    pd_r     <= pd_w;
    pp_r     <= pp_w;
    pq_r     <= pq_w;
    sum_r.re <= pd_r.re + pp_r.re + pq_r.re;
    sum_r.im <= pd_r.im + pp_r.im + pq_r.im;
    y.re     <= a2d(sum_r.re);
    y.im     <= a2d(sum_r.im);
  end
endmodule
