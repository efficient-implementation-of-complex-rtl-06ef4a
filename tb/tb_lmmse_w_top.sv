// tb_lmmse_w_top: end-to-end test of the channel preprocessing with both
// B-computation methods side by side (METHOD 1 and METHOD 2, the default),
// fed with the same random two-user Alamouti channels.
//
// For every channel the expected 100 * B^-1 and 100 * W = 100 *
// (H^H H + sigma^2 I)^-1 H^H are computed in floating point with a general
// Gauss-Jordan inverse, and the design's outputs must agree within 2 LSB
// (c1..c4) and 6 LSB (W) of Q8.12. Checks the cycle count from start to
// the last column of W (20 for METHOD 1, 21 for METHOD 2), the column
// order, ready, and that a start given while busy is ignored.
// Mechanisms counted (each must occur): a matrix through METHOD 1, a
// matrix through METHOD 2, a start ignored while busy, a start taken in
// the first cycle ready is back, and saturation of 100 * B^-1 when it
// leaves the Q8.12 range (no signal, sigma^2 = 0.25).
module tb_lmmse_w_top;
  import lmmse_pkg::*;
  import tb_ref_pkg::*;

  localparam int  NMAT  = 40;
  localparam real TOL_C = 2.0 / 4096.0;
  localparam real TOL_W = 6.0 / 4096.0;

  logic       clk = 0, rst_n = 0;
  logic       start = 0;
  cdata_t     a [8];
  data_t      sigma2;
  logic       ready [2], binv_valid [2], w_valid [2], done [2];
  data_t      c1 [2], c2 [2];
  cdata_t     c3 [2], c4 [2];
  logic [1:0] w_idx [2];
  cdata_t     w_col [2][4];
  int checks = 0, failures = 0;
  int n_m1 = 0, n_m2 = 0, n_ignored = 0, n_b2b = 0, n_sat = 0;

  lmmse_w_top #(.METHOD(1)) dut1 (
    .clk, .rst_n, .start, .ready(ready[0]), .a, .sigma2,
    .binv_valid(binv_valid[0]), .c1(c1[0]), .c2(c2[0]), .c3(c3[0]), .c4(c4[0]),
    .w_valid(w_valid[0]), .w_idx(w_idx[0]), .w_col(w_col[0]), .done(done[0])
  );
  lmmse_w_top #(.METHOD(2)) dut2 (
    .clk, .rst_n, .start, .ready(ready[1]), .a, .sigma2,
    .binv_valid(binv_valid[1]), .c1(c1[1]), .c2(c2[1]), .c3(c3[1]), .c4(c4[1]),
    .w_valid(w_valid[1]), .w_idx(w_idx[1]), .w_col(w_col[1]), .done(done[1])
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic near(real got, real exp, real tol, string what);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL %s got %f exp %f", what, got, exp);
    end
  endtask

  initial begin
    cr_t   ar [8];
    cmat_t h, hh, bm, bi, w;
    int    cyc, t_done [2], ncol [2];
    bit    fin [2];
    for (int k = 0; k < 8; k++) a[k] = '0;
    sigma2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < NMAT; t++) begin
      // channel entries in [-1, 1), sigma^2 in [1, 2]
      for (int k = 0; k < 8; k++) begin
        a[k].re = data_t'($signed($urandom_range(8191)) - 4096);
        a[k].im = data_t'($signed($urandom_range(8191)) - 4096);
        ar[k]   = cr(q2r(a[k].re, 12), q2r(a[k].im, 12));
      end
      sigma2 = data_t'(4096 + $urandom_range(4096));
      if (t == NMAT / 2) begin
        // no signal and sigma^2 = 0.25: 100 * B^-1 = 400 I exceeds the
        // Q8.12 range, so c1 and c2 must saturate
        for (int k = 0; k < 8; k++) begin
          a[k]  = '0;
          ar[k] = cr(0.0, 0.0);
        end
        sigma2 = data_t'(1024);
      end
      h  = alamouti_h(ar);
      hh = herm(h);
      bm = matmul(hh, h);
      for (int i = 0; i < 4; i++) bm[i][i].re += q2r(sigma2, 12);
      bi = inv4(bm);
      w  = matmul(bi, hh);

      checks += 2;
      if (!ready[0] || !ready[1]) begin failures++; $display("FAIL not ready before start"); end
      start = 1;
      @(negedge clk);
      // inputs may change once the start has been taken
      start = 0;
      for (int k = 0; k < 8; k++) a[k] = '0;
      cyc = 1;
      fin = '{0, 0};
      ncol = '{0, 0};
      while (!(fin[0] && fin[1]) && cyc < 40) begin
        // a start while busy must be ignored
        if (cyc == 5 && t % 4 == 1) begin
          start = 1;
          n_ignored++;
        end else begin
          start = 0;
        end
        for (int m = 0; m < 2; m++) begin
          checks++;
          if (ready[m] && !fin[m]) begin failures++; $display("FAIL ready while busy"); end
          if (binv_valid[m]) begin
            if (100.0 * bi[0][0].re > 128.0) begin
              // saturated result: largest positive data word
              checks++;
              n_sat++;
              if (c1[m] != DATA_MAX || c2[m] != DATA_MAX) begin
                failures++;
                $display("FAIL saturation: c1=%0d c2=%0d", c1[m], c2[m]);
              end
            end else begin
              near(q2r(c1[m], 12), 100.0 * bi[0][0].re, TOL_C, "c1");
              near(q2r(c2[m], 12), 100.0 * bi[2][2].re, TOL_C, "c2");
            end
            near(q2r(c3[m].re, 12), 100.0 * bi[0][2].re, TOL_C, "c3.re");
            near(q2r(c3[m].im, 12), 100.0 * bi[0][2].im, TOL_C, "c3.im");
            near(q2r(c4[m].re, 12), 100.0 * bi[0][3].re, TOL_C, "c4.re");
            near(q2r(c4[m].im, 12), 100.0 * bi[0][3].im, TOL_C, "c4.im");
          end
          if (w_valid[m]) begin
            checks++;
            if (w_idx[m] != 2'(ncol[m])) begin failures++; $display("FAIL column order"); end
            for (int i = 0; i < 4; i++) begin
              near(q2r(w_col[m][i].re, 12), 100.0 * w[i][w_idx[m]].re, TOL_W, "W.re");
              near(q2r(w_col[m][i].im, 12), 100.0 * w[i][w_idx[m]].im, TOL_W, "W.im");
            end
            ncol[m]++;
          end
          if (done[m] && !fin[m]) begin
            fin[m] = 1;
            t_done[m] = cyc;
          end
        end
        @(negedge clk);
        cyc++;
      end
      start = 0;
      for (int m = 0; m < 2; m++) begin
        checks += 2;
        // cyc = n in the n-th cycle after the start cycle; the last column
        // is registered at the end of cycle 20 (METHOD 1) or 21 (METHOD 2),
        // counting the start cycle as the first
        if (t_done[m] != 20 + m) begin
          failures++;
          $display("FAIL METHOD %0d: W took %0d cycles", m + 1, t_done[m]);
        end
        if (ncol[m] != 4) begin failures++; $display("FAIL %0d columns", ncol[m]); end
      end
      n_m1++;
      n_m2++;
      // METHOD 2 becomes ready one cycle after METHOD 1; the next start is
      // given in the first cycle both are ready
      if (ready[0] && ready[1]) n_b2b++;
    end
    checks += 5;
    if (n_sat == 0) begin failures++; $display("FAIL saturation never happened"); end
    if (n_m1 == 0) begin failures++; $display("FAIL METHOD 1 never ran"); end
    if (n_m2 == 0) begin failures++; $display("FAIL METHOD 2 never ran"); end
    if (n_ignored == 0) begin failures++; $display("FAIL no start while busy"); end
    if (n_b2b == 0) begin failures++; $display("FAIL no back-to-back start"); end
    $display("mechanisms: method1=%0d method2=%0d ignored_starts=%0d back_to_back=%0d saturations=%0d",
             n_m1, n_m2, n_ignored, n_b2b, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
