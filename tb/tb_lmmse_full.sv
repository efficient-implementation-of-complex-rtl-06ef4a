// tb_lmmse_full: the channel preprocessing exactly as delivered (all
// parameters at their defaults, i.e. the shared-unit B computation) taken
// through complete computations of W for a set of random two-user Alamouti
// channels, including an ill-conditioned one (b1 b2 close to beta) and
// noise variances from 0.25 to 2. Expected values come from a general
// floating-point Gauss-Jordan inverse; c1..c4 must agree within 2 LSB and
// W within 6 LSB of Q8.12 wherever 100 * B^-1 fits the output range, and
// the last column must appear in cycle 21.
module tb_lmmse_full;
  import lmmse_pkg::*;
  import tb_ref_pkg::*;

  localparam int  NMAT  = 20;
  localparam real TOL_C = 2.0 / 4096.0;
  localparam real TOL_W = 6.0 / 4096.0;

  logic       clk = 0, rst_n = 0;
  logic       start = 0;
  cdata_t     a [8];
  data_t      sigma2;
  logic       ready, binv_valid, w_valid, done;
  data_t      c1, c2;
  cdata_t     c3, c4;
  logic [1:0] w_idx;
  cdata_t     w_col [4];
  int checks = 0, failures = 0;

  lmmse_w_top dut (
    .clk, .rst_n, .start, .ready, .a, .sigma2,
    .binv_valid, .c1, .c2, .c3, .c4, .w_valid, .w_idx, .w_col, .done
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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
    int    cyc, t_done, ncol;
    real   cmax;
    for (int k = 0; k < 8; k++) a[k] = '0;
    sigma2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < NMAT; t++) begin
      for (int k = 0; k < 8; k++) begin
        a[k].re = data_t'($signed($urandom_range(8191)) - 4096);
        a[k].im = data_t'($signed($urandom_range(8191)) - 4096);
      end
      if (t == 0) begin
        // user 2 sees (almost) the same channel as user 1: H^H H is nearly
        // singular and only sigma^2 keeps B invertible
        for (int k = 4; k < 8; k++) a[k] = a[k-4];
      end
      for (int k = 0; k < 8; k++) ar[k] = cr(q2r(a[k].re, 12), q2r(a[k].im, 12));
      sigma2 = data_t'(1024 + $urandom_range(7168));
      if (t == 0) sigma2 = data_t'(4096);
      h  = alamouti_h(ar);
      hh = herm(h);
      bm = matmul(hh, h);
      for (int i = 0; i < 4; i++) bm[i][i].re += q2r(sigma2, 12);
      bi = inv4(bm);
      w  = matmul(bi, hh);
      // largest squared magnitude of an entry of 100 * B^-1
      cmax = 0.0;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          if (1.0e4 * cabs2(bi[i][j]) > cmax) cmax = 1.0e4 * cabs2(bi[i][j]);

      checks++;
      if (!ready) begin failures++; $display("FAIL not ready"); end
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      ncol = 0;
      t_done = 0;
      while (t_done == 0 && cyc < 40) begin
        if (binv_valid && cmax < 127.0 * 127.0) begin
          near(q2r(c1, 12), 100.0 * bi[0][0].re, TOL_C, "c1");
          near(q2r(c2, 12), 100.0 * bi[2][2].re, TOL_C, "c2");
          near(q2r(c3.re, 12), 100.0 * bi[0][2].re, TOL_C, "c3.re");
          near(q2r(c3.im, 12), 100.0 * bi[0][2].im, TOL_C, "c3.im");
          near(q2r(c4.re, 12), 100.0 * bi[0][3].re, TOL_C, "c4.re");
          near(q2r(c4.im, 12), 100.0 * bi[0][3].im, TOL_C, "c4.im");
        end
        if (w_valid) begin
          checks++;
          if (w_idx != 2'(ncol)) begin failures++; $display("FAIL column order"); end
          if (cmax < 127.0 * 127.0)
            for (int i = 0; i < 4; i++) begin
              near(q2r(w_col[i].re, 12), 100.0 * w[i][w_idx].re, TOL_W, "W.re");
              near(q2r(w_col[i].im, 12), 100.0 * w[i][w_idx].im, TOL_W, "W.im");
            end
          ncol++;
        end
        if (done) t_done = cyc;
        @(negedge clk);
        cyc++;
      end
      checks += 2;
      if (t_done != 21) begin failures++; $display("FAIL W took %0d cycles", t_done); end
      if (ncol != 4) begin failures++; $display("FAIL %0d columns", ncol); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
