// tb_abami_inv: random Alamouti channels are turned into B = H^H H +
// sigma^2 I (exact integer reference) and fed to the inversion stage. The
// results c1..c4 are compared with 100 * B^-1 obtained by general
// Gauss-Jordan elimination in floating point (entries [0][0], [2][2],
// [0][2], [0][3]), within 2 LSB of the Q8.12 output. Also checks the
// 10-cycle latency, back-to-back inputs (one B per cycle) and output
// saturation when 100 * B^-1 leaves the Q8.12 range.
module tb_abami_inv;
  import lmmse_pkg::*;
  import tb_bref_pkg::*;
  import tb_ref_pkg::*;

  localparam int LAT = 10, NB = 60;
  localparam real TOL = 2.0 / 4096.0;

  logic   clk = 0, rst_n = 0;
  logic   in_valid = 0;
  acc_t   b1, b2;
  cacc_t  b3, b4;
  logic   out_valid;
  data_t  c1, c2;
  cdata_t c3, c4;
  int checks = 0, failures = 0;

  abami_inv dut (.clk, .rst_n, .in_valid, .b1, .b2, .b3, .b4, .out_valid, .c1, .c2, .c3, .c4);

  always #5 clk = ~clk;

  // stimulus store
  longint sb1 [NB], sb2 [NB];
  ci_t    sb3 [NB], sb4 [NB];
  int     n_out = 0;
  int     n_sat = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_c(real got, real exp, string what);
    real e;
    checks++;
    if (exp > 127.99) e = 524287.0 / 4096.0;
    else if (exp < -128.0) e = -128.0;
    else e = exp;
    if (e != exp) n_sat++;
    if (got - e > TOL || e - got > TOL) begin
      failures++;
      $display("FAIL %s got %f exp %f", what, got, e);
    end
  endtask

  task automatic check_out(int k);
    cmat_t bm, bi;
    cr_t   z;
    z = cr(0.0, 0.0);
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) bm[i][j] = z;
    // B from its four entries (Alamouti-structured Hermitian matrix)
    bm[0][0] = cr(q2r(sb1[k], 24), 0.0); bm[1][1] = bm[0][0];
    bm[2][2] = cr(q2r(sb2[k], 24), 0.0); bm[3][3] = bm[2][2];
    bm[0][2] = cr(q2r(sb3[k].re, 24), q2r(sb3[k].im, 24));
    bm[0][3] = cr(q2r(sb4[k].re, 24), q2r(sb4[k].im, 24));
    bm[1][2] = cr(-bm[0][3].re, bm[0][3].im);    // -b4*
    bm[1][3] = cconj(bm[0][2]);                  //  b3*
    for (int i = 0; i < 2; i++) for (int j = 2; j < 4; j++) bm[j][i] = cconj(bm[i][j]);
    bi = inv4(bm);
    check_c(q2r(c1, 12), 100.0 * bi[0][0].re, "c1");
    check_c(q2r(c2, 12), 100.0 * bi[2][2].re, "c2");
    check_c(q2r(c3.re, 12), 100.0 * bi[0][2].re, "c3.re");
    check_c(q2r(c3.im, 12), 100.0 * bi[0][2].im, "c3.im");
    check_c(q2r(c4.re, 12), 100.0 * bi[0][3].re, "c4.re");
    check_c(q2r(c4.im, 12), 100.0 * bi[0][3].im, "c4.im");
  endtask

  // result checker, counts the cycles from each input
  int in_cyc [NB];
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid) begin
      checks++;
      if (cyc - in_cyc[n_out] != LAT) begin
        failures++;
        $display("FAIL latency %0d", cyc - in_cyc[n_out]);
      end
      check_out(n_out);
      n_out <= n_out + 1;
    end
  end

  initial begin
    ci_t    ar [8];
    longint s2;
    b1 = '0; b2 = '0; b3 = '0; b4 = '0;
    for (int k = 0; k < NB; k++) begin
      for (int j = 0; j < 8; j++)
        ar[j] = ci($signed($urandom_range(8191)) - 4096, $signed($urandom_range(8191)) - 4096);
      if (k == 0) for (int j = 0; j < 8; j++) ar[j] = ci(0, 0);  // B = sigma^2 I
      s2 = (k == 0) ? 2048 : 4096 + $urandom_range(4096);     // 0.5 (saturates) or 1..2
      bref(ar, s2, sb1[k], sb2[k], sb3[k], sb4[k]);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NB; k++) begin
      @(negedge clk);
      in_valid = 1;
      b1 = acc_t'(sb1[k]); b2 = acc_t'(sb2[k]);
      b3.re = acc_t'(sb3[k].re); b3.im = acc_t'(sb3[k].im);
      b4.re = acc_t'(sb4[k].re); b4.im = acc_t'(sb4[k].im);
      in_cyc[k] = cyc;
      // every third input is followed by idle cycles, the rest back to back
      if (k % 3 == 2) begin
        @(negedge clk);
        in_valid = 0;
        repeat ($urandom_range(4)) @(negedge clk);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (n_out != NB) begin failures++; $display("FAIL %0d results for %0d inputs", n_out, NB); end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
