// tb_w_unit: random c1..c4 and channel entries into the W multiplier.
// The expected W is formed as the full 4x4 product of B^-1 (assembled from
// c1..c4 with its Alamouti pattern) and H^H (the conjugate transpose of
// the Alamouti channel), in 64-bit integers, then rounded to Q8.12 and
// saturated. Checks all 16 elements exactly, the column order, the
// 4-cycle column latency, one column per cycle and the done flag.
module tb_w_unit;
  import lmmse_pkg::*;
  import tb_bref_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       start = 0;
  cdata_t     a [8];
  data_t      c1, c2;
  cdata_t     c3, c4;
  logic       w_valid, done;
  logic [1:0] w_idx;
  cdata_t     w_col [4];
  int checks = 0, failures = 0;

  w_unit dut (.clk, .rst_n, .start, .a, .c1, .c2, .c3, .c4, .w_valid, .w_idx, .w_col, .done);

  always #5 clk = ~clk;

  function automatic longint rnd(longint v);
    longint r;
    r = (v + 2048) >>> 12;
    if (r > 524287) r = 524287;
    if (r < -524288) r = -524288;
    return r;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ci_t ar [8];
    ci_t bi [4][4];
    ci_t ew [4][4];
    ci_t z, s, p, k3, k4;
    int  ncol, t0;
    for (int k = 0; k < 8; k++) a[k] = '0;
    c1 = '0; c2 = '0; c3 = '0; c4 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      for (int k = 0; k < 8; k++) begin
        a[k].re = data_t'($signed($urandom_range(16383)) - 8192);
        a[k].im = data_t'($signed($urandom_range(16383)) - 8192);
        ar[k]   = ci(a[k].re, a[k].im);
      end
      c1 = data_t'($urandom_range(200000));
      c2 = data_t'($urandom_range(200000));
      c3 = {data_t'($signed($urandom_range(200000)) - 100000), data_t'($signed($urandom_range(200000)) - 100000)};
      c4 = {data_t'($signed($urandom_range(200000)) - 100000), data_t'($signed($urandom_range(200000)) - 100000)};
      // B^-1 pattern
      z = ci(0, 0);
      k3 = ci(c3.re, c3.im);
      k4 = ci(c4.re, c4.im);
      bi[0] = '{ci(c1, 0), z, k3, k4};
      bi[1] = '{z, ci(c1, 0), ci(-k4.re, k4.im), iconj(k3)};
      bi[2] = '{iconj(k3), ci(-k4.re, -k4.im), ci(c2, 0), z};
      bi[3] = '{iconj(k4), k3, z, ci(c2, 0)};
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          s = ci(0, 0);
          for (int k = 0; k < 4; k++) begin
            p = imul(bi[i][k], iconj(hel(ar, j, k)));   // H^H[k][j] = conj(H[j][k])
            s.re += p.re;
            s.im += p.im;
          end
          ew[i][j] = ci(rnd(s.re), rnd(s.im));
        end
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      t0 = 1;
      ncol = 0;
      for (int n = 1; n <= 10; n++) begin
        if (w_valid) begin
          checks++;
          if (w_idx != 2'(ncol) || n != 4 + ncol) begin
            failures++;
            $display("FAIL column %0d at cycle %0d (expected column %0d at %0d)", w_idx, n, ncol, 4 + ncol);
          end
          checks++;
          if (done != (w_idx == 2'd3)) begin failures++; $display("FAIL done"); end
          for (int i = 0; i < 4; i++) begin
            checks++;
            if (longint'(w_col[i].re) != ew[i][w_idx].re || longint'(w_col[i].im) != ew[i][w_idx].im) begin
              failures++;
              $display("FAIL W[%0d][%0d] = (%0d,%0d) exp (%0d,%0d)", i, w_idx, w_col[i].re, w_col[i].im,
                       ew[i][w_idx].re, ew[i][w_idx].im);
            end
          end
          ncol++;
        end
        @(negedge clk);
      end
      checks++;
      if (ncol != 4) begin failures++; $display("FAIL %0d columns", ncol); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
