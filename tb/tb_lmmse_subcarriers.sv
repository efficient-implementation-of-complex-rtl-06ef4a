// tb_lmmse_subcarriers: the per-symbol workload of the target system. One
// W is computed for each of the 512 subcarriers of a 5 MHz WiMAX channel
// (two-user 2x2 Alamouti, 4x4 H), the top at its default parameters,
// every channel started in the first cycle the core is ready again.
// Each W is compared with a floating-point reference (6 LSB of Q8.12).
// The total cycle count must be 512 x 22 (21 cycles of computation plus
// one cycle until ready), which at a 128 MHz clock is 88 us, well inside
// the 8 ms channel coherence time the preprocessing has to meet.
module tb_lmmse_subcarriers;
  import lmmse_pkg::*;
  import tb_ref_pkg::*;

  localparam int  NSC    = 512;
  localparam int  PERIOD = 22;
  localparam real TOL_W  = 6.0 / 4096.0;
  localparam real F_MHZ  = 128.0;
  localparam real TC_US  = 8000.0;

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

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (NSC * PERIOD + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic near(real got, real exp, string what);
    checks++;
    if (got - exp > TOL_W || exp - got > TOL_W) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %f exp %f", what, got, exp);
    end
  endtask

  initial begin
    cr_t   ar [8];
    cmat_t h, hh, bm, w;
    int    t_first, t_last, nw;
    real   us;
    for (int k = 0; k < 8; k++) a[k] = '0;
    sigma2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int sc = 0; sc < NSC; sc++) begin
      while (!ready) @(negedge clk);
      for (int k = 0; k < 8; k++) begin
        a[k].re = data_t'($signed($urandom_range(8191)) - 4096);
        a[k].im = data_t'($signed($urandom_range(8191)) - 4096);
        ar[k]   = cr(q2r(a[k].re, 12), q2r(a[k].im, 12));
      end
      sigma2 = data_t'(4096 + $urandom_range(4096));
      h  = alamouti_h(ar);
      hh = herm(h);
      bm = matmul(hh, h);
      for (int i = 0; i < 4; i++) bm[i][i].re += q2r(sigma2, 12);
      w  = matmul(inv4(bm), hh);
      start = 1;
      if (sc == 0) t_first = cyc;
      @(negedge clk);
      start = 0;
      nw = 0;
      while (nw < 4) begin
        if (w_valid) begin
          for (int i = 0; i < 4; i++) begin
            near(q2r(w_col[i].re, 12), 100.0 * w[i][w_idx].re, "W.re");
            near(q2r(w_col[i].im, 12), 100.0 * w[i][w_idx].im, "W.im");
          end
          nw++;
        end
        @(negedge clk);
      end
    end
    while (!ready) @(negedge clk);
    t_last = cyc;
    us = real'(t_last - t_first) / F_MHZ;
    $display("%0d subcarriers in %0d cycles = %0.1f us at %0.0f MHz (coherence time %0.0f us)",
             NSC, t_last - t_first, us, F_MHZ, TC_US);
    checks += 2;
    if (t_last - t_first != NSC * PERIOD) begin
      failures++;
      $display("FAIL %0d cycles, expected %0d", t_last - t_first, NSC * PERIOD);
    end
    if (us >= TC_US) begin failures++; $display("FAIL exceeds the coherence time"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
