// tb_b12_par: random channel entries into the Method I b1/b2 unit; b1 and
// b2 are compared exactly with the diagonal of H^H H + sigma^2 I one clock
// after the inputs.
module tb_b12_par;
  import lmmse_pkg::*;
  import tb_bref_pkg::*;

  logic   clk = 0;
  cdata_t a [8];
  data_t  sigma2;
  acc_t   b1, b2;
  int checks = 0, failures = 0;

  b12_par dut (.clk, .a, .sigma2, .b1, .b2);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ci_t    ar [8];
    longint e1, e2;
    ci_t    e3, e4;
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < 8; k++) begin
        // |entries| up to 8 in the first tests, full range afterwards
        a[k].re = (t < 100) ? data_t'($signed($urandom_range(65535)) - 32768) : data_t'($urandom);
        a[k].im = (t < 100) ? data_t'($signed($urandom_range(65535)) - 32768) : data_t'($urandom);
        ar[k]   = ci(longint'(a[k].re), longint'(a[k].im));
      end
      sigma2 = data_t'($urandom_range(8192));
      bref(ar, longint'(sigma2), e1, e2, e3, e4);
      @(posedge clk);
      #1;
      checks += 2;
      if (longint'(b1) != e1 && t < 100) begin failures++; $display("FAIL b1 %0d exp %0d", b1, e1); end
      if (longint'(b2) != e2 && t < 100) begin failures++; $display("FAIL b2 %0d exp %0d", b2, e2); end
      // full-range operands: compare modulo 2^40 (the adder wraps)
      if (t >= 100 && (b1 != acc_t'(e1) || b2 != acc_t'(e2))) begin
        failures++;
        $display("FAIL wide b1/b2");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
