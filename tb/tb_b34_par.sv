// tb_b34_par: random channel entries into the Method I b3/b4 unit; b3 and
// b4 are compared exactly with (H^H H)[0][2] and (H^H H)[0][3] one clock
// after the inputs.
module tb_b34_par;
  import lmmse_pkg::*;
  import tb_bref_pkg::*;

  logic   clk = 0;
  cdata_t a [8];
  cacc_t  b3, b4;
  int checks = 0, failures = 0;

  b34_par dut (.clk, .a, .b3, .b4);

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
        a[k].re = data_t'($signed($urandom_range(65535)) - 32768);
        a[k].im = data_t'($signed($urandom_range(65535)) - 32768);
        ar[k]   = ci(longint'(a[k].re), longint'(a[k].im));
      end
      bref(ar, 0, e1, e2, e3, e4);
      @(posedge clk);
      #1;
      checks += 4;
      if (longint'(b3.re) != e3.re) begin failures++; $display("FAIL b3.re %0d exp %0d", b3.re, e3.re); end
      if (longint'(b3.im) != e3.im) begin failures++; $display("FAIL b3.im %0d exp %0d", b3.im, e3.im); end
      if (longint'(b4.re) != e4.re) begin failures++; $display("FAIL b4.re %0d exp %0d", b4.re, e4.re); end
      if (longint'(b4.im) != e4.im) begin failures++; $display("FAIL b4.im %0d exp %0d", b4.im, e4.im); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
