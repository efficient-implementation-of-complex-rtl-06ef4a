// tb_b34_mux: drives the Method II shared b3/b4 unit with sel = 0 and then
// sel = 1 for each random channel and compares the registered result
// exactly with (H^H H)[0][2] = b3 and (H^H H)[0][3] = b4.
module tb_b34_mux;
  import lmmse_pkg::*;
  import tb_bref_pkg::*;

  logic   clk = 0;
  logic   sel;
  cdata_t a [8];
  cacc_t  b;
  int checks = 0, failures = 0;

  b34_mux dut (.clk, .sel, .a, .b);

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
      sel = 1'b0;
      @(posedge clk);
      #1;
      checks += 2;
      if (longint'(b.re) != e3.re || longint'(b.im) != e3.im) begin
        failures++;
        $display("FAIL b3 (%0d,%0d) exp (%0d,%0d)", b.re, b.im, e3.re, e3.im);
      end
      sel = 1'b1;
      @(posedge clk);
      #1;
      if (longint'(b.re) != e4.re || longint'(b.im) != e4.im) begin
        failures++;
        $display("FAIL b4 (%0d,%0d) exp (%0d,%0d)", b.re, b.im, e4.re, e4.im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
