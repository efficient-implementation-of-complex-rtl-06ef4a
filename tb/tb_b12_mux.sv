// tb_b12_mux: drives the Method II shared b1/b2 unit with sel = 0 and then
// sel = 1 for each random channel and compares the registered result
// exactly with b1 and b2 of H^H H + sigma^2 I.
module tb_b12_mux;
  import lmmse_pkg::*;
  import tb_bref_pkg::*;

  logic   clk = 0;
  logic   sel;
  cdata_t a [8];
  data_t  sigma2;
  acc_t   b;
  int checks = 0, failures = 0;

  b12_mux dut (.clk, .sel, .a, .sigma2, .b);

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
      sigma2 = data_t'($urandom_range(8192));
      bref(ar, longint'(sigma2), e1, e2, e3, e4);
      sel = 1'b0;
      @(posedge clk);
      #1;
      checks++;
      if (longint'(b) != e1) begin failures++; $display("FAIL b1 %0d exp %0d", b, e1); end
      sel = 1'b1;
      @(posedge clk);
      #1;
      checks++;
      if (longint'(b) != e2) begin failures++; $display("FAIL b2 %0d exp %0d", b, e2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
