// tb_bmat_unit: both variants of the B computation side by side (METHOD 1,
// parallel units; METHOD 2, shared units) on the same random channels.
// Checks b1..b4 exactly against the integer reference and checks that
// out_valid comes 2 cycles (METHOD 1) and 3 cycles (METHOD 2) after
// in_valid, as a single pulse.
module tb_bmat_unit;
  import lmmse_pkg::*;
  import tb_bref_pkg::*;

  logic   clk = 0, rst_n = 0;
  logic   in_valid = 0;
  cdata_t a [8];
  data_t  sigma2;
  logic   ov [2];
  acc_t   b1 [2], b2 [2];
  cacc_t  b3 [2], b4 [2];
  int checks = 0, failures = 0;

  bmat_unit #(.METHOD(1)) dut1 (.clk, .rst_n, .in_valid, .a, .sigma2,
                               .out_valid(ov[0]), .b1(b1[0]), .b2(b2[0]), .b3(b3[0]), .b4(b4[0]));
  bmat_unit #(.METHOD(2)) dut2 (.clk, .rst_n, .in_valid, .a, .sigma2,
                               .out_valid(ov[1]), .b1(b1[1]), .b2(b2[1]), .b3(b3[1]), .b4(b4[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ci_t    ar [8];
    longint e1, e2;
    ci_t    e3, e4;
    int     seen [2];
    for (int k = 0; k < 8; k++) a[k] = '0;
    sigma2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      for (int k = 0; k < 8; k++) begin
        a[k].re = data_t'($signed($urandom_range(65535)) - 32768);
        a[k].im = data_t'($signed($urandom_range(65535)) - 32768);
        ar[k]   = ci(longint'(a[k].re), longint'(a[k].im));
      end
      sigma2 = data_t'($urandom_range(8192));
      bref(ar, longint'(sigma2), e1, e2, e3, e4);
      @(negedge clk);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      seen = '{0, 0};
      // cycle n after the in_valid cycle
      for (int n = 1; n <= 5; n++) begin
        for (int m = 0; m < 2; m++) begin
          if (ov[m]) begin
            seen[m]++;
            checks++;
            if (n != m + 2) begin
              failures++;
              $display("FAIL METHOD %0d out_valid after %0d cycles", m + 1, n);
            end
            checks += 4;
            if (longint'(b1[m]) != e1) begin failures++; $display("FAIL M%0d b1", m+1); end
            if (longint'(b2[m]) != e2) begin failures++; $display("FAIL M%0d b2", m+1); end
            if (longint'(b3[m].re) != e3.re || longint'(b3[m].im) != e3.im) begin
              failures++; $display("FAIL M%0d b3", m+1);
            end
            if (longint'(b4[m].re) != e4.re || longint'(b4[m].im) != e4.im) begin
              failures++; $display("FAIL M%0d b4", m+1);
            end
          end
        end
        @(negedge clk);
      end
      for (int m = 0; m < 2; m++) begin
        checks++;
        if (seen[m] != 1) begin
          failures++;
          $display("FAIL METHOD %0d: %0d out_valid pulses", m + 1, seen[m]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
