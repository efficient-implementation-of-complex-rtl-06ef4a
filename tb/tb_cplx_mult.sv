// tb_cplx_mult: checks the complex multiplier against 64-bit integer
// arithmetic for random and extreme operands.
module tb_cplx_mult;
  localparam int W = 20;
  logic signed [W-1:0]   ar, ai, br, bi;
  logic signed [2*W-1:0] yr, yi;
  int checks = 0, failures = 0;

  cplx_mult #(.W(W)) dut (.a_re(ar), .a_im(ai), .b_re(br), .b_im(bi), .y_re(yr), .y_im(yi));

  task automatic check(logic signed [W-1:0] p, q, r, s);
    longint er, ei;
    ar = p; ai = q; br = r; bi = s;
    #1;
    er = longint'(p) * longint'(r) - longint'(q) * longint'(s);
    ei = longint'(p) * longint'(s) + longint'(q) * longint'(r);
    checks += 2;
    if (longint'(yr) != er) begin
      failures++;
      $display("FAIL re: (%0d,%0d)*(%0d,%0d) = %0d exp %0d", p, q, r, s, yr, er);
    end
    if (longint'(yi) != ei) begin
      failures++;
      $display("FAIL im: (%0d,%0d)*(%0d,%0d) = %0d exp %0d", p, q, r, s, yi, ei);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(4096, 0, 0, 4096);
    check(20'sh7FFFF, 20'sh7FFFF, 20'sh7FFFF, 20'sh80001);
    check(-1, 2, 3, -4);
    for (int k = 0; k < 500; k++) check(W'($urandom), W'($urandom), W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
