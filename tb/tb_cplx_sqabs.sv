// tb_cplx_sqabs: checks the square unit, y = ar^2 + ai^2, against 64-bit
// integer arithmetic for random and extreme operands.
module tb_cplx_sqabs;
  localparam int W = 20;
  logic signed [W-1:0]   ar, ai;
  logic signed [2*W-1:0] y;
  int checks = 0, failures = 0;

  cplx_sqabs #(.W(W)) dut (.a_re(ar), .a_im(ai), .y);

  task automatic check(logic signed [W-1:0] r, logic signed [W-1:0] i);
    longint exp;
    ar = r;
    ai = i;
    #1;
    exp = longint'(r) * longint'(r) + longint'(i) * longint'(i);
    checks++;
    if (longint'(y) != exp) begin
      failures++;
      $display("FAIL %0d %0d: y=%0d exp=%0d", r, i, y, exp);
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
    check(0, 0); check(4096, 0); check(-4096, 4096); check(20'sh7FFFF, 20'sh7FFFF);
    check(20'sh80000, 0); check(-3, 20'sh7FFFF);
    for (int k = 0; k < 500; k++) check(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
