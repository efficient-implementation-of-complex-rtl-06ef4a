// tb_twos_comp: checks y = -a of the two's complement unit on random words
// and on the edge codes (zero, +/- one, most positive, most negative, which
// must saturate to the most positive).
module tb_twos_comp;
  localparam int W = 20;
  logic signed [W-1:0] a, y;
  int checks = 0, failures = 0;

  twos_comp #(.W(W)) dut (.a, .y);

  task automatic check(logic signed [W-1:0] v);
    longint exp;
    a = v;
    #1;
    exp = -longint'(v);
    if (exp > 524287) exp = 524287;
    checks++;
    if (longint'(y) != exp) begin
      failures++;
      $display("FAIL a=%0d y=%0d exp=%0d", v, y, exp);
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
    check(0); check(1); check(-1); check(20'sh7FFFF); check(20'sh80000); check(20'sh80001);
    for (int k = 0; k < 500; k++) check(W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
