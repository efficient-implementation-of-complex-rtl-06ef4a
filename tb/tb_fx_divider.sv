// tb_fx_divider: random signed divisions through the pipelined divider at
// its default size (40-bit operands, 24 fraction bits, 3 stages), one new
// division per cycle. Each quotient is compared with num*2^24/den worked
// out in 128-bit integer arithmetic (truncated toward zero, saturated),
// exactly LAT cycles after its operands. Includes zero divisors, overflow
// the reciprocal cases used by the design (100/x) and exact quotients.
module tb_fx_divider;
  localparam int W = 40, SH = 24, LAT = 3, N = 600;

  logic clk = 0;
  logic signed [W-1:0] num, den, q;
  logic signed [W-1:0] nv [N], dv [N];
  int checks = 0, failures = 0;

  fx_divider #(.NW(W), .DW(W), .QW(W), .SHIFT(SH), .LAT(LAT)) dut (.clk, .num, .den, .q);

  always #5 clk = ~clk;

  function automatic logic signed [W-1:0] ref_q(logic signed [W-1:0] n, logic signed [W-1:0] d);
    logic signed [127:0] nn, dd, qq;
    logic signed [127:0] maxv, minv;
    maxv = (128'sd1 <<< (W - 1)) - 1;
    minv = -(128'sd1 <<< (W - 1));
    nn = 128'(n) <<< SH;
    dd = 128'(d);
    if (d == 0) return ((n < 0) != (d < 0)) ? minv[W-1:0] : maxv[W-1:0];
    qq = nn / dd;  // truncates toward zero
    if (qq > maxv) return maxv[W-1:0];
    if (qq < minv) return minv[W-1:0];
    return qq[W-1:0];
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W-1:0] e;
    for (int k = 0; k < N; k++) begin
      case (k % 7)
        0: begin nv[k] = W'(100) <<< SH; dv[k] = W'($urandom_range(32'h3FFFFFFF)) + 1; end
        1: begin nv[k] = W'(100) <<< SH; dv[k] = W'($urandom_range(32'hFFFFFF)) + 1; end
        2: begin nv[k] = {$urandom, $urandom}; dv[k] = {$urandom, $urandom}; end
        3: begin nv[k] = W'($signed($urandom)); dv[k] = W'($signed($urandom_range(65535)) - 32768); end
        4: begin nv[k] = {$urandom, $urandom}; dv[k] = (k % 12 == 4) ? '0 : W'(1); end
        5: begin  // exact quotients: num = den * m
          dv[k] = W'($signed($urandom_range(32'hFFFFF)) - 32'sh80000);
          if (dv[k] == 0) dv[k] = 3;
          nv[k] = dv[k] * W'($urandom_range(30000));
        end
        default: begin nv[k] = -(W'(100) <<< SH); dv[k] = W'($urandom_range(32'h7FFFFFF)) + 5; end
      endcase
    end
    @(negedge clk);
    for (int k = 0; k < N + LAT; k++) begin
      if (k < N) begin
        num = nv[k];
        den = dv[k];
      end
      @(negedge clk);
      if (k >= LAT - 1 && k - (LAT - 1) < N) begin
        e = ref_q(nv[k-(LAT-1)], dv[k-(LAT-1)]);
        checks++;
        if (q != e) begin
          failures++;
          if (failures < 10)
            $display("FAIL %0d / %0d : q=%0d exp %0d", nv[k-(LAT-1)], dv[k-(LAT-1)], q, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
