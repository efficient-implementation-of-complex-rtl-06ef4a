// tb_w_mac: random coefficients and multiplexer inputs into one MAC
// circuit, a new column select every cycle. Each output is compared
// exactly with d*xd[sel] + p*xp[sel] + q*xq[sel] computed in 64-bit
// integers, rounded half up to Q8.12 and saturated, four cycles after the
// select.
module tb_w_mac;
  import lmmse_pkg::*;
  import tb_bref_pkg::*;

  localparam int LAT = 4, N = 400;

  logic       clk = 0;
  logic [1:0] sel;
  data_t      d;
  cdata_t     p, q, y;
  cdata_t     xd [4], xp [4], xq [4];
  int checks = 0, failures = 0;

  w_mac dut (.clk, .sel, .d, .p, .q, .xd, .xp, .xq, .y);

  always #5 clk = ~clk;

  function automatic longint rnd(longint v);
    longint r;
    r = (v + 2048) >>> 12;
    if (r > 524287) r = 524287;
    if (r < -524288) r = -524288;
    return r;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint er [N], ei [N];
    ci_t    s, t;
    for (int blk = 0; blk < N / 8; blk++) begin
      // new coefficients and inputs every 8 selects, held while in flight
      @(negedge clk);
      d = data_t'($urandom);
      p = {data_t'($urandom), data_t'($urandom)};
      q = {data_t'($urandom), data_t'($urandom)};
      if (blk % 2 == 0) begin  // small values: no saturation
        d = d >>> 6; p.re = p.re >>> 6; p.im = p.im >>> 6; q.re = q.re >>> 6; q.im = q.im >>> 6;
      end
      for (int j = 0; j < 4; j++) begin
        xd[j] = {data_t'($urandom), data_t'($urandom)};
        xp[j] = {data_t'($urandom), data_t'($urandom)};
        xq[j] = {data_t'($urandom), data_t'($urandom)};
      end
      for (int k = 0; k < 8 + LAT; k++) begin
        if (k < 8) begin
          sel = 2'($urandom);
          s = imul(ci(d, 0), ci(xd[sel].re, xd[sel].im));
          t = imul(ci(p.re, p.im), ci(xp[sel].re, xp[sel].im));
          s.re += t.re; s.im += t.im;
          t = imul(ci(q.re, q.im), ci(xq[sel].re, xq[sel].im));
          s.re += t.re; s.im += t.im;
          // the 40-bit adders wrap beyond +/-2^39
          er[k] = longint'(acc_t'(s.re));
          ei[k] = longint'(acc_t'(s.im));
        end
        @(negedge clk);
        if (k >= LAT - 1 && k - (LAT - 1) < 8) begin
          checks += 2;
          if (longint'(y.re) != rnd(er[k-(LAT-1)]) || longint'(y.im) != rnd(ei[k-(LAT-1)])) begin
            failures++;
            $display("FAIL y=(%0d,%0d) exp (%0d,%0d)", y.re, y.im,
                     rnd(er[k-(LAT-1)]), rnd(ei[k-(LAT-1)]));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
