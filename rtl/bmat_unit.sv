// bmat_unit: computation of B = H^H H + sigma^2 I for the two-user Alamouti
// channel.
//
// For the 4x4 channel
//        [ a1   a2   a3   a4  ]
//   H =  [-a2*  a1* -a4*  a3* ]
//        [ a5   a6   a7   a8  ]
//        [-a6*  a5* -a8*  a7* ]
// B has only four distinct entries, b1 and b2 (real, on the diagonal) and
// b3 and b4 (complex):
//        [ b1   0    b3   b4  ]
//   B =  [ 0    b1  -b4*  b3* ]
//        [ b3* -b4   b2   0   ]
//        [ b4*  b3   0    b2  ]
// METHOD = 1 computes all four at once with parallel units (b12_par,
// b34_par). METHOD = 2 uses the shared units b12_mux and b34_mux twice,
// first for b1/b3, then for b2/b4, which costs one extra cycle but halves
// the square units and complex multipliers. Both methods follow the design
// description; METHOD = 2, the smaller one, is the default.
//
// Interface: a[0..7] = a1..a8 and sigma2 (Q8.12) must be held stable from
// the in_valid cycle until out_valid; in_valid is a one-cycle strobe and
// may not be repeated in the next cycle (an assertion checks this).
// out_valid is a one-cycle strobe;
// b1..b4 (Q16.24) stay in their output registers until the next result.
// Timing: out_valid 2 cycles after in_valid (METHOD 1) or 3 (METHOD 2).
module bmat_unit
  import lmmse_pkg::*;
#(
  parameter int METHOD = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  cdata_t a [8],
  input  data_t  sigma2,
  output logic   out_valid,
  output acc_t   b1,
  output acc_t   b2,
  output cacc_t  b3,
  output cacc_t  b4
);
  initial begin
    assert (METHOD == 1 || METHOD == 2)
      else $error("bmat_unit: METHOD must be 1 or 2");
  end

  logic v1, v2;  // in_valid delayed by one and two cycles

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
    end else begin
      // the shared units of METHOD 2 are busy for two cycles per matrix
      a_in_valid_gap: assert (!(in_valid && v1))
        else $error("bmat_unit: in_valid in two consecutive cycles");
      v1 <= in_valid;
      v2 <= v1;
    end
  end

  if (METHOD == 1) begin : g_m1
    acc_t  u_b1, u_b2;
    cacc_t u_b3, u_b4;

    b12_par u_b12 (.clk, .a, .sigma2, .b1(u_b1), .b2(u_b2));
    b34_par u_b34 (.clk, .a, .b3(u_b3), .b4(u_b4));

    always_ff @(posedge clk) begin
      if (v1) begin
        b1 <= u_b1;
        b2 <= u_b2;
        b3 <= u_b3;
        b4 <= u_b4;
      end
    end
    assign out_valid = v2;
  end else begin : g_m2
    logic  v3;
    logic  sel;
    acc_t  s_b12;
    cacc_t s_b34;

    // first pass (sel = 0) in the in_valid cycle, second pass (sel = 1)
    // in the cycle after it
    assign sel = v1;

    b12_mux u_b12 (.clk, .sel, .a, .sigma2, .b(s_b12));
    b34_mux u_b34 (.clk, .sel, .a, .b(s_b34));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v3 <= 1'b0;
      else        v3 <= v2;
    end

    always_ff @(posedge clk) begin
      if (v1) begin
        b1 <= s_b12;
        b3 <= s_b34;
      end
      if (v2) begin
        b2 <= s_b12;
        b4 <= s_b34;
      end
    end
    assign out_valid = v3;
  end
endmodule
