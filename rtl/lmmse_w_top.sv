// lmmse_w_top: channel preprocessing of a 4x4 LMMSE MIMO decoder for a
// two-user Alamouti (2x2 STBC) downlink.
//
// From the eight distinct entries a1..a8 of the Alamouti-structured channel
// matrix H and the noise variance sigma^2 it computes the LMMSE
// equalization matrix
//   W = (H^H H + sigma^2 I)^-1 H^H = B^-1 H^H
// in three steps: bmat_unit forms the four distinct entries of B,
// abami_inv inverts B in closed form (blockwise inversion exploiting the
// Alamouti structure, no QR decomposition), and w_unit multiplies B^-1 by
// H^H with four MAC circuits, one column of W per cycle.
// B^-1 (c1..c4) and W are produced multiplied by 100.
//
// Interface: a[0..7] = a1..a8 and sigma2 are Q8.12 data words. When ready
// is high, a start pulse loads them; ready stays low until the last column
// of W has appeared. binv_valid pulses when c1..c4 are valid (they are
// held until the next matrix). w_valid/w_idx/w_col give W column by
// column (w_col[i] = W[i][w_idx]); done marks the last column.
// Timing: counting the start cycle as cycle 1, the last column of W is
// registered at the end of cycle 20 with METHOD = 1 (parallel B units) and
// cycle 21 with METHOD = 2 (shared B units, the default). One matrix is
// processed at a time; overlapping successive matrices is not done.
// The structure (two ways of forming B, closed-form Alamouti block
// inversion with a common factor 100, four row MACs behind 4:1
// multiplexers) and the 20/21-cycle totals follow the original design; the
// register placement, the start/ready handshake and the rounding are this
// design's own.
module lmmse_w_top
  import lmmse_pkg::*;
#(
  parameter int METHOD = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       ready,
  input  cdata_t     a [8],
  input  data_t      sigma2,
  output logic       binv_valid,
  output data_t      c1,
  output data_t      c2,
  output cdata_t     c3,
  output cdata_t     c4,
  output logic       w_valid,
  output logic [1:0] w_idx,
  output cdata_t     w_col [4],
  output logic       done
);
  cdata_t a_r [8];
  data_t  s2_r;
  logic   busy, go;

  // input registers and run control; a start while busy is ignored
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      go   <= 1'b0;
      s2_r <= '0;
      for (int k = 0; k < 8; k++) a_r[k] <= '0;
    end else begin
      go <= start && !busy;
      if (start && !busy) begin
        busy <= 1'b1;
        a_r  <= a;
        s2_r <= sigma2;
      end else if (done) begin
        busy <= 1'b0;
      end
    end
  end

  assign ready = !busy;

  // B = H^H H + sigma^2 I
  logic  b_valid;
  acc_t  b1, b2;
  cacc_t b3, b4;

  bmat_unit #(.METHOD(METHOD)) u_bmat (
    .clk, .rst_n, .in_valid(go), .a(a_r), .sigma2(s2_r),
    .out_valid(b_valid), .b1, .b2, .b3, .b4
  );

  // 100 * B^-1
  abami_inv u_inv (
    .clk, .rst_n, .in_valid(b_valid), .b1, .b2, .b3, .b4,
    .out_valid(binv_valid), .c1, .c2, .c3, .c4
  );

  // 100 * W = 100 * B^-1 H^H
  w_unit u_w (
    .clk, .rst_n, .start(binv_valid), .a(a_r), .c1, .c2, .c3, .c4,
    .w_valid, .w_idx, .w_col, .done
  );

endmodule
