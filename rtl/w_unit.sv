// w_unit: equalization matrix W = B^-1 H^H with four MAC circuits.
//
// MAC i computes row i of W. A column counter drives the 4:1 multiplexers
// of all four MACs together, so one column of W (four complex elements) is
// produced per cycle and the whole 4x4 W in four cycles. H^H is the
// conjugate transpose of the Alamouti channel matrix
//        [ a1   a2   a3   a4  ]
//   H =  [-a2*  a1* -a4*  a3* ]
//        [ a5   a6   a7   a8  ]
//        [-a6*  a5* -a8*  a7* ]
// and the coefficients of each row come from
//   row 0: c1 | c3 (col 2), c4 (col 3)
//   row 1: c1 | -c4* (col 2), c3* (col 3)
//   row 2: c2 | c3* (col 0), -c4 (col 1)
//   row 3: c2 | c4* (col 0), c3 (col 1)
// where "col k" names the column of B^-1, i.e. the row of H^H that the
// coefficient multiplies.
//
// Interface: start is a one-cycle strobe when c1..c4 are valid; c1..c4
// and a[0..7] must then stay stable for four cycles, and no new start may
// come before the last column is issued (an assertion checks this).
// Column sel = 0 is issued in the start cycle, columns 1..3 in the
// following cycles.
// w_valid rises four cycles after each column is issued, with w_idx
// naming the column and w_col[i] holding W[i][w_idx]; done marks the last
// column. Because c1..c4 carry the factor 100 of the inversion stage, so
// does W.
module w_unit
  import lmmse_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  cdata_t     a [8],
  input  data_t      c1,
  input  data_t      c2,
  input  cdata_t     c3,
  input  cdata_t     c4,
  output logic       w_valid,
  output logic [1:0] w_idx,
  output cdata_t     w_col [4],
  output logic       done
);
  localparam int LAT = 4;  // w_mac latency

  // ---- column counter ----------------------------------------------------
  logic       busy;
  logic [1:0] col;
  logic [1:0] sel;
  logic       issue;

  assign issue = start | busy;
  assign sel   = start ? 2'd0 : col;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      col  <= 2'd0;
    end else if (issue) begin
      a_start_idle: assert (!(start && busy))
        else $error("w_unit: start while the previous W is being issued");
      col  <= sel + 2'd1;
      busy <= (sel != 2'd3);
    end
  end

  // issue / column index delayed by the MAC latency
  logic [LAT-1:0] v_p;
  logic [1:0]     idx_p [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_p <= '0;
      for (int k = 0; k < LAT; k++) idx_p[k] <= 2'd0;
    end else begin
      v_p      <= {v_p[LAT-2:0], issue};
      idx_p[0] <= sel;
      for (int k = 1; k < LAT; k++) idx_p[k] <= idx_p[k-1];
    end
  end

  assign w_valid = v_p[LAT-1];
  assign w_idx   = idx_p[LAT-1];
  assign done    = w_valid && (w_idx == 2'd3);

  // ---- channel matrix and its conjugate transpose -------------------------
  cdata_t h [4][4];   // h[r][k] = H[r][k]
  cdata_t hh [4][4];  // hh[k][j] = H^H[k][j] = conj(H[j][k])

  always_comb begin
    h[0][0] = a[0];          h[0][1] = a[1];          h[0][2] = a[2];          h[0][3] = a[3];
    h[1][0] = cneg_d(conj_d(a[1]));  h[1][1] = conj_d(a[0]);
    h[1][2] = cneg_d(conj_d(a[3]));  h[1][3] = conj_d(a[2]);
    h[2][0] = a[4];          h[2][1] = a[5];          h[2][2] = a[6];          h[2][3] = a[7];
    h[3][0] = cneg_d(conj_d(a[5]));  h[3][1] = conj_d(a[4]);
    h[3][2] = cneg_d(conj_d(a[7]));  h[3][3] = conj_d(a[6]);
    for (int k = 0; k < 4; k++)
      for (int j = 0; j < 4; j++)
        hh[k][j] = conj_d(h[j][k]);
  end

  // ---- the four MAC circuits, one per row of W ----------------------------
  data_t  d_row [4];
  cdata_t p_row [4], q_row [4];

  always_comb begin
    d_row[0] = c1; p_row[0] = c3;                 q_row[0] = c4;
    d_row[1] = c1; p_row[1] = cneg_d(conj_d(c4)); q_row[1] = conj_d(c3);
    d_row[2] = c2; p_row[2] = conj_d(c3);         q_row[2] = cneg_d(c4);
    d_row[3] = c2; p_row[3] = conj_d(c4);         q_row[3] = c3;
  end

  // column of B^-1 whose entry feeds d, p and q of each row
  localparam int KD [4] = '{0, 1, 2, 3};
  localparam int KP [4] = '{2, 2, 0, 0};
  localparam int KQ [4] = '{3, 3, 1, 1};

  for (genvar i = 0; i < 4; i++) begin : g_mac
    cdata_t xd [4], xp [4], xq [4];

    always_comb begin
      for (int j = 0; j < 4; j++) begin
        xd[j] = hh[KD[i]][j];
        xp[j] = hh[KP[i]][j];
        xq[j] = hh[KQ[i]][j];
      end
    end

    w_mac u_mac (
      .clk, .sel, .d(d_row[i]), .p(p_row[i]), .q(q_row[i]),
      .xd, .xp, .xq, .y(w_col[i])
    );
  end
endmodule
