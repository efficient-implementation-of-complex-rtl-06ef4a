// lmmse_pkg: number formats and small arithmetic helpers shared by the
// LMMSE channel-preprocessing datapath.
//
// Two fixed-point formats are used throughout:
//   data word   : 20-bit signed, 8 integer bits (sign included) and 12
//                 fraction bits (Q8.12). Channel entries a1..a8, sigma^2,
//                 the entries c1..c4 of the (scaled) inverse and the
//                 elements of W are data words.
//   product word: 40-bit signed Q16.24, the full-precision product of two
//                 data words. All adders that sum products are 40 bits
//                 wide, and the inversion stage keeps its intermediate
//                 values in this format.
// The 20/40-bit split is the one the design is built around; the rounding
// (round half up) and the saturation on narrowing are this design's choice.
package lmmse_pkg;

  localparam int DW = 20;  // data word width
  localparam int DF = 12;  // data word fraction bits
  localparam int PW = 40;  // product / accumulator width
  localparam int PF = 24;  // product fraction bits

  typedef logic signed [DW-1:0] data_t;
  typedef logic signed [PW-1:0] acc_t;

  typedef struct packed {
    data_t re;
    data_t im;
  } cdata_t;

  typedef struct packed {
    acc_t re;
    acc_t im;
  } cacc_t;

  localparam data_t DATA_MAX = {1'b0, {(DW-1){1'b1}}};
  localparam data_t DATA_MIN = {1'b1, {(DW-1){1'b0}}};
  localparam acc_t  ACC_MAX  = {1'b0, {(PW-1){1'b1}}};
  localparam acc_t  ACC_MIN  = {1'b1, {(PW-1){1'b0}}};

  // Two's complement of a data word; the most negative code saturates.
  function automatic data_t neg_d(data_t x);
    return (x == DATA_MIN) ? DATA_MAX : -x;
  endfunction

  function automatic acc_t neg_a(acc_t x);
    return (x == ACC_MIN) ? ACC_MAX : -x;
  endfunction

  // Complex conjugate and negation of a data word.
  function automatic cdata_t conj_d(cdata_t x);
    return '{re: x.re, im: neg_d(x.im)};
  endfunction

  function automatic cdata_t cneg_d(cdata_t x);
    return '{re: neg_d(x.re), im: neg_d(x.im)};
  endfunction

  // Sign-extend a Q8.12 data word to a Q16.24 product word.
  function automatic acc_t d2a(data_t x);
    return acc_t'(x) <<< (PF - DF);
  endfunction

  // Round a Q16.24 word to Q8.12 (round half up) and saturate.
  function automatic data_t a2d(acc_t x);
    logic signed [PW:0] r;
    r = (PW+1)'(x) + (PW+1)'(1 <<< (PF-DF-1));
    r = r >>> (PF - DF);
    if (r > (PW+1)'(DATA_MAX)) return DATA_MAX;
    if (r < (PW+1)'(DATA_MIN)) return DATA_MIN;
    return data_t'(r);
  endfunction

  // Product of two Q16.24 words, rounded back to Q16.24 and saturated.
  function automatic acc_t mulq(acc_t x, acc_t y);
    logic signed [2*PW-1:0] p;
    p = (2*PW)'(x) * (2*PW)'(y);
    p = (p + ((2*PW)'(1) <<< (PF-1))) >>> PF;
    if (p > (2*PW)'(ACC_MAX)) return ACC_MAX;
    if (p < (2*PW)'(ACC_MIN)) return ACC_MIN;
    return acc_t'(p);
  endfunction

endpackage
