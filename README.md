# LMMSE equalization matrix for a two-user Alamouti 4x4 MIMO receiver

A linear MMSE MIMO detector estimates the transmitted symbols as
`s = W y` with

    W = (H^H H + sigma^2 I)^-1 H^H

W only has to be recomputed when the channel changes (once per coherence
time, per subcarrier). Inverting a general 4x4 complex matrix usually calls
for a QR decomposition with square roots and many divisions. This RTL does
without one. In a two-user downlink where every user receives a 2x2
Alamouti space-time block code, the channel matrix has a fixed pattern:

         [ a1   a2   a3   a4  ]
    H =  [-a2*  a1* -a4*  a3* ]
         [ a5   a6   a7   a8  ]
         [-a6*  a5* -a8*  a7* ]

The whole computation then reduces to a few scalars. The design takes the
eight complex channel entries a1..a8 and the noise variance sigma^2. It
returns the 4x4 complex W one column per cycle. The last column comes out
21 clock cycles after the start, or 20 cycles with the larger parallel
variant.

## Why the Alamouti pattern makes inversion cheap

`B = H^H H + sigma^2 I` has only four distinct entries:

         [ b1   0    b3   b4  ]      b1 = |a1|^2+|a2|^2+|a5|^2+|a6|^2 + sigma^2
    B =  [ 0    b1  -b4*  b3* ]      b2 = |a3|^2+|a4|^2+|a7|^2+|a8|^2 + sigma^2
         [ b3* -b4   b2   0   ]      b3 = a1* a3 + a2 a4* + a5* a7 + a6 a8*
         [ b4*  b3   0    b2  ]      b4 = a1* a4 - a2 a3* + a5* a8 - a6 a7*

Split B into 2x2 blocks `[[b1 I, M], [M^H, b2 I]]`. The off-diagonal block
`M = [[b3, b4], [-b4*, b3*]]` is itself an Alamouti matrix, so
`M M^H = beta I` with `beta = |b3|^2 + |b4|^2`. In the blockwise inversion
formula every block is therefore a scalar times I or M. The Schur
complement is `(b2 - beta/b1) I`, and the inverse keeps the pattern of B:

            [ c1   0    c3   c4  ]     alpha = 1/b1
    B^-1 =  [ 0    c1  -c4*  c3* ]     gamma = 1/(b1 b2 - beta)
            [ c3* -c4   c2   0   ]     c1 = alpha + beta*gamma*alpha
            [ c4*  c3   0    c2  ]     c2 = gamma*b1
                                       c3 = -gamma*b3,  c4 = -gamma*b4

So the 4x4 inverse takes two reciprocals, one determinant-like difference
and a handful of multiplications. B is Hermitian positive definite for
sigma^2 > 0, so `b1` and `b1 b2 - beta` are both positive.

Note that c3 and c4 are scaled by gamma, not by alpha. The off-diagonal
block of the inverse is `-A^-1 M S^-1 = -(1/b1) M (b1 gamma) = -gamma M`.
An alpha-scaled version looks plausible but does not invert B, and
`tb_abami_inv` would reject it.

## Number formats and the factor 100

| word | format | used for |
|---|---|---|
| data word | 20-bit signed, Q8.12 (range +-128, step 2^-12) | a1..a8, sigma^2, c1..c4, W |
| product word | 40-bit signed, Q16.24 | every product and every adder that sums products; all of the inversion stage |

Multiplier outputs are never rounded before they are summed. Narrowing
from Q16.24 to Q8.12, and rounding a 40x40 product back to Q16.24, use
round-half-up with saturation (`lmmse_pkg::a2d`, `lmmse_pkg::mulq`).

**c1..c4 and W are produced multiplied by 100.** Both reciprocals are
computed as `100/x`. This keeps small inverse entries well above the
quantization step of the 20-bit outputs. To carry the factor only once,
`beta*gamma*alpha` in c1 is multiplied by the constant 1/100 (Q16.24,
rounded). Downstream logic must take the factor into account. It
does not matter for hard decisions on constellations without amplitude
information.

Range: every entry of `100 * B^-1` must stay below 128, or the output
saturates. The eigenvalues of B are at least sigma^2, so entries of B^-1
are at most 1/sigma^2. With sigma^2 >= 1 in Q8.12 nothing saturates. For
smaller noise variances the channel has to be scaled accordingly. The
testbenches use channel entries in [-1, 1) and sigma^2 in [0.25, 2].

The inputs have a limit of their own. The 40-bit sums that form b1..b4
wrap beyond +-32768. The inversion stage saturates b1*b2 at the same
bound, so b1 and b2 must stay below about 181. For a channel normalized
to unit average gain, b1 and b2 are around 4 + sigma^2, far inside this
range. The full Q8.12 input range of +-128 per part is not usable.

## Datapath

    a1..a8, sigma^2 -> [input registers] -> bmat_unit -> abami_inv -> w_unit -> W
                                   (B: b1..b4)    (c1..c4)    (4 MACs)

### Computing B (`bmat_unit`, parameter `METHOD`)

* **METHOD = 1, parallel.** `b12_par` has eight square units
  (`cplx_sqabs`, two multipliers and an adder each) and two 40-bit adder
  trees. `b34_par` has eight complex multipliers (`cplx_mult`, four
  multipliers and two adders each) and separate real and imaginary adders.
  The conjugates come from two's complement units (`twos_comp`) on the
  imaginary parts. All four entries are ready after one pass.
* **METHOD = 2, shared (default).** b1 and b2 have the same form, and so
  do b3 and b4. `b12_mux` therefore uses four square units behind eight
  2:1 multiplexers. `b34_mux` uses four complex multipliers. Their first
  factors a1*, a2, a5*, a6 are common to b3 and b4, so only the second
  factors are multiplexed, and the adders of the 2nd and 4th terms switch
  to subtraction for b4. Pass 1 (`sel = 0`) gives b1 and b3, pass 2 gives
  b2 and b4. This costs one cycle and saves half of the square units and
  complex multipliers.

### Inverting B (`abami_inv`)

A ten-stage pipeline. Edges are counted from the cycle in which b1..b4 are
valid:

| edge | operation |
|---|---|
| 1 | b1*b2, \|b3\|^2, \|b4\|^2 (40-bit square units); `fx_divider` starts 100/b1 |
| 2 | beta = \|b3\|^2 + \|b4\|^2 |
| 3 | det = b1 b2 - beta; alpha ready (divider, 3 stages) |
| 4-6 | `fx_divider` computes gamma = 100/det |
| 7 | c2 = gamma b1, c3 = -gamma b3, c4 = -gamma b4, t1 = beta gamma |
| 8 | t2 = t1 alpha |
| 9 | t3 = t2 / 100 (constant multiply) |
| 10 | c1 = alpha + t3; c1..c4 rounded to Q8.12; `out_valid` |

Delay lines carry b1, b3, b4, beta and alpha to the stages that use them,
so the pipeline accepts a new B every cycle, although the top uses it once
per matrix. `fx_divider` is a signed restoring long divider: magnitudes,
one quotient bit per compare-and-subtract, with the 39 quotient bits split
evenly over 3 register stages. A zero divisor or a quotient out of range
saturates. The quotient truncates toward zero.

### Multiplying by H^H (`w_unit`, `w_mac`)

Each row of B^-1 has one real entry (c1 or c2) and two complex ones. One
element of W in row i is therefore `d*x_d + p*x_p + q*x_q`. `w_mac`
computes it with a real-by-complex multiplier, two complex multipliers and
40-bit adders. Its 4:1 multiplexers pick the three H^H entries of column
j. Each MAC has four register stages: multiplexer outputs, products, sum,
rounded result. `w_unit` has four MACs, one per row of W, driven by a
shared column counter. Four columns take four cycles, and W comes out one
column (four complex elements) per cycle. The coefficients per row are:

| row | d | p (B^-1 column) | q (B^-1 column) |
|---|---|---|---|
| 0 | c1 | c3 (2) | c4 (3) |
| 1 | c1 | -c4* (2) | c3* (3) |
| 2 | c2 | c3* (0) | -c4 (1) |
| 3 | c2 | c4* (0) | c3 (1) |

H^H is formed as the true conjugate transpose of H, `H^H[k][j] = conj(H[j][k])`.

## Interface and timing of `lmmse_w_top`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset of the control state |
| `start` / `ready` | in / out | `start` while `ready` loads `a` and `sigma2`; ignored while busy |
| `a[0:7]` (`cdata_t`), `sigma2` (`data_t`) | in | a1..a8 and sigma^2, Q8.12; only sampled with `start` |
| `binv_valid`, `c1`, `c2`, `c3`, `c4` | out | 100 * B^-1, valid from the `binv_valid` pulse until the next matrix |
| `w_valid`, `w_idx`, `w_col[0:3]` | out | `w_col[i]` = 100 * W[i][w_idx], one column per cycle, columns 0..3 in order |
| `done` | out | with the last column |

Cycle count, with the start cycle counted as cycle 1:

| | METHOD = 1 | METHOD = 2 |
|---|---|---|
| B ready (registered) | end of cycle 3 | end of cycle 4 |
| 100 B^-1 ready (`binv_valid` next cycle) | end of cycle 13 | end of cycle 14 |
| first column of W | end of cycle 17 | end of cycle 18 |
| last column of W (`done` next cycle) | **end of cycle 20** | **end of cycle 21** |
| next start accepted | cycle 22 | cycle 23 |

The core processes one channel matrix at a time.

## How closely this follows the original design, and where it departs

Taken from the design description: the Alamouti form of H, B and B^-1; the
formulas for b1..b4 and alpha, beta, gamma, c1, c2; the two ways of
computing B (parallel units, or shared units with eight multiplexers
each); four MAC circuits with 4:1 multiplexers, each producing one row of
W; 20-bit data words with 8 integer and 12 fraction bits, full 40-bit
products and 40-bit adders; the common factor 100 on c1..c4; and the
totals of 20 (Method I) and 21 (Method II) cycles to compute W.

This design's own choices and deviations:

* **c3 = -gamma b3, c4 = -gamma b4.** The original states c3 = -alpha b3
  and c4 = -alpha b4. That form does not invert B. This design uses the
  form derived above, which agrees with a general matrix inverse in the
  testbenches.
* **H^H** is the conjugate transpose in every entry. The matrix written
  out as H^H in the original is the plain transpose of H; its first row
  is `a1, -a2*, a5, -a6*` where the conjugate transpose has
  `a1*, -a2, a5*, -a6`.
* **Divider.** The original divides 16-bit operands. Here the divider
  works on the 40-bit Q16.24 words with 24 quotient fraction bits and 3
  pipeline stages. The factor 100 is kept.
* **Inversion precision.** The whole inversion stage runs on 40-bit
  Q16.24 words, and its results are rounded to the 20-bit data word at the
  end. The square units and multipliers there are the same modules at
  twice the width.
* **How the factor 100 reaches c1** (the constant 1/100 multiply) is not
  specified in the original and is this design's choice.
* **Pipeline registers.** Their placement is chosen so that the totals
  match the 20/21 cycles: 1 input stage, 2/3 for B, 10 for the inverse, 4
  for the MACs, with W issued column by column.
* **Throughput.** Matrices do not overlap, so a new W is available every
  21 or 22 cycles. The original reports a per-subcarrier latency of about
  48.5 ns, about 6 cycles at its 128-130 MHz clock. That rate would need
  successive matrices to overlap in the pipeline, and this design does not
  implement it.
* **Reset, handshake, saturation** and the output format of W (Q8.12,
  carrying the factor 100) are this design's choices.
* **Outside the scope of this RTL:** applying W to the received symbols,
  the received-symbol buffer and channel estimation.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* `tb_twos_comp`, `tb_cplx_sqabs`, `tb_cplx_mult`: exact against 64-bit
  integer arithmetic, with edge codes.
* `tb_b12_par`, `tb_b34_par`, `tb_b12_mux`, `tb_b34_mux`, `tb_bmat_unit`:
  exact against B formed as inner products of the columns of H
  (`tb_bref_pkg`). `tb_bmat_unit` runs both methods and checks the 2/3
  cycle latency.
* `tb_fx_divider`: exact against 128-bit integer division, including
  zero divisors, overflow, exact quotients, back-to-back issue and the
  3-cycle latency.
* `tb_abami_inv`: c1..c4 against `100 * B^-1` from a general floating-point
  Gauss-Jordan inverse (`tb_ref_pkg`), within 2 LSB. It also checks the
  10-cycle latency, back-to-back inputs and saturation.
* `tb_w_mac`, `tb_w_unit`: exact against the full 4x4 integer product
  `B^-1 H^H`, plus column order and timing.
* `tb_lmmse_w_top`: end to end with METHOD 1 and 2 side by side on 40
  random channels. W is checked against the floating-point reference
  within 6 LSB and c1..c4 within 2 LSB. It also checks the 20/21-cycle
  totals, `ready`, and a start while busy being ignored.
* `tb_lmmse_full`: the top with all parameters at their defaults, on 20
  channels including a nearly singular H^H H.
* `tb_lmmse_subcarriers`: one W for each of the 512 subcarriers of a 5 MHz
  WiMAX channel, back to back, at the default parameters. It checks every
  W and the total of 512 x 22 = 11,264 cycles. At 128 MHz that is 88 us,
  far below a channel coherence time of about 8 ms (2.4 GHz carrier,
  60 km/h).

The reference models are independent of the RTL's algorithm. Inverses
come from Gauss-Jordan elimination, not from the closed form above.
Fixed-point results of the arithmetic units are compared bit for bit.

To simulate with Verilator (5.x), list the packages first. For example:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/lmmse_pkg.sv tb/tb_bref_pkg.sv tb/tb_ref_pkg.sv \
        tb/tb_lmmse_w_top.sv --top-module tb_lmmse_w_top
    ./obj_dir/Vtb_lmmse_w_top

Replace `tb_lmmse_w_top` with any other testbench name. Each runs in well
under a second.

## Files

| file | content |
|---|---|
| `rtl/lmmse_pkg.sv` | formats, types `data_t`, `acc_t`, `cdata_t`, `cacc_t`, rounding/saturation helpers |
| `rtl/twos_comp.sv`, `rtl/cplx_sqabs.sv`, `rtl/cplx_mult.sv` | two's complement unit, square unit, complex multiplier |
| `rtl/b12_par.sv`, `rtl/b34_par.sv` | parallel computation of b1/b2 and b3/b4 |
| `rtl/b12_mux.sv`, `rtl/b34_mux.sv` | shared computation of b1-or-b2 and b3-or-b4 |
| `rtl/bmat_unit.sv` | B computation, METHOD 1 or 2 |
| `rtl/fx_divider.sv` | pipelined fixed-point divider |
| `rtl/abami_inv.sv` | closed-form inversion of B |
| `rtl/w_mac.sv`, `rtl/w_unit.sv` | MAC circuit and the four-MAC W multiplier |
| `rtl/lmmse_w_top.sv` | top level |
| `tb/` | testbenches and reference packages `tb_ref_pkg`, `tb_bref_pkg` |
