// turbo_pkg: word widths, trellis description and arithmetic helpers shared
// by the parallel CCSDS turbo decoder.
//
// Fixed-point formats follow the decoder's quantisation table: received
// channel values (5,2), extrinsic values (6,2), branch metrics (6,2) and state
// metrics (9,2), i.e. total bits with two fractional bits. The stored
// extrinsic code is 4 bits after the non-linear mapping.
//
// The constituent code is the CCSDS 16-state recursive systematic code:
// feedback 1+D^3+D^4, forward polynomials 1+D+D^3+D^4, 1+D^2+D^4 and
// 1+D+D^2+D^3+D^4. A state is {d1,d2,d3,d4} with d1 (the newest register) as
// the most significant bit, so an input 1 from the zero state leads to state 8.
//
// Branch metrics are indexed by a 4-bit "combination" {xs,x1,x2,x3} where a
// bit of 1 stands for the antipodal symbol +1 of that output.
package turbo_pkg;

  localparam int W_Y    = 5;   // received channel value
  localparam int W_EX   = 6;   // extrinsic / intrinsic value
  localparam int W_BM   = 6;   // branch metric
  localparam int W_SM   = 9;   // state metric
  localparam int W_Q    = 4;   // stored extrinsic code
  localparam int W_LLR  = 11;  // a-posteriori LLR before saturation
  localparam int W_LC   = 4;   // channel reliability Lc, two fractional bits
  localparam int NSTATE = 16;

  typedef logic signed [W_Y-1:0]   y_t;
  typedef logic signed [W_EX-1:0]  ex_t;
  typedef logic signed [W_BM-1:0]  bm_t;
  typedef logic signed [W_SM-1:0]  sm_t;
  typedef logic signed [W_LLR-1:0] llr_t;
  typedef logic        [W_Q-1:0]   exq_t;

  typedef sm_t sm_vec_t [NSTATE];
  typedef bm_t bm_vec_t [NSTATE];

  localparam sm_t SM_MIN = sm_t'(-(1 << (W_SM-1)));

  // Code-rate selector encoding.
  typedef enum logic [1:0] {RATE_1_2 = 2'd0, RATE_1_3 = 2'd1, RATE_1_4 = 2'd2, RATE_1_6 = 2'd3} rate_e;

  // Feedback register value entering d1.
  function automatic logic rsc_fb(input logic [3:0] s, input logic u);
    return u ^ s[1] ^ s[0];
  endfunction

  function automatic logic [3:0] rsc_next(input logic [3:0] s, input logic u);
    return {rsc_fb(s, u), s[3:1]};
  endfunction

  // Parity outputs {p1,p2,p3} for state s and input u.
  function automatic logic [2:0] rsc_par(input logic [3:0] s, input logic u);
    logic a;
    a = rsc_fb(s, u);
    return {a ^ s[3] ^ s[1] ^ s[0],
            a ^ s[2] ^ s[0],
            a ^ s[3] ^ s[2] ^ s[1] ^ s[0]};
  endfunction

  // Branch-metric combination index for the branch leaving s with input u.
  function automatic logic [3:0] branch_combo(input logic [3:0] s, input logic u);
    return {u, rsc_par(s, u)};
  endfunction

  // Symmetric saturation of a 32-bit value to a signed width w: [-(2^(w-1)-1), 2^(w-1)-1].
  function automatic int sat_sym(input int v, input int w);
    int lim;
    lim = (1 << (w-1)) - 1;
    if (v > lim)  return lim;
    if (v < -lim) return -lim;
    return v;
  endfunction

  // Correction term ln(1+exp(-|d|)) for |d| in units of 1/4, rounded to
  // units of 1/4: 0.69->3, 0.58..0.39->2, 0.31..0.13->1, beyond 2.25->0.
  function automatic int maxstar_lut(input int absd);
    if (absd == 0) return 3;
    if (absd < 4)  return 2;
    if (absd < 9)  return 1;
    return 0;
  endfunction

  // max*(a,b) = max(a,b) + ln(1+exp(-|a-b|)); with logmap=0 the max-log form.
  function automatic int max_star(input int a, input int b, input bit logmap);
    int d, m;
    d = (a > b) ? a - b : b - a;
    m = (a > b) ? a : b;
    return logmap ? m + maxstar_lut(d) : m;
  endfunction

endpackage
