// turbo_pkg: shared constants, types and trellis functions of the radix-4
// parallel turbo decoder.
//
// The component code is an 8-state, rate-1/2 recursive systematic
// convolutional (RSC) code. The decoder works on 2-bit symbols: one radix-4
// trellis step consumes the pair (d1, d2), d1 first in time, and is written as
// the pair index p = 2*d2 + d1 (the "Ex_n, n = 2*i2 + i1" numbering). The four
// code bits of a step form the branch codeword c = {x1, y1, x2, y2} (x =
// systematic, y = parity), so bm index 4'b0000 is "bm0000".
//
// Word widths follow the fixed-point choice of 8-bit received samples and
// 9-bit branch metrics, state metrics and LLRs. The generator polynomials are
// this design's choice (the 8-state pair 13/15 octal); the radix-4 collapse of
// two radix-2 steps follows the look-ahead construction of the design.
package turbo_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned RQ = 8;       // received sample width
  localparam int unsigned BQ = 9;       // branch metric width
  localparam int unsigned SQ = 9;       // state metric width
  localparam int unsigned LQ = 9;       // LLR / extrinsic width
  localparam int unsigned NSTATE = 8;   // trellis states

  // RSC generators, coefficient of D^0 in the MSB (13 and 15 octal).
  localparam logic [3:0] G_FB = 4'b1011;  // feedback   1 + D^2 + D^3
  localparam logic [3:0] G_FF = 4'b1101;  // feed-fwd   1 + D   + D^3

  typedef logic signed [RQ-1:0] rx_t;
  typedef logic signed [BQ-1:0] bm_t;
  typedef logic signed [SQ-1:0] sm_t;
  typedef logic signed [LQ-1:0] llr_t;

  typedef sm_t  sm_vec_t  [NSTATE];  // one metric per state
  typedef bm_t  bm_vec_t  [16];      // one metric per branch codeword
  typedef llr_t llr_vec_t [4];       // one value per pair p

  // Received values of one radix-4 step: systematic I1, I2 and parity Q1, Q2.
  typedef struct packed {
    rx_t i1;
    rx_t i2;
    rx_t q1;
    rx_t q2;
  } rx_sym_t;

  localparam sm_t SM_MIN = sm_t'(-(1 << (SQ-1)));

  // ------------------------------------------------------ radix-2 trellis
  // State s = {r1, r2, r3}, r1 the most recent register.
  function automatic logic rsc_fb(input logic [2:0] s, input logic d);
    rsc_fb = d ^ (G_FB[2] & s[2]) ^ (G_FB[1] & s[1]) ^ (G_FB[0] & s[0]);
  endfunction

  function automatic logic rsc_par(input logic [2:0] s, input logic d);
    logic a;
    a = rsc_fb(s, d);
    rsc_par = (G_FF[3] & a) ^ (G_FF[2] & s[2]) ^ (G_FF[1] & s[1]) ^ (G_FF[0] & s[0]);
  endfunction

  function automatic logic [2:0] rsc_next(input logic [2:0] s, input logic d);
    rsc_next = {rsc_fb(s, d), s[2], s[1]};
  endfunction

  // ------------------------------------------------------ radix-4 trellis
  // State reached two bits after s for pair p (f(p, m) of the recursion).
  function automatic logic [2:0] r4_next(input logic [2:0] s, input logic [1:0] p);
    r4_next = rsc_next(rsc_next(s, p[0]), p[1]);
  endfunction

  // Branch codeword {x1, y1, x2, y2} of pair p leaving state s.
  function automatic logic [3:0] r4_cw(input logic [2:0] s, input logic [1:0] p);
    logic [2:0] s1;
    s1 = rsc_next(s, p[0]);
    r4_cw = {p[0], rsc_par(s, p[0]), p[1], rsc_par(s1, p[1])};
  endfunction

  // ------------------------------------------------------ saturation
  function automatic bm_t sat_bm(input logic signed [15:0] v);
    if (v > 16'sd255)       sat_bm = bm_t'(255);
    else if (v < -16'sd256) sat_bm = bm_t'(-256);
    else                    sat_bm = bm_t'(v);
  endfunction

  function automatic sm_t sat_sm(input logic signed [15:0] v);
    if (v > 16'sd255)       sat_sm = sm_t'(255);
    else if (v < -16'sd256) sat_sm = sm_t'(-256);
    else                    sat_sm = sm_t'(v);
  endfunction

  function automatic llr_t sat_llr(input logic signed [15:0] v);
    if (v > 16'sd255)       sat_llr = llr_t'(255);
    else if (v < -16'sd256) sat_llr = llr_t'(-256);
    else                    sat_llr = llr_t'(v);
  endfunction

endpackage
