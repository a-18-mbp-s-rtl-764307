// r4_bsmu: radix-4 backward state metric unit (R4BSMu), also used to carry the
// backward recursion on through the first half of the block for the backward
// LLR unit.
//
// Holds beta_{k+2} for the eight states. On each enabled clock it performs one
// radix-4 step from right to left: beta_k(m) is the maximum over the four
// pairs p of beta_{k+2}(next(m, p)) + bm[codeword(m, p)] (max-log form of the
// radix-4 backward recursion). The result is normalised so the best state is
// 0 and saturated to 9 bits.
// init loads beta_N: with init_uniform = 0, 0 for state 0 and the most
// negative value elsewhere (a trellis terminated in state 0); with
// init_uniform = 1 all states start equal (an unterminated trellis).
// beta is a register output; one step per cycle.
// The radix-4 recursion and the state-0 start follow the published design; the
// uniform start, max-log arithmetic and normalisation are this design's.
module r4_bsmu
  import turbo_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    init,
  input  logic    init_uniform,
  input  logic    step,
  input  bm_vec_t bm,
  output sm_vec_t beta
);
  sm_vec_t beta_nx;

  always_comb begin
    logic signed [15:0] best [NSTATE];
    logic signed [15:0] cand, top;
    for (int m = 0; m < NSTATE; m++) begin
      best[m] = -16'sd32768;
      for (int p = 0; p < 4; p++) begin
        cand = 16'(beta[r4_next(3'(m), 2'(p))]) + 16'(bm[r4_cw(3'(m), 2'(p))]);
        if (cand > best[m]) best[m] = cand;
      end
    end
    top = best[0];
    for (int m = 1; m < NSTATE; m++) if (best[m] > top) top = best[m];
    for (int m = 0; m < NSTATE; m++) beta_nx[m] = sat_sm(best[m] - top);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < NSTATE; m++) beta[m] <= (m == 0) ? sm_t'(0) : SM_MIN;
    end else if (init) begin
      for (int m = 0; m < NSTATE; m++)
        beta[m] <= (m == 0 || init_uniform) ? sm_t'(0) : SM_MIN;
    end else if (step) begin
      beta <= beta_nx;
    end
  end
endmodule
