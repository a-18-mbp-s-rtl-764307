// r4_fsmu: radix-4 forward state metric unit (R4FSMu), also used to carry the
// forward recursion on through the second half of the block for the forward
// LLR unit.
//
// Holds alpha_k for the eight states. On each enabled clock it performs one
// radix-4 add-compare-select step: every state m at k+2 takes the maximum over
// its four predecessor branches (state m', pair p with next(m', p) = m) of
// alpha_k(m') + bm[codeword(m', p)] (max-log form of the radix-4 forward
// recursion). The new metrics are normalised by subtracting their maximum, so
// the best state is 0, and saturated to 9 bits.
// init loads alpha_0: 0 for state 0 and the most negative value elsewhere
// (the encoder starts in state 0). alpha is a register output; one step per
// cycle.
// The radix-4 recursion and the starting state follow the published design;
// the max-log arithmetic and max-normalisation are this design's choices.
module r4_fsmu
  import turbo_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    init,
  input  logic    step,
  input  bm_vec_t bm,
  output sm_vec_t alpha
);
  sm_vec_t alpha_nx;

  always_comb begin
    logic signed [15:0] best [NSTATE];
    logic signed [15:0] cand, top;
    for (int m = 0; m < NSTATE; m++) best[m] = -16'sd32768;
    for (int m = 0; m < NSTATE; m++) begin
      for (int p = 0; p < 4; p++) begin
        cand = 16'(alpha[m]) + 16'(bm[r4_cw(3'(m), 2'(p))]);
        if (cand > best[r4_next(3'(m), 2'(p))]) best[r4_next(3'(m), 2'(p))] = cand;
      end
    end
    top = best[0];
    for (int m = 1; m < NSTATE; m++) if (best[m] > top) top = best[m];
    for (int m = 0; m < NSTATE; m++) alpha_nx[m] = sat_sm(best[m] - top);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < NSTATE; m++) alpha[m] <= (m == 0) ? sm_t'(0) : SM_MIN;
    end else if (init) begin
      for (int m = 0; m < NSTATE; m++) alpha[m] <= (m == 0) ? sm_t'(0) : SM_MIN;
    end else if (step) begin
      alpha <= alpha_nx;
    end
  end
endmodule
