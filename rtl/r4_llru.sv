// r4_llru: radix-4 LLR unit (used as the forward unit, FLLRu, and the backward
// unit, BLLRu).
//
// For one radix-4 step k it combines alpha_k, the branch metrics of the step
// and beta_{k+2}:
//   lambda(p) = max over m of alpha_k(m) + bm[codeword(m, p)] + beta_{k+2}(next(m, p))
// for the four pair values p = 00, 01, 10, 11 (max-log form of the symbol
// a-posteriori probability). It outputs llr[p] = lambda(p) - lambda(0),
// saturated to 9 bits (so llr[0] = 0), and the hard pair decision, the p with
// the largest lambda (lowest p on a tie). Purely combinational.
// Four outputs LLR0..LLR3 per unit follow the published architecture; the
// max-log form and the output relative to pair 00 are this design's choices.
module r4_llru
  import turbo_pkg::*;
(
  input  sm_vec_t  alpha,
  input  sm_vec_t  beta,
  input  bm_vec_t  bm,
  output llr_vec_t llr,
  output logic [1:0] dec
);
  always_comb begin
    logic signed [15:0] lam [4];
    logic signed [15:0] cand, top;
    for (int p = 0; p < 4; p++) begin
      lam[p] = -16'sd32768;
      for (int m = 0; m < NSTATE; m++) begin
        cand = 16'(alpha[m]) + 16'(bm[r4_cw(3'(m), 2'(p))])
             + 16'(beta[r4_next(3'(m), 2'(p))]);
        if (cand > lam[p]) lam[p] = cand;
      end
    end
    dec = 2'd0;
    top = lam[0];
    for (int p = 1; p < 4; p++) begin
      if (lam[p] > top) begin
        top = lam[p];
        dec = 2'(p);
      end
    end
    for (int p = 0; p < 4; p++) llr[p] = sat_llr(lam[p] - lam[0]);
  end
endmodule
