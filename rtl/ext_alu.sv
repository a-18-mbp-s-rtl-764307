// ext_alu: extrinsic information ALU ("LLR - ICH - EX").
//
// From the symbol LLRs of one radix-4 step it removes the two parts the
// decoder did not learn itself: the intrinsic channel value of the
// systematic samples (p[0]*I1 + p[1]*I2 for pair p, the same correlation the
// branch metrics use) and the a-priori extrinsic value it was given
// (ex_in[p] - ex_in[0]). What is left, saturated to 9 bits, is the extrinsic
// value handed to the other decoder; ex_out[0] is 0 by construction.
// apriori_en = 0 treats the a-priori input as zero. Purely combinational.
// The three operands follow the published ALU; the exact formula is this
// design's, matched to the branch metric convention of r4_bmu.
module ext_alu
  import turbo_pkg::*;
(
  input  llr_vec_t llr,
  input  rx_t      i1,
  input  rx_t      i2,
  input  llr_vec_t ex_in,
  input  logic     apriori_en,
  output llr_vec_t ex_out
);
  always_comb begin
    logic signed [15:0] v;
    for (int p = 0; p < 4; p++) begin
      v = 16'(llr[p]);
      if (p[0]) v -= 16'(i1);
      if (p[1]) v -= 16'(i2);
      if (apriori_en) v = v - 16'(ex_in[p]) + 16'(ex_in[0]);
      ex_out[p] = (p == 0) ? llr_t'(0) : sat_llr(v);
    end
  end
endmodule
