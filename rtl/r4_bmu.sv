// r4_bmu: radix-4 branch metric unit (used as both the forward unit, R4FBMu,
// and the backward unit, R4BBMu).
//
// For one radix-4 trellis step it forms the sixteen branch metrics
// bm0000..bm1111, one per branch codeword c = {x1, y1, x2, y2}. A metric is the
// correlation of the codeword with the received samples plus the a-priori
// (extrinsic) value of the information pair the codeword carries:
//   bm[c] = x1*I1 + y1*Q1 + x2*I2 + y2*Q2 + Ex[2*x2 + x1]
// A positive sample means "bit = 1 more likely". Only the bits that are 1 add
// their sample, which keeps every metric difference of the exact max-log
// branch metric (the common term is dropped). Results saturate to 9 bits.
// Purely combinational; apriori_en = 0 forces the extrinsic term to zero (the
// first iteration has no a-priori input).
// The sixteen-metric interface, the Ex0..Ex3 numbering and the 8/9-bit widths
// follow the published architecture; the one-sided correlation form and the
// {x1, y1, x2, y2} codeword order are this design's choices.
module r4_bmu
  import turbo_pkg::*;
(
  input  rx_sym_t  rx,
  input  llr_vec_t ex,
  input  logic     apriori_en,
  output bm_vec_t  bm
);
  always_comb begin
    for (int c = 0; c < 16; c++) begin
      logic signed [15:0] acc;
      logic [1:0]         p;
      acc = '0;
      if (c[3]) acc += 16'(rx.i1);
      if (c[2]) acc += 16'(rx.q1);
      if (c[1]) acc += 16'(rx.i2);
      if (c[0]) acc += 16'(rx.q2);
      p = {c[1], c[3]};
      if (apriori_en) acc += 16'(ex[p]);
      bm[c] = sat_bm(acc);
    end
  end
endmodule
