// llr_sum_decision: decoded-bit output of the parallel turbo decoder.
//
// The two component decoders run at the same time, so the decoded pair is
// taken from the sum of their LLR outputs:
//   D = argmax over p of (L1(p) + L2(p)),   p = 00, 01, 10, 11
// Each decoder writes its three LLRs L(01), L(10), L(11) (L(00) is 0) for two
// symbols per cycle into its own natural-order buffer. The read port returns,
// combinationally, the decoded pair {d2, d1} of symbol rd_addr (lowest p on a
// tie) and the summed LLRs. Buffers are registers cleared by reset.
// Deciding on the sum of both decoders' LLRs follows the published parallel
// scheme; summing the a-posteriori LLRs and the read port are this design's.
module llr_sum_decision
  import turbo_pkg::*;
#(
  parameter int unsigned NS = 106,
  localparam int unsigned AW = $clog2(NS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          a_we0,
  input  logic [AW-1:0] a_addr0,
  input  llr_vec_t      a_llr0,
  input  logic          a_we1,
  input  logic [AW-1:0] a_addr1,
  input  llr_vec_t      a_llr1,
  input  logic          b_we0,
  input  logic [AW-1:0] b_addr0,
  input  llr_vec_t      b_llr0,
  input  logic          b_we1,
  input  logic [AW-1:0] b_addr1,
  input  llr_vec_t      b_llr1,
  input  logic [AW-1:0] rd_addr,
  output logic [1:0]    rd_pair,
  output logic signed [LQ:0] rd_sum [4]
);
  typedef llr_t llr3_t [3];
  llr3_t buf_a [NS];
  llr3_t buf_b [NS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NS; i++)
        for (int p = 0; p < 3; p++) begin
          buf_a[i][p] <= '0;
          buf_b[i][p] <= '0;
        end
    end else begin
      for (int p = 0; p < 3; p++) begin
        if (a_we1) buf_a[a_addr1][p] <= a_llr1[p+1];
        if (a_we0) buf_a[a_addr0][p] <= a_llr0[p+1];
        if (b_we1) buf_b[b_addr1][p] <= b_llr1[p+1];
        if (b_we0) buf_b[b_addr0][p] <= b_llr0[p+1];
      end
    end
  end

  always_comb begin
    logic signed [LQ:0] top;
    rd_sum[0] = '0;
    for (int p = 1; p < 4; p++)
      rd_sum[p] = (LQ+1)'(buf_a[rd_addr][p-1]) + (LQ+1)'(buf_b[rd_addr][p-1]);
    rd_pair = 2'd0;
    top     = rd_sum[0];
    for (int p = 1; p < 4; p++) begin
      if (rd_sum[p] > top) begin
        top     = rd_sum[p];
        rd_pair = 2'(p);
      end
    end
  end
endmodule
