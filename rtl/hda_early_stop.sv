// hda_early_stop: hard-decision-aided (HDA) early stop.
//
// Both component decoders write their hard pair decision for every symbol of
// the block during the LLR half of an iteration: two symbols per decoder per
// cycle (forward and backward LLR units), at natural-order addresses. match
// is high when the two sets of decisions agree on every symbol, which is the
// condition for ending the iteration loop; the controller samples it after
// the last decision of an iteration is written. mismatches counts the
// disagreeing symbols (for observation).
// The decision stores are registers cleared by reset; every entry is rewritten
// in every iteration.
// The stop rule (all decisions of both decoders agree) follows the published
// hard-decision-aided scheme; the storage and counting are this design's.
module hda_early_stop #(
  parameter int unsigned NS = 106,
  localparam int unsigned AW = $clog2(NS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // decoder 1 (two write ports)
  input  logic          a_we0,
  input  logic [AW-1:0] a_addr0,
  input  logic [1:0]    a_dec0,
  input  logic          a_we1,
  input  logic [AW-1:0] a_addr1,
  input  logic [1:0]    a_dec1,
  // decoder 2 (two write ports)
  input  logic          b_we0,
  input  logic [AW-1:0] b_addr0,
  input  logic [1:0]    b_dec0,
  input  logic          b_we1,
  input  logic [AW-1:0] b_addr1,
  input  logic [1:0]    b_dec1,
  output logic          match,
  output logic [AW:0]   mismatches
);
  logic [1:0] dec_a [NS];
  logic [1:0] dec_b [NS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NS; i++) begin
        dec_a[i] <= '0;
        dec_b[i] <= '0;
      end
    end else begin
      if (a_we1) dec_a[a_addr1] <= a_dec1;
      if (a_we0) dec_a[a_addr0] <= a_dec0;
      if (b_we1) dec_b[b_addr1] <= b_dec1;
      if (b_we0) dec_b[b_addr0] <= b_dec0;
    end
  end

  always_comb begin
    mismatches = '0;
    for (int i = 0; i < NS; i++)
      if (dec_a[i] != dec_b[i]) mismatches += (AW+1)'(1);
    match = (mismatches == '0);
  end
endmodule
