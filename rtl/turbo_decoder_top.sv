// turbo_decoder_top: 8-state, rate-1/2 parallel turbo decoder with radix-4,
// dual-path MAP decoders and hard-decision-aided early stop.
//
// Data flow. The receiver writes one word per 2-bit symbol k (natural order)
// through the rx_* port: the systematic samples I1, I2, the two parity samples
// of encoder 1, and the two parity samples encoder 2 produced when it took in
// symbol k (punctured parities are written as 0). Each decoder has two copies
// of its received-symbol RAM (128 x 32), one read by its forward path and one
// by its backward path. After start, turbo_ctrl runs iterations in which MAP 1
// (natural order) and MAP 2 (interleaved order, every memory access at
// address pi(j) from sym_interleaver) decode at the same time. The extrinsic
// ALUs ("LLR - ICH - EX") write each decoder's extrinsic values into a pair of
// 128 x 36 RAMs used in ping-pong fashion: one is written in this iteration
// while the other decoder reads the one written in the previous iteration.
// After each iteration the HDA unit compares both decoders' hard decisions;
// with early_stop_en, agreement ends decoding. Decoded pairs are read through
// dec_addr / dec_pair as the decision on the sum of both decoders' LLRs.
// Timing: NS + 2 cycles per iteration (NS = N/2 symbols), so 3 iterations of
// a 212-bit block take 324 cycles from start to done.
// Encoder 1 is assumed terminated in state 0 (MAP 1 starts its backward
// recursion there); encoder 2 is not, so MAP 2 starts from equal metrics.
// rx writes and dec reads are only meaningful while busy is low.
// The block structure (two MAPs, two received-symbol RAMs and two ALU/RAM
// pairs per MAP, interleaver address buses), memory sizes and widths follow
// the published architecture; the receive and output interfaces, ping-pong
// use of the extrinsic RAMs, polynomials and interleaver are this design's.
module turbo_decoder_top
  import turbo_pkg::*;
#(
  parameter int unsigned N         = 212,  // information bits per block
  parameter int unsigned MAX_ITER  = 3,
  parameter int unsigned IL_A      = 31,   // interleaver pi(j) = (IL_A*j + IL_B) mod N/2
  parameter int unsigned IL_B      = 7,
  parameter int unsigned RX_DEPTH  = 128,
  parameter int unsigned EXT_DEPTH = 128,
  parameter int unsigned SM_DEPTH  = 64,
  localparam int unsigned NS       = N / 2,
  localparam int unsigned AW       = $clog2(NS),
  localparam int unsigned RAW      = $clog2(RX_DEPTH),
  localparam int unsigned EAW      = $clog2(EXT_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // received symbols
  input  logic          rx_we,
  input  logic [AW-1:0] rx_addr,
  input  rx_t           rx_i1,
  input  rx_t           rx_i2,
  input  rx_t           rx_p1a,
  input  rx_t           rx_p1b,
  input  rx_t           rx_p2a,
  input  rx_t           rx_p2b,
  // control and status
  input  logic          start,
  input  logic          early_stop_en,
  output logic          busy,
  output logic          done,
  output logic [7:0]    iters_used,
  output logic          early_stopped,
  output logic [AW:0]   hda_mismatches,   // symbols the decoders disagree on
  // decoded output
  input  logic [AW-1:0] dec_addr,
  output logic [1:0]    dec_pair,
  output logic signed [LQ:0] dec_llr_sum [4]  // summed LLRs of symbol dec_addr
);
  initial begin
    assert (N % 4 == 0) else $error("turbo_decoder_top: N must be a multiple of 4");
    assert (NS <= RX_DEPTH && NS <= EXT_DEPTH) else $error("turbo_decoder_top: RAMs too small");
  end

  // ------------------------------------------------------------ control
  logic          init, run, phase2, apriori_en, wbank, hda_match;
  logic [AW-1:0] t, fwd_idx, bwd_idx, pi_f, pi_b;

  turbo_ctrl #(.NS(NS), .MAX_ITER(MAX_ITER)) u_ctrl (
    .clk, .rst_n, .start, .early_stop_en, .hda_match,
    .busy, .done, .init, .run, .phase2, .t, .fwd_idx, .bwd_idx,
    .apriori_en, .wbank, .iters_used, .early_stopped);

  sym_interleaver #(.NS(NS), .A(IL_A), .B(IL_B)) u_il_fwd (.j(fwd_idx), .pi(pi_f));
  sym_interleaver #(.NS(NS), .A(IL_A), .B(IL_B)) u_il_bwd (.j(bwd_idx), .pi(pi_b));

  // Natural-order memory addresses of the symbols each path works on.
  logic [AW-1:0] a1f, a1b, a2f, a2b;
  assign a1f = fwd_idx;
  assign a1b = bwd_idx;
  assign a2f = pi_f;
  assign a2b = pi_b;

  // ------------------------------------------------------ received RAMs
  rx_sym_t w1, w2, rx1f, rx1b, rx2f, rx2b;
  assign w1 = '{i1: rx_i1, i2: rx_i2, q1: rx_p1a, q2: rx_p1b};
  assign w2 = '{i1: rx_i1, i2: rx_i2, q1: rx_p2a, q2: rx_p2b};

  dp_ram #(.DEPTH(RX_DEPTH), .WIDTH(32)) u_rx1_fwd (
    .clk, .we(rx_we), .waddr(RAW'(rx_addr)), .wdata(w1), .raddr(RAW'(a1f)), .rdata(rx1f));
  dp_ram #(.DEPTH(RX_DEPTH), .WIDTH(32)) u_rx1_bwd (
    .clk, .we(rx_we), .waddr(RAW'(rx_addr)), .wdata(w1), .raddr(RAW'(a1b)), .rdata(rx1b));
  dp_ram #(.DEPTH(RX_DEPTH), .WIDTH(32)) u_rx2_fwd (
    .clk, .we(rx_we), .waddr(RAW'(rx_addr)), .wdata(w2), .raddr(RAW'(a2f)), .rdata(rx2f));
  dp_ram #(.DEPTH(RX_DEPTH), .WIDTH(32)) u_rx2_bwd (
    .clk, .we(rx_we), .waddr(RAW'(rx_addr)), .wdata(w2), .raddr(RAW'(a2b)), .rdata(rx2b));

  // ------------------------------------------------------ extrinsic RAMs
  // ext1_*: written by MAP 1, read by MAP 2; ext2_*: the other way round.
  logic [4*LQ-1:0] e1w_f, e1w_b, e2w_f, e2w_b;
  logic [4*LQ-1:0] e1r_f [2], e1r_b [2], e2r_f [2], e2r_b [2];
  llr_vec_t ex1_f, ex1_b, ex2_f, ex2_b;      // a-priori inputs of MAP 1 / MAP 2
  llr_vec_t xo1_f, xo1_b, xo2_f, xo2_b;      // extrinsic outputs of the ALUs
  llr_vec_t l1_f, l1_b, l2_f, l2_b;
  logic [1:0] d1_f, d1_b, d2_f, d2_b;
  logic       v1, v2;

  always_comb begin
    for (int p = 0; p < 4; p++) begin
      e1w_f[p*LQ +: LQ] = xo1_f[p];
      e1w_b[p*LQ +: LQ] = xo1_b[p];
      e2w_f[p*LQ +: LQ] = xo2_f[p];
      e2w_b[p*LQ +: LQ] = xo2_b[p];
      ex1_f[p] = e2r_f[~wbank][p*LQ +: LQ];
      ex1_b[p] = e2r_b[~wbank][p*LQ +: LQ];
      ex2_f[p] = e1r_f[~wbank][p*LQ +: LQ];
      ex2_b[p] = e1r_b[~wbank][p*LQ +: LQ];
    end
  end

  for (genvar b = 0; b < 2; b++) begin : g_bank
    ext_ram #(.DEPTH(EXT_DEPTH), .WIDTH(4*LQ)) u_ext1 (
      .clk,
      .we0(v1 && wbank == 1'(b)), .waddr0(EAW'(a1f)), .wdata0(e1w_f),
      .we1(v1 && wbank == 1'(b)), .waddr1(EAW'(a1b)), .wdata1(e1w_b),
      .raddr0(EAW'(a2f)), .rdata0(e1r_f[b]),
      .raddr1(EAW'(a2b)), .rdata1(e1r_b[b]));
    ext_ram #(.DEPTH(EXT_DEPTH), .WIDTH(4*LQ)) u_ext2 (
      .clk,
      .we0(v2 && wbank == 1'(b)), .waddr0(EAW'(a2f)), .wdata0(e2w_f),
      .we1(v2 && wbank == 1'(b)), .waddr1(EAW'(a2b)), .wdata1(e2w_b),
      .raddr0(EAW'(a1f)), .rdata0(e2r_f[b]),
      .raddr1(EAW'(a1b)), .rdata1(e2r_b[b]));
  end

  // ------------------------------------------------------ MAP decoders
  r4_map #(.NS(NS), .SM_DEPTH(SM_DEPTH), .BETA_UNIFORM(1'b0)) u_map1 (
    .clk, .rst_n, .init, .run, .phase2, .t, .apriori_en,
    .fwd_rx(rx1f), .fwd_ex(ex1_f), .bwd_rx(rx1b), .bwd_ex(ex1_b),
    .llr_valid(v1), .fwd_llr(l1_f), .fwd_dec(d1_f), .bwd_llr(l1_b), .bwd_dec(d1_b));

  r4_map #(.NS(NS), .SM_DEPTH(SM_DEPTH), .BETA_UNIFORM(1'b1)) u_map2 (
    .clk, .rst_n, .init, .run, .phase2, .t, .apriori_en,
    .fwd_rx(rx2f), .fwd_ex(ex2_f), .bwd_rx(rx2b), .bwd_ex(ex2_b),
    .llr_valid(v2), .fwd_llr(l2_f), .fwd_dec(d2_f), .bwd_llr(l2_b), .bwd_dec(d2_b));

  // ------------------------------------------------------ extrinsic ALUs
  ext_alu u_alu1_f (.llr(l1_f), .i1(rx1f.i1), .i2(rx1f.i2), .ex_in(ex1_f),
                    .apriori_en, .ex_out(xo1_f));
  ext_alu u_alu1_b (.llr(l1_b), .i1(rx1b.i1), .i2(rx1b.i2), .ex_in(ex1_b),
                    .apriori_en, .ex_out(xo1_b));
  ext_alu u_alu2_f (.llr(l2_f), .i1(rx2f.i1), .i2(rx2f.i2), .ex_in(ex2_f),
                    .apriori_en, .ex_out(xo2_f));
  ext_alu u_alu2_b (.llr(l2_b), .i1(rx2b.i1), .i2(rx2b.i2), .ex_in(ex2_b),
                    .apriori_en, .ex_out(xo2_b));

  // ------------------------------------------------------ early stop, output
  hda_early_stop #(.NS(NS)) u_hda (
    .clk, .rst_n,
    .a_we0(v1), .a_addr0(a1f), .a_dec0(d1_f), .a_we1(v1), .a_addr1(a1b), .a_dec1(d1_b),
    .b_we0(v2), .b_addr0(a2f), .b_dec0(d2_f), .b_we1(v2), .b_addr1(a2b), .b_dec1(d2_b),
    .match(hda_match), .mismatches(hda_mismatches));

  llr_sum_decision #(.NS(NS)) u_out (
    .clk, .rst_n,
    .a_we0(v1), .a_addr0(a1f), .a_llr0(l1_f), .a_we1(v1), .a_addr1(a1b), .a_llr1(l1_b),
    .b_we0(v2), .b_addr0(a2f), .b_llr0(l2_f), .b_we1(v2), .b_addr1(a2b), .b_llr1(l2_b),
    .rd_addr(dec_addr), .rd_pair(dec_pair), .rd_sum(dec_llr_sum));
endmodule
