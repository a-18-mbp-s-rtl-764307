// r4_map: radix-4, dual-path max-log MAP component decoder.
//
// One radix-4 step (two information bits) is processed per clock by each of
// two paths that run at the same time:
//   forward path : R4FBMu branch metrics -> R4FSMu forward recursion
//   backward path: R4BBMu branch metrics -> R4BSMu backward recursion
// During the first NS/2 cycles of a pass (phase2 = 0) the forward path walks
// symbols 0..NS/2-1 and stores each alpha_k it starts from in R4FSM_RAM; the
// backward path walks symbols NS-1..NS/2 and stores each beta_{k+2} it starts
// from in R4BSM_RAM. When the two paths meet in the middle (phase2 = 1) each
// path keeps recursing into the other half and its LLR unit combines the
// running metric with the one stored by the other path:
//   FLLRu: symbols NS/2..NS-1, left to right (alpha running, beta from RAM)
//   BLLRu: symbols NS/2-1..0,  right to left (beta running, alpha from RAM)
// so a pass over NS symbols takes NS cycles and yields two LLR sets per cycle
// in its second half.
// Interface: the caller supplies, every run cycle, the received samples and
// a-priori values of symbol fwd_idx (fwd_rx, fwd_ex) and of symbol bwd_idx
// (bwd_rx, bwd_ex), with the indices following turbo_ctrl's schedule; t is the
// step counter within the phase. init (one cycle before a pass) loads
// alpha_0 and beta_N. LLR outputs are combinational and valid while
// llr_valid is high, for the symbols the caller is supplying in that cycle.
// BETA_UNIFORM = 1 starts the backward recursion from equal metrics (for an
// unterminated trellis); 0 starts it from state 0.
// The unit set, the meeting-in-the-middle order and the RAM sizes follow the
// published design; the single-cycle step and combinational LLR outputs are
// this design's choices.
module r4_map
  import turbo_pkg::*;
#(
  parameter int unsigned NS           = 106,
  parameter int unsigned SM_DEPTH     = 64,
  parameter bit          BETA_UNIFORM = 1'b0,
  localparam int unsigned AW          = $clog2(NS),
  localparam int unsigned SAW         = $clog2(SM_DEPTH),
  localparam int unsigned H           = NS / 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init,
  input  logic          run,
  input  logic          phase2,
  input  logic [AW-1:0] t,
  input  logic          apriori_en,
  input  rx_sym_t       fwd_rx,
  input  llr_vec_t      fwd_ex,
  input  rx_sym_t       bwd_rx,
  input  llr_vec_t      bwd_ex,
  output logic          llr_valid,
  output llr_vec_t      fwd_llr,
  output logic [1:0]    fwd_dec,
  output llr_vec_t      bwd_llr,
  output logic [1:0]    bwd_dec
);
  initial assert (H <= SM_DEPTH) else $error("r4_map: SM_DEPTH too small for NS/2");

  bm_vec_t bm_f, bm_b;
  sm_vec_t alpha, beta, alpha_mem, beta_mem;
  logic [8*SQ-1:0] alpha_w, beta_w, alpha_r, beta_r;
  logic            sm_we;
  logic [SAW-1:0]  t_s, t_rev;

  r4_bmu u_r4fbmu (.rx(fwd_rx), .ex(fwd_ex), .apriori_en(apriori_en), .bm(bm_f));
  r4_bmu u_r4bbmu (.rx(bwd_rx), .ex(bwd_ex), .apriori_en(apriori_en), .bm(bm_b));

  r4_fsmu u_r4fsmu (.clk(clk), .rst_n(rst_n), .init(init), .step(run), .bm(bm_f), .alpha(alpha));
  r4_bsmu u_r4bsmu (.clk(clk), .rst_n(rst_n), .init(init), .init_uniform(BETA_UNIFORM),
                    .step(run), .bm(bm_b), .beta(beta));

  // State metric buffers: written in the first half, read in the second.
  assign sm_we = run && !phase2;
  assign t_s   = SAW'(t);
  assign t_rev = SAW'(H - 1) - SAW'(t);

  always_comb begin
    for (int m = 0; m < NSTATE; m++) begin
      alpha_w[m*SQ +: SQ] = alpha[m];
      beta_w[m*SQ +: SQ]  = beta[m];
      alpha_mem[m]        = alpha_r[m*SQ +: SQ];
      beta_mem[m]         = beta_r[m*SQ +: SQ];
    end
  end

  dp_ram #(.DEPTH(SM_DEPTH), .WIDTH(8*SQ)) u_r4fsm_ram (
    .clk(clk), .we(sm_we), .waddr(t_s), .wdata(alpha_w), .raddr(t_rev), .rdata(alpha_r));
  dp_ram #(.DEPTH(SM_DEPTH), .WIDTH(8*SQ)) u_r4bsm_ram (
    .clk(clk), .we(sm_we), .waddr(t_rev), .wdata(beta_w), .raddr(t_s), .rdata(beta_r));

  r4_llru u_fllru (.alpha(alpha), .beta(beta_mem), .bm(bm_f), .llr(fwd_llr), .dec(fwd_dec));
  r4_llru u_bllru (.alpha(alpha_mem), .beta(beta), .bm(bm_b), .llr(bwd_llr), .dec(bwd_dec));

  assign llr_valid = run && phase2;
endmodule
