// tb_r4_map: drives one radix-4 dual-path MAP decoder over whole blocks with
// the controller's schedule and compares every LLR set and hard decision it
// produces, from both LLR units, with a reference forward-backward pass over
// the block (radix-2 trellis walked two bits at a time, same fixed-point
// rules). Blocks with and without a-priori input and both backward starting
// rules are run; a pass over NS symbols must produce its LLRs in cycles
// NS/2+1..NS after init and cover every symbol exactly once.
module tb_r4_map;
  import turbo_pkg::*;
  import tb_ref_pkg::*;
  localparam int NS = 106, H = NS / 2;

  logic clk = 0, rst_n = 0, init = 0, run = 0, phase2 = 0, apr = 0;
  logic [6:0] t = '0;
  rx_sym_t fwd_rx, bwd_rx;
  llr_vec_t fwd_ex, bwd_ex, fwd_llr, bwd_llr;
  logic [1:0] fwd_dec, bwd_dec;
  logic v0, v1;
  llr_vec_t f_llr1, b_llr1;
  logic [1:0] f_dec1, b_dec1;
  int checks = 0, failures = 0;

  r4_map #(.NS(NS), .BETA_UNIFORM(1'b0)) dut0 (.clk, .rst_n, .init, .run, .phase2, .t,
    .apriori_en(apr), .fwd_rx, .fwd_ex, .bwd_rx, .bwd_ex, .llr_valid(v0),
    .fwd_llr, .fwd_dec, .bwd_llr, .bwd_dec);
  r4_map #(.NS(NS), .BETA_UNIFORM(1'b1)) dut1 (.clk, .rst_n, .init, .run, .phase2, .t,
    .apriori_en(apr), .fwd_rx, .fwd_ex, .bwd_rx, .bwd_ex, .llr_valid(v1),
    .fwd_llr(f_llr1), .fwd_dec(f_dec1), .bwd_llr(b_llr1), .bwd_dec(b_dec1));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int   ri1 [NS], ri2 [NS], rq1 [NS], rq2 [NS];
  vec4_t rex [NS];
  vec16_t g [NS];
  vec8_t alpha_r [NS + 1], beta0_r [NS + 1], beta1_r [NS + 1];
  int   seen [NS];

  function automatic llr_vec_t to_vec(input vec4_t v);
    for (int p = 0; p < 4; p++) to_vec[p] = llr_t'(v[p]);
  endfunction

  task automatic cmp(input llr_vec_t l, input logic [1:0] d, input vec8_t a, input vec8_t b,
                     input int k, input string who);
    vec4_t rl;
    int rd;
    llr_ref(a, b, g[k], rl, rd);
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (int'(l[p]) != rl[p]) begin
        failures++;
        if (failures < 10) $display("%s sym %0d p %0d dut=%0d ref=%0d", who, k, p, l[p], rl[p]);
      end
    end
    checks++;
    if (int'(d) != rd) begin
      failures++;
      if (failures < 10) $display("%s sym %0d dec dut=%0d ref=%0d", who, k, d, rd);
    end
  endtask

  task automatic drive(input int kf, input int kb);
    fwd_rx = '{i1: rx_t'(ri1[kf]), i2: rx_t'(ri2[kf]), q1: rx_t'(rq1[kf]), q2: rx_t'(rq2[kf])};
    bwd_rx = '{i1: rx_t'(ri1[kb]), i2: rx_t'(ri2[kb]), q1: rx_t'(rq1[kb]), q2: rx_t'(rq2[kb])};
    fwd_ex = to_vec(rex[kf]);
    bwd_ex = to_vec(rex[kb]);
  endtask

  task automatic run_block(input int lim, input bit use_apr);
    int kf, kb, cyc;
    apr = use_apr;
    for (int k = 0; k < NS; k++) begin
      ri1[k] = srand(lim); ri2[k] = srand(lim); rq1[k] = srand(lim); rq2[k] = srand(lim);
      rex[k][0] = 0;
      for (int p = 1; p < 4; p++) rex[k][p] = srand(lim);
      g[k] = bm_vec(ri1[k], ri2[k], rq1[k], rq2[k], rex[k], use_apr);
      seen[k] = 0;
    end
    for (int m = 0; m < 8; m++) begin
      alpha_r[0][m] = (m == 0) ? 0 : -256;
      beta0_r[NS][m] = (m == 0) ? 0 : -256;
      beta1_r[NS][m] = 0;
    end
    for (int k = 0; k < NS; k++) alpha_r[k + 1] = fwd_step(alpha_r[k], g[k]);
    for (int k = NS - 1; k >= 0; k--) begin
      beta0_r[k] = bwd_step(beta0_r[k + 1], g[k]);
      beta1_r[k] = bwd_step(beta1_r[k + 1], g[k]);
    end
    @(negedge clk); init = 1; run = 0;
    @(negedge clk); init = 0; run = 1;
    cyc = 1;
    for (int s = 0; s < NS; s++) begin
      phase2 = (s >= H);
      t = 7'(s % H);
      kf = s;
      kb = NS - 1 - s;
      drive(kf, kb);
      #1;
      checks++;
      if (v0 != phase2 || v1 != phase2) begin
        failures++;
        $display("llr_valid wrong at cycle %0d", cyc);
      end
      if (phase2) begin
        cmp(fwd_llr, fwd_dec, alpha_r[kf], beta0_r[kf + 1], kf, "fwd/term");
        cmp(bwd_llr, bwd_dec, alpha_r[kb], beta0_r[kb + 1], kb, "bwd/term");
        cmp(f_llr1, f_dec1, alpha_r[kf], beta1_r[kf + 1], kf, "fwd/open");
        cmp(b_llr1, b_dec1, alpha_r[kb], beta1_r[kb + 1], kb, "bwd/open");
        seen[kf]++;
        seen[kb]++;
      end
      @(negedge clk);
      cyc++;
    end
    run = 0;
    for (int k = 0; k < NS; k++) begin
      checks++;
      if (seen[k] != 1) failures++;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int blk = 0; blk < 12; blk++) run_block(blk < 6 ? 30 : 127, blk[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
