// tb_r4_llru: checks the four pair LLRs (relative to pair 00) and the hard
// pair decision against the reference, for random state and branch metrics.
module tb_r4_llru;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  sm_vec_t alpha, beta;
  bm_vec_t bm;
  llr_vec_t llr;
  logic [1:0] dec;
  int checks = 0, failures = 0;

  r4_llru dut (.alpha, .beta, .bm, .llr, .dec);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec8_t a, b;
    vec16_t g;
    vec4_t rl;
    int rd;
    for (int n = 0; n < 3000; n++) begin
      for (int m = 0; m < 8; m++) begin
        a[m] = -int'($urandom_range(n % 2 ? 256 : 60));
        b[m] = -int'($urandom_range(n % 2 ? 256 : 60));
        alpha[m] = sm_t'(a[m]);
        beta[m]  = sm_t'(b[m]);
      end
      for (int c = 0; c < 16; c++) begin
        g[c] = srand(n % 3 == 0 ? 255 : 60);
        bm[c] = bm_t'(g[c]);
      end
      #1;
      llr_ref(a, b, g, rl, rd);
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (int'(llr[p]) != rl[p]) begin
          failures++;
          if (failures < 10) $display("n=%0d p=%0d dut=%0d ref=%0d", n, p, llr[p], rl[p]);
        end
      end
      checks++;
      if (int'(dec) != rd) begin
        failures++;
        if (failures < 10) $display("n=%0d dec dut=%0d ref=%0d", n, dec, rd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
