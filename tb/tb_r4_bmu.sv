// tb_r4_bmu: checks the sixteen radix-4 branch metrics against the reference
// correlation (code bits times samples plus the a-priori value of the pair),
// including saturation, for random samples and a-priori values with the
// a-priori input both enabled and disabled.
module tb_r4_bmu;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  rx_sym_t  rx;
  llr_vec_t ex;
  logic     apr;
  bm_vec_t  bm;
  int checks = 0, failures = 0;

  r4_bmu dut (.rx(rx), .ex(ex), .apriori_en(apr), .bm(bm));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec16_t ref_bm;
    vec4_t  rex;
    int i1, i2, q1, q2, lim;
    for (int n = 0; n < 3000; n++) begin
      lim = (n % 3 == 0) ? 127 : 40;
      i1 = srand(lim); i2 = srand(lim); q1 = srand(lim); q2 = srand(lim);
      if (n % 3 == 0) i1 = -128;
      for (int p = 0; p < 4; p++) rex[p] = srand(n % 2 ? 255 : 60);
      rx  = '{i1: rx_t'(i1), i2: rx_t'(i2), q1: rx_t'(q1), q2: rx_t'(q2)};
      for (int p = 0; p < 4; p++) ex[p] = llr_t'(rex[p]);
      apr = n[2];
      #1;
      ref_bm = bm_vec(i1, i2, q1, q2, rex, apr);
      for (int c = 0; c < 16; c++) begin
        checks++;
        if (int'(bm[c]) != ref_bm[c]) begin
          failures++;
          if (failures < 10) $display("mismatch n=%0d c=%0d dut=%0d ref=%0d", n, c, bm[c], ref_bm[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
