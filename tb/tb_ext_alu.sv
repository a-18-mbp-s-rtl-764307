// tb_ext_alu: checks extrinsic = LLR - systematic channel part - a-priori
// part, with 9-bit saturation, for random inputs with the a-priori input
// enabled and disabled.
module tb_ext_alu;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  llr_vec_t llr, ex_in, ex_out;
  rx_t i1, i2;
  logic apr;
  int checks = 0, failures = 0;

  ext_alu dut (.llr, .i1, .i2, .ex_in, .apriori_en(apr), .ex_out);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int l [4], e [4], s1, s2, r;
    for (int n = 0; n < 3000; n++) begin
      l[0] = 0;
      for (int p = 1; p < 4; p++) l[p] = sat9(srand(n % 2 ? 256 : 80));
      for (int p = 0; p < 4; p++) e[p] = srand(n % 2 ? 255 : 60);
      s1 = srand(127); s2 = srand(127);
      for (int p = 0; p < 4; p++) begin
        llr[p] = llr_t'(l[p]);
        ex_in[p] = llr_t'(e[p]);
      end
      i1 = rx_t'(s1); i2 = rx_t'(s2);
      apr = n[1];
      #1;
      for (int p = 0; p < 4; p++) begin
        r = l[p] - (p & 1) * s1 - ((p >> 1) & 1) * s2 - (apr ? e[p] - e[0] : 0);
        r = (p == 0) ? 0 : sat9(r);
        checks++;
        if (int'(ex_out[p]) != r) begin
          failures++;
          if (failures < 10) $display("n=%0d p=%0d dut=%0d ref=%0d", n, p, ex_out[p], r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
