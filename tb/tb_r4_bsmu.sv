// tb_r4_bsmu: checks the radix-4 backward recursion: both starting rules
// (state 0 only, or all states equal), each step against the reference
// obtained from the radix-2 trellis, and holding when no step is requested.
module tb_r4_bsmu;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, init = 0, step = 0, uni = 0;
  bm_vec_t bm;
  sm_vec_t beta;
  int checks = 0, failures = 0;

  r4_bsmu dut (.clk, .rst_n, .init, .init_uniform(uni), .step, .bm, .beta);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input vec8_t r, input string what);
    for (int m = 0; m < 8; m++) begin
      checks++;
      if (int'(beta[m]) != r[m]) begin
        failures++;
        if (failures < 10) $display("%s state %0d dut=%0d ref=%0d", what, m, beta[m], r[m]);
      end
    end
  endtask

  initial begin
    vec8_t  b;
    vec16_t g;
    for (int c = 0; c < 16; c++) bm[c] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 20; blk++) begin
      @(negedge clk); init = 1; uni = blk[0];
      @(negedge clk); init = 0;
      for (int m = 0; m < 8; m++) b[m] = (m == 0 || uni) ? 0 : -256;
      compare(b, "init");
      for (int k = 0; k < 60; k++) begin
        for (int c = 0; c < 16; c++) begin
          g[c] = srand(blk < 10 ? 80 : 255);
          bm[c] = bm_t'(g[c]);
        end
        step = (k % 5 != 2);
        @(negedge clk);
        if (step) b = bwd_step(b, g);
        compare(b, step ? "step" : "hold");
      end
      step = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
