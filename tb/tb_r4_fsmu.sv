// tb_r4_fsmu: checks the radix-4 forward recursion. After init the metrics
// must be alpha_0 (0 for state 0, -256 elsewhere); each enabled clock must
// produce the reference step obtained by walking every two-bit path of the
// radix-2 trellis; a clock without step must hold the metrics.
module tb_r4_fsmu;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, init = 0, step = 0;
  bm_vec_t bm;
  sm_vec_t alpha;
  int checks = 0, failures = 0;

  r4_fsmu dut (.clk, .rst_n, .init, .step, .bm, .alpha);
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
      if (int'(alpha[m]) != r[m]) begin
        failures++;
        if (failures < 10) $display("%s state %0d dut=%0d ref=%0d", what, m, alpha[m], r[m]);
      end
    end
  endtask

  initial begin
    vec8_t  a;
    vec16_t b;
    for (int c = 0; c < 16; c++) bm[c] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 20; blk++) begin
      @(negedge clk); init = 1;
      @(negedge clk); init = 0;
      for (int m = 0; m < 8; m++) a[m] = (m == 0) ? 0 : -256;
      compare(a, "init");
      for (int k = 0; k < 60; k++) begin
        for (int c = 0; c < 16; c++) begin
          b[c] = srand(blk < 10 ? 80 : 255);
          bm[c] = bm_t'(b[c]);
        end
        step = (k % 7 != 3);
        @(negedge clk);
        if (step) a = fwd_step(a, b);
        compare(a, step ? "step" : "hold");
      end
      step = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
