// tb_turbo_ctrl: checks the iteration schedule of the controller for a
// 106-symbol block: per iteration one init cycle, 106 run cycles with the
// forward index walking 0..105 and the backward index 105..0 (first half
// 105..53 then 52..0), one check cycle; apriori_en low only in the first
// iteration; the write bank alternating; done after MAX_ITER iterations
// (3 x 108 cycles) without early stop, and after the first iteration when
// the decisions already agree and early stop is on.
module tb_turbo_ctrl;
  localparam int NS = 106, H = 53, MAXI = 3;
  logic clk = 0, rst_n = 0, start = 0, es_en = 0, hda_match = 0;
  logic busy, done, init, run, phase2, apriori_en, wbank, early_stopped;
  logic [6:0] t, fwd_idx, bwd_idx;
  logic [7:0] iters_used;
  int checks = 0, failures = 0;

  turbo_ctrl #(.NS(NS), .MAX_ITER(MAXI)) dut (.clk, .rst_n, .start, .early_stop_en(es_en),
    .hda_match, .busy, .done, .init, .run, .phase2, .t, .fwd_idx, .bwd_idx, .apriori_en,
    .wbank, .iters_used, .early_stopped);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // run one block and check the schedule cycle by cycle
  task automatic run_block(input bit es, input bit agree, input int exp_iters);
    int cycles, it;
    es_en = es;
    hda_match = agree;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    for (it = 0; it < exp_iters; it++) begin
      chk(init && !run, $sformatf("init cycle of iteration %0d", it));
      chk(apriori_en == (it != 0), "apriori_en");
      chk(wbank == it[0], "write bank");
      @(negedge clk); cycles++;
      for (int k = 0; k < NS; k++) begin
        chk(run && !init, "run");
        chk(phase2 == (k >= H), "phase");
        chk(int'(fwd_idx) == k, $sformatf("fwd_idx %0d at step %0d", fwd_idx, k));
        chk(int'(bwd_idx) == NS - 1 - k, $sformatf("bwd_idx %0d at step %0d", bwd_idx, k));
        chk(int'(t) == k % H, "t");
        chk(wbank == it[0], "write bank during run");
        @(negedge clk); cycles++;
      end
      chk(!run && !init && busy, "check cycle");
      @(negedge clk); cycles++;
    end
    chk(!busy, "idle after done");
    chk(int'(iters_used) == exp_iters, $sformatf("iters_used %0d expected %0d", iters_used, exp_iters));
    chk(early_stopped == (exp_iters < MAXI), "early_stopped");
    chk(cycles == 1 + exp_iters * (NS + 2), $sformatf("cycles %0d", cycles));
  endtask

  // done is a one-cycle pulse at the end of the check cycle
  int done_count = 0;
  always @(posedge clk) if (rst_n && done) done_count++;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    chk(!busy && !run && !init, "idle after reset");
    run_block(0, 0, MAXI);
    run_block(0, 1, MAXI);   // agreement ignored without early stop
    run_block(1, 1, 1);      // early stop after the first iteration
    run_block(1, 0, MAXI);
    @(negedge clk);
    chk(done_count == 4, $sformatf("done pulses %0d", done_count));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
