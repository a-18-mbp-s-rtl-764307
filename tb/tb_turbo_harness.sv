// tb_turbo_harness: reusable end-to-end test bench body for the turbo
// decoder at a given block size and iteration limit.
//
// For each entry of the noise list it encodes BLOCKS random blocks with the
// reference encoder (tb_ref_pkg::make_block), loads them, decodes them with
// early stop on, and reads back the decoded pairs. It reports per noise level
// the raw and decoded bit errors and the average number of iterations, checks
// the latency of every block (iterations x (N/2 + 2) cycles), that an early
// stop never leaves disagreeing decisions, that noise-free blocks decode
// without error in one iteration, that the decoded error count is not above
// the raw one, and that the average iteration count does not rise as the
// noise falls. It ends the simulation with the TB_RESULT line, or with
// OWN_FINISH = 0 only raises finished so that a parent running several
// harnesses can add up their counts.
module tb_turbo_harness
  import turbo_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int N        = 212,
  parameter int MAX_ITER = 3,
  parameter int IL_A     = 31,
  parameter int IL_B     = 7,
  parameter int BLOCKS   = 20,
  parameter int NLEV     = 3,                       // noise levels used (at most 3)
  parameter int SIGMA_X100 [3] = '{2852, 2692, 2542},
  parameter string TITLE = "turbo decoder",
  parameter int RX_DEPTH  = 128,                    // memory depths passed to the top
  parameter int EXT_DEPTH = 128,
  parameter int SM_DEPTH  = 64,
  parameter bit OWN_FINISH = 1'b1                   // 0: only set finished, the parent ends
) ();
  localparam int NS = N / 2, AW = $clog2(NS), AMP = 32;

  logic clk = 0, rst_n = 0;
  logic rx_we = 0;
  logic [AW-1:0] rx_addr = '0, dec_addr = '0;
  rx_t rx_i1 = '0, rx_i2 = '0, rx_p1a = '0, rx_p1b = '0, rx_p2a = '0, rx_p2b = '0;
  logic start = 0, early_stop_en = 1;
  logic busy, done, early_stopped;
  logic [7:0] iters_used;
  logic [AW:0] hda_mismatches;
  logic [1:0] dec_pair;
  logic signed [LQ:0] dec_llr_sum [4];

  turbo_decoder_top #(.N(N), .MAX_ITER(MAX_ITER), .IL_A(IL_A), .IL_B(IL_B),
                    .RX_DEPTH(RX_DEPTH), .EXT_DEPTH(EXT_DEPTH), .SM_DEPTH(SM_DEPTH)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit finished = 1'b0;

  initial begin
    repeat (5000000) @(posedge clk);
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

  int data [];
  samp6_t samp [];

  task automatic run_one(input int sigma, output int raw, output int errs, output int iters);
    int lat;
    raw = make_block(N, IL_A, IL_B, AMP, sigma, data, samp);
    for (int k = 0; k < NS; k++) begin
      @(negedge clk);
      rx_we = 1; rx_addr = AW'(k);
      rx_i1 = rx_t'(samp[k][0]); rx_i2 = rx_t'(samp[k][1]);
      rx_p1a = rx_t'(samp[k][2]); rx_p1b = rx_t'(samp[k][3]);
      rx_p2a = rx_t'(samp[k][4]); rx_p2b = rx_t'(samp[k][5]);
    end
    @(negedge clk); rx_we = 0; start = 1;
    @(posedge clk); lat = 1;
    @(negedge clk); start = 0;
    while (!done) begin
      @(posedge clk); lat++;
      #1;
    end
    iters = int'(iters_used);
    chk(lat == 1 + iters * (NS + 2), $sformatf("latency %0d for %0d iterations", lat - 1, iters));
    if (early_stopped) chk(hda_mismatches == 0, "early stop with disagreeing decisions");
    errs = 0;
    for (int k = 0; k < NS; k++) begin
      dec_addr = AW'(k);
      #1;
      if (dec_pair[0] != 1'(data[2 * k])) errs++;
      if (dec_pair[1] != 1'(data[2 * k + 1])) errs++;
    end
  endtask

  initial begin
    int raw, e, it, tot_raw, tot_dec, tot_it, prev_it_x100;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run_one(0, raw, e, it);
    chk(e == 0 && it == 1, $sformatf("%s: noise-free block: %0d errors, %0d iterations", TITLE, e, it));
    prev_it_x100 = 100 * MAX_ITER;
    for (int l = 0; l < NLEV; l++) begin
      tot_raw = 0; tot_dec = 0; tot_it = 0;
      for (int b = 0; b < BLOCKS; b++) begin
        run_one(SIGMA_X100[l], raw, e, it);
        tot_raw += raw; tot_dec += e; tot_it += it;
      end
      $display("%s, N=%0d, sigma %0d.%02d: raw errors %0d, decoded errors %0d of %0d bits, average iterations %0d.%02d of %0d (saving %0d%%)",
               TITLE, N, SIGMA_X100[l] / 100, SIGMA_X100[l] % 100, tot_raw, tot_dec, BLOCKS * N,
               tot_it / BLOCKS, (100 * tot_it / BLOCKS) % 100, MAX_ITER,
               100 - (100 * tot_it) / (BLOCKS * MAX_ITER));
      chk(tot_dec <= tot_raw, "decoded errors above raw errors");
      chk(100 * tot_it / BLOCKS <= prev_it_x100 + 50, "average iterations rose with less noise");
      prev_it_x100 = 100 * tot_it / BLOCKS;
    end
    finished = 1'b1;
    if (OWN_FINISH) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
