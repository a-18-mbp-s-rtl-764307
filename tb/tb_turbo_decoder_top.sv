// tb_turbo_decoder_top: end-to-end test of the turbo decoder at its default
// size (212-bit blocks, 3 iterations).
//
// The testbench holds its own encoder: two 8-state recursive systematic
// encoders, the second fed with the symbol-interleaved pairs, encoder 1
// terminated in state 0 by the last three information bits. Puncturing to
// rate 1/2 keeps encoder 1's parity of the first bit of each pair and encoder
// 2's parity of the second bit. Bits are sent as +/-A (A = 32) with
// approximately Gaussian noise at a chosen Eb/N0, quantised to 8 bits.
// Checks:
//   * noise-free blocks decode without error, stop after one iteration when
//     early stop is on, and run all three iterations when it is off;
//   * done rises iterations * (NS + 2) cycles after the clock edge that
//     takes start;
//   * noisy blocks at 4 dB decode without error; at 2 dB the decoded errors
//     must be under a quarter of the raw systematic hard-decision errors,
//     at 1 dB under the raw count (decoded with all three iterations);
//   * an early stop always leaves zero disagreeing decisions.
// Mechanisms counted (each must occur): early stop, stop at the iteration
// limit, blocks decoded with extrinsic exchange (2 or more iterations), a
// block whose errors were removed by the later iterations, and blocks still
// in disagreement at the limit.
`timescale 1ns / 1ps
module tb_turbo_decoder_top;
  import turbo_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 212, NS = 106, MAXI = 3, A = 32;

  logic clk = 0, rst_n = 0;
  logic rx_we = 0;
  logic [6:0] rx_addr = '0, dec_addr = '0;
  rx_t rx_i1 = '0, rx_i2 = '0, rx_p1a = '0, rx_p1b = '0, rx_p2a = '0, rx_p2b = '0;
  logic start = 0, early_stop_en = 0;
  logic busy, done, early_stopped;
  logic [7:0] iters_used;
  logic [7:0] hda_mismatches;
  logic [1:0] dec_pair;
  logic signed [LQ:0] dec_llr_sum [4];

  turbo_decoder_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_early = 0, n_limit = 0, n_multi = 0, n_fixed_later = 0, n_disagree = 0;

  initial begin
    repeat (400000) @(posedge clk);
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

  int data [N];
  int s_i1 [NS], s_i2 [NS], s_p1a [NS], s_p1b [NS], s_p2a [NS], s_p2b [NS];

  function automatic int pi_of(input int j);
    return (31 * j + 7) % NS;
  endfunction

  // approximately Gaussian sample, standard deviation sigma_x100 / 100
  function automatic int noise(input int sigma_x100);
    int acc;
    acc = 0;
    for (int i = 0; i < 12; i++) acc += int'($urandom_range(2000)) - 1000;
    // acc has standard deviation 2000
    return (acc * sigma_x100) / 200000;
  endfunction

  function automatic int chan(input int bit_v, input int sigma_x100);
    int v;
    v = (bit_v ? A : -A) + ((sigma_x100 > 0) ? noise(sigma_x100) : 0);
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return v;
  endfunction

  // random data, encoding, puncturing, channel; returns raw systematic errors
  function automatic int make_block(input int sigma_x100);
    int s, ns, par, errs;
    int y1 [NS], y2 [NS], z1 [NS], z2 [NS];
    s = 0;
    for (int k = 0; k < N; k++) begin
      if (k >= N - 3) data[k] = ((s >> 1) & 1) ^ (s & 1);   // drive the encoder to state 0
      else data[k] = $urandom_range(1);
      enc_step(s, data[k], ns, par);
      if (k % 2 == 0) y1[k / 2] = par; else y2[k / 2] = par;
      s = ns;
    end
    if (s != 0) $display("termination failed");
    s = 0;
    for (int j = 0; j < NS; j++) begin
      int k;
      k = pi_of(j);
      enc_step(s, data[2 * k], ns, par);     z1[k] = par; s = ns;
      enc_step(s, data[2 * k + 1], ns, par); z2[k] = par; s = ns;
    end
    errs = 0;
    for (int k = 0; k < NS; k++) begin
      s_i1[k]  = chan(data[2 * k], sigma_x100);
      s_i2[k]  = chan(data[2 * k + 1], sigma_x100);
      s_p1a[k] = chan(y1[k], sigma_x100);
      s_p1b[k] = 0;                          // punctured
      s_p2a[k] = 0;                          // punctured
      s_p2b[k] = chan(z2[k], sigma_x100);
      if ((s_i1[k] > 0) != (data[2 * k] == 1)) errs++;
      if ((s_i2[k] > 0) != (data[2 * k + 1] == 1)) errs++;
    end
    return errs;
  endfunction

  task automatic load_block();
    for (int k = 0; k < NS; k++) begin
      @(negedge clk);
      rx_we = 1; rx_addr = 7'(k);
      rx_i1 = rx_t'(s_i1[k]);   rx_i2 = rx_t'(s_i2[k]);
      rx_p1a = rx_t'(s_p1a[k]); rx_p1b = rx_t'(s_p1b[k]);
      rx_p2a = rx_t'(s_p2a[k]); rx_p2b = rx_t'(s_p2b[k]);
    end
    @(negedge clk);
    rx_we = 0;
  endtask

  // decode the loaded block; returns bit errors, sets iterations and latency
  // errs1 is taken in the middle of the second iteration, while the output
  // buffers still hold the LLRs of the first iteration (-1 if there was none)
  task automatic decode(input bit es, output int errs, output int iters, output int lat,
                        output int errs1);
    early_stop_en = es;
    errs1 = -1;
    @(negedge clk); start = 1;
    @(posedge clk); lat = 1;
    @(negedge clk); start = 0;
    while (!done) begin
      @(posedge clk); lat++;
      #1;
      if (lat == 1 + (NS + 2) + 1 + NS / 4 && busy) begin
        errs1 = 0;
        for (int k = 0; k < NS; k++) begin
          dec_addr = 7'(k);
          #0.01;
          if (dec_pair[0] != 1'(data[2 * k])) errs1++;
          if (dec_pair[1] != 1'(data[2 * k + 1])) errs1++;
        end
      end
    end
    iters = int'(iters_used);
    errs = 0;
    for (int k = 0; k < NS; k++) begin
      dec_addr = 7'(k);
      #1;
      if (dec_pair[0] != 1'(data[2 * k])) errs++;
      if (dec_pair[1] != 1'(data[2 * k + 1])) errs++;
    end
    chk(int'(lat) == 1 + iters * (NS + 2), $sformatf("latency %0d for %0d iterations", lat, iters));
    if (early_stopped) begin
      n_early++;
      chk(hda_mismatches == 0, "early stop with disagreeing decisions");
    end
    if (iters == MAXI) begin
      n_limit++;
      if (hda_mismatches != 0) n_disagree++;
    end
    if (iters >= 2) n_multi++;
  endtask

  initial begin
    int e, it, lat, raw, e1, ex, tot_raw, tot_dec;
    int sigmas [3];
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // noise-free blocks
    for (int b = 0; b < 3; b++) begin
      void'(make_block(0));
      load_block();
      decode(1, e, it, lat, ex);
      chk(e == 0, $sformatf("noise-free block %0d: %0d errors", b, e));
      chk(it == 1 && early_stopped, "noise-free block did not stop after one iteration");
      decode(0, e, it, lat, e1);
      chk(e1 == 0, "noise-free block: errors after the first iteration");
      chk(e == 0, "noise-free block, no early stop: errors");
      chk(it == MAXI && !early_stopped, "no early stop: iteration limit not used");
      $display("noise-free block %0d: done %0d cycles after start, %0d iterations", b, lat - 1, it);
    end

    // 4 dB, 2 dB, 1 dB (sigma = A / sqrt(10^(EbN0/10)) for rate 1/2)
    sigmas[0] = 2019; sigmas[1] = 2542; sigmas[2] = 2852;
    for (int snr = 0; snr < 3; snr++) begin
      tot_raw = 0; tot_dec = 0;
      for (int b = 0; b < 25; b++) begin
        raw = make_block(sigmas[snr]);
        load_block();
        // all iterations (errors after the first one noted), then early stop
        decode(0, e, it, lat, e1);
        if (e < e1) n_fixed_later++;
        decode(1, ex, it, lat, e1);
        tot_raw += raw;
        tot_dec += e;
      end
      $display("sigma %0d.%02d: raw systematic errors %0d, decoded errors %0d of %0d bits",
               sigmas[snr] / 100, sigmas[snr] % 100, tot_raw, tot_dec, 25 * N);
      if (snr == 0) chk(tot_dec == 0, "errors left at 4 dB");
      else if (snr == 1) chk(tot_dec * 4 < tot_raw, "decoding gain too small at 2 dB");
      else chk(tot_dec < tot_raw, "no decoding gain at 1 dB");
    end

    $display("early stops %0d, iteration limit %0d, multi-iteration %0d, fixed by later iterations %0d, disagree at limit %0d",
             n_early, n_limit, n_multi, n_fixed_later, n_disagree);
    chk(n_early > 0, "early stop never happened");
    chk(n_limit > 0, "iteration limit never reached");
    chk(n_multi > 0, "extrinsic exchange never used");
    chk(n_fixed_later > 0, "later iterations never removed errors");
    chk(n_disagree > 0, "no block left in disagreement");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
