// tb_workload_early_stop: the early-stop experiment with an iteration limit
// of 8: 212-bit blocks at Eb/N0 = 1, 1.5 and 2 dB (rate 1/2, amplitude 32,
// sigma = 32 / sqrt(10^(EbN0/10))), 40 blocks per point. Prints the average
// number of iterations and the saving against always running 8; the checks
// are those of tb_turbo_harness.
module tb_workload_early_stop;
  tb_turbo_harness #(.N(212), .MAX_ITER(8), .BLOCKS(40), .NLEV(3),
                     .SIGMA_X100('{2852, 2692, 2542}), .TITLE("early stop, limit 8"),
                     .OWN_FINISH(1'b0)) h ();

  initial begin
    wait (h.finished);
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures);
    $finish;
  end
endmodule
