// tb_workload_block_sizes: the decoder at other block sizes that fit its
// default memories: 100 bits (50 symbols, interleaver 7j + 3 mod 50) and 256
// bits (128 symbols, the largest the 128-word symbol RAMs and 64-word state
// metric RAMs hold), at 2, 2.5 and 3 dB with the default 3 iterations, and
// 512 bits (256 symbols, interleaver 31j + 7 mod 256), which is above the
// 300-bit mark where the symbol interleaver starts to cost performance and
// needs the memories doubled (256-word symbol and extrinsic RAMs, 128-word
// state metric RAMs). The sizes and interleavers are this bench's choice.
// The three sizes run side by side in their own tb_turbo_harness instances;
// the checks are the harnesses', added up here.
module tb_workload_block_sizes;
  tb_turbo_harness #(.N(100), .MAX_ITER(3), .IL_A(7), .IL_B(3), .BLOCKS(20), .NLEV(3),
                     .SIGMA_X100('{2542, 2400, 2265}), .TITLE("block size 100"),
                     .OWN_FINISH(1'b0)) h100 ();
  tb_turbo_harness #(.N(256), .MAX_ITER(3), .IL_A(31), .IL_B(7), .BLOCKS(20), .NLEV(3),
                     .SIGMA_X100('{2542, 2400, 2265}), .TITLE("block size 256"),
                     .OWN_FINISH(1'b0)) h256 ();
  tb_turbo_harness #(.N(512), .MAX_ITER(3), .IL_A(31), .IL_B(7), .BLOCKS(20), .NLEV(3),
                     .SIGMA_X100('{2542, 2400, 2265}), .TITLE("block size 512"),
                     .RX_DEPTH(256), .EXT_DEPTH(256), .SM_DEPTH(128),
                     .OWN_FINISH(1'b0)) h512 ();

  initial begin
    wait (h100.finished && h256.finished && h512.finished);
    $display("TB_RESULT checks=%0d failures=%0d", h100.checks + h256.checks + h512.checks,
             h100.failures + h256.failures + h512.failures);
    $finish;
  end
endmodule
