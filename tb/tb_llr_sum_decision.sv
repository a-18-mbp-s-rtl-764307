// tb_llr_sum_decision: writes random LLRs of both decoders through all four
// write ports and reads every symbol back, checking the summed LLRs and the
// decoded pair (largest sum, pair 00 counting as 0) against a model.
module tb_llr_sum_decision;
  import turbo_pkg::*;
  import tb_ref_pkg::*;
  localparam int NS = 106;
  logic clk = 0, rst_n = 0;
  logic a_we0 = 0, a_we1 = 0, b_we0 = 0, b_we1 = 0;
  logic [6:0] a_addr0 = '0, a_addr1 = '0, b_addr0 = '0, b_addr1 = '0, rd_addr = '0;
  llr_vec_t a_llr0, a_llr1, b_llr0, b_llr1;
  logic [1:0] rd_pair;
  logic signed [LQ:0] rd_sum [4];
  int la [NS][4], lb [NS][4];
  int checks = 0, failures = 0;

  llr_sum_decision #(.NS(NS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic llr_vec_t to_vec(input int v [4]);
    for (int p = 0; p < 4; p++) to_vec[p] = llr_t'(v[p]);
  endfunction

  initial begin
    for (int p = 0; p < 4; p++) begin
      a_llr0[p] = '0; a_llr1[p] = '0; b_llr0[p] = '0; b_llr1[p] = '0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int blk = 0; blk < 20; blk++) begin
      for (int i = 0; i < NS; i++) begin
        la[i][0] = 0; lb[i][0] = 0;
        for (int p = 1; p < 4; p++) begin
          la[i][p] = sat9(srand(blk % 2 ? 256 : 40));
          lb[i][p] = sat9(srand(blk % 2 ? 256 : 40));
        end
      end
      for (int t = 0; t < NS / 2; t++) begin
        int k0, k1, j0, j1;
        k0 = NS / 2 + t; k1 = NS / 2 - 1 - t;
        j0 = (31 * k0 + 7) % NS; j1 = (31 * k1 + 7) % NS;
        @(negedge clk);
        a_we0 = 1; a_addr0 = 7'(k0); a_llr0 = to_vec(la[k0]);
        a_we1 = 1; a_addr1 = 7'(k1); a_llr1 = to_vec(la[k1]);
        b_we0 = 1; b_addr0 = 7'(j0); b_llr0 = to_vec(lb[j0]);
        b_we1 = 1; b_addr1 = 7'(j1); b_llr1 = to_vec(lb[j1]);
      end
      @(negedge clk);
      a_we0 = 0; a_we1 = 0; b_we0 = 0; b_we1 = 0;
      for (int i = 0; i < NS; i++) begin
        int s [4], best, bp;
        rd_addr = 7'(i);
        #1;
        best = 0; bp = 0;
        for (int p = 0; p < 4; p++) begin
          s[p] = la[i][p] + lb[i][p];
          if (p > 0 && s[p] > best) begin best = s[p]; bp = p; end
          checks++;
          if (int'(rd_sum[p]) != s[p]) begin
            failures++;
            if (failures < 10) $display("sym %0d p %0d sum dut=%0d ref=%0d", i, p, rd_sum[p], s[p]);
          end
        end
        checks++;
        if (int'(rd_pair) != bp) begin
          failures++;
          if (failures < 10) $display("sym %0d pair dut=%0d ref=%0d", i, rd_pair, bp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
