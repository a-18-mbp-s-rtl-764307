// tb_hda_early_stop: fills both decision stores through all four write ports
// and checks the match flag and the mismatch count against a model: blocks
// with identical decisions, blocks with a few differing symbols, and a block
// where only the last write makes them agree.
module tb_hda_early_stop;
  localparam int NS = 106;
  logic clk = 0, rst_n = 0;
  logic a_we0 = 0, a_we1 = 0, b_we0 = 0, b_we1 = 0;
  logic [6:0] a_addr0 = '0, a_addr1 = '0, b_addr0 = '0, b_addr1 = '0;
  logic [1:0] a_dec0 = '0, a_dec1 = '0, b_dec0 = '0, b_dec1 = '0;
  logic match;
  logic [7:0] mismatches;
  int ma [NS], mb [NS];
  int checks = 0, failures = 0;

  hda_early_stop #(.NS(NS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state();
    int mm;
    mm = 0;
    for (int i = 0; i < NS; i++) if (ma[i] != mb[i]) mm++;
    checks += 2;
    if (int'(mismatches) != mm) begin
      failures++;
      $display("mismatches dut=%0d model=%0d", mismatches, mm);
    end
    if (match != (mm == 0)) begin
      failures++;
      $display("match dut=%0b model mismatches=%0d", match, mm);
    end
  endtask

  // write one block: decoder A in natural order from both ends, decoder B in
  // a permuted order, like the decoder does in the LLR half of an iteration
  task automatic write_block(input int ndiff);
    int da [NS], db [NS], perm;
    for (int i = 0; i < NS; i++) begin
      da[i] = $urandom_range(3);
      db[i] = da[i];
    end
    for (int n = 0; n < ndiff; n++) begin
      int k;
      k = $urandom_range(NS - 1);
      db[k] = (da[k] + 1 + $urandom_range(2)) % 4;
    end
    for (int t = 0; t < NS / 2; t++) begin
      @(negedge clk);
      a_we0 = 1; a_addr0 = 7'(NS / 2 + t);     a_dec0 = 2'(da[NS / 2 + t]);
      a_we1 = 1; a_addr1 = 7'(NS / 2 - 1 - t); a_dec1 = 2'(da[NS / 2 - 1 - t]);
      perm = (31 * (NS / 2 + t) + 7) % NS;
      b_we0 = 1; b_addr0 = 7'(perm); b_dec0 = 2'(db[perm]);
      perm = (31 * (NS / 2 - 1 - t) + 7) % NS;
      b_we1 = 1; b_addr1 = 7'(perm); b_dec1 = 2'(db[perm]);
    end
    @(negedge clk);
    a_we0 = 0; a_we1 = 0; b_we0 = 0; b_we1 = 0;
    for (int i = 0; i < NS; i++) begin
      ma[i] = da[i];
      mb[i] = db[i];
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    foreach (ma[i]) begin ma[i] = 0; mb[i] = 0; end
    check_state();
    for (int blk = 0; blk < 40; blk++) begin
      write_block(blk % 3 == 0 ? 0 : int'($urandom_range(1, 5)));
      check_state();
    end
    // a single differing symbol, then repaired by one write of decoder B
    write_block(0);
    @(negedge clk);
    b_we0 = 1; b_addr0 = 7'd17; b_dec0 = 2'(ma[17] ^ 1);
    @(negedge clk);
    b_we0 = 0; mb[17] = ma[17] ^ 1;
    check_state();
    @(negedge clk);
    b_we1 = 1; b_addr1 = 7'd17; b_dec1 = 2'(ma[17]);
    @(negedge clk);
    b_we1 = 0; mb[17] = ma[17];
    check_state();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
