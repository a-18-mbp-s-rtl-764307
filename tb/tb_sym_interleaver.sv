// tb_sym_interleaver: for the 106-symbol block and a small 10-symbol block,
// every address must map to (A*j + B) mod NS and every symbol must be hit
// exactly once (the mapping is a permutation).
module tb_sym_interleaver;
  logic [6:0] j;
  logic [6:0] pi;
  logic [3:0] js, pis;
  int checks = 0, failures = 0;

  sym_interleaver #(.NS(106), .A(31), .B(7)) dut (.j(j), .pi(pi));
  sym_interleaver #(.NS(10), .A(3), .B(4)) dut_s (.j(js), .pi(pis));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hit [106];
    int hits [10];
    int expect_v;
    foreach (hit[i]) hit[i] = 0;
    foreach (hits[i]) hits[i] = 0;
    expect_v = 7;                       // running value of (31*j + 7) mod 106
    for (int k = 0; k < 106; k++) begin
      j = 7'(k);
      #1;
      checks++;
      if (int'(pi) != expect_v) begin
        failures++;
        $display("pi(%0d) = %0d, expected %0d", k, pi, expect_v);
      end
      if (pi < 106) hit[pi]++;
      expect_v = (expect_v + 31) % 106;
    end
    foreach (hit[i]) begin
      checks++;
      if (hit[i] != 1) begin
        failures++;
        $display("symbol %0d hit %0d times", i, hit[i]);
      end
    end
    expect_v = 4;
    for (int k = 0; k < 10; k++) begin
      js = 4'(k);
      #1;
      checks++;
      if (int'(pis) != expect_v) begin
        failures++;
        $display("small pi(%0d) = %0d, expected %0d", k, pis, expect_v);
      end
      if (pis < 10) hits[pis]++;
      expect_v = (expect_v + 3) % 10;
    end
    foreach (hits[i]) begin
      checks++;
      if (hits[i] != 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
