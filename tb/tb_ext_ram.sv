// tb_ext_ram: random traffic on the two write and two read ports of a
// 128 x 36 extrinsic RAM, compared with an array model (port 0 wins when
// both ports write the same address).
module tb_ext_ram;
  localparam int DEPTH = 128, WIDTH = 36;
  logic clk = 0, we0 = 0, we1 = 0;
  logic [6:0] waddr0 = '0, waddr1 = '0, raddr0 = '0, raddr1 = '0;
  logic [WIDTH-1:0] wdata0 = '0, wdata1 = '0, rdata0, rdata1;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  ext_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .we0, .waddr0, .wdata0, .we1, .waddr1,
    .wdata1, .raddr0, .rdata0, .raddr1, .rdata1);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a += 2) begin
      @(negedge clk);
      we0 = 1; waddr0 = 7'(a);     wdata0 = {$urandom, 4'($urandom)};
      we1 = 1; waddr1 = 7'(a + 1); wdata1 = {$urandom, 4'($urandom)};
      model[a] = wdata0; model[a + 1] = wdata1;
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      we0 = $urandom_range(1); we1 = $urandom_range(1);
      waddr0 = 7'($urandom_range(DEPTH - 1));
      waddr1 = (n % 8 == 0) ? waddr0 : 7'($urandom_range(DEPTH - 1));
      wdata0 = {$urandom, 4'($urandom)}; wdata1 = {$urandom, 4'($urandom)};
      raddr0 = 7'($urandom_range(DEPTH - 1)); raddr1 = 7'($urandom_range(DEPTH - 1));
      #1;
      checks += 2;
      if (rdata0 !== model[raddr0]) begin
        failures++;
        if (failures < 10) $display("port0 read %0d: dut=%h model=%h", raddr0, rdata0, model[raddr0]);
      end
      if (rdata1 !== model[raddr1]) begin
        failures++;
        if (failures < 10) $display("port1 read %0d: dut=%h model=%h", raddr1, rdata1, model[raddr1]);
      end
      @(posedge clk);
      if (we1) model[waddr1] = wdata1;
      if (we0) model[waddr0] = wdata0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
