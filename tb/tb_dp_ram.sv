// tb_dp_ram: random writes and reads on a 64 x 72 instance (the state metric
// buffer size), compared with an array model: a write must appear at the
// next clock, the read port is asynchronous, and a read of the address being
// written returns the old word until the clock edge.
module tb_dp_ram;
  localparam int DEPTH = 64, WIDTH = 72;
  logic clk = 0, we = 0;
  logic [5:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  dp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word first
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 6'(a); wdata = {$urandom, $urandom, 8'($urandom)};
      model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      we = $urandom_range(1);
      waddr = 6'($urandom_range(DEPTH - 1));
      wdata = {$urandom, $urandom, 8'($urandom)};
      raddr = (n % 4 == 0) ? waddr : 6'($urandom_range(DEPTH - 1));
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        if (failures < 10) $display("read %0d: dut=%h model=%h", raddr, rdata, model[raddr]);
      end
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
