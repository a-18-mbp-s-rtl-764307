// ext_ram: extrinsic information RAM (128 x 36: four 9-bit extrinsic values
// per symbol).
//
// It has two synchronous write ports, used by the forward-half and
// backward-half extrinsic ALUs of one decoder (they write different symbols
// in the same cycle), and two asynchronous read ports, used by the forward
// and backward branch metric units of the other decoder. If both write ports
// hit the same address, port 0 wins. Contents are not reset.
// The 128 x 36 size follows the published design, which calls the RAM
// dual-port; the four ports are this design's choice, needed because two
// symbols are written and two read in every cycle of the schedule used here.
module ext_ram #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 36,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we0,
  input  logic [AW-1:0]    waddr0,
  input  logic [WIDTH-1:0] wdata0,
  input  logic             we1,
  input  logic [AW-1:0]    waddr1,
  input  logic [WIDTH-1:0] wdata1,
  input  logic [AW-1:0]    raddr0,
  output logic [WIDTH-1:0] rdata0,
  input  logic [AW-1:0]    raddr1,
  output logic [WIDTH-1:0] rdata1
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we1) mem[waddr1] <= wdata1;
    if (we0) mem[waddr0] <= wdata0;
  end

  assign rdata0 = mem[raddr0];
  assign rdata1 = mem[raddr1];
endmodule
