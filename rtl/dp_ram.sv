// dp_ram: simple dual-port RAM, one synchronous write port and one
// asynchronous read port (distributed-RAM style).
//
// Used for the state metric buffers (64 x 72: eight 9-bit metrics per word)
// and the received-symbol buffers (128 x 32: four 8-bit samples per word).
// A write takes effect at the clock edge; the read port shows the stored word
// in the same cycle the address is applied. Reading an address in the cycle it
// is written returns the old word. Contents are not reset.
// The sizes follow the published design; the asynchronous read port is this
// design's choice, so that a stored word is usable in the same step.
module dp_ram #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 72,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
