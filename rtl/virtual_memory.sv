// virtual_memory - simple dual-port buffer memory.
//
// One write port (synchronous, we/waddr/wdata) and one read port with an
// asynchronous read (rdata follows raddr in the same cycle), as in the
// distributed RAM of an FPGA. The decoder uses it for the block buffers of
// channel and extrinsic values and for the backward state metrics that the
// MAP decoder keeps between its backward and forward passes. Contents are
// not reset; users write an entry before reading it.
module virtual_memory #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 6144,
  parameter int AW    = $clog2(DEPTH)
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
