// Control store (G-program memory): byte-addressable memory holding the
// G-code, shared by the host and the instruction fetch unit. One port,
// read combinationally and written at the clock edge; an arbiter outside
// chooses who drives it in each cycle. The size is not given by the
// description: BYTES defaults to the 64 KiB reachable by this design's
// 16-bit jump addresses.
module gm_ctrl_store #(
  parameter int unsigned BYTES = 65536
) (
  input  logic                     clk,
  input  logic [$clog2(BYTES)-1:0] addr,
  input  logic                     we,
  input  logic [7:0]               wdata,
  output logic [7:0]               rdata
);
  logic [7:0] mem [BYTES];
  always_ff @(posedge clk) if (we) mem[addr] <= wdata;
  assign rdata = mem[addr];
endmodule
