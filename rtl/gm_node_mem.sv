// G-memory node store. Each of NODES nodes holds two 32-bit data cells,
// six tag bits (is evaluated, first cell holds a pointer, second cell holds
// a pointer, recently written, uncollectable, collector has visited), an
// 8-bit reference count, an 8-bit local reference count and a 2-bit
// threshold, 88 bits in all, as in the description's node layout.
//
// One read port, read combinationally, and one write port that writes a
// whole node at the clock edge: the memory manager does each
// read-modify-write of a node within one cycle. The number of nodes is not
// given by the description ("can be extended to very large memories");
// NODES is this design's choice.
module gm_node_mem
  import gm_pkg::*;
#(
  parameter int unsigned NODES = 4096
) (
  input  logic                     clk,
  input  logic [$clog2(NODES)-1:0] raddr,
  output node_t                    rdata,
  input  logic                     we,
  input  logic [$clog2(NODES)-1:0] waddr,
  input  node_t                    wdata
);
  node_t mem [NODES];
  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;
  assign rdata = mem[raddr];
endmodule
