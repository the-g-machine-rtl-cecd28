// Fast overflow memory of the P-stack. It holds the cells of the P-stack
// below the register queue inside the processor. The P-stack writes the
// cell that falls off the bottom of its register queue at a push and reads
// back the cell that re-enters the queue at a pop, both in the same cycle,
// so the memory has one synchronous write port and one asynchronous read
// port. The description says only that the stack overflows into fast
// memory; the depth (DEPTH cells) and the port structure are this
// design's choice.
module gm_pstack_mem #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];
  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;
  assign rdata = mem[raddr];
endmodule
