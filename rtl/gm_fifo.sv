// Synchronous first-in first-out queue. The G-machine uses it for the
// literals queue and the translated micro-instruction queue of the
// instruction fetch and translation unit, and for the queue of
// pre-allocated node pointers in the G-memory manager.
//
// Interface: push/din writes when not full, pop reads dout (first-word
// fall-through: dout shows the oldest entry whenever empty is low). flush
// empties the queue in one cycle and takes precedence over push and pop.
// count gives the number of entries. The design description names these
// queues and says what they hold; depth and flush behaviour are this
// design's choice.
module gm_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flush,
  input  logic                       push,
  input  logic [W-1:0]               din,
  input  logic                       pop,
  output logic [W-1:0]               dout,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd, wr;
  logic [CW-1:0] n;

  assign empty = (n == 0);
  assign full  = (n == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign count = n;
  assign dout  = mem[rd];

  wire do_push = push && !full;
  wire do_pop  = pop && !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= '0; wr <= '0; n <= '0;
    end else if (flush) begin
      rd <= '0; wr <= '0; n <= '0;
    end else begin
      if (do_push) wr <= (wr == AW'(DEPTH-1)) ? '0 : wr + 1'b1;
      if (do_pop)  rd <= (rd == AW'(DEPTH-1)) ? '0 : rd + 1'b1;
      n <= n + CW'(do_push) - CW'(do_pop);
    end
  end

  always_ff @(posedge clk) if (do_push && !flush) mem[wr] <= din;

`ifndef SYNTHESIS
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push && !flush |-> !full || pop);
`endif
endmodule
