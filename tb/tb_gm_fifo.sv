// Testbench of gm_fifo as the literals queue (32-bit, 4 deep): random
// push/pop/flush against a queue model; order, empty, full and count are
// checked every cycle.
`include "tb/tb_check.svh"
module tb_gm_fifo;
  localparam int D = 4;
  logic clk = 0, rst_n = 1, flush = 0, push = 0, pop = 0, empty, full;
  logic [31:0] din = 0, dout;
  logic [2:0] count;
  int checks = 0, failures = 0;
  logic [31:0] m[$];
  gm_fifo #(.W(32), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      push = ($urandom_range(0, 9) < 5) && m.size() < D;
      pop  = ($urandom_range(0, 9) < 4) && m.size() > 0;
      flush = ($urandom_range(0, 99) == 0);
      din = $urandom;
      if (m.size() > 0) `CHECK(dout == m[0], "head")
      @(posedge clk); #1;
      if (flush) m.delete();
      else begin
        if (pop) void'(m.pop_front());
        if (push) m.push_back(din);
      end
      push = 0; pop = 0; flush = 0;
      `CHECK(int'(count) == m.size() && empty == (m.size() == 0) && full == (m.size() == D), "count/empty/full")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
