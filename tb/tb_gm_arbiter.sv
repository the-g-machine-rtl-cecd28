// Testbench of gm_arbiter with two requesters: the G-processor (0) wins
// over the host (1) when both ask, a grant is held until done, and the
// grant is always at most one-hot.
`include "tb/tb_check.svh"
module tb_gm_arbiter;
  logic clk = 0, rst_n = 1, done = 1;
  logic [1:0] req = 0, gnt;
  int checks = 0, failures = 0;
  gm_arbiter #(.N(2)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [1:0] owner;
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // single-cycle transfers: pure fixed priority
    for (int i = 0; i < 200; i++) begin
      @(negedge clk); req = 2'($urandom); done = 1; #1;
      `CHECK(gnt == (req[0] ? 2'b01 : req[1] ? 2'b10 : 2'b00), "fixed priority")
    end
    // multi-cycle transfer by the host: held against the processor
    @(negedge clk); req = 2'b10; done = 0; #1;
    `CHECK(gnt == 2'b10, "host granted when alone")
    @(negedge clk); req = 2'b11; #1;
    `CHECK(gnt == 2'b10, "host keeps the grant until done")
    done = 1; #1;
    @(negedge clk); #1;
    `CHECK(gnt == 2'b01, "processor next")
    // random: owner model
    owner = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      req = 2'($urandom) | owner; done = 1'($urandom); #1;
      if (owner != 0) `CHECK(gnt == owner, "held")
      else `CHECK(gnt == (req[0] ? 2'b01 : req[1] ? 2'b10 : 2'b00), "priority")
      @(posedge clk); owner = done ? 2'b00 : gnt;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
