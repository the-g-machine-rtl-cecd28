// Testbench of gm_vstack. Random push, pop, replace-top and binary
// (pop two, push one) operations, compared each cycle with a queue model.
`include "tb/tb_check.svh"
module tb_gm_vstack;
  logic clk = 0, rst_n = 1;
  logic [1:0] vop = 0;
  logic binop = 0;
  logic [31:0] din = 0, a, b;
  logic [4:0] depth;
  logic err;
  int checks = 0, failures = 0;
  logic [31:0] m[$];
  gm_vstack dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic [1:0] o, logic bi, logic [31:0] d);
    @(negedge clk); vop = o; binop = bi; din = d;
    @(posedge clk); #1; vop = 0;
    case (o)
      1: m.push_front(d);
      2: void'(m.pop_front());
      3: if (bi) begin void'(m.pop_front()); m[0] = d; end else m[0] = d;
      default: ;
    endcase
    `CHECK(int'(depth) == m.size(), "depth")
    if (m.size() > 0) `CHECK(a == m[0], "top")
    if (m.size() > 1) `CHECK(b == m[1], "second")
    `CHECK(!err, "no error")
  endtask

  initial begin
    int r;
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) step(1, 0, $urandom);
    for (int i = 0; i < 5000; i++) begin
      r = $urandom_range(0, 3);
      if (m.size() == 0 || (r == 0 && m.size() < 16)) step(1, 0, $urandom);
      else if (r == 1) step(2, 0, 0);
      else if (r == 2) step(3, 0, $urandom);
      else if (m.size() >= 2) step(3, 1, $urandom);
    end
    // overflow is flagged
    while (m.size() < 16) step(1, 0, 1);
    @(negedge clk); vop = 1; @(posedge clk); #1; vop = 0;
    `CHECK(err, "overflow flagged")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
