// Testbench of gm_node_mem: random whole-node writes (all 88 bits: counts,
// threshold, tags, both cells) and read-back against a model.
`include "tb/tb_check.svh"
module tb_gm_node_mem;
  import gm_pkg::*;
  logic clk = 0, we = 0;
  logic [11:0] raddr = 0, waddr = 0;
  node_t rdata, wdata;
  node_t m [int];
  int checks = 0, failures = 0;
  gm_node_mem dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    `CHECK($bits(node_t) == 88, "node is 88 bits")
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk); we = 1; waddr = 12'($urandom);
      wdata = {$urandom, $urandom, $urandom};
      m[int'(waddr)] = wdata;
    end
    @(negedge clk); we = 0;
    foreach (m[a]) begin
      raddr = 12'(a); #1;
      `CHECK(rdata == m[a], "read back")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
