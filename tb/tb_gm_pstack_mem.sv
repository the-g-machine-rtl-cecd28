// Testbench of gm_pstack_mem: writes random cells, then reads them back
// combinationally, and checks that a write lands at the clock edge.
`include "tb/tb_check.svh"
module tb_gm_pstack_mem;
  logic clk = 0, we = 0;
  logic [7:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] m [256];
  int checks = 0, failures = 0;
  gm_pstack_mem dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; waddr = 8'(i); wdata = $urandom; m[i] = wdata;
      raddr = 8'(i);
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 256; i++) begin
      raddr = 8'($urandom); #1;
      `CHECK(rdata == m[raddr], "read back")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
