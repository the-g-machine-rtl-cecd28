// Testbench of gm_ctrl_store: random byte writes over the whole 64 KiB,
// read back in random order against a model.
`include "tb/tb_check.svh"
module tb_gm_ctrl_store;
  logic clk = 0, we = 0;
  logic [15:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] m [int];
  int checks = 0, failures = 0;
  gm_ctrl_store dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk); we = 1; addr = 16'($urandom); wdata = 8'($urandom);
      m[int'(addr)] = wdata;
    end
    @(negedge clk); we = 0;
    foreach (m[a]) begin
      addr = 16'(a); #1;
      `CHECK(rdata == m[a], "read back")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
