// Testbench of gm_pstack at its default size (24 registers, 256 overflow
// cells). Random PUSH/POP/COPY/MOVE/ROT/REPL operations are applied one
// per cycle and the stack is compared after every cycle with a queue model
// kept by the testbench: top, second cell, depth, and whether a spill or a
// fill happened. Each operation must complete in the cycle it is applied.
`include "tb/tb_check.svh"
module tb_gm_pstack;
  import gm_pkg::*;
  localparam int NREG = 24;
  logic clk = 0, rst_n = 1;
  psop_e op = PS_NONE;
  logic [4:0] idx = 0;
  logic [31:0] din = 0, top, nxt;
  logic [$clog2(NREG+256+1)-1:0] depth;
  logic spill, fill, err;
  int checks = 0, failures = 0, nspill = 0, nfill = 0;
  logic [31:0] model[$];

  gm_pstack dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(psop_e o, int i, logic [31:0] d);
    bit exp_spill, exp_fill, sp, fl;
    logic [31:0] x;
    int n = model.size();
    exp_spill = 0; exp_fill = 0;
    @(negedge clk);
    op = o; idx = 5'(i); din = d;
    @(posedge clk);
    sp = spill; fl = fill;
    #1;
    case (o)
      PS_PUSH: begin exp_spill = (n >= NREG); model.push_front(d); end
      PS_COPY: begin exp_spill = (n >= NREG); model.push_front(model[i]); end
      PS_POP:  begin exp_fill = (n > NREG); void'(model.pop_front()); end
      PS_MOVE: begin exp_fill = (n > NREG); model[i] = model[0]; void'(model.pop_front()); end
      PS_ROT:  begin x = model[i]; model.delete(i); model.push_front(x); end
      PS_REPL: model[0] = d;
      default: ;
    endcase
    op = PS_NONE;
    if (sp) nspill++;
    if (fl) nfill++;
    `CHECK(sp == exp_spill && fl == exp_fill, "spill/fill")
    `CHECK(int'(depth) == model.size(), $sformatf("depth %0d vs %0d", depth, model.size()))
    if (model.size() > 0) `CHECK(top == model[0], "top")
    if (model.size() > 1) `CHECK(nxt == model[1], "second cell")
    `CHECK(!err, "no error")
  endtask

  initial begin
    int r, n, lim;
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // directed: the five stack instructions in the register queue
    apply(PS_PUSH, 0, 32'h11); apply(PS_PUSH, 0, 32'h22); apply(PS_PUSH, 0, 32'h33);
    apply(PS_COPY, 2, 0);      // 11 33 22 11
    `CHECK(top == 32'h11, "COPY 2")
    apply(PS_ROT, 2, 0);       // 22 11 33 11
    `CHECK(top == 32'h22 && nxt == 32'h11, "ROT 2")
    apply(PS_MOVE, 2, 0);      // 11 22 11
    `CHECK(top == 32'h11 && nxt == 32'h22, "MOVE 2")
    // fill beyond the register queue and empty again: spills and fills
    for (int i = 0; i < 60; i++) apply(PS_PUSH, 0, $urandom);
    for (int i = 0; i < 40; i++) apply(PS_POP, 0, 0);
    // random mix
    for (int k = 0; k < 20000; k++) begin
      n = model.size();
      r = $urandom_range(0, 99);
      lim = (n < NREG) ? n : NREG;
      if (n == 0 || (r < 35 && n < 270))       apply(PS_PUSH, 0, $urandom);
      else if (r < 60)                         apply(PS_POP, 0, 0);
      else if (r < 70 && n < 270)              apply(PS_COPY, $urandom_range(0, lim-1), 0);
      else if (r < 80 && n >= 2)               apply(PS_MOVE, $urandom_range(1, lim-1), 0);
      else if (r < 90)                         apply(PS_ROT, $urandom_range(0, lim-1), 0);
      else                                     apply(PS_REPL, 0, $urandom);
    end
    `CHECK(nspill > 0 && nfill > 0, "overflow exercised")
    $display("spills=%0d fills=%0d", nspill, nfill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
