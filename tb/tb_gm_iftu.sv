// Testbench of gm_iftu. The testbench holds a G-code program in a byte
// array that plays the control store, and plays the PCU: it takes the
// micro-instructions and literals in order, compares them with the
// expected stream, and resolves conditional jumps, EVAL and RET the way a
// PCU would. Covered: literal and index operands, JMP handled without
// micro-instructions, multi-word sequences, a conditional jump not taken
// (no break in the stream), a second prediction stalling translation, a
// taken jump flushing the queues and restarting from the other buffer
// (at least two cycles before the first new micro-instruction), EVAL with
// its return-address literal and a redirect, CALL and RET, and a
// four-way case switch: all four buffers fetching at once, then resolved
// once to an alternative (only that buffer stays enabled) and once to the
// fall-through path.
`include "tb/tb_check.svh"
module tb_gm_iftu;
  import gm_pkg::*;
  logic clk = 0, rst_n = 1, start = 0;
  logic [15:0] start_addr = 0, cs_addr, redir_addr = 0;
  logic cs_req, cs_gnt, uq_valid, uq_pop = 0, lq_valid, lq_pop = 0;
  logic [7:0] cs_data;
  uinstr_t uq_data;
  logic [31:0] lq_data;
  logic br_valid = 0, br_taken = 0, redir_valid = 0;
  logic [1:0] br_buf = 0;
  logic ev_case;
  int ncase = 0;
  logic ev_cond, ev_taken, ev_nottaken, ev_jmp, ev_stall2, ev_redirect;
  logic [7:0] code [65536];
  int checks = 0, failures = 0, nstall2 = 0, njmp = 0, ntaken = 0, nnt = 0;
  int cyc = 0;

  gm_iftu dut (.*);
  assign cs_gnt  = cs_req;
  assign cs_data = code[cs_addr];
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    nstall2 += int'(ev_stall2); njmp += int'(ev_jmp);
    ntaken += int'(ev_taken); nnt += int'(ev_nottaken); ncase += int'(ev_case);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(int a, int bytes[$]);
    foreach (bytes[i]) code[a+i] = 8'(bytes[i]);
  endtask

  // take the next micro-instruction, optionally resolving in the same cycle
  task automatic take(uop_e o, int idx = -1, int imm = -1,
                      bit res_br = 0, bit taken = 0, bit res_redir = 0, int raddr = 0,
                      int lit = -1, int bbuf = -1);
    int waited = 0;
    @(negedge clk);
    while (!uq_valid) begin @(negedge clk); waited++; if (waited > 200) break; end
    `CHECK(uq_valid && uq_data.op == o, $sformatf("expected %s got %s", o.name(), uq_data.op.name()))
    if (idx >= 0) `CHECK(uq_data.idx == 6'(idx), $sformatf("%s idx %0d got %0d", o.name(), idx, uq_data.idx))
    if (imm >= 0) `CHECK(uq_data.imm == 8'(imm), $sformatf("%s imm", o.name()))
    if (lit >= 0) `CHECK(lq_valid && lq_data == 32'(lit), $sformatf("%s literal %h got %h", o.name(), lit, lq_data))
    uq_pop = 1; lq_pop = (lit >= 0);
    br_valid = res_br; br_taken = taken;
    br_buf = (bbuf >= 0) ? 2'(bbuf) : uq_data.idx[1:0];
    redir_valid = res_redir; redir_addr = 16'(raddr);
    @(posedge clk); #1;
    uq_pop = 0; lq_pop = 0; br_valid = 0; br_taken = 0; redir_valid = 0;
  endtask

  initial begin
    int t0, t1;
    foreach (code[i]) code[i] = 8'h00;
    put(16'h0000, '{G_PUSHV, 8'h11, 8'h22, 8'h33, 8'h44, G_COPY, 3, G_JMP, 8'h00, 8'h40});
    put(16'h0040, '{G_SUB, G_JZ, 8'h00, 8'h80, G_ADD, G_JNZ, 8'h00, 8'hA0, G_HALT});
    put(16'h0080, '{G_PUSHP, 0, 0, 0, 5, G_CALL, 8'h00, 8'hC0, G_HALT});
    put(16'h00A0, '{G_EVAL, G_POP, G_HALT});
    put(16'h00C0, '{G_RET});
    put(16'h0100, '{G_CASE, 3, 8'h01, 8'h10, 8'h01, 8'h20, 8'h01, 8'h30, G_POP, G_HALT});
    put(16'h0110, '{G_ADD, G_HALT});
    put(16'h0120, '{G_ZERO, G_HALT});
    put(16'h0130, '{G_ALLOC, G_HALT});
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; start_addr = 0; @(negedge clk); start = 0;
    take(U_VPUSHL, -1, -1, 0, 0, 0, 0, 32'h11223344);
    take(U_PCOPY, 3);
    take(U_ALU1, -1, int'(A_NOT));
    take(U_ALU2, -1, int'(A_ADD1));
    // let translation run ahead to the second conditional jump
    repeat (30) @(negedge clk);
    `CHECK(nstall2 > 0, "second prediction stalls translation")
    take(U_BR, 1, int'(BR_Z), 1, 0);          // JZ not taken: stream goes on
    take(U_ALU2, -1, int'(A_ADD));
    repeat (10) @(negedge clk);                // HALT is translated behind the jump
    `CHECK(dut.u_uq.n > 1, "fall-through path queued behind the jump")
    take(U_BR, -1, int'(BR_NZ), 1, 1);        // JNZ taken: flush, restart at 0xA0
    t0 = cyc;
    @(negedge clk);
    while (!uq_valid) @(negedge clk);
    t1 = cyc;
    `CHECK(t1 - t0 >= 2, $sformatf("restart takes at least two cycles (%0d)", t1 - t0))
    // EVAL of an unevaluated node: redirect to its code at 0x80
    take(U_EVAL, -1, -1, 0, 0, 1, 16'h0080, 16'h00A1);
    take(U_PPUSHL, -1, -1, 0, 0, 0, 0, 5);
    take(U_PPUSHL, -1, -1, 0, 0, 0, 0, 16'h0088);   // CALL: return address
    take(U_MCALL);
    take(U_RET, -1, -1, 0, 0, 1, 16'h00A1);          // return into EVAL's caller
    take(U_PPOP);
    take(U_HALT);
    repeat (10) @(negedge clk);
    `CHECK(!uq_valid, "nothing after HALT")
    // second run: JZ taken right away
    @(negedge clk); start = 1; start_addr = 16'h0040; @(negedge clk); start = 0;
    take(U_ALU1); take(U_ALU2);
    take(U_BR, -1, int'(BR_Z), 1, 1);
    take(U_PPUSHL, -1, -1, 0, 0, 0, 0, 5);
    `CHECK(njmp >= 2 && ntaken == 2 && nnt == 1, $sformatf("events jmp=%0d taken=%0d nottaken=%0d", njmp, ntaken, nnt))
    // third run: four-way case switch taken to its second alternative
    @(negedge clk); start = 1; start_addr = 16'h0100; @(negedge clk); start = 0;
    repeat (30) @(negedge clk);
    `CHECK(dut.en == 4'hF, $sformatf("case enables all four buffers (%b)", dut.en))
    for (int b = 1; b < 4; b++) `CHECK(dut.bcnt[b] != 0, $sformatf("alternative buffer %0d prefetched", b))
    `CHECK(dut.u_uq.n > 1, "fall-through path translated behind the case")
    take(U_CASE, 3, 8'h39, 1, 1, 0, 0, -1, 2);     // v = 2: buffer imm[3:2]
    take(U_ALU0, -1, int'(A_ZERO));
    `CHECK(dut.en == 4'b0100, $sformatf("only the taken buffer stays enabled (%b)", dut.en))
    take(U_HALT);
    // fourth run: the same case switch falls through
    @(negedge clk); start = 1; start_addr = 16'h0100; @(negedge clk); start = 0;
    repeat (30) @(negedge clk);
    take(U_CASE, 3, 8'h39, 1, 0);
    take(U_PPOP);
    `CHECK(dut.en == 4'b0001, $sformatf("fall-through keeps only the active buffer (%b)", dut.en))
    take(U_HALT);
    `CHECK(ncase == 2 && ntaken == 3 && nnt == 2, $sformatf("case events %0d taken=%0d nottaken=%0d", ncase, ntaken, nnt))
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
