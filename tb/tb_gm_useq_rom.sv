// Testbench of gm_useq_rom. For every G-code opcode the sequence starting
// at its dispatch entry is walked to its last word and compared with the
// expected micro-operations, written out here from the instruction
// definitions; the operand kinds are checked too.
`include "tb/tb_check.svh"
module tb_gm_useq_rom;
  import gm_pkg::*;
  gop_e op;
  logic [5:0] entry, addr;
  opnd_e opnd;
  uinstr_t word;
  logic last;
  int checks = 0, failures = 0;
  gm_useq_rom dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_seq(gop_e o, opnd_e k, uop_e s[$], int aluop = -1);
    int n = 0;
    op = o; #1;
    `CHECK(opnd == k, $sformatf("operand kind of %s", o.name()))
    addr = entry;
    forever begin
      #1;
      `CHECK(n < s.size() && word.op == s[n], $sformatf("%s word %0d", o.name(), n))
      if (aluop >= 0 && word.op inside {U_ALU0, U_ALU1, U_ALU2} && n == s.size()-1)
        `CHECK(word.imm == 8'(aluop), $sformatf("%s alu op", o.name()))
      n++;
      if (last || n > 4) break;
      addr = addr + 1'b1;
    end
    `CHECK(n == s.size(), $sformatf("%s length", o.name()))
  endtask

  initial begin
    expect_seq(G_PUSHP, OPND_LIT, '{U_PPUSHL});
    expect_seq(G_PUSHV, OPND_LIT, '{U_VPUSHL});
    expect_seq(G_POP, OPND_NONE, '{U_PPOP});
    expect_seq(G_COPY, OPND_BYTE, '{U_PCOPY});
    expect_seq(G_MOVE, OPND_BYTE, '{U_PMOVE});
    expect_seq(G_ROT, OPND_BYTE, '{U_PROT});
    expect_seq(G_ADD, OPND_NONE, '{U_ALU2}, int'(A_ADD));
    expect_seq(G_ADC, OPND_NONE, '{U_ALU2}, int'(A_ADC));
    expect_seq(G_SUB, OPND_NONE, '{U_ALU1, U_ALU2}, int'(A_ADD1));
    expect_seq(G_NOT, OPND_NONE, '{U_ALU1}, int'(A_NOT));
    expect_seq(G_SHL, OPND_BYTE, '{U_ALU1}, int'(A_SHL));
    expect_seq(G_SHR, OPND_BYTE, '{U_ALU1}, int'(A_SHR));
    expect_seq(G_INSB, OPND_BYTE, '{U_ALU2}, int'(A_INSB));
    expect_seq(G_ZERO, OPND_NONE, '{U_ALU0}, int'(A_ZERO));
    expect_seq(G_POPV, OPND_NONE, '{U_VPOP});
    expect_seq(G_ALLOC, OPND_NONE, '{U_ALLOC});
    expect_seq(G_READV, OPND_BYTE, '{U_READV});
    expect_seq(G_READP, OPND_BYTE, '{U_READP});
    expect_seq(G_WRITEV, OPND_BYTE, '{U_WRITEV});
    expect_seq(G_WRITEP, OPND_BYTE, '{U_WRITEP});
    expect_seq(G_UPDATE, OPND_NONE, '{U_TRASH, U_UPDV});
    expect_seq(G_EVAL, OPND_NONE, '{U_EVAL});
    expect_seq(G_JZ, OPND_ADDR, '{U_BR});
    expect_seq(G_JNZ, OPND_ADDR, '{U_BR});
    expect_seq(G_CALL, OPND_ADDR, '{U_PPUSHL, U_MCALL});
    expect_seq(G_RET, OPND_NONE, '{U_RET});
    expect_seq(G_SVC, OPND_NONE, '{U_SVC});
    expect_seq(G_HALT, OPND_NONE, '{U_HALT});
    op = G_JMP; #1;
    `CHECK(opnd == OPND_ADDR, "JMP has an address operand")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
