// Micro-sequence store of the instruction fetch and translation unit.
// Every G-code instruction that is not consumed by the fetch unit itself
// expands into a short sequence of 20-bit vertical micro-instructions
// held here. The store has two combinational lookups: the dispatch table
// (entry) gives the first word of the sequence of an opcode, and the
// sequence table (word) gives a micro-instruction together with a flag
// marking the last word of its sequence. The micro-sequence control fills
// the idx field from the instruction's operand byte where the instruction
// has one.
//
// The description names the store and the 20-bit micro-instruction; the
// micro-instruction set, the sequences and their addresses are this
// design's own. Unconditional jumps are not in the table: the fetch unit
// interprets them without producing micro-instructions. Unknown opcodes
// dispatch to a single no-operation.
module gm_useq_rom
  import gm_pkg::*;
(
  input  gop_e       op,
  output logic [5:0] entry,
  output opnd_e      opnd,     // operand kind of the opcode
  input  logic [5:0] addr,
  output uinstr_t    word,
  output logic       last
);
  function automatic uinstr_t mk(uop_e o, logic [7:0] imm);
    mk = '{op: o, idx: 6'd0, imm: imm};
  endfunction

  always_comb begin
    opnd  = OPND_NONE;
    unique case (op)
      G_PUSHP, G_PUSHV:                         opnd = OPND_LIT;
      G_COPY, G_MOVE, G_ROT, G_SHL, G_SHR, G_INSB, G_CASE,
      G_READV, G_READP, G_WRITEV, G_WRITEP:     opnd = OPND_BYTE;
      G_JMP, G_JZ, G_JNZ, G_CALL:               opnd = OPND_ADDR;
      default:                                  opnd = OPND_NONE;
    endcase
    unique case (op)
      G_PUSHP:  entry = 6'd1;
      G_PUSHV:  entry = 6'd2;
      G_POP:    entry = 6'd3;
      G_COPY:   entry = 6'd4;
      G_MOVE:   entry = 6'd5;
      G_ROT:    entry = 6'd6;
      G_ADD:    entry = 6'd7;
      G_ADC:    entry = 6'd8;
      G_SUB:    entry = 6'd9;    // two words
      G_NOT:    entry = 6'd11;
      G_SHL:    entry = 6'd12;
      G_SHR:    entry = 6'd13;
      G_INSB:   entry = 6'd14;
      G_ZERO:   entry = 6'd15;
      G_POPV:   entry = 6'd16;
      G_ALLOC:  entry = 6'd17;
      G_READV:  entry = 6'd18;
      G_READP:  entry = 6'd19;
      G_WRITEV: entry = 6'd20;
      G_WRITEP: entry = 6'd21;
      G_UPDATE: entry = 6'd22;   // two words
      G_EVAL:   entry = 6'd24;
      G_JZ:     entry = 6'd25;
      G_JNZ:    entry = 6'd26;
      G_CALL:   entry = 6'd27;   // two words
      G_RET:    entry = 6'd29;
      G_SVC:    entry = 6'd30;
      G_HALT:   entry = 6'd31;
      G_CASE:   entry = 6'd32;
      default:  entry = 6'd0;
    endcase
  end

  always_comb begin
    last = 1'b1;
    unique case (addr)
      6'd1:  word = mk(U_PPUSHL, 8'd0);
      6'd2:  word = mk(U_VPUSHL, 8'd0);
      6'd3:  word = mk(U_PPOP,   8'd0);
      6'd4:  word = mk(U_PCOPY,  8'd0);
      6'd5:  word = mk(U_PMOVE,  8'd0);
      6'd6:  word = mk(U_PROT,   8'd0);
      6'd7:  word = mk(U_ALU2,   8'(A_ADD));
      6'd8:  word = mk(U_ALU2,   8'(A_ADC));
      6'd9:  begin word = mk(U_ALU1, 8'(A_NOT)); last = 1'b0; end
      6'd10: word = mk(U_ALU2,   8'(A_ADD1));
      6'd11: word = mk(U_ALU1,   8'(A_NOT));
      6'd12: word = mk(U_ALU1,   8'(A_SHL));
      6'd13: word = mk(U_ALU1,   8'(A_SHR));
      6'd14: word = mk(U_ALU2,   8'(A_INSB));
      6'd15: word = mk(U_ALU0,   8'(A_ZERO));
      6'd16: word = mk(U_VPOP,   8'd0);
      6'd17: word = mk(U_ALLOC,  8'd0);
      6'd18: word = mk(U_READV,  8'd0);
      6'd19: word = mk(U_READP,  8'd0);
      6'd20: word = mk(U_WRITEV, 8'd0);
      6'd21: word = mk(U_WRITEP, 8'd0);
      6'd22: begin word = mk(U_TRASH, 8'd0); last = 1'b0; end
      6'd23: word = mk(U_UPDV,   8'd0);
      6'd24: word = mk(U_EVAL,   8'd0);
      6'd25: word = mk(U_BR,     BR_Z);
      6'd26: word = mk(U_BR,     BR_NZ);
      6'd27: begin word = mk(U_PPUSHL, 8'd0); last = 1'b0; end
      6'd28: word = mk(U_MCALL,  8'd0);
      6'd29: word = mk(U_RET,    8'd0);
      6'd30: word = mk(U_SVC,    8'd0);
      6'd31: word = mk(U_HALT,   8'd0);
      6'd32: word = mk(U_CASE,   8'd0);
      default: word = mk(U_NOP,  8'd0);
    endcase
  end
endmodule
