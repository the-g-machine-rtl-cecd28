// ALU of the G-processor, combinational. It works on signed 32-bit data:
// addition, add-with-carry, complementation, shifts, byte insertion and the
// constant zero, and it produces the condition codes zero, negative, carry
// and overflow. These operations and codes follow the description.
//
// Operands: a is the top of the V-stack, b the cell below it. Binary
// operations compute b OP a (b is the older operand). k is the shift count
// or byte position; cin is the stored carry for A_ADC.
//   A_ADD   b + a          A_ADC  b + a + cin      A_ADD1 b + a + 1
//   A_NOT   ~a             A_SHL  a << k           A_SHR  a >>> k
//   A_INSB  b with byte k replaced by a[7:0]       A_ZERO 0
//   A_PASS  a
// A subtraction is a complement followed by A_ADD1. Carry and overflow are
// produced by the additions and by shifts (last bit shifted out; overflow
// cleared); the other operations clear them. The operation coding and the
// operand order are this design's own.
module gm_alu
  import gm_pkg::*;
(
  input  aluop_e          op,
  input  logic [WORD-1:0] a,
  input  logic [WORD-1:0] b,
  input  logic [4:0]      k,
  input  logic            cin,
  output logic [WORD-1:0] y,
  output cc_t             cc
);
  logic [WORD:0] sum;
  logic          ci;
  logic [WORD-1:0] ins;

  always_comb begin
    ci = (op == A_ADC) ? cin : (op == A_ADD1);
    sum = {1'b0, b} + {1'b0, a} + {{WORD{1'b0}}, ci};
    ins = b;
    ins[8*k[1:0] +: 8] = a[7:0];
    y = '0;
    cc = '0;
    unique case (op)
      A_ADD, A_ADC, A_ADD1: begin
        y    = sum[WORD-1:0];
        cc.c = sum[WORD];
        cc.v = (a[WORD-1] == b[WORD-1]) && (y[WORD-1] != a[WORD-1]);
      end
      A_NOT:  y = ~a;
      A_SHL: begin
        y = a << k;
        cc.c = (k != 0) ? a[WORD-32'(k)] : 1'b0;
      end
      A_SHR: begin
        y = $signed(a) >>> k;
        cc.c = (k != 0) ? a[k-1] : 1'b0;
      end
      A_INSB: y = ins;
      A_ZERO: y = '0;
      A_PASS: y = a;
      default: y = '0;
    endcase
    cc.z = (y == '0);
    cc.n = y[WORD-1];
  end
endmodule
