// Testbench of gm_alu. Random operands for every operation; the expected
// result and condition codes are computed here with 64-bit arithmetic.
`include "tb/tb_check.svh"
module tb_gm_alu;
  import gm_pkg::*;
  aluop_e op;
  logic [31:0] a, b, y;
  logic [4:0] k;
  logic cin;
  cc_t cc;
  int checks = 0, failures = 0;
  gm_alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] s;
    logic [31:0] ey;
    logic ec, ev;
    aluop_e ops[9] = '{A_ADD, A_ADC, A_ADD1, A_NOT, A_SHL, A_SHR, A_INSB, A_ZERO, A_PASS};
    for (int i = 0; i < 5000; i++) begin
      op = ops[$urandom_range(0, 8)];
      a = $urandom; b = $urandom; k = 5'($urandom); cin = 1'($urandom);
      if (i % 7 == 0) a = 32'h7fffffff;
      if (i % 11 == 0) b = -a;
      #1;
      ec = 0; ev = 0;
      case (op)
        A_ADD, A_ADC, A_ADD1: begin
          s = 64'(b) + 64'(a) + ((op == A_ADC) ? 64'(cin) : (op == A_ADD1) ? 64'd1 : 64'd0);
          ey = s[31:0]; ec = s[32];
          ev = ($signed(a) >= 0 && $signed(b) >= 0 && $signed(ey) < 0) ||
               ($signed(a) < 0 && $signed(b) < 0 && $signed(ey) >= 0);
        end
        A_NOT:  ey = ~a;
        A_SHL:  begin ey = a << k; ec = (k == 0) ? 0 : a[32-k]; end
        A_SHR:  begin ey = 32'($signed(a) >>> k); ec = (k == 0) ? 0 : a[k-1]; end
        A_INSB: begin ey = b; ey[8*k[1:0] +: 8] = a[7:0]; end
        A_ZERO: ey = 0;
        default: ey = a;
      endcase
      `CHECK(y == ey, $sformatf("result op=%s a=%h b=%h", op.name(), a, b))
      `CHECK(cc.z == (ey == 0) && cc.n == ey[31] && cc.c == ec && cc.v == ev, $sformatf("flags op=%s", op.name()))
    end
    // subtraction as complement then add with carry-in 1: 5 - 7 = -2
    op = A_NOT; a = 7; #1; a = y; b = 5; op = A_ADD1; #1;
    `CHECK(y == 32'hFFFFFFFE && cc.n && !cc.z, "5-7 via NOT, ADD1")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
