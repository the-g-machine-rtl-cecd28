// Testbench of gm_pcu together with the P-stack, V-stack and ALU it
// drives. The testbench feeds micro-instructions and literals from queues
// (standing in for the IFTU) and answers G-memory requests from a small
// node array after a random delay (standing in for the memory manager).
// It checks stack and ALU results, that dispatch waits for a missing
// literal and for G-memory, branch resolution against the Z code, case
// switches (selector popped, buffer of the chosen alternative), EVAL of
// an evaluated and of an unevaluated node (call signal, return address
// pushed, redirect to the node's code), RET, the D register, the service
// request handshake and HALT.
`include "tb/tb_check.svh"
module tb_gm_pcu;
  import gm_pkg::*;
  logic clk = 0, rst_n = 1, start = 0;
  logic uq_valid, uq_pop, lq_valid, lq_pop;
  uinstr_t uq_data;
  logic [31:0] lq_data;
  logic br_valid, br_taken, redir_valid;
  logic [1:0] br_buf;
  int buf_log[$];
  logic [15:0] redir_addr;
  psop_e ps_op; logic [4:0] ps_idx; logic [31:0] ps_din, ps_top, ps_nxt;
  logic [1:0] v_op; logic v_bin; logic [31:0] v_din, v_a, v_b, alu_y;
  aluop_e alu_op; logic [4:0] alu_k; logic alu_cin; cc_t alu_cc, cc;
  logic m_req, m_ack = 0; mreq_t m_rq; logic [31:0] m_rdata = 0; tags_t m_rtags = '0;
  logic svc_req, host_cont = 0, halted;
  logic [31:0] gbus_out, a_reg, d_reg; tags_t t_reg;
  logic ev_eval_call, ev_eval_done, ev_call, ev_ret, ev_overlap, ps_err, v_err;
  int novl = 0, slow = 0;
  int checks = 0, failures = 0, ncall = 0, nret = 0, nbr = 0, ntaken = 0, nredir = 0;
  int last_redir = -1;
  bit br_log[$];

  uinstr_t uq[$];
  logic [31:0] lq[$];
  logic [31:0] gcell [64];
  tags_t tg [32];

  gm_pcu dut (.*);
  gm_pstack u_ps (.clk, .rst_n, .op(ps_op), .idx(ps_idx), .din(ps_din), .top(ps_top),
                  .nxt(ps_nxt), .depth(), .spill(), .fill(), .err(ps_err));
  gm_vstack u_vs (.clk, .rst_n, .vop(v_op), .binop(v_bin), .din(v_din), .a(v_a), .b(v_b),
                  .depth(), .err(v_err));
  gm_alu u_alu (.op(alu_op), .a(v_a), .b(v_b), .k(alu_k), .cin(alu_cin), .y(alu_y), .cc(alu_cc));

  assign uq_valid = uq.size() > 0;
  assign uq_data  = uq_valid ? uq[0] : '0;
  assign lq_valid = lq.size() > 0;
  assign lq_data  = lq_valid ? lq[0] : '0;
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (uq_pop) void'(uq.pop_front());
    if (lq_pop) void'(lq.pop_front());
    ncall += int'(ev_call); nret += int'(ev_ret); novl += int'(ev_overlap);
    if (br_valid) begin nbr++; ntaken += int'(br_taken); br_log.push_back(br_taken); buf_log.push_back(int'(br_buf)); end
    if (redir_valid) begin nredir++; last_redir = int'(redir_addr); end
  end

  // memory responder: random delay, one node array, pointers {node, cell}
  always begin
    @(posedge clk);
    if (m_req && !m_ack) begin
      repeat ($urandom_range(0, 3) + slow) @(posedge clk);
      @(negedge clk);
      m_ack = 1;
      case (m_rq.op)
        M_READ:   begin m_rdata = gcell[m_rq.addr[5:0]]; m_rtags = tg[m_rq.addr[5:1]]; end
        M_WRITE:  gcell[m_rq.addr[5:0]] = m_rq.wdata;
        M_ALLOC:  m_rdata = 32'd40;
        M_UPDATE: begin gcell[m_rq.addr[5:0]] = m_rq.wdata; tg[m_rq.addr[5:1]].evaluated = 1; end
        default: ;
      endcase
      @(posedge clk); #1 m_ack = 0;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic uinstr_t U(uop_e o, int idx = 0, int imm = 0);
    return '{op: o, idx: 6'(idx), imm: 8'(imm)};
  endfunction
  task automatic drain();
    int n = 0;
    while ((uq.size() > 0 || dut.st != dut.S_RUN || dut.post_v) && n < 500) begin @(posedge clk); n++; end
    #1;
  endtask

  initial begin
    int t;
    foreach (gcell[i]) gcell[i] = 0;
    foreach (tg[i]) tg[i] = '0;
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    // dispatch waits for a literal
    uq.push_back(U(U_VPUSHL));
    repeat (5) @(posedge clk);
    `CHECK(uq.size() == 1, "waits for literal")
    lq.push_back(32'd7); lq.push_back(32'd5);
    uq.push_back(U(U_VPUSHL));
    uq.push_back(U(U_ALU1, 0, A_NOT));
    uq.push_back(U(U_ALU2, 0, A_ADD1));   // 7 - 5
    drain();
    `CHECK(v_a == 32'd2 && !cc.z, "SUB via NOT and ADD1")
    // stack instructions
    lq.push_back(32'd10); lq.push_back(32'd12); lq.push_back(32'd14);
    repeat (3) uq.push_back(U(U_PPUSHL));
    uq.push_back(U(U_PCOPY, 2));         // 10 14 12 10
    uq.push_back(U(U_PROT, 3));          // 10 10 14 12
    uq.push_back(U(U_PMOVE, 2));         // 10 10 12
    uq.push_back(U(U_PPOP));             // D = 10
    drain();
    `CHECK(ps_top == 32'd10 && ps_nxt == 32'd12 && d_reg == 32'd10, "COPY/ROT/MOVE/POP")
    // branch on Z
    lq.push_back(32'd3); lq.push_back(32'd3);
    uq.push_back(U(U_VPUSHL)); uq.push_back(U(U_VPUSHL));
    uq.push_back(U(U_ALU1, 0, A_NOT)); uq.push_back(U(U_ALU2, 0, A_ADD1));
    uq.push_back(U(U_BR, 1, BR_Z));
    uq.push_back(U(U_BR, 1, BR_NZ));
    drain();
    `CHECK(cc.z && nbr == 2 && ntaken == 1, "branch resolution on Z")
    `CHECK(br_log.size() == 2 && br_log[0] && !br_log[1], "JZ taken and JNZ not taken when Z is set")
    // and with Z clear
    lq.push_back(32'd3); lq.push_back(32'd4);
    uq.push_back(U(U_VPUSHL)); uq.push_back(U(U_VPUSHL));
    uq.push_back(U(U_ALU1, 0, A_NOT)); uq.push_back(U(U_ALU2, 0, A_ADD1));
    uq.push_back(U(U_BR, 1, BR_Z));
    uq.push_back(U(U_BR, 1, BR_NZ));
    uq.push_back(U(U_VPOP));
    drain();
    `CHECK(!cc.z && br_log.size() == 4 && !br_log[2] && br_log[3], "JZ not taken and JNZ taken when Z is clear")
    // case switch: selector 2 -> buffer in imm[3:2]; 0 and 5 fall through
    lq.push_back(32'd0); lq.push_back(32'd5); lq.push_back(32'd2); lq.push_back(32'd9);
    uq.push_back(U(U_VPUSHL)); uq.push_back(U(U_VPUSHL)); uq.push_back(U(U_VPUSHL)); uq.push_back(U(U_VPUSHL));
    uq.push_back(U(U_CASE, 3, 8'h39));   // pops 9: out of range
    uq.push_back(U(U_CASE, 3, 8'h39));   // pops 2: second alternative, buffer 2
    uq.push_back(U(U_CASE, 2, 8'h39));   // pops 5: out of range
    uq.push_back(U(U_CASE, 1, 8'h39));   // pops 0: fall through
    drain();
    `CHECK(br_log.size() == 8 && !br_log[4] && br_log[5] && !br_log[6] && !br_log[7], "case taken only for 1 <= v <= m")
    `CHECK(buf_log.size() == 8 && buf_log[5] == 2, "case reports the buffer of the chosen alternative")
    `CHECK(!v_err, "case pops its selector")
    nbr = 2; ntaken = 1;
    // memory: ALLOC, WRITEV, READV, UPDATE (TRASH + UPDV)
    lq.push_back(32'd77);
    uq.push_back(U(U_ALLOC));            // P: 40 ...
    uq.push_back(U(U_VPUSHL));
    uq.push_back(U(U_WRITEV, 1));        // cell 41 = 77
    uq.push_back(U(U_PCOPY, 0));
    uq.push_back(U(U_READV, 1));         // V: 77
    drain();
    `CHECK(gcell[41] == 32'd77 && v_a == 32'd77 && ps_top == 32'd40, "ALLOC/WRITEV/READV")
    // a posted write overlaps later ALU and stack micro-instructions
    slow = 8;
    lq.push_back(32'd66); lq.push_back(32'd20); lq.push_back(32'd22);
    uq.push_back(U(U_VPUSHL));
    uq.push_back(U(U_WRITEV, 0));        // cell 40 = 66, posted
    uq.push_back(U(U_VPUSHL)); uq.push_back(U(U_VPUSHL));
    uq.push_back(U(U_ALU2, 0, A_ADD));   // 20 + 22 while the write waits
    repeat (6) @(posedge clk); #1;
    `CHECK(uq.size() == 0 && dut.post_v && v_a == 32'd42 && gcell[40] != 32'd66,
           "ALU operation completed before the preceding write")
    uq.push_back(U(U_READV, 0));         // waits for the write, then reads it
    drain();
    slow = 0;
    `CHECK(gcell[40] == 32'd66 && v_a == 32'd66 && novl >= 3, $sformatf("write then read after overlap (%0d)", novl))
    uq.push_back(U(U_VPOP)); uq.push_back(U(U_VPOP));
    lq.push_back(32'd40); uq.push_back(U(U_PPUSHL));
    drain();
    uq.push_back(U(U_TRASH)); uq.push_back(U(U_UPDV));
    drain();
    `CHECK(gcell[40] == 32'd77 && tg[20].evaluated && ps_top == 32'd10, "UPDATE")
    // EVAL of an evaluated node: prediction confirmed, literal dropped
    lq.push_back(32'd40); lq.push_back(32'h0123);
    uq.push_back(U(U_PPUSHL)); uq.push_back(U(U_EVAL));
    drain();
    `CHECK(lq.size() == 0 && ps_top == 32'd40 && ntaken == 1 && nbr == 3, "EVAL of evaluated node")
    // EVAL of an unevaluated node: call its code at cell 2*5
    gcell[10] = 32'h0300; tg[5] = '0;
    lq.push_back(32'd10); lq.push_back(32'h0456);
    uq.push_back(U(U_PPUSHL)); uq.push_back(U(U_EVAL));
    drain();
    `CHECK(ps_top == 32'h0456 && ps_nxt == 32'd10 && ncall == 1 && last_redir == 16'h0300, "EVAL calls node code")
    uq.push_back(U(U_RET));
    drain();
    `CHECK(nret == 1 && last_redir == 16'h0456 && ps_top == 32'd10, "RET")
    // service request
    uq.push_back(U(U_SVC));
    repeat (6) @(posedge clk);
    `CHECK(svc_req && gbus_out == 32'd10, "service request holds")
    @(negedge clk); host_cont = 1; @(negedge clk); host_cont = 0;
    `CHECK(!svc_req, "continue")
    uq.push_back(U(U_HALT));
    repeat (4) @(posedge clk);
    `CHECK(halted && !ps_err && !v_err, "HALT")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
