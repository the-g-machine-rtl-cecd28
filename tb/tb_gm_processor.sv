// Testbench of gm_processor at its default sizes. The testbench plays the
// control store (a byte array holding the shared test program) and the
// G-memory manager (a node array answering after a random delay, ALLOC
// handing out consecutive nodes). It checks the program's results (loop
// sum 55 in node N, suspension S updated to 105 and tagged evaluated), the
// service request showing N, HALT, and that the P-stack spilled and
// filled, jumps were taken and not taken, EVAL both called and skipped,
// and call/return were signalled in pairs.
`include "tb/tb_check.svh"
module tb_gm_processor;
  import gm_pkg::*;
  logic clk = 0, rst_n = 1, start = 0;
  logic [15:0] start_addr = 0, cs_addr;
  logic cs_req, cs_gnt;
  logic [7:0] cs_data;
  logic m_req, m_ack = 0;
  mreq_t m_rq;
  logic [31:0] m_rdata = 0, gbus_out, d_reg, v_top;
  tags_t m_rtags = '0;
  logic svc_req, host_cont = 0, halted, err;
  pevents_t ev;
  logic [7:0] code [65536];
  logic [31:0] gm [1024];
  tags_t tg [512];
  int next_node = 1;
  int checks = 0, failures = 0;
  int n_spill = 0, n_fill = 0, n_taken = 0, n_nt = 0, n_jmp = 0, n_ecall = 0, n_edone = 0,
      n_case = 0, n_ovl = 0, n_call = 0, n_ret = 0, n_stall2 = 0, n_trash = 0, n_mcall = 0, n_mret = 0;
  `include "tb/tb_gm_prog.svh"

  gm_processor dut (.*);
  assign cs_gnt  = cs_req;
  assign cs_data = code[cs_addr];
  always #5 clk = ~clk;

  always @(posedge clk) begin
    n_spill += int'(ev.spill); n_fill += int'(ev.fill); n_taken += int'(ev.taken);
    n_nt += int'(ev.nottaken); n_jmp += int'(ev.jmp); n_ecall += int'(ev.eval_call);
    n_edone += int'(ev.eval_done); n_call += int'(ev.call); n_ret += int'(ev.ret);
    n_stall2 += int'(ev.stall2); n_case += int'(ev.casesw); n_ovl += int'(ev.overlap);
  end

  always begin
    @(posedge clk);
    if (m_req && !m_ack) begin
      repeat ($urandom_range(0, 2)) @(posedge clk);
      @(negedge clk);
      m_ack = 1;
      case (m_rq.op)
        M_READ:   begin m_rdata = gm[m_rq.addr[9:0]]; m_rtags = tg[m_rq.addr[9:1]]; end
        M_WRITE:  gm[m_rq.addr[9:0]] = m_rq.wdata;
        M_ALLOC:  begin m_rdata = 32'(2 * next_node); tg[next_node] = '0; next_node++; end
        M_UPDATE: begin gm[m_rq.addr[9:0]] = m_rq.wdata; tg[m_rq.addr[9:1]].evaluated = 1; end
        M_TRASH:  n_trash++;
        M_CALL:   n_mcall++;
        M_RET:    n_mret++;
        default: ;
      endcase
      @(posedge clk); #1 m_ack = 0;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build_prog();
    foreach (code[i]) code[i] = 8'h3F;
    foreach (gm[i]) gm[i] = 0;
    foreach (tg[i]) tg[i] = '0;
    foreach (prog[i]) code[i] = prog[i];
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; start_addr = 0; @(negedge clk); start = 0;
    wait (svc_req);
    `CHECK(gbus_out == 32'd2, "service request shows node N")
    `CHECK(gm[2] == 0 && gm[3] == 55, $sformatf("loop result N = {%0d, %0d}", gm[2], gm[3]))
    `CHECK(gm[4] == 105 && tg[2].evaluated, $sformatf("suspension evaluated to %0d", gm[4]))
    repeat (3) @(negedge clk);
    host_cont = 1; @(negedge clk); host_cont = 0;
    wait (svc_req);
    `CHECK(gbus_out == 32'd4, "second service request shows node S")
    @(negedge clk); host_cont = 1; @(negedge clk); host_cont = 0;
    repeat (20) @(negedge clk);
    `CHECK(halted && !err, $sformatf("halted %0d without error %0d", halted, err))
    `CHECK(n_spill == 8 && n_fill == 8, $sformatf("P-stack spills %0d fills %0d", n_spill, n_fill))
    `CHECK(n_taken == 11 && n_nt == 3, $sformatf("jumps taken %0d not taken %0d", n_taken, n_nt))
    `CHECK(n_ecall == 1 && n_edone == 1, "EVAL called once and skipped once")
    `CHECK(n_case == 2, $sformatf("two case switches, got %0d", n_case))
    `CHECK(n_ovl > 0, "micro-instructions overlapped G-memory writes")
    `CHECK(n_call == 3 && n_ret == 3 && n_mcall == 3 && n_mret == 3, "calls and returns")
    `CHECK(n_jmp >= 2 && n_trash == 1, "JMP/CALL and TRASH")
    $display("stall2=%0d st=%s ts=%s uq=%0d", n_stall2, dut.u_pcu.st.name(), dut.u_iftu.ts.name(), dut.u_iftu.uq_valid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
