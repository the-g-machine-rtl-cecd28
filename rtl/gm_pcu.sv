// Processor control unit (PCU) of the G-processor. It takes 20-bit
// micro-instructions from the IFTU's queue and drives the P-stack, the
// V-stack with the ALU, the G-memory interface and the special registers
// A (G-memory address), T (tags of the last node read) and D (last cell
// popped from the P-stack, kept for diagnostics).
//
// Dispatch is not fully synchronous: a micro-instruction issues only when
// what it needs is there - the next micro-instruction, a literal from the
// literals queue, or the G-memory. Register and stack micro-instructions
// take one cycle. G-memory micro-instructions that only write (WRITEV,
// WRITEP, TRASH, the value write of UPDATE, and the call signal) are
// posted: their request is latched, their stack effects happen at
// dispatch, and later register, stack, ALU and branch micro-instructions
// go on while the request waits for its acknowledge. Any further G-memory
// micro-instruction, SVC and HALT wait until it is done. The other
// G-memory micro-instructions (ALLOC, READV, READP, EVAL, RET) need the
// answer: the PCU waits in S_MEM for their acknowledge.
// A branch micro-instruction tests the Z condition code and reports the
// outcome to the IFTU in the cycle it is dispatched, with the number of
// the code buffer holding the target. A case micro-instruction pops the
// selector v from the V-stack: for 1 <= v <= m (m in idx) it reports a
// taken jump to the buffer in bits 2v-1:2v-2 of imm, otherwise the
// predicted fall-through. EVAL reads the node
// on top of the P-stack: if its is_evaluated tag is set the return address
// literal is dropped and the prediction is confirmed; otherwise the return
// address is pushed on the P-stack, a call is signalled to the G-memory
// manager and the IFTU is redirected to the code address held in the
// node's first cell. RET signals the return, pops the return address and
// redirects the IFTU. SVC puts the top of the P-stack on the G-bus for the
// host, raises svc_req and waits for host_cont. HALT stops the PCU.
//
// The resource-driven dispatch, the overlap of an ALU operation with a
// preceding G-memory write, the A/T/D registers, the call/return signals
// and the service request follow the description. The micro-instruction
// set, and the choice to overlap writes only (reads are waited for), are
// this design's own.
module gm_pcu
  import gm_pkg::*;
#(
  parameter int unsigned CAW = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  // IFTU
  input  logic            uq_valid,
  input  uinstr_t         uq_data,
  output logic            uq_pop,
  input  logic            lq_valid,
  input  logic [WORD-1:0] lq_data,
  output logic            lq_pop,
  output logic            br_valid,
  output logic            br_taken,
  output logic [1:0]      br_buf,
  output logic            redir_valid,
  output logic [CAW-1:0]  redir_addr,
  // P-stack
  output psop_e           ps_op,
  output logic [4:0]      ps_idx,
  output logic [WORD-1:0] ps_din,
  input  logic [WORD-1:0] ps_top,
  input  logic [WORD-1:0] ps_nxt,
  // V-stack and ALU
  output logic [1:0]      v_op,
  output logic            v_bin,
  output logic [WORD-1:0] v_din,
  input  logic [WORD-1:0] v_a,
  output aluop_e          alu_op,
  output logic [4:0]      alu_k,
  output logic            alu_cin,
  input  logic [WORD-1:0] alu_y,
  input  cc_t             alu_cc,
  // G-memory manager
  output logic            m_req,
  output mreq_t           m_rq,
  input  logic            m_ack,
  input  logic [WORD-1:0] m_rdata,
  input  tags_t           m_rtags,
  // host
  output logic            svc_req,
  output logic [WORD-1:0] gbus_out,
  input  logic            host_cont,
  output logic            halted,
  // registers and events
  output logic [WORD-1:0] a_reg,
  output tags_t           t_reg,
  output logic [WORD-1:0] d_reg,
  output cc_t             cc,
  output logic            ev_eval_call,
  output logic            ev_eval_done,
  output logic            ev_call,
  output logic            ev_ret,
  output logic            ev_overlap    // dispatch while a posted write is outstanding
);
  typedef enum logic [2:0] {S_IDLE, S_RUN, S_MEM, S_ECALL, S_SVC, S_HALT} state_e;
  state_e  st;
  uinstr_t cur;                 // micro-instruction waiting for G-memory
  logic    post_v;              // a posted write is outstanding
  mreq_t   post_rq;             // its request
  logic [WORD-1:0] code_addr;   // EVAL: code address of the node

  uinstr_t u;
  assign u = uq_data;

  wire u_needs_lit = (u.op == U_PPUSHL) || (u.op == U_VPUSHL);
  wire u_is_mem    = (u.op inside {U_ALLOC, U_READV, U_READP, U_WRITEV, U_WRITEP,
                                   U_TRASH, U_UPDV, U_EVAL, U_RET, U_MCALL});
  wire u_posted    = (u.op inside {U_WRITEV, U_WRITEP, U_TRASH, U_UPDV, U_MCALL});
  wire can_go      = (st == S_RUN) && uq_valid && (!u_needs_lit || lq_valid) &&
                     !(post_v && (u_is_mem || u.op == U_SVC || u.op == U_HALT));

  // node pointer on top of the P-stack with cell c selected
  function automatic logic [WORD-1:0] cellp(input logic [WORD-1:0] p, input logic c);
    return {p[WORD-1:1], c};
  endfunction

  // G-memory request of micro-instruction x from the current stack tops
  function automatic mreq_t mkreq(input uinstr_t x, input logic [WORD-1:0] top,
                                  input logic [WORD-1:0] nxt, input logic [WORD-1:0] va);
    mreq_t q;
    q = '{op: M_READ, addr: '0, wdata: '0, wptr: 1'b0};
    unique case (x.op)
      U_ALLOC:  q.op = M_ALLOC;
      U_READV, U_READP: begin q.op = M_READ; q.addr = cellp(top, x.idx[0]); end
      U_EVAL:   begin q.op = M_READ; q.addr = cellp(top, 1'b0); end
      U_WRITEV: begin q.op = M_WRITE; q.addr = cellp(top, x.idx[0]); q.wdata = va; end
      U_WRITEP: begin q.op = M_WRITE; q.addr = cellp(nxt, x.idx[0]); q.wdata = top; q.wptr = 1'b1; end
      U_TRASH:  begin q.op = M_TRASH; q.addr = cellp(top, 1'b0); end
      U_UPDV:   begin q.op = M_UPDATE; q.addr = cellp(top, 1'b0); q.wdata = va; end
      U_MCALL:  q.op = M_CALL;
      U_RET:    q.op = M_RET;
      default:  q.op = M_READ;
    endcase
    return q;
  endfunction

  always_comb begin
    uq_pop = 1'b0; lq_pop = 1'b0;
    br_valid = 1'b0; br_taken = 1'b0; br_buf = u.idx[1:0];
    redir_valid = 1'b0; redir_addr = '0;
    ps_op = PS_NONE; ps_idx = u.idx[4:0]; ps_din = '0;
    v_op = 2'd0; v_bin = 1'b0; v_din = alu_y;
    alu_op = aluop_e'(u.imm[3:0]); alu_k = u.idx[4:0]; alu_cin = cc.c;
    m_req = 1'b0; m_rq = '{op: M_READ, addr: '0, wdata: '0, wptr: 1'b0};
    ev_eval_call = 1'b0; ev_eval_done = 1'b0; ev_call = 1'b0; ev_ret = 1'b0;
    ev_overlap = can_go && post_v;

    if (can_go) begin
      uq_pop = !u_is_mem;
      unique case (u.op)
        U_PPUSHL: begin ps_op = PS_PUSH; ps_din = lq_data; lq_pop = 1'b1; end
        U_VPUSHL: begin v_op = 2'd1; v_din = lq_data; lq_pop = 1'b1; end
        U_PPOP:   ps_op = PS_POP;
        U_PCOPY:  ps_op = PS_COPY;
        U_PMOVE:  ps_op = PS_MOVE;
        U_PROT:   ps_op = PS_ROT;
        U_ALU2:   begin v_op = 2'd3; v_bin = 1'b1; end
        U_ALU1:   begin v_op = 2'd3; v_bin = 1'b0; end
        U_ALU0:   v_op = 2'd1;
        U_VPOP:   v_op = 2'd2;
        // posted writes: stack effects now, request latched
        U_WRITEV: v_op = 2'd2;
        U_WRITEP: ps_op = PS_POP;
        U_UPDV:   begin ps_op = PS_POP; v_op = 2'd2; end
        U_BR: begin
          br_valid = 1'b1;
          br_taken = (u.imm == BR_Z) ? cc.z : !cc.z;
        end
        U_CASE: begin
          v_op = 2'd2;
          br_valid = 1'b1;
          br_taken = (v_a != '0) && (v_a <= WORD'(u.idx));
          br_buf   = u.imm[2*(v_a[1:0] - 2'd1) +: 2];
        end
        default: ;
      endcase
      if (u_is_mem) uq_pop = 1'b1;
    end

    // the posted write (never at the same time as S_MEM or S_ECALL)
    if (post_v) begin
      m_req = 1'b1;
      m_rq  = post_rq;
      if (m_ack && post_rq.op == M_CALL) ev_call = 1'b1;
    end

    // G-memory request for the micro-instruction held in cur
    if (st == S_MEM) begin
      m_req = 1'b1;
      m_rq  = mkreq(cur, ps_top, ps_nxt, v_a);
      if (m_ack) begin
        unique case (cur.op)
          U_ALLOC:  begin ps_op = PS_PUSH; ps_din = m_rdata; end
          U_READV:  begin ps_op = PS_POP; v_op = 2'd1; v_din = m_rdata; end
          U_READP:  begin ps_op = PS_REPL; ps_din = m_rdata; end
          U_RET: begin
            ps_op = PS_POP; ev_ret = 1'b1;
            redir_valid = 1'b1; redir_addr = CAW'(ps_top);
          end
          U_EVAL: begin
            lq_pop = 1'b1;
            if (m_rtags.evaluated) begin
              br_valid = 1'b1; br_taken = 1'b0; ev_eval_done = 1'b1;
            end else begin
              ps_op = PS_PUSH; ps_din = lq_data;
            end
          end
          default: ;
        endcase
      end
    end
    if (st == S_ECALL) begin
      m_req = 1'b1;
      m_rq.op = M_CALL;
      if (m_ack) begin
        redir_valid = 1'b1; redir_addr = CAW'(code_addr); ev_eval_call = 1'b1; ev_call = 1'b1;
      end
    end
  end

  assign svc_req  = (st == S_SVC);
  assign gbus_out = ps_top;
  assign halted   = (st == S_HALT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cur <= '0; code_addr <= '0;
      post_v <= 1'b0; post_rq <= '{op: M_READ, addr: '0, wdata: '0, wptr: 1'b0};
      a_reg <= '0; t_reg <= '0; d_reg <= '0; cc <= '0;
    end else begin
      if (post_v && m_ack) begin
        post_v <= 1'b0;
        if (post_rq.op != M_CALL) a_reg <= post_rq.addr;
      end
      if (start) st <= S_RUN;
      else unique case (st)
        S_RUN: if (can_go) begin
          unique case (u.op)
            U_ALU2, U_ALU1, U_ALU0: cc <= alu_cc;
            U_PPOP: d_reg <= ps_top;
            U_SVC:  st <= S_SVC;
            U_HALT: st <= S_HALT;
            default: ;
          endcase
          if (u_posted) begin
            post_v  <= 1'b1;
            post_rq <= mkreq(u, ps_top, ps_nxt, v_a);
          end else if (u_is_mem) begin
            cur <= u; st <= S_MEM;
          end
        end
        S_MEM: begin
          if (m_rq.op != M_ALLOC && m_rq.op != M_CALL && m_rq.op != M_RET) a_reg <= m_rq.addr;
          if (m_ack) begin
            if (cur.op inside {U_READV, U_READP, U_EVAL}) t_reg <= m_rtags;
            st <= S_RUN;
            if (cur.op == U_EVAL && !m_rtags.evaluated) begin
              code_addr <= m_rdata;
              st <= S_ECALL;
            end
          end
        end
        S_ECALL: if (m_ack) st <= S_RUN;
        S_SVC:   if (host_cont) st <= S_RUN;
        default: ;
      endcase
    end
  end

`ifndef SYNTHESIS
  a_one_request: assert property (@(posedge clk) disable iff (!rst_n)
    post_v |-> (st != S_MEM && st != S_ECALL));
  a_lit_for_eval: assert property (@(posedge clk) disable iff (!rst_n)
    (st == S_MEM && cur.op == U_EVAL && m_ack) |-> lq_valid);
`endif
endmodule
