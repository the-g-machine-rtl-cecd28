// G-processor: the instruction fetch and translation unit, the processor
// control unit, the P-stack with its overflow memory, the ALU with its
// V-stack and the special registers, joined by the internal G-bus.
//
// G-code bytes come in from the control store (cs_*), G-memory requests go
// out to the memory manager (m_*). The host starts evaluation with start
// and start_addr, sees service requests on svc_req with the node address on
// gbus_out, and lets the processor go on with host_cont. The organisation
// follows the description's functional-unit diagram; the connections
// inside are this design's own where the diagram does not show them.
module gm_processor
  import gm_pkg::*;
#(
  parameter int unsigned CAW    = 16,
  parameter int unsigned PREGS  = 24,
  parameter int unsigned PMEM   = 256,
  parameter int unsigned VDEPTH = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [CAW-1:0]  start_addr,
  output logic            cs_req,
  output logic [CAW-1:0]  cs_addr,
  input  logic            cs_gnt,
  input  logic [7:0]      cs_data,
  output logic            m_req,
  output mreq_t           m_rq,
  input  logic            m_ack,
  input  logic [WORD-1:0] m_rdata,
  input  tags_t           m_rtags,
  output logic            svc_req,
  output logic [WORD-1:0] gbus_out,
  input  logic            host_cont,
  output logic            halted,
  output logic [WORD-1:0] d_reg,
  output logic [WORD-1:0] v_top,
  output logic            err,
  output pevents_t        ev
);
  uinstr_t uq_data;
  logic    uq_valid, uq_pop, lq_valid, lq_pop;
  logic [WORD-1:0] lq_data;
  logic    br_valid, br_taken, redir_valid;
  logic [1:0] br_buf;
  logic [CAW-1:0] redir_addr;
  psop_e   ps_op;
  logic [4:0] ps_idx;
  logic [WORD-1:0] ps_din, ps_top, ps_nxt;
  logic [1:0] v_op;
  logic    v_bin;
  logic [WORD-1:0] v_din, v_a, v_b, alu_y;
  aluop_e  alu_op;
  logic [4:0] alu_k;
  logic    alu_cin;
  cc_t     alu_cc, cc;
  logic    p_err, v_err;
  logic [WORD-1:0] a_reg;
  tags_t   t_reg;

  gm_iftu #(.CAW(CAW)) u_iftu (
    .clk, .rst_n, .start, .start_addr,
    .cs_req, .cs_addr, .cs_gnt, .cs_data,
    .uq_valid, .uq_data, .uq_pop, .lq_valid, .lq_data, .lq_pop,
    .br_valid, .br_taken, .br_buf, .redir_valid, .redir_addr,
    .ev_cond(ev.cond), .ev_taken(ev.taken), .ev_nottaken(ev.nottaken),
    .ev_jmp(ev.jmp), .ev_stall2(ev.stall2), .ev_case(ev.casesw), .ev_redirect(ev.redirect));

  gm_pcu #(.CAW(CAW)) u_pcu (
    .clk, .rst_n, .start,
    .uq_valid, .uq_data, .uq_pop, .lq_valid, .lq_data, .lq_pop,
    .br_valid, .br_taken, .br_buf, .redir_valid, .redir_addr,
    .ps_op, .ps_idx, .ps_din, .ps_top, .ps_nxt,
    .v_op, .v_bin, .v_din, .v_a, .alu_op, .alu_k, .alu_cin, .alu_y, .alu_cc,
    .m_req, .m_rq, .m_ack, .m_rdata, .m_rtags,
    .svc_req, .gbus_out, .host_cont, .halted,
    .a_reg, .t_reg, .d_reg, .cc,
    .ev_eval_call(ev.eval_call), .ev_eval_done(ev.eval_done),
    .ev_call(ev.call), .ev_ret(ev.ret), .ev_overlap(ev.overlap));

  gm_pstack #(.W(WORD), .NREG(PREGS), .MDEPTH(PMEM)) u_pstack (
    .clk, .rst_n, .op(ps_op), .idx(ps_idx), .din(ps_din), .top(ps_top), .nxt(ps_nxt),
    .depth(), .spill(ev.spill), .fill(ev.fill), .err(p_err));

  gm_vstack #(.W(WORD), .DEPTH(VDEPTH)) u_vstack (
    .clk, .rst_n, .vop(v_op), .binop(v_bin), .din(v_din), .a(v_a), .b(v_b),
    .depth(), .err(v_err));

  gm_alu u_alu (.op(alu_op), .a(v_a), .b(v_b), .k(alu_k), .cin(alu_cin), .y(alu_y), .cc(alu_cc));

  assign v_top = v_a;
  assign err   = p_err | v_err;
endmodule
