// G-machine: a programmed graph-reduction evaluator and the memories it
// works on, to be attached to a host processor.
//
// Blocks: the G-processor (gm_processor), the G-memory node store
// (gm_node_mem) behind its manager (gm_mem_manager), the control store
// holding G-code (gm_ctrl_store), and two fixed-priority arbiters that let
// the host share the control store and the G-memory, the G-processor being
// preferred.
//
// Host interface (the host itself is outside this design):
//   init_done      the manager has built the free list after reset
//   start/start_addr  begin evaluation at a G-code address
//   svc_req/svc_addr  service request: the G-processor waits with the
//                  address of a node describing the request on the G-bus
//   host_cont      continue after a service request
//   halted         evaluation finished (HALT)
//   hc_*           control-store access: hc_gnt shows the cycle in which
//                  the access took place (write, or rdata valid)
//   hm_*           G-memory access through the manager (READ, WRITE,
//                  ALLOC ...), held until hm_ack
// The composition follows the description's system diagram. The sizes and
// the signal-level host interface are this design's own.
module gmachine
  import gm_pkg::*;
#(
  parameter int unsigned NODES  = 4096,
  parameter int unsigned CBYTES = 65536,
  parameter int unsigned PREGS  = 24,
  parameter int unsigned PMEM   = 256,
  parameter int unsigned VDEPTH = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic            init_done,
  input  logic            start,
  input  logic [15:0]     start_addr,
  output logic            svc_req,
  output logic [WORD-1:0] svc_addr,
  input  logic            host_cont,
  output logic            halted,
  // host access to the control store
  input  logic            hc_req,
  input  logic            hc_we,
  input  logic [15:0]     hc_addr,
  input  logic [7:0]      hc_wdata,
  output logic [7:0]      hc_rdata,
  output logic            hc_gnt,
  // host access to G-memory
  input  logic            hm_req,
  input  mreq_t           hm_rq,
  output logic            hm_ack,
  output logic [WORD-1:0] hm_rdata,
  output tags_t           hm_rtags,
  // status
  output logic [WORD-1:0] d_reg,
  output logic [WORD-1:0] v_top,
  output logic            collecting,
  output logic            err,
  output pevents_t        pev,
  output mevents_t        mev
);
  localparam int unsigned CW = $clog2(CBYTES);
  localparam int unsigned NW = $clog2(NODES);

  // control store
  logic        p_cs_req, p_cs_gnt;
  logic [15:0] p_cs_addr;
  logic [1:0]  cs_gnt;
  logic [7:0]  cs_rdata;
  gm_arbiter #(.N(2)) u_cs_arb (.clk, .rst_n, .req({hc_req, p_cs_req}), .done(1'b1), .gnt(cs_gnt));
  assign p_cs_gnt = cs_gnt[0];
  assign hc_gnt   = cs_gnt[1];
  gm_ctrl_store #(.BYTES(CBYTES)) u_cs (
    .clk, .addr(cs_gnt[1] ? CW'(hc_addr) : CW'(p_cs_addr)),
    .we(cs_gnt[1] && hc_we), .wdata(hc_wdata), .rdata(cs_rdata));
  assign hc_rdata = cs_rdata;

  // G-memory
  logic        p_m_req, m_ack, m_err;
  mreq_t       p_m_rq;
  logic [1:0]  m_gnt;
  logic [WORD-1:0] m_rdata;
  tags_t       m_rtags;
  logic [NW-1:0] n_raddr, n_waddr;
  node_t       n_rdata, n_wdata;
  logic        n_we, p_err;

  gm_arbiter #(.N(2)) u_m_arb (.clk, .rst_n, .req({hm_req, p_m_req}), .done(m_ack), .gnt(m_gnt));

  gm_mem_manager #(.NODES(NODES)) u_mm (
    .clk, .rst_n, .init_done,
    .req(m_gnt != '0), .rq(m_gnt[1] ? hm_rq : p_m_rq),
    .ack(m_ack), .rdata(m_rdata), .rtags(m_rtags),
    .n_raddr, .n_rdata, .n_we, .n_waddr, .n_wdata,
    .ev_prealloc(mev.prealloc), .ev_alloc(mev.alloc), .ev_alloc_wait(mev.alloc_wait),
    .ev_inc(mev.inc), .ev_dec(mev.dec), .ev_free(mev.free), .ev_uncoll(mev.uncoll),
    .ev_trav(mev.trav), .ev_cyc_free(mev.cyc_free),
    .collecting, .err(m_err));

  gm_node_mem #(.NODES(NODES)) u_gmem (
    .clk, .raddr(n_raddr), .rdata(n_rdata), .we(n_we), .waddr(n_waddr), .wdata(n_wdata));

  assign hm_ack   = m_ack && m_gnt[1];
  assign hm_rdata = m_rdata;
  assign hm_rtags = m_rtags;

  gm_processor #(.CAW(16), .PREGS(PREGS), .PMEM(PMEM), .VDEPTH(VDEPTH)) u_proc (
    .clk, .rst_n, .start, .start_addr,
    .cs_req(p_cs_req), .cs_addr(p_cs_addr), .cs_gnt(p_cs_gnt), .cs_data(cs_rdata),
    .m_req(p_m_req), .m_rq(p_m_rq), .m_ack(m_ack && m_gnt[0]), .m_rdata, .m_rtags,
    .svc_req, .gbus_out(svc_addr), .host_cont, .halted,
    .d_reg, .v_top, .err(p_err), .ev(pev));

  assign err = p_err | m_err;
endmodule
