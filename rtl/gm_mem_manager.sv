// G-memory manager. It makes the node store behave as a dynamically
// allocatable list-structure memory and keeps reference counts so that
// inaccessible nodes are reclaimed with little help from the processor.
//
// Requests (req/rq held until ack; one request at a time):
//   M_READ   rdata = addressed cell, rtags = node tags         (ack same cycle)
//   M_WRITE  write cell and its "contains pointer" tag; when the datum is a
//            pointer the target's reference count is incremented in the
//            next cycle                                          (ack same cycle)
//   M_ALLOC  rdata = pointer to a fresh node, taken from the queue of
//            pre-allocated nodes (waits while that queue is empty)
//   M_TRASH  the node is about to be overwritten by its value: the nodes
//            its pointer cells refer to are decremented in the cycles after
//            the acknowledge, and its pointer tags are cleared
//   M_UPDATE overwrite the node by a basic value: first cell = wdata,
//            second cell = 0, no pointer tags, is_evaluated set
//   M_CALL   a function call begins: mark the allocation record
//   M_RET    the call returns: the nodes allocated since the matching call
//            become eligible and are examined one per cycle when the
//            manager has nothing else to do
// A pointer is {node, cell}; node 0 is nil and never allocated.
//
// Free list and pre-allocation. After reset the manager links nodes
// 1..NODES-1 into a free list through their first cells (one node per
// cycle; init_done rises when it is finished). Whenever it is idle and the
// pre-allocation queue has room, it unlinks the head of the free list,
// gives it initial tags and counts and puts its pointer into the queue.
//
// Reference counting and collection. Every pointer written into a node
// increments the count of its target and sets the target's "recently
// written" tag; a count that would overflow sets "uncollectable" for
// good. A decrement to zero of a node the collector has already visited
// makes the node eligible again. An eligible node whose count is zero is
// collected: its children are decremented and it is linked back into the
// free list. The allocation record is a stack of allocated nodes with a
// mark per active call.
//
// Cyclic structures. An eligible node with a non-zero count starts a
// local traversal of the subgraph below it (at most CYC_MAX nodes, kept in
// a small list). Every pointer met inside the subgraph increments the
// local reference count of its target, and a node met for the first time
// has its recently-written tag cleared. The subgraph is collectable when
// every node in it has a local count equal to its reference count (all
// its references come from inside), has not been written since it was
// met, is not uncollectable and is no longer in the allocation record.
// Then all its nodes are linked into the free list; otherwise their local
// counts are cleared again. A subgraph larger than CYC_MAX, or one that
// reaches an uncollectable node, is left alone. Requests wait while a
// traversal runs.
//
// What follows the description: the request types, the FIFO of
// pre-allocated nodes, the free list, counting on pointer writes, the
// decrement after TRASH, uncollectability after overflow, the
// recently-written tag, collection of nodes allocated during a call
// when it returns, and the local traversal that finds subgraphs whose
// counts come only from inside. This design's own: the sizes, one node
// access per cycle, the bounded traversal list, that a request that
// changes the record (ALLOC, TRASH, UPDATE, CALL, RET) waits while a
// collection runs, and the use of the "collector has visited" tag to mark
// nodes that are not in the record. The threshold field is not used and
// stays zero. Nodes that
// only the P-stack points to have a count of zero and are collected at the
// return of the call that allocated them, so compiled code must anchor a
// result in G-memory before it returns.
module gm_mem_manager
  import gm_pkg::*;
#(
  parameter int unsigned NODES = 4096,
  parameter int unsigned AQ_DEPTH = 8,    // pre-allocated node queue
  parameter int unsigned MARKS = 256,     // nesting depth of calls
  parameter int unsigned CYC_MAX = 16     // nodes in one local traversal
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic            init_done,
  input  logic            req,
  input  mreq_t           rq,
  output logic            ack,
  output logic [WORD-1:0] rdata,
  output tags_t           rtags,
  // node store
  output logic [$clog2(NODES)-1:0] n_raddr,
  input  node_t                    n_rdata,
  output logic                     n_we,
  output logic [$clog2(NODES)-1:0] n_waddr,
  output node_t                    n_wdata,
  // events and status
  output logic            ev_prealloc,
  output logic            ev_alloc,
  output logic            ev_alloc_wait,
  output logic            ev_inc,
  output logic            ev_dec,
  output logic            ev_free,
  output logic            ev_uncoll,
  output logic            ev_trav,        // local traversal started
  output logic            ev_cyc_free,    // node of a cyclic subgraph collected
  output logic            collecting,
  output logic            err
);
  localparam int unsigned NW = $clog2(NODES);
  localparam int unsigned MW = $clog2(MARKS);
  typedef logic [NW-1:0] nidx_t;

  localparam int unsigned CW = $clog2(CYC_MAX);
  typedef enum logic [3:0] {S_INIT, S_IDLE, S_INC, S_DEC, S_LINK,
                            S_CSCAN, S_CKID, S_CCHK, S_CEND} state_e;
  state_e st;

  nidx_t       init_i;
  nidx_t       free_head;
  nidx_t       rec [NODES];
  logic [NW:0] rec_top;
  logic [NW:0] marks [MARKS];
  logic [MW:0] msp;
  logic [NW:0] coll_mark;
  logic        coll_active;
  nidx_t       inc_n;            // target of a pending increment
  nidx_t       dec_n [2];        // children still to decrement
  logic [1:0]  dec_v;
  logic        dec_free;         // decrements belong to a collected node
  nidx_t       free_n;           // node being collected
  // local traversal
  nidx_t       cl [CYC_MAX];     // nodes of the subgraph
  logic [CW:0] ccnt;             // how many
  logic [CW:0] cscan;            // next to scan / check / finish
  nidx_t       ck_n [2];         // children of the node being scanned
  logic [1:0]  ck_v;
  logic        cok;              // still collectable

  // pre-allocated nodes
  logic  aq_push, aq_pop, aq_empty, aq_full;
  nidx_t aq_dout;
  gm_fifo #(.W(NW), .DEPTH(AQ_DEPTH)) u_aq (
    .clk, .rst_n, .flush(1'b0), .push(aq_push), .din(free_head), .pop(aq_pop),
    .dout(aq_dout), .empty(aq_empty), .full(aq_full), .count());

  function automatic nidx_t node_of(input logic [WORD-1:0] p);
    return p[NW:1];
  endfunction
  function automatic logic [WORD-1:0] ptr_to(input nidx_t n);
    return WORD'({n, 1'b0});
  endfunction

  wire   rec_changing = (rq.op != M_READ) && (rq.op != M_WRITE);
  wire   accept = (st == S_IDLE) && req && !(rec_changing && coll_active) &&
                  !(rq.op == M_ALLOC && aq_empty);
  wire   do_pre  = (st == S_IDLE) && !accept && !aq_full && (free_head != '0);
  wire   do_exam = (st == S_IDLE) && !accept && !do_pre && coll_active &&
                   (rec_top != coll_mark);
  nidx_t exam_n;
  assign exam_n = rec[NW'(rec_top - 1'b1)];
  wire   [0:0] dsel = dec_v[0] ? 1'b0 : 1'b1;
  wire   [0:0] csel = ck_v[0] ? 1'b0 : 1'b1;
  wire   [CW-1:0] cidx = cscan[CW-1:0];
  logic  in_list;   // child being counted is already in the list
  always_comb begin
    in_list = 1'b0;
    for (int i = 0; i < CYC_MAX; i++)
      if ((CW+1)'(i) < ccnt && cl[i] == ck_n[csel]) in_list = 1'b1;
  end
  wire   last_c = (cscan + 1'b1 == ccnt);

  node_t nd, nw;
  assign nd = n_rdata;

  // which node the single port reads this cycle
  always_comb begin
    unique case (st)
      S_INC:   n_raddr = inc_n;
      S_DEC:   n_raddr = dec_n[dsel];
      S_LINK:  n_raddr = free_n;
      S_CSCAN, S_CCHK, S_CEND: n_raddr = cl[cidx];
      S_CKID:  n_raddr = ck_n[csel];
      default: n_raddr = do_pre ? free_head : do_exam ? exam_n : node_of(rq.addr);
    endcase
  end

  assign collecting = coll_active;
  assign rtags = nd.tags;
  assign rdata = (rq.op == M_ALLOC) ? ptr_to(aq_dout) : rq.addr[0] ? nd.cell1 : nd.cell0;
  assign aq_pop  = accept && rq.op == M_ALLOC;
  assign aq_push = do_pre;

  always_comb begin
    ack = 1'b0;
    n_we = 1'b0; n_waddr = n_raddr; nw = nd;
    ev_inc = 1'b0; ev_dec = 1'b0; ev_free = 1'b0; ev_uncoll = 1'b0;
    ev_alloc = 1'b0; ev_prealloc = 1'b0; ev_trav = 1'b0; ev_cyc_free = 1'b0;
    ev_alloc_wait = (st == S_IDLE) && req && rq.op == M_ALLOC && aq_empty;
    unique case (st)
      S_INIT: begin
        n_we = 1'b1; n_waddr = init_i; nw = '0;
        nw.tags.visited = 1'b1;
        nw.cell0 = (init_i == NW'(NODES-1) || init_i == '0) ? '0 : ptr_to(init_i + 1'b1);
      end
      S_IDLE: begin
        if (accept) begin
          ack = 1'b1;
          unique case (rq.op)
            M_WRITE: begin
              n_we = 1'b1;
              if (rq.addr[0]) begin nw.cell1 = rq.wdata; nw.tags.ptr1 = rq.wptr; end
              else            begin nw.cell0 = rq.wdata; nw.tags.ptr0 = rq.wptr; end
            end
            M_TRASH: begin
              n_we = 1'b1; nw.tags.ptr0 = 1'b0; nw.tags.ptr1 = 1'b0;
            end
            M_UPDATE: begin
              n_we = 1'b1; nw.cell0 = rq.wdata; nw.cell1 = '0;
              nw.tags.ptr0 = 1'b0; nw.tags.ptr1 = 1'b0; nw.tags.evaluated = 1'b1;
            end
            M_ALLOC: ev_alloc = 1'b1;
            default: ;
          endcase
        end else if (do_pre) begin
          n_we = 1'b1; ev_prealloc = 1'b1;
          nw = '0;     // fresh tags and counts, not visited: it will be in the record
        end else if (do_exam) begin
          if (!nd.tags.uncoll && nd.rc == 0) begin
            nw = nd; ev_free = 1'b1;    // children and link follow
          end else begin
            // leaves the record; a live-looking node starts a traversal
            n_we = 1'b1; nw.tags.visited = 1'b1;
            if (!nd.tags.uncoll) begin nw.tags.recent = 1'b0; nw.lrc = '0; ev_trav = 1'b1; end
          end
        end
      end
      S_CKID: if (!nd.tags.uncoll && (in_list || ccnt != (CW+1)'(CYC_MAX))) begin
        n_we = 1'b1;
        if (nd.lrc != 8'hFF) nw.lrc = nd.lrc + 1'b1;
        if (!in_list) nw.tags.recent = 1'b0;
      end
      S_CEND: begin
        n_we = 1'b1;
        if (cok) begin
          nw = '0; nw.tags.visited = 1'b1; nw.cell0 = ptr_to(free_head);
          ev_free = 1'b1; ev_cyc_free = 1'b1;
        end else nw.lrc = '0;
      end
      S_INC: begin
        n_we = 1'b1; ev_inc = 1'b1; nw.tags.recent = 1'b1;
        if (!nd.tags.uncoll) begin
          if (nd.rc == 8'hFF) begin nw.tags.uncoll = 1'b1; ev_uncoll = 1'b1; end
          else nw.rc = nd.rc + 1'b1;
        end
      end
      S_DEC: begin
        n_we = 1'b1; ev_dec = 1'b1; nw.tags.recent = 1'b1;
        if (!nd.tags.uncoll && nd.rc != 0) begin
          nw.rc = nd.rc - 1'b1;
          if (nd.rc == 8'd1 && nd.tags.visited) nw.tags.visited = 1'b0;
        end
      end
      S_LINK: begin
        n_we = 1'b1; nw = '0; nw.tags.visited = 1'b1; nw.cell0 = ptr_to(free_head);
      end
      default: ;
    endcase
  end
  assign n_wdata = nw;

  // pointer children of a node, nil excluded
  function automatic logic [1:0] kids(input node_t x);
    return {x.tags.ptr1 && node_of(x.cell1) != '0, x.tags.ptr0 && node_of(x.cell0) != '0};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_INIT; init_i <= '0; init_done <= 1'b0; free_head <= '0;
      rec_top <= '0; msp <= '0; coll_mark <= '0; coll_active <= 1'b0;
      inc_n <= '0; dec_n[0] <= '0; dec_n[1] <= '0; dec_v <= '0; dec_free <= 1'b0;
      free_n <= '0; err <= 1'b0;
      ccnt <= '0; cscan <= '0; ck_n[0] <= '0; ck_n[1] <= '0; ck_v <= '0; cok <= 1'b0;
      for (int i = 0; i < CYC_MAX; i++) cl[i] <= '0;
    end else begin
      unique case (st)
        S_INIT: begin
          init_i <= init_i + 1'b1;
          if (init_i == NW'(NODES-1)) begin
            st <= S_IDLE; init_done <= 1'b1; free_head <= NW'(1);
          end
        end
        S_IDLE: begin
          if (accept) begin
            unique case (rq.op)
              M_WRITE: if (rq.wptr && node_of(rq.wdata) != '0) begin
                inc_n <= node_of(rq.wdata); st <= S_INC;
              end
              M_TRASH: if (kids(nd) != '0) begin
                dec_n[0] <= node_of(nd.cell0); dec_n[1] <= node_of(nd.cell1);
                dec_v <= kids(nd); dec_free <= 1'b0; st <= S_DEC;
              end
              M_ALLOC: begin
                rec[rec_top[NW-1:0]] <= aq_dout; rec_top <= rec_top + 1'b1;
              end
              M_CALL: begin
                if (msp == (MW+1)'(MARKS)) err <= 1'b1;
                else begin marks[msp[MW-1:0]] <= rec_top; msp <= msp + 1'b1; end
              end
              M_RET: if (msp != 0) begin
                msp <= msp - 1'b1;
                coll_mark <= marks[MW'(msp - 1'b1)];
                coll_active <= 1'b1;
              end
              default: ;
            endcase
          end else if (do_pre) begin
            free_head <= node_of(nd.cell0);
          end else if (do_exam) begin
            rec_top <= rec_top - 1'b1;
            if (!nd.tags.uncoll && nd.rc == 0) begin
              free_n <= exam_n; dec_free <= 1'b1;
              dec_n[0] <= node_of(nd.cell0); dec_n[1] <= node_of(nd.cell1);
              dec_v <= kids(nd);
              st <= (kids(nd) != '0) ? S_DEC : S_LINK;
            end else if (!nd.tags.uncoll) begin
              cl[0] <= exam_n; ccnt <= (CW+1)'(1); cscan <= '0; cok <= 1'b1;
              st <= S_CSCAN;
            end
          end else if (coll_active && rec_top == coll_mark) begin
            coll_active <= 1'b0;
          end
        end
        S_INC: st <= S_IDLE;
        S_DEC: begin
          // a count that falls to zero on a visited node: eligible again
          if (!nd.tags.uncoll && nd.rc == 8'd1 && nd.tags.visited) begin
            rec[rec_top[NW-1:0]] <= dec_n[dsel]; rec_top <= rec_top + 1'b1;
          end
          dec_v[dsel] <= 1'b0;
          if (dec_v == 2'b11 && dsel == 1'b0) st <= S_DEC;
          else st <= dec_free ? S_LINK : S_IDLE;
        end
        S_LINK: begin
          free_head <= free_n; st <= S_IDLE;
        end
        // local traversal: scan each listed node for its children
        S_CSCAN: begin
          if (cscan == ccnt) begin
            cscan <= '0; st <= S_CCHK;
          end else begin
            ck_n[0] <= node_of(nd.cell0); ck_n[1] <= node_of(nd.cell1);
            ck_v <= kids(nd);
            cscan <= cscan + 1'b1;
            if (kids(nd) != '0) st <= S_CKID;
          end
        end
        // count one child; list it when it is new
        S_CKID: begin
          if (nd.tags.uncoll || (!in_list && ccnt == (CW+1)'(CYC_MAX))) begin
            cok <= 1'b0; cscan <= '0; st <= S_CEND;
          end else begin
            if (!in_list) begin cl[ccnt[CW-1:0]] <= ck_n[csel]; ccnt <= ccnt + 1'b1; end
            ck_v[csel] <= 1'b0;
            if (!(ck_v == 2'b11 && csel == 1'b0)) st <= S_CSCAN;
          end
        end
        // all references from inside, untouched, out of the record?
        S_CCHK: begin
          if (nd.lrc != nd.rc || nd.tags.recent || nd.tags.uncoll || !nd.tags.visited) cok <= 1'b0;
          cscan <= cscan + 1'b1;
          if (last_c) begin cscan <= '0; st <= S_CEND; end
        end
        // free the subgraph, or clear its local counts
        S_CEND: begin
          if (cok) free_head <= cl[cidx];
          cscan <= cscan + 1'b1;
          if (last_c) st <= S_IDLE;
        end
        default: ;
      endcase
    end
  end

`ifndef SYNTHESIS
  a_ack_needs_req: assert property (@(posedge clk) disable iff (!rst_n) ack |-> req);
  a_dec_has_work:  assert property (@(posedge clk) disable iff (!rst_n) st == S_DEC |-> dec_v != 0);
`endif
endmodule
