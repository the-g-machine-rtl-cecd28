// Instruction fetch and translation unit (IFTU). It fetches G-code bytes
// from the control store into NBUF code buffers, translates the active
// stream into 20-bit micro-instructions and delivers them through a queue
// to the processor control unit (PCU).
//
// How it works:
//  * Code buffers. Each buffer b is a small byte queue with a fetch counter
//    fc[b] (address of the next byte to fetch) and a program counter pc[b]
//    (address of the byte at its head). All enabled buffers that have room
//    compete for the control store; a round-robin multiplexer grants one
//    fetch of one byte per cycle.
//  * Micro-sequence control. A small state machine takes the opcode at the
//    head of the active buffer, gathers its operand bytes into the op'nd
//    register and then emits the micro-sequence of the opcode from the
//    micro-sequence store, one word per cycle, into the micro-instruction
//    queue. Literals and G-memory constants go into the literals queue.
//  * Jumps. JMP only re-initialises the active buffer at the target.
//    CALL emits a push of the return address and a call signal, and
//    re-initialises the active buffer. A conditional jump enables a free
//    buffer at the target and emits a branch micro-instruction that names
//    it; translation carries on down the fall-through path (prediction:
//    not taken). EVAL is also predicted to fall through (node already
//    evaluated) and carries its return address in the literals queue.
//    A case switch (CASE m a1..am, m <= 3) gathers its m target
//    addresses one after the other, enables a free buffer for each, and
//    emits one case micro-instruction carrying m and the numbers of those
//    buffers; the fall-through path is again the predicted one, so with
//    the active buffer up to four code streams are fetched at once.
//    Only one prediction may be outstanding: a second conditional jump,
//    case switch or EVAL stops translation until the first is resolved. RET and HALT stop
//    translation until the PCU redirects the stream.
//  * Resolution. br_valid/br_taken/br_buf resolve the outstanding
//    conditional jump or case switch. Taken: both queues are flushed,
//    translation is aborted and restarts from buffer br_buf, all other
//    buffers are disabled; the first new micro-instruction appears two or
//    more cycles later. Not taken: all buffers but the active one are
//    disabled, with no break in the stream.
//    redir_valid/redir_addr (RET, or EVAL of an unevaluated node) flush
//    everything and restart at redir_addr in buffer 0.
// start/start_addr begin translation; it is held still before that.
//
// The buffers, PC/FC pairs, op'nd register, literals queue, micro-sequence
// store and micro-instruction queue, four buffers, one level of prediction
// and the flush/abort/disable rules follow the description. The byte-wide
// fetch, the queue depths, the encoding of G-code and the choice of the
// fall-through path as the predicted one are this design's own, as is the
// CASE encoding. The case micro-instruction packs buffer numbers into
// 2-bit fields, so NBUF may not exceed 4.
module gm_iftu
  import gm_pkg::*;
#(
  parameter int unsigned CAW   = 16,  // control-store address width
  parameter int unsigned NBUF  = 4,   // code buffers
  parameter int unsigned BDEPTH = 8,  // bytes per code buffer
  parameter int unsigned UQ_DEPTH = 8,
  parameter int unsigned LQ_DEPTH = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [CAW-1:0]  start_addr,
  // control store
  output logic            cs_req,
  output logic [CAW-1:0]  cs_addr,
  input  logic            cs_gnt,
  input  logic [7:0]      cs_data,
  // micro-instruction queue
  output logic            uq_valid,
  output uinstr_t         uq_data,
  input  logic            uq_pop,
  // literals queue
  output logic            lq_valid,
  output logic [WORD-1:0] lq_data,
  input  logic            lq_pop,
  // resolution by the PCU
  input  logic            br_valid,
  input  logic            br_taken,
  input  logic [$clog2(NBUF)-1:0] br_buf,  // buffer to continue from when taken
  input  logic            redir_valid,
  input  logic [CAW-1:0]  redir_addr,
  // events
  output logic            ev_cond,       // a conditional jump/EVAL was predicted
  output logic            ev_taken,      // prediction wrong: flush and restart
  output logic            ev_nottaken,   // prediction right: buffer released
  output logic            ev_jmp,        // JMP/CALL re-initialised a buffer
  output logic            ev_stall2,     // cycle stalled on a second prediction
  output logic            ev_case,       // a case switch was predicted
  output logic            ev_redirect
);
  localparam int unsigned BW = $clog2(NBUF);
  localparam int unsigned PW = $clog2(BDEPTH);

  // ------------------------------------------------------------ buffers
  logic [7:0]     bmem [NBUF][BDEPTH];
  logic [PW-1:0]  brd [NBUF], bwr [NBUF];
  logic [PW:0]    bcnt [NBUF];
  logic [CAW-1:0] fc [NBUF], pc [NBUF];
  logic [NBUF-1:0] en;
  logic [BW-1:0]  act, rr;

  // fetch multiplexer
  logic [NBUF-1:0] want;
  logic [BW-1:0]   fsel;
  logic            fany;
  always_comb begin
    for (int b = 0; b < NBUF; b++) want[b] = en[b] && (bcnt[b] < (PW+1)'(BDEPTH));
    fany = 1'b0;
    fsel = '0;
    for (int i = 0; i < NBUF; i++) begin
      automatic logic [BW-1:0] b = BW'(rr + BW'(i));
      if (!fany && want[b]) begin fany = 1'b1; fsel = b; end
    end
  end
  assign cs_req  = fany;
  assign cs_addr = fc[fsel];
  wire fetch = fany && cs_gnt;

  // ------------------------------------------------------------ queues
  logic    uq_push, lq_push, q_flush;
  uinstr_t uq_din;
  logic [WORD-1:0] lq_din;
  logic    uq_full, lq_full, uq_empty, lq_empty;

  gm_fifo #(.W($bits(uinstr_t)), .DEPTH(UQ_DEPTH)) u_uq (
    .clk, .rst_n, .flush(q_flush), .push(uq_push), .din(uq_din), .pop(uq_pop),
    .dout(uq_data), .empty(uq_empty), .full(uq_full), .count());
  gm_fifo #(.W(WORD), .DEPTH(LQ_DEPTH)) u_lq (
    .clk, .rst_n, .flush(q_flush), .push(lq_push), .din(lq_din), .pop(lq_pop),
    .dout(lq_data), .empty(lq_empty), .full(lq_full), .count());
  assign uq_valid = !uq_empty;
  assign lq_valid = !lq_empty;

  // ------------------------------------------------- micro-sequence control
  typedef enum logic [2:0] {T_STOP, T_OP, T_OPND, T_ALT, T_EMIT} tstate_e;
  tstate_e ts;
  gop_e    opc;
  logic [WORD-1:0] opnd;          // op'nd register
  logic [2:0]      ocnt;          // operand bytes still to gather
  logic [5:0]      uaddr;
  logic            lit_done;
  logic            pending;       // one prediction outstanding
  logic            pend_direct;   // it is a conditional jump or case (else EVAL)
  logic [1:0]      alt_left;      // case: target addresses still to gather
  logic [1:0]      alt_k;         // case: alternatives gathered so far
  logic [7:0]      alt_hi;        // case: high byte of the address being gathered
  logic            alt_lo;        // case: next byte is the low byte
  logic [7:0]      alt_bufs;      // case: buffer of alternative k in bits 2k+1:2k

  wire        head_ok = (bcnt[act] != 0);
  wire [7:0]  head    = bmem[act][brd[act]];
  gop_e       head_op;
  assign head_op = gop_e'(head);

  logic [5:0] r_entry;  opnd_e r_opnd;  uinstr_t r_word;  logic r_last;
  gop_e       r_op;
  assign r_op = (ts == T_OP) ? head_op : opc;
  gm_useq_rom u_rom (.op(r_op), .entry(r_entry), .opnd(r_opnd),
                     .addr(uaddr), .word(r_word), .last(r_last));

  // a free buffer for a conditional jump target
  logic [BW-1:0] freeb;
  always_comb begin
    freeb = '0;
    for (int b = NBUF-1; b >= 0; b--) if (!en[b]) freeb = BW'(b);
  end

  wire is_pred = (head_op == G_JZ) || (head_op == G_JNZ) || (head_op == G_EVAL) ||
                 (head_op == G_CASE);
  wire needs_lit = (opc == G_PUSHP) || (opc == G_PUSHV) || (opc == G_CALL) || (opc == G_EVAL);
  wire [WORD-1:0] lit_val = (opc == G_CALL || opc == G_EVAL) ? WORD'(pc[act]) : opnd;

  // combinational outputs of the translator for this cycle
  logic consume, emit_word, seq_end;
  always_comb begin
    consume   = 1'b0;
    emit_word = 1'b0;
    seq_end   = 1'b0;
    lq_push   = 1'b0;
    lq_din    = lit_val;
    uq_din    = r_word;
    uq_din.idx = opnd[5:0];
    ev_stall2 = 1'b0;
    unique case (ts)
      T_OP:   if (head_ok) begin
                if (is_pred && pending) ev_stall2 = 1'b1;
                else consume = 1'b1;
              end
      T_OPND: consume = head_ok;
      T_ALT:  consume = head_ok;
      T_EMIT: begin
        if (needs_lit && !lit_done) begin
          lq_push = !lq_full;
        end else if (opc == G_JMP) begin
          seq_end = 1'b1;
        end else if (!uq_full) begin
          emit_word = 1'b1;
          seq_end   = r_last;
        end
      end
      default: ;
    endcase
    if (opc == G_JZ || opc == G_JNZ) uq_din.idx = 6'(freeb);
    if (opc == G_CASE) uq_din.imm = alt_bufs;
  end
  assign uq_push = emit_word && !q_flush;

  assign q_flush  = (br_valid && br_taken && pending && pend_direct) || redir_valid;
  assign ev_taken    = br_valid && br_taken && pending && pend_direct;
  assign ev_nottaken = br_valid && !br_taken && pending;
  assign ev_redirect = redir_valid;
  assign ev_cond  = (ts == T_EMIT) && seq_end && !q_flush &&
                    (opc == G_JZ || opc == G_JNZ || opc == G_EVAL || opc == G_CASE);
  assign ev_case  = (ts == T_EMIT) && seq_end && !q_flush && (opc == G_CASE);
  assign ev_jmp   = (ts == T_EMIT) && seq_end && !q_flush && (opc == G_JMP || opc == G_CALL);

  // buffer b loses its contents and starts fetching at a
  task automatic init_buf(input int b, input logic [CAW-1:0] a);
    fc[b] <= a; pc[b] <= a; brd[b] <= '0; bwr[b] <= '0; bcnt[b] <= '0;
  endtask

  always_ff @(posedge clk) if (fetch) bmem[fsel][bwr[fsel]] <= cs_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts <= T_STOP; opc <= G_NOP; opnd <= '0; ocnt <= '0; uaddr <= '0;
      lit_done <= 1'b0; pending <= 1'b0; pend_direct <= 1'b0;
      alt_left <= '0; alt_k <= '0; alt_hi <= '0; alt_lo <= 1'b0; alt_bufs <= '0;
      en <= '0; act <= '0; rr <= '0;
      for (int b = 0; b < NBUF; b++) begin
        fc[b] <= '0; pc[b] <= '0; brd[b] <= '0; bwr[b] <= '0; bcnt[b] <= '0;
      end
    end else begin
      // fetch of one byte into buffer fsel
      if (fetch) begin
        bwr[fsel] <= (bwr[fsel] == PW'(BDEPTH-1)) ? '0 : bwr[fsel] + 1'b1;
        fc[fsel]  <= fc[fsel] + 1'b1;
        rr        <= fsel + 1'b1;
      end
      // consumption of the head byte of the active buffer
      if (consume) begin
        brd[act] <= (brd[act] == PW'(BDEPTH-1)) ? '0 : brd[act] + 1'b1;
        pc[act]  <= pc[act] + 1'b1;
      end
      for (int b = 0; b < NBUF; b++)
        bcnt[b] <= bcnt[b] + (PW+1)'(fetch && fsel == BW'(b))
                           - (PW+1)'(consume && act == BW'(b));

      // translator
      unique case (ts)
        T_OP: if (consume) begin
          opc <= head_op; opnd <= '0; lit_done <= 1'b0; uaddr <= r_entry;
          unique case (r_opnd)
            OPND_BYTE: begin ocnt <= 3'd1; ts <= T_OPND; end
            OPND_LIT:  begin ocnt <= 3'd4; ts <= T_OPND; end
            OPND_ADDR: begin ocnt <= 3'd2; ts <= T_OPND; end
            default:   ts <= T_EMIT;
          endcase
        end
        T_OPND: if (consume) begin
          opnd <= {opnd[WORD-9:0], head};
          ocnt <= ocnt - 1'b1;
          if (ocnt == 3'd1) begin
            ts <= T_EMIT;
            if (opc == G_CASE) begin
              alt_left <= head[1:0]; alt_k <= '0; alt_lo <= 1'b0; alt_bufs <= '0;
              if (head[1:0] != 2'd0) ts <= T_ALT;
            end
          end
        end
        T_ALT: if (consume) begin
          alt_lo <= !alt_lo;
          if (!alt_lo) alt_hi <= head;
          else begin
            // target address complete: give it a free buffer
            init_buf(int'(freeb), CAW'({alt_hi, head}));
            en[freeb] <= 1'b1;
            alt_bufs[2*alt_k +: 2] <= 2'(freeb);
            alt_k    <= alt_k + 1'b1;
            alt_left <= alt_left - 1'b1;
            if (alt_left == 2'd1) ts <= T_EMIT;
          end
        end
        T_EMIT: begin
          if (lq_push) lit_done <= 1'b1;
          if (emit_word && !r_last) uaddr <= uaddr + 1'b1;
          if (seq_end) begin
            ts <= T_OP;
            unique case (opc)
              G_JMP, G_CALL: init_buf(int'(act), CAW'(opnd));
              G_JZ, G_JNZ: begin
                init_buf(int'(freeb), CAW'(opnd));
                en[freeb] <= 1'b1;
                pending <= 1'b1; pend_direct <= 1'b1;
              end
              G_CASE: begin pending <= 1'b1; pend_direct <= 1'b1; end
              G_EVAL: begin pending <= 1'b1; pend_direct <= 1'b0; end
              G_RET, G_HALT: ts <= T_STOP;
              default: ;
            endcase
          end
        end
        default: ;
      endcase

      // resolution (overrides the translator)
      if (br_valid && pending) begin
        pending <= 1'b0;
        if (pend_direct) begin
          if (br_taken) begin
            act <= br_buf;
            for (int b = 0; b < NBUF; b++) if (BW'(b) != br_buf) begin
              en[b] <= 1'b0; init_buf(b, '0);
            end
            ts <= T_OP;
          end else begin
            for (int b = 0; b < NBUF; b++) if (BW'(b) != act) begin
              en[b] <= 1'b0; init_buf(b, '0);
            end
          end
        end
      end
      if (redir_valid || start) begin
        pending <= 1'b0;
        for (int b = 1; b < NBUF; b++) begin en[b] <= 1'b0; init_buf(b, '0); end
        en[0] <= 1'b1;
        act   <= '0;
        init_buf(0, start ? start_addr : redir_addr);
        ts <= T_OP;
      end
    end
  end

`ifndef SYNTHESIS
  // only one prediction can be outstanding, so a free buffer always exists
  a_free_buffer: assert property (@(posedge clk) disable iff (!rst_n)
    (ts == T_EMIT && seq_end && (opc == G_JZ || opc == G_JNZ)) |-> !en[freeb]);
  a_resolve_pending: assert property (@(posedge clk) disable iff (!rst_n)
    br_valid |-> pending);
  a_taken_enabled: assert property (@(posedge clk) disable iff (!rst_n)
    br_valid && br_taken |-> en[br_buf]);
  a_case_buffers: assert property (@(posedge clk) disable iff (!rst_n)
    (ts == T_ALT && consume && alt_lo) |-> !en[freeb]);
`endif
endmodule
