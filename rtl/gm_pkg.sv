// Shared types and constants of the G-machine: G-code opcodes, the 20-bit
// micro-instruction, ALU operation codes, G-memory request codes and the
// layout of a G-memory node.
//
// The 20-bit width of a micro-instruction, the one-byte opcode, the 32-bit
// data cells and the node layout (8-bit local reference count, 8-bit
// reference count, 2-bit threshold, six tags, two 32-bit cells) follow the
// design description. The opcode values, the operand formats and the
// division of the micro-instruction into fields are this design's own.
package gm_pkg;

  localparam int unsigned WORD = 32;   // data cell / G-bus width

  // ---------------------------------------------------------------- G-code
  // One-byte opcodes. Operand kinds: none, one index/count byte,
  // a 4-byte literal (most significant byte first) or a 2-byte control
  // address (most significant byte first).
  typedef enum logic [7:0] {
    G_NOP    = 8'h00,
    G_PUSHP  = 8'h01,  // lit32 : push pointer constant on P
    G_PUSHV  = 8'h02,  // lit32 : push integer literal on V
    G_POP    = 8'h03,  //       : remove P top onto the G-bus (latched in D)
    G_COPY   = 8'h04,  // i     : push copy of P[i]
    G_MOVE   = 8'h05,  // i     : P[i] <- P[0], then pop
    G_ROT    = 8'h06,  // i     : take P[i] out of the stack and put it on top
    G_ADD    = 8'h10,  //       : V: a b -> a+b
    G_ADC    = 8'h11,  //       : V: a b -> a+b+C
    G_SUB    = 8'h12,  //       : V: a b -> a-b   (complement, add with carry-in 1)
    G_NOT    = 8'h13,  //       : V: a -> ~a
    G_SHL    = 8'h14,  // k     : V: a -> a << k
    G_SHR    = 8'h15,  // k     : V: a -> a >>> k (arithmetic)
    G_INSB   = 8'h16,  // k     : V: a b -> a with byte k replaced by b[7:0]
    G_ZERO   = 8'h17,  //       : V: push constant zero
    G_POPV   = 8'h18,  //       : V: drop top
    G_ALLOC  = 8'h20,  //       : push pointer to a fresh node on P
    G_READV  = 8'h21,  // c     : pop node pointer, push its cell c on V
    G_READP  = 8'h22,  // c     : replace node pointer on P by the pointer in its cell c
    G_WRITEV = 8'h23,  // c     : cell c of node P[0] <- V top (popped), node stays
    G_WRITEP = 8'h24,  // c     : cell c of node P[1] <- P[0] (popped), node stays
    G_UPDATE = 8'h25,  //       : TRASH node P[0], overwrite it by V top as evaluated value, pop both
    G_EVAL   = 8'h26,  //       : evaluate node P[0] if not yet evaluated (calls its code)
    G_JMP    = 8'h30,  // a16
    G_JZ     = 8'h31,  // a16   : jump if Z condition code set
    G_JNZ    = 8'h32,  // a16   : jump if Z condition code clear
    G_CALL   = 8'h33,  // a16   : push return address on P, signal call, jump
    G_RET    = 8'h34,  //       : signal return, pop return address from P, jump to it
    G_CASE   = 8'h35,  // m a16*m : pop v from V; 1 <= v <= m: jump to the v-th address, else fall through (m <= 3)
    G_SVC    = 8'h3E,  //       : service request: P[0] to host, wait for continue
    G_HALT   = 8'h3F   //       : end of evaluation
  } gop_e;

  typedef enum logic [1:0] {OPND_NONE, OPND_BYTE, OPND_LIT, OPND_ADDR} opnd_e;

  // ------------------------------------------------------ micro-instructions
  typedef enum logic [5:0] {
    U_NOP, U_PPUSHL, U_VPUSHL, U_PPOP, U_PCOPY, U_PMOVE, U_PROT,
    U_ALU2, U_ALU1, U_ALU0, U_VPOP,
    U_ALLOC, U_READV, U_READP, U_WRITEV, U_WRITEP, U_TRASH, U_UPDV,
    U_BR, U_EVAL, U_RET, U_MCALL, U_SVC, U_HALT, U_CASE
  } uop_e;

  // 6 + 6 + 8 = 20 bits
  typedef struct packed {
    uop_e       op;
    logic [5:0] idx;   // stack index, cell number, shift count, byte position, buffer number
                       // or number of case alternatives
    logic [7:0] imm;   // ALU operation, branch condition or the buffers of case alternatives
  } uinstr_t;

  typedef enum logic [3:0] {
    A_ADD, A_ADC, A_ADD1, A_NOT, A_SHL, A_SHR, A_INSB, A_ZERO, A_PASS
  } aluop_e;

  typedef struct packed {
    logic z, n, c, v;
  } cc_t;

  localparam logic [7:0] BR_Z  = 8'd0;
  localparam logic [7:0] BR_NZ = 8'd1;

  // P-stack operations
  typedef enum logic [2:0] {
    PS_NONE, PS_PUSH, PS_POP, PS_COPY, PS_MOVE, PS_ROT, PS_REPL
  } psop_e;

  // -------------------------------------------------------------- G-memory
  typedef enum logic [2:0] {
    M_READ, M_WRITE, M_ALLOC, M_TRASH, M_UPDATE, M_CALL, M_RET
  } mop_e;

  // A request to the G-memory manager. A pointer addresses a node; its
  // low-order bit selects the first or second cell.
  typedef struct packed {
    mop_e            op;
    logic [WORD-1:0] addr;
    logic [WORD-1:0] wdata;
    logic            wptr;    // datum of a WRITE is a pointer
  } mreq_t;

  typedef struct packed {
    logic evaluated;   // is evaluated?
    logic ptr0;        // first cell contains pointer?
    logic ptr1;        // second cell contains pointer?
    logic recent;      // recently written?
    logic uncoll;      // uncollectable?
    logic visited;     // collector has visited?
  } tags_t;

  typedef struct packed {
    logic [7:0]      lrc;     // local reference count
    logic [7:0]      rc;      // reference count
    logic [1:0]      thr;     // threshold
    tags_t           tags;
    logic [WORD-1:0] cell0;
    logic [WORD-1:0] cell1;
  } node_t;   // 88 bits

  // ------------------------------------------------------- event signals
  // One-cycle pulses brought out of the processor and the memory manager
  // for performance counting and test.
  typedef struct packed {
    logic spill;        // P-stack cell moved into overflow memory
    logic fill;         // P-stack cell moved back from overflow memory
    logic cond;         // conditional jump or EVAL predicted
    logic taken;        // prediction wrong: micro-instruction queue flushed
    logic nottaken;     // prediction right
    logic jmp;          // JMP/CALL re-initialised a code buffer
    logic stall2;       // translation waiting on a second prediction
    logic redirect;     // stream redirected by RET or EVAL
    logic eval_call;    // EVAL of an unevaluated node called its code
    logic eval_done;    // EVAL found the node evaluated
    logic call;         // call signalled to the memory manager
    logic ret;          // return signalled to the memory manager
    logic casesw;       // case switch translated with its alternatives prefetched
    logic overlap;      // micro-instruction dispatched while a G-memory write is outstanding
  } pevents_t;

  typedef struct packed {
    logic prealloc;     // node moved from free list into the allocation queue
    logic alloc;        // node handed to a requester
    logic alloc_wait;   // ALLOC waiting for the allocation queue
    logic inc;          // reference count incremented
    logic dec;          // reference count decremented
    logic free;         // node collected
    logic uncoll;       // reference count overflowed: node uncollectable
    logic trav;         // local traversal of a subgraph started
    logic cyc_free;     // node of a cyclic subgraph collected
  } mevents_t;

endpackage
