// G-code test program shared by the processor and system testbenches.
// build_prog() assembles it into prog[] and fills in the addresses.
//
//   main:  ALLOC                      N = new node
//          PUSHV 10; WRITEV 0         N.0 = 10   (counter)
//          ZERO;     WRITEV 1         N.1 = 0    (sum)
//   loop:  COPY 0; READV 1; COPY 0; READV 0; ADD; WRITEV 1     sum += counter
//          COPY 0; READV 0; PUSHV 1; SUB; WRITEV 0             counter -= 1
//          JNZ loop
//          ALLOC                      S = new node: a suspension of f 5
//          PUSHV f; WRITEV 0; PUSHV 5; WRITEV 1
//          EVAL                       calls f: S becomes 105
//          EVAL                       already evaluated: no call
//          COPY 0; READV 0; PUSHV 105; SUB; JZ ok; HALT
//   ok:    PUSHV 2; CASE 3 c1 c2 c3   four-way switch: goes to c2
//          HALT
//   c1:    HALT
//   c3:    HALT
//   c2:    ZERO; CASE 1 c1            selector 0: falls through
//          CALL g                     g allocates two linked nodes, garbage at return
//          CALL h                     h leaves a garbage cycle of two nodes
//          PUSHP 1 .. PUSHP 30        deeper than the register queue
//          POP x 30
//          JMP fin; HALT
//   fin:   COPY 1; SVC                host is shown N
//          PUSHV 7; WRITEV 0          N.0 = 7; ZERO overlaps the write
//          ZERO; POPV
//          POP; SVC                   host is shown S
//          HALT
//   f:     (P: ret S)  COPY 1; READV 1; PUSHV 100; ADD; COPY 1; UPDATE; RET
//   g:     ALLOC; ALLOC; WRITEP 1; POP; RET
//   h:     ALLOC; ALLOC; COPY 1; WRITEP 0; ROT 1; COPY 1; WRITEP 1; POP; POP; RET
// At the end N = {7, 55} (N.0 is 0 at the first service request) and S is evaluated with value 105. The results of
// the loop are 10+9+...+1 = 55 and of f 5 + 100 = 105.
logic [7:0] prog [$];
int lbl [string];
int fix [int];      // position of a 2-byte address -> label index
string fixname [int];

function automatic void b1(int v); prog.push_back(8'(v)); endfunction
function automatic void lit(int o, int v);
  b1(o); b1(v >> 24); b1(v >> 16); b1(v >> 8); b1(v);
endfunction
function automatic void jmp(int o, string l);
  b1(o); fixname[prog.size()] = l; b1(0); b1(0);
endfunction
function automatic void here(string l); lbl[l] = prog.size(); endfunction

function automatic void build_prog();
  import gm_pkg::*;
  prog.delete();
  here("main");
  b1(G_ALLOC); lit(G_PUSHV, 10); b1(G_WRITEV); b1(0); b1(G_ZERO); b1(G_WRITEV); b1(1);
  here("loop");
  b1(G_COPY); b1(0); b1(G_READV); b1(1); b1(G_COPY); b1(0); b1(G_READV); b1(0);
  b1(G_ADD); b1(G_WRITEV); b1(1);
  b1(G_COPY); b1(0); b1(G_READV); b1(0); lit(G_PUSHV, 1); b1(G_SUB); b1(G_WRITEV); b1(0);
  jmp(G_JNZ, "loop");
  b1(G_ALLOC); fixname[prog.size() + 3] = "f"; lit(G_PUSHV, 0); b1(G_WRITEV); b1(0);
  lit(G_PUSHV, 5); b1(G_WRITEV); b1(1);
  b1(G_EVAL); b1(G_EVAL);
  b1(G_COPY); b1(0); b1(G_READV); b1(0); lit(G_PUSHV, 105); b1(G_SUB); jmp(G_JZ, "ok");
  b1(G_HALT);
  here("ok");
  lit(G_PUSHV, 2); b1(G_CASE); b1(3);
  fixname[prog.size()] = "c1"; b1(0); b1(0);
  fixname[prog.size()] = "c2"; b1(0); b1(0);
  fixname[prog.size()] = "c3"; b1(0); b1(0);
  b1(G_HALT);
  here("c1"); b1(G_HALT);
  here("c3"); b1(G_HALT);
  here("c2"); b1(G_ZERO); b1(G_CASE); b1(1);
  fixname[prog.size()] = "c1"; b1(0); b1(0);
  jmp(G_CALL, "g");
  jmp(G_CALL, "h");
  for (int i = 1; i <= 30; i++) lit(G_PUSHP, i);
  for (int i = 1; i <= 30; i++) b1(G_POP);
  jmp(G_JMP, "fin"); b1(G_HALT);
  here("fin");
  b1(G_COPY); b1(1); b1(G_SVC);
  lit(G_PUSHV, 7); b1(G_WRITEV); b1(0); b1(G_ZERO); b1(G_POPV);
  b1(G_POP); b1(G_SVC); b1(G_HALT);
  here("f");
  b1(G_COPY); b1(1); b1(G_READV); b1(1); lit(G_PUSHV, 100); b1(G_ADD);
  b1(G_COPY); b1(1); b1(G_UPDATE); b1(G_RET);
  here("g");
  b1(G_ALLOC); b1(G_ALLOC); b1(G_WRITEP); b1(1); b1(G_POP); b1(G_RET);
  here("h");
  b1(G_ALLOC); b1(G_ALLOC); b1(G_COPY); b1(1); b1(G_WRITEP); b1(0);
  b1(G_ROT); b1(1); b1(G_COPY); b1(1); b1(G_WRITEP); b1(1); b1(G_POP); b1(G_POP); b1(G_RET);
  foreach (fixname[p]) begin
    prog[p]   = 8'(lbl[fixname[p]] >> 8);
    prog[p+1] = 8'(lbl[fixname[p]]);
  end
endfunction
