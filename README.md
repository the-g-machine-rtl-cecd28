# G-machine: a programmed graph-reduction evaluator in SystemVerilog

The G-machine evaluates lazy functional programs by **programmed graph
reduction**. An expression is held as a graph of two-cell nodes in a tagged
memory. Nothing decides at run time which rewrite to apply next: a compiler
turns each function definition into a stream of *G-code* instructions, and
the machine runs that code. Shared subexpressions are shared nodes. The
first reference that needs a node's value evaluates the node, overwrites it
with the value and sets its `is_evaluated` tag, so later references find the
value there.

This RTL implements the evaluator with the four kinds of hardware support
that make it fast:

* **a P-stack of graph pointers** whose top 24 cells are registers. Any of
  these cells can be brought to the top in one cycle. The stack spills into
  and refills from a fast memory automatically, so saving a context on a
  function call costs only the push of a return address;
* **an instruction fetch and translation unit (IFTU)** that turns byte-coded
  G-code into 20-bit vertical micro-instructions. It has four code buffers,
  prefetches both paths of a conditional jump, and handles unconditional
  jumps without producing any micro-instruction;
* **a tagged list-structure memory** (G-memory). Its nodes carry tags and
  reference counts, and `ALLOC` is a memory primitive like `READ` and
  `WRITE`;
* **a memory manager** that keeps reference counts and reclaims garbage with
  almost no work from the processor.

The machine is a slave of a host processor. The host loads the memories,
starts an evaluation, and serves the machine's service requests.

## System structure

```
            host processor (outside this design)
   start/cont |  ^ svc_req, svc_addr, halted      hc_* port     hm_* port
              v  |                                    |             |
   +---------------------------+   cs_*   +-----------v--+          |
   |  gm_processor             |<-------->| arbiter      |--> gm_ctrl_store
   |   gm_iftu  -> gm_pcu      |          +--------------+   (64 KiB G-code)
   |   gm_pstack (+gm_pstack_mem)                                   |
   |   gm_vstack, gm_alu       |   m_*    +--------------+          |
   |   A, T, D registers       |<-------->| arbiter      |<---------+
   +---------------------------+          +------+-------+
                                                 v
                                     gm_mem_manager --> gm_node_mem (4096 nodes)
```

`gmachine` is the top. Both shared memories are arbitrated with fixed
priority: the G-processor always wins over the host. A G-memory grant is
held until the manager acknowledges the request.

## The G-code accepted by this implementation

Each opcode is one byte. An operand is one index byte, a 4-byte literal, or
a 2-byte control-store address. Literals and addresses are stored most
significant byte first. The instruction set is this implementation's own.
It covers the instructions the machine is built around: the five stack
instructions, ALU operations, allocation, reading and writing node cells,
`UPDATE`, `EVAL`, jumps, a case switch, call and return.

| opcode | name | operand | effect |
|---|---|---|---|
| 00 | NOP | | |
| 01 | PUSHP | lit32 | push a pointer constant on P |
| 02 | PUSHV | lit32 | push an integer on V |
| 03 | POP | | remove the top of P (copied into D) |
| 04 | COPY | i | push a copy of P[i] |
| 05 | MOVE | i | P[i] := P[0], then pop (i counted before the pop) |
| 06 | ROT | i | take P[i] out of the stack and put it on top |
| 10/11 | ADD / ADC | | V: b a → b+a (+C) |
| 12 | SUB | | V: b a → b−a (two micro-instructions: complement, add with carry-in 1) |
| 13 | NOT | | V: a → ~a |
| 14/15 | SHL / SHR | k | V: shift left / arithmetic right by k |
| 16 | INSB | k | V: b a → b with byte k replaced by a[7:0] |
| 17 | ZERO | | push 0 on V |
| 18 | POPV | | drop the top of V |
| 20 | ALLOC | | push a pointer to a fresh node on P |
| 21 | READV | c | pop a node pointer, push its cell c on V |
| 22 | READP | c | replace the node pointer on P by the pointer in its cell c |
| 23 | WRITEV | c | cell c of node P[0] := V top (popped); the node stays on P |
| 24 | WRITEP | c | cell c of node P[1] := P[0] as a pointer (popped) |
| 25 | UPDATE | | overwrite node P[0] with V top as its evaluated value (TRASH first); pop both |
| 26 | EVAL | | if node P[0] is not evaluated, call the code whose address is in its first cell |
| 30 | JMP | a16 | jump |
| 31/32 | JZ / JNZ | a16 | jump if the Z condition code is set / clear |
| 33 | CALL | a16 | push the return address on P, signal a call, jump |
| 34 | RET | | signal a return, pop the return address, jump to it |
| 35 | CASE | m, a16 × m | pop v from V; for 1 ≤ v ≤ m jump to the v-th address, otherwise fall through (m ≤ 3) |
| 3E | SVC | | service request: show P[0] to the host and wait |
| 3F | HALT | | end of evaluation |

A pointer is `{node number, cell bit}`: the low-order bit selects the first
or second cell. Node 0 is nil.

**Suspensions and EVAL.** An unevaluated node holds a code address in its
first cell and an argument in its second. `EVAL` on such a node pushes the
return address above the node pointer and jumps to the code. That code finds
the node at `P[1]`. It computes the value and ends with `UPDATE` and `RET`.
A second `EVAL` of the same node sees `is_evaluated` and does nothing.

## Instruction fetch and translation

This is the least conventional part of the design.

**Code buffers.** `gm_iftu` has `NBUF = 4` byte queues. Each has its own
fetch counter `FC` and program counter `PC`. Each cycle a round-robin
multiplexer fetches one byte from the control store into one enabled buffer
that has room. One buffer is *active*: the micro-sequence controller reads
from it.

**Translation.** The controller takes an opcode from the active buffer and
collects its operand bytes into the op'nd register. It then copies the
opcode's micro-sequence from the micro-sequence store (`gm_useq_rom`) into
the micro-instruction queue, one word per cycle. An index operand is placed
in the micro-instruction's `idx` field. A literal, and the return address of
`CALL` and `EVAL`, go into the literals queue, which the PCU reads in step
with the micro-instructions.

**Jumps.**
* `JMP` produces no micro-instruction. It only restarts the active buffer at
  the target.
* `CALL` produces "push literal" and "signal call", then restarts the active
  buffer at the target.
* `JZ`/`JNZ` enable a free buffer, which starts fetching at the target. The
  controller emits a branch micro-instruction that names that buffer and
  goes on translating the fall-through path. The IFTU predicts "not taken"
  and prefetches the other path.
* `EVAL` is also predicted to fall through, that is, to find the node
  already evaluated.
* `CASE m a1 … am` collects its target addresses one by one and enables a
  free buffer for each. It then emits one case micro-instruction. That
  micro-instruction carries `m` in `idx` and the alternatives' buffer
  numbers in 2-bit fields of `imm`. Translation continues down the
  fall-through path, so with `m = 3` all four buffers fetch at once.
* Only one prediction can be outstanding. A second `JZ`/`JNZ`/`CASE`/`EVAL`
  stops translation until the first is resolved.
* `RET` and `HALT` stop translation until the PCU redirects the stream.

**Resolution** comes from the PCU:
* `br_valid` and `br_taken` both set (a jump was taken): the
  micro-instruction queue and the literals queue are flushed, and any
  translation in progress is aborted. The buffer named by `br_buf` becomes
  active and all other buffers are disabled. The first new
  micro-instruction appears two or more cycles later.
* `br_valid` set and `br_taken` clear (prediction right): every buffer
  but the active one is released and the micro-instruction stream goes on unbroken. Tail
  loops therefore run as straight-line code, and only the exit jump costs a
  flush.
* `redir_valid` (a `RET`, or `EVAL` of an unevaluated node): the IFTU
  flushes everything and restarts buffer 0 at `redir_addr`.

## Micro-instructions and the processor control unit

A micro-instruction is 20 bits: `{op[5:0], idx[5:0], imm[7:0]}` (`uinstr_t`
in `gm_pkg`). `gm_pcu` dispatches one micro-instruction per cycle when all
it needs is present: the instruction itself, and a literal if it uses one.
G-memory micro-instructions that only write are *posted*: `WRITEV`,
`WRITEP`, `TRASH`, the value write of `UPDATE`, and the call signal. The
PCU latches the request and applies the stack effects at dispatch. Later
register, stack, ALU and branch micro-instructions keep going while the
request waits for the memory. The next G-memory micro-instruction, `SVC`
or `HALT` waits until it is done. Micro-instructions that need an answer
wait for their acknowledge: `ALLOC`, the reads, `EVAL` and `RET`.

The PCU also holds:
* `A`, the last G-memory address;
* `T`, the tags of the last node read;
* `D`, the last cell popped, kept for diagnostics;
* the condition codes Z/N/C/V from the ALU.

Branch micro-instructions test Z. The case micro-instruction pops its
selector from the V-stack and reports the buffer of the chosen
alternative. `EVAL` reads the node's tags. If the node
is evaluated, the PCU confirms the prediction and drops the return-address
literal. Otherwise it pushes the return address, signals a call to the
memory manager, and redirects the IFTU to the code address held in the node.

## P-stack with automatic overflow

`gm_pstack` keeps the top `NREG = 24` cells in registers; `reg_q[0]` is the
top. `PUSH`, `POP`, `COPY i`, `MOVE i` and `ROT i` each take one cycle. So
does `PS_REPL` (replace the top), which `READP` uses.

A push into a full register queue writes the bottom cell into
`gm_pstack_mem` in the same cycle (a spill). A pop reads the most recent
spilled cell back into the bottom register (a fill). The overflow memory
holds `MDEPTH = 256` cells. Because spilling and filling are automatic,
nested evaluation needs no instructions to save or restore the stack. The
sticky `err` flag reports underflow, an index beyond the register queue, or
a full overflow memory.

`gm_vstack` is a plain 16-entry register stack of basic values at the ALU.
`gm_alu` implements add, add with carry, complement, left and arithmetic
right shifts, byte insertion and zero on 32-bit data.

## G-memory and its manager

A node is 88 bits (`node_t`):

| 8 bits | 8 bits | 2 bits | 6 bits | 32 bits | 32 bits |
|---|---|---|---|---|---|
| local ref count | ref count | threshold | tags | first cell | second cell |

The six tags are: is evaluated, first cell is a pointer, second cell is a
pointer, recently written, uncollectable, and collector has visited.

`gm_mem_manager` serves one request at a time:

| request | effect | acknowledge |
|---|---|---|
| `READ` | returns the addressed cell and the node's tags | same cycle |
| `WRITE` | writes the cell and its pointer tag; if the datum is a pointer, the target's count is incremented next cycle | same cycle |
| `ALLOC` | takes a node from an 8-entry queue of pre-allocated nodes | same cycle, or waits while the queue is empty |
| `TRASH` | precedes `UPDATE`: the node's pointer tags are cleared and its children are decremented in the following cycles | at once |
| `UPDATE` | writes a basic value and sets `is_evaluated` | same cycle |
| `CALL`, `RET` | mark the stack of nodes allocated since the call (the allocation record) | same cycle |

**Allocation.** After reset the manager links nodes 1…4095 into a free list
through their first cells. This takes one cycle per node; `init_done` rises
when it is finished. In idle cycles it moves nodes from the head of the free
list into the pre-allocation queue, with fresh tags and counts.

**Reference counts.** Each pointer write increments its target's count and
sets the target's `recently written` tag. An increment that would overflow
sets `uncollectable` instead, permanently.

**Collection.** A `RET` makes the nodes allocated since the matching `CALL`
eligible. In idle cycles the manager examines them, newest first:
* A node with a count of zero is collected: its children are decremented
  and it is linked back into the free list.
* A child whose count falls to zero and which has already been examined
  (`collector has visited`) becomes eligible again.
* An eligible node with a non-zero count that is not `uncollectable` starts
  a local traversal. The manager follows the pointer cells from that node
  and adds one to the local reference count of each node reached, once per
  pointer. Each newly reached node has its `recently written` tag cleared
  and joins the subgraph. If every node in the subgraph then has a local
  count equal to its count, none was written during the traversal, and
  all have already left the allocation record (`collector has visited`), the
  counts come only from inside the subgraph: the whole subgraph is a
  garbage cycle and is freed. Otherwise the local counts are cleared and
  the node is dropped from the record.
* A traversal gives up if the subgraph grows past `CYC_MAX` (16) nodes or
  reaches an `uncollectable` node.

While a collection runs, `READ` and `WRITE` are served, but requests that
change the record wait. During a traversal, every request waits. The
threshold field is not used and stays zero.

**Limitations:**
* **Large cycles are kept.** A garbage cycle of more than `CYC_MAX` nodes
  is never reclaimed.
* **Pointers held only on the P-stack are not counted.** A node that only
  the P-stack points to has a count of zero, and it is collected when the
  call that allocated it returns. Compiled code must store a result in
  G-memory before `RET`: `UPDATE` does this for suspensions.

## Host interface and timing

* After reset, wait for `init_done`.
* Load G-code through `hc_*`. An access happens in a cycle where `hc_gnt` is
  high; `hc_rdata` is valid in that cycle.
* Build graphs through `hm_*` (`mreq_t`: `op`, `addr`, `wdata`, `wptr`).
  Hold `hm_req` until `hm_ack`.
* Pulse `start` with `start_addr`.
* On `svc_req`, the processor waits with a node address on `svc_addr`. Pulse
  `host_cont` to let it continue.
* `halted` rises after `HALT`.
* `pev` and `mev` are one-cycle event pulses: spills, fills, taken and
  not-taken jumps, collections, and so on.

All state is reset by the asynchronous active-low `rst_n`.

## Where this implementation departs from or goes beyond the source design

Chosen here because the source design leaves them open:
* the G-code encoding and the micro-instruction set;
* all memory and queue sizes except the 24 P-stack registers and the 4 code
  buffers;
* the one-byte-per-cycle fetch and the fall-through prediction;
* the size limit on the cyclic-collection traversal;
* overlapping only G-memory writes with later micro-instructions, not reads;
* the signal-level host interface.

The encoding of the case switch and the way its alternative is chosen are
this design's own.

Not built:
* the part of memory management that the source design assigns to software
  on the host.

The manager runs collection between requests, not in a separate parallel
processor.

## Simulating

Every block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. `tb/tb_gm_prog.svh` holds a G-code program
that the processor and system testbenches share. It sums 10…1 in a loop,
evaluates a suspension `f 5 = 5 + 100` twice, runs a four-way case switch
that is taken and a case switch that falls through, calls a function that leaves
a garbage cycle of two nodes, pushes 30 pointers to force P-stack spills, and reports through two
service requests.

```
verilator --binary --timing --assert -Irtl -y rtl rtl/gm_pkg.sv tb/tb_gmachine.sv --top-module tb_gmachine
./obj_dir/Vtb_gmachine
```

Replace `tb_gmachine` by any other testbench name, for example
`tb_gm_iftu`. Run from the directory that holds `rtl/` and `tb/`, because
the testbenches include `tb/tb_check.svh`. The system test runs the whole
design at its default sizes and takes about 910 cycles after loading. It
fails if any mechanism, from spill and fill to collection and host
arbitration, never occurred.

In that program the micro-instruction queue is nearly always empty.
Translation costs one cycle per G-code byte plus one per micro-instruction
emitted, so it sets the pace, not the PCU. Overlapped G-memory writes only
show up where the queue has filled, for example while the processor waits
on a service request.
