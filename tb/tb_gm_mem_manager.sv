// Testbench of gm_mem_manager with its node store at the default size
// (4096 nodes). It checks: the free list built after reset; ALLOC returns
// distinct non-nil nodes; READ/WRITE of basic values and pointers with
// their tags; the reference count of a pointer's target counts up, sets
// "recently written", and overflow makes a node uncollectable; TRASH
// decrements the children and clears the pointer tags; UPDATE writes an
// evaluated value; at RET the nodes allocated since the CALL that nothing
// points to are collected, including a child whose count falls to zero;
// a two-node cycle left behind by a call is collected by the local
// traversal, while a cycle that an outside node points to is kept with
// its local counts cleared; a 20-node garbage ring, larger than a
// traversal may grow, is kept; and finally that every node can be allocated exactly once and ALLOC
// then waits. Counts are read from the node store directly.
`include "tb/tb_check.svh"
module tb_gm_mem_manager;
  import gm_pkg::*;
  localparam int NODES = 4096;
  logic clk = 0, rst_n = 1, init_done, req = 0, ack, n_we, collecting, err;
  mreq_t rq;
  logic [31:0] rdata;
  tags_t rtags;
  logic [11:0] n_raddr, n_waddr;
  node_t n_rdata, n_wdata;
  logic ev_prealloc, ev_alloc, ev_alloc_wait, ev_inc, ev_dec, ev_free, ev_uncoll, ev_trav, ev_cyc_free;
  int ntrav = 0, ncyc = 0;
  int checks = 0, failures = 0, nfree = 0, ninc = 0, ndec = 0, nwait = 0;

  gm_mem_manager #(.NODES(NODES)) dut (.*);
  gm_node_mem #(.NODES(NODES)) u_mem (.clk, .raddr(n_raddr), .rdata(n_rdata),
    .we(n_we), .waddr(n_waddr), .wdata(n_wdata));
  always #5 clk = ~clk;

  always @(posedge clk) begin
    nfree += int'(ev_free); ninc += int'(ev_inc); ndec += int'(ev_dec);
    nwait += int'(ev_alloc_wait); ntrav += int'(ev_trav); ncyc += int'(ev_cyc_free);
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] r_data;
  tags_t r_tags;
  task automatic op(mop_e o, logic [31:0] a = 0, logic [31:0] d = 0, logic p = 0);
    @(negedge clk);
    req = 1; rq = '{op: o, addr: a, wdata: d, wptr: p};
    forever begin
      @(posedge clk);
      if (ack) break;
    end
    r_data = rdata; r_tags = rtags;
    #1 req = 0;
  endtask
  function automatic node_t nd(logic [31:0] p);
    return u_mem.mem[p[12:1]];
  endfunction
  task automatic idle(int n);
    repeat (n) @(posedge clk);
  endtask

  initial begin
    logic [31:0] A, B, C, D, E, U, P, Q, R, S;
    logic [31:0] ring [20];
    int ring_ok;
    int seen [int];
    int live, stall;
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (init_done);
    `CHECK(nd(32'd2).cell0 == 32'd4 && nd(32'(2*(NODES-1))).cell0 == 0, "free list linked")
    op(M_ALLOC); A = r_data;
    op(M_ALLOC); B = r_data;
    op(M_ALLOC); C = r_data;
    `CHECK(A != 0 && B != 0 && C != 0 && A != B && B != C && A != C && A[0] == 0, "ALLOC distinct nodes")
    op(M_WRITE, A, 32'd1234, 0);
    op(M_READ, A);
    `CHECK(r_data == 1234 && !r_tags.ptr0, "basic value written and read")
    op(M_WRITE, A | 1, B, 1);
    idle(2);
    op(M_READ, A | 1);
    `CHECK(r_data == B && r_tags.ptr1, "pointer written with its tag")
    `CHECK(nd(B).rc == 1 && nd(B).tags.recent, "target count incremented")
    // overflow of a count: uncollectable for good
    for (int i = 0; i < 256; i++) op(M_WRITE, C, A, 1);
    idle(2);
    `CHECK(nd(A).tags.uncoll && nd(A).rc == 8'd255, "count overflow makes node uncollectable")
    // TRASH then UPDATE of A: B loses its reference
    op(M_TRASH, A); idle(3);
    `CHECK(nd(B).rc == 0 && !nd(A).tags.ptr1, "TRASH decrements children")
    op(M_UPDATE, A, 32'd99);
    op(M_READ, A);
    `CHECK(r_data == 99 && r_tags.evaluated, "UPDATE writes an evaluated value")
    // call / return: D -> E, both garbage at the return; U anchored from A
    op(M_CALL);
    op(M_ALLOC); D = r_data;
    op(M_ALLOC); E = r_data;
    op(M_ALLOC); U = r_data;
    op(M_WRITE, D, E, 1);
    op(M_WRITE, C | 1, U, 1);
    idle(2);
    `CHECK(nd(E).rc == 1 && nd(U).rc == 1, "counts before return")
    nfree = 0;
    op(M_RET);
    idle(60);
    `CHECK(nfree == 2 && !collecting, $sformatf("two nodes collected at return (%0d)", nfree))
    `CHECK(nd(U).tags.visited && !nd(U).tags.uncoll, "anchored node kept")
    // a garbage cycle P <-> Q
    op(M_CALL);
    op(M_ALLOC); P = r_data;
    op(M_ALLOC); Q = r_data;
    op(M_WRITE, P, Q, 1);
    op(M_WRITE, Q | 1, P, 1);
    idle(2);
    nfree = 0; ncyc = 0;
    op(M_RET);
    idle(60);
    `CHECK(nfree == 2 && ncyc == 2 && !collecting, $sformatf("garbage cycle collected (%0d, %0d)", nfree, ncyc))
    `CHECK(nd(P).rc == 0 && nd(P).lrc == 0 && nd(Q).lrc == 0 && !nd(P).tags.ptr0, "collected nodes cleared")
    // a cycle R <-> S that C points to is kept
    op(M_CALL);
    op(M_ALLOC); R = r_data;
    op(M_ALLOC); S = r_data;
    op(M_WRITE, R, S, 1);
    op(M_WRITE, S | 1, R, 1);
    op(M_WRITE, C, R, 1);
    idle(2);
    nfree = 0;
    op(M_RET);
    idle(60);
    `CHECK(nfree == 0 && !collecting && ntrav >= 4, $sformatf("anchored cycle kept (%0d, %0d)", nfree, ntrav))
    `CHECK(nd(R).rc == 2 && nd(S).rc == 1 && nd(R).lrc == 0 && nd(S).lrc == 0, "local counts cleared after traversal")
    op(M_READ, S | 1);
    `CHECK(r_data == R && r_tags.ptr1, "kept cycle intact")
    // a garbage ring of 20 nodes is larger than a traversal may grow
    // (CYC_MAX = 16), so every traversal gives up and the ring is kept
    op(M_CALL);
    for (int i = 0; i < 20; i++) begin op(M_ALLOC); ring[i] = r_data; end
    for (int i = 0; i < 20; i++) op(M_WRITE, ring[i], ring[(i + 1) % 20], 1);
    idle(2);
    nfree = 0; ncyc = 0; ntrav = 0;
    op(M_RET);
    idle(3000);
    `CHECK(nfree == 0 && ncyc == 0 && ntrav == 20 && !collecting,
           $sformatf("oversized ring kept (%0d, %0d, %0d)", nfree, ncyc, ntrav))
    ring_ok = 1;
    for (int i = 0; i < 20; i++)
      if (nd(ring[i]).rc != 1 || nd(ring[i]).lrc != 0 || !nd(ring[i]).tags.visited) ring_ok = 0;
    `CHECK(ring_ok == 1, "ring counts intact and local counts cleared")
    // every remaining node can be allocated once, then ALLOC waits
    seen[A] = 1; seen[B] = 1; seen[C] = 1; seen[U] = 1; seen[R] = 1; seen[S] = 1;
    for (int i = 0; i < 20; i++) seen[ring[i]] = 1;
    live = 26;
    fork
      begin
        while (live < NODES - 1) begin
          op(M_ALLOC);
          `CHECK(!seen.exists(r_data) && r_data != 0, "node allocated once")
          seen[r_data] = 1; live++;
        end
      end
    join
    `CHECK(live == NODES - 1, "all nodes allocatable")
    @(negedge clk); req = 1; rq = '{op: M_ALLOC, addr: 0, wdata: 0, wptr: 0};
    stall = 0;
    repeat (20) begin @(posedge clk); if (!ack) stall++; end
    @(negedge clk); req = 0;
    `CHECK(stall == 20 && nwait > 0, "ALLOC waits when memory is exhausted")
    `CHECK(!err, "no error")
    $display("inc=%0d dec=%0d free=%0d", ninc, ndec, nfree);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
