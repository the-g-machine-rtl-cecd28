// End-to-end testbench of gmachine at its default sizes (4096 nodes,
// 64 KiB control store, 24 P-stack registers). The testbench plays the
// host: after reset it waits for the free list, loads the shared G-code
// test program through the control-store port, makes one node
// uncollectable by writing 256 pointers to it through the G-memory port,
// and starts evaluation. While the G-processor runs, the host keeps
// reading G-memory, so that the two compete for it. At each service
// request it reads the node whose address is on the G-bus and checks it
// (loop sum 55, suspension evaluated to 105), then lets the processor
// continue, until HALT. Every mechanism of the design is counted and must
// have happened at least once: P-stack spill and fill, predicted jumps
// taken and not taken, a stall on a second prediction, JMP/CALL buffer
// re-initialisation, redirects, EVAL with and without a call, call and
// return signals, pre-allocation, allocation, count increment and
// decrement, collection, count overflow, a service request and a cycle
// where the host had to wait for the G-processor.
`include "tb/tb_check.svh"
module tb_gmachine;
  import gm_pkg::*;
  logic clk = 0, rst_n = 1, init_done, start = 0, svc_req, host_cont = 0, halted;
  logic [15:0] start_addr = 0;
  logic [31:0] svc_addr, d_reg, v_top, hm_rdata;
  logic hc_req = 0, hc_we = 0, hc_gnt, hm_req = 0, hm_ack, collecting, err;
  logic [15:0] hc_addr = 0;
  logic [7:0] hc_wdata = 0, hc_rdata;
  mreq_t hm_rq = '0;
  tags_t hm_rtags;
  pevents_t pev;
  mevents_t mev;
  int checks = 0, failures = 0, cyc = 0;
  int c_case, c_ovl, c_trav, c_cyc;
  int bad_reads = 0, host_reads = 0;
  int c_spill, c_fill, c_taken, c_nt, c_stall2, c_jmp, c_redir, c_ecall, c_edone, c_call,
      c_ret, c_pre, c_alloc, c_inc, c_dec, c_free, c_uncoll, c_svc, c_conflict;
  bit running = 0;
  `include "tb/tb_gm_prog.svh"

  gmachine dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    c_spill += int'(pev.spill); c_fill += int'(pev.fill); c_taken += int'(pev.taken);
    c_nt += int'(pev.nottaken); c_stall2 += int'(pev.stall2); c_case += int'(pev.casesw); c_ovl += int'(pev.overlap); c_trav += int'(mev.trav); c_cyc += int'(mev.cyc_free); c_jmp += int'(pev.jmp);
    c_redir += int'(pev.redirect); c_ecall += int'(pev.eval_call);
    c_edone += int'(pev.eval_done); c_call += int'(pev.call); c_ret += int'(pev.ret);
    c_pre += int'(mev.prealloc); c_alloc += int'(mev.alloc); c_inc += int'(mev.inc);
    c_dec += int'(mev.dec); c_free += int'(mev.free); c_uncoll += int'(mev.uncoll);
    c_conflict += int'(hm_req && dut.p_m_req && !hm_ack && dut.m_gnt[0]);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one host access to G-memory, held until acknowledged
  logic [31:0] h_data;
  tags_t h_tags;
  task automatic hmem(mop_e o, logic [31:0] a = 0, logic [31:0] d = 0, logic p = 0);
    @(negedge clk);
    hm_req = 1; hm_rq = '{op: o, addr: a, wdata: d, wptr: p};
    forever begin @(posedge clk); if (hm_ack) break; end
    h_data = hm_rdata; h_tags = hm_rtags;
    #1 hm_req = 0;
  endtask

  task automatic hcode(int a, logic [7:0] d);
    @(negedge clk);
    hc_req = 1; hc_we = 1; hc_addr = 16'(a); hc_wdata = d;
    forever begin @(posedge clk); if (hc_gnt) break; end
    #1 hc_req = 0; hc_we = 0;
  endtask

  task automatic cont();
    @(negedge clk); host_cont = 1; @(negedge clk); host_cont = 0;
  endtask

  initial begin
    logic [31:0] X, H, N;
    int t0;
    c_case = 0; c_ovl = 0; c_trav = 0; c_cyc = 0; c_spill = 0; c_fill = 0; c_taken = 0; c_nt = 0; c_stall2 = 0; c_jmp = 0; c_redir = 0;
    c_ecall = 0; c_edone = 0; c_call = 0; c_ret = 0; c_pre = 0; c_alloc = 0; c_inc = 0;
    c_dec = 0; c_free = 0; c_uncoll = 0; c_svc = 0; c_conflict = 0;
    build_prog();
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (init_done);
    foreach (prog[i]) hcode(i, prog[i]);
    // read back a few bytes of the program
    @(negedge clk); hc_req = 1; hc_addr = 16'(lbl["f"]); #1;
    `CHECK(hc_gnt && hc_rdata == 8'(G_COPY), "program loaded")
    @(negedge clk); hc_req = 0;
    // a node referenced 256 times becomes uncollectable
    hmem(M_ALLOC); X = h_data;
    hmem(M_ALLOC); H = h_data;
    for (int i = 0; i < 256; i++) hmem(M_WRITE, X | 1, H, 1);
    hmem(M_READ, X | 1);
    `CHECK(h_data == H && h_tags.ptr1, "host pointer write")
    `CHECK(dut.u_gmem.mem[H[12:1]].tags.uncoll, "count overflow made the node uncollectable")
    // run
    @(negedge clk); start = 1; start_addr = 16'(lbl["main"]); @(negedge clk); start = 0;
    t0 = cyc;
    running = 1;
    fork
      while (running) begin
        hmem(M_READ, H); host_reads++;
        if (h_data != 0 || !h_tags.uncoll) bad_reads++;
        repeat ($urandom_range(0, 6)) @(negedge clk);
      end
    join_none
    wait (svc_req);
    running = 0;
    c_svc++;
    N = svc_addr;
    repeat (12) @(negedge clk);
    hmem(M_READ, N | 1);
    `CHECK(h_data == 32'd55, $sformatf("loop sum %0d", h_data))
    hmem(M_READ, N);
    `CHECK(h_data == 32'd0, "loop counter reached zero")
    cont();
    wait (svc_req);
    c_svc++;
    hmem(M_READ, svc_addr);
    `CHECK(h_data == 32'd105 && h_tags.evaluated, $sformatf("suspension evaluated to %0d", h_data))
    cont();
    wait (halted);
    repeat (20) @(negedge clk);
    hmem(M_READ, N);
    `CHECK(h_data == 32'd7, "write after the first service request")
    `CHECK(!err && !collecting, "no error, collection finished")
    `CHECK(c_free == 4, $sformatf("garbage of the calls collected: %0d", c_free))
    $display("run took %0d cycles", cyc - t0);
    $display("spill=%0d fill=%0d taken=%0d nottaken=%0d stall2=%0d jmp=%0d redirect=%0d",
             c_spill, c_fill, c_taken, c_nt, c_stall2, c_jmp, c_redir);
    $display("eval_call=%0d eval_done=%0d call=%0d ret=%0d prealloc=%0d alloc=%0d",
             c_ecall, c_edone, c_call, c_ret, c_pre, c_alloc);
    $display("inc=%0d dec=%0d free=%0d uncoll=%0d svc=%0d host_wait=%0d",
             c_inc, c_dec, c_free, c_uncoll, c_svc, c_conflict);
    $display("case=%0d overlap=%0d trav=%0d cyc_free=%0d", c_case, c_ovl, c_trav, c_cyc);
    `CHECK(c_spill > 0, "P-stack spill happened")
    `CHECK(c_fill > 0, "P-stack fill happened")
    `CHECK(c_taken > 0, "taken jump happened")
    `CHECK(c_nt > 0, "not-taken jump happened")
    `CHECK(c_stall2 > 0, "second-prediction stall happened")
    `CHECK(c_jmp > 0, "buffer re-initialisation happened")
    `CHECK(c_case == 2, $sformatf("case switches predicted: %0d", c_case))
    `CHECK(c_ovl > 0, "micro-instruction overlapped a G-memory write")
    `CHECK(c_trav > 0, "local traversal happened")
    `CHECK(c_cyc == 2, $sformatf("garbage cycle collected: %0d", c_cyc))
    `CHECK(c_redir > 0, "redirect happened")
    `CHECK(c_ecall > 0, "EVAL call happened")
    `CHECK(c_edone > 0, "EVAL of evaluated node happened")
    `CHECK(c_call > 0 && c_call == c_ret, "calls and returns happened in pairs")
    `CHECK(c_pre > 0 && c_alloc > 0, "pre-allocation and allocation happened")
    `CHECK(c_inc > 0 && c_dec > 0, "count increment and decrement happened")
    `CHECK(c_free > 0, "collection happened")
    `CHECK(c_uncoll > 0, "count overflow happened")
    `CHECK(c_svc == 2, "service requests happened")
    `CHECK(c_conflict > 0, "host waited for the G-processor")
    `CHECK(host_reads > 0 && bad_reads == 0, $sformatf("host reads during the run: %0d, wrong %0d", host_reads, bad_reads))
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
