// P-stack of the G-processor: the stack of graph pointers used to traverse
// an application graph and to reach the arguments of a function.
//
// The top NREG cells (24 in the description) live in a register queue,
// reg_q[0] being the top. Each of these operations takes one cycle:
//   PS_PUSH  push din
//   PS_POP   remove the top (it is visible on top before the edge)
//   PS_COPY  push a copy of cell idx
//   PS_MOVE  overwrite cell idx with the top, then remove the top
//            (idx counts from the top before the removal, idx >= 1)
//   PS_ROT   remove cell idx from the interior and place it on top
//   PS_REPL  replace the top by din
// When a push finds the register queue full, the bottom cell is written to
// the overflow memory (spill). When a pop leaves a gap at the bottom and
// cells are held in the overflow memory, the most recent of them is read
// back into the bottom register in the same cycle (fill). Saving and
// restoring a context therefore costs no instructions beyond pushing a
// return address. The register queue size and the five stack instructions
// follow the description; the PS_REPL operation, the one-cycle spill/fill
// through an asynchronously read memory and the error flags are this
// design's own.
//
// Outputs: top and nxt are cells 0 and 1; depth is the total number of
// cells; spill/fill pulse when a cell leaves or re-enters the registers.
// err is sticky: a pop of an empty stack, an index beyond the cells held in
// registers, or a push when the overflow memory is full.
module gm_pstack
  import gm_pkg::*;
#(
  parameter int unsigned W     = 32,
  parameter int unsigned NREG  = 24,
  parameter int unsigned MDEPTH = 256
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  psop_e                         op,
  input  logic [4:0]                    idx,
  input  logic [W-1:0]                  din,
  output logic [W-1:0]                  top,
  output logic [W-1:0]                  nxt,
  output logic [$clog2(NREG+MDEPTH+1)-1:0] depth,
  output logic                          spill,
  output logic                          fill,
  output logic                          err
);
  localparam int unsigned RW = $clog2(NREG+1);
  localparam int unsigned MW = $clog2(MDEPTH);

  logic [W-1:0]  reg_q [NREG];
  logic [W-1:0]  reg_d [NREG];
  logic [RW-1:0] nreg_q, nreg_d;
  logic [MW:0]   nmem_q, nmem_d;
  logic          mem_we;
  logic [W-1:0]  mem_rdata;
  logic          bad;

  gm_pstack_mem #(.W(W), .DEPTH(MDEPTH)) u_mem (
    .clk, .we(mem_we), .waddr(nmem_q[MW-1:0]), .wdata(reg_q[NREG-1]),
    .raddr(MW'(nmem_q - 1'b1)), .rdata(mem_rdata)
  );

  assign top   = reg_q[0];
  assign nxt   = reg_q[1];
  assign depth = ($bits(depth))'(nreg_q) + ($bits(depth))'(nmem_q);

  // the cell that re-enters the bottom register after a removal
  function automatic logic [W-1:0] refill();
    return (nmem_q != 0) ? mem_rdata : '0;
  endfunction

  always_comb begin
    reg_d  = reg_q;
    nreg_d = nreg_q;
    nmem_d = nmem_q;
    mem_we = 1'b0;
    spill  = 1'b0;
    fill   = 1'b0;
    bad    = 1'b0;
    unique case (op)
      PS_PUSH, PS_COPY: begin
        if (op == PS_COPY && RW'(idx) >= nreg_q) bad = 1'b1;
        else if (nreg_q == RW'(NREG) && nmem_q == (MW+1)'(MDEPTH)) bad = 1'b1;
        else begin
          for (int i = NREG-1; i > 0; i--) reg_d[i] = reg_q[i-1];
          reg_d[0] = (op == PS_COPY) ? reg_q[idx] : din;
          if (nreg_q == RW'(NREG)) begin
            mem_we = 1'b1; spill = 1'b1; nmem_d = nmem_q + 1'b1;
          end else nreg_d = nreg_q + 1'b1;
        end
      end
      PS_POP, PS_MOVE: begin
        if (nreg_q == 0 || (op == PS_MOVE && (idx == 0 || RW'(idx) >= nreg_q))) bad = 1'b1;
        else begin
          for (int i = 0; i < NREG-1; i++) reg_d[i] = (op == PS_MOVE && i+1 == int'(idx)) ? reg_q[0] : reg_q[i+1];
          reg_d[NREG-1] = refill();
          if (nmem_q != 0) begin fill = 1'b1; nmem_d = nmem_q - 1'b1; end
          else nreg_d = nreg_q - 1'b1;
        end
      end
      PS_ROT: begin
        if (RW'(idx) >= nreg_q) bad = 1'b1;
        else begin
          for (int i = 1; i < NREG; i++) if (i <= int'(idx)) reg_d[i] = reg_q[i-1];
          reg_d[0] = reg_q[idx];
        end
      end
      PS_REPL: begin
        if (nreg_q == 0) bad = 1'b1;
        else reg_d[0] = din;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nreg_q <= '0;
      nmem_q <= '0;
      err    <= 1'b0;
      for (int i = 0; i < NREG; i++) reg_q[i] <= '0;
    end else begin
      nreg_q <= nreg_d;
      nmem_q <= nmem_d;
      err    <= err | bad;
      for (int i = 0; i < NREG; i++) reg_q[i] <= reg_d[i];
    end
  end
endmodule
