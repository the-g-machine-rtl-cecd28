// V-stack: the register stack of basic (non-pointer) values attached to the
// ALU. The ALU reads the two top cells and the stack takes the result back.
//
// Operations, one per cycle (vop): push din; pop; replace the top by din
// (unary ALU operation); pop two cells and push din (binary ALU
// operation). a is the top cell, b the cell below it. err is sticky and
// flags underflow or overflow. The description names the V-stack as the
// ALU's register stack without giving its depth; DEPTH and the behaviour on
// overflow are this design's choice (no overflow memory, unlike the
// P-stack).
module gm_vstack #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [1:0]   vop,     // 0 none, 1 push, 2 pop, 3 see below
  input  logic         binop,   // with vop==3: 0 replace top, 1 pop two and push
  input  logic [W-1:0] din,
  output logic [W-1:0] a,
  output logic [W-1:0] b,
  output logic [$clog2(DEPTH+1)-1:0] depth,
  output logic         err
);
  localparam int unsigned CW = $clog2(DEPTH+1);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [W-1:0]  st [DEPTH];
  logic [CW-1:0] n;

  assign depth = n;
  assign a = (n >= 1) ? st[AW'(n - 1'b1)] : '0;
  assign b = (n >= 2) ? st[AW'(n - 2'd2)] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n   <= '0;
      err <= 1'b0;
      for (int i = 0; i < DEPTH; i++) st[i] <= '0;
    end else begin
      unique case (vop)
        2'd1: if (n == CW'(DEPTH)) err <= 1'b1;
              else begin st[AW'(n)] <= din; n <= n + 1'b1; end
        2'd2: if (n == 0) err <= 1'b1;
              else n <= n - 1'b1;
        2'd3: if (!binop) begin
                if (n == 0) err <= 1'b1; else st[AW'(n - 1'b1)] <= din;
              end else begin
                if (n < 2) err <= 1'b1;
                else begin st[AW'(n - 2'd2)] <= din; n <= n - 1'b1; end
              end
        default: ;
      endcase
    end
  end
endmodule
