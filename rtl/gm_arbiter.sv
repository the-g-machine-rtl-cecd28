// Fixed-priority bus arbiter. Requester 0 (the G-processor) always wins
// over requester 1 (the host), as the description requires for the G-bus.
// A grant is held for as long as the transfer lasts: once a requester is
// granted, the grant stays with it until done is asserted, so a multi-cycle
// G-memory request is not taken away half-way. For single-cycle transfers
// done is tied high. N requesters, requester 0 highest. The priority order
// follows the description; the hold-until-done rule is this design's own.
module gm_arbiter #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         done,
  output logic [N-1:0] gnt
);
  logic [N-1:0] owner;   // one-hot, zero when the bus is free
  logic [N-1:0] pick;

  always_comb begin
    pick = '0;
    for (int i = N-1; i >= 0; i--) if (req[i]) pick = N'(1) << i;
    gnt = (owner != '0) ? owner : pick;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) owner <= '0;
    else if (done) owner <= '0;
    else owner <= gnt;
  end

`ifndef SYNTHESIS
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_owner_holds: assert property (@(posedge clk) disable iff (!rst_n)
    (owner != '0) |-> (owner & req) != '0);
`endif
endmodule
