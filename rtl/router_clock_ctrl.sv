// router_clock_ctrl: router-level clock enable and the router busy bit.
//
// The router's whole clock tree is switched off in a cycle when nothing can
// happen in it. The enable is the OR of the early-valid signals arriving from
// the routers (and the tile) that feed this router's inputs, and of the
// router busy bit. The busy bit is a flip-flop, clocked by the gated clock,
// that the router sets when after this edge it will still hold a buffered
// flit or an output virtual channel that is allocated but stopped by the
// downstream router. Early-valid signals come from registered state in the
// neighbours, so the enable is ready early in the cycle and meets the
// Tclk - Tinsertion budget of a gating cell at the root of the tree.
//
// Interface: clk (free-running), early_valid_in[P], busy_next (from the
// router); gclk (router clock), clk_en (the enable used for this cycle's
// closing edge), busy_q.
// Reset: asynchronous; busy resets to 0, so an idle network starts gated.
// The enable equation follows the published scheme (Fig. 2 of the source);
// the reset value is this design's choice.
module router_clock_ctrl
  import noc_pkg::*;
#(
  parameter int unsigned P = NUM_PORTS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [P-1:0] early_valid_in,
  input  logic         busy_next,
  output logic         gclk,
  output logic         clk_en,
  output logic         busy_q
);

  assign clk_en = (|early_valid_in) | busy_q;

  clock_gate u_icg (.clk, .en(clk_en), .gclk);

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) busy_q <= 1'b0;
    else        busy_q <= busy_next;
  end

endmodule
