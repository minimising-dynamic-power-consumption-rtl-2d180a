// vc_allocator: output virtual-channel allocation and output VC state.
//
// Each output port keeps one "allocated" bit per downstream virtual channel.
// A head flit that has no output VC yet requests one at the output port its
// route names. For each output port a matrix arbiter over all P*V input VCs
// picks one requester per cycle, and the winner is given the lowest-numbered
// output VC that is neither allocated nor stopped by the downstream router.
// The VC stays allocated until the router reports that the packet's tail has
// left on it (release). The arbiters update only when a VC was granted.
//
// Interface: req/req_port per input VC (flattened index p*V+v), stop_in per
// output port and VC, release per output port and VC. gnt/gnt_vc are
// combinational in the same cycle; alloc_next is the allocated state after
// this edge, used for the router busy bit.
// VC flow control and matrix arbitration follow the published router; one
// allocation per output per cycle and lowest-free-VC selection are this
// design's choices.
module vc_allocator
  import noc_pkg::*;
#(
  parameter int unsigned P = NUM_PORTS,
  parameter int unsigned V = NUM_VC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [P*V-1:0]          req,
  input  port_e                   req_port [P*V],
  input  logic [P-1:0][V-1:0]     stop_in,
  input  logic [P-1:0][V-1:0]     release_vc,
  output logic [P*V-1:0]          gnt,
  output logic [VC_W-1:0]         gnt_vc [P*V],
  output logic [P-1:0][V-1:0]     alloc_next
);

  logic [P-1:0][V-1:0]     alloc_q, set_vc;
  logic [P-1:0][P*V-1:0]   arb_req, arb_gnt;
  logic [P-1:0]            any_free;
  logic [P-1:0][VC_W-1:0]  free_vc;

  for (genvar o = 0; o < P; o++) begin : g_out
    always_comb begin
      any_free[o] = 1'b0;
      free_vc[o]  = '0;
      for (int w = V - 1; w >= 0; w--)
        if (!alloc_q[o][w] && !stop_in[o][w]) begin
          any_free[o] = 1'b1;
          free_vc[o]  = VC_W'(w);
        end
      for (int i = 0; i < P * V; i++)
        arb_req[o][i] = req[i] && (req_port[i] == port_e'(o)) && any_free[o];
    end

    matrix_arbiter #(.N(P * V)) u_arb (
      .clk, .rst_n, .req(arb_req[o]), .update(|arb_gnt[o]), .gnt(arb_gnt[o])
    );

    always_comb begin
      set_vc[o] = '0;
      if (|arb_gnt[o]) set_vc[o][free_vc[o]] = 1'b1;
    end
  end

  always_comb begin
    gnt = '0;
    for (int i = 0; i < P * V; i++) begin
      gnt_vc[i] = '0;
      for (int o = 0; o < P; o++)
        if (arb_gnt[o][i]) begin
          gnt[i]    = 1'b1;
          gnt_vc[i] = free_vc[o];
        end
    end
  end

  assign alloc_next = (alloc_q | set_vc) & ~release_vc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) alloc_q <= '0;
    else if (|set_vc || |release_vc) alloc_q <= alloc_next;
  end

  release_held: assert property (@(posedge clk) disable iff (!rst_n)
    (release_vc & ~(alloc_q | set_vc)) == '0);

endmodule
