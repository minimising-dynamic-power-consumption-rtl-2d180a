// switch_allocator: separable input-first switch allocation.
//
// Stage 1: at each input port a V-input matrix arbiter picks one of the
// virtual channels that request the crossbar. Stage 2: at each output port a
// P-input matrix arbiter picks one of the inputs whose stage-1 winner wants
// that output. Requests may be speculative (a head flit still waiting for an
// output VC); the router decides in the same cycle whether a grant is used.
// commit[o] tells the allocator that the grant at output o carried a flit;
// only then are the two arbiters involved updated, so a misspeculated
// (aborted) grant leaves the arbitration state unchanged.
//
// Interface: req/req_port per input VC, commit per output. in_sel is the
// one-hot stage-1 choice per input (it steers the VC multiplexer), gnt the
// input VCs that won both stages, out_gnt the one-hot input choice per output.
// All outputs are combinational within the cycle.
// Matrix arbiters and speculation follow the published router; the separable
// input-first organisation is this design's choice.
module switch_allocator
  import noc_pkg::*;
#(
  parameter int unsigned P = NUM_PORTS,
  parameter int unsigned V = NUM_VC
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [P-1:0][V-1:0] req,
  input  port_e               req_port [P][V],
  input  logic [P-1:0][V-1:0] req_spec,
  input  logic [P-1:0]        commit,
  output logic [P-1:0][V-1:0] in_sel,
  output logic [P-1:0][V-1:0] gnt,
  output logic [P-1:0][P-1:0] out_gnt
);

  port_e               sel_port [P];
  logic [P-1:0]        in_upd, sel_spec;
  logic [P-1:0][P-1:0] out_req, out_req_ns, out_req_eff;
  logic [P-1:0][V-1:0] req_eff;

  for (genvar p = 0; p < P; p++) begin : g_in
    // non-speculative requests go first
    assign req_eff[p] = (|(req[p] & ~req_spec[p])) ? (req[p] & ~req_spec[p]) : req[p];
    matrix_arbiter #(.N(V)) u_arb (
      .clk, .rst_n, .req(req_eff[p]), .update(in_upd[p]), .gnt(in_sel[p])
    );
    always_comb begin
      sel_port[p] = PORT_LOCAL;
      sel_spec[p] = 1'b0;
      for (int v = 0; v < V; v++)
        if (in_sel[p][v]) begin
          sel_port[p] = req_port[p][v];
          sel_spec[p] = req_spec[p][v];
        end
    end
  end

  for (genvar o = 0; o < P; o++) begin : g_out
    always_comb
      for (int p = 0; p < P; p++) begin
        out_req[o][p]    = (|in_sel[p]) && (sel_port[p] == port_e'(o));
        out_req_ns[o][p] = out_req[o][p] && !sel_spec[p];
      end
    assign out_req_eff[o] = (|out_req_ns[o]) ? out_req_ns[o] : out_req[o];
    matrix_arbiter #(.N(P)) u_arb (
      .clk, .rst_n, .req(out_req_eff[o]), .update(commit[o]), .gnt(out_gnt[o])
    );
  end

  always_comb begin
    for (int p = 0; p < P; p++) begin
      in_upd[p] = 1'b0;
      for (int o = 0; o < P; o++)
        if (out_gnt[o][p] && commit[o]) in_upd[p] = 1'b1;
      gnt[p] = '0;
      for (int o = 0; o < P; o++)
        if (out_gnt[o][p]) gnt[p] = in_sel[p];
    end
  end

  logic [P-1:0] out_gnt_any;
  always_comb for (int o = 0; o < P; o++) out_gnt_any[o] = |out_gnt[o];

  commit_granted: assert property (@(posedge clk) disable iff (!rst_n)
    (commit & ~out_gnt_any) == '0);

endmodule
