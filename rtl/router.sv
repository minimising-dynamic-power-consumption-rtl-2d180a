// router: single-cycle five-port virtual-channel router with clock gating.
//
// Every input port has NUM_VC flit buffers. In one cycle a flit at the front
// of a buffer is allocated a crossbar slot, passes the crossbar and crosses
// the link into the next router's buffer, so with no contention a flit
// advances one router per cycle. A head flit that has not yet been given an
// output virtual channel requests one (vc_allocator) and, speculatively and
// in parallel, a crossbar slot (switch_allocator). If it wins the slot but
// not a VC the slot is aborted and stays idle; the VC, if granted without the
// slot, is kept and the flit goes non-speculatively later. A flit whose
// output VC is stopped by the downstream router does not request the switch.
// The tail flit releases the output VC.
//
// Flow control is stop/go: stop_out[p][v] is high while buffer v of input p
// is full; stop_in[o][w] is the same signal from the router behind output o.
// Routing is dimension-ordered XY with relative offsets carried in the head.
//
// Clock gating: all state registers have load enables (buffers, arbiters,
// VC state). In addition the whole router runs on a clock gated at its root
// by router_clock_ctrl. early_valid_out[o] is high when some buffer front
// wants output o; it is computed from registered state before any
// allocation, so it may claim an output that then stays unused. It is sent
// to the router at the other end of the link and wakes that router's clock.
//
// Timing: inputs in_flit and stop_in are sampled at the rising edge of the
// gated clock; out_flit depends combinationally on registered state and
// stop_in. Status outputs: clk_en, busy, spec_abort (a switch grant was lost to
// misspeculation this cycle).
// The router's organisation follows the published design at the level it is
// described (single cycle, speculation, VC flow control, matrix arbiters,
// stop/go, XY, early-valid and busy-bit gating); the allocator structure and
// the details of speculation are this design's own.
module router
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = VC_DEPTH
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  flit_t                       in_flit         [NUM_PORTS],
  input  logic [NUM_PORTS-1:0]        early_valid_in,
  output logic [NUM_PORTS-1:0][NUM_VC-1:0] stop_out,
  output flit_t                       out_flit        [NUM_PORTS],
  output logic [NUM_PORTS-1:0]        early_valid_out,
  input  logic [NUM_PORTS-1:0][NUM_VC-1:0] stop_in,
  output logic                        clk_en,
  output logic                        busy,
  output logic                        spec_abort
);

  localparam int unsigned P = NUM_PORTS;
  localparam int unsigned V = NUM_VC;

  logic gclk;
  logic busy_next;

  // ---------------- input ports ----------------
  vc_entry_t            front [P][V];
  logic [P-1:0][V-1:0]  front_valid, rd_en;
  logic [P-1:0][P-1:0]  out_req;
  logic [P-1:0]         ne_next;

  for (genvar p = 0; p < P; p++) begin : g_in
    vc_entry_t fr [V];
    input_port #(.DEPTH(DEPTH)) u_in (
      .clk(gclk), .rst_n,
      .in_flit(in_flit[p]), .stop(stop_out[p]),
      .rd_en(rd_en[p]), .front(fr), .front_valid(front_valid[p]),
      .out_req(out_req[p]), .nonempty_next(ne_next[p])
    );
    for (genvar v = 0; v < V; v++) begin : g_v
      assign front[p][v] = fr[v];
    end
  end

  // ---------------- input VC state ----------------
  logic [P-1:0][V-1:0]  has_vc_q;
  logic [VC_W-1:0]      out_vc_q [P][V];

  // ---------------- allocation ----------------
  logic [P*V-1:0]       va_req, va_gnt;
  port_e                va_port [P*V];
  logic [VC_W-1:0]      va_vc [P*V];
  logic [P-1:0][V-1:0]  alloc_next, release_vc;

  logic [P-1:0][V-1:0]  sa_req, sa_sel, sa_gnt, send;
  port_e                sa_port [P][V];
  logic [P-1:0][P-1:0]  out_gnt;
  logic [P-1:0]         commit;
  logic [VC_W-1:0]      use_vc [P][V];

  always_comb begin
    for (int p = 0; p < P; p++)
      for (int v = 0; v < V; v++) begin
        va_req[p*V+v]  = front_valid[p][v] && front[p][v].head && !has_vc_q[p][v];
        va_port[p*V+v] = front[p][v].route;
        sa_port[p][v]  = front[p][v].route;
        if (has_vc_q[p][v])
          sa_req[p][v] = front_valid[p][v] && !stop_in[front[p][v].route][out_vc_q[p][v]];
        else
          sa_req[p][v] = front_valid[p][v] && front[p][v].head;   // speculative
      end
  end

  vc_allocator #(.P(P), .V(V)) u_va (
    .clk(gclk), .rst_n,
    .req(va_req), .req_port(va_port), .stop_in, .release_vc,
    .gnt(va_gnt), .gnt_vc(va_vc), .alloc_next
  );

  switch_allocator #(.P(P), .V(V)) u_sa (
    .clk(gclk), .rst_n,
    .req(sa_req), .req_port(sa_port), .req_spec(~has_vc_q), .commit,
    .in_sel(sa_sel), .gnt(sa_gnt), .out_gnt
  );

  logic [P-1:0][V-1:0] aborted;

  always_comb begin
    release_vc = '0;
    for (int p = 0; p < P; p++)
      for (int v = 0; v < V; v++) begin
        use_vc[p][v]  = has_vc_q[p][v] ? out_vc_q[p][v] : va_vc[p*V+v];
        send[p][v]    = sa_gnt[p][v] && (has_vc_q[p][v] || va_gnt[p*V+v]);
        aborted[p][v] = sa_gnt[p][v] && !has_vc_q[p][v] && !va_gnt[p*V+v];
        if (send[p][v] && front[p][v].tail)
          release_vc[front[p][v].route][use_vc[p][v]] = 1'b1;
      end
    for (int o = 0; o < P; o++) begin
      commit[o] = 1'b0;
      for (int p = 0; p < P; p++)
        if (out_gnt[o][p] && |send[p]) commit[o] = 1'b1;
    end
  end

  assign rd_en = send;
  assign spec_abort = |aborted;

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) begin
      has_vc_q <= '0;
      for (int p = 0; p < P; p++)
        for (int v = 0; v < V; v++) out_vc_q[p][v] <= '0;
    end else begin
      for (int p = 0; p < P; p++)
        for (int v = 0; v < V; v++) begin
          if (send[p][v] && front[p][v].tail)
            has_vc_q[p][v] <= 1'b0;
          else if (va_gnt[p*V+v]) begin
            has_vc_q[p][v] <= 1'b1;
            out_vc_q[p][v] <= va_vc[p*V+v];
          end
        end
    end
  end

  // ---------------- VC multiplexers and crossbar ----------------
  flit_t xin [P];
  always_comb begin
    for (int p = 0; p < P; p++) begin
      xin[p] = '0;
      for (int v = 0; v < V; v++)
        if (sa_sel[p][v]) begin
          xin[p].vc   = use_vc[p][v];
          xin[p].head = front[p][v].head;
          xin[p].tail = front[p][v].tail;
          xin[p].dx   = front[p][v].dx;
          xin[p].dy   = front[p][v].dy;
          xin[p].data = front[p][v].data;
        end
    end
  end

  crossbar #(.P(P)) u_xbar (
    .in_flit(xin), .sel(out_gnt), .valid(commit), .out_flit
  );

  // ---------------- early valid, busy bit, router clock ----------------
  always_comb begin
    early_valid_out = '0;
    for (int p = 0; p < P; p++) early_valid_out |= out_req[p];
  end

  assign busy_next = (|ne_next) || (|(alloc_next & stop_in));

  router_clock_ctrl #(.P(P)) u_clk (
    .clk, .rst_n, .early_valid_in, .busy_next,
    .gclk, .clk_en, .busy_q(busy)
  );

  // a flit is sent only on an output VC this router holds, and never into a
  // full buffer
  for (genvar o = 0; o < P; o++) begin : g_chk
    sent_unstopped: assert property (@(posedge gclk) disable iff (!rst_n)
      out_flit[o].valid |-> !stop_in[o][out_flit[o].vc]);
  end

endmodule
