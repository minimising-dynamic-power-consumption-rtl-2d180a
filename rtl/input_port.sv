// input_port: one router input with its virtual-channel buffers.
//
// An arriving flit is steered by its VC number to one of NUM_VC buffers. A
// head flit's output port is computed here (xy_route) and stored with the
// flit, together with the offsets it will carry onwards; body and tail flits
// take the port recorded for their virtual channel when its head arrived.
// The data input of each buffer is forced to zero unless that buffer is being
// written (signal gating), so a flit written into one virtual channel does
// not toggle the input flip-flops of the other three.
//
// stop[v] is the stop/go flow-control bit sent back upstream: it is high
// while buffer v is full and comes straight from registered state.
// out_req[p] is high when some buffer holds a flit at its front whose output
// port is p: it is the early-valid term from this input, known at the start
// of the cycle, before any allocation. front/front_valid present the front
// flit of each buffer; rd_en[v] removes it at the clock edge.
// Buffers, signal gating and early-valid use follow the published router;
// storing the route with each flit is this design's choice.
module input_port
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = VC_DEPTH
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  flit_t                 in_flit,
  output vc_mask_t              stop,
  input  vc_mask_t              rd_en,
  output vc_entry_t             front [NUM_VC],
  output vc_mask_t              front_valid,
  output logic [NUM_PORTS-1:0]  out_req,
  output logic                  nonempty_next
);

  port_e     route_head;
  ofs_t      dx_n, dy_n;
  port_e     pkt_route_q [NUM_VC];   // port of the packet being received per VC
  vc_entry_t entry;
  vc_mask_t  wr_en, empty, ne_next;

  xy_route u_route (
    .dx(in_flit.dx), .dy(in_flit.dy),
    .route(route_head), .dx_next(dx_n), .dy_next(dy_n)
  );

  always_comb begin
    entry.head  = in_flit.head;
    entry.tail  = in_flit.tail;
    entry.data  = in_flit.data;
    if (in_flit.head) begin
      entry.dx    = dx_n;
      entry.dy    = dy_n;
      entry.route = route_head;
    end else begin
      entry.dx    = '0;
      entry.dy    = '0;
      entry.route = pkt_route_q[in_flit.vc];
    end
  end

  for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
    vc_entry_t gated;
    assign wr_en[v] = in_flit.valid && (in_flit.vc == VC_W'(v));
    assign gated    = wr_en[v] ? entry : '0;   // signal gating of the buffer input

    vc_fifo #(.DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en(wr_en[v]), .wr_data(gated),
      .rd_en(rd_en[v]), .rd_data(front[v]),
      .empty(empty[v]), .full(stop[v]), .nonempty_next(ne_next[v])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) pkt_route_q[v] <= PORT_LOCAL;
      else if (wr_en[v] && in_flit.head) pkt_route_q[v] <= route_head;
    end
  end

  assign front_valid   = ~empty;
  assign nonempty_next = |ne_next;

  always_comb begin
    out_req = '0;
    for (int v = 0; v < NUM_VC; v++)
      if (!empty[v]) out_req[front[v].route] = 1'b1;
  end

endmodule
