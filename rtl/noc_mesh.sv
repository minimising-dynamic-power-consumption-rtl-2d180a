// noc_mesh: MESH_X x MESH_Y tiled network of single-cycle routers.
//
// One router per tile, joined to its four neighbours by a pair of opposite
// unidirectional links. Each link direction carries a flit (64 data wires
// and 11 control wires), the sender's early-valid bit, and the receiver's
// four stop bits back, 80 wires in all. Port 0 of every router is the local
// port of its tile and is brought out of the module; the tile is not part of
// this design. Tile index is y*MESH_X + x, with (0,0) at the north-west
// corner. Link inputs on the mesh edge are tied off (no flit, no early-valid,
// never stopped); XY routing with correct offsets never sends a flit off the
// edge, and an assertion checks that.
//
// A tile injects by driving tile_in_flit (obeying tile_stop, one cycle of
// early_valid together with each flit it sends) and receives on
// tile_out_flit; it may stop a VC of its ejection port with tile_stop_in.
// All routers run from the one clock clk, each gated at its root.
// The 4x4 size, the link composition and the per-router gating follow the
// published test case; the tie-offs and tile indexing are this design's
// choices.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X = 4,
  parameter int unsigned MESH_Y = 4,
  parameter int unsigned DEPTH  = VC_DEPTH
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  flit_t                        tile_in_flit        [MESH_X*MESH_Y],
  input  logic [MESH_X*MESH_Y-1:0]     tile_early_valid,
  output vc_mask_t                     tile_stop           [MESH_X*MESH_Y],
  output flit_t                        tile_out_flit       [MESH_X*MESH_Y],
  input  vc_mask_t                     tile_stop_in        [MESH_X*MESH_Y],
  output logic [MESH_X*MESH_Y-1:0]     router_clk_en,
  output logic [MESH_X*MESH_Y-1:0]     router_busy,
  output logic [MESH_X*MESH_Y-1:0]     router_spec_abort
);

  localparam int unsigned N = MESH_X * MESH_Y;
  localparam int unsigned P = NUM_PORTS;

  // per-router port bundles, indexed [router][port]
  flit_t                   r_in   [N][P];
  flit_t                   r_out  [N][P];
  logic [P-1:0]            r_evin [N];
  logic [P-1:0]            r_evout[N];
  logic [P-1:0][NUM_VC-1:0] r_stop_out [N];
  logic [P-1:0][NUM_VC-1:0] r_stop_in  [N];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned I = y * MESH_X + x;

      flit_t ri [P];
      flit_t ro [P];

      // local port
      assign r_in[I][PORT_LOCAL]      = tile_in_flit[I];
      assign r_evin[I][PORT_LOCAL]    = tile_early_valid[I];
      assign r_stop_in[I][PORT_LOCAL] = tile_stop_in[I];
      assign tile_out_flit[I]         = r_out[I][PORT_LOCAL];
      assign tile_stop[I]             = r_stop_out[I][PORT_LOCAL];

      // north neighbour (y-1): its south output feeds our north input
      if (y > 0) begin : g_n
        assign r_in[I][PORT_NORTH]      = r_out[I-MESH_X][PORT_SOUTH];
        assign r_evin[I][PORT_NORTH]    = r_evout[I-MESH_X][PORT_SOUTH];
        assign r_stop_in[I][PORT_NORTH] = r_stop_out[I-MESH_X][PORT_SOUTH];
      end else begin : g_n_edge
        assign r_in[I][PORT_NORTH]      = '0;
        assign r_evin[I][PORT_NORTH]    = 1'b0;
        assign r_stop_in[I][PORT_NORTH] = '0;
      end
      if (y < MESH_Y - 1) begin : g_s
        assign r_in[I][PORT_SOUTH]      = r_out[I+MESH_X][PORT_NORTH];
        assign r_evin[I][PORT_SOUTH]    = r_evout[I+MESH_X][PORT_NORTH];
        assign r_stop_in[I][PORT_SOUTH] = r_stop_out[I+MESH_X][PORT_NORTH];
      end else begin : g_s_edge
        assign r_in[I][PORT_SOUTH]      = '0;
        assign r_evin[I][PORT_SOUTH]    = 1'b0;
        assign r_stop_in[I][PORT_SOUTH] = '0;
      end
      if (x > 0) begin : g_w
        assign r_in[I][PORT_WEST]       = r_out[I-1][PORT_EAST];
        assign r_evin[I][PORT_WEST]     = r_evout[I-1][PORT_EAST];
        assign r_stop_in[I][PORT_WEST]  = r_stop_out[I-1][PORT_EAST];
      end else begin : g_w_edge
        assign r_in[I][PORT_WEST]       = '0;
        assign r_evin[I][PORT_WEST]     = 1'b0;
        assign r_stop_in[I][PORT_WEST]  = '0;
      end
      if (x < MESH_X - 1) begin : g_e
        assign r_in[I][PORT_EAST]       = r_out[I+1][PORT_WEST];
        assign r_evin[I][PORT_EAST]     = r_evout[I+1][PORT_WEST];
        assign r_stop_in[I][PORT_EAST]  = r_stop_out[I+1][PORT_WEST];
      end else begin : g_e_edge
        assign r_in[I][PORT_EAST]       = '0;
        assign r_evin[I][PORT_EAST]     = 1'b0;
        assign r_stop_in[I][PORT_EAST]  = '0;
      end

      for (genvar p = 0; p < P; p++) begin : g_p
        assign ri[p]       = r_in[I][p];
        assign r_out[I][p] = ro[p];
      end

      router #(.DEPTH(DEPTH)) u_router (
        .clk, .rst_n,
        .in_flit(ri), .early_valid_in(r_evin[I]), .stop_out(r_stop_out[I]),
        .out_flit(ro), .early_valid_out(r_evout[I]), .stop_in(r_stop_in[I]),
        .clk_en(router_clk_en[I]), .busy(router_busy[I]),
        .spec_abort(router_spec_abort[I])
      );

      if (y == 0) begin : g_chk_n
        no_exit_n: assert property (@(posedge clk) disable iff (!rst_n) !r_out[I][PORT_NORTH].valid);
      end
      if (y == MESH_Y - 1) begin : g_chk_s
        no_exit_s: assert property (@(posedge clk) disable iff (!rst_n) !r_out[I][PORT_SOUTH].valid);
      end
      if (x == 0) begin : g_chk_w
        no_exit_w: assert property (@(posedge clk) disable iff (!rst_n) !r_out[I][PORT_WEST].valid);
      end
      if (x == MESH_X - 1) begin : g_chk_e
        no_exit_e: assert property (@(posedge clk) disable iff (!rst_n) !r_out[I][PORT_EAST].valid);
      end
    end
  end

endmodule
