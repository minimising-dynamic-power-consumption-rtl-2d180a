// noc_pkg: types and constants shared by the mesh network-on-chip.
//
// The network moves 64-bit flits between routers over links made of 80 wires:
// 64 data wires and 16 control wires. This package fixes how the 16 control
// wires are used. Eleven travel with the flit (valid, virtual-channel number,
// head, tail, and two 3-bit signed hop offsets used for relative XY routing),
// one carries the early-valid hint for router-level clock gating and four
// carry the per-virtual-channel stop bits of the stop/go flow control back to
// the sender. The 64/16 split, the four virtual channels with four buffers
// each and the five router ports follow the published design; the meaning
// given to each control wire is this design's own choice.
package noc_pkg;

  localparam int unsigned FLIT_W    = 64;  // datapath width
  localparam int unsigned NUM_VC    = 4;   // virtual channels per input
  localparam int unsigned VC_DEPTH  = 4;   // flit buffers per virtual channel
  localparam int unsigned NUM_PORTS = 5;   // local + four mesh directions
  localparam int unsigned VC_W      = $clog2(NUM_VC);
  localparam int unsigned OFS_W     = 3;   // signed hop offset, covers -3..+3
  localparam int unsigned PORT_W    = 3;

  // Router port numbering. North is towards row 0, east towards higher x.
  typedef enum logic [PORT_W-1:0] {
    PORT_LOCAL = 3'd0,
    PORT_NORTH = 3'd1,
    PORT_EAST  = 3'd2,
    PORT_SOUTH = 3'd3,
    PORT_WEST  = 3'd4
  } port_e;

  typedef logic signed [OFS_W-1:0] ofs_t;

  // A flit as it travels on a link (75 of the 80 link wires).
  typedef struct packed {
    logic              valid;
    logic [VC_W-1:0]   vc;
    logic              head;
    logic              tail;
    ofs_t              dx;    // remaining hops in x (head flits only)
    ofs_t              dy;    // remaining hops in y (head flits only)
    logic [FLIT_W-1:0] data;
  } flit_t;

  // A flit as it is held in an input virtual-channel buffer. The output port
  // it needs in this router is computed on arrival and stored with it, and
  // the offsets are already those it must carry to the next router.
  typedef struct packed {
    logic              head;
    logic              tail;
    ofs_t              dx;
    ofs_t              dy;
    port_e             route;
    logic [FLIT_W-1:0] data;
  } vc_entry_t;

  typedef logic [NUM_VC-1:0] vc_mask_t;

endpackage
