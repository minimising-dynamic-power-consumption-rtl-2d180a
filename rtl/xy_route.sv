// xy_route: dimension-ordered (XY) route computation with relative addressing.
//
// A head flit carries the signed number of hops still to go in x (dx, east
// positive) and y (dy, south positive). The flit first travels in x until dx
// is zero, then in y, then leaves on the local port. The module returns the
// output port for this router and the offsets the flit must carry onwards,
// one hop closer to zero in the dimension it moves in. Purely combinational.
// XY order and relative addressing follow the published router; the sign
// convention and offset width are this design's choice.
module xy_route
  import noc_pkg::*;
(
  input  ofs_t  dx,
  input  ofs_t  dy,
  output port_e route,
  output ofs_t  dx_next,
  output ofs_t  dy_next
);

  always_comb begin
    dx_next = dx;
    dy_next = dy;
    if (dx > 0) begin
      route   = PORT_EAST;
      dx_next = dx - ofs_t'(1);
    end else if (dx < 0) begin
      route   = PORT_WEST;
      dx_next = dx + ofs_t'(1);
    end else if (dy > 0) begin
      route   = PORT_SOUTH;
      dy_next = dy - ofs_t'(1);
    end else if (dy < 0) begin
      route   = PORT_NORTH;
      dy_next = dy + ofs_t'(1);
    end else begin
      route   = PORT_LOCAL;
    end
  end

endmodule
