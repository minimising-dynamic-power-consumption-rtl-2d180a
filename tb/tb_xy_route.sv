// tb_xy_route: exhaustive check of XY route computation over all offset
// pairs: x first, then y, local when both are zero, and the offset moved one
// step towards zero in the dimension travelled.
`timescale 1ns/1ps
module tb_xy_route;
  import noc_pkg::*;
  ofs_t dx, dy, dxn, dyn;
  port_e route;
  xy_route dut (.dx, .dy, .route, .dx_next(dxn), .dy_next(dyn));
  int checks = 0, failures = 0;
  initial begin
    for (int x = -4; x < 4; x++)
      for (int y = -4; y < 4; y++) begin
        port_e er; int ex, ey;
        dx = ofs_t'(x); dy = ofs_t'(y);
        #1;
        ex = x; ey = y;
        if (x > 0) begin er = PORT_EAST; ex = x - 1; end
        else if (x < 0) begin er = PORT_WEST; ex = x + 1; end
        else if (y > 0) begin er = PORT_SOUTH; ey = y - 1; end
        else if (y < 0) begin er = PORT_NORTH; ey = y + 1; end
        else er = PORT_LOCAL;
        checks++;
        if (route != er || int'(dxn) != ex || int'(dyn) != ey) begin
          failures++;
          $display("FAIL dx=%0d dy=%0d route=%0d dxn=%0d dyn=%0d", x, y, route, dxn, dyn);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
