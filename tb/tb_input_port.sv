// tb_input_port: random packets on random virtual channels into one input
// port, respecting the stop bits, with random reads. A queue model per VC
// holds the expected entries: the route and next offsets of a head are
// worked out here from the XY rule, body flits inherit their head's route.
// Checks front entries, front_valid, stop (= buffer full), out_req and
// nonempty_next, and that every VC filled up and was stopped at least once.
`timescale 1ns/1ps
module tb_input_port;
  import noc_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  flit_t in_flit;
  vc_mask_t stop, rd_en, front_valid;
  vc_entry_t front [NUM_VC];
  logic [NUM_PORTS-1:0] out_req;
  logic nonempty_next;
  input_port dut (.clk, .rst_n, .in_flit, .stop, .rd_en, .front, .front_valid, .out_req, .nonempty_next);

  int checks = 0, failures = 0, n_stop = 0;
  vc_entry_t q [NUM_VC][$];
  port_e pr [NUM_VC];
  int left [NUM_VC];
  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", s, $time); end
  endtask
  function automatic port_e xy(int x, int y);
    if (x > 0) return PORT_EAST;
    if (x < 0) return PORT_WEST;
    if (y > 0) return PORT_SOUTH;
    if (y < 0) return PORT_NORTH;
    return PORT_LOCAL;
  endfunction

  initial begin
    in_flit = '0; rd_en = '0;
    for (int v = 0; v < NUM_VC; v++) left[v] = 0;
    #1 rst_n = 0;
    #10 rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      logic [NUM_PORTS-1:0] ereq;
      vc_entry_t e;
      int v, tot;
      @(negedge clk);
      ereq = '0; tot = 0;
      for (int w = 0; w < NUM_VC; w++) begin
        check(front_valid[w] == (q[w].size() > 0), "front_valid");
        check(stop[w] == (q[w].size() == VC_DEPTH), "stop");
        if (stop[w]) n_stop++;
        if (q[w].size() > 0) begin
          check(front[w] == q[w][0], $sformatf("front vc %0d", w));
          ereq[q[w][0].route] = 1'b1;
        end
      end
      check(out_req == ereq, "out_req");
      // reads
      for (int w = 0; w < NUM_VC; w++)
        rd_en[w] = (q[w].size() > 0) && (($urandom % 100) < ((k / 800) % 2 ? 20 : 60));
      // write
      in_flit = '0;
      v = $urandom % NUM_VC;
      if (!stop[v] && ($urandom % 100) < 70) begin
        int x, y;
        in_flit.valid = 1'b1;
        in_flit.vc = VC_W'(v);
        in_flit.data = {$urandom, $urandom};
        e = '0;
        e.data = in_flit.data;
        if (left[v] == 0) begin
          x = int'($urandom % 7) - 3; y = int'($urandom % 7) - 3;
          in_flit.head = 1'b1; in_flit.dx = ofs_t'(x); in_flit.dy = ofs_t'(y);
          left[v] = 1 + $urandom % 4;
          pr[v] = xy(x, y);
          e.head = 1'b1; e.route = pr[v];
          e.dx = ofs_t'(x > 0 ? x - 1 : x < 0 ? x + 1 : 0);
          e.dy = ofs_t'(x != 0 ? y : y > 0 ? y - 1 : y < 0 ? y + 1 : 0);
        end else e.route = pr[v];
        left[v]--;
        in_flit.tail = (left[v] == 0);
        e.tail = in_flit.tail;
      end
      #1;
      for (int w = 0; w < NUM_VC; w++)
        tot += q[w].size() + ((in_flit.valid && int'(in_flit.vc) == w) ? 1 : 0) - int'(rd_en[w]);
      check(nonempty_next == (tot != 0), "nonempty_next");
      @(posedge clk);
      for (int w = 0; w < NUM_VC; w++) if (rd_en[w]) void'(q[w].pop_front());
      if (in_flit.valid) q[v].push_back(e);
    end
    check(n_stop > 0, "stop never asserted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
