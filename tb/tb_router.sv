// tb_router: one router between five upstream sources and five downstream
// sinks modelled by the testbench.
// Sources send 1- to 4-flit packets whose offsets aim at a random output,
// on a VC chosen among those not stopped, obeying stop_out flit by flit and
// raising early_valid with each flit. Sinks apply random stop bits. Each
// flit's data names its packet, input, output and position, so the sinks
// check: right output port, head offsets moved one hop, order within the
// packet on its VC, no flit on a stopped VC, and every packet delivered once.
// Directed checks: idle router gets no clock; zero-load a head leaves one
// cycle after it was written; a stopped output makes the input buffer fill,
// stop_out rise, early_valid_out and busy stay high, then drain; after the
// traffic the router is gated again.
// Drives at the falling edge, samples 1 ns later (see tb_noc_mesh).
`timescale 1ns/1ps
module tb_router;
  import noc_pkg::*;
  localparam int P = NUM_PORTS, V = NUM_VC, MAXP = 4096;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  flit_t in_flit [P], out_flit [P];
  logic [P-1:0] ev_in, ev_out;
  logic [P-1:0][V-1:0] stop_out, stop_in;
  logic clk_en, busy, spec_abort;
  router dut (.clk, .rst_n, .in_flit, .early_valid_in(ev_in), .stop_out,
              .out_flit, .early_valid_out(ev_out), .stop_in, .clk_en, .busy, .spec_abort);

  int checks = 0, failures = 0, pulses = 0;
  always @(posedge dut.gclk) pulses++;
  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s t=%0t", s, $time); end
  endtask

  int pk_out [MAXP], pk_len [MAXP], pk_rx [MAXP], pk_t0 [MAXP], pk_th [MAXP];
  int pk_dx [MAXP], pk_dy [MAXP];
  int n_pk = 0, cycle = 0, stop_pct = 0, n_abort = 0, n_stopped = 0;
  int src_q [P][$];
  int cur [P], idx [P], svc [P], rr [P];
  int snk_pkt [P][V], snk_idx [P][V];

  function automatic void aim(input int o, output int x, output int y);
    x = 0; y = 0;
    case (o)
      PORT_EAST:  x = 1 + $urandom % 3;
      PORT_WEST:  x = -(1 + int'($urandom % 3));
      PORT_SOUTH: begin x = 0; y = 1 + $urandom % 3; end
      PORT_NORTH: begin x = 0; y = -(1 + int'($urandom % 3)); end
      default: ;
    endcase
  endfunction

  task automatic step();
    @(negedge clk);
    cycle++;
    for (int o = 0; o < P; o++)
      for (int v = 0; v < V; v++)
        stop_in[o][v] = (stop_pct >= 100) ? (o == PORT_EAST) : (($urandom % 100) < stop_pct);
    for (int p = 0; p < P; p++) begin
      flit_t f;
      f = '0;
      if (cur[p] < 0 && src_q[p].size() > 0)
        for (int k = 0; k < V; k++) begin
          int v;
          v = (rr[p] + k) % V;
          if (cur[p] < 0 && !stop_out[p][v]) begin
            cur[p] = src_q[p].pop_front(); idx[p] = 0; svc[p] = v; rr[p] = (v + 1) % V;
          end
        end
      if (cur[p] >= 0 && !stop_out[p][svc[p]]) begin
        int id;
        id = cur[p];
        f.valid = 1; f.vc = VC_W'(svc[p]);
        f.head = (idx[p] == 0); f.tail = (idx[p] == pk_len[id] - 1);
        if (f.head) begin f.dx = ofs_t'(pk_dx[id]); f.dy = ofs_t'(pk_dy[id]); pk_t0[id] = cycle; end
        f.data = {16'(id), 8'(p), 8'(pk_out[id]), 8'(idx[p]), 24'($urandom)};
        idx[p]++;
        if (idx[p] == pk_len[id]) cur[p] = -1;
      end
      in_flit[p] = f;
      ev_in[p] = f.valid;
    end
    #1;
    if (spec_abort) n_abort++;
    for (int o = 0; o < P; o++)
      if (out_flit[o].valid) begin
        flit_t f; int id, ix, v, ex, ey;
        f = out_flit[o];
        id = int'(f.data[63:48]); ix = int'(f.data[31:24]); v = int'(f.vc);
        check(!stop_in[o][v], "flit sent on stopped VC");
        check(id < n_pk && pk_out[id] == o, $sformatf("flit of packet %0d on wrong output %0d", id, o));
        if (f.head) begin
          ex = pk_dx[id]; ey = pk_dy[id];
          if (ex > 0) ex--; else if (ex < 0) ex++; else if (ey > 0) ey--; else if (ey < 0) ey++;
          check(int'(f.dx) == ex && int'(f.dy) == ey, "head offsets not updated");
          check(snk_pkt[o][v] < 0, "head while VC busy");
          snk_pkt[o][v] = id; snk_idx[o][v] = 0; pk_th[id] = cycle;
        end
        check(snk_pkt[o][v] == id && snk_idx[o][v] == ix, "flit order");
        check(f.tail == (ix == pk_len[id] - 1), "tail flag");
        snk_idx[o][v]++;
        pk_rx[id]++;
        if (f.tail) snk_pkt[o][v] = -1;
      end
  endtask

  task automatic add(input int p, input int o, input int len);
    int x, y;
    aim(o, x, y);
    pk_out[n_pk] = o; pk_len[n_pk] = len; pk_rx[n_pk] = 0; pk_dx[n_pk] = x; pk_dy[n_pk] = y;
    src_q[p].push_back(n_pk);
    n_pk++;
  endtask

  function automatic bit idle();
    for (int p = 0; p < P; p++) if (cur[p] >= 0 || src_q[p].size() > 0) return 0;
    for (int i = 0; i < n_pk; i++) if (pk_rx[i] != pk_len[i]) return 0;
    return 1;
  endfunction

  initial begin
    for (int p = 0; p < P; p++) begin
      cur[p] = -1; rr[p] = 0; in_flit[p] = '0;
      for (int v = 0; v < V; v++) snk_pkt[p][v] = -1;
    end
    ev_in = '0; stop_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // idle
    pulses = 0;
    repeat (10) begin step(); check(!clk_en, "idle router enabled"); end
    check(pulses == 0, "idle router received clock pulses");
    // zero-load latency: written at the edge after injection, leaves next cycle
    add(PORT_WEST, PORT_EAST, 4);
    repeat (8) step();
    check(pk_rx[0] == 4 && pk_th[0] - pk_t0[0] == 1, $sformatf("zero-load latency %0d", pk_th[0] - pk_t0[0]));
    // blocked output: east stopped on every VC
    stop_pct = 100;
    for (int i = 0; i < 3; i++) add(PORT_WEST, PORT_EAST, 4);
    repeat (12) step();
    check(stop_out[PORT_WEST] != '0, "stop_out not raised by a full buffer");
    check(ev_out[PORT_EAST] && busy && clk_en, "blocked router not kept awake");
    n_stopped = (stop_out[PORT_WEST] != '0);
    stop_pct = 0;
    repeat (30) step();
    check(idle(), "blocked packets not delivered");
    repeat (2) step();
    check(!clk_en && !busy, "router not gated after drain");
    // random traffic with back-pressure
    for (int k = 0; k < 3000; k++) begin
      stop_pct = (k < 1500) ? 0 : 25;
      for (int p = 0; p < P; p++)
        if (src_q[p].size() < 3 && ($urandom % 4) == 0) add(p, $urandom % P, 1 + $urandom % 4);
      step();
    end
    stop_pct = 0;
    for (int k = 0; k < 500 && !idle(); k++) step();
    check(idle(), "random traffic not fully delivered");
    repeat (3) step();
    check(!clk_en && !busy, "router not gated at the end");
    check(n_abort > 0, "no speculative abort happened");
    $display("packets=%0d aborts=%0d", n_pk, n_abort);
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
