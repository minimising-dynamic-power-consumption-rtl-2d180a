// tb_noc_mesh: end-to-end test of the 4x4 mesh at its default parameters.
//
// Every tile is modelled by a packet source and a sink. Sources send 4-flit
// packets, one packet at a time, on a virtual channel chosen round-robin
// among those not stopped, and respect the stop bits flit by flit; they raise
// early_valid with every flit they drive. Each flit's data field names the
// packet, its source, its destination and its position, so the sink can
// check delivery, destination, order within the packet and that no packet is
// lost or duplicated, independently of the router logic.
// Phases: idle (every router must stay gated), zero-load latency of one
// packet across six hops (head H+1 cycles, tail 3 cycles later; routers off
// the path must never be clocked), four continuous streams through router
// (2,2) as in the stream experiment, uniform random traffic at several
// injection rates with and without sink back-pressure, and a drain after
// which every router must be gated again. It counts how often each
// mechanism happened: router-level gating, early-valid wake-up, speculative
// aborts, stop/go back-pressure at injection and at ejection, and fails if
// any of them never happened.
// The testbench acts on the falling clock edge: it sets sink stop bits and
// source flits, then samples the ejected flits 1 ns later, which are the
// flits the routers commit at the next rising edge.
`timescale 1ns/1ps
module tb_noc_mesh;
  import noc_pkg::*;

  localparam int NT = 16;
  localparam int PKT_LEN = 4;
  localparam int MAXP = 8192;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  flit_t     tile_in   [NT];
  logic [NT-1:0] tile_ev;
  vc_mask_t  tile_stop [NT];
  flit_t     tile_out  [NT];
  vc_mask_t  sink_stop [NT];
  logic [NT-1:0] clk_en, busy, sab;

  noc_mesh dut (
    .clk, .rst_n,
    .tile_in_flit(tile_in), .tile_early_valid(tile_ev), .tile_stop(tile_stop),
    .tile_out_flit(tile_out), .tile_stop_in(sink_stop),
    .router_clk_en(clk_en), .router_busy(busy), .router_spec_abort(sab)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // ---------------- packet book-keeping ----------------
  int pk_src [MAXP];
  int pk_dst [MAXP];
  int pk_rx  [MAXP];     // flits received
  int pk_t0  [MAXP];     // cycle the head was injected
  int pk_th  [MAXP];     // cycle the head was received
  int pk_tt  [MAXP];     // cycle the tail was received
  int n_pk = 0;
  int cycle = 0;

  // per source state
  int  src_pend  [NT];          // packets waiting to start
  int  src_dstq  [NT][$];       // their destinations
  int  src_cur   [NT];          // current packet id or -1
  int  src_idx   [NT];          // next flit index
  int  src_vc    [NT];
  int  src_rr    [NT];
  // per sink state
  int  snk_pkt   [NT][NUM_VC];
  int  snk_idx   [NT][NUM_VC];

  // mechanism counters
  int n_gated = 0, n_wake = 0, n_abort = 0, n_inj_stall = 0, n_ej_stall = 0;
  int n_flits_rx = 0;
  int sink_stop_pct = 0;

  function automatic int tx(int t); return t % 4; endfunction
  function automatic int ty(int t); return t / 4; endfunction

  task automatic new_packet(input int s, input int d);
    src_dstq[s].push_back(d);
  endtask

  // one falling-edge step of all sources and sinks
  task automatic step();
    @(negedge clk);
    cycle++;
    // sink back-pressure for this cycle
    for (int t = 0; t < NT; t++)
      for (int v = 0; v < NUM_VC; v++)
        sink_stop[t][v] = (sink_stop_pct > 0) && (($urandom % 100) < sink_stop_pct);
    // sources
    for (int s = 0; s < NT; s++) begin
      flit_t f;
      f = '0;
      if (src_cur[s] < 0 && src_dstq[s].size() > 0) begin
        // choose a VC that is not stopped, round-robin
        for (int k = 0; k < NUM_VC; k++) begin
          int v;
          v = (src_rr[s] + k) % NUM_VC;
          if (src_cur[s] < 0 && !tile_stop[s][v]) begin
            int d;
            d = src_dstq[s].pop_front();
            src_cur[s] = n_pk;
            pk_src[n_pk] = s; pk_dst[n_pk] = d; pk_rx[n_pk] = 0;
            n_pk++;
            src_idx[s] = 0; src_vc[s] = v; src_rr[s] = (v + 1) % NUM_VC;
          end
        end
      end
      if (src_cur[s] >= 0) begin
        if (tile_stop[s][src_vc[s]]) n_inj_stall++;
        else begin
          int id, d;
          id = src_cur[s]; d = pk_dst[id];
          f.valid = 1'b1;
          f.vc    = VC_W'(src_vc[s]);
          f.head  = (src_idx[s] == 0);
          f.tail  = (src_idx[s] == PKT_LEN - 1);
          if (f.head) begin
            f.dx = ofs_t'(tx(d) - tx(s));
            f.dy = ofs_t'(ty(d) - ty(s));
            pk_t0[id] = cycle;
          end
          f.data = {16'(id), 8'(s), 8'(d), 8'(src_idx[s]), 24'($urandom)};
          src_idx[s]++;
          if (src_idx[s] == PKT_LEN) src_cur[s] = -1;
        end
      end
      tile_in[s] = f;
      tile_ev[s] = f.valid;
    end
    #1;
    // sinks: these flits are committed at the coming rising edge
    for (int t = 0; t < NT; t++) begin
      if (tile_out[t].valid) begin
        flit_t f;
        int id, s, d, ix, v;
        f = tile_out[t];
        id = int'(f.data[63:48]); s = int'(f.data[47:40]);
        d = int'(f.data[39:32]); ix = int'(f.data[31:24]); v = int'(f.vc);
        n_flits_rx++;
        check(!sink_stop[t][v], "flit ejected on a stopped VC");
        check(d == t && id < n_pk && pk_dst[id] == t && pk_src[id] == s,
              $sformatf("misdelivered flit id=%0d at tile %0d", id, t));
        if (f.head) begin
          check(snk_pkt[t][v] < 0, "head while packet open on VC");
          check(ix == 0 && f.dx == 0 && f.dy == 0, "bad head fields");
          snk_pkt[t][v] = id; snk_idx[t][v] = 0;
          if (id < MAXP) pk_th[id] = cycle;
        end
        check(snk_pkt[t][v] == id && snk_idx[t][v] == ix,
              $sformatf("order: tile %0d vc %0d got id %0d idx %0d", t, v, id, ix));
        check(f.tail == (ix == PKT_LEN - 1), "tail flag");
        snk_idx[t][v]++;
        if (id < MAXP) pk_rx[id]++;
        if (f.tail) begin
          snk_pkt[t][v] = -1;
          if (id < MAXP) pk_tt[id] = cycle;
        end
      end
    end
    // mechanism counters (state in this cycle)
    for (int r = 0; r < NT; r++) begin
      if (!clk_en[r]) n_gated++;
      if (clk_en[r] && !busy[r]) n_wake++;
      if (sab[r]) n_abort++;
      for (int v = 0; v < NUM_VC; v++)
        if (sink_stop[r][v] && snk_pkt[r][v] >= 0) n_ej_stall++;
    end
  endtask

  function automatic bit all_idle();
    for (int s = 0; s < NT; s++)
      if (src_cur[s] >= 0 || src_dstq[s].size() > 0) return 0;
    for (int i = 0; i < n_pk; i++) if (pk_rx[i] != PKT_LEN) return 0;
    return 1;
  endfunction

  task automatic drain(input int limit);
    int k;
    k = 0;
    sink_stop_pct = 0;
    while (!all_idle() && k < limit) begin step(); k++; end
    check(all_idle(), "network did not drain");
    repeat (3) step();
    check(clk_en == '0 && busy == '0, "routers not gated after drain");
  endtask

  int ever_en_12;
  initial begin
    for (int s = 0; s < NT; s++) begin
      src_cur[s] = -1; src_idx[s] = 0; src_vc[s] = 0; src_rr[s] = 0;
      tile_in[s] = '0; sink_stop[s] = '0;
      for (int v = 0; v < NUM_VC; v++) snk_pkt[s][v] = -1;
    end
    tile_ev = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- idle: no router is clocked ----
    repeat (20) begin
      step();
      check(clk_en == '0, "router clocked with no traffic");
    end

    // ---- zero-load latency, tile 0 -> tile 15 (6 hops) ----
    new_packet(0, 15);
    ever_en_12 = 0;
    for (int k = 0; k < 20; k++) begin
      step();
      if (clk_en[12] || clk_en[5] || clk_en[10]) ever_en_12++;
    end
    check(pk_rx[0] == PKT_LEN, "zero-load packet not delivered");
    check(pk_th[0] - pk_t0[0] == 7, $sformatf("head latency %0d, expected 7", pk_th[0] - pk_t0[0]));
    check(pk_tt[0] - pk_th[0] == PKT_LEN - 1, "tail not 3 cycles after head");
    check(ever_en_12 == 0, "router off the XY path was clocked");
    drain(100);

    // ---- four streams through router (2,2) = tile 10 ----
    begin
      int n_before, en10;
      n_before = n_pk; en10 = 0;
      for (int k = 0; k < 300; k++) begin
        if (src_dstq[11].size() < 2) new_packet(11, 9);  // east -> west
        if (src_dstq[14].size() < 2) new_packet(14, 6);  // south -> north
        if (src_dstq[9].size()  < 2) new_packet(9, 11);  // west -> east
        if (src_dstq[6].size()  < 2) new_packet(6, 14);  // north -> south
        step();
        if (k > 5 && clk_en[10]) en10++;
      end
      // streams empty their queues
      for (int s = 0; s < NT; s++) src_dstq[s].delete();
      drain(200);
      check(en10 == 294, "router (2,2) gated while streams were flowing");
      // each stream carries close to one flit per cycle
      check((n_pk - n_before) * PKT_LEN >= 4 * 280, $sformatf("stream throughput low: %0d packets", n_pk - n_before));
    end

    // ---- uniform random traffic ----
    for (int phase = 0; phase < 4; phase++) begin
      int rate_pct;          // flits per node per 100 cycles
      rate_pct = (phase == 0) ? 4 : (phase == 1) ? 20 : 44;
      sink_stop_pct = (phase == 3) ? 30 : 0;
      for (int k = 0; k < 1000; k++) begin
        for (int s = 0; s < NT; s++)
          if (($urandom % (100 * PKT_LEN)) < rate_pct) begin
            int d;
            d = $urandom % NT;
            if (d == s) d = (d + 1) % NT;
            new_packet(s, d);
          end
        step();
      end
      drain(3000);
    end

    // ---- results ----
    begin
      int lost;
      lost = 0;
      for (int i = 0; i < n_pk; i++) if (pk_rx[i] != PKT_LEN) lost++;
      check(lost == 0, $sformatf("%0d packets not delivered exactly once", lost));
    end
    $display("packets=%0d flits=%0d gated_router_cycles=%0d wakeups=%0d aborts=%0d inj_stalls=%0d ej_stalls=%0d",
             n_pk, n_flits_rx, n_gated, n_wake, n_abort, n_inj_stall, n_ej_stall);
    check(n_gated > 0, "router-level gating never happened");
    check(n_wake > 0, "early-valid wake-up never happened");
    check(n_abort > 0, "speculative abort never happened");
    check(n_inj_stall > 0, "injection stop never happened");
    check(n_ej_stall > 0, "ejection stop never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
