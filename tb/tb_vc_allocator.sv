// tb_vc_allocator: random head-flit requests from all 20 input VCs, random
// downstream stop bits and random releases of allocated VCs. The testbench
// keeps its own copy of the allocated state and checks, every cycle: each
// grant answers a request, at most one grant per output, a grant whenever
// an output has a requester and a free unstopped VC, the granted VC is the
// lowest free unstopped one, alloc_next matches the model, and a requester
// that keeps asking is served within 20 grants of its output (fairness).
`timescale 1ns/1ps
module tb_vc_allocator;
  import noc_pkg::*;
  localparam int P = NUM_PORTS, V = NUM_VC;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic [P*V-1:0] req, gnt;
  port_e req_port [P*V];
  logic [P-1:0][V-1:0] stop_in, release_vc, alloc_next, model;
  logic [VC_W-1:0] gnt_vc [P*V];
  vc_allocator dut (.clk, .rst_n, .req, .req_port, .stop_in, .release_vc, .gnt, .gnt_vc, .alloc_next);

  int checks = 0, failures = 0, n_gnt = 0;
  int waitc [P*V];
  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", s, $time); end
  endtask
  initial begin
    req = '0; stop_in = '0; release_vc = '0; model = '0;
    for (int i = 0; i < P*V; i++) begin req_port[i] = PORT_LOCAL; waitc[i] = 0; end
    #1 rst_n = 0;
    #10 rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      logic [P-1:0][V-1:0] set;
      @(negedge clk);
      // requests persist until granted
      for (int i = 0; i < P*V; i++)
        if (!req[i] && ($urandom % 4) == 0) begin
          req[i] = 1'b1; req_port[i] = port_e'($urandom % P); waitc[i] = 0;
        end
      for (int o = 0; o < P; o++)
        for (int w = 0; w < V; w++) begin
          stop_in[o][w] = ($urandom % 8) == 0;
          release_vc[o][w] = model[o][w] && (($urandom % 3) == 0);
        end
      #1;
      set = '0;
      for (int o = 0; o < P; o++) begin
        int ng, lowest, nreq;
        ng = 0; nreq = 0; lowest = -1;
        for (int w = V - 1; w >= 0; w--) if (!model[o][w] && !stop_in[o][w]) lowest = w;
        for (int i = 0; i < P*V; i++) if (req[i] && req_port[i] == port_e'(o)) nreq++;
        for (int i = 0; i < P*V; i++)
          if (gnt[i] && req_port[i] == port_e'(o)) begin
            ng++;
            check(req[i], "grant without request");
            check(int'(gnt_vc[i]) == lowest, $sformatf("not the lowest free VC o=%0d got %0d exp %0d model=%b stop=%b", o, gnt_vc[i], lowest, model[o], stop_in[o]));
            if (lowest >= 0) set[o][lowest] = 1'b1;
          end
        check(ng <= 1, "two grants on one output");
        check((ng == 1) == (nreq > 0 && lowest >= 0), "grant presence");
        if (ng == 1) begin
          n_gnt++;
          for (int i = 0; i < P*V; i++)
            if (req[i] && req_port[i] == port_e'(o) && !gnt[i]) waitc[i]++;
        end
      end
      model = (model | set) & ~release_vc;
      check(alloc_next == model, "alloc_next");
      begin
        logic [P*V-1:0] served;
        served = gnt;
        for (int i = 0; i < P*V; i++) check(waitc[i] < P*V, "requester starved");
        @(posedge clk);
        #1 req = req & ~served;
      end
    end
    check(n_gnt > 1000, "too few grants");
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
