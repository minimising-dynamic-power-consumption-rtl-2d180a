// tb_switch_allocator: random switch requests (some speculative) from all
// input VCs and a random choice of which output grants are used. Checks every
// cycle: the stage-1 choice is one requesting VC per input, and a
// non-speculative one whenever the input has any; at most one grant per
// input and per output; every output wanted by some stage-1 winner grants
// one; a non-speculative winner is preferred at each output; and a
// requesting input VC is served within a bounded number of cycles when all
// grants are used.
`timescale 1ns/1ps
module tb_switch_allocator;
  import noc_pkg::*;
  localparam int P = NUM_PORTS, V = NUM_VC;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic [P-1:0][V-1:0] req, req_spec, in_sel, gnt;
  port_e req_port [P][V];
  logic [P-1:0] commit;
  logic [P-1:0][P-1:0] out_gnt;
  switch_allocator dut (.clk, .rst_n, .req, .req_port, .req_spec, .commit, .in_sel, .gnt, .out_gnt);

  int checks = 0, failures = 0, n_commit = 0;
  int waitc [P][V];
  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", s, $time); end
  endtask
  initial begin
    req = '0; req_spec = '0; commit = '0;
    for (int p = 0; p < P; p++) for (int v = 0; v < V; v++) begin req_port[p][v] = PORT_LOCAL; waitc[p][v] = 0; end
    #1 rst_n = 0;
    #10 rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      bit fair_phase;
      fair_phase = (k >= 2000);
      @(negedge clk);
      if (k == 2000) begin
        req_spec = '0;
        for (int p = 0; p < P; p++) for (int v = 0; v < V; v++) waitc[p][v] = 0;
      end
      for (int p = 0; p < P; p++)
        for (int v = 0; v < V; v++)
          if (!req[p][v] && ($urandom % 3) == 0) begin
            req[p][v] = 1'b1; req_port[p][v] = port_e'($urandom % P);
            req_spec[p][v] = fair_phase ? 1'b0 : (($urandom % 3) == 0);
            waitc[p][v] = 0;
          end
      #1;
      for (int p = 0; p < P; p++) begin
        bit has_ns;
        has_ns = |(req[p] & ~req_spec[p]);
        check($onehot0(in_sel[p]) && ((in_sel[p] & ~req[p]) == '0), "in_sel not a request");
        check((|in_sel[p]) == (|req[p]), "input with requests selects none");
        if (has_ns) check((in_sel[p] & req_spec[p]) == '0, "speculative chosen over non-speculative");
      end
      for (int o = 0; o < P; o++) begin
        int nw; bit ns_w, ns_g;
        nw = 0; ns_w = 0; ns_g = 0;
        check($onehot0(out_gnt[o]), "two inputs granted on an output");
        for (int p = 0; p < P; p++)
          for (int v = 0; v < V; v++)
            if (in_sel[p][v] && req_port[p][v] == port_e'(o)) begin
              nw++;
              if (!req_spec[p][v]) ns_w = 1;
              if (out_gnt[o][p]) begin
                check(gnt[p][v], "gnt does not match out_gnt");
                if (!req_spec[p][v]) ns_g = 1;
              end
            end
        check((|out_gnt[o]) == (nw > 0), "wanted output grants none");
        if (ns_w) check(ns_g, "speculative winner over non-speculative at output");
      end
      for (int p = 0; p < P; p++) check($onehot0(gnt[p]), "two VCs of one input granted");
      commit = '0;
      for (int o = 0; o < P; o++)
        if (|out_gnt[o] && (fair_phase || ($urandom % 4) != 0)) commit[o] = 1'b1;
      #1;
      begin
        logic [P-1:0][V-1:0] served;
        served = '0;
        for (int o = 0; o < P; o++)
          for (int p = 0; p < P; p++)
            if (out_gnt[o][p] && commit[o])
              for (int v = 0; v < V; v++) if (gnt[p][v]) begin served[p][v] = 1'b1; n_commit++; end
        for (int p = 0; p < P; p++)
          for (int v = 0; v < V; v++)
            if (req[p][v] && !served[p][v]) begin
              waitc[p][v]++;
              if (fair_phase) check(waitc[p][v] < 40, "input VC starved");
            end
        @(posedge clk);
        #1 req = req & ~served;
      end
    end
    check(n_commit > 2000, "too few grants used");
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
