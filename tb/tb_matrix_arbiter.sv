// tb_matrix_arbiter: checks the matrix arbiter against a least-recently-
// served order list kept by the testbench. Random requests and random use
// of the grant for 3000 cycles; the expected grant is the first requester in
// the list, and a served winner moves to the end of the list.
`timescale 1ns/1ps
module tb_matrix_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic [N-1:0] req, gnt;
  logic update;
  matrix_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .update, .gnt);

  int checks = 0, failures = 0;
  int order [$];
  initial begin
    for (int i = 0; i < N; i++) order.push_back(i);
    req = '0; update = 0;
    #1 rst_n = 0;
    #10 rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      logic [N-1:0] exp;
      int win;
      @(negedge clk);
      req = N'($urandom);
      if (k % 7 == 0) req = '1;
      update = ($urandom % 4) != 0;
      #1;
      exp = '0; win = -1;
      foreach (order[i]) if (win < 0 && req[order[i]]) win = order[i];
      if (win >= 0) exp[win] = 1'b1;
      checks++;
      if (gnt !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d req=%b gnt=%b exp=%b", k, req, gnt, exp);
      end
      if (update && win >= 0) begin
        foreach (order[i]) if (order[i] == win) begin order.delete(i); break; end
        order.push_back(win);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
