// tb_router_clock_ctrl: random early-valid inputs and busy_next; the model
// keeps its own busy bit, updated only on cycles where the router clock is
// expected to run. Checks clk_en, busy_q and the number of gated clock
// pulses, and that an idle router receives no clock pulses at all.
`timescale 1ns/1ps
module tb_router_clock_ctrl;
  localparam int P = 5;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic [P-1:0] ev;
  logic busy_next, gclk, clk_en, busy_q;
  router_clock_ctrl dut (.clk, .rst_n, .early_valid_in(ev), .busy_next, .gclk, .clk_en, .busy_q);
  int checks = 0, failures = 0, pulses = 0, expected = 0;
  bit mbusy;
  always @(posedge gclk) pulses++;
  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", s, $time); end
  endtask
  initial begin
    ev = '0; busy_next = 0; mbusy = 0;
    #1 rst_n = 0;
    #10 rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      bit en;
      @(negedge clk);
      if (k < 50) begin ev = '0; busy_next = 0; end
      else begin
        ev = (($urandom % 3) == 0) ? P'(1 << ($urandom % P)) : '0;
        busy_next = ($urandom % 4) == 0;
      end
      #1;
      en = (|ev) || mbusy;
      check(busy_q == mbusy, "busy_q");
      check(clk_en == en, "clk_en");
      @(posedge clk);
      if (en) begin expected++; mbusy = busy_next; end
    end
    @(negedge clk);
    check(pulses == expected, $sformatf("pulses %0d expected %0d", pulses, expected));
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
