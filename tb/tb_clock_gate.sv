// tb_clock_gate: drives the enable with changes in both clock phases and
// checks that each gated pulse appears exactly when the enable was high at
// the rising edge, that a change of enable while the clock is high neither
// cuts nor creates a pulse, and that the gated clock is never high while
// the clock is low.
`timescale 1ns/1ps
module tb_clock_gate;
  logic clk = 0, en = 0, gclk;
  always #5 clk = ~clk;
  clock_gate dut (.clk, .en, .gclk);
  int checks = 0, failures = 0, pulses = 0, expected = 0;
  always @(posedge gclk) pulses++;
  always @(clk or gclk) if (gclk && !clk) begin failures++; $display("FAIL gclk high while clk low"); end
  initial begin
    @(negedge clk);
    for (int k = 0; k < 500; k++) begin
      logic e;
      // low phase: set the enable for the coming edge
      #1 e = $urandom % 2; en = e;
      @(posedge clk);
      if (e) expected++;
      #1;
      checks++;
      if (gclk != e) begin failures++; $display("FAIL k=%0d gclk=%b en=%b", k, gclk, e); end
      // high phase: toggle the enable; the pulse must not change
      en = ~e;
      #2;
      checks++;
      if (gclk != e) begin failures++; $display("FAIL high-phase change k=%0d", k); end
      @(negedge clk);
    end
    checks++;
    if (pulses != expected) begin failures++; $display("FAIL pulses %0d expected %0d", pulses, expected); end
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
