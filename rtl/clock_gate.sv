// clock_gate: latch-based clock gating cell.
//
// The enable is captured by a latch that is transparent while clk is low and
// holds while clk is high; the gated clock is clk AND the latched enable.
// An enable that settles any time before the rising edge therefore passes
// exactly that edge's pulse, and changes of en while clk is high cannot cut
// or create a pulse. In a standard-cell flow this module maps to the
// library's integrated clock gating cell.
// Interface: clk, en in; gclk out. Timing: en must be stable before the
// rising edge of clk (setup to the latch closing).
// The cell is the one shown at the root of each router's clock tree in the
// published scheme; its latch-plus-AND form is the usual construction.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_lat;

  always_latch begin
    if (!clk) en_lat = en;
  end

  assign gclk = clk & en_lat;

endmodule
