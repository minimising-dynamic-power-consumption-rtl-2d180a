// crossbar: P x P flit switch.
//
// Each output port has a one-hot select over the input ports and a valid bit.
// When valid is high the selected input flit is driven with its valid bit
// set; otherwise the output is held at all zeros so an idle link does not
// toggle. Purely combinational: in the single-cycle router the flit leaves
// the crossbar and crosses the link in the same cycle it was allocated.
// The crossbar follows the published router; the zeroed idle output is this
// design's choice.
module crossbar
  import noc_pkg::*;
#(
  parameter int unsigned P = NUM_PORTS
) (
  input  flit_t               in_flit  [P],
  input  logic [P-1:0][P-1:0] sel,
  input  logic [P-1:0]        valid,
  output flit_t               out_flit [P]
);

  for (genvar o = 0; o < P; o++) begin : g_out
    always_comb begin
      out_flit[o] = '0;
      if (valid[o]) begin
        for (int p = 0; p < P; p++)
          if (sel[o][p]) out_flit[o] = in_flit[p];
        out_flit[o].valid = 1'b1;
      end
    end
  end

endmodule
