// matrix_arbiter: least-recently-served arbiter kept as a priority matrix.
//
// For every pair of requesters i<j one state bit says whether i currently
// beats j. A request is granted when no other active request beats it, so at
// most one grant is given per cycle and one is always given when any request
// is present. When the grant is used (update high) the winner drops below
// every other requester. The state is written only in cycles where a granted
// request was served, which is the load-enable condition that lets synthesis
// gate the clock of these flip-flops.
//
// Interface: req[N] in, gnt[N] out (one-hot or zero, combinational from req
// and state), update in (the current grant was served this cycle).
// Timing: the priority change takes effect in the cycle after update.
// Matrix arbiters and their load-enabled state follow the published router;
// the reset order (lower index wins first) is this design's choice.
module matrix_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         update,
  output logic [N-1:0] gnt
);

  // One bit per pair i<j, packed row by row: bit idx(i,j) set means i beats j.
  localparam int unsigned NB = N * (N - 1) / 2;
  logic [NB-1:0] beats_q;

  function automatic int unsigned idx(input int unsigned i, input int unsigned j);
    return i * N - (i * (i + 1)) / 2 + (j - i - 1);
  endfunction

  // does j beat i?
  function automatic logic beats(input logic [NB-1:0] m, input int unsigned j, input int unsigned i);
    return (j < i) ? m[idx(j, i)] : ~m[idx(i, j)];
  endfunction

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      gnt[i] = req[i];
      for (int unsigned j = 0; j < N; j++)
        if (j != i && req[j] && beats(beats_q, j, i)) gnt[i] = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beats_q <= '1;                                  // lower index wins first
    end else if (update && |gnt) begin
      for (int unsigned i = 0; i < N; i++)
        for (int unsigned j = i + 1; j < N; j++) begin
          if (gnt[i]) beats_q[idx(i, j)] <= 1'b0;      // winner i now loses to j
          else if (gnt[j]) beats_q[idx(i, j)] <= 1'b1; // winner j now loses to i
        end
    end
  end

  initial assert (N >= 2) else $error("matrix_arbiter needs N >= 2");

  gnt_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  gnt_live:   assert property (@(posedge clk) disable iff (!rst_n) (|req) |-> (|gnt));

endmodule
