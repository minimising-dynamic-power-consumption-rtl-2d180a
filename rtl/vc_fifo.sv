// vc_fifo: flit buffer for one input virtual channel.
//
// A DEPTH-entry circular buffer of flip-flops with write and read pointers and
// an occupancy counter. An entry is written only when wr_en is high, and the
// pointers and counter change only when a write or a read happens, so every
// register has a load enable and can be clock gated locally by synthesis.
// The front entry is visible on rd_data whenever empty is low (first-word
// fall-through); rd_en removes it at the clock edge. A write into a full
// buffer and a read from an empty one are protocol errors (asserted).
// full feeds the stop bit of the stop/go flow control directly.
// nonempty_next is what "not empty" will be after this edge, used for the
// router busy bit.
// Four entries per virtual channel follow the published design; the
// fall-through organisation is this design's choice.
module vc_fifo
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = VC_DEPTH
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      wr_en,
  input  vc_entry_t wr_data,
  input  logic      rd_en,
  output vc_entry_t rd_data,
  output logic      empty,
  output logic      full,
  output logic      nonempty_next
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  vc_entry_t          mem_q [DEPTH];
  logic [PTR_W-1:0]   wp_q, rp_q;
  logic [CNT_W-1:0]   cnt_q, cnt_d;

  function automatic logic [PTR_W-1:0] incr(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign empty   = (cnt_q == '0);
  assign full    = (cnt_q == CNT_W'(DEPTH));
  assign rd_data = mem_q[rp_q];

  always_comb begin
    cnt_d = cnt_q;
    if (wr_en && !rd_en) cnt_d = cnt_q + 1'b1;
    else if (!wr_en && rd_en) cnt_d = cnt_q - 1'b1;
  end
  assign nonempty_next = (cnt_d != '0);

  // storage: written only on a valid write (load enable)
  always_ff @(posedge clk) begin
    if (wr_en) mem_q[wp_q] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q  <= '0;
      rp_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (wr_en) wp_q <= incr(wp_q);
      if (rd_en) rp_q <= incr(rp_q);
      if (wr_en != rd_en) cnt_q <= cnt_d;
    end
  end

  no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> (!full || rd_en));
  no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty);

endmodule
