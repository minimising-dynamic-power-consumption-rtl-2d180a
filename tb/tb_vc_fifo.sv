// tb_vc_fifo: checks the virtual-channel buffer against a queue model.
// Random writes (never into a full buffer unless a read happens in the same
// cycle) and random reads for 3000 cycles; checks the front entry, empty,
// full, nonempty_next and that the buffer really holds DEPTH=4 flits.
`timescale 1ns/1ps
module tb_vc_fifo;
  import noc_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic wr_en, rd_en, empty, full, nonempty_next;
  vc_entry_t wr_data, rd_data;
  vc_fifo dut (.clk, .rst_n, .wr_en, .wr_data, .rd_en, .rd_data, .empty, .full, .nonempty_next);

  int checks = 0, failures = 0, max_fill = 0;
  vc_entry_t q [$];
  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  initial begin
    wr_en = 0; rd_en = 0; wr_data = '0;
    #1 rst_n = 0;
    #10 rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == VC_DEPTH), "full");
      if (q.size() > 0) check(rd_data == q[0], "front data");
      rd_en = (q.size() > 0) && (($urandom % 100) < ((k / 500) % 2 ? 70 : 30));
      wr_en = ((q.size() < VC_DEPTH) || rd_en) && (($urandom % 100) < 55);
      wr_data = vc_entry_t'({$urandom, $urandom, $urandom});
      #1;
      check(nonempty_next == ((q.size() + int'(wr_en) - int'(rd_en)) != 0), "nonempty_next");
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
      if (q.size() > max_fill) max_fill = q.size();
    end
    check(max_fill == VC_DEPTH, "never filled");
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
