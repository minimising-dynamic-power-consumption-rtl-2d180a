// tb_crossbar: random flits on all inputs, random permutations and partial
// selections; every output must carry the selected input with valid set, or
// all zeros when not valid.
`timescale 1ns/1ps
module tb_crossbar;
  import noc_pkg::*;
  localparam int P = NUM_PORTS;
  flit_t in_flit [P], out_flit [P];
  logic [P-1:0][P-1:0] sel;
  logic [P-1:0] valid;
  crossbar dut (.in_flit, .sel, .valid, .out_flit);
  int checks = 0, failures = 0;
  initial begin
    for (int k = 0; k < 2000; k++) begin
      int perm [P];
      for (int p = 0; p < P; p++) begin
        in_flit[p] = flit_t'({$urandom, $urandom, $urandom});
        perm[p] = p;
      end
      perm.shuffle();
      sel = '0;
      for (int o = 0; o < P; o++) sel[o][perm[o]] = 1'b1;
      valid = P'($urandom);
      #1;
      for (int o = 0; o < P; o++) begin
        flit_t e;
        e = '0;
        if (valid[o]) begin e = in_flit[perm[o]]; e.valid = 1'b1; end
        checks++;
        if (out_flit[o] != e) begin
          failures++;
          if (failures < 10) $display("FAIL out %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
