// tb_glb_crossbar: random test of the crossbar. Every output must carry the flit of its
// selected input; head flits must leave with Congestion Status floor((carried + local)/2)
// and every other bit unchanged; body flits pass untouched.
module tb_glb_crossbar;
  import glb_pkg::*;
  flit_t in_flit [NUM_PORTS], out_flit [NUM_PORTS];
  logic [2:0] sel [NUM_PORTS];
  logic [NUM_PORTS-1:0] valid, out_valid;
  logic [CS_W-1:0] local_cv;
  glb_crossbar dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 3000; i++) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        in_flit[p] = flit_t'({$urandom, 3'($urandom)});
        sel[p] = 3'($urandom_range(4));
      end
      valid = 5'($urandom);
      local_cv = 4'($urandom);
      #1;
      for (int o = 0; o < NUM_PORTS; o++) begin
        flit_t e;
        e = in_flit[sel[o]];
        if (e.head) e.data[31:28] = 4'((int'(e.data[31:28]) + int'(local_cv)) / 2);
        checks++;
        if (out_flit[o] != e || out_valid[o] != valid[o]) begin
          failures++;
          if (failures < 10) $display("out %0d: %h exp %h", o, out_flit[o], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
