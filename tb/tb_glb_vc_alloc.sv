// tb_glb_vc_alloc: tests the output VC reservation. Packets of random length (1..4 flits)
// are pushed through every output/VC pair from random inputs, interleaved at random; the
// model tracks which output VCs are held. Checked every cycle: ovc_free matches the model
// and the recorded owner is the input that sent the head flit.
module tb_glb_vc_alloc;
  import glb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NUM_PORTS-1:0] fire;
  logic fire_vc [NUM_PORTS], fire_head [NUM_PORTS], fire_tail [NUM_PORTS];
  logic [2:0] fire_src [NUM_PORTS];
  logic [NUM_VC-1:0] ovc_free [NUM_PORTS];
  logic [2:0] ovc_owner [NUM_PORTS][NUM_VC];
  glb_vc_alloc dut (.*);

  int checks = 0, failures = 0, n_held = 0;
  int left [NUM_PORTS][NUM_VC];   // flits left in the packet on (o,v), 0 = free
  int owner [NUM_PORTS][NUM_VC];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      fire[o] = 0; fire_vc[o] = 0; fire_head[o] = 0; fire_tail[o] = 0; fire_src[o] = 0;
      for (int v = 0; v < NUM_VC; v++) begin left[o][v] = 0; owner[o][v] = 0; end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      for (int o = 0; o < NUM_PORTS; o++)
        for (int v = 0; v < NUM_VC; v++) begin
          checks++;
          if (ovc_free[o][v] != (left[o][v] == 0)) begin failures++; $display("free %0d.%0d", o, v); end
          if (left[o][v] != 0) begin
            n_held++;
            checks++;
            if (int'(ovc_owner[o][v]) != owner[o][v]) begin failures++; $display("owner %0d.%0d", o, v); end
          end
        end
      for (int o = 0; o < NUM_PORTS; o++) begin
        int v;
        v = $urandom_range(1);
        fire[o] = $urandom_range(1);
        fire_vc[o] = v[0];
        if (fire[o]) begin
          if (left[o][v] == 0) begin
            int len;
            len = $urandom_range(4, 1);
            fire_head[o] = 1; fire_src[o] = 3'($urandom_range(4));
            fire_tail[o] = (len == 1);
            owner[o][v] = int'(fire_src[o]);
            left[o][v] = len - 1;
          end else begin
            fire_head[o] = 0; fire_src[o] = 3'(owner[o][v]);
            left[o][v]--;
            fire_tail[o] = (left[o][v] == 0);
          end
        end
      end
    end
    checks++;
    if (n_held == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
