// tb_glb_switch_alloc: tests the separable GLB switch allocator against a cycle model.
// Random phase: random requests, output ports, Congestion Status values and tail bits;
// the model keeps its own waiting counters and recomputes both arbitration stages.
// Directed phase: input 1 keeps requesting output 2 with Congestion Status 15 and body
// flits while input 0 requests it with 0; the ageing must let input 0 win within 16 cycles.
module tb_glb_switch_alloc;
  import glb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NUM_VC-1:0] req [NUM_PORTS];
  port_e req_port [NUM_PORTS][NUM_VC];
  logic [CS_W-1:0] cs [NUM_PORTS][NUM_VC];
  logic [NUM_VC-1:0] is_tail [NUM_PORTS];
  logic [NUM_VC-1:0] gnt [NUM_PORTS];
  logic [0:0] in_vc [NUM_PORTS];
  logic [NUM_PORTS-1:0] out_valid, ev_override;
  logic [2:0] out_src [NUM_PORTS];
  glb_switch_alloc dut (.*);

  int checks = 0, failures = 0;
  int w [NUM_PORTS][NUM_VC];

  function automatic int pr(int p, int v);
    int s = int'(cs[p][v]) + w[p][v];
    return s > 31 ? 31 : s;
  endfunction

  task automatic model_check();
    int s1 [NUM_PORTS];
    int eg [NUM_PORTS][NUM_VC];
    for (int p = 0; p < NUM_PORTS; p++) begin
      int bp = -1;
      s1[p] = -1;
      for (int v = 0; v < NUM_VC; v++) if (req[p][v] && pr(p, v) > bp) begin bp = pr(p, v); s1[p] = v; end
      for (int v = 0; v < NUM_VC; v++) eg[p][v] = 0;
    end
    for (int o = 0; o < NUM_PORTS; o++) begin
      int bp = -1, bi = -1;
      for (int p = 0; p < NUM_PORTS; p++)
        if (s1[p] >= 0 && int'(req_port[p][s1[p]]) == o && pr(p, s1[p]) > bp) begin bp = pr(p, s1[p]); bi = p; end
      checks++;
      if (out_valid[o] != (bi >= 0) || (bi >= 0 && int'(out_src[o]) != bi)) begin
        failures++;
        if (failures < 10) $display("@%0t out %0d: valid %b src %0d exp %0d", $time, o, out_valid[o], out_src[o], bi);
      end
      if (bi >= 0) eg[bi][s1[bi]] = 1;
    end
    for (int p = 0; p < NUM_PORTS; p++)
      for (int v = 0; v < NUM_VC; v++) begin
        checks++;
        if (gnt[p][v] != eg[p][v][0]) begin failures++; if (failures < 10) $display("gnt %0d.%0d", p, v); end
      end
    // model waiting counters
    for (int p = 0; p < NUM_PORTS; p++)
      for (int v = 0; v < NUM_VC; v++) begin
        if (eg[p][v] != 0) begin if (is_tail[p][v]) w[p][v] = 0; end
        else if (req[p][v] && w[p][v] < 15) w[p][v]++;
      end
  endtask

  task automatic clear_inputs();
    for (int p = 0; p < NUM_PORTS; p++) begin
      req[p] = '0; is_tail[p] = '0;
      for (int v = 0; v < NUM_VC; v++) begin req_port[p][v] = P_LOCAL; cs[p][v] = '0; end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int waited;
    clear_inputs();
    for (int p = 0; p < NUM_PORTS; p++) for (int v = 0; v < NUM_VC; v++) w[p][v] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int p = 0; p < NUM_PORTS; p++) begin
        req[p] = 2'($urandom);
        is_tail[p] = 2'($urandom_range(3) == 0 ? 2'b11 : 2'b00);
        for (int v = 0; v < NUM_VC; v++) begin
          req_port[p][v] = port_e'($urandom_range(4));
          cs[p][v] = 4'($urandom);
        end
      end
      #1 model_check();
    end
    // Directed starvation test.
    @(negedge clk);
    clear_inputs();
    @(negedge clk);   // one idle cycle: no counter changes
    for (int p = 0; p < NUM_PORTS; p++) for (int v = 0; v < NUM_VC; v++) begin
      if (w[p][v] != 0) begin  // let pending counters drain through tail grants
        req[p][v] = 1'b1; is_tail[p][v] = 1'b1; req_port[p][v] = port_e'(p);
      end
    end
    #1 model_check();
    @(negedge clk);
    clear_inputs();
    #1 model_check();
    waited = 0;
    do begin
      @(negedge clk);
      req[0] = 2'b01; req_port[0][0] = P_EAST; cs[0][0] = 4'd0;
      req[1] = 2'b01; req_port[1][0] = P_EAST; cs[1][0] = 4'd15;
      #1;
      model_check();
      waited++;
    end while (!gnt[0][0] && waited < 40);
    checks++;
    if (waited > 17) begin failures++; $display("input 0 starved for %0d cycles", waited); end
    else $display("low-priority input granted after %0d cycles", waited);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
