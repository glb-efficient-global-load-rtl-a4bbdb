// glb_switch_alloc: separable switch allocator of the GLB router.
//
// Stage 1 (per input port): among the port's VCs that request, pick one with glb_input_sel.
// Stage 2 (per output port): among the input ports whose stage-1 winner wants this output,
// pick one with glb_input_sel. Both stages use the GLB priority
//     prio(p,v) = Congestion Status of the packet at (p,v) + W(p,v)
// saturated to PRIO_W bits. W(p,v) is the waiting period: it is incremented each cycle
// the VC requests and is not granted (stage 1 or stage 2 loss), so a defeated packet gains
// priority and cannot starve; it is cleared when the packet's tail flit is granted, so the
// next packet at the buffer head starts from zero.
//
// Timing: the grants are combinational from the requests; W updates on the clock edge.
// Outputs: gnt[p][v] (at most one per input port and per output), the chosen VC of each
// input port, and per output the valid flag and the source input port. The max-of-(C+W)
// rule and the ageing follow the source; the separable structure, the W width and its
// saturation are this design's choices.
module glb_switch_alloc
  import glb_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NUM_VC-1:0]   req      [NUM_PORTS],
  input  port_e               req_port [NUM_PORTS][NUM_VC],
  input  logic [CS_W-1:0]     cs       [NUM_PORTS][NUM_VC],
  input  logic [NUM_VC-1:0]   is_tail  [NUM_PORTS],
  output logic [NUM_VC-1:0]   gnt      [NUM_PORTS],
  output logic [$clog2(NUM_VC)-1:0]    in_vc   [NUM_PORTS],  // VC granted at each input port
  output logic [NUM_PORTS-1:0]         out_valid,
  output logic [$clog2(NUM_PORTS)-1:0] out_src [NUM_PORTS],  // input port feeding each output
  output logic [NUM_PORTS-1:0]         ev_override            // priority beat index order
);

  localparam int unsigned VI_W = $clog2(NUM_VC);

  logic [WAIT_W-1:0] wait_q [NUM_PORTS][NUM_VC];
  logic [PRIO_W-1:0] prio   [NUM_PORTS][NUM_VC];

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++)
      for (int v = 0; v < NUM_VC; v++) begin
        logic [PRIO_W:0] s;
        s = (PRIO_W+1)'(cs[p][v]) + (PRIO_W+1)'(wait_q[p][v]);
        prio[p][v] = s[PRIO_W] ? '1 : s[PRIO_W-1:0];
      end
  end

  // Stage 1: VC selection per input port.
  logic [NUM_VC-1:0]   s1_gnt   [NUM_PORTS];
  logic [VI_W-1:0]     s1_idx   [NUM_PORTS];
  logic [NUM_PORTS-1:0] s1_valid;
  logic [PRIO_W-1:0]   s1_prio  [NUM_PORTS];
  port_e               s1_port  [NUM_PORTS];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_in
    logic unused_ovr;
    glb_input_sel #(.N(NUM_VC), .PRIO_W(PRIO_W)) u_sel (
      .req      (req[p]),
      .prio     (prio[p]),
      .gnt      (s1_gnt[p]),
      .gnt_idx  (s1_idx[p]),
      .gnt_valid(s1_valid[p]),
      .override (unused_ovr)
    );
    assign s1_prio[p] = prio[p][s1_idx[p]];
    assign s1_port[p] = req_port[p][s1_idx[p]];
  end

  // Stage 2: input port selection per output port.
  logic [NUM_PORTS-1:0] s2_req [NUM_PORTS];
  logic [NUM_PORTS-1:0] s2_gnt [NUM_PORTS];

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    for (genvar p = 0; p < NUM_PORTS; p++) begin : g_req
      assign s2_req[o][p] = s1_valid[p] && (s1_port[p] == port_e'(o));
    end
    glb_input_sel #(.N(NUM_PORTS), .PRIO_W(PRIO_W)) u_sel (
      .req      (s2_req[o]),
      .prio     (s1_prio),
      .gnt      (s2_gnt[o]),
      .gnt_idx  (out_src[o]),
      .gnt_valid(out_valid[o]),
      .override (ev_override[o])
    );
  end

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      logic won;
      won = 1'b0;
      for (int o = 0; o < NUM_PORTS; o++) won = won | s2_gnt[o][p];
      gnt[p]   = won ? s1_gnt[p] : '0;
      in_vc[p] = s1_idx[p];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_PORTS; p++)
        for (int v = 0; v < NUM_VC; v++) wait_q[p][v] <= '0;
    end else begin
      for (int p = 0; p < NUM_PORTS; p++)
        for (int v = 0; v < NUM_VC; v++) begin
          if (gnt[p][v]) begin
            if (is_tail[p][v]) wait_q[p][v] <= '0;
          end else if (req[p][v] && wait_q[p][v] != '1) begin
            wait_q[p][v] <= wait_q[p][v] + 1'b1;
          end
        end
    end
  end

  // At most one grant per input port.
  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt[p]))
      else $error("glb_switch_alloc: several VCs granted at one input");
  end

endmodule
