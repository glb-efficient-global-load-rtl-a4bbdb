// glb_vc_alloc: output VC reservation of the GLB router (wormhole switching).
//
// A packet keeps its message class, so a flit in input VC v always leaves on output VC v
// (VC 0 carries requests, VC 1 responses, which keeps request-response dependencies from
// deadlocking). What must be allocated is the right to use output VC (o,v) for one packet:
// a head flit may leave only on a free output VC; when it leaves the VC becomes owned by
// the input port it came from until that packet's tail flit passes. A single-flit packet
// (head and tail) does not reserve the VC.
//
// Inputs per output port: a fire strobe with the flit's VC, head/tail bits and source
// input port, reported by the switch allocator the cycle the flit crosses. Outputs:
// ovc_free[o][v] for the requests of the next cycle, and the owner of each VC. The VC per
// message class and wormhole switching follow the source; the reservation scheme is this
// design's own (the source only names a VC allocator).
module glb_vc_alloc
  import glb_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NUM_PORTS-1:0]          fire,
  input  logic                          fire_vc   [NUM_PORTS],
  input  logic                          fire_head [NUM_PORTS],
  input  logic                          fire_tail [NUM_PORTS],
  input  logic [$clog2(NUM_PORTS)-1:0]  fire_src  [NUM_PORTS],
  output logic [NUM_VC-1:0]             ovc_free  [NUM_PORTS],
  output logic [$clog2(NUM_PORTS)-1:0]  ovc_owner [NUM_PORTS][NUM_VC]
);

  logic [NUM_VC-1:0] busy [NUM_PORTS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NUM_PORTS; o++) begin
        busy[o] <= '0;
        for (int v = 0; v < NUM_VC; v++) ovc_owner[o][v] <= '0;
      end
    end else begin
      for (int o = 0; o < NUM_PORTS; o++) begin
        if (fire[o]) begin
          if (fire_tail[o]) begin
            busy[o][fire_vc[o]] <= 1'b0;
          end else if (fire_head[o]) begin
            busy[o][fire_vc[o]]      <= 1'b1;
            ovc_owner[o][fire_vc[o]] <= fire_src[o];
          end
        end
      end
    end
  end

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) ovc_free[o] = ~busy[o];
  end

  // Wormhole rules: a head flit needs a free VC, a body or tail flit must come from the owner.
  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     fire[o] && fire_head[o] |-> !busy[o][fire_vc[o]])
      else $error("glb_vc_alloc: head flit on a reserved VC");
    assert property (@(posedge clk) disable iff (!rst_n)
                     fire[o] && !fire_head[o] |-> busy[o][fire_vc[o]] && ovc_owner[o][fire_vc[o]] == fire_src[o])
      else $error("glb_vc_alloc: body flit without reservation");
  end

endmodule
