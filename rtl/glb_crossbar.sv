// glb_crossbar: 5x5 flit crossbar of the GLB router with the Congestion Status update.
//
// Each output port o takes the flit of input port sel[o] when valid[o] is set. A head flit
// has its 4-bit Congestion Status field replaced by the mean of the carried value and this
// router's local congestion value (50-50 weighting, rounded down), so the packet leaves
// with the congestion history of its path including this router and its neighbours.
// Body and tail flits pass unchanged. Combinational; the router registers the outputs.
// The update rule follows the source; doing it in the crossbar is this design's choice.
module glb_crossbar
  import glb_pkg::*;
(
  input  flit_t                         in_flit  [NUM_PORTS],
  input  logic [$clog2(NUM_PORTS)-1:0]  sel      [NUM_PORTS],
  input  logic [NUM_PORTS-1:0]          valid,
  input  logic [CS_W-1:0]               local_cv,
  output flit_t                         out_flit [NUM_PORTS],
  output logic [NUM_PORTS-1:0]          out_valid
);

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      flit_t f;
      f = in_flit[sel[o]];
      if (f.head) f.data[CS_LSB +: CS_W] = cs_combine(hdr_cs(f.data), local_cv);
      out_flit[o]  = f;
      out_valid[o] = valid[o];
    end
  end

endmodule
