// glb_congestion: congestion bookkeeping of one GLB router.
//
// 1. Congestion flag per input port: set when the flits held by the port's VC buffers
//    together exceed THRESHOLD. The flags go to the upstream neighbours, whose DyXY routing
//    unit uses them to choose between the X and the Y output.
// 2. Own Congestion Condition (2 bits): x = congested input ports / connected input ports,
//    reduced with the bands of the source's Table 1. It is sent to all neighbours.
// 3. Neighbour Congestion Condition (2 bits): y = congested neighbours / connected
//    neighbours, same bands. A neighbour counts as congested when its own CC is non-zero.
// 4. Local congestion value (4 bits) = {own CC, neighbour CC}, the concatenation the source
//    describes; the crossbar averages it into the Congestion Status of passing head flits.
//
// Everything is combinational from the buffer counts. PORT_EN marks the connected ports;
// bit 0 is the local port, which counts as an input port but not as a neighbour. The
// threshold value, the "neighbour is congested" rule and the x = 0 band are this design's
// own choices; the rest follows the source.
module glb_congestion
  import glb_pkg::*;
#(
  parameter logic [NUM_PORTS-1:0] PORT_EN   = '1,
  parameter int unsigned          THRESHOLD = 2,
  parameter int unsigned          OCC_W     = 4    // width of a port's occupancy
) (
  input  logic [OCC_W-1:0] occupancy [NUM_PORTS],  // flits buffered per input port (all VCs)
  input  logic [1:0]       cc_nb_in  [NUM_PORTS],  // CC received from each neighbour (index 0 unused)
  output logic [NUM_PORTS-1:0] cong_flag,          // per input port congestion flag
  output logic [1:0]       cc_own,                 // this router's CC, sent to the neighbours
  output logic [1:0]       cc_nb,                  // summary of the neighbours' CCs
  output logic [CS_W-1:0]  local_cv                // 4-bit local congestion value
);

  localparam int unsigned N_IN = $countones(PORT_EN);
  localparam int unsigned N_NB = $countones(PORT_EN[NUM_PORTS-1:1]);

  logic [2:0] n_cong_ports, n_cong_nb;

  always_comb begin
    n_cong_ports = '0;
    n_cong_nb    = '0;
    for (int p = 0; p < NUM_PORTS; p++) begin
      cong_flag[p] = PORT_EN[p] && (occupancy[p] > OCC_W'(THRESHOLD));
      if (cong_flag[p]) n_cong_ports = n_cong_ports + 1'b1;
      if (p != 0 && PORT_EN[p] && cc_nb_in[p] != 2'b00) n_cong_nb = n_cong_nb + 1'b1;
    end
  end

  glb_cc_quant #(.CNT_W(3)) u_q_own (.cnt(n_cong_ports), .total(3'(N_IN)), .cc(cc_own));
  glb_cc_quant #(.CNT_W(3)) u_q_nb  (.cnt(n_cong_nb),    .total(3'(N_NB)), .cc(cc_nb));

  assign local_cv = {cc_own, cc_nb};

endmodule
