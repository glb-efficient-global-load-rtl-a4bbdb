// glb_mesh: MESH_X x MESH_Y two-dimensional mesh of GLB routers (5x5 by default).
//
// Node n = y*MESH_X + x sits at column x, row y; row 0 is the south edge. Each router is
// linked to its four neighbours by a flit link and a per-VC credit return in each
// direction, plus the congestion side-band: the congestion flag of the input port facing
// the neighbour and the router's 2-bit Congestion Condition. Ports on the mesh edge are
// disabled through PORT_EN and their inputs tied off. The local port of every node is
// brought out (inj_* into the network, ej_* out of it) for the network interfaces of the
// processors and memories, which are outside this module. ev_adaptive and ev_override are
// the routers' statistics strobes, one bit per node, OR-ed over the router's ports.
//
// Timing: two cycles per hop without contention; credit flow control on every link
// including the local ports (a network interface starts with VC_DEPTH credits per VC and
// gets one back on inj_credit each time the router frees a slot; it returns one on
// ej_credit for each ejected flit it has consumed). The 5x5 mesh follows the source.
module glb_mesh
  import glb_pkg::*;
#(
  parameter int unsigned MESH_X    = 5,
  parameter int unsigned MESH_Y    = 5,
  parameter int unsigned THRESHOLD = 2,
  localparam int unsigned N        = MESH_X * MESH_Y
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      inj_valid,
  input  flit_t             inj_flit   [N],
  output logic [NUM_VC-1:0] inj_credit [N],
  output logic [N-1:0]      ej_valid,
  output flit_t             ej_flit    [N],
  input  logic [NUM_VC-1:0] ej_credit  [N],
  output logic [N-1:0]      ev_adaptive,
  output logic [N-1:0]      ev_override
);

  // Per-router, per-port link signals, indexed [node][port].
  logic [NUM_PORTS-1:0] r_in_valid   [N];
  flit_t                r_in_flit    [N][NUM_PORTS];
  logic [NUM_VC-1:0]    r_in_credit  [N][NUM_PORTS];
  logic [NUM_PORTS-1:0] r_out_valid  [N];
  flit_t                r_out_flit   [N][NUM_PORTS];
  logic [NUM_VC-1:0]    r_out_credit [N][NUM_PORTS];
  logic [NUM_PORTS-1:0] r_flag_out   [N];
  logic [NUM_PORTS-1:0] r_flag_in    [N];
  logic [1:0]           r_cc_out     [N];
  logic [1:0]           r_cc_in      [N][NUM_PORTS];
  logic [NUM_PORTS-1:0] r_ev_adapt   [N];
  logic [NUM_PORTS-1:0] r_ev_ovr     [N];

  // Port on the neighbour that faces port p.
  function automatic int unsigned opposite(input int unsigned p);
    case (p)
      1: return 3;
      2: return 4;
      3: return 1;
      4: return 2;
      default: return 0;
    endcase
  endfunction

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned ID = y * MESH_X + x;
      localparam logic [NUM_PORTS-1:0] EN = {x > 0, y > 0, x < MESH_X - 1, y < MESH_Y - 1, 1'b1};
      // Neighbour node id behind each port (own id where there is none).
      localparam int unsigned NB [NUM_PORTS] = '{ID,
                                                 (y < MESH_Y - 1) ? ID + MESH_X : ID,
                                                 (x < MESH_X - 1) ? ID + 1      : ID,
                                                 (y > 0)          ? ID - MESH_X : ID,
                                                 (x > 0)          ? ID - 1      : ID};

      glb_router #(
        .X        (COORD_W'(x)),
        .Y        (COORD_W'(y)),
        .PORT_EN  (EN),
        .THRESHOLD(THRESHOLD)
      ) u_router (
        .clk          (clk),
        .rst_n        (rst_n),
        .in_valid     (r_in_valid[ID]),
        .in_flit      (r_in_flit[ID]),
        .in_credit    (r_in_credit[ID]),
        .out_valid    (r_out_valid[ID]),
        .out_flit     (r_out_flit[ID]),
        .out_credit   (r_out_credit[ID]),
        .cong_flag_out(r_flag_out[ID]),
        .cong_flag_in (r_flag_in[ID]),
        .cc_out       (r_cc_out[ID]),
        .cc_in        (r_cc_in[ID]),
        .ev_adaptive  (r_ev_adapt[ID]),
        .ev_override  (r_ev_ovr[ID])
      );

      // Local port.
      assign r_in_valid[ID][0]   = inj_valid[ID];
      assign r_in_flit[ID][0]    = inj_flit[ID];
      assign inj_credit[ID]      = r_in_credit[ID][0];
      assign ej_valid[ID]        = r_out_valid[ID][0];
      assign ej_flit[ID]         = r_out_flit[ID][0];
      assign r_out_credit[ID][0] = ej_credit[ID];
      assign r_flag_in[ID][0]    = 1'b0;
      assign r_cc_in[ID][0]      = 2'b00;
      assign ev_adaptive[ID]     = |r_ev_adapt[ID];
      assign ev_override[ID]     = |r_ev_ovr[ID];

      // Mesh ports: connect to the neighbour or tie off.
      for (genvar p = 1; p < NUM_PORTS; p++) begin : g_p
        localparam int unsigned Q = opposite(p);
        if (EN[p]) begin : g_link
          assign r_in_valid[ID][p]   = r_out_valid[NB[p]][Q];
          assign r_in_flit[ID][p]    = r_out_flit[NB[p]][Q];
          assign r_out_credit[ID][p] = r_in_credit[NB[p]][Q];
          assign r_flag_in[ID][p]    = r_flag_out[NB[p]][Q];
          assign r_cc_in[ID][p]      = r_cc_out[NB[p]];
        end else begin : g_edge
          assign r_in_valid[ID][p]   = 1'b0;
          assign r_in_flit[ID][p]    = '0;
          assign r_out_credit[ID][p] = '0;
          assign r_flag_in[ID][p]    = 1'b0;
          assign r_cc_in[ID][p]      = 2'b00;
        end
      end
    end
  end

endmodule
