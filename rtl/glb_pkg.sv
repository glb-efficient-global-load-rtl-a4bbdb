// glb_pkg: types and constants shared by the GLB (Global Load Balancing) router and mesh.
//
// A flit is 32 data bits plus three sideband bits (head, tail, virtual channel). The head
// flit of every packet carries a 4-bit Congestion Status field, which each router on the
// path overwrites with the mean of the old value and its own 4-bit local congestion value.
// That field is what the switch allocator uses as the packet's priority.
//
// From the source: 32-bit flits, 2 VCs per input port, 5 flits per VC, 5 ports, a 4-bit
// Congestion Status field, the 50-50 averaging. Own choices: the position of the fields in
// the head flit, the sideband bits, the port numbering and the rounding of the average.
package glb_pkg;

  localparam int unsigned FLIT_W    = 32;  // flit (data) width
  localparam int unsigned NUM_VC    = 2;   // VC 0: requests, VC 1: responses
  localparam int unsigned VC_DEPTH  = 5;   // flits per VC buffer
  localparam int unsigned NUM_PORTS = 5;
  localparam int unsigned CS_W      = 4;   // Congestion Status field width
  localparam int unsigned COORD_W   = 3;   // mesh coordinate width (up to 8x8)
  localparam int unsigned WAIT_W    = 4;   // waiting-period counter of the input selection
  localparam int unsigned PRIO_W    = 5;   // CS + waiting period, saturating

  // Port numbering. Y grows to the north, X to the east.
  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,
    P_EAST  = 3'd2,
    P_SOUTH = 3'd3,
    P_WEST  = 3'd4
  } port_e;

  typedef struct packed {
    logic              head;
    logic              tail;
    logic              vc;
    logic [FLIT_W-1:0] data;
  } flit_t;

  localparam int unsigned FLIT_BITS = $bits(flit_t);

  // Head flit data layout:
  //   [31:28] congestion status   [27:25] destination x   [24:22] destination y
  //   [21:19] source x            [18:16] source y        [15:0]  command / control bits
  localparam int unsigned CS_LSB  = 28;
  localparam int unsigned DX_LSB  = 25;
  localparam int unsigned DY_LSB  = 22;
  localparam int unsigned SX_LSB  = 19;
  localparam int unsigned SY_LSB  = 16;
  // Command / control bits of the head flit, as used by the network interfaces:
  //   [15] write   [14:12] burst length - 1   [11:0] tag
  localparam int unsigned WR_BIT    = 15;
  localparam int unsigned BURST_LSB = 12;
  localparam int unsigned BURST_W   = 3;   // bursts of 1..8 words
  localparam int unsigned TAG_W     = 12;

  function automatic logic [FLIT_W-1:0] mk_header(input logic [COORD_W-1:0] dx,
                                                  input logic [COORD_W-1:0] dy,
                                                  input logic [COORD_W-1:0] sx,
                                                  input logic [COORD_W-1:0] sy,
                                                  input logic               wr,
                                                  input logic [BURST_W-1:0] len_m1,
                                                  input logic [TAG_W-1:0]   tag);
    return {CS_W'(0), dx, dy, sx, sy, wr, len_m1, tag};
  endfunction

  function automatic logic [CS_W-1:0] hdr_cs(input logic [FLIT_W-1:0] d);
    return d[CS_LSB +: CS_W];
  endfunction

  function automatic logic [COORD_W-1:0] hdr_dx(input logic [FLIT_W-1:0] d);
    return d[DX_LSB +: COORD_W];
  endfunction

  function automatic logic [COORD_W-1:0] hdr_dy(input logic [FLIT_W-1:0] d);
    return d[DY_LSB +: COORD_W];
  endfunction

  // 50-50 weighting of the carried (non-local) and the local congestion value, rounded down.
  function automatic logic [CS_W-1:0] cs_combine(input logic [CS_W-1:0] carried,
                                                 input logic [CS_W-1:0] local_cv);
    logic [CS_W:0] sum;
    sum = {1'b0, carried} + {1'b0, local_cv};
    return sum[CS_W:1];
  endfunction

endpackage
