// glb_route_dyxy: Dynamic XY (DyXY) routing unit of one router input.
//
// Minimal adaptive routing without extra virtual channels. When the destination differs
// from the current node in only one dimension, that direction is returned. When it differs
// in both, both the X and the Y direction are admissible and the selection looks at the
// congestion flags of the neighbours' input buffers on those two sides: the Y direction is
// taken only if the X neighbour is congested and the Y neighbour is not; otherwise X is
// taken. A packet at its destination goes to the local port.
//
// Combinational. Inputs: this router's coordinates, the destination from the head flit and
// the downstream congestion flags indexed by port. Output: the port and an "adaptive"
// indication that the non-default (Y-first) choice was made. DyXY and the use of a
// thresholded buffer occupancy follow the source; the tie rule (prefer X) is this design's.
module glb_route_dyxy
  import glb_pkg::*;
(
  input  logic [COORD_W-1:0]   cur_x,
  input  logic [COORD_W-1:0]   cur_y,
  input  logic [COORD_W-1:0]   dst_x,
  input  logic [COORD_W-1:0]   dst_y,
  input  logic [NUM_PORTS-1:0] nb_cong,    // congestion flag of the neighbour behind each port
  output port_e                out_port,
  output logic                 adaptive    // Y chosen although X was also productive
);

  port_e dir_x, dir_y;

  always_comb begin
    dir_x    = (dst_x > cur_x) ? P_EAST  : P_WEST;
    dir_y    = (dst_y > cur_y) ? P_NORTH : P_SOUTH;
    adaptive = 1'b0;
    if (dst_x == cur_x && dst_y == cur_y) begin
      out_port = P_LOCAL;
    end else if (dst_y == cur_y) begin
      out_port = dir_x;
    end else if (dst_x == cur_x) begin
      out_port = dir_y;
    end else if (nb_cong[dir_x] && !nb_cong[dir_y]) begin
      out_port = dir_y;
      adaptive = 1'b1;
    end else begin
      out_port = dir_x;
    end
  end

endmodule
