// glb_router: five-port wormhole router with Global Load Balancing (GLB) arbitration.
//
// Ports 0..4 are local, north, east, south, west. Every input port has NUM_VC virtual
// channels (VC 0 requests, VC 1 responses) of VC_DEPTH flits. A flit moves through:
//   1. input buffer (glb_fifo), written the cycle after it appears on in_flit;
//   2. routing (glb_route_dyxy) for a head flit at the buffer head: DyXY picks X or Y from
//      the congestion flags of the downstream neighbours; body flits follow the route and
//      Congestion Status stored when their head left;
//   3. VC reservation (glb_vc_alloc) and credit check: a head flit needs a free output VC,
//      every flit needs a credit for its output VC;
//   4. switch allocation (glb_switch_alloc) with the GLB priority: Congestion Status of
//      the packet plus the rounds it has lost;
//   5. crossbar (glb_crossbar), which rewrites the head flit's Congestion Status as the
//      mean of the carried value and this router's local congestion value (glb_congestion),
//      into the output register.
// A flit that wins leaves its buffer and appears on out_flit the next cycle, so a hop
// costs two cycles when uncontended. Flow control is credit based: a credit pulse per VC
// goes upstream the cycle after a flit leaves an input buffer, and an output VC credit
// counter starts at VC_DEPTH.
//
// Side-band wires: cong_flag_out[p] is the congestion flag of input port p (for the
// neighbour on that side), cong_flag_in[p] the flag of the neighbour input fed by output p,
// cc_out this router's 2-bit Congestion Condition, cc_in[p] the neighbour's. PORT_EN marks
// the connected ports (edge routers). ev_adaptive and ev_override are one-cycle event
// strobes for statistics: a head flit took the Y direction because X was congested, and an
// output was granted by priority rather than by index order.
//
// From the source: 5 ports, 2 VCs of 5 flits, 32-bit flits, wormhole switching, DyXY,
// thresholded buffer occupancy as congestion flag, Table 1 condition codes, the 4-bit
// Congestion Status with 50-50 update and the C+W priority arbitration. This design's own:
// credit flow control, the single-cycle allocation, the threshold value, the field layout.
module glb_router
  import glb_pkg::*;
#(
  parameter logic [COORD_W-1:0]   X         = '0,
  parameter logic [COORD_W-1:0]   Y         = '0,
  parameter logic [NUM_PORTS-1:0] PORT_EN   = '1,
  parameter int unsigned          THRESHOLD = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // input links
  input  logic [NUM_PORTS-1:0] in_valid,
  input  flit_t                in_flit   [NUM_PORTS],
  output logic [NUM_VC-1:0]    in_credit [NUM_PORTS],
  // output links
  output logic [NUM_PORTS-1:0] out_valid,
  output flit_t                out_flit  [NUM_PORTS],
  input  logic [NUM_VC-1:0]    out_credit[NUM_PORTS],
  // congestion side-band
  output logic [NUM_PORTS-1:0] cong_flag_out,
  input  logic [NUM_PORTS-1:0] cong_flag_in,
  output logic [1:0]           cc_out,
  input  logic [1:0]           cc_in     [NUM_PORTS],
  // statistics strobes
  output logic [NUM_PORTS-1:0] ev_adaptive,
  output logic [NUM_PORTS-1:0] ev_override
);

  localparam int unsigned CNT_W  = $clog2(VC_DEPTH + 1);
  localparam int unsigned OCC_W  = $clog2(NUM_VC * VC_DEPTH + 1);
  localparam int unsigned PI_W   = $clog2(NUM_PORTS);
  localparam int unsigned VI_W   = $clog2(NUM_VC);

  // ---------------------------------------------------------------- input buffers
  flit_t             head_flit [NUM_PORTS][NUM_VC];
  logic [CNT_W-1:0]  buf_cnt   [NUM_PORTS][NUM_VC];
  logic [NUM_VC-1:0] gnt       [NUM_PORTS];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
      glb_fifo #(.WIDTH(FLIT_BITS), .DEPTH(VC_DEPTH)) u_buf (
        .clk    (clk),
        .rst_n  (rst_n),
        .wr_en  (PORT_EN[p] && in_valid[p] && in_flit[p].vc == VI_W'(v)),
        .wr_data(in_flit[p]),
        .rd_en  (gnt[p][v]),
        .rd_data(head_flit[p][v]),
        .count  (buf_cnt[p][v])
      );
    end
  end

  // ---------------------------------------------------------------- congestion
  logic [OCC_W-1:0] occupancy [NUM_PORTS];
  logic [1:0]       cc_nb_sum;
  logic [CS_W-1:0]  local_cv;

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      occupancy[p] = '0;
      for (int v = 0; v < NUM_VC; v++) occupancy[p] = occupancy[p] + OCC_W'(buf_cnt[p][v]);
    end
  end

  glb_congestion #(.PORT_EN(PORT_EN), .THRESHOLD(THRESHOLD), .OCC_W(OCC_W)) u_cong (
    .occupancy(occupancy),
    .cc_nb_in (cc_in),
    .cong_flag(cong_flag_out),
    .cc_own   (cc_out),
    .cc_nb    (cc_nb_sum),
    .local_cv (local_cv)
  );

  // ---------------------------------------------------------------- routing
  port_e            rc_port   [NUM_PORTS][NUM_VC];
  logic             rc_adapt  [NUM_PORTS][NUM_VC];
  port_e            route_q   [NUM_PORTS][NUM_VC];
  logic [CS_W-1:0]  cs_q      [NUM_PORTS][NUM_VC];
  port_e            route_sel [NUM_PORTS][NUM_VC];
  logic [CS_W-1:0]  cs_sel    [NUM_PORTS][NUM_VC];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_rc_p
    for (genvar v = 0; v < NUM_VC; v++) begin : g_rc_v
      glb_route_dyxy u_rc (
        .cur_x   (X),
        .cur_y   (Y),
        .dst_x   (hdr_dx(head_flit[p][v].data)),
        .dst_y   (hdr_dy(head_flit[p][v].data)),
        .nb_cong (cong_flag_in),
        .out_port(rc_port[p][v]),
        .adaptive(rc_adapt[p][v])
      );
    end
  end

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++)
      for (int v = 0; v < NUM_VC; v++) begin
        route_sel[p][v] = head_flit[p][v].head ? rc_port[p][v] : route_q[p][v];
        cs_sel[p][v]    = head_flit[p][v].head ? hdr_cs(head_flit[p][v].data) : cs_q[p][v];
      end
  end

  // ---------------------------------------------------------------- VC reservation + credits
  logic [NUM_VC-1:0] ovc_free  [NUM_PORTS];
  logic [PI_W-1:0]   ovc_owner [NUM_PORTS][NUM_VC];
  logic [CNT_W-1:0]  credits   [NUM_PORTS][NUM_VC];

  // ---------------------------------------------------------------- switch allocation
  logic [NUM_VC-1:0] req     [NUM_PORTS];
  logic [NUM_VC-1:0] is_tail [NUM_PORTS];
  logic [VI_W-1:0]   in_vc   [NUM_PORTS];
  logic [NUM_PORTS-1:0] xb_valid;
  logic [PI_W-1:0]   xb_src  [NUM_PORTS];

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++)
      for (int v = 0; v < NUM_VC; v++) begin
        port_e o;
        o = route_sel[p][v];
        is_tail[p][v] = head_flit[p][v].tail;
        req[p][v] = PORT_EN[p] && buf_cnt[p][v] != '0 && PORT_EN[o] &&
                    credits[o][v] != '0 &&
                    (head_flit[p][v].head ? ovc_free[o][v] : 1'b1);
      end
  end

  glb_switch_alloc u_sa (
    .clk        (clk),
    .rst_n      (rst_n),
    .req        (req),
    .req_port   (route_sel),
    .cs         (cs_sel),
    .is_tail    (is_tail),
    .gnt        (gnt),
    .in_vc      (in_vc),
    .out_valid  (xb_valid),
    .out_src    (xb_src),
    .ev_override(ev_override)
  );

  // ---------------------------------------------------------------- crossbar
  flit_t xb_in  [NUM_PORTS];
  flit_t xb_out [NUM_PORTS];
  logic [NUM_PORTS-1:0] xb_out_valid;

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) xb_in[p] = head_flit[p][in_vc[p]];
  end

  glb_crossbar u_xb (
    .in_flit  (xb_in),
    .sel      (xb_src),
    .valid    (xb_valid),
    .local_cv (local_cv),
    .out_flit (xb_out),
    .out_valid(xb_out_valid)
  );

  logic fire_vc   [NUM_PORTS];
  logic fire_head [NUM_PORTS];
  logic fire_tail [NUM_PORTS];

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      fire_vc[o]   = xb_out[o].vc;
      fire_head[o] = xb_out[o].head;
      fire_tail[o] = xb_out[o].tail;
    end
  end

  glb_vc_alloc u_va (
    .clk      (clk),
    .rst_n    (rst_n),
    .fire     (xb_out_valid),
    .fire_vc  (fire_vc),
    .fire_head(fire_head),
    .fire_tail(fire_tail),
    .fire_src (xb_src),
    .ovc_free (ovc_free),
    .ovc_owner(ovc_owner)
  );

  // ---------------------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= '0;
      ev_adaptive <= '0;
      for (int p = 0; p < NUM_PORTS; p++) begin
        out_flit[p]  <= '0;
        in_credit[p] <= '0;
        for (int v = 0; v < NUM_VC; v++) begin
          credits[p][v] <= CNT_W'(VC_DEPTH);
          route_q[p][v] <= P_LOCAL;
          cs_q[p][v]    <= '0;
        end
      end
    end else begin
      out_valid <= xb_out_valid;
      for (int o = 0; o < NUM_PORTS; o++) begin
        if (xb_out_valid[o]) out_flit[o] <= xb_out[o];
        for (int v = 0; v < NUM_VC; v++) begin
          case ({xb_out_valid[o] && xb_out[o].vc == VI_W'(v), out_credit[o][v]})
            2'b10:   credits[o][v] <= credits[o][v] - 1'b1;
            2'b01:   credits[o][v] <= credits[o][v] + 1'b1;
            default: credits[o][v] <= credits[o][v];
          endcase
        end
      end
      for (int p = 0; p < NUM_PORTS; p++) begin
        in_credit[p]   <= gnt[p];
        ev_adaptive[p] <= 1'b0;
        for (int v = 0; v < NUM_VC; v++) begin
          if (gnt[p][v] && head_flit[p][v].head) begin
            route_q[p][v]  <= rc_port[p][v];
            cs_q[p][v]     <= hdr_cs(head_flit[p][v].data);
            if (rc_adapt[p][v]) ev_adaptive[p] <= 1'b1;
          end
        end
      end
    end
  end

  // A credit counter never exceeds the downstream buffer depth.
  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_cchk
    for (genvar v = 0; v < NUM_VC; v++) begin : g_v
      assert property (@(posedge clk) disable iff (!rst_n) credits[o][v] <= CNT_W'(VC_DEPTH))
        else $error("glb_router: credit overflow");
    end
  end

endmodule
