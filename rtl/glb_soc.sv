// glb_soc: the complete GLB network-on-chip system, a 5x5 mesh of GLB routers with a
// network interface at every node. Rows 1 and 3 hold the processors (master interfaces,
// glb_master_ni), rows 0, 2 and 4 the memories (slave interfaces, glb_slave_ni): ten
// processors and fifteen memories. Processor i is at node ((i / MESH_X) * 2 + 1) * MESH_X
// + i % MESH_X, memory j at node ((j / MESH_X) * 2) * MESH_X + j % MESH_X, so processor
// ports are numbered row by row from the south, and so are memory ports.
//
// The processors and the memory controllers are outside this module: each processor's
// request, write-data, read-data and write-response channels and each memory
// controller's command, write-data and read-data channels are ports of glb_soc, indexed
// by processor or memory number. A processor addresses a memory by its mesh coordinates.
// Timing and flow control are those of glb_master_ni, glb_slave_ni and glb_mesh.
//
// The mesh size and the processor/memory placement follow the source; the port
// arrangement is this design's own.
module glb_soc
  import glb_pkg::*;
#(
  parameter int unsigned MESH_X    = 5,
  parameter int unsigned MESH_Y    = 5,
  parameter int unsigned THRESHOLD = 2,
  parameter int unsigned ROB_WORDS = 48,
  parameter int unsigned MAX_BURST = 8,
  localparam int unsigned N        = MESH_X * MESH_Y,
  localparam int unsigned NP       = MESH_X * (MESH_Y / 2),
  localparam int unsigned NM       = N - NP,
  localparam int unsigned WORD_W   = $clog2(MAX_BURST)
) (
  input  logic               clk,
  input  logic               rst_n,
  // processors
  input  logic [NP-1:0]      p_req_valid,
  output logic [NP-1:0]      p_req_ready,
  input  logic [NP-1:0]      p_req_write,
  input  logic [COORD_W-1:0] p_req_dst_x  [NP],
  input  logic [COORD_W-1:0] p_req_dst_y  [NP],
  input  logic [31:0]        p_req_addr   [NP],
  input  logic [WORD_W-1:0]  p_req_len_m1 [NP],
  input  logic [NP-1:0]      p_wvalid,
  output logic [NP-1:0]      p_wready,
  input  logic [31:0]        p_wdata      [NP],
  output logic [NP-1:0]      p_rvalid,
  input  logic [NP-1:0]      p_rready,
  output logic [31:0]        p_rdata      [NP],
  output logic [NP-1:0]      p_rlast,
  output logic [NP-1:0]      p_bvalid,
  input  logic [NP-1:0]      p_bready,
  // memory controllers
  output logic [NM-1:0]      m_cmd_valid,
  input  logic [NM-1:0]      m_cmd_ready,
  output logic [NM-1:0]      m_cmd_write,
  output logic [31:0]        m_cmd_addr   [NM],
  output logic [BURST_W-1:0] m_cmd_len_m1 [NM],
  output logic [NM-1:0]      m_wvalid,
  input  logic [NM-1:0]      m_wready,
  output logic [31:0]        m_wdata      [NM],
  input  logic [NM-1:0]      m_rvalid,
  output logic [NM-1:0]      m_rready,
  input  logic [31:0]        m_rdata      [NM],
  // statistics strobes per node
  output logic [N-1:0]       ev_adaptive,
  output logic [N-1:0]       ev_override
);

  logic [N-1:0]      inj_valid;
  flit_t             inj_flit   [N];
  logic [NUM_VC-1:0] inj_credit [N];
  logic [N-1:0]      ej_valid;
  flit_t             ej_flit    [N];
  logic [NUM_VC-1:0] ej_credit  [N];

  glb_mesh #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .THRESHOLD(THRESHOLD)) u_mesh (
    .clk        (clk),
    .rst_n      (rst_n),
    .inj_valid  (inj_valid),
    .inj_flit   (inj_flit),
    .inj_credit (inj_credit),
    .ej_valid   (ej_valid),
    .ej_flit    (ej_flit),
    .ej_credit  (ej_credit),
    .ev_adaptive(ev_adaptive),
    .ev_override(ev_override)
  );

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned ID = y * MESH_X + x;
      if (y % 2 == 1) begin : g_proc
        localparam int unsigned I = (y / 2) * MESH_X + x;
        glb_master_ni #(
          .X(COORD_W'(x)), .Y(COORD_W'(y)), .ROB_WORDS(ROB_WORDS), .MAX_BURST(MAX_BURST)
        ) u_ni (
          .clk       (clk),
          .rst_n     (rst_n),
          .req_valid (p_req_valid[I]),
          .req_ready (p_req_ready[I]),
          .req_write (p_req_write[I]),
          .req_dst_x (p_req_dst_x[I]),
          .req_dst_y (p_req_dst_y[I]),
          .req_addr  (p_req_addr[I]),
          .req_len_m1(p_req_len_m1[I]),
          .wvalid    (p_wvalid[I]),
          .wready    (p_wready[I]),
          .wdata     (p_wdata[I]),
          .rvalid    (p_rvalid[I]),
          .rready    (p_rready[I]),
          .rdata     (p_rdata[I]),
          .rlast     (p_rlast[I]),
          .bvalid    (p_bvalid[I]),
          .bready    (p_bready[I]),
          .inj_valid (inj_valid[ID]),
          .inj_flit  (inj_flit[ID]),
          .inj_credit(inj_credit[ID]),
          .ej_valid  (ej_valid[ID]),
          .ej_flit   (ej_flit[ID]),
          .ej_credit (ej_credit[ID])
        );
      end else begin : g_mem
        localparam int unsigned J = (y / 2) * MESH_X + x;
        glb_slave_ni #(.X(COORD_W'(x)), .Y(COORD_W'(y))) u_ni (
          .clk           (clk),
          .rst_n         (rst_n),
          .ej_valid      (ej_valid[ID]),
          .ej_flit       (ej_flit[ID]),
          .ej_credit     (ej_credit[ID]),
          .inj_valid     (inj_valid[ID]),
          .inj_flit      (inj_flit[ID]),
          .inj_credit    (inj_credit[ID]),
          .mem_cmd_valid (m_cmd_valid[J]),
          .mem_cmd_ready (m_cmd_ready[J]),
          .mem_cmd_write (m_cmd_write[J]),
          .mem_cmd_addr  (m_cmd_addr[J]),
          .mem_cmd_len_m1(m_cmd_len_m1[J]),
          .mem_wvalid    (m_wvalid[J]),
          .mem_wready    (m_wready[J]),
          .mem_wdata     (m_wdata[J]),
          .mem_rvalid    (m_rvalid[J]),
          .mem_rready    (m_rready[J]),
          .mem_rdata     (m_rdata[J])
        );
      end
    end
  end

endmodule
