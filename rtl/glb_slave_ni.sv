// glb_slave_ni: network interface between a router and a memory controller (slave core).
//
// Request packets arrive on VC 0 into a VC_DEPTH-flit buffer; a credit is returned to the
// router for every flit taken out. One request is served at a time:
//   HDR   take the head flit: requester coordinates, write bit, burst length, tag;
//   ADDR  take the address flit;
//   CMD   present the command on mem_cmd_* until the memory controller accepts it;
//   WDATA (writes) hand the write-data flits to the controller on mem_w*;
//   RSPH  send the response head flit on VC 1 to the requester (a write response is this
//         one flit);
//   RDATA (reads) forward each word from mem_r* as a response flit, the last one as tail.
// Response flits need VC 1 credits of the router's local input port; mem_rready is low
// while there is none.
//
// From the source: the request and response packet formats, requests and responses on
// separate VCs, the slave interface sitting between network and memory controller. This
// design's own: the simple command / data handshake toward the controller and serving one
// request at a time.
module glb_slave_ni
  import glb_pkg::*;
#(
  parameter logic [COORD_W-1:0] X = '0,
  parameter logic [COORD_W-1:0] Y = '0
) (
  input  logic               clk,
  input  logic               rst_n,
  // router local port
  input  logic               ej_valid,
  input  flit_t              ej_flit,
  output logic [NUM_VC-1:0]  ej_credit,
  output logic               inj_valid,
  output flit_t              inj_flit,
  input  logic [NUM_VC-1:0]  inj_credit,
  // memory controller
  output logic               mem_cmd_valid,
  input  logic               mem_cmd_ready,
  output logic               mem_cmd_write,
  output logic [31:0]        mem_cmd_addr,
  output logic [BURST_W-1:0] mem_cmd_len_m1,
  output logic               mem_wvalid,
  input  logic               mem_wready,
  output logic [31:0]        mem_wdata,
  input  logic               mem_rvalid,
  output logic               mem_rready,
  input  logic [31:0]        mem_rdata
);

  localparam int unsigned CRED_W = $clog2(VC_DEPTH + 1);
  localparam int unsigned CNT_W  = $clog2(VC_DEPTH + 1);

  typedef enum logic [2:0] {S_HDR, S_ADDR, S_CMD, S_WDATA, S_RSPH, S_RDATA} state_e;
  state_e state;

  flit_t             q_flit;
  logic [CNT_W-1:0]  q_cnt;
  logic              q_pop, q_nonempty;

  glb_fifo #(.WIDTH(FLIT_BITS), .DEPTH(VC_DEPTH)) u_reqbuf (
    .clk    (clk),
    .rst_n  (rst_n),
    .wr_en  (ej_valid && ej_flit.vc == 1'b0),
    .wr_data(ej_flit),
    .rd_en  (q_pop),
    .rd_data(q_flit),
    .count  (q_cnt)
  );
  assign q_nonempty = q_cnt != '0;

  logic [CRED_W-1:0]  credits;
  logic               have_credit;
  logic [COORD_W-1:0] src_x, src_y;
  logic               wr_q;
  logic [BURST_W-1:0] len_q, cnt;
  logic [TAG_W-1:0]   tag_q;
  logic [31:0]        addr_q;

  assign have_credit = credits != '0;

  always_comb begin
    q_pop          = 1'b0;
    mem_cmd_valid  = (state == S_CMD);
    mem_cmd_write  = wr_q;
    mem_cmd_addr   = addr_q;
    mem_cmd_len_m1 = len_q;
    mem_wvalid     = (state == S_WDATA) && q_nonempty;
    mem_wdata      = q_flit.data;
    mem_rready     = (state == S_RDATA) && have_credit;
    inj_valid      = 1'b0;
    inj_flit       = '0;
    inj_flit.vc    = 1'b1;
    unique case (state)
      S_HDR:   q_pop = q_nonempty;
      S_ADDR:  q_pop = q_nonempty;
      S_WDATA: q_pop = q_nonempty && mem_wready;
      S_RSPH: begin
        inj_valid     = have_credit;
        inj_flit.head = 1'b1;
        inj_flit.tail = wr_q;
        inj_flit.data = mk_header(src_x, src_y, X, Y, wr_q, len_q, tag_q);
      end
      S_RDATA: begin
        inj_valid     = have_credit && mem_rvalid;
        inj_flit.tail = (cnt == len_q);
        inj_flit.data = mem_rdata;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_HDR;
      credits   <= CRED_W'(VC_DEPTH);
      ej_credit <= '0;
      src_x     <= '0;
      src_y     <= '0;
      wr_q      <= 1'b0;
      len_q     <= '0;
      cnt       <= '0;
      tag_q     <= '0;
      addr_q    <= '0;
    end else begin
      credits   <= credits - CRED_W'(inj_valid) + CRED_W'(inj_credit[1]);
      ej_credit <= {1'b0, q_pop};
      unique case (state)
        S_HDR: if (q_nonempty) begin
          src_x <= q_flit.data[SX_LSB +: COORD_W];
          src_y <= q_flit.data[SY_LSB +: COORD_W];
          wr_q  <= q_flit.data[WR_BIT];
          len_q <= q_flit.data[BURST_LSB +: BURST_W];
          tag_q <= q_flit.data[TAG_W-1:0];
          state <= S_ADDR;
        end
        S_ADDR: if (q_nonempty) begin
          addr_q <= q_flit.data;
          state  <= S_CMD;
        end
        S_CMD: if (mem_cmd_ready) begin
          cnt   <= '0;
          state <= wr_q ? S_WDATA : S_RSPH;
        end
        S_WDATA: if (q_pop) begin
          cnt <= cnt + 1'b1;
          if (q_flit.tail) state <= S_RSPH;
        end
        S_RSPH: if (have_credit) begin
          cnt   <= '0;
          state <= wr_q ? S_HDR : S_RDATA;
        end
        S_RDATA: if (inj_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == len_q) state <= S_HDR;
        end
        default: state <= S_HDR;
      endcase
    end
  end

  // The request stream is well formed: a head flit starts each request.
  assert property (@(posedge clk) disable iff (!rst_n) state == S_HDR && q_nonempty |-> q_flit.head)
    else $error("glb_slave_ni: request does not start with a head flit");
  assert property (@(posedge clk) disable iff (!rst_n) ej_valid |-> ej_flit.vc == 1'b0)
    else $error("glb_slave_ni: response arrived at a memory");

endmodule
