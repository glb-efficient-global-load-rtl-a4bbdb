// glb_master_ni: network interface between a processor (master core) and its router.
//
// Request side. The processor presents one request at a time (req_valid/req_ready) with
// the memory node's mesh coordinates, a 32-bit address, a write bit and a burst length of
// 1..MAX_BURST words. The interface turns it into a request packet on VC 0:
//   flit 0: head with destination, source, write bit, burst length - 1 and tag;
//   flit 1: the address (tail for a read);
//   flits 2..: the write data, taken from the w* stream (tail on the last word).
// Every flit needs a VC 0 credit from the router's local input port.
//
// Reorder buffer. Memories answer in any order, so read data is collected in a reorder
// buffer of ROB_WORDS words split into ROB_WORDS/MAX_BURST slots of MAX_BURST words (48
// words and bursts of up to 8 give 6 slots, i.e. 6 outstanding reads whatever their
// sizes). A read is only issued when a slot is free; the slot number is the packet tag
// and comes back in the response header. Slots are allocated and retired in issue order,
// so the r* stream returns the read data in the order the reads were issued, each burst
// ending with rlast. Write responses (one-flit packets) are counted and returned on b*.
//
// Response side. Response flits (VC 1) are always accepted, since their space was
// reserved at issue, and the credit goes back the next cycle.
//
// From the source: the packet formats, the 48-word reorder buffer, the maximum burst of 8
// and the 6-outstanding-read consequence, requests on one VC and responses on the other.
// This design's own: the simplified processor interface (not full AXI), the field layout,
// the in-order slot allocation and the unordered write responses.
module glb_master_ni
  import glb_pkg::*;
#(
  parameter logic [COORD_W-1:0] X         = '0,
  parameter logic [COORD_W-1:0] Y         = '0,
  parameter int unsigned        ROB_WORDS = 48,
  parameter int unsigned        MAX_BURST = 8,
  localparam int unsigned       SLOTS     = ROB_WORDS / MAX_BURST,
  localparam int unsigned       SLOT_W    = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  localparam int unsigned       WORD_W    = $clog2(MAX_BURST)
) (
  input  logic               clk,
  input  logic               rst_n,
  // processor: requests
  input  logic               req_valid,
  output logic               req_ready,
  input  logic               req_write,
  input  logic [COORD_W-1:0] req_dst_x,
  input  logic [COORD_W-1:0] req_dst_y,
  input  logic [31:0]        req_addr,
  input  logic [WORD_W-1:0]  req_len_m1,   // burst length - 1
  // processor: write data
  input  logic               wvalid,
  output logic               wready,
  input  logic [31:0]        wdata,
  // processor: read data, in issue order
  output logic               rvalid,
  input  logic               rready,
  output logic [31:0]        rdata,
  output logic               rlast,
  // processor: write responses
  output logic               bvalid,
  input  logic               bready,
  // router local port
  output logic               inj_valid,
  output flit_t              inj_flit,
  input  logic [NUM_VC-1:0]  inj_credit,
  input  logic               ej_valid,
  input  flit_t              ej_flit,
  output logic [NUM_VC-1:0]  ej_credit
);

  localparam int unsigned CRED_W = $clog2(VC_DEPTH + 1);

  // ------------------------------------------------------------ request packetiser
  typedef enum logic [1:0] {T_IDLE, T_ADDR, T_WDATA} tx_state_e;
  tx_state_e          tx_state;
  logic [CRED_W-1:0]  credits;
  logic [31:0]        addr_q;
  logic               write_q;
  logic [WORD_W-1:0]  len_q, wcnt;
  logic               have_credit;

  // reorder buffer state
  logic [31:0]        rob      [SLOTS * MAX_BURST];
  logic [SLOTS-1:0]   slot_busy, slot_done;
  logic [WORD_W-1:0]  slot_len [SLOTS];
  logic [SLOT_W-1:0]  alloc_ptr, retire_ptr;
  logic [WORD_W-1:0]  rd_word;
  logic [TAG_W-1:0]   wtag;

  assign have_credit = credits != '0;

  always_comb begin
    req_ready = 1'b0;
    wready    = 1'b0;
    inj_valid = 1'b0;
    inj_flit  = '0;
    inj_flit.vc = 1'b0;
    unique case (tx_state)
      T_IDLE: begin
        req_ready = have_credit && (req_write || !slot_busy[alloc_ptr]);
        if (req_valid && req_ready) begin
          inj_valid     = 1'b1;
          inj_flit.head = 1'b1;
          inj_flit.data = mk_header(req_dst_x, req_dst_y, X, Y, req_write,
                                    BURST_W'(req_len_m1),
                                    req_write ? wtag : TAG_W'(alloc_ptr));
        end
      end
      T_ADDR: begin
        inj_valid     = have_credit;
        inj_flit.tail = !write_q;
        inj_flit.data = addr_q;
      end
      T_WDATA: begin
        wready        = have_credit;
        inj_valid     = have_credit && wvalid;
        inj_flit.tail = (wcnt == len_q);
        inj_flit.data = wdata;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_state  <= T_IDLE;
      credits   <= CRED_W'(VC_DEPTH);
      addr_q    <= '0;
      write_q   <= 1'b0;
      len_q     <= '0;
      wcnt      <= '0;
      wtag      <= TAG_W'(1) << (TAG_W - 1);
      alloc_ptr <= '0;
    end else begin
      credits <= credits - CRED_W'(inj_valid) + CRED_W'(inj_credit[0]);
      unique case (tx_state)
        T_IDLE: if (req_valid && req_ready) begin
          addr_q   <= req_addr;
          write_q  <= req_write;
          len_q    <= req_len_m1;
          wcnt     <= '0;
          tx_state <= T_ADDR;
          if (req_write) wtag <= wtag + 1'b1;
          else alloc_ptr <= (alloc_ptr == SLOT_W'(SLOTS - 1)) ? '0 : alloc_ptr + 1'b1;
        end
        T_ADDR: if (have_credit) tx_state <= write_q ? T_WDATA : T_IDLE;
        T_WDATA: if (inj_valid) begin
          wcnt <= wcnt + 1'b1;
          if (wcnt == len_q) tx_state <= T_IDLE;
        end
        default: tx_state <= T_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------ response receiver + ROB
  logic [SLOT_W-1:0] rx_slot;
  logic [WORD_W-1:0] rx_word;
  logic [3:0]        b_pending;
  logic              b_inc;

  assign b_inc = ej_valid && ej_flit.head && ej_flit.data[WR_BIT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_busy  <= '0;
      slot_done  <= '0;
      retire_ptr <= '0;
      rd_word    <= '0;
      rx_slot    <= '0;
      rx_word    <= '0;
      b_pending  <= '0;
      ej_credit  <= '0;
      for (int s = 0; s < SLOTS; s++) slot_len[s] <= '0;
    end else begin
      ej_credit <= '0;
      if (ej_valid) ej_credit[ej_flit.vc] <= 1'b1;
      // allocation at issue
      if (tx_state == T_IDLE && req_valid && req_ready && !req_write) begin
        slot_busy[alloc_ptr] <= 1'b1;
        slot_len[alloc_ptr]  <= req_len_m1;
      end
      // read response data
      if (ej_valid && ej_flit.head && !ej_flit.data[WR_BIT]) begin
        rx_slot <= SLOT_W'(ej_flit.data[TAG_W-1:0]);
        rx_word <= '0;
      end else if (ej_valid && !ej_flit.head) begin
        rx_word <= rx_word + 1'b1;
        if (ej_flit.tail) slot_done[rx_slot] <= 1'b1;
      end
      // write responses
      b_pending <= b_pending + 4'(b_inc) - 4'(bvalid && bready);
      // in-order delivery
      if (rvalid && rready) begin
        if (rlast) begin
          rd_word                <= '0;
          slot_busy[retire_ptr]  <= 1'b0;
          slot_done[retire_ptr]  <= 1'b0;
          retire_ptr <= (retire_ptr == SLOT_W'(SLOTS - 1)) ? '0 : retire_ptr + 1'b1;
        end else begin
          rd_word <= rd_word + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (ej_valid && !ej_flit.head)
      rob[{rx_slot, rx_word}] <= ej_flit.data;
  end

  assign rvalid = slot_done[retire_ptr];
  assign rdata  = rob[{retire_ptr, rd_word}];
  assign rlast  = (rd_word == slot_len[retire_ptr]);
  assign bvalid = b_pending != '0;

  // Responses only ever arrive on VC 1; the credit counter never exceeds the buffer depth.
  assert property (@(posedge clk) disable iff (!rst_n) ej_valid |-> ej_flit.vc == 1'b1)
    else $error("glb_master_ni: response on the request VC");
  assert property (@(posedge clk) disable iff (!rst_n) credits <= CRED_W'(VC_DEPTH))
    else $error("glb_master_ni: credit overflow");

endmodule
