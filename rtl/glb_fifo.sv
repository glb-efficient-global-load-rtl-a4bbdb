// glb_fifo: the flit buffer of one virtual channel at a router input port.
//
// A circular buffer of DEPTH entries (DEPTH need not be a power of two) with separate
// write and read pointers and an occupancy count. The head entry is visible on rd_data
// whenever count is non-zero (first-word fall-through), so the router can route and
// arbitrate on it in the same cycle and pop it with rd_en. A write and a read in the same
// cycle are both accepted. The occupancy count drives the congestion flag of the port.
//
// Interface: wr_en/wr_data push, rd_en pops, count is the number of stored entries.
// Writing into a full buffer is a protocol error (credit flow control prevents it) and is
// caught by an assertion. The buffer depth of 5 flits follows the source; the rest is
// this design's own.
module glb_fifo #(
  parameter int unsigned WIDTH = 35,
  parameter int unsigned DEPTH = 5,
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CNT_W = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic [CNT_W-1:0] count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;

  function automatic logic [PTR_W-1:0] next_ptr(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  logic do_wr, do_rd;
  assign do_rd = rd_en && (count != '0);
  assign do_wr = wr_en && ((count != CNT_W'(DEPTH)) || do_rd);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  assign rd_data = mem[rd_ptr];

  // Credit flow control must never overrun a buffer or pop an empty one.
  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> (count != CNT_W'(DEPTH)) || rd_en)
    else $error("glb_fifo: write into full buffer");
  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> count != '0)
    else $error("glb_fifo: read from empty buffer");

endmodule
