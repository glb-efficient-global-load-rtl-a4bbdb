// tb_glb_slave_ni: tests the memory-side network interface. Random read and write request
// packets (bursts 1..8, random requester coordinates and tags) are fed into its ejection
// port whenever a credit is available. A memory model with a random command-ready and a
// fixed read latency of MEM_LAT cycles checks each command and write word; the response
// packets on the injection port are checked for VC, header fields (requester as
// destination, this node as source, tag, length) and read data. The injection credits
// are returned with random delay, so the read-data stall (mem_rready low) is exercised.
module tb_glb_slave_ni;
  import glb_pkg::*;
  localparam int MEM_LAT = 6, NREQ = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ej_valid, inj_valid;
  flit_t ej_flit, inj_flit;
  logic [1:0] ej_credit, inj_credit;
  logic mem_cmd_valid, mem_cmd_ready, mem_cmd_write, mem_wvalid, mem_wready, mem_rvalid, mem_rready;
  logic [31:0] mem_cmd_addr, mem_wdata, mem_rdata;
  logic [2:0] mem_cmd_len_m1;

  glb_slave_ni #(.X(3'd2), .Y(3'd0)) dut (.*);

  int checks = 0, failures = 0, n_rstall = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  typedef struct { bit wr; int len; int sx; int sy; int tag; logic [31:0] addr; logic [31:0] d [8]; } rq_t;
  rq_t sent [$];      // requests in order, for the memory model
  rq_t resp [$];      // requests in order, for the response checker
  flit_t txq [$];
  int cred, done;
  function automatic logic [31:0] rd(logic [31:0] a); return a ^ 32'h5A5A0000; endfunction

  // network side: feed request flits with credit flow control
  always @(posedge clk) if (rst_n) begin
    if (ej_credit[0]) cred <= cred + 1 - ((ej_valid) ? 1 : 0);
    else if (ej_valid) cred <= cred - 1;
    check(ej_credit[1] == 1'b0, "no credit on the response VC");
    if (txq.size() > 0 && (cred - (ej_valid ? 1 : 0)) > 0) begin
      ej_valid <= 1; ej_flit <= txq.pop_front();
    end else ej_valid <= 0;
  end

  // injection side: response checker with randomly delayed credits
  int ccount, rx_idx;
  always @(posedge clk) if (rst_n) begin
    int pending;
    pending = 0;
    if (inj_valid) begin
      check(inj_flit.vc == 1'b1, "response on VC 1");
      if (rx_idx == 0) begin
        rq_t r;
        r = resp[0];
        check(inj_flit.head && inj_flit.tail == r.wr, "response head/tail");
        check(int'(inj_flit.data[27:25]) == r.sx && int'(inj_flit.data[24:22]) == r.sy, "response destination");
        check(inj_flit.data[21:19] == 2 && inj_flit.data[18:16] == 0, "response source");
        check(inj_flit.data[15] == r.wr && int'(inj_flit.data[14:12]) == r.len - 1 && int'(inj_flit.data[11:0]) == r.tag,
              "response command and tag");
        if (r.wr) begin void'(resp.pop_front()); done++; end else rx_idx = 1;
      end else begin
        check(!inj_flit.head && inj_flit.data == rd(resp[0].addr + 32'(rx_idx - 1)), "read data");
        check(inj_flit.tail == (rx_idx == resp[0].len), "read tail");
        if (rx_idx == resp[0].len) begin void'(resp.pop_front()); rx_idx = 0; done++; end
        else rx_idx++;
      end
      ccount++;
    end
    inj_credit <= 2'b00;
    if (ccount > 0 && $urandom_range(3) == 0) begin inj_credit <= 2'b10; ccount--; end
    if (mem_rvalid && !mem_rready) n_rstall++;
  end

  // memory model
  int mlen, mcnt, mwait;
  bit mbusy, mwr;
  logic [31:0] maddr;
  always @(posedge clk) if (rst_n) begin
    if (mem_cmd_valid && mem_cmd_ready) begin
      rq_t r;
      r = sent.pop_front();
      check(mem_cmd_write == r.wr && mem_cmd_addr == r.addr && int'(mem_cmd_len_m1) == r.len - 1, "memory command");
      mbusy = 1; mwr = r.wr; mlen = r.len; mcnt = 0; maddr = r.addr; mwait = MEM_LAT;
      for (int b = 0; b < 8; b++) wexp[b] = r.d[b];
    end else if (mbusy && mwr && mem_wvalid && mem_wready) begin
      check(mem_wdata == wexp[mcnt], "write data to memory");
      mcnt++;
      if (mcnt == mlen) mbusy = 0;
    end else if (mbusy && !mwr) begin
      if (mwait > 0) mwait--;
      else if (mem_rvalid && mem_rready) begin
        mcnt++;
        if (mcnt == mlen) mbusy = 0;
      end
    end
    mem_cmd_ready <= !mbusy && $urandom_range(1) == 0;
    mem_wready    <= mbusy && mwr && $urandom_range(3) != 0;
    mem_rvalid    <= mbusy && !mwr && mwait == 0 && !(mem_rvalid && mem_rready && mcnt == mlen);
    mem_rdata     <= rd(maddr + 32'(mcnt));
  end
  logic [31:0] wexp [8];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ej_valid = 0; ej_flit = '0; inj_credit = 0; cred = VC_DEPTH; done = 0; ccount = 0; rx_idx = 0;
    mem_cmd_ready = 0; mem_wready = 0; mem_rvalid = 0; mem_rdata = 0; mbusy = 0; mwr = 0;
    mlen = 0; mcnt = 0; mwait = 0; maddr = 0;
    for (int k = 0; k < NREQ; k++) begin
      rq_t r;
      flit_t f;
      r.wr = $urandom_range(1); r.len = $urandom_range(8, 1);
      r.sx = $urandom_range(4); r.sy = $urandom_range(4); r.tag = $urandom_range(4095);
      r.addr = $urandom;
      for (int b = 0; b < 8; b++) r.d[b] = $urandom;
      sent.push_back(r); resp.push_back(r);
      f = '0; f.vc = 0; f.head = 1;
      f.data = mk_header(3'd2, 3'd0, 3'(r.sx), 3'(r.sy), r.wr, 3'(r.len - 1), 12'(r.tag));
      txq.push_back(f);
      f.head = 0; f.tail = !r.wr; f.data = r.addr;
      txq.push_back(f);
      if (r.wr) for (int b = 0; b < r.len; b++) begin
        f.tail = (b == r.len - 1); f.data = r.d[b];
        txq.push_back(f);
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (done < NREQ) @(posedge clk);
    repeat (20) @(posedge clk);
    check(cred == VC_DEPTH, "request credits all returned");
    check(n_rstall > 0, "read data never stalled for lack of credits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
