// tb_glb_mesh: end-to-end test of the 5x5 GLB mesh with processor/memory traffic.
//
// Placement: rows 1 and 3 hold the ten processors, rows 0, 2 and 4 the fifteen memories.
// Each processor model keeps up to MAX_OUT requests outstanding and issues read or write
// requests with bursts of 1..8 words to memories:
//   read request  = header + address (2 flits, VC 0)   -> response header + burst words (VC 1)
//   write request = header + address + burst words      -> response header only (VC 1)
// Each memory model answers MEM_LAT cycles after a request has fully arrived. Phase 1 sends
// uniformly random traffic; phase 2 sends 70% of the requests to a memory one hop away and
// the rest uniformly to the others. The network interfaces are behavioural and always
// accept ejected flits, returning the credit one cycle later.
//
// Checked: every flit is delivered to the node named in its header; write data and read
// data arrive intact and in order; every request gets exactly one response; the network
// drains. The congestion flags, DyXY adaptive choices, priority overrides in the switch
// allocator, grants won after waiting, non-zero Congestion Status values, credit stalls
// and output VC reservation stalls must each occur at least once. Average latency per
// phase is printed.
`timescale 1ns/1ps
module tb_glb_mesh;
  import glb_pkg::*;

  localparam int MX = 5, MY = 5, N = MX * MY;
  localparam int MAX_OUT   = 6;
  localparam int REQ_PER_PHASE = 200;  // requests per processor per phase
  localparam int MEM_LAT   = 6;
  localparam int WATCHDOG  = 200000;

  logic clk = 0, rst_n = 0;
  always #0.5 clk = ~clk;

  logic [N-1:0]      inj_valid;
  flit_t             inj_flit   [N];
  logic [NUM_VC-1:0] inj_credit [N];
  logic [N-1:0]      ej_valid;
  flit_t             ej_flit    [N];
  logic [NUM_VC-1:0] ej_credit  [N];
  logic [N-1:0]      ev_adaptive, ev_override;

  glb_mesh dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  function automatic bit is_proc(int n); return ((n / MX) % 2) == 1; endfunction
  function automatic logic [31:0] wdata(int tag, int beat);  return 32'hA5000000 ^ (tag << 8) ^ beat; endfunction
  function automatic logic [31:0] rdata(logic [31:0] addr, int beat); return addr * 3 + beat; endfunction

  // header: [15] write, [14:12] burst-1, [11:0] tag
  function automatic logic [31:0] mk_hdr(int dx, int dy, int sx, int sy, bit wr, int burst, int tag);
    logic [31:0] h = '0;
    h[DX_LSB +: COORD_W] = COORD_W'(dx);
    h[DY_LSB +: COORD_W] = COORD_W'(dy);
    h[SX_LSB +: COORD_W] = COORD_W'(sx);
    h[SY_LSB +: COORD_W] = COORD_W'(sy);
    h[15]    = wr;
    h[14:12] = 3'(burst - 1);
    h[11:0]  = 12'(tag);
    return h;
  endfunction

  // transmit queues per node and VC
  flit_t txq [N][NUM_VC][$];
  int    cred [N][NUM_VC];

  // outstanding requests per tag
  typedef struct { int mem; bit wr; int burst; logic [31:0] addr; longint t0; int phase; } req_t;
  req_t  outst [int];
  int    n_out [N];
  int    issued [N];
  int    completed = 0, total_expected = 0;
  longint lat_sum [2];
  int     lat_cnt [2];
  int     phase = 0;
  int     seq = 0;
  longint cyc = 0;

  // receive state per node and VC
  flit_t rxq [N][NUM_VC][$];
  typedef struct { int src; bit wr; int burst; int tag; logic [31:0] addr; longint ready; } mresp_t;
  mresp_t pend [N][$];

  // mechanism counters
  int n_flag = 0, n_adapt = 0, n_ovr = 0, n_waitwin = 0, n_cs = 0, n_credstall = 0, n_vcstall = 0;

  function automatic void enqueue_packet(int node, int vc, logic [31:0] words [$]);
    for (int i = 0; i < words.size(); i++) begin
      flit_t f;
      f.head = (i == 0);
      f.tail = (i == words.size() - 1);
      f.vc   = vc[0];
      f.data = words[i];
      txq[node][vc].push_back(f);
    end
  endfunction

  function automatic int pick_mem(int p);
    int px = p % MX, py = p / MX, m;
    if (phase == 1 && $urandom_range(99) < 70) begin
      // a memory one hop away (north or south)
      m = ($urandom_range(1) == 0) ? (py + 1) * MX + px : (py - 1) * MX + px;
    end else begin
      do m = $urandom_range(N - 1); while (is_proc(m) ||
            (phase == 1 && m % MX == px && (m / MX == py + 1 || m / MX == py - 1)));
    end
    return m;
  endfunction

  // Processor issue
  task automatic issue(int p);
    int m = pick_mem(p);
    bit wr = $urandom_range(1);
    int burst = $urandom_range(8, 1);
    int tag = seq++;
    logic [31:0] addr = $urandom;
    logic [31:0] w [$];
    w.push_back(mk_hdr(m % MX, m / MX, p % MX, p / MX, wr, burst, tag));
    w.push_back(addr);
    if (wr) for (int b = 0; b < burst; b++) w.push_back(wdata(tag, b));
    enqueue_packet(p, 0, w);
    outst[tag] = '{m, wr, burst, addr, cyc, phase};
    n_out[p]++;
    issued[p]++;
  endtask

  // Process one complete packet received at node n on VC vc
  task automatic consume_packet(int n, int vc);
    flit_t h = rxq[n][vc][0];
    int dx = int'(h.data[DX_LSB +: COORD_W]), dy = int'(h.data[DY_LSB +: COORD_W]);
    int sx = int'(h.data[SX_LSB +: COORD_W]), sy = int'(h.data[SY_LSB +: COORD_W]);
    bit wr = h.data[15];
    int burst = int'(h.data[14:12]) + 1;
    int tag = int'(h.data[11:0]);
    check(dx == n % MX && dy == n / MX, $sformatf("packet for (%0d,%0d) ejected at node %0d", dx, dy, n));
    if (h.data[CS_LSB +: CS_W] != '0) n_cs++;
    if (vc == 0) begin
      logic [31:0] addr = rxq[n][vc][1].data;
      check(!is_proc(n), "request arrived at a processor");
      check(rxq[n][vc].size() == (wr ? burst + 2 : 2), "request length");
      if (wr) for (int b = 0; b < burst; b++)
        check(rxq[n][vc][2 + b].data == wdata(tag, b), $sformatf("write data tag %0d beat %0d", tag, b));
      pend[n].push_back('{sy * MX + sx, wr, burst, tag, addr, cyc + MEM_LAT});
    end else begin
      check(is_proc(n), "response arrived at a memory");
      check(outst.exists(tag), $sformatf("response with unknown tag %0d", tag));
      if (outst.exists(tag)) begin
        req_t r = outst[tag];
        check(sx == r.mem % MX && sy == r.mem / MX, "response from the wrong memory");
        check(wr == r.wr, "response type");
        check(rxq[n][vc].size() == (r.wr ? 1 : r.burst + 1), "response length");
        if (!r.wr) for (int b = 0; b < r.burst && b + 1 < rxq[n][vc].size(); b++)
          check(rxq[n][vc][1 + b].data == rdata(r.addr, b), $sformatf("read data tag %0d beat %0d", tag, b));
        lat_sum[r.phase] += cyc - r.t0;
        lat_cnt[r.phase]++;
        outst.delete(tag);
        n_out[n]--;
        completed++;
      end
    end
    rxq[n][vc].delete();
  endtask

  int n_inj = 0, n_ej = 0;
  always @(posedge clk) begin
    n_inj += $countones(inj_valid);
    n_ej  += $countones(ej_valid);
    if ($test$plusargs("trace"))
      for (int n = 0; n < N; n++) begin
        if (inj_valid[n]) $display("%0t inj n%0d %h", $time, n, inj_flit[n]);
        if (ej_valid[n])  $display("%0t ej  n%0d %h", $time, n, ej_flit[n]);
      end
  end

  initial begin
    for (int p = 0; p < 2; p++) begin lat_sum[p] = 0; lat_cnt[p] = 0; end
    for (int n = 0; n < N; n++) begin
      inj_valid[n] = 0; inj_flit[n] = '0; ej_credit[n] = '0;
      n_out[n] = 0; issued[n] = 0;
      for (int v = 0; v < NUM_VC; v++) cred[n][v] = VC_DEPTH;
    end
  end

  // Network interface models, evaluated on the falling edge so that the DUT sees stable inputs.
  always @(negedge clk) if (rst_n) begin
    cyc++;
    for (int n = 0; n < N; n++) begin
      // credits from the router for the local input port
      for (int v = 0; v < NUM_VC; v++) if (inj_credit[n][v]) cred[n][v]++;
      // ejected flits: consume, return credit next cycle
      ej_credit[n] = '0;
      if (ej_valid[n]) begin
        flit_t f;
        f = ej_flit[n];
        ej_credit[n][f.vc] = 1'b1;
        if (f.head) check(rxq[n][f.vc].size() == 0, "head flit in the middle of a packet");
        rxq[n][f.vc].push_back(f);
        if (f.tail) consume_packet(n, int'(f.vc));
      end
      // processors issue
      if (is_proc(n) && issued[n] < REQ_PER_PHASE * (phase + 1) && n_out[n] < MAX_OUT &&
          txq[n][0].size() == 0 && $urandom_range(3) != 0) issue(n);
      // memories answer
      if (!is_proc(n) && pend[n].size() > 0 && pend[n][0].ready <= cyc) begin
        mresp_t r;
        logic [31:0] w [$];
        r = pend[n].pop_front();
        w.delete();
        w.push_back(mk_hdr(r.src % MX, r.src / MX, n % MX, n / MX, r.wr, r.burst, r.tag));
        if (!r.wr) for (int b = 0; b < r.burst; b++) w.push_back(rdata(r.addr, b));
        enqueue_packet(n, 1, w);
      end
      // inject one flit: responses first, then requests
      inj_valid[n] = 1'b0;
      for (int v = NUM_VC - 1; v >= 0; v--) begin
        if (!inj_valid[n] && txq[n][v].size() > 0 && cred[n][v] > 0) begin
          inj_flit[n]  = txq[n][v].pop_front();
          inj_valid[n] = 1'b1;
          cred[n][v]--;
        end
      end
    end
  end

  // Mechanism observation inside the routers.
  for (genvar y = 0; y < MY; y++) begin : g_oy
    for (genvar x = 0; x < MX; x++) begin : g_ox
      always @(posedge clk) if (rst_n) begin
        if (|dut.g_y[y].g_x[x].u_router.cong_flag_out) n_flag++;
        if (ev_adaptive[y * MX + x]) n_adapt++;
        if (ev_override[y * MX + x]) n_ovr++;
        for (int p = 0; p < NUM_PORTS; p++)
          for (int v = 0; v < NUM_VC; v++) begin
            if (dut.g_y[y].g_x[x].u_router.gnt[p][v] &&
                dut.g_y[y].g_x[x].u_router.u_sa.wait_q[p][v] != '0) n_waitwin++;
            if (dut.g_y[y].g_x[x].u_router.buf_cnt[p][v] != '0) begin
              automatic port_e o = dut.g_y[y].g_x[x].u_router.route_sel[p][v];
              if (dut.g_y[y].g_x[x].u_router.credits[o][v] == '0) n_credstall++;
              if (dut.g_y[y].g_x[x].u_router.head_flit[p][v].head &&
                  !dut.g_y[y].g_x[x].u_router.ovc_free[o][v]) n_vcstall++;
            end
          end
      end
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired, %0d requests completed, %0d flits injected, %0d ejected", completed, n_inj, n_ej);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nproc = 0;
    for (int n = 0; n < N; n++) if (is_proc(n)) nproc++;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int ph = 0; ph < 2; ph++) begin
      phase = ph;
      total_expected += nproc * REQ_PER_PHASE;
      while (completed < total_expected) @(posedge clk);
      $display("phase %0d (%s): %0d requests, average latency %0d cycles", phase,
               phase == 0 ? "uniform" : "non-uniform", lat_cnt[phase], lat_sum[phase] / lat_cnt[phase]);
    end
    repeat (50) @(posedge clk);
    // the network has drained
    for (int n = 0; n < N; n++) begin
      check(txq[n][0].size() == 0 && txq[n][1].size() == 0 && pend[n].size() == 0,
            $sformatf("queues drained at node %0d: %0d %0d %0d", n, txq[n][0].size(), txq[n][1].size(), pend[n].size()));
      for (int v = 0; v < NUM_VC; v++)
        check(cred[n][v] == VC_DEPTH, $sformatf("injection credits returned at node %0d vc %0d: %0d", n, v, cred[n][v]));
    end
    check(outst.size() == 0, "no outstanding requests");
    $display("events: flags=%0d adaptive=%0d override=%0d waitwin=%0d cs_nonzero=%0d credit_stall=%0d vc_stall=%0d",
             n_flag, n_adapt, n_ovr, n_waitwin, n_cs, n_credstall, n_vcstall);
    check(n_flag > 0, "congestion flag never raised");
    check(n_adapt > 0, "DyXY never took the adaptive route");
    check(n_ovr > 0, "priority never overrode index order");
    check(n_waitwin > 0, "no grant after waiting");
    check(n_cs > 0, "Congestion Status never non-zero at delivery");
    check(n_credstall > 0, "no credit stall");
    check(n_vcstall > 0, "no VC reservation stall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
