// tb_glb_soc: end-to-end test of the GLB system (mesh, routers, network interfaces) at its
// default size: 5x5 mesh, ten processors, fifteen memories.
//
// Processor models issue reads and writes with bursts of 1..8 words. Each processor uses
// its own address region; a read either targets fresh addresses (expected data is a fixed
// function of the address) or a burst that the same processor has already written and
// whose write response it has received (expected data is the written data). Read data
// must come back in issue order (the reorder buffer), every write must get a write
// response, and the system must drain. Memory models accept a command, take write data
// one word per cycle, and answer reads MEM_LAT cycles later with one word per cycle.
// Phase 1 is uniform random traffic, phase 2 sends 70% of the requests to a memory one
// hop away. Mechanisms that must each happen at least once: congestion flags, DyXY
// adaptive routes, priority overrides, grants after waiting, credit stalls, output VC
// reservation stalls, a full reorder buffer holding back a read, and read responses
// arriving out of order and being reordered.
`timescale 1ns/1ps
module tb_glb_soc;
  import glb_pkg::*;

  localparam int MX = 5, MY = 5, N = MX * MY, NP = 10, NM = 15;
  localparam int REQ_PER_PHASE = 150;
  localparam int MEM_LAT = 6;
  localparam int WATCHDOG = 400000;

  logic clk = 0, rst_n = 0;
  always #0.5 clk = ~clk;

  logic [NP-1:0]      p_req_valid, p_req_ready, p_req_write, p_wvalid, p_wready;
  logic [NP-1:0]      p_rvalid, p_rready, p_rlast, p_bvalid, p_bready;
  logic [COORD_W-1:0] p_req_dst_x [NP], p_req_dst_y [NP];
  logic [31:0]        p_req_addr [NP], p_wdata [NP], p_rdata [NP];
  logic [2:0]         p_req_len_m1 [NP];
  logic [NM-1:0]      m_cmd_valid, m_cmd_ready, m_cmd_write, m_wvalid, m_wready, m_rvalid, m_rready;
  logic [31:0]        m_cmd_addr [NM], m_wdata [NM], m_rdata [NM];
  logic [BURST_W-1:0] m_cmd_len_m1 [NM];
  logic [N-1:0]       ev_adaptive, ev_override;

  glb_soc dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  function automatic int proc_node(int i); return ((i / MX) * 2 + 1) * MX + i % MX; endfunction
  function automatic int mem_node(int j);  return ((j / MX) * 2) * MX + j % MX; endfunction
  function automatic logic [31:0] fresh(logic [31:0] a); return a * 32'h9E3779B1 + 32'h1234; endfunction

  // ---------------------------------------------------------------- processor models
  typedef struct { int mem; bit wr; int len; logic [31:0] addr; logic [31:0] d [8]; longint t0; int ph; } preq_t;
  preq_t  pq     [NP][$];   // requests not yet presented
  preq_t  rd_exp [NP][$];   // reads in issue order
  preq_t  wr_out [NP][$];   // writes awaiting a response (order of completion not fixed)
  preq_t  written[NP][$];   // completed writes, may be read back
  logic [31:0] wq [NP][$];  // write data still to send
  int     issued [NP], done [NP], rbeat [NP];
  int     phase = 0, completed = 0, total_expected = 0, seq = 0;
  longint cyc = 0, lat_sum [2];
  int     lat_cnt [2];
  int     n_rob_full = 0, n_reorder = 0, n_flag = 0, n_adapt = 0, n_ovr = 0, n_waitwin = 0,
          n_credstall = 0, n_vcstall = 0, n_rd_back = 0;

  function automatic int pick_mem(int i);
    int px = i % MX, py = ((i / MX) * 2 + 1), m;
    if (phase == 1 && $urandom_range(99) < 70) begin
      m = ($urandom_range(1) == 0) ? ((py + 1) / 2) * MX + px : ((py - 1) / 2) * MX + px;
    end else begin
      m = $urandom_range(NM - 1);
    end
    return m;
  endfunction

  task automatic new_request(int i);
    preq_t r;
    r.wr = $urandom_range(1);
    r.len = $urandom_range(8, 1);
    r.ph = phase;
    if (!r.wr && written[i].size() > 0 && $urandom_range(1) == 0) begin
      int k = $urandom_range(written[i].size() - 1);
      r = written[i][k];
      r.wr = 0; r.ph = phase;
      n_rd_back++;
    end else begin
      r.mem = pick_mem(i);
      r.addr = {4'(i), 16'(seq++), 12'h000};
      for (int b = 0; b < 8; b++) r.d[b] = r.wr ? $urandom : fresh(r.addr + 32'(b));
    end
    pq[i].push_back(r);
    issued[i]++;
  endtask

  initial begin
    for (int i = 0; i < NP; i++) begin
      issued[i] = 0; done[i] = 0; rbeat[i] = 0;
      p_req_valid[i] = 0; p_req_write[i] = 0; p_req_dst_x[i] = 0; p_req_dst_y[i] = 0;
      p_req_addr[i] = 0; p_req_len_m1[i] = 0; p_wvalid[i] = 0; p_wdata[i] = 0;
      p_rready[i] = 0; p_bready[i] = 0;
    end
    for (int p = 0; p < 2; p++) begin lat_sum[p] = 0; lat_cnt[p] = 0; end
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int i = 0; i < NP; i++) begin
      // request channel
      if (p_req_valid[i] && p_req_ready[i]) begin
        preq_t r;
        r = pq[i].pop_front();
        r.t0 = cyc;
        if (r.wr) begin
          for (int b = 0; b < r.len; b++) wq[i].push_back(r.d[b]);
          wr_out[i].push_back(r);
          wr_all[i].push_back(r);
        end else rd_exp[i].push_back(r);
      end
      if (pq[i].size() == 0 && issued[i] < REQ_PER_PHASE * (phase + 1) && $urandom_range(3) == 0)
        new_request(i);
      p_req_valid[i] <= pq[i].size() > 0 && wq[i].size() == 0;
      if (pq[i].size() > 0) begin
        p_req_write[i]  <= pq[i][0].wr;
        p_req_dst_x[i]  <= 3'(mem_node(pq[i][0].mem) % MX);
        p_req_dst_y[i]  <= 3'(mem_node(pq[i][0].mem) / MX);
        p_req_addr[i]   <= pq[i][0].addr;
        p_req_len_m1[i] <= 3'(pq[i][0].len - 1);
      end
      // write data channel
      if (p_wvalid[i] && p_wready[i]) void'(wq[i].pop_front());
      p_wvalid[i] <= wq[i].size() > 0;
      p_wdata[i]  <= (wq[i].size() > 0) ? wq[i][0] : '0;
      // read data channel
      if (p_rvalid[i] && p_rready[i]) begin
        check(rd_exp[i].size() > 0, "read data without a read");
        if (rd_exp[i].size() > 0) begin
          preq_t r;
          r = rd_exp[i][0];
          check(p_rdata[i] == r.d[rbeat[i]], $sformatf("proc %0d read data beat %0d", i, rbeat[i]));
          check(p_rlast[i] == (rbeat[i] == r.len - 1), "rlast position");
          if (rbeat[i] == r.len - 1) begin
            void'(rd_exp[i].pop_front());
            rbeat[i] = 0;
            lat_sum[r.ph] += cyc - r.t0; lat_cnt[r.ph]++;
            done[i]++; completed++;
          end else rbeat[i]++;
        end
      end
      p_rready[i] <= $urandom_range(7) != 0;
      // write responses (any order among outstanding writes: retire the oldest)
      if (p_bvalid[i] && p_bready[i]) begin
        check(wr_out[i].size() > 0, "write response without a write");
        if (wr_out[i].size() > 0) begin
          preq_t r;
          r = wr_out[i].pop_front();
          lat_sum[r.ph] += cyc - r.t0; lat_cnt[r.ph]++;
          done[i]++; completed++;
        end
      end
      p_bready[i] <= 1'b1;
    end
  end

  preq_t wr_all [NP][$];   // accepted writes not yet known to be complete

  // ---------------------------------------------------------------- memory models
  logic [31:0] store [NM][logic [31:0]];
  typedef enum int {M_IDLE, M_WR, M_RDWAIT, M_RD} mstate_e;
  mstate_e ms [NM];
  int      mcnt [NM], mlen [NM], mwait [NM];
  logic [31:0] maddr [NM];

  function automatic logic [31:0] mem_read(int j, logic [31:0] a);
    return store[j].exists(a) ? store[j][a] : fresh(a);
  endfunction

  initial for (int j = 0; j < NM; j++) begin
    ms[j] = M_IDLE; mcnt[j] = 0; mlen[j] = 0; mwait[j] = 0; maddr[j] = 0;
    m_cmd_ready[j] = 0; m_wready[j] = 0; m_rvalid[j] = 0; m_rdata[j] = 0;
  end

  always @(posedge clk) if (rst_n) for (int j = 0; j < NM; j++) begin
    unique case (ms[j])
      M_IDLE: if (m_cmd_valid[j] && m_cmd_ready[j]) begin
        maddr[j] = m_cmd_addr[j]; mlen[j] = int'(m_cmd_len_m1[j]) + 1; mcnt[j] = 0;
        check(m_cmd_addr[j][31:28] < NP, "command address from a processor region");
        if (m_cmd_write[j]) ms[j] = M_WR;
        else begin ms[j] = M_RDWAIT; mwait[j] = MEM_LAT; end
      end
      M_WR: if (m_wvalid[j] && m_wready[j]) begin
        store[j][maddr[j] + 32'(mcnt[j])] = m_wdata[j];
        mcnt[j]++;
        if (mcnt[j] == mlen[j]) ms[j] = M_IDLE;
      end
      M_RDWAIT: if (--mwait[j] == 0) ms[j] = M_RD;
      M_RD: if (m_rvalid[j] && m_rready[j]) begin
        mcnt[j]++;
        if (mcnt[j] == mlen[j]) ms[j] = M_IDLE;
      end
      default: ;
    endcase
    m_cmd_ready[j] <= (ms[j] == M_IDLE) && $urandom_range(3) != 0;
    m_wready[j]    <= (ms[j] == M_WR);
    m_rvalid[j]    <= (ms[j] == M_RD);
    m_rdata[j]     <= (ms[j] == M_RD) ? mem_read(j, maddr[j] + 32'(mcnt[j])) : '0;
  end

  // ---------------------------------------------------------------- mechanism observation
  for (genvar y = 0; y < MY; y++) begin : g_oy
    for (genvar x = 0; x < MX; x++) begin : g_ox
      always @(posedge clk) if (rst_n) begin
        if (|dut.u_mesh.g_y[y].g_x[x].u_router.cong_flag_out) n_flag++;
        if (ev_adaptive[y * MX + x]) n_adapt++;
        if (ev_override[y * MX + x]) n_ovr++;
        for (int p = 0; p < NUM_PORTS; p++)
          for (int v = 0; v < NUM_VC; v++) begin
            if (dut.u_mesh.g_y[y].g_x[x].u_router.gnt[p][v] &&
                dut.u_mesh.g_y[y].g_x[x].u_router.u_sa.wait_q[p][v] != '0) n_waitwin++;
            if (dut.u_mesh.g_y[y].g_x[x].u_router.buf_cnt[p][v] != '0) begin
              automatic port_e o = dut.u_mesh.g_y[y].g_x[x].u_router.route_sel[p][v];
              if (dut.u_mesh.g_y[y].g_x[x].u_router.credits[o][v] == '0) n_credstall++;
              if (dut.u_mesh.g_y[y].g_x[x].u_router.head_flit[p][v].head &&
                  !dut.u_mesh.g_y[y].g_x[x].u_router.ovc_free[o][v]) n_vcstall++;
            end
          end
      end
      if (y % 2 == 1) begin : g_p
        always @(posedge clk) if (rst_n) begin
          if (dut.g_y[y].g_x[x].g_proc.u_ni.ej_valid && dut.g_y[y].g_x[x].g_proc.u_ni.ej_flit.tail &&
              !dut.g_y[y].g_x[x].g_proc.u_ni.ej_flit.head &&
              dut.g_y[y].g_x[x].g_proc.u_ni.rx_slot != dut.g_y[y].g_x[x].g_proc.u_ni.retire_ptr) n_reorder++;
          if (dut.g_y[y].g_x[x].g_proc.u_ni.req_valid && !dut.g_y[y].g_x[x].g_proc.u_ni.req_write &&
              dut.g_y[y].g_x[x].g_proc.u_ni.slot_busy[dut.g_y[y].g_x[x].g_proc.u_ni.alloc_ptr]) n_rob_full++;
        end
      end
    end
  end

  // Completed writes become readable. Write responses carry no tag to the processor and
  // may arrive in any order, so writes are treated as complete only once every write of
  // that processor has been answered.
  always @(posedge clk) if (rst_n) for (int i = 0; i < NP; i++)
    if (wr_out[i].size() == 0)
      while (wr_all[i].size() > 0) written[i].push_back(wr_all[i].pop_front());

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired, %0d requests completed", completed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int ph = 0; ph < 2; ph++) begin
      phase = ph;
      total_expected += NP * REQ_PER_PHASE;
      while (completed < total_expected) @(posedge clk);
      $display("phase %0d (%s): %0d requests, average latency %0d cycles", ph,
               ph == 0 ? "uniform" : "non-uniform", lat_cnt[ph], lat_sum[ph] / lat_cnt[ph]);
    end
    repeat (50) @(posedge clk);
    for (int i = 0; i < NP; i++) begin
      check(pq[i].size() == 0 && rd_exp[i].size() == 0 && wr_out[i].size() == 0 && wq[i].size() == 0,
            $sformatf("processor %0d drained", i));
      check(done[i] == issued[i], $sformatf("processor %0d: %0d of %0d done", i, done[i], issued[i]));
    end
    $display("events: flags=%0d adaptive=%0d override=%0d waitwin=%0d credit_stall=%0d vc_stall=%0d rob_full=%0d reordered=%0d read_back=%0d",
             n_flag, n_adapt, n_ovr, n_waitwin, n_credstall, n_vcstall, n_rob_full, n_reorder, n_rd_back);
    check(n_flag > 0, "congestion flag never raised");
    check(n_adapt > 0, "DyXY never took the adaptive route");
    check(n_ovr > 0, "priority never overrode index order");
    check(n_waitwin > 0, "no grant after waiting");
    check(n_credstall > 0, "no credit stall");
    check(n_vcstall > 0, "no VC reservation stall");
    check(n_rob_full > 0, "reorder buffer never full");
    check(n_reorder > 0, "no read response arrived out of order");
    check(n_rd_back > 0, "no read-back of written data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
