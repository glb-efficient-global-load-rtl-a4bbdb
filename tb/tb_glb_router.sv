// tb_glb_router: directed tests of one inner GLB router at (2,2).
//  1. Latency: a one-flit packet injected at the local port for (4,2) appears on the east
//     output two cycles after it is presented, with its Congestion Status halved (the idle
//     router's local congestion value is 0), and a credit goes back to the local port.
//  2. Credits: seven one-flit packets for the east with no credits returned: exactly five
//     (the VC depth) leave; returning credits lets the other two go.
//  3. GLB arbitration: two-flit packets from the west (Congestion Status 12) and the north
//     (Congestion Status 2) for the east arrive together; the west packet leaves first and
//     whole although north has the lower port index, then the north packet (the output VC
//     is held from head to tail).
//  4. DyXY: a packet for (4,4) goes east when the east neighbour is not congested and north
//     when it is.
//  5. Congestion side-band: filling the north buffer past the threshold raises its flag and
//     the router's own Congestion Condition.
module tb_glb_router;
  import glb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NUM_PORTS-1:0] in_valid, out_valid, cong_flag_out, cong_flag_in, ev_adaptive, ev_override;
  flit_t in_flit [NUM_PORTS], out_flit [NUM_PORTS];
  logic [NUM_VC-1:0] in_credit [NUM_PORTS], out_credit [NUM_PORTS];
  logic [1:0] cc_out, cc_in [NUM_PORTS];

  glb_router #(.X(3'd2), .Y(3'd2)) dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  typedef struct { flit_t f; longint t; } rx_t;
  rx_t rx [NUM_PORTS][$];
  int  credits_back [NUM_PORTS];
  always @(posedge clk) if (rst_n) for (int p = 0; p < NUM_PORTS; p++) begin
    if (out_valid[p]) rx[p].push_back('{out_flit[p], cyc});
    if (in_credit[p] != '0) credits_back[p]++;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  function automatic flit_t mk(bit h, bit t, int dx, int dy, int cs, logic [15:0] tag);
    flit_t f;
    f.head = h; f.tail = t; f.vc = 1'b0;
    f.data = {4'(cs), 3'(dx), 3'(dy), 6'd0, tag};
    return f;
  endfunction

  // Present a set of flits (one per port, mask) for one cycle.
  task automatic send(logic [NUM_PORTS-1:0] m, flit_t f [NUM_PORTS]);
    @(negedge clk);
    in_valid = m;
    for (int p = 0; p < NUM_PORTS; p++) in_flit[p] = f[p];
    @(negedge clk);
    in_valid = '0;
  endtask

  task automatic send1(int p, flit_t f);
    flit_t a [NUM_PORTS];
    for (int i = 0; i < NUM_PORTS; i++) a[i] = f;
    send(5'(1 << p), a);
  endtask

  task automatic wait_cycles(int n); repeat (n) @(posedge clk); endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    flit_t a [NUM_PORTS];
    in_valid = '0; cong_flag_in = '0;
    for (int p = 0; p < NUM_PORTS; p++) begin
      in_flit[p] = '0; out_credit[p] = '0; cc_in[p] = 2'b00; credits_back[p] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. latency and header update
    @(negedge clk);
    t0 = cyc;              // the flit is sampled at the next rising edge, cycle t0+1
    in_valid = 5'b00001; in_flit[0] = mk(1, 1, 4, 2, 8, 16'h0001);
    @(negedge clk); in_valid = '0;
    wait_cycles(4);
    check(rx[P_EAST].size() == 1, "test 1: one flit east");
    if (rx[P_EAST].size() == 1) begin
      check(rx[P_EAST][0].t == t0 + 3, $sformatf("test 1: latency %0d cycles, expected 2", rx[P_EAST][0].t - t0 - 1));
      check(rx[P_EAST][0].f.data[31:28] == 4'd4, "test 1: Congestion Status 8 averaged with 0 gives 4");
      check(rx[P_EAST][0].f.data[27:0] == mk(1, 1, 4, 2, 8, 16'h0001).data[27:0], "test 1: other header bits kept");
    end
    check(credits_back[P_LOCAL] == 1, "test 1: credit returned to the local port");
    rx[P_EAST].delete();

    // 2. credit exhaustion (one credit is still out from test 1)
    out_credit[P_EAST] = 2'b01;
    @(negedge clk); out_credit[P_EAST] = '0;
    for (int i = 0; i < 7; i++) begin
      @(negedge clk);
      in_valid = 5'b00001 << (i < 5 ? 0 : 1);
      in_flit[0] = mk(1, 1, 4, 2, 0, 16'(i));
      in_flit[1] = mk(1, 1, 4, 2, 0, 16'(i));
    end
    @(negedge clk); in_valid = '0;
    wait_cycles(10);
    check(rx[P_EAST].size() == 5, $sformatf("test 2: %0d flits left with 5 credits", rx[P_EAST].size()));
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); out_credit[P_EAST] = 2'b01;
    end
    @(negedge clk); out_credit[P_EAST] = '0;
    wait_cycles(6);
    check(rx[P_EAST].size() == 7, $sformatf("test 2: %0d flits after credits returned", rx[P_EAST].size()));
    for (int i = 0; i < 2; i++) begin
      @(negedge clk); out_credit[P_EAST] = 2'b01;
    end
    @(negedge clk); out_credit[P_EAST] = '0;
    rx[P_EAST].delete();

    // 3. GLB arbitration between west (CS 12) and north (CS 2)
    a[P_WEST]  = mk(1, 0, 4, 2, 12, 16'h00A0);
    a[P_NORTH] = mk(1, 0, 4, 2, 2, 16'h00B0);
    send(5'b10010, a);
    a[P_WEST]  = mk(0, 1, 4, 2, 0, 16'h00A1);
    a[P_NORTH] = mk(0, 1, 4, 2, 0, 16'h00B1);
    a[P_WEST].data = 32'h000000A1; a[P_NORTH].data = 32'h000000B1;
    send(5'b10010, a);
    wait_cycles(8);
    check(rx[P_EAST].size() == 4, "test 3: four flits");
    if (rx[P_EAST].size() == 4) begin
      check(rx[P_EAST][0].f.data[15:0] == 16'h00A0 && rx[P_EAST][1].f.data == 32'h000000A1,
            "test 3: higher Congestion Status (west) packet first and whole");
      check(rx[P_EAST][2].f.data[15:0] == 16'h00B0 && rx[P_EAST][3].f.data == 32'h000000B1,
            "test 3: north packet second");
      check(rx[P_EAST][0].f.data[31:28] == 4'd6, "test 3: 12 averaged with 0 gives 6");
    end
    for (int i = 0; i < 4; i++) begin @(negedge clk); out_credit[P_EAST] = 2'b01; end
    @(negedge clk); out_credit[P_EAST] = '0;
    rx[P_EAST].delete();

    // 4. DyXY
    send1(P_LOCAL, mk(1, 1, 4, 4, 0, 16'h0C01));
    wait_cycles(4);
    check(rx[P_EAST].size() == 1 && rx[P_NORTH].size() == 0, "test 4: east when not congested");
    cong_flag_in[P_EAST] = 1'b1;
    send1(P_LOCAL, mk(1, 1, 4, 4, 0, 16'h0C02));
    wait_cycles(4);
    check(rx[P_NORTH].size() == 1, "test 4: north when east is congested");
    cong_flag_in = '0;
    @(negedge clk); out_credit[P_EAST] = 2'b01; out_credit[P_NORTH] = 2'b01;
    @(negedge clk); out_credit[P_EAST] = '0; out_credit[P_NORTH] = '0;
    rx[P_EAST].delete(); rx[P_NORTH].delete();

    // 5. congestion flag: block the west output (no credits) and fill the north buffer
    for (int i = 0; i < 10; i++) begin
      @(negedge clk); out_credit[P_WEST] = '0;
    end
    for (int i = 0; i < 9; i++) send1(P_NORTH, mk(1, 1, 0, 2, 0, 16'(i)));
    wait_cycles(3);
    check(cong_flag_out[P_NORTH], "test 5: north flag raised");
    check(!cong_flag_out[P_EAST], "test 5: east flag clear");
    check(cc_out == 2'b00, "test 5: one of five ports congested gives CC 00");
    for (int i = 0; i < 5; i++) send1(P_SOUTH, mk(1, 1, 0, 2, 0, 16'(i)));
    wait_cycles(3);
    check(cc_out == 2'b01, "test 5: two of five ports congested gives CC 01");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
