// tb_glb_master_ni: tests the processor-side network interface with a scripted network.
//  1. Packet format: a write of 3 words and a read of 4 words become a 5-flit and a 2-flit
//     packet on VC 0 with the expected header fields, address and data, head/tail bits.
//  2. Reorder buffer: six reads of 8 words are accepted, the seventh is held back
//     (48-word buffer, 6 slots). Their responses are returned in reverse order; no read
//     data may come out before the oldest read is answered, and then it must come out in
//     issue order with rlast on the last word of each burst.
//     Once the first burst is drained, the held-back read is accepted.
//  3. Write response: a one-flit write response raises bvalid for one handshake.
//  4. Credits: with no credits returned, only VC_DEPTH flits are injected.
module tb_glb_master_ni;
  import glb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid = 0, req_ready, req_write = 0, wvalid = 0, wready, rvalid, rready = 0, rlast, bvalid, bready = 0;
  logic [2:0] req_dst_x = 0, req_dst_y = 0, req_len_m1 = 0;
  logic [31:0] req_addr = 0, wdata = 0, rdata;
  logic inj_valid, ej_valid = 0;
  flit_t inj_flit, ej_flit;
  logic [1:0] inj_credit = 0, ej_credit;

  glb_master_ni #(.X(3'd1), .Y(3'd3)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  flit_t tx [$];
  int    auto_credit = 1;
  always @(posedge clk) if (rst_n) begin
    if (inj_valid) tx.push_back(inj_flit);
    inj_credit <= (inj_valid && auto_credit != 0) ? 2'b01 : 2'b00;
  end

  task automatic request(bit wr, int dx, int dy, logic [31:0] a, int len);
    @(negedge clk);
    req_valid = 1; req_write = wr; req_dst_x = 3'(dx); req_dst_y = 3'(dy); req_addr = a; req_len_m1 = 3'(len - 1);
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    @(negedge clk);
    req_valid = 0;
  endtask

  task automatic send_resp(bit wr, int tag, int len, logic [31:0] base);
    @(negedge clk);
    ej_valid = 1;
    ej_flit = '0; ej_flit.vc = 1; ej_flit.head = 1; ej_flit.tail = wr;
    ej_flit.data = mk_header(3'd1, 3'd3, 3'd0, 3'd0, wr, 3'(len - 1), 12'(tag));
    for (int b = 0; b < (wr ? 0 : len); b++) begin
      @(negedge clk);
      ej_flit.head = 0; ej_flit.tail = (b == len - 1); ej_flit.data = base + 32'(b);
    end
    @(negedge clk);
    ej_valid = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int held;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. write of three words
    fork
      request(1, 2, 4, 32'h1000, 3);
      begin
        @(negedge clk);
        wait (dut.tx_state == 2);   // write data phase
        for (int b = 0; b < 3; b++) begin
          @(negedge clk); wvalid = 1; wdata = 32'hD0 + 32'(b);
          @(posedge clk); while (!wready) @(posedge clk);
        end
        @(negedge clk); wvalid = 0;
      end
    join
    request(0, 4, 0, 32'h2000, 4);
    repeat (4) @(posedge clk);
    check(tx.size() == 7, $sformatf("test 1: %0d flits injected, expected 7", tx.size()));
    if (tx.size() == 7) begin
      check(tx[0].head && !tx[0].tail && tx[0].vc == 0, "test 1: write head flit");
      check(tx[0].data[27:25] == 2 && tx[0].data[24:22] == 4 && tx[0].data[21:19] == 1 && tx[0].data[18:16] == 3,
            "test 1: write header coordinates");
      check(tx[0].data[15] == 1 && tx[0].data[14:12] == 2 && tx[0].data[31:28] == 0, "test 1: write header command");
      check(tx[1].data == 32'h1000 && !tx[1].tail, "test 1: address flit");
      check(tx[2].data == 32'hD0 && tx[3].data == 32'hD1 && tx[4].data == 32'hD2 && tx[4].tail, "test 1: write data");
      check(tx[5].head && tx[5].data[15] == 0 && tx[5].data[14:12] == 3 && tx[5].data[11:0] == 0, "test 1: read header, slot 0");
      check(tx[6].tail && tx[6].data == 32'h2000, "test 1: read address flit is the tail");
    end
    send_resp(0, 0, 4, 32'h500);   // answer the first read
    rready = 1;
    repeat (8) @(posedge clk);
    rready = 0;
    tx.delete();

    // 2. reorder buffer: slots 1..5 and 0 (six reads of 8 words)
    for (int k = 0; k < 6; k++) request(0, 0, 0, 32'h3000 + 32'(k * 8), 8);
    @(negedge clk);
    req_valid = 1; req_write = 0; req_addr = 32'h4000; req_len_m1 = 3'd7;
    held = 0;
    repeat (10) begin @(posedge clk); if (!req_ready) held++; end
    check(held == 10, "test 2: seventh read held back by the full reorder buffer");
    // answer all but the oldest read: nothing may be returned yet
    for (int k = 5; k >= 1; k--) send_resp(0, (k + 1) % 6, 8, 32'h100 * (k + 1));
    repeat (3) begin
      @(posedge clk);
      check(!rvalid, "test 2: no read data before the oldest read is answered");
    end
    send_resp(0, 1, 8, 32'h100);
    // drain in issue order
    for (int k = 0; k < 6; k++)
      for (int b = 0; b < 8; b++) begin
        @(negedge clk); rready = 1;
        @(posedge clk); while (!rvalid) @(posedge clk);
        check(rdata == 32'h100 * (k + 1) + 32'(b), $sformatf("test 2: burst %0d word %0d = %h", k, b, rdata));
        check(rlast == (b == 7), "test 2: rlast");
        if (k == 0 && b == 7) begin
          #1;
        end
      end
    @(negedge clk); rready = 0;
    repeat (3) @(posedge clk);
    check(!req_valid || tx.size() > 0, "test 2: held-back read accepted after a slot was freed");
    @(negedge clk); req_valid = 0;
    check(tx.size() >= 12 + 2, $sformatf("test 2: %0d flits, six reads plus the held-back one", tx.size()));

    // 3. write response
    send_resp(1, 12'h801, 1, 0);
    @(posedge clk);
    check(bvalid, "test 3: bvalid after write response");
    @(negedge clk); bready = 1;
    @(negedge clk); bready = 0;
    check(!bvalid, "test 3: bvalid cleared after handshake");

    // 4. credits
    repeat (10) @(posedge clk);
    tx.delete();
    auto_credit = 0;
    for (int k = 0; k < 3; k++) begin
      @(negedge clk); req_valid = 1; req_write = 0; req_addr = 32'h5000 + 32'(k); req_len_m1 = 0;
      @(posedge clk); #1;
    end
    @(negedge clk); req_valid = 0;
    repeat (10) @(posedge clk);
    check(tx.size() <= VC_DEPTH, $sformatf("test 4: %0d flits injected without credits", tx.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
