// tb_glb_input_sel: random test of the GLB priority arbiter with 5 requesters. The
// expected grant is the requester with the largest priority, the lowest index among
// equals, computed by a separate scan; override must flag grants that skip a lower index.
module tb_glb_input_sel;
  localparam int N = 5, PW = 5;
  logic [N-1:0] req, gnt;
  logic [PW-1:0] prio [N];
  logic [2:0] gnt_idx;
  logic gnt_valid, override;
  glb_input_sel #(.N(N), .PRIO_W(PW)) dut (.*);
  int checks = 0, failures = 0, n_ovr = 0;
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 5000; i++) begin
      int best, bestp, first;
      req = 5'($urandom);
      for (int k = 0; k < N; k++) prio[k] = 5'($urandom_range(i % 2 ? 3 : 31));
      #1;
      best = -1; bestp = -1; first = -1;
      for (int k = 0; k < N; k++) if (req[k]) begin
        if (first < 0) first = k;
        if (int'(prio[k]) > bestp) begin bestp = int'(prio[k]); best = k; end
      end
      checks++;
      if (best < 0) begin
        if (gnt_valid || gnt != 0) begin failures++; $display("grant without request"); end
      end else begin
        if (!gnt_valid || int'(gnt_idx) != best || gnt != 5'(1 << best) || override != (best != first)) begin
          failures++;
          if (failures < 10) $display("req %b: gnt %0d exp %0d", req, gnt_idx, best);
        end
      end
      if (override) n_ovr++;
    end
    checks++;
    if (n_ovr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
