// tb_glb_congestion: random test of the congestion unit for an inner router (all five
// ports) and a corner router (local, north, east). Flags, own and neighbour Congestion
// Condition and the 4-bit local value are recomputed from the occupancies with the
// Table 1 bands written as fractions.
module tb_glb_congestion;
  import glb_pkg::*;
  localparam int TH = 2;
  logic [3:0] occ [NUM_PORTS];
  logic [1:0] ccin [NUM_PORTS];
  logic [NUM_PORTS-1:0] flag_a, flag_b;
  logic [1:0] own_a, nb_a, own_b, nb_b;
  logic [3:0] cv_a, cv_b;
  localparam logic [4:0] EN_B = 5'b00111;

  glb_congestion #(.PORT_EN(5'b11111), .THRESHOLD(TH), .OCC_W(4)) dut_a (
    .occupancy(occ), .cc_nb_in(ccin), .cong_flag(flag_a), .cc_own(own_a), .cc_nb(nb_a), .local_cv(cv_a));
  glb_congestion #(.PORT_EN(EN_B), .THRESHOLD(TH), .OCC_W(4)) dut_b (
    .occupancy(occ), .cc_nb_in(ccin), .cong_flag(flag_b), .cc_own(own_b), .cc_nb(nb_b), .local_cv(cv_b));

  int checks = 0, failures = 0;

  function automatic logic [1:0] band(int c, int t);
    real f = (t == 0) ? 0.0 : real'(c) / real'(t);
    if (f <= 0.25) return 2'b00;
    if (f <= 0.5)  return 2'b01;
    if (f <= 0.75) return 2'b10;
    return 2'b11;
  endfunction

  task automatic expect_unit(logic [4:0] en, logic [4:0] flag, logic [1:0] own, logic [1:0] nb, logic [3:0] cv);
    int nin = 0, ncong = 0, nnb = 0, nnbc = 0;
    logic [4:0] ef;
    for (int p = 0; p < 5; p++) begin
      ef[p] = en[p] && occ[p] > TH;
      if (en[p]) nin++;
      if (ef[p]) ncong++;
      if (p > 0 && en[p]) begin nnb++; if (ccin[p] != 0) nnbc++; end
    end
    checks += 4;
    if (flag !== ef) begin failures++; $display("flag %b exp %b", flag, ef); end
    if (own !== band(ncong, nin)) begin failures++; $display("own %b exp %b", own, band(ncong, nin)); end
    if (nb !== band(nnbc, nnb)) begin failures++; $display("nb %b exp %b", nb, band(nnbc, nnb)); end
    if (cv !== {band(ncong, nin), band(nnbc, nnb)}) begin failures++; $display("cv %b", cv); end
  endtask

  int seen_own [4];
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 4; i++) seen_own[i] = 0;
    for (int i = 0; i < 2000; i++) begin
      for (int p = 0; p < 5; p++) begin
        occ[p]  = 4'($urandom_range(10));
        ccin[p] = 2'($urandom_range(3));
      end
      #1;
      expect_unit(5'b11111, flag_a, own_a, nb_a, cv_a);
      expect_unit(EN_B, flag_b, own_b, nb_b, cv_b);
      seen_own[own_a]++;
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (seen_own[i] == 0) begin failures++; $display("CC %0d never produced", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
