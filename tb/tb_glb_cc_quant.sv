// tb_glb_cc_quant: exhaustive test of the Table 1 quantiser for all cnt <= total <= 7,
// against the bands computed with real-valued fractions.
module tb_glb_cc_quant;
  logic [2:0] cnt, total;
  logic [1:0] cc;
  glb_cc_quant #(.CNT_W(3)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 8; t++)
      for (int c = 0; c <= t; c++) begin
        real f;
        logic [1:0] exp_cc;
        cnt = 3'(c); total = 3'(t);
        #1;
        f = (t == 0) ? 0.0 : real'(c) / real'(t);
        if (f <= 0.25) exp_cc = 2'b00;
        else if (f <= 0.5) exp_cc = 2'b01;
        else if (f <= 0.75) exp_cc = 2'b10;
        else exp_cc = 2'b11;
        checks++;
        if (cc !== exp_cc) begin
          failures++;
          $display("cnt=%0d total=%0d cc=%b expected %b", c, t, cc, exp_cc);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
