// tb_glb_fifo: self-checking test of the VC input buffer against a queue model.
// Random pushes and pops (never pushing into a full buffer or popping an empty one, as
// credit flow control guarantees) at the default depth of 5; every cycle the head entry
// and the occupancy count are compared with the model.
module tb_glb_fifo;
  localparam int W = 35, D = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [2:0] count;
  glb_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int n_full = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (count != 3'(model.size())) begin failures++; $display("count %0d vs %0d", count, model.size()); end
      if (model.size() > 0) begin
        checks++;
        if (rd_data != model[0]) begin failures++; $display("data %h vs %h", rd_data, model[0]); end
      end
      if (model.size() == D) n_full++;
      rd_en   = (model.size() > 0) && ($urandom_range(2) == 0);
      wr_en   = ((model.size() < D) || rd_en) && ($urandom_range(1) == 0);
      wr_data = {$urandom, 3'($urandom)};
      @(posedge clk);
      #1;
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
      rd_en = 0; wr_en = 0;
    end
    checks++;
    if (n_full == 0) begin failures++; $display("buffer never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
