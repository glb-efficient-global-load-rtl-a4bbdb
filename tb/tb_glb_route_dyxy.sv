// tb_glb_route_dyxy: exhaustive test of the DyXY routing unit on a 5x5 mesh: every
// current node, destination and combination of downstream congestion flags. The expected
// port is worked out from the rule: local at the destination, the only productive
// direction when one coordinate matches, otherwise X unless X is congested and Y is not.
module tb_glb_route_dyxy;
  import glb_pkg::*;
  logic [COORD_W-1:0] cur_x, cur_y, dst_x, dst_y;
  logic [NUM_PORTS-1:0] nb_cong;
  port_e out_port;
  logic adaptive;
  glb_route_dyxy dut (.*);
  int checks = 0, failures = 0, n_adapt = 0;
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int cx = 0; cx < 5; cx++) for (int cy = 0; cy < 5; cy++)
    for (int dx = 0; dx < 5; dx++) for (int dy = 0; dy < 5; dy++)
    for (int f = 0; f < 32; f++) begin
      int ex; bit ea;
      int xd, yd;
      cur_x = 3'(cx); cur_y = 3'(cy); dst_x = 3'(dx); dst_y = 3'(dy); nb_cong = 5'(f);
      #1;
      xd = (dx > cx) ? 2 : 4;
      yd = (dy > cy) ? 1 : 3;
      ea = 0;
      if (dx == cx && dy == cy) ex = 0;
      else if (dy == cy) ex = xd;
      else if (dx == cx) ex = yd;
      else if (f[xd] && !f[yd]) begin ex = yd; ea = 1; end
      else ex = xd;
      checks++;
      if (int'(out_port) != ex || adaptive != ea) begin
        failures++;
        if (failures < 10) $display("(%0d,%0d)->(%0d,%0d) flags %b: port %0d exp %0d", cx, cy, dx, dy, f[4:0], out_port, ex);
      end
      if (adaptive) n_adapt++;
    end
    checks++;
    if (n_adapt == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
