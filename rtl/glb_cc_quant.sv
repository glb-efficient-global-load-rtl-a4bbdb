// glb_cc_quant: reduces a fraction cnt/total to the 2-bit Congestion Condition (CC).
//
// The four bands are those of the source's Table 1:
//   0 < f <= 1/4 -> 00,  1/4 < f <= 1/2 -> 01,  1/2 < f <= 3/4 -> 10,  3/4 < f <= 1 -> 11.
// The division is avoided by comparing 4*cnt against total, 2*total and 3*total, so any
// total works (edge routers have fewer ports and neighbours than inner ones). The table
// leaves f = 0 open; this design maps it to 00, as is total = 0. Purely combinational.
module glb_cc_quant #(
  parameter int unsigned CNT_W = 3
) (
  input  logic [CNT_W-1:0] cnt,    // number of congested items
  input  logic [CNT_W-1:0] total,  // number of items
  output logic [1:0]       cc
);

  logic [CNT_W+2:0] c4, t1, t2, t3;

  always_comb begin
    c4 = (CNT_W+3)'({cnt, 2'b00});
    t1 = (CNT_W+3)'(total);
    t2 = (CNT_W+3)'(total) << 1;
    t3 = t1 + t2;
    if (c4 <= t1)      cc = 2'b00;
    else if (c4 <= t2) cc = 2'b01;
    else if (c4 <= t3) cc = 2'b10;
    else               cc = 2'b11;
  end

endmodule
