// glb_input_sel: the GLB input selection function (priority arbiter).
//
// Each requester i presents a priority prio[i], which is the Congestion Status carried by
// its packet plus the number of arbitration rounds it has already lost. The requester with
// the highest priority is granted. The scan runs from index 0 upwards and replaces the
// running maximum only on a strictly greater value, so among equal priorities the lowest
// index wins. The waiting counters that age losers live in the caller (glb_switch_alloc).
//
// Combinational: req/prio in, one-hot gnt plus gnt_idx and gnt_valid out. override is set
// when the granted requester is not the lowest-index requester, i.e. when the priority
// values, not the index order, decided. The max-of-(C+W) selection follows the source's
// pseudo code; the tie rule and the event output are this design's.
module glb_input_sel #(
  parameter int unsigned N      = 5,
  parameter int unsigned PRIO_W = 5,
  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]      req,
  input  logic [PRIO_W-1:0] prio [N],
  output logic [N-1:0]      gnt,
  output logic [IDX_W-1:0]  gnt_idx,
  output logic              gnt_valid,
  output logic              override
);

  logic [PRIO_W-1:0] max_prio;
  logic [IDX_W-1:0]  first_idx;
  logic              seen;

  always_comb begin
    gnt_valid = 1'b0;
    gnt_idx   = '0;
    max_prio  = '0;
    first_idx = '0;
    seen      = 1'b0;
    for (int i = 0; i < N; i++) begin
      if (req[i]) begin
        if (!seen) first_idx = IDX_W'(i);
        seen = 1'b1;
        if (!gnt_valid || prio[i] > max_prio) begin
          gnt_valid = 1'b1;
          max_prio  = prio[i];
          gnt_idx   = IDX_W'(i);
        end
      end
    end
    gnt = '0;
    if (gnt_valid) gnt[gnt_idx] = 1'b1;
    override = gnt_valid && (gnt_idx != first_idx);
  end

endmodule
