// trellis_connect: programmable interconnect between the two ALU stages.
//
// In straight mode every stage-2 lane sees only its own stage-1 lane (LDPC
// node processing, pass operations). In trellis mode it realises the butterfly
// connections of a shift-register trellis with N = 2^lg_states states, N one of
// 8, 16, 32 or 64. State k is reached from states j0 = k>>1 and
// j1 = (k>>1) + N/2 with input bit u = k & 1 (the new state is the old state
// shifted left with u entering at bit 0). Stage-1 lane j holds in LLR-buffer
// entry u the candidate metric of its branch with input bit u; stage-2 lane k
// therefore gets ta = entry (k&1) of lane j0 and tb = entry (k&1) of lane j1.
// With N smaller than the lane count, the lanes split into P/N independent
// trellises of N lanes each.
// The supported state counts follow the published design; the state-numbering
// convention and the splitting of the lanes into several trellises are this
// design's own choices. Purely combinational.
module trellis_connect
  import dec_pkg::*;
(
  input  s1_out_t       s1 [P],
  input  logic          trellis,     // 1: trellis butterflies, 0: straight
  input  logic [2:0]    lg_states,   // log2 of the state count, 3..6
  output s2_in_t        s2 [P]
);

  logic [LANE_BITS:0] n_st;
  always_comb begin
    if (lg_states < 3)                      n_st = (LANE_BITS+1)'(8);
    else if (lg_states > 3'(LANE_BITS))     n_st = (LANE_BITS+1)'(P);
    else                                    n_st = (LANE_BITS+1)'(1) << lg_states;
  end

  for (genvar k = 0; k < P; k++) begin : g_lane
    logic [LANE_BITS-1:0] base, loc, j0, j1;
    always_comb begin
      loc  = LANE_BITS'(k) & LANE_BITS'(n_st - 1);
      base = LANE_BITS'(k) & ~LANE_BITS'(n_st - 1);
      j0   = base | LANE_BITS'(loc >> 1);
      j1   = base | LANE_BITS'({1'b0, loc >> 1} + (n_st >> 1));
      s2[k].own = s1[k];
      if (trellis) begin
        s2[k].ta = (k % 2 == 1) ? s1[j0].cand1 : s1[j0].cand0;
        s2[k].tb = (k % 2 == 1) ? s1[j1].cand1 : s1[j1].cand0;
      end else begin
        s2[k].ta = s1[k].cand0;
        s2[k].tb = s1[k].cand1;
      end
    end
  end

endmodule
