// alu_stage2: second stage of one ALU functional unit (one SIMD lane).
//
// It finishes the node operation that stage 1 prepared:
//  - Intrinsics subtraction (S2_VN): the variable node sum minus the buffered
//    check message of the edge being answered, i.e. the sum without that
//    edge's own contribution.
//  - Compare & select with offset subtraction (S2_CN): the buffered edge
//    magnitude is compared with the smallest magnitude of the check node; if it
//    equals it, the second smallest is taken instead. The offset beta is then
//    subtracted, clipped at zero, and the sign is the XOR of all signs except
//    the edge's own (offset Min-Sum).
//  - Compare & select (S2_ACS): the two candidate metrics routed in by the
//    trellis interconnect are compared, the smaller one becomes the new state
//    metric and the decision bit tells which predecessor won (1: the second).
//    Metrics wrap around (modulo arithmetic), so the comparison uses the sign
//    of the difference and needs no normalisation.
//  - S2_ACC / S2_DEC pass the accumulator or the held sum.
// LDPC results are saturated to the 5-bit memory range. The out mux result
// and the decision bit are registered: they appear one clock after the
// operation. The split into intrinsics subtraction, compare & select, offset
// subtraction and out mux follows the published FU; the decision polarity,
// tie rule (ties keep the first candidate) and modulo compare are this
// design's own choices.
module alu_stage2
  import dec_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  s2_ctl_t ctl,
  input  s2_in_t  in,
  input  mag_t    beta,
  output dval_t   out_q,   // updated metric (Viterbi) or message (LDPC)
  output logic    d_q      // decision bit of the last S2_ACS
);

  dval_t e;
  logic  e_sgn;
  mag_t  e_mag;
  mag_t  m_sel, m_off;
  dval_t cn_val, vn_val, acs_val, diff;
  dval_t res;
  logic  acs_d;

  always_comb begin
    // Compare & select + offset subtraction (check node)
    e     = in.own.buf_rd;
    e_sgn = e[DW-1];
    if (e_sgn) e_mag = (-e > dval_t'(LLR_MAX)) ? mag_t'(LLR_MAX) : mag_t'(-e);
    else       e_mag = (e > dval_t'(LLR_MAX)) ? mag_t'(LLR_MAX) : mag_t'(e);
    m_sel  = (e_mag == in.own.min1) ? in.own.min2 : in.own.min1;
    m_off  = (m_sel > beta) ? m_sel - beta : '0;
    cn_val = (in.own.sgn ^ e_sgn) ? -dval_t'({1'b0, m_off}) : dval_t'({1'b0, m_off});

    // Intrinsics subtraction (variable node)
    vn_val = in.own.sum - in.own.buf_rd;

    // Compare & select (trellis ACS), modulo compare
    diff    = in.ta - in.tb;
    acs_d   = (diff > 0);
    acs_val = acs_d ? in.tb : in.ta;

    // Out mux
    unique case (ctl.op)
      S2_ACC:  res = sext_lane(sat_lane(in.own.acc));
      S2_CN:   res = cn_val;
      S2_VN:   res = sext_lane(sat_lane(vn_val));
      S2_DEC:  res = sext_lane(sat_lane(in.own.sum));
      S2_ACS:  res = acs_val;
      default: res = out_q;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_q <= '0;
      d_q   <= 1'b0;
    end else begin
      out_q <= res;
      if (ctl.op == S2_ACS) d_q <= acs_d;
    end
  end

endmodule
