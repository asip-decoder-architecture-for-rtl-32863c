// alu_stage1: first stage of one ALU functional unit (one SIMD lane).
//
// The unit takes one operand per clock and serves both decoding algorithms:
//  - Accumulate: running sum of operands. For LDPC variable nodes it sums the
//    channel value and the incoming check messages. For Viterbi it forms the
//    branch metric, adding either the received soft value or its bitwise
//    negation as selected by the systematic info bit (the expected encoder
//    output), and adds it to the fed-back state metric (the ACS addition).
//  - Min Search: smallest and second smallest magnitude and the XOR of the
//    signs of a sequence of operands (check node update).
//  - Minima buffer / hold: on an instruction with `hold` set, the final min
//    search result and the accumulator are copied to a hold buffer, so stage 2
//    can emit results of one node while stage 1 already works on the next.
//  - LLR buffer: BUF_DEPTH entries that keep each operand (or the new
//    accumulator value, for Viterbi candidates) for the intrinsic-information
//    removal in stage 2.
// The split into these parts follows the published two-stage FU. The hold
// copy of the accumulator, the separate working/held minima and the operand
// encodings are this design's own choices.
//
// Timing: all state updates at the rising clock edge of the cycle in which
// `ctl.valid` is set; the outputs are registered values (buffer reads are
// combinational from registers). Synchronous active-low reset clears all state.
module alu_stage1
  import dec_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  s1_ctl_t             ctl,
  input  lane_t               in_val,   // operand from the shuffle network
  input  dval_t               fb,       // fed-back state metric (stage 2 output)
  input  logic                sys_z,    // expected encoder output bit
  input  logic [BUF_BITS-1:0] rd_idx,   // LLR buffer entry read by stage 2
  output s1_out_t             out
);

  dval_t acc_q, acc_d;
  mag_t  min1_q, min2_q, min1_d, min2_d;
  logic  sgn_q, sgn_d;
  dval_t buf_q [BUF_DEPTH];
  dval_t sum_h;
  mag_t  min1_h, min2_h;
  logic  sgn_h;

  dval_t in_s;     // signed operand
  dval_t branch;   // Viterbi branch term: y or ~y, unsigned
  mag_t  in_mag;
  logic  in_sgn;

  always_comb begin
    in_s   = sext_lane(in_val);
    branch = dval_t'({1'b0, (sys_z ? ~in_val : in_val)});
    in_sgn = in_val[LW-1];
    // magnitude saturates: -16 maps to 15
    if (in_sgn) in_mag = (in_val == lane_t'(1 << (LW - 1))) ? mag_t'(LLR_MAX) : mag_t'(-in_val);
    else        in_mag = mag_t'(in_val);

    acc_d  = acc_q;
    min1_d = min1_q;
    min2_d = min2_q;
    sgn_d  = sgn_q;
    unique case (ctl.op)
      S1_ACC_LD:    acc_d = in_s;
      S1_ACC_ADD:   acc_d = acc_q + in_s;
      S1_ACC_FBSYS: acc_d = fb + branch;
      S1_ACC_SYS:   acc_d = acc_q + branch;
      S1_MIN_FIRST: begin
        min1_d = in_mag;
        min2_d = mag_t'(LLR_MAX);
        sgn_d  = in_sgn;
      end
      S1_MIN: begin
        if (in_mag < min1_q) begin
          min1_d = in_mag;
          min2_d = min1_q;
        end else if (in_mag < min2_q) begin
          min2_d = in_mag;
        end
        sgn_d = sgn_q ^ in_sgn;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_q  <= '0;
      min1_q <= '0;
      min2_q <= '0;
      sgn_q  <= 1'b0;
      sum_h  <= '0;
      min1_h <= '0;
      min2_h <= '0;
      sgn_h  <= 1'b0;
      for (int i = 0; i < BUF_DEPTH; i++) buf_q[i] <= '0;
    end else if (ctl.valid) begin
      acc_q  <= acc_d;
      min1_q <= min1_d;
      min2_q <= min2_d;
      sgn_q  <= sgn_d;
      if (ctl.buf_we) buf_q[ctl.buf_idx] <= ctl.buf_src ? acc_d : in_s;
      if (ctl.hold) begin
        sum_h  <= acc_d;
        min1_h <= min1_d;
        min2_h <= min2_d;
        sgn_h  <= sgn_d;
      end
    end
  end

  always_comb begin
    out.acc    = acc_q;
    out.buf_rd = buf_q[rd_idx];
    out.cand0  = buf_q[0];
    out.cand1  = buf_q[1];
    out.sum    = sum_h;
    out.min1   = min1_h;
    out.min2   = min2_h;
    out.sgn    = sgn_h;
  end

endmodule
