// tbu: traceback unit of the Viterbi decoder.
//
// The path memory keeps the decision vectors of the last TB_LEN trellis steps
// (one bit per state, TB_LEN = 5K for constraint length K = 7). The previous
// state on the survivor path is the decision bit of the current state
// concatenated with the current state shifted right:
//   prev(s) = (d_s << (lg_states-1)) | (s >> 1),
// and the decoded input bit of a step is bit 0 of the state it led to.
// After every pushed decision vector (once TB_LEN + 1 vectors are stored) the
// unit traces back TB_LEN steps from state 0 through a combinational chain and
// emits the decoded bit of the oldest step, so one bit leaves per trellis
// step. `flush` ends a block: starting from state 0 (a terminated trellis
// ends there) it walks the stored vectors one per clock and emits the last
// min(TB_LEN, steps) bits, newest first.
// Each decoded bit is written to the data memory as one lane of a word: bit
// number n goes to word obase + n/P, lane n mod P, with value 0 or 1. The
// write request waits in a one-entry register until `wr_ready`.
// Traceback depth 5K, the separate unit and the path memory follow the
// published design; starting each traceback at state 0 (no best-state search),
// the combinational chain and the memory output format are this design's own
// choices. `clear` (a new block) empties the path memory count.
module tbu
  import dec_pkg::*;
#(
  parameter int unsigned DEPTH = TB_LEN
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 push,
  input  logic [P-1:0]         d,
  input  logic                 flush,
  input  logic [2:0]           lg_states,
  input  logic [DA-1:0]        obase,
  input  logic                 wr_ready,
  output logic                 wr_valid,
  output logic [DA-1:0]        wr_addr,
  output logic [LANE_BITS-1:0] wr_lane,
  output logic                 wr_bit,
  output logic                 busy
);

  typedef logic [LANE_BITS-1:0] st_t;

  logic [P-1:0] pm [DEPTH];
  logic [15:0]  cnt;
  logic         pend;
  logic         fl_act;
  logic         fl_req;
  st_t          fl_st;
  logic [15:0]  fl_i, fl_n;
  st_t          chain [DEPTH+1];
  logic         slot_free;
  logic [15:0]  idx_q;

  function automatic st_t prev_state(st_t s, logic dbit, logic [2:0] lg);
    st_t msk;
    msk = st_t'((1 << lg) - 1);
    return ((s >> 1) | (st_t'(dbit) << (lg - 1))) & msk;
  endfunction

  always_comb begin
    chain[0] = '0;
    for (int i = 0; i < DEPTH; i++) chain[i+1] = prev_state(chain[i], pm[i][chain[i]], lg_states);
  end

  assign slot_free = !wr_valid || wr_ready;
  assign busy      = fl_act || fl_req || flush || wr_valid || pend;
  assign wr_addr   = obase + DA'(idx_q >> LANE_BITS);
  assign wr_lane   = idx_q[LANE_BITS-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      cnt      <= '0;
      pend     <= 1'b0;
      fl_act   <= 1'b0;
      fl_req   <= 1'b0;
      fl_st    <= '0;
      fl_i     <= '0;
      fl_n     <= '0;
      wr_valid <= 1'b0;
      wr_bit   <= 1'b0;
      idx_q    <= '0;
      for (int i = 0; i < DEPTH; i++) pm[i] <= '0;
    end else begin
      if (wr_valid && wr_ready) wr_valid <= 1'b0;
      if (flush) fl_req <= 1'b1;
      if (push) begin
        pm[0] <= d;
        for (int i = 1; i < DEPTH; i++) pm[i] <= pm[i-1];
        cnt  <= cnt + 1'b1;
        pend <= 1'b1;
      end else if (pend) begin
        pend <= 1'b0;
        if (cnt >= 16'(DEPTH + 1)) begin
          wr_valid <= 1'b1;
          wr_bit   <= chain[DEPTH][0];
          idx_q    <= cnt - 16'(DEPTH + 1);
        end
      end else if (fl_req && !fl_act) begin
        fl_req <= 1'b0;
        fl_act <= (cnt != 0);
        fl_st  <= '0;
        fl_i   <= '0;
        fl_n   <= (cnt < 16'(DEPTH)) ? cnt : 16'(DEPTH);
      end else if (fl_act && slot_free) begin
        wr_valid <= 1'b1;
        wr_bit   <= fl_st[0];
        idx_q    <= cnt - 16'd1 - fl_i;
        fl_st    <= prev_state(fl_st, pm[fl_i[$clog2(DEPTH)-1:0]][fl_st], lg_states);
        fl_i     <= fl_i + 1'b1;
        if (fl_i + 1'b1 == fl_n) fl_act <= 1'b0;
      end
    end
  end

  // A decoded bit must not be produced while the previous one still waits.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (pend && !push && cnt >= 16'(DEPTH + 1)) |-> slot_free);

endmodule
