// agu: address generation and control logic of the decoder.
//
// Address registers: four 16-bit element pointers ar0..ar3, each with a
// stride. Bits [15:6] of a pointer name a data-memory word and bits [5:0] a
// lane in it. A vector access goes to word ar[15:6] + offset; a broadcast read
// takes lane ar[5:0] of that word. An instruction may post-increment the
// register it used by its stride (once, even if read and write use the same
// register). SETAR loads a register and its stride.
// Configuration (SETCFG): log2 of the trellis state count, the two generator
// polynomials, the offset beta of the Min-Sum check node update and the base
// word of the decoded output. `cfg_wr` pulses when it is loaded.
// Systematic info: for the trellis branch leaving state j (j = lane mod N)
// with input bit u, the expected encoder output of symbol element b is the
// parity of ({j, u} AND G_b), where bit 0 of {j, u} is the newest input bit u.
// It is computed for every lane in the cycle the stage-1 operation executes.
// The published design gives the AGU's role (addresses, shuffle control and
// systematic info to the ALUs); register count, widths, pointer format and the
// polynomial-based systematic info are this design's own choices.
// Register updates happen at the clock edge of the issuing cycle; addresses
// are combinational from the current register values.
module agu
  import dec_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ctrl_valid,
  input  ctrl_t                ctrl,
  input  logic                 issue,       // a VLIW word issues this cycle
  input  vliw_t                iw,
  // stage-1 systematic info request
  input  logic                 sys_u,
  input  logic                 sys_b,
  output logic [DA-1:0]        rd_addr,
  output logic [LANE_BITS-1:0] bcast_lane,
  output logic [DA-1:0]        wr_addr,
  output logic [P-1:0]         sys_z,
  output logic [2:0]           lg_states,
  output mag_t                 beta,
  output logic [DA-1:0]        obase,
  output logic                 cfg_wr
);

  logic [15:0] ar     [4];
  logic [15:0] stride [4];
  logic [7:0]  g1, g2;

  assign rd_addr    = ar[iw.rd_ar][15:LANE_BITS] + iw.rd_off;
  assign bcast_lane = ar[iw.rd_ar][LANE_BITS-1:0];
  assign wr_addr    = ar[iw.wr_ar][15:LANE_BITS] + iw.wr_off;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) begin
        ar[i]     <= '0;
        stride[i] <= '0;
      end
      g1        <= '0;
      g2        <= '0;
      lg_states <= 3'd6;
      beta      <= '0;
      obase     <= '0;
      cfg_wr    <= 1'b0;
    end else begin
      cfg_wr <= 1'b0;
      if (ctrl_valid && ctrl.op == C_SETAR) begin
        ar[ctrl.idx[1:0]]     <= ctrl.a;
        stride[ctrl.idx[1:0]] <= ctrl.b;
      end else if (ctrl_valid && ctrl.op == C_SETCFG) begin
        lg_states <= ctrl.idx[2:0];
        g1        <= ctrl.a[15:8];
        g2        <= ctrl.a[7:0];
        beta      <= mag_t'(ctrl.b);
        obase     <= DA'(ctrl.c);
        cfg_wr    <= 1'b1;
      end else if (issue) begin
        if (iw.rd_en && iw.rd_inc) ar[iw.rd_ar] <= ar[iw.rd_ar] + stride[iw.rd_ar];
        if (iw.wr_en && iw.wr_inc && !(iw.rd_en && iw.rd_inc && iw.rd_ar == iw.wr_ar))
          ar[iw.wr_ar] <= ar[iw.wr_ar] + stride[iw.wr_ar];
      end
    end
  end

  // systematic info
  always_comb begin
    logic [LANE_BITS:0] r;
    logic [7:0]         g;
    logic [LANE_BITS-1:0] msk;
    msk = LANE_BITS'((1 << lg_states) - 1);
    g   = sys_b ? g2 : g1;
    for (int l = 0; l < P; l++) begin
      r        = {LANE_BITS'(l) & msk, sys_u};
      sys_z[l] = ^(r & g[LANE_BITS:0]);
    end
  end

endmodule
