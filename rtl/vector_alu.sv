// vector_alu: the array of P parallel ALU functional units.
//
// Every lane has a stage 1 (accumulate, min search, buffers) and a stage 2
// (intrinsics subtraction, compare & select, offset subtraction, out mux).
// Between the stages sits the programmable trellis interconnect. The stage-2
// result of each lane is fed back to the same lane's stage 1 as the state
// metric for the next trellis step. All lanes execute the same operation
// (SIMD).
// Timing: an operand presented with s1_ctl in cycle t updates stage 1 at the
// end of t; a stage-2 operation issued in cycle t+1 sees that state and its
// result is on `res` from cycle t+2. The arrangement follows the published
// array of two-stage FUs; the interface is this design's own.
module vector_alu
  import dec_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  s1_ctl_t     s1_ctl,
  input  vec_t        in_vec,      // operands, one per lane
  input  logic [P-1:0] sys_z,      // systematic info, one bit per lane
  input  s2_ctl_t     s2_ctl,
  input  mag_t        beta,
  input  logic [2:0]  lg_states,
  output dval_t       res [P],     // stage-2 results (registered)
  output logic [P-1:0] dec         // decision bits (registered)
);

  s1_out_t s1o [P];
  s2_in_t  s2i [P];

  for (genvar l = 0; l < P; l++) begin : g_lane
    alu_stage1 u_s1 (
      .clk    (clk),
      .rst_n  (rst_n),
      .ctl    (s1_ctl),
      .in_val (in_vec[l]),
      .fb     (res[l]),
      .sys_z  (sys_z[l]),
      .rd_idx (s2_ctl.buf_idx),
      .out    (s1o[l])
    );
    alu_stage2 u_s2 (
      .clk   (clk),
      .rst_n (rst_n),
      .ctl   (s2_ctl),
      .in    (s2i[l]),
      .beta  (beta),
      .out_q (res[l]),
      .d_q   (dec[l])
    );
  end

  trellis_connect u_ic (
    .s1        (s1o),
    .trellis   (s2_ctl.trellis),
    .lg_states (lg_states),
    .s2        (s2i)
  );

endmodule
