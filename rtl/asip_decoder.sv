// asip_decoder: programmable channel decoder for convolutional and LDPC codes.
//
// A SIMD/VLIW processor whose single datapath runs both Viterbi decoding and
// offset Min-Sum LDPC decoding. One instruction per clock flows through four
// pipeline steps, and each VLIW word carries the fields for all of them:
//   issue (cycle t)  : program control issues the word; the AGU forms the
//                      data-memory read address and updates its pointers.
//   stage 1 (t+1)    : the read word passes the shuffle (barrel shifter or
//                      broadcast) and enters stage 1 of the P ALU FUs, which
//                      also receive systematic info from the AGU.
//   stage 2 (t+2)    : the trellis interconnect routes stage-1 values to
//                      stage 2; results are registered at the end of t+2.
//   write (t+3)      : results pass the inverse shuffle into the data memory;
//                      decision bits go to the traceback unit (TBU).
// The stage-2 results also feed back to stage 1 as Viterbi state metrics;
// they are usable by a stage-1 operation issued two cycles after the
// stage-2 operation that produced them. The program must itself keep such
// distances (and three cycles between writing and reading back a word); the
// hardware has no interlocks.
// The TBU writes decoded bits into the data memory whenever the datapath does
// not write in that cycle.
// Host interface: load the program and data while `done`/idle, pulse `start`,
// wait for `done` (program halted, pipeline and TBU drained), read results.
// Block structure (DMEM, shuffle, two-stage ALU array with trellis connect,
// TBU, AGU, program control, IMEM) and sizes follow the published
// architecture; the pipeline timing, instruction set and host interface are
// this design's own.
module asip_decoder
  import dec_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          done,
  output logic          busy,
  // host access (only while not busy)
  input  logic          h_imem_we,
  input  logic [IA-1:0] h_imem_addr,
  input  logic [IW-1:0] h_imem_wdata,
  input  logic          h_dmem_we,
  input  logic          h_dmem_re,
  input  logic [DA-1:0] h_dmem_addr,
  input  vec_t          h_dmem_wdata,
  output vec_t          h_dmem_rdata,
  output logic          host_err
);

  // ------------------------------------------------------------ program control
  logic [IA-1:0] im_raddr, im_waddr;
  logic [IW-1:0] im_rdata, im_wdata;
  logic          im_we;
  logic          vliw_valid, ctrl_valid, running, halted;
  vliw_t         iw;
  ctrl_t         cw;

  imem u_imem (
    .clk   (clk),
    .raddr (im_raddr),
    .rdata (im_rdata),
    .we    (im_we),
    .waddr (im_waddr),
    .wdata (im_wdata)
  );

  program_control u_pc (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start && !busy),
    .imem_raddr (im_raddr),
    .imem_rdata (im_rdata),
    .vliw_valid (vliw_valid),
    .vliw       (iw),
    .ctrl_valid (ctrl_valid),
    .ctrl       (cw),
    .running    (running),
    .halted     (halted)
  );

  // ------------------------------------------------------------ AGU
  typedef struct packed {
    logic    valid;
    s1_ctl_t s1;
    s2_ctl_t s2;
    wr_ctl_t wr;
  } p1_t;
  typedef struct packed {
    logic    valid;
    s2_ctl_t s2;
    wr_ctl_t wr;
  } p2_t;
  typedef struct packed {
    logic    valid;
    wr_ctl_t wr;
  } p3_t;

  p1_t p1;
  p2_t p2;
  p3_t p3;

  logic [DA-1:0]        rd_addr, wr_addr, obase;
  logic [LANE_BITS-1:0] bcast_lane;
  logic [P-1:0]         sys_z;
  logic [2:0]           lg_states;
  mag_t                 beta;
  logic                 cfg_wr;

  agu u_agu (
    .clk        (clk),
    .rst_n      (rst_n),
    .ctrl_valid (ctrl_valid),
    .ctrl       (cw),
    .issue      (vliw_valid),
    .iw         (iw),
    .sys_u      (p1.s1.sys_u),
    .sys_b      (p1.s1.sys_b),
    .rd_addr    (rd_addr),
    .bcast_lane (bcast_lane),
    .wr_addr    (wr_addr),
    .sys_z      (sys_z),
    .lg_states  (lg_states),
    .beta       (beta),
    .obase      (obase),
    .cfg_wr     (cfg_wr)
  );

  // ------------------------------------------------------------ pipeline control
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p1 <= '0;
      p2 <= '0;
      p3 <= '0;
    end else begin
      p1.valid           <= vliw_valid;
      p1.s1.valid        <= vliw_valid;
      p1.s1.op           <= vliw_valid ? iw.s1_op : S1_NOP;
      p1.s1.buf_we       <= vliw_valid && iw.s1_buf_we;
      p1.s1.buf_src      <= iw.s1_buf_src;
      p1.s1.buf_idx      <= iw.s1_buf_idx;
      p1.s1.hold         <= vliw_valid && iw.s1_hold;
      p1.s1.sys_u        <= iw.sys_u;
      p1.s1.sys_b        <= iw.sys_b;
      p1.s1.shuf_mode    <= iw.shuf_mode;
      p1.s1.shuf_amt     <= iw.shuf_amt;
      p1.s1.bcast_lane   <= bcast_lane;
      p1.s2.op           <= vliw_valid ? iw.s2_op : S2_NOP;
      p1.s2.buf_idx      <= iw.s2_buf_idx;
      p1.s2.trellis      <= iw.ic_trellis;
      p1.wr.wr_en        <= vliw_valid && iw.wr_en;
      p1.wr.wr_addr      <= wr_addr;
      p1.wr.unshuf_amt   <= iw.unshuf_amt;
      p1.wr.tbu_push     <= vliw_valid && iw.tbu_push;
      p1.wr.tbu_flush    <= vliw_valid && iw.tbu_flush;
      p2.valid           <= p1.valid;
      p2.s2              <= p1.s2;
      p2.wr              <= p1.wr;
      p3.valid           <= p2.valid;
      p3.wr              <= p2.wr;
    end
  end

  // ------------------------------------------------------------ data memory
  vec_t         dm_rdata, in_vec, wr_vec, res_vec, dm_wdata;
  logic         dm_re, dm_we;
  logic [DA-1:0] dm_raddr, dm_waddr;
  logic [P-1:0] dm_wmask;
  logic         c_we;
  logic [DA-1:0] c_waddr;
  logic [P-1:0] c_wmask;
  vec_t         c_wdata;

  dmem u_dmem (
    .clk   (clk),
    .re    (dm_re),
    .raddr (dm_raddr),
    .rdata (dm_rdata),
    .we    (dm_we),
    .waddr (dm_waddr),
    .wmask (dm_wmask),
    .wdata (dm_wdata)
  );
  assign h_dmem_rdata = dm_rdata;

  // ------------------------------------------------------------ datapath
  shuffle #(.INVERSE(1'b0)) u_shuf (
    .in   (dm_rdata),
    .mode (p1.s1.shuf_mode),
    .amt  (p1.s1.shuf_amt),
    .lane (p1.s1.bcast_lane),
    .out  (in_vec)
  );

  dval_t        res [P];
  logic [P-1:0] dec;

  vector_alu u_valu (
    .clk       (clk),
    .rst_n     (rst_n),
    .s1_ctl    (p1.s1),
    .in_vec    (in_vec),
    .sys_z     (sys_z),
    .s2_ctl    (p2.s2),
    .beta      (beta),
    .lg_states (lg_states),
    .res       (res),
    .dec       (dec)
  );

  always_comb begin
    for (int l = 0; l < P; l++) res_vec[l] = res[l][LW-1:0];
  end

  shuffle #(.INVERSE(1'b1)) u_unshuf (
    .in   (res_vec),
    .mode (SH_ROT),
    .amt  (p3.wr.unshuf_amt),
    .lane ('0),
    .out  (wr_vec)
  );

  // ------------------------------------------------------------ traceback unit
  logic                 tb_valid, tb_bit, tb_busy;
  logic [DA-1:0]        tb_addr;
  logic [LANE_BITS-1:0] tb_lane;

  tbu u_tbu (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (cfg_wr),
    .push      (p3.wr.tbu_push),
    .d         (dec),
    .flush     (p3.wr.tbu_flush),
    .lg_states (lg_states),
    .obase     (obase),
    .wr_ready  (!p3.wr.wr_en),
    .wr_valid  (tb_valid),
    .wr_addr   (tb_addr),
    .wr_lane   (tb_lane),
    .wr_bit    (tb_bit),
    .busy      (tb_busy)
  );

  // write port: datapath first, decoded bits when the datapath is silent
  always_comb begin
    c_wdata = wr_vec;
    c_wmask = '1;
    c_waddr = p3.wr.wr_addr;
    c_we    = p3.wr.wr_en;
    if (!p3.wr.wr_en && tb_valid) begin
      c_we    = 1'b1;
      c_waddr = tb_addr;
      c_wmask = '0;
      c_wmask[tb_lane] = 1'b1;
      for (int l = 0; l < P; l++) c_wdata[l] = lane_t'(tb_bit);
    end
  end

  // ------------------------------------------------------------ host interface
  assign busy = running || p1.valid || p2.valid || p3.valid || tb_busy;
  assign done = halted && !busy;

  host_if u_host (
    .clk          (clk),
    .rst_n        (rst_n),
    .core_run     (busy),
    .h_imem_we    (h_imem_we),
    .h_imem_addr  (h_imem_addr),
    .h_imem_wdata (h_imem_wdata),
    .h_dmem_we    (h_dmem_we),
    .h_dmem_re    (h_dmem_re),
    .h_dmem_addr  (h_dmem_addr),
    .h_dmem_wdata (h_dmem_wdata),
    .host_err     (host_err),
    .c_re         (vliw_valid && iw.rd_en),
    .c_raddr      (rd_addr),
    .c_we         (c_we),
    .c_waddr      (c_waddr),
    .c_wmask      (c_wmask),
    .c_wdata      (c_wdata),
    .m_imem_we    (im_we),
    .m_imem_waddr (im_waddr),
    .m_imem_wdata (im_wdata),
    .m_re         (dm_re),
    .m_raddr      (dm_raddr),
    .m_we         (dm_we),
    .m_waddr      (dm_waddr),
    .m_wmask      (dm_wmask),
    .m_wdata      (dm_wdata)
  );

endmodule
