// dec_pkg: shared constants, types and the instruction format of the decoder ASIP.
//
// The decoder is a 64-lane SIMD machine. Each lane holds one 5-bit soft value in
// memory and works internally on DW-bit signed numbers. The lane count (64), the
// 5-bit quantisation, the 16-entry LLR buffer, the 8/16/32/64-state trellis
// support and the 40 kByte data memory (1024 words of 64 x 5 bits) follow the
// published configuration. The internal width, the instruction encoding, the
// instruction memory size and the traceback length parameterisation are this
// design's own choices.
//
// Instruction words are IW bits. Bit IW-1 selects the class:
//   0: a VLIW datapath word (vliw_t), one field group per pipeline stage
//   1: a control word (ctrl_t): LOOP, SETAR, SETCFG, HALT
package dec_pkg;

  // ---------------------------------------------------------------- sizes
  parameter int unsigned P          = 64;    // parallel ALU FUs (lanes)
  parameter int unsigned LW         = 5;     // memory soft-value width
  parameter int unsigned DW         = 10;    // internal datapath width (signed)
  parameter int unsigned BUF_DEPTH  = 16;    // LLR buffer entries per lane
  parameter int unsigned DMEM_WORDS = 1024;  // 1024 x 320 bit = 40 kByte
  parameter int unsigned IMEM_WORDS = 1024;
  parameter int unsigned TB_LEN     = 35;    // traceback depth, 5K for K = 7
  parameter int unsigned IW         = 80;    // instruction width

  localparam int unsigned LANE_BITS = $clog2(P);
  localparam int unsigned DA        = $clog2(DMEM_WORDS);
  localparam int unsigned IA        = $clog2(IMEM_WORDS);
  localparam int unsigned BUF_BITS  = $clog2(BUF_DEPTH);
  localparam int unsigned MAG_W     = LW - 1;                  // |LLR| width
  localparam int signed   LLR_MAX   = (1 <<< (LW - 1)) - 1;    // +15

  typedef logic [LW-1:0]        lane_t;    // one soft value in memory
  typedef lane_t [P-1:0]        vec_t;     // one memory word
  typedef logic signed [DW-1:0] dval_t;    // internal lane value
  typedef logic [MAG_W-1:0]     mag_t;

  // ---------------------------------------------------------------- opcodes
  typedef enum logic [1:0] {
    SH_NONE  = 2'd0,   // pass through
    SH_ROT   = 2'd1,   // cyclic rotation (barrel shift)
    SH_BCAST = 2'd2    // one lane copied to all lanes
  } shuf_mode_e;

  typedef enum logic [2:0] {
    S1_NOP       = 3'd0,
    S1_ACC_LD    = 3'd1,   // acc = in
    S1_ACC_ADD   = 3'd2,   // acc = acc + in
    S1_ACC_FBSYS = 3'd3,   // acc = fed-back metric + branch term of in
    S1_ACC_SYS   = 3'd4,   // acc = acc + branch term of in
    S1_MIN_FIRST = 3'd5,   // start a min search with in
    S1_MIN       = 3'd6    // continue a min search with in
  } s1_op_e;

  typedef enum logic [2:0] {
    S2_NOP = 3'd0,
    S2_ACC = 3'd1,   // out = sat(acc)
    S2_CN  = 3'd2,   // check node output for buffered edge
    S2_VN  = 3'd3,   // variable node output for buffered edge
    S2_DEC = 3'd4,   // out = sat(sum): a-posteriori value
    S2_ACS = 3'd5    // compare two trellis candidates, select the smaller
  } s2_op_e;

  typedef enum logic [2:0] {
    C_HALT   = 3'd0,
    C_LOOP   = 3'd1,   // a = count, b = last body address
    C_SETAR  = 3'd2,   // idx = register, a = value, b = stride
    C_SETCFG = 3'd3    // idx = log2(states), a = {G1,G2}, b = beta, c = TBU output base
  } ctrl_op_e;

  // ---------------------------------------------------------------- words
  typedef struct packed {
    logic                 is_ctrl;     // 0
    // read stage
    logic                 rd_en;
    logic [1:0]           rd_ar;
    logic [DA-1:0]        rd_off;
    logic                 rd_inc;
    shuf_mode_e           shuf_mode;
    logic [LANE_BITS-1:0] shuf_amt;
    // stage 1
    s1_op_e               s1_op;
    logic                 s1_buf_we;
    logic                 s1_buf_src;  // 0: input value, 1: new accumulator
    logic [BUF_BITS-1:0]  s1_buf_idx;
    logic                 s1_hold;     // copy min search / accumulator to the hold buffer
    logic                 sys_u;       // trellis branch (input bit) for systematic info
    logic                 sys_b;       // symbol element index
    // stage 2
    s2_op_e               s2_op;
    logic [BUF_BITS-1:0]  s2_buf_idx;
    logic                 ic_trellis;  // interconnect in trellis mode
    // write stage
    logic                 wr_en;
    logic [1:0]           wr_ar;
    logic [DA-1:0]        wr_off;
    logic                 wr_inc;
    logic [LANE_BITS-1:0] unshuf_amt;
    logic                 tbu_push;
    logic                 tbu_flush;
    logic [IW-66:0]       pad;
  } vliw_t;

  typedef struct packed {
    logic           is_ctrl;   // 1
    ctrl_op_e       op;
    logic [3:0]     idx;
    logic [15:0]    a;
    logic [15:0]    b;
    logic [15:0]    c;
    logic [IW-57:0] pad;
  } ctrl_t;

  // Pipeline control words handed from stage to stage.
  typedef struct packed {
    logic                 valid;
    s1_op_e               op;
    logic                 buf_we;
    logic                 buf_src;
    logic [BUF_BITS-1:0]  buf_idx;
    logic                 hold;
    logic                 sys_u;
    logic                 sys_b;
    shuf_mode_e           shuf_mode;
    logic [LANE_BITS-1:0] shuf_amt;
    logic [LANE_BITS-1:0] bcast_lane;
  } s1_ctl_t;

  typedef struct packed {
    s2_op_e               op;
    logic [BUF_BITS-1:0]  buf_idx;
    logic                 trellis;
  } s2_ctl_t;

  typedef struct packed {
    logic                 wr_en;
    logic [DA-1:0]        wr_addr;
    logic [LANE_BITS-1:0] unshuf_amt;
    logic                 tbu_push;
    logic                 tbu_flush;
  } wr_ctl_t;

  // Values that stage 1 of one lane hands to the interconnect.
  typedef struct packed {
    dval_t acc;        // accumulator
    dval_t buf_rd;     // LLR buffer entry selected by stage 2
    dval_t cand0;      // LLR buffer entry 0 (trellis candidate, branch 0)
    dval_t cand1;      // LLR buffer entry 1 (trellis candidate, branch 1)
    dval_t sum;        // hold buffer: accumulated sum
    mag_t  min1;       // minima buffer: smallest magnitude
    mag_t  min2;       // minima buffer: second smallest magnitude
    logic  sgn;        // minima buffer: XOR of all signs
  } s1_out_t;

  // Values the interconnect hands to stage 2 of one lane.
  typedef struct packed {
    s1_out_t own;      // this lane's stage 1, straight through
    dval_t   ta;       // trellis candidate from the first predecessor state
    dval_t   tb;       // trellis candidate from the second predecessor state
  } s2_in_t;

  // Saturate an internal value to the symmetric memory range [-15, +15].
  function automatic lane_t sat_lane(dval_t v);
    if (v > dval_t'(LLR_MAX))       return lane_t'(LLR_MAX);
    else if (v < -dval_t'(LLR_MAX)) return lane_t'(-LLR_MAX);
    else                            return lane_t'(v);
  endfunction

  function automatic dval_t sext_lane(lane_t v);
    return dval_t'(signed'(v));
  endfunction

endpackage
