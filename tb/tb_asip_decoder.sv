// tb_asip_decoder: end-to-end test of the decoder at its default size.
//
// The testbench acts as host and as assembler. It runs two programs on the
// same decoder, one after the other (a mode switch between the codes):
//  1. LDPC: a quasi-cyclic code with circulant size 64, a 30 x 50 base matrix
//     of column weight 3 and row weight 5 (N = 3200 bits, rate 0.4), decoded
//     with 10 offset Min-Sum iterations (beta = 1) from the all-zero codeword
//     sent over a noisy channel. Every edge message and every decision word in
//     data memory is compared with a reference model written here from the
//     algorithm equations.
//  2. Viterbi: the rate-1/2, K = 7 (171,133) convolutional code, 1024 trellis
//     steps (1018 data bits and 6 zero tail bits), soft values 0..31 with
//     noise. The decoded bits in data memory are compared with a reference
//     Viterbi decoder (same metrics, same traceback rule) and with the data.
// Cycle counts of both programs are checked against the instruction counts.
// The LDPC program is software-pipelined: the output words of one check row
// (or variable-node column) share issue slots with the operand words of the
// next, alternating between the two halves of the LLR buffer.
// The test also counts how often each mechanism occurred (cyclic shift,
// broadcast, trellis compare with both decisions, minimum exchange,
// offset clipping, loop jumps, streamed and flushed traceback bits,
// decoded bits waiting for the write port) and counts a failure for any
// that never did.
module tb_asip_decoder;
  import dec_pkg::*;

  localparam int ZC    = 64;
  localparam int MB    = 30;     // base rows
  localparam int NBC   = 50;     // base columns
  localparam int NE    = 150;    // edges
  localparam int ITER  = 10;
  localparam int BETA  = 1;
  localparam int Y0    = 0;
  localparam int E0    = 64;
  localparam int D0    = 256;
  localparam int T     = 1024;   // trellis steps
  localparam int SYM0  = 320;    // symbol words (2048 symbols = 32 words)
  localparam int INITW = 360;
  localparam int OUT0  = 400;
  localparam int WATCHDOG = 200000;

  logic clk = 0, rst_n = 0, start = 0;
  logic done, busy, host_err;
  logic          h_imem_we = 0;
  logic [IA-1:0] h_imem_addr = '0;
  logic [IW-1:0] h_imem_wdata = '0;
  logic          h_dmem_we = 0, h_dmem_re = 0;
  logic [DA-1:0] h_dmem_addr = '0;
  vec_t          h_dmem_wdata = '0;
  vec_t          h_dmem_rdata;

  asip_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- assembler
  logic [IW-1:0] prog [$];

  function automatic vliw_t vnop();
    vliw_t w = '0;
    return w;
  endfunction

  function automatic logic [IW-1:0] cword(ctrl_op_e op, int idx, int a, int b, int c);
    ctrl_t w = '0;
    w.is_ctrl = 1'b1;
    w.op  = op;
    w.idx = 4'(idx);
    w.a   = 16'(a);
    w.b   = 16'(b);
    w.c   = 16'(c);
    return w;
  endfunction

  task automatic emit(logic [IW-1:0] w);
    prog.push_back(w);
  endtask

  task automatic write_instr(int addr, logic [IW-1:0] w);
    h_imem_we = 1; h_imem_addr = IA'(addr); h_imem_wdata = w;
    @(posedge clk);
    #1 h_imem_we = 0;
  endtask

  task automatic load_program();
    for (int i = 0; i < prog.size(); i++) write_instr(i, prog[i]);
  endtask

  task automatic write_word(int addr, vec_t v);
    h_dmem_we = 1; h_dmem_addr = DA'(addr); h_dmem_wdata = v;
    @(posedge clk);
    #1 h_dmem_we = 0;
  endtask

  task automatic read_word(int addr, output vec_t v);
    h_dmem_re = 1; h_dmem_addr = DA'(addr);
    @(posedge clk);
    #1 h_dmem_re = 0;
    v = h_dmem_rdata;
  endtask

  task automatic run(output int cycles);
    int c0;
    @(posedge clk);
    #1 start = 1;
    c0 = cyc;
    @(posedge clk);
    #1 start = 0;
    while (!done) @(posedge clk);
    cycles = cyc - c0;
  endtask

  // ---------------------------------------------------------------- LDPC code
  int erow [NE], ecol [NE], esh [NE];
  int row_edges [MB][$];
  int col_edges [NBC][$];

  function automatic int satv(int v);
    return v > 15 ? 15 : (v < -15 ? -15 : v);
  endfunction

  function automatic int absv(int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic build_code();
    int e = 0;
    for (int c = 0; c < NBC; c++) begin
      for (int k = 0; k < 3; k++) begin
        erow[e] = (c + 10 * k) % MB;
        ecol[e] = c;
        esh[e]  = (7 * c + 13 * erow[e] + 5 * k) % ZC;
        row_edges[erow[e]].push_back(e);
        col_edges[c].push_back(e);
        e++;
      end
    end
  endtask

  // ---------------------------------------------------------------- LDPC program
  vliw_t body [$];   // one iteration of the decoding loop

  // make sure issue slot i of the loop body exists
  task automatic slot(int i);
    while (body.size() <= i) body.push_back(vnop());
  endtask

  task automatic gen_ldpc_program();
    vliw_t w;
    int loop_at;
    prog.delete();
    emit(cword(C_SETCFG, 6, 0, BETA, 0));
    emit(cword(C_SETAR, 0, 0, 0, 0));
    // edges start with the channel values
    for (int e = 0; e < NE; e++) begin
      w = vnop();
      w.rd_en = 1; w.rd_off = DA'(Y0 + ecol[e]);
      w.s1_op = S1_ACC_LD; w.s2_op = S2_ACC;
      w.wr_en = 1; w.wr_off = DA'(E0 + e);
      emit(w);
    end
    repeat (3) emit(vnop());
    loop_at = prog.size();
    emit(cword(C_LOOP, 0, ITER, 0, 0));   // end patched below
    body.delete();
    // check rows, software-pipelined: the operand words of row r+1 share
    // their issue slots with the output words of row r. Row r's outputs start
    // in the slot of its last operand (the one that sets hold); consecutive
    // rows use alternating halves of the LLR buffer.
    begin
      automatic int a = 0;
      for (int r = 0; r < MB; r++) begin
        int dc = row_edges[r].size();
        int bank = (r % 2) * (BUF_DEPTH / 2);
        for (int k = 0; k < dc; k++) begin
          int e = row_edges[r][k];
          slot(a + k);
          body[a+k].rd_en = 1; body[a+k].rd_off = DA'(E0 + e);
          body[a+k].shuf_mode = SH_ROT; body[a+k].shuf_amt = LANE_BITS'(esh[e]);
          body[a+k].s1_op = (k == 0) ? S1_MIN_FIRST : S1_MIN;
          body[a+k].s1_buf_we = 1; body[a+k].s1_buf_idx = BUF_BITS'(bank + k);
          body[a+k].s1_hold = (k == dc - 1);
        end
        for (int k = 0; k < dc; k++) begin
          int e = row_edges[r][k];
          int i = a + dc - 1 + k;
          slot(i);
          body[i].s2_op = S2_CN; body[i].s2_buf_idx = BUF_BITS'(bank + k);
          body[i].wr_en = 1; body[i].wr_off = DA'(E0 + e); body[i].unshuf_amt = LANE_BITS'(esh[e]);
        end
        a += dc;
      end
    end
    // three empty slots: the last edge write lands before the first read
    repeat (3) body.push_back(vnop());
    // variable nodes, pipelined the same way: the outputs of column c run
    // while column c+1 loads and accumulates.
    begin
      automatic int a = body.size();
      for (int c = 0; c < NBC; c++) begin
        int dv = col_edges[c].size();
        int bank = (c % 2) * (BUF_DEPTH / 2);
        slot(a);
        body[a].rd_en = 1; body[a].rd_off = DA'(Y0 + c); body[a].s1_op = S1_ACC_LD;
        for (int k = 0; k < dv; k++) begin
          int i = a + 1 + k;
          slot(i);
          body[i].rd_en = 1; body[i].rd_off = DA'(E0 + col_edges[c][k]); body[i].s1_op = S1_ACC_ADD;
          body[i].s1_buf_we = 1; body[i].s1_buf_idx = BUF_BITS'(bank + k); body[i].s1_hold = (k == dv - 1);
        end
        for (int k = 0; k <= dv; k++) begin
          int i = a + dv + k;
          slot(i);
          body[i].wr_en = 1;
          if (k < dv) begin
            body[i].s2_op = S2_VN; body[i].s2_buf_idx = BUF_BITS'(bank + k);
            body[i].wr_off = DA'(E0 + col_edges[c][k]);
          end else begin
            body[i].s2_op = S2_DEC; body[i].wr_off = DA'(D0 + c);
          end
        end
        a += dv + 1;
      end
    end
    repeat (3) body.push_back(vnop());
    foreach (body[i]) emit(body[i]);
    prog[loop_at] = cword(C_LOOP, 0, ITER, prog.size() - 1, 0);
    emit(cword(C_HALT, 0, 0, 0, 0));
  endtask

  // ---------------------------------------------------------------- LDPC reference
  int ych [NBC][ZC];
  int msg [NE][ZC];
  int dref [NBC][ZC];

  task automatic ldpc_reference();
    for (int e = 0; e < NE; e++)
      for (int z = 0; z < ZC; z++) msg[e][z] = ych[ecol[e]][z];
    for (int it = 0; it < ITER; it++) begin
      for (int r = 0; r < MB; r++) begin
        for (int m = 0; m < ZC; m++) begin
          int m1, m2, sg;
          int v [$];
          m1 = 15; m2 = 15; sg = 0;
          v.delete();
          foreach (row_edges[r][k]) begin
            int e = row_edges[r][k];
            int x = msg[e][(m + esh[e]) % ZC];
            int a = absv(x);
            v.push_back(x);
            if (k == 0) begin m1 = a; m2 = 15; end
            else if (a < m1) begin m2 = m1; m1 = a; end
            else if (a < m2) m2 = a;
            sg ^= (x < 0);
          end
          foreach (row_edges[r][k]) begin
            int e = row_edges[r][k];
            int mm = (absv(v[k]) == m1) ? m2 : m1;
            mm = (mm > BETA) ? mm - BETA : 0;
            msg[e][(m + esh[e]) % ZC] = (sg ^ (v[k] < 0)) ? -mm : mm;
          end
        end
      end
      for (int c = 0; c < NBC; c++) begin
        for (int n = 0; n < ZC; n++) begin
          int s = ych[c][n];
          foreach (col_edges[c][k]) s += msg[col_edges[c][k]][n];
          foreach (col_edges[c][k]) msg[col_edges[c][k]][n] = satv(s - msg[col_edges[c][k]][n]);
          dref[c][n] = satv(s);
        end
      end
    end
  endtask

  // ---------------------------------------------------------------- Viterbi
  localparam int G1 = 'o171, G2 = 'o133;
  int info [T];
  int sym [2*T];
  int vref [T];

  function automatic int parity(int v);
    return $countones(v) % 2;
  endfunction

  task automatic gen_viterbi_program();
    vliw_t w;
    int loop_at;
    prog.delete();
    emit(cword(C_SETCFG, 6, (G1 << 8) | G2, 0, OUT0));
    emit(cword(C_SETAR, 0, SYM0 * ZC, 1, 0));
    emit(cword(C_SETAR, 1, SYM0 * ZC, 1, 0));
    emit(cword(C_SETAR, 2, 0, 0, 0));
    w = vnop();
    w.rd_en = 1; w.rd_ar = 2; w.rd_off = DA'(INITW);
    w.s1_op = S1_ACC_LD; w.s2_op = S2_ACC;
    emit(w);
    emit(vnop());
    loop_at = prog.size();
    emit(cword(C_LOOP, 0, T, 0, 0));
    for (int u = 0; u < 2; u++) begin
      for (int b = 0; b < 2; b++) begin
        w = vnop();
        w.rd_en = 1; w.rd_ar = 2'(u); w.rd_inc = 1;
        w.shuf_mode = SH_BCAST;
        w.s1_op = (b == 0) ? S1_ACC_FBSYS : S1_ACC_SYS;
        w.sys_u = 1'(u); w.sys_b = 1'(b);
        if (b == 1) begin
          w.s1_buf_we = 1; w.s1_buf_src = 1; w.s1_buf_idx = BUF_BITS'(u);
        end
        emit(w);
      end
    end
    w = vnop();
    w.s2_op = S2_ACS; w.ic_trellis = 1; w.tbu_push = 1;
    emit(w);
    emit(vnop());
    prog[loop_at] = cword(C_LOOP, 0, T, prog.size() - 1, 0);
    w = vnop();
    w.tbu_flush = 1;
    emit(w);
    // a word written by the datapath while decoded bits are still flowing
    w = vnop();
    w.rd_en = 1; w.rd_ar = 2; w.rd_off = DA'(INITW);
    w.s1_op = S1_ACC_LD; w.s2_op = S2_ACC;
    w.wr_en = 1; w.wr_ar = 2; w.wr_off = DA'(INITW + 1);
    repeat (4) emit(w);
    emit(cword(C_HALT, 0, 0, 0, 0));
  endtask

  task automatic viterbi_reference();
    localparam int NS = 64, D = TB_LEN;
    int lam [NS], nl [NS];
    bit dcol [T+1][NS];
    for (int s = 0; s < NS; s++) lam[s] = (s == 0) ? 0 : 15;
    for (int t = 1; t <= T; t++) begin
      for (int k = 0; k < NS; k++) begin
        int u = k & 1;
        int j0 = k >> 1, j1 = (k >> 1) + NS / 2;
        int ca, cb;
        ca = lam[j0]; cb = lam[j1];
        for (int b = 0; b < 2; b++) begin
          int g = b ? G2 : G1;
          int y = sym[2*(t-1) + b];
          ca += parity(((j0 << 1) | u) & g) ? 31 - y : y;
          cb += parity(((j1 << 1) | u) & g) ? 31 - y : y;
        end
        dcol[t][k] = (cb < ca);
        nl[k] = (cb < ca) ? cb : ca;
      end
      lam = nl;
      if (t >= D + 1) begin
        int s = 0;
        for (int i = 0; i < D; i++) s = (dcol[t-i][s] << 5) | (s >> 1);
        vref[t-D-1] = s & 1;
      end
    end
    begin
      int s = 0;
      for (int i = 0; i < D; i++) begin
        vref[T-1-i] = s & 1;
        s = (dcol[T-i][s] << 5) | (s >> 1);
      end
    end
  endtask

  // ---------------------------------------------------------------- mechanism counters
  int n_rot = 0, n_bcast = 0, n_acs0 = 0, n_acs1 = 0, n_exch = 0, n_clip = 0;
  int n_loopjump = 0, n_tb_stream = 0, n_tb_flush = 0, n_tb_wait = 0, n_hold = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.p1.valid && dut.p1.s1.shuf_mode == SH_ROT && dut.p1.s1.shuf_amt != 0) n_rot++;
    if (dut.p1.valid && dut.p1.s1.shuf_mode == SH_BCAST) n_bcast++;
    if (dut.p2.s2.op == S2_ACS) begin
      if (dut.u_valu.g_lane[5].u_s2.acs_d) n_acs1++; else n_acs0++;
    end
    if (dut.p2.s2.op == S2_CN) begin
      if (dut.u_valu.g_lane[3].u_s2.e_mag == dut.u_valu.g_lane[3].u_s2.in.own.min1) n_exch++;
      if (dut.u_valu.g_lane[3].u_s2.m_sel <= mag_t'(BETA)) n_clip++;
    end
    if (dut.p1.s1.hold) n_hold++;
    if (dut.u_pc.running && dut.u_pc.at_end && dut.u_pc.pc_nxt != dut.u_pc.pc_q + 1'b1) n_loopjump++;
    if (dut.u_tbu.wr_valid && !dut.p3.wr.wr_en) begin
      if (dut.u_tbu.fl_act || dut.u_tbu.fl_i != 0) n_tb_flush++; else n_tb_stream++;
    end
    if (dut.u_tbu.wr_valid && dut.p3.wr.wr_en) n_tb_wait++;
  end

  // ---------------------------------------------------------------- test
  initial begin
    vec_t v;
    int cycles, nerr_ch, nerr_dec, nerr_vit, nerr_raw, expect_cyc;
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);

    // ============ LDPC
    build_code();
    for (int c = 0; c < NBC; c++) begin
      for (int z = 0; z < ZC; z++) begin
        automatic int noise = 0;
        repeat (4) noise += $urandom_range(0, 8);
        ych[c][z] = satv(6 + noise - 16);
        v[z] = lane_t'(ych[c][z]);
      end
      write_word(Y0 + c, v);
    end
    gen_ldpc_program();
    check(prog.size() <= IMEM_WORDS, "LDPC program fits the instruction memory");
    load_program();
    run(cycles);
    // issue slots: every word once, the loop body ITER times
    expect_cyc = 2 + NE + 3 + 1 + ITER * body.size() + 1;
    $display("LDPC: %0d cycles, %0d instructions issued", cycles, expect_cyc);
    check(cycles >= expect_cyc && cycles <= expect_cyc + 8, "LDPC cycle count");
    ldpc_reference();
    nerr_ch = 0; nerr_dec = 0;
    for (int e = 0; e < NE; e++) begin
      read_word(E0 + e, v);
      for (int z = 0; z < ZC; z++)
        check(v[z] == lane_t'(msg[e][z]), $sformatf("edge %0d lane %0d: %0d vs %0d", e, z, signed'(v[z]), msg[e][z]));
    end
    for (int c = 0; c < NBC; c++) begin
      read_word(D0 + c, v);
      for (int z = 0; z < ZC; z++) begin
        check(v[z] == lane_t'(dref[c][z]), $sformatf("decision %0d lane %0d", c, z));
        if (ych[c][z] < 0) nerr_ch++;
        if (v[z][LW-1]) nerr_dec++;
      end
    end
    $display("LDPC: channel sign errors %0d, decoded bit errors %0d of %0d", nerr_ch, nerr_dec, NBC * ZC);
    check(nerr_dec < nerr_ch, "LDPC decoding removes errors");
    check(!host_err, "no host access during the run");

    // ============ Viterbi
    nerr_raw = 0;
    begin
      automatic int s = 0;
      for (int t = 0; t < T; t++) begin
        int r;
        info[t] = (t < T - 6) ? $urandom_range(0, 1) : 0;
        r = (s << 1) | info[t];
        for (int b = 0; b < 2; b++) begin
          automatic int cbit = parity(r & (b ? G2 : G1));
          automatic int n = $urandom_range(0, 13);
          if ($urandom_range(0, 99) < 4) n = $urandom_range(16, 31);
          sym[2*t + b] = cbit ? 31 - n : n;
          if (n >= 16) nerr_raw++;
        end
        s = r & 63;
      end
    end
    for (int w = 0; w < 2 * T / ZC; w++) begin
      for (int z = 0; z < ZC; z++) v[z] = lane_t'(sym[w*ZC + z]);
      write_word(SYM0 + w, v);
    end
    for (int z = 0; z < ZC; z++) v[z] = (z == 0) ? lane_t'(0) : lane_t'(15);
    write_word(INITW, v);
    gen_viterbi_program();
    load_program();
    run(cycles);
    $display("Viterbi: %0d cycles for %0d trellis steps", cycles, T);
    check(cycles >= 6 * T && cycles <= 6 * T + 60, "Viterbi: 6 cycles per trellis step");
    viterbi_reference();
    nerr_vit = 0;
    for (int w = 0; w < T / ZC; w++) begin
      read_word(OUT0 + w, v);
      for (int z = 0; z < ZC; z++) begin
        automatic int n = w * ZC + z;
        check(v[z] == lane_t'(vref[n]), $sformatf("Viterbi bit %0d: %0d vs ref %0d", n, v[z], vref[n]));
        if (v[z] != lane_t'(info[n])) nerr_vit++;
      end
    end
    $display("Viterbi: %0d bit errors against the sent data, %0d channel symbol errors", nerr_vit, nerr_raw);
    check(2 * nerr_vit < nerr_raw, "Viterbi corrects most channel errors");

    // mechanisms
    $display("mechanisms: rot=%0d bcast=%0d acs0=%0d acs1=%0d exch=%0d clip=%0d hold=%0d loopjump=%0d tb_stream=%0d tb_flush=%0d tb_wait=%0d",
             n_rot, n_bcast, n_acs0, n_acs1, n_exch, n_clip, n_hold, n_loopjump, n_tb_stream, n_tb_flush, n_tb_wait);
    check(n_rot > 0, "cyclic shift used");
    check(n_bcast > 0, "broadcast used");
    check(n_acs0 > 0 && n_acs1 > 0, "both trellis decisions seen");
    check(n_exch > 0, "second minimum selected");
    check(n_clip > 0, "offset clipped to zero");
    check(n_hold > 0, "hold buffer used");
    check(n_loopjump > 0, "loop jumps");
    check(n_tb_stream > 0, "streamed traceback bits");
    check(n_tb_flush > 0, "flushed traceback bits");
    check(n_tb_wait > 0, "decoded bit waited for the write port");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
