// tb_vector_alu: checks the ALU array with its interconnect.
// Several Viterbi trellis steps (64 and 8 states) run on all lanes: metrics are
// loaded, both branch candidates of every state are formed from the fed-back
// metric and random systematic info, and the compare-select through the
// trellis interconnect must give the metrics and decisions of a model. A
// check-node update on all lanes checks the LDPC path of the array.
module tb_vector_alu;
  import dec_pkg::*;
  logic clk = 0, rst_n = 0;
  s1_ctl_t s1_ctl;
  vec_t in_vec;
  logic [P-1:0] sys_z;
  s2_ctl_t s2_ctl;
  mag_t beta;
  logic [2:0] lg_states;
  dval_t res [P];
  logic [P-1:0] dec;
  int checks = 0, failures = 0;

  vector_alu dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", s);
    end
  endtask

  task automatic cyc(s1_op_e o1, bit we, int idx, bit src, s2_op_e o2, bit tr);
    s1_ctl = '0; s1_ctl.valid = 1; s1_ctl.op = o1; s1_ctl.buf_we = we;
    s1_ctl.buf_idx = BUF_BITS'(idx); s1_ctl.buf_src = src; s1_ctl.hold = 1'b1;
    s2_ctl = '0; s2_ctl.op = o2; s2_ctl.trellis = tr; s2_ctl.buf_idx = BUF_BITS'(idx);
    @(posedge clk);
    #1 s1_ctl = '0; s2_ctl = '0;
  endtask

  initial begin
    int lam [P], cand [P][2], nl [P];
    bit nd [P];
    int y [2];
    int zb [P][2][2];
    int n;
    s1_ctl = '0; s2_ctl = '0; in_vec = '0; sys_z = '0; beta = '0; lg_states = 3'd6;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    foreach (lg_states_list[i]) begin
      lg_states = 3'(lg_states_list[i]);
      n = 1 << lg_states_list[i];
      for (int l = 0; l < P; l++) begin
        lam[l] = $urandom_range(0, 15);
        in_vec[l] = lane_t'(lam[l]);
      end
      cyc(S1_ACC_LD, 0, 0, 0, S2_NOP, 0);
      cyc(S1_NOP, 0, 0, 0, S2_ACC, 0);
      #1;
      for (int l = 0; l < P; l++) chk(res[l] == dval_t'(lam[l]), "metric load");
      for (int step = 0; step < 6; step++) begin
        y[0] = $urandom_range(0, 31); y[1] = $urandom_range(0, 31);
        for (int u = 0; u < 2; u++) begin
          for (int b = 0; b < 2; b++) begin
            for (int l = 0; l < P; l++) begin
              zb[l][u][b] = $urandom_range(0, 1);
              sys_z[l] = 1'(zb[l][u][b]);
              in_vec[l] = lane_t'(y[b]);
            end
            cyc(b == 0 ? S1_ACC_FBSYS : S1_ACC_SYS, b == 1, u, 1, S2_NOP, 0);
          end
          for (int l = 0; l < P; l++)
            cand[l][u] = lam[l] + (zb[l][u][0] ? 31 - y[0] : y[0]) + (zb[l][u][1] ? 31 - y[1] : y[1]);
        end
        cyc(S1_NOP, 0, 0, 0, S2_ACS, 1);
        for (int k = 0; k < P; k++) begin
          int base, j0, j1, u;
          base = k - (k % n); u = k & 1;
          j0 = base + ((k % n) >> 1); j1 = j0 + n / 2;
          nd[k] = cand[j1][u] < cand[j0][u];
          nl[k] = nd[k] ? cand[j1][u] : cand[j0][u];
        end
        #1;
        for (int k = 0; k < P; k++) chk(res[k] == dval_t'(nl[k]) && dec[k] == nd[k], $sformatf("ACS lane %0d", k));
        lam = nl;
      end
    end
    // check node on all lanes, degree 4
    begin
      int v [4][P];
      beta = mag_t'(1);
      for (int k = 0; k < 4; k++) begin
        for (int l = 0; l < P; l++) begin
          v[k][l] = $urandom_range(0, 30) - 15;
          in_vec[l] = lane_t'(v[k][l]);
        end
        cyc(k == 0 ? S1_MIN_FIRST : S1_MIN, 1, k, 0, S2_NOP, 0);
      end
      for (int k = 0; k < 4; k++) begin
        cyc(S1_NOP, 0, k, 0, S2_CN, 0);
        #1;
        for (int l = 0; l < P; l++) begin
          int m, s, a;
          m = 15; s = 0;
          for (int j = 0; j < 4; j++) if (j != k) begin
            a = v[j][l] < 0 ? -v[j][l] : v[j][l];
            if (a < m) m = a;
            s ^= (v[j][l] < 0);
          end
          m = m > 1 ? m - 1 : 0;
          chk(res[l] == dval_t'(s ? -m : m), "CN");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lg_states_list [4] = '{6, 3, 4, 5};
endmodule
