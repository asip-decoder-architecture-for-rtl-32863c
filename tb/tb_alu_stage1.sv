// tb_alu_stage1: checks one lane's first ALU stage against a model.
// Random check-node sequences exercise the min search (smallest and second
// smallest magnitude, sign parity) and the held copy; random variable-node
// sequences exercise the accumulator and the LLR buffer; Viterbi branch
// operations check the fed-back metric plus the received value or its
// negation as chosen by the systematic info bit.
module tb_alu_stage1;
  import dec_pkg::*;
  logic clk = 0, rst_n = 0;
  s1_ctl_t ctl;
  lane_t in_val;
  dval_t fb;
  logic sys_z;
  logic [BUF_BITS-1:0] rd_idx;
  s1_out_t out;
  int checks = 0, failures = 0;

  alu_stage1 dut (.*);
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

  task automatic op(s1_op_e o, int v, bit we, int idx, bit src, bit hold);
    ctl = '0;
    ctl.valid = 1; ctl.op = o; ctl.buf_we = we; ctl.buf_idx = BUF_BITS'(idx);
    ctl.buf_src = src; ctl.hold = hold;
    in_val = lane_t'(v);
    @(posedge clk);
    #1 ctl = '0;
  endtask

  initial begin
    int vals [16];
    int n, m1, m2, sg, sum, a, bm;
    ctl = '0; in_val = '0; fb = '0; sys_z = 0; rd_idx = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      n = $urandom_range(2, 16);
      // check node
      m1 = 15; m2 = 15; sg = 0;
      for (int k = 0; k < n; k++) begin
        vals[k] = $urandom_range(0, 30) - 15;
        a = vals[k] < 0 ? -vals[k] : vals[k];
        if (a < m1) begin m2 = m1; m1 = a; end
        else if (a < m2) m2 = a;
        sg ^= (vals[k] < 0);
        op(k == 0 ? S1_MIN_FIRST : S1_MIN, vals[k], 1, k, 0, k == n - 1);
      end
      chk(out.min1 == mag_t'(m1) && out.min2 == mag_t'(m2) && out.sgn == sg[0],
          $sformatf("min search %0d %0d %0d vs %0d %0d %0d", out.min1, out.min2, out.sgn, m1, m2, sg));
      for (int k = 0; k < n; k++) begin
        rd_idx = BUF_BITS'(k);
        #1 chk(out.buf_rd == dval_t'(vals[k]), "LLR buffer");
      end
      // variable node
      sum = $urandom_range(0, 30) - 15;
      op(S1_ACC_LD, sum, 0, 0, 0, 0);
      for (int k = 0; k < n; k++) begin
        vals[k] = $urandom_range(0, 30) - 15;
        sum += vals[k];
        op(S1_ACC_ADD, vals[k], 1, k, 0, k == n - 1);
      end
      chk(out.acc == dval_t'(sum) && out.sum == dval_t'(sum), "accumulate");
      // held values survive a new min search start
      op(S1_MIN_FIRST, 3, 0, 0, 0, 0);
      chk(out.min1 == mag_t'(m1) && out.sum == dval_t'(sum), "hold kept");
      // Viterbi branch: fb + (z ? ~y : y) + (z2 ? ~y2 : y2)
      fb = dval_t'($urandom_range(0, 500));
      bm = fb;
      for (int b = 0; b < 2; b++) begin
        a = $urandom_range(0, 31);
        sys_z = 1'($urandom);
        bm += sys_z ? 31 - a : a;
        op(b == 0 ? S1_ACC_FBSYS : S1_ACC_SYS, a, b == 1, 1, 1, 0);
      end
      chk(out.acc == dval_t'(bm) && out.cand1 == dval_t'(bm), "branch metric");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
