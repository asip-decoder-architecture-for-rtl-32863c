// tb_alu_stage2: checks one lane's second ALU stage against a model.
// Check-node outputs (minimum exchange, offset beta clipped at zero, sign
// parity without the edge's own sign), variable-node outputs (sum minus the
// edge, saturated), decisions, pass-through and the Viterbi compare-select
// with its decision bit, including metrics that have wrapped around.
module tb_alu_stage2;
  import dec_pkg::*;
  logic clk = 0, rst_n = 0;
  s2_ctl_t ctl;
  s2_in_t in;
  mag_t beta;
  dval_t out_q;
  logic d_q;
  int checks = 0, failures = 0;

  alu_stage2 dut (.*);
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

  function automatic int sat(int v);
    return v > 15 ? 15 : (v < -15 ? -15 : v);
  endfunction

  task automatic run(s2_op_e o);
    ctl = '0; ctl.op = o;
    @(posedge clk);
    #1 ctl = '0;
  endtask

  initial begin
    int e, m1, m2, sg, b, mm, exp_v, ta, tb, sum;
    ctl = '0; in = '0; beta = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      // check node
      m1 = $urandom_range(0, 15); m2 = $urandom_range(m1, 15);
      sg = $urandom_range(0, 1); b = $urandom_range(0, 3);
      e  = ($urandom_range(0, 3) == 0) ? ($urandom_range(0, 1) ? m1 : -m1) : $urandom_range(0, 30) - 15;
      in = '0;
      in.own.buf_rd = dval_t'(e); in.own.min1 = mag_t'(m1); in.own.min2 = mag_t'(m2); in.own.sgn = sg[0];
      beta = mag_t'(b);
      run(S2_CN);
      mm = ((e < 0 ? -e : e) == m1) ? m2 : m1;
      mm = mm > b ? mm - b : 0;
      exp_v = (sg ^ (e < 0)) ? -mm : mm;
      chk(out_q == dval_t'(exp_v), $sformatf("CN e=%0d m1=%0d m2=%0d -> %0d vs %0d", e, m1, m2, out_q, exp_v));
      // variable node and decision
      sum = $urandom_range(0, 120) - 60;
      in.own.sum = dval_t'(sum);
      run(S2_VN);
      chk(out_q == dval_t'(sat(sum - e)), "VN");
      run(S2_DEC);
      chk(out_q == dval_t'(sat(sum)), "DEC");
      in.own.acc = dval_t'(sum);
      run(S2_ACC);
      chk(out_q == dval_t'(sat(sum)), "ACC");
      // compare-select, possibly across the wrap-around point
      ta = $urandom_range(0, 1023); tb = ta + $urandom_range(0, 300) - 150;
      in.ta = dval_t'(ta); in.tb = dval_t'(tb);
      run(S2_ACS);
      chk(d_q == (tb < ta) && out_q == dval_t'((tb < ta) ? tb : ta), "ACS");
      // a no-op keeps the result
      run(S2_NOP);
      chk(out_q == dval_t'((tb < ta) ? tb : ta), "hold on NOP");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
