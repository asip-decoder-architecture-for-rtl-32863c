// tb_agu: checks the address generation unit.
// Address registers are loaded with random pointers and strides; random
// instructions read and write through them with offsets and post-increments,
// and the addresses and broadcast lanes are compared with a model. The
// configuration registers and the systematic info of every lane (parity of
// state, input bit and generator polynomial) are checked for all state
// counts.
module tb_agu;
  import dec_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ctrl_valid = 0, issue = 0, sys_u = 0, sys_b = 0;
  ctrl_t ctrl;
  vliw_t iw;
  logic [DA-1:0] rd_addr, wr_addr, obase;
  logic [LANE_BITS-1:0] bcast_lane;
  logic [P-1:0] sys_z;
  logic [2:0] lg_states;
  mag_t beta;
  logic cfg_wr;
  int checks = 0, failures = 0;
  int ar [4], st [4];

  agu dut (.*);
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

  task automatic do_ctrl(ctrl_op_e op, int idx, int a, int b, int c);
    ctrl = '0; ctrl.is_ctrl = 1; ctrl.op = op; ctrl.idx = 4'(idx);
    ctrl.a = 16'(a); ctrl.b = 16'(b); ctrl.c = 16'(c);
    ctrl_valid = 1;
    @(posedge clk); #1 ctrl_valid = 0;
  endtask

  initial begin
    int g1, g2, lg;
    ctrl = '0; iw = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 4; i++) begin
      ar[i] = $urandom_range(0, 65535); st[i] = $urandom_range(0, 200);
      do_ctrl(C_SETAR, i, ar[i], st[i], 0);
    end
    for (int t = 0; t < 1000; t++) begin
      int ra, wa, ro, wo;
      iw = '0;
      ra = $urandom_range(0, 3); wa = $urandom_range(0, 3);
      ro = $urandom_range(0, 1023); wo = $urandom_range(0, 1023);
      iw.rd_en = 1'($urandom); iw.rd_ar = 2'(ra); iw.rd_off = DA'(ro); iw.rd_inc = 1'($urandom);
      iw.wr_en = 1'($urandom); iw.wr_ar = 2'(wa); iw.wr_off = DA'(wo); iw.wr_inc = 1'($urandom);
      issue = 1;
      #1;
      chk(rd_addr == DA'((ar[ra] >> LANE_BITS) + ro), "read address");
      chk(bcast_lane == LANE_BITS'(ar[ra]), "broadcast lane");
      chk(wr_addr == DA'((ar[wa] >> LANE_BITS) + wo), "write address");
      @(posedge clk); #1 issue = 0;
      if (iw.rd_en && iw.rd_inc) ar[ra] = (ar[ra] + st[ra]) & 16'hffff;
      if (iw.wr_en && iw.wr_inc && !(iw.rd_en && iw.rd_inc && ra == wa)) ar[wa] = (ar[wa] + st[wa]) & 16'hffff;
    end
    for (lg = 3; lg <= 6; lg++) begin
      g1 = 'o171; g2 = 'o133;
      do_ctrl(C_SETCFG, lg, (g1 << 8) | g2, lg + 1, 77);
      chk(lg_states == 3'(lg) && beta == mag_t'(lg + 1) && obase == DA'(77), "config");
      for (int u = 0; u < 2; u++) begin
        for (int b = 0; b < 2; b++) begin
          sys_u = 1'(u); sys_b = 1'(b);
          #1;
          for (int l = 0; l < P; l++) begin
            int reg_bits;
            reg_bits = ((l % (1 << lg)) << 1) | u;
            chk(sys_z[l] == 1'($countones(reg_bits & (b ? g2 : g1)) % 2), "systematic info");
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
