// tb_tbu: checks the traceback unit.
// Random decision vectors are pushed every six clocks for blocks of 64 and 8
// states, then the block is flushed while the write port is randomly
// refused. Every decoded bit written (word, lane, value) is compared with a
// model that traces back TB_LEN steps from state 0 after each step and walks
// the last TB_LEN steps at the end. Each bit index must appear exactly once.
module tb_tbu;
  import dec_pkg::*;
  localparam int STEPS = 300;
  logic clk = 0, rst_n = 0, clear = 0, push = 0, flush = 0, wr_ready = 1;
  logic [P-1:0] d = '0;
  logic [2:0] lg_states = 3'd6;
  logic [DA-1:0] obase = DA'(100);
  logic wr_valid, wr_bit, busy;
  logic [DA-1:0] wr_addr;
  logic [LANE_BITS-1:0] wr_lane;
  int checks = 0, failures = 0;

  tbu dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
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

  bit dcol [STEPS+1][P];
  int expv [STEPS];
  int got  [STEPS];

  always @(posedge clk) begin
    if (rst_n && wr_valid && wr_ready) begin
      automatic int idx = (int'(wr_addr) - int'(obase)) * P + int'(wr_lane);
      if (idx >= 0 && idx < STEPS) begin
        got[idx]++;
        chk(wr_bit == expv[idx][0], $sformatf("bit %0d", idx));
      end else chk(0, "address out of range");
    end
  end

  function automatic int prev(int s, int db, int lg);
    return ((s >> 1) | (db << (lg - 1))) & ((1 << lg) - 1);
  endfunction

  initial begin
    int lgs [2];
    lgs[0] = 6; lgs[1] = 3;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    foreach (lgs[g]) begin
      int lg, s;
      lg = lgs[g];
      lg_states = 3'(lg);
      obase = DA'(100 + 50 * g);
      // model
      for (int t = 1; t <= STEPS; t++)
        for (int k = 0; k < P; k++) dcol[t][k] = 1'($urandom);
      for (int t = TB_LEN + 1; t <= STEPS; t++) begin
        s = 0;
        for (int i = 0; i < TB_LEN; i++) s = prev(s, dcol[t-i][s], lg);
        expv[t - TB_LEN - 1] = s & 1;
      end
      s = 0;
      for (int i = 0; i < TB_LEN; i++) begin
        expv[STEPS - 1 - i] = s & 1;
        s = prev(s, dcol[STEPS - i][s], lg);
      end
      foreach (got[i]) got[i] = 0;
      clear = 1; @(posedge clk); #1 clear = 0;
      for (int t = 1; t <= STEPS; t++) begin
        for (int k = 0; k < P; k++) d[k] = dcol[t][k];
        push = 1; @(posedge clk); #1 push = 0;
        repeat (5) @(posedge clk);
        #1;
      end
      flush = 1; @(posedge clk); #1 flush = 0;
      while (busy) begin
        wr_ready = ($urandom_range(0, 3) != 0);
        @(posedge clk);
        #1;
      end
      wr_ready = 1;
      foreach (got[i]) chk(got[i] == 1, $sformatf("bit %0d written %0d times", i, got[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
