// tb_program_control: checks instruction issue with nested zero-overhead
// loops. A small program (straight code, an outer loop of 3 containing an
// inner loop of 4, more code, HALT) is placed in a model memory with the
// same one-clock read latency; the sequence of issued addresses must match
// the expected trace exactly, with no cycles spent on loop jumps, and
// `halted` must follow the HALT. The program is run twice.
module tb_program_control;
  import dec_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [IA-1:0] imem_raddr;
  logic [IW-1:0] imem_rdata;
  logic vliw_valid, ctrl_valid, running, halted;
  vliw_t vliw;
  ctrl_t ctrl;
  int checks = 0, failures = 0;
  logic [IW-1:0] mem [32];

  program_control dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) imem_rdata <= mem[imem_raddr[4:0]];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [IW-1:0] cw(ctrl_op_e op, int a, int b);
    ctrl_t w;
    w = '0; w.is_ctrl = 1; w.op = op; w.a = 16'(a); w.b = 16'(b);
    return w;
  endfunction

  function automatic logic [IW-1:0] vw(int tag);
    vliw_t w;
    w = '0; w.rd_off = DA'(tag);
    return w;
  endfunction

  int trace [$], expect_q [$];
  always @(posedge clk) if (vliw_valid) trace.push_back(int'(vliw.rd_off));

  initial begin
    // 0: v0  1: LOOP 3 ->7  2: v2  3: LOOP 4 ->5  4: v4  5: v5  6: v6  7: v7  8: v8  9: HALT
    mem[0] = vw(0); mem[1] = cw(C_LOOP, 3, 7); mem[2] = vw(2); mem[3] = cw(C_LOOP, 4, 5);
    mem[4] = vw(4); mem[5] = vw(5); mem[6] = vw(6); mem[7] = vw(7); mem[8] = vw(8);
    mem[9] = cw(C_HALT, 0, 0);
    for (int i = 10; i < 32; i++) mem[i] = vw(99);
    expect_q.push_back(0);
    repeat (3) begin
      expect_q.push_back(2);
      repeat (4) begin expect_q.push_back(4); expect_q.push_back(5); end
      expect_q.push_back(6); expect_q.push_back(7);
    end
    expect_q.push_back(8);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) begin
      int c0, c1;
      trace.delete();
      @(posedge clk); #1 start = 1; c0 = $time;
      @(posedge clk); #1 start = 0;
      while (!halted) @(posedge clk);
      c1 = $time;
      checks++;
      if (trace != expect_q) begin
        failures++;
        $display("trace %p", trace);
      end
      // issue cycles: every VLIW once, control words once each time they run
      checks++;
      if ((c1 - c0) / 10 != expect_q.size() + 1 + 3 + 1 + 1) failures++;
      checks++;
      if (running) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
