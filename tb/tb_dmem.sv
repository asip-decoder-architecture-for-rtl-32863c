// tb_dmem: checks the data memory at its full size (1024 words of 64 x 5 bits).
// Random full-word and lane-masked writes are mirrored in a model; reads must
// return the model contents one clock after the address, and a read of a
// word written in the same clock returns the old contents.
module tb_dmem;
  import dec_pkg::*;
  logic clk = 0, re = 0, we = 0;
  logic [DA-1:0] raddr = '0, waddr = '0;
  logic [P-1:0] wmask = '0;
  vec_t wdata = '0, rdata;
  int checks = 0, failures = 0;
  vec_t model [DMEM_WORDS];

  dmem dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok);
    checks++;
    if (!ok) failures++;
  endtask

  initial begin
    vec_t v, old;
    for (int a = 0; a < DMEM_WORDS; a++) begin
      for (int l = 0; l < P; l++) v[l] = lane_t'($urandom);
      model[a] = v;
      we = 1; waddr = DA'(a); wmask = '1; wdata = v;
      @(posedge clk); #1;
    end
    we = 0;
    for (int t = 0; t < 3000; t++) begin
      int a, r;
      a = $urandom_range(0, DMEM_WORDS - 1);
      r = $urandom_range(0, DMEM_WORDS - 1);
      if (t % 7 == 0) r = a;
      for (int l = 0; l < P; l++) wdata[l] = lane_t'($urandom);
      for (int l = 0; l < P; l++) wmask[l] = ($urandom_range(0, 3) == 0);
      we = 1; waddr = DA'(a); re = 1; raddr = DA'(r);
      old = model[r];
      @(posedge clk); #1;
      chk(rdata == old);
      for (int l = 0; l < P; l++) if (wmask[l]) model[a][l] = wdata[l];
      we = 0;
    end
    re = 0;
    for (int a = 0; a < DMEM_WORDS; a++) begin
      re = 1; raddr = DA'(a);
      @(posedge clk); #1;
      chk(rdata == model[a]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
