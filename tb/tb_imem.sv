// tb_imem: checks the instruction memory: every word written with a random
// instruction is read back one clock after its address.
module tb_imem;
  import dec_pkg::*;
  logic clk = 0, we = 0;
  logic [IA-1:0] raddr = '0, waddr = '0;
  logic [IW-1:0] wdata = '0, rdata;
  logic [IW-1:0] model [IMEM_WORDS];
  int checks = 0, failures = 0;

  imem dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < IMEM_WORDS; a++) begin
      model[a] = {$urandom, $urandom, $urandom};
      we = 1; waddr = IA'(a); wdata = model[a];
      @(posedge clk); #1;
    end
    we = 0;
    for (int t = 0; t < 2000; t++) begin
      raddr = IA'($urandom);
      @(posedge clk); #1;
      checks++;
      if (rdata != model[raddr]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
