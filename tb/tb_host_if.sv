// tb_host_if: checks the host/core arbitration of the memory ports. While
// the core is idle the host's accesses reach the memories with a full lane
// mask; while it runs only the core's accesses do and a host access raises
// host_err for one clock.
module tb_host_if;
  import dec_pkg::*;
  logic clk = 0, rst_n = 0, core_run = 0;
  logic h_imem_we, h_dmem_we, h_dmem_re, host_err;
  logic [IA-1:0] h_imem_addr, m_imem_waddr;
  logic [IW-1:0] h_imem_wdata, m_imem_wdata;
  logic [DA-1:0] h_dmem_addr, c_raddr, c_waddr, m_raddr, m_waddr;
  vec_t h_dmem_wdata, c_wdata, m_wdata;
  logic c_re, c_we, m_imem_we, m_re, m_we;
  logic [P-1:0] c_wmask, m_wmask;
  int checks = 0, failures = 0;

  host_if dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok);
    checks++;
    if (!ok) failures++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      bit hostacc;
      core_run = 1'($urandom);
      h_imem_we = 1'($urandom); h_dmem_we = 1'($urandom); h_dmem_re = 1'($urandom);
      h_imem_addr = IA'($urandom); h_imem_wdata = {$urandom, $urandom, $urandom};
      h_dmem_addr = DA'($urandom); c_raddr = DA'($urandom); c_waddr = DA'($urandom);
      for (int l = 0; l < P; l++) begin h_dmem_wdata[l] = lane_t'($urandom); c_wdata[l] = lane_t'($urandom); end
      c_re = 1'($urandom); c_we = 1'($urandom); c_wmask = {$urandom, $urandom};
      hostacc = h_imem_we || h_dmem_we || h_dmem_re;
      #1;
      if (core_run) begin
        chk(!m_imem_we);
        chk(m_re == c_re && m_raddr == c_raddr && m_we == c_we && m_waddr == c_waddr &&
            m_wmask == c_wmask && m_wdata == c_wdata);
      end else begin
        chk(m_imem_we == h_imem_we && m_imem_waddr == h_imem_addr && m_imem_wdata == h_imem_wdata);
        chk(m_re == h_dmem_re && m_raddr == h_dmem_addr && m_we == h_dmem_we &&
            m_waddr == h_dmem_addr && m_wmask == '1 && m_wdata == h_dmem_wdata);
      end
      @(posedge clk); #1;
      chk(host_err == (core_run && hostacc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
