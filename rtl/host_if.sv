// host_if: host access to the decoder's memories.
//
// While the decoder is not running the host owns both memories: it loads the
// program into the instruction memory and channel values into the data
// memory, and reads results back (read data one clock after the address).
// While it runs, the data-memory ports belong to the core and host accesses
// are ignored; `host_err` flags an ignored access for one clock. The
// published design only budgets area for interfaces; this arbitration is this
// design's own choice.
module host_if
  import dec_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          core_run,
  // host side
  input  logic          h_imem_we,
  input  logic [IA-1:0] h_imem_addr,
  input  logic [IW-1:0] h_imem_wdata,
  input  logic          h_dmem_we,
  input  logic          h_dmem_re,
  input  logic [DA-1:0] h_dmem_addr,
  input  vec_t          h_dmem_wdata,
  output logic          host_err,
  // core side
  input  logic          c_re,
  input  logic [DA-1:0] c_raddr,
  input  logic          c_we,
  input  logic [DA-1:0] c_waddr,
  input  logic [P-1:0]  c_wmask,
  input  vec_t          c_wdata,
  // memory side
  output logic          m_imem_we,
  output logic [IA-1:0] m_imem_waddr,
  output logic [IW-1:0] m_imem_wdata,
  output logic          m_re,
  output logic [DA-1:0] m_raddr,
  output logic          m_we,
  output logic [DA-1:0] m_waddr,
  output logic [P-1:0]  m_wmask,
  output vec_t          m_wdata
);

  always_comb begin
    m_imem_we    = !core_run && h_imem_we;
    m_imem_waddr = h_imem_addr;
    m_imem_wdata = h_imem_wdata;
    if (core_run) begin
      m_re    = c_re;
      m_raddr = c_raddr;
      m_we    = c_we;
      m_waddr = c_waddr;
      m_wmask = c_wmask;
      m_wdata = c_wdata;
    end else begin
      m_re    = h_dmem_re;
      m_raddr = h_dmem_addr;
      m_we    = h_dmem_we;
      m_waddr = h_dmem_addr;
      m_wmask = '1;
      m_wdata = h_dmem_wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) host_err <= 1'b0;
    else        host_err <= core_run && (h_imem_we || h_dmem_we || h_dmem_re);
  end

endmodule
