// imem: instruction memory holding the VLIW program.
//
// IMEM_WORDS words of IW bits, written by the host before a run and read by
// the program control with one clock of latency (synchronous read). The depth
// is this design's own choice; the published design only names the memory.
module imem
  import dec_pkg::*;
#(
  parameter int unsigned WORDS = IMEM_WORDS
) (
  input  logic                     clk,
  input  logic [$clog2(WORDS)-1:0] raddr,
  output logic [IW-1:0]            rdata,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  logic [IW-1:0]            wdata
);

  logic [IW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end

endmodule
