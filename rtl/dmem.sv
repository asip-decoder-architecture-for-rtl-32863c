// dmem: vector data memory of the decoder.
//
// DMEM_WORDS words of P lanes with LW bits each: 1024 x 64 x 5 bits = 40 kByte
// in the default configuration, which holds channel values, LDPC edge
// messages, decoded bits and intermediate data. One synchronous read port
// (data one clock after the address) and one write port with a write enable
// per lane, so single decoded bits can be stored without read-modify-write.
// The size follows the published design; the port arrangement and the lane
// write mask are this design's own choices. Reading and writing the same word
// in one clock returns the old contents.
module dmem
  import dec_pkg::*;
#(
  parameter int unsigned WORDS = DMEM_WORDS
) (
  input  logic                     clk,
  input  logic                     re,
  input  logic [$clog2(WORDS)-1:0] raddr,
  output vec_t                     rdata,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  logic [P-1:0]             wmask,
  input  vec_t                     wdata
);

  vec_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
    if (we) begin
      for (int l = 0; l < P; l++) begin
        if (wmask[l]) mem[waddr][l] <= wdata[l];
      end
    end
  end

endmodule
