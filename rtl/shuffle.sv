// shuffle: barrel shifter between the data memory and the ALU array.
//
// Structured (quasi-cyclic) LDPC codes connect a block of Z = P variable nodes
// to a block of P check nodes through a cyclic shift, so a barrel shifter
// realises the Tanner graph connections. With INVERSE = 0 (read side,
// "Shuffle") lane l receives input lane (l + amt) mod P; with INVERSE = 1
// (write side, "Shuffle^-1") lane l receives input lane (l - amt) mod P, which
// undoes the read-side shift. The shifter is built from log2(P) stages that
// each rotate by a power of two. Mode SH_BCAST copies input lane `lane` to all
// lanes; the decoder uses it to hand the same received symbol to every trellis
// state. SH_NONE passes the word through.
// The barrel shifter follows the published design; the rotation direction and
// the broadcast mode are this design's own choices. Purely combinational.
module shuffle
  import dec_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  vec_t                 in,
  input  shuf_mode_e           mode,
  input  logic [LANE_BITS-1:0] amt,
  input  logic [LANE_BITS-1:0] lane,   // source lane for SH_BCAST
  output vec_t                 out
);

  vec_t stage [LANE_BITS+1];
  logic [LANE_BITS-1:0] sh;

  always_comb begin
    // a rotation by -amt is a rotation by P - amt
    sh       = INVERSE ? LANE_BITS'(-amt) : amt;
    stage[0] = in;
    for (int s = 0; s < LANE_BITS; s++) begin
      for (int l = 0; l < P; l++) begin
        stage[s+1][l] = sh[s] ? stage[s][(l + (1 << s)) % P] : stage[s][l];
      end
    end
    unique case (mode)
      SH_ROT:   out = stage[LANE_BITS];
      SH_BCAST: for (int l = 0; l < P; l++) out[l] = in[lane];
      default:  out = in;
    endcase
  end

endmodule
