// skein_mix: the Threefish MIX function on two 64-bit words.
//
//   y0 = (x0 + x1) mod 2^64
//   y1 = (x1 <<< rot) ^ y0
//
// Purely combinational. The rotation amount is an input so that one MIX can
// serve every round of an iterative datapath (where the amount changes with
// the round number); unrolled datapaths tie it to a constant and synthesis
// reduces the rotator to wiring.
// MIX is defined this way by Threefish; nothing here is a design choice
// except making the rotation amount a run-time input.
module skein_mix
  import skein_pkg::*;
(
  input  word_t      x0,
  input  word_t      x1,
  input  logic [5:0] rot,
  output word_t      y0,
  output word_t      y1
);
  always_comb begin
    y0 = x0 + x1;
    y1 = rotl64(x1, rot) ^ y0;
  end
endmodule
