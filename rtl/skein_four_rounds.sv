// skein_four_rounds: four chained Threefish rounds ("four rounds of mix and
// permutation"), the unit between two subkey injections.
//
// Rounds 8c..8c+3 use the rotation rows 0..3 and rounds 8c+4..8c+7 use rows
// 4..7, so the block only needs to know which half of the eight-round cycle
// it computes: upper = 0 selects rows 0..3, upper = 1 rows 4..7. In the
// 4-unrolled datapath `upper` alternates every clock; in the 8-unrolled one
// two instances are tied to 0 and 1. Combinational, NW/2 * 4 MIX units.
// The four-round unit between subkey additions is the published datapath's
// building block; the rotation rows and permutation are Skein v1.3 constants.
module skein_four_rounds
  import skein_pkg::*;
#(
  parameter int unsigned NW = 8
) (
  input  logic                upper,
  input  logic [NW-1:0][63:0] v_in,
  output logic [NW-1:0][63:0] v_out
);
  logic [4:0][NW-1:0][63:0] v;

  assign v[0] = v_in;
  for (genvar r = 0; r < 4; r++) begin : g_round
    skein_round #(.NW(NW)) u_round (
      .d    ({upper, 2'(r)}),
      .v_in (v[r]),
      .v_out(v[r+1])
    );
  end
  assign v_out = v[4];
endmodule
