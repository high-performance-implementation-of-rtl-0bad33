// skein_round: one Threefish round on an NW-word state (NW = 4 or 8).
//
// The state words are paired (v[2j], v[2j+1]) and each pair goes through a
// MIX whose rotation is R[d mod 8][j]; the MIX outputs are then reordered by
// the fixed Threefish word permutation. Combinational; the round number d
// (mod 8) is an input, so the same instance can run any round.
module skein_round
  import skein_pkg::*;
#(
  parameter int unsigned NW = 8
) (
  input  logic [2:0]          d,
  input  logic [NW-1:0][63:0] v_in,
  output logic [NW-1:0][63:0] v_out
);
  logic [NW-1:0][63:0] f;

  for (genvar j = 0; j < NW / 2; j++) begin : g_mix
    skein_mix u_mix (
      .x0 (v_in[2*j]),
      .x1 (v_in[2*j+1]),
      .rot(rot_amount(NW, d, j)),
      .y0 (f[2*j]),
      .y1 (f[2*j+1])
    );
  end

  always_comb begin
    for (int unsigned i = 0; i < NW; i++) v_out[i] = f[perm_src(NW, i)];
  end
endmodule
