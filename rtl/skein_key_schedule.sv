// skein_key_schedule: Threefish subkey generator built from two rings of
// shift registers, one for the extended key and one for the extended tweak.
//
// On `load` the ring k[0..NW] takes the NW key words plus the parity word
// k[NW] = C240 ^ k[0] ^ ... ^ k[NW-1], the ring t[0..2] takes the tweak
// halves plus t2 = t0 ^ t1, and the subkey counter s clears. Subkey s is then
//   sk[i]      = k[(s+i) mod (NW+1)]                 i = 0 .. NW-4
//   sk[NW-3]   = k[(s+NW-3) mod (NW+1)] + t[s mod 3]
//   sk[NW-2]   = k[(s+NW-2) mod (NW+1)] + t[(s+1) mod 3]
//   sk[NW-1]   = k[(s+NW-1) mod (NW+1)] + s
// Instead of indexing by s, both rings rotate by one word per subkey, so the
// adders always read fixed register positions. With STEP = 1 (iterative and
// 4-unrolled datapaths) `adv` moves to the next subkey and only sk1 is used.
// With STEP = 2 (8-unrolled datapath) `adv` moves two subkeys at once and sk2
// presents subkey s+1 next to sk1 = subkey s, read from the same registers
// one position further on (k[1..NW], t1, t2, s+1).
// Timing: sk1/sk2 are combinational from the registers; load and adv take
// effect at the next rising clock edge (load wins over adv).
// The two rings of shift registers, the +t / +s adders and the second subkey
// group follow the published 8-unrolled key schedule. Computing the parity
// word once at load time (instead of extra parity logic per clock) is this
// design's simplification; it yields the same subkeys.
module skein_key_schedule
  import skein_pkg::*;
#(
  parameter int unsigned NW   = 8,
  parameter int unsigned STEP = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [NW-1:0][63:0] key_in,
  input  logic [127:0]        tweak_in,
  input  logic                adv,
  output logic [NW-1:0][63:0] sk1,
  output logic [NW-1:0][63:0] sk2,
  output logic [4:0]          s_cnt
);
  logic [NW:0][63:0] k;
  logic [2:0][63:0]  t;
  logic [4:0]        s;
  word_t             par;

  always_comb begin
    par = C240;
    for (int i = 0; i < NW; i++) par = par ^ key_in[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= NW; i++) k[i] <= '0;
      for (int i = 0; i < 3; i++) t[i] <= '0;
      s <= '0;
    end else if (load) begin
      for (int i = 0; i < NW; i++) k[i] <= key_in[i];
      k[NW] <= par;
      t[0]  <= tweak_in[63:0];
      t[1]  <= tweak_in[127:64];
      t[2]  <= tweak_in[63:0] ^ tweak_in[127:64];
      s     <= '0;
    end else if (adv) begin
      for (int i = 0; i <= NW; i++) k[i] <= k[(i + STEP) % (NW + 1)];
      for (int i = 0; i < 3; i++) t[i] <= t[(i + STEP) % 3];
      s <= s + 5'(STEP);
    end
  end

  always_comb begin
    for (int i = 0; i < NW; i++) begin
      sk1[i] = k[i];
      sk2[i] = k[i+1];
    end
    sk1[NW-3] = k[NW-3] + t[0];
    sk1[NW-2] = k[NW-2] + t[1];
    sk1[NW-1] = k[NW-1] + word_t'(s);
    sk2[NW-3] = k[NW-2] + t[1];
    sk2[NW-2] = k[NW-1] + t[2];
    sk2[NW-1] = k[NW]   + (word_t'(s) + 64'd1);
  end

  assign s_cnt = s;
endmodule
