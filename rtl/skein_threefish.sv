// skein_threefish: Threefish-256/512 block cipher datapath with the UBI
// feed-forward, plus the Threefish control FSM.
//
// One call encrypts a data block M under key K and tweak T and returns
// E(K, T, M) ^ M, which is exactly one UBI step (the chaining value for the
// next block). The key is either the precomputed IV (first block of a
// message) or the previous result, chosen by `blk_use_iv`.
//
// Datapath: a state register, a copy of the original block for the
// feed-forward, the subkey generator (skein_key_schedule) and a round unit
// whose shape depends on UNROLL:
//   UNROLL = 1 : one round per clock; the subkey is added every fourth clock
//                and the rotation row follows the round number (72 clocks).
//   UNROLL = 4 : subkey add + four rounds per clock (18 clocks).
//   UNROLL = 8 : subkey add + four rounds + subkey add + four rounds per
//                clock, the key schedule supplying two subkeys (9 clocks).
// After the last round the result (state + subkey 18) ^ M is formed by the
// adder column in front of the round unit and written to `result`.
//
// Control FSM (INIT -> MID -> FINISH): INIT waits for a block and loads the
// state, the feed-forward copy and the key schedule; MID counts the round
// clocks down; FINISH writes `result` and pulses `done` for that clock.
// Clocks per block, back to back: UNROLL=1: 74, UNROLL=4: 20, UNROLL=8: 10.
// To reach 10 for UNROLL=8 the next block is accepted already in FINISH, its
// key taken straight from the feed-forward output rather than from the
// `result` register; the iterative and 4-unrolled variants keep a separate
// INIT clock, which keeps that long path out of their shorter clock period.
//
// Handshake: a block is taken when blk_valid && blk_ready. blk_data,
// blk_tweak and blk_use_iv are sampled in that clock only. `result` holds its
// value until the next FINISH.
module skein_threefish
  import skein_pkg::*;
#(
  parameter int unsigned NW     = 8,
  parameter int unsigned UNROLL = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                blk_valid,
  output logic                blk_ready,
  input  logic [NW-1:0][63:0] blk_data,
  input  logic [127:0]        blk_tweak,
  input  logic                blk_use_iv,
  output logic                done,
  output logic [NW-1:0][63:0] result,
  output logic                busy
);
  localparam int unsigned NCYC = ROUNDS / UNROLL;
  localparam int unsigned STEP = (UNROLL == 8) ? 2 : 1;

  typedef enum logic [1:0] {TF_INIT, TF_MID, TF_FINISH} tf_state_e;
  tf_state_e state_q;

  logic [NW-1:0][63:0] v_q, orig_q;
  logic [6:0]          c1_q;     // round clocks still to go
  logic [6:0]          rnd_q;    // round number, used by the iterative datapath
  logic [NW-1:0][63:0] sk1, sk2, iv;
  logic [NW-1:0][63:0] v_add, v_next, out_ff, key_mux;
  logic [4:0]          s_cnt;
  logic                take, ks_adv, inject;

  always_comb for (int i = 0; i < NW; i++) iv[i] = iv_word(NW, i);

  // ---------------------------------------------------------------- datapath
  // Subkey adder column (also forms the final subkey addition).
  assign inject = (UNROLL != 1) || (rnd_q[1:0] == 2'd0) || (state_q == TF_FINISH);
  always_comb begin
    for (int i = 0; i < NW; i++) begin
      v_add[i]  = v_q[i] + (inject ? sk1[i] : 64'd0);
      out_ff[i] = v_add[i] ^ orig_q[i];
    end
  end

  if (UNROLL == 1) begin : g_iter
    skein_round #(.NW(NW)) u_round (.d(rnd_q[2:0]), .v_in(v_add), .v_out(v_next));
  end else if (UNROLL == 4) begin : g_unroll4
    skein_four_rounds #(.NW(NW)) u_r4 (.upper(rnd_q[0]), .v_in(v_add), .v_out(v_next));
  end else begin : g_unroll8
    logic [NW-1:0][63:0] v_mid, v_mid_add;
    skein_four_rounds #(.NW(NW)) u_r4a (.upper(1'b0), .v_in(v_add), .v_out(v_mid));
    always_comb for (int i = 0; i < NW; i++) v_mid_add[i] = v_mid[i] + sk2[i];
    skein_four_rounds #(.NW(NW)) u_r4b (.upper(1'b1), .v_in(v_mid_add), .v_out(v_next));
  end

  // Key source: IV, or the chaining value (straight from the feed-forward
  // when the next block is taken in FINISH).
  always_comb begin
    if (blk_use_iv)                 key_mux = iv;
    else if (state_q == TF_FINISH)  key_mux = out_ff;
    else                            key_mux = result;
  end

  assign ks_adv = (state_q == TF_MID) && ((UNROLL != 1) || (rnd_q[1:0] == 2'd0));

  skein_key_schedule #(.NW(NW), .STEP(STEP)) u_ks (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (take),
    .key_in  (key_mux),
    .tweak_in(blk_tweak),
    .adv     (ks_adv),
    .sk1     (sk1),
    .sk2     (sk2),
    .s_cnt   (s_cnt)
  );

  // ---------------------------------------------------------- Threefish FSM
  always_comb begin
    unique case (state_q)
      TF_INIT:   blk_ready = 1'b1;
      TF_FINISH: blk_ready = (UNROLL == 8);
      default:   blk_ready = 1'b0;
    endcase
  end
  assign take = blk_valid && blk_ready;
  assign done = (state_q == TF_FINISH);
  assign busy = (state_q != TF_INIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= TF_INIT;
      v_q     <= '0;
      orig_q  <= '0;
      result  <= '0;
      c1_q    <= '0;
      rnd_q   <= '0;
    end else begin
      if (state_q == TF_MID) begin
        v_q   <= v_next;
        rnd_q <= rnd_q + 7'd1;
        c1_q  <= c1_q - 7'd1;
        if (c1_q == 7'd0) state_q <= TF_FINISH;
      end
      if (state_q == TF_FINISH) begin
        result  <= out_ff;
        state_q <= TF_INIT;
      end
      if (take) begin
        v_q     <= blk_data;
        orig_q  <= blk_data;
        c1_q    <= 7'(NCYC - 1);
        rnd_q   <= '0;
        state_q <= TF_MID;
      end
    end
  end

  // The last subkey (number 18) must be in place when the result is formed.
  a_last_subkey: assert property (@(posedge clk) disable iff (!rst_n)
                                  (state_q == TF_FINISH) |-> (s_cnt == 5'(NUM_SUBKEYS - 1)));
endmodule
