// skein_ubi_fsm: UBI controller of the Skein core. It feeds message blocks
// and the output block to the Threefish unit and generates their tweaks.
//
// A hash is the UBI chain  G0 = IV (precomputed configuration UBI),
// G1 = UBI(G0, M, type 48),  H = UBI(G1, 64-bit zero counter, type 63).
// The tweak of every block carries the byte position reached at the end of
// that block (padding not counted), the block type, and first/final flags.
//
// States (named after the block the Threefish unit is working on):
//   INIT  : idle; the first message block is passed on with key = IV.
//   FIRST : first message block in flight.
//   MID   : a middle message block in flight.
//   FINAL : the last message block (not also the first) in flight.
//   OUT   : the output block in flight.
//   END   : one clock, `hash_valid` says the Threefish result is the digest.
// While a message block is in flight the next one (or, after the last one,
// the output block) is already offered, so the Threefish unit can take it the
// moment it is free; a state change happens when a block is handed over
// (tf_valid && tf_ready), and OUT -> END on the Threefish `done`.
// Message blocks come from the interface unit with their byte count and a
// last flag; in_ready is the Threefish handshake passed through.
// The state names follow the published UBI FSM; moving on the hand-over
// instead of on Threefish completion, returning from END to INIT, and the
// handshakes are this design's choices. Reset is asynchronous, active low.
module skein_ubi_fsm
  import skein_pkg::*;
#(
  parameter int unsigned NW = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  // message blocks from the interface unit
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [NW-1:0][63:0] in_block,
  input  logic [6:0]          in_nbytes,
  input  logic                in_last,
  // Threefish unit
  output logic                tf_valid,
  input  logic                tf_ready,
  output logic [NW-1:0][63:0] tf_block,
  output logic [127:0]        tf_tweak,
  output logic                tf_use_iv,
  input  logic                tf_done,
  // digest available (Threefish result)
  output logic                hash_valid
);
  typedef enum logic [2:0] {U_INIT, U_FIRST, U_MID, U_FINAL, U_OUT, U_END} ubi_state_e;
  ubi_state_e state_q;

  logic [95:0] pos_q;      // bytes consumed so far in the message UBI
  logic        last_q;     // block in flight is the last message block
  logic        take;

  always_comb begin
    tf_valid  = 1'b0;
    tf_block  = in_block;
    tf_tweak  = make_tweak(pos_q + 96'(in_nbytes), T_MSG, 1'b0, in_last);
    tf_use_iv = 1'b0;
    in_ready  = 1'b0;
    unique case (state_q)
      U_INIT: begin
        tf_valid  = in_valid;
        tf_tweak  = make_tweak(96'(in_nbytes), T_MSG, 1'b1, in_last);
        tf_use_iv = 1'b1;
        in_ready  = tf_ready;
      end
      U_FIRST, U_MID, U_FINAL: begin
        if (!last_q) begin
          tf_valid = in_valid;
          in_ready = tf_ready;
        end else begin
          // output UBI: one block holding the 8-byte counter 0
          tf_valid = 1'b1;
          tf_block = '0;
          tf_tweak = make_tweak(96'd8, T_OUT, 1'b1, 1'b1);
        end
      end
      default: ;
    endcase
  end

  assign take       = tf_valid && tf_ready;
  assign hash_valid = (state_q == U_END);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= U_INIT;
      pos_q   <= '0;
      last_q  <= 1'b0;
    end else begin
      unique case (state_q)
        U_INIT: if (take) begin
          pos_q   <= 96'(in_nbytes);
          last_q  <= in_last;
          state_q <= U_FIRST;
        end
        U_FIRST, U_MID, U_FINAL: if (take) begin
          if (last_q) begin
            state_q <= U_OUT;
          end else begin
            pos_q   <= pos_q + 96'(in_nbytes);
            last_q  <= in_last;
            state_q <= in_last ? U_FINAL : U_MID;
          end
        end
        U_OUT:   if (tf_done) state_q <= U_END;
        U_END:   state_q <= U_INIT;
        default: state_q <= U_INIT;
      endcase
    end
  end

  // A message block may only be handed over by the Threefish handshake.
  a_in_pop: assert property (@(posedge clk) disable iff (!rst_n)
                             (in_valid && in_ready) |-> tf_ready);
endmodule
