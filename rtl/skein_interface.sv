// skein_interface: external 64-bit interface of the Skein core.
//
// Input side (serial to parallel): message words arrive on s_data with a
// valid/ready handshake, least significant byte first. s_last marks the last
// word of a message and s_nbytes (1..8) says how many of its low bytes are
// message bytes; a message of zero bytes is one word with s_last = 1 and
// s_nbytes = 0. Words are gathered into an NW-word block; the last block is
// padded with zero bytes up to the block size. A finished block, with its
// byte count and last flag, moves to a holding register that the UBI
// controller reads (blk_valid/blk_ready), so the next block can be gathered
// while the Threefish unit works on the previous one. With NW = 8 a block
// takes 8 clocks to gather, fewer than the 10 the 8-unrolled Threefish needs.
//
// Output side (parallel to serial): when the UBI controller signals
// hash_valid, the NW-word digest is captured and sent word 0 first on
// m_data (valid/ready), m_last on the final word. A new message is accepted
// after the digest has been sent.
//
// FSM: INIT -> STOP (gather the first block) -> STOP2 (gather later blocks)
// <-> WAIT (a gathered block waits for the holding register, or the whole
// message is in and the digest is awaited) -> PTOS (send digest) -> END -> INIT.
// The 64-bit external width, the padding duty and the state names follow the
// published interface FSM; the holding register, the byte-count signalling
// and the handshakes are this design's choices. Reset is asynchronous, active low.
module skein_interface
  import skein_pkg::*;
#(
  parameter int unsigned NW = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  // message input
  input  logic                s_valid,
  output logic                s_ready,
  input  logic [63:0]         s_data,
  input  logic [3:0]          s_nbytes,
  input  logic                s_last,
  // block output to the UBI controller
  output logic                blk_valid,
  input  logic                blk_ready,
  output logic [NW-1:0][63:0] blk_data,
  output logic [6:0]          blk_nbytes,
  output logic                blk_last,
  // digest from the core
  input  logic                hash_valid,
  input  logic [NW-1:0][63:0] hash_data,
  // digest output
  output logic                m_valid,
  input  logic                m_ready,
  output logic [63:0]         m_data,
  output logic                m_last
);
  localparam int unsigned IW = $clog2(NW);

  typedef enum logic [2:0] {I_INIT, I_STOP, I_STOP2, I_WAIT, I_PTOS, I_END} io_state_e;
  io_state_e state_q;

  logic [NW-1:0][63:0] fill_q;       // block being gathered
  logic [IW-1:0]       c2_q;         // word index in the block / digest word counter
  logic                pend_q;       // fill_q holds a complete block not yet moved
  logic [6:0]          pend_nbytes_q;
  logic                pend_last_q;
  logic                msg_done_q;   // last word of the message accepted

  logic                hold_q;       // holding register full
  logic [NW-1:0][63:0] hold_data_q;
  logic [6:0]          hold_nbytes_q;
  logic                hold_last_q;

  logic [NW-1:0][63:0] out_q;

  logic                s_take, blk_take, hold_free, word_ends_blk;
  logic [63:0]         s_masked;
  logic [NW-1:0][63:0] blk_next;
  logic [6:0]          nbytes_next;

  assign s_ready   = (state_q == I_STOP) || (state_q == I_STOP2);
  assign s_take    = s_valid && s_ready;
  assign blk_valid = hold_q;
  assign blk_data  = hold_data_q;
  assign blk_nbytes = hold_nbytes_q;
  assign blk_last  = hold_last_q;
  assign blk_take  = blk_valid && blk_ready;
  assign hold_free = !hold_q || blk_take;
  assign word_ends_blk = s_last || (c2_q == IW'(NW - 1));

  // Keep only the message bytes of the incoming word; pad the block with zeros.
  always_comb begin
    for (int b = 0; b < 8; b++)
      s_masked[8*b +: 8] = (!s_last || 4'(b) < s_nbytes) ? s_data[8*b +: 8] : 8'h00;
    for (int w = 0; w < NW; w++) begin
      if (IW'(w) < c2_q)       blk_next[w] = fill_q[w];
      else if (IW'(w) == c2_q) blk_next[w] = s_masked;
      else                     blk_next[w] = '0;
    end
    nbytes_next = {c2_q, 3'b000} + (s_last ? 7'(s_nbytes) : 7'd8);
  end

  assign m_valid = (state_q == I_PTOS);
  assign m_data  = out_q[0];
  assign m_last  = (state_q == I_PTOS) && (c2_q == IW'(NW - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= I_INIT;
      fill_q        <= '0;
      c2_q          <= '0;
      pend_q        <= 1'b0;
      pend_nbytes_q <= '0;
      pend_last_q   <= 1'b0;
      msg_done_q    <= 1'b0;
      hold_q        <= 1'b0;
      hold_data_q   <= '0;
      hold_nbytes_q <= '0;
      hold_last_q   <= 1'b0;
      out_q         <= '0;
    end else begin
      if (blk_take) hold_q <= 1'b0;
      unique case (state_q)
        I_INIT: begin
          c2_q       <= '0;
          pend_q     <= 1'b0;
          msg_done_q <= 1'b0;
          state_q    <= I_STOP;
        end
        I_STOP, I_STOP2: if (s_take) begin
          if (word_ends_blk) begin
            c2_q       <= '0;
            msg_done_q <= s_last;
            if (hold_free) begin
              hold_q        <= 1'b1;
              hold_data_q   <= blk_next;
              hold_nbytes_q <= nbytes_next;
              hold_last_q   <= s_last;
              state_q       <= s_last ? I_WAIT : I_STOP2;
            end else begin
              fill_q        <= blk_next;
              pend_q        <= 1'b1;
              pend_nbytes_q <= nbytes_next;
              pend_last_q   <= s_last;
              state_q       <= I_WAIT;
            end
          end else begin
            fill_q[c2_q] <= s_masked;
            c2_q         <= c2_q + IW'(1);
          end
        end
        I_WAIT: begin
          if (pend_q && hold_free) begin
            hold_q        <= 1'b1;
            hold_data_q   <= fill_q;
            hold_nbytes_q <= pend_nbytes_q;
            hold_last_q   <= pend_last_q;
            pend_q        <= 1'b0;
            if (!msg_done_q) state_q <= I_STOP2;
          end else if (!pend_q && msg_done_q && hash_valid) begin
            out_q   <= hash_data;
            c2_q    <= '0;
            state_q <= I_PTOS;
          end
        end
        I_PTOS: if (m_ready) begin
          out_q <= out_q >> 64;
          c2_q  <= c2_q + IW'(1);
          if (c2_q == IW'(NW - 1)) state_q <= I_END;
        end
        I_END:   state_q <= I_INIT;
        default: state_q <= I_INIT;
      endcase
    end
  end

  // An accepted word never overwrites a complete block still waiting to move.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) s_take |-> !pend_q);
endmodule
