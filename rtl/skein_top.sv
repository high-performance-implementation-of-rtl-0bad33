// skein_top: Skein hash core (Skein-512-512 by default, Skein-256-256 with
// NW = 4) with a 64-bit streaming interface.
//
// A message enters as 64-bit words and leaves as an NW-word digest, also
// 64 bits per clock. Inside, three units each run their own FSM:
//   skein_interface : gathers words into NW-word blocks, pads the last one
//                     with zeros, and serialises the digest;
//   skein_ubi_fsm   : runs the message UBI and the output UBI, forms each
//                     block's tweak and picks IV or chaining value as key;
//   skein_threefish : the Threefish datapath with the UBI feed-forward.
// The configuration UBI is not run: its result for an output length equal to
// the state size is a constant IV. They are coupled only by valid/ready
// handshakes and by the Threefish `done` and UBI `hash_valid` pulses.
//
// UNROLL selects the Threefish datapath: 1 (one round per clock, 74 clocks
// per block), 4 (four rounds, 20 clocks) or 8 (eight rounds, 10 clocks).
// A message of n blocks is hashed in about n+1 Threefish calls (the extra one
// is the output UBI); the digest starts one clock after the last call ends.
// The unit split and the clock counts per block follow the published
// architecture; the port protocol and the fixed output length (one output
// block, digest size = state size) are this design's choices.
module skein_top
  import skein_pkg::*;
#(
  parameter int unsigned NW     = 8,
  parameter int unsigned UNROLL = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        s_valid,
  output logic        s_ready,
  input  logic [63:0] s_data,
  input  logic [3:0]  s_nbytes,
  input  logic        s_last,
  output logic        m_valid,
  input  logic        m_ready,
  output logic [63:0] m_data,
  output logic        m_last
);
  logic                blk_valid, blk_ready, blk_last;
  logic [NW-1:0][63:0] blk_data;
  logic [6:0]          blk_nbytes;
  logic                tf_valid, tf_ready, tf_use_iv, tf_done, tf_busy;
  logic [NW-1:0][63:0] tf_block, tf_result;
  logic [127:0]        tf_tweak;
  logic                hash_valid;

  skein_interface #(.NW(NW)) u_if (
    .clk       (clk),
    .rst_n     (rst_n),
    .s_valid   (s_valid),
    .s_ready   (s_ready),
    .s_data    (s_data),
    .s_nbytes  (s_nbytes),
    .s_last    (s_last),
    .blk_valid (blk_valid),
    .blk_ready (blk_ready),
    .blk_data  (blk_data),
    .blk_nbytes(blk_nbytes),
    .blk_last  (blk_last),
    .hash_valid(hash_valid),
    .hash_data (tf_result),
    .m_valid   (m_valid),
    .m_ready   (m_ready),
    .m_data    (m_data),
    .m_last    (m_last)
  );

  skein_ubi_fsm #(.NW(NW)) u_ubi (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (blk_valid),
    .in_ready  (blk_ready),
    .in_block  (blk_data),
    .in_nbytes (blk_nbytes),
    .in_last   (blk_last),
    .tf_valid  (tf_valid),
    .tf_ready  (tf_ready),
    .tf_block  (tf_block),
    .tf_tweak  (tf_tweak),
    .tf_use_iv (tf_use_iv),
    .tf_done   (tf_done),
    .hash_valid(hash_valid)
  );

  skein_threefish #(.NW(NW), .UNROLL(UNROLL)) u_tf (
    .clk       (clk),
    .rst_n     (rst_n),
    .blk_valid (tf_valid),
    .blk_ready (tf_ready),
    .blk_data  (tf_block),
    .blk_tweak (tf_tweak),
    .blk_use_iv(tf_use_iv),
    .done      (tf_done),
    .result    (tf_result),
    .busy      (tf_busy)
  );

  // When the digest is announced the Threefish unit has finished the output
  // block and holds the digest in its result register.
  a_digest_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                  hash_valid |-> !tf_busy);
endmodule
