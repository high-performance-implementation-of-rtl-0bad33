// skein_top_harness: stimulus and checking for one skein_top instance.
//
// Sends a list of messages (lengths chosen to hit the padding and block
// boundary cases, plus random ones) as 64-bit words with random idle gaps,
// reads the digest with random back-pressure, and compares it with the
// reference model. One message is sent without gaps to measure the Threefish
// period between consecutive blocks: 72/UNROLL + 2 clocks, or 10 for UNROLL=8.
// It also counts how often each mechanism of the core was exercised and counts
// a failure for any that never happened. Observation ports carry a few
// internal signals of the core.
module skein_top_harness
  import skein_ref_pkg::*;
#(
  parameter int unsigned NW     = 8,
  parameter int unsigned UNROLL = 8,
  parameter int unsigned NRAND  = 6
) (
  input  logic        clk,
  output logic        rst_n,
  output logic        s_valid,
  input  logic        s_ready,
  output logic [63:0] s_data,
  output logic [3:0]  s_nbytes,
  output logic        s_last,
  input  logic        m_valid,
  output logic        m_ready,
  input  logic [63:0] m_data,
  input  logic        m_last,
  // observation
  input  logic        obs_tf_done,
  input  logic        obs_tf_take,
  input  logic        obs_tf_take_in_finish,
  input  logic        obs_tf_use_iv,
  input  logic        obs_if_pending,
  input  logic [2:0]  obs_ubi_state,
  output int          checks,
  output int          failures,
  output logic        finished
);
  localparam int PERIOD = (UNROLL == 8) ? 10 : (72 / UNROLL + 2);
  int nb = NW * 8;

  // mechanism counters
  int n_multi, n_single, n_empty, n_partial, n_exact, n_pending, n_mstall, n_merge, n_iv, n_chain, n_final;
  bit gaps, stall_out;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [NW=%0d U=%0d] %s", NW, UNROLL, what);
    end
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (obs_tf_take_in_finish) n_merge++;
    if (obs_tf_take && obs_tf_use_iv) n_iv++;
    if (obs_tf_take && !obs_tf_use_iv) n_chain++;
    if (obs_if_pending && s_valid && !s_ready) n_pending++;
    if (obs_ubi_state == 3'd3) n_final++;
  end

  // Inputs change on the falling edge; a handshake is decided there from the
  // (registered) ready/valid of the core and completes at the next rising edge.
  task automatic run_msg(input logic [7:0] msg [$], output blk_t dig);
    int nwords, nbytes;
    logic [63:0] d;
    nwords = (msg.size() == 0) ? 1 : (msg.size() + 7) / 8;
    for (int w = 0; w < nwords; w++) begin
      d = '0;
      nbytes = 0;
      for (int b = 0; b < 8; b++)
        if (8 * w + b < msg.size()) begin
          d[8*b +: 8] = msg[8*w + b];
          nbytes++;
        end
      // unused bytes of the last word carry junk the core must drop
      for (int b = nbytes; b < 8; b++) d[8*b +: 8] = 8'($urandom);
      @(negedge clk);
      s_valid = 1'b0;
      while (gaps && $urandom_range(0, 3) == 0) @(negedge clk);
      s_valid  = 1'b1;
      s_data   = d;
      s_nbytes = 4'(nbytes);
      s_last   = (w == nwords - 1);
      while (!s_ready) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    s_valid = 1'b0;
    dig = '0;
    for (int w = 0; w < NW; w++) begin
      forever begin
        m_ready = stall_out ? ($urandom_range(0, 3) != 0) : 1'b1;
        if (m_valid && !m_ready) n_mstall++;
        if (m_valid && m_ready) break;
        @(negedge clk);
      end
      dig[w] = m_data;
      check(m_last == (w == NW - 1), "m_last position");
      @(posedge clk);
      @(negedge clk);
    end
    m_ready = 1'b0;
  endtask

  task automatic hash_and_check(input int len);
    logic [7:0] msg [$];
    blk_t dig, exp;
    for (int i = 0; i < len; i++) msg.push_back(8'($urandom));
    run_msg(msg, dig);
    exp = hash(NW, msg);
    for (int i = NW; i < 8; i++) exp[i] = '0;
    check(dig == exp, $sformatf("digest of %0d-byte message", len));
    if (len == 0) n_empty++;
    if (len % 8 != 0) n_partial++;
    if (len != 0 && len % nb == 0) n_exact++;
    if (len > nb) n_multi++; else n_single++;
  endtask

  // Known answer: digest of the single byte 0xFF (published test vector).
  task automatic kat();
    logic [7:0] msg [$];
    blk_t dig;
    logic [511:0] exp512 = 512'h7a6140f30291572adf12a0b509c42d27c52a817015efb6803eed0743868d69ca_c86c316be1aae0c4cc18d63a4c75a9f95b9e241460ed9c7b225264fee6bcb771;
    logic [255:0] exp256 = 256'hd27ee6341f7f63a670f2a1c90fc130da235ce244c444a2a7500eea98d1dc980b;
    msg.push_back(8'hff);
    run_msg(msg, dig);
    if (NW == 8) check(dig == exp512, "Skein-512-512 known answer for 0xFF");
    else         check(dig[3:0] == exp256, "Skein-256-256 known answer for 0xFF");
    n_single++;
    n_partial++;
  endtask

  // Threefish period with a gap-free input stream, and the whole message:
  // 12 message blocks + 1 output block take 13 periods from the first
  // hand-over to the last `done` (one clock less when INIT is separate).
  task automatic measure_period();
    logic [7:0] msg [$];
    blk_t dig;
    int t_last, n_per, n_ok, t_first, n_done;
    t_last = -1;
    t_first = -1;
    n_done = 0;
    n_per = 0;
    n_ok = 0;
    for (int i = 0; i < 12 * nb; i++) msg.push_back(8'($urandom));
    gaps = 0;
    stall_out = 0;
    fork
      run_msg(msg, dig);
      begin : watch
        int t = 0;
        forever begin
          @(posedge clk);
          t++;
          if (obs_tf_take && t_first < 0) t_first = t;
          if (obs_tf_done) begin
            n_done++;
            if (n_done == 13)
              check(t - t_first == 13 * PERIOD - ((UNROLL == 8) ? 0 : 1),
                    $sformatf("13 Threefish calls in %0d clocks", t - t_first));
            if (t_last >= 0 && obs_ubi_state == 3'd2) begin
              n_per++;
              if (t - t_last == PERIOD) n_ok++;
              else $display("period %0d, expected %0d", t - t_last, PERIOD);
            end
            t_last = t;
          end
        end
      end
    join_any
    disable fork;
    check(n_per >= 3 && n_ok == n_per, $sformatf("Threefish period %0d clocks (%0d of %0d)", PERIOD, n_ok, n_per));
    begin
      blk_t exp = hash(NW, msg);
      for (int i = NW; i < 8; i++) exp[i] = '0;
      check(dig == exp, "digest of period-test message");
    end
    gaps = 1;
    stall_out = 1;
  endtask

  initial begin
    checks = 0; failures = 0; finished = 0;
    n_multi = 0; n_single = 0; n_empty = 0; n_partial = 0; n_exact = 0;
    n_pending = 0; n_mstall = 0; n_merge = 0; n_iv = 0; n_chain = 0; n_final = 0;
    gaps = 1; stall_out = 1;
    rst_n = 0; s_valid = 0; m_ready = 0; s_data = '0; s_nbytes = '0; s_last = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    kat();
    hash_and_check(0);
    hash_and_check(1);
    hash_and_check(7);
    hash_and_check(8);
    hash_and_check(nb - 1);
    hash_and_check(nb);
    hash_and_check(nb + 1);
    hash_and_check(2 * nb);
    hash_and_check(3 * nb + 13);
    measure_period();
    for (int i = 0; i < NRAND; i++) hash_and_check($urandom_range(0, 4 * nb));
    // every mechanism must have happened
    check(n_multi > 0,   "multi-block message (MID state)");
    check(n_single > 0,  "single-block message (FIRST -> OUT)");
    check(n_final > 0,   "FINAL state");
    check(n_empty > 0,   "empty message");
    check(n_partial > 0, "partial last word padding");
    check(n_exact > 0,   "message filling its last block exactly");
    check(n_pending > 0, "input stalled on a full block buffer");
    check(n_mstall > 0,  "digest output back-pressure");
    check(n_iv > 0,      "key from IV");
    check(n_chain > 0,   "key from chaining value");
    if (UNROLL == 8) check(n_merge > 0, "block taken in FINISH (10-clock period)");
    $display("[NW=%0d U=%0d] multi=%0d single=%0d final=%0d empty=%0d partial=%0d exact=%0d pending=%0d mstall=%0d iv=%0d chain=%0d merge=%0d",
             NW, UNROLL, n_multi, n_single, n_final, n_empty, n_partial, n_exact, n_pending, n_mstall, n_iv, n_chain, n_merge);
    finished = 1;
  end
endmodule
