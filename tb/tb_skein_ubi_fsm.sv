// tb_skein_ubi_fsm: UBI controller against a behavioural Threefish stand-in
// (random latency, sometimes taking the next block in its finishing clock).
// Messages of 1 to 5 blocks with random byte counts are offered as blocks;
// every block handed to the Threefish side must carry the expected tweak
// (running byte position, message/output type, first and final flags), key
// select (IV only for the first block) and data, followed by the zero output
// block, and `hash_valid` must pulse once, after the output block is done.
module tb_skein_ubi_fsm;
  import skein_pkg::*;
  localparam int NW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                in_valid, in_ready, in_last, tf_valid, tf_ready, tf_use_iv, tf_done, hash_valid;
  logic [NW-1:0][63:0] in_block, tf_block;
  logic [6:0]          in_nbytes;
  logic [127:0]        tf_tweak;
  int checks = 0, failures = 0;

  skein_ubi_fsm #(.NW(NW)) dut (.*);

  function automatic void chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endfunction

  // behavioural Threefish stand-in
  logic busy;
  int   cnt;
  bit   merge_en;
  int   n_merge = 0;
  assign tf_done  = busy && (cnt == 0);
  assign tf_ready = !busy || (tf_done && merge_en);
  always @(posedge clk) begin
    if (!rst_n) begin
      busy <= 0;
      cnt  <= 0;
    end else if (tf_valid && tf_ready) begin
      busy <= 1;
      cnt  <= $urandom_range(1, 6);
      if (tf_done) n_merge++;
    end else if (tf_done) busy <= 0;
    else if (busy) cnt <= cnt - 1;
  end

  // expected hand-overs
  logic [NW-1:0][63:0] e_blk [$];
  logic [127:0]        e_tw  [$];
  bit                  e_iv  [$];
  int n_taken = 0, n_hash = 0, outs_done = 0;
  bit out_in_flight = 0;

  always @(posedge clk) if (rst_n) begin
    if (tf_valid && tf_ready) begin
      chk(e_blk.size() > 0, "unexpected block");
      if (e_blk.size() > 0) begin
        chk(tf_block == e_blk.pop_front(), $sformatf("block data %0d", n_taken));
        chk(tf_tweak == e_tw.pop_front(), $sformatf("tweak %0d: %h", n_taken, tf_tweak));
        chk(tf_use_iv == e_iv.pop_front(), $sformatf("key select %0d", n_taken));
      end
      if (tf_tweak[125:120] == T_OUT) out_in_flight <= 1;
      n_taken++;
    end
    if (tf_done && out_in_flight && !(tf_valid && tf_ready && tf_tweak[125:120] == T_OUT)) begin
      out_in_flight <= 0;
      outs_done++;
    end
    if (hash_valid) begin
      n_hash++;
      chk(outs_done == n_hash && e_blk.size() == 0, "hash_valid after output block");
    end
  end

  initial begin
    in_valid = 0; in_block = '0; in_nbytes = '0; in_last = 0; merge_en = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int msg = 0; msg < 40; msg++) begin
      int nblk;
      logic [95:0] pos;
      nblk = $urandom_range(1, 5);
      pos = '0;
      for (int b = 0; b < nblk; b++) begin
        logic [NW-1:0][63:0] blk;
        int nb;
        for (int i = 0; i < NW; i++) blk[i] = {$urandom, $urandom};
        nb = (b == nblk - 1) ? $urandom_range(0, 64) : 64;
        if (b == nblk - 1 && nb == 0 && nblk > 1) nb = 1;
        pos += 96'(nb);
        e_blk.push_back(blk);
        e_tw.push_back(make_tweak(pos, T_MSG, b == 0, b == nblk - 1));
        e_iv.push_back(b == 0);
        if (b == nblk - 1) begin
          e_blk.push_back('0);
          e_tw.push_back(make_tweak(96'd8, T_OUT, 1'b1, 1'b1));
          e_iv.push_back(1'b0);
        end
        @(negedge clk);
        while ($urandom_range(0, 2) == 0) @(negedge clk);
        in_valid  = 1;
        in_block  = blk;
        in_nbytes = 7'(nb);
        in_last   = (b == nblk - 1);
        merge_en  = $urandom_range(0, 1);
        #1;
        while (!in_ready) begin
          @(negedge clk);
          merge_en = $urandom_range(0, 1);
          #1;
        end
        @(posedge clk);
        #1;
        in_valid = 0;
      end
      while (n_hash <= msg) @(posedge clk);
    end
    chk(n_merge > 0, "block taken in the finishing clock");
    chk(n_hash == 40, "one digest per message");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
