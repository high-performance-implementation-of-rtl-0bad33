// tb_skein_interface: serial-to-parallel block gathering and digest output.
// Random-length messages (0 to 4 blocks and a bit) go in as 64-bit words with
// junk in the unused bytes of the last word and random idle gaps; the block
// consumer accepts with random delays. Each block must hold the message bytes
// in order, zero padding, the right byte count and last flag. After the last
// block the testbench supplies a random digest on hash_valid, which must come
// out word 0 first with m_last on word NW-1, under random back-pressure.
module tb_skein_interface;
  localparam int NW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                s_valid, s_ready, s_last, blk_valid, blk_ready, blk_last;
  logic                hash_valid, m_valid, m_ready, m_last;
  logic [63:0]         s_data, m_data;
  logic [3:0]          s_nbytes;
  logic [NW-1:0][63:0] blk_data, hash_data;
  logic [6:0]          blk_nbytes;
  int checks = 0, failures = 0;
  int n_pend = 0, n_bp = 0;

  skein_interface #(.NW(NW)) dut (.*);

  function automatic void chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endfunction

  // expected blocks
  logic [NW-1:0][63:0] e_blk [$];
  int                  e_nb  [$];
  bit                  e_last [$];
  int                  n_blk = 0;
  bit                  got_last = 0;

  always @(negedge clk) blk_ready = ($urandom_range(0, 4) == 0);
  always @(posedge clk) if (rst_n) begin
    if (blk_valid && blk_ready) begin
      chk(e_blk.size() > 0, "unexpected block");
      if (e_blk.size() > 0) begin
        chk(blk_data == e_blk.pop_front(), $sformatf("block %0d data", n_blk));
        chk(int'(blk_nbytes) == e_nb.pop_front(), $sformatf("block %0d byte count", n_blk));
        chk(blk_last == e_last.pop_front(), $sformatf("block %0d last flag", n_blk));
      end
      if (blk_last) got_last <= 1;
      n_blk++;
    end
    if (dut.pend_q && s_valid && !s_ready) n_pend++;
  end

  initial begin
    logic [7:0] msg [$];
    logic [NW-1:0][63:0] dig, blk;
    logic [63:0] d;
    int len, nwords, nb, nblk;
    s_valid = 0; s_data = '0; s_nbytes = '0; s_last = 0; hash_valid = 0; hash_data = '0; m_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 30; m++) begin
      len = (m == 0) ? 0 : (m == 1) ? 64 : (m == 2) ? 128 : $urandom_range(1, 4 * 64 + 20);
      msg.delete();
      for (int i = 0; i < len; i++) msg.push_back(8'($urandom));
      // expected blocks
      nblk = (len == 0) ? 1 : (len + 63) / 64;
      for (int b = 0; b < nblk; b++) begin
        blk = '0;
        nb = 0;
        for (int k = 0; k < 64; k++)
          if (64 * b + k < len) begin
            blk[k / 8][8 * (k % 8) +: 8] = msg[64 * b + k];
            nb++;
          end
        e_blk.push_back(blk);
        e_nb.push_back(nb);
        e_last.push_back(b == nblk - 1);
      end
      got_last = 0;
      // words
      nwords = (len == 0) ? 1 : (len + 7) / 8;
      for (int w = 0; w < nwords; w++) begin
        d = {$urandom, $urandom};
        nb = 0;
        for (int k = 0; k < 8; k++)
          if (8 * w + k < len) begin
            d[8*k +: 8] = msg[8 * w + k];
            nb++;
          end
        @(negedge clk);
        s_valid = 0;
        while ($urandom_range(0, 3) == 0) @(negedge clk);
        s_valid = 1; s_data = d; s_nbytes = 4'(nb); s_last = (w == nwords - 1);
        while (!s_ready) @(negedge clk);
        @(posedge clk);
      end
      @(negedge clk);
      s_valid = 0;
      while (!got_last) @(negedge clk);
      // digest
      for (int i = 0; i < NW; i++) dig[i] = {$urandom, $urandom};
      repeat ($urandom_range(1, 4)) @(negedge clk);
      hash_valid = 1; hash_data = dig;
      @(negedge clk);
      hash_valid = 0; hash_data = '0;
      for (int w = 0; w < NW; w++) begin
        forever begin
          m_ready = ($urandom_range(0, 2) != 0);
          #1;
          if (m_valid && !m_ready) n_bp++;
          if (m_valid && m_ready) break;
          @(negedge clk);
        end
        chk(m_data == dig[w], $sformatf("digest word %0d", w));
        chk(m_last == (w == NW - 1), "m_last");
        @(posedge clk);
        @(negedge clk);
      end
      m_ready = 0;
      chk(e_blk.size() == 0, "all blocks delivered");
    end
    chk(n_pend > 0, "input held while a full block waits");
    chk(n_bp > 0, "digest back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
