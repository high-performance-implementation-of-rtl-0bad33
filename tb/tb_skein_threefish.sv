// tb_skein_threefish: UBI steps through the Threefish unit in three shapes
// (Skein-512 8-unrolled, 4-unrolled and iterative, plus Skein-256
// 4-unrolled). Each unit gets chains of random blocks and tweaks: the first
// block of a chain is keyed by the IV, later ones by the previous result.
// Every result must equal E(key, tweak, M) ^ M from the reference model.
// The clocks from one `done` to the next with the next block always waiting
// must be 10, 20 and 74, and from hand-over to `done` 10, 19 and 73.
module tb_skein_threefish;
  import skein_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int NU = 4;
  localparam int CNW [NU] = '{8, 8, 8, 4};
  localparam int CU  [NU] = '{8, 4, 1, 4};
  logic fin [NU];

  function automatic void chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endfunction

  for (genvar u = 0; u < NU; u++) begin : g_u
    localparam int NW = CNW[u];
    localparam int UN = CU[u];
    localparam int PER = (UN == 8) ? 10 : 72 / UN + 2;
    localparam int LAT = (UN == 8) ? 10 : 72 / UN + 1;
    logic                valid, ready, use_iv, done, busy;
    logic [NW-1:0][63:0] data, res;
    logic [127:0]        tw;

    skein_threefish #(.NW(NW), .UNROLL(UN)) dut (
      .clk, .rst_n, .blk_valid(valid), .blk_ready(ready), .blk_data(data),
      .blk_tweak(tw), .blk_use_iv(use_iv), .done, .result(res), .busy);

    // blocks handed over, in order, with the clock of the hand-over
    blk_t         q_m [$];
    logic [127:0] q_t [$];
    bit           q_iv [$];
    int           q_take [$];
    int           cyc = 0;
    int           ndone = 0;
    localparam int NBLK = 30;

    always @(posedge clk) cyc <= cyc + 1;

    // driver: keeps a block waiting at all times; every fifth starts a new chain
    initial begin
      blk_t m;
      valid = 0; use_iv = 0; data = '0; tw = '0;
      wait (rst_n);
      for (int n = 0; n < NBLK; n++) begin
        m = '0;
        for (int i = 0; i < NW; i++) m[i] = {$urandom, $urandom};
        @(negedge clk);
        valid  = 1;
        data   = m[NW-1:0];
        tw     = {$urandom, $urandom, $urandom, $urandom};
        use_iv = (n % 5 == 0);
        while (!ready) @(negedge clk);
        q_m.push_back(m);
        q_t.push_back(tw);
        q_iv.push_back(use_iv);
        q_take.push_back(cyc + 1);
        @(posedge clk);
      end
      @(negedge clk);
      valid = 0;
    end

    // checker
    initial begin
      blk_t key, m, exp, iv;
      logic [127:0] t;
      int t_take, t_prev;
      fin[u] = 0;
      t_prev = -1;
      key = '0;
      iv = config_iv(NW);
      wait (rst_n);
      while (ndone < NBLK) begin
        @(negedge clk);
        if (done) begin
          @(posedge clk);
          #1;
          m = q_m.pop_front();
          t = q_t.pop_front();
          if (q_iv.pop_front()) begin
            key = iv;
            t_prev = -1;
          end
          t_take = q_take.pop_front();
          exp = encrypt(NW, key, t, m);
          for (int i = 0; i < NW; i++) exp[i] = exp[i] ^ m[i];
          chk(res == exp[NW-1:0], $sformatf("NW=%0d U=%0d block %0d result", NW, UN, ndone));
          chk(cyc - t_take == LAT, $sformatf("NW=%0d U=%0d latency %0d", NW, UN, cyc - t_take));
          if (t_prev >= 0)
            chk(cyc - t_prev == PER, $sformatf("NW=%0d U=%0d period %0d", NW, UN, cyc - t_prev));
          t_prev = cyc;
          key = '0;
          key[NW-1:0] = res;
          ndone++;
        end
      end
      fin[u] = 1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!(fin[0] && fin[1] && fin[2] && fin[3])) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
