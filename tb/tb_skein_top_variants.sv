// tb_skein_top_variants: the same end-to-end test as tb_skein_top, run in
// parallel on the other five configurations of the core: Skein-256 and
// Skein-512 with the iterative (UNROLL=1) and 4-unrolled Threefish, and
// Skein-256 with the 8-unrolled one. Each checks digests against the
// reference model and its own Threefish period (74, 20 or 10 clocks).
module tb_skein_top_variants;
  localparam int NCFG = 5;
  localparam int CFG_NW [NCFG] = '{4, 4, 4, 8, 8};
  localparam int CFG_U  [NCFG] = '{1, 4, 8, 1, 4};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   checks [NCFG];
  int   failures [NCFG];
  logic finished [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    logic        rst_n, s_valid, s_ready, s_last, m_valid, m_ready, m_last;
    logic [63:0] s_data, m_data;
    logic [3:0]  s_nbytes;

    skein_top #(.NW(CFG_NW[c]), .UNROLL(CFG_U[c])) dut (
      .clk(clk), .rst_n(rst_n),
      .s_valid(s_valid), .s_ready(s_ready), .s_data(s_data), .s_nbytes(s_nbytes), .s_last(s_last),
      .m_valid(m_valid), .m_ready(m_ready), .m_data(m_data), .m_last(m_last)
    );

    skein_top_harness #(.NW(CFG_NW[c]), .UNROLL(CFG_U[c]), .NRAND(4)) h (
      .clk(clk), .rst_n(rst_n),
      .s_valid(s_valid), .s_ready(s_ready), .s_data(s_data), .s_nbytes(s_nbytes), .s_last(s_last),
      .m_valid(m_valid), .m_ready(m_ready), .m_data(m_data), .m_last(m_last),
      .obs_tf_done(dut.u_tf.done),
      .obs_tf_take(dut.u_tf.take),
      .obs_tf_take_in_finish(dut.u_tf.take && dut.u_tf.done),
      .obs_tf_use_iv(dut.u_tf.blk_use_iv),
      .obs_if_pending(dut.u_if.pend_q),
      .obs_ubi_state(3'(dut.u_ubi.state_q)),
      .checks(checks[c]), .failures(failures[c]), .finished(finished[c])
    );
  end

  function automatic bit all_done();
    for (int c = 0; c < NCFG; c++) if (!finished[c]) return 0;
    return 1;
  endfunction

  initial begin
    int tc, tf;
    @(posedge clk);
    while (!all_done()) @(posedge clk);
    tc = 0;
    tf = 0;
    for (int c = 0; c < NCFG; c++) begin
      tc += checks[c];
      tf += failures[c];
    end
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end

  initial begin
    int tc, tf;
    repeat (400000) @(posedge clk);
    tc = 0;
    tf = 1;
    for (int c = 0; c < NCFG; c++) begin
      tc += checks[c];
      tf += failures[c];
    end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end
endmodule
