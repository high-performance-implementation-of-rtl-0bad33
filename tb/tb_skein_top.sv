// tb_skein_top: end-to-end test of the Skein core at its default size
// (Skein-512-512, 8-unrolled Threefish). Known-answer digest, digests of
// messages from 0 to several blocks long against the reference model, the
// 10-clock Threefish period, and a count of every handshake/FSM mechanism.
module tb_skein_top;
  logic        clk = 1'b0;
  logic        rst_n, s_valid, s_ready, s_last, m_valid, m_ready, m_last, finished;
  logic [63:0] s_data, m_data;
  logic [3:0]  s_nbytes;
  int          checks, failures;

  always #5 clk = ~clk;

  skein_top dut (
    .clk(clk), .rst_n(rst_n),
    .s_valid(s_valid), .s_ready(s_ready), .s_data(s_data), .s_nbytes(s_nbytes), .s_last(s_last),
    .m_valid(m_valid), .m_ready(m_ready), .m_data(m_data), .m_last(m_last)
  );

  skein_top_harness #(.NW(8), .UNROLL(8), .NRAND(8)) h (
    .clk(clk), .rst_n(rst_n),
    .s_valid(s_valid), .s_ready(s_ready), .s_data(s_data), .s_nbytes(s_nbytes), .s_last(s_last),
    .m_valid(m_valid), .m_ready(m_ready), .m_data(m_data), .m_last(m_last),
    .obs_tf_done(dut.u_tf.done),
    .obs_tf_take(dut.u_tf.take),
    .obs_tf_take_in_finish(dut.u_tf.take && dut.u_tf.done),
    .obs_tf_use_iv(dut.u_tf.blk_use_iv),
    .obs_if_pending(dut.u_if.pend_q),
    .obs_ubi_state(3'(dut.u_ubi.state_q)),
    .checks(checks), .failures(failures), .finished(finished)
  );

  initial begin
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
