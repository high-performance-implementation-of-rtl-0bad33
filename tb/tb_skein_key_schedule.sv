// tb_skein_key_schedule: loads random keys and tweaks and walks all 19
// subkeys, comparing the ring-register outputs with the subkeys computed
// directly from the formulas. Covers Threefish-512 with two subkeys per step
// (STEP=2, both sk1 and sk2 checked), Threefish-512 and Threefish-256 with
// one per step.
module tb_skein_key_schedule;
  import skein_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             load, adv, adv_a;
  logic [7:0][63:0] key;
  logic [127:0]     tw;
  logic [7:0][63:0] a1, a2, b1, b2;
  logic [3:0][63:0] c1, c2;
  logic [4:0]       as, bs, cs;
  int checks = 0, failures = 0;

  skein_key_schedule #(.NW(8), .STEP(2)) dut_a (.clk, .rst_n, .load, .key_in(key), .tweak_in(tw),
                                                .adv(adv_a), .sk1(a1), .sk2(a2), .s_cnt(as));
  skein_key_schedule #(.NW(8), .STEP(1)) dut_b (.clk, .rst_n, .load, .key_in(key), .tweak_in(tw),
                                                .adv, .sk1(b1), .sk2(b2), .s_cnt(bs));
  skein_key_schedule #(.NW(4), .STEP(1)) dut_c (.clk, .rst_n, .load, .key_in(key[3:0]), .tweak_in(tw),
                                                .adv, .sk1(c1), .sk2(c2), .s_cnt(cs));

  function automatic void chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endfunction

  initial begin
    load = 0; adv = 0; adv_a = 0; key = '0; tw = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      blk_t k4;
      for (int i = 0; i < 8; i++) key[i] = {$urandom, $urandom};
      tw = {$urandom, $urandom, $urandom, $urandom};
      k4 = '0;
      k4[3:0] = key[3:0];
      @(negedge clk);
      load = 1;
      @(negedge clk);
      load = 0;
      for (int s = 0; s < 19; s++) begin
        for (int i = 0; i < 8; i++) begin
          chk(b1[i] == subkey(8, key, tw, s, i), $sformatf("STEP1 NW8 s=%0d i=%0d", s, i));
          if (s % 2 == 0 && s < 18) begin
            chk(a1[i] == subkey(8, key, tw, s, i), $sformatf("STEP2 sk1 s=%0d i=%0d", s, i));
            chk(a2[i] == subkey(8, key, tw, s + 1, i), $sformatf("STEP2 sk2 s=%0d i=%0d", s + 1, i));
          end
          if (s == 18) chk(a1[i] == subkey(8, key, tw, 18, i), $sformatf("STEP2 sk1 s=18 i=%0d", i));
        end
        for (int i = 0; i < 4; i++)
          chk(c1[i] == subkey(4, k4, tw, s, i), $sformatf("STEP1 NW4 s=%0d i=%0d", s, i));
        chk(bs == 5'(s), "subkey counter");
        // the STEP=2 unit moves two subkeys on every other clock of this walk
        adv = 1;
        adv_a = (s % 2 == 1);
        @(negedge clk);
        adv = 0;
        adv_a = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
