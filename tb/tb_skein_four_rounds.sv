// tb_skein_four_rounds: four rounds of Threefish-512 and Threefish-256 on
// random states, both halves of the eight-round rotation cycle, checked
// against four applications of the reference single round.
module tb_skein_four_rounds;
  import skein_ref_pkg::*;
  logic                upper;
  logic [7:0][63:0]    v8, o8;
  logic [3:0][63:0]    v4, o4;
  int checks = 0, failures = 0;

  skein_four_rounds #(.NW(8)) dut8 (.upper(upper), .v_in(v8), .v_out(o8));
  skein_four_rounds #(.NW(4)) dut4 (.upper(upper), .v_in(v4), .v_out(o4));

  initial begin
    blk_t a, b;
    for (int n = 0; n < 400; n++) begin
      for (int i = 0; i < 8; i++) a[i] = {$urandom, $urandom};
      upper = n[0];
      v8 = a;
      v4 = a[3:0];
      #1;
      b = a;
      for (int r = 0; r < 4; r++) b = one_round(8, b, 4 * upper + r);
      checks++;
      if (o8 !== b) begin
        failures++;
        $display("FAIL NW=8 upper=%0d", upper);
      end
      b = '0;
      b[3:0] = a[3:0];
      for (int r = 0; r < 4; r++) b = one_round(4, b, 4 * upper + r);
      checks++;
      if (o4 !== b[3:0]) begin
        failures++;
        $display("FAIL NW=4 upper=%0d", upper);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
