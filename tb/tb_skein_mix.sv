// tb_skein_mix: random and corner-case operands for one MIX, every rotation
// amount 0..63, checked against y0 = x0 + x1, y1 = rotl(x1, r) ^ y0 computed
// in the testbench with a bit-by-bit rotation.
module tb_skein_mix;
  logic [63:0] x0, x1, y0, y1, e0, e1;
  logic [5:0]  rot;
  int checks = 0, failures = 0;

  skein_mix dut (.x0(x0), .x1(x1), .rot(rot), .y0(y0), .y1(y1));

  initial begin
    for (int n = 0; n < 2000; n++) begin
      x0  = {$urandom, $urandom};
      x1  = {$urandom, $urandom};
      if (n < 64) rot = 6'(n); else rot = 6'($urandom);
      if (n % 7 == 0) x0 = '1;
      if (n % 11 == 0) x1 = 64'h1;
      #1;
      e0 = x0 + x1;
      for (int b = 0; b < 64; b++) e1[(b + rot) % 64] = x1[b];
      e1 = e1 ^ e0;
      checks++;
      if (y0 !== e0 || y1 !== e1) begin
        failures++;
        if (failures < 5) $display("FAIL x0=%h x1=%h r=%0d y=%h %h exp %h %h", x0, x1, rot, y0, y1, e0, e1);
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
