// tb_lbc: antilogarithm shifter, q = floor(2^k * (1 + m / 2^15)) for every
// k of a 16-bit result and random fractions.
module tb_lbc;
  logic [3:0]  k;
  logic [14:0] m;
  logic [15:0] q;
  int checks = 0, failures = 0;

  lbc #(.KW(4), .F(15), .QW(16)) dut (.k(k), .m(m), .q(q));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      longint expect_q;
      k = 4'(i % 16);
      m = (i < 16) ? 15'h7fff : 15'($urandom);
      #1;
      expect_q = ((longint'(32768) + longint'(m)) << k) >> 15;
      checks++;
      if (q !== 16'(expect_q)) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d m=%h -> q=%0d expected %0d", k, m, q, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
