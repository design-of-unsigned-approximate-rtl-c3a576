// tb_blc: binary-to-logarithm conversion of every 16-bit and 8-bit operand:
// km must be {k, (a - 2^k) * 2^(W-1-k)} with k the leading-one position.
module tb_blc;
  logic [15:0] a;  logic [3:0] k;  logic [18:0] km;
  logic [7:0]  b;  logic [2:0] kb; logic [9:0]  kmb;
  int checks = 0, failures = 0;

  blc #(.W(16)) dut   (.a(a), .k(k),  .km(km));
  blc #(.W(8))  dut_b (.a(b), .k(kb), .km(kmb));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 1; v < 65536; v++) begin
      int p;
      longint frac;
      p = 0;
      while ((v >> (p + 1)) != 0) p++;
      a = 16'(v); k = 4'(p);
      b = 8'((v % 255) + 1);
      begin
        automatic int pb = 0;
        while ((int'(b) >> (pb + 1)) != 0) pb++;
        kb = 3'(pb);
      end
      #1;
      frac = (longint'(v) - (longint'(1) << p)) << (15 - p);
      checks++;
      if (km !== {4'(p), 15'(frac)}) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h km=%b", a, km);
      end
      frac = (longint'(b) - (longint'(1) << kb)) << (7 - kb);
      checks++;
      if (kmb !== {kb, 7'(frac)}) begin
        failures++;
        if (failures < 10) $display("FAIL b=%h km=%b", b, kmb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
