// tb_divisor_truncator: for W = 5 (depth 12) and W = 3 (depth 14), checks the
// two worked selections (10010010 -> 10010, 00000110 -> 00110) and, for
// every divisor and every (W-1)-bit dividend, that dividing by the truncated
// divisor gives the same quotient and remainder as the full divisor.
module tb_divisor_truncator;
  logic [7:0] y;
  logic [4:0] yt5;
  logic [2:0] yt3;
  int checks = 0, failures = 0;

  divisor_truncator #(.M(8), .W(5)) dut5 (.y(y), .yt(yt5));
  divisor_truncator #(.M(8), .W(3)) dut3 (.y(y), .yt(yt3));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    y = 8'b10010010;
    #1;
    checks++;
    if (yt5 !== 5'b10010) begin failures++; $display("FAIL 10010010 -> %b", yt5); end
    y = 8'b00000110;
    #1;
    checks++;
    if (yt5 !== 5'b00110) begin failures++; $display("FAIL 00000110 -> %b", yt5); end
    for (int v = 1; v < 256; v++) begin
      y = 8'(v);
      #1;
      checks++;
      if (yt5 == 0 || yt3 == 0) begin
        failures++;
        $display("FAIL y=%0d truncated to zero", v);
        continue;
      end
      for (int x1 = 0; x1 < 16; x1++) begin
        checks++;
        if (x1 / int'(yt5) != x1 / v || x1 % int'(yt5) != x1 % v) begin
          failures++;
          if (failures < 10) $display("FAIL W=5 y=%0d yt=%0d x1=%0d", v, yt5, x1);
        end
      end
      for (int x1 = 0; x1 < 4; x1++) begin
        checks++;
        if (x1 / int'(yt3) != x1 / v || x1 % int'(yt3) != x1 % v) begin
          failures++;
          if (failures < 10) $display("FAIL W=3 y=%0d yt=%0d x1=%0d", v, yt3, x1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
