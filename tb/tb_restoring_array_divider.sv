// tb_restoring_array_divider: the array must be an exact divider.
// An 8-by-4 instance is checked exhaustively (including the worked example
// 157 / 12 = 13 remainder 1), a 16-by-8 instance on random operands and on
// divide by zero (quotient all ones).
module tb_restoring_array_divider;
  logic [7:0]  xa;  logic [3:0] ya;  logic [7:0]  qa;  logic [3:0] ra;
  logic [15:0] xb;  logic [7:0] yb;  logic [15:0] qb;  logic [7:0] rb;
  int checks = 0, failures = 0;

  restoring_array_divider #(.XW(8),  .YW(4)) dut_a (.x(xa), .y(ya), .q(qa), .r(ra));
  restoring_array_divider #(.XW(16), .YW(8)) dut_b (.x(xb), .y(yb), .q(qb), .r(rb));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    xa = 8'd157; ya = 4'd12; xb = '0; yb = 8'd1;
    #1;
    checks++;
    if (qa !== 8'd13 || ra !== 4'd1) begin
      failures++;
      $display("FAIL 157/12 -> q=%0d r=%0d", qa, ra);
    end
    for (int y = 1; y < 16; y++)
      for (int x = 0; x < 256; x++) begin
        xa = 8'(x); ya = 4'(y);
        #1;
        checks++;
        if (qa !== 8'(x / y) || ra !== 4'(x % y)) begin
          failures++;
          if (failures < 10) $display("FAIL 8x4 %0d/%0d -> q=%0d r=%0d", x, y, qa, ra);
        end
      end
    for (int i = 0; i < 20000; i++) begin
      xb = 16'($urandom);
      yb = 8'($urandom_range(1, 255));
      #1;
      checks++;
      if (qb !== xb / 16'(yb) || rb !== 8'(xb % 16'(yb))) begin
        failures++;
        if (failures < 10) $display("FAIL 16x8 %0d/%0d -> q=%0d r=%0d", xb, yb, qb, rb);
      end
    end
    xb = 16'hbeef; yb = 8'd0;
    #1;
    checks++;
    if (qb !== 16'hffff) begin
      failures++;
      $display("FAIL divide by zero -> q=%h", qb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
