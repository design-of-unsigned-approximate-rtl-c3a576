// tb_log_divider: the 16-by-8 logarithmic divider against the reference
// Mitchell model on random and directed operands, including the worked
// example 43382 / 84 -> 517 (exact 516) and both zero cases; an 8-by-4
// instance is checked exhaustively.
module tb_log_divider;
  import axhd_ref_pkg::*;

  logic [15:0] x;  logic [7:0] y;  logic [15:0] q;
  logic [7:0]  xs; logic [3:0] ys; logic [7:0]  qs;
  int checks = 0, failures = 0;

  log_divider #(.XW(16), .YW(8)) dut   (.x(x),  .y(y),  .q(q));
  log_divider #(.XW(8),  .YW(4)) dut_s (.x(xs), .y(ys), .q(qs));

  task automatic check();
    longint unsigned e;
    #1;
    e = ref_ld(x, y, 16);
    checks++;
    if (q !== 16'(e)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d/%0d -> %0d expected %0d", x, y, q, e);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    xs = '0; ys = '0;
    x = 16'd43382; y = 8'd84;
    #1;
    checks++;
    if (q !== 16'd517) begin
      failures++;
      $display("FAIL worked example 43382/84 -> %0d, expected 517", q);
    end
    check();
    x = 16'd0;     y = 8'd7;   check();
    x = 16'd1234;  y = 8'd0;   check();
    x = 16'd5;     y = 8'd200; check();   // dividend below divisor
    x = 16'hffff;  y = 8'd1;   check();
    for (int i = 0; i < 50000; i++) begin
      x = 16'($urandom >> ($urandom % 16));
      y = 8'($urandom);
      check();
    end
    for (int b = 0; b < 16; b++)
      for (int a = 0; a < 256; a++) begin
        longint unsigned e;
        xs = 8'(a); ys = 4'(b);
        #1;
        e = ref_ld(a, b, 8);
        checks++;
        if (qs !== 8'(e)) begin
          failures++;
          if (failures < 10) $display("FAIL 8x4 %0d/%0d -> %0d expected %0d", a, b, qs, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
