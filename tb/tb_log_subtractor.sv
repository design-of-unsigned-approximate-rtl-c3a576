// tb_log_subtractor: 19-bit ripple subtraction against a - b, with the
// borrow out set exactly when a < b. Random plus corner operands.
module tb_log_subtractor;
  logic [18:0] a, b, d;
  logic neg;
  int checks = 0, failures = 0;

  log_subtractor #(.W(19)) dut (.a(a), .b(b), .d(d), .neg(neg));

  task automatic check();
    #1;
    checks++;
    if (d !== 19'(a - b) || neg !== (a < b)) begin
      failures++;
      if (failures < 10) $display("FAIL %h - %h -> %h neg=%b", a, b, d, neg);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;           check();
    a = '1; b = '0;           check();
    a = '0; b = '1;           check();
    a = 19'h40000; b = 19'h40000; check();
    a = 19'h40000; b = 19'h40001; check();
    for (int i = 0; i < 20000; i++) begin
      a = 19'($urandom);
      b = 19'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
