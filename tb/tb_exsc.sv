// tb_exsc: exhaustive test of the one-bit subtractor cell against x - y - bin.
module tb_exsc;
  logic x, y, bin, d, bout;
  int checks = 0, failures = 0;

  exsc dut (.x(x), .y(y), .bin(bin), .d(d), .bout(bout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int diff;
      {x, y, bin} = 3'(v);
      #1;
      diff = int'(x) - int'(y) - int'(bin);      // -2 .. 1
      checks++;
      if (d !== diff[0] || bout !== (diff < 0)) begin
        failures++;
        $display("FAIL x=%b y=%b bin=%b -> d=%b bout=%b", x, y, bin, d, bout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
