// tb_exdcr: exhaustive test of the restoring divider cell: borrow out of
// x - y - bin, and remainder bit = difference when q = 1, x when q = 0.
module tb_exdcr;
  logic x, y, bin, q, r, bout;
  int checks = 0, failures = 0;

  exdcr dut (.x(x), .y(y), .bin(bin), .q(q), .r(r), .bout(bout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int diff;
      logic exp_r;
      {q, x, y, bin} = 4'(v);
      #1;
      diff  = int'(x) - int'(y) - int'(bin);
      exp_r = q ? diff[0] : x;
      checks++;
      if (r !== exp_r || bout !== (diff < 0)) begin
        failures++;
        $display("FAIL q=%b x=%b y=%b bin=%b -> r=%b bout=%b", q, x, y, bin, r, bout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
