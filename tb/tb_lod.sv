// tb_lod: exhaustive test of the 16-bit leading-one detector and random
// tests of an 8-bit one.
module tb_lod;
  logic [15:0] a;  logic [3:0] k;  logic zero;
  logic [7:0]  b;  logic [2:0] kb; logic zb;
  int checks = 0, failures = 0;

  lod #(.W(16)) dut   (.a(a), .k(k),  .zero(zero));
  lod #(.W(8))  dut_b (.a(b), .k(kb), .zero(zb));

  function automatic int ref_k(int v);
    int p = 0;
    while ((v >> (p + 1)) != 0) p++;
    return p;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    b = '0;
    for (int v = 0; v < 65536; v++) begin
      a = 16'(v);
      b = 8'(v);
      #1;
      checks += 2;
      if (zero !== (v == 0) || (v != 0 && k !== 4'(ref_k(v)))) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h k=%0d zero=%b", a, k, zero);
      end
      if (zb !== (b == 0) || (b != 0 && kb !== 3'(ref_k(int'(b))))) begin
        failures++;
        if (failures < 10) $display("FAIL b=%h k=%0d zero=%b", b, kb, zb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
