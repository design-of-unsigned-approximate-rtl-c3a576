// tb_axhd: the 16-by-8 axhd at every replacement depth 0..16 (one instance
// per depth) against the reference model, on random operands and on
// divide by zero; depth 0 must be exact, and at depth 14 the worked example
// 43382 / 84 must give 517.
module tb_axhd;
  import axhd_ref_pkg::*;

  localparam int NH = 17;
  logic [15:0] x;
  logic [7:0]  y;
  logic [15:0] q [NH];
  int checks = 0, failures = 0;

  for (genvar h = 0; h < NH; h++) begin : g_dut
    axhd #(.N(16), .M(8), .H(h)) dut (.x(x), .y(y), .q(q[h]));
  end

  task automatic check_all();
    #1;
    for (int h = 0; h < NH; h++) begin
      longint unsigned e = ref_axhd(x, y, 16, h);
      checks++;
      if (q[h] !== 16'(e)) begin
        failures++;
        if (failures < 10) $display("FAIL h=%0d %0d/%0d -> %0d expected %0d", h, x, y, q[h], e);
      end
    end
    if (y != 0) begin
      checks++;
      if (q[0] !== x / 16'(y)) begin
        failures++;
        $display("FAIL h=0 not exact: %0d/%0d -> %0d", x, y, q[0]);
      end
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 16'd43382; y = 8'd84;
    check_all();
    checks++;
    if (q[14] !== 16'd517) begin
      failures++;
      $display("FAIL worked example at h=14 -> %0d, expected 517", q[14]);
    end
    x = 16'd40000; y = 8'd0;   check_all();
    x = 16'd0;     y = 8'd3;   check_all();
    x = 16'hffff;  y = 8'd1;   check_all();
    x = 16'hffff;  y = 8'hff;  check_all();
    for (int i = 0; i < 5000; i++) begin
      x = 16'($urandom);
      y = 8'($urandom >> ($urandom % 8));
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
