// tb_divider_16by32: the 16-by-32 configuration (16-bit dividend, 32-bit
// divisor) used for a softmax layer, where the divisor is a sum of
// exponentials. The top is built with M = 32 at depths 4, 8 and 12; both
// outputs are checked against the reference model and against each other on
// random operands of random magnitude, including divisors wider than the
// dividend, divide by zero and zero dividends.
module tb_divider_16by32;
  import axhd_ref_pkg::*;

  logic [15:0] x;
  logic [31:0] y;
  logic [15:0] qa [3];
  logic [15:0] qe [3];
  int checks = 0, failures = 0;
  localparam int DEPTH [3] = '{4, 8, 12};

  for (genvar i = 0; i < 3; i++) begin : g_dut
    hybrid_divider_top #(.N(16), .M(32), .H(DEPTH[i])) dut (
      .x(x), .y(y), .q_axhd(qa[i]), .q_eaxhd(qe[i])
    );
  end

  task automatic check();
    #1;
    for (int i = 0; i < 3; i++) begin
      longint unsigned e = ref_axhd(x, y, 16, DEPTH[i]);
      checks += 2;
      if (qa[i] !== 16'(e)) begin
        failures++;
        if (failures < 10) $display("FAIL h=%0d %0d/%0d -> %0d expected %0d", DEPTH[i], x, y, qa[i], e);
      end
      if (qe[i] !== qa[i]) begin
        failures++;
        if (failures < 10) $display("FAIL E-AXHD h=%0d %0d/%0d -> %0d, AXHD %0d", DEPTH[i], x, y, qe[i], qa[i]);
      end
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 16'd43382; y = 32'd84;         check();
    x = 16'd100;   y = 32'd0;          check();
    x = 16'd0;     y = 32'd5;          check();
    x = 16'hffff;  y = 32'hffff_ffff;  check();
    for (int i = 0; i < 30000; i++) begin
      x = 16'($urandom >> ($urandom % 16));
      y = $urandom >> ($urandom % 32);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
