// tb_eaxhd_cells: size of the narrowed exact part of the 16-by-8 eaxhd.
// For depths 9..15 it reads the array width each instance elaborated and
// checks the number of subtractor cells saved against 8-cell rows:
// 0, 6, 10, 12, 12, 10, 6. Each instance also divides a few operand pairs,
// checked against the reference model.
module tb_eaxhd_cells;
  import axhd_ref_pkg::*;

  localparam int SAVED [7] = '{0, 6, 10, 12, 12, 10, 6};
  logic [15:0] x;
  logic [7:0]  y;
  logic [15:0] q [7];
  int array_width [7];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < 7; i++) begin : g_dut
    eaxhd #(.N(16), .M(8), .H(9 + i)) dut (.x(x), .y(y), .q(q[i]));
    assign array_width[i] = dut.W;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; y = 8'd1;
    #1;
    for (int i = 0; i < 7; i++) begin
      checks++;
      if ((7 - i) * (8 - array_width[i]) != SAVED[i]) begin
        failures++;
        $display("FAIL h=%0d: array width %0d saves %0d cells, expected %0d",
                 9 + i, array_width[i], (7 - i) * (8 - array_width[i]), SAVED[i]);
      end
    end
    for (int n = 0; n < 2000; n++) begin
      x = 16'($urandom);
      y = 8'($urandom);
      #1;
      for (int i = 0; i < 7; i++) begin
        checks++;
        if (q[i] !== 16'(ref_axhd(x, y, 16, 9 + i))) begin
          failures++;
          if (failures < 10) $display("FAIL h=%0d %0d/%0d -> %0d", 9 + i, x, y, q[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
