// tb_hybrid_divider_top: end-to-end test of the top at its default size
// (16-by-8, replacement depth 12). Every operand pair is checked against the
// reference model on both outputs, and the two outputs against each other.
// The testbench also counts how often each mechanism of the design was
// exercised and fails if one never was:
//   exact_q1     the array produced a nonzero upper quotient (X1 >= Y)
//   ld_zero      the LD dividend R1 || X2 was zero
//   ld_below     the LD dividend was nonzero but below the divisor
//   frac_borrow  the LD fraction subtraction borrowed (m1 < m2)
//   trunc_lead   the E-AXHD took its divisor bits from the leading one
//   trunc_low    the E-AXHD took the low divisor bits unchanged
//   approx_err   the approximate quotient differed from the exact one
//   div_zero     division by zero
module tb_hybrid_divider_top;
  import axhd_ref_pkg::*;

  localparam int N = 16, M = 8, H = 12;
  localparam int W = N - H + 1;     // E-AXHD array width at this depth

  logic [N-1:0] x, q_axhd, q_eaxhd;
  logic [M-1:0] y;
  int checks = 0, failures = 0;
  int cnt_exact_q1 = 0, cnt_ld_zero = 0, cnt_ld_below = 0, cnt_frac_borrow = 0;
  int cnt_trunc_lead = 0, cnt_trunc_low = 0, cnt_approx_err = 0, cnt_div_zero = 0;

  hybrid_divider_top dut (.x(x), .y(y), .q_axhd(q_axhd), .q_eaxhd(q_eaxhd));

  task automatic classify();
    longint unsigned x1, r1, t, m1, m2;
    int k1, k2;
    if (y == 0) begin cnt_div_zero++; return; end
    x1 = longint'(x) >> H;
    r1 = x1 % y;
    t  = (r1 << H) | (longint'(x) & ((64'd1 << H) - 1));
    if (x1 >= y) cnt_exact_q1++;
    k2 = msb_pos(y);
    if (k2 >= W) cnt_trunc_lead++; else cnt_trunc_low++;
    if (t == 0) cnt_ld_zero++;
    else if (t < y) cnt_ld_below++;
    else begin
      k1 = msb_pos(t);
      m1 = ((t - (64'd1 << k1)) << 32) >> k1;
      m2 = ((y - (64'd1 << k2)) << 32) >> k2;
      if (m1 < m2) cnt_frac_borrow++;
    end
    if (q_axhd != x / N'(y)) cnt_approx_err++;
  endtask

  task automatic check();
    longint unsigned e;
    #1;
    e = ref_axhd(x, y, N, H);
    checks++;
    if (q_axhd !== N'(e)) begin
      failures++;
      if (failures < 10) $display("FAIL axhd %0d/%0d -> %0d expected %0d", x, y, q_axhd, e);
    end
    checks++;
    if (q_eaxhd !== q_axhd) begin
      failures++;
      if (failures < 10) $display("FAIL eaxhd %0d/%0d -> %0d, axhd %0d", x, y, q_eaxhd, q_axhd);
    end
    classify();
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 16'd43382; y = 8'd84;  check();
    x = 16'd1000;  y = 8'd0;   check();
    x = 16'd0;     y = 8'd9;   check();
    x = 16'h1003;  y = 8'd200; check();
    // every divisor against a sweep of dividends
    for (int yv = 1; yv < 256; yv++)
      for (int i = 0; i < 400; i++) begin
        y = 8'(yv);
        x = 16'($urandom);
        check();
      end
    $display("mechanisms: exact_q1=%0d ld_zero=%0d ld_below=%0d frac_borrow=%0d trunc_lead=%0d trunc_low=%0d approx_err=%0d div_zero=%0d",
             cnt_exact_q1, cnt_ld_zero, cnt_ld_below, cnt_frac_borrow,
             cnt_trunc_lead, cnt_trunc_low, cnt_approx_err, cnt_div_zero);
    if (cnt_exact_q1 == 0)    begin failures++; $display("FAIL never: exact_q1"); end
    if (cnt_ld_zero == 0)     begin failures++; $display("FAIL never: ld_zero"); end
    if (cnt_ld_below == 0)    begin failures++; $display("FAIL never: ld_below"); end
    if (cnt_frac_borrow == 0) begin failures++; $display("FAIL never: frac_borrow"); end
    if (cnt_trunc_lead == 0)  begin failures++; $display("FAIL never: trunc_lead"); end
    if (cnt_trunc_low == 0)   begin failures++; $display("FAIL never: trunc_low"); end
    if (cnt_approx_err == 0)  begin failures++; $display("FAIL never: approx_err"); end
    if (cnt_div_zero == 0)    begin failures++; $display("FAIL never: div_zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
