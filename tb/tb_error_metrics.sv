// tb_error_metrics: error evaluation of the hybrid dividers.
//
// 8-by-4: every dividend (0..255) against every nonzero divisor, for
// replacement depths 1..8. 16-by-8: every dividend (0..65535) against 32
// divisors spread over 1..255, for depths 2, 4, ..., 16, on both the AXHD and
// the E-AXHD. For each depth it prints the normalised mean error distance
// (mean |error| / (2^n - 1)), the mean relative error distance (|error| /
// exact quotient, averaged over all pairs, zero quotients counting 0) and
// the maximum absolute error.
// Checks: every quotient against the reference model, E-AXHD equal to AXHD,
// zero error at 8-by-4 depth 1, and errors that never shrink as the depth
// grows (mean error distance and maximum error non-decreasing).
module tb_error_metrics;
  import axhd_ref_pkg::*;

  int checks = 0, failures = 0;

  // ---------------- 8-by-4 ----------------
  localparam int NS = 8;
  logic [7:0] xs;
  logic [3:0] ys;
  logic [7:0] qs [NS];
  for (genvar i = 0; i < NS; i++) begin : g_small
    axhd #(.N(8), .M(4), .H(i + 1)) dut (.x(xs), .y(ys), .q(qs[i]));
  end

  // ---------------- 16-by-8 ----------------
  localparam int NL = 8;
  logic [15:0] xl;
  logic [7:0]  yl;
  logic [15:0] ql [NL];
  logic [15:0] qe [NL];
  for (genvar i = 0; i < NL; i++) begin : g_large
    axhd  #(.N(16), .M(8), .H(2 * (i + 1))) dut   (.x(xl), .y(yl), .q(ql[i]));
    eaxhd #(.N(16), .M(8), .H(2 * (i + 1))) dut_e (.x(xl), .y(yl), .q(qe[i]));
  end

  real    sum_ed  [16];
  real    sum_red [16];
  longint max_ed  [16];
  longint npairs  [16];

  task automatic account(int slot, longint unsigned q, longint unsigned exact);
    longint ed;
    ed = (q > exact) ? longint'(q - exact) : longint'(exact - q);
    sum_ed[slot]  += real'(ed);
    if (exact != 0) sum_red[slot] += real'(ed) / real'(exact);
    if (ed > max_ed[slot]) max_ed[slot] = ed;
    npairs[slot]++;
  endtask

  task automatic report(string name, int slot, int h, int n);
    real med;
    med = sum_ed[slot] / real'(npairs[slot]);
    $display("%s h=%2d  NMED=%9.3e  MRED=%7.3f%%  MAE=%0d", name, h,
             med / real'((1 << n) - 1), 100.0 * sum_red[slot] / real'(npairs[slot]), max_ed[slot]);
  endtask

  initial begin
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 16; s++) begin
      sum_ed[s] = 0.0; sum_red[s] = 0.0; max_ed[s] = 0; npairs[s] = 0;
    end
    xl = '0; yl = 8'd1;
    for (int y = 1; y < 16; y++)
      for (int x = 0; x < 256; x++) begin
        xs = 8'(x); ys = 4'(y);
        #1;
        for (int i = 0; i < NS; i++) begin
          automatic longint unsigned e = ref_axhd(x, y, 8, i + 1);
          checks++;
          if (qs[i] !== 8'(e)) begin
            failures++;
            if (failures < 10) $display("FAIL 8x4 h=%0d %0d/%0d -> %0d expected %0d", i + 1, x, y, qs[i], e);
          end
          account(i, qs[i], x / y);
        end
      end
    for (int yi = 0; yi < 32; yi++)
      for (int x = 0; x < 65536; x++) begin
        automatic int y = 1 + 8 * yi;
        xl = 16'(x); yl = 8'(y);
        #1;
        for (int i = 0; i < NL; i++) begin
          if ((x & 15) == 0) begin            // model check on a 1/16 sample
            automatic longint unsigned e = ref_axhd(x, y, 16, 2 * (i + 1));
            checks++;
            if (ql[i] !== 16'(e)) begin
              failures++;
              if (failures < 10) $display("FAIL 16x8 h=%0d %0d/%0d -> %0d expected %0d", 2 * (i + 1), x, y, ql[i], e);
            end
          end
          checks++;
          if (qe[i] !== ql[i]) begin
            failures++;
            if (failures < 10) $display("FAIL E-AXHD h=%0d %0d/%0d -> %0d, AXHD %0d", 2 * (i + 1), x, y, qe[i], ql[i]);
          end
          account(NS + i, ql[i], x / y);
        end
      end
    for (int i = 0; i < NS; i++) report("8-by-4  AXHD", i, i + 1, 8);
    for (int i = 0; i < NL; i++) report("16-by-8 AXHD/E-AXHD", NS + i, 2 * (i + 1), 16);
    checks++;
    if (max_ed[0] != 0) begin failures++; $display("FAIL 8-by-4 depth 1 is not exact"); end
    for (int i = 1; i < NS; i++) begin
      checks++;
      if (sum_ed[i] < sum_ed[i - 1] || max_ed[i] < max_ed[i - 1]) begin
        failures++; $display("FAIL 8-by-4 error shrinks from h=%0d to h=%0d", i, i + 1);
      end
    end
    for (int i = 1; i < NL; i++) begin
      checks++;
      if (sum_ed[NS + i] < sum_ed[NS + i - 1] || max_ed[NS + i] < max_ed[NS + i - 1]) begin
        failures++; $display("FAIL 16-by-8 error shrinks from h=%0d to h=%0d", 2 * i, 2 * (i + 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
