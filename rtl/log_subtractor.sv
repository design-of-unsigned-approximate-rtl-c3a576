// log_subtractor: ripple subtractor for the logarithmic divider.
//
// Forms d = a - b (mod 2^W) for the fixed-point logarithms a = k1.m1 and
// b = k2.m2 with a chain of exsc cells, least significant bit first. The
// borrow out of the top cell is brought out as neg: it is set when the
// difference is negative, that is when the dividend is smaller than the
// divisor in the logarithmic domain. Because integer and fraction parts are
// subtracted as one word, a fraction borrow (m1 < m2) lowers the integer part
// by one, which is Mitchell's rule for that case. Purely combinational.
module log_subtractor #(
  parameter int unsigned W = 19  // width of the k.m words
) (
  input  logic [W-1:0] a,    // minuend k1.m1
  input  logic [W-1:0] b,    // subtrahend k2.m2, aligned to a
  output logic [W-1:0] d,    // difference k.m
  output logic         neg   // borrow out: a < b
);

  logic [W:0] borrow;
  assign borrow[0] = 1'b0;

  for (genvar j = 0; j < W; j++) begin : g_bit
    exsc u_exsc (
      .x   (a[j]),
      .y   (b[j]),
      .bin (borrow[j]),
      .d   (d[j]),
      .bout(borrow[j+1])
    );
  end

  assign neg = borrow[W];

endmodule
