// lbc: logarithm-to-binary converter (antilogarithm shifter).
//
// Turns the fixed-point logarithm k.m back into a binary integer with
// Mitchell's approximation 2^(k+m) ~ 2^k (1 + m): the word {1, m} is shifted
// left by k and the F fraction bits are dropped, so the result is truncated
// towards zero. The caller must keep k below QW so that the result fits.
// Purely combinational.
module lbc #(
  parameter int unsigned KW = 4,   // width of the integer part k
  parameter int unsigned F  = 15,  // width of the fraction m
  parameter int unsigned QW = 16   // width of the integer result
) (
  input  logic [KW-1:0] k,   // integer part (power of two)
  input  logic [F-1:0]  m,   // fraction
  output logic [QW-1:0] q    // 2^k (1 + m), integer part
);

  localparam int unsigned SW = F + QW;  // shifter width
  logic [SW-1:0] shifted;

  always_comb begin
    shifted = SW'({1'b1, m}) << k;
    q       = shifted[F +: QW];
  end

endmodule
