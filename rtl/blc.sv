// blc: binary-to-logarithm converter (Mitchell's approximation).
//
// An operand a = 2^k (1 + m) is represented by log2(a) ~ k + m. Given the
// leading-one position k from an lod, the converter outputs the fixed-point
// word km = {k, m}: k as the integer part and, as the W-1 fraction bits, the
// operand bits below the leading one, left aligned (a shifted left by W-1-k
// with the leading one dropped). A 16-bit operand gives a 4+15 = 19-bit word,
// an 8-bit operand a 3+7 = 10-bit word. Purely combinational.
module blc #(
  parameter int unsigned W  = 16,                    // operand width
  parameter int unsigned KW = axhd_pkg::k_width(W)   // width of k
) (
  input  logic [W-1:0]       a,   // operand
  input  logic [KW-1:0]      k,   // leading-one position of a
  output logic [KW+W-2:0]    km   // {k, m}
);

  logic [W-1:0] aligned;

  always_comb begin
    aligned = a << (KW'(W - 1) - k);   // leading one moves to bit W-1
    km      = {k, aligned[W-2:0]};
  end

endmodule
