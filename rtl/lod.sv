// lod: leading-one detector.
//
// Returns the bit position k of the most significant 1 of the W-bit operand
// (the characteristic of its base-2 logarithm) and a flag that the operand is
// zero, in which case k is 0. It is written as a priority scan from the least
// significant bit upwards, so the highest set bit wins; a synthesiser turns it
// into a priority encoder. Purely combinational.
module lod #(
  parameter int unsigned W  = 16,                    // operand width
  parameter int unsigned KW = axhd_pkg::k_width(W)   // width of k
) (
  input  logic [W-1:0]  a,     // operand
  output logic [KW-1:0] k,     // position of the leading one
  output logic          zero   // operand is all zeros
);

  always_comb begin
    k = '0;
    for (int unsigned i = 0; i < W; i++) begin
      if (a[i]) k = KW'(i);
    end
    zero = (a == '0);
  end

endmodule
