// divisor_truncator: divisor selection of the eliminated hybrid divider.
//
// The exact part of the E-AXHD divides a dividend of W-1 bits, so any
// divisor of W-1 or more significant bits only needs to be seen coarsely.
// An lod finds the leading one k of the M-bit divisor. If k >= W, the W bits
// starting at the leading one are passed on (the divisor stays at least
// 2^(W-1), larger than any dividend, so quotient 0 and remainder = dividend
// come out as before). Otherwise the divisor fits in W bits and its W least
// significant bits are passed on unchanged. Either way the (W-1)-by-W array
// gives exactly the quotient and remainder of the full-width array.
// The two cases follow the worked examples of the design (for W = 5,
// 10010010 -> 10010 and 00000110 -> 00110); taking k = W with the first case
// is this design's choice (both are exact there). Purely combinational.
module divisor_truncator #(
  parameter int unsigned M = 8,  // divisor width
  parameter int unsigned W = 5   // truncated width, n - h + 1
) (
  input  logic [M-1:0] y,   // full divisor
  output logic [W-1:0] yt   // truncated divisor
);

  localparam int unsigned KW = axhd_pkg::k_width(M);

  logic [KW-1:0] k;
  logic          y_zero;
  logic [M-1:0]  aligned;

  lod #(.W(M)) u_lod (.a(y), .k(k), .zero(y_zero));

  always_comb begin
    aligned = y << (KW'(M - 1) - k);       // leading one to bit M-1
    if (32'(k) >= W) yt = aligned[M-1 -: W];
    else             yt = y[W-1:0];
  end

endmodule
