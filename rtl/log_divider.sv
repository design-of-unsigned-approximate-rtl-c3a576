// log_divider: Mitchell logarithmic divider (LD), XW-bit by YW-bit.
//
// Division becomes a subtraction of logarithms. For x = 2^k1 (1 + m1) and
// y = 2^k2 (1 + m2), log2(1 + m) is approximated by m, so
//   log2(x / y) ~ (k1 + m1) - (k2 + m2).
// Four steps, one block each: an lod finds k of each operand, a blc packs
// k.m (19 bits for the 16-bit dividend, 10 bits for the 8-bit divisor), one
// log_subtractor of exsc cells subtracts the divisor word (fraction padded on
// the right to line up) from the dividend word, and an lbc shifter turns the
// difference back into an integer, dropping the fraction. A fraction borrow
// lowers the integer part by one, so for m1 < m2 the result is
// 2^(k1-k2-1) (2 + m1 - m2), the usual Mitchell form.
//
// A negative difference means x < y and gives 0. Zero operands, which the
// logarithm cannot represent, are this design's choice: x = 0 gives 0 and
// y = 0 gives all ones (division by zero saturates, as in the array divider).
// No remainder is produced. Purely combinational.
module log_divider #(
  parameter int unsigned XW = 16,  // dividend width
  parameter int unsigned YW = 8    // divisor width
) (
  input  logic [XW-1:0] x,  // dividend
  input  logic [YW-1:0] y,  // divisor
  output logic [XW-1:0] q   // approximate quotient
);

  import axhd_pkg::*;

  localparam int unsigned K1W = k_width(XW);
  localparam int unsigned K2W = k_width(YW);
  localparam int unsigned KW  = max2(K1W, K2W);   // integer part of k.m
  localparam int unsigned F   = max2(XW, YW) - 1; // fraction part of k.m
  localparam int unsigned SW  = KW + F;           // subtractor width

  logic [K1W-1:0]      k1;
  logic [K2W-1:0]      k2;
  logic                x_zero, y_zero;
  logic [K1W+XW-2:0]   km1;
  logic [K2W+YW-2:0]   km2;
  logic [SW-1:0]       a_word, b_word, diff;
  logic                neg;
  logic [XW-1:0]       q_lbc;

  lod #(.W(XW)) u_lod_x (.a(x), .k(k1), .zero(x_zero));
  lod #(.W(YW)) u_lod_y (.a(y), .k(k2), .zero(y_zero));

  blc #(.W(XW)) u_blc_x (.a(x), .k(k1), .km(km1));
  blc #(.W(YW)) u_blc_y (.a(y), .k(k2), .km(km2));

  // Line both words up on a common binary point: KW integer bits, F fraction.
  always_comb begin
    a_word = (SW'(km1[K1W+XW-2 -: K1W]) << F) | (SW'(km1[XW-2:0]) << (F - (XW - 1)));
    b_word = (SW'(km2[K2W+YW-2 -: K2W]) << F) | (SW'(km2[YW-2:0]) << (F - (YW - 1)));
  end

  log_subtractor #(.W(SW)) u_sub (.a(a_word), .b(b_word), .d(diff), .neg(neg));

  lbc #(.KW(KW), .F(F), .QW(XW)) u_lbc (
    .k(diff[SW-1 -: KW]),
    .m(diff[F-1:0]),
    .q(q_lbc)
  );

  always_comb begin
    if (y_zero)             q = '1;
    else if (x_zero || neg) q = '0;
    else                    q = q_lbc;
  end

endmodule
