// axhd_pkg: constants and width helpers shared by the hybrid divider modules.
//
// The defaults describe the 16-by-8 divider (16-bit dividend, 8-bit divisor)
// with replacement depth 12. The helper functions size the fixed-point
// logarithm words used by the logarithmic divider: an operand of W bits gives
// a characteristic k of clog2(W) bits and a fraction m of W-1 bits, so a
// 16-bit operand becomes a 19-bit k.m word and an 8-bit one a 10-bit word.
package axhd_pkg;

  localparam int unsigned DEF_N = 16;  // dividend width n
  localparam int unsigned DEF_M = 8;   // divisor width n/2
  localparam int unsigned DEF_H = 12;  // replacement depth h

  // Width of the characteristic k of a W-bit operand (at least 1 bit).
  function automatic int unsigned k_width(int unsigned w);
    return (w <= 2) ? 1 : $clog2(w);
  endfunction

  function automatic int unsigned max2(int unsigned a, int unsigned b);
    return (a > b) ? a : b;
  endfunction

  function automatic int unsigned min2(int unsigned a, int unsigned b);
    return (a < b) ? a : b;
  endfunction

endpackage
