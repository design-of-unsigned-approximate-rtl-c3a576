// exsc: exact one-bit subtractor cell.
//
// Computes x - y - bin: the difference bit d = x ^ y ^ bin and the borrow
// bout = (~(x ^ y) & bin) | (~x & y). It is the subtracting part of every
// restoring divider cell and the building block of the ripple subtractor in
// the logarithmic divider. Purely combinational.
module exsc (
  input  logic x,     // minuend bit
  input  logic y,     // subtrahend bit
  input  logic bin,   // borrow in
  output logic d,     // difference bit
  output logic bout   // borrow out
);

  always_comb begin
    d    = x ^ y ^ bin;
    bout = (~(x ^ y) & bin) | (~x & y);
  end

endmodule
