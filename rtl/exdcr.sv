// exdcr: exact restoring divider cell.
//
// One cell of a restoring array divider. An exsc subtracts the divisor bit y
// and the incoming borrow from the partial-remainder bit x; the borrow goes on
// to the next more significant cell. The row's quotient bit q then selects the
// remainder bit passed down to the next row: the difference when the trial
// subtraction succeeded (q = 1), the unchanged minuend x when it failed
// (q = 0), which is the "restoring" step:
//   r = q ? (x ^ y ^ bin) : x
// The transistor-level cell uses two pass transistors for the selection; here
// it is an ordinary 2-to-1 multiplexer with the same function. Combinational;
// bout does not depend on q, so the row's q can be fed back without a loop.
module exdcr (
  input  logic x,     // partial-remainder (minuend) bit
  input  logic y,     // divisor bit
  input  logic bin,   // borrow in from the less significant cell
  input  logic q,     // quotient bit of this row
  output logic r,     // partial-remainder bit for the next row
  output logic bout   // borrow out to the more significant cell
);

  logic diff;

  exsc u_exsc (
    .x   (x),
    .y   (y),
    .bin (bin),
    .d   (diff),
    .bout(bout)
  );

  always_comb r = q ? diff : x;

endmodule
