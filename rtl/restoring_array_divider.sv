// restoring_array_divider: exact unsigned restoring array divider, XW by YW.
//
// One row per dividend bit, YW exdcr cells per row. Row i brings down
// dividend bit x[XW-1-i] under the partial remainder left by the row above
// (zero for the first row), giving a (YW+1)-bit trial dividend D. The cells
// subtract the divisor from D[YW-1:0] with a rippling borrow, and the row's
// quotient bit is
//   q = D[YW] | ~borrow_out
// (an OR gate per row): either the bit shifted out of the remainder makes D
// larger than any YW-bit divisor, or the subtraction did not borrow. The same
// q steers every cell of the row between the difference and the restored
// minuend. Because there is a row for every dividend bit (the "extra rows"
// form), the quotient is XW bits wide and the array never overflows:
// q = x / y and r = x % y for every y != 0. For y = 0 every trial subtraction
// succeeds, so q is all ones and r holds the low dividend bits.
//
// The cell structure and the quotient-bit rule follow the classic restoring
// array; the parameterisation by XW and YW is what lets the same module serve
// as the exact part of both hybrid dividers. Purely combinational; the
// critical path runs through every row's borrow chain and quotient bit.
module restoring_array_divider #(
  parameter int unsigned XW = 4,  // dividend width = number of rows
  parameter int unsigned YW = 8   // divisor width = cells per row
) (
  input  logic [XW-1:0] x,  // dividend
  input  logic [YW-1:0] y,  // divisor
  output logic [XW-1:0] q,  // quotient
  output logic [YW-1:0] r   // remainder
);

  // prem[i] is the partial remainder entering row i; prem[XW] is the result.
  logic [YW-1:0] prem [XW+1];
  assign prem[0] = '0;

  for (genvar i = 0; i < XW; i++) begin : g_row
    logic [YW:0]   dvd;     // trial dividend of this row
    logic [YW:0]   borrow;  // borrow chain, borrow[0] = 0
    logic          qbit;
    logic [YW-1:0] rem;

    assign dvd       = {prem[i], x[XW-1-i]};
    assign borrow[0] = 1'b0;

    for (genvar j = 0; j < YW; j++) begin : g_cell
      exdcr u_cell (
        .x   (dvd[j]),
        .y   (y[j]),
        .bin (borrow[j]),
        .q   (qbit),
        .r   (rem[j]),
        .bout(borrow[j+1])
      );
    end

    assign qbit        = dvd[YW] | ~borrow[YW];
    assign q[XW-1-i]   = qbit;
    assign prem[i+1]   = rem;
  end

  assign r = prem[XW];

endmodule
