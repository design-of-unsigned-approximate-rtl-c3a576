// hybrid_divider_top: the two approximate hybrid dividers side by side.
//
// Both dividers take the same N-bit dividend x and M-bit divisor y and the
// same replacement depth H (16-by-8, H = 12 by default). q_axhd comes from
// the hybrid divider with a full-width restoring array, q_eaxhd from the
// eliminated version whose array uses a truncated divisor. The two are
// designed to return identical quotients; the eliminated one is smaller and
// faster. Use whichever output the application needs and let synthesis
// remove the other. Purely combinational, no clock or reset.
module hybrid_divider_top #(
  parameter int unsigned N = axhd_pkg::DEF_N,  // dividend and quotient width
  parameter int unsigned M = axhd_pkg::DEF_M,  // divisor width
  parameter int unsigned H = axhd_pkg::DEF_H   // replacement depth, 0..N
) (
  input  logic [N-1:0] x,        // dividend
  input  logic [M-1:0] y,        // divisor
  output logic [N-1:0] q_axhd,   // quotient of the hybrid divider
  output logic [N-1:0] q_eaxhd   // quotient of the eliminated hybrid divider
);

  axhd  #(.N(N), .M(M), .H(H)) u_axhd  (.x(x), .y(y), .q(q_axhd));
  eaxhd #(.N(N), .M(M), .H(H)) u_eaxhd (.x(x), .y(y), .q(q_eaxhd));

endmodule
