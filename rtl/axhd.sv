// axhd: approximate hybrid divider (restoring array + logarithmic divider).
//
// Divides an N-bit dividend x by an M-bit divisor y (16-by-8 by default). The
// dividend is split at the replacement depth H: X1 = x[N-1:H] goes through an
// exact restoring array of N-H rows, which produces the N-H most significant
// quotient bits Q1 exactly and the remainder R1 < y. Since
//   x / y = Q1 * 2^H + (R1 * 2^H + X2) / y,   X2 = x[H-1:0],
// the rest of the quotient is the quotient of T = R1 || X2 by y, which a
// logarithmic divider approximates; its H low bits are Q2 and q = Q1 || Q2.
// T always fits in N bits (R1 is below both y and 2^(N-H)), and T < y * 2^H,
// so the higher LD quotient bits are zero and dropping them loses nothing.
// All error comes from the LD: a larger H gives a smaller, faster and less
// accurate divider. H = 0 leaves the exact array alone and H = N the LD
// alone. Division by zero returns all ones (this design's choice).
//
// Purely combinational: the delay is the N-H array rows followed by the LD.
module axhd #(
  parameter int unsigned N = axhd_pkg::DEF_N,  // dividend and quotient width
  parameter int unsigned M = axhd_pkg::DEF_M,  // divisor width
  parameter int unsigned H = axhd_pkg::DEF_H   // replacement depth, 0..N
) (
  input  logic [N-1:0] x,  // dividend
  input  logic [M-1:0] y,  // divisor
  output logic [N-1:0] q   // approximate quotient
);

  if (H > N) begin : g_bad_depth
    $error("axhd: replacement depth H=%0d exceeds N=%0d", H, N);
  end

  if (H == 0) begin : g_exact
    logic [M-1:0] r_unused;
    restoring_array_divider #(.XW(N), .YW(M)) u_array (
      .x(x), .y(y), .q(q), .r(r_unused)
    );
  end else if (H >= N) begin : g_log
    log_divider #(.XW(N), .YW(M)) u_ld (.x(x), .y(y), .q(q));
  end else begin : g_hybrid
    logic [N-H-1:0] q1;
    logic [M-1:0]   r1;
    logic [N-1:0]   t;
    logic [N-1:0]   q2;

    restoring_array_divider #(.XW(N-H), .YW(M)) u_array (
      .x(x[N-1:H]), .y(y), .q(q1), .r(r1)
    );

    // T = R1 || X2; the bits of R1 above N-H are zero by construction.
    always_comb t = (N'(r1) << H) | N'(x[H-1:0]);

    log_divider #(.XW(N), .YW(M)) u_ld (.x(t), .y(y), .q(q2));

    always_comb q = {q1, q2[H-1:0]};
  end

endmodule
