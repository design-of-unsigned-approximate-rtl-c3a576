// eaxhd: eliminated approximate hybrid divider.
//
// Same division as axhd, with a narrower exact part. The array only sees the
// N-H-bit dividend X1, and a divisor wider than X1 can only give quotient 0
// and remainder X1, so the array needs just W = N-H+1 divisor bits: a
// divisor_truncator (an lod on y and a selector) hands it either the W bits
// from the leading one of y, or the W low bits of y when y is that small.
// The quotient is bit-for-bit that of axhd at the same depth, while each of
// the N-H rows has W cells instead of M: for the 16-by-8 divider this saves
// 6, 10, 12, 12, 10, 6 cells at H = 10..15. When N-H+1 >= M (H <= 9 for
// 16-by-8) there is nothing to save and the module is an axhd.
//
// The logarithmic divider still uses the full divisor, through its own lod.
// Division by zero returns all ones. Purely combinational.
module eaxhd #(
  parameter int unsigned N = axhd_pkg::DEF_N,  // dividend and quotient width
  parameter int unsigned M = axhd_pkg::DEF_M,  // divisor width
  parameter int unsigned H = axhd_pkg::DEF_H   // replacement depth, 0..N
) (
  input  logic [N-1:0] x,  // dividend
  input  logic [M-1:0] y,  // divisor
  output logic [N-1:0] q   // approximate quotient
);

  if (H > N) begin : g_bad_depth
    $error("eaxhd: replacement depth H=%0d exceeds N=%0d", H, N);
  end

  // Width of the reduced divisor and of each array row.
  localparam int unsigned W = axhd_pkg::min2(M, N - H + 1);

  if (H == 0) begin : g_exact
    logic [M-1:0] r_unused;
    restoring_array_divider #(.XW(N), .YW(M)) u_array (
      .x(x), .y(y), .q(q), .r(r_unused)
    );
  end else if (H >= N) begin : g_log
    log_divider #(.XW(N), .YW(M)) u_ld (.x(x), .y(y), .q(q));
  end else begin : g_hybrid
    logic [W-1:0]   yt;
    logic [N-H-1:0] q1;
    logic [W-1:0]   r1;
    logic [N-1:0]   t;
    logic [N-1:0]   q2;

    if (W < M) begin : g_trunc
      divisor_truncator #(.M(M), .W(W)) u_trunc (.y(y), .yt(yt));
    end else begin : g_full
      assign yt = y[W-1:0];
    end

    restoring_array_divider #(.XW(N-H), .YW(W)) u_array (
      .x(x[N-1:H]), .y(yt), .q(q1), .r(r1)
    );

    always_comb t = (N'(r1) << H) | N'(x[H-1:0]);

    log_divider #(.XW(N), .YW(M)) u_ld (.x(t), .y(y), .q(q2));

    always_comb q = {q1, q2[H-1:0]};
  end

endmodule
