// axhd_ref_pkg: behavioural reference models for the divider testbenches.
//
// Written from the arithmetic, not from the RTL structure:
//  - ref_ld(t, y): Mitchell's logarithmic division with the characteristics
//    found by a loop and the fractions held with 32 extra bits, so that no
//    rounding enters before the final truncation. For m1 >= m2 the result is
//    2^(k1-k2) (1 + m1 - m2), otherwise 2^(k1-k2-1) (2 + m1 - m2); a value
//    below 1 gives 0, t = 0 gives 0 and y = 0 gives all ones.
//  - ref_axhd(x, y, n, h): integer division of the top n-h dividend bits,
//    then ref_ld on remainder || low h bits, keeping the low h bits.
package axhd_ref_pkg;

  function automatic int msb_pos(longint unsigned v);
    int p = -1;
    for (int i = 0; i < 64; i++) if (v[i]) p = i;
    return p;
  endfunction

  function automatic longint unsigned ref_ld(longint unsigned t, longint unsigned y, int n);
    int k1, k2, e;
    longint unsigned one, m1, m2, f, v;
    if (y == 0) return (64'd1 << n) - 1;
    if (t == 0) return 0;
    k1  = msb_pos(t);
    k2  = msb_pos(y);
    one = 64'd1 << 32;
    m1  = ((t - (64'd1 << k1)) << 32) >> k1;
    m2  = ((y - (64'd1 << k2)) << 32) >> k2;
    e   = k1 - k2;
    if (m1 >= m2) f = one + m1 - m2;
    else begin
      f = 2 * one + m1 - m2;
      e = e - 1;
    end
    if (e < 0) return 0;
    v = (f << e) >> 32;
    return v & ((64'd1 << n) - 1);
  endfunction

  function automatic longint unsigned ref_axhd(longint unsigned x, longint unsigned y, int n, int h);
    longint unsigned x1, x2, q1, r1, t, q2;
    if (y == 0) return (64'd1 << n) - 1;
    x1 = x >> h;
    x2 = x & ((64'd1 << h) - 1);
    q1 = x1 / y;
    r1 = x1 % y;
    if (h == 0) return q1;
    t  = (r1 << h) | x2;
    q2 = ref_ld(t, y, n) & ((64'd1 << h) - 1);
    return (q1 << h) | q2;
  endfunction

endpackage
