// tb_ref_pkg: reference models for the testbenches, written independently of the RTL.
//
// approx_mul models the inexact multiplier arithmetically: each compressor column is evaluated
// from bit counts (first-level carries as majority functions, the merged carry as their OR), two
// rows of compressors, then an ordinary integer addition. exact results use '*' and '%'.
package tb_ref_pkg;
  function automatic int maj(input int x, input int y, input int z);
    return (x + y + z) >= 2 ? 1 : 0;
  endfunction

  // One row of approximate 5:2 compressors over 'cols' columns. rows[r] holds row r as an integer.
  // Returns the integer value of (sum row + carry row).
  function automatic int comp_row(input int r0, input int r1, input int r2, input int r3,
                                  input int r4);
    int s, cy, kin, v0, v1, v2, v3, v4, c1, c2, s1, s2;
    s = 0; cy = 0; kin = 0;
    for (int k = 0; k < 16; k++) begin
      v0 = (r0 >> k) & 1; v1 = (r1 >> k) & 1; v2 = (r2 >> k) & 1;
      v3 = (r3 >> k) & 1; v4 = (r4 >> k) & 1;
      c1 = maj(v0, v1, v2);  s1 = (v0 + v1 + v2) & 1;
      c2 = maj(v3, v4, kin); s2 = (v3 + v4 + kin) & 1;
      s  += ((s1 + s2) & 1) << k;          // third adder, cin2 = 0
      cy += maj(s1, s2, 0) << (k + 1);
      kin = c1 | c2;                       // merged carry into the next column
    end
    return (s & 16'hFFFF) | ((cy & 16'hFFFF) << 16);
  endfunction

  function automatic int approx_mul(input int a, input int b);
    int pp[8], l1, l2;
    for (int j = 0; j < 8; j++) pp[j] = ((b >> j) & 1) ? (a << j) : 0;
    l1 = comp_row(pp[0], pp[1], pp[2], pp[3], pp[4]);
    l2 = comp_row(l1 & 16'hFFFF, (l1 >> 16) & 16'hFFFF, pp[5], pp[6], pp[7]);
    return ((l2 & 16'hFFFF) + ((l2 >> 16) & 16'hFFFF)) & 16'hFFFF;
  endfunction

  // base^exp mod n with the multiplications done by the approximate model (right to left,
  // square and multiply, all 8 exponent bits).
  function automatic int approx_modexp(input int base, input int exp, input int n);
    int r, b;
    if (n == 1) return 0;
    r = 1; b = base;
    for (int i = 0; i < 8; i++) begin
      if ((exp >> i) & 1) r = approx_mul(r, b) % n;
      b = approx_mul(b, b) % n;
    end
    return r;
  endfunction

  function automatic int exact_modexp(input int base, input int exp, input int n);
    longint r, b;
    if (n == 1) return 0;
    r = 1; b = base % n;
    for (int i = 0; i < exp; i++) r = (r * b) % n;
    return int'(r);
  endfunction

  function automatic int gcd(input int x, input int y);
    int t;
    while (y != 0) begin t = x % y; x = y; y = t; end
    return x;
  endfunction
endpackage
