// fp_ref_pkg: reference conversions between IEEE single bit patterns and the
// simulator's double-precision real, used by the testbenches to work out
// expected floating-point results independently of the RTL. r2s rounds a
// double to single (nearest, ties to even) and flushes results below the
// smallest normal to signed zero, matching the arithmetic units' convention.
package fp_ref_pkg;

  function automatic real s2r(logic [31:0] s);
    logic [10:0] e;
    if (s[30:23] == 0) return s[31] ? -0.0 : 0.0;
    e = 11'(s[30:23]) - 11'd127 + 11'd1023;
    return $bitstoreal({s[31], e, s[22:0], 29'd0});
  endfunction

  function automatic logic [31:0] r2s(real x);
    logic [63:0] d;
    logic [52:0] m53;
    logic [24:0] m;
    int          e;
    logic        g, st;
    d = $realtobits(x);
    if (d[62:0] == 0) return {d[63], 31'd0};
    e   = int'(d[62:52]) - 1023 + 127;
    m53 = {1'b1, d[51:0]};
    m   = {1'b0, m53[52:29]};
    g   = m53[28];
    st  = |m53[27:0];
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // random normal single with exponent in [emin, emax]
  function automatic logic [31:0] rnd_single(int emin, int emax);
    logic [7:0] e;
    e = 8'(emin + int'($urandom_range(0, emax - emin)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

endpackage
