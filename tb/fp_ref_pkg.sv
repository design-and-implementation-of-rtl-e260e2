// fp_ref_pkg: reference arithmetic for the floating-point testbenches.
// Single-precision results are computed in double precision (exact for the
// conversions, and double rounding from double to single is harmless for
// +, -, * and / of single operands since 53 >= 2*24 + 2), then rounded to
// single with round-to-nearest-even. Results below the normal range are
// flushed to zero, as the units under test do.
package fp_ref_pkg;

  function automatic logic [63:0] s2d(logic [31:0] s);
    logic [7:0] e;
    e = s[30:23];
    if (e == 0)   return {s[31], 63'd0};
    if (e == 255) return {s[31], 11'h7FF, s[22:0], 29'd0};
    return {s[31], 11'(int'(e) - 127 + 1023), s[22:0], 29'd0};
  endfunction

  function automatic logic [31:0] d2s(logic [63:0] d);
    int e;
    logic [24:0] m;
    logic g, st;
    if (d[62:52] == 11'h7FF) return {d[63], 8'hFF, (d[51:0] != 0), 22'd0};
    if (d[62:52] == 0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 1;
    if (m[24]) begin m = m >> 1; e++; end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic real sr(logic [31:0] s);
    return $bitstoreal(s2d(s));
  endfunction

  function automatic logic [31:0] rs(real r);
    return d2s($realtobits(r));
  endfunction

  // a random normal single with exponent in [127-span, 127+span]
  function automatic logic [31:0] rnd_s(int span);
    int e;
    e = 127 - span + int'($urandom_range(2*span, 0));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  function automatic logic [63:0] rnd_d(int span);
    int e;
    e = 1023 - span + int'($urandom_range(2*span, 0));
    return {1'($urandom), 11'(e), 20'($urandom), 32'($urandom)};
  endfunction

endpackage
