// fp_ref_pkg: reference single precision arithmetic for the testbenches.
//
// Operations are computed in double precision and rounded once to single
// precision (round to nearest even, results below the normal range flushed
// to signed zero, overflow to infinity). For add, subtract, multiply and
// divide of single precision operands this double rounding is known to give
// the correctly rounded single result, so these functions are an independent
// model of the hardware units.
package fp_ref_pkg;

  function automatic real s2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return $bitstoreal({f[31], 63'd0});
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2s(input real r);
    logic [63:0] d;
    logic [52:0] m;
    logic [24:0] t;
    logic        g, st;
    int          e;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:0]};
    t = {1'b0, m[52:29]};
    g = m[28];
    st = |m[27:0];
    if (g && (st || t[0])) t = t + 25'd1;
    if (t[24]) begin t = t >> 1; e = e + 1; end
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    return {d[63], 8'(e), t[22:0]};
  endfunction

  function automatic logic [31:0] ref_mul(input logic [31:0] a, input logic [31:0] b);
    return r2s(s2r(a) * s2r(b));
  endfunction

  function automatic logic [31:0] ref_sub(input logic [31:0] a, input logic [31:0] b);
    return r2s(s2r(a) - s2r(b));
  endfunction

  function automatic logic [31:0] ref_div(input logic [31:0] a, input logic [31:0] b);
    return r2s(s2r(a) / s2r(b));
  endfunction

  // random normal number with exponent in [127-span, 127+span]
  function automatic logic [31:0] rand_fp(input int span);
    int e;
    e = 127 - span + int'($urandom_range(2 * span, 0));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

endpackage
