// fp_ref_pkg: reference single-precision arithmetic for the testbenches.
//
// Operands are widened to binary64 (exact), the operation is done in real
// (binary64) arithmetic, and the result is rounded to binary32 with
// round-to-nearest-even by bit manipulation of the binary64 pattern. For a
// single add, subtract or multiply of binary32 values this double rounding
// gives the correctly rounded binary32 result. Results below the binary32
// normal range flush to signed zero, subnormal operands count as zero and
// every NaN result is the quiet NaN 0x7FC00000, matching the datapath.
package fp_ref_pkg;

  function automatic real s2r(input logic [31:0] x);
    logic [63:0] d;
    if (x[30:23] == 8'd0) d = {x[31], 63'd0};
    else if (x[30:23] == 8'hFF) d = {x[31], 11'h7FF, x[22:0], 29'd0};
    else d = {x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2s(input real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:0] == 63'd0) return {d[63], 31'd0};
    if (d[62:52] == 11'h7FF) return (d[51:0] != 0) ? 32'h7FC0_0000 : {d[63], 8'hFF, 23'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin m = m >> 1; e = e + 1; end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] ref_mul(input logic [31:0] a, input logic [31:0] b);
    return r2s(s2r(a) * s2r(b));
  endfunction

  function automatic logic [31:0] ref_add(input logic [31:0] a, input logic [31:0] b);
    logic [31:0] r;
    r = r2s(s2r(a) + s2r(b));
    // Exact zero of opposite-signed operands is +0 under round-to-nearest.
    if (r[30:0] == 31'd0 && !(a[31] && b[31])) r[31] = 1'b0;
    return r;
  endfunction

  // Random normal number with exponent 127 +/- spread.
  function automatic logic [31:0] rnd_fp(input int spread);
    int e;
    e = 127 + int'($urandom_range(2 * spread)) - spread;
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

endpackage
