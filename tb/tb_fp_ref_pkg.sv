// Reference single-precision arithmetic for the testbenches.
//
// Works through the simulator's double-precision reals: an operand is
// converted exactly to a double, the operation is done in double precision
// and the result is rounded once to single precision (round to nearest even)
// by bit manipulation of the double. For a single multiply or add the double
// result is either exact or rounds to the same single as the exact value
// (53 >= 2*24 + 2 bits), so this gives the correctly rounded result.
// Conventions matched to the design: subnormal inputs read as zero, results
// below the normal range become a signed zero, NaNs are the quiet NaN
// 0x7FC00000.
package tb_fp_ref_pkg;

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  function automatic bit is_nan(logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] != 0);
  endfunction

  function automatic bit is_inf(logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] == 0);
  endfunction

  function automatic bit is_zero(logic [31:0] x);
    return x[30:23] == 8'h00;
  endfunction

  // binary32 -> real (exact; subnormals read as signed zero)
  function automatic real f2r(logic [31:0] x);
    logic [63:0] d;
    if (is_zero(x)) d = {x[31], 63'd0};
    else d = {x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // real -> binary32, round to nearest even, flush below normal range
  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    logic [52:0] m;
    logic [24:0] mr;
    logic        g, st;
    int          e;
    d = $realtobits(r);
    if (d[62:52] == 0) return {d[63], 31'd0};
    m  = {1'b1, d[51:0]};
    mr = {1'b0, m[52:29]};
    g  = m[28];
    st = |m[27:0];
    if (g && (st || mr[0])) mr = mr + 1;
    e = int'(d[62:52]) - 1023 + 127;
    if (mr[24]) begin mr = mr >> 1; e = e + 1; end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), mr[22:0]};
  endfunction

  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b);
    if (is_nan(a) || is_nan(b)) return QNAN;
    if ((is_inf(a) && is_zero(b)) || (is_inf(b) && is_zero(a))) return QNAN;
    if (is_inf(a) || is_inf(b)) return {a[31] ^ b[31], 8'hFF, 23'd0};
    return r2f(f2r(a) * f2r(b));
  endfunction

  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b);
    if (is_nan(a) || is_nan(b)) return QNAN;
    if (is_inf(a) && is_inf(b)) return (a[31] != b[31]) ? QNAN : a;
    if (is_inf(a)) return a;
    if (is_inf(b)) return b;
    return r2f(f2r(a) + f2r(b));
  endfunction

  // uniform float in [0,1) with 24 random bits, like a float32 random matrix
  function automatic logic [31:0] rand_unit();
    int unsigned u;
    u = $urandom & 32'h00FF_FFFF;
    return r2f(real'(u) / 16777216.0);
  endfunction

  // random normal number with exponent in [ebase, ebase+espan), random sign
  function automatic logic [31:0] rand_norm(int ebase, int espan);
    int e;
    e = ebase + int'($urandom % espan);
    if (e < 1) e = 1;
    if (e > 254) e = 254;
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

endpackage
