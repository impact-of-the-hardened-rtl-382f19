// tb_fp_ref_pkg: reference float32 arithmetic for the testbenches.
//
// Single-precision values are widened exactly to double, the operation is
// done on reals, and the double result is rounded back to single precision
// (nearest, ties to even). Double has more than twice the significand bits of
// single, so this gives the correctly rounded single result of one addition
// or one multiplication. Subnormals are treated as zero on input and output,
// matching the flush-to-zero convention of the design.
package tb_fp_ref_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) d = {f[31], 63'd0};
    else d = {f[31], 11'(32'(f[30:23]) + 32'd896), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    if (d[28] && ((d[27:0] != 28'd0) || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e <= 0) return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], e[7:0], m[22:0]};
  endfunction

  function automatic logic [31:0] add_ref(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction

  function automatic logic [31:0] sub_ref(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) - f2r(b));
  endfunction

  function automatic logic [31:0] mul_ref(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  // Random normal float32 with exponent field in [emin, emax].
  function automatic logic [31:0] rand_fp(input int emin, input int emax);
    logic [7:0] e;
    e = 8'(emin + int'($urandom_range(emax - emin)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

endpackage
