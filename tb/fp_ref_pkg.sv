// fp_ref_pkg: testbench reference for IEEE 754 single-precision arithmetic.
//
// Values are widened exactly to double precision, the operation is done in
// double precision by the simulator, and the result is rounded back to
// single precision (round to nearest even) by explicit bit manipulation.
// Rounding a double-precision sum, product or quotient of two singles to
// single gives the correctly rounded single result, so this reference is
// independent of the integer-significand logic of the RTL units.  Like the
// RTL, denormals are read as zero and tiny results are flushed to zero.
package fp_ref_pkg;

  function automatic real f2r(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'h00) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'h0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    logic [24:0] m;
    logic        g, s;
    int          e;
    d = $realtobits(r);
    if (d[62:0] == '0) return {d[63], 31'h0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    g = d[28];
    s = (d[27:0] != '0);
    if (g && (s || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'h0};
    if (e <= 0)   return {d[63], 31'h0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] radd(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction
  function automatic logic [31:0] rsub(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) - f2r(b));
  endfunction
  function automatic logic [31:0] rmul(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction
  function automatic logic [31:0] rdiv(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) / f2r(b));
  endfunction

  // random normal single with exponent in [127-er, 127+er]
  function automatic logic [31:0] rnd_fp(int er, bit allow_neg);
    logic [31:0] f;
    f[31]    = allow_neg ? 1'($urandom_range(1)) : 1'b0;
    f[30:23] = 8'(127 - er + int'($urandom_range(2 * er)));
    f[22:0]  = 23'($urandom);
    return f;
  endfunction

endpackage
