// fp32_pkg: IEEE 754 single-precision arithmetic shared by the floating-point
// units of the PREU (adder, subtractor, multiplier, squarer, divider and
// comparator).
//
// Each function is pure combinational logic.  The pipelined unit modules
// (fp_add, fp_sub, fp_mult, fp_square, fp_div) evaluate one of these functions
// and then register the result for the number of stages the data path needs.
//
// Number handling (this design's choice, the engine only needs ordinary
// finite values):
//   * rounding is round-to-nearest, ties to even;
//   * denormal inputs are read as zero, results below the smallest normal
//     number are flushed to a signed zero;
//   * overflow gives infinity; NaN inputs and invalid operations
//     (inf-inf, 0*inf, 0/0, inf/inf) give the quiet NaN 0x7FC00000.
package fp32_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_ONE    = 32'h3F80_0000;  // 1.0
  localparam fp32_t FP_INV_PI = 32'h3EA2_F983;  // 1/pi rounded to single
  localparam fp32_t FP_QNAN   = 32'h7FC0_0000;

  function automatic logic fp_is_nan(fp32_t a);
    return (a[30:23] == 8'hFF) && (a[22:0] != '0);
  endfunction

  function automatic logic fp_is_inf(fp32_t a);
    return (a[30:23] == 8'hFF) && (a[22:0] == '0);
  endfunction

  // zero after flushing denormals
  function automatic logic fp_is_zero(fp32_t a);
    return a[30:23] == 8'h00;
  endfunction

  // Round a normalised significand and pack.  mant holds 24 bits with the
  // hidden one at bit 23, grd is the first dropped bit, stk the OR of the
  // rest; exp is the biased exponent of mant, possibly out of range.
  function automatic fp32_t fp_round_pack(logic sign, logic signed [11:0] exp,
                                          logic [23:0] mant, logic grd, logic stk);
    logic [24:0] m;
    logic        inc;
    logic signed [11:0] e;
    inc = grd & (stk | mant[0]);
    m = {1'b0, mant} + {24'h0, inc};
    e = exp;
    if (m[24]) begin
      m = m >> 1;
      e = e + 12'sd1;
    end
    if (e >= 12'sd255)      return {sign, 8'hFF, 23'h0};
    else if (e <= 12'sd0)   return {sign, 31'h0};
    else                    return {sign, e[7:0], m[22:0]};
  endfunction

  function automatic fp32_t fp_add_f(fp32_t a, fp32_t b);
    logic        sa, sb, sl, ss;
    logic [7:0]  el, es;
    logic [23:0] ml, ms;
    logic [7:0]  d;
    logic [27:0] xl, xs, sh, r;
    logic        sticky;
    logic signed [11:0] e;
    int          lz;
    sa = a[31]; sb = b[31];
    if (fp_is_nan(a) || fp_is_nan(b)) return FP_QNAN;
    if (fp_is_inf(a) && fp_is_inf(b)) return (sa == sb) ? a : FP_QNAN;
    if (fp_is_inf(a)) return a;
    if (fp_is_inf(b)) return b;
    if (fp_is_zero(a) && fp_is_zero(b)) return {sa & sb, 31'h0};
    if (fp_is_zero(a)) return b;
    if (fp_is_zero(b)) return a;
    // order by magnitude: l is the larger operand
    if (a[30:0] >= b[30:0]) begin
      sl = sa; el = a[30:23]; ml = {1'b1, a[22:0]};
      ss = sb; es = b[30:23]; ms = {1'b1, b[22:0]};
    end else begin
      sl = sb; el = b[30:23]; ml = {1'b1, b[22:0]};
      ss = sa; es = a[30:23]; ms = {1'b1, a[22:0]};
    end
    d  = el - es;
    // one carry bit, 24 significand bits, guard, round and sticky bits
    xl = {1'b0, ml, 3'b000};
    xs = {1'b0, ms, 3'b000};
    if (d >= 8'd27) begin
      sh = 28'd0;
      sticky = 1'b1;
    end else begin
      sh = xs >> d;
      sticky = ((sh << d) != xs);
    end
    sh[0] = sh[0] | sticky;
    if (sl == ss) r = xl + sh;
    else          r = xl - sh;
    if (r == '0) return 32'h0000_0000;
    e = 12'(el);
    if (r[27]) begin
      r = {1'b0, r[27:2], r[1] | r[0]};
      e = e + 12'sd1;
    end else begin
      lz = 0;
      for (int i = 26; i >= 0; i--) begin
        if (r[i]) break;
        lz++;
      end
      r = r << lz;
      e = e - 12'(lz);
    end
    return fp_round_pack(sl, e, r[26:3], r[2], r[1] | r[0]);
  endfunction

  function automatic fp32_t fp_sub_f(fp32_t a, fp32_t b);
    return fp_add_f(a, {~b[31], b[30:0]});
  endfunction

  function automatic fp32_t fp_mul_f(fp32_t a, fp32_t b);
    logic        s;
    logic [47:0] p;
    logic signed [11:0] e;
    s = a[31] ^ b[31];
    if (fp_is_nan(a) || fp_is_nan(b)) return FP_QNAN;
    if (fp_is_inf(a) || fp_is_inf(b)) begin
      if (fp_is_zero(a) || fp_is_zero(b)) return FP_QNAN;
      return {s, 8'hFF, 23'h0};
    end
    if (fp_is_zero(a) || fp_is_zero(b)) return {s, 31'h0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = 12'(a[30:23]) + 12'(b[30:23]) - 12'sd127;
    if (p[47]) return fp_round_pack(s, e + 12'sd1, p[47:24], p[23], |p[22:0]);
    else       return fp_round_pack(s, e, p[46:23], p[22], |p[21:0]);
  endfunction

  function automatic fp32_t fp_div_f(fp32_t a, fp32_t b);
    logic        s;
    logic [24:0] r;        // partial remainder, always < 2 * divisor
    logic [23:0] dv;       // divisor significand
    logic [26:0] q;        // quotient significand with 26 fraction bits
    logic signed [11:0] e;
    s = a[31] ^ b[31];
    if (fp_is_nan(a) || fp_is_nan(b)) return FP_QNAN;
    if (fp_is_inf(a)) return fp_is_inf(b) ? FP_QNAN : {s, 8'hFF, 23'h0};
    if (fp_is_inf(b)) return {s, 31'h0};
    if (fp_is_zero(b)) return fp_is_zero(a) ? FP_QNAN : {s, 8'hFF, 23'h0};
    if (fp_is_zero(a)) return {s, 31'h0};
    // restoring division of the significands, one quotient bit per step:
    // 0.5 < ma/mb < 2, so 27 bits cover the integer bit and 26 fraction bits
    dv = {1'b1, b[22:0]};
    r  = {1'b0, 1'b1, a[22:0]};
    for (int i = 26; i >= 0; i--) begin
      if (r >= {1'b0, dv}) begin
        q[i] = 1'b1;
        r    = r - {1'b0, dv};
      end else begin
        q[i] = 1'b0;
      end
      r = r << 1;
    end
    e = 12'(a[30:23]) - 12'(b[30:23]) + 12'sd127;
    if (q[26]) return fp_round_pack(s, e, q[26:3], q[2], q[1] | q[0] | (r != '0));
    else       return fp_round_pack(s, e - 12'sd1, q[25:2], q[1], q[0] | (r != '0));
  endfunction

  // a <= b; false if either is NaN, -0 == +0
  function automatic logic fp_le_f(fp32_t a, fp32_t b);
    logic [31:0] ka, kb;
    if (fp_is_nan(a) || fp_is_nan(b)) return 1'b0;
    if (fp_is_zero(a)) a = 32'h0;
    if (fp_is_zero(b)) b = 32'h0;
    // map to an unsigned key that orders like the real numbers
    ka = a[31] ? ~a : (a | 32'h8000_0000);
    kb = b[31] ? ~b : (b | 32'h8000_0000);
    return ka <= kb;
  endfunction

endpackage
