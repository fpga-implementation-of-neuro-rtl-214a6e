// fp32_pkg: IEEE-754 single precision arithmetic used by every datapath of
// the neuro-fuzzy trainer.
//
// The whole design computes in 32-bit floating point, as the source design
// does. The arithmetic is written here as synthesizable functions so that a
// datapath register stage can hold one operation (add, multiply or divide).
// Each result is rounded to nearest, ties to even. This implementation's own
// simplifications: subnormal inputs and results are flushed to zero, there is
// no NaN (0/0 gives 0, x/0 gives a signed infinity) and an overflow gives a
// signed infinity. Comparison treats +0 and -0 as equal.
package fp32_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_ZERO    = 32'h0000_0000;
  localparam fp32_t FP_ONE     = 32'h3F80_0000;  //  1.0
  localparam fp32_t FP_NEG_ONE = 32'hBF80_0000;  // -1.0
  localparam fp32_t FP_POS_INF = 32'h7F80_0000;
  localparam fp32_t FP_MAX     = 32'h7F7F_FFFF;  // largest finite value

  function automatic logic fp_is_zero(fp32_t a);
    return a[30:23] == 8'd0;
  endfunction

  function automatic fp32_t fp_neg(fp32_t a);
    return fp_is_zero(a) ? FP_ZERO : {~a[31], a[30:0]};
  endfunction

  function automatic fp32_t fp_abs(fp32_t a);
    return {1'b0, a[30:0]};
  endfunction

  // Normalise and round. The value is mant / 2^47 * 2^e; sticky marks
  // non-zero bits already dropped below mant.
  function automatic fp32_t fp_round_pack(logic sign, int e, logic [47:0] mant, logic sticky);
    logic [47:0] m;
    logic [24:0] keep;
    logic        g, s, up;
    int          lz, be;
    if (mant == 48'd0) return FP_ZERO;
    lz = 0;
    for (int i = 47; i >= 0; i--) begin
      if (mant[i]) begin
        lz = 47 - i;
        break;
      end
    end
    m    = mant << lz;
    e    = e - lz;
    keep = {1'b0, m[47:24]};
    g    = m[23];
    s    = (|m[22:0]) | sticky;
    up   = g & (s | keep[0]);
    keep = keep + 25'(up);
    if (keep[24]) begin
      keep = keep >> 1;
      e    = e + 1;
    end
    be = e + 127;
    if (be >= 255) return {sign, FP_POS_INF[30:0]};
    if (be <= 0)   return FP_ZERO;
    return {sign, be[7:0], keep[22:0]};
  endfunction

  function automatic fp32_t fp_add(fp32_t a, fp32_t b);
    fp32_t       big, sml;
    logic [47:0] mb, mbs, ms;
    logic        sticky;
    int          d;
    if (fp_is_zero(a)) return fp_is_zero(b) ? FP_ZERO : b;
    if (fp_is_zero(b)) return a;
    if (a[30:0] >= b[30:0]) begin
      big = a; sml = b;
    end else begin
      big = b; sml = a;
    end
    d   = int'(big[30:23]) - int'(sml[30:23]);
    mb  = {1'b0, 1'b1, big[22:0], 23'd0};
    mbs = {1'b0, 1'b1, sml[22:0], 23'd0};
    if (d > 47) begin
      sticky = 1'b1;
      mbs    = 48'd0;
    end else begin
      sticky = 1'b0;
      for (int i = 0; i < 48; i++)
        if (i < d && mbs[i]) sticky = 1'b1;
      mbs = mbs >> d;
    end
    mbs[0] = mbs[0] | sticky;
    if (big[31] == sml[31]) ms = mb + mbs;
    else                      ms = mb - mbs;
    return fp_round_pack(big[31], int'(big[30:23]) - 127 + 1, ms, 1'b0);
  endfunction

  function automatic fp32_t fp_sub(fp32_t a, fp32_t b);
    return fp_add(a, fp_neg(b));
  endfunction

  function automatic fp32_t fp_mul(fp32_t a, fp32_t b);
    logic [47:0] p;
    if (fp_is_zero(a) || fp_is_zero(b)) return FP_ZERO;
    p = {24'd0, 1'b1, a[22:0]} * {24'd0, 1'b1, b[22:0]};
    return fp_round_pack(a[31] ^ b[31], int'(a[30:23]) + int'(b[30:23]) - 254 + 1, p, 1'b0);
  endfunction

  function automatic fp32_t fp_div(fp32_t a, fp32_t b);
    logic [49:0] num, q, r;
    if (fp_is_zero(a)) return FP_ZERO;
    if (fp_is_zero(b)) return {a[31] ^ b[31], FP_POS_INF[30:0]};
    num = {1'b1, a[22:0], 26'd0};
    q   = num / {26'd0, 1'b1, b[22:0]};
    r   = num % {26'd0, 1'b1, b[22:0]};
    return fp_round_pack(a[31] ^ b[31], int'(a[30:23]) - int'(b[30:23]) + 21,
                         q[47:0], r != 50'd0);
  endfunction

  // Division by two: exponent decrement (the "div2" of the fitness unit).
  function automatic fp32_t fp_half(fp32_t a);
    if (a[30:23] <= 8'd1) return FP_ZERO;
    return {a[31], a[30:23] - 8'd1, a[22:0]};
  endfunction

  // Signed 32-bit integer to float.
  function automatic fp32_t fp_from_int(logic signed [31:0] v);
    logic [47:0] m;
    m = v[31] ? {16'd0, 32'(-v)} : {16'd0, v};
    return fp_round_pack(v[31], 47, m, 1'b0);
  endfunction

  // a < b
  function automatic logic fp_lt(fp32_t a, fp32_t b);
    logic za, zb;
    za = fp_is_zero(a);
    zb = fp_is_zero(b);
    if (za && zb) return 1'b0;
    if (za) return ~b[31];
    if (zb) return a[31];
    if (a[31] != b[31]) return a[31];
    if (a[31]) return a[30:0] > b[30:0];
    return a[30:0] < b[30:0];
  endfunction

  // Clamp a to the interval [lo, hi] (the "Restriction" operation).
  function automatic fp32_t fp_clamp(fp32_t a, fp32_t lo, fp32_t hi);
    if (fp_lt(hi, a)) return hi;
    if (fp_lt(a, lo)) return lo;
    return a;
  endfunction

endpackage
