// dea_pkg: types, constants and IEEE-754 binary64 arithmetic shared by the
// differential-evolution engine.
//
// The engine stores every attribute, fitness value and coefficient as a
// 64-bit binary64 word. The functions below are the combinational cores of
// the floating-point units (fp64_addsub, fp64_mul, fp64_comp); the units
// wrap them in their pipeline registers.
//
// Arithmetic model (this design's choice; only the units' latency and
// precision come from the source design): round to nearest, ties to even;
// subnormal inputs are read as zero and subnormal results are flushed to a
// signed zero; overflow gives infinity; any NaN input, inf-inf and 0*inf
// give the quiet NaN FP_QNAN.
package dea_pkg;

  typedef logic [63:0] fp64_t;

  localparam fp64_t FP_ZERO    = 64'h0000_0000_0000_0000;
  localparam fp64_t FP_HALF    = 64'h3FE0_0000_0000_0000;  // 0.5
  localparam fp64_t FP_ONE     = 64'h3FF0_0000_0000_0000;  // 1.0
  localparam fp64_t FP_HUNDRED = 64'h4059_0000_0000_0000;  // 100.0
  localparam fp64_t FP_INF     = 64'h7FF0_0000_0000_0000;
  localparam fp64_t FP_QNAN    = 64'h7FF8_0000_0000_0000;

  // Objective functions of the benchmark set (encoding of func_sel).
  typedef enum logic [2:0] {
    FN_SPHERE      = 3'd0,  // f1
    FN_SCHWEFEL222 = 3'd1,  // f2
    FN_SCHWEFEL12  = 3'd2,  // f3
    FN_SCHWEFEL221 = 3'd3,  // f4
    FN_ROSENBROCK  = 3'd4,  // f5
    FN_STEP        = 3'd5   // f6
  } func_e;

  // States of the engine's control FSM (dea_top).
  typedef enum logic [4:0] {
    S_IDLE, S_RANGE, S_RANGE_W,
    S_INIT_X, S_INIT_XW, S_INIT_FIT, S_INIT_FITW, S_INIT_BEST,
    S_SEL_R1, S_SEL_R2, S_SEL_R3, S_JRAND,
    S_RD_I, S_DEC, S_RD_R2, S_RD_R3, S_RD_R3D, S_XO_W, S_NEXT_J,
    S_FIT, S_FIT_W, S_SELECT, S_WB, S_BEST, S_NEXT_I, S_CHECK
  } dea_state_e;

  // NaN: all-ones exponent and a non-zero fraction, i.e. |a| above infinity
  function automatic logic fp_is_nan(fp64_t a);
    return (a & 64'h7FFF_FFFF_FFFF_FFFF) > FP_INF;
  endfunction

  function automatic fp64_t fp_abs(fp64_t a);
    return a & 64'h7FFF_FFFF_FFFF_FFFF;
  endfunction

  // Round a normalised 56-bit significand {1.hidden, 52 frac, guard, round,
  // sticky} with biased exponent e (may be out of range) and pack it.
  function automatic fp64_t fp_round_pack(logic s, logic signed [13:0] e, logic [55:0] m);
    logic [53:0] r;      // {carry, hidden, fraction}
    logic signed [13:0] ex;
    logic up;
    up = m[2] & (m[1] | m[0] | m[3]);
    r  = {1'b0, m[55:3]} + {53'd0, up};
    ex = e;
    if (r[53]) begin
      r  = r >> 1;
      ex = ex + 14'sd1;
    end
    if (ex >= 14'sd2047) return {s, FP_INF[62:0]};
    if (ex <= 14'sd0)    return {s, 63'd0};
    return {s, ex[10:0], r[51:0]};
  endfunction

  function automatic fp64_t fp_add(fp64_t a, fp64_t b);
    logic        sa, sb, sl, ss;
    logic [10:0] ea, eb;
    logic [55:0] ml, ms, sh, msk;
    logic [56:0] sum;
    logic [11:0] d;
    logic signed [13:0] e;
    logic        a_zero, b_zero, a_inf, b_inf;
    logic        found;
    int          lz;
    sa = a[63]; sb = b[63];
    ea = a[62:52]; eb = b[62:52];
    a_zero = (ea == 11'd0);
    b_zero = (eb == 11'd0);
    a_inf  = (ea == 11'h7FF);
    b_inf  = (eb == 11'h7FF);
    if (fp_is_nan(a) || fp_is_nan(b)) return FP_QNAN;
    if (a_inf && b_inf) return (sa == sb) ? a : FP_QNAN;
    if (a_inf) return a;
    if (b_inf) return b;
    if (a_zero && b_zero) return {sa & sb, 63'd0};
    if (a_zero) return b;
    if (b_zero) return a;
    // order by magnitude: l is the larger operand
    if (a[62:0] >= b[62:0]) begin
      sl = sa; ss = sb; e = 14'(ea);
      ml = {1'b1, a[51:0], 3'b000};
      ms = {1'b1, b[51:0], 3'b000};
      d  = {1'b0, ea} - {1'b0, eb};
    end else begin
      sl = sb; ss = sa; e = 14'(eb);
      ml = {1'b1, b[51:0], 3'b000};
      ms = {1'b1, a[51:0], 3'b000};
      d  = {1'b0, eb} - {1'b0, ea};
    end
    // align the smaller significand, folding shifted-out bits into sticky
    if (d >= 12'd56) begin
      sh = 56'd1;
    end else begin
      msk = (56'd1 << d[5:0]) - 56'd1;
      sh  = (ms >> d[5:0]) | {55'd0, |(ms & msk)};
    end
    if (sl == ss) begin
      sum = {1'b0, ml} + {1'b0, sh};
      if (sum[56]) begin
        sum = {1'b0, sum[56:2], sum[1] | sum[0]};
        e   = e + 14'sd1;
      end
    end else begin
      sum = {1'b0, ml} - {1'b0, sh};
      if (sum == 57'd0) return FP_ZERO;
      lz    = 0;
      found = 1'b0;
      for (int k = 55; k >= 0; k--) begin
        if (sum[k]) found = 1'b1;
        else if (!found) lz++;
      end
      sum = sum << lz;
      e   = e - 14'(lz);
    end
    return fp_round_pack(sl, e, sum[55:0]);
  endfunction

  function automatic fp64_t fp_sub(fp64_t a, fp64_t b);
    return fp_add(a, {~b[63], b[62:0]});
  endfunction

  function automatic fp64_t fp_mul(fp64_t a, fp64_t b);
    logic         s;
    logic [10:0]  ea, eb;
    logic [105:0] p;
    logic [55:0]  m;
    logic signed [13:0] e;
    logic         a_zero, b_zero, a_inf, b_inf;
    s  = a[63] ^ b[63];
    ea = a[62:52]; eb = b[62:52];
    a_zero = (ea == 11'd0);
    b_zero = (eb == 11'd0);
    a_inf  = (ea == 11'h7FF);
    b_inf  = (eb == 11'h7FF);
    if (fp_is_nan(a) || fp_is_nan(b)) return FP_QNAN;
    if ((a_inf && b_zero) || (b_inf && a_zero)) return FP_QNAN;
    if (a_inf || b_inf) return {s, FP_INF[62:0]};
    if (a_zero || b_zero) return {s, 63'd0};
    p = {53'd0, 1'b1, a[51:0]} * {53'd0, 1'b1, b[51:0]};
    e = 14'(ea) + 14'(eb) - 14'sd1023;
    if (p[105]) begin
      m = {p[105:51], |p[50:0]};
      e = e + 14'sd1;
    end else begin
      m = {p[104:50], |p[49:0]};
    end
    return fp_round_pack(s, e, m);
  endfunction

  // a < b in IEEE order; false if either is NaN; -0 == +0.
  function automatic logic fp_lt(fp64_t a, fp64_t b);
    if (fp_is_nan(a) || fp_is_nan(b)) return 1'b0;
    if (a[62:0] == 63'd0 && b[62:0] == 63'd0) return 1'b0;
    if (a[63] != b[63]) return a[63];
    if (a[63] == 1'b0) return a[62:0] < b[62:0];
    return a[62:0] > b[62:0];
  endfunction

endpackage
