// maf_ref_pkg: reference model and stimulus helpers for the multiply-add
// testbenches.
//
// ref_fma computes X*Y + W (or X+W, X*Y) the long way: the exact product and
// addend as wide integers on a common scale, one exact addition, then a
// single round-to-nearest-even step, with the same conventions as the unit
// (subnormal operands read as zero, results whose normalized exponent is
// below 1 flushed to zero, quiet NaN 7FF8...). exact_norm gives the
// normalized 53-bit significand, round and sticky bits of a wide integer.
// rand_fp and near_neg draw operands for random tests.
//
// Timing: functions only, no clock. The rounding rule is the document's
// (nearest even); the special-case and flush conventions mirror this design's
// choices, so the RTL and the model are held to the same rules.
package maf_ref_pkg;

  typedef logic [767:0] big_t;

  localparam logic [63:0] QNAN64 = 64'h7FF8_0000_0000_0000;

  // Index of the most significant one (-1 for zero).
  function automatic int msb_of(input big_t v);
    int m = -1;
    for (int i = 0; i < 768; i++) if (v[i]) m = i;
    return m;
  endfunction

  // Normalize mag (weight of bit 0 is 2^lsb_exp): 53-bit significand with
  // its leading one at bit 52, first dropped bit, OR of the rest (and st_in),
  // and the exponent of the leading one.
  function automatic void exact_norm(input big_t mag, input int lsb_exp, input bit st_in,
                                     output int e_msb, output logic [52:0] man,
                                     output bit rnd, output bit sticky);
    int m = msb_of(mag);
    big_t mask;
    e_msb = lsb_exp + m;
    if (m >= 53) begin
      man    = 53'(mag >> (m - 52));
      rnd    = mag[m-53];
      mask   = (big_t'(1) << (m - 53)) - 1;
      sticky = ((mag & mask) != 0) || st_in;
    end else begin
      man    = 53'(mag << (52 - m));
      rnd    = 1'b0;
      sticky = st_in;
    end
  endfunction

  // Exact P + W or P - W with W = mw * 2^(52 + df) in units of the product's
  // LSB, normalized. e_rel is the position of the leading one relative to
  // bit 104 (the product's integer bit); neg tells that W was the larger in a
  // subtraction; zero is an exact zero.
  function automatic void ref_sum(input big_t P, input logic [52:0] mw, input int df,
                                  input bit eff_sub, output int e_rel,
                                  output logic [52:0] man, output bit rnd, output bit sticky,
                                  output bit neg, output bit zero);
    int wl = 52 + df;
    int e_base = (wl < 0) ? wl : 0;
    big_t A, B, S;
    bit stB = 0;
    int e_msb;
    if (e_base < -400) e_base = -400;
    A = P << (-e_base);
    if (mw == 0) B = '0;
    else if (wl >= e_base) B = big_t'(mw) << (wl - e_base);
    else begin B = '0; stB = 1'b1; end
    neg = 1'b0;
    if (!eff_sub) S = A + B;
    else if (A >= B) S = A - B - big_t'(stB);
    else begin S = B - A; neg = 1'b1; end
    zero = (S == 0) && !stB;
    if (zero) begin
      e_rel = 0;  man = '0;  rnd = 0;  sticky = 0;
      return;
    end
    exact_norm(S, e_base, stB, e_msb, man, rnd, sticky);
    e_rel = e_msb - 104;
  endfunction

  // Random split of P into two words whose sum is P modulo 2^106.
  function automatic void split(input logic [105:0] P, output logic [105:0] s, c,
                                output bit cout);
    logic [106:0] t;
    s = 106'({$urandom(), $urandom(), $urandom(), $urandom()});
    c = P - s;
    t = {1'b0, s} + {1'b0, c};
    cout = t[106];
  endfunction

  // Flags are {invalid, overflow, underflow, inexact}.
  // Exact widening of a binary32 value (subnormals read as zero).
  function automatic logic [63:0] widen32(input logic [31:0] a);
    if (a[30:23] == 0)    return {a[31], 63'd0};
    if (a[30:23] == 8'hFF) return {a[31], 11'h7FF, a[22:0], 29'd0};
    return {a[31], 11'(int'(a[30:23]) + 896), a[22:0], 29'd0};
  endfunction

  // Binary32 form of an exactly representable binary64 value, NaN -> 7FC00000.
  function automatic logic [63:0] narrow64(input logic [63:0] a);
    if (a[62:52] == 11'h7FF) return (a[51:0] != 0) ? 64'h7FC0_0000 : {32'd0, a[63], 8'hFF, 23'd0};
    if (a[62:52] == 0)       return {32'd0, a[63], 31'd0};
    return {32'd0, a[63], 8'(int'(a[62:52]) - 896), a[51:29]};
  endfunction

  // single = 1: x, y and w hold binary32 values in bits 31:0, the result is
  // rounded to binary32 and returned in bits 31:0.
  function automatic void ref_fma(input logic [1:0] op, input logic [63:0] x_in, y_in, w_in,
                                  output logic [63:0] res, output logic [3:0] flags,
                                  input bit single = 1'b0);
    logic [63:0] x, y, w;
    logic [63:0] yy, ww;
    bit sx, sy, sw, sp;
    int ex, ey, ew;
    bit zx, zy, zw, ix, iy, iw, nx, ny, nw, snan;
    big_t P, Wm, A, B, S;
    bit stA, stB, st, sign, rnd, sticky;
    int ep_l, ew_l, e_base, top, e_msb, be;
    logic [52:0] man;
    logic [53:0] man2;
    int bias, emax, cut;

    x = single ? widen32(x_in[31:0]) : x_in;
    y = single ? widen32(y_in[31:0]) : y_in;
    w = single ? widen32(w_in[31:0]) : w_in;
    bias = single ? 127 : 1023;
    emax = single ? 255 : 2047;
    cut  = single ? 29 : 0;

    yy = (op == 2'd2) ? 64'h3FF0_0000_0000_0000 : y;
    ww = (op == 2'd1) ? 64'h8000_0000_0000_0000 : w;
    sx = x[63];  sy = yy[63];  sw = ww[63];
    ex = int'(x[62:52]);  ey = int'(yy[62:52]);  ew = int'(ww[62:52]);
    zx = (ex == 0);  zy = (ey == 0);  zw = (ew == 0);
    ix = (ex == 2047) && (x[51:0] == 0);
    iy = (ey == 2047) && (yy[51:0] == 0);
    iw = (ew == 2047) && (ww[51:0] == 0);
    nx = (ex == 2047) && (x[51:0] != 0);
    ny = (ey == 2047) && (yy[51:0] != 0);
    nw = (ew == 2047) && (ww[51:0] != 0);
    snan = (nx && !x[51]) || (ny && !yy[51]) || (nw && !ww[51]);
    sp = sx ^ sy;
    flags = 4'b0000;

    res = '0;
    if (nx || ny || nw) begin
      res = QNAN64;  flags[3] = snan;
    end else if ((ix && zy) || (zx && iy)) begin
      res = QNAN64;  flags[3] = 1'b1;
    end else if ((ix || iy) && iw && (sp != sw)) begin
      res = QNAN64;  flags[3] = 1'b1;
    end else if (ix || iy) begin
      res = {sp, 11'h7FF, 52'd0};
    end else if (iw) begin
      res = ww;
    end else if (zx || zy) begin
      res = zw ? {sp & sw, 63'd0} : ww;
    end
    if (nx || ny || nw || ix || iy || iw || zx || zy) begin
      if (single) res = narrow64(res);
      return;
    end

    P    = big_t'({1'b1, x[51:0]}) * big_t'({1'b1, yy[51:0]});
    Wm   = zw ? big_t'(0) : big_t'({1'b1, ww[51:0]});
    ep_l = ex + ey - 2 * 1075;
    ew_l = ew - 1075;
    top  = (ep_l + 106 > ew_l + 53) ? ep_l + 106 : ew_l + 53;
    e_base = (ep_l < ew_l) ? ep_l : ew_l;
    if (top - e_base > 700) e_base = top - 700;

    stA = 0;  stB = 0;
    if (ep_l >= e_base) A = P << (ep_l - e_base);
    else begin
      A = ((e_base - ep_l) >= 200) ? big_t'(0) : (P >> (e_base - ep_l));
      stA = 1'b1;   // P is nonzero and only partly (or not at all) kept
      if ((e_base - ep_l) < 200 && ((A << (e_base - ep_l)) == P)) stA = 1'b0;
    end
    if (zw) B = '0;
    else if (ew_l >= e_base) B = Wm << (ew_l - e_base);
    else begin
      B = ((e_base - ew_l) >= 200) ? big_t'(0) : (Wm >> (e_base - ew_l));
      stB = 1'b1;
      if ((e_base - ew_l) < 200 && ((B << (e_base - ew_l)) == Wm)) stB = 1'b0;
    end

    if (zw || (sp == sw)) begin
      S = A + B;  sign = sp;
    end else if (A >= B) begin
      S = A - B - big_t'(stB);  sign = sp;
    end else begin
      S = B - A - big_t'(stA);  sign = sw;
    end
    st = stA || stB;

    if (S == 0 && !st) begin res = 64'd0; return; end

    exact_norm(S, e_base, st, e_msb, man, rnd, sticky);
    if (single) begin
      // Keep 24 bits; the rest joins round and sticky.
      sticky = sticky || rnd || ((man & 53'((64'd1 << 28) - 1)) != 0);
      rnd    = man[28];
      man    = man >> 29;
    end
    be = e_msb + bias;
    if (be < 1) begin
      res = single ? {32'd0, sign, 31'd0} : {sign, 63'd0};
      flags[1] = 1'b1;  flags[0] = 1'b1;  return;
    end
    man2 = {1'b0, man} + 54'(rnd && (sticky || man[0]));
    if (man2[53 - cut]) begin man2 = man2 >> 1; be = be + 1; end
    if (be >= emax) begin
      res = single ? {32'd0, sign, 8'hFF, 23'd0} : {sign, 11'h7FF, 52'd0};
      flags[2] = 1'b1;  flags[0] = 1'b1;  return;
    end
    res = single ? {32'd0, sign, 8'(be), man2[22:0]} : {sign, 11'(be), man2[51:0]};
    flags[0] = rnd || sticky;
  endfunction

  // Random binary64 value with biased exponent in [lo, hi].
  function automatic logic [63:0] rand_fp(input int lo, input int hi);
    logic [51:0] f;
    int e;
    f = {$urandom(), $urandom()};
    // Some fractions with long runs of ones or zeros.
    case ($urandom_range(0, 7))
      0: f = '1;
      1: f = '0;
      2: f = f & ~(52'((64'd1 << $urandom_range(1, 51)) - 1));
      3: f = f | 52'((64'd1 << $urandom_range(1, 51)) - 1);
      default: ;
    endcase
    e = $urandom_range(lo, hi);
    return {1'($urandom()), 11'(e), f};
  endfunction

  // Value close to -(x*y), so that x*y + w cancels: the binary64 product,
  // negated, with a few low bits of noise and an exponent moved by -1..+1.
  function automatic logic [63:0] near_neg(input logic [63:0] x, y);
    real p;
    logic [63:0] b;
    int e;
    p = $bitstoreal(x) * $bitstoreal(y);
    b = $realtobits(-p);
    case ($urandom_range(0, 3))
      0: ;
      1: b[20:0] = 21'($urandom());
      2: b[3:0]  = 4'($urandom());
      default: begin
        e = int'(b[62:52]) + $urandom_range(0, 3) - 1;
        if (e > 0 && e < 2047) b[62:52] = 11'(e);
      end
    endcase
    return b;
  endfunction

  // Value of a result handed over as two words normalized before their
  // addition: adds them, checks that the leading one is in the top four bits
  // (ok low otherwise; a zero sum is allowed) and gives the 53-bit
  // significand, round and sticky bits and the exponent correction (0..-3).
  function automatic void words_value(input logic [162:0] ws, wc, input bit st_in,
                                      output logic [52:0] man, output bit rnd, st,
                                      output int adj, output bit ok);
    logic [162:0] t;
    int lead = -1;
    t = ws + wc;
    for (int b = 0; b < 163; b++) if (t[b]) lead = b;
    ok  = (lead < 0) || (lead >= 159);
    adj = (lead < 0) ? -3 : lead - 162;
    t   = t << -adj;
    man = t[162:110];
    rnd = t[109];
    st  = (|t[108:0]) || st_in;
  endfunction

endpackage
