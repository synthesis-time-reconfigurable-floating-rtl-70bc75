// Reference model for the floating-point unit testbenches.
//
// Works on formats of one sign bit, E exponent bits and M mantissa bits held
// in the low bits of a 64-bit word, with E and M as run-time arguments, so
// one model serves every format under test. Operands are decoded to a
// simulator 'real' (IEEE double), the operation is done in double, and the
// double is rounded to the target format here by integer arithmetic on its
// bit pattern (round to nearest, ties to even, by comparing the discarded
// bits with one half). Double has at least 2*(M+1)+2 significand bits for
// M <= 25, so the double result rounded again to the format is the correctly
// rounded result; for addition the error of the double sum is also tracked
// (two-sum) so that inexact is exact too. For larger M a second, exact model
// (ref_add_x, ref_mul_x, ref_i2f_x) does the arithmetic on 256-bit integers
// and serves every format up to double precision; float-to-integer is exact
// in double for all formats.
//
// The unit's conventions modelled here: denormal inputs read as zero; an
// overflow gives infinity, an underflow (detected after rounding) gives
// zero, both inexact; NaN results are the canonical quiet NaN; out-of-range
// float-to-integer conversions saturate and NaN converts to 0, both invalid.
// Flag vectors are {invalid, overflow, underflow, inexact}.
package fpu_ref_pkg;

  typedef logic [63:0] word_t;

  function automatic word_t qnan(int E, int M);
    word_t w = '0;
    for (int i = 0; i < E; i++) w[M + i] = 1'b1;
    w[M-1] = 1'b1;
    return w;
  endfunction

  function automatic word_t inf(int E, int M, bit s);
    word_t w = '0;
    for (int i = 0; i < E; i++) w[M + i] = 1'b1;
    w[E + M] = s;
    return w;
  endfunction

  function automatic word_t mask(int n);
    return (n >= 64) ? '1 : ((64'd1 << n) - 64'd1);
  endfunction

  // Field access.
  function automatic bit   f_sign(word_t w, int E, int M); return w[E + M];                 endfunction
  function automatic int   f_exp (word_t w, int E, int M); return int'((w >> M) & mask(E));  endfunction
  function automatic word_t f_man(word_t w, int E, int M); return w & mask(M);               endfunction

  function automatic bit is_nan(word_t w, int E, int M);
    return f_exp(w, E, M) == (1 << E) - 1 && f_man(w, E, M) != 0;
  endfunction
  function automatic bit is_snan(word_t w, int E, int M);
    return is_nan(w, E, M) && !w[M-1];
  endfunction
  function automatic bit is_inf(word_t w, int E, int M);
    return f_exp(w, E, M) == (1 << E) - 1 && f_man(w, E, M) == 0;
  endfunction
  function automatic bit is_zero(word_t w, int E, int M);
    return f_exp(w, E, M) == 0;
  endfunction

  // Value of a finite operand (denormals read as zero) as a double.
  function automatic real to_real(word_t w, int E, int M);
    word_t d;
    int    ue;
    if (is_zero(w, E, M)) return f_sign(w, E, M) ? -0.0 : 0.0;
    ue = f_exp(w, E, M) - ((1 << (E - 1)) - 1);
    d  = {f_sign(w, E, M), 11'(ue + 1023), 52'(f_man(w, E, M) << (52 - M))};
    return $bitstoreal(d);
  endfunction

  // Round a nonzero finite double to the format. 'extra' is set when the
  // true value lies strictly above the double's magnitude by less than one
  // of its ulps (the lost part of an inexact double computation).
  function automatic void round_to(real v, bit extra, int E, int M,
                                   output word_t r, output logic [3:0] fl);
    word_t d   = $realtobits(v);
    bit    s   = d[63];
    int    ue  = int'(d[62:52]) - 1023;
    word_t sig = {11'd0, 1'b1, d[51:0]};
    int    sh  = 52 - M;
    word_t kept = sig >> sh;
    word_t rem  = sig & mask(sh);
    word_t half = 64'd1 << (sh - 1);
    int    be;
    bit    up;
    up = (sh > 0) && ((rem > half) || (rem == half && (extra || kept[0])));
    kept = kept + word_t'(up);
    if (kept == (64'd1 << (M + 1))) begin
      kept = kept >> 1;
      ue++;
    end
    be = ue + ((1 << (E - 1)) - 1);
    fl = 4'b0000;
    if (be >= (1 << E) - 1) begin
      r  = inf(E, M, s);
      fl = 4'b0101;
    end else if (be <= 0) begin
      r  = word_t'(s) << (E + M);
      fl = 4'b0011;
    end else begin
      r  = (word_t'(s) << (E + M)) | (word_t'(be) << M) | (kept & mask(M));
      fl[0] = (rem != 0) || extra;
    end
  endfunction

  function automatic void ref_add(word_t a, word_t b, bit sub, int E, int M,
                                  output word_t r, output logic [3:0] fl);
    bit  sa = f_sign(a, E, M);
    bit  sb = f_sign(b, E, M) ^ sub;
    real x, y, s, bb, err;
    fl = 4'b0000;
    if (is_nan(a, E, M) || is_nan(b, E, M)) begin
      r = qnan(E, M);
      fl[3] = is_snan(a, E, M) || is_snan(b, E, M);
    end else if (is_inf(a, E, M) && is_inf(b, E, M) && sa != sb) begin
      r = qnan(E, M);
      fl[3] = 1'b1;
    end else if (is_inf(a, E, M)) r = inf(E, M, sa);
    else if (is_inf(b, E, M))     r = inf(E, M, sb);
    else begin
      x = to_real(a, E, M);
      y = to_real(b, E, M);
      if (sub) y = -y;
      s = x + y;
      if (x == 0.0 && y == 0.0) begin
        r = word_t'(sa && sb) << (E + M);
      end else if (s == 0.0) begin
        r = '0;
      end else begin
        // two-sum: err is exactly x + y - s
        bb  = s - x;
        err = (x - (s - bb)) + (y - bb);
        if (err != 0.0 && ((err > 0.0) != (s > 0.0))) begin
          // True magnitude is below |s|: step s one double ulp toward zero
          // and mark the remainder, so rounding sees the right side.
          word_t d = $realtobits(s);
          d = d - 64'd1;
          s = $bitstoreal(d);
        end
        round_to(s, err != 0.0, E, M, r, fl);
      end
    end
  endfunction

  function automatic void ref_mul(word_t a, word_t b, int E, int M,
                                  output word_t r, output logic [3:0] fl);
    bit sr = f_sign(a, E, M) ^ f_sign(b, E, M);
    fl = 4'b0000;
    if (is_nan(a, E, M) || is_nan(b, E, M)) begin
      r = qnan(E, M);
      fl[3] = is_snan(a, E, M) || is_snan(b, E, M);
    end else if ((is_inf(a, E, M) && is_zero(b, E, M)) ||
                 (is_inf(b, E, M) && is_zero(a, E, M))) begin
      r = qnan(E, M);
      fl[3] = 1'b1;
    end else if (is_inf(a, E, M) || is_inf(b, E, M)) r = inf(E, M, sr);
    else if (is_zero(a, E, M) || is_zero(b, E, M))   r = word_t'(sr) << (E + M);
    else round_to(to_real(a, E, M) * to_real(b, E, M), 1'b0, E, M, r, fl);
  endfunction

  function automatic void ref_f2i(word_t a, bit sgn, int E, int M, int IW,
                                  output word_t r, output logic [3:0] fl);
    real   x, t, lo, hi;
    bit    s = f_sign(a, E, M);
    word_t smax = mask(IW - 1);
    word_t smin = word_t'(1) << (IW - 1);
    word_t sat  = sgn ? (s ? smin : smax) : (s ? 64'd0 : mask(IW));
    fl = 4'b0000;
    r  = '0;
    if (is_nan(a, E, M)) begin
      fl[3] = 1'b1;
      return;
    end
    if (is_inf(a, E, M)) begin
      fl[3] = 1'b1;
      r = sat;
      return;
    end
    x  = to_real(a, E, M);
    t  = (x >= 0.0) ? $floor(x) : $ceil(x);
    // Representable range is [lo, hi): both bounds are powers of two, exact in double.
    lo = sgn ? -(2.0 ** (IW - 1)) : 0.0;
    hi = sgn ? (2.0 ** (IW - 1)) : (2.0 ** IW);
    if (t < lo || t >= hi) begin
      fl[3] = 1'b1;
      r = sat;
    end else begin
      if (t >= 2.0 ** 63) r = word_t'(longint'(t - 2.0 ** 63)) | (64'd1 << 63);
      else                r = word_t'(longint'(t));
      r  = r & mask(IW);
      fl[0] = (t != x);
    end
  endfunction

  function automatic void ref_i2f(word_t x, bit sgn, int E, int M, int IW,
                                  output word_t r, output logic [3:0] fl);
    real v;
    bit  neg = sgn && x[IW-1];
    word_t mag = neg ? ((~x + 64'd1) & mask(IW)) : (x & mask(IW));
    fl = 4'b0000;
    if (mag == 0) begin
      r = '0;
      return;
    end
    // Split in two halves so that magnitudes of up to 64 bits convert
    // exactly whenever they fit in 53 bits.
    v = real'(mag >> 32) * 4294967296.0 + real'(mag & 64'hFFFF_FFFF);
    if (neg) v = -v;
    round_to(v, 1'b0, E, M, r, fl);
  endfunction

  // ---------------------------------------------------------------------
  // Exact reference for any format up to 64 bits, double included. A value
  // is held as a 256-bit integer n times 2^k, the exact sum or product is
  // formed in integer arithmetic, and round_int rounds it to M+1 bits by
  // comparing the discarded bits with one half. Special operands reuse the
  // cases above, none of which needs rounding.
  // ---------------------------------------------------------------------
  typedef logic [255:0] big_t;

  function automatic void pack(bit s, int ue, word_t kept, bit inx, int E, int M,
                               output word_t r, output logic [3:0] fl);
    int be = ue + ((1 << (E - 1)) - 1);
    fl = 4'b0000;
    if (be >= (1 << E) - 1) begin
      r  = inf(E, M, s);
      fl = 4'b0101;
    end else if (be <= 0) begin
      r  = word_t'(s) << (E + M);
      fl = 4'b0011;
    end else begin
      r  = (word_t'(s) << (E + M)) | (word_t'(be) << M) | (kept & mask(M));
      fl[0] = inx;
    end
  endfunction

  // Round the nonzero value (-1)^s * n * 2^k.
  function automatic void round_int(bit s, big_t n, int k, int E, int M,
                                    output word_t r, output logic [3:0] fl);
    int    p = 255;
    int    sh;
    word_t kept;
    big_t  rb, hb;
    bit    up = 1'b0, inx = 1'b0;
    while (!n[p]) p--;
    if (p <= M) begin
      kept = word_t'(n) << (M - p);
    end else begin
      sh   = p - M;
      kept = word_t'(n >> sh);
      rb   = n & ((big_t'(1) << sh) - big_t'(1));
      hb   = big_t'(1) << (sh - 1);
      up   = (rb > hb) || (rb == hb && kept[0]);
      inx  = (rb != 0);
    end
    kept = kept + word_t'(up);
    if (kept == (64'd1 << (M + 1))) begin
      kept = kept >> 1;
      p++;
    end
    pack(s, p + k, kept, inx, E, M, r, fl);
  endfunction

  function automatic word_t f_sig(word_t w, int E, int M);
    return f_man(w, E, M) | (64'd1 << M);
  endfunction
  function automatic int f_k(word_t w, int E, int M);   // weight of the sig LSB
    return f_exp(w, E, M) - ((1 << (E - 1)) - 1) - M;
  endfunction

  function automatic void ref_add_x(word_t a, word_t b, bit sub, int E, int M,
                                    output word_t r, output logic [3:0] fl);
    bit   sa = f_sign(a, E, M);
    bit   sb = f_sign(b, E, M) ^ sub;
    int   ka, kb, d;
    bit   a_hi, s_hi, s_lo, sr;
    big_t n_hi, n_lo, n;
    if (is_nan(a, E, M) || is_nan(b, E, M) || is_inf(a, E, M) || is_inf(b, E, M) ||
        is_zero(a, E, M) || is_zero(b, E, M)) begin
      ref_add(a, b, sub, E, M, r, fl);
      return;
    end
    ka   = f_k(a, E, M);
    kb   = f_k(b, E, M);
    a_hi = (ka >= kb);
    d    = a_hi ? ka - kb : kb - ka;
    s_hi = a_hi ? sa : sb;
    s_lo = a_hi ? sb : sa;
    n_hi = big_t'(a_hi ? f_sig(a, E, M) : f_sig(b, E, M)) << 120;
    // Beyond 120 places the lower operand only acts as a sticky bit.
    n_lo = (d <= 120) ? big_t'(a_hi ? f_sig(b, E, M) : f_sig(a, E, M)) << (120 - d) : big_t'(1);
    if (s_hi == s_lo) begin
      n = n_hi + n_lo; sr = s_hi;
    end else if (n_hi >= n_lo) begin
      n = n_hi - n_lo; sr = s_hi;
    end else begin
      n = n_lo - n_hi; sr = s_lo;
    end
    if (n == 0) begin
      r = '0; fl = 4'b0000;
      return;
    end
    round_int(sr, n, (a_hi ? ka : kb) - 120, E, M, r, fl);
  endfunction

  function automatic void ref_mul_x(word_t a, word_t b, int E, int M,
                                    output word_t r, output logic [3:0] fl);
    if (is_nan(a, E, M) || is_nan(b, E, M) || is_inf(a, E, M) || is_inf(b, E, M) ||
        is_zero(a, E, M) || is_zero(b, E, M)) begin
      ref_mul(a, b, E, M, r, fl);
      return;
    end
    round_int(f_sign(a, E, M) ^ f_sign(b, E, M), big_t'(f_sig(a, E, M)) * big_t'(f_sig(b, E, M)),
              f_k(a, E, M) + f_k(b, E, M), E, M, r, fl);
  endfunction

  function automatic void ref_i2f_x(word_t x, bit sgn, int E, int M, int IW,
                                    output word_t r, output logic [3:0] fl);
    bit    neg = sgn && x[IW-1];
    word_t mag = neg ? ((~x + 64'd1) & mask(IW)) : (x & mask(IW));
    if (mag == 0) begin
      r = '0; fl = 4'b0000;
      return;
    end
    round_int(neg, big_t'(mag), 0, E, M, r, fl);
  endfunction

  // Random operand: mostly normal numbers over the whole exponent range,
  // with zeros, denormals, infinities and NaNs mixed in. With 'near' set
  // the exponent is drawn close to 'ref_exp' to provoke cancellation.
  function automatic word_t rand_fp(int E, int M, bit near, int ref_exp);
    word_t w;
    int    k = int'($urandom_range(99));
    int    ex;
    word_t man = {$urandom, $urandom} & mask(M);
    bit    s   = 1'($urandom);
    if (k < 4)       ex = 0;                       // zero or denormal
    else if (k < 7)  ex = (1 << E) - 1;            // infinity or NaN
    else if (near)   ex = ref_exp + int'($urandom_range(4)) - 2;
    else             ex = 1 + int'($urandom_range((1 << E) - 3));
    if (ex < 1 && k >= 7) ex = 1;
    if (ex > (1 << E) - 2 && k >= 7) ex = (1 << E) - 2;
    if (k < 2 || (k >= 4 && k < 6)) man = '0;      // exact zero, infinity
    w = (word_t'(s) << (E + M)) | (word_t'(ex) << M) | man;
    return w;
  endfunction

endpackage
