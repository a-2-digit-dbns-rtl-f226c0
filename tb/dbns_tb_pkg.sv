// dbns_tb_pkg -- reference helpers shared by the DBNS testbenches.
//
// Values are worked out in double-precision real arithmetic straight from
// the definition of a DBNS digit, s * 2^b * 3^t, independently of the ROM
// and shifter in the design. Random digits are drawn with $urandom inside
// caller-given exponent ranges.
package dbns_tb_pkg;
  import dbns_pkg::*;

  function automatic real pow2(int e);
    real r;
    r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real pow3(int e);
    real r;
    r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 3.0;
    else        for (int i = 0; i < -e; i++) r = r / 3.0;
    return r;
  endfunction

  function automatic real digit_val(dbns_digit_t d);
    real v;
    if (!d.nz) return 0.0;
    v = pow2(int'(d.b)) * pow3(int'(d.t));
    return d.neg ? -v : v;
  endfunction

  function automatic real word_val(dbns2_t w);
    return digit_val(w[0]) + digit_val(w[1]);
  endfunction

  function automatic int urange(int lo, int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  // Random digit; zero with probability 1/pzero (never if pzero is 0).
  function automatic dbns_digit_t rand_digit(int bmin, int bmax, int tmin, int tmax,
                                             int pzero);
    dbns_digit_t d;
    d.nz  = (pzero == 0) ? 1'b1 : (($urandom % pzero) != 0);
    d.neg = 1'($urandom);
    d.b   = DBNS_BW'(urange(bmin, bmax));
    d.t   = DBNS_TW'(urange(tmin, tmax));
    return d;
  endfunction

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // Greedy step: the DBNS digit (b in [-16,15], t in [-8,7]) closest to r,
  // smallest b then t on ties, zero if none is closer than zero.
  function automatic dbns_digit_t nearest(real r);
    dbns_digit_t best;
    real         a, e, be, v;
    a = fabs(r);
    best = DIGIT_ZERO;
    be = a;
    for (int b = -16; b <= 15; b++)
      for (int t = -8; t <= 7; t++) begin
        v = pow2(b) * pow3(t);
        e = fabs(a - v);
        if (e < be * (1.0 - 1e-12)) begin
          be = e;
          best.nz = 1'b1; best.neg = (r < 0.0);
          best.b = DBNS_BW'(b); best.t = DBNS_TW'(t);
        end
      end
    return best;
  endfunction

  // Greedy 2-digit form of r: nearest digit, then nearest to the remainder.
  function automatic dbns2_t to_dbns2(real r);
    dbns2_t w;
    w[0] = nearest(r);
    w[1] = nearest(r - digit_val(w[0]));
    return w;
  endfunction

endpackage
