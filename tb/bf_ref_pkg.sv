// bf_ref_pkg: integer reference models of the BrainForest blocks for the
// testbenches. They use whole-word integer arithmetic, independent of the
// bit-serial and register-level structure of the RTL:
//   RAF filter   lp1 += (x*2^12 - lp1) >>> lam1; hp = x*2^12 - lp1;
//                lp2 += (hp - lp2) >>> lam2;     y = sat16(lp2 >>> 12)
//   RAF firing   half-wave when y < A - A_HYST (restarts count and A);
//                it fires if samples since the previous half-wave >= D_TH
//   EDM          Y = Y - (Y >> alpha) + x,  y = Y >> alpha   (Y = 2^alpha y)
//   tree         (y > CP) xor pol
//   weights      w0 = w_max * 2^8,  w(m+1) = w(m) - (w(m) >> lam), out w >> 8
package bf_ref_pkg;

  typedef struct {
    longint lp1, lp2;
    longint a, cnt;
    longint mag;
    bit     fire;
    longint y;
  } raf_state_t;

  function automatic longint sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  // One sample through filter and firing logic.
  function automatic void raf_step(ref raf_state_t s, input longint x,
                                   input int lam1, input int lam2,
                                   input longint a_hyst, input longint d_th);
    longint xs, hp, elapsed;
    xs    = x * 4096;
    s.lp1 = s.lp1 + ((xs - s.lp1) >>> lam1);
    hp    = xs - s.lp1;
    s.lp2 = s.lp2 + ((hp - s.lp2) >>> lam2);
    s.y   = sat16(s.lp2 >>> 12);
    elapsed = (s.cnt >= 65535) ? 65535 : s.cnt + 1;
    s.fire  = (s.y < s.a - a_hyst) && (elapsed >= d_th);
    if (s.y < s.a - a_hyst) begin
      if (s.fire) s.mag = (s.a < 0) ? 0 : s.a;
      s.cnt = 0;
      s.a   = s.y;
    end else begin
      s.cnt = elapsed;
      if (s.y > s.a) s.a = s.y;
    end
  endfunction

  function automatic void raf_reset(ref raf_state_t s);
    s.lp1 = 0; s.lp2 = 0; s.a = 0; s.cnt = 0; s.mag = 0; s.fire = 0; s.y = 0;
  endfunction

  function automatic int clamp_alpha(int alpha);
    return (alpha > 16) ? 16 : alpha;
  endfunction

  function automatic longint edm_step(longint y_scaled, longint x, int alpha);
    return y_scaled - (y_scaled >> clamp_alpha(alpha)) + x;
  endfunction

  function automatic bit tree_vote(longint y_scaled, int alpha, longint cp, bit pol);
    return ((y_scaled >> clamp_alpha(alpha)) > cp) ^ pol;
  endfunction

  // Regenerated weight of stream position m.
  function automatic longint weight_at(longint w_max, int lam, int m);
    longint w = w_max * 256;
    for (int i = 0; i < m; i++) w = w - (w >> lam);
    return w >> 8;
  endfunction

endpackage
