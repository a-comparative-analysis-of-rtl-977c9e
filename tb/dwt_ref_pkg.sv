// dwt_ref_pkg - reference models used by the testbenches.
//
// Written independently of the RTL: the DB2 taps are recomputed from their
// closed form (1 +- sqrt3, 3 +- sqrt3) / (4 sqrt2) and rounded here, and the
// filters are evaluated directly as sums of products.
package dwt_ref_pkg;

  // DB2 low-pass tap k as a real number.
  function automatic real db2_h(int k);
    real s3, d;
    s3 = $sqrt(3.0);
    d  = 4.0 * $sqrt(2.0);
    case (k)
      0: return (1.0 + s3) / d;
      1: return (3.0 + s3) / d;
      2: return (3.0 - s3) / d;
      default: return (1.0 - s3) / d;
    endcase
  endfunction

  // DB2 high-pass tap: g[k] = (-1)^k h[3-k]
  function automatic real db2_g(int k);
    return ((k % 2) == 0 ? 1.0 : -1.0) * db2_h(3 - k);
  endfunction

  // round(tap * 2^f) for branch hp (0 = low, 1 = high)
  function automatic longint tap_int(bit hp, int k, int f);
    real v;
    v = (hp ? db2_g(k) : db2_h(k)) * (2.0 ** f);
    return longint'($rtoi(v + (v >= 0.0 ? 0.5 : -0.5)));
  endfunction

  // Exact integer filter output sum_k tap_int(k) * x[k].
  function automatic longint fir_exact(bit hp, int f, longint x0, longint x1, longint x2, longint x3);
    return tap_int(hp, 0, f) * x0 + tap_int(hp, 1, f) * x1
         + tap_int(hp, 2, f) * x2 + tap_int(hp, 3, f) * x3;
  endfunction

  // Distributed-arithmetic result for 22-bit Q5.16 samples: each bit column
  // partial sum is weighted by 2^(l-16) with floor rounding, the sign column
  // is subtracted and the total wraps to 22 bits.
  function automatic longint fir_daa(bit hp, longint x0, longint x1, longint x2, longint x3);
    longint xs [4];
    longint acc, col, p;
    xs = '{x0, x1, x2, x3};
    acc = 0;
    for (int l = 0; l < 22; l++) begin
      col = 0;
      for (int k = 0; k < 4; k++)
        if (((xs[k] >>> l) & 1) != 0) col += tap_int(hp, k, 16);
      if (l >= 16) p = col * (longint'(1) << (l - 16));
      else         p = col >>> (16 - l);
      acc += (l == 21) ? -p : p;
    end
    acc = acc & ((longint'(1) << 22) - 1);
    if (acc >= (longint'(1) << 21)) acc -= (longint'(1) << 22);
    return acc;
  endfunction

  function automatic longint modp(longint v, longint m);
    longint r;
    r = v % m;
    return (r < 0) ? r + m : r;
  endfunction

  // Daubechies low-pass taps for filter lengths 4 (DB2), 8 (DB4), 10 (DB5).
  function automatic real db_h(int nt, int k);
    real d4 [8]  = '{0.2303778133088965, 0.7148465705529157, 0.6308807679298589, -0.027983769416859854,
                     -0.18703481171909309, 0.030841381835560764, 0.0328830116668852, -0.010597401785069032};
    real d5 [10] = '{0.160102397974125, 0.6038292697974729, 0.7243085284385744, 0.13842814590110342,
                     -0.24229488706619015, -0.03224486958502952, 0.07757149384006515, -0.006241490213011705,
                     -0.012580751999015526, 0.003335725285001549};
    if (k < 0 || k >= nt) return 0.0;
    case (nt)
      8:       return d4[k];
      10:      return d5[k];
      default: return db2_h(k);
    endcase
  endfunction

  // round(tap * 2^f) of an nt-tap filter; high pass g[k] = (-1)^k h[nt-1-k]
  function automatic longint tapn(int nt, bit hp, int k, int f);
    real v;
    v = hp ? (((k % 2) == 0 ? 1.0 : -1.0) * db_h(nt, nt - 1 - k)) : db_h(nt, k);
    v = v * (2.0 ** f);
    return longint'($rtoi(v + (v >= 0.0 ? 0.5 : -0.5)));
  endfunction

  // Exact integer nt-tap filter; x[k] = x[n-k].
  function automatic longint firn_exact(int nt, bit hp, int f, longint x [10]);
    longint acc;
    acc = 0;
    for (int k = 0; k < nt; k++) acc += tapn(nt, hp, k, f) * x[k];
    return acc;
  endfunction

  // Distributed-arithmetic model of an nt-tap filter on 22-bit Q5.16 samples.
  function automatic longint firn_daa(int nt, bit hp, longint x [10]);
    longint acc, col, p;
    acc = 0;
    for (int l = 0; l < 22; l++) begin
      col = 0;
      for (int k = 0; k < nt; k++)
        if (((x[k] >>> l) & 1) != 0) col += tapn(nt, hp, k, 16);
      if (l >= 16) p = col * (longint'(1) << (l - 16));
      else         p = col >>> (16 - l);
      acc += (l == 21) ? -p : p;
    end
    acc = acc & ((longint'(1) << 22) - 1);
    if (acc >= (longint'(1) << 21)) acc -= (longint'(1) << 22);
    return acc;
  endfunction

endpackage
