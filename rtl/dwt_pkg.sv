// dwt_pkg - shared constants and helper functions for the multiplier-free
// 1-level Daubechies discrete wavelet transform (DB2 by default, DB4 and DB5
// as larger filter banks).
//
// The low-pass analysis taps h[k] are the standard Daubechies values, e.g.
// for DB2 h = [(1+sqrt3), (3+sqrt3), (3-sqrt3), (1-sqrt3)] / (4*sqrt2).
// The high-pass taps follow from them as g[k] = (-1)^k * h[NT-1-k].
// The tables hold round(h * 2^F) for the two fixed-point formats used:
//   F = 16 for the distributed-arithmetic filters (Q5.16 words, 22 bits),
//   F = 11 for the residue-number-system filters (taps scaled by 2^11).
// Coefficient arrays are MAXTAPS long and zero-padded beyond the filter
// length NT. Tap values are standard wavelet constants; the sign convention
// of the high-pass filter is this design's choice.
package dwt_pkg;

  localparam int unsigned MAXTAPS = 10;       // longest supported filter (DB5)

  typedef int coef_t [MAXTAPS];

  typedef enum logic [1:0] {DB2 = 2'd0, DB4 = 2'd1, DB5 = 2'd2} wavelet_e;
  typedef enum logic {LOW_PASS = 1'b0, HIGH_PASS = 1'b1} branch_e;

  // round(h[k] * 2^16)
  localparam coef_t DB2_Q16 = '{31651, 54822, 14689, -8481, 0, 0, 0, 0, 0, 0};
  localparam coef_t DB4_Q16 = '{15098, 46848, 41345, -1834, -12258, 2021, 2155, -695, 0, 0};
  localparam coef_t DB5_Q16 = '{10492, 39573, 47468, 9072, -15879, -2113, 5084, -409, -824, 219};
  // round(h[k] * 2^11)
  localparam coef_t DB2_Q11 = '{989, 1713, 459, -265, 0, 0, 0, 0, 0, 0};
  localparam coef_t DB4_Q11 = '{472, 1464, 1292, -57, -383, 63, 67, -22, 0, 0};
  localparam coef_t DB5_Q11 = '{328, 1237, 1483, 284, -496, -66, 159, -13, -26, 7};

  // Filter length of a wavelet.
  function automatic int unsigned ntaps(wavelet_e w);
    case (w)
      DB4:     return 8;
      DB5:     return 10;
      default: return 4;
    endcase
  endfunction

  // Scaled taps of one branch: frac16 = 1 selects 2^16 scaling, else 2^11.
  function automatic coef_t taps(wavelet_e w, branch_e b, bit frac16);
    coef_t h, r;
    int unsigned nt;
    nt = ntaps(w);
    case (w)
      DB4:     h = frac16 ? DB4_Q16 : DB4_Q11;
      DB5:     h = frac16 ? DB5_Q16 : DB5_Q11;
      default: h = frac16 ? DB2_Q16 : DB2_Q11;
    endcase
    for (int unsigned k = 0; k < MAXTAPS; k++) begin
      if (b == LOW_PASS || k >= nt) r[k] = h[k];
      else                          r[k] = ((k % 2) == 0) ? h[nt-1-k] : -h[nt-1-k];
    end
    return r;
  endfunction

  // Non-negative remainder of a (possibly negative) integer: |v|_m.
  function automatic longint unsigned mod_pos(longint v, longint m);
    longint r;
    r = v % m;
    if (r < 0) r = r + m;
    return longint'(r);
  endfunction

endpackage
