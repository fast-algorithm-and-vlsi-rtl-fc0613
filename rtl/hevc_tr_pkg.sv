// hevc_tr_pkg: types and constant functions shared by the transform and
// de-quantization hardware.
//
// * tu_size_e     : transform-unit size code (4x4 .. 32x32).
// * tcoef()       : entry T_N[k][n] of the HEVC N-point core transform matrix.
//                   Every entry of every size is one value of a 33-entry table
//                   indexed by the angle k*(2n+1) mod 128, with a sign fold; the
//                   matrices of the smaller sizes are sub-sampled rows of T_32.
// * dst4coef()    : entry of the 4x4 DST used for intra luma 4x4 blocks.
// * qt_bank/qt_addr : bank and word of a de-quantized coefficient in the
//                   16-bank QT buffer (reordered mapping, so that IT1 reads one
//                   block / two rows / one row / half a row of a TU4/8/16/32 in
//                   one word).
// * tr_bank/tr_addr : bank and word of an IT1 result in the 16-bank transpose
//                   buffer (reordered mapping, so that IT2 reads one block /
//                   two columns / one column / half a column in one cycle).
// The two mapping tables follow the document; the coefficient values are
// those of the HEVC standard.
package hevc_tr_pkg;

  typedef enum logic [1:0] {TU4 = 2'd0, TU8 = 2'd1, TU16 = 2'd2, TU32 = 2'd3} tu_size_e;

  // Points of a TU size and the 16-coefficient words a TU occupies.
  function automatic int tu_points(tu_size_e s);
    return 4 << s;
  endfunction

  function automatic int tu_words16(tu_size_e s);
    return ((4 << s) * (4 << s)) / 16;
  endfunction

  // |T_32| values by angle index m (cos(m*pi/64) scaled, as in HEVC).
  function automatic int cos_tab(int m);
    case (m)
      0: return 90;  1: return 90;  2: return 90;  3: return 90;
      4: return 89;  5: return 88;  6: return 87;  7: return 85;
      8: return 83;  9: return 82; 10: return 80; 11: return 78;
     12: return 75; 13: return 73; 14: return 70; 15: return 67;
     16: return 64; 17: return 61; 18: return 57; 19: return 54;
     20: return 50; 21: return 46; 22: return 43; 23: return 38;
     24: return 36; 25: return 31; 26: return 25; 27: return 22;
     28: return 18; 29: return 13; 30: return  9; 31: return  4;
     default: return 0;
    endcase
  endfunction

  // T_N[k][n], N in {4,8,16,32}.
  function automatic int tcoef(int npts, int k, int n);
    int kk, m;
    kk = k * (32 / npts);
    if (kk == 0) return 64;
    m = (kk * (2 * n + 1)) % 128;
    if (m <= 32)      return  cos_tab(m);
    else if (m <= 64) return -cos_tab(64 - m);
    else if (m <= 96) return -cos_tab(m - 64);
    else              return  cos_tab(128 - m);
  endfunction

  // 4x4 DST matrix entry M[k][n].
  function automatic int dst4coef(int k, int n);
    int t[16] = '{29, 55, 74, 84, 74, 74, 0, -74, 84, -29, -74, 55, 55, -84, 74, -29};
    return t[k * 4 + n];
  endfunction

  // ---- QT buffer mapping (write side: 4x4 sub-block sx,sy, raster index n) ----
  function automatic int qt_bank(tu_size_e s, int sx, int n);
    case (s)
      TU4:     return n;
      TU8:     return (sx == 0) ? n : (n + 8) % 16;
      TU16:    return (n + sx * 4) % 16;
      default: return (n + (sx % 4) * 4) % 16;
    endcase
  endfunction

  function automatic int qt_addr(tu_size_e s, int sx, int sy, int n);
    case (s)
      TU4:     return 0;
      TU8:     return n / 8 + sy * 2;
      TU16:    return n / 4 + sy * 4;
      default: return n / 4 + (sx / 4) * 4 + sy * 8;
    endcase
  endfunction

  // ---- Transpose buffer mapping (row r, column c of the IT1 result) ----
  function automatic int tr_bank(tu_size_e s, int r, int c);
    case (s)
      TU4:     return c + r * 4;
      TU8:     return (c + (r % 2) * 8 + (r / 2) * 2) % 16;
      default: return (c + r) % 16;
    endcase
  endfunction

  function automatic int tr_addr(tu_size_e s, int r, int c);
    case (s)
      TU4:     return 0;
      TU8:     return r / 2;
      TU16:    return r;
      default: return r * 2 + c / 16;
    endcase
  endfunction

  // Position (row, col) inside a TU of slot p (0..15) of word w of a
  // "row unit" as read by IT1 from the QT buffer / written by IT1 into the
  // transpose buffer: one block, two rows, one row or half a row.
  function automatic int unit_row(tu_size_e s, int w, int p);
    case (s)
      TU4:     return p / 4;
      TU8:     return w * 2 + p / 8;
      TU16:    return w;
      default: return w / 2;
    endcase
  endfunction

  function automatic int unit_col(tu_size_e s, int w, int p);
    case (s)
      TU4:     return p % 4;
      TU8:     return p % 8;
      TU16:    return p;
      default: return (w % 2) * 16 + p;
    endcase
  endfunction

  // QT buffer word that holds unit u (IT1 processing order) of a TU.
  function automatic int qt_unit_addr(tu_size_e s, int u);
    case (s)
      TU4:     return 0;
      TU8:     return u;
      TU16:    return u;
      default: return ((u / 2) % 4) + (u % 2) * 4 + ((u / 2) / 4) * 8;
    endcase
  endfunction

  // Reordered parallel-in serial-out (RPISO) output order of the 4-pixel
  // 1D IDCT: index of the output in slot 0..3 of cycle c. Each cycle emits
  // the two butterfly pairs X[b], X[N-1-b] that share one even and one odd
  // result; the N-point engine cycles are reused twice by the 2N-point one.
  function automatic int rpiso_idx(tu_size_e s, int c, int slot);
    int s8, a, b;
    s8 = 0; a = 0; b = 0;
    case (s)
      TU4: return slot;
      TU8: begin
        s8 = c;
        case (slot) 0: return s8; 1: return 7 - s8; 2: return 3 - s8; default: return 4 + s8; endcase
      end
      TU16: begin
        s8 = c / 2;
        a  = (c % 2 != 0) ? 3 - s8 : s8;
        case (slot) 0: return a; 1: return 15 - a; 2: return 7 - a; default: return 8 + a; endcase
      end
      default: begin
        s8 = c / 4;
        a  = ((c / 2) % 2 != 0) ? 3 - s8 : s8;
        b  = (c % 2 != 0) ? 7 - a : a;
        case (slot) 0: return b; 1: return 31 - b; 2: return 15 - b; default: return 16 + b; endcase
      end
    endcase
  endfunction

  // Raster position (y*4 + x) of scan position n inside a 4x4 sub-block.
  // scan: 0 up-right diagonal, 1 horizontal, 2 vertical (HEVC scanIdx).
  function automatic int scan4_pos(logic [1:0] scan, int n);
    int diag[16] = '{0, 4, 1, 8, 5, 2, 12, 9, 6, 3, 13, 10, 7, 14, 11, 15};
    case (scan)
      2'd1:    return n;
      2'd2:    return (n % 4) * 4 + n / 4;
      default: return diag[n];
    endcase
  endfunction

endpackage
