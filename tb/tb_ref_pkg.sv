// tb_ref_pkg: reference models for the testbenches, written independently of
// the RTL: the inverse transforms are plain matrix products (no butterflies),
// the matrix entries come from the 16 distinct values of the first column of
// the odd rows of the 32-point HEVC matrix, and the de-quantization follows
// the HEVC formula directly.
package tb_ref_pkg;

  // |cos| magnitudes for angle index m = 0..32 (m = 0 used only for k != 0)
  function automatic int mag(int m);
    int t[33] = '{90, 90, 90, 90, 89, 88, 87, 85, 83, 82, 80, 78, 75, 73, 70, 67,
                  64, 61, 57, 54, 50, 46, 43, 38, 36, 31, 25, 22, 18, 13, 9, 4, 0};
    return t[m];
  endfunction

  function automatic int tmat(int npts, int k, int n);
    int a, sgn;
    if (k == 0) return 64;
    a = (k * (64 / npts) * (2 * n + 1)) % 256;   // angle in units of pi/128
    // cos(a*pi/128), a even here; fold to 0..64 (units of pi/128)
    sgn = 1;
    if (a > 128) a = 256 - a;
    if (a > 64) begin a = 128 - a; sgn = -1; end
    return sgn * mag(a / 2);
  endfunction

  function automatic int dstm(int k, int n);
    int t[4][4] = '{'{29, 55, 74, 84}, '{74, 74, 0, -74}, '{84, -29, -74, 55}, '{55, -84, 74, -29}};
    return t[k][n];
  endfunction

  // full-precision 1D inverse transform x[n] = sum_k y[k] * T[k][n]
  function automatic longint inv1d(int npts, bit dst, int y[32], int n);
    longint acc = 0;
    for (int k = 0; k < npts; k++)
      acc += longint'(y[k]) * (dst ? dstm(k, n) : tmat(npts, k, n));
    return acc;
  endfunction

  function automatic int rshift_clip(longint v, int sh, int lo, int hi);
    longint t;
    t = (v + (longint'(1) << (sh - 1))) >>> sh;
    if (t > hi) return hi;
    if (t < lo) return lo;
    return int'(t);
  endfunction

  // 2D inverse transform of an npts x npts block (row transform first)
  function automatic void inv2d(int npts, bit dst, int sh1, int sh2,
                                input int blk[32][32], output int res[32][32]);
    int tmp[32][32];
    int v[32];
    for (int r = 0; r < npts; r++) begin
      for (int k = 0; k < 32; k++) v[k] = (k < npts) ? blk[r][k] : 0;
      for (int c = 0; c < npts; c++) tmp[r][c] = rshift_clip(inv1d(npts, dst, v, c), sh1, -32768, 32767);
    end
    for (int c = 0; c < npts; c++) begin
      for (int k = 0; k < 32; k++) v[k] = (k < npts) ? tmp[k][c] : 0;
      for (int r = 0; r < npts; r++) res[r][c] = rshift_clip(inv1d(npts, dst, v, r), sh2, -32768, 32767);
    end
  endfunction

  // One 4x4 sub-block of syntax elements, indexed by scan position n.
  typedef struct {
    bit [15:0] sig, gt1, gt2, sign;
    int        rem [16];    // remaining value by position (0 where none)
    bit [15:0] has_rem;     // position carries a remaining value
  } sblk_t;

  // Random sub-block that obeys HEVC's coding rules: greater1 flags only for
  // the first 8 significant coefficients in decoding order (n = 15 down to
  // 0), a greater2 flag only for the first one with greater1 set.
  function automatic sblk_t rand_sblk(int density, int big);
    sblk_t s;
    int nsig = 0, first_g1 = -1;
    s.sig = 0; s.gt1 = 0; s.gt2 = 0; s.sign = 0; s.has_rem = 0;
    for (int n = 15; n >= 0; n--) begin
      s.rem[n] = 0;
      if ($urandom % 100 < density) begin
        s.sig[n] = 1;
        s.sign[n] = $urandom % 2;
        if (nsig < 8) begin
          s.gt1[n] = ($urandom % 2);
          if (s.gt1[n] && first_g1 < 0) begin
            first_g1 = n;
            s.gt2[n] = $urandom % 2;
          end
        end
        nsig++;
      end
    end
    // Table 3-1: which coefficients carry coeff_abs_level_remaining
    nsig = 0;
    for (int n = 15; n >= 0; n--) begin
      if (s.sig[n]) begin
        int bl, thr;
        bl  = 1 + s.gt1[n] + s.gt2[n];
        thr = (nsig < 8) ? ((n == first_g1) ? 3 : 2) : 1;
        if (bl == thr) begin
          s.has_rem[n] = 1;
          s.rem[n] = big ? int'($urandom % 32768) : int'($urandom % 20);
        end
        nsig++;
      end
    end
    return s;
  endfunction

  function automatic int trans_level(sblk_t s, int n);
    int v;
    if (!s.sig[n]) return 0;
    v = 1 + s.gt1[n] + s.gt2[n] + s.rem[n];
    return s.sign[n] ? -v : v;
  endfunction

  // HEVC flat-matrix scaling of one level
  function automatic int dequant(int level, int qp, int log2n, int bitdepth);
    int ls[6] = '{40, 45, 51, 57, 64, 72};
    int bd;
    longint v;
    bd = bitdepth + log2n - 5;
    v = ((longint'(level) * 16 * ls[qp % 6]) <<< (qp / 6)) + (longint'(1) <<< (bd - 1));
    v = v >>> bd;
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic int scanpos(int scan, int n);
    int diag[16] = '{0, 4, 1, 8, 5, 2, 12, 9, 6, 3, 13, 10, 7, 14, 11, 15};
    if (scan == 1) return n;
    if (scan == 2) return (n % 4) * 4 + n / 4;
    return diag[n];
  endfunction

endpackage
