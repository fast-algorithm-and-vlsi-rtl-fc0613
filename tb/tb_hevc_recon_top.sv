// tb_hevc_recon_top: end-to-end test of the top with its default parameters.
//
// Two independent streams run at the same time:
//  * DQ + 16-pixel IT: random luma and chroma TUs (4x4 DCT/DST .. 32x32
//    luma, up to 16x16 chroma) made of random HEVC sub-block syntax
//    elements (significance, greater1/greater2 flags, signs, remaining
//    values, random QP and scan). Each coded sub-block is sent in
//    max(1, ceil(M/4)) beats. Every residual of both paths is compared with
//    the reference: HEVC de-quantization, then the 2D inverse transform.
//  * 4-pixel 2D IDCT: a mixed stream of 4x4 .. 32x32 blocks, with a run of
//    32x32 blocks; every residual is compared with the reference.
// Mechanisms counted; the test fails if one never happened:
//   multi-beat sub-blocks (more than 4 remaining values), DQ back-pressure,
//   path input stall (QT buffer full or FIFO full), QT read skip, transpose
//   write skip, transpose read skip, DST TUs, chroma TUs, 32x32 luma TUs,
//   4-pixel IDCT input stall, both transpose-memory modes (block count >= 2),
//   and the full-rate 32x32 stream (blocks 256 cycles apart).
//  * 1D forward DCT: 200 random rows of all sizes with output
//    back-pressure (counted); every output is compared with the matrix
//    product.
module tb_hevc_recon_top;
  import hevc_tr_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  initial begin              // a reset edge at the start, released after 3 cycles
    #1 rst_n = 0;
    #30 rst_n = 1;
  end
  always #5 clk = ~clk;

  // ---- 4-pixel IDCT ports ----
  logic               t_in_valid = 0, t_in_ready, t_out_valid;
  tu_size_e           t_in_size = TU4, t_out_size;
  logic signed [15:0] t_in_coef [32];
  logic [4:0]         t_out_col, t_out_row [4];
  logic signed [15:0] t_out_data [4];
  // ---- DQ + IT ports ----
  logic               d_in_valid = 0, d_in_ready, d_in_last_beat;
  logic [15:0]        d_in_sig = 0, d_in_gt1 = 0, d_in_gt2 = 0, d_in_sign = 0;
  logic [1:0]         d_in_scan = 0, d_in_comp = 0;
  logic [5:0]         d_in_qp = 0;
  tu_size_e           d_in_size = TU4;
  logic [15:0]        d_in_rem [4];
  logic [2:0]         d_in_sx = 0, d_in_sy = 0;
  logic               d_in_first = 0, d_in_last = 0, d_in_dst = 0;
  logic               y_valid, y_last, c_valid, c_last;
  tu_size_e           y_size, c_size;
  logic [5:0]         y_unit, c_unit;
  logic signed [15:0] y_data [16], c_data [16];
  logic [31:0]        cnt_stall [2], cnt_qt_skip [2], cnt_trw_skip [2], cnt_trr_skip [2], cnt_tu [2];

  // ---- forward DCT ports ----
  logic               f_in_valid = 0, f_in_ready, f_out_valid, f_out_ready = 1, f_out_last;
  tu_size_e           f_in_size = TU4, f_out_size;
  logic signed [15:0] f_in_x [32];
  logic [2:0]         f_out_cyc;
  logic signed [31:0] f_out_data [4];

  hevc_recon_top dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters of the testbench
  int n_multibeat = 0, n_dq_bp = 0, n_dst = 0, n_chroma = 0, n_l32 = 0, n_t_stall = 0;
  int n_tblk = 0, n_fullrate = 0;
  always @(posedge clk) begin
    if (rst_n && d_in_valid && !d_in_ready) n_dq_bp++;
    if (rst_n && t_in_valid && !t_in_ready) n_t_stall++;
  end

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #5000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ================= DQ + IT stream =================
  typedef struct {
    tu_size_e s;
    int       res [32][32];
  } tu_t;
  tu_t qy[$], qc[$];
  localparam int NTU = 160;
  logic d_done = 0;

  initial begin
    int blk[32][32], res[32][32];
    tu_t e;
    for (int j = 0; j < 4; j++) d_in_rem[j] = '0;
    @(posedge rst_n);
    repeat (3) @(posedge clk);
    for (int t = 0; t < NTU; t++) begin
      int comp, s, np, nsb, qp, scan, ncoded, k;
      bit dst;
      bit coded [8][8];
      sblk_t sb [8][8];
      comp = ($urandom % 10 < 6) ? 0 : 1 + int'($urandom % 2);
      s    = (comp == 0) ? int'($urandom % 4) : int'($urandom % 3);
      if (t < 3) begin comp = 0; s = 3; end          // a few dense 32x32 TUs first
      np   = 4 << s;
      nsb  = np / 4;
      dst  = (comp == 0) && (s == 0) && ($urandom % 2);
      qp   = int'($urandom % 40);
      scan = int'($urandom % 3);
      ncoded = 0;
      for (int y = 0; y < 32; y++) for (int x = 0; x < 32; x++) blk[y][x] = 0;
      for (int sy = 0; sy < nsb; sy++)
        for (int sx = 0; sx < nsb; sx++) begin
          coded[sy][sx] = (t < 3) || ($urandom % 100 < 35) || (sx == 0 && sy == 0);
          if (coded[sy][sx]) begin
            ncoded++;
            do sb[sy][sx] = rand_sblk(5 + int'($urandom % 90), ($urandom % 6) == 0);
            while (sb[sy][sx].sig == 0);
            for (int n = 0; n < 16; n++) begin
              int pos;
              pos = scanpos(scan, n);
              blk[sy * 4 + pos / 4][sx * 4 + pos % 4] =
                dequant(trans_level(sb[sy][sx], n), qp, s + 2, 8);
            end
          end
        end
      inv2d(np, dst, 7, 12, blk, res);
      e.s = tu_size_e'(s);
      e.res = res;
      if (comp == 0) qy.push_back(e); else qc.push_back(e);
      if (dst) n_dst++;
      if (comp != 0) n_chroma++;
      if (comp == 0 && s == 3) n_l32++;
      k = 0;
      for (int sy = 0; sy < nsb; sy++)
        for (int sx = 0; sx < nsb; sx++)
          if (coded[sy][sx]) begin
            int c[16], m, beats;
            m = 0;
            for (int n = 15; n >= 0; n--)
              if (sb[sy][sx].has_rem[n]) begin c[m] = sb[sy][sx].rem[n]; m++; end
            for (int j = m; j < 16; j++) c[j] = 0;
            beats = (m == 0) ? 1 : (m + 3) / 4;
            if (beats > 1) n_multibeat++;
            for (int b = 0; b < beats; b++) begin
              @(negedge clk);
              d_in_valid = 1;
              d_in_sig = sb[sy][sx].sig; d_in_gt1 = sb[sy][sx].gt1;
              d_in_gt2 = sb[sy][sx].gt2; d_in_sign = sb[sy][sx].sign;
              d_in_scan = 2'(scan); d_in_qp = 6'(qp); d_in_size = tu_size_e'(s);
              d_in_comp = 2'(comp); d_in_sx = 3'(sx); d_in_sy = 3'(sy);
              d_in_first = (k == 0); d_in_last = (k == ncoded - 1); d_in_dst = dst;
              for (int j = 0; j < 4; j++) d_in_rem[j] = 16'(c[4 * b + j]);
              #1;
              checks++;
              if (d_in_last_beat != (b == beats - 1)) begin
                failures++;
                $display("TU %0d: last-beat flag %0b at beat %0d of %0d", t, d_in_last_beat, b, beats);
              end
              // inputs change only at falling edges: ready is sampled
              // just after them
              while (!d_in_ready) begin
                @(negedge clk);
                #1;
              end
              @(posedge clk);
            end
            k++;
            if (($urandom % 8) == 0) begin
              @(negedge clk);
              d_in_valid = 0;
            end
          end
    end
    @(negedge clk);
    d_in_valid = 0;
    d_done = 1;
  end

  // checkers of the two paths
  int yu = 0, cu = 0;
  always @(posedge clk) begin
    if (rst_n && y_valid) check_unit(qy, y_size, y_unit, y_last, y_data, yu, "luma");
    if (rst_n && c_valid) check_unit(qc, c_size, c_unit, c_last, c_data, cu, "chroma");
  end

  task automatic check_unit(ref tu_t q[$], input tu_size_e s, input logic [5:0] u,
                            input logic last, input logic signed [15:0] d [16],
                            ref int exp_u, input string name);
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("%s: output without a TU", name);
      return;
    end
    if (s != q[0].s || int'(u) != exp_u) begin
      failures++;
      $display("%s: size %0d unit %0d, expected %0d %0d", name, s, u, q[0].s, exp_u);
    end
    for (int p = 0; p < 16; p++) begin
      int r, c;
      r = unit_col(q[0].s, int'(u), p);
      c = unit_row(q[0].s, int'(u), p);
      checks++;
      if (int'(d[p]) != q[0].res[r][c]) begin
        failures++;
        if (failures < 10) $display("%s: unit %0d (%0d,%0d) got %0d exp %0d", name, u, r, c, d[p], q[0].res[r][c]);
      end
    end
    if (last) begin
      void'(q.pop_front());
      exp_u = 0;
    end else exp_u++;
  endtask

  // ================= 4-pixel IDCT stream =================
  localparam int NBLK = 24;
  int tsz [NBLK];
  int tblk [NBLK][32][32];
  int tres [NBLK][32][32];
  logic t_done = 0;

  initial begin
    for (int b = 0; b < NBLK; b++) begin
      tsz[b] = (b >= 2 && b < 7) ? 3 : int'($urandom % 4);
      for (int r = 0; r < 32; r++)
        for (int c = 0; c < 32; c++)
          tblk[b][r][c] = (r < (4 << tsz[b]) && c < (4 << tsz[b]) && ($urandom % 3 == 0))
                          ? int'($urandom % 4096) - 2048 : 0;
      inv2d(4 << tsz[b], 1'b0, 7, 12, tblk[b], tres[b]);
    end
    for (int k = 0; k < 32; k++) t_in_coef[k] = '0;
    @(posedge rst_n);
    repeat (3) @(posedge clk);
    for (int b = 0; b < NBLK; b++)
      for (int r = 0; r < (4 << tsz[b]); r++) begin
        @(negedge clk);
        t_in_valid = 1;
        t_in_size  = tu_size_e'(tsz[b]);
        for (int k = 0; k < 32; k++) t_in_coef[k] = 16'(tblk[b][r][k]);
        #1;
        while (!t_in_ready) begin
          @(negedge clk);
          #1;
        end
        @(posedge clk);
      end
    @(negedge clk);
    t_in_valid = 0;
  end

  initial begin
    int b, cnt;
    longint t_first [NBLK];
    b = 0; cnt = 0;
    @(posedge rst_n);
    while (b < NBLK) begin
      @(posedge clk);
      if (t_out_valid) begin
        if (cnt == 0) t_first[b] = cyc;
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (int'(t_out_data[i]) != tres[b][t_out_row[i]][t_out_col]) begin
            failures++;
            if (failures < 10) $display("idct blk %0d r%0d c%0d got %0d exp %0d", b,
                                        t_out_row[i], t_out_col, t_out_data[i], tres[b][t_out_row[i]][t_out_col]);
          end
        end
        cnt += 4;
        if (cnt == (4 << tsz[b]) * (4 << tsz[b])) begin
          cnt = 0;
          b++;
          n_tblk++;
        end
      end
    end
    for (int k = 3; k < 7; k++) if (t_first[k] - t_first[k - 1] == 256) n_fullrate++;
    t_done = 1;
  end

  // ================= forward DCT stream =================
  // random rows of all sizes with random output back-pressure; every X[k]
  // is compared with the matrix product of the reference
  typedef struct { int n; int x[32]; } frow_t;
  frow_t qf[$];
  logic f_done = 0;
  int   n_f_bp = 0, n_frow = 0;
  always @(negedge clk) f_out_ready = ($urandom % 5 != 0);
  always @(posedge clk) begin
    if (rst_n && f_out_valid && !f_out_ready) n_f_bp++;
    if (rst_n && f_out_valid && f_out_ready) begin
      if (qf.size() == 0) begin
        failures++;
        $display("forward DCT output without a row");
      end else begin
        for (int i = 0; i < 4; i++) begin
          longint e;
          e = 0;
          for (int n = 0; n < qf[0].n; n++)
            e += longint'(tmat(qf[0].n, 4 * int'(f_out_cyc) + i, n)) * qf[0].x[n];
          checks++;
          if (longint'(f_out_data[i]) != e) begin
            failures++;
            if (failures < 20) $display("FDCT N=%0d X[%0d]: got %0d exp %0d",
                                        qf[0].n, 4 * int'(f_out_cyc) + i, f_out_data[i], e);
          end
        end
        if (f_out_last) begin
          void'(qf.pop_front());
          n_frow++;
        end
      end
    end
  end
  initial begin
    for (int n = 0; n < 32; n++) f_in_x[n] = 0;
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    for (int t = 0; t < 200; t++) begin
      frow_t r;
      r.n = 4 << (t % 4);
      @(negedge clk);
      f_in_valid = 1;
      f_in_size  = tu_size_e'(t % 4);
      for (int n = 0; n < 32; n++) begin
        r.x[n] = (n < r.n) ? int'($urandom % 511) - 255 : 0;
        f_in_x[n] = 16'(r.x[n]);
      end
      qf.push_back(r);
      #1;
      while (!f_in_ready) begin @(negedge clk); #1; end
      @(posedge clk);
    end
    @(negedge clk);
    f_in_valid = 0;
    f_done = 1;
  end

  // ================= end =================
  initial begin
    wait (d_done && t_done && f_done && qy.size() == 0 && qc.size() == 0 && qf.size() == 0);
    repeat (20) @(posedge clk);
    $display("DQ+IT: %0d luma TUs, %0d chroma TUs, %0d DST, %0d luma 32x32", cnt_tu[0], cnt_tu[1], n_dst, n_l32);
    $display("  multi-beat sub-blocks %0d, DQ back-pressure cycles %0d, path stalls %0d/%0d",
             n_multibeat, n_dq_bp, cnt_stall[0], cnt_stall[1]);
    $display("  QT quads skipped %0d/%0d, transpose writes skipped %0d/%0d, reads skipped %0d/%0d",
             cnt_qt_skip[0], cnt_qt_skip[1], cnt_trw_skip[0], cnt_trw_skip[1],
             cnt_trr_skip[0], cnt_trr_skip[1]);
    $display("IDCT: %0d blocks, input stall cycles %0d, full-rate 32x32 gaps %0d of 4",
             n_tblk, n_t_stall, n_fullrate);
    expect_true(cnt_tu[0] + cnt_tu[1] == NTU, "all TUs finished");
    expect_true(n_multibeat > 0, "multi-beat sub-blocks");
    expect_true(n_dq_bp > 0, "DQ back-pressure");
    expect_true(cnt_stall[0] + cnt_stall[1] > 0, "path input stall");
    expect_true(cnt_qt_skip[0] > 0 && cnt_qt_skip[1] > 0, "QT read skip (luma and chroma)");
    expect_true(cnt_trw_skip[0] > 0 && cnt_trw_skip[1] > 0, "transpose write skip");
    expect_true(cnt_trr_skip[0] > 0 && cnt_trr_skip[1] > 0, "transpose read skip");
    expect_true(n_dst > 0, "DST TUs");
    expect_true(n_chroma > 0, "chroma TUs");
    expect_true(n_l32 > 0, "32x32 luma TUs");
    expect_true(n_t_stall > 0, "4-pixel IDCT input stall");
    expect_true(n_tblk == NBLK && NBLK >= 2, "both transpose-memory modes used");
    expect_true(n_fullrate == 4, "32x32 blocks at full rate");
    $display("FDCT: %0d rows, output back-pressure cycles %0d", n_frow, n_f_bp);
    expect_true(n_frow == 200, "all forward DCT rows done");
    expect_true(n_f_bp > 0, "forward DCT output back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
