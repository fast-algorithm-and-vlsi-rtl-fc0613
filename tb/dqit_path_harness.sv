// dqit_path_harness: drives one dqit_path with random transform units and
// checks every residual against the reference 2D inverse transform.
//
// MODE 0: random sizes (4x4 with random DCT/DST .. 32x32), random sets of
// coded 4x4 sub-blocks, sparse coefficients (many all-zero 4x1 rows), random
// idle cycles. MODE 1: dense 32x32 TUs back to back, every sub-block coded,
// one sub-block offered every cycle; the harness measures the cycles from
// the first input to the last output. Each output unit is checked for its
// size, its unit index and its 16 residuals (slot p = residual row
// unit_col(size, unit, p), column unit_row(size, unit, p)).
// Results and event counts are given out on ports for the testbench.
module dqit_path_harness
  import hevc_tr_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int QTD  = 192,
  parameter int TRD  = 192,
  parameter int MODE = 0,
  parameter int NTU  = 200
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        done,
  output int          checks,
  output int          failures,
  output int          cycles,      // MODE 1: first input to last output
  output logic [31:0] stall, qt_skip, trw_skip, trr_skip, ntu
);
  logic               in_valid = 0, in_ready, in_first = 0, in_last = 0, in_dst = 0;
  logic signed [15:0] in_coef [16];
  tu_size_e           in_size = TU4;
  logic [2:0]         in_sx = 0, in_sy = 0;
  logic               out_valid, out_last;
  tu_size_e           out_size;
  logic [5:0]         out_unit;
  logic signed [15:0] out_data [16];

  dqit_path #(.QT_DEPTH(QTD), .TR_DEPTH(TRD), .BIT_DEPTH(8)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_coef, .in_size, .in_sx, .in_sy,
    .in_first, .in_last, .in_dst, .out_valid, .out_size, .out_unit, .out_last, .out_data,
    .cnt_stall(stall), .cnt_qt_skip(qt_skip), .cnt_trw_skip(trw_skip),
    .cnt_trr_skip(trr_skip), .cnt_tu(ntu));

  typedef struct {
    tu_size_e s;
    int       res [32][32];
  } tu_t;
  tu_t q[$];

  int     nchk = 0, nfail = 0;
  longint cyc = 0, t_first = -1, t_last = 0;
  int     exp_unit = 0;
  logic   gen_done = 0;
  always @(posedge clk) cyc <= cyc + 1;
  assign checks   = nchk;
  assign failures = nfail;
  assign cycles   = int'(t_last - t_first);
  assign done     = gen_done && (q.size() == 0);

  // ---------------- checker ----------------
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      t_last <= cyc;
      nchk++;
      if (q.size() == 0) begin
        nfail++;
        $display("[%m] output without a TU");
      end else begin
        if (out_size != q[0].s || int'(out_unit) != exp_unit) begin
          nfail++;
          $display("[%m] got size %0d unit %0d, expected size %0d unit %0d",
                   out_size, out_unit, q[0].s, exp_unit);
        end
        for (int p = 0; p < 16; p++) begin
          int r, c;
          r = unit_col(q[0].s, int'(out_unit), p);
          c = unit_row(q[0].s, int'(out_unit), p);
          nchk++;
          if (int'(out_data[p]) != q[0].res[r][c]) begin
            nfail++;
            if (nfail < 10) $display("[%m] unit %0d slot %0d (%0d,%0d): got %0d exp %0d",
                                     out_unit, p, r, c, out_data[p], q[0].res[r][c]);
          end
        end
        if (out_last) begin
          void'(q.pop_front());
          exp_unit = 0;
        end else exp_unit++;
      end
    end
  end

  // ---------------- driver ----------------
  initial begin
    int blk[32][32], res[32][32];
    tu_t e;
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    for (int t = 0; t < NTU; t++) begin
      int s, np, nsb, ncoded, dens;
      bit dst;
      bit coded [8][8];
      s   = (MODE == 1) ? 3 : int'($urandom % 4);
      np  = 4 << s;
      nsb = np / 4;
      dst = (s == 0) && ($urandom % 2);
      dens = (MODE == 1) ? 100 : int'($urandom % 60) + 5;
      ncoded = 0;
      for (int y = 0; y < 32; y++) for (int x = 0; x < 32; x++) blk[y][x] = 0;
      for (int sy = 0; sy < nsb; sy++)
        for (int sx = 0; sx < nsb; sx++) begin
          coded[sy][sx] = (MODE == 1) || (($urandom % 100) < 40) || (sx == 0 && sy == 0);
          if (coded[sy][sx]) begin
            ncoded++;
            for (int j = 0; j < 16; j++)
              if (int'($urandom % 100) < dens)
                blk[sy * 4 + j / 4][sx * 4 + j % 4] = int'($urandom % 601) - 300;
            // keep the sub-block coded: at least one non-zero value
            if (MODE == 1 || blk[sy * 4][sx * 4] == 0) blk[sy * 4][sx * 4] = 17;
          end
        end
      inv2d(np, dst, 7, 12, blk, res);
      e.s   = tu_size_e'(s);
      e.res = res;
      q.push_back(e);
      // send the coded sub-blocks in raster order of sub-blocks
      begin
        int k;
        k = 0;
        for (int sy = 0; sy < nsb; sy++)
          for (int sx = 0; sx < nsb; sx++)
            if (coded[sy][sx]) begin
              @(negedge clk);
              in_valid = 1;
              in_size  = tu_size_e'(s);
              in_dst   = dst;
              in_sx    = 3'(sx);
              in_sy    = 3'(sy);
              in_first = (k == 0);
              in_last  = (k == ncoded - 1);
              for (int j = 0; j < 16; j++) in_coef[j] = 16'(blk[sy * 4 + j / 4][sx * 4 + j % 4]);
              @(posedge clk);
              while (!in_ready) @(posedge clk);
              if (t_first < 0) t_first = cyc;
              k++;
              if (MODE == 0 && ($urandom % 6) == 0) begin
                @(negedge clk);
                in_valid = 0;
              end
            end
      end
    end
    @(negedge clk);
    in_valid = 0;
    gen_done = 1;
  end
endmodule
