// tpose_mem4: SRAM-based transpose memory of the 4-pixel 2D IDCT.
//
// Four two-port SRAM banks of 256 x 16 bit hold the IT1 (row transform)
// results of one 32x32 block; smaller blocks use the low addresses. Each
// cycle the writer stores the four results of one output cycle of a row and
// the reader fetches four results of one column, so every SRAM port is used
// every cycle (100% I/O utilization). Element (r, v) - row r, column slot v,
// where v = 4*k + i is slot i of IT1 output cycle k - goes to
//   bank (r + v) mod 4,
//   mode 0: address r*8 + v/4      mode 1: address v*8 + r/4.
// Four results of a row, or of a column (rows 4m..4m+3), always fall in four
// different banks. Successive blocks alternate between mode 0 and mode 1, so
// that element (r, c) of block N+1 lands where element (c, r) of block N
// was: row r of block N+1 may be written as soon as column r of block N has
// been read, and the memory needs no second block of space.
//
// Scheduling (the read-ahead pipelining of the document, generalised to
// any sequence of block sizes): a write of row r of block N+1 waits until
// column r of block N is fully read; a read of rows 4m..4m+3 of a column
// waits until those elements were written in an earlier cycle. For a 32x32
// stream this reproduces the document's schedule: column 0 of block N is
// read during the write of its last row, and column k+1 of block N is read
// while row k of block N+1 is written, with no stall. The generalisation to
// mixed sizes and the use of the IT1 output slot (rather than the natural
// column) as the column coordinate are this design's choices.
//
// Interface: write side valid/ready, in row order; the block size is taken
// with the first write of a block. Read side: a column group is issued when
// rd_ready is high and the data, with its labels, appears on rd_* one cycle
// later with rd_valid.
module tpose_mem4
  import hevc_tr_pkg::*;
#(
  parameter int W     = 16,   // width of one IT1 result
  parameter int DEPTH = 256   // words per bank: 32*32/4
) (
  input  logic          clk,
  input  logic          rst_n,
  // write side (IT1 results, one output cycle of a row per beat)
  input  logic          wr_valid,
  output logic          wr_ready,
  input  tu_size_e      wr_size,
  input  logic [W-1:0]  wr_data [4],
  // read side (one column group per beat)
  input  logic          rd_ready,
  output logic          rd_fire,      // a column group is issued this cycle
  output logic          rd_fire_last, // ... and it is the last group of its column
  output logic          rd_valid,
  output tu_size_e      rd_size,
  output logic [4:0]    rd_vcol,     // column slot v
  output logic [2:0]    rd_grp,      // row group m: rows 4m..4m+3
  output logic          rd_col_last, // last group of the column
  output logic [W-1:0]  rd_data [4]  // rows 4m+0..4m+3
);
  localparam int AW = $clog2(DEPTH);

  // ---------------- writer state ----------------
  logic [2:0] wblk;          // block counter (mod 8)
  logic [4:0] wrow;
  logic [2:0] wgrp;
  tu_size_e   wsize;         // size of the block being written
  tu_size_e   bsize [4];     // size of each block in flight, by blk mod 4
  // ---------------- reader state ----------------
  logic [2:0] rblk;
  logic [4:0] rcol;
  logic [2:0] rgrp;

  tu_size_e   cur_wsize;
  logic [4:0] wlast_row, rlast_col;
  logic [2:0] wlast_grp, rlast_grp;
  logic [2:0] dblk;
  tu_size_e   rsize, psize;

  assign cur_wsize = (wrow == 0 && wgrp == 0) ? wr_size : wsize;
  assign wlast_row = 5'((4 << cur_wsize) - 1);
  assign wlast_grp = 3'((1 << cur_wsize) - 1);
  assign dblk      = wblk - rblk;
  assign rsize     = bsize[rblk[1:0]];
  assign psize     = bsize[rblk[1:0]];          // size of the block being read
  assign rlast_col = 5'((4 << rsize) - 1);
  assign rlast_grp = 3'((1 << rsize) - 1);

  // write permission
  logic wr_ok;
  always_comb begin
    if (dblk == 3'd0)      wr_ok = 1'b1;          // previous block fully read
    else if (dblk == 3'd1) wr_ok = (int'(wrow) >= (4 << psize)) || (rcol > wrow);
    else                   wr_ok = 1'b0;
  end
  assign wr_ready = wr_ok;
  wire do_wr = wr_valid && wr_ready;

  // read permission
  logic rd_ok;
  logic [5:0] need_row;
  always_comb begin
    need_row = {1'b0, rgrp, 2'b11};               // 4m+3
    if (dblk != 3'd0) rd_ok = 1'b1;
    else rd_ok = (need_row < 6'(wrow)) ||
                 ((need_row == 6'(wrow)) && ({1'b0, rcol[4:2]} < {1'b0, wgrp}));
  end
  wire do_rd = rd_ok && rd_ready;
  assign rd_fire      = do_rd;
  assign rd_fire_last = do_rd && (rgrp == rlast_grp);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wblk  <= '0; wrow <= '0; wgrp <= '0; wsize <= TU4;
      rblk  <= '0; rcol <= '0; rgrp <= '0;
      for (int i = 0; i < 4; i++) bsize[i] <= TU4;
    end else begin
      if (do_wr) begin
        if (wrow == 0 && wgrp == 0) begin
          wsize <= wr_size;
          bsize[wblk[1:0]] <= wr_size;
        end
        if (wgrp == wlast_grp) begin
          wgrp <= '0;
          if (wrow == wlast_row) begin
            wrow <= '0;
            wblk <= wblk + 3'd1;
          end else wrow <= wrow + 5'd1;
        end else wgrp <= wgrp + 3'd1;
      end
      if (do_rd) begin
        if (rgrp == rlast_grp) begin
          rgrp <= '0;
          if (rcol == rlast_col) begin
            rcol <= '0;
            rblk <= rblk + 3'd1;
          end else rcol <= rcol + 5'd1;
        end else rgrp <= rgrp + 3'd1;
      end
    end
  end

  // ---------------- bank addressing ----------------
  logic          we   [4];
  logic [AW-1:0] wa   [4];
  logic [W-1:0]  wd   [4];
  logic [AW-1:0] ra   [4];
  logic [W-1:0]  rq   [4];
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      we[i] = 1'b0; wa[i] = '0; wd[i] = '0; ra[i] = '0;
    end
    for (int i = 0; i < 4; i++) begin
      int v, r;
      logic [1:0] b;
      // write: slot i of group wgrp of row wrow -> v = 4*wgrp + i
      v = 4 * int'(wgrp) + i;
      b = 2'(int'(wrow) + v);
      we[b] = do_wr;
      wd[b] = wr_data[i];
      wa[b] = wblk[0] ? AW'(v * 8 + int'(wrow) / 4) : AW'(int'(wrow) * 8 + v / 4);
      // read: row 4*rgrp + i of column slot rcol
      r = 4 * int'(rgrp) + i;
      b = 2'(r + int'(rcol));
      ra[b] = rblk[0] ? AW'(int'(rcol) * 8 + int'(rgrp)) : AW'(r * 8 + int'(rcol) / 4);
    end
  end

  for (genvar g = 0; g < 4; g++) begin : g_bank
    sram_1r1w #(.DEPTH(DEPTH), .W(W)) u_bank (
      .clk, .we(we[g]), .waddr(wa[g]), .wdata(wd[g]),
      .re(do_rd), .raddr(ra[g]), .rdata(rq[g]));
  end

  // ---------------- read labels, one cycle later ----------------
  logic [4:0] rcol_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid    <= 1'b0;
      rd_size     <= TU4;
      rcol_q      <= '0;
      rd_grp      <= '0;
      rd_col_last <= 1'b0;
    end else begin
      rd_valid    <= do_rd;
      if (do_rd) begin
        rd_size     <= rsize;
        rcol_q      <= rcol;
        rd_grp      <= rgrp;
        rd_col_last <= (rgrp == rlast_grp);
      end
    end
  end
  assign rd_vcol = rcol_q;

  always_comb begin
    for (int i = 0; i < 4; i++) rd_data[i] = rq[(i + int'(rcol_q)) % 4];
  end

  // Every bank gets at most one write and one read per cycle by construction.
  // A write must never target a location of the block being read that has
  // not been read yet; the permission logic above guarantees this.
endmodule
