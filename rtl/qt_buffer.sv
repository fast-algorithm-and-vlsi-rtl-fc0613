// qt_buffer: the buffer between de-quantization (DQ) and the row transform
// (IT1). It is written one 4x4 sub-block (SBLK) per cycle and read one
// 16-coefficient row unit per cycle (four 4-point rows, two 8-point rows, one
// 16-point row or half of a 32-point row).
//
// Sixteen two-port SRAM banks of DEPTH x 16 bit. An SBLK at sub-block
// position (sx, sy) of a TU writes coefficient n (raster order in the SBLK)
// to bank qt_bank(size, sx, n) at address base + qt_addr(size, sx, sy, n)
// (the document's mapping table). The mapping makes the 16 coefficients of
// an SBLK and the 16 of a row unit fall into 16 different banks, so both
// sides run at 16 coefficients per cycle without conflicts.
// Zero skipping: one flag per bank quad (banks 4q..4q+3) and address tells
// whether the 4x1 row stored there is all zero. Zero rows of an SBLK are not
// written; a quad whose flag is set is not read and yields zeros. SBLKs
// that are not coded at all are never written, and their flags are still
// set, because a read sets the flags of the word it reads back to "zero"
// (the region is then free for the next TU; a 32-point row is cleared with
// its second half). Flags are set at reset.
// Read: unit rd_unit of the TU at rd_base; data and flags appear one cycle
// later (rd_data in unit slot order, rd_zq = quad q of the unit is zero,
// rd_rownz = the TU rows of the unit that are not all zero: TU4 rows 0..3,
// TU8 two rows, TU16 one row, TU32 the whole 32-point row, looked up for
// both halves so that the first half already knows it).
// Addresses wrap modulo DEPTH, so TUs can be placed in the buffer as a ring.
// The banks, the mapping and the per-4x1-row zero flags follow the document;
// clearing flags on read and the ring placement are this design's choices.
module qt_buffer
  import hevc_tr_pkg::*;
#(
  parameter int DEPTH = 192,               // words per bank: 3 TUs of 32x32
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  // write side: one SBLK
  input  logic               wr_valid,
  input  tu_size_e           wr_size,
  input  logic [AW-1:0]      wr_base,
  input  logic [2:0]         wr_sx,
  input  logic [2:0]         wr_sy,
  input  logic signed [15:0] wr_coef [16],   // raster order y*4+x
  // read side: one row unit
  input  logic               rd_valid,
  input  tu_size_e           rd_size,
  input  logic [AW-1:0]      rd_base,
  input  logic [5:0]         rd_unit,
  output logic signed [15:0] rd_data [16],
  output logic [3:0]         rd_zq,
  output logic [3:0]         rd_rownz
);
  function automatic logic [AW-1:0] wrap(logic [AW-1:0] b, int off);
    int a;
    a = int'(b) + off;
    if (a >= DEPTH) a -= DEPTH;
    return AW'(a);
  endfunction

  // bank of unit slot p
  function automatic int slot_bank(tu_size_e s, int u, int p);
    int x, y;
    x = unit_col(s, u, p);
    y = unit_row(s, u, p);
    return qt_bank(s, x / 4, (y % 4) * 4 + x % 4);
  endfunction

  logic zf [4][DEPTH];       // 1: the 4x1 row in bank quad q at this address is zero

  // ---------------- write side ----------------
  logic          we [16];
  logic [AW-1:0] wa [16];
  logic [15:0]   wd [16];
  logic          wrow_nz [4];
  logic [1:0]    wrow_q  [4];
  logic [AW-1:0] wrow_a  [4];
  always_comb begin
    for (int j = 0; j < 4; j++) begin
      wrow_nz[j] = (wr_coef[4 * j] != 0) || (wr_coef[4 * j + 1] != 0) ||
                   (wr_coef[4 * j + 2] != 0) || (wr_coef[4 * j + 3] != 0);
      wrow_q[j]  = 2'(qt_bank(wr_size, int'(wr_sx), 4 * j) / 4);
      wrow_a[j]  = wrap(wr_base, qt_addr(wr_size, int'(wr_sx), int'(wr_sy), 4 * j));
    end
    for (int b = 0; b < 16; b++) begin
      we[b] = 1'b0; wa[b] = '0; wd[b] = '0;
    end
    for (int n = 0; n < 16; n++) begin
      logic [3:0] b;
      b = 4'(qt_bank(wr_size, int'(wr_sx), n));
      we[b] = wr_valid && wrow_nz[n / 4];
      wa[b] = wrow_a[n / 4];
      wd[b] = wr_coef[n];
    end
  end

  // ---------------- read side ----------------
  logic [AW-1:0] ra, ra2;
  logic [3:0]    zq_now, zq_pair;
  logic [1:0]    rq_of [4];                     // bank quad of slot group g
  always_comb begin
    ra  = wrap(rd_base, qt_unit_addr(rd_size, int'(rd_unit)));
    ra2 = wrap(rd_base, qt_unit_addr(rd_size, int'(rd_unit) ^ 1));   // other half (TU32)
    for (int g = 0; g < 4; g++) begin
      rq_of[g]   = 2'(slot_bank(rd_size, int'(rd_unit), 4 * g) / 4);
      zq_now[g]  = zf[rq_of[g]][ra];
      zq_pair[g] = zf[g][ra2];
    end
  end

  logic [15:0] rq [16];
  for (genvar g = 0; g < 16; g++) begin : g_bank
    sram_1r1w #(.DEPTH(DEPTH), .W(16)) u_bank (
      .clk, .we(we[g]), .waddr(wa[g]), .wdata(wd[g]),
      .re(rd_valid && !zf[g / 4][ra]), .raddr(ra), .rdata(rq[g]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < 4; q++)
        for (int a = 0; a < DEPTH; a++) zf[q][a] <= 1'b1;
    end else begin
      if (wr_valid)
        for (int j = 0; j < 4; j++) zf[wrow_q[j]][wrow_a[j]] <= !wrow_nz[j];
      // a TU32 row is cleared with its second half, so that the second
      // half still sees the flags of the first
      if (rd_valid && (rd_size != TU32 || rd_unit[0]))
        for (int q = 0; q < 4; q++) begin
          zf[q][ra] <= 1'b1;
          if (rd_size == TU32) zf[q][ra2] <= 1'b1;
        end
    end
  end

  // ---------------- read output, one cycle later ----------------
  tu_size_e   rsize_q;
  logic [5:0] runit_q;
  logic [3:0] zq_q, zpair_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsize_q <= TU4; runit_q <= '0; zq_q <= '1; zpair_q <= '1;
    end else if (rd_valid) begin
      rsize_q <= rd_size; runit_q <= rd_unit; zq_q <= zq_now; zpair_q <= zq_pair;
    end
  end

  always_comb begin
    for (int p = 0; p < 16; p++)
      rd_data[p] = zq_q[p / 4] ? 16'sd0
                 : $signed(rq[slot_bank(rsize_q, int'(runit_q), p)]);
    rd_zq = zq_q;
    case (rsize_q)
      TU4:  rd_rownz = ~zq_q;
      TU8:  rd_rownz = {2'b00, !(zq_q[2] && zq_q[3]), !(zq_q[0] && zq_q[1])};
      TU16: rd_rownz = {3'b000, !(&zq_q)};
      default: rd_rownz = {3'b000, !((&zq_q) && (&zpair_q))};
    endcase
  end
endmodule
