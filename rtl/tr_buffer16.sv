// tr_buffer16: transpose buffer between the row transform (IT1) and the
// column transform (IT2) of the 16-pixel-per-cycle path.
//
// Sixteen two-port SRAM banks of DEPTH x 16 bit. IT1 writes one row unit per
// cycle (four 4-point rows, two 8-point rows, one 16-point row or half of a
// 32-point row); IT2 reads one column unit per cycle (the same shapes taken
// along the columns). Element (r, c) of a TU - row r, column c of the IT1
// result - is stored in bank tr_bank(size, r, c) at address
// base + tr_addr(size, r, c) (the document's mapping table): the 16
// elements of a row unit and the 16 of a column unit always lie in 16
// different banks, so the buffer transposes at 16 pixels per cycle.
// Zero skipping: wr_rownz tells which TU rows of the written unit are
// non-zero (IT1 results of an all-zero input row are zero); zero rows are
// not written. For reads, rd_rownz is the 32-bit map of non-zero rows of the
// whole TU; banks whose element lies in a zero row are not read and the
// slot returns zero. wr_rownz bit layout: TU4 rows 0..3, TU8 rows 2u, 2u+1
// as bits 0, 1, TU16 and TU32 bit 0.
// Read data appears one cycle after rd_valid, in column-unit slot order:
// slot p of column unit u holds element (r, c) = (unit_col(size, u, p),
// unit_row(size, u, p)). Addresses wrap modulo DEPTH.
// The mapping and the skipping follow the document; the per-row flag
// encoding and ring placement are this design's choices.
module tr_buffer16
  import hevc_tr_pkg::*;
#(
  parameter int DEPTH = 192,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic               clk,
  // write side: one row unit from IT1
  input  logic               wr_valid,
  input  tu_size_e           wr_size,
  input  logic [AW-1:0]      wr_base,
  input  logic [5:0]         wr_unit,
  input  logic [3:0]         wr_rownz,
  input  logic signed [15:0] wr_data [16],
  output logic [4:0]         wr_nskip,     // slots not written this cycle
  // read side: one column unit for IT2
  input  logic               rd_valid,
  input  tu_size_e           rd_size,
  input  logic [AW-1:0]      rd_base,
  input  logic [5:0]         rd_unit,
  input  logic [31:0]        rd_rownz,
  output logic [4:0]         rd_nskip,     // slots not read this cycle
  output logic signed [15:0] rd_data [16]
);
  function automatic logic [AW-1:0] wrap(logic [AW-1:0] b, int off);
    int a;
    a = int'(b) + off;
    if (a >= DEPTH) a -= DEPTH;
    return AW'(a);
  endfunction

  // which wr_rownz bit covers slot p of a row unit
  function automatic int wr_rowbit(tu_size_e s, int p);
    case (s)
      TU4:     return p / 4;
      TU8:     return p / 8;
      default: return 0;
    endcase
  endfunction

  logic          we [16], re [16];
  logic [AW-1:0] wa [16], ra [16];
  logic [15:0]   wd [16];
  logic [15:0]   rq [16];
  logic [3:0]    rbank [16];
  logic          rslot_nz [16];
  always_comb begin
    wr_nskip = '0;
    rd_nskip = '0;
    for (int b = 0; b < 16; b++) begin
      we[b] = 1'b0; wa[b] = '0; wd[b] = '0; re[b] = 1'b0; ra[b] = '0;
    end
    for (int p = 0; p < 16; p++) begin
      int r, c;
      logic [3:0] b;
      logic nz;
      // write: element (r, c) of the row unit
      r  = unit_row(wr_size, int'(wr_unit), p);
      c  = unit_col(wr_size, int'(wr_unit), p);
      b  = 4'(tr_bank(wr_size, r, c));
      nz = wr_rownz[wr_rowbit(wr_size, p)];
      we[b] = wr_valid && nz;
      wa[b] = wrap(wr_base, tr_addr(wr_size, r, c));
      wd[b] = wr_data[p];
      if (wr_valid && !nz) wr_nskip = wr_nskip + 5'd1;
      // read: element (r, c) of the column unit, transposed
      r  = unit_col(rd_size, int'(rd_unit), p);
      c  = unit_row(rd_size, int'(rd_unit), p);
      b  = 4'(tr_bank(rd_size, r, c));
      rbank[p]    = b;
      rslot_nz[p] = rd_rownz[r];
      re[b] = rd_valid && rd_rownz[r];
      ra[b] = wrap(rd_base, tr_addr(rd_size, r, c));
      if (rd_valid && !rd_rownz[r]) rd_nskip = rd_nskip + 5'd1;
    end
  end

  for (genvar g = 0; g < 16; g++) begin : g_bank
    sram_1r1w #(.DEPTH(DEPTH), .W(16)) u_bank (
      .clk, .we(we[g]), .waddr(wa[g]), .wdata(wd[g]),
      .re(re[g]), .raddr(ra[g]), .rdata(rq[g]));
  end

  logic [3:0] rbank_q [16];
  logic       rnz_q   [16];
  always_ff @(posedge clk) begin
    if (rd_valid) begin
      rbank_q <= rbank;
      rnz_q   <= rslot_nz;
    end
  end

  always_comb
    for (int p = 0; p < 16; p++) rd_data[p] = rnz_q[p] ? $signed(rq[rbank_q[p]]) : 16'sd0;
endmodule
