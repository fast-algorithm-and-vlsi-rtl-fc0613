// idct2d_4p: fully pipelined 2D inverse DCT of HEVC at 4 pixels per cycle
// for 4x4 .. 32x32 blocks (the area-efficient transform architecture).
//
// Data path: row transform IT1 (idct1d_rpiso) -> rounding shift by SHIFT1
// and clipping to 16 bit -> transpose memory (tpose_mem4, four two-port
// SRAMs with alternating mode 0/mode 1 mapping) -> column buffer -> column
// transform IT2 (a second idct1d_rpiso) -> rounding shift by SHIFT2.
// IT1 and IT2 each have their own 1D engine, so writing IT1 results and
// reading them for IT2 overlap, as with the two-port SRAM of the document.
//
// IT2 needs a whole column at once (parallel in) while the memory delivers
// four values per cycle; two column buffers alternate (one is filled while
// IT2 works on the other), so a column of N points is collected in N/4
// cycles while IT2 spends N/4 cycles on the previous one. The column
// buffers, the shift amounts (HEVC's 7 and 20 - bit depth) and clipping
// are this design's choices where the document is silent.
//
// Interface: one row of coefficients per in_valid/in_ready beat, rows of a
// block in order, all rows of a block with the same in_size. Output: four
// residuals per out_valid beat, of column out_col, at rows out_row[0..3];
// the output cannot be stalled. Throughput: 4 results per cycle for
// 8x8 .. 32x32 streams; latency of a 32x32 block about 256 + 2*8 cycles.
// Lint note: the cycle, last and index outputs of the IT1 engine and the
// cycle and last outputs of the IT2 engine are not needed here (the
// transpose memory keeps its own counters) and are reported as unused.
module idct2d_4p
  import hevc_tr_pkg::*;
#(
  parameter int IW     = 16,  // coefficient width
  parameter int OUTW   = 16,  // residual width
  parameter int SHIFT1 = 7,   // rounding shift after IT1
  parameter int SHIFT2 = 12   // rounding shift after IT2 (20 - bit depth 8)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  tu_size_e               in_size,
  input  logic signed [IW-1:0]   in_coef [32],
  output logic                   out_valid,
  output tu_size_e               out_size,
  output logic [4:0]             out_col,
  output logic [4:0]             out_row [4],
  output logic signed [OUTW-1:0] out_data [4]
);
  localparam int AW = 28;

  function automatic logic signed [15:0] round_clip16(logic signed [AW-1:0] v, int sh);
    logic signed [AW-1:0] t;
    t = (v + AW'(1 <<< (sh - 1))) >>> sh;
    if (t > 32767)       return 16'sd32767;
    else if (t < -32768) return -16'sd32768;
    else                 return t[15:0];
  endfunction

  // ---------------- IT1 ----------------
  logic                 it1_ov, it1_or;
  tu_size_e             it1_size;
  logic [2:0]           it1_cyc;
  logic                 it1_last;
  logic [4:0]           it1_idx [4];
  logic signed [AW-1:0] it1_d [4];

  idct1d_rpiso #(.IW(IW), .OW(AW)) u_it1 (
    .clk, .rst_n, .in_valid, .in_ready, .in_size, .in_coef,
    .out_valid(it1_ov), .out_ready(it1_or), .out_size(it1_size), .out_cyc(it1_cyc),
    .out_last(it1_last), .out_idx(it1_idx), .out_data(it1_d));

  logic [15:0] tw [4];
  always_comb for (int i = 0; i < 4; i++) tw[i] = round_clip16(it1_d[i], SHIFT1);

  // ---------------- transpose memory ----------------
  logic        rd_ready, rd_fire, rd_fire_last, rd_valid, rd_col_last;
  tu_size_e    rd_size;
  logic [4:0]  rd_vcol;
  logic [2:0]  rd_grp;
  logic [15:0] rd_data [4];

  tpose_mem4 #(.W(16), .DEPTH(256)) u_tmem (
    .clk, .rst_n,
    .wr_valid(it1_ov), .wr_ready(it1_or), .wr_size(it1_size), .wr_data(tw),
    .rd_ready, .rd_fire, .rd_fire_last, .rd_valid, .rd_size, .rd_vcol, .rd_grp, .rd_col_last, .rd_data);

  // ---------------- column buffers (ping-pong) ----------------
  logic signed [15:0] cbuf [2][32];
  logic               cfull [2];
  tu_size_e           csize [2];
  logic [4:0]         ccol  [2];     // true column index of the buffered column
  logic               wsel, rsel, wsel_q;
  logic               it2_iv, it2_ir;

  // a new column group may be issued only into a buffer that is not full
  assign rd_ready = !cfull[wsel];
  assign it2_iv   = cfull[rsel];

  // true column of a column slot v = 4*k + i
  function automatic logic [4:0] true_col(tu_size_e s, logic [4:0] v);
    return 5'(rpiso_idx(s, int'(v[4:2]), int'(v[1:0])));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wsel <= 1'b0; rsel <= 1'b0; wsel_q <= 1'b0;
      cfull[0] <= 1'b0; cfull[1] <= 1'b0;
      csize[0] <= TU4;  csize[1] <= TU4;
      ccol[0]  <= '0;   ccol[1]  <= '0;
    end else begin
      // issue side: toggle the target buffer after the last group of a column
      if (rd_fire_last) wsel <= !wsel;
      if (rd_fire)      wsel_q <= wsel;
      // data side
      if (rd_valid && rd_col_last) begin
        cfull[wsel_q] <= 1'b1;
        csize[wsel_q] <= rd_size;
        ccol[wsel_q]  <= true_col(rd_size, rd_vcol);
      end
      if (it2_iv && it2_ir) begin
        cfull[rsel] <= 1'b0;
        rsel        <= !rsel;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rd_valid)
      for (int i = 0; i < 4; i++) cbuf[wsel_q][4 * int'(rd_grp) + i] <= rd_data[i];
  end

  // ---------------- IT2 ----------------
  logic signed [IW-1:0] it2_in [32];
  always_comb for (int k = 0; k < 32; k++) it2_in[k] = IW'(cbuf[rsel][k]);

  logic                 it2_ov;
  tu_size_e             it2_size;
  logic [2:0]           it2_cyc;
  logic                 it2_last;
  logic [4:0]           it2_idx [4];
  logic signed [AW-1:0] it2_d [4];
  logic [4:0]           col_q;

  idct1d_rpiso #(.IW(IW), .OW(AW)) u_it2 (
    .clk, .rst_n, .in_valid(it2_iv), .in_ready(it2_ir), .in_size(csize[rsel]), .in_coef(it2_in),
    .out_valid(it2_ov), .out_ready(1'b1), .out_size(it2_size), .out_cyc(it2_cyc),
    .out_last(it2_last), .out_idx(it2_idx), .out_data(it2_d));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                col_q <= '0;
    else if (it2_iv && it2_ir) col_q <= ccol[rsel];
  end

  assign out_valid = it2_ov;
  assign out_size  = it2_size;
  assign out_col   = col_q;
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      out_row[i]  = it2_idx[i];
      out_data[i] = OUTW'(round_clip16(it2_d[i], SHIFT2));
    end
  end
endmodule
