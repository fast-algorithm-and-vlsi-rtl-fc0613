// fwd_dct1d: 4/8/16/32-point 1D forward DCT of HEVC, 4 outputs per cycle
// in natural order.
//
// The forward transform is the inverse one run backwards: the butterfly
// comes first and the selection of outputs last, so the results need no
// reordering. When a row of N samples is accepted, the butterfly
//   a[n] = x[n] + x[N-1-n],  b[n] = x[n] - x[N-1-n]   (n < N/2)
// is computed and registered. In cycle c the four results X[4c..4c+3] are
// produced: the even ones X[4c], X[4c+2] as dot products of a[] with rows of
// the transform matrix, the odd ones X[4c+1], X[4c+3] as dot products of
// b[]. Each of the four output engines has 16 constant multipliers whose
// constants are chosen by (size, cycle) from tables fixed at elaboration
// (T[k][n] = tcoef(N, k, n)). An N-point row takes N/4 cycles: 4 points 1,
// 8 points 2, 16 points 4, 32 points 8.
// Interface: valid/ready on both sides. A row is taken when in_valid and
// in_ready; in_ready is high when no row is held or the held row is in its
// last output cycle and that output is taken. Outputs are X[4*out_cyc + i]
// in out_data[i], full precision (no scaling shift); out_last marks the last
// cycle of a row. The first outputs appear the cycle after the row is taken.
// The butterfly-first order, the natural output order and the 4-per-cycle
// rate follow the document; using plain constant-multiplier dot products
// (no further even/odd nesting) and leaving the HEVC scaling shifts to the
// user are this design's choices.
module fwd_dct1d
  import hevc_tr_pkg::*;
#(
  parameter int IW = 16,  // input sample width (residuals)
  parameter int OW = 32   // output width, full precision
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  tu_size_e             in_size,
  input  logic signed [IW-1:0] in_x [32],
  output logic                 out_valid,
  input  logic                 out_ready,
  output tu_size_e             out_size,
  output logic [2:0]           out_cyc,
  output logic                 out_last,
  output logic signed [OW-1:0] out_data [4]
);
  localparam int BW = IW + 1;   // butterfly output width

  // ---- butterfly (first step) ----
  logic signed [BW-1:0] a_d [16], b_d [16];
  logic signed [IW-1:0] hi;
  always_comb begin
    hi = '0;
    for (int n = 0; n < 16; n++) begin
      case (in_size)
        TU4:     hi = (n < 2) ? in_x[3 - n]  : '0;
        TU8:     hi = (n < 4) ? in_x[7 - n]  : '0;
        TU16:    hi = (n < 8) ? in_x[15 - n] : '0;
        default: hi = in_x[31 - n];
      endcase
      if (n >= tu_points(in_size) / 2) begin
        a_d[n] = '0;
        b_d[n] = '0;
      end else begin
        a_d[n] = BW'(in_x[n]) + BW'(hi);
        b_d[n] = BW'(in_x[n]) - BW'(hi);
      end
    end
  end

  logic                 held;
  tu_size_e             size_q;
  logic [2:0]           cyc;
  logic signed [BW-1:0] a_q [16], b_q [16];
  logic                 last_cyc, take;

  assign last_cyc = (int'(cyc) == tu_points(size_q) / 4 - 1);
  assign in_ready = !held || (last_cyc && out_ready);
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held   <= 1'b0;
      size_q <= TU4;
      cyc    <= '0;
    end else if (take) begin
      held   <= 1'b1;
      size_q <= in_size;
      cyc    <= '0;
    end else if (held && out_ready) begin
      if (last_cyc) held <= 1'b0;
      else          cyc  <= cyc + 3'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (take) begin
      a_q <= a_d;
      b_q <= b_d;
    end
  end

  // ---- constant tables: coefficient of input n for output slot i ----
  // ctab[i][n][s][c] = T_N[4c + i][n] for N = 4 << s, zero where unused
  logic signed [7:0] ctab [4][16][4][8];
  for (genvar i = 0; i < 4; i++) begin : g_i
    for (genvar n = 0; n < 16; n++) begin : g_n
      for (genvar s = 0; s < 4; s++) begin : g_s
        for (genvar c = 0; c < 8; c++) begin : g_c
          localparam int NP = 4 << s;
          localparam int C  = (n < NP / 2 && c < NP / 4) ? tcoef(NP, 4 * c + i, n) : 0;
          assign ctab[i][n][s][c] = 8'(C);
        end
      end
    end
  end

  // ---- output engines (selection last, natural order) ----
  // even slots use the sums a[], odd slots the differences b[]
  logic signed [OW-1:0] prod [4][16];
  always_comb begin
    for (int n = 0; n < 16; n++) begin
      prod[0][n] = OW'(a_q[n]) * OW'(ctab[0][n][size_q][cyc]);
      prod[1][n] = OW'(b_q[n]) * OW'(ctab[1][n][size_q][cyc]);
      prod[2][n] = OW'(a_q[n]) * OW'(ctab[2][n][size_q][cyc]);
      prod[3][n] = OW'(b_q[n]) * OW'(ctab[3][n][size_q][cyc]);
    end
    for (int i = 0; i < 4; i++) begin
      out_data[i] = '0;
      for (int n = 0; n < 16; n++) out_data[i] += prod[i][n];
    end
  end

  assign out_valid = held;
  assign out_size  = size_q;
  assign out_cyc   = cyc;
  assign out_last  = held && last_cyc;
endmodule
