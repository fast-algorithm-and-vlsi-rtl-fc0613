// idct1d_rpiso: unified 4/8/16/32-point 1D inverse DCT, 4 outputs per cycle,
// using the reordered parallel-in serial-out (RPISO) scheme.
//
// A whole row of N coefficients is accepted at once (parallel in) and held;
// the N results leave four per cycle over N/4 cycles (serial out). The
// outputs are reordered so that the four results of one cycle are two
// butterfly pairs, X[b] = E[b] + O[b] and X[N-1-b] = E[b] - O[b]: per cycle
// the odd part needs only two odd results and the even part only two even
// results. Following Chen's decomposition the engines nest:
//   * 8-point engine: one EE sample (EE8), one EO sample (EO8) and the two odd
//     samples O8[s], O8[3-s] per cycle (sel_e8/sel_o8 = s); it yields the four
//     values {X8[s], X8[7-s], X8[3-s], X8[4+s]}.
//   * 16-point: the 8-point engine is the even part; sel_e16 picks two of its
//     four values, two O16 engines (8 constant multipliers and an adder tree
//     each, constants from a 4-to-1 choice, LUT16) give the odd samples.
//   * 32-point: the 16-point engine is the even part; sel_e32 picks two of its
//     four values, two O32 engines (16 multipliers, constants from an
//     8-to-1 choice, LUT32) give the odd samples.
// A 4-point row is done by the separate idct4_core in one cycle.
// The output order per cycle is hevc_tr_pkg::rpiso_idx(); out_idx carries it.
// The number of O16/O32 engines (two each, one per butterfly pair) is this
// design's reading of the document's figure; no intermediate results are
// registered, as the document states.
//
// Interface: valid/ready on both sides. in_ready is high when no row is held
// or the held row is in its last output cycle and that output is taken.
// Timing: a row of N points occupies N/4 cycles (N=4: 1 cycle); the first
// outputs appear the cycle after the row is accepted. Outputs are full
// precision (no rounding shift).
module idct1d_rpiso
  import hevc_tr_pkg::*;
#(
  parameter int IW = 16,   // coefficient width
  parameter int OW = 28    // output width: IW + log2(32*90) rounded up
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  tu_size_e             in_size,
  input  logic signed [IW-1:0] in_coef [32],
  output logic                 out_valid,
  input  logic                 out_ready,
  output tu_size_e             out_size,
  output logic [2:0]           out_cyc,    // output cycle within the row
  output logic                 out_last,   // last output cycle of the row
  output logic [4:0]           out_idx [4],
  output logic signed [OW-1:0] out_data [4]
);
  logic                 busy;
  tu_size_e             size_q;
  logic [2:0]           cyc_q;
  logic signed [IW-1:0] y [32];
  logic                 last_cyc;

  always_comb begin
    case (size_q)
      TU4:     last_cyc = 1'b1;
      TU8:     last_cyc = (cyc_q == 3'd1);
      TU16:    last_cyc = (cyc_q == 3'd3);
      default: last_cyc = (cyc_q == 3'd7);
    endcase
  end

  assign in_ready  = !busy || (last_cyc && out_ready);
  assign out_valid = busy;
  assign out_size  = size_q;
  assign out_cyc   = cyc_q;
  assign out_last  = last_cyc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      size_q <= TU4;
      cyc_q  <= '0;
    end else if (in_valid && in_ready) begin
      busy   <= 1'b1;
      size_q <= in_size;
      cyc_q  <= '0;
    end else if (busy && out_ready) begin
      if (last_cyc) busy <= 1'b0;
      else          cyc_q <= cyc_q + 3'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) y <= in_coef;
  end

  // ---------------- selection signals (reordered schedule) ----------------
  logic [1:0] sel8;        // 8-point engine cycle s (0/1)
  logic [1:0] a16;         // first even index picked for 16-point
  logic [2:0] b32;         // first even index picked for 32-point
  always_comb begin
    case (size_q)
      TU8:     sel8 = {1'b0, cyc_q[0]};
      TU16:    sel8 = {1'b0, cyc_q[1]};
      default: sel8 = {1'b0, cyc_q[2]};
    endcase
    if (size_q == TU16) a16 = cyc_q[0] ? 2'(3 - sel8) : sel8;
    else                a16 = cyc_q[1] ? 2'(3 - sel8) : sel8;
    b32 = cyc_q[0] ? 3'(7 - a16) : {1'b0, a16};
  end

  // ---------------- input routing to the nested engines ----------------
  logic signed [IW-1:0] z [8];   // 8-point engine inputs
  logic signed [IW-1:0] w [16];  // 16-point engine inputs
  always_comb begin
    for (int k = 0; k < 16; k++) w[k] = (size_q == TU32) ? y[2 * k] : y[k];
    for (int k = 0; k < 8; k++) begin
      case (size_q)
        TU8:     z[k] = y[k];
        TU16:    z[k] = y[2 * k];
        default: z[k] = y[4 * k];
      endcase
    end
  end

  // ---------------- 8-point engine (EE8, EO8, O8) ----------------
  logic signed [OW-1:0] ee, eo, e8a, e8b, o8a, o8b;
  logic signed [OW-1:0] x8 [4];     // {X8[s], X8[7-s], X8[3-s], X8[4+s]}
  always_comb begin
    ee = sel8[0] ? OW'(64 * z[0]) - OW'(64 * z[4]) : OW'(64 * z[0]) + OW'(64 * z[4]);
    eo = sel8[0] ? OW'(36 * z[2]) - OW'(83 * z[6]) : OW'(83 * z[2]) + OW'(36 * z[6]);
    e8a = ee + eo;   // E[s]
    e8b = ee - eo;   // E[3-s]
    o8a = '0;
    o8b = '0;
    for (int k = 0; k < 4; k++) begin
      o8a += OW'(z[2 * k + 1] * tcoef(8, 2 * k + 1, int'(sel8)));
      o8b += OW'(z[2 * k + 1] * tcoef(8, 2 * k + 1, 3 - int'(sel8)));
    end
    x8[0] = e8a + o8a;
    x8[1] = e8a - o8a;
    x8[2] = e8b + o8b;
    x8[3] = e8b - o8b;
  end

  // ---------------- 16-point: sel_e16 and two O16 engines ----------------
  logic signed [OW-1:0] e16a, e16b, o16a, o16b;
  logic signed [OW-1:0] x16 [4];    // {X16[a], X16[15-a], X16[7-a], X16[8+a]}
  always_comb begin
    // values of the 8-point engine: E16[s], E16[7-s], E16[3-s], E16[4+s]
    if (a16 == sel8) begin e16a = x8[0]; e16b = x8[1]; end
    else             begin e16a = x8[2]; e16b = x8[3]; end
    o16a = '0;
    o16b = '0;
    for (int k = 0; k < 8; k++) begin
      o16a += OW'(w[2 * k + 1] * tcoef(16, 2 * k + 1, int'(a16)));
      o16b += OW'(w[2 * k + 1] * tcoef(16, 2 * k + 1, 7 - int'(a16)));
    end
    x16[0] = e16a + o16a;
    x16[1] = e16a - o16a;
    x16[2] = e16b + o16b;
    x16[3] = e16b - o16b;
  end

  // ---------------- 32-point: sel_e32 and two O32 engines ----------------
  logic signed [OW-1:0] e32a, e32b, o32a, o32b;
  logic signed [OW-1:0] x32 [4];    // {X32[b], X32[31-b], X32[15-b], X32[16+b]}
  always_comb begin
    // values of the 16-point engine: E32[a], E32[15-a], E32[7-a], E32[8+a]
    if (b32 == {1'b0, a16}) begin e32a = x16[0]; e32b = x16[1]; end
    else                    begin e32a = x16[2]; e32b = x16[3]; end
    o32a = '0;
    o32b = '0;
    for (int k = 0; k < 16; k++) begin
      o32a += OW'(y[2 * k + 1] * tcoef(32, 2 * k + 1, int'(b32)));
      o32b += OW'(y[2 * k + 1] * tcoef(32, 2 * k + 1, 15 - int'(b32)));
    end
    x32[0] = e32a + o32a;
    x32[1] = e32a - o32a;
    x32[2] = e32b + o32b;
    x32[3] = e32b - o32b;
  end

  // ---------------- separate 4-point IDCT ----------------
  logic signed [IW-1:0] y4 [4];
  logic signed [OW-1:0] x4 [4];
  always_comb for (int k = 0; k < 4; k++) y4[k] = y[k];
  idct4_core #(.IW(IW), .OW(OW)) u_idct4 (.y(y4), .x(x4));

  // ---------------- output select ----------------
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      out_idx[i] = 5'(rpiso_idx(size_q, int'(cyc_q), i));
      case (size_q)
        TU4:     out_data[i] = x4[i];
        TU8:     out_data[i] = x8[i];
        TU16:    out_data[i] = x16[i];
        default: out_data[i] = x32[i];
      endcase
    end
  end
endmodule
