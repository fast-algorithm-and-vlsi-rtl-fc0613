// it_multishape: 16-pixel-per-cycle multiple-shape 1D inverse transform.
//
// Every cycle it takes 16 coefficients: four 4-point rows (TU4), two
// 8-point rows (TU8), one 16-point row (TU16) or half of a 32-point row
// (TU32), and it returns 16 results of the same shape. Instead of separate
// transforms per size, the hardware is one IT_32 built by Chen's
// decomposition - IT_32 = IT_16 (even part) + O32, IT_16 = IT_8 + O16,
// IT_8 = IT_4 + O8 - plus one more IT_8 (its own IT_4 and O8) and two more
// IT_4:
//   TU32: IT_32;  TU16: the IT_16 inside IT_32;
//   TU8 : the IT_8 inside IT_32 (row 0) and the extra IT_8 (row 1);
//   TU4 : the IT_4 inside IT_32 (row 0), the IT_4 inside the extra IT_8
//         (row 1) and the two extra IT_4 (rows 2, 3).
// For intra luma 4x4 blocks (in_dst) four 4-point DSTs replace the IT_4s.
// Four pipeline stages: 1) IT_4 results and all odd parts (O8, O16, O32);
// 2) IT_8 butterflies; 3) IT_16 butterfly; 4) IT_32 butterfly, rounding
// shift by SHIFT, clipping to 16 bit, output select. Results of small TUs
// that are complete early travel to stage 4 in the O32 pipeline registers,
// which are idle for those sizes (register sharing as in the document).
// TU32: the first half row is held in a register; with the second half the
// whole row enters the pipeline, and its 32 results leave in two
// consecutive cycles (half 0, then half 1). The caller must not present a
// unit other than a TU32 first half in the cycle right after a TU32 second
// half (the output slot is taken); an assertion checks this.
// Interface: no back-pressure; in_tag travels with the unit (for TU32 the
// tags of both halves are returned with their halves).
// Latency 4 cycles (TU32: 4 and 5 cycles after the second half).
module it_multishape
  import hevc_tr_pkg::*;
#(
  parameter int IW    = 16,  // coefficient width
  parameter int SHIFT = 7,   // rounding shift applied to the results
  parameter int TAGW  = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  tu_size_e              in_size,
  input  logic                  in_dst,
  input  logic                  in_half,    // TU32: which half row
  input  logic signed [IW-1:0]  in_coef [16],
  input  logic [TAGW-1:0]       in_tag,
  output logic                  out_valid,
  output tu_size_e              out_size,
  output logic [TAGW-1:0]       out_tag,
  output logic signed [15:0]    out_data [16]
);
  localparam int AW = 28;

  // ---------------- row assembly ----------------
  logic signed [IW-1:0] hreg [16];
  logic [TAGW-1:0]      htag;
  logic signed [IW-1:0] y [32];
  logic                 go;
  always_comb begin
    for (int k = 0; k < 16; k++) begin
      y[k]      = (in_size == TU32) ? hreg[k] : in_coef[k];
      y[16 + k] = (in_size == TU32) ? in_coef[k] : '0;
    end
  end
  assign go = in_valid && !(in_size == TU32 && !in_half);

  always_ff @(posedge clk) begin
    if (in_valid && in_size == TU32 && !in_half) begin
      hreg <= in_coef;
      htag <= in_tag;
    end
  end

  // ---------------- stage 1: IT_4s / DSTs and odd parts ----------------
  logic signed [IW-1:0] v16 [16], v8 [8], v4 [4], xv8 [8], xv4 [4], ra [4], rb [4];
  logic signed [IW-1:0] o32in [16], o16in [8], o8in [4], o8xin [4];
  logic signed [IW-1:0] d0 [4], d1 [4];
  always_comb begin
    for (int k = 0; k < 16; k++) begin
      v16[k]   = (in_size == TU32) ? y[2 * k] : y[k];
      o32in[k] = y[2 * k + 1];
    end
    for (int k = 0; k < 8; k++) begin
      v8[k]    = (in_size == TU32 || in_size == TU16) ? v16[2 * k] : y[k];
      o16in[k] = v16[2 * k + 1];
      xv8[k]   = y[8 + k];
    end
    for (int k = 0; k < 4; k++) begin
      v4[k]    = (in_size == TU4) ? y[k] : v8[2 * k];
      o8in[k]  = v8[2 * k + 1];
      xv4[k]   = (in_size == TU4) ? y[4 + k] : xv8[2 * k];
      o8xin[k] = xv8[2 * k + 1];
      ra[k]    = y[8 + k];
      rb[k]    = y[12 + k];
      d0[k]    = y[k];
      d1[k]    = y[4 + k];
    end
  end

  logic signed [AW-1:0] it4m [4], it4x [4], it4a [4], it4b [4];
  logic signed [AW-1:0] ds0 [4], ds1 [4], ds2 [4], ds3 [4];
  logic signed [AW-1:0] o8m [4], o8x [4], o16 [8], o32 [16];

  idct4_core #(.IW(IW), .OW(AW)) u_it4m (.y(v4),  .x(it4m));
  idct4_core #(.IW(IW), .OW(AW)) u_it4x (.y(xv4), .x(it4x));
  idct4_core #(.IW(IW), .OW(AW)) u_it4a (.y(ra),  .x(it4a));
  idct4_core #(.IW(IW), .OW(AW)) u_it4b (.y(rb),  .x(it4b));
  dst4_core  #(.IW(IW), .OW(AW)) u_ds0  (.y(d0),  .x(ds0));
  dst4_core  #(.IW(IW), .OW(AW)) u_ds1  (.y(d1),  .x(ds1));
  dst4_core  #(.IW(IW), .OW(AW)) u_ds2  (.y(ra),  .x(ds2));
  dst4_core  #(.IW(IW), .OW(AW)) u_ds3  (.y(rb),  .x(ds3));
  idct_odd #(.N(8),  .IW(IW), .OW(AW)) u_o8m (.yo(o8in),  .o(o8m));
  idct_odd #(.N(8),  .IW(IW), .OW(AW)) u_o8x (.yo(o8xin), .o(o8x));
  idct_odd #(.N(16), .IW(IW), .OW(AW)) u_o16 (.yo(o16in), .o(o16));
  idct_odd #(.N(32), .IW(IW), .OW(AW)) u_o32 (.yo(o32in), .o(o32));

  logic                 s1_v, s2_v, s3_v;
  tu_size_e             s1_sz, s2_sz, s3_sz;
  logic [TAGW-1:0]      s1_ta, s1_tb, s2_ta, s2_tb, s3_ta, s3_tb;
  logic signed [AW-1:0] s1_e4m [4], s1_e4x [4], s1_o8m [4], s1_o8x [4], s1_o16 [8], s1_o32 [16];
  logic dst4;
  assign dst4 = in_dst && (in_size == TU4);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s2_v <= 1'b0; s3_v <= 1'b0;
    end else begin
      s1_v <= go; s2_v <= s1_v; s3_v <= s2_v;
    end
  end

  always_ff @(posedge clk) begin
    s1_sz <= in_size;
    s1_ta <= (in_size == TU32) ? htag : in_tag;
    s1_tb <= in_tag;
    for (int k = 0; k < 4; k++) begin
      s1_e4m[k] <= dst4 ? ds0[k] : it4m[k];
      s1_e4x[k] <= dst4 ? ds1[k] : it4x[k];
      s1_o8m[k] <= o8m[k];
      s1_o8x[k] <= o8x[k];
    end
    for (int k = 0; k < 8; k++) s1_o16[k] <= o16[k];
    for (int k = 0; k < 16; k++) begin
      if (in_size == TU4)   // O32 registers carry rows 2 and 3
        s1_o32[k] <= (k < 4) ? (dst4 ? ds2[k] : it4a[k]) :
                     (k < 8) ? (dst4 ? ds3[k - 4] : it4b[k - 4]) : '0;
      else
        s1_o32[k] <= o32[k];
    end
  end

  // ---------------- stage 2: IT_8 butterflies ----------------
  logic signed [AW-1:0] s2_x8m [8], s2_o16 [8], s2_o32 [16];
  always_ff @(posedge clk) begin
    s2_sz <= s1_sz; s2_ta <= s1_ta; s2_tb <= s1_tb;
    for (int n = 0; n < 4; n++) begin
      if (s1_sz == TU4) begin
        s2_x8m[n]     <= s1_e4m[n];
        s2_x8m[4 + n] <= s1_e4x[n];
      end else begin
        s2_x8m[n]     <= s1_e4m[n] + s1_o8m[n];
        s2_x8m[7 - n] <= s1_e4m[n] - s1_o8m[n];
      end
    end
    for (int k = 0; k < 8; k++) s2_o16[k] <= s1_o16[k];
    for (int k = 0; k < 16; k++) begin
      if (s1_sz == TU8)     // O32 registers carry row 1 (extra IT_8)
        s2_o32[k] <= (k < 4) ? s1_e4x[k] + s1_o8x[k] :
                     (k < 8) ? s1_e4x[7 - k] - s1_o8x[7 - k] : '0;
      else
        s2_o32[k] <= s1_o32[k];
    end
  end

  // ---------------- stage 3: IT_16 butterfly ----------------
  logic signed [AW-1:0] s3_x16 [16], s3_o32 [16];
  always_ff @(posedge clk) begin
    s3_sz <= s2_sz; s3_ta <= s2_ta; s3_tb <= s2_tb;
    for (int n = 0; n < 8; n++) begin
      if (s2_sz == TU4 || s2_sz == TU8) begin
        s3_x16[n]     <= s2_x8m[n];
        s3_x16[8 + n] <= '0;
      end else begin
        s3_x16[n]      <= s2_x8m[n] + s2_o16[n];
        s3_x16[15 - n] <= s2_x8m[n] - s2_o16[n];
      end
    end
    s3_o32 <= s2_o32;
  end

  // ---------------- stage 4: IT_32 butterfly, shift, select ----------------
  function automatic logic signed [15:0] rsc(logic signed [AW-1:0] v);
    logic signed [AW-1:0] t;
    t = (v + AW'(1 <<< (SHIFT - 1))) >>> SHIFT;
    if (t > 32767)       return 16'sd32767;
    else if (t < -32768) return -16'sd32768;
    else                 return t[15:0];
  endfunction

  logic signed [15:0] sel0 [16], sel1 [16];
  always_comb begin
    for (int n = 0; n < 16; n++) begin
      sel1[n] = rsc(s3_x16[15 - n] - s3_o32[15 - n]);     // X32[16 + n]
      case (s3_sz)
        TU32:    sel0[n] = rsc(s3_x16[n] + s3_o32[n]);
        TU16:    sel0[n] = rsc(s3_x16[n]);
        default: sel0[n] = (n < 8) ? rsc(s3_x16[n]) : rsc(s3_o32[n - 8]);
      endcase
    end
  end

  logic               pend;        // second half of a TU32 row waiting
  logic signed [15:0] h1 [16];
  logic [TAGW-1:0]    h1_tag;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      pend      <= 1'b0;
      out_size  <= TU4;
    end else begin
      out_valid <= s3_v || pend;
      pend      <= s3_v && (s3_sz == TU32);
      if (s3_v) out_size <= s3_sz;
    end
  end

  always_ff @(posedge clk) begin
    if (s3_v) begin
      out_data <= sel0;
      out_tag  <= s3_ta;
      h1       <= sel1;
      h1_tag   <= s3_tb;
    end else if (pend) begin
      out_data <= h1;
      out_tag  <= h1_tag;
    end
  end

  // the output slot after a TU32 row belongs to its second half
  assert property (@(posedge clk) !(s3_v && pend))
    else $error("it_multishape: unit presented in the slot of a TU32 second half");
endmodule
