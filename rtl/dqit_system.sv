// dqit_system: de-quantization and inverse transform of the reconstruction
// loop, 16 pixels per cycle (chapter "DQ and IT" of the document).
//
// One two-stage de-quantizer (dq, four multipliers) takes the syntax
// elements of one 4x4 sub-block (SBLK) in max(1, ceil(M/4)) cycles, M being
// the number of remaining values, and sends the de-quantized SBLK to the
// luma path or to the chroma path (dqit_path: QT buffer, IT1, transpose
// buffer, IT2). The luma path has buffers of 192 words per bank (three
// 32x32 TUs); the chroma path, whose TUs are at most 16x16 in 4:2:0, has
// 96. A path that cannot take an SBLK stalls the de-quantizer.
// Interface: the upstream (entropy decoder side) presents the flags of one
// SBLK with its labels on all beats of the SBLK and the remaining values
// four per beat (see dq); in_last_beat tells it which beat completes the
// SBLK. Only coded SBLKs are sent: in_first / in_last mark the first and
// last coded SBLK of a TU, (in_sx, in_sy) its position. in_comp: 0 luma,
// 1 Cb, 2 Cr. Outputs: 16 residuals per cycle per path as column units
// (see dqit_path); Cb and Cr TUs leave the chroma path in input order.
// The split into one DQ and two paths with these buffer sizes follows the
// document; the upstream protocol is this design's choice.
module dqit_system
  import hevc_tr_pkg::*;
#(
  parameter int BIT_DEPTH   = 8,
  parameter int LUMA_DEPTH  = 192,
  parameter int CHROMA_DEPTH = 96
) (
  input  logic               clk,
  input  logic               rst_n,
  // syntax elements of one SBLK
  input  logic               in_valid,
  output logic               in_ready,
  output logic               in_last_beat,
  input  logic [15:0]        in_sig,
  input  logic [15:0]        in_gt1,
  input  logic [15:0]        in_gt2,
  input  logic [15:0]        in_sign,
  input  logic [1:0]         in_scan,
  input  logic [5:0]         in_qp,
  input  tu_size_e           in_size,
  input  logic [15:0]        in_rem [4],
  input  logic [1:0]         in_comp,
  input  logic [2:0]         in_sx,
  input  logic [2:0]         in_sy,
  input  logic               in_first,
  input  logic               in_last,
  input  logic               in_dst,
  // luma residuals
  output logic               y_valid,
  output tu_size_e           y_size,
  output logic [5:0]         y_unit,
  output logic               y_last,
  output logic signed [15:0] y_data [16],
  // chroma residuals
  output logic               c_valid,
  output tu_size_e           c_size,
  output logic [5:0]         c_unit,
  output logic               c_last,
  output logic signed [15:0] c_data [16],
  // event counters: index 0 luma, 1 chroma
  output logic [31:0]        cnt_stall    [2],
  output logic [31:0]        cnt_qt_skip  [2],
  output logic [31:0]        cnt_trw_skip [2],
  output logic [31:0]        cnt_trr_skip [2],
  output logic [31:0]        cnt_tu       [2]
);
  localparam int TAGW = 2 + 2 + 1 + 1 + 1 + 3 + 3;   // comp, size, dst, first, last, sy, sx

  logic               dq_ov, dq_or;
  logic signed [15:0] dq_coef [16];
  logic [TAGW-1:0]    dq_tag;

  dq #(.BIT_DEPTH(BIT_DEPTH), .CW(16), .TAGW(TAGW)) u_dq (
    .clk, .rst_n, .in_valid, .in_ready, .in_last_beat,
    .in_sig, .in_gt1, .in_gt2, .in_sign, .in_scan, .in_qp, .in_size,
    .in_tag({in_comp, in_size, in_dst, in_first, in_last, in_sy, in_sx}),
    .in_rem, .out_valid(dq_ov), .out_ready(dq_or), .out_coef(dq_coef), .out_tag(dq_tag));

  logic [1:0] t_comp;
  logic [1:0] t_size;
  logic       t_dst, t_first, t_last;
  logic [2:0] t_sy, t_sx;
  assign {t_comp, t_size, t_dst, t_first, t_last, t_sy, t_sx} = dq_tag;

  logic y_ready, c_ready;
  wire  to_luma = (t_comp == 2'd0);
  assign dq_or = to_luma ? y_ready : c_ready;

  dqit_path #(.QT_DEPTH(LUMA_DEPTH), .TR_DEPTH(LUMA_DEPTH), .BIT_DEPTH(BIT_DEPTH)) u_luma (
    .clk, .rst_n,
    .in_valid(dq_ov && to_luma), .in_ready(y_ready), .in_coef(dq_coef), .in_size(tu_size_e'(t_size)),
    .in_sx(t_sx), .in_sy(t_sy), .in_first(t_first), .in_last(t_last), .in_dst(t_dst),
    .out_valid(y_valid), .out_size(y_size), .out_unit(y_unit), .out_last(y_last), .out_data(y_data),
    .cnt_stall(cnt_stall[0]), .cnt_qt_skip(cnt_qt_skip[0]), .cnt_trw_skip(cnt_trw_skip[0]),
    .cnt_trr_skip(cnt_trr_skip[0]), .cnt_tu(cnt_tu[0]));

  dqit_path #(.QT_DEPTH(CHROMA_DEPTH), .TR_DEPTH(CHROMA_DEPTH), .BIT_DEPTH(BIT_DEPTH)) u_chroma (
    .clk, .rst_n,
    .in_valid(dq_ov && !to_luma), .in_ready(c_ready), .in_coef(dq_coef), .in_size(tu_size_e'(t_size)),
    .in_sx(t_sx), .in_sy(t_sy), .in_first(t_first), .in_last(t_last), .in_dst(t_dst),
    .out_valid(c_valid), .out_size(c_size), .out_unit(c_unit), .out_last(c_last), .out_data(c_data),
    .cnt_stall(cnt_stall[1]), .cnt_qt_skip(cnt_qt_skip[1]), .cnt_trw_skip(cnt_trw_skip[1]),
    .cnt_trr_skip(cnt_trr_skip[1]), .cnt_tu(cnt_tu[1]));

  // chroma TUs are at most 16x16 (4:2:0)
  assert property (@(posedge clk) !(dq_ov && !to_luma && t_size == 2'd3))
    else $error("dqit_system: 32x32 chroma TU");
endmodule
