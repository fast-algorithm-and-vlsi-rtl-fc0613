// hevc_recon_top: the transform engines of the document side by side.
//
//  * u_idct (idct2d_4p): the area-efficient 2D inverse DCT at 4 pixels per
//    cycle with the four-bank SRAM transpose memory (enough for 4Kx2K at
//    60 frames/s). Ports t_*.
//  * u_dqit (dqit_system): de-quantization plus 16-pixel-per-cycle inverse
//    transform with zero skipping for the reconstruction loop (aimed at 8K
//    at 120 frames/s at 300 MHz). Ports d_*, y_*, c_*.
//  * u_fdct (fwd_dct1d): the 1D forward DCT counterpart used in mode
//    decision, butterfly first, 4 outputs per cycle in natural order.
//    Ports f_*.
// The two share only clock and reset; they are alternative designs of the
// document and are not chained. See the submodules for interface details.
module hevc_recon_top
  import hevc_tr_pkg::*;
#(
  parameter int BIT_DEPTH = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // ---- 4-pixel 2D IDCT ----
  input  logic               t_in_valid,
  output logic               t_in_ready,
  input  tu_size_e           t_in_size,
  input  logic signed [15:0] t_in_coef [32],
  output logic               t_out_valid,
  output tu_size_e           t_out_size,
  output logic [4:0]         t_out_col,
  output logic [4:0]         t_out_row [4],
  output logic signed [15:0] t_out_data [4],
  // ---- DQ + 16-pixel IT ----
  input  logic               d_in_valid,
  output logic               d_in_ready,
  output logic               d_in_last_beat,
  input  logic [15:0]        d_in_sig,
  input  logic [15:0]        d_in_gt1,
  input  logic [15:0]        d_in_gt2,
  input  logic [15:0]        d_in_sign,
  input  logic [1:0]         d_in_scan,
  input  logic [5:0]         d_in_qp,
  input  tu_size_e           d_in_size,
  input  logic [15:0]        d_in_rem [4],
  input  logic [1:0]         d_in_comp,
  input  logic [2:0]         d_in_sx,
  input  logic [2:0]         d_in_sy,
  input  logic               d_in_first,
  input  logic               d_in_last,
  input  logic               d_in_dst,
  output logic               y_valid,
  output tu_size_e           y_size,
  output logic [5:0]         y_unit,
  output logic               y_last,
  output logic signed [15:0] y_data [16],
  output logic               c_valid,
  output tu_size_e           c_size,
  output logic [5:0]         c_unit,
  output logic               c_last,
  output logic signed [15:0] c_data [16],
  output logic [31:0]        cnt_stall    [2],
  output logic [31:0]        cnt_qt_skip  [2],
  output logic [31:0]        cnt_trw_skip [2],
  output logic [31:0]        cnt_trr_skip [2],
  output logic [31:0]        cnt_tu       [2],
  // ---- 1D forward DCT ----
  input  logic               f_in_valid,
  output logic               f_in_ready,
  input  tu_size_e           f_in_size,
  input  logic signed [15:0] f_in_x [32],
  output logic               f_out_valid,
  input  logic               f_out_ready,
  output tu_size_e           f_out_size,
  output logic [2:0]         f_out_cyc,
  output logic               f_out_last,
  output logic signed [31:0] f_out_data [4]
);
  idct2d_4p #(.IW(16), .OUTW(16), .SHIFT1(7), .SHIFT2(20 - BIT_DEPTH)) u_idct (
    .clk, .rst_n, .in_valid(t_in_valid), .in_ready(t_in_ready), .in_size(t_in_size),
    .in_coef(t_in_coef), .out_valid(t_out_valid), .out_size(t_out_size), .out_col(t_out_col),
    .out_row(t_out_row), .out_data(t_out_data));

  dqit_system #(.BIT_DEPTH(BIT_DEPTH), .LUMA_DEPTH(192), .CHROMA_DEPTH(96)) u_dqit (
    .clk, .rst_n,
    .in_valid(d_in_valid), .in_ready(d_in_ready), .in_last_beat(d_in_last_beat),
    .in_sig(d_in_sig), .in_gt1(d_in_gt1), .in_gt2(d_in_gt2), .in_sign(d_in_sign),
    .in_scan(d_in_scan), .in_qp(d_in_qp), .in_size(d_in_size), .in_rem(d_in_rem),
    .in_comp(d_in_comp), .in_sx(d_in_sx), .in_sy(d_in_sy), .in_first(d_in_first),
    .in_last(d_in_last), .in_dst(d_in_dst),
    .y_valid, .y_size, .y_unit, .y_last, .y_data,
    .c_valid, .c_size, .c_unit, .c_last, .c_data,
    .cnt_stall, .cnt_qt_skip, .cnt_trw_skip, .cnt_trr_skip, .cnt_tu);

  fwd_dct1d #(.IW(16), .OW(32)) u_fdct (
    .clk, .rst_n, .in_valid(f_in_valid), .in_ready(f_in_ready), .in_size(f_in_size),
    .in_x(f_in_x), .out_valid(f_out_valid), .out_ready(f_out_ready), .out_size(f_out_size),
    .out_cyc(f_out_cyc), .out_last(f_out_last), .out_data(f_out_data));
endmodule
