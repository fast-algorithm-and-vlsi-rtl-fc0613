// dqit_path: the reconstruction-loop transform path of one colour component
// group after de-quantization: QT buffer -> row transform IT1 -> transpose
// buffer -> column transform IT2, all at 16 pixels per cycle.
//
// Flow:
//  * DQ side: one de-quantized 4x4 sub-block (SBLK) per accepted beat, with
//    its TU size, position (sx, sy) and first/last flags. On the first SBLK
//    of a TU, room for the whole TU is taken from the QT buffer, which is
//    used as a ring; if there is not enough room the input stalls (this is
//    the pipeline stall of the document: DQ waits for IT). On the last SBLK
//    the TU (size, QT base, DST flag) is pushed into FIFO1.
//  * IT1 reader: takes a TU from FIFO1, takes room in the transpose buffer,
//    reads one row unit per cycle from the QT buffer (zero 4x1 rows are not
//    read) and feeds IT1. The QT room is given back after the last unit is
//    read. The non-zero-row flags of each unit travel down the IT1 pipeline
//    with the unit; IT1 results of zero rows are not written into the
//    transpose buffer. When the last unit of a TU is written, the TU (size,
//    transpose-buffer base, DST flag, 32-bit non-zero row map) goes into
//    FIFO2.
//  * IT2 reader: takes a TU from FIFO2, reads one column unit per cycle from
//    the transpose buffer (elements of zero rows are not read and are zero),
//    feeds IT2 and gives the transpose room back after the last unit.
//  * One cycle is left idle after the last unit of a 32x32 TU when the next
//    TU is smaller (IT1/IT2 emit the second half of a 32-point row then).
// Output: one 16-residual column unit per cycle, out_unit and out_size
// label it (slot p = residual row unit_col(size, unit, p), column
// unit_row(size, unit, p)); out_last marks the last unit of a TU. The output
// cannot be stalled.
// Counters: stall cycles at the input, QT quads skipped, transpose-buffer
// slots not written and not read, TUs finished.
// Follows the document: the stage order, the 16-pixel throughput, the
// buffers and their mappings, FIFOs carrying TU information and zero flags,
// and the three kinds of zero skipping. This design's choices: ring
// allocation, FIFO depths, the idle cycle after TU32, rounding shifts of
// HEVC (7 after IT1, 20 - bit depth after IT2).
module dqit_path
  import hevc_tr_pkg::*;
#(
  parameter int QT_DEPTH  = 192,   // luma: 192, chroma: 96
  parameter int TR_DEPTH  = 192,
  parameter int BIT_DEPTH = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // de-quantized SBLKs
  input  logic               in_valid,
  output logic               in_ready,
  input  logic signed [15:0] in_coef [16],   // raster order y*4+x
  input  tu_size_e           in_size,
  input  logic [2:0]         in_sx,
  input  logic [2:0]         in_sy,
  input  logic               in_first,
  input  logic               in_last,
  input  logic               in_dst,
  // residual column units
  output logic               out_valid,
  output tu_size_e           out_size,
  output logic [5:0]         out_unit,
  output logic               out_last,
  output logic signed [15:0] out_data [16],
  // event counters
  output logic [31:0]        cnt_stall,
  output logic [31:0]        cnt_qt_skip,
  output logic [31:0]        cnt_trw_skip,
  output logic [31:0]        cnt_trr_skip,
  output logic [31:0]        cnt_tu
);
  localparam int QA = $clog2(QT_DEPTH);
  localparam int TA = $clog2(TR_DEPTH);
  localparam int F1W = 1 + 2 + QA;            // dst, size, QT base
  localparam int F2W = 1 + 2 + TA + 32;       // dst, size, TR base, row map
  localparam int T1W = 1 + 1 + TA + 4 + 6;    // last, dst, TR base, rownz, unit
  localparam int T2W = 1 + 6;                 // last, unit
  // FIFO2 holds the TUs in the IT1 pipeline too: 8 entries let 4x4 TUs
  // flow at one per cycle
  localparam int F2_DEPTH = 8;

  function automatic logic [8:0] words(tu_size_e s);
    return 9'(tu_words16(s));
  endfunction

  function automatic logic [QA-1:0] qwrap(logic [QA-1:0] b, logic [8:0] off);
    int a;
    a = int'(b) + int'(off);
    if (a >= QT_DEPTH) a -= QT_DEPTH;
    return QA'(a);
  endfunction

  function automatic logic [TA-1:0] twrap(logic [TA-1:0] b, logic [8:0] off);
    int a;
    a = int'(b) + int'(off);
    if (a >= TR_DEPTH) a -= TR_DEPTH;
    return TA'(a);
  endfunction

  function automatic logic [5:0] last_unit(tu_size_e s);
    case (s)
      TU4:     return 6'd0;
      TU8:     return 6'd3;
      TU16:    return 6'd15;
      default: return 6'd63;
    endcase
  endfunction

  // ================= DQ side: QT room and write =================
  logic [QA-1:0] qt_head, cur_base;
  logic [8:0]    qt_used;
  logic          f1_full, f1_empty;
  logic [2:0]    f1_count;
  logic [F1W-1:0] f1_dout;
  logic          qt_room;
  logic          qt_free;            // IT1 reader gives a TU's room back
  logic [8:0]    qt_free_words;

  assign qt_room  = (int'(qt_used) + tu_words16(in_size) <= QT_DEPTH);
  assign in_ready = (!in_first || qt_room) && (!in_last || !f1_full);
  wire   in_take  = in_valid && in_ready;
  wire [QA-1:0] wbase = in_first ? qt_head : cur_base;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qt_head <= '0; cur_base <= '0; qt_used <= '0; cnt_stall <= '0;
    end else begin
      if (in_take && in_first) begin
        cur_base <= qt_head;
        qt_head  <= qwrap(qt_head, words(in_size));
      end
      qt_used <= qt_used + ((in_take && in_first) ? words(in_size) : 9'd0)
                         - (qt_free ? qt_free_words : 9'd0);
      if (in_valid && !in_ready) cnt_stall <= cnt_stall + 32'd1;
    end
  end

  // ================= IT1 reader =================
  logic           a_act, a_dst, a_last32;
  tu_size_e       a_size;
  logic [QA-1:0]  a_qbase;
  logic [TA-1:0]  a_tbase;
  logic [5:0]     a_u;
  logic [TA-1:0]  tr_head;
  logic [8:0]     tr_used;
  logic [3:0]     a_inflight;        // TUs between the IT1 reader and FIFO2
  logic           f2_full, f2_empty;
  logic [3:0]     f2_count;
  logic [F2W-1:0] f2_din, f2_dout;
  logic           f2_push;
  logic           tr_free;
  logic           c_issue, c_done, c_load;
  logic [8:0]     tr_free_words;

  tu_size_e       f1_size;
  logic           f1_dst;
  logic [QA-1:0]  f1_base;
  assign {f1_dst, f1_size, f1_base} = f1_dout;

  logic a_issue, a_done, a_load;
  assign a_issue = a_act && !(a_last32 && a_size != TU32);
  assign a_done  = a_issue && (a_u == last_unit(a_size));
  assign a_load  = (!a_act || a_done) && !f1_empty &&
                   (int'(tr_used) + tu_words16(f1_size) <= TR_DEPTH) &&
                   (int'(f2_count) + int'(a_inflight) < F2_DEPTH);
  assign qt_free       = a_done;
  assign qt_free_words = words(a_size);

  tu_fifo #(.W(F1W), .DEPTH(4)) u_fifo1 (
    .clk, .rst_n, .push(in_take && in_last), .din({in_dst, in_size, wbase}), .full(f1_full),
    .pop(a_load), .dout(f1_dout), .empty(f1_empty), .count(f1_count));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_act <= 1'b0; a_dst <= 1'b0; a_last32 <= 1'b0; a_size <= TU4;
      a_qbase <= '0; a_tbase <= '0; a_u <= '0; tr_head <= '0; a_inflight <= '0;
    end else begin
      a_last32 <= a_done && (a_size == TU32);
      if (a_load) begin
        a_act   <= 1'b1;
        a_size  <= f1_size;
        a_dst   <= f1_dst;
        a_qbase <= f1_base;
        a_tbase <= tr_head;
        a_u     <= '0;
        tr_head <= twrap(tr_head, words(f1_size));
      end else if (a_done) begin
        a_act <= 1'b0;
      end else if (a_issue) begin
        a_u <= a_u + 6'd1;
      end
      a_inflight <= a_inflight + 4'(a_load) - 4'(f2_push);
    end
  end

  // QT buffer
  logic signed [15:0] qt_rd [16];
  logic [3:0]         qt_zq, qt_rownz;
  qt_buffer #(.DEPTH(QT_DEPTH)) u_qt (
    .clk, .rst_n,
    .wr_valid(in_take), .wr_size(in_size), .wr_base(wbase), .wr_sx(in_sx), .wr_sy(in_sy),
    .wr_coef(in_coef),
    .rd_valid(a_issue), .rd_size(a_size), .rd_base(a_qbase), .rd_unit(a_u),
    .rd_data(qt_rd), .rd_zq(qt_zq), .rd_rownz(qt_rownz));

  // stage B: QT data -> IT1
  logic          b_v, b_last, b_dst;
  tu_size_e      b_size;
  logic [TA-1:0] b_tbase;
  logic [5:0]    b_u;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_v <= 1'b0; b_last <= 1'b0; b_dst <= 1'b0; b_size <= TU4; b_tbase <= '0; b_u <= '0;
      cnt_qt_skip <= '0;
    end else begin
      b_v <= a_issue;
      if (a_issue) begin
        b_last <= a_done; b_dst <= a_dst; b_size <= a_size; b_tbase <= a_tbase; b_u <= a_u;
      end
      if (b_v) cnt_qt_skip <= cnt_qt_skip + 32'($countones(qt_zq));
    end
  end

  logic            it1_ov;
  tu_size_e        it1_size;
  logic [T1W-1:0]  it1_tag;
  logic signed [15:0] it1_d [16];
  it_multishape #(.IW(16), .SHIFT(7), .TAGW(T1W)) u_it1 (
    .clk, .rst_n, .in_valid(b_v), .in_size(b_size), .in_dst(b_dst), .in_half(b_u[0]),
    .in_coef(qt_rd), .in_tag({b_last, b_dst, b_tbase, qt_rownz, b_u}),
    .out_valid(it1_ov), .out_size(it1_size), .out_tag(it1_tag), .out_data(it1_d));

  logic          w_last, w_dst;
  logic [TA-1:0] w_tbase;
  logic [3:0]    w_rownz;
  logic [5:0]    w_u;
  assign {w_last, w_dst, w_tbase, w_rownz, w_u} = it1_tag;

  // non-zero row map of the TU being written
  logic [31:0] rowmap, rowmap_new;
  always_comb begin
    rowmap_new = rowmap;
    case (it1_size)
      TU4:  rowmap_new[3:0] = w_rownz;
      TU8:  begin
        rowmap_new[2 * int'(w_u[1:0])]     = w_rownz[0];
        rowmap_new[2 * int'(w_u[1:0]) + 1] = w_rownz[1];
      end
      TU16: rowmap_new[{1'b0, w_u[3:0]}] = w_rownz[0];
      default: rowmap_new[w_u[5:1]] = w_rownz[0];
    endcase
  end
  assign f2_push = it1_ov && w_last;
  assign f2_din  = {w_dst, it1_size, w_tbase, rowmap_new};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rowmap <= '0;
    else if (it1_ov) rowmap <= w_last ? '0 : rowmap_new;
  end

  tu_fifo #(.W(F2W), .DEPTH(F2_DEPTH)) u_fifo2 (
    .clk, .rst_n, .push(f2_push), .din(f2_din), .full(f2_full),
    .pop(c_load), .dout(f2_dout), .empty(f2_empty), .count(f2_count));

  // ================= IT2 reader =================
  logic          c_act, c_last32, c_dst;
  tu_size_e      c_size;
  logic [TA-1:0] c_tbase;
  logic [31:0]   c_rowmap;
  logic [5:0]    c_u;

  tu_size_e      f2_size;
  logic          f2_dst;
  logic [TA-1:0] f2_base;
  logic [31:0]   f2_map;
  assign {f2_dst, f2_size, f2_base, f2_map} = f2_dout;

  assign c_issue = c_act && !(c_last32 && c_size != TU32);
  assign c_done  = c_issue && (c_u == last_unit(c_size));
  assign c_load  = (!c_act || c_done) && !f2_empty;
  assign tr_free       = c_done;
  assign tr_free_words = words(c_size);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_act <= 1'b0; c_last32 <= 1'b0; c_dst <= 1'b0; c_size <= TU4;
      c_tbase <= '0; c_rowmap <= '0; c_u <= '0; tr_used <= '0;
    end else begin
      c_last32 <= c_done && (c_size == TU32);
      if (c_load) begin
        c_act    <= 1'b1;
        c_size   <= f2_size;
        c_dst    <= f2_dst;
        c_tbase  <= f2_base;
        c_rowmap <= f2_map;
        c_u      <= '0;
      end else if (c_done) begin
        c_act <= 1'b0;
      end else if (c_issue) begin
        c_u <= c_u + 6'd1;
      end
      tr_used <= tr_used + (a_load ? words(f1_size) : 9'd0) - (tr_free ? tr_free_words : 9'd0);
    end
  end

  // transpose buffer
  logic signed [15:0] tr_rd [16];
  logic [4:0]         trw_n, trr_n;
  tr_buffer16 #(.DEPTH(TR_DEPTH)) u_tr (
    .clk,
    .wr_valid(it1_ov), .wr_size(it1_size), .wr_base(w_tbase), .wr_unit(w_u),
    .wr_rownz(w_rownz), .wr_data(it1_d), .wr_nskip(trw_n),
    .rd_valid(c_issue), .rd_size(c_size), .rd_base(c_tbase), .rd_unit(c_u),
    .rd_rownz(c_rowmap), .rd_nskip(trr_n), .rd_data(tr_rd));

  // stage D: transpose data -> IT2
  logic     d_v, d_last, d_dst;
  tu_size_e d_size;
  logic [5:0] d_u;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_v <= 1'b0; d_last <= 1'b0; d_dst <= 1'b0; d_size <= TU4; d_u <= '0;
      cnt_trw_skip <= '0; cnt_trr_skip <= '0; cnt_tu <= '0;
    end else begin
      d_v <= c_issue;
      if (c_issue) begin
        d_last <= c_done; d_dst <= c_dst; d_size <= c_size; d_u <= c_u;
      end
      cnt_trw_skip <= cnt_trw_skip + 32'(trw_n);
      cnt_trr_skip <= cnt_trr_skip + 32'(trr_n);
      if (out_valid && out_last) cnt_tu <= cnt_tu + 32'd1;
    end
  end

  logic [T2W-1:0] it2_tag;
  it_multishape #(.IW(16), .SHIFT(20 - BIT_DEPTH), .TAGW(T2W)) u_it2 (
    .clk, .rst_n, .in_valid(d_v), .in_size(d_size), .in_dst(d_dst), .in_half(d_u[0]),
    .in_coef(tr_rd), .in_tag({d_last, d_u}),
    .out_valid, .out_size, .out_tag(it2_tag), .out_data);
  assign {out_last, out_unit} = it2_tag;

  // FIFO2 room is reserved when the IT1 reader takes a TU
  assert property (@(posedge clk) !(f2_push && f2_full))
    else $error("dqit_path: FIFO2 overflow");
  assert property (@(posedge clk) f1_count <= 3'd4)
    else $error("dqit_path: FIFO1 count out of range");
endmodule
