// dq: two-stage de-quantizer for one 4x4 sub-block (SBLK) at a time, using
// four multipliers.
//
// TransCoeffLevel = sign * (baseLevel + aligned remaining value), and the DQ
// result is (TransCoeffLevel * scale + 2^(bdShift-1)) >> bdShift, clipped to
// 16 bit, with scale = 16 * levelScale[qP % 6] << (qP / 6) and
// bdShift = bitDepth + log2(TU size) - 5 (HEVC flat scaling).
// The product is split in two: baseLevel * scale (baseLevel <= 3) comes from
// a small table {0, s, 2s, 3s}; only the remaining values need multipliers.
// The remaining values enter four per cycle (C[4k..4k+3] in beat k), so an
// SBLK with M remaining values takes max(1, ceil(M/4)) beats and four
// multipliers suffice:
//   stage 1: MC[4k+i] = C[4k+i] * scale. The 16-entry MC register is ORed
//            with the new products, which are zero outside the four slots of
//            the beat, so products of several beats merge without adders.
//   stage 2: MC is aligned to the coefficient positions (dq_align), added
//            to the baseLevel table value, signed, rounded, shifted and
//            clipped, and the 16 results are reordered from scan order to
//            raster order of the 4x4 (scan 0 diagonal, 1 horizontal,
//            2 vertical).
// The upstream holds the flags of an SBLK on all its beats; in_last_beat
// tells it which beat completes the SBLK. A tag (sub-block position,
// component, TU boundaries) travels with the SBLK.
// The use of HEVC's flat scaling list, the per-beat upstream protocol and
// the aligning of products (rather than of the remaining values) in stage 2
// are this design's choices; the split, the four multipliers, the OR merge
// and the two stages follow the document.
// Timing: results of an SBLK appear one cycle after its last beat.
// Lint note: the two dq_align instances are used for part of their outputs
// only (stage 1 needs only the count M, stage 2 not M and the R vector);
// the unused outputs r1, base1, r2 and m2 are reported as unused signals.
module dq
  import hevc_tr_pkg::*;
#(
  parameter int BIT_DEPTH = 8,
  parameter int CW        = 16,   // width of coeff_abs_level_remaining
  parameter int TAGW      = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  output logic                 in_last_beat,  // the beat now offered completes the SBLK
  input  logic [15:0]          in_sig,
  input  logic [15:0]          in_gt1,
  input  logic [15:0]          in_gt2,
  input  logic [15:0]          in_sign,
  input  logic [1:0]           in_scan,
  input  logic [5:0]           in_qp,
  input  tu_size_e             in_size,
  input  logic [TAGW-1:0]      in_tag,
  input  logic [CW-1:0]        in_rem [4],    // C[4k..4k+3] of beat k
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [15:0]   out_coef [16], // raster order y*4+x
  output logic [TAGW-1:0]      out_tag
);
  localparam int PW = 40;   // product width

  function automatic logic [PW-1:0] scale_of(logic [5:0] qp);
    int ls;
    case (int'(qp) % 6)
      0: ls = 40; 1: ls = 45; 2: ls = 51; 3: ls = 57; 4: ls = 64; default: ls = 72;
    endcase
    return PW'(16 * ls) << (int'(qp) / 6);
  endfunction

  // ---------------- stage 1: beat counting and four multipliers ----------------
  logic [15:0] r1;
  logic [1:0]  base1 [16];
  logic [4:0]  m1;
  logic [CW-1:0] zero_vals [16];
  logic [CW-1:0] ac_unused [16];
  always_comb for (int i = 0; i < 16; i++) zero_vals[i] = '0;

  dq_align #(.W(CW)) u_align1 (.sig(in_sig), .gt1(in_gt1), .gt2(in_gt2), .vals(zero_vals),
                               .r(r1), .base(base1), .m_count(m1), .ac(ac_unused));

  logic [1:0]    beat;            // beat index within the SBLK
  logic [PW-1:0] scale_in;
  logic [PW-1:0] prod [4];
  assign scale_in     = scale_of(in_qp);
  assign in_last_beat = ({1'b0, beat, 2'b00} + 5'd4 >= m1);
  always_comb for (int i = 0; i < 4; i++) prod[i] = PW'(in_rem[i]) * scale_in;

  // pipeline register between the stages
  logic          p_valid;          // a complete SBLK is held
  logic [PW-1:0] mc [16];
  logic [15:0]   p_sig, p_gt1, p_gt2, p_sign;
  logic [1:0]    p_scan;
  logic [PW-1:0] p_scale;
  tu_size_e      p_size;
  logic [TAGW-1:0] p_tag;

  logic s2_go;                     // stage 2 takes the held SBLK
  assign s2_go    = p_valid && (!out_valid || out_ready);
  assign in_ready = !p_valid || s2_go;
  wire   take     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid <= 1'b0;
      beat    <= '0;
    end else begin
      if (take) begin
        beat    <= in_last_beat ? 2'd0 : beat + 2'd1;
        p_valid <= in_last_beat;
      end else if (s2_go) p_valid <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (take) begin
      for (int j = 0; j < 16; j++) begin
        logic [PW-1:0] newp;
        newp = (j / 4 == int'(beat)) ? prod[j % 4] : '0;
        mc[j] <= (beat == 2'd0) ? newp : (mc[j] | newp);   // OR merge across beats
      end
      p_sig   <= in_sig;  p_gt1 <= in_gt1; p_gt2 <= in_gt2; p_sign <= in_sign;
      p_scan  <= in_scan; p_scale <= scale_in; p_size <= in_size; p_tag <= in_tag;
    end
  end

  // ---------------- stage 2: align, baseLevel table, sign, shift ----------------
  logic [15:0]   r2;
  logic [1:0]    base2 [16];
  logic [4:0]    m2;
  logic [PW-1:0] amc [16];
  dq_align #(.W(PW)) u_align2 (.sig(p_sig), .gt1(p_gt1), .gt2(p_gt2), .vals(mc),
                               .r(r2), .base(base2), .m_count(m2), .ac(amc));

  int bdshift;
  logic signed [15:0] res_scan [16];
  always_comb begin
    bdshift = BIT_DEPTH + 2 + int'(p_size) - 5;
    for (int n = 0; n < 16; n++) begin
      logic [PW-1:0] basep, mag;
      logic signed [PW:0] sv, rv;
      case (base2[n])
        2'd0:    basep = '0;
        2'd1:    basep = p_scale;
        2'd2:    basep = p_scale << 1;
        default: basep = (p_scale << 1) + p_scale;
      endcase
      mag = basep + amc[n];
      sv  = p_sign[n] ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
      rv  = (sv + (PW+1)'(1 <<< (bdshift - 1))) >>> bdshift;
      if (rv > 32767)       res_scan[n] = 16'sd32767;
      else if (rv < -32768) res_scan[n] = -16'sd32768;
      else                  res_scan[n] = rv[15:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else if (s2_go) out_valid <= 1'b1;
    else if (out_ready) out_valid <= 1'b0;
  end

  always_ff @(posedge clk) begin
    if (s2_go) begin
      for (int n = 0; n < 16; n++) out_coef[scan4_pos(p_scan, n)] <= res_scan[n];
      out_tag <= p_tag;
    end
  end
endmodule
