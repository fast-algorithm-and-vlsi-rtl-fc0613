// tb_dq: random sub-blocks (sparse to dense, small and large remaining
// values, every QP band, TU size and scan) through the two-stage DQ. The
// remaining values are sent four per beat in decoding order. Results are
// compared, in raster order, with the HEVC de-quantization of the levels
// given by the level-decoding procedure. The beats an SBLK takes must be
// max(1, ceil(M/4)) for M remaining values; with a ready output an SBLK is
// accepted every such number of cycles. Random output stalls in phase 2.
module tb_dq;
  import hevc_tr_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic in_valid = 0, in_ready, in_last_beat, out_valid, out_ready = 1;
  logic [15:0] in_sig = 0, in_gt1 = 0, in_gt2 = 0, in_sign = 0;
  logic [1:0] in_scan = 0;
  logic [5:0] in_qp = 0;
  tu_size_e in_size = TU4;
  logic [15:0] in_tag = 0, out_tag;
  logic [15:0] in_rem [4];
  logic signed [15:0] out_coef [16];
  int checks = 0, failures = 0;
  bit stall_phase = 0;

  dq #(.BIT_DEPTH(8), .CW(16), .TAGW(16)) dut (.*);

  localparam int NS = 600;
  sblk_t sb[NS];
  int qp[NS], sz[NS], scan[NS];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready = stall_phase ? ($urandom % 2 == 0) : 1'b1;

  initial begin
    for (int i = 0; i < NS; i++) begin
      sb[i] = rand_sblk(5 + $urandom % 96, ($urandom % 4) == 0);
      qp[i] = $urandom % 52; sz[i] = $urandom % 4; scan[i] = $urandom % 3;
    end
    for (int i = 0; i < 4; i++) in_rem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NS; i++) begin
      int c[16], m, beats, nb;
      m = 0;
      if (i == NS / 2) stall_phase = 1;
      for (int n = 15; n >= 0; n--) if (sb[i].has_rem[n]) begin c[m] = sb[i].rem[n]; m++; end
      for (int k = m; k < 16; k++) c[k] = 0;
      beats = (m == 0) ? 1 : (m + 3) / 4;
      nb = 0;
      for (int k = 0; k < beats; k++) begin
        @(negedge clk);
        in_valid = 1; in_sig = sb[i].sig; in_gt1 = sb[i].gt1; in_gt2 = sb[i].gt2; in_sign = sb[i].sign;
        in_scan = 2'(scan[i]); in_qp = 6'(qp[i]); in_size = tu_size_e'(sz[i]); in_tag = 16'(i);
        for (int j = 0; j < 4; j++) in_rem[j] = 16'(c[4 * k + j]);
        #1;
        checks++;
        if (in_last_beat != (k == beats - 1)) begin
          failures++; $display("sblk %0d beat %0d: last_beat=%0b (M=%0d)", i, k, in_last_beat, m);
        end
        @(posedge clk);
        nb++;
        while (!in_ready) begin @(posedge clk); if (!stall_phase) nb++; end
      end
      checks++;
      if (nb != beats) begin failures++; $display("sblk %0d took %0d cycles, expected %0d", i, nb, beats); end
    end
    @(negedge clk); in_valid = 0;
  end

  initial begin
    int i = 0;
    @(posedge rst_n);
    while (i < NS) begin
      @(posedge clk);
      if (out_valid && out_ready) begin
        checks++;
        if (out_tag != 16'(i)) begin failures++; $display("tag %0d exp %0d", out_tag, i); end
        for (int n = 0; n < 16; n++) begin
          int e;
          e = dequant(trans_level(sb[i], n), qp[i], sz[i] + 2, 8);
          checks++;
          if (out_coef[scanpos(scan[i], n)] != 16'(e)) begin
            failures++;
            if (failures < 10) $display("sblk %0d n %0d got %0d exp %0d", i, n, out_coef[scanpos(scan[i], n)], e);
          end
        end
        i++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
