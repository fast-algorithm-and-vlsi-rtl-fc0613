// tb_dq_align: the worked example of a 4x4 sub-block (16 coefficients, ten
// remaining values) and random sub-blocks that obey HEVC's coding rules.
// R[n], baseLevel and the aligned remaining values are compared with a
// sequential model of the level-decoding procedure.
module tb_dq_align;
  import tb_ref_pkg::*;
  logic [15:0] sig, gt1, gt2, r;
  logic [15:0] vals [16], ac [16];
  logic [1:0]  base [16];
  logic [4:0]  m_count;
  int checks = 0, failures = 0;

  dq_align #(.W(16)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(sblk_t s);
    int k = 0;
    sig = s.sig; gt1 = s.gt1; gt2 = s.gt2;
    for (int i = 0; i < 16; i++) vals[i] = '0;
    for (int n = 15; n >= 0; n--) if (s.has_rem[n]) begin vals[k] = 16'(s.rem[n]); k++; end
    #1;
    checks++;
    if (r != s.has_rem || m_count != 5'(k)) begin
      failures++; $display("R got %b exp %b (m %0d/%0d)", r, s.has_rem, m_count, k);
    end
    for (int n = 0; n < 16; n++) begin
      int lvl;
      lvl = s.sig[n] ? int'(base[n]) + int'(ac[n]) : 0;
      checks++;
      if (lvl != (s.sign[n] ? -trans_level(s, n) : trans_level(s, n))) begin
        failures++; $display("n=%0d level got %0d exp %0d", n, lvl, trans_level(s, n));
      end
    end
  endtask

  initial begin
    sblk_t s;
    int exp_lvl[16] = '{21, 4, -16, 9, -3, 7, -2, -5, -1, 16, -1, -4, 1, 1, 1, 0};
    int rem_fig[16] = '{20, 3, 15, 8, 2, 6, 1, 3, 0, 14, 0, 1, 0, 0, 0, 0};
    // worked example
    s.sig  = 16'b0111_1111_1111_1111;
    s.gt1  = 16'b0000_1010_1000_0000;
    s.gt2  = 16'b0000_1000_0000_0000;
    s.sign = 16'b0000_1101_1101_0100;
    s.has_rem = 16'b0000_1010_1111_1111;
    for (int n = 0; n < 16; n++) s.rem[n] = s.has_rem[n] ? rem_fig[n] : 0;
    check(s);
    for (int n = 0; n < 16; n++) begin
      checks++;
      if (trans_level(s, n) != exp_lvl[n]) begin failures++; $display("example n=%0d", n); end
    end
    for (int t = 0; t < 3000; t++) check(rand_sblk(10 + (t % 90), t % 2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
