// tb_qt_buffer: random TUs of every size placed at random ring positions
// (also wrapping past the end). Random sub-blocks are written (uncoded ones
// are not written at all, coded ones have many all-zero 4x1 rows), then
// every row unit is read and compared with the TU: slot p of unit u holds
// coefficient (unit_row, unit_col). Also checked: the per-quad zero flags
// and the non-zero row flags, that zero quads are not read (skip count),
// and that data of an earlier TU at the same place never leaks into a
// later one (flags are set again by the read).
module tb_qt_buffer;
  import hevc_tr_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial begin
    #1 rst_n = 0;
    #30 rst_n = 1;
  end

  logic               wr_valid = 0, rd_valid = 0;
  tu_size_e           wr_size = TU4, rd_size = TU4;
  logic [7:0]         wr_base = 0, rd_base = 0;
  logic [2:0]         wr_sx = 0, wr_sy = 0;
  logic signed [15:0] wr_coef [16];
  logic [5:0]         rd_unit = 0;
  logic signed [15:0] rd_data [16];
  logic [3:0]         rd_zq, rd_rownz;
  qt_buffer #(.DEPTH(192)) dut (.*);

  int checks = 0, failures = 0, zero_quads = 0;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int blk[32][32];
    @(posedge rst_n);
    for (int t = 0; t < 300; t++) begin
      int s, np, nunits, base;
      s  = $urandom % 4;
      np = 4 << s;
      base = (t % 7 == 0) ? 192 - 8 : int'($urandom % 192);   // sometimes wrap
      if (t % 11 == 0) base = 0;                               // reuse a place
      for (int y = 0; y < 32; y++) for (int x = 0; x < 32; x++) blk[y][x] = 0;
      for (int sy = 0; sy < np / 4; sy++)
        for (int sx = 0; sx < np / 4; sx++)
          if ($urandom % 2) begin
            for (int j = 0; j < 16; j++)
              if ($urandom % 4 == 0) blk[sy * 4 + j / 4][sx * 4 + j % 4] = int'($urandom % 2001) - 1000;
            @(negedge clk);
            wr_valid = 1; wr_size = tu_size_e'(s); wr_base = 8'(base);
            wr_sx = 3'(sx); wr_sy = 3'(sy);
            for (int j = 0; j < 16; j++) wr_coef[j] = 16'(blk[sy * 4 + j / 4][sx * 4 + j % 4]);
          end
      @(negedge clk);
      wr_valid = 0;
      nunits = tu_words16(tu_size_e'(s));
      for (int u = 0; u < nunits; u++) begin
        @(negedge clk);
        rd_valid = 1; rd_size = tu_size_e'(s); rd_base = 8'(base); rd_unit = 6'(u);
        @(negedge clk);
        rd_valid = 0;
        for (int p = 0; p < 16; p++) begin
          checks++;
          if (rd_data[p] != 16'(blk[unit_row(tu_size_e'(s), u, p)][unit_col(tu_size_e'(s), u, p)])) begin
            failures++;
            if (failures < 10) $display("TU %0d size %0d unit %0d slot %0d: got %0d", t, s, u, p, rd_data[p]);
          end
        end
        for (int g = 0; g < 4; g++) begin
          bit z;
          z = 1;
          for (int p = 4 * g; p < 4 * g + 4; p++)
            if (blk[unit_row(tu_size_e'(s), u, p)][unit_col(tu_size_e'(s), u, p)] != 0) z = 0;
          checks++;
          if (rd_zq[g] != z) begin
            failures++;
            $display("TU %0d unit %0d quad %0d zero flag %0b", t, u, g, rd_zq[g]);
          end
          if (z) zero_quads++;
        end
        begin
          // non-zero row flags
          logic [3:0] e;
          e = '0;
          for (int p = 0; p < 16; p++) begin
            int r, bit_i;
            r = unit_row(tu_size_e'(s), u, p);
            bit_i = (s == 0) ? r : (s == 1) ? r % 2 : 0;
            if (s == 3) begin
              for (int c = 0; c < 32; c++) if (blk[r][c] != 0) e[0] = 1;
            end else if (blk[r][unit_col(tu_size_e'(s), u, p)] != 0) e[bit_i] = 1;
          end
          checks++;
          if (rd_rownz != e) begin
            failures++;
            $display("TU %0d unit %0d row flags %b exp %b", t, u, rd_rownz, e);
          end
        end
      end
    end
    checks++;
    if (zero_quads == 0) begin failures++; $display("no zero quad seen"); end
    $display("zero quads skipped: %0d", zero_quads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
