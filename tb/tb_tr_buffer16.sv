// tb_tr_buffer16: random TUs of every size at random ring positions. Row
// units are written as the row transform would (rows marked zero carry
// garbage data that must not be stored), then every column unit is read
// and compared: slot p of column unit u must hold element
// (r, c) = (unit_col(size, u, p), unit_row(size, u, p)), or zero when row r
// is marked zero. The skip counts of both ports are checked per cycle.
module tb_tr_buffer16;
  import hevc_tr_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic               wr_valid = 0, rd_valid = 0;
  tu_size_e           wr_size = TU4, rd_size = TU4;
  logic [7:0]         wr_base = 0, rd_base = 0;
  logic [5:0]         wr_unit = 0, rd_unit = 0;
  logic [3:0]         wr_rownz = 0;
  logic signed [15:0] wr_data [16];
  logic [31:0]        rd_rownz = 0;
  logic [4:0]         wr_nskip, rd_nskip;
  logic signed [15:0] rd_data [16];
  tr_buffer16 #(.DEPTH(192)) dut (.*);

  int checks = 0, failures = 0, skipped = 0;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m[32][32];
    bit rz[32];
    repeat (3) @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      int s, np, nunits, base;
      logic [31:0] map;
      s  = $urandom % 4;
      np = 4 << s;
      base = (t % 5 == 0) ? 192 - 4 : int'($urandom % 192);
      map = '0;
      for (int r = 0; r < 32; r++) begin
        rz[r] = (r >= np) || ($urandom % 3 == 0);
        if (!rz[r]) map[r] = 1'b1;
        for (int c = 0; c < 32; c++) m[r][c] = rz[r] ? 0 : int'($urandom % 65536) - 32768;
      end
      nunits = tu_words16(tu_size_e'(s));
      for (int u = 0; u < nunits; u++) begin
        int nz_exp;
        @(negedge clk);
        wr_valid = 1; wr_size = tu_size_e'(s); wr_base = 8'(base); wr_unit = 6'(u);
        wr_rownz = '0;
        nz_exp = 0;
        for (int p = 0; p < 16; p++) begin
          int r, bi;
          r  = unit_row(tu_size_e'(s), u, p);
          bi = (s == 0) ? p / 4 : (s == 1) ? p / 8 : 0;
          if (!rz[r]) wr_rownz[bi] = 1'b1;
          else nz_exp++;
          // garbage in zero rows: must not be written
          wr_data[p] = rz[r] ? 16'sh5a5a : 16'(m[r][unit_col(tu_size_e'(s), u, p)]);
        end
        #1;
        checks++;
        if (int'(wr_nskip) != nz_exp) begin failures++; $display("write skip %0d exp %0d", wr_nskip, nz_exp); end
      end
      @(negedge clk);
      wr_valid = 0;
      for (int u = 0; u < nunits; u++) begin
        int ns;
        @(negedge clk);
        rd_valid = 1; rd_size = tu_size_e'(s); rd_base = 8'(base); rd_unit = 6'(u); rd_rownz = map;
        #1;
        ns = 0;
        for (int p = 0; p < 16; p++) if (rz[unit_col(tu_size_e'(s), u, p)]) ns++;
        checks++;
        if (int'(rd_nskip) != ns) begin failures++; $display("read skip %0d exp %0d", rd_nskip, ns); end
        skipped += ns;
        @(negedge clk);
        rd_valid = 0;
        for (int p = 0; p < 16; p++) begin
          int r, c;
          r = unit_col(tu_size_e'(s), u, p);
          c = unit_row(tu_size_e'(s), u, p);
          checks++;
          if (rd_data[p] != 16'(m[r][c])) begin
            failures++;
            if (failures < 10) $display("TU %0d size %0d unit %0d slot %0d (%0d,%0d): got %0d exp %0d",
                                        t, s, u, p, r, c, rd_data[p], m[r][c]);
          end
        end
      end
    end
    checks++;
    if (skipped == 0) begin failures++; $display("no read skipped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
