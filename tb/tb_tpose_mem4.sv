// tb_tpose_mem4: streams of blocks with unique tagged values through the
// transpose memory. Every column group read back must hold the values
// written at (row, column slot) of the right block; a stream of 32x32
// blocks must run without a write stall once started (the read-ahead
// schedule), and a mixed-size stream must finish in order.
module tb_tpose_mem4;
  import hevc_tr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic wr_valid = 0, wr_ready, rd_ready = 1, rd_fire, rd_fire_last, rd_valid, rd_col_last;
  tu_size_e wr_size = TU4, rd_size;
  logic [15:0] wr_data [4], rd_data [4];
  logic [4:0] rd_vcol;
  logic [2:0] rd_grp;
  int checks = 0, failures = 0;
  int wstalls = 0;
  bit measure = 0;

  tpose_mem4 #(.W(16), .DEPTH(256)) dut (.*);

  localparam int NBLK = 24;
  int sizes[NBLK];

  function automatic logic [15:0] tag(int blk, int r, int v);
    return 16'((blk * 7919 + r * 37 + v * 101) & 16'hffff);
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    for (int b = 0; b < NBLK; b++) sizes[b] = (b < 6) ? 3 : (b < 12 ? (b % 4) : $urandom % 4);
    for (int i = 0; i < 4; i++) wr_data[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      int n;
      n = 4 << sizes[b];
      for (int r = 0; r < n; r++)
        for (int g = 0; g < n / 4; g++) begin
          @(negedge clk);
          wr_valid = 1; wr_size = tu_size_e'(sizes[b]);
          for (int i = 0; i < 4; i++) wr_data[i] = tag(b, r, 4 * g + i);
          @(posedge clk);
          while (!wr_ready) begin
            if (b >= 1 && b < 6) wstalls++;
            @(posedge clk);
          end
        end
    end
    @(negedge clk); wr_valid = 0;
  end

  always @(negedge clk) rd_ready = (sizes[5] == 3 && $time > 30000) ? ($urandom % 4 != 0) : 1'b1;

  // reader check
  initial begin
    int b = 0, groups = 0, n;
    @(posedge rst_n);
    while (b < NBLK) begin
      @(posedge clk);
      if (rd_valid) begin
        n = 4 << sizes[b];
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (rd_data[i] != tag(b, 4 * rd_grp + i, rd_vcol)) begin
            failures++;
            $display("blk %0d vcol %0d row %0d got %h exp %h", b, rd_vcol, 4 * rd_grp + i, rd_data[i],
                     tag(b, 4 * rd_grp + i, rd_vcol));
          end
        end
        checks++;
        if (rd_size != tu_size_e'(sizes[b])) begin failures++; $display("size label"); end
        groups++;
        if (groups == n * (n / 4)) begin groups = 0; b++; end
      end
    end
    checks++;
    if (wstalls != 0) begin failures++; $display("32x32 stream stalled %0d cycles", wstalls); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
