// tb_idct2d_4p: blocks of every size (random coefficients, sparse blocks and
// extreme values) through the 4-pixel 2D IDCT, compared with the
// matrix-product reference including the intermediate clipping. A stream
// of 32x32 blocks must sustain 4 results per cycle: 256 cycles per block.
module tb_idct2d_4p;
  import hevc_tr_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic in_valid = 0, in_ready, out_valid;
  tu_size_e in_size = TU4, out_size;
  logic signed [15:0] in_coef [32];
  logic [4:0] out_col, out_row [4];
  logic signed [15:0] out_data [4];
  int checks = 0, failures = 0;

  idct2d_4p dut (.*);

  localparam int NBLK = 40;
  int sizes[NBLK];
  int blk[NBLK][32][32];
  int exp_res[NBLK][32][32];

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < NBLK; b++) begin
      sizes[b] = (b < 8) ? 3 : (b < 16 ? b % 4 : $urandom % 4);
      for (int r = 0; r < 32; r++)
        for (int c = 0; c < 32; c++) begin
          int v;
          case (b % 5)
            0: v = $signed(16'($urandom));
            1: v = (r + c < 3) ? $signed(16'($urandom)) : 0;
            2: v = ($urandom % 8 == 0) ? int'($urandom % 512) - 256 : 0;
            3: v = ((r + c) % 2) ? 32767 : -32768;
            default: v = int'($urandom % 2048) - 1024;
          endcase
          blk[b][r][c] = (r < (4 << sizes[b]) && c < (4 << sizes[b])) ? v : 0;
        end
      inv2d(4 << sizes[b], 1'b0, 7, 12, blk[b], exp_res[b]);
    end
    for (int k = 0; k < 32; k++) in_coef[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++)
      for (int r = 0; r < (4 << sizes[b]); r++) begin
        @(negedge clk);
        in_valid = 1; in_size = tu_size_e'(sizes[b]);
        for (int k = 0; k < 32; k++) in_coef[k] = 16'(blk[b][r][k]);
        do @(posedge clk); while (!in_ready);
      end
    @(negedge clk); in_valid = 0;
  end

  initial begin
    int b = 0, cnt = 0, n;
    longint t_first[NBLK];
    longint cyc = 0;
    @(posedge rst_n);
    while (b < NBLK) begin
      @(posedge clk);
      cyc++;
      if (out_valid) begin
        n = 4 << sizes[b];
        if (cnt == 0) t_first[b] = cyc;
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (out_data[i] != 16'(exp_res[b][out_row[i]][out_col])) begin
            failures++;
            if (failures < 10)
              $display("blk %0d (N=%0d) r%0d c%0d got %0d exp %0d", b, n, out_row[i], out_col, out_data[i],
                       exp_res[b][out_row[i]][out_col]);
          end
        end
        cnt += 4;
        if (cnt == n * n) begin cnt = 0; b++; end
      end
    end
    // throughput of the 32x32 stream (blocks 1..7): 256 cycles apart
    for (int k = 2; k < 8; k++) begin
      checks++;
      if (t_first[k] - t_first[k - 1] != 256) begin
        failures++; $display("32x32 block %0d started %0d cycles after the previous one", k, t_first[k] - t_first[k - 1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
