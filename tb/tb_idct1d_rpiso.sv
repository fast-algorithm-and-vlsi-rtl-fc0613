// tb_idct1d_rpiso: random rows of every size through the unified RPISO 1D
// IDCT. Each output is compared, by its index, with the matrix-product
// reference; every index must appear exactly once per row; a row of N
// points must take N/4 output cycles, back to back. Random output stalls
// are applied in a second phase.
module tb_idct1d_rpiso;
  import hevc_tr_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, out_last;
  tu_size_e in_size = TU4, out_size;
  logic signed [15:0] in_coef [32];
  logic [2:0] out_cyc;
  logic [4:0] out_idx [4];
  logic signed [27:0] out_data [4];
  int checks = 0, failures = 0;

  idct1d_rpiso #(.IW(16), .OW(28)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rows_q[$][32];
  int size_q[$];
  bit stall_phase = 0;

  // driver
  initial begin
    int v[32];
    for (int k = 0; k < 32; k++) in_coef[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int s;
      if (t == 100) stall_phase = 1;
      s = t % 4;
      for (int k = 0; k < 32; k++) v[k] = (k < (4 << s)) ? $signed(16'($urandom)) : 0;
      if (t % 17 == 3) for (int k = 0; k < 32; k++) v[k] = (k < (4 << s)) ? ((k % 2) ? -32768 : 32767) : 0;
      @(negedge clk);
      in_valid = 1; in_size = tu_size_e'(s);
      for (int k = 0; k < 32; k++) in_coef[k] = 16'(v[k]);
      rows_q.push_back(v); size_q.push_back(s);
      do @(posedge clk); while (!in_ready);
    end
    @(negedge clk); in_valid = 0;
  end

  always @(negedge clk) out_ready = stall_phase ? ($urandom % 3 != 0) : 1'b1;

  // checker
  initial begin
    int v[32];
    int s, n, cyc, seen;
    int rows_done = 0;
    @(posedge rst_n);
    while (rows_done < 200) begin
      @(posedge clk);
      if (out_valid && out_ready) begin
        v = rows_q[0]; s = size_q[0];
        if (out_cyc == 0) begin seen = 0; cyc = 0; end
        for (int i = 0; i < 4; i++) begin
          n = out_idx[i];
          checks++;
          if (longint'(out_data[i]) != inv1d(4 << s, 1'b0, v, n) || n >= (4 << s) || seen[n]) begin
            failures++;
            $display("row %0d size %0d idx %0d got %0d exp %0d", rows_done, 4 << s, n, out_data[i], inv1d(4 << s, 1'b0, v, n));
          end
          seen[n] = 1;
        end
        cyc++;
        if (out_last) begin
          checks++;
          if (cyc != ((s == 0) ? 1 : (4 << s) / 4) || out_size != tu_size_e'(s)) begin
            failures++; $display("row %0d: %0d output cycles", rows_done, cyc);
          end
          void'(rows_q.pop_front()); void'(size_q.pop_front());
          rows_done++;
        end
      end
      // back-to-back: without stalls the unit is never idle between rows
      if (!stall_phase && rows_done > 0 && rows_done < 99) begin
        checks++;
        if (!out_valid) begin failures++; $display("bubble before row %0d", rows_done); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
