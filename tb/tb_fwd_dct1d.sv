// tb_fwd_dct1d: self-checking test of the 1D forward DCT.
//
// Random rows of 4, 8, 16 and 32 samples (full 16-bit range and small
// residual-like values) are sent; every output X[k] is compared with the
// plain matrix product sum_n T[k][n] * x[n] of the reference package. The
// output side applies random back-pressure in the first phase. In the second
// phase out_ready stays high and rows of one size are offered back to back:
// the test checks the rate of the document, N/4 cycles per N-point row
// (four outputs every cycle, no gap between rows).
// Watchdog: a failure is counted if the test does not end in time.
module tb_fwd_dct1d;
  import hevc_tr_pkg::*;
  import tb_ref_pkg::*;

  logic               clk = 0, rst_n = 1;
  logic               in_valid = 0, in_ready, out_valid, out_ready = 1, out_last;
  tu_size_e           in_size = TU4, out_size;
  logic signed [15:0] in_x [32];
  logic [2:0]         out_cyc;
  logic signed [31:0] out_data [4];

  fwd_dct1d dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  typedef struct { int n; int x[32]; } row_t;
  row_t q[$];
  longint cyc = 0, nout = 0;
  bit     rand_ready = 1;

  always @(posedge clk) cyc <= cyc + 1;

  // checker
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      nout++;
      if (q.size() == 0) begin
        failures++;
        $display("output without a row");
      end else begin
        for (int i = 0; i < 4; i++) begin
          longint e;
          int k;
          k = 4 * int'(out_cyc) + i;
          e = 0;
          for (int n = 0; n < q[0].n; n++) e += longint'(tmat(q[0].n, k, n)) * q[0].x[n];
          checks++;
          if (longint'(out_data[i]) != e) begin
            failures++;
            if (failures < 10) $display("N=%0d X[%0d]: got %0d exp %0d", q[0].n, k, out_data[i], e);
          end
        end
        checks++;
        if (tu_points(out_size) != q[0].n) failures++;
        if (out_last) void'(q.pop_front());
      end
    end
  end

  always @(negedge clk) out_ready = rand_ready ? ($urandom % 4 != 0) : 1'b1;

  task automatic send(int s, bit big);
    row_t r;
    r.n = 4 << s;
    @(negedge clk);
    in_valid = 1;
    in_size  = tu_size_e'(s);
    for (int n = 0; n < 32; n++) begin
      r.x[n] = (n < r.n) ? (big ? int'($urandom % 65536) - 32768 : int'($urandom % 511) - 255) : 0;
      in_x[n] = 16'(r.x[n]);
    end
    q.push_back(r);
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(posedge clk);
  endtask

  initial begin
    for (int n = 0; n < 32; n++) in_x[n] = 0;
    #1 rst_n = 0;
    #30 rst_n = 1;
    repeat (2) @(posedge clk);
    // phase 1: random sizes, random back-pressure
    for (int t = 0; t < 600; t++) begin
      send(int'($urandom % 4), ($urandom % 3) == 0);
      if ($urandom % 5 == 0) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk); in_valid = 0;
    wait (q.size() == 0);
    // phase 2: rate of N/4 cycles per row
    rand_ready = 0;
    for (int s = 0; s < 4; s++) begin
      longint c0, n0;
      repeat (3) @(posedge clk);
      c0 = cyc; n0 = nout;
      for (int t = 0; t < 20; t++) send(s, 1);
      @(negedge clk); in_valid = 0;
      wait (q.size() == 0);
      @(posedge clk);
      checks++;
      if (nout - n0 != 20 * (1 << s)) begin
        failures++;
        $display("size %0d: %0d output cycles, exp %0d", 4 << s, nout - n0, 20 * (1 << s));
      end
      // rows accepted back to back: last output within 20*N/4 + 2 cycles
      checks++;
      if (cyc - c0 > 20 * (1 << s) + 3) begin
        failures++;
        $display("size %0d: %0d cycles for 20 rows, exp <= %0d", 4 << s, cyc - c0, 20 * (1 << s) + 3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
