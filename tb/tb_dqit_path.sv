// tb_dqit_path: three copies of the QT buffer -> IT1 -> transpose buffer ->
// IT2 path, each driven by a dqit_path_harness that checks every residual
// against the reference 2D inverse transform:
//   A: default buffers (192 words), dense 32x32 TUs back to back. The path
//      must keep up with one sub-block per cycle (16 pixels per cycle):
//      no input stall, and 12 TUs done within 12*64 + 2*64 + 30 cycles.
//   B: default buffers, random mixed TUs, sparse coefficients: the three
//      kinds of zero skipping must all occur.
//   C: small buffers (64 words): the input must stall when the QT buffer
//      is full, and results must stay correct.
module tb_dqit_path;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;      // a reset edge at the start
  always #5 clk = ~clk;

  logic        done_a, done_b, done_c;
  int          chk_a, chk_b, chk_c, fail_a, fail_b, fail_c, cyc_a, cyc_b, cyc_c;
  logic [31:0] st_a, qs_a, tw_a, tr_a, nt_a;
  logic [31:0] st_b, qs_b, tw_b, tr_b, nt_b;
  logic [31:0] st_c, qs_c, tw_c, tr_c, nt_c;

  dqit_path_harness #(.QTD(192), .TRD(192), .MODE(1), .NTU(12)) u_a (
    .clk, .rst_n, .done(done_a), .checks(chk_a), .failures(fail_a), .cycles(cyc_a),
    .stall(st_a), .qt_skip(qs_a), .trw_skip(tw_a), .trr_skip(tr_a), .ntu(nt_a));
  dqit_path_harness #(.QTD(192), .TRD(192), .MODE(0), .NTU(300)) u_b (
    .clk, .rst_n, .done(done_b), .checks(chk_b), .failures(fail_b), .cycles(cyc_b),
    .stall(st_b), .qt_skip(qs_b), .trw_skip(tw_b), .trr_skip(tr_b), .ntu(nt_b));
  dqit_path_harness #(.QTD(64), .TRD(64), .MODE(0), .NTU(200)) u_c (
    .clk, .rst_n, .done(done_c), .checks(chk_c), .failures(fail_c), .cycles(cyc_c),
    .stall(st_c), .qt_skip(qs_c), .trw_skip(tw_c), .trr_skip(tr_c), .ntu(nt_c));

  int checks = 0, failures = 0;

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #3000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk_a + chk_b + chk_c,
             failures + fail_a + fail_b + fail_c + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done_a && done_b && done_c);
    repeat (20) @(posedge clk);
    $display("A: %0d TUs in %0d cycles, stall %0d", nt_a, cyc_a, st_a);
    $display("B: %0d TUs, QT quads skipped %0d, TR writes skipped %0d, TR reads skipped %0d, stall %0d",
             nt_b, qs_b, tw_b, tr_b, st_b);
    $display("C: %0d TUs, stall cycles %0d", nt_c, st_c);
    expect_true(nt_a == 12 && nt_b == 300 && nt_c == 200, "TU counts");
    expect_true(st_a == 0, "A: no stall with 3-TU buffers at full rate");
    expect_true(cyc_a <= 12 * 64 + 2 * 64 + 30, "A: 16 pixels per cycle");
    expect_true(qs_b > 0, "B: QT read skipping happened");
    expect_true(tw_b > 0, "B: transpose write skipping happened");
    expect_true(tr_b > 0, "B: transpose read skipping happened");
    expect_true(st_c > 0, "C: stall when the QT buffer is full");
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk_a + chk_b + chk_c,
             failures + fail_a + fail_b + fail_c);
    $finish;
  end
endmodule
