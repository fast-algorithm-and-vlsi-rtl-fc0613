// tb_it_multishape: random stream of TU4 (DCT and DST), TU8, TU16 and TU32
// units into the 16-pixel multiple-shape transform. Every output is compared
// with the matrix-product reference (rounded by SHIFT, clipped to 16 bit),
// and its arrival cycle is checked: 4 cycles after the unit (TU32: 4 and 5
// cycles after the second half), so one unit per cycle is sustained.
// TU32 rows are followed either by an idle cycle or directly by the next
// TU32 row, as the interface requires.
module tb_it_multishape;
  import hevc_tr_pkg::*;
  import tb_ref_pkg::*;

  localparam int SHIFT = 7;
  localparam int TAGW  = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               in_valid = 0, in_dst = 0, in_half = 0;
  tu_size_e           in_size = TU4;
  logic signed [15:0] in_coef [16];
  logic [TAGW-1:0]    in_tag = '0;
  logic               out_valid;
  tu_size_e           out_size;
  logic [TAGW-1:0]    out_tag;
  logic signed [15:0] out_data [16];

  it_multishape #(.IW(16), .SHIFT(SHIFT), .TAGW(TAGW)) dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    int     exp [16];
    int     tag;
    longint due;
  } exp_t;
  exp_t q[$];

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd16(int big);
    int v;
    v = big ? $signed(16'($urandom)) : (int'($urandom % 512) - 256);
    if (($urandom % 3) == 0) v = 0;
    return v;
  endfunction

  // drive one unit in the next cycle
  task automatic drive(tu_size_e s, bit dst, bit half, int c[16], int tag);
    @(negedge clk);
    in_valid = 1; in_size = s; in_dst = dst; in_half = half; in_tag = TAGW'(tag);
    for (int k = 0; k < 16; k++) in_coef[k] = 16'(c[k]);
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid = 0;
  endtask

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected output at cycle %0d", cycle);
      end else begin
        e = q.pop_front();
        if (cycle != e.due) begin
          failures++;
          $display("tag %0d at cycle %0d, expected %0d", e.tag, cycle, e.due);
        end
        if (int'(out_tag) != e.tag) begin
          failures++;
          $display("tag %0d expected, got %0d", e.tag, out_tag);
        end
        for (int n = 0; n < 16; n++) begin
          checks++;
          if (int'(out_data[n]) != e.exp[n]) begin
            failures++;
            if (failures < 20) $display("tag %0d n=%0d got %0d exp %0d", e.tag, n, out_data[n], e.exp[n]);
          end
        end
      end
    end
  end

  initial begin
    int tag = 0, nunits = 0;
    int c[16], c2[16], v[32];
    exp_t e;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int sz, big;
      bit dst;
      sz  = $urandom % 4;
      big = (t % 5) == 0;
      dst = (sz == 0) && ($urandom % 2);
      for (int k = 0; k < 16; k++) begin c[k] = rnd16(big); c2[k] = rnd16(big); end
      if (sz < 3) begin
        int np;
        np = 4 << sz;
        for (int k = 0; k < 16; k++) e.exp[k] = 0;
        for (int r = 0; r < 16 / np; r++) begin
          for (int k = 0; k < 32; k++) v[k] = (k < np) ? c[r * np + k] : 0;
          for (int n = 0; n < np; n++)
            e.exp[r * np + n] = rshift_clip(inv1d(np, dst, v, n), SHIFT, -32768, 32767);
        end
        // expected arrival: 4 cycles after the drive edge
        e.tag = tag;
        drive(tu_size_e'(sz), dst, 1'b0, c, tag);
        e.due = cycle + 4;
        q.push_back(e);
        tag++; nunits++;
      end else begin
        exp_t e1;
        for (int k = 0; k < 16; k++) begin v[k] = c[k]; v[16 + k] = c2[k]; end
        for (int n = 0; n < 16; n++) begin
          e.exp[n]  = rshift_clip(inv1d(32, 1'b0, v, n), SHIFT, -32768, 32767);
          e1.exp[n] = rshift_clip(inv1d(32, 1'b0, v, 16 + n), SHIFT, -32768, 32767);
        end
        e.tag  = tag;
        e1.tag = tag + 1;
        drive(TU32, 1'b0, 1'b0, c, tag);
        drive(TU32, 1'b0, 1'b1, c2, tag + 1);
        e.due  = cycle + 4;
        e1.due = cycle + 5;
        q.push_back(e);
        q.push_back(e1);
        tag += 2; nunits++;
        // the next unit must be another TU32 row or come after an idle cycle
        if (($urandom % 2) == 0) idle();
        else begin
          for (int k = 0; k < 16; k++) begin c[k] = rnd16(big); c2[k] = rnd16(big); end
          for (int k = 0; k < 16; k++) begin v[k] = c[k]; v[16 + k] = c2[k]; end
          for (int n = 0; n < 16; n++) begin
            e.exp[n]  = rshift_clip(inv1d(32, 1'b0, v, n), SHIFT, -32768, 32767);
            e1.exp[n] = rshift_clip(inv1d(32, 1'b0, v, 16 + n), SHIFT, -32768, 32767);
          end
          e.tag = tag; e1.tag = tag + 1;
          drive(TU32, 1'b0, 1'b0, c, tag);
          drive(TU32, 1'b0, 1'b1, c2, tag + 1);
          e.due = cycle + 4; e1.due = cycle + 5;
          q.push_back(e); q.push_back(e1);
          tag += 2; nunits++;
          idle();
        end
      end
      if (($urandom % 8) == 0) idle();
    end
    idle();
    repeat (10) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("%0d outputs missing", q.size());
    end
    $display("units=%0d", nunits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
