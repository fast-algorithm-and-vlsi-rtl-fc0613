// tb_sram_1r1w: writes random words, reads them back one cycle later, and
// checks that rdata holds while re is low and that a read returns data
// written in an earlier cycle.
module tb_sram_1r1w;
  logic clk = 0, we = 0, re = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [64];
  int checks = 0, failures = 0;
  always #5 clk = !clk;
  sram_1r1w #(.DEPTH(64), .W(16)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] held;
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); we = 1; waddr = 6'(a); wdata = 16'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      // random write to one address, read of another
      we = 1; waddr = 6'($urandom); wdata = 16'($urandom);
      re = 1; raddr = 6'($urandom);
      if (raddr == waddr) raddr = raddr + 1;
      @(posedge clk); #1;
      checks++;
      if (rdata != model[raddr]) begin
        failures++; $display("read mismatch addr %0d got %h exp %h", raddr, rdata, model[raddr]);
      end
      model[waddr] = wdata;
      // hold check
      we = 0; re = 0; held = rdata;
      @(posedge clk); #1;
      checks++;
      if (rdata != held) begin failures++; $display("rdata did not hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
