// tb_tu_fifo: random pushes and pops (also when full or empty) against a
// queue model; checks the data order, full, empty and count every cycle.
module tb_tu_fifo;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial begin
    #1 rst_n = 0;
    #30 rst_n = 1;
  end

  logic        push = 0, pop = 0, full, empty;
  logic [15:0] din = 0, dout;
  logic [2:0]  count;
  tu_fifo #(.W(16), .DEPTH(4)) dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] model[$];

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge rst_n);
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // phases with more pushes, then more pops, to reach full and empty
      push = ($urandom % 100) < ((t / 200) % 2 ? 30 : 70);
      pop  = ($urandom % 100) < ((t / 200) % 2 ? 70 : 30);
      din  = 16'($urandom);
      #1;
      checks++;
      if (count != 3'(model.size()) || full != (model.size() == 4) || empty != (model.size() == 0) ||
          (model.size() > 0 && dout != model[0])) begin
        failures++;
        if (failures < 10) $display("t=%0d count %0d model %0d dout %h", t, count, model.size(), dout);
      end
      @(posedge clk);
      if (pop && model.size() > 0) void'(model.pop_front());
      if (push && !full) model.push_back(din);   // a push while full is dropped
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
