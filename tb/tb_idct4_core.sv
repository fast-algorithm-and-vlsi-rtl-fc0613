// tb_idct4_core: random and corner inputs of the 4-point inverse transform
// compared with the matrix-product reference.
module tb_idct4_core;
  import tb_ref_pkg::*;
  logic signed [15:0] y [4];
  logic signed [23:0] x [4];
  int checks = 0, failures = 0;
  idct4_core #(.IW(16), .OW(24)) dut (.y, .x);

  initial begin
    int v[32];
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v[32];
    for (int t = 0; t < 400; t++) begin
      for (int k = 0; k < 32; k++) v[k] = 0;
      for (int k = 0; k < 4; k++) begin
        v[k] = (t < 8) ? ((t[k % 3]) ? 32767 : -32768) : $signed(16'($urandom));
        y[k] = 16'(v[k]);
      end
      #1;
      for (int n = 0; n < 4; n++) begin
        checks++;
        if (longint'(x[n]) != inv1d(4, 1'b0, v, n)) begin
          failures++;
          $display("mismatch t=%0d n=%0d got %0d exp %0d", t, n, x[n], inv1d(4, 1'b0, v, n));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
