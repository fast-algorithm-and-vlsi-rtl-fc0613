// idct_odd: odd part O_N of an N-point inverse DCT (Chen's decomposition),
// O[n] = sum_k y[2k+1] * T_N[2k+1][n], n = 0 .. N/2-1, for N = 8, 16, 32.
// One bank of constant multipliers per output (multiple constant
// multiplication of each odd input), followed by an adder tree.
// Combinational; the input is the N/2 odd-index coefficients.
module idct_odd
  import hevc_tr_pkg::*;
#(
  parameter int N  = 8,
  parameter int IW = 16,
  parameter int OW = 28
) (
  input  logic signed [IW-1:0] yo [N/2],
  output logic signed [OW-1:0] o  [N/2]
);
  // one constant multiplier per (k, n); the constants are fixed at elaboration
  logic signed [OW-1:0] prod [N/2][N/2];
  for (genvar n = 0; n < N / 2; n++) begin : g_n
    for (genvar k = 0; k < N / 2; k++) begin : g_k
      localparam int C = tcoef(N, 2 * k + 1, n);
      assign prod[n][k] = OW'(yo[k] * C);
    end
  end

  always_comb begin
    for (int n = 0; n < N / 2; n++) begin
      o[n] = '0;
      for (int k = 0; k < N / 2; k++) o[n] += prod[n][k];
    end
  end
endmodule
