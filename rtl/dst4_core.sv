// dst4_core: 4-point inverse DST of HEVC, used instead of the 4-point IDCT
// for intra luma 4x4 blocks: x[n] = sum_k y[k] * M[k][n] with
// M = {29 55 74 84; 74 74 0 -74; 84 -29 -74 55; 55 -84 74 -29}.
// Written as a plain constant matrix product. Combinational, full
// precision (the caller rounds and shifts).
module dst4_core
  import hevc_tr_pkg::*;
#(
  parameter int IW = 16,
  parameter int OW = 24
) (
  input  logic signed [IW-1:0] y [4],
  output logic signed [OW-1:0] x [4]
);
  always_comb begin
    for (int n = 0; n < 4; n++) begin
      x[n] = '0;
      for (int k = 0; k < 4; k++) x[n] += OW'(y[k] * dst4coef(k, n));
    end
  end
endmodule
