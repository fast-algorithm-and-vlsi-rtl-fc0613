// idct4_core: 4-point 1D inverse core transform of HEVC.
//
// Combinational even/odd butterfly (Chen's decomposition):
//   E0 = 64*y0 + 64*y2, E1 = 64*y0 - 64*y2,
//   O0 = 83*y1 + 36*y3, O1 = 36*y1 - 83*y3,
//   x0 = E0+O0, x1 = E1+O1, x2 = E1-O1, x3 = E0-O0.
// The 4-point transform is kept outside the unified 8/16/32-point engine,
// as the document does, because embedding it there costs more than this
// direct form. Outputs are full precision (no rounding shift); the caller
// scales them. No clock: zero latency.
module idct4_core #(
  parameter int IW = 16,  // input coefficient width
  parameter int OW = 24   // output width (IW + 8 is enough)
) (
  input  logic signed [IW-1:0] y [4],
  output logic signed [OW-1:0] x [4]
);
  logic signed [OW-1:0] e0, e1, o0, o1;

  always_comb begin
    e0 = OW'(64 * y[0]) + OW'(64 * y[2]);
    e1 = OW'(64 * y[0]) - OW'(64 * y[2]);
    o0 = OW'(83 * y[1]) + OW'(36 * y[3]);
    o1 = OW'(36 * y[1]) - OW'(83 * y[3]);
    x[0] = e0 + o0;
    x[1] = e1 + o1;
    x[2] = e1 - o1;
    x[3] = e0 - o0;
  end
endmodule
