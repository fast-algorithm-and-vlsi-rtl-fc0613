// dq_align: low-delay alignment of coeff_abs_level_remaining for one 4x4
// sub-block (SBLK) of 16 coefficients, indexed by scan position n.
//
// R[n] tells whether coefficient n carries a coeff_abs_level_remaining:
//   numSigCoeff(n) = number of significant coefficients at positions m > n
//                    (the decoding order runs from n = 15 down to 0);
//   lastGreater1ScanPos = highest n with greater1 flag set, found in parallel
//                    as a one-hot code (the bit-reversed flags ANDed with
//                    their two's complement);
//   R[n] = sig[n] & (numSigCoeff(n) >= 8 ? 1 :
//                    n == lastGreater1ScanPos ? greater2[n] : greater1[n]).
// numSigCoeff is only formed for n <= 7, as it cannot reach 8 above that.
// base[n] = sig[n] ? 1 + greater1[n] + greater2[n] : 0.
// The remaining values arrive unaligned, vals[0] belonging to the highest n
// with R set; AC[n] = R[n] ? vals[number of R[m] set for m > n] : 0, a
// multiplexer per position selected by a running count of R. m_count is the
// number of remaining values in the SBLK.
// Purely combinational. Parameter W is the width of the aligned values
// (the DQ aligns the products of the remaining values with the scale).
module dq_align #(
  parameter int W = 16
) (
  input  logic [15:0]  sig,
  input  logic [15:0]  gt1,
  input  logic [15:0]  gt2,
  input  logic [W-1:0] vals [16],
  output logic [15:0]  r,
  output logic [1:0]   base [16],
  output logic [4:0]   m_count,
  output logic [W-1:0] ac [16]
);
  logic [15:0] gt1_rev, oh_rev, last_g1;
  logic [4:0]  nsig [8];
  logic [4:0]  rank [16];

  always_comb begin
    for (int i = 0; i < 16; i++) gt1_rev[i] = gt1[15 - i];
    oh_rev = gt1_rev & (~gt1_rev + 16'd1);
    for (int i = 0; i < 16; i++) last_g1[i] = oh_rev[15 - i];

    // numSigCoeff for the eight leftmost positions
    nsig[7] = 5'(sig[8]) + 5'(sig[9]) + 5'(sig[10]) + 5'(sig[11]) +
              5'(sig[12]) + 5'(sig[13]) + 5'(sig[14]) + 5'(sig[15]);
    for (int n = 6; n >= 0; n--) nsig[n] = nsig[n + 1] + 5'(sig[n + 1]);

    for (int n = 0; n < 16; n++) begin
      logic ge8;
      ge8  = (n <= 7) ? (nsig[n] >= 5'd8) : 1'b0;
      r[n] = sig[n] & (ge8 ? 1'b1 : (last_g1[n] ? gt2[n] : gt1[n]));
      base[n] = sig[n] ? 2'd1 + 2'(gt1[n]) + 2'(gt2[n]) : 2'd0;
    end

    rank[15] = '0;
    for (int n = 14; n >= 0; n--) rank[n] = rank[n + 1] + 5'(r[n + 1]);
    m_count = rank[0] + 5'(r[0]);

    for (int n = 0; n < 16; n++) ac[n] = r[n] ? vals[rank[n][3:0]] : '0;
  end
endmodule
