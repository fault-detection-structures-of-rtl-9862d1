// gf2_pred: parity predictions of Blocks 2, 3 and 4 in GF((2^4)^2), shared by
// the S-box and the inverse S-box.
//
//   P_gamma = eta3 eta4 ^ eta2(eta5^eta4) ^ eta1(~Ph ^ eta7) ^ eta0 ~Ph ^ Ph
//   P_theta = ~gamma3 gamma2 ~gamma0 ^ gamma0 (~gamma1 | ~(gamma2^gamma3))
//   P_sigma = eta3 theta0 ^ eta2(theta1^theta0) ^ eta1(Pt^theta3) ^ eta0 Pt
// with Ph the parity of eta'_h and Pt the actual parity of theta'.
// Combinational.
// The formulas follow the published design.
module gf2_pred
  import aes_fd_pkg::*;
(
  input  gf256_t eta,
  input  gf16_t  gamma,
  input  gf16_t  theta,
  output logic   p_gamma,
  output logic   p_theta,
  output logic   p_sigma
);
  logic ph, pt;
  assign ph = ^eta[7:4];
  assign pt = ^theta;

  assign p_gamma = (eta[3] & eta[4]) ^ (eta[2] & (eta[5] ^ eta[4]))
                 ^ (eta[1] & (~ph ^ eta[7])) ^ (eta[0] & ~ph) ^ ph;
  assign p_theta = (~gamma[3] & gamma[2] & ~gamma[0])
                 ^ (gamma[0] & (~gamma[1] | ~(gamma[2] ^ gamma[3])));
  assign p_sigma = (eta[3] & theta[0]) ^ (eta[2] & (theta[1] ^ theta[0]))
                 ^ (eta[1] & (pt ^ theta[3])) ^ (eta[0] & pt);
endmodule
