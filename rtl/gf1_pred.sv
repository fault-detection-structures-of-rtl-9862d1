// gf1_pred: parity predictions of Blocks 2, 3 and 4 in GF(((2^2)^2)^2),
// shared by the S-box and the inverse S-box.
//
//   P_gamma = eta4 ^ eta3(~Ph ^ eta5) ^ ~eta2(Ph ^ eta6) ^ eta1(eta6 ^ eta4) ^ eta0 ~Ph
//   P_theta = (~gamma2 | gamma1) gamma0 ^ (gamma1 ^ gamma0) gamma3
//   P_sigma = eta3(Pt ^ theta1) ^ eta2(Pt ^ theta2) ^ eta1(theta2 ^ theta0) ^ eta0 Pt
// with Ph the parity of eta_h and Pt the actual parity of theta.  Each is a
// closed formula in the block's inputs, so a fault inside the block cannot
// reach its own prediction.  Combinational.
// The formulas follow the published design.
module gf1_pred
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

  assign p_gamma = eta[4] ^ (eta[3] & (~ph ^ eta[5])) ^ (~eta[2] & (ph ^ eta[6]))
                 ^ (eta[1] & (eta[6] ^ eta[4])) ^ (eta[0] & ~ph);
  assign p_theta = ((~gamma[2] | gamma[1]) & gamma[0]) ^ ((gamma[1] ^ gamma[0]) & gamma[3]);
  assign p_sigma = (eta[3] & (pt ^ theta[1])) ^ (eta[2] & (pt ^ theta[2]))
                 ^ (eta[1] & (theta[2] ^ theta[0])) ^ (eta[0] & pt);
endmodule
