// gf1_mul_inv: Blocks 2, 3 and 4 of the GF(((2^2)^2)^2) structures, i.e. the
// multiplicative inversion sigma = eta^-1 in the composite field, together
// with their three parity checks.
//
// Block 2 forms the norm gamma, Block 3 inverts it in GF((2^2)^2), Block 4
// multiplies back: sigma_h = eta_h*theta, sigma_l = (eta_h+eta_l)*theta.
// Each block's output parity is compared with its prediction (gf1_pred) and
// gives one error bit.  The same unit serves the S-box and the inverse S-box.
// N = eta_h + eta_l is an input: it is formed and checked in Block 1.
// Combinational.
// The blocks follow the published design; this design only groups the three blocks into one
// module.
module gf1_mul_inv
  import aes_fd_pkg::*;
(
  input  gf256_t eta,
  input  gf16_t  n_sum,     // N = eta_h + eta_l from Block 1
  output gf256_t sigma,
  output logic   err_b2,
  output logic   err_b3,
  output logic   err_b4
);
  gf16_t gamma, theta;
  logic  p_gamma, p_theta, p_sigma;

  gf1_block2 u_b2 (.eta(eta), .n_sum(n_sum), .gamma(gamma));
  gf1_inv    u_b3 (.g(gamma), .t(theta));
  gf1_block4 u_b4 (.eta_h(eta[7:4]), .n_sum(n_sum), .theta(theta), .sigma(sigma));

  gf1_pred u_pred (
    .eta(eta), .gamma(gamma), .theta(theta),
    .p_gamma(p_gamma), .p_theta(p_theta), .p_sigma(p_sigma)
  );

  parity_check #(.W(4)) u_chk2 (.data(gamma), .pred(p_gamma), .err(err_b2));
  parity_check #(.W(4)) u_chk3 (.data(theta), .pred(p_theta), .err(err_b3));
  parity_check #(.W(8)) u_chk4 (.data(sigma), .pred(p_sigma), .err(err_b4));
endmodule
