// gf2_sbox_fd: AES S-box with parity-based fault detection, composite field
// GF((2^4)^2).
//
// Block 1 (gf2_delta) maps x into the composite field, Blocks 2-4
// (gf2_mul_inv) invert it, Block 5 (gf2_invdelta_affine) maps back and
// applies the affine transformation.  Predictions for Blocks 1 and 5:
//   P_eta = x6^x3^x2^x1^x0,   P_y = sigma7^sigma6^sigma2^sigma0.
// err is the OR of the five block flags (assumed fault tolerant).  Fully
// combinational.
// Block 1 also holds the adder N = eta_h + eta_l that feeds Block 4;
// its parity check runs over the four bits of N, whose parity equals that of
// eta, so one 4-bit check covers both the transformation and the adder.
// The five blocks and all five predictions follow the published design.
module gf2_sbox_fd
  import aes_fd_pkg::*;
(
  input  gf256_t   x,
  output gf256_t   y,
  output blk_err_t blk_err,
  output logic     err
);
  gf256_t eta, sigma;
  gf16_t  n_sum;
  logic   p_eta, p_y;

  gf2_delta           u_b1 (.x(x), .eta(eta));
  // Block 1, second part: N = eta_h + eta_l (parity of N = parity of eta)
  assign n_sum = eta[7:4] ^ eta[3:0];

  gf2_mul_inv         u_inv (.eta(eta), .n_sum(n_sum), .sigma(sigma),
                             .err_b2(blk_err.b2), .err_b3(blk_err.b3), .err_b4(blk_err.b4));
  gf2_invdelta_affine u_b5 (.s(sigma), .y(y));

  assign p_eta = x[6] ^ x[3] ^ x[2] ^ x[1] ^ x[0];
  assign p_y   = sigma[7] ^ sigma[6] ^ sigma[2] ^ sigma[0];

  parity_check #(.W(4)) u_chk1 (.data(n_sum), .pred(p_eta), .err(blk_err.b1));
  parity_check #(.W(8)) u_chk5 (.data(y),   .pred(p_y),   .err(blk_err.b5));

  assign err = |blk_err;
endmodule
