// gf1_isbox_fd: AES inverse S-box with parity-based fault detection,
// composite field GF(((2^2)^2)^2).
//
// Block 1 (gf1_invaffine_delta) undoes the affine transformation and maps
// into the composite field, Blocks 2-4 (gf1_mul_inv, shared design with the
// S-box) invert, Block 5 (gf1_invdelta) maps back to GF(2^8).  Predictions
// for Blocks 1 and 5:
//   P_eta = y7^y6^y5^y3,   P_x = sigma6^sigma4^sigma2^sigma1^sigma0.
// err is the OR of the five block flags.  Combinational.
// Block 1 also holds the adder N = eta_h + eta_l that feeds Blocks 2 and 4;
// its parity check runs over the four bits of N, whose parity equals that of
// eta, so one 4-bit check covers both the transformation and the adder.
// The five blocks and all five predictions follow the published design.
module gf1_isbox_fd
  import aes_fd_pkg::*;
(
  input  gf256_t   y,
  output gf256_t   x,
  output blk_err_t blk_err,
  output logic     err
);
  gf256_t eta, sigma;
  gf16_t  n_sum;
  logic   p_eta, p_x;

  gf1_invaffine_delta u_b1 (.y(y), .eta(eta));
  // Block 1, second part: N = eta_h + eta_l (parity of N = parity of eta)
  assign n_sum = eta[7:4] ^ eta[3:0];

  gf1_mul_inv         u_inv (.eta(eta), .n_sum(n_sum), .sigma(sigma),
                             .err_b2(blk_err.b2), .err_b3(blk_err.b3), .err_b4(blk_err.b4));
  gf1_invdelta        u_b5 (.s(sigma), .x(x));

  assign p_eta = y[7] ^ y[6] ^ y[5] ^ y[3];
  assign p_x   = sigma[6] ^ sigma[4] ^ sigma[2] ^ sigma[1] ^ sigma[0];

  parity_check #(.W(4)) u_chk1 (.data(n_sum), .pred(p_eta), .err(blk_err.b1));
  parity_check #(.W(8)) u_chk5 (.data(x),   .pred(p_x),   .err(blk_err.b5));

  assign err = |blk_err;
endmodule
