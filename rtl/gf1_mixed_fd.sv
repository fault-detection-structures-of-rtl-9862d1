// gf1_mixed_fd: combined S-box / inverse S-box with fault detection in
// GF(((2^2)^2)^2), sharing one multiplicative inversion.
//
// Both Block-1 variants (delta for encryption, inverse affine + delta for
// decryption) see the input; a multiplexer driven by dec picks the one that
// feeds the shared Blocks 2-4.  Both Block-5 variants see sigma and a second
// multiplexer picks the output.  The Block-1 and Block-5 parity predictions
// are selected by the same signal, so the five checks cover whichever
// operation is active.  dec=0: dout = S(din); dec=1: dout = S^-1(din).
// Combinational.
// Block 1 also holds the adder N = eta_h + eta_l that feeds Blocks 2 and 4;
// its parity check runs over the four bits of N, whose parity equals that of
// eta, so one 4-bit check covers both the transformation and the adder.
// Sharing one inversion and selecting with multiplexers follow the published
// design; where the multiplexers sit is this design's choice.
module gf1_mixed_fd
  import aes_fd_pkg::*;
(
  input  logic     dec,
  input  gf256_t   din,
  output gf256_t   dout,
  output blk_err_t blk_err,
  output logic     err
);
  gf256_t eta_e, eta_d, eta, sigma, y_e, x_d;
  gf16_t  n_sum;
  logic   p_eta, p_out;

  gf1_delta           u_b1e (.x(din), .eta(eta_e));
  gf1_invaffine_delta u_b1d (.y(din), .eta(eta_d));
  assign eta = dec ? eta_d : eta_e;

  // Block 1, second part: N = eta_h + eta_l (parity of N = parity of eta)
  assign n_sum = eta[7:4] ^ eta[3:0];

  gf1_mul_inv u_inv (.eta(eta), .n_sum(n_sum), .sigma(sigma),
                     .err_b2(blk_err.b2), .err_b3(blk_err.b3), .err_b4(blk_err.b4));

  gf1_invdelta_affine u_b5e (.s(sigma), .y(y_e));
  gf1_invdelta        u_b5d (.s(sigma), .x(x_d));
  assign dout = dec ? x_d : y_e;

  assign p_eta = dec ? (din[7] ^ din[6] ^ din[5] ^ din[3])
                     : (din[5] ^ din[4] ^ din[2] ^ din[0]);
  // the Block-5 predictions of the two directions coincide in this field
  assign p_out = sigma[6] ^ sigma[4] ^ sigma[2] ^ sigma[1] ^ sigma[0];

  parity_check #(.W(4)) u_chk1 (.data(n_sum), .pred(p_eta), .err(blk_err.b1));
  parity_check #(.W(8)) u_chk5 (.data(dout), .pred(p_out), .err(blk_err.b5));

  assign err = |blk_err;
endmodule
