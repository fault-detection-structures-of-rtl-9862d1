// gf2_block4: Block 4 of the GF((2^4)^2) S-box and inverse S-box, the two
// multipliers sigma'_h = eta'_h*theta' and sigma'_l = (eta'_h+eta'_l)*theta'.
// Combinational.
// The block boundary and the datapath follow the published design.
module gf2_block4
  import aes_fd_pkg::*;
(
  input  gf16_t  eta_h,
  input  gf16_t  n_sum,
  input  gf16_t  theta,
  output gf256_t sigma
);
  gf2_mul u_mul_h (.u(eta_h), .v(theta), .z(sigma[7:4]));
  gf2_mul u_mul_l (.u(n_sum), .v(theta), .z(sigma[3:0]));
endmodule
