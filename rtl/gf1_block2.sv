// gf1_block2: Block 2 of the GF(((2^2)^2)^2) S-box and inverse S-box.
//
// Computes the norm gamma = eta_h^2*lambda + (eta_h + eta_l)*eta_l, which
// equals eta_h^2*lambda + eta_h*eta_l + eta_l^2, using the merged
// Squarer-Lambda, one fault-detection multiplier and one 4-bit adder.  The
// sum N = eta_h + eta_l belongs to Block 1 and arrives as an input; Block 2
// multiplies it by eta_l.  Combinational.
// The block boundary and the datapath follow the published design.
module gf1_block2
  import aes_fd_pkg::*;
(
  input  gf256_t eta,
  input  gf16_t  n_sum,     // N = eta_h + eta_l, formed in Block 1
  output gf16_t  gamma
);
  gf16_t sql, prod;

  gf1_sq_lambda u_sql (.a(eta[7:4]), .q(sql));
  gf1_mul       u_mul (.u(n_sum), .v(eta[3:0]), .z(prod));

  assign gamma = sql ^ prod;
endmodule
