// gf2_block2: Block 2 of the GF((2^4)^2) S-box and inverse S-box.
//
// Computes the norm gamma' = eta'_h^2*e + eta'_h*eta'_l + eta'_l^2 with the
// merged Squarer-(e), a fault-detection multiplier, a squarer and two 4-bit
// adders.  (N' = eta'_h + eta'_l belongs to Block 1 and is used only by
// Block 4 in this field.)  Combinational.
// The block boundary and the datapath follow the published design.
module gf2_block2
  import aes_fd_pkg::*;
(
  input  gf256_t eta,
  output gf16_t  gamma
);
  gf16_t sqe, prod, sql;

  gf2_sq_e u_sqe (.a(eta[7:4]), .q(sqe));
  gf2_mul  u_mul (.u(eta[7:4]), .v(eta[3:0]), .z(prod));
  gf2_sq   u_sq  (.a(eta[3:0]), .q(sql));

  assign gamma = (sqe ^ prod) ^ sql;
endmodule
