// gf1_sq_lambda: Squarer-Lambda of GF((2^2)^2), computes eta_h^2 * lambda
// with lambda = (1100)b in one merged network of four XOR gates (depth 2).
// Every gate output reaches exactly one output bit.  Combinational.
// The network follows the published design.
module gf1_sq_lambda
  import aes_fd_pkg::*;
(
  input  gf16_t a,     // (a3,a2,a1,a0) = (eta7,eta6,eta5,eta4)
  output gf16_t q
);
  assign q[3] = a[2] ^ (a[1] ^ a[0]);
  assign q[2] = a[3] ^ a[0];
  assign q[1] = a[3];
  assign q[0] = a[3] ^ a[2];
endmodule
