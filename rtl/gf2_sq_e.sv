// gf2_sq_e: Squarer-(e) of GF(2^4) (z^4+z+1), computes a^2 * e with
// e = (1110)b as one merged network of four XOR gates (depth 2); each gate
// reaches one output bit only.  Combinational.
// The network follows the published design, with its coordinates read lowest
// first (see the README).
module gf2_sq_e
  import aes_fd_pkg::*;
(
  input  gf16_t a,     // (a3,a2,a1,a0) = (eta'7,eta'6,eta'5,eta'4)
  output gf16_t q
);
  assign q[0] = a[2] ^ a[1];
  assign q[1] = a[0];
  assign q[2] = (a[3] ^ a[1]) ^ a[0];
  assign q[3] = a[1] ^ a[0];
endmodule
