// gf2_sq: squarer in GF(2^4) with z^4+z+1.  a^2 = a0 + a1 z^2 + a2 (z+1)
// + a3 (z^3+z^2): two XOR gates, each feeding one output.  Combinational.
// The squarer's gates are not published; this is the plain two-XOR network
// that follows from the field polynomial.
module gf2_sq
  import aes_fd_pkg::*;
(
  input  gf16_t a,
  output gf16_t q
);
  assign q[0] = a[0] ^ a[2];
  assign q[1] = a[2];
  assign q[2] = a[1] ^ a[3];
  assign q[3] = a[3];
endmodule
