// gf1_invdelta: Block 5 of the GF(((2^2)^2)^2) inverse S-box, the inverse
// isomorphism delta^-1 from sigma back to the AES byte x.
//
// 19 XOR gates, depth 4.  Only q = (s4^s5)^(s6^s2) is shared, by three
// outputs; everything else is built per output.  Combinational.
// The gate network follows the published design.
module gf1_invdelta
  import aes_fd_pkg::*;
(
  input  gf256_t s,
  output gf256_t x
);
  logic q;
  assign q = (s[4] ^ s[5]) ^ (s[6] ^ s[2]);

  assign x[4] = s[1] ^ q;
  assign x[0] = s[0] ^ q;
  assign x[3] = (q ^ s[6]) ^ (s[3] ^ s[1]);
  assign x[7] = (s[1] ^ s[5]) ^ (s[6] ^ s[7]);
  assign x[5] = (s[1] ^ s[5]) ^ s[6];
  assign x[6] = s[2] ^ s[6];
  assign x[2] = ((s[1] ^ s[2]) ^ s[7]) ^ (s[3] ^ s[4]);
  assign x[1] = s[4] ^ s[5];
endmodule
