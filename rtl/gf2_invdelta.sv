// gf2_invdelta: Block 5 of the GF((2^4)^2) inverse S-box, the inverse
// isomorphism delta'^-1 from sigma' back to the AES byte x.
//
// 16 XOR gates, depth 3; A = s1^s7 and B = s5^s4 are the shared terms.
// Combinational.
// The gate network follows the published design.
module gf2_invdelta
  import aes_fd_pkg::*;
(
  input  gf256_t s,
  output gf256_t x
);
  logic a, b;
  assign a = s[1] ^ s[7];
  assign b = s[5] ^ s[4];

  assign x[0] = s[0] ^ s[4];
  assign x[1] = b ^ s[7];
  assign x[2] = a ^ b;
  assign x[3] = (s[1] ^ b) ^ s[6];
  assign x[4] = (a ^ b) ^ s[3];
  assign x[5] = b ^ s[2];
  assign x[6] = (a ^ s[2]) ^ (s[3] ^ s[4]);
  assign x[7] = (s[7] ^ s[2]) ^ (s[5] ^ s[4]);
endmodule
