// gf2_invdelta_affine: Block 5 of the GF((2^4)^2) S-box, inverse isomorphism
// delta'^-1 merged with the AES affine transformation.
//
// 20 XOR and 2 NOT gates, depth 4.  The shared terms A..F below each reach an
// odd number of outputs; (A^B) is built separately for y3 and y4.
// Combinational.
// The gate network follows the published design.
module gf2_invdelta_affine
  import aes_fd_pkg::*;
(
  input  gf256_t s,
  output gf256_t y
);
  logic a, b, c, d, e, f;
  assign a = s[6] ^ s[7];
  assign b = s[0] ^ s[4];
  assign c = s[1] ^ s[3];
  assign d = ~s[2];
  assign e = b ^ s[5];
  assign f = a ^ s[4];

  assign y[0] = (d ^ e) ^ s[7];
  assign y[1] = (e ^ c) ^ (d ^ s[7]);
  assign y[2] = e ^ s[3];
  assign y[3] = (a ^ b) ^ s[2];
  assign y[4] = (a ^ b) ^ c;
  assign y[5] = (d ^ c) ^ (f ^ s[5]);
  assign y[6] = ~f;
  assign y[7] = (f ^ s[1]) ^ s[2];
endmodule
