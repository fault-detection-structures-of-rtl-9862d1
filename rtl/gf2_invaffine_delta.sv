// gf2_invaffine_delta: Block 1 of the GF((2^4)^2) inverse S-box, AES inverse
// affine transformation merged with the isomorphism delta'; maps y to eta'.
//
// 21 XOR and 2 NOT gates, depth 4.  Shared terms A = y0^~y6, B = y4^y1,
// C = y5^y4 and D = y7^y6 each reach an odd number of outputs; (A^B) is built
// twice.  Combinational.
// The gate network follows the published design.
module gf2_invaffine_delta
  import aes_fd_pkg::*;
(
  input  gf256_t y,
  output gf256_t eta
);
  logic a, b, c, d;
  assign a = y[0] ^ ~y[6];
  assign b = y[4] ^ y[1];
  assign c = y[5] ^ y[4];
  assign d = y[7] ^ y[6];

  assign eta[0] = a ^ b;
  assign eta[1] = (a ^ b) ^ (y[3] ^ y[7]);
  assign eta[2] = (y[0] ^ y[3]) ^ b;
  assign eta[3] = (~y[3] ^ y[4]) ^ d;
  assign eta[4] = ((y[0] ^ y[1]) ^ (y[2] ^ c)) ^ d;
  assign eta[5] = (y[6] ^ y[3]) ^ c;
  assign eta[6] = a ^ c;
  assign eta[7] = (y[1] ^ y[2]) ^ d;
endmodule
