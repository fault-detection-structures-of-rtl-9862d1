// gf1_invdelta_affine: Block 5 of the GF(((2^2)^2)^2) S-box, the inverse
// isomorphism delta^-1 merged with the AES affine transformation (constant
// 0x63 realised by inverters on y6, y5, y1, y0).
//
// 17 XOR and 4 NOT gates, depth 3 XOR + NOT.  The only shared gates are
// s27 = sigma2^sigma7 and s01 = sigma0^sigma1, each of which reaches three
// outputs, so any single fault gives zero or an odd number of wrong output
// bits.  Combinational.
// The gate network follows the published design, with the inverter on y6 that
// the affine constant needs (see the README).
module gf1_invdelta_affine
  import aes_fd_pkg::*;
(
  input  gf256_t s,         // sigma = eta^-1
  output gf256_t y          // S-box output
);
  logic s27, s01;
  assign s27 = s[2] ^ s[7];
  assign s01 = s[0] ^ s[1];

  assign y[7] = s27 ^ s[3];
  assign y[6] = ~((s[4] ^ s[5]) ^ (s[6] ^ s[7]));
  assign y[5] = ~s27;
  assign y[4] = s01 ^ (s[4] ^ s[7]);
  assign y[3] = s01 ^ s[2];
  assign y[2] = ((s[3] ^ s[4]) ^ (s[5] ^ s[6])) ^ (s[0] ^ s[2]);
  assign y[1] = ~(s[0] ^ s[7]);
  assign y[0] = ~((s27 ^ s01) ^ s[6]);
endmodule
