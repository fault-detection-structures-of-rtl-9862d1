// gf1_invaffine_delta: Block 1 of the GF(((2^2)^2)^2) inverse S-box, the AES
// inverse affine transformation merged with the isomorphism delta; maps the
// inverse S-box input y to eta.
//
// 18 XOR and 4 NOT gates, depth 3.  The tree p = (y1^y7)^(y6^y2) and the
// inverter ~y5 are each shared by exactly three outputs; eta7 and eta4 use
// their own copies so that no node has an even number of paths to the
// outputs.  Combinational.
// The gate network follows the published design.
module gf1_invaffine_delta
  import aes_fd_pkg::*;
(
  input  gf256_t y,
  output gf256_t eta
);
  logic p, y5_n, y5_n4, y4_5;
  assign p     = (y[1] ^ y[7]) ^ (y[6] ^ y[2]);
  assign y5_n  = ~y[5];
  assign y5_n4 = ~y[5];                       // own inverter for eta4
  assign y4_5  = y5_n ^ y[4];

  assign eta[0] = ~y[1] ^ p;
  assign eta[6] = (~y[3] ^ y[0]) ^ p;
  assign eta[2] = p ^ y5_n;
  assign eta[7] = (y[1] ^ y[7]) ^ (y[6] ^ y[2]);
  assign eta[4] = (y5_n4 ^ y[4]) ^ y[3];
  assign eta[1] = (y[1] ^ y[3]) ^ y[5];
  assign eta[3] = y5_n ^ y[7];
  assign eta[5] = y4_5 ^ (y[6] ^ y[0]);
endmodule
