// gf2_delta: Block 1 of the S-box in GF((2^4)^2), the isomorphism delta'
// from the AES byte x to eta' = eta'_h*z + eta'_l.
//
// 13 XOR gates, depth 3.  x4^x6 is shared by three outputs (odd fan-out);
// x5^x7 and x1^x7 are each needed twice and are built twice, since sharing
// them would give a node with two paths to the outputs.  Combinational.
// The gate network follows the published design.
module gf2_delta
  import aes_fd_pkg::*;
(
  input  gf256_t x,
  output gf256_t eta
);
  logic x46;
  assign x46 = x[4] ^ x[6];

  assign eta[7] = x[5] ^ x[7];
  assign eta[6] = (x[2] ^ x[3]) ^ (x[5] ^ x[7]);
  assign eta[5] = x46 ^ (x[1] ^ x[7]);
  assign eta[4] = x46 ^ x[5];
  assign eta[3] = x[2] ^ x[4];
  assign eta[2] = x[1] ^ x[7];
  assign eta[1] = x[1] ^ x[2];
  assign eta[0] = x46 ^ (x[0] ^ x[5]);
endmodule
