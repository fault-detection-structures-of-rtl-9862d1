// gf1_delta: Block 1 of the S-box in GF(((2^2)^2)^2), the isomorphism delta
// from the AES byte x to eta = eta_h*z + eta_l.
//
// Built as the fault-detection XOR network of 18 two-input XOR gates (depth
// 4): no node of the network reaches the outputs along an even number of
// paths, so a single stuck-at fault in it flips zero or an odd number of eta
// bits and is caught by the block's parity check.  The sums (x2^x7), (x1^x4)
// and (x1^x6) are therefore built twice where sharing them would create an
// even fan-out.  Combinational.
// The gate network follows the published design.
module gf1_delta
  import aes_fd_pkg::*;
(
  input  gf256_t x,
  output gf256_t eta
);
  logic a27, a53, a23, p;           // upper network (eta7, eta5, eta4)
  logic n1, a14, a146;              // n1 = second x2^x7, fans out three times
  logic a16;                        // x1^x6, fans out three times
  logic c14, c14n;                  // separate x1^x4 for eta2

  assign a27  = x[2] ^ x[7];
  assign a53  = x[5] ^ x[3];
  assign p    = a27 ^ a53;          // used by eta7, eta5, eta4
  assign a23  = x[2] ^ x[3];
  assign eta[7] = p ^ a23;
  assign eta[5] = p;
  assign eta[4] = p ^ x[1];

  assign n1   = x[2] ^ x[7];
  assign a14  = x[1] ^ x[4];
  assign a146 = a14 ^ x[6];
  assign eta[6] = (n1 ^ a146) ^ x[3];

  assign c14  = x[1] ^ x[4];
  assign c14n = c14 ^ n1;
  assign eta[2] = c14n ^ x[3];

  assign a16  = x[1] ^ x[6];
  assign eta[3] = n1 ^ a16;
  assign eta[1] = a16 ^ x[4];
  assign eta[0] = a16 ^ x[0];
endmodule
