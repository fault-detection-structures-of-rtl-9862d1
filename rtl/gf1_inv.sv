// gf1_inv: Block 3 in GF(((2^2)^2)^2), the inversion theta = gamma^-1 in
// GF((2^2)^2) (0 maps to 0).
//
// Gate budget 6 XOR, 2 XNOR, 11 AND, 5 NOT, 5 OR; every gate feeds exactly
// one output bit, so a single fault changes at most one bit of theta.
// Critical path 2 XOR + 1 XNOR + 1 AND.  Combinational.
// The gate network follows the published design; the double XNOR of gamma2
// and gamma0 is the published XNOR built once per output.
module gf1_inv
  import aes_fd_pkg::*;
(
  input  gf16_t g,
  output gf16_t t
);
  logic xn_t1, xn_t0;                    // the two XNOR gates

  assign xn_t1 = ~(g[2] ^ g[0]);
  assign xn_t0 = ~(g[2] ^ g[0]);

  // theta3 = gamma2 & ~(gamma1 gamma3)  ^  ~gamma0 & gamma3
  assign t[3] = (g[2] & ~(g[3] & g[1])) ^ (~g[0] & g[3]);
  // theta2 = ~gamma1 gamma2  |  gamma3 (gamma0 | gamma2)
  assign t[2] = (~g[1] & g[2]) | (g[3] & (g[0] | g[2]));
  // theta1 = (~gamma1 | xnor(gamma2,gamma0)) gamma3  ^  (~gamma0 gamma2 ^ gamma1)
  assign t[1] = ((~g[1] | xn_t1) & g[3]) ^ ((~g[0] & g[2]) ^ g[1]);
  // theta0 = ((g3 g0 | g2) ^ (g2 g1 | g0))  ^  (g1 ^ xnor(g2,g0) (g3 g1))
  assign t[0] = (((g[3] & g[0]) | g[2]) ^ ((g[2] & g[1]) | g[0]))
              ^ (g[1] ^ (xn_t0 & (g[3] & g[1])));
endmodule
