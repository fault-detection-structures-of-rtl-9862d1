// gf2_inv: Block 3 in GF((2^4)^2), inversion theta' = gamma'^-1 in GF(2^4)
// (z^4+z+1, 0 maps to 0).
//
// 12 XOR, 5 OR, 9 AND and 1 NOT gate, critical path NOT + 3 XOR + AND.  No
// gate is shared between output bits.  Combinational.
// The gate network follows the published design.
module gf2_inv
  import aes_fd_pkg::*;
(
  input  gf16_t g,
  output gf16_t t
);
  assign t[3] = (((g[1] & g[3]) | g[2]) ^ (g[3] & (~g[0] ^ g[2]))) ^ g[1];
  assign t[2] = (((g[0] & g[3]) | g[2]) ^ (g[0] & (g[1] ^ g[2]))) ^ g[3];
  assign t[1] = (((g[0] & g[1]) | g[3]) ^ (g[1] & (g[2] ^ g[3]))) ^ (g[0] & g[2]);
  assign t[0] = (((g[0] & g[2]) | g[1]) ^ ((g[1] & g[2]) | g[3])) ^ (g[0] ^ g[2]);
endmodule
