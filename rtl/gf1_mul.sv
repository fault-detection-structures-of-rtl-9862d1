// gf1_mul: fault-detection multiplier in GF((2^2)^2) (polynomial basis,
// z^2+z+phi over GF(2^2)=z^2+z+1, phi=(10)b).
//
// 16 AND and 21 XOR gates, critical path 4 XOR + 1 AND.  Each output bit has
// its own network, none of its gates is shared with another output bit, so a
// single fault corrupts at most one product bit.  Combinational.
// The equations and the gate grouping follow the published design.
module gf1_mul
  import aes_fd_pkg::*;
(
  input  gf16_t u,
  input  gf16_t v,
  output gf16_t z
);
  // z3
  logic z3_v31, z3_v20, z3_vall, z3_v32;
  assign z3_v31  = v[3] ^ v[1];
  assign z3_v20  = v[2] ^ v[0];
  assign z3_vall = z3_v31 ^ z3_v20;
  assign z3_v32  = v[3] ^ v[2];
  assign z[3] = ((u[3] & z3_vall) ^ (u[2] & z3_v31)) ^ ((u[1] & z3_v32) ^ (u[0] & v[3]));
  // z2
  logic z2_v31, z2_v20;
  assign z2_v31 = v[3] ^ v[1];
  assign z2_v20 = v[2] ^ v[0];
  assign z[2] = ((u[3] & z2_v31) ^ (u[0] & v[2])) ^ ((u[2] & z2_v20) ^ (u[1] & v[3]));
  // z1
  logic z1_v32, z1_v10;
  assign z1_v32 = v[3] ^ v[2];
  assign z1_v10 = v[1] ^ v[0];
  assign z[1] = ((u[3] & v[2]) ^ (u[0] & v[1])) ^ ((u[2] & z1_v32) ^ (u[1] & z1_v10));
  // z0
  logic z0_v32;
  assign z0_v32 = v[3] ^ v[2];
  assign z[0] = ((u[3] & z0_v32) ^ (u[2] & v[3])) ^ ((u[1] & v[1]) ^ (u[0] & v[0]));
endmodule
