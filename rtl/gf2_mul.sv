// gf2_mul: fault-detection multiplier in GF(2^4), polynomial basis with
// z^4+z+1.
//
// 16 AND and 18 XOR gates, critical path 3 XOR + 1 AND.  Each output bit is
// computed by its own gates (the input sums u0^u3, u2^u3 and u1^u2 are built
// per output), so a single fault affects at most one product bit.
// Combinational.
// The gate network follows the published design, except that the first term
// of z1 is u1*v0 (see the README).
module gf2_mul
  import aes_fd_pkg::*;
(
  input  gf16_t u,
  input  gf16_t v,
  output gf16_t z
);
  logic u03_z3, u03_z2, u23_z2, u03_z1, u23_z1, u12_z1;
  assign u03_z3 = u[0] ^ u[3];
  assign u03_z2 = u[0] ^ u[3];
  assign u23_z2 = u[2] ^ u[3];
  assign u03_z1 = u[0] ^ u[3];
  assign u23_z1 = u[2] ^ u[3];
  assign u12_z1 = u[1] ^ u[2];

  assign z[3] = ((u[2] & v[1]) ^ (u[3] & v[0])) ^ ((v[2] & u[1]) ^ (v[3] & u03_z3));
  assign z[2] = ((u[2] & v[0]) ^ (u[1] & v[1])) ^ ((v[2] & u03_z2) ^ (v[3] & u23_z2));
  assign z[1] = ((u[1] & v[0]) ^ (v[1] & u03_z1)) ^ ((v[2] & u23_z1) ^ (v[3] & u12_z1));
  assign z[0] = ((u[0] & v[0]) ^ (u[3] & v[1])) ^ ((u[2] & v[2]) ^ (u[1] & v[3]));
endmodule
