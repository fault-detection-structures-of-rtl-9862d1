// aes_fd_pkg: types and small helpers shared by the fault-detection S-box,
// inverse S-box, mixed S-box and AES encryption modules.
//
// A byte of GF(2^8) is an 8-bit vector with bit 0 the constant coefficient.
// A sub-field element of GF(2^4) is a 4-bit vector.  Each S-box structure is
// split into five blocks (transformation, sub-field norm, sub-field
// inversion, sub-field multiplications, back-transformation); every block has
// its own parity check and raises one error-indication bit, collected in
// blk_err_t.  The final flag of an S-box is the OR of those five bits.
// field_e names the two composite fields:
//   FIELD_GF1 = GF(((2^2)^2)^2): z^2+z+1, z^2+z+phi (phi=2), z^2+z+lambda (lambda=0xC)
//   FIELD_GF2 = GF((2^4)^2):     z^4+z+1, z^2+z+e (e=0xE)
// The field polynomials and constants follow the published design; the type
// names, the bit order and the struct of block flags are this design's
// choices.
package aes_fd_pkg;

  typedef logic [7:0] gf256_t;
  typedef logic [3:0] gf16_t;

  // one error-indication bit per block; b1 is Block 1 ... b5 is Block 5
  typedef struct packed {
    logic b5;
    logic b4;
    logic b3;
    logic b2;
    logic b1;
  } blk_err_t;

  typedef enum logic {
    FIELD_GF1 = 1'b0,
    FIELD_GF2 = 1'b1
  } field_e;

  // multiplication by {02} in GF(2^8) with the AES polynomial z^8+z^4+z^3+z+1
  function automatic gf256_t xtime(input gf256_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // MixColumns of one column {a0,a1,a2,a3}, a0 in the top byte
  function automatic logic [31:0] mix_column(input logic [31:0] col);
    gf256_t a0, a1, a2, a3;
    {a0, a1, a2, a3} = col;
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  // ShiftRows: byte k of the state (k = 4*column + row) sits at bits
  // [127-8k -: 8]; row r is rotated left by r columns
  function automatic logic [127:0] shift_rows(input logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = s[127 - 8*(4*((c + r) % 4) + r) -: 8];
    return o;
  endfunction

endpackage
