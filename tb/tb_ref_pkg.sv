// tb_ref_pkg: reference arithmetic for the testbenches, written independently
// of the RTL: plain GF(2^8) arithmetic with the AES polynomial, the AES
// S-box as affine(x^-1), the two sub-fields GF((2^2)^2) and GF(2^4) as
// bit-serial multiply-and-reduce, the isomorphisms delta and delta' as bit
// matrices, and an AES-128 encryption.  All inverses are found by search.
package tb_ref_pkg;

  function automatic int unsigned par8(input logic [7:0] v);
    return int'(^v);
  endfunction

  // ---- GF(2^8), z^8+z^4+z^3+z+1
  function automatic logic [7:0] mul8(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r;
    logic [7:0] aa;
    r  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= aa;
      aa = {aa[6:0], 1'b0} ^ (aa[7] ? 8'h1b : 8'h00);
    end
    return r;
  endfunction

  function automatic logic [7:0] inv8(input logic [7:0] a);
    for (int c = 1; c < 256; c++)
      if (mul8(a, 8'(c)) == 8'h01) return 8'(c);
    return 8'h00;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] v, input int n);
    return 8'((v << n) | (v >> (8 - n)));
  endfunction

  function automatic logic [7:0] affine(input logic [7:0] b);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic logic [7:0] inv_affine(input logic [7:0] y);
    for (int c = 0; c < 256; c++)
      if (affine(8'(c)) == y) return 8'(c);
    return 8'h00;
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] x);
    return affine(inv8(x));
  endfunction

  function automatic logic [7:0] inv_sbox(input logic [7:0] y);
    return inv8(inv_affine(y));
  endfunction

  // ---- GF(2^2) = z^2+z+1, GF((2^2)^2) = z^2+z+phi, phi = 2
  function automatic logic [1:0] mul4(input logic [1:0] a, input logic [1:0] b);
    logic [2:0] p;
    p = '0;
    for (int i = 0; i < 2; i++) if (b[i]) p ^= 3'(a) << i;
    if (p[2]) p ^= 3'b111;
    return p[1:0];
  endfunction

  function automatic logic [3:0] mul16_gf1(input logic [3:0] a, input logic [3:0] b);
    logic [1:0] hh;
    hh = mul4(a[3:2], b[3:2]);
    return {hh ^ mul4(a[3:2], b[1:0]) ^ mul4(a[1:0], b[3:2]),
            mul4(hh, 2'b10) ^ mul4(a[1:0], b[1:0])};
  endfunction

  // ---- GF(2^4) = z^4+z+1
  function automatic logic [3:0] mul16_gf2(input logic [3:0] a, input logic [3:0] b);
    logic [6:0] p;
    p = '0;
    for (int i = 0; i < 4; i++) if (b[i]) p ^= 7'(a) << i;
    for (int i = 6; i >= 4; i--) if (p[i]) p ^= 7'(5'b10011) << (i - 4);
    return p[3:0];
  endfunction

  function automatic logic [3:0] inv16(input logic [3:0] a, input bit gf2);
    for (int c = 1; c < 16; c++)
      if ((gf2 ? mul16_gf2(a, 4'(c)) : mul16_gf1(a, 4'(c))) == 4'h1) return 4'(c);
    return 4'h0;
  endfunction

  // ---- isomorphisms as bit matrices: row r lists which x bits make eta_r
  localparam logic [7:0] DELTA1 [8] = '{8'b0100_0011, 8'b0101_0010, 8'b1001_1110, 8'b1100_0110,
                                       8'b1010_1110, 8'b1010_1100, 8'b1101_1110, 8'b1010_0000};
  localparam logic [7:0] DELTA2 [8] = '{8'b0111_0001, 8'b0000_0110, 8'b1000_0010, 8'b0001_0100,
                                       8'b0111_0000, 8'b1101_0010, 8'b1010_1100, 8'b1010_0000};

  function automatic logic [7:0] delta(input logic [7:0] x, input bit gf2);
    logic [7:0] e;
    for (int r = 0; r < 8; r++) e[r] = ^(x & (gf2 ? DELTA2[r] : DELTA1[r]));
    return e;
  endfunction

  function automatic logic [7:0] delta_inv(input logic [7:0] e, input bit gf2);
    for (int c = 0; c < 256; c++)
      if (delta(8'(c), gf2) == e) return 8'(c);
    return 8'h00;
  endfunction

  // ---- composite-field values of the S-box path for eta (either field)
  function automatic logic [3:0] norm(input logic [7:0] e, input bit gf2);
    logic [3:0] h, l;
    h = e[7:4];
    l = e[3:0];
    if (gf2) return mul16_gf2(mul16_gf2(h, h), 4'hE) ^ mul16_gf2(h, l) ^ mul16_gf2(l, l);
    else     return mul16_gf1(mul16_gf1(h, h), 4'hC) ^ mul16_gf1(h, l) ^ mul16_gf1(l, l);
  endfunction

  // ---- AES-128 encryption, byte k of a block at bits [127-8k -: 8]
  function automatic logic [127:0] aes128_encrypt(input logic [127:0] key, input logic [127:0] pt,
                                                  input int nr);
    logic [7:0]  s [16];
    logic [7:0]  t [16];
    logic [31:0] w [4];
    logic [7:0]  rc;
    logic [7:0]  a0, a1, a2, a3;
    logic [31:0] tmp;
    logic [127:0] o;
    for (int k = 0; k < 16; k++) s[k] = pt[127-8*k -: 8] ^ key[127-8*k -: 8];
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    rc = 8'h01;
    for (int rnd = 1; rnd <= nr; rnd++) begin
      tmp = {sbox(w[3][23:16]), sbox(w[3][15:8]), sbox(w[3][7:0]), sbox(w[3][31:24])};
      w[0] = w[0] ^ tmp ^ {rc, 24'h0};
      w[1] = w[1] ^ w[0];
      w[2] = w[2] ^ w[1];
      w[3] = w[3] ^ w[2];
      rc = mul8(rc, 8'h02);
      for (int k = 0; k < 16; k++) t[k] = sbox(s[k]);
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++) s[4*c+r] = t[4*((c+r)%4)+r];
      if (rnd != nr)
        for (int c = 0; c < 4; c++) begin
          a0 = s[4*c]; a1 = s[4*c+1]; a2 = s[4*c+2]; a3 = s[4*c+3];
          s[4*c]   = mul8(a0, 8'h02) ^ mul8(a1, 8'h03) ^ a2 ^ a3;
          s[4*c+1] = a0 ^ mul8(a1, 8'h02) ^ mul8(a2, 8'h03) ^ a3;
          s[4*c+2] = a0 ^ a1 ^ mul8(a2, 8'h02) ^ mul8(a3, 8'h03);
          s[4*c+3] = mul8(a0, 8'h03) ^ a1 ^ a2 ^ mul8(a3, 8'h02);
        end
      for (int k = 0; k < 16; k++) s[k] ^= w[k/4][31-8*(k%4) -: 8];
    end
    for (int k = 0; k < 16; k++) o[127-8*k -: 8] = s[k];
    return o;
  endfunction

endpackage
