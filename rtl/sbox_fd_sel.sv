// sbox_fd_sel: one fault-detection S-box, with the composite field chosen at
// elaboration time (FIELD_GF1 -> gf1_sbox_fd, FIELD_GF2 -> gf2_sbox_fd).
// blk_err holds the five block flags, err their OR.  Used by the SubBytes
// array and the key expansion.  Combinational.
// A helper of this design.
module sbox_fd_sel
  import aes_fd_pkg::*;
#(
  parameter field_e FIELD = FIELD_GF1
) (
  input  gf256_t x,
  output gf256_t y,
  output blk_err_t blk_err,
  output logic   err
);
  if (FIELD == FIELD_GF1) begin : g_gf1
    gf1_sbox_fd u_sbox (.x(x), .y(y), .blk_err(blk_err), .err(err));
  end else begin : g_gf2
    gf2_sbox_fd u_sbox (.x(x), .y(y), .blk_err(blk_err), .err(err));
  end
endmodule
