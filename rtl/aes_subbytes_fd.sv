// aes_subbytes_fd: the SubBytes transformation of AES built from sixteen
// fault-detection S-boxes.
//
// Each byte of the 128-bit state goes through its own S-box; the sixteen
// S-box error flags are ORed into one SubBytes error flag, so a fault is
// reported if any S-box detects it.  byte_err keeps the individual flags
// (bit i belongs to state bits [8i+7:8i]).  Combinational.
// ORing the sixteen flags follows the published design; the per-byte and
// per-block flag outputs are added by this design.
module aes_subbytes_fd
  import aes_fd_pkg::*;
#(
  parameter field_e FIELD = FIELD_GF1
) (
  input  logic [127:0] state_in,
  output logic [127:0] state_out,
  output logic [15:0]  byte_err,
  output blk_err_t     blk_err_any,  // OR over the sixteen S-boxes, per block
  output logic         err
);
  blk_err_t blk_err [16];

  for (genvar i = 0; i < 16; i++) begin : g_sb
    sbox_fd_sel #(.FIELD(FIELD)) u_sb (
      .x      (state_in[8*i +: 8]),
      .y      (state_out[8*i +: 8]),
      .blk_err(blk_err[i]),
      .err    (byte_err[i])
    );
  end
  assign err = |byte_err;

  always_comb begin
    blk_err_any = '0;
    for (int i = 0; i < 16; i++) blk_err_any |= blk_err[i];
  end
endmodule
