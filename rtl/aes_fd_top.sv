// aes_fd_top: all fault-detection structures side by side.
//
// The top brings out, each with its own ports:
//   * the S-box and the inverse S-box in GF(((2^2)^2)^2)  (gf1_*)
//   * the S-box and the inverse S-box in GF((2^4)^2)      (gf2_*)
//   * the mixed S-box / inverse S-box of both fields      (mix1_*, mix2_*)
//   * the S-box with its Block 5 check moved into the next clock cycle,
//     one per field                                          (pp1_*, pp2_*)
//   * an iterative AES-128 encryption with fault-detection S-boxes, one per
//     field (aes1_*, aes2_*), sharing clock, reset and the key/plaintext
//     inputs but with their own start, outputs and error flags.
// The S-box structures are combinational, except that the pp*_ flags come
// one clock edge after the input; the AES cores take NR clock cycles per
// block.  Every *_err output is the OR of the five block flags of
// that structure; *_blk_err gives them one by one.
// The structures themselves follow the published design; putting them side by
// side in one top and sharing the key and plaintext inputs of the two cores
// are this design's choices.
module aes_fd_top
  import aes_fd_pkg::*;
#(
  parameter int unsigned NR = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  // single S-box structures
  input  gf256_t       sb1_x,
  output gf256_t       sb1_y,
  output blk_err_t     sb1_blk_err,
  output logic         sb1_err,
  input  gf256_t       isb1_y,
  output gf256_t       isb1_x,
  output blk_err_t     isb1_blk_err,
  output logic         isb1_err,
  input  gf256_t       sb2_x,
  output gf256_t       sb2_y,
  output blk_err_t     sb2_blk_err,
  output logic         sb2_err,
  input  gf256_t       isb2_y,
  output gf256_t       isb2_x,
  output blk_err_t     isb2_blk_err,
  output logic         isb2_err,
  // mixed S-box / inverse S-box
  input  logic         mix1_dec,
  input  gf256_t       mix1_din,
  output gf256_t       mix1_dout,
  output blk_err_t     mix1_blk_err,
  output logic         mix1_err,
  input  logic         mix2_dec,
  input  gf256_t       mix2_din,
  output gf256_t       mix2_dout,
  output blk_err_t     mix2_blk_err,
  output logic         mix2_err,
  // S-box with the Block 5 check in the next cycle
  input  logic         pp1_valid,
  input  gf256_t       pp1_x,
  output gf256_t       pp1_y,
  output logic         pp1_err_valid,
  output blk_err_t     pp1_blk_err,
  output logic         pp1_err,
  input  logic         pp2_valid,
  input  gf256_t       pp2_x,
  output gf256_t       pp2_y,
  output logic         pp2_err_valid,
  output blk_err_t     pp2_blk_err,
  output logic         pp2_err,
  // AES-128 encryption cores
  input  logic [127:0] aes_key,
  input  logic [127:0] aes_ptext,
  input  logic         aes1_start,
  output logic         aes1_busy,
  output logic         aes1_done,
  output logic [127:0] aes1_ctext,
  output logic         aes1_err,
  output logic         aes1_err_sb,
  output logic         aes1_err_ks,
  output logic [15:0]  aes1_byte_err,
  output blk_err_t     aes1_sb_blk_err,
  input  logic         aes2_start,
  output logic         aes2_busy,
  output logic         aes2_done,
  output logic [127:0] aes2_ctext,
  output logic         aes2_err,
  output logic         aes2_err_sb,
  output logic         aes2_err_ks,
  output logic [15:0]  aes2_byte_err,
  output blk_err_t     aes2_sb_blk_err
);
  gf1_sbox_fd  u_sb1  (.x(sb1_x),  .y(sb1_y),  .blk_err(sb1_blk_err),  .err(sb1_err));
  gf1_isbox_fd u_isb1 (.y(isb1_y), .x(isb1_x), .blk_err(isb1_blk_err), .err(isb1_err));
  gf2_sbox_fd  u_sb2  (.x(sb2_x),  .y(sb2_y),  .blk_err(sb2_blk_err),  .err(sb2_err));
  gf2_isbox_fd u_isb2 (.y(isb2_y), .x(isb2_x), .blk_err(isb2_blk_err), .err(isb2_err));

  gf1_mixed_fd u_mix1 (.dec(mix1_dec), .din(mix1_din), .dout(mix1_dout),
                       .blk_err(mix1_blk_err), .err(mix1_err));
  gf2_mixed_fd u_mix2 (.dec(mix2_dec), .din(mix2_din), .dout(mix2_dout),
                       .blk_err(mix2_blk_err), .err(mix2_err));

  sbox_fd_pipe #(.FIELD(FIELD_GF1)) u_pp1 (
    .clk(clk), .rst_n(rst_n), .valid(pp1_valid), .x(pp1_x), .y(pp1_y),
    .err_valid(pp1_err_valid), .blk_err(pp1_blk_err), .err(pp1_err)
  );
  sbox_fd_pipe #(.FIELD(FIELD_GF2)) u_pp2 (
    .clk(clk), .rst_n(rst_n), .valid(pp2_valid), .x(pp2_x), .y(pp2_y),
    .err_valid(pp2_err_valid), .blk_err(pp2_blk_err), .err(pp2_err)
  );

  aes_enc_fd #(.FIELD(FIELD_GF1), .NR(NR)) u_aes1 (
    .clk(clk), .rst_n(rst_n), .start(aes1_start), .key(aes_key), .ptext(aes_ptext),
    .busy(aes1_busy), .done(aes1_done), .ctext(aes1_ctext),
    .err_sb(aes1_err_sb), .err_ks(aes1_err_ks), .err(aes1_err),
    .sb_byte_err(aes1_byte_err), .sb_blk_err_q(aes1_sb_blk_err)
  );
  aes_enc_fd #(.FIELD(FIELD_GF2), .NR(NR)) u_aes2 (
    .clk(clk), .rst_n(rst_n), .start(aes2_start), .key(aes_key), .ptext(aes_ptext),
    .busy(aes2_busy), .done(aes2_done), .ctext(aes2_ctext),
    .err_sb(aes2_err_sb), .err_ks(aes2_err_ks), .err(aes2_err),
    .sb_byte_err(aes2_byte_err), .sb_blk_err_q(aes2_sb_blk_err)
  );
endmodule
