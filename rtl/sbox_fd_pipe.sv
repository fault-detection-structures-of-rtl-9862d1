// sbox_fd_pipe: fault-detection S-box whose Block 5 check is moved into the
// next clock cycle, so the check adds no delay to the S-box output path.
//
// The datapath is the same five-block chain as gf1_sbox_fd / gf2_sbox_fd
// (FIELD selects the composite field): y leaves combinationally in the cycle
// x is applied, and the datapath can go on to the next transformation at
// once.  In that same cycle the Block 1-4 flags and the predicted output
// parity of Block 5 are formed.  On the clock edge that accepts x (valid high),
// y, the Block 5 prediction and the Block 1-4 flags are registered.  In the
// following cycle the actual parity of the registered y is computed and
// compared with the registered prediction, giving the Block 5 flag.
//
// Interface and timing: drive x with valid for one cycle; y is valid
// combinationally in that cycle.  err_valid, blk_err and err refer to the
// x accepted on the previous rising edge; blk_err and err are zero whenever
// err_valid is low.  Asynchronous active-low reset clears the stage.
//
// Splitting the work so that the predictions happen in the current cycle and
// the actual parity of Block 5 and its comparison in the next one follows
// the published design.  The valid/err_valid handshake, the reset and
// registering the Block 1-4 flags alongside (so that all five flags of one
// input appear together) are this design's choices.
module sbox_fd_pipe
  import aes_fd_pkg::*;
#(
  parameter field_e FIELD = FIELD_GF1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     valid,
  input  gf256_t   x,
  output gf256_t   y,
  output logic     err_valid,
  output blk_err_t blk_err,
  output logic     err
);
  gf256_t     eta, sigma;
  gf16_t      n_sum;
  logic       p_eta, p_y;
  logic [3:0] flags14;           // Block 4 .. Block 1 flags, this cycle

  // stage registers
  logic       valid_q;
  gf256_t     y_q;
  logic       p_y_q;
  logic [3:0] flags14_q;
  logic       b5_q;

  if (FIELD == FIELD_GF1) begin : g_gf1
    gf1_delta           u_b1  (.x(x), .eta(eta));
    gf1_mul_inv         u_inv (.eta(eta), .n_sum(n_sum), .sigma(sigma),
                               .err_b2(flags14[1]), .err_b3(flags14[2]), .err_b4(flags14[3]));
    gf1_invdelta_affine u_b5  (.s(sigma), .y(y));
    assign p_eta = x[5] ^ x[4] ^ x[2] ^ x[0];
    assign p_y   = sigma[6] ^ sigma[4] ^ sigma[2] ^ sigma[1] ^ sigma[0];
  end else begin : g_gf2
    gf2_delta           u_b1  (.x(x), .eta(eta));
    gf2_mul_inv         u_inv (.eta(eta), .n_sum(n_sum), .sigma(sigma),
                               .err_b2(flags14[1]), .err_b3(flags14[2]), .err_b4(flags14[3]));
    gf2_invdelta_affine u_b5  (.s(sigma), .y(y));
    assign p_eta = x[6] ^ x[3] ^ x[2] ^ x[1] ^ x[0];
    assign p_y   = sigma[7] ^ sigma[6] ^ sigma[2] ^ sigma[0];
  end

  // Block 1, second part: N = eta_h + eta_l (parity of N = parity of eta)
  assign n_sum = eta[7:4] ^ eta[3:0];
  parity_check #(.W(4)) u_chk1 (.data(n_sum), .pred(p_eta), .err(flags14[0]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q   <= 1'b0;
      y_q       <= '0;
      p_y_q     <= 1'b0;
      flags14_q <= '0;
    end else begin
      valid_q <= valid;
      if (valid) begin
        y_q       <= y;
        p_y_q     <= p_y;
        flags14_q <= flags14;
      end
    end
  end

  // next cycle: actual parity of Block 5 and its comparison
  parity_check #(.W(8)) u_chk5 (.data(y_q), .pred(p_y_q), .err(b5_q));

  assign err_valid = valid_q;
  assign blk_err   = valid_q ? blk_err_t'({b5_q, flags14_q}) : blk_err_t'('0);
  assign err       = |blk_err;
endmodule
