// aes_enc_fd: iterative AES-128 encryption whose SubBytes transformation is
// built from the fault-detection S-boxes.
//
// One round per clock: the state register holds the round input, and each
// cycle SubBytes (sixteen fault-detection S-boxes), ShiftRows, MixColumns
// (skipped in the last round) and AddRoundKey produce the next state.  The
// round key is expanded on the fly from the previous one with four more
// fault-detection S-boxes.  The error flags of all twenty S-boxes are
// sampled with the round result, so a fault seen in round r shows on err in
// the cycle after that round, and stays set until the next start.
//
// Interface: pulse start for one cycle while busy is low with key and ptext
// valid; ctext is valid and done pulses NR cycles later.  rst_n is an
// asynchronous, active-low reset.
// Fault detection of ShiftRows, MixColumns and AddRoundKey is not part of
// this module; err_sb and err_ks cover SubBytes and the key-schedule S-boxes.
// The per-block flags of the four key-schedule S-boxes are left open: only
// their combined flags are used (err_ks).  rst_n is used both as the
// asynchronous reset of the registers and in the disable condition of the
// round-counter assertion; lint reports both of these and they are intended.
// The use of fault-detection S-boxes in SubBytes and the register after every
// round follow the published design; the handshake, the on-the-fly key
// expansion with checked S-boxes, the sticky flags and the reset are this
// design's choices.
module aes_enc_fd
  import aes_fd_pkg::*;
#(
  parameter field_e      FIELD = FIELD_GF1,
  parameter int unsigned NR    = 10          // rounds of AES-128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] ptext,
  output logic         busy,
  output logic         done,
  output logic [127:0] ctext,
  output logic         err_sb,     // a SubBytes S-box flagged an error
  output logic         err_ks,     // a key-schedule S-box flagged an error
  output logic         err,        // err_sb | err_ks
  output logic [15:0]  sb_byte_err, // per-byte S-box flags of the current round
  output blk_err_t     sb_blk_err_q // which of the five blocks flagged, sticky
);
  localparam int unsigned RW = $clog2(NR + 1);

  logic [127:0] state_q, rkey_q;
  logic [RW-1:0] round_q;
  gf256_t       rcon_q;

  logic [127:0] sb_out, sr_out, mc_out, rkey_nxt, state_nxt;
  logic         sb_err_now, ks_err_now;
  blk_err_t     sb_blk_err;
  logic [31:0]  w3_sub;
  logic [3:0]   ks_byte_err;
  logic         last_round;

  // ---- round datapath
  aes_subbytes_fd #(.FIELD(FIELD)) u_subbytes (
    .state_in (state_q),
    .state_out(sb_out),
    .byte_err   (sb_byte_err),
    .blk_err_any(sb_blk_err),
    .err        (sb_err_now)
  );

  assign sr_out = shift_rows(sb_out);

  always_comb begin
    for (int c = 0; c < 4; c++)
      mc_out[127 - 32*c -: 32] = mix_column(sr_out[127 - 32*c -: 32]);
  end

  assign last_round = (round_q == RW'(NR));

  // ---- key expansion: SubWord(RotWord(w3)) ^ Rcon
  for (genvar i = 0; i < 4; i++) begin : g_ks
    // RotWord: byte i of the rotated word is byte (i+1)%4 of w3
    sbox_fd_sel #(.FIELD(FIELD)) u_ks_sb (
      .x      (rkey_q[31 - 8*((i + 1) % 4) -: 8]),
      .y      (w3_sub[31 - 8*i -: 8]),
      .blk_err(),
      .err    (ks_byte_err[i])
    );
  end
  assign ks_err_now = |ks_byte_err;

  always_comb begin
    logic [31:0] w0, w1, w2, w3;
    w0 = rkey_q[127:96] ^ w3_sub ^ {rcon_q, 24'h0};
    w1 = rkey_q[95:64]  ^ w0;
    w2 = rkey_q[63:32]  ^ w1;
    w3 = rkey_q[31:0]   ^ w2;
    rkey_nxt = {w0, w1, w2, w3};
  end

  assign state_nxt = (last_round ? sr_out : mc_out) ^ rkey_nxt;

  // ---- control and registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      rkey_q  <= '0;
      round_q <= '0;
      rcon_q  <= 8'h01;
      busy    <= 1'b0;
      done    <= 1'b0;
      err_sb  <= 1'b0;
      err_ks  <= 1'b0;
      sb_blk_err_q <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          state_q <= ptext ^ key;          // initial AddRoundKey
          rkey_q  <= key;
          round_q <= RW'(1);
          rcon_q  <= 8'h01;
          busy    <= 1'b1;
          err_sb  <= 1'b0;
          err_ks  <= 1'b0;
          sb_blk_err_q <= '0;
        end
      end else begin
        state_q <= state_nxt;
        rkey_q  <= rkey_nxt;
        rcon_q  <= xtime(rcon_q);
        round_q <= round_q + RW'(1);
        err_sb  <= err_sb | sb_err_now;
        err_ks  <= err_ks | ks_err_now;
        sb_blk_err_q <= sb_blk_err_q | sb_blk_err;
        if (last_round) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign ctext = state_q;
  assign err   = err_sb | err_ks;

  // start is ignored while a block is being encrypted
  property p_round_range;
    @(posedge clk) disable iff (!rst_n) busy |-> (round_q >= RW'(1) && round_q <= RW'(NR));
  endproperty
  a_round_range: assert property (p_round_range);
endmodule
