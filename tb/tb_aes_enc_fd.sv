// tb_aes_enc_fd: self-checking testbench for aes_enc_fd.
//
// Two cores, one per composite field, encrypt the FIPS-197 example block and
// random blocks; ciphertexts are compared with the reference AES-128 model
// and the latency from start to done must be NR cycles.  A start pulse while
// busy must be ignored.  Then single faults are injected: a stuck bit at the
// Block-1 output of one SubBytes S-box during one round, and one in a
// key-schedule S-box; each must end with a wrong ciphertext and the matching
// sticky error flag set.
module tb_aes_enc_fd;
  import aes_fd_pkg::*;
  import tb_ref_pkg::*;

  localparam int NR = 10;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic         rst_n, start;
  logic [127:0] key, ptext;
  logic         busy  [2];
  logic         done  [2];
  logic [127:0] ctext [2];
  logic         esb [2];
  logic         eks [2];
  logic         err [2];
  logic [15:0]  bye [2];
  blk_err_t     bke [2];

  aes_enc_fd #(.FIELD(FIELD_GF1), .NR(NR)) dut1 (
    .clk(clk), .rst_n(rst_n), .start(start), .key(key), .ptext(ptext),
    .busy(busy[0]), .done(done[0]), .ctext(ctext[0]), .err_sb(esb[0]), .err_ks(eks[0]),
    .err(err[0]), .sb_byte_err(bye[0]), .sb_blk_err_q(bke[0]));
  aes_enc_fd #(.FIELD(FIELD_GF2), .NR(NR)) dut2 (
    .clk(clk), .rst_n(rst_n), .start(start), .key(key), .ptext(ptext),
    .busy(busy[1]), .done(done[1]), .ctext(ctext[1]), .err_sb(esb[1]), .err_ks(eks[1]),
    .err(err[1]), .sb_byte_err(bye[1]), .sb_blk_err_q(bke[1]));

  int ignored_starts = 0, sb_faults = 0, ks_faults = 0;
  logic [7:0] bad1, bad2;

  // start one block and wait for done on both cores; returns the latency
  task automatic run_block(output int lat, input bit extra_start);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = extra_start;           // a second start while busy must be ignored
    lat = 1;
    @(negedge clk);
    start = 1'b0;
    lat++;
    while (!done[0]) begin
      @(negedge clk);
      lat++;
    end
    lat--;                         // cycles from the accepting edge to done
    check(done[1], "both cores finish together");
  endtask

  initial begin
    int lat;
    logic [127:0] exp_ct;
    rst_n = 1'b0;
    start = 1'b0;
    key   = '0;
    ptext = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // FIPS-197 appendix C.1 example
    key   = 128'h000102030405060708090a0b0c0d0e0f;
    ptext = 128'h00112233445566778899aabbccddeeff;
    run_block(lat, 1'b1);
    ignored_starts++;
    check(ctext[0] == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, $sformatf("GF1 FIPS ct=%h", ctext[0]));
    check(ctext[1] == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, $sformatf("GF2 FIPS ct=%h", ctext[1]));
    check(lat == NR, $sformatf("latency %0d", lat));
    check(!err[0] && !err[1], "false alarm");
    @(negedge clk);
    check(!busy[0] && !busy[1], "idle after done");

    for (int n = 0; n < 20; n++) begin
      key   = {$urandom, $urandom, $urandom, $urandom};
      ptext = {$urandom, $urandom, $urandom, $urandom};
      exp_ct = aes128_encrypt(key, ptext, NR);
      run_block(lat, 1'b0);
      check(ctext[0] == exp_ct && ctext[1] == exp_ct, $sformatf("random block %0d", n));
      check(lat == NR, $sformatf("latency %0d", lat));
      check(!err[0] && !err[1], "false alarm");
    end

    // SubBytes fault: S-box 3, Block 1 output bit 6 flipped during round 4
    key   = {$urandom, $urandom, $urandom, $urandom};
    ptext = {$urandom, $urandom, $urandom, $urandom};
    exp_ct = aes128_encrypt(key, ptext, NR);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (3) @(negedge clk);     // rounds 1..3 done, round 4 now in progress
    bad1 = dut1.u_subbytes.g_sb[3].u_sb.g_gf1.u_sbox.eta ^ 8'h40;
    bad2 = dut2.u_subbytes.g_sb[3].u_sb.g_gf2.u_sbox.eta ^ 8'h40;
    force dut1.u_subbytes.g_sb[3].u_sb.g_gf1.u_sbox.eta = bad1;
    force dut2.u_subbytes.g_sb[3].u_sb.g_gf2.u_sbox.eta = bad2;
    @(negedge clk);
    release dut1.u_subbytes.g_sb[3].u_sb.g_gf1.u_sbox.eta;
    release dut2.u_subbytes.g_sb[3].u_sb.g_gf2.u_sbox.eta;
    while (!done[0]) @(negedge clk);
    for (int c = 0; c < 2; c++) begin
      check(ctext[c] != exp_ct, "SubBytes fault corrupts the ciphertext");
      check(esb[c] && err[c] && !eks[c] && bke[c] == 5'b00001,
            $sformatf("core %0d SubBytes fault flags esb=%b eks=%b blk=%b", c, esb[c], eks[c], bke[c]));
      sb_faults += int'(esb[c]);
    end

    // key-schedule fault: S-box 0 of the key expansion, Block 1 bit 1, round 2
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(!err[0] && !err[1], "flags cleared by start");
    bad1 = dut1.g_ks[0].u_ks_sb.g_gf1.u_sbox.eta ^ 8'h02;
    bad2 = dut2.g_ks[0].u_ks_sb.g_gf2.u_sbox.eta ^ 8'h02;
    force dut1.g_ks[0].u_ks_sb.g_gf1.u_sbox.eta = bad1;
    force dut2.g_ks[0].u_ks_sb.g_gf2.u_sbox.eta = bad2;
    @(negedge clk);
    release dut1.g_ks[0].u_ks_sb.g_gf1.u_sbox.eta;
    release dut2.g_ks[0].u_ks_sb.g_gf2.u_sbox.eta;
    while (!done[0]) @(negedge clk);
    for (int c = 0; c < 2; c++) begin
      check(ctext[c] != exp_ct, "key-schedule fault corrupts the ciphertext");
      check(eks[c] && err[c] && !esb[c], $sformatf("core %0d key-schedule fault flags", c));
      ks_faults += int'(eks[c]);
    end

    // reset in the middle of a block
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    rst_n = 1'b0;
    @(negedge clk);
    check(!busy[0] && !busy[1] && !done[0] && !err[0], "reset returns to idle");
    rst_n = 1'b1;

    $display("ignored starts %0d, detected SubBytes faults %0d, detected key-schedule faults %0d",
             ignored_starts, sb_faults, ks_faults);
    check(ignored_starts > 0 && sb_faults == 2 && ks_faults == 2, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
