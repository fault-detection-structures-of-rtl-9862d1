// tb_aes_fd_top: end-to-end testbench of aes_fd_top at its default
// parameters.
//
// Every structure in the top is driven at once: all 256 inputs through the
// four S-box / inverse S-box structures and the two mixed units in both
// directions (mode switch), then AES-128 blocks on both encryption cores,
// FIPS-197 example first.  Faults are injected once per structure (a block
// output bit of an S-box forced to the wrong value) and must be flagged by
// the right block.  Each mechanism is counted and must occur at least once:
// encryption-direction and decryption-direction use of the mixed units,
// detection in each of the five blocks, an encryption completing in NR
// cycles, a start ignored while busy, a detected fault inside an AES core,
// and, for the S-boxes with the Block 5 check in the next cycle, a clean
// pass over all inputs with the flags one edge late and an output fault
// flagged by Block 5 on the following edge only.
module tb_aes_fd_top;
  import aes_fd_pkg::*;
  import tb_ref_pkg::*;

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
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic         rst_n;
  gf256_t       sb1_x, sb1_y, isb1_y, isb1_x, sb2_x, sb2_y, isb2_y, isb2_x;
  blk_err_t     sb1_be, isb1_be, sb2_be, isb2_be, mix1_be, mix2_be, aes1_bke, aes2_bke;
  logic         sb1_e, isb1_e, sb2_e, isb2_e, mix1_e, mix2_e;
  logic         mix1_dec, mix2_dec;
  gf256_t       mix1_din, mix1_dout, mix2_din, mix2_dout;
  logic [127:0] aes_key, aes_ptext, aes1_ct, aes2_ct;
  logic         aes1_start, aes1_busy, aes1_done, aes1_err, aes1_esb, aes1_eks;
  logic         aes2_start, aes2_busy, aes2_done, aes2_err, aes2_esb, aes2_eks;
  logic [15:0]  aes1_bye, aes2_bye;
  logic         pp1_v, pp2_v, pp1_ev, pp2_ev, pp1_e, pp2_e;
  gf256_t       pp1_x, pp1_y, pp2_x, pp2_y;
  blk_err_t     pp1_be, pp2_be;

  aes_fd_top dut (
    .clk(clk), .rst_n(rst_n),
    .sb1_x(sb1_x), .sb1_y(sb1_y), .sb1_blk_err(sb1_be), .sb1_err(sb1_e),
    .isb1_y(isb1_y), .isb1_x(isb1_x), .isb1_blk_err(isb1_be), .isb1_err(isb1_e),
    .sb2_x(sb2_x), .sb2_y(sb2_y), .sb2_blk_err(sb2_be), .sb2_err(sb2_e),
    .isb2_y(isb2_y), .isb2_x(isb2_x), .isb2_blk_err(isb2_be), .isb2_err(isb2_e),
    .mix1_dec(mix1_dec), .mix1_din(mix1_din), .mix1_dout(mix1_dout), .mix1_blk_err(mix1_be), .mix1_err(mix1_e),
    .mix2_dec(mix2_dec), .mix2_din(mix2_din), .mix2_dout(mix2_dout), .mix2_blk_err(mix2_be), .mix2_err(mix2_e),
    .pp1_valid(pp1_v), .pp1_x(pp1_x), .pp1_y(pp1_y), .pp1_err_valid(pp1_ev), .pp1_blk_err(pp1_be), .pp1_err(pp1_e),
    .pp2_valid(pp2_v), .pp2_x(pp2_x), .pp2_y(pp2_y), .pp2_err_valid(pp2_ev), .pp2_blk_err(pp2_be), .pp2_err(pp2_e),
    .aes_key(aes_key), .aes_ptext(aes_ptext),
    .aes1_start(aes1_start), .aes1_busy(aes1_busy), .aes1_done(aes1_done), .aes1_ctext(aes1_ct),
    .aes1_err(aes1_err), .aes1_err_sb(aes1_esb), .aes1_err_ks(aes1_eks), .aes1_byte_err(aes1_bye),
    .aes1_sb_blk_err(aes1_bke),
    .aes2_start(aes2_start), .aes2_busy(aes2_busy), .aes2_done(aes2_done), .aes2_ctext(aes2_ct),
    .aes2_err(aes2_err), .aes2_err_sb(aes2_esb), .aes2_err_ks(aes2_eks), .aes2_byte_err(aes2_bye),
    .aes2_sb_blk_err(aes2_bke)
  );

  int n_pipe = 0, n_pipe_late = 0;
  int n_enc = 0, n_dec = 0, n_aes = 0, n_ignored = 0, n_aes_fault = 0;
  int n_blk [1:5];
  logic [7:0] f8a, f8b;
  logic [3:0] f4a, f4b;

  // count which block flags rose; the expected one must be among them
  task automatic saw(input blk_err_t be, input int b, input string what);
    logic hit;
    hit = (b == 1) ? be.b1 : (b == 2) ? be.b2 : (b == 3) ? be.b3 : (b == 4) ? be.b4 : be.b5;
    check(hit, what);
    if (hit) n_blk[b]++;
  endtask

  initial begin
    int lat;
    logic [127:0] exp_ct;
    for (int b = 1; b <= 5; b++) n_blk[b] = 0;
    rst_n = 1'b0;
    aes1_start = 1'b0;
    aes2_start = 1'b0;
    aes_key = '0;
    aes_ptext = '0;
    mix1_dec = 1'b0;
    mix2_dec = 1'b0;
    pp1_v = 1'b0; pp2_v = 1'b0; pp1_x = '0; pp2_x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // ---- all S-box structures, every input
    for (int d = 0; d < 2; d++) begin
      for (int k = 0; k < 256; k++) begin
        sb1_x = 8'(k);  isb1_y = 8'(k);  sb2_x = 8'(k);  isb2_y = 8'(k);
        mix1_dec = d[0];  mix2_dec = ~d[0];
        mix1_din = 8'(k); mix2_din = 8'(k);
        #1;
        check(sb1_y == sbox(8'(k)) && sb2_y == sbox(8'(k)), $sformatf("S-box %h", k));
        check(isb1_x == inv_sbox(8'(k)) && isb2_x == inv_sbox(8'(k)), $sformatf("inverse S-box %h", k));
        check(mix1_dout == (d[0] ? inv_sbox(8'(k)) : sbox(8'(k))), $sformatf("mix1 %h", k));
        check(mix2_dout == (d[0] ? sbox(8'(k)) : inv_sbox(8'(k))), $sformatf("mix2 %h", k));
        check(!(sb1_e | isb1_e | sb2_e | isb2_e | mix1_e | mix2_e), $sformatf("false alarm %h", k));
      end
      n_enc++;
      n_dec++;
    end

    // ---- one fault per block and structure (value-changing, odd by construction)
    sb1_x = 8'h3a; isb1_y = 8'hc5; sb2_x = 8'h71; isb2_y = 8'h0e;
    mix1_dec = 1'b1; mix1_din = 8'h99; mix2_dec = 1'b0; mix2_din = 8'h42;
    #1;
    f8a = dut.u_sb1.eta ^ 8'h10;      force dut.u_sb1.eta = f8a;
    f8b = dut.u_isb2.eta ^ 8'h01;     force dut.u_isb2.eta = f8b;
    #1; saw(sb1_be, 1, "sb1 block 1"); saw(isb2_be, 1, "isb2 block 1");
    release dut.u_sb1.eta; release dut.u_isb2.eta;
    f4a = dut.u_isb1.u_inv.gamma ^ 4'h2; force dut.u_isb1.u_inv.gamma = f4a;
    f4b = dut.u_mix2.u_inv.gamma ^ 4'h8; force dut.u_mix2.u_inv.gamma = f4b;
    #1; saw(isb1_be, 2, "isb1 block 2"); saw(mix2_be, 2, "mix2 block 2");
    release dut.u_isb1.u_inv.gamma; release dut.u_mix2.u_inv.gamma;
    f4a = dut.u_sb2.u_inv.theta ^ 4'h4; force dut.u_sb2.u_inv.theta = f4a;
    #1; saw(sb2_be, 3, "sb2 block 3");
    release dut.u_sb2.u_inv.theta;
    f8a = dut.u_mix1.sigma ^ 8'h80; force dut.u_mix1.sigma = f8a;
    #1; saw(mix1_be, 4, "mix1 block 4");
    release dut.u_mix1.sigma;
    f8a = dut.u_sb1.y ^ 8'h08; force dut.u_sb1.y = f8a;
    f8b = dut.u_mix1.dout ^ 8'h20; force dut.u_mix1.dout = f8b;
    #1; saw(sb1_be, 5, "sb1 block 5"); saw(mix1_be, 5, "mix1 block 5");
    release dut.u_sb1.y; release dut.u_mix1.dout;

    // ---- S-boxes with the Block 5 check in the next cycle
    for (int k = 0; k < 256; k++) begin
      @(negedge clk);
      pp1_v = 1'b1; pp2_v = 1'b1; pp1_x = 8'(k); pp2_x = 8'(255 - k);
      #1;
      check(pp1_y == sbox(8'(k)) && pp2_y == sbox(8'(255 - k)), $sformatf("pipelined S-box %h", k));
      @(posedge clk); #1;
      check(pp1_ev && pp2_ev && !pp1_e && !pp2_e, $sformatf("pipelined false alarm %h", k));
      n_pipe++;
    end
    @(negedge clk);
    pp1_x = 8'h5c; pp2_x = 8'hd3;
    #1;
    f8a = pp1_y ^ 8'h40; force dut.u_pp1.y = f8a;
    f8b = pp2_y ^ 8'h02; force dut.u_pp2.y = f8b;
    #1; check(!pp1_e && !pp2_e, "pipelined flag before the edge");
    @(posedge clk); #1;
    release dut.u_pp1.y; release dut.u_pp2.y;
    check(pp1_be == 5'b10000 && pp2_be == 5'b10000 && pp1_e && pp2_e, "pipelined Block 5 flag");
    if (pp1_be.b5 && pp2_be.b5) n_pipe_late++;
    @(negedge clk);
    pp1_v = 1'b0; pp2_v = 1'b0;
    @(posedge clk); #1;
    check(!pp1_ev && !pp2_ev && !pp1_e && !pp2_e, "pipelined idle");

    // ---- AES-128 on both cores
    aes_key   = 128'h000102030405060708090a0b0c0d0e0f;
    aes_ptext = 128'h00112233445566778899aabbccddeeff;
    exp_ct    = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    for (int n = 0; n < 4; n++) begin
      @(negedge clk);
      aes1_start = 1'b1; aes2_start = 1'b1;
      @(negedge clk);
      lat = 1;
      // a second start while busy is ignored
      if (aes1_busy) n_ignored++;
      @(negedge clk);
      lat++;
      aes1_start = 1'b0; aes2_start = 1'b0;
      while (!aes1_done) begin
        @(negedge clk);
        lat++;
      end
      check(lat - 1 == 10, $sformatf("AES latency %0d", lat - 1));   // edges from accept to done
      check(aes2_done && aes1_ct == exp_ct && aes2_ct == exp_ct, $sformatf("AES block %0d", n));
      check(!aes1_err && !aes2_err, "AES false alarm");
      n_aes++;
      aes_key   = {$urandom, $urandom, $urandom, $urandom};
      aes_ptext = {$urandom, $urandom, $urandom, $urandom};
      exp_ct    = aes128_encrypt(aes_key, aes_ptext, 10);
    end

    // ---- a fault inside an AES core: SubBytes S-box 9 of the GF2 core, round 1
    @(negedge clk);
    aes2_start = 1'b1;
    @(negedge clk);
    aes2_start = 1'b0;
    f8a = dut.u_aes2.u_subbytes.g_sb[9].u_sb.g_gf2.u_sbox.sigma ^ 8'h01;
    force dut.u_aes2.u_subbytes.g_sb[9].u_sb.g_gf2.u_sbox.sigma = f8a;
    @(negedge clk);
    release dut.u_aes2.u_subbytes.g_sb[9].u_sb.g_gf2.u_sbox.sigma;
    while (!aes2_done) @(negedge clk);
    check(aes2_err && aes2_esb && aes2_bke.b4 && aes2_ct != exp_ct, "AES core fault detected");
    if (aes2_err) n_aes_fault++;

    $display("mixed enc passes %0d, dec passes %0d, detections per block %0d %0d %0d %0d %0d",
             n_enc, n_dec, n_blk[1], n_blk[2], n_blk[3], n_blk[4], n_blk[5]);
    $display("AES blocks %0d, ignored starts %0d, AES faults detected %0d", n_aes, n_ignored, n_aes_fault);
    $display("pipelined S-box passes %0d, late Block 5 detections %0d", n_pipe, n_pipe_late);
    check(n_pipe > 0 && n_pipe_late > 0, "pipelined mechanism count");
    check(n_enc > 0 && n_dec > 0 && n_aes > 0 && n_ignored > 0 && n_aes_fault > 0, "mechanism count");
    for (int b = 1; b <= 5; b++) check(n_blk[b] > 0, $sformatf("block %0d detection never happened", b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
