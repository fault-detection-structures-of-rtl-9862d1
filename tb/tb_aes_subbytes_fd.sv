// tb_aes_subbytes_fd: self-checking testbench for aes_subbytes_fd.
//
// Runs both composite fields side by side on random 128-bit states and
// checks every byte against the reference S-box with all flags low.  Then it
// forces one bit inside a single S-box (Block-1 output of byte i) stuck at
// the wrong value and checks that exactly that byte's flag and the SubBytes
// flag rise.  A free-running clock drives only the watchdog.
module tb_aes_subbytes_fd;
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [127:0] sin, sout1, sout2;
  logic [15:0]  be1, be2;
  blk_err_t     bk1, bk2;
  logic         e1, e2;

  aes_subbytes_fd #(.FIELD(FIELD_GF1)) dut1 (.state_in(sin), .state_out(sout1), .byte_err(be1),
                                             .blk_err_any(bk1), .err(e1));
  aes_subbytes_fd #(.FIELD(FIELD_GF2)) dut2 (.state_in(sin), .state_out(sout2), .byte_err(be2),
                                             .blk_err_any(bk2), .err(e2));

  logic [7:0] eta1_bad, eta2_bad;   // force sources, held while forced

  initial begin
    for (int n = 0; n < 200; n++) begin
      sin = {$urandom, $urandom, $urandom, $urandom};
      #1;
      for (int i = 0; i < 16; i++) begin
        check(sout1[8*i +: 8] == sbox(sin[8*i +: 8]), $sformatf("GF1 byte %0d", i));
        check(sout2[8*i +: 8] == sbox(sin[8*i +: 8]), $sformatf("GF2 byte %0d", i));
      end
      check(!e1 && !e2 && be1 == 0 && be2 == 0, "false alarm");
    end
    // fault in S-box 5, Block 1 output bit 2, stuck at the inverted value
    for (int n = 0; n < 50; n++) begin
      sin = {$urandom, $urandom, $urandom, $urandom};
      eta1_bad = delta(sin[8*5 +: 8], 1'b0) ^ 8'h04;
      eta2_bad = delta(sin[8*5 +: 8], 1'b1) ^ 8'h04;
      force dut1.g_sb[5].u_sb.g_gf1.u_sbox.eta = eta1_bad;
      force dut2.g_sb[5].u_sb.g_gf2.u_sbox.eta = eta2_bad;
      #1;
      check(e1 && be1 == 16'h0020 && bk1.b1, $sformatf("GF1 fault: be=%h", be1));
      check(e2 && be2 == 16'h0020 && bk2.b1, $sformatf("GF2 fault: be=%h", be2));
      release dut1.g_sb[5].u_sb.g_gf1.u_sbox.eta;
      release dut2.g_sb[5].u_sb.g_gf2.u_sbox.eta;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
