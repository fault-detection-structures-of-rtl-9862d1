// tb_gf1_block2: self-checking testbench for gf1_block2.
//
// Applies all 256 values of eta and compares gamma with the norm eta_h^2*c + eta_h*eta_l + eta_l^2.
// Expected values come from tb_ref_pkg (plain field arithmetic), not from
// the RTL.  A free-running clock drives only the watchdog.
module tb_gf1_block2;
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

  gf256_t eta;
  gf16_t  gamma, n_sum;
  gf1_block2 dut (.eta(eta), .n_sum(n_sum), .gamma(gamma));

  initial begin
    for (int k = 0; k < 256; k++) begin
      eta = 8'(k);
      n_sum = eta[7:4] ^ eta[3:0];
      #1;
      check(gamma == norm(eta, 1'b0), $sformatf("eta=%h gamma=%h", eta, gamma));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
