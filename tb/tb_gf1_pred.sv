// tb_gf1_pred: self-checking testbench for gf1_pred.
//
// For all 256 values of eta it forms the true gamma, theta and sigma and checks the three predictions against their parities.
// Expected values come from tb_ref_pkg (plain field arithmetic), not from
// the RTL.  A free-running clock drives only the watchdog.
module tb_gf1_pred;
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
  gf16_t  gamma, theta;
  logic   p_gamma, p_theta, p_sigma;
  gf1_pred dut (.eta(eta), .gamma(gamma), .theta(theta),
              .p_gamma(p_gamma), .p_theta(p_theta), .p_sigma(p_sigma));

  initial begin
    logic [3:0] hs, ls;
    for (int k = 0; k < 256; k++) begin
      eta   = 8'(k);
      gamma = norm(eta, 1'b0);
      theta = inv16(gamma, 1'b0);
      hs = mul16_gf1(eta[7:4], theta);
      ls = mul16_gf1(eta[7:4] ^ eta[3:0], theta);
      #1;
      check(p_gamma == ^gamma, $sformatf("eta=%h P_gamma", eta));
      check(p_theta == ^theta, $sformatf("eta=%h P_theta", eta));
      check(p_sigma == ^{hs, ls}, $sformatf("eta=%h P_sigma", eta));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
