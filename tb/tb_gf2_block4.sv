// tb_gf2_block4: self-checking testbench for gf2_block4.
//
// Applies all 4096 input combinations and compares with the two sub-field products.
// Expected values come from tb_ref_pkg (plain field arithmetic), not from
// the RTL.  A free-running clock drives only the watchdog.
module tb_gf2_block4;
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

  gf16_t  eta_h, n_sum, theta;
  gf256_t sigma;
  gf2_block4 dut (.eta_h(eta_h), .n_sum(n_sum), .theta(theta), .sigma(sigma));

  initial begin
    for (int k = 0; k < 4096; k++) begin
      {eta_h, n_sum, theta} = 12'(k);
      #1;
      check(sigma == {mul16_gf2(eta_h, theta), mul16_gf2(n_sum, theta)}, $sformatf("k=%0d sigma=%h", k, sigma));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
