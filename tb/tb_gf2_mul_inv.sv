// tb_gf2_mul_inv: self-checking testbench for gf2_mul_inv.
//
// Checks the composite-field inverse for all 256 inputs with all flags low, then forces every output bit of Blocks 2-4 stuck at 0 and 1 for every input and checks that the block's flag rises whenever the value changed.
// Expected values come from tb_ref_pkg (plain field arithmetic), not from
// the RTL.  A free-running clock drives only the watchdog.
module tb_gf2_mul_inv;
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
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  gf256_t eta, sigma;
  gf16_t  n_sum;
  logic   e2, e3, e4;
  gf2_mul_inv dut (.eta(eta), .n_sum(n_sum), .sigma(sigma), .err_b2(e2), .err_b3(e3), .err_b4(e4));
  assign n_sum = eta[7:4] ^ eta[3:0];

  // composite-field inverse through the isomorphism: delta(inv8(delta^-1(eta)))
  function automatic logic [7:0] ref_inv(input logic [7:0] e);
    return delta(inv8(delta_inv(e, 1'b1)), 1'b1);
  endfunction

  int detected = 0, faulty = 0;
  logic [3:0] fv4;
  logic [7:0] fv8;

  initial begin
    logic [3:0] g_ok, t_ok;
    logic [7:0] s_ok;
    for (int k = 0; k < 256; k++) begin
      eta = 8'(k);
      #1;
      check(sigma == ref_inv(eta), $sformatf("eta=%h sigma=%h", eta, sigma));
      check({e2, e3, e4} == 3'b000, $sformatf("eta=%h false alarm", eta));
    end
    // single stuck-at faults on every output bit of Blocks 2, 3 and 4
    for (int k = 0; k < 256; k++) begin
      eta = 8'(k);
      g_ok = norm(eta, 1'b1);
      t_ok = inv16(g_ok, 1'b1);
      s_ok = ref_inv(eta);
      for (int b = 0; b < 4; b++) for (int sv = 0; sv < 2; sv++) begin
        fv4 = sv[0] ? (g_ok | (4'b1 << b)) : (g_ok & ~(4'b1 << b));
        force dut.gamma = fv4; #1;
        if (fv4 != g_ok) begin faulty++; check(e2, $sformatf("gamma[%0d] sa%0d eta=%h", b, sv, eta)); detected += int'(e2); end
        release dut.gamma;
        fv4 = sv[0] ? (t_ok | (4'b1 << b)) : (t_ok & ~(4'b1 << b));
        force dut.theta = fv4; #1;
        if (fv4 != t_ok) begin faulty++; check(e3, $sformatf("theta[%0d] sa%0d eta=%h", b, sv, eta)); detected += int'(e3); end
        release dut.theta;
      end
      for (int b = 0; b < 8; b++) for (int sv = 0; sv < 2; sv++) begin
        fv8 = sv[0] ? (s_ok | (8'b1 << b)) : (s_ok & ~(8'b1 << b));
        force dut.sigma = fv8; #1;
        if (fv8 != s_ok) begin faulty++; check(e4, $sformatf("sigma[%0d] sa%0d eta=%h", b, sv, eta)); detected += int'(e4); end
        release dut.sigma;
      end
    end
    $display("block-output faults that changed a value: %0d, detected: %0d", faulty, detected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
