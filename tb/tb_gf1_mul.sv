// tb_gf1_mul: self-checking testbench for gf1_mul.
//
// Applies all 256 operand pairs and compares with a shift-and-reduce product.
// Expected values come from tb_ref_pkg (plain field arithmetic), not from
// the RTL.  A free-running clock drives only the watchdog.
module tb_gf1_mul;
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

  gf16_t u, v, z;
  gf1_mul dut (.u(u), .v(v), .z(z));

  initial begin
    for (int k = 0; k < 256; k++) begin
      u = 4'(k >> 4);
      v = 4'(k);
      #1;
      check(z == mul16_gf1(u, v), $sformatf("%h*%h=%h", u, v, z));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
