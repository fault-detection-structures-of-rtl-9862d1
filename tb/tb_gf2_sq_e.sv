// tb_gf2_sq_e: self-checking testbench for gf2_sq_e.
//
// Applies all 16 inputs and compares with a^2 * e in GF(2^4).
// Expected values come from tb_ref_pkg (plain field arithmetic), not from
// the RTL.  A free-running clock drives only the watchdog.
module tb_gf2_sq_e;
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

  gf16_t din, dout;
  gf2_sq_e dut (.a(din), .q(dout));

  initial begin
    logic [3:0] v;
    for (int k = 0; k < 16; k++) begin
      v = 4'(k);
      din = v;
      #1;
      check(dout == mul16_gf2(mul16_gf2(v, v), 4'hE), $sformatf("in=%h out=%h", v, dout));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
