// tb_gf1_delta: self-checking testbench for gf1_delta.
//
// Applies all 256 inputs and compares with the isomorphism delta written as an 8x8 bit matrix.
// Expected values come from tb_ref_pkg (plain field arithmetic), not from
// the RTL.  A free-running clock drives only the watchdog.
module tb_gf1_delta;
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

  gf256_t din, dout;
  gf1_delta dut (.x(din), .eta(dout));

  initial begin
    logic [7:0] v;
    for (int k = 0; k < 256; k++) begin
      v = 8'(k);
      din = v;
      #1;
      check(dout == delta(v, 1'b0), $sformatf("in=%h out=%h", v, dout));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
