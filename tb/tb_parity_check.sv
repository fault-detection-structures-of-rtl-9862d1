// tb_parity_check: self-checking testbench for parity_check.
//
// Applies every data/prediction combination for W=8 and W=4.
// Expected values come from tb_ref_pkg (plain field arithmetic), not from
// the RTL.  A free-running clock drives only the watchdog.
module tb_parity_check;
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

  logic [7:0] d8;
  logic [3:0] d4;
  logic p8, p4, e8, e4;
  parity_check #(.W(8)) dut8 (.data(d8), .pred(p8), .err(e8));
  parity_check #(.W(4)) dut4 (.data(d4), .pred(p4), .err(e4));

  initial begin
    for (int k = 0; k < 512; k++) begin
      {p8, d8} = 9'(k);
      {p4, d4} = 5'(k);
      #1;
      check(e8 == ((par8(d8) % 2 == 1) != p8), $sformatf("W=8 d=%h p=%b", d8, p8));
      check(e4 == ((par8({4'h0, d4}) % 2 == 1) != p4), $sformatf("W=4 d=%h p=%b", d4, p4));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
