// tb_sbox_fd_pipe: self-checking testbench for sbox_fd_pipe, both fields.
//
// For every one of the 256 inputs and each field the testbench runs three
// one-cycle operations:
//   * fault-free: y must equal the AES S-box at once, and one edge later
//     err_valid must be high with no flag;
//   * a flipped output bit (forced on y): in the cycle of the fault no flag
//     may rise yet (err still belongs to the previous, clean input), and one
//     edge later exactly the Block 5 flag must be set;
//   * a flipped bit of eta (forced on the Block 1 output): one edge later the
//     Block 1 flag must be set.
// An idle cycle checks that err_valid and err stay low without valid.
// Expected S-box values come from tb_ref_pkg, not from the RTL; the one-cycle
// latency of the Block 5 flag is checked on every operation.
module tb_sbox_fd_pipe;
  import aes_fd_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  int n_late_b5 = 0;
  int n_b1 = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic     v1, v2, ev1, ev2, e1, e2;
  gf256_t   x1, x2, y1, y2;
  blk_err_t be1, be2;
  gf256_t   yf1, yf2, ef1, ef2;     // force sources

  sbox_fd_pipe #(.FIELD(FIELD_GF1)) dut1 (.clk(clk), .rst_n(rst_n), .valid(v1), .x(x1),
                                          .y(y1), .err_valid(ev1), .blk_err(be1), .err(e1));
  sbox_fd_pipe #(.FIELD(FIELD_GF2)) dut2 (.clk(clk), .rst_n(rst_n), .valid(v2), .x(x2),
                                          .y(y2), .err_valid(ev2), .blk_err(be2), .err(e2));

  initial begin
    v1 = 1'b0; v2 = 1'b0; x1 = '0; x2 = '0;
    yf1 = '0; yf2 = '0; ef1 = '0; ef2 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int k = 0; k < 256; k++) begin
      // fault-free operation
      @(negedge clk);
      v1 = 1'b1; v2 = 1'b1; x1 = 8'(k); x2 = 8'(k);
      #1;
      check(y1 == sbox(8'(k)) && y2 == sbox(8'(k)), $sformatf("S-box k=%0d y1=%h y2=%h", k, y1, y2));
      @(posedge clk); #1;
      check(ev1 && ev2 && !e1 && !e2 && be1 == '0 && be2 == '0,
            $sformatf("clean k=%0d be1=%b be2=%b", k, be1, be2));

      // output bit flipped: Block 5, flagged one cycle later
      @(negedge clk);
      yf1 = sbox(8'(k)) ^ (8'd1 << (k % 8));
      yf2 = sbox(8'(k)) ^ (8'd1 << ((k + 3) % 8));
      force dut1.y = yf1;
      force dut2.y = yf2;
      #1;
      check(!e1 && !e2, $sformatf("Block 5 flag too early k=%0d", k));
      @(posedge clk); #1;
      release dut1.y;
      release dut2.y;
      check(ev1 && ev2 && be1 == 5'b10000 && be2 == 5'b10000,
            $sformatf("Block 5 k=%0d be1=%b be2=%b", k, be1, be2));
      if (be1.b5 && be2.b5) n_late_b5++;

      // eta bit flipped: Block 1
      @(negedge clk);
      ef1 = dut1.eta ^ (8'd1 << ((k + 5) % 8));
      ef2 = dut2.eta ^ (8'd1 << ((k + 1) % 8));
      force dut1.eta = ef1;
      force dut2.eta = ef2;
      @(posedge clk); #1;
      release dut1.eta;
      release dut2.eta;
      check(be1.b1 && be2.b1 && e1 && e2, $sformatf("Block 1 k=%0d be1=%b be2=%b", k, be1, be2));
      if (be1.b1 && be2.b1) n_b1++;
    end

    // idle cycle
    @(negedge clk);
    v1 = 1'b0; v2 = 1'b0;
    @(posedge clk); #1;
    check(!ev1 && !ev2 && !e1 && !e2, "idle cycle");

    check(n_late_b5 > 0 && n_b1 > 0, "mechanism count");
    $display("late Block 5 flags: %0d, Block 1 flags: %0d", n_late_b5, n_b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
