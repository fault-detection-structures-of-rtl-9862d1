// tb_gf1_sbox_fd: self-checking testbench for gf1_sbox_fd.
//
// Checks all 256 inputs against the reference with every flag low, then injects single stuck-at-0/1 faults on every output bit of each block (eta and N for Block 1) and on the internal nodes that fan out, for every input, and checks that each value-changing fault flips an odd number of bits and raises its block's flag.
// Expected values come from tb_ref_pkg (plain field arithmetic), not from
// the RTL.  A free-running clock drives only the watchdog.
module tb_gf1_sbox_fd;
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
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  gf256_t din, dout;
  blk_err_t blk_err;
  logic     err;
  gf1_sbox_fd dut (.x(din), .y(dout), .blk_err(blk_err), .err(err));

  logic [7:0] eta_ok, sig_ok, out_ok;
  logic [3:0] g_ok, t_ok, n_ok;
  logic [3:0] fv4;
  logic [7:0] fv8;
  int faults [1:5];
  int caught [1:5];
  int even_err = 0;

  task automatic expect_values();
    eta_ok = delta(din, 1'b0);
    n_ok   = eta_ok[7:4] ^ eta_ok[3:0];
    g_ok   = norm(eta_ok, 1'b0);
    t_ok   = inv16(g_ok, 1'b0);
    sig_ok = {mul16_gf1(eta_ok[7:4], t_ok), mul16_gf1(eta_ok[7:4] ^ eta_ok[3:0], t_ok)};
    out_ok = sbox(din);
  endtask

  function automatic logic flag_of(input int b);
    case (b)
      1: return blk_err.b1;
      2: return blk_err.b2;
      3: return blk_err.b3;
      4: return blk_err.b4;
      default: return blk_err.b5;
    endcase
  endfunction

  // a fault inside block b: if it changed the block output, the number of
  // wrong bits must be odd and the block's flag must rise.  Block 1 outputs
  // eta and N = eta_h + eta_l; its check runs over N, so the count is taken
  // on N, and a change of eta that leaves N unchanged counts as missed.
  task automatic node_fault(input int b, input string where, input int sv);
    logic [7:0] diff;
    logic       changed;
    changed = 1'b0;
    case (b)
      1: begin
        diff = {4'h0, dut.n_sum ^ n_ok};
        changed = (dut.eta != eta_ok);
      end
      2: diff = {4'h0, dut.u_inv.gamma ^ g_ok};
      3: diff = {4'h0, dut.u_inv.theta ^ t_ok};
      4: diff = dut.sigma ^ sig_ok;
      default: diff = dut.y ^ out_ok;
    endcase
    if (diff != 0 || changed) begin
      faults[b]++;
      if (flag_of(b)) caught[b]++;
      if ((par8(diff) % 2) == 0) even_err++;
      check(flag_of(b) && err, $sformatf("%s stuck-at-%0d in=%h not detected", where, sv, din));
    end
  endtask

  initial begin
    for (int b = 1; b <= 5; b++) begin faults[b] = 0; caught[b] = 0; end
    // fault-free: every input, right output, no flag
    for (int k = 0; k < 256; k++) begin
      din = 8'(k);
      #1;
      expect_values();
      check(dout == out_ok, $sformatf("in=%h out=%h expected %h", din, dout, out_ok));
      check(blk_err == '0 && !err, $sformatf("in=%h false alarm %b", din, blk_err));
    end
    // single stuck-at faults on every block output bit and on the shared
    // internal nodes, for every input
    for (int k = 0; k < 256; k++) begin
      din = 8'(k);
      expect_values();
      for (int b = 0; b < 8; b++) for (int sv = 0; sv < 2; sv++) begin
        fv8 = sv[0] ? (eta_ok | (8'b1 << b)) : (eta_ok & ~(8'b1 << b));
        force dut.eta = fv8; #1; node_fault(1, "eta", sv); release dut.eta;
        fv8 = sv[0] ? (sig_ok | (8'b1 << b)) : (sig_ok & ~(8'b1 << b));
        force dut.sigma = fv8; #1; node_fault(4, "sigma", sv); release dut.sigma;
        fv8 = sv[0] ? (out_ok | (8'b1 << b)) : (out_ok & ~(8'b1 << b));
        force dut.y = fv8; #1; node_fault(5, "out", sv); release dut.y;
      end
      for (int b = 0; b < 4; b++) for (int sv = 0; sv < 2; sv++) begin
        fv4 = sv[0] ? (g_ok | (4'b1 << b)) : (g_ok & ~(4'b1 << b));
        force dut.u_inv.gamma = fv4; #1; node_fault(2, "gamma", sv); release dut.u_inv.gamma;
        fv4 = sv[0] ? (t_ok | (4'b1 << b)) : (t_ok & ~(4'b1 << b));
        force dut.u_inv.theta = fv4; #1; node_fault(3, "theta", sv); release dut.u_inv.theta;
        fv4 = sv[0] ? (n_ok | (4'b1 << b)) : (n_ok & ~(4'b1 << b));
        force dut.n_sum = fv4; #1; node_fault(1, "N", sv); release dut.n_sum;
      end
      for (int sv = 0; sv < 2; sv++) begin
        begin
          force dut.u_b1.a27 = sv[0]; #1;
          node_fault(1, "u_b1.a27", sv);
          release dut.u_b1.a27;
        end
        begin
          force dut.u_b1.a53 = sv[0]; #1;
          node_fault(1, "u_b1.a53", sv);
          release dut.u_b1.a53;
        end
        begin
          force dut.u_b1.p = sv[0]; #1;
          node_fault(1, "u_b1.p", sv);
          release dut.u_b1.p;
        end
        begin
          force dut.u_b1.a23 = sv[0]; #1;
          node_fault(1, "u_b1.a23", sv);
          release dut.u_b1.a23;
        end
        begin
          force dut.u_b1.n1 = sv[0]; #1;
          node_fault(1, "u_b1.n1", sv);
          release dut.u_b1.n1;
        end
        begin
          force dut.u_b1.a14 = sv[0]; #1;
          node_fault(1, "u_b1.a14", sv);
          release dut.u_b1.a14;
        end
        begin
          force dut.u_b1.a146 = sv[0]; #1;
          node_fault(1, "u_b1.a146", sv);
          release dut.u_b1.a146;
        end
        begin
          force dut.u_b1.c14 = sv[0]; #1;
          node_fault(1, "u_b1.c14", sv);
          release dut.u_b1.c14;
        end
        begin
          force dut.u_b1.c14n = sv[0]; #1;
          node_fault(1, "u_b1.c14n", sv);
          release dut.u_b1.c14n;
        end
        begin
          force dut.u_b1.a16 = sv[0]; #1;
          node_fault(1, "u_b1.a16", sv);
          release dut.u_b1.a16;
        end
        begin
          force dut.u_inv.u_b2.u_mul.z3_v31 = sv[0]; #1;
          node_fault(2, "u_inv.u_b2.u_mul.z3_v31", sv);
          release dut.u_inv.u_b2.u_mul.z3_v31;
        end
        begin
          force dut.u_inv.u_b2.u_mul.z3_v20 = sv[0]; #1;
          node_fault(2, "u_inv.u_b2.u_mul.z3_v20", sv);
          release dut.u_inv.u_b2.u_mul.z3_v20;
        end
        begin
          force dut.u_inv.u_b2.u_mul.z3_vall = sv[0]; #1;
          node_fault(2, "u_inv.u_b2.u_mul.z3_vall", sv);
          release dut.u_inv.u_b2.u_mul.z3_vall;
        end
        begin
          force dut.u_inv.u_b2.u_mul.z3_v32 = sv[0]; #1;
          node_fault(2, "u_inv.u_b2.u_mul.z3_v32", sv);
          release dut.u_inv.u_b2.u_mul.z3_v32;
        end
        begin
          force dut.u_inv.u_b2.u_mul.z2_v31 = sv[0]; #1;
          node_fault(2, "u_inv.u_b2.u_mul.z2_v31", sv);
          release dut.u_inv.u_b2.u_mul.z2_v31;
        end
        begin
          force dut.u_inv.u_b2.u_mul.z2_v20 = sv[0]; #1;
          node_fault(2, "u_inv.u_b2.u_mul.z2_v20", sv);
          release dut.u_inv.u_b2.u_mul.z2_v20;
        end
        begin
          force dut.u_inv.u_b2.u_mul.z1_v32 = sv[0]; #1;
          node_fault(2, "u_inv.u_b2.u_mul.z1_v32", sv);
          release dut.u_inv.u_b2.u_mul.z1_v32;
        end
        begin
          force dut.u_inv.u_b2.u_mul.z1_v10 = sv[0]; #1;
          node_fault(2, "u_inv.u_b2.u_mul.z1_v10", sv);
          release dut.u_inv.u_b2.u_mul.z1_v10;
        end
        begin
          force dut.u_inv.u_b2.u_mul.z0_v32 = sv[0]; #1;
          node_fault(2, "u_inv.u_b2.u_mul.z0_v32", sv);
          release dut.u_inv.u_b2.u_mul.z0_v32;
        end
        begin
          force dut.u_inv.u_b4.u_mul_h.z3_v31 = sv[0]; #1;
          node_fault(4, "u_inv.u_b4.u_mul_h.z3_v31", sv);
          release dut.u_inv.u_b4.u_mul_h.z3_v31;
        end
        begin
          force dut.u_inv.u_b4.u_mul_h.z3_v20 = sv[0]; #1;
          node_fault(4, "u_inv.u_b4.u_mul_h.z3_v20", sv);
          release dut.u_inv.u_b4.u_mul_h.z3_v20;
        end
        begin
          force dut.u_inv.u_b4.u_mul_h.z3_vall = sv[0]; #1;
          node_fault(4, "u_inv.u_b4.u_mul_h.z3_vall", sv);
          release dut.u_inv.u_b4.u_mul_h.z3_vall;
        end
        begin
          force dut.u_inv.u_b4.u_mul_h.z3_v32 = sv[0]; #1;
          node_fault(4, "u_inv.u_b4.u_mul_h.z3_v32", sv);
          release dut.u_inv.u_b4.u_mul_h.z3_v32;
        end
        begin
          force dut.u_inv.u_b4.u_mul_h.z2_v31 = sv[0]; #1;
          node_fault(4, "u_inv.u_b4.u_mul_h.z2_v31", sv);
          release dut.u_inv.u_b4.u_mul_h.z2_v31;
        end
        begin
          force dut.u_inv.u_b4.u_mul_h.z2_v20 = sv[0]; #1;
          node_fault(4, "u_inv.u_b4.u_mul_h.z2_v20", sv);
          release dut.u_inv.u_b4.u_mul_h.z2_v20;
        end
        begin
          force dut.u_inv.u_b4.u_mul_h.z1_v32 = sv[0]; #1;
          node_fault(4, "u_inv.u_b4.u_mul_h.z1_v32", sv);
          release dut.u_inv.u_b4.u_mul_h.z1_v32;
        end
        begin
          force dut.u_inv.u_b4.u_mul_h.z1_v10 = sv[0]; #1;
          node_fault(4, "u_inv.u_b4.u_mul_h.z1_v10", sv);
          release dut.u_inv.u_b4.u_mul_h.z1_v10;
        end
        begin
          force dut.u_inv.u_b4.u_mul_h.z0_v32 = sv[0]; #1;
          node_fault(4, "u_inv.u_b4.u_mul_h.z0_v32", sv);
          release dut.u_inv.u_b4.u_mul_h.z0_v32;
        end
        begin
          force dut.u_inv.u_b4.u_mul_l.z3_v31 = sv[0]; #1;
          node_fault(4, "u_inv.u_b4.u_mul_l.z3_v31", sv);
          release dut.u_inv.u_b4.u_mul_l.z3_v31;
        end
        begin
          force dut.u_inv.u_b4.u_mul_l.z3_v20 = sv[0]; #1;
          node_fault(4, "u_inv.u_b4.u_mul_l.z3_v20", sv);
          release dut.u_inv.u_b4.u_mul_l.z3_v20;
        end
        begin
          force dut.u_inv.u_b4.u_mul_l.z3_vall = sv[0]; #1;
          node_fault(4, "u_inv.u_b4.u_mul_l.z3_vall", sv);
          release dut.u_inv.u_b4.u_mul_l.z3_vall;
        end
        begin
          force dut.u_inv.u_b4.u_mul_l.z3_v32 = sv[0]; #1;
          node_fault(4, "u_inv.u_b4.u_mul_l.z3_v32", sv);
          release dut.u_inv.u_b4.u_mul_l.z3_v32;
        end
        begin
          force dut.u_inv.u_b4.u_mul_l.z2_v31 = sv[0]; #1;
          node_fault(4, "u_inv.u_b4.u_mul_l.z2_v31", sv);
          release dut.u_inv.u_b4.u_mul_l.z2_v31;
        end
        begin
          force dut.u_inv.u_b4.u_mul_l.z2_v20 = sv[0]; #1;
          node_fault(4, "u_inv.u_b4.u_mul_l.z2_v20", sv);
          release dut.u_inv.u_b4.u_mul_l.z2_v20;
        end
        begin
          force dut.u_inv.u_b4.u_mul_l.z1_v32 = sv[0]; #1;
          node_fault(4, "u_inv.u_b4.u_mul_l.z1_v32", sv);
          release dut.u_inv.u_b4.u_mul_l.z1_v32;
        end
        begin
          force dut.u_inv.u_b4.u_mul_l.z1_v10 = sv[0]; #1;
          node_fault(4, "u_inv.u_b4.u_mul_l.z1_v10", sv);
          release dut.u_inv.u_b4.u_mul_l.z1_v10;
        end
        begin
          force dut.u_inv.u_b4.u_mul_l.z0_v32 = sv[0]; #1;
          node_fault(4, "u_inv.u_b4.u_mul_l.z0_v32", sv);
          release dut.u_inv.u_b4.u_mul_l.z0_v32;
        end
        begin
          force dut.u_inv.u_b3.xn_t1 = sv[0]; #1;
          node_fault(3, "u_inv.u_b3.xn_t1", sv);
          release dut.u_inv.u_b3.xn_t1;
        end
        begin
          force dut.u_inv.u_b3.xn_t0 = sv[0]; #1;
          node_fault(3, "u_inv.u_b3.xn_t0", sv);
          release dut.u_inv.u_b3.xn_t0;
        end
        begin
          force dut.u_b5.s27 = sv[0]; #1;
          node_fault(5, "u_b5.s27", sv);
          release dut.u_b5.s27;
        end
        begin
          force dut.u_b5.s01 = sv[0]; #1;
          node_fault(5, "u_b5.s01", sv);
          release dut.u_b5.s01;
        end
      end
    end
    for (int b = 1; b <= 5; b++)
      $display("block %0d: value-changing single faults %0d, detected %0d", b, faults[b], caught[b]);
    $display("faults giving an even number of wrong bits: %0d", even_err);
    check(even_err == 0, "even error count seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
