// tb_sbox_multifault: random multiple stuck-at faults in the four
// fault-detection S-box structures (S-box and inverse S-box in both
// composite fields).
//
// Each injection takes a random input byte and puts a multiple stuck-at fault
// into every one of the five blocks: a random non-empty set of the block's
// output bits is held at random values (for Block 1 the bits of eta, plus
// any of the four bits of N = eta_h + eta_l).  The blocks are faulted in data-flow
// order, so every block works on the already faulty output of the block
// before it.  Every injection is sorted into
//   N1  output wrong, flag low  (undetected)
//   N2  output right, flag high
//   N3  output wrong, flag high (detected)
//   N4  output right, flag low
// and the fault coverage is 100*(N2+N3)/(N1+N2+N3).  With each block's flag
// seeing a random error pattern, each flag stays low with probability 1/2,
// so the expected coverage is 100*(1-(1/2)^5) = 96.9 %.  The testbench checks
// that every structure lands between 95.5 % and 98.0 %, and that the output
// is right and the flag low for every input before its fault is applied.
// Faults on the block outputs stand in for faults on gates inside the blocks;
// this is the design's own fault model for the test.
// NINJ injections per structure (256,000 by default).
module tb_sbox_multifault;
  import aes_fd_pkg::*;
  import tb_ref_pkg::*;

  localparam int NINJ = 256000;

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
    repeat (2000000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] rnd_mask8();
    logic [7:0] m;
    do m = 8'($urandom); while (m == 0);
    return m;
  endfunction

  function automatic logic [3:0] rnd_mask4();
    logic [3:0] m;
    do m = 4'($urandom); while (m == 0);
    return m;
  endfunction

  task automatic report(input string name, input int n, input int n1, input int n2,
                        input int n3, input int n4);
    real fc;
    fc = 100.0 * real'(n2 + n3) / real'(n1 + n2 + n3);
    $display("%s: injections %0d  N1 %0d  N2 %0d  N3 %0d  N4 %0d  coverage %0.2f %%",
             name, n, n1, n2, n3, n4, fc);
    check(fc > 95.5 && fc < 98.0, $sformatf("%s coverage %0.2f outside 95.5..98.0", name, fc));
  endtask

  gf256_t in_gf1_sb, out_gf1_sb, fe_gf1_sb, fs_gf1_sb, fo_gf1_sb;
  logic [3:0] fn_gf1_sb, fg_gf1_sb, ft_gf1_sb;
  blk_err_t blk_gf1_sb;
  logic err_gf1_sb;
  gf1_sbox_fd dut_gf1_sb (.x(in_gf1_sb), .y(out_gf1_sb), .blk_err(blk_gf1_sb), .err(err_gf1_sb));

  gf256_t in_gf1_isb, out_gf1_isb, fe_gf1_isb, fs_gf1_isb, fo_gf1_isb;
  logic [3:0] fn_gf1_isb, fg_gf1_isb, ft_gf1_isb;
  blk_err_t blk_gf1_isb;
  logic err_gf1_isb;
  gf1_isbox_fd dut_gf1_isb (.y(in_gf1_isb), .x(out_gf1_isb), .blk_err(blk_gf1_isb), .err(err_gf1_isb));

  gf256_t in_gf2_sb, out_gf2_sb, fe_gf2_sb, fs_gf2_sb, fo_gf2_sb;
  logic [3:0] fn_gf2_sb, fg_gf2_sb, ft_gf2_sb;
  blk_err_t blk_gf2_sb;
  logic err_gf2_sb;
  gf2_sbox_fd dut_gf2_sb (.x(in_gf2_sb), .y(out_gf2_sb), .blk_err(blk_gf2_sb), .err(err_gf2_sb));

  gf256_t in_gf2_isb, out_gf2_isb, fe_gf2_isb, fs_gf2_isb, fo_gf2_isb;
  logic [3:0] fn_gf2_isb, fg_gf2_isb, ft_gf2_isb;
  blk_err_t blk_gf2_isb;
  logic err_gf2_isb;
  gf2_isbox_fd dut_gf2_isb (.y(in_gf2_isb), .x(out_gf2_isb), .blk_err(blk_gf2_isb), .err(err_gf2_isb));

  // ---- gf1_sb
  task automatic run_gf1_sb(input int n);
    int n1, n2, n3, n4;
    logic [7:0] m8, s8, ok_out;
    logic [3:0] m4, s4;
    n1 = 0; n2 = 0; n3 = 0; n4 = 0;
    for (int k = 0; k < n; k++) begin
      in_gf1_sb = 8'($urandom);
      #1;
      ok_out = sbox(in_gf1_sb);
      check(out_gf1_sb == ok_out && !err_gf1_sb, $sformatf("gf1_sb fault-free in=%h", in_gf1_sb));
      // Block 1
      m8 = rnd_mask8(); s8 = 8'($urandom);
      fe_gf1_sb = (dut_gf1_sb.eta & ~m8) | (s8 & m8);
      force dut_gf1_sb.eta = fe_gf1_sb; #1;
      // Block 1, adder output N (random bits, possibly none, stuck)
      m4 = 4'($urandom); s4 = 4'($urandom);
      fn_gf1_sb = (dut_gf1_sb.n_sum & ~m4) | (s4 & m4);
      force dut_gf1_sb.n_sum = fn_gf1_sb; #1;
      // Block 2 (sees the faulty eta)
      m4 = rnd_mask4(); s4 = 4'($urandom);
      fg_gf1_sb = (dut_gf1_sb.u_inv.gamma & ~m4) | (s4 & m4);
      force dut_gf1_sb.u_inv.gamma = fg_gf1_sb; #1;
      // Block 3
      m4 = rnd_mask4(); s4 = 4'($urandom);
      ft_gf1_sb = (dut_gf1_sb.u_inv.theta & ~m4) | (s4 & m4);
      force dut_gf1_sb.u_inv.theta = ft_gf1_sb; #1;
      // Block 4
      m8 = rnd_mask8(); s8 = 8'($urandom);
      fs_gf1_sb = (dut_gf1_sb.sigma & ~m8) | (s8 & m8);
      force dut_gf1_sb.sigma = fs_gf1_sb; #1;
      // Block 5
      m8 = rnd_mask8(); s8 = 8'($urandom);
      fo_gf1_sb = (dut_gf1_sb.y & ~m8) | (s8 & m8);
      force dut_gf1_sb.y = fo_gf1_sb; #1;
      if (out_gf1_sb != ok_out) begin
        if (err_gf1_sb) n3++; else n1++;
      end else begin
        if (err_gf1_sb) n2++; else n4++;
      end
      release dut_gf1_sb.eta;
      release dut_gf1_sb.n_sum;
      release dut_gf1_sb.u_inv.gamma;
      release dut_gf1_sb.u_inv.theta;
      release dut_gf1_sb.sigma;
      release dut_gf1_sb.y;
    end
    report("gf1_sb", n, n1, n2, n3, n4);
  endtask

  // ---- gf1_isb
  task automatic run_gf1_isb(input int n);
    int n1, n2, n3, n4;
    logic [7:0] m8, s8, ok_out;
    logic [3:0] m4, s4;
    n1 = 0; n2 = 0; n3 = 0; n4 = 0;
    for (int k = 0; k < n; k++) begin
      in_gf1_isb = 8'($urandom);
      #1;
      ok_out = inv_sbox(in_gf1_isb);
      check(out_gf1_isb == ok_out && !err_gf1_isb, $sformatf("gf1_isb fault-free in=%h", in_gf1_isb));
      // Block 1
      m8 = rnd_mask8(); s8 = 8'($urandom);
      fe_gf1_isb = (dut_gf1_isb.eta & ~m8) | (s8 & m8);
      force dut_gf1_isb.eta = fe_gf1_isb; #1;
      // Block 1, adder output N (random bits, possibly none, stuck)
      m4 = 4'($urandom); s4 = 4'($urandom);
      fn_gf1_isb = (dut_gf1_isb.n_sum & ~m4) | (s4 & m4);
      force dut_gf1_isb.n_sum = fn_gf1_isb; #1;
      // Block 2 (sees the faulty eta)
      m4 = rnd_mask4(); s4 = 4'($urandom);
      fg_gf1_isb = (dut_gf1_isb.u_inv.gamma & ~m4) | (s4 & m4);
      force dut_gf1_isb.u_inv.gamma = fg_gf1_isb; #1;
      // Block 3
      m4 = rnd_mask4(); s4 = 4'($urandom);
      ft_gf1_isb = (dut_gf1_isb.u_inv.theta & ~m4) | (s4 & m4);
      force dut_gf1_isb.u_inv.theta = ft_gf1_isb; #1;
      // Block 4
      m8 = rnd_mask8(); s8 = 8'($urandom);
      fs_gf1_isb = (dut_gf1_isb.sigma & ~m8) | (s8 & m8);
      force dut_gf1_isb.sigma = fs_gf1_isb; #1;
      // Block 5
      m8 = rnd_mask8(); s8 = 8'($urandom);
      fo_gf1_isb = (dut_gf1_isb.x & ~m8) | (s8 & m8);
      force dut_gf1_isb.x = fo_gf1_isb; #1;
      if (out_gf1_isb != ok_out) begin
        if (err_gf1_isb) n3++; else n1++;
      end else begin
        if (err_gf1_isb) n2++; else n4++;
      end
      release dut_gf1_isb.eta;
      release dut_gf1_isb.n_sum;
      release dut_gf1_isb.u_inv.gamma;
      release dut_gf1_isb.u_inv.theta;
      release dut_gf1_isb.sigma;
      release dut_gf1_isb.x;
    end
    report("gf1_isb", n, n1, n2, n3, n4);
  endtask

  // ---- gf2_sb
  task automatic run_gf2_sb(input int n);
    int n1, n2, n3, n4;
    logic [7:0] m8, s8, ok_out;
    logic [3:0] m4, s4;
    n1 = 0; n2 = 0; n3 = 0; n4 = 0;
    for (int k = 0; k < n; k++) begin
      in_gf2_sb = 8'($urandom);
      #1;
      ok_out = sbox(in_gf2_sb);
      check(out_gf2_sb == ok_out && !err_gf2_sb, $sformatf("gf2_sb fault-free in=%h", in_gf2_sb));
      // Block 1
      m8 = rnd_mask8(); s8 = 8'($urandom);
      fe_gf2_sb = (dut_gf2_sb.eta & ~m8) | (s8 & m8);
      force dut_gf2_sb.eta = fe_gf2_sb; #1;
      // Block 1, adder output N (random bits, possibly none, stuck)
      m4 = 4'($urandom); s4 = 4'($urandom);
      fn_gf2_sb = (dut_gf2_sb.n_sum & ~m4) | (s4 & m4);
      force dut_gf2_sb.n_sum = fn_gf2_sb; #1;
      // Block 2 (sees the faulty eta)
      m4 = rnd_mask4(); s4 = 4'($urandom);
      fg_gf2_sb = (dut_gf2_sb.u_inv.gamma & ~m4) | (s4 & m4);
      force dut_gf2_sb.u_inv.gamma = fg_gf2_sb; #1;
      // Block 3
      m4 = rnd_mask4(); s4 = 4'($urandom);
      ft_gf2_sb = (dut_gf2_sb.u_inv.theta & ~m4) | (s4 & m4);
      force dut_gf2_sb.u_inv.theta = ft_gf2_sb; #1;
      // Block 4
      m8 = rnd_mask8(); s8 = 8'($urandom);
      fs_gf2_sb = (dut_gf2_sb.sigma & ~m8) | (s8 & m8);
      force dut_gf2_sb.sigma = fs_gf2_sb; #1;
      // Block 5
      m8 = rnd_mask8(); s8 = 8'($urandom);
      fo_gf2_sb = (dut_gf2_sb.y & ~m8) | (s8 & m8);
      force dut_gf2_sb.y = fo_gf2_sb; #1;
      if (out_gf2_sb != ok_out) begin
        if (err_gf2_sb) n3++; else n1++;
      end else begin
        if (err_gf2_sb) n2++; else n4++;
      end
      release dut_gf2_sb.eta;
      release dut_gf2_sb.n_sum;
      release dut_gf2_sb.u_inv.gamma;
      release dut_gf2_sb.u_inv.theta;
      release dut_gf2_sb.sigma;
      release dut_gf2_sb.y;
    end
    report("gf2_sb", n, n1, n2, n3, n4);
  endtask

  // ---- gf2_isb
  task automatic run_gf2_isb(input int n);
    int n1, n2, n3, n4;
    logic [7:0] m8, s8, ok_out;
    logic [3:0] m4, s4;
    n1 = 0; n2 = 0; n3 = 0; n4 = 0;
    for (int k = 0; k < n; k++) begin
      in_gf2_isb = 8'($urandom);
      #1;
      ok_out = inv_sbox(in_gf2_isb);
      check(out_gf2_isb == ok_out && !err_gf2_isb, $sformatf("gf2_isb fault-free in=%h", in_gf2_isb));
      // Block 1
      m8 = rnd_mask8(); s8 = 8'($urandom);
      fe_gf2_isb = (dut_gf2_isb.eta & ~m8) | (s8 & m8);
      force dut_gf2_isb.eta = fe_gf2_isb; #1;
      // Block 1, adder output N (random bits, possibly none, stuck)
      m4 = 4'($urandom); s4 = 4'($urandom);
      fn_gf2_isb = (dut_gf2_isb.n_sum & ~m4) | (s4 & m4);
      force dut_gf2_isb.n_sum = fn_gf2_isb; #1;
      // Block 2 (sees the faulty eta)
      m4 = rnd_mask4(); s4 = 4'($urandom);
      fg_gf2_isb = (dut_gf2_isb.u_inv.gamma & ~m4) | (s4 & m4);
      force dut_gf2_isb.u_inv.gamma = fg_gf2_isb; #1;
      // Block 3
      m4 = rnd_mask4(); s4 = 4'($urandom);
      ft_gf2_isb = (dut_gf2_isb.u_inv.theta & ~m4) | (s4 & m4);
      force dut_gf2_isb.u_inv.theta = ft_gf2_isb; #1;
      // Block 4
      m8 = rnd_mask8(); s8 = 8'($urandom);
      fs_gf2_isb = (dut_gf2_isb.sigma & ~m8) | (s8 & m8);
      force dut_gf2_isb.sigma = fs_gf2_isb; #1;
      // Block 5
      m8 = rnd_mask8(); s8 = 8'($urandom);
      fo_gf2_isb = (dut_gf2_isb.x & ~m8) | (s8 & m8);
      force dut_gf2_isb.x = fo_gf2_isb; #1;
      if (out_gf2_isb != ok_out) begin
        if (err_gf2_isb) n3++; else n1++;
      end else begin
        if (err_gf2_isb) n2++; else n4++;
      end
      release dut_gf2_isb.eta;
      release dut_gf2_isb.n_sum;
      release dut_gf2_isb.u_inv.gamma;
      release dut_gf2_isb.u_inv.theta;
      release dut_gf2_isb.sigma;
      release dut_gf2_isb.x;
    end
    report("gf2_isb", n, n1, n2, n3, n4);
  endtask

  initial begin
    run_gf1_sb(NINJ);
    run_gf1_isb(NINJ);
    run_gf2_sb(NINJ);
    run_gf2_isb(NINJ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
