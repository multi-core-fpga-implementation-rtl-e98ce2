// tb_ecc_top - end-to-end test of the whole engine at its default size
// (NW = 528, three cores) on the NIST P-256 curve.
//
// Sequence: CMD_SETUP with p; CMD_SCALAR_MUL k*G for a full 256-bit k and
// for a second k of the same length (the cycle counts must match: the
// ladder is constant-time); CMD_CHECK of a point off the curve (must set
// error) and of G (must clear it); a scalar multiplication of an off-curve
// point (must abort with error); a scalar multiplication with a bit flipped
// in the ladder state halfway (a fault attack: the output check must catch
// it); CMD_POINT_ADD G + 2G; then CMD_SETUP with
// the group order n and CMD_MOD_MUL/ADD/SUB/INV modulo n.  Every result is
// compared with affine reference arithmetic from tb_ecc_pkg.  The test also
// counts how often each mechanism was exercised (ladder steps with bit 0
// and bit 1, constant writes on the pool bus, input and output
// element-check rejections, passed output checks,
// zero-flag hits, rounds with idle cores, inverse ladder rounds) and counts
// a failure for any that never happened.
module tb_ecc_top;
  import ecc_pkg::*;
  import tb_ecc_pkg::*;

  localparam int NW = 528;

  logic              clk = 0, rst_n = 0;
  logic              cmd_valid = 0;
  cmd_e              cmd = CMD_SETUP;
  logic [NW-1:0]     modulus = '0, scalar = '0;
  logic [$clog2(NW+1)-1:0] kbits = '0;
  logic              host_we = 0;
  addr_t             host_waddr = '0, host_raddr = '0;
  logic [NW-1:0]     host_wdata = '0, host_rdata;
  logic              busy, done, error;
  logic [NCORES-1:0] zero_flags;

  ecc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ------------------------------------------------------------ mechanisms
  int n_ladder0 = 0, n_ladder1 = 0, n_constw = 0, n_reject = 0, n_zero = 0,
      n_idle_core = 0, n_inv_rounds = 0, n_mul_rounds = 0, n_out_reject = 0, n_out_pass = 0;
  bit inject = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.exec_start) begin
      if (dut.u_ctrl.job == dut.u_ctrl.J_LADDER && dut.u_ctrl.step == 0) begin
        if (dut.u_ctrl.kreg[dut.u_ctrl.li]) n_ladder1++; else n_ladder0++;
        if (inject && dut.u_ctrl.li == 128) begin
          dut.u_pool.mem[RG_S1] = dut.u_pool.mem[RG_S1] ^ (NW'(1) << 77);
          inject = 0;
        end
      end
      if (dut.u_ctrl.job == dut.u_ctrl.J_INV) n_inv_rounds++;
      for (int i = 0; i < NCORES; i++) if (dut.exec_rnd[i].op == OP_NOP) begin n_idle_core++; break; end
      for (int i = 0; i < NCORES; i++) if (dut.exec_rnd[i].op == OP_MUL) begin n_mul_rounds++; break; end
    end
    if (dut.cw_we) n_constw++;
    if (dut.exec_done && dut.u_ctrl.job == dut.u_ctrl.J_CHECK && dut.u_ctrl.cur_last && !zero_flags[0]) n_reject++;
    if (dut.exec_done && dut.u_ctrl.job == dut.u_ctrl.J_OUTCHECK && dut.u_ctrl.cur_last) begin
      if (zero_flags[0]) n_out_pass++; else n_out_reject++;
    end
    if (dut.exec_done && zero_flags != '0) n_zero++;
  end

  initial begin
    #(400_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wr(input addr_t a, input num_t d);
    @(negedge clk);
    host_we = 1; host_waddr = a; host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic rd(input addr_t a, output num_t d);
    @(negedge clk);
    host_raddr = a;
    @(negedge clk);
    d = host_rdata;
  endtask

  task automatic run(input cmd_e c, output longint cycles);
    longint t0;
    @(negedge clk);
    cmd = c; cmd_valid = 1;
    t0 = cyc;
    @(negedge clk);
    cmd_valid = 0;
    while (!done) @(negedge clk);
    cycles = cyc - t0;
  endtask

  task automatic load_point(input num_t x, input num_t y);
    wr(RG_XP, x); wr(RG_YP, y); wr(RG_A, A256); wr(RG_B, B256);
  endtask

  task automatic check_point(input num_t xe, input num_t ye, input string what);
    num_t qx, qy, qz, zi;
    rd(RG_QX, qx); rd(RG_QY, qy); rd(RG_QZ, qz);
    zi = invmod(qz, P256);
    check(mulmod(qx, zi, P256) == xe, {what, " x"});
    check(mulmod(qy, zi, P256) == ye, {what, " y"});
  endtask

  initial begin
    num_t k1, k2, xe, ye, x2, y2, oa, ob, r;
    longint c_setup, c_sm1, c_sm2, c;

    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---------------------------------------------------------- setup mod p
    modulus = P256;
    run(CMD_SETUP, c_setup);
    $display("setup: %0d cycles", c_setup);

    // -------------------------------------------------- scalar multiplications
    k1 = W'(256'hc51e4753afdec1e6b6c6a5b992f43f8dd0c7a8933072708b6522468b2ffb06fd);
    k2 = W'(256'h8a3f0c1d2e4b5a6978879695a4b3c2d1e0f00112233445566778899aabbccdde);
    aff_smul(k1, GX256, GY256, A256, P256, xe, ye);
    load_point(GX256, GY256);
    scalar = k1; kbits = 256;
    run(CMD_SCALAR_MUL, c_sm1);
    check(!error, "k1*G flagged as invalid");
    check_point(xe, ye, "k1*G");
    $display("scalar multiplication (256-bit k): %0d cycles", c_sm1);

    aff_smul(k2, GX256, GY256, A256, P256, xe, ye);
    load_point(GX256, GY256);
    scalar = k2; kbits = 256;
    run(CMD_SCALAR_MUL, c_sm2);
    check_point(xe, ye, "k2*G");
    check(c_sm1 == c_sm2, "scalar multiplication time depends on the scalar");

    // short scalar: k = 3 (two bits)
    aff_smul(3, GX256, GY256, A256, P256, xe, ye);
    load_point(GX256, GY256);
    scalar = 3; kbits = 2;
    run(CMD_SCALAR_MUL, c);
    check_point(xe, ye, "3*G");

    // ------------------------------------------------------------ checks
    load_point(GX256, GY256 ^ 1);
    run(CMD_CHECK, c);
    check(error, "off-curve point accepted");
    load_point(GX256, GY256);
    run(CMD_CHECK, c);
    check(!error, "G rejected");
    load_point(GX256 ^ 2, GY256);
    scalar = k1; kbits = 256;
    run(CMD_SCALAR_MUL, c);
    check(error, "scalar multiplication of an off-curve point not rejected");
    check(c < c_sm1 / 10, "rejected scalar multiplication did not abort early");

    // fault injected into the ladder state: the output check must reject
    load_point(GX256, GY256);
    scalar = k1; kbits = 256;
    inject = 1;
    run(CMD_SCALAR_MUL, c);
    check(error, "faulty scalar multiplication result not rejected");

    // ------------------------------------------------------------ group addition
    aff_add(GX256, GY256, GX256, GY256, A256, P256, x2, y2);   // 2G
    aff_add(GX256, GY256, x2, y2, A256, P256, xe, ye);         // 3G
    load_point(GX256, GY256);
    wr(RG_XQ, x2); wr(RG_YQ, y2);
    run(CMD_POINT_ADD, c);
    check_point(xe, ye, "G + 2G");

    // ------------------------------------------------ arithmetic modulo n
    modulus = N256;
    run(CMD_SETUP, c);
    oa = W'(256'h7d2a1f5e9c3b8a4d6e0f1a2b3c4d5e6f708192a3b4c5d6e7f8091a2b3c4d5e6f);
    ob = W'(256'h0123456789abcdeffedcba98765432100f1e2d3c4b5a69788796a5b4c3d2e1f0);
    wr(RG_OPA, oa); wr(RG_OPB, ob);
    run(CMD_MOD_MUL, c);
    rd(RG_RES, r);
    check(r == mulmod(oa, ob, N256), "mod mul");
    run(CMD_MOD_ADD, c);
    rd(RG_RES, r);
    check(r == addmod(oa, ob, N256), "mod add");
    run(CMD_MOD_SUB, c);
    rd(RG_RES, r);
    check(r == submod(oa, ob, N256), "mod sub");
    wr(RG_OPA, ob); wr(RG_OPB, oa);
    run(CMD_MOD_SUB, c);
    rd(RG_RES, r);
    check(r == submod(ob, oa, N256), "mod sub (negative)");
    wr(RG_OPA, oa);
    run(CMD_MOD_INV, c);
    rd(RG_RES, r);
    check(mulmod(r, oa, N256) == 1, "mod inverse");
    $display("modular inverse: %0d cycles", c);
    wr(RG_OPA, oa); wr(RG_OPB, oa);
    run(CMD_MOD_SUB, c);
    check(zero_flags[0], "zero flag of a - a");

    // ------------------------------------------------------------ mechanisms
    $display("ladder steps bit0=%0d bit1=%0d, const writes=%0d, input rejects=%0d, output checks passed=%0d rejected=%0d, zero-flag rounds=%0d, rounds with idle cores=%0d, mul rounds=%0d, inverse rounds=%0d",
             n_ladder0, n_ladder1, n_constw, n_reject, n_out_pass, n_out_reject, n_zero, n_idle_core, n_mul_rounds, n_inv_rounds);
    check(n_ladder0 > 0, "no ladder step with bit 0");
    check(n_ladder1 > 0, "no ladder step with bit 1");
    check(n_constw == 6, "constant writes");
    check(n_reject == 2, "element-check rejections");
    check(n_out_pass == 3, "output checks passed");
    check(n_out_reject == 1, "output check rejections");
    check(n_zero > 0, "zero flag never set");
    check(n_idle_core > 0, "no round with an idle core");
    check(n_mul_rounds > 0, "no multiplication round");
    check(n_inv_rounds == NW + 2, "inverse ladder rounds");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
