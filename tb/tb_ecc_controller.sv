// tb_ecc_controller - runs the controller against models of its
// neighbours: a setup unit that answers setup_start with setup_done a few
// cycles later, and an executor that performs each round on the round
// interpreter (Montgomery semantics modulo P-256's prime), reports the zero
// flags and answers with exec_done.  The pool is the interpreter's register
// file; constant writes on the write bus go into it as well.
// Checked: the constants after CMD_SETUP, k*G for short scalars (including
// kbits = 2 and a scalar with alternating bits) against affine reference
// arithmetic, the number of ladder rounds (11 per scalar bit after the
// first), rejection of an off-curve point with an early stop, rejection of
// the result after a fault injected into the ladder state, G + 2G, and the
// modular operations including the inverse.
module tb_ecc_controller;
  import ecc_pkg::*;
  import tb_ecc_pkg::*;
  localparam int NW = 528;
  localparam int KW = $clog2(NW+1);

  logic clk = 0, rst_n = 0, cmd_valid = 0;
  cmd_e cmd = CMD_SETUP;
  logic [NW-1:0] scalar = '0, p = P256, r2;
  logic [KW-1:0] kbits = '0;
  logic setup_start, setup_done = 0, exec_start, exec_done = 0;
  round_t exec_rnd;
  logic [NCORES-1:0] zero_flags = '0;
  logic cw_we;
  addr_t cw_addr;
  logic [NW-1:0] cw_data;
  logic busy, done, error, check_zero;
  assign check_zero = zero_flags[0];

  ecc_controller #(.NW(NW)) dut (.*);

  always #5 clk = ~clk;
  assign r2 = mulmod(rmod(p), rmod(p), p);

  int checks = 0, failures = 0, nrounds = 0, nladder = 0;
  bit inject = 0;

  initial begin
    #200_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // neighbour models
  always @(posedge clk) begin
    if (setup_start) begin
      repeat (5) @(posedge clk);
      setup_done <= 1'b1;
      @(posedge clk);
      setup_done <= 1'b0;
    end
  end

  always @(posedge clk) begin
    if (cw_we) regs[cw_addr] = cw_data;
    if (exec_start) begin
      round_t r;
      r = exec_rnd;
      nrounds++;
      if (dut.job == dut.J_LADDER) nladder++;
      if (inject && nladder == 100) begin
        regs[RG_S0] = regs[RG_S0] ^ num_t'(1);
        inject = 0;
      end
      exec_round(r, p, 1'b1);
      repeat (2) @(posedge clk);
      for (int i = 0; i < NCORES; i++) zero_flags[i] <= (r[i].op != OP_NOP) && regs[r[i].d] == '0;
      exec_done <= 1'b1;
      @(posedge clk);
      exec_done <= 1'b0;
    end
  end

  task automatic ck(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input cmd_e c);
    @(negedge clk);
    cmd = c; cmd_valid = 1;
    nrounds = 0; nladder = 0;
    @(negedge clk);
    cmd_valid = 0;
    while (!done) @(negedge clk);
  endtask

  task automatic smul(input num_t k, input int kb);
    num_t xe, ye, zi;
    regs[RG_XP] = GX256; regs[RG_YP] = GY256; regs[RG_A] = A256; regs[RG_B] = B256;
    scalar = k; kbits = KW'(kb);
    run(CMD_SCALAR_MUL);
    aff_smul(k, GX256, GY256, A256, P256, xe, ye);
    zi = invmod(regs[RG_QZ], P256);
    ck(!error && mulmod(regs[RG_QX], zi, P256) == xe && mulmod(regs[RG_QY], zi, P256) == ye,
       $sformatf("%0d-bit scalar multiplication", kb));
    ck(nladder == 11 * (kb - 1), $sformatf("%0d ladder rounds for %0d bits", nladder, kb));
  endtask

  initial begin
    num_t x2, y2, xe, ye, zi, oa, ob;
    int nfull;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(CMD_SETUP);
    ck(regs[RG_ZERO] == 0 && regs[RG_ONE] == 1 && regs[RG_R2] == r2, "constants");
    ck(regs[RG_MONE] == rmod(p), "Montgomery one");

    smul(3, 2);
    smul(5, 3);
    smul(num_t'(16'haaaa), 16);
    smul(num_t'(32'h8000_0001), 32);
    smul(num_t'({$urandom(), $urandom()} | 64'h8000_0000_0000_0000), 64);
    nfull = nrounds;

    regs[RG_XP] = GX256; regs[RG_YP] = GY256 ^ 8; regs[RG_A] = A256; regs[RG_B] = B256;
    scalar = num_t'(64'h8000_0000_0000_0001); kbits = 64;
    run(CMD_SCALAR_MUL);
    ck(error, "off-curve point accepted");
    ck(nladder == 0 && nrounds < nfull / 10, "rejected scalar multiplication kept running");
    regs[RG_XP] = GX256; regs[RG_YP] = GY256; regs[RG_A] = A256; regs[RG_B] = B256;
    scalar = num_t'(64'h8000_0000_0000_0001); kbits = 64;
    inject = 1;
    run(CMD_SCALAR_MUL);
    ck(error, "faulty ladder result accepted");
    ck(dut.job == dut.J_IDLE, "controller not idle after rejection");
    regs[RG_XP] = GX256; regs[RG_YP] = GY256; regs[RG_A] = A256; regs[RG_B] = B256;
    run(CMD_CHECK);
    ck(!error, "G rejected");

    aff_add(GX256, GY256, GX256, GY256, A256, P256, x2, y2);
    aff_add(GX256, GY256, x2, y2, A256, P256, xe, ye);
    regs[RG_XP] = GX256; regs[RG_YP] = GY256; regs[RG_XQ] = x2; regs[RG_YQ] = y2;
    run(CMD_POINT_ADD);
    zi = invmod(regs[RG_QZ], P256);
    ck(mulmod(regs[RG_QX], zi, P256) == xe && mulmod(regs[RG_QY], zi, P256) == ye, "G + 2G");

    oa = GX256; ob = GY256;
    regs[RG_OPA] = oa; regs[RG_OPB] = ob;
    run(CMD_MOD_MUL); ck(regs[RG_RES] == mulmod(oa, ob, p), "mod mul");
    run(CMD_MOD_ADD); ck(regs[RG_RES] == addmod(oa, ob, p), "mod add");
    run(CMD_MOD_SUB); ck(regs[RG_RES] == submod(oa, ob, p), "mod sub");
    run(CMD_MOD_INV); ck(mulmod(regs[RG_RES], oa, p) == 1, "mod inverse");
    ck(nrounds == NW + 2, "inverse rounds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
