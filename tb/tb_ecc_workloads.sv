// tb_ecc_workloads - scalar multiplications on the prime fields of the
// curves the engine is meant for, run on the full-size engine (NW = 528,
// three cores): NIST P-224, secp256k1, NIST P-384, Brainpool P512r1 and
// NIST P-521.  For each field the test loads the field prime with
// CMD_SETUP, then multiplies a point by a random scalar as long as the
// curve's group order (top bit set) and compares k*P with affine reference
// arithmetic.  The point is made up on the spot: x, y (and a for the
// Brainpool field) are random and b = y^2 - x^3 - a*x, so the point lies on
// y^2 = x^3 + a*x + b without needing square roots.  The engine's run time
// depends only on the field size, the number of scalar bits and the
// engine's size, never on a, b or the point, so the cycle counts printed
// here are those of the real curves.  Each count must stay below the
// cycle count published for the three-core 528-bit implementation this
// design follows (138041, 157273, 233683, 311129 and 316538 cycles).
module tb_ecc_workloads;
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

  initial begin
    #(200_000_000);
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

  function automatic num_t rnd_below(input num_t m);
    num_t x;
    for (int i = 0; i < 17; i++) x = {x[W-33:0], $urandom()};
    return num_t'(wide_t'(x) % wide_t'(m));
  endfunction

  // a_sel: 0 -> a = p - 3, 1 -> a = 0, 2 -> random a
  task automatic workload(input string name, input num_t p, input int a_sel,
                          input int nbits, input longint published);
    num_t a, b, x, y, k, xe, ye, qx, qy, qz, zi;
    longint c;
    a = (a_sel == 0) ? p - 3 : (a_sel == 1) ? num_t'(0) : rnd_below(p);
    x = rnd_below(p);
    y = rnd_below(p);
    b = submod(submod(mulmod(y, y, p), mulmod(x, mulmod(x, x, p), p), p), mulmod(a, x, p), p);
    k = rnd_below(num_t'(1) << (nbits - 1)) | (num_t'(1) << (nbits - 1));
    modulus = p;
    run(CMD_SETUP, c);
    wr(RG_XP, x); wr(RG_YP, y); wr(RG_A, a); wr(RG_B, b);
    scalar = k; kbits = ($clog2(NW+1))'(nbits);
    run(CMD_SCALAR_MUL, c);
    aff_smul(k, x, y, a, p, xe, ye);
    rd(RG_QX, qx); rd(RG_QY, qy); rd(RG_QZ, qz);
    zi = invmod(qz, p);
    check(!error, {name, ": point rejected"});
    check(mulmod(qx, zi, p) == xe && mulmod(qy, zi, p) == ye, {name, ": wrong k*P"});
    check(c < published, {name, ": slower than the published cycle count"});
    $display("%s: %0d-bit scalar multiplication in %0d cycles (published %0d)", name, nbits, c, published);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    workload("P-224", (num_t'(1) << 224) - (num_t'(1) << 96) + 1, 0, 224, 138041);
    workload("secp256k1", (num_t'(1) << 256) - (num_t'(1) << 32) - 977, 1, 256, 157273);
    workload("P-384", (num_t'(1) << 384) - (num_t'(1) << 128) - (num_t'(1) << 96) + (num_t'(1) << 32) - 1, 0, 384, 233683);
    workload("brainpoolP512r1",
             W'(512'haadd9db8dbe9c48b3fd4e6ae33c9fc07cb308db3b3c9d20ed6639cca703308717d4d9b009bc66842aecda12ae6a380e62881ff2f2d82c68528aa6056583a48f3),
             2, 512, 311129);
    workload("P-521", (num_t'(1) << 521) - 1, 0, 521, 316538);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
