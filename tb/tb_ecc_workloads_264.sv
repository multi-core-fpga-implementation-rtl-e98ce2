// tb_ecc_workloads_264 - the same scalar-multiplication workloads as
// tb_ecc_workloads on the engine built for 264-bit operands (NW = 264, the
// size for fields up to 256 bits, three cores): the P-224 and secp256k1
// prime fields.  Points are made up on the spot (random x, y; b = y^2 - x^3
// - a*x), k*P is compared with affine reference arithmetic, and each cycle
// count must stay below the one published for the three-core 264-bit
// implementation this design follows (92402 and 105298 cycles).
module tb_ecc_workloads_264;
  import ecc_pkg::*;
  import tb_ecc_pkg::*;

  localparam int NW = 264;

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

  ecc_top #(.NW(NW)) dut (.*);

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
    workload("P-224", (num_t'(1) << 224) - (num_t'(1) << 96) + 1, 0, 224, 92402);
    workload("secp256k1", (num_t'(1) << 256) - (num_t'(1) << 32) - 977, 1, 256, 105298);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
