// tb_element_check - executes both element-check programs on the round
// interpreter (plain arithmetic modulo P-256's prime): for points on P-256
// (G, 2G, 3G; for the projective check scaled by a random Z) core 0's result
// in the last round must be zero, for points with a disturbed coordinate it
// must not.  The program lengths (4 and 5 rounds) are checked too.
module tb_element_check;
  import ecc_pkg::*;
  import tb_ecc_pkg::*;

  logic [3:0] step = '0;
  logic outp = 0;
  round_t rnd;
  logic last;

  element_check dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try_point(input num_t x, input num_t y, input bit on_curve, input bit proj);
    num_t v, z;
    int n;
    z = num_t'({$urandom(), $urandom()} | 64'h1);
    regs[RG_XP] = x; regs[RG_YP] = y; regs[RG_A] = A256; regs[RG_B] = B256;
    regs[RG_QX] = mulmod(x, z, P256); regs[RG_QY] = mulmod(y, z, P256); regs[RG_QZ] = z;
    outp <= proj;
    step <= '0;
    n = 0;
    forever begin
      #1;
      exec_round(rnd, P256, 1'b0);
      n++;
      if (last) break;
      step <= step + 1'b1;
    end
    checks++;
    if (n != (proj ? 5 : 4)) begin failures++; $display("FAIL %0d rounds", n); end
    v = regs[rnd[0].d];
    checks++;
    if ((rnd[0].op != OP_NOP && v == '0) != on_curve) begin
      failures++;
      $display("FAIL point expected %0s (x=%h y=%h v=%h)", on_curve ? "valid" : "invalid", x, y, v);
    end
  endtask

  initial begin
    num_t x2, y2, x3, y3;
    aff_add(GX256, GY256, GX256, GY256, A256, P256, x2, y2);
    aff_add(GX256, GY256, x2, y2, A256, P256, x3, y3);
    for (int proj = 0; proj < 2; proj++) begin
      try_point(GX256, GY256, 1, proj[0]);
      try_point(x2, y2, 1, proj[0]);
      try_point(x3, y3, 1, proj[0]);
      try_point(GX256, GY256 + 1, 0, proj[0]);
      try_point(x2 ^ 4, y2, 0, proj[0]);
      try_point(x3, x2, 0, proj[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
