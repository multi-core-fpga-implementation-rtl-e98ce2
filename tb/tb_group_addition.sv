// tb_group_addition - executes the group-addition program on the round
// interpreter (plain arithmetic modulo P-256's prime) for random pairs of
// points and compares QX/QZ and QY/QZ with the affine chord rule
// x3 = l^2 - x1 - x2, y3 = l(x1 - x3) - y1, l = (y2 - y1)/(x2 - x1).
module tb_group_addition;
  import ecc_pkg::*;
  import tb_ecc_pkg::*;

  logic [3:0] step = '0;
  round_t rnd;
  logic last;

  group_addition dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic num_t rnd_num();
    num_t x;
    for (int i = 0; i < 9; i++) x = {x[W-33:0], $urandom()};
    return num_t'(wide_t'(x) % wide_t'(P256));
  endfunction

  initial begin
    num_t m, x1, y1, x2, y2, l, x3, y3, zi;
    m = P256;
    for (int n = 0; n < 6; n++) begin
      for (int i = 0; i < NREG; i++) regs[i] = rnd_num();
      regs[RG_ZERO] = '0;
      x1 = regs[RG_XP]; y1 = regs[RG_YP]; x2 = regs[RG_XQ]; y2 = regs[RG_YQ];
      l  = mulmod(submod(y2, y1, m), invmod(submod(x2, x1, m), m), m);
      x3 = submod(submod(mulmod(l, l, m), x1, m), x2, m);
      y3 = submod(mulmod(l, submod(x1, x3, m), m), y1, m);
      step = '0;
      forever begin
        #1;
        exec_round(rnd, m, 1'b0);
        if (last) break;
        step++;
      end
      zi = invmod(regs[RG_QZ], m);
      checks += 2;
      if (mulmod(regs[RG_QX], zi, m) != x3) begin failures++; $display("FAIL x3"); end
      if (mulmod(regs[RG_QY], zi, m) != y3) begin failures++; $display("FAIL y3"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
