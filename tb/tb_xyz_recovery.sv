// tb_xyz_recovery - executes the recovery program on the round interpreter
// (plain arithmetic modulo P-256's prime) for random inputs and compares
// (QX, QY, QZ) with
//   X' = 4 y_P x_P T_P^2 X1,  Z' = 4 y_P T_P^3,
//   Y' = x_P^3 [T_b + 2(T_P X1 + T_a)(X1 + T_P) - 2 X2 (X1 - T_P)^2];
// also checks that the program has 5 multiplication rounds.
module tb_xyz_recovery;
  import ecc_pkg::*;
  import tb_ecc_pkg::*;

  logic [3:0] step = '0;
  round_t rnd;
  logic last;

  xyz_recovery dut (.*);

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
    num_t m, x1, x2, tp, ta, tb, xp, yp, ex, ey, ez, t;
    int nmul;
    m = P256;
    for (int n = 0; n < 8; n++) begin
      for (int i = 0; i < NREG; i++) regs[i] = rnd_num();
      x1 = regs[RG_S0]; x2 = regs[RG_S1]; tp = regs[RG_TP]; ta = regs[RG_TA]; tb = regs[RG_TB];
      xp = regs[RG_XP]; yp = regs[RG_YP];
      ex = mulmod(mulmod(mulmod(4, yp, m), xp, m), mulmod(mulmod(tp, tp, m), x1, m), m);
      ez = mulmod(mulmod(4, yp, m), mulmod(tp, mulmod(tp, tp, m), m), m);
      t  = addmod(tb, mulmod(2, mulmod(addmod(mulmod(tp, x1, m), ta, m), addmod(x1, tp, m), m), m), m);
      t  = submod(t, mulmod(2, mulmod(x2, mulmod(submod(x1, tp, m), submod(x1, tp, m), m), m), m), m);
      ey = mulmod(mulmod(xp, mulmod(xp, xp, m), m), t, m);
      nmul = 0;
      step = '0;
      forever begin
        #1;
        for (int i = 0; i < NCORES; i++) if (rnd[i].op == OP_MUL) begin nmul++; break; end
        exec_round(rnd, m, 1'b0);
        if (last) break;
        step++;
      end
      checks += 4;
      if (regs[RG_QX] != ex) begin failures++; $display("FAIL X'"); end
      if (regs[RG_QY] != ey) begin failures++; $display("FAIL Y'"); end
      if (regs[RG_QZ] != ez) begin failures++; $display("FAIL Z'"); end
      if (nmul != 5) begin failures++; $display("FAIL %0d multiplication rounds", nmul); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
