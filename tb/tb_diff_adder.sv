// tb_diff_adder - executes the ladder-step program on the round interpreter
// (plain arithmetic modulo P-256's prime) for random ladder states and both
// scalar-bit values, and compares the new (X1, X2, T_P, T_a, T_b) with the
// co-Z differential addition-and-doubling formulas evaluated directly.  It
// also checks the shape of the schedule: 11 rounds, of which 5 hold
// multiplications, each of those using all three cores.
module tb_diff_adder;
  import ecc_pkg::*;
  import tb_ecc_pkg::*;

  logic [3:0] step = '0;
  logic kbit = 0;
  round_t rnd;
  logic last;

  diff_adder dut (.*);

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

  task automatic ck(input num_t got, input num_t exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s (kbit %0d)", what, kbit); end
  endtask

  initial begin
    num_t m, x1, x2, tp, ta, tb, u, v, w, e1, e2;
    int nrounds, nmul;
    m = P256;
    for (int t = 0; t < 8; t++) begin
      kbit = t[0];
      for (int i = 0; i < NREG; i++) regs[i] = rnd_num();
      x1 = kbit ? regs[RG_S0] : regs[RG_S1];
      x2 = kbit ? regs[RG_S1] : regs[RG_S0];
      tp = regs[RG_TP]; ta = regs[RG_TA]; tb = regs[RG_TB];
      u = mulmod(submod(x1, x2, m), submod(x1, x2, m), m);
      v = addmod(mulmod(mulmod(4, x2, m), addmod(mulmod(x2, x2, m), ta, m), m), tb, m);
      w = mulmod(u, v, m);
      e1 = submod(mulmod(v, addmod(mulmod(addmod(x1, x2, m),
                  addmod(submod(addmod(mulmod(x1, x1, m), mulmod(x2, x2, m), m), u, m), mulmod(2, ta, m), m), m), tb, m), m),
                  mulmod(tp, w, m), m);
      e2 = mulmod(u, submod(mulmod(submod(mulmod(x2, x2, m), ta, m), submod(mulmod(x2, x2, m), ta, m), m),
                            mulmod(mulmod(2, x2, m), tb, m), m), m);
      nrounds = 0; nmul = 0;
      step = '0;
      forever begin
        int k;
        #1;
        k = 0;
        for (int i = 0; i < NCORES; i++) if (rnd[i].op == OP_MUL) k++;
        if (k > 0) begin
          nmul++;
          checks++;
          if (k != NCORES) begin failures++; $display("FAIL multiplication round %0d leaves a core idle", step); end
        end
        exec_round(rnd, m, 1'b0);
        nrounds++;
        if (last) break;
        step++;
      end
      ck(kbit ? regs[RG_S0] : regs[RG_S1], e1, "X1'");
      ck(kbit ? regs[RG_S1] : regs[RG_S0], e2, "X2'");
      ck(regs[RG_TP], mulmod(tp, w, m), "T_P'");
      ck(regs[RG_TA], mulmod(ta, mulmod(w, w, m), m), "T_a'");
      ck(regs[RG_TB], mulmod(tb, mulmod(w, mulmod(w, w, m), m), m), "T_b'");
      checks++;
      if (nrounds != 11 || nmul != 5) begin failures++; $display("FAIL %0d rounds, %0d with multiplications", nrounds, nmul); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
