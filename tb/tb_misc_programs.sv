// tb_misc_programs - executes each helper program on the round interpreter
// with Montgomery semantics (MUL = a*b*2^-528 mod p, p = P-256's prime) and
// checks what it must produce: MONE = R mod p, inputs times R, 4b, the
// ladder start (S0/Z = x(G), S1/Z = x(2G), T_P = x Z, T_a = a Z^2,
// T_b = 4b Z^3 with Z = 4y^2), conversion out, and OPA*OPB, OPA+OPB,
// OPA-OPB.
module tb_misc_programs;
  import ecc_pkg::*;
  import tb_ecc_pkg::*;

  misc_prog_e prog = PG_MONE;
  logic [3:0] step = '0;
  round_t rnd;
  logic last;

  misc_programs dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  num_t m, r, ri;

  task automatic run(input misc_prog_e pg);
    prog <= pg;
    step <= '0;
    forever begin
      #1;
      exec_round(rnd, m, 1'b1);
      if (last) break;
      step <= step + 1'b1;
    end
  endtask

  task automatic ck(input num_t got, input num_t exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic num_t tom(input num_t x);   // into Montgomery form
    return mulmod(x, r, m);
  endfunction

  initial begin
    num_t x2, y2, z, a, b, oa, ob;
    m = P256;
    r = rmod(m);
    ri = invmod(r, m);
    regs[RG_ZERO] = '0; regs[RG_ONE] = 1; regs[RG_R2] = mulmod(r, r, m);
    run(PG_MONE);
    ck(regs[RG_MONE], r, "MONE");

    regs[RG_XP] = GX256; regs[RG_YP] = GY256; regs[RG_A] = A256; regs[RG_B] = B256;
    run(PG_TOMONT_PT);
    ck(regs[RG_XP], tom(GX256), "XP to Montgomery");
    ck(regs[RG_YP], tom(GY256), "YP to Montgomery");
    ck(regs[RG_A], tom(A256), "A to Montgomery");
    ck(regs[RG_B], tom(B256), "B to Montgomery");
    ck(regs[RG_B4], tom(mulmod(4, B256, m)), "4B");

    run(PG_LADDER_INIT);
    aff_add(GX256, GY256, GX256, GY256, A256, m, x2, y2);
    z = mulmod(4, mulmod(GY256, GY256, m), m);
    ck(mulmod(regs[RG_S0], ri, m), mulmod(GX256, z, m), "S0 = x Z");
    ck(mulmod(regs[RG_S1], ri, m), mulmod(x2, z, m), "S1 = x(2P) Z");
    ck(mulmod(regs[RG_TP], ri, m), mulmod(GX256, z, m), "T_P");
    ck(mulmod(regs[RG_TA], ri, m), mulmod(A256, mulmod(z, z, m), m), "T_a");
    ck(mulmod(regs[RG_TB], ri, m), mulmod(mulmod(4, B256, m), mulmod(z, mulmod(z, z, m), m), m), "T_b");

    regs[RG_XP] = 11; regs[RG_YP] = 22; regs[RG_XQ] = 33; regs[RG_YQ] = 44;
    run(PG_TOMONT_PQ);
    ck(regs[RG_XP], tom(11), "XP"); ck(regs[RG_YP], tom(22), "YP");
    ck(regs[RG_XQ], tom(33), "XQ"); ck(regs[RG_YQ], tom(44), "YQ");

    regs[RG_QX] = tom(123); regs[RG_QY] = tom(456); regs[RG_QZ] = tom(789);
    run(PG_FROMMONT_Q);
    ck(regs[RG_QX], 123, "QX out"); ck(regs[RG_QY], 456, "QY out"); ck(regs[RG_QZ], 789, "QZ out");

    oa = GX256; ob = GY256;
    regs[RG_OPA] = oa; regs[RG_OPB] = ob;
    run(PG_MODMUL);  ck(regs[RG_RES], mulmod(oa, ob, m), "MODMUL");
    run(PG_MODADD);  ck(regs[RG_RES], addmod(oa, ob, m), "MODADD");
    run(PG_MODSUB);  ck(regs[RG_RES], submod(oa, ob, m), "MODSUB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
