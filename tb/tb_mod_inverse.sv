// tb_mod_inverse - runs the inverse sequencer against a model executor that
// executes each issued round on the round interpreter (Montgomery
// semantics) a few cycles later.  For P-256's prime and group order and
// several operands, RES * OPA must be 1; the sequencer must issue exactly
// NW + 2 rounds, and each ladder round must compute one product and one
// square on cores 0 and 1.
module tb_mod_inverse;
  import ecc_pkg::*;
  import tb_ecc_pkg::*;
  localparam int NW = 528;

  logic clk = 0, rst_n = 0, start = 0, issue, rdone = 0, busy, done;
  num_t p = P256;
  round_t rnd;

  mod_inverse #(.NW(NW)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, nrounds = 0, badshape = 0;

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model executor
  always @(posedge clk) begin
    rdone <= 1'b0;
    if (issue) begin
      nrounds++;
      if (nrounds > 1 && nrounds < NW + 2)
        if (rnd[0].op != OP_MUL || rnd[1].op != OP_MUL || rnd[2].op != OP_NOP ||
            rnd[1].a != rnd[1].b || rnd[0].a == rnd[0].b) badshape++;
      exec_round(rnd, p, 1'b1);
      repeat (3) @(posedge clk);
      rdone <= 1'b1;
    end
  end

  initial begin
    num_t r, x;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4; n++) begin
      p = n[1] ? N256 : P256;
      r = rmod(p);
      regs[RG_ZERO] = '0; regs[RG_ONE] = 1; regs[RG_R2] = mulmod(r, r, p); regs[RG_MONE] = r;
      x = (n == 0) ? num_t'(1) : num_t'(wide_t'({$urandom(), $urandom(), $urandom(), $urandom(), $urandom()}) % wide_t'(p));
      if (n == 3) x = p - 1;
      regs[RG_OPA] = x;
      nrounds = 0; badshape = 0;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      checks += 3;
      if (mulmod(regs[RG_RES], x, p) != 1) begin failures++; $display("FAIL inverse %0d", n); end
      if (nrounds != NW + 2) begin failures++; $display("FAIL %0d rounds", nrounds); end
      if (badshape != 0) begin failures++; $display("FAIL ladder round shape"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
