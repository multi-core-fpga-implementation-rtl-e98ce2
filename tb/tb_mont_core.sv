// tb_mont_core - self-checking test of one Montgomery core at NW = 528.
// The testbench plays the table: it finds p' = -P^-1 mod 256 by search and
// answers each index q with ((q*p') mod 256)*P.  Random operands below P are
// multiplied (checked through result*2^528 = A*B mod P), added and
// subtracted, for P-256's prime and for a random odd 528-bit modulus; every
// multiplication must take exactly NW/8 = 66 cycles.
module tb_mont_core;
  import ecc_pkg::*;
  import tb_ecc_pkg::*;

  localparam int NW = 528, DW = 8;

  logic clk = 0, rst_n = 0, start = 0, busy;
  op_e  op = OP_NOP;
  num_t a = '0, b = '0, p = '0, result;
  logic [DW-1:0] tbl_idx;
  logic [NW+DW-1:0] tbl_data;
  logic [DW-1:0] pinv;

  mont_core #(.NW(NW), .DW(DW)) dut (.*);

  always #5 clk = ~clk;
  always_comb tbl_data = (NW+DW)'(DW'(tbl_idx * pinv)) * (NW+DW)'(p);

  int checks = 0, failures = 0;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic num_t rnd_below(input num_t m);
    num_t x;
    for (int i = 0; i < NW/32 + 1; i++) x = {x[NW-33:0], $urandom()};
    return num_t'((wide_t'(x)) % wide_t'(m));
  endfunction

  task automatic do_op(input op_e o, input num_t x, input num_t y, output num_t r, output int cycles);
    @(negedge clk);
    op = o; a = x; b = y; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (busy) begin
      cycles++;
      @(negedge clk);
    end
    r = result;
  endtask

  initial begin
    num_t x, y, r;
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      if (pass == 0) p = P256;
      else begin
        for (int i = 0; i < NW/32 + 1; i++) p = {p[NW-33:0], $urandom()};
        p[NW-1] = 1'b1;
        p[0] = 1'b1;
      end
      // p' by exhaustive search: p0 * p' = -1 mod 256
      for (int c = 0; c < 256; c++) if (DW'(p[DW-1:0] * DW'(c)) == 8'hff) pinv = DW'(c);
      for (int t = 0; t < 12; t++) begin
        x = rnd_below(p);
        y = rnd_below(p);
        if (t == 0) y = p - 1;
        do_op(OP_MUL, x, y, r, cyc);
        checks++;
        if (mulmod(r, rmod(p), p) != mulmod(x, y, p) || r >= p) begin
          failures++;
          $display("FAIL mul pass %0d t %0d", pass, t);
        end
        checks++;
        if (cyc != NW/DW) begin
          failures++;
          $display("FAIL mul took %0d cycles", cyc);
        end
        do_op(OP_ADD, x, y, r, cyc);
        checks++;
        if (r != addmod(x, y, p)) begin failures++; $display("FAIL add"); end
        do_op(OP_SUB, x, y, r, cyc);
        checks++;
        if (r != submod(x, y, p)) begin failures++; $display("FAIL sub"); end
        do_op(OP_SUB, y, x, r, cyc);
        checks++;
        if (r != submod(y, x, p)) begin failures++; $display("FAIL sub2"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
