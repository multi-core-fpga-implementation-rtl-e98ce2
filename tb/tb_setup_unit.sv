// tb_setup_unit - runs the setup for P-256's prime and for a random odd
// 528-bit modulus.  Every table write is captured and compared with
// ((t*p') mod 256)*P, p' found here by exhaustive search; R^2 mod P is
// compared with 2^1056 mod P from wide division; the run must take
// 256 + 2*528 + 1 cycles from start to done.
module tb_setup_unit;
  import tb_ecc_pkg::*;
  localparam int NW = 528, DW = 8;

  logic clk = 0, rst_n = 0, start = 0;
  num_t modulus = '0, p, r2;
  logic tbl_we, busy, done;
  logic [DW-1:0] tbl_waddr;
  logic [NW+DW-1:0] tbl_wdata;
  logic [NW+DW-1:0] got [256];
  bit   seen [256];

  setup_unit #(.NW(NW), .DW(DW)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  always @(posedge clk) if (tbl_we) begin
    got[tbl_waddr] <= tbl_wdata;
    seen[tbl_waddr] <= 1'b1;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    logic [DW-1:0] pinv;
    wide_t e;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      if (pass == 0) modulus = P256;
      else begin
        for (int i = 0; i < NW/32 + 1; i++) modulus = {modulus[NW-33:0], $urandom()};
        modulus[0] = 1'b1;
        modulus[NW-1] = 1'b1;
      end
      for (int t = 0; t < 256; t++) seen[t] = 0;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin
        cyc++;
        @(negedge clk);
      end
      for (int c = 0; c < 256; c++) if (DW'(modulus[DW-1:0] * DW'(c)) == 8'hff) pinv = DW'(c);
      checks++;
      if (p != modulus) begin failures++; $display("FAIL modulus register"); end
      for (int t = 0; t < 256; t++) begin
        checks++;
        if (!seen[t] || got[t] != (NW+DW)'(DW'(t * pinv)) * (NW+DW)'(modulus)) begin
          failures++;
          $display("FAIL table entry %0d", t);
        end
      end
      e = (wide_t'(1) << (2*NW)) % wide_t'(modulus);
      checks++;
      if (r2 != num_t'(e)) begin failures++; $display("FAIL r2"); end
      checks++;
      if (cyc != 256 + 2*NW + 1) begin failures++; $display("FAIL setup took %0d cycles", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
