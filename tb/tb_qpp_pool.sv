// tb_qpp_pool - writes all 256 entries of the table with random words and
// reads them back through the three read ports at independent random
// indices, comparing with a copy kept by the testbench.
module tb_qpp_pool;
  localparam int NW = 528, DW = 8, NC = 3;

  logic clk = 0, we = 0;
  logic [DW-1:0] waddr = '0;
  logic [NW+DW-1:0] wdata = '0;
  logic [NC-1:0][DW-1:0] raddr = '0;
  logic [NC-1:0][NW+DW-1:0] rdata;
  logic [NW+DW-1:0] ref_mem [256];

  qpp_pool #(.NW(NW), .DW(DW), .NCORES(NC)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 256; t++) begin
      logic [NW+DW-1:0] v;
      for (int i = 0; i < (NW+DW)/32 + 1; i++) v = {v[NW+DW-33:0], $urandom()};
      ref_mem[t] = v;
      @(negedge clk);
      we = 1; waddr = DW'(t); wdata = v;
    end
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 300; n++) begin
      for (int c = 0; c < NC; c++) raddr[c] = DW'($urandom_range(0, 255));
      #1;
      for (int c = 0; c < NC; c++) begin
        checks++;
        if (rdata[c] != ref_mem[raddr[c]]) begin
          failures++;
          $display("FAIL port %0d index %0d", c, raddr[c]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
