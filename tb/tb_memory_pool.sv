// tb_memory_pool - random writes and reads of the 2R1W pool: both read
// ports return the word written earlier, one cycle after the address, and a
// read of the address being written returns the old word.
module tb_memory_pool;
  localparam int NW = 528, NREG = 64, AW = 6;

  logic clk = 0, we = 0;
  logic [AW-1:0] ra_addr = '0, rb_addr = '0, waddr = '0;
  logic [NW-1:0] ra_data, rb_data, wdata = '0;
  logic [NW-1:0] ref_mem [NREG];
  logic [NREG-1:0] valid = '0;

  memory_pool #(.NW(NW), .NREG(NREG)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NW-1:0] ea, eb;
    logic va, vb;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      we = ($urandom_range(0, 1) == 1) || n < 64;
      waddr = (n < 64) ? AW'(n) : AW'($urandom_range(0, NREG-1));
      for (int i = 0; i < NW/32 + 1; i++) wdata = {wdata[NW-33:0], $urandom()};
      ra_addr = AW'($urandom_range(0, NREG-1));
      rb_addr = ($urandom_range(0, 3) == 0) ? waddr : AW'($urandom_range(0, NREG-1));
      ea = ref_mem[ra_addr]; va = valid[ra_addr];
      eb = ref_mem[rb_addr]; vb = valid[rb_addr];
      @(posedge clk);
      if (we) begin ref_mem[waddr] = wdata; valid[waddr] = 1'b1; end
      #1;
      if (va) begin
        checks++;
        if (ra_data != ea) begin failures++; $display("FAIL port A at %0d", n); end
      end
      if (vb) begin
        checks++;
        if (rb_data != eb) begin failures++; $display("FAIL port B at %0d", n); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
