// tb_round_exec - round_exec with a real memory_pool and qpp_pool.  The
// testbench fills the table for P-256's prime, loads random operands into
// the pool through the write port, runs rounds of three multiplications, of
// mixed operations, of a single operation with idle cores, and a round that
// overwrites its own source, and compares the pool contents with the round
// interpreter of tb_ecc_pkg (Montgomery semantics).  It also checks the
// zero flags (a - a) and the round lengths, counted from the cycle after
// the start pulse to the done pulse: 1 accept + 4 fetch + 1 start + wait
// (67 with a multiplication, 1 without) + 6 save + 1 = 80 or 14 cycles.
module tb_round_exec;
  import ecc_pkg::*;
  import tb_ecc_pkg::*;
  localparam int NW = 528, DW = 8;

  logic clk = 0, rst_n = 0, start = 0, done;
  round_t rnd = '0;
  logic [NCORES-1:0] zero_flags;
  num_t p = P256;
  logic [NCORES-1:0][DW-1:0] tbl_idx;
  logic [NCORES-1:0][NW+DW-1:0] tbl_data;
  addr_t mem_ra, mem_rb, mem_wa, wa;
  num_t mem_rda, mem_rdb, mem_wd, wd;
  logic mem_we, we;
  logic tb_we = 0;
  addr_t tb_wa = '0;
  num_t tb_wd = '0;
  logic t_we = 0;
  logic [DW-1:0] t_wa = '0;
  logic [NW+DW-1:0] t_wd = '0;

  round_exec #(.NW(NW), .DW(DW)) dut (.*);
  qpp_pool #(.NW(NW), .DW(DW), .NCORES(NCORES)) u_tbl (.clk(clk), .we(t_we), .waddr(t_wa), .wdata(t_wd), .raddr(tbl_idx), .rdata(tbl_data));
  assign we = mem_we | tb_we;
  assign wa = mem_we ? mem_wa : tb_wa;
  assign wd = mem_we ? mem_wd : tb_wd;
  memory_pool #(.NW(NW), .NREG(NREG)) u_pool (.clk(clk), .ra_addr(mem_ra), .rb_addr(mem_rb), .ra_data(mem_rda), .rb_data(mem_rdb), .we(we), .waddr(wa), .wdata(wd));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    #3_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_round(input round_t r, input int exp_cycles);
    int cyc;
    @(negedge clk);
    rnd = r; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin cyc++; @(negedge clk); end
    exec_round(r, p, 1'b1);
    for (int i = 0; i < NREG; i++) begin
      checks++;
      if (u_pool.mem[i] != regs[i]) begin failures++; $display("FAIL reg %0d", i); end
    end
    checks++;
    if (cyc != exp_cycles) begin failures++; $display("FAIL round took %0d cycles, expected %0d", cyc, exp_cycles); end
  endtask

  initial begin
    logic [DW-1:0] pinv;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 256; c++) if (DW'(p[DW-1:0] * DW'(c)) == 8'hff) pinv = DW'(c);
    for (int t = 0; t < 256; t++) begin
      @(negedge clk);
      t_we = 1; t_wa = DW'(t); t_wd = (NW+DW)'(DW'(t * pinv)) * (NW+DW)'(p);
    end
    @(negedge clk);
    t_we = 0;
    for (int i = 0; i < NREG; i++) begin
      num_t v;
      for (int j = 0; j < 9; j++) v = {v[NW-33:0], $urandom()};
      v = num_t'(wide_t'(v) % wide_t'(p));
      regs[i] = v;
      @(negedge clk);
      tb_we = 1; tb_wa = addr_t'(i); tb_wd = v;
    end
    @(negedge clk);
    tb_we = 0;
    // three multiplications
    run_round('{mk(OP_MUL, 6'd5, 6'd6, 6'd30), mk(OP_MUL, 6'd3, 6'd3, 6'd31), mk(OP_MUL, 6'd1, 6'd2, 6'd32)}, 80);
    // mixed, core 2 overwrites a register core 0 reads
    run_round('{mk(OP_SUB, 6'd7, 6'd30, 6'd10), mk(OP_ADD, 6'd31, 6'd32, 6'd33), mk(OP_MUL, 6'd10, 6'd11, 6'd34)}, 80);
    // additions only, one idle core
    run_round('{NOP, mk(OP_SUB, 6'd12, 6'd13, 6'd35), mk(OP_ADD, 6'd14, 6'd15, 6'd14)}, 14);
    // a - a: zero flag on core 0 only
    run_round('{NOP, mk(OP_ADD, 6'd20, 6'd21, 6'd36), mk(OP_SUB, 6'd22, 6'd22, 6'd37)}, 14);
    checks++;
    if (zero_flags != 3'b001) begin failures++; $display("FAIL zero flags %b", zero_flags); end
    // in-place multiplications on all cores
    run_round('{mk(OP_MUL, 6'd40, 6'd41, 6'd40), mk(OP_MUL, 6'd41, 6'd40, 6'd41), mk(OP_MUL, 6'd42, 6'd42, 6'd42)}, 80);
    checks++;
    if (zero_flags != 3'b000) begin failures++; $display("FAIL zero flags %b", zero_flags); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
