// memory_pool - the big-integer register file of the engine: a block memory
// with two read ports and one write port (2R1W).
//
// Every operand, constant, ladder variable, temporary and result lives here
// as an NW-bit word at a fixed address (see ecc_pkg).  The two read ports
// deliver both operands of one core per cycle; reads are registered (data
// appears the cycle after the address), as in a block RAM.  The contents are
// not reset: the controller writes the constants at setup and the host
// writes the inputs before a command.  Read-during-write to the same address
// returns the old word.
module memory_pool #(
  parameter int NW     = 528,
  parameter int NREG   = 64,
  parameter int ADDR_W = $clog2(NREG)
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] ra_addr,
  input  logic [ADDR_W-1:0] rb_addr,
  output logic [NW-1:0]     ra_data,
  output logic [NW-1:0]     rb_data,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [NW-1:0]     wdata
);

  logic [NW-1:0] mem [NREG];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    ra_data <= mem[ra_addr];
    rb_data <= mem[rb_addr];
  end

endmodule
