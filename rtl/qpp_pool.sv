// qpp_pool - table of the Montgomery reduction multiples, one read port per
// core.
//
// Entry t holds ((t * p') mod d) * P, with d = 2^DW and p' = -P^-1 mod d, so
// a Montgomery core that has formed the low digit q of its accumulator reads
// the multiple of P that clears that digit, instead of computing it with a
// second multiplier.  The table has d = 256 entries of NW+DW bits.  It is
// written once per modulus by setup_unit through the single write port and
// read by every core every cycle.  Reads are combinational (the index is
// formed in the same cycle as the lookup), so the array maps to distributed
// memory; each read port is an independent copy of the same contents on an
// FPGA.  Keeping one table shared by all cores is this design's choice.
module qpp_pool #(
  parameter int NW     = 528,
  parameter int DW     = 8,
  parameter int NCORES = 3
) (
  input  logic                          clk,
  input  logic                          we,
  input  logic [DW-1:0]                 waddr,
  input  logic [NW+DW-1:0]              wdata,
  input  logic [NCORES-1:0][DW-1:0]     raddr,
  output logic [NCORES-1:0][NW+DW-1:0]  rdata
);

  logic [NW+DW-1:0] mem [2**DW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_comb begin
    for (int i = 0; i < NCORES; i++) rdata[i] = mem[raddr[i]];
  end

endmodule
