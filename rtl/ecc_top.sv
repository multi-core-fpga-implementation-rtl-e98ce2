// ecc_top - multi-core elliptic-curve engine for short Weierstrass curves
// y^2 = x^3 + a*x + b over any prime field of up to NW bits, using the Co-Z
// Montgomery ladder with three Montgomery multiplication cores.
//
// Structure:
//   memory_pool     2R1W block memory of NREG big integers (ecc_pkg map)
//   round_exec      three mont_core cores, the MUX that fetches their
//                   operands, the deMUX that saves their results, and a zero
//                   comparator on each core's output bus
//   qpp_pool        table of ((t*p') mod 256)*P, read by every core
//   setup_unit      modulus register, p', table fill, R^2 mod P
//   ecc_controller  command FSM with the programs (ladder step, recovery,
//                   group addition, element check, inverse, helpers)
// The pool's write port is shared: the host writes when the engine is idle,
// the controller writes constants during setup, round_exec saves results
// during rounds.  The host reads through read port A when the engine is idle
// (host_rdata is valid the cycle after host_raddr).
//
// Use: write the modulus on `modulus` and issue CMD_SETUP; write XP, YP, A,
// B (plain integers below the modulus); put k on `scalar` and its length on
// `kbits` (bit kbits-1 set) and issue CMD_SCALAR_MUL; read QX, QY, QZ, the
// homogeneous coordinates of k*P (x = QX/QZ, y = QY/QZ).  Commands overwrite
// their input registers with Montgomery-domain values, so inputs must be
// written again before the next command.  The design's system has exactly
// these parts around one multi-core datapath; widths, the register map and
// the command interface are this design's own.
// The assertions at the end are disabled while rst_n is low, so lint notes
// that rst_n is used both as an asynchronous reset and in a clocked context;
// that use is in checking code only.
module ecc_top
  import ecc_pkg::*;
#(
  parameter int NW = 528,
  parameter int DW = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cmd_valid,
  input  cmd_e                     cmd,
  input  logic [NW-1:0]            modulus,
  input  logic [NW-1:0]            scalar,
  input  logic [$clog2(NW+1)-1:0]  kbits,
  input  logic                     host_we,
  input  addr_t                    host_waddr,
  input  logic [NW-1:0]            host_wdata,
  input  addr_t                    host_raddr,
  output logic [NW-1:0]            host_rdata,
  output logic                     busy,
  output logic                     done,
  output logic                     error,
  output logic [NCORES-1:0]        zero_flags
);

  logic [NW-1:0]                  p, r2;
  logic                           setup_start, setup_done, setup_busy;
  logic                           tbl_we;
  logic [DW-1:0]                  tbl_waddr;
  logic [NW+DW-1:0]               tbl_wdata;
  logic [NCORES-1:0][DW-1:0]      tbl_idx;
  logic [NCORES-1:0][NW+DW-1:0]   tbl_data;

  logic                           exec_start, exec_done;
  round_t                         exec_rnd;
  addr_t                          x_ra, x_rb, x_wa;
  logic                           x_we;
  logic [NW-1:0]                  x_wd;

  logic                           cw_we;
  addr_t                          cw_addr;
  logic [NW-1:0]                  cw_data;

  addr_t                          m_ra, m_wa;
  logic                           m_we;
  logic [NW-1:0]                  m_wd, m_rda, m_rdb;

  setup_unit #(.NW(NW), .DW(DW)) u_setup (
    .clk(clk), .rst_n(rst_n), .start(setup_start), .modulus(modulus), .p(p),
    .tbl_we(tbl_we), .tbl_waddr(tbl_waddr), .tbl_wdata(tbl_wdata),
    .r2(r2), .busy(setup_busy), .done(setup_done)
  );

  qpp_pool #(.NW(NW), .DW(DW), .NCORES(NCORES)) u_qpp (
    .clk(clk), .we(tbl_we), .waddr(tbl_waddr), .wdata(tbl_wdata),
    .raddr(tbl_idx), .rdata(tbl_data)
  );

  round_exec #(.NW(NW), .DW(DW)) u_exec (
    .clk(clk), .rst_n(rst_n), .start(exec_start), .rnd(exec_rnd), .done(exec_done),
    .zero_flags(zero_flags), .p(p), .tbl_idx(tbl_idx), .tbl_data(tbl_data),
    .mem_ra(x_ra), .mem_rb(x_rb), .mem_rda(m_rda), .mem_rdb(m_rdb),
    .mem_we(x_we), .mem_wa(x_wa), .mem_wd(x_wd)
  );

  ecc_controller #(.NW(NW)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .cmd_valid(cmd_valid), .cmd(cmd),
    .scalar(scalar), .kbits(kbits), .p(p),
    .setup_start(setup_start), .setup_done(setup_done), .r2(r2),
    .exec_start(exec_start), .exec_rnd(exec_rnd), .exec_done(exec_done),
    .check_zero(zero_flags[0]),
    .cw_we(cw_we), .cw_addr(cw_addr), .cw_data(cw_data),
    .busy(busy), .done(done), .error(error)
  );

  // Pool port sharing: host when idle, controller constants, executor saves.
  always_comb begin
    m_ra = busy ? x_ra : host_raddr;
    if (cw_we) begin
      m_we = 1'b1;  m_wa = cw_addr;    m_wd = cw_data;
    end else if (x_we) begin
      m_we = 1'b1;  m_wa = x_wa;       m_wd = x_wd;
    end else begin
      m_we = host_we && !busy;  m_wa = host_waddr;  m_wd = host_wdata;
    end
  end

  memory_pool #(.NW(NW), .NREG(NREG), .ADDR_W(ADDR_W)) u_pool (
    .clk(clk), .ra_addr(m_ra), .rb_addr(x_rb), .ra_data(m_rda), .rb_data(m_rdb),
    .we(m_we), .waddr(m_wa), .wdata(m_wd)
  );

  assign host_rdata = m_rda;

  // The executor and the controller's constant writes never overlap, and no
  // round runs while the setup unit rewrites the modulus and the table.
  assert property (@(posedge clk) disable iff (!rst_n) !(cw_we && x_we));
  assert property (@(posedge clk) disable iff (!rst_n) !(setup_busy && exec_start));

endmodule
