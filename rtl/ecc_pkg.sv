// ecc_pkg - types and constants shared by the multi-core Co-Z ECC engine.
//
// The engine works in "rounds": in one round each of the NCORES Montgomery
// cores performs one operation (a modular multiplication, addition or
// subtraction) on two big integers read from the memory pool and writes one
// big integer back.  A round is described by round_t, one slot_t per core.
// The schedules (programs) for the ladder step, the coordinate recovery,
// group addition, the element check and the small helper programs are lists
// of such rounds.  All reads of a round happen before any write of the same
// round, so a round may overwrite a register that it also reads.
//
// The register map below fixes where the host places inputs and finds
// results in the memory pool.  Values are plain integers modulo the loaded
// modulus when the host writes or reads them; the programs convert to and
// from the Montgomery domain themselves.
package ecc_pkg;

  // Number of Montgomery cores.  The schedules in this design are written
  // for three cores, the configuration the design recommends.
  localparam int NCORES = 3;

  // Memory pool geometry.
  localparam int ADDR_W = 6;
  localparam int NREG   = 64;

  typedef logic [ADDR_W-1:0] addr_t;

  typedef enum logic [1:0] {
    OP_NOP = 2'd0,
    OP_MUL = 2'd1,   // Montgomery product A*B*R^-1 mod P
    OP_ADD = 2'd2,   // A+B mod P
    OP_SUB = 2'd3    // A-B mod P
  } op_e;

  typedef struct packed {
    op_e   op;
    addr_t a;
    addr_t b;
    addr_t d;
  } slot_t;

  typedef slot_t [NCORES-1:0] round_t;

  // ---------------------------------------------------------------- registers
  // Constants written by the controller at setup.
  localparam addr_t RG_ZERO = 6'd0;   // 0
  localparam addr_t RG_ONE  = 6'd1;   // plain 1 (for conversion out of Montgomery domain)
  localparam addr_t RG_R2   = 6'd2;   // R^2 mod P, R = 2^NW
  localparam addr_t RG_MONE = 6'd3;   // R mod P (Montgomery form of 1)
  // Host inputs.
  localparam addr_t RG_XP   = 6'd4;   // x of base point P
  localparam addr_t RG_YP   = 6'd5;   // y of base point P
  localparam addr_t RG_A    = 6'd6;   // curve a
  localparam addr_t RG_B    = 6'd7;   // curve b
  localparam addr_t RG_B4   = 6'd8;   // 4b (computed)
  localparam addr_t RG_XQ   = 6'd9;   // x of second point (group addition)
  localparam addr_t RG_YQ   = 6'd10;  // y of second point (group addition)
  // Co-Z ladder state.
  localparam addr_t RG_S0   = 6'd11;  // X of ladder register R0
  localparam addr_t RG_S1   = 6'd12;  // X of ladder register R1
  localparam addr_t RG_TP   = 6'd13;  // T_P = x_P * Z
  localparam addr_t RG_TA   = 6'd14;  // T_a = a * Z^2
  localparam addr_t RG_TB   = 6'd15;  // T_b = 4b * Z^3
  // Point results (homogeneous projective, plain integers after a command).
  localparam addr_t RG_QX   = 6'd16;
  localparam addr_t RG_QY   = 6'd17;
  localparam addr_t RG_QZ   = 6'd18;
  // Modular arithmetic operands and result.
  localparam addr_t RG_OPA  = 6'd19;
  localparam addr_t RG_OPB  = 6'd20;
  localparam addr_t RG_RES  = 6'd21;
  // Exponent-ladder registers of the modular inverse.
  localparam addr_t RG_E0   = 6'd22;
  localparam addr_t RG_E1   = 6'd23;
  // Temporaries T0..T31 start here.
  localparam addr_t RG_TMP  = 6'd24;

  function automatic addr_t tmp(input int i);
    return addr_t'(int'(RG_TMP) + i);
  endfunction

  function automatic slot_t mk(input op_e op, input addr_t a, input addr_t b, input addr_t d);
    slot_t s;
    s.op = op;
    s.a  = a;
    s.b  = b;
    s.d  = d;
    return s;
  endfunction

  localparam slot_t NOP = '{op: OP_NOP, a: '0, b: '0, d: '0};

  // --------------------------------------------------------------- commands
  typedef enum logic [2:0] {
    CMD_SETUP      = 3'd0,  // load modulus, build table, write constants
    CMD_SCALAR_MUL = 3'd1,  // (QX,QY,QZ) = k * (XP,YP) on y^2 = x^3 + A x + B
    CMD_POINT_ADD  = 3'd2,  // (QX,QY,QZ) = (XP,YP) + (XQ,YQ)
    CMD_CHECK      = 3'd3,  // error = (XP,YP) not on the curve
    CMD_MOD_MUL    = 3'd4,  // RES = OPA * OPB mod P
    CMD_MOD_ADD    = 3'd5,  // RES = OPA + OPB mod P
    CMD_MOD_SUB    = 3'd6,  // RES = OPA - OPB mod P
    CMD_MOD_INV    = 3'd7   // RES = OPA^-1 mod P
  } cmd_e;

  // Helper programs held in misc_programs.
  typedef enum logic [3:0] {
    PG_MONE       = 4'd0,
    PG_TOMONT_PT  = 4'd1,
    PG_TOMONT_PQ  = 4'd2,
    PG_LADDER_INIT= 4'd3,
    PG_FROMMONT_Q = 4'd4,
    PG_MODMUL     = 4'd5,
    PG_MODADD     = 4'd6,
    PG_MODSUB     = 4'd7
  } misc_prog_e;

endpackage
