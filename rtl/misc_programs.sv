// misc_programs - the short programs that surround the main operations:
// conversion into and out of the Montgomery domain, the ladder start, and
// single modular operations on OPA/OPB.
//
//   PG_MONE        MONE = MM(R2, 1) = R mod P
//   PG_TOMONT_PT   XP, YP, A, B times R2 (into the Montgomery domain), 4b
//   PG_TOMONT_PQ   XP, YP, XQ, YQ into the Montgomery domain
//   PG_LADDER_INIT ladder start R0 = P, R1 = 2P in co-Z form:
//                    Z = 4*y^2, S0 = x*Z, S1 = (x^2 - a)^2 - 8*b*x,
//                    T_P = x*Z, T_a = a*Z^2, T_b = 4b*Z^3
//                  (x(2P) = ((x^2-a)^2 - 8bx) / (4y^2) for a point on the
//                  curve), 6 rounds
//   PG_FROMMONT_Q  QX, QY, QZ times plain 1 (out of the Montgomery domain)
//   PG_MODMUL      RES = MM(MM(OPA, R2), OPB) = OPA*OPB mod P
//   PG_MODADD      RES = OPA + OPB mod P
//   PG_MODSUB      RES = OPA - OPB mod P
// The design lists these functions (modular multiplication, addition and
// subtraction, scalar multiplication from P) but gives no sequences for
// them; the sequences, and starting the ladder from (P, 2P), are this
// design's choices.
// Interface: combinational ROM; prog and step select the round, last marks
// the final step of the selected program.
module misc_programs
  import ecc_pkg::*;
(
  input  misc_prog_e prog,
  input  logic [3:0] step,
  output round_t     rnd,
  output logic       last
);

  always_comb begin
    rnd  = '{NOP, NOP, NOP};
    last = 1'b1;
    unique case (prog)
      PG_MONE: rnd = '{NOP, NOP, mk(OP_MUL, RG_R2, RG_ONE, RG_MONE)};
      PG_TOMONT_PT: begin
        last = (step == 4'd3);
        unique case (step)
          4'd0: rnd = '{mk(OP_MUL, RG_A, RG_R2, RG_A), mk(OP_MUL, RG_YP, RG_R2, RG_YP), mk(OP_MUL, RG_XP, RG_R2, RG_XP)};
          4'd1: rnd = '{NOP, NOP, mk(OP_MUL, RG_B, RG_R2, RG_B)};
          4'd2: rnd = '{NOP, NOP, mk(OP_ADD, RG_B, RG_B, RG_B4)};
          4'd3: rnd = '{NOP, NOP, mk(OP_ADD, RG_B4, RG_B4, RG_B4)};
          default: ;
        endcase
      end
      PG_TOMONT_PQ: begin
        last = (step == 4'd1);
        unique case (step)
          4'd0: rnd = '{mk(OP_MUL, RG_XQ, RG_R2, RG_XQ), mk(OP_MUL, RG_YP, RG_R2, RG_YP), mk(OP_MUL, RG_XP, RG_R2, RG_XP)};
          4'd1: rnd = '{NOP, NOP, mk(OP_MUL, RG_YQ, RG_R2, RG_YQ)};
          default: ;
        endcase
      end
      PG_LADDER_INIT: begin
        last = (step == 4'd5);
        unique case (step)
          4'd0: rnd = '{mk(OP_MUL, RG_B4, RG_XP, tmp(2)), mk(OP_MUL, RG_YP, RG_YP, tmp(1)), mk(OP_MUL, RG_XP, RG_XP, tmp(0))};
          4'd1: rnd = '{mk(OP_ADD, tmp(2), tmp(2), tmp(2)), mk(OP_ADD, tmp(1), tmp(1), tmp(1)), mk(OP_SUB, tmp(0), RG_A, tmp(0))};
          4'd2: rnd = '{NOP, NOP, mk(OP_ADD, tmp(1), tmp(1), tmp(1))};
          4'd3: rnd = '{mk(OP_MUL, tmp(1), tmp(1), tmp(3)), mk(OP_MUL, RG_XP, tmp(1), RG_S0), mk(OP_MUL, tmp(0), tmp(0), tmp(0))};
          4'd4: rnd = '{mk(OP_MUL, RG_B4, tmp(1), tmp(4)), mk(OP_MUL, RG_A, tmp(3), RG_TA), mk(OP_SUB, tmp(0), tmp(2), RG_S1)};
          4'd5: rnd = '{NOP, mk(OP_MUL, RG_XP, tmp(1), RG_TP), mk(OP_MUL, tmp(4), tmp(3), RG_TB)};
          default: ;
        endcase
      end
      PG_FROMMONT_Q: rnd = '{mk(OP_MUL, RG_QZ, RG_ONE, RG_QZ), mk(OP_MUL, RG_QY, RG_ONE, RG_QY), mk(OP_MUL, RG_QX, RG_ONE, RG_QX)};
      PG_MODMUL: begin
        last = (step == 4'd1);
        unique case (step)
          4'd0: rnd = '{NOP, NOP, mk(OP_MUL, RG_OPA, RG_R2, tmp(0))};
          4'd1: rnd = '{NOP, NOP, mk(OP_MUL, tmp(0), RG_OPB, RG_RES)};
          default: ;
        endcase
      end
      PG_MODADD: rnd = '{NOP, NOP, mk(OP_ADD, RG_OPA, RG_OPB, RG_RES)};
      PG_MODSUB: rnd = '{NOP, NOP, mk(OP_SUB, RG_OPA, RG_OPB, RG_RES)};
      default: ;
    endcase
  end

endmodule
