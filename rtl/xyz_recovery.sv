// xyz_recovery - recovers the full projective point (X', Y', Z') of the
// ladder result R0 = k*P from the final ladder state (S0, S1, T_P, T_a, T_b)
// and the affine base point (x_P, y_P), as rounds for three cores.
//
// It evaluates
//     X' = 4*y_P * x_P*T_P^2*X1
//     Y' = x_P^3 * [T_b + 2*(T_P*X1 + T_a)*(X1 + T_P) - 2*X2*(X1 - T_P)^2]
//     Z' = 4*y_P * T_P^3
// with X1 = S0 (R0) and X2 = S1 (R1 = R0 + P), 10 multiplications and
// 3 squarings in five multiplication rounds.  The formula and this
// three-core round structure follow the design; writing x_P*T_P^2*X1 as
// (X1*T_P^2)*x_P and the register numbering are this design's.  Results go
// to QX, QY, QZ (still in the Montgomery domain).
// Interface: combinational ROM; step selects the round, last marks step 9.
module xyz_recovery
  import ecc_pkg::*;
(
  input  logic [3:0] step,
  output round_t     rnd,
  output logic       last
);

  always_comb begin
    unique case (step)
      4'd0: rnd = '{NOP, NOP, mk(OP_SUB, RG_S0, RG_TP, tmp(0))};
      4'd1: rnd = '{NOP, mk(OP_MUL, RG_TP, RG_S0, tmp(2)), mk(OP_MUL, tmp(0), tmp(0), tmp(1))};
      4'd2: rnd = '{NOP, mk(OP_ADD, tmp(2), RG_TA, tmp(2)), mk(OP_ADD, RG_S0, RG_TP, tmp(0))};
      4'd3: rnd = '{mk(OP_MUL, RG_TP, RG_TP, tmp(1)), mk(OP_MUL, tmp(2), tmp(0), tmp(2)), mk(OP_MUL, tmp(1), RG_S1, tmp(0))};
      4'd4: rnd = '{NOP, NOP, mk(OP_SUB, tmp(2), tmp(0), tmp(2))};
      4'd5: rnd = '{mk(OP_MUL, tmp(1), RG_TP, tmp(4)), mk(OP_MUL, RG_S0, tmp(1), tmp(3)), mk(OP_MUL, RG_XP, RG_XP, tmp(0))};
      4'd6: rnd = '{NOP, mk(OP_MUL, tmp(3), RG_XP, tmp(3)), mk(OP_MUL, tmp(0), RG_XP, tmp(1))};
      4'd7: rnd = '{NOP, mk(OP_ADD, RG_YP, RG_YP, tmp(2)), mk(OP_ADD, tmp(2), tmp(2), tmp(0))};
      4'd8: rnd = '{NOP, mk(OP_ADD, tmp(2), tmp(2), tmp(2)), mk(OP_ADD, tmp(0), RG_TB, tmp(0))};
      4'd9: rnd = '{mk(OP_MUL, tmp(2), tmp(4), RG_QZ), mk(OP_MUL, tmp(2), tmp(3), RG_QX), mk(OP_MUL, tmp(1), tmp(0), RG_QY)};
      default: rnd = '{NOP, NOP, NOP};
    endcase
    last = (step == 4'd9);
  end

endmodule
