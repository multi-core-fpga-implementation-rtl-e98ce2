// group_addition - adds two affine points P = (XP, YP) and Q = (XQ, YQ),
// P != +-Q, giving the sum in homogeneous projective coordinates, as rounds
// for the three cores.
//
// With u = y_Q - y_P, v = x_Q - x_P and A = u^2 - v^3 - 2*v^2*x_P:
//     X = v*A,   Y = u*(v^2*x_P - A) - v^3*y_P,   Z = v^3
// which is the classic homogeneous addition with both Z equal to 1
// (6 multiplications, 2 squarings, 5 multiplication rounds; the design names
// Cohen et al.'s method without giving its details, so the formula choice and
// the schedule are this design's).  P = Q or P = -Q give Z = 0: doubling is
// not handled here.  Results go to QX, QY, QZ in the Montgomery domain.
// Interface: combinational ROM; step selects the round, last marks step 8.
module group_addition
  import ecc_pkg::*;
(
  input  logic [3:0] step,
  output round_t     rnd,
  output logic       last
);

  always_comb begin
    unique case (step)
      4'd0: rnd = '{NOP, mk(OP_SUB, RG_XQ, RG_XP, tmp(1)), mk(OP_SUB, RG_YQ, RG_YP, tmp(0))};
      4'd1: rnd = '{NOP, mk(OP_MUL, tmp(1), tmp(1), tmp(3)), mk(OP_MUL, tmp(0), tmp(0), tmp(2))};
      4'd2: rnd = '{NOP, mk(OP_MUL, tmp(3), RG_XP, tmp(5)), mk(OP_MUL, tmp(1), tmp(3), tmp(4))};
      4'd3: rnd = '{NOP, mk(OP_ADD, tmp(5), tmp(5), tmp(6)), mk(OP_SUB, tmp(2), tmp(4), tmp(2))};
      4'd4: rnd = '{NOP, NOP, mk(OP_SUB, tmp(2), tmp(6), tmp(2))};
      4'd5: rnd = '{mk(OP_ADD, tmp(4), RG_ZERO, RG_QZ), mk(OP_MUL, tmp(4), RG_YP, tmp(7)), mk(OP_MUL, tmp(1), tmp(2), RG_QX)};
      4'd6: rnd = '{NOP, NOP, mk(OP_SUB, tmp(5), tmp(2), tmp(5))};
      4'd7: rnd = '{NOP, NOP, mk(OP_MUL, tmp(0), tmp(5), tmp(8))};
      4'd8: rnd = '{NOP, NOP, mk(OP_SUB, tmp(8), tmp(7), RG_QY)};
      default: rnd = '{NOP, NOP, NOP};
    endcase
    last = (step == 4'd8);
  end

endmodule
