// element_check - tests whether a point lies on the curve
// y^2 = x^3 + a*x + b, as rounds for the three cores.  Two programs:
//   outp = 0  the affine input point (XP, YP): y^2 - a*x - x^3 - b, four
//             rounds (3 multiplications of which one depends on another,
//             then two subtractions),
//   outp = 1  the projective result (QX, QY, QZ) of a scalar
//             multiplication: Y^2*Z - X^3 - a*X*Z^2 - b*Z^3, five rounds
//             (four multiplication rounds with subtractions packed in).
//             A fault injected into the ladder makes the result leave the
//             curve, so this check guards against fault attacks.
// The last round puts the difference on core 0's output bus, whose zero
// comparator tells the controller whether the point is valid.  Operands must
// already be in the Montgomery domain (zero is zero in both domains; the
// homogeneous equation holds for Montgomery-form X, Y, Z, a, b since every
// term has the same degree).  Checking input and output points with the
// zero comparators of the cores' output buses follows the design; the
// sequences of operations are this design's.
// Interface: combinational ROM; step selects the round, last marks the final
// round (3 or 4); the verdict is zero_flags[0] of that round.
module element_check
  import ecc_pkg::*;
(
  input  logic       outp,
  input  logic [3:0] step,
  output round_t     rnd,
  output logic       last
);

  always_comb begin
    if (outp) begin
      unique case (step)
        4'd0: rnd = '{mk(OP_MUL, RG_QZ, RG_QZ, tmp(2)), mk(OP_MUL, RG_QY, RG_QY, tmp(1)), mk(OP_MUL, RG_QX, RG_QX, tmp(0))};
        4'd1: rnd = '{mk(OP_MUL, RG_QX, tmp(2), tmp(3)), mk(OP_MUL, tmp(1), RG_QZ, tmp(1)), mk(OP_MUL, tmp(0), RG_QX, tmp(0))};
        4'd2: rnd = '{mk(OP_SUB, tmp(1), tmp(0), tmp(1)), mk(OP_MUL, tmp(2), RG_QZ, tmp(2)), mk(OP_MUL, RG_A, tmp(3), tmp(3))};
        4'd3: rnd = '{NOP, mk(OP_SUB, tmp(1), tmp(3), tmp(1)), mk(OP_MUL, RG_B, tmp(2), tmp(2))};
        4'd4: rnd = '{NOP, NOP, mk(OP_SUB, tmp(1), tmp(2), tmp(1))};
        default: rnd = '{NOP, NOP, NOP};
      endcase
      last = (step == 4'd4);
    end else begin
      unique case (step)
        4'd0: rnd = '{mk(OP_MUL, RG_A, RG_XP, tmp(2)), mk(OP_MUL, RG_YP, RG_YP, tmp(1)), mk(OP_MUL, RG_XP, RG_XP, tmp(0))};
        4'd1: rnd = '{NOP, mk(OP_SUB, tmp(1), tmp(2), tmp(1)), mk(OP_MUL, tmp(0), RG_XP, tmp(0))};
        4'd2: rnd = '{NOP, NOP, mk(OP_SUB, tmp(1), tmp(0), tmp(1))};
        4'd3: rnd = '{NOP, NOP, mk(OP_SUB, tmp(1), RG_B, tmp(1))};
        default: rnd = '{NOP, NOP, NOP};
      endcase
      last = (step == 4'd3);
    end
  end

endmodule
