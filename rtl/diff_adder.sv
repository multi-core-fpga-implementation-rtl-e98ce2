// diff_adder - one step of the Co-Z Montgomery ladder: differential
// addition and doubling in homogeneous co-Z coordinates, as a schedule of
// rounds for three Montgomery cores.
//
// The ladder keeps only the X parts of its two points R0, R1 (pool registers
// S0, S1), which share one Z that is never stored; instead the step tracks
// T_P = x_P*Z, T_a = a*Z^2 and T_b = 4b*Z^3.  With X1 the point to be added
// and X2 the point to be doubled (X1 - X2 = +-P), the step computes
//     U = (X1-X2)^2,  V = 4*X2*(X2^2 + T_a) + T_b,  W = U*V
//     X1' = V*[(X1+X2)*(X1^2 + X2^2 - U + 2*T_a) + T_b] - T_P*W
//     X2' = U*[(X2^2 - T_a)^2 - 2*X2*T_b]
//     T_P' = T_P*W,  T_a' = T_a*W^2,  T_b' = T_b*W^3
// (10 multiplications and 5 squarings), in place: X1' replaces X1 and X2'
// replaces X2.  For scalar bit kbit the point doubled is R_kbit, so
// X2 = S_kbit and X1 = S_(1-kbit); selecting the addresses by the bit keeps
// the sequence of operations identical for both bit values.
// The formulas and the fact that three cores need five multiplication rounds
// (the critical path 3 -> 11 -> 22 -> 23/24 -> 26/27 of the operation
// graph) follow the design.  The placement of operations in rounds below is
// this design's own: every multiplication round uses all three cores, the
// additions and subtractions are packed into six short rounds between them.
//
//   step : kind : core 0 / core 1 / core 2
//   0  add  X1-X2 , 2X2 , X1+X2
//   1  mul  X2^2 , U=(X1-X2)^2 , X1^2
//   2  add  X2^2-Ta , X2^2+Ta , 4X2
//   3  mul  4X2*(X2^2+Ta) , (X2^2-Ta)^2 , 2X2*Tb
//   4  add  X2^2+2Ta , X1^2-U , V
//   5  add  X1^2+X2^2-U+2Ta , (X2^2-Ta)^2-2X2Tb
//   6  mul  W=U*V , (X1+X2)*(..) , X2'=U*(..)
//   7  add  (X1+X2)*(..)+Tb
//   8  mul  W*Tb , W^2 , V*(..)
//   9  mul  Ta'=Ta*W^2 , Tb'=W*Tb*W^2 , TP'=TP*W
//  10  add  X1' = V*(..) - TP'
// Interface: combinational ROM; step selects the round, last marks step 10.
module diff_adder
  import ecc_pkg::*;
(
  input  logic       kbit,
  input  logic [3:0] step,
  output round_t     rnd,
  output logic       last
);

  // ladder register roles selected by the scalar bit
  addr_t x1, x2;
  assign x1 = kbit ? RG_S0 : RG_S1;
  assign x2 = kbit ? RG_S1 : RG_S0;

  always_comb begin
    unique case (step)
      4'd0: rnd = '{mk(OP_ADD, x1, x2, tmp(2)), mk(OP_ADD, x2, x2, tmp(1)), mk(OP_SUB, x1, x2, tmp(0))};
      4'd1: rnd = '{mk(OP_MUL, x1, x1, tmp(5)), mk(OP_MUL, tmp(0), tmp(0), tmp(4)), mk(OP_MUL, x2, x2, tmp(3))};
      4'd2: rnd = '{mk(OP_ADD, tmp(1), tmp(1), tmp(8)), mk(OP_ADD, tmp(3), RG_TA, tmp(7)), mk(OP_SUB, tmp(3), RG_TA, tmp(6))};
      4'd3: rnd = '{mk(OP_MUL, tmp(1), RG_TB, tmp(11)), mk(OP_MUL, tmp(6), tmp(6), tmp(10)), mk(OP_MUL, tmp(8), tmp(7), tmp(9))};
      4'd4: rnd = '{mk(OP_ADD, tmp(9), RG_TB, tmp(14)), mk(OP_SUB, tmp(5), tmp(4), tmp(13)), mk(OP_ADD, tmp(7), RG_TA, tmp(12))};
      4'd5: rnd = '{NOP, mk(OP_SUB, tmp(10), tmp(11), tmp(16)), mk(OP_ADD, tmp(12), tmp(13), tmp(15))};
      4'd6: rnd = '{mk(OP_MUL, tmp(4), tmp(16), x2), mk(OP_MUL, tmp(2), tmp(15), tmp(18)), mk(OP_MUL, tmp(4), tmp(14), tmp(17))};
      4'd7: rnd = '{NOP, NOP, mk(OP_ADD, tmp(18), RG_TB, tmp(19))};
      4'd8: rnd = '{mk(OP_MUL, tmp(14), tmp(19), tmp(22)), mk(OP_MUL, tmp(17), tmp(17), tmp(21)), mk(OP_MUL, tmp(17), RG_TB, tmp(20))};
      4'd9: rnd = '{mk(OP_MUL, RG_TP, tmp(17), RG_TP), mk(OP_MUL, tmp(20), tmp(21), RG_TB), mk(OP_MUL, RG_TA, tmp(21), RG_TA)};
      4'd10: rnd = '{NOP, NOP, mk(OP_SUB, tmp(22), RG_TP, x1)};
      default: rnd = '{NOP, NOP, NOP};
    endcase
    last = (step == 4'd10);
  end

endmodule
