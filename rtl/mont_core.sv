// mont_core - one Montgomery core: digit-serial Montgomery multiplication
// plus modular addition and subtraction, for any odd modulus below 2^NW.
//
// Multiplication computes MM(A,B,P) = A*B*d^-n mod P with digit base
// d = 2^DW and n = NW/DW digits (so R = d^n = 2^NW).  It follows the
// digit-by-digit Montgomery algorithm: each cycle consumes one digit a_i of A,
//     L     = C + a_i*B
//     q     = L mod d
//     C_new = (L + ((q*p') mod d) * P) / d,      p' = -P^-1 mod d,
// using a (DW x NW)-bit multiplier for a_i*B.  The second product
// ((q*p') mod d)*P is not computed: it is read from a d-entry table
// (qpp_pool), indexed by q, through tbl_idx/tbl_data in the same cycle.
// After n cycles C < 2P and the result is C or C-P.  A and B must be below P.
// This structure (base 2^8, one (lg d x lg P) multiplier, the table of
// q*p'*P replacing the second multiplier) is the one the design is built on;
// the one-digit-per-cycle timing gives 66 cycles for NW = 528.
//
// ADD and SUB take one cycle: C = A+B or C = A-B (+P when negative), with the
// same final conditional subtraction.
//
// Interface: pulse start with op/a/b valid (p stable for the whole
// operation).  busy is high from the next cycle for NDIG cycles (MUL) or one
// cycle (ADD/SUB); result is valid whenever busy is low after an operation,
// and stays valid until the next start.
module mont_core
  import ecc_pkg::*;
#(
  parameter int NW = 528,
  parameter int DW = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  op_e              op,
  input  logic [NW-1:0]    a,
  input  logic [NW-1:0]    b,
  input  logic [NW-1:0]    p,
  output logic [DW-1:0]    tbl_idx,
  input  logic [NW+DW-1:0] tbl_data,
  output logic [NW-1:0]    result,
  output logic             busy
);

  localparam int NDIG = NW / DW;
  localparam int CW   = NW + DW + 2;  // accumulator width, holds < 2^(NW+DW+1)

  logic [NW-1:0]          areg, breg;
  logic [NW+1:0]          c;          // < 2P
  logic [$clog2(NDIG+1)-1:0] cnt;

  logic [CW-1:0] l, s;

  always_comb begin
    l       = CW'(c) + CW'(areg[DW-1:0]) * CW'(breg);
    tbl_idx = l[DW-1:0];
    s       = l + CW'(tbl_data);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      c    <= '0;
      areg <= '0;
      breg <= '0;
    end else if (start) begin
      unique case (op)
        OP_MUL: begin
          areg <= a;
          breg <= b;
          c    <= '0;
          cnt  <= ($clog2(NDIG+1))'(NDIG);
          busy <= 1'b1;
        end
        OP_ADD: begin
          c    <= (NW+2)'(a) + (NW+2)'(b);
          busy <= 1'b0;
        end
        OP_SUB: begin
          c    <= (a >= b) ? (NW+2)'(a - b) : (NW+2)'(a) + (NW+2)'(p) - (NW+2)'(b);
          busy <= 1'b0;
        end
        default: ;
      endcase
    end else if (busy) begin
      c    <= (NW+2)'(s >> DW);
      areg <= areg >> DW;
      cnt  <= cnt - 1'b1;
      if (cnt == 1) busy <= 1'b0;
    end
  end

  always_comb begin
    result = (c >= (NW+2)'(p)) ? NW'(c - (NW+2)'(p)) : NW'(c);
  end

endmodule
