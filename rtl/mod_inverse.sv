// mod_inverse - sequencer for the modular inverse RES = OPA^-1 mod P of the
// loaded (prime) modulus, by Fermat's little theorem: OPA^(P-2).
//
// The exponentiation is a Montgomery ladder over all NW bits of e = P-2,
// most significant first, on two cores at once, so its length and its
// sequence of operations do not depend on e or OPA:
//     E0 = 1, E1 = OPA                      (Montgomery domain)
//     bit 1:  E0 = E0*E1,  E1 = E1^2
//     bit 0:  E1 = E0*E1,  E0 = E0^2       (invariant E1 = E0*OPA)
//     RES = E0 (converted out of the Montgomery domain)
// One round per bit: the product on core 0, the square on core 1, the bit
// selecting only the destination registers.  In total NW + 2 rounds, each
// the length of one multiplication round.
// The design provides a modular inverse modulo the group order but does not
// say how it is computed; the method here is this design's choice.
// Interface: pulse start (p stable); the unit raises issue for one cycle with
// the round on rnd and waits for rdone before the next; done pulses after
// the final round has completed.
module mod_inverse
  import ecc_pkg::*;
#(
  parameter int NW = 528
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] p,
  output round_t        rnd,
  output logic          issue,
  input  logic          rdone,
  output logic          busy,
  output logic          done
);

  typedef enum logic [2:0] {I_IDLE, I_PRE, I_LAD, I_POST, I_WAIT} istate_e;
  istate_e state, after;

  logic [NW-1:0]             e;
  logic [$clog2(NW+1)-1:0]   cnt;
  logic                      ebit;

  assign ebit = e[NW-1];

  always_comb begin
    rnd = '{NOP, NOP, NOP};
    unique case (state)
      I_PRE:  rnd = '{NOP, mk(OP_ADD, RG_MONE, RG_ZERO, RG_E0), mk(OP_MUL, RG_OPA, RG_R2, RG_E1)};
      I_LAD:  rnd = '{NOP,
                      mk(OP_MUL, ebit ? RG_E1 : RG_E0, ebit ? RG_E1 : RG_E0, ebit ? RG_E1 : RG_E0),
                      mk(OP_MUL, RG_E0, RG_E1, ebit ? RG_E0 : RG_E1)};
      I_POST: rnd = '{NOP, NOP, mk(OP_MUL, RG_E0, RG_ONE, RG_RES)};
      default: ;
    endcase
  end

  assign issue = (state == I_PRE) || (state == I_LAD) || (state == I_POST);
  assign busy  = (state != I_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= I_IDLE;
      after <= I_IDLE;
      e     <= '0;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        I_IDLE: if (start) begin
          e     <= p - NW'(2);
          cnt   <= ($clog2(NW+1))'(NW);
          state <= I_PRE;
        end
        I_PRE: begin
          after <= I_LAD;
          state <= I_WAIT;
        end
        I_LAD: begin
          e     <= e << 1;
          cnt   <= cnt - 1'b1;
          after <= (cnt == 1) ? I_POST : I_LAD;
          state <= I_WAIT;
        end
        I_POST: begin
          after <= I_IDLE;
          state <= I_WAIT;
        end
        I_WAIT: if (rdone) begin
          state <= after;
          if (after == I_IDLE) done <= 1'b1;
        end
        default: state <= I_IDLE;
      endcase
    end
  end

endmodule
