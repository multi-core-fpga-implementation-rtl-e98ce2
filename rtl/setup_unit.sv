// setup_unit - per-modulus precomputation for the Montgomery cores.
//
// On start the unit latches the new modulus P (odd, below 2^NW) and then:
//   1. forms p' = -P^-1 mod d (d = 2^DW) from the low digit of P with a few
//      Newton steps x <- x*(2 - p0*x), starting from x = p0 (correct to 3
//      bits for any odd p0); this is combinational,
//   2. writes the d table entries ((t*p') mod d) * P, t = 0..d-1, into
//      qpp_pool, one per cycle (d cycles),
//   3. computes R^2 mod P, R = 2^NW, by 2*NW modular doublings of 1, one per
//      cycle (2*NW cycles), for converting operands into the Montgomery
//      domain.
// Then it pulses done; r2 and p stay valid until the next start.  Building
// the table and p' in a setup phase follows the design; how they are
// computed, and computing R^2 mod P here rather than loading it, are this
// design's choices.  Total time d + 2*NW + 1 cycles (1313 for NW = 528).
module setup_unit #(
  parameter int NW = 528,
  parameter int DW = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NW-1:0]    modulus,
  output logic [NW-1:0]    p,
  output logic             tbl_we,
  output logic [DW-1:0]    tbl_waddr,
  output logic [NW+DW-1:0] tbl_wdata,
  output logic [NW-1:0]    r2,
  output logic             busy,
  output logic             done
);

  typedef enum logic [1:0] {S_IDLE, S_TABLE, S_R2} state_e;
  state_e state;

  logic [DW-1:0]             pinv;     // p' = -P^-1 mod d
  logic [DW-1:0]             t;
  logic [$clog2(2*NW+1)-1:0] dcnt;

  // p' by Newton iteration on the low digit.
  always_comb begin
    logic [DW-1:0] x;
    x = p[DW-1:0];
    for (int i = 0; i < 6; i++) x = DW'(x * (DW'(2) - p[DW-1:0] * x));
    pinv = DW'(-x);
  end

  always_comb begin
    logic [DW-1:0] m;
    m         = DW'(t * pinv);
    tbl_we    = (state == S_TABLE);
    tbl_waddr = t;
    tbl_wdata = (NW+DW)'(m) * (NW+DW)'(p);
  end

  logic [NW:0] dbl;
  always_comb dbl = {r2, 1'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      p     <= '0;
      r2    <= '0;
      t     <= '0;
      dcnt  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          p     <= modulus;
          t     <= '0;
          state <= S_TABLE;
        end
        S_TABLE: begin
          t <= t + 1'b1;
          if (t == '1) begin
            r2    <= NW'(1);
            dcnt  <= ($clog2(2*NW+1))'(2*NW);
            state <= S_R2;
          end
        end
        S_R2: begin
          r2   <= (dbl >= (NW+1)'(p)) ? NW'(dbl - (NW+1)'(p)) : NW'(dbl);
          dcnt <= dcnt - 1'b1;
          if (dcnt == 1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
