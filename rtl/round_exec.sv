// round_exec - runs one round on the NCORES Montgomery cores: the MUX/deMUX
// between the 2R1W memory pool and the cores, plus the zero comparators.
//
// A round gives each core an operation, two source registers and one
// destination register (ecc_pkg::round_t).  Execution is in four phases:
//   FETCH  one cycle per core: the two read ports of the pool are pointed at
//          that core's two sources (the MUX); with the pool's one-cycle read
//          latency the last operands arrive one cycle after the last
//          address, so this phase lasts NCORES+1 cycles,
//   START  all cores with an operation start in the same cycle,
//   WAIT   until no core is busy (a round with a multiplication lasts as long
//          as one multiplication; additions finish after one cycle),
//   SAVE   two cycles per core (the deMUX): the core's result is selected
//          onto the write-data register, tested for zero, and then written
//          to its destination.  Cores without an operation write nothing
//          but keep their time slot, so a round's length does not depend
//          on its contents.
// done pulses in the cycle after the last save; zero_flags[i] then tells
// whether core i's result was zero (flags of idle cores are 0).
// Fetching one core per cycle and saving in two cycles per core follows the
// design (3 + 6 cycles for 3 cores, one more fetch cycle here for the read
// latency); starting all cores together follows its scheduling rule.
// Counted from the start pulse to the done pulse, a round with only
// additions takes 1 + (NCORES+1) + 1 + 1 + 2*NCORES + 1 cycles (14 for three
// cores); one with a multiplication NW/DW more (80 for NW = 528).
module round_exec
  import ecc_pkg::*;
#(
  parameter int NW = 528,
  parameter int DW = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  round_t                        rnd,
  output logic                          done,
  output logic [NCORES-1:0]             zero_flags,
  input  logic [NW-1:0]                 p,
  // qp'P table
  output logic [NCORES-1:0][DW-1:0]     tbl_idx,
  input  logic [NCORES-1:0][NW+DW-1:0]  tbl_data,
  // memory pool
  output addr_t                         mem_ra,
  output addr_t                         mem_rb,
  input  logic [NW-1:0]                 mem_rda,
  input  logic [NW-1:0]                 mem_rdb,
  output logic                          mem_we,
  output addr_t                         mem_wa,
  output logic [NW-1:0]                 mem_wd
);

  typedef enum logic [2:0] {X_IDLE, X_FETCH, X_START, X_WAIT, X_SAVE, X_DONE} xstate_e;
  xstate_e state;

  localparam int CIW = $clog2(NCORES+1);

  round_t                         r;
  logic [CIW-1:0]                 idx;       // core being fetched / saved
  logic                           fvalid;    // pool data for core fidx arrives this cycle
  logic [CIW-1:0]                 fidx;
  logic                           half;      // second cycle of a save slot
  logic [NCORES-1:0][NW-1:0]      opa, opb;
  logic [NCORES-1:0][NW-1:0]      res;
  logic [NCORES-1:0]              cbusy;
  logic                           cstart;

  for (genvar i = 0; i < NCORES; i++) begin : g_core
    mont_core #(.NW(NW), .DW(DW)) u_core (
      .clk     (clk),
      .rst_n   (rst_n),
      .start   (cstart && r[i].op != OP_NOP),
      .op      (r[i].op),
      .a       (opa[i]),
      .b       (opb[i]),
      .p       (p),
      .tbl_idx (tbl_idx[i]),
      .tbl_data(tbl_data[i]),
      .result  (res[i]),
      .busy    (cbusy[i])
    );
  end

  // Read-port MUX: addresses of the core being fetched.
  always_comb begin
    mem_ra = r[0].a;
    mem_rb = r[0].b;
    for (int i = 0; i < NCORES; i++) begin
      if (CIW'(i) == idx) begin
        mem_ra = r[i].a;
        mem_rb = r[i].b;
      end
    end
  end

  assign cstart = (state == X_START);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= X_IDLE;
      r          <= '0;
      idx        <= '0;
      fidx       <= '0;
      fvalid     <= 1'b0;
      half       <= 1'b0;
      opa        <= '0;
      opb        <= '0;
      mem_we     <= 1'b0;
      mem_wa     <= '0;
      mem_wd     <= '0;
      zero_flags <= '0;
      done       <= 1'b0;
    end else begin
      done   <= 1'b0;
      mem_we <= 1'b0;
      // operand latch (one cycle after the read address)
      fvalid <= 1'b0;
      if (fvalid) begin
        opa[fidx] <= mem_rda;
        opb[fidx] <= mem_rdb;
      end
      unique case (state)
        X_IDLE: if (start) begin
          r     <= rnd;
          idx   <= '0;
          state <= X_FETCH;
        end
        X_FETCH: begin
          // issue core idx; the data of core fidx arrives while fvalid
          fvalid <= 1'b1;
          fidx   <= idx;
          idx    <= (idx == CIW'(NCORES-1)) ? '0 : idx + 1'b1;
          if (fvalid && fidx == CIW'(NCORES-1)) begin
            fvalid <= 1'b0;
            state  <= X_START;
          end
        end
        X_START: begin
          state <= X_WAIT;
        end
        X_WAIT: if (cbusy == '0) begin
          idx   <= '0;
          half  <= 1'b0;
          state <= X_SAVE;
        end
        X_SAVE: begin
          if (!half) begin
            // deMUX: select this core's result onto the write bus
            mem_wd <= res[idx];
            mem_wa <= r[idx].d;
            zero_flags[idx] <= (r[idx].op != OP_NOP) && (res[idx] == '0);
            half <= 1'b1;
          end else begin
            mem_we <= (r[idx].op != OP_NOP);
            half   <= 1'b0;
            if (idx == CIW'(NCORES-1)) state <= X_DONE;
            else idx <= idx + 1'b1;
          end
        end
        X_DONE: begin
          // last write happens in this cycle
          done  <= 1'b1;
          state <= X_IDLE;
        end
        default: state <= X_IDLE;
      endcase
    end
  end

endmodule
