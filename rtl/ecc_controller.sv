// ecc_controller - the engine's finite state machine: it turns a host
// command into a sequence of jobs and each job into rounds for round_exec.
//
// Jobs per command:
//   CMD_SETUP      setup_unit (modulus, p', table, R^2), then the constants
//                  0, 1 and R^2 are put straight onto the pool's write bus,
//                  then MONE = R mod P
//   CMD_SCALAR_MUL to Montgomery domain, element check (abort with error if
//                  the point is not on the curve), ladder start (R0 = P,
//                  R1 = 2P), kbits-1 ladder steps, (X,Y,Z) recovery, check
//                  of the result (abort with error if it is not on the
//                  curve, e.g. after an injected fault), out of the
//                  Montgomery domain
//   CMD_POINT_ADD  to Montgomery domain, group addition, out of it
//   CMD_CHECK      to Montgomery domain, element check
//   CMD_MOD_MUL/ADD/SUB  one small program
//   CMD_MOD_INV    handed to the mod_inverse sequencer
// The ladder runs over scalar bits kbits-2 down to 0 (bit kbits-1 must be 1
// and is consumed by starting from (P, 2P)); each step is the diff_adder
// program with the current bit, which only decides which of S0/S1 is added
// and which doubled.  The number of steps depends on kbits only, never on
// the bit values.
// The program ROMs (diff_adder, xyz_recovery, group_addition,
// element_check, misc_programs) and mod_inverse are instantiated here.
// A controller that sequences the big-integer operations and addresses the
// pool, the direct values on the write bus and the zero flag as a verdict
// follow the design; the command set and job order are this design's.
// Interface: cmd_valid/cmd accepted when not busy; scalar and kbits are
// latched at acceptance; done pulses one cycle at the end; error holds the
// element-check verdict of the last command (1 = input point, or the result
// of a scalar multiplication, not on the curve; the pool's QX, QY, QZ are
// then not valid).  The assertion on the inverse sequencer is disabled
// while rst_n is low (lint notes this clocked use of the reset).
module ecc_controller
  import ecc_pkg::*;
#(
  parameter int NW = 528,
  parameter int KW = $clog2(NW+1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cmd_valid,
  input  cmd_e          cmd,
  input  logic [NW-1:0] scalar,
  input  logic [KW-1:0] kbits,
  input  logic [NW-1:0] p,
  // setup unit
  output logic          setup_start,
  input  logic          setup_done,
  input  logic [NW-1:0] r2,
  // round executor
  output logic          exec_start,
  output round_t        exec_rnd,
  input  logic          exec_done,
  input  logic          check_zero,   // zero flag of core 0 in the last round
  // direct writes onto the pool write bus
  output logic          cw_we,
  output addr_t         cw_addr,
  output logic [NW-1:0] cw_data,
  // status
  output logic          busy,
  output logic          done,
  output logic          error
);

  typedef enum logic [4:0] {
    J_IDLE, J_SETUP_HW, J_CONST, J_MONE, J_TOMONT_PT, J_CHECK, J_INIT, J_LADDER,
    J_RECOVER, J_OUTCHECK, J_FROMMONT_Q, J_TOMONT_PQ, J_GADD, J_MODMUL, J_MODADD,
    J_MODSUB, J_INV
  } job_e;

  job_e          job;
  cmd_e          cmd_q;
  logic [3:0]    step;
  logic          waiting;      // a round (or setup / inverse) is in flight
  logic [NW-1:0] kreg;
  logic [KW-1:0] kb_q;
  logic [KW-1:0] li;           // ladder bit index
  logic [1:0]    ccnt;         // constant-write counter

  // ------------------------------------------------------------ programs
  round_t     r_da, r_xr, r_ga, r_ec, r_mp, r_inv;
  logic       l_da, l_xr, l_ga, l_ec, l_mp;
  misc_prog_e mp_sel;
  logic       inv_start, inv_issue, inv_busy, inv_done;

  diff_adder     u_da (.step(step), .kbit(kreg[li]), .rnd(r_da), .last(l_da));
  xyz_recovery   u_xr (.step(step), .rnd(r_xr), .last(l_xr));
  group_addition u_ga (.step(step), .rnd(r_ga), .last(l_ga));
  element_check  u_ec (.outp(job == J_OUTCHECK), .step(step), .rnd(r_ec), .last(l_ec));
  misc_programs  u_mp (.prog(mp_sel), .step(step), .rnd(r_mp), .last(l_mp));

  mod_inverse #(.NW(NW)) u_inv (
    .clk(clk), .rst_n(rst_n), .start(inv_start), .p(p),
    .rnd(r_inv), .issue(inv_issue), .rdone(exec_done), .busy(inv_busy), .done(inv_done)
  );

  always_comb begin
    unique case (job)
      J_MONE:       mp_sel = PG_MONE;
      J_TOMONT_PT:  mp_sel = PG_TOMONT_PT;
      J_TOMONT_PQ:  mp_sel = PG_TOMONT_PQ;
      J_INIT:       mp_sel = PG_LADDER_INIT;
      J_FROMMONT_Q: mp_sel = PG_FROMMONT_Q;
      J_MODMUL:     mp_sel = PG_MODMUL;
      J_MODADD:     mp_sel = PG_MODADD;
      J_MODSUB:     mp_sel = PG_MODSUB;
      default:      mp_sel = PG_MONE;
    endcase
  end

  // Current round and whether it ends its program.
  round_t cur_rnd;
  logic   cur_last;
  always_comb begin
    unique case (job)
      J_LADDER:  begin cur_rnd = r_da; cur_last = l_da; end
      J_RECOVER: begin cur_rnd = r_xr; cur_last = l_xr; end
      J_GADD:    begin cur_rnd = r_ga; cur_last = l_ga; end
      J_CHECK,
      J_OUTCHECK: begin cur_rnd = r_ec; cur_last = l_ec; end
      default:   begin cur_rnd = r_mp; cur_last = l_mp; end
    endcase
  end

  function automatic logic is_rom_job(input job_e j);
    return !(j inside {J_IDLE, J_SETUP_HW, J_CONST, J_INV});
  endfunction

  function automatic job_e first_job(input cmd_e c);
    unique case (c)
      CMD_SETUP:      return J_SETUP_HW;
      CMD_SCALAR_MUL: return J_TOMONT_PT;
      CMD_POINT_ADD:  return J_TOMONT_PQ;
      CMD_CHECK:      return J_TOMONT_PT;
      CMD_MOD_MUL:    return J_MODMUL;
      CMD_MOD_ADD:    return J_MODADD;
      CMD_MOD_SUB:    return J_MODSUB;
      default:        return J_INV;
    endcase
  endfunction

  function automatic job_e next_job(input cmd_e c, input job_e j, input logic [KW-1:0] kb);
    unique case (j)
      J_SETUP_HW:   return J_CONST;
      J_CONST:      return J_MONE;
      J_TOMONT_PT:  return J_CHECK;
      J_CHECK:      return (c == CMD_SCALAR_MUL) ? J_INIT : J_IDLE;
      J_INIT:       return (kb >= KW'(2)) ? J_LADDER : J_RECOVER;
      J_LADDER:     return J_RECOVER;
      J_RECOVER:    return J_OUTCHECK;
      J_OUTCHECK:   return J_FROMMONT_Q;
      J_TOMONT_PQ:  return J_GADD;
      J_GADD:       return J_FROMMONT_Q;
      default:      return J_IDLE;   // J_MONE, J_FROMMONT_Q, modular ops, J_INV
    endcase
  endfunction

  assign exec_start = (job == J_INV) ? inv_issue : (is_rom_job(job) && !waiting);
  assign exec_rnd   = (job == J_INV) ? r_inv : cur_rnd;
  assign busy       = (job != J_IDLE);

  always_comb begin
    cw_we   = (job == J_CONST);
    cw_addr = RG_ZERO;
    cw_data = '0;
    unique case (ccnt)
      2'd0:    begin cw_addr = RG_ZERO; cw_data = '0;     end
      2'd1:    begin cw_addr = RG_ONE;  cw_data = NW'(1); end
      default: begin cw_addr = RG_R2;   cw_data = r2;     end
    endcase
  end

  assign setup_start = (job == J_SETUP_HW) && !waiting;

  // The inverse sequencer only issues rounds while its job is active.
  assert property (@(posedge clk) disable iff (!rst_n) !(inv_busy && job != J_INV));
  assign inv_start   = (job == J_INV) && !waiting;

  // Go to job j, skipping nothing else; starting a job clears the step.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      job     <= J_IDLE;
      cmd_q   <= CMD_SETUP;
      step    <= '0;
      waiting <= 1'b0;
      kreg    <= '0;
      kb_q    <= '0;
      li      <= '0;
      ccnt    <= '0;
      done    <= 1'b0;
      error   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (job)
        J_IDLE: if (cmd_valid) begin
          cmd_q   <= cmd;
          kreg    <= scalar;
          kb_q    <= kbits;
          li      <= kbits - KW'(2);
          step    <= '0;
          waiting <= 1'b0;
          ccnt    <= '0;
          if (cmd == CMD_SCALAR_MUL || cmd == CMD_CHECK) error <= 1'b0;
          job     <= first_job(cmd);
        end
        J_SETUP_HW: begin
          if (!waiting) waiting <= 1'b1;
          else if (setup_done) begin
            waiting <= 1'b0;
            job     <= J_CONST;
          end
        end
        J_CONST: begin
          ccnt <= ccnt + 1'b1;
          if (ccnt == 2'd2) job <= J_MONE;
        end
        J_INV: begin
          if (!waiting) waiting <= 1'b1;
          else if (inv_done) begin
            waiting <= 1'b0;
            done    <= 1'b1;
            job     <= J_IDLE;
          end
        end
        default: begin
          // program jobs: issue a round, wait for it
          if (!waiting) waiting <= 1'b1;
          else if (exec_done) begin
            waiting <= 1'b0;
            if (!cur_last) begin
              step <= step + 1'b1;
            end else if (job == J_LADDER && li != '0) begin
              step <= '0;
              li   <= li - 1'b1;
            end else begin
              step <= '0;
              if ((job == J_CHECK || job == J_OUTCHECK) && !check_zero) begin
                error <= 1'b1;
                done  <= 1'b1;
                job   <= J_IDLE;
              end else begin
                job <= next_job(cmd_q, job, kb_q);
                if (next_job(cmd_q, job, kb_q) == J_IDLE) done <= 1'b1;
              end
            end
          end
        end
      endcase
    end
  end

endmodule
