// aes_ti_ctrl -- round and phase sequencer of the masked AES core.
//
// Every AES round takes five cycles, phases 0..4, in which each S-box unit
// evaluates two bytes:
//   phase 0 : first step of byte group 0 (sel = 0, grp = 0)
//   phase 1 : first step of byte group 1 (sel = 0, grp = 1)
//   phase 2 : second step of group 0     (sel = 1)
//   phase 3 : second step of group 1     (sel = 1)
//   phase 4 : group-0 results on the S-box outputs -> capture (store_g0)
// Phase 0 of the next round coincides with the group-1 results, so the round
// is closed (linear layer, key addition, state update: upd) in the same cycle
// that issues the next round's group 0.  A start request is phase 0 of round 1
// itself, and the closing cycle of round 10 (reported as round 11) writes the
// result: ten rounds take exactly 50 cycles from start to done.
//
// Interface: start is accepted only when idle (busy = 0).  done pulses for one
// cycle, the cycle after the result was registered.  fin_round is the number
// of the round being closed while upd = 1 (1..10); last marks round 10.
// Reset is active-low and synchronous.  The five-phase round and the
// overlap of rounds are this design's own schedule; the source design gives
// the 50-cycle latency and the two-step S-box with two BRAM register stages.
module aes_ti_ctrl
  import aes_ti_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,       // a block is being processed
  output logic       first,      // start accepted: phase 0 of round 1
  output logic       sel,        // S-box step selector
  output logic       grp,        // byte group issued to the S-boxes
  output logic       store_g0,   // capture group-0 S-box results
  output logic       upd,        // close a round (phase 0 of rounds 2..11)
  output logic [3:0] fin_round,  // round being closed while upd
  output logic       last,       // upd of round 10
  output logic       done        // result registered in the previous cycle
);

  typedef enum logic {IDLE, RUN} state_e;

  state_e     state_q;
  logic [2:0] phase_q;
  logic [3:0] round_q;   // round whose phase is phase_q; 11 = closing cycle

  always_comb begin
    first     = (state_q == IDLE) && start;
    busy      = (state_q == RUN);
    upd       = (state_q == RUN) && (phase_q == 3'd0);
    fin_round = round_q - 4'd1;
    last      = upd && (round_q == 4'(NROUNDS + 1));
    sel       = (state_q == RUN) && (phase_q == 3'd2 || phase_q == 3'd3);
    grp       = (state_q == RUN) && (phase_q == 3'd1);
    store_g0  = (state_q == RUN) && (phase_q == 3'd4);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= IDLE;
      phase_q <= '0;
      round_q <= '0;
      done    <= 1'b0;
    end else begin
      done <= last;
      case (state_q)
        IDLE: if (start) begin
          state_q <= RUN;
          phase_q <= 3'd1;
          round_q <= 4'd1;
        end
        RUN: begin
          if (last) begin
            state_q <= IDLE;
            phase_q <= '0;
            round_q <= '0;
          end else if (phase_q == 3'd4) begin
            phase_q <= 3'd0;
            round_q <= round_q + 4'd1;
          end else begin
            phase_q <= phase_q + 3'd1;
          end
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  // a round is closed exactly once per round, never while idle
  a_upd_busy: assert property (@(posedge clk) disable iff (!rst_n) upd |-> busy);
  a_round_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  busy |-> (round_q >= 4'd1 && round_q <= 4'(NROUNDS + 1)));

endmodule
