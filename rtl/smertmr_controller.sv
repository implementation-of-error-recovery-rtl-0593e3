// smertmr_controller: the SMERTMR controller state machine, its scan shift
// counter and the faulty modules register (FMR).
//
// States and transitions (those of the published SMERTMR state diagram):
//   NORMAL      -> COMPARE      voter error, or checkpoint asserted
//   COMPARE     -> NORMAL       no mismatch between any replica pair
//   COMPARE     -> RECOVER      one or two faulty replicas located
//   COMPARE     -> MASTERCHECK  the located replica is permanently faulty
//   COMPARE     -> UNRECOVERABLE  the mismatch pattern locates nothing
//   RECOVER     -> NORMAL       all mismatch counters back at zero
//   RECOVER     -> UNRECOVERABLE  a counter is nonzero (another fault hit
//                               during recovery)
//   MASTERCHECK -> UNRECOVERABLE  master and checker disagree
// UNRECOVERABLE is left only by reset.
//
// Timing (this design's choice where the published scheme gives only "after Lsc
// clock cycles"): COMPARE and RECOVER each take LSC+1 clocks: LSC clocks
// with the scan chains shifting (`comparison` or `recovery` high), then one
// decision clock with the chains stopped, in which the registered mismatch
// counters are judged.  So a located transient fault is repaired 2*LSC+2
// clocks after the voter flags it, and a checkpoint with no fault costs LSC+1
// clocks.  The counters are cleared in the clock that enters COMPARE.
// `run` is low in COMPARE and RECOVER, and already in the NORMAL clock in
// which a voter error or checkpoint is seen, so the replicas hold their
// function while their states are being read and copied (this design's
// choice).  Stopping at detection matters: one more functional step would
// let arithmetic carries move a fault into other bits, which can make a
// double fault look like a different pair of faulty replicas to the
// locator's bit-count rules.
//
// FMR: in the decision clock of COMPARE the fault locator's two ids are
// loaded into fmr1/fmr2 (lower id first); `faulty` is their decoded mask,
// F(1..3), which steers the recovery multiplexers.  The result of every
// completed comparison is handed to the permanent fault detector
// (`pfd_update`).  A permanent verdict is acted on only when a single
// replica is faulty (the published master/checker mode disregards one
// module); with two faulty replicas the system recovers both.
//
// While `offline_test` is high in NORMAL, the voter error and the checkpoint
// are ignored (the scan chains are in use by the external test).
module smertmr_controller
  import smertmr_pkg::*;
#(
  parameter int unsigned LSC = 3,                   // scan chain length
  parameter int unsigned SW  = $clog2(LSC + 1)      // shift counter width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         voter_error,
  input  logic         checkpoint,
  input  logic         offline_test,
  input  flu_verdict_e flu_verdict,
  input  logic [2:0]   flu_faulty,
  input  mod_id_t      flu_fmr1,
  input  mod_id_t      flu_fmr2,
  input  logic [2:0]   perm_now,
  input  logic         cnt_all_zero,
  input  logic         cnt_underflow,
  input  logic         mc_error,
  output state_e       state,
  output logic         comparison,   // shift, counters count up
  output logic         recovery,     // shift, counters count down
  output logic         cnt_clear,
  output logic         pfd_update,
  output logic         run,          // replicas may do their function
  output mod_id_t      fmr1,
  output mod_id_t      fmr2,
  output logic [2:0]   faulty,       // F(1..3) decoded from FMR
  output mod_id_t      disregard,    // replica dropped in master/checker
  output logic         uc            // unrecoverable condition
);

  state_e          state_q, state_d;
  logic [SW-1:0]   shift_q, shift_d;
  mod_id_t         fmr1_q, fmr1_d, fmr2_q, fmr2_d, dis_q, dis_d;
  logic            shifting, single;

  assign shifting = (shift_q != SW'(LSC));
  assign single   = (flu_faulty != '0) && ((flu_faulty & (flu_faulty - 3'd1)) == '0);

  always_comb begin
    state_d    = state_q;
    shift_d    = shift_q;
    fmr1_d     = fmr1_q;
    fmr2_d     = fmr2_q;
    dis_d      = dis_q;
    comparison = 1'b0;
    recovery   = 1'b0;
    cnt_clear  = 1'b0;
    pfd_update = 1'b0;

    unique case (state_q)
      ST_NORMAL: begin
        if (!offline_test && (voter_error || checkpoint)) begin
          state_d   = ST_COMPARE;
          shift_d   = '0;
          cnt_clear = 1'b1;
        end
      end

      ST_COMPARE: begin
        if (shifting) begin
          comparison = 1'b1;
          shift_d    = shift_q + 1'b1;
        end else begin
          unique case (flu_verdict)
            FLU_NO_FAULT: begin
              pfd_update = 1'b1;
              state_d    = ST_NORMAL;
            end
            FLU_LOCATED: begin
              pfd_update = 1'b1;
              fmr1_d     = flu_fmr1;
              fmr2_d     = flu_fmr2;
              shift_d    = '0;
              if (single && (perm_now & flu_faulty) != '0) begin
                dis_d   = flu_fmr1;
                state_d = ST_MASTERCHECK;
              end else begin
                state_d = ST_RECOVER;
              end
            end
            default: state_d = ST_UNRECOVERABLE;
          endcase
        end
      end

      ST_RECOVER: begin
        if (shifting) begin
          recovery = 1'b1;
          shift_d  = shift_q + 1'b1;
        end else if (cnt_all_zero && !cnt_underflow) begin
          state_d = ST_NORMAL;
        end else begin
          state_d = ST_UNRECOVERABLE;
        end
      end

      ST_MASTERCHECK: begin
        if (mc_error) state_d = ST_UNRECOVERABLE;
      end

      default: state_d = ST_UNRECOVERABLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_NORMAL;
      shift_q <= '0;
      fmr1_q  <= MOD_NONE;
      fmr2_q  <= MOD_NONE;
      dis_q   <= MOD_NONE;
    end else begin
      state_q <= state_d;
      shift_q <= shift_d;
      fmr1_q  <= fmr1_d;
      fmr2_q  <= fmr2_d;
      dis_q   <= dis_d;
    end
  end

  assign state     = state_q;
  // The replicas stop in the very clock a trigger is seen, so the state the
  // comparison reads is the state in which the error was detected.
  assign run       = (state_q == ST_NORMAL && !(voter_error || checkpoint)) ||
                     (state_q == ST_MASTERCHECK);
  assign fmr1      = fmr1_q;
  assign fmr2      = fmr2_q;
  assign faulty    = id_to_mask(fmr1_q) | id_to_mask(fmr2_q);
  assign disregard = dis_q;
  assign uc        = (state_q == ST_UNRECOVERABLE);

  // Shifting happens in exactly one mode at a time.
  assert property (@(posedge clk) disable iff (!rst_n) !(comparison && recovery))
    else $error("smertmr_controller: comparison and recovery shift together");

endmodule
