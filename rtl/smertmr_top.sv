// smertmr_top: a triple-modular-redundant system with scan-chain-based
// multiple error recovery (SMERTMR).
//
// Three replicas of a W-bit circuit (tmr_module) run in lock step and their
// outputs are voted (tmr_voter).  A voter error, or the checkpoint input
// (meant to be raised in slack time to flush out latent faults), starts the
// comparison mode: the controller rotates every replica's scan chain once
// around (LSC = W clocks) while mismatch_counters counts, per replica pair,
// the bits in which their states differ.  The fault locator turns the three
// counts into "no fault", "replica i faulty", "replicas i and j faulty" or
// "unrecoverable"; the result goes into the faulty modules register (FMR1,
// FMR2) and to the permanent fault detector.  In recovery mode scan_router
// feeds each faulty replica's scan-in from the first fault-free replica for
// another LSC clocks, copying the good state over, while the counters count
// the same mismatches back down; all counters at zero at the end means the
// copy was clean.  A replica found faulty more than TR comparisons in a row is
// treated as permanently faulty and the system drops to master/checker
// operation on the other two.  Anything the scheme cannot resolve ends in
// the unrecoverable condition (`uc`), left only by reset.
//
// Interface: `c_in` steps the replicas; `out` is the voted output in normal
// operation and the master's output in master/checker mode, qualified by
// `out_valid` (low while the chains are shifting and after `uc`).
// `offline_test` hands the scan chains to `test_si`/`sco` for scan testing.
// `fis` flips replica state bits for fault-injection experiments; tie it to
// zero in use.  The remaining outputs expose the state, the replica values
// (c1..c3) and FMR for observation.  Clock: rising edge; reset: asynchronous,
// active low.
module smertmr_top
  import smertmr_pkg::*;
#(
  parameter int unsigned W  = 3,   // state bits per replica = scan chain length
  parameter int unsigned TR = 2    // permanent fault threshold on NCF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              c_in,
  input  logic              checkpoint,
  input  logic              offline_test,
  input  logic [2:0]        test_si,
  input  logic [2:0][W-1:0] fis,
  output logic [W-1:0]      out,
  output logic              out_valid,
  output logic              voter_error,
  output logic [2:0][W-1:0] q,
  output logic [2:0]        sco,
  output state_e            state,
  output logic              comp,
  output logic              rec,
  output logic              mc,
  output logic              uc,
  output mod_id_t           fmr1,
  output mod_id_t           fmr2,
  output logic [2:0]        f_mask,   // F(1..3) decoded from FMR
  output logic [2:0]        mrfm      // most recent faulty modules
);

  localparam int unsigned LSC = W;
  localparam int unsigned CW  = $clog2(LSC + 1);

  logic               sce, run, comparison, recovery, cnt_clear, pfd_update;
  logic [2:0]         sci, faulty, flu_faulty, perm_now;
  logic [2:0][CW-1:0] cnt;
  logic               cnt_all_zero, cnt_underflow, mc_error;
  logic [W-1:0]       voted, mc_out;
  flu_verdict_e       flu_verdict;
  mod_id_t            flu_fmr1, flu_fmr2, disregard;

  for (genvar i = 0; i < 3; i++) begin : g_mod
    tmr_module #(.W(W)) u_mod (
      .clk  (clk),
      .rst_n(rst_n),
      .c_in (c_in & run),
      .sce  (sce),
      .sci  (sci[i]),
      .fis  (fis[i]),
      .q    (q[i]),
      .sco  (sco[i])
    );
  end

  tmr_voter #(.W(W)) u_voter (
    .q    (q),
    .voted(voted),
    .error(voter_error)
  );

  mismatch_counters #(.LSC(LSC)) u_cnt (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (cnt_clear),
    .count_up (comparison),
    .count_dn (recovery),
    .sco      (sco),
    .cnt      (cnt),
    .mismatch (),
    .all_zero (cnt_all_zero),
    .underflow(cnt_underflow)
  );

  fault_locator #(.CW(CW)) u_flu (
    .cnt    (cnt),
    .verdict(flu_verdict),
    .faulty (flu_faulty),
    .fmr1   (flu_fmr1),
    .fmr2   (flu_fmr2)
  );

  scan_router u_route (
    .comparison  (comparison),
    .recovery    (recovery),
    .offline_test(offline_test && state == ST_NORMAL),
    .faulty      (faulty),
    .sco         (sco),
    .test_si     (test_si),
    .sci         (sci),
    .sce         (sce),
    .src_idx     ()
  );

  permanent_fault_detector #(.TR(TR)) u_pfd (
    .clk     (clk),
    .rst_n   (rst_n),
    .update  (pfd_update),
    .faulty  (flu_faulty),
    .mrfm    (mrfm),
    .ncf     (),
    .perm_now(perm_now)
  );

  master_checker #(.W(W)) u_mc (
    .q        (q),
    .disregard(disregard),
    .out      (mc_out),
    .mc_error (mc_error),
    .master_id (),
    .checker_id()
  );

  smertmr_controller #(.LSC(LSC)) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .voter_error  (voter_error),
    .checkpoint   (checkpoint),
    .offline_test (offline_test),
    .flu_verdict  (flu_verdict),
    .flu_faulty   (flu_faulty),
    .flu_fmr1     (flu_fmr1),
    .flu_fmr2     (flu_fmr2),
    .perm_now     (perm_now),
    .cnt_all_zero (cnt_all_zero),
    .cnt_underflow(cnt_underflow),
    .mc_error     (mc_error),
    .state        (state),
    .comparison   (comparison),
    .recovery     (recovery),
    .cnt_clear    (cnt_clear),
    .pfd_update   (pfd_update),
    .run          (run),
    .fmr1         (fmr1),
    .fmr2         (fmr2),
    .faulty       (faulty),
    .disregard    (disregard),
    .uc           (uc)
  );

  assign mc        = (state == ST_MASTERCHECK);
  assign comp      = (state == ST_COMPARE);
  assign rec       = (state == ST_RECOVER);
  assign out       = mc ? mc_out : voted;
  assign out_valid = run;
  assign f_mask    = faulty;

endmodule
