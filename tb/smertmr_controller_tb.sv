// smertmr_controller_tb: self-checking test of the SMERTMR controller with
// its inputs driven directly (no replicas).
//
// Each scenario walks one path of the state diagram and checks the state
// after every clock, the number of clocks the shift enables stay high (LSC
// each for comparison and recovery), `run`, the counter clear and the
// permanent-detector update strobe, the FMR contents and its decoded mask,
// and the disregarded replica in master/checker mode.  Paths: checkpoint
// with no fault; voter error with two faulty replicas and a clean recovery;
// recovery with a leftover count; recovery with an underflow; unlocatable
// pattern; permanent fault to master/checker and its error exit; a
// permanent verdict with two faulty replicas (recovers instead); off-line
// testing masking the triggers.
module smertmr_controller_tb;
  import smertmr_pkg::*;
  localparam int unsigned LSC = 3;

  logic         clk = 1'b0;
  logic         rst_n, voter_error, checkpoint, offline_test;
  flu_verdict_e flu_verdict;
  logic [2:0]   flu_faulty, perm_now, faulty;
  mod_id_t      flu_fmr1, flu_fmr2, fmr1, fmr2, disregard;
  logic         cnt_all_zero, cnt_underflow, mc_error;
  state_e       state;
  logic         comparison, recovery, cnt_clear, pfd_update, run, uc;
  int           checks = 0, failures = 0;

  smertmr_controller #(.LSC(LSC)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (state=%s)", what, state.name());
    end
  endtask

  task automatic idle_inputs();
    voter_error = 0; checkpoint = 0; offline_test = 0;
    flu_verdict = FLU_NO_FAULT; flu_faulty = '0; flu_fmr1 = MOD_NONE; flu_fmr2 = MOD_NONE;
    perm_now = '0; cnt_all_zero = 1; cnt_underflow = 0; mc_error = 0;
  endtask

  task automatic do_reset();
    idle_inputs();
    rst_n = 0;
    @(posedge clk); #1;
    rst_n = 1;
    expect_true(state == ST_NORMAL && !uc && run, "reset to normal");
  endtask

  // Trigger a comparison, check LSC shift clocks, stop at the decision clock.
  task automatic enter_compare(bit by_error);
    if (by_error) voter_error = 1; else checkpoint = 1;
    #1;
    expect_true(cnt_clear && !run, "counters cleared and replicas stopped on trigger");
    @(posedge clk); #1;
    voter_error = 0; checkpoint = 0;
    expect_true(state == ST_COMPARE && !run, "in comparison");
    for (int c = 0; c < LSC; c++) begin
      expect_true(comparison && !recovery && !pfd_update, "comparison shift clock");
      @(posedge clk); #1;
    end
    expect_true(state == ST_COMPARE && !comparison, "comparison decision clock");
  endtask

  task automatic run_recovery(bit zero, bit under, state_e exp_end);
    expect_true(state == ST_RECOVER && !run, "in recovery");
    for (int c = 0; c < LSC; c++) begin
      expect_true(recovery && !comparison, "recovery shift clock");
      @(posedge clk); #1;
    end
    expect_true(!recovery, "recovery decision clock");
    cnt_all_zero = zero; cnt_underflow = under;
    @(posedge clk); #1;
    expect_true(state == exp_end, "state after recovery");
    cnt_all_zero = 1; cnt_underflow = 0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    do_reset();
    repeat (3) @(posedge clk);
    #1 expect_true(state == ST_NORMAL, "stays normal without trigger");

    // 1) Checkpoint, no fault.
    enter_compare(0);
    flu_verdict = FLU_NO_FAULT;
    #1 expect_true(pfd_update, "history updated after clean comparison");
    @(posedge clk); #1;
    expect_true(state == ST_NORMAL, "no fault -> normal");

    // 2) Voter error, modules I and II faulty, clean recovery.
    enter_compare(1);
    flu_verdict = FLU_LOCATED; flu_faulty = 3'b011; flu_fmr1 = 2'd1; flu_fmr2 = 2'd2;
    #1 expect_true(pfd_update, "history updated");
    @(posedge clk); #1;
    idle_inputs();
    expect_true(fmr1 == 2'd1 && fmr2 == 2'd2 && faulty == 3'b011, "FMR loaded");
    run_recovery(1, 0, ST_NORMAL);
    expect_true(fmr1 == 2'd1 && fmr2 == 2'd2, "FMR kept after recovery");

    // 3) Recovery ends with a nonzero counter.
    enter_compare(1);
    flu_verdict = FLU_LOCATED; flu_faulty = 3'b100; flu_fmr1 = 2'd3; flu_fmr2 = MOD_NONE;
    @(posedge clk); #1;
    idle_inputs();
    expect_true(faulty == 3'b100, "FMR module III");
    run_recovery(0, 0, ST_UNRECOVERABLE);
    expect_true(uc, "uc flag");
    voter_error = 1; checkpoint = 1;
    repeat (3) @(posedge clk);
    #1 expect_true(state == ST_UNRECOVERABLE, "unrecoverable is sticky");
    do_reset();

    // 4) Recovery with underflow.
    enter_compare(1);
    flu_verdict = FLU_LOCATED; flu_faulty = 3'b001; flu_fmr1 = 2'd1;
    @(posedge clk); #1;
    idle_inputs();
    run_recovery(1, 1, ST_UNRECOVERABLE);
    do_reset();

    // 5) Unlocatable pattern.
    enter_compare(1);
    flu_verdict = FLU_UNRECOVERABLE;
    @(posedge clk); #1;
    expect_true(state == ST_UNRECOVERABLE, "unlocatable -> unrecoverable");
    do_reset();

    // 6) Permanent fault in module II -> master/checker, then its error.
    enter_compare(1);
    flu_verdict = FLU_LOCATED; flu_faulty = 3'b010; flu_fmr1 = 2'd2; perm_now = 3'b010;
    @(posedge clk); #1;
    idle_inputs();
    expect_true(state == ST_MASTERCHECK && disregard == 2'd2 && run, "master/checker");
    voter_error = 1; checkpoint = 1;
    repeat (4) @(posedge clk);
    #1 expect_true(state == ST_MASTERCHECK && !comparison, "voter/checkpoint ignored in M/C");
    voter_error = 0; checkpoint = 0;
    mc_error = 1;
    @(posedge clk); #1;
    expect_true(state == ST_UNRECOVERABLE, "M/C error -> unrecoverable");
    do_reset();

    // 7) Permanent verdict with two faulty replicas -> recovery.
    enter_compare(0);
    flu_verdict = FLU_LOCATED; flu_faulty = 3'b110; flu_fmr1 = 2'd2; flu_fmr2 = 2'd3;
    perm_now = 3'b010;
    @(posedge clk); #1;
    idle_inputs();
    run_recovery(1, 0, ST_NORMAL);

    // 8) Off-line testing masks the triggers.
    offline_test = 1; voter_error = 1; checkpoint = 1;
    repeat (4) @(posedge clk);
    #1 expect_true(state == ST_NORMAL && !comparison, "off-line test masks triggers");
    idle_inputs();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
