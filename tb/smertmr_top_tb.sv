// smertmr_top_tb: end-to-end self-checking test of the SMERTMR system at its
// default size (3-bit replicas, scan chain length 3, threshold TR = 2).
//
// A golden down counter in the testbench steps whenever the system lets the
// replicas run, so after every repair the replicas and the system output
// can be compared with the value a fault-free replica would hold.  Faults
// are injected through the replicas' flip masks.  Scenarios:
//   * two replicas (I and II) hit at once in different bits - located as a
//     double fault and both repaired (the published scheme's own demonstration case);
//   * single faults in each replica, repaired;
//   * a checkpoint with no fault (state preserved) and a checkpoint raised in
//     the clock a fault lands, so the checkpoint starts the comparison;
//   * a new fault during recovery -> unrecoverable;
//   * three replicas hit in different bits -> unlocatable -> unrecoverable;
//   * the same replica faulty TR+1 comparisons in a row -> master/checker,
//     output from the master, then a master fault -> unrecoverable;
//   * off-line scan testing: a pattern shifted in through the scan inputs;
//   * a random soak of single and double faults, each followed by a clean
//     checkpoint.
// Latency is checked: a transient fault found by the voter is repaired
// 2*LSC+3 clocks after the clock that injects it (one clock less when a
// checkpoint starts the comparison in that same clock), and a clean checkpoint returns to normal
// LSC+2 clocks after it is raised.  Each mechanism is counted and a
// mechanism that never happened counts as a failure.
module smertmr_top_tb;
  import smertmr_pkg::*;
  localparam int unsigned W   = 3;
  localparam int unsigned LSC = W;
  localparam int unsigned TR  = 2;

  logic              clk = 1'b0;
  logic              rst_n, c_in, checkpoint, offline_test;
  logic [2:0]        test_si;
  logic [2:0][W-1:0] fis;
  logic [W-1:0]      out;
  logic              out_valid, voter_error;
  logic [2:0][W-1:0] q;
  logic [2:0]        sco;
  state_e            state;
  logic              comp, rec, mc, uc;
  mod_id_t           fmr1, fmr2;
  logic [2:0]        f_mask, mrfm;

  int checks = 0, failures = 0;
  int n_cmp_voter = 0, n_cmp_ckpt = 0, n_no_fault = 0, n_rec_single = 0;
  int n_rec_double = 0, n_unrec_locate = 0, n_unrec_recovery = 0;
  int n_mc = 0, n_mc_error = 0, n_offline = 0;

  logic [W-1:0] gold;
  logic         gold_load;
  logic [W-1:0] gold_val;

  smertmr_top dut (.*);

  always #5 clk = ~clk;

  // The step decision is sampled mid-cycle, when the inputs and out_valid
  // are settled, and applied at the next rising edge.
  logic gold_step;
  always @(negedge clk) gold_step = c_in && out_valid;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n)         gold <= '0;
    else if (gold_load) gold <= gold_val;
    else if (gold_step) gold <= gold - 1'b1;
  end

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: state=%s q=%h gold=%h fmr=%0d,%0d", what, state.name(), q, gold,
               fmr1, fmr2);
    end
  endtask

  task automatic expect_healthy(string what);
    expect_true(state == ST_NORMAL && !voter_error && out_valid &&
                q[0] == gold && q[1] == gold && q[2] == gold && out == gold, what);
  endtask

  task automatic do_reset();
    rst_n = 1'b0; c_in = 1'b0; checkpoint = 1'b0; offline_test = 1'b0;
    test_si = '0; fis = '0; gold_load = 1'b0; gold_val = '0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    expect_healthy("after reset");
  endtask

  task automatic run_clocks(int n);
    repeat (n) begin
      c_in = 1'($urandom);
      @(posedge clk); #1;
    end
  endtask

  // Inject flip masks in the next clock (optionally with a checkpoint).
  task automatic inject(logic [W-1:0] f0, logic [W-1:0] f1, logic [W-1:0] f2, bit ckpt);
    fis[0] = f0; fis[1] = f1; fis[2] = f2;
    checkpoint = ckpt;
    @(posedge clk); #1;
    fis = '0; checkpoint = 1'b0;
  endtask

  // Clocks until the state is `st` (bounded).
  task automatic wait_state(state_e st, output int n);
    n = 0;
    while (state != st && n < 100) begin
      @(posedge clk); #1;
      n++;
    end
  endtask

  // A transient fault in the replicas of `mask`, with flips f, checked to be
  // repaired in 2*LSC+3 clocks counted from the injecting clock.
  task automatic transient(logic [2:0][W-1:0] f, bit ckpt, string what);
    int n;
    logic [2:0] exp_mask;
    for (int i = 0; i < 3; i++) exp_mask[i] = (f[i] != '0);
    inject(f[0], f[1], f[2], ckpt);
    c_in = 1'b1;
    if (ckpt) n_cmp_ckpt++; else n_cmp_voter++;
    expect_true(ckpt ? state == ST_COMPARE : voter_error, {what, ": detected"});
    // Clocks after the injecting one until normal operation resumes.
    n = 0;
    do begin
      @(posedge clk); #1;
      n++;
    end while (state != ST_NORMAL && n < 100);
    expect_true(n == (ckpt ? 2 * LSC + 2 : 2 * LSC + 3),
                $sformatf("%s: repair latency %0d", what, n));
    expect_healthy({what, ": repaired"});
    expect_true(f_mask == exp_mask, {what, ": FMR names the faulty replicas"});
    if ($countones(exp_mask) == 1) n_rec_single++; else n_rec_double++;
  endtask

  task automatic clean_checkpoint();
    int n;
    checkpoint = 1'b1;
    @(posedge clk); #1;
    checkpoint = 1'b0;
    n_cmp_ckpt++;
    expect_true(state == ST_COMPARE && !out_valid, "checkpoint starts comparison");
    wait_state(ST_NORMAL, n);
    expect_true(n + 1 == LSC + 2, $sformatf("clean checkpoint latency %0d", n + 1));
    expect_healthy("after clean checkpoint");
    n_no_fault++;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    do_reset();
    run_clocks(7);
    expect_healthy("normal operation");

    // Double fault in I and II (the published demonstration case).
    transient({3'b000, 3'b010, 3'b001}, 1'b0, "double fault I+II");
    expect_true(fmr1 == 2'd1 && fmr2 == 2'd2, "FMR1=I, FMR2=II");
    run_clocks(5);

    // Single faults in each replica.
    for (int i = 0; i < 3; i++) begin
      logic [2:0][W-1:0] f;
      f = '0;
      f[i] = 3'b101;
      transient(f, 1'b0, $sformatf("single fault %0d", i + 1));
      run_clocks(3);
    end

    // Clean checkpoint, then a checkpoint catching a fault as it lands.
    clean_checkpoint();
    transient({3'b000, 3'b000, 3'b100}, 1'b1, "fault caught by checkpoint");
    clean_checkpoint();

    // A fault during recovery: replica I is being repaired from II while
    // replica III (fault-free) is hit after the first shift.
    begin
      int n;
      inject(3'b001, 3'b000, 3'b000, 1'b0);
      n_cmp_voter++;
      wait_state(ST_RECOVER, n);
      @(posedge clk); #1;
      fis[2] = 3'b100;
      @(posedge clk); #1;
      fis = '0;
      wait_state(ST_UNRECOVERABLE, n);
      expect_true(uc && !out_valid, "fault during recovery -> unrecoverable");
      if (uc) n_unrec_recovery++;
    end
    do_reset();

    // Three replicas hit in different bits: cannot be located.
    begin
      int n;
      inject(3'b001, 3'b010, 3'b100, 1'b0);
      n_cmp_voter++;
      wait_state(ST_UNRECOVERABLE, n);
      expect_true(uc && n == LSC + 2, $sformatf("unlocatable -> unrecoverable in %0d", n));
      if (uc) n_unrec_locate++;
    end
    do_reset();
    run_clocks(4);

    // Same replica (II) faulty TR+1 times in a row -> master/checker.
    for (int k = 0; k < int'(TR); k++) begin
      transient({3'b000, 3'b011, 3'b000}, 1'b0, $sformatf("repeat fault II #%0d", k + 1));
      expect_true(mrfm == 3'b010, "MRFM records replica II");
    end
    begin
      int n;
      inject(3'b000, 3'b110, 3'b000, 1'b0);
      n_cmp_voter++;
      wait_state(ST_MASTERCHECK, n);
      expect_true(mc && n == LSC + 2, $sformatf("permanent fault -> M/C in %0d", n));
      if (mc) n_mc++;
      run_clocks(6);
      expect_true(mc && out_valid && out == gold && q[0] == gold && q[2] == gold,
                  "M/C output from master I, checker III agrees");
      // Replica II keeps misbehaving; nothing happens.
      inject(3'b000, 3'b001, 3'b000, 1'b1);
      run_clocks(3);
      expect_true(mc && out == gold, "disregarded replica ignored");
      // Now the master is hit.
      inject(3'b010, 3'b000, 3'b000, 1'b0);
      @(posedge clk); #1;
      expect_true(uc, "master/checker error -> unrecoverable");
      if (uc) n_mc_error++;
    end
    do_reset();

    // Off-line scan test: shift a pattern into all three chains.
    begin
      logic [W-1:0] pat, old_q;
      run_clocks(5);
      c_in = 1'b0;
      pat    = 3'b110;
      old_q  = q[0];
      offline_test = 1'b1;
      for (int b = W - 1; b >= 0; b--) begin
        test_si = {3{pat[b]}};
        expect_true(sco == {3{old_q[b]}}, "scan-out shows old state");
        @(posedge clk); #1;
      end
      gold_val = pat; gold_load = 1'b1;
      offline_test = 1'b0;
      expect_true(q[0] == pat && q[1] == pat && q[2] == pat && state == ST_NORMAL,
                  "off-line test loaded pattern");
      if (q[0] == pat) n_offline++;
      @(posedge clk); #1;
      gold_load = 1'b0;
      expect_healthy("after off-line test");
    end

    // Random soak.
    for (int r = 0; r < 60; r++) begin
      logic [2:0][W-1:0] f;
      int a, b;
      run_clocks(1 + $urandom % 5);
      f = '0;
      a = $urandom % 3;
      f[a] = W'(1 + $urandom % ((1 << W) - 1));
      if ($urandom % 2 == 1) begin
        // a second replica, in bits disjoint from the first
        b = (a + 1 + $urandom % 2) % 3;
        f[b] = ~f[a] & W'($urandom);
      end
      transient(f, 1'($urandom % 4 == 0), $sformatf("soak %0d", r));
      clean_checkpoint();
    end

    // Mechanism coverage.
    expect_true(n_cmp_voter > 0, "comparison started by voter");
    expect_true(n_cmp_ckpt > 0, "comparison started by checkpoint");
    expect_true(n_no_fault > 0, "comparison found no fault");
    expect_true(n_rec_single > 0, "single-replica recovery");
    expect_true(n_rec_double > 0, "double-replica recovery");
    expect_true(n_unrec_locate > 0, "unlocatable faults");
    expect_true(n_unrec_recovery > 0, "unsuccessful recovery");
    expect_true(n_mc > 0, "master/checker entered");
    expect_true(n_mc_error > 0, "master/checker error");
    expect_true(n_offline > 0, "off-line scan test");
    $display("mechanisms: voter=%0d ckpt=%0d nofault=%0d single=%0d double=%0d unloc=%0d unrec=%0d mc=%0d mcerr=%0d offline=%0d",
             n_cmp_voter, n_cmp_ckpt, n_no_fault, n_rec_single, n_rec_double, n_unrec_locate,
             n_unrec_recovery, n_mc, n_mc_error, n_offline);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
