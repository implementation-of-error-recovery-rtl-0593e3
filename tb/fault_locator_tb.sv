// fault_locator_tb: exhaustive self-checking test of the Fault Locator Unit
// over every combination of the three mismatch counts (CW = 2).
//
// The expected verdict is derived independently of the unit's rule order:
// for every hypothesis "set S of replicas is faulty" (S of size 1 or 2) the
// testbench checks whether the counts are consistent with it in the sense of
// the algorithm (for one faulty replica i: the two counts involving i equal
// and nonzero, the third zero; for two faulty replicas i, j with good k:
// count_ij equals count_ik + count_jk, both nonzero).  Since the single- and
// double-fault conditions cannot hold at once, exactly one hypothesis or
// none must match.  FMR ids are checked against the expected mask.
module fault_locator_tb;
  import smertmr_pkg::*;
  localparam int unsigned CW = 2;

  logic [2:0][CW-1:0] cnt;
  flu_verdict_e       verdict;
  logic [2:0]         faulty;
  mod_id_t            fmr1, fmr2;
  int                 checks = 0, failures = 0;

  fault_locator #(.CW(CW)) dut (.*);

  // Count between replicas a and b (0-based).
  function automatic int pc(int c12, int c13, int c23, int a, int b);
    if ((a == 0 && b == 1) || (a == 1 && b == 0)) return c12;
    if ((a == 0 && b == 2) || (a == 2 && b == 0)) return c13;
    return c23;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_single = 0, n_double = 0, n_none = 0, n_unrec = 0;

  initial begin
    for (int c12 = 0; c12 < (1 << CW); c12++)
      for (int c13 = 0; c13 < (1 << CW); c13++)
        for (int c23 = 0; c23 < (1 << CW); c23++) begin
          logic [2:0]   exp_mask;
          flu_verdict_e exp_v;
          int           n_match;
          mod_id_t      e1, e2;
          cnt[P12] = CW'(c12); cnt[P13] = CW'(c13); cnt[P23] = CW'(c23);
          #1;
          n_match  = 0;
          exp_mask = '0;
          for (int i = 0; i < 3; i++) begin
            int j, k;
            j = (i + 1) % 3; k = (i + 2) % 3;
            // i alone faulty
            if (pc(c12, c13, c23, i, j) == pc(c12, c13, c23, i, k) &&
                pc(c12, c13, c23, i, j) != 0 && pc(c12, c13, c23, j, k) == 0) begin
              n_match++; exp_mask = 3'(1 << i);
            end
            // i good, j and k faulty
            if (pc(c12, c13, c23, j, i) != 0 && pc(c12, c13, c23, k, i) != 0 &&
                pc(c12, c13, c23, j, k) == pc(c12, c13, c23, j, i) + pc(c12, c13, c23, k, i)) begin
              n_match++; exp_mask = 3'((1 << j) | (1 << k));
            end
          end
          if (c12 == 0 && c13 == 0 && c23 == 0) begin
            exp_v = FLU_NO_FAULT; n_none++;
          end else if (n_match == 1) begin
            exp_v = FLU_LOCATED;
            if ($countones(exp_mask) == 1) n_single++; else n_double++;
          end else begin
            exp_v = FLU_UNRECOVERABLE; exp_mask = '0; n_unrec++;
          end
          e1 = MOD_NONE; e2 = MOD_NONE;
          for (int i = 0; i < 3; i++)
            if (exp_mask[i]) begin
              if (e1 == MOD_NONE) e1 = mod_id_t'(i + 1); else e2 = mod_id_t'(i + 1);
            end
          checks++;
          if (n_match > 1 || verdict !== exp_v || faulty !== exp_mask ||
              fmr1 !== e1 || fmr2 !== e2) begin
            failures++;
            $display("FAIL c12=%0d c13=%0d c23=%0d: verdict=%0d mask=%b fmr=%0d,%0d exp %0d %b",
                     c12, c13, c23, verdict, faulty, fmr1, fmr2, exp_v, exp_mask);
          end
        end
    // Worked example from the algorithm: I and II faulty, x=1, y=2.
    cnt[P23] = 2'd1; cnt[P13] = 2'd2; cnt[P12] = 2'd3;
    #1;
    checks++;
    if (verdict !== FLU_LOCATED || faulty !== 3'b011 || fmr1 !== 2'd1 || fmr2 !== 2'd2) begin
      failures++;
      $display("FAIL worked example");
    end
    checks++;
    if (n_single == 0 || n_double == 0 || n_none == 0 || n_unrec == 0) begin
      failures++;
      $display("FAIL coverage %0d %0d %0d %0d", n_single, n_double, n_none, n_unrec);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
