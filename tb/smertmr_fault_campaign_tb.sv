// smertmr_fault_campaign_tb: exhaustive fault-injection campaign on the
// SMERTMR system at its default size (3-bit replicas).
//
// For every replica start value and every combination of flip masks on the
// three replicas (8 x 8 x 8 x 8 = 4096 experiments) the system is reset,
// brought to the start value, hit with the masks in one clock (replicas not
// counting in that clock) and left to react.  The testbench predicts the
// outcome independently from the Hamming distances between the corrupted
// replica states:
//   * all replicas still equal        -> nothing is detected (a common-mode
//                                        fault is invisible to any TMR);
//   * the distance pattern fits a single- or double-fault hypothesis
//                                     -> recovery, after which every replica
//                                        holds the state of the lowest-numbered
//                                        replica judged fault-free;
//   * no hypothesis fits              -> unrecoverable condition.
// Every experiment is checked against that prediction.  Additionally every
// single fault and every double fault in disjoint bits must restore the
// original value.  A summary of repaired, wrongly repaired (double faults
// in overlapping bits that the distance rule attributes to the wrong pair),
// unrecoverable and undetected cases is printed.
module smertmr_fault_campaign_tb;
  import smertmr_pkg::*;
  localparam int unsigned W = 3;

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
  int n_repaired = 0, n_misrepaired = 0, n_unrec = 0, n_undetected = 0;
  int n_single = 0, n_double_disjoint = 0;
  // Outcome per fault class: 0 single, 1 double in disjoint bits,
  // 2 double in overlapping bits, 3 all three replicas hit.
  int cls_ok [4] = '{0, 0, 0, 0};
  int cls_bad [4] = '{0, 0, 0, 0};
  int cls_uc [4] = '{0, 0, 0, 0};

  smertmr_top dut (.*);

  always #5 clk = ~clk;

  // Number of replicas with a nonzero flip mask.
  function automatic int hit_count(logic [2:0][W-1:0] f);
    int n;
    n = 0;
    for (int i = 0; i < 3; i++) if (f[i] != '0) n++;
    return n;
  endfunction

  function automatic int hd(logic [W-1:0] a, logic [W-1:0] b);
    return $countones(a ^ b);
  endfunction

  // Returns the predicted faulty mask, or 3'b111 for "unrecoverable".
  function automatic logic [2:0] predict(logic [2:0][W-1:0] v);
    int         d [3][3];
    int         hits;
    logic [2:0] mask;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) d[i][j] = hd(v[i], v[j]);
    hits = 0; mask = 3'b111;
    for (int i = 0; i < 3; i++) begin
      int j, k;
      j = (i + 1) % 3; k = (i + 2) % 3;
      if (d[i][j] == d[i][k] && d[i][j] != 0 && d[j][k] == 0) begin
        hits++; mask = 3'(1 << i);
      end
      if (d[i][j] != 0 && d[i][k] != 0 && d[j][k] == d[i][j] + d[i][k]) begin
        hits++; mask = 3'((1 << j) | (1 << k));
      end
    end
    return (hits == 1) ? mask : 3'b111;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    for (int c = 0; c < 4; c++)
      $display("  %s: restored=%0d wrong_state=%0d unrecoverable=%0d",
               c == 0 ? "single replica" : c == 1 ? "two replicas, disjoint bits" :
               c == 2 ? "two replicas, shared bits" : "three replicas",
               cls_ok[c], cls_bad[c], cls_uc[c]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    c_in = 1'b0; checkpoint = 1'b0; offline_test = 1'b0; test_si = '0; fis = '0;
    for (int v = 0; v < (1 << W); v++)
      for (int m = 0; m < (1 << (3 * W)); m++) begin
        logic [2:0][W-1:0] f, corrupt;
        logic [2:0]        exp_mask;
        logic [W-1:0]      exp_val;
        int                n, src, nz, cls;

        rst_n = 1'b0;
        @(posedge clk); #1;
        rst_n = 1'b1;
        // Count down from 0 to v: (8 - v) mod 8 steps.
        c_in = 1'b1;
        repeat (((1 << W) - v) % (1 << W)) begin
          @(posedge clk); #1;
        end
        c_in = 1'b0;
        f = (3 * W)'(m);
        for (int i = 0; i < 3; i++) corrupt[i] = W'(v) ^ f[i];
        nz  = hit_count(f);
        cls = (nz == 3) ? 3 : (nz == 1) ? 0 :
              ((f[0] & f[1]) | (f[0] & f[2]) | (f[1] & f[2])) == '0 ? 1 : 2;
        fis = f;
        @(posedge clk); #1;
        fis = '0;

        if (corrupt[0] == corrupt[1] && corrupt[1] == corrupt[2]) begin
          checks++;
          if (voter_error || state != ST_NORMAL || q != corrupt) begin
            failures++;
            $display("FAIL v=%0d f=%h: common-mode case disturbed", v, f);
          end
          if (f[0] != '0) n_undetected++;
          continue;
        end

        n = 0;
        do begin
          @(posedge clk); #1;
          n++;
        end while (state != ST_NORMAL && state != ST_UNRECOVERABLE &&
                   state != ST_MASTERCHECK && n < 50);
        // One clock of normal state at least has passed if recovery ran.
        exp_mask = predict(corrupt);
        checks++;
        if (exp_mask == 3'b111) begin
          if (!uc) begin
            failures++;
            $display("FAIL v=%0d f=%h: expected unrecoverable, state=%s", v, f, state.name());
          end
          n_unrec++;
          cls_uc[cls]++;
        end else begin
          src = 0;
          while (exp_mask[src]) src++;
          exp_val = corrupt[src];
          if (state != ST_NORMAL || f_mask != exp_mask ||
              q[0] != exp_val || q[1] != exp_val || q[2] != exp_val) begin
            failures++;
            $display("FAIL v=%0d f=%h: state=%s mask=%b exp %b q=%h exp %h", v, f,
                     state.name(), f_mask, exp_mask, q, exp_val);
          end
          if (exp_val == W'(v)) begin
            n_repaired++; cls_ok[cls]++;
          end else begin
            n_misrepaired++; cls_bad[cls]++;
          end
        end
        // Single faults and disjoint double faults must restore the value.
        if (nz == 1 || (nz == 2 &&
             (f[0] & f[1]) == '0 && (f[0] & f[2]) == '0 && (f[1] & f[2]) == '0)) begin
          checks++;
          if (!(state == ST_NORMAL && q[0] == W'(v) && q[1] == W'(v) && q[2] == W'(v))) begin
            failures++;
            $display("FAIL v=%0d f=%h: single/disjoint fault not restored", v, f);
          end
          if (nz == 1) n_single++;
          else n_double_disjoint++;
        end
      end
    checks++;
    if (n_single != 8 * 3 * 7 || n_double_disjoint == 0 || n_unrec == 0) begin
      failures++;
      $display("FAIL campaign coverage");
    end
    $display("campaign: repaired=%0d wrongly_repaired=%0d unrecoverable=%0d undetected=%0d (single=%0d disjoint_double=%0d)",
             n_repaired, n_misrepaired, n_unrec, n_undetected, n_single, n_double_disjoint);
    for (int c = 0; c < 4; c++)
      $display("  %s: restored=%0d wrong_state=%0d unrecoverable=%0d",
               c == 0 ? "single replica" : c == 1 ? "two replicas, disjoint bits" :
               c == 2 ? "two replicas, shared bits" : "three replicas",
               cls_ok[c], cls_bad[c], cls_uc[c]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
