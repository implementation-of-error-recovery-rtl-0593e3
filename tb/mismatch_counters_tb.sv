// mismatch_counters_tb: self-checking test of the pairwise XOR comparators
// and the counter12/13/23 up/down counters.
//
// Random scan-out bits are applied for LSC clocks in comparison mode and
// then for LSC clocks in recovery mode; a testbench model counts mismatches
// per pair up, then down.  Also checked: the XOR outputs every clock, that
// nothing counts when neither mode is active, that a recovery repeating the
// comparison's bit stream ends with all counters at zero, that a decrement
// below zero sets `underflow`, and that `clear` zeroes everything.
module mismatch_counters_tb;
  import smertmr_pkg::*;
  localparam int unsigned LSC = 3;
  localparam int unsigned CW  = $clog2(LSC + 1);

  logic               clk = 1'b0;
  logic               rst_n, clear, count_up, count_dn;
  logic [2:0]         sco;
  logic [2:0][CW-1:0] cnt;
  logic [2:0]         mismatch;
  logic               all_zero, underflow;
  int                 checks = 0, failures = 0;
  int                 m [3];
  bit                 m_under;

  mismatch_counters #(.LSC(LSC)) dut (.*);

  always #5 clk = ~clk;

  function automatic bit pair_mm(logic [2:0] s, int p);
    case (p)
      0:       return s[0] != s[1];
      1:       return s[0] != s[2];
      default: return s[1] != s[2];
    endcase
  endfunction

  task automatic compare_model(string what);
    checks++;
    if (int'(cnt[P12]) != m[0] || int'(cnt[P13]) != m[1] || int'(cnt[P23]) != m[2] ||
        all_zero !== (m[0] == 0 && m[1] == 0 && m[2] == 0) || underflow !== m_under) begin
      failures++;
      $display("FAIL %s: cnt=%0d/%0d/%0d model=%0d/%0d/%0d uf=%b/%b", what,
               cnt[P12], cnt[P13], cnt[P23], m[0], m[1], m[2], underflow, m_under);
    end
  endtask

  task automatic step(logic up, logic dn, logic [2:0] s);
    count_up = up; count_dn = dn; sco = s;
    #1;
    checks++;
    for (int p = 0; p < 3; p++)
      if (mismatch[p] !== pair_mm(s, p)) begin
        failures++;
        $display("FAIL xor pair %0d", p);
      end
    @(posedge clk); #1;
    for (int p = 0; p < 3; p++)
      if (pair_mm(s, p)) begin
        if (up) m[p]++;
        else if (dn) begin
          if (m[p] == 0) m_under = 1'b1;
          else m[p]--;
        end
      end
    count_up = 1'b0; count_dn = 1'b0;
  endtask

  task automatic do_clear();
    clear = 1'b1;
    @(posedge clk); #1;
    clear = 1'b0;
    m = '{0, 0, 0}; m_under = 1'b0;
    compare_model("clear");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; clear = 1'b0; count_up = 1'b0; count_dn = 1'b0; sco = '0;
    m = '{0, 0, 0}; m_under = 1'b0;
    #12 rst_n = 1'b1;
    compare_model("reset");

    for (int r = 0; r < 100; r++) begin
      logic [2:0] stream [LSC];
      do_clear();
      for (int b = 0; b < LSC; b++) begin
        stream[b] = 3'($urandom);
        step(1'b1, 1'b0, stream[b]);
        compare_model("count up");
      end
      // Idle: no counting.
      step(1'b0, 1'b0, 3'($urandom));
      compare_model("idle");
      // Recovery: replay the same stream (clean) or a random one.
      for (int b = 0; b < LSC; b++) begin
        step(1'b0, 1'b1, (r % 2 == 0) ? stream[b] : 3'($urandom));
        compare_model("count down");
      end
      if (r % 2 == 0) begin
        checks++;
        if (!all_zero || underflow) begin
          failures++;
          $display("FAIL clean recovery did not return to zero");
        end
      end
    end

    // Explicit underflow.
    do_clear();
    step(1'b0, 1'b1, 3'b001);
    compare_model("underflow");
    checks++;
    if (!underflow) begin
      failures++;
      $display("FAIL underflow not flagged");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
