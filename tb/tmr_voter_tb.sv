// tmr_voter_tb: exhaustive self-checking test of the TMR output voter at
// W = 3: every combination of the three replica outputs, voted value
// computed bit by bit by counting ones, error computed from equality.
module tmr_voter_tb;
  localparam int unsigned W = 3;

  logic [2:0][W-1:0] q;
  logic [W-1:0]      voted;
  logic              error;
  int                checks = 0, failures = 0;

  tmr_voter #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << W); a++)
      for (int b = 0; b < (1 << W); b++)
        for (int c = 0; c < (1 << W); c++) begin
          logic [W-1:0] exp_v;
          logic         exp_e;
          q[0] = W'(a); q[1] = W'(b); q[2] = W'(c);
          #1;
          for (int k = 0; k < W; k++) begin
            int ones;
            ones = int'(q[0][k]) + int'(q[1][k]) + int'(q[2][k]);
            exp_v[k] = (ones >= 2);
          end
          exp_e = !(a == b && b == c);
          checks++;
          if (voted !== exp_v || error !== exp_e) begin
            failures++;
            $display("FAIL %0d %0d %0d: voted=%b error=%b", a, b, c, voted, error);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
