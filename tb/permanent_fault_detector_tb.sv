// permanent_fault_detector_tb: self-checking test of the MRFM/NCF history.
//
// Random sequences of comparison results (faulty masks, with long runs of the
// same replica to reach the threshold) are presented with `update`; a
// testbench model tracks the consecutive-fault count per replica.  Checked
// every step: `perm_now` (count after this result exceeds TR), and after
// the clock the MRFM register and the NCF values.  Also checked: nothing
// changes without `update`, and that a replica faulty TR+1 times in a row is
// declared permanent exactly at the (TR+1)-th result.
module permanent_fault_detector_tb;
  localparam int unsigned TR = 2;
  localparam int unsigned NW = $clog2(TR + 2);

  logic               clk = 1'b0;
  logic               rst_n, update;
  logic [2:0]         faulty, mrfm, perm_now;
  logic [2:0][NW-1:0] ncf;
  int                 checks = 0, failures = 0;
  int                 m_ncf [3];
  logic [2:0]         m_mrfm;
  int                 n_perm = 0;

  permanent_fault_detector #(.TR(TR)) dut (.*);

  always #5 clk = ~clk;

  task automatic present(logic [2:0] f, logic upd);
    logic [2:0] exp_perm;
    int         nxt [3];
    faulty = f; update = upd;
    #1;
    for (int i = 0; i < 3; i++) begin
      nxt[i] = f[i] ? m_ncf[i] + 1 : 0;
      if (nxt[i] > (1 << NW) - 1) nxt[i] = (1 << NW) - 1;
      exp_perm[i] = f[i] && nxt[i] > TR;
    end
    checks++;
    if (perm_now !== exp_perm) begin
      failures++;
      $display("FAIL perm_now=%b exp=%b (f=%b)", perm_now, exp_perm, f);
    end
    if (upd && exp_perm != 0) n_perm++;
    @(posedge clk); #1;
    update = 1'b0;
    if (upd) begin
      m_mrfm = f;
      for (int i = 0; i < 3; i++) m_ncf[i] = nxt[i];
    end
    checks++;
    if (mrfm !== m_mrfm || int'(ncf[0]) != m_ncf[0] || int'(ncf[1]) != m_ncf[1] ||
        int'(ncf[2]) != m_ncf[2]) begin
      failures++;
      $display("FAIL mrfm=%b exp=%b ncf=%0d/%0d/%0d exp %0d/%0d/%0d", mrfm, m_mrfm,
               ncf[0], ncf[1], ncf[2], m_ncf[0], m_ncf[1], m_ncf[2]);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; update = 1'b0; faulty = '0;
    m_ncf = '{0, 0, 0}; m_mrfm = '0;
    #12 rst_n = 1'b1;

    // Directed: module II faulty TR+1 times in a row.
    for (int n = 1; n <= TR + 1; n++) begin
      faulty = 3'b010; update = 1'b1; #1;
      checks++;
      if (perm_now[1] !== (n > TR)) begin
        failures++;
        $display("FAIL directed n=%0d perm=%b", n, perm_now);
      end
      present(3'b010, 1'b1);
    end
    present(3'b000, 1'b1);   // a clean comparison resets the run

    for (int r = 0; r < 400; r++) begin
      logic [2:0] f;
      case ($urandom % 4)
        0:       f = 3'b001;
        1:       f = 3'b100;
        2:       f = 3'($urandom);
        default: f = m_mrfm;
      endcase
      present(f, ($urandom % 5) != 0);
    end
    checks++;
    if (n_perm == 0) begin
      failures++;
      $display("FAIL no permanent verdict seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
