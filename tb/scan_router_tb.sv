// scan_router_tb: exhaustive self-checking test of the scan routing: every
// combination of mode inputs, FMR mask, scan-outs and external scan-ins.
// Expected values: sce is the OR of the three modes; in off-line test each
// replica takes its external scan-in; in recovery a faulty replica takes the
// scan-out of the lowest-numbered fault-free replica; otherwise each replica
// takes its own scan-out.
module scan_router_tb;
  logic       comparison, recovery, offline_test, sce;
  logic [2:0] faulty, sco, test_si, sci;
  logic [1:0] src_idx;
  int         checks = 0, failures = 0;

  scan_router dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 12); v++) begin
      logic [2:0] exp_sci;
      int         src;
      {comparison, recovery, offline_test, faulty, sco, test_si} = 12'(v);
      #1;
      src = 2;
      for (int i = 2; i >= 0; i--) if (!faulty[i]) src = i;
      for (int i = 0; i < 3; i++)
        exp_sci[i] = offline_test ? test_si[i] :
                     (recovery && faulty[i]) ? sco[src] : sco[i];
      checks++;
      if (sci !== exp_sci || sce !== (comparison | recovery | offline_test) ||
          int'(src_idx) != src) begin
        failures++;
        $display("FAIL v=%h sci=%b exp=%b sce=%b src=%0d", v, sci, exp_sci, sce, src_idx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
