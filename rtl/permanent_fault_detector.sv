// permanent_fault_detector: history-based permanent fault detection of
// SMERTMR (MRFM register and per-replica NCF counters).
//
// After every completed comparison (`update` high for one clock) the faulty
// mask found by the fault locator is stored in the MRFM register (most
// recent faulty modules).  NCF[i] counts how many comparisons in a row have
// found replica i faulty: it becomes NCF[i]+1 if replica i is faulty again,
// 1 if it is faulty now but was not last time, and 0 if it is fault-free.
// When NCF[i] exceeds the threshold TR, replica i is taken to be permanently
// faulty.  The published scheme gives the MRFM/NCF/TR mechanism and the rule
// "NCF exceeds TR"; the exact counting (reset to zero by a fault-free
// result) and the default TR = 2 are this design's choices.
//
// `perm_now` is combinational: it tells, in the same clock as `update`,
// which replicas would be judged permanently faulty by the result now being
// presented, so the controller can choose between recovery and
// master/checker mode in that clock.  NCF saturates at its maximum.
module permanent_fault_detector #(
  parameter int unsigned TR = 2,                 // threshold on NCF
  parameter int unsigned NW = $clog2(TR + 2)     // NCF width (holds TR+1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               update,    // a comparison has just finished
  input  logic [2:0]         faulty,    // its faulty mask, bit 0 = module I
  output logic [2:0]         mrfm,      // most recent faulty modules
  output logic [2:0][NW-1:0] ncf,       // consecutive fault counts
  output logic [2:0]         perm_now   // permanent, given `faulty`
);

  logic [2:0]         mrfm_q;
  logic [2:0][NW-1:0] ncf_q, ncf_d;

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      if (!faulty[i])                   ncf_d[i] = '0;
      else if (!mrfm_q[i])              ncf_d[i] = NW'(1);
      else if (ncf_q[i] != {NW{1'b1}})  ncf_d[i] = ncf_q[i] + 1'b1;
      else                              ncf_d[i] = ncf_q[i];
      perm_now[i] = faulty[i] && (int'(ncf_d[i]) > int'(TR));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mrfm_q <= '0;
      ncf_q  <= '0;
    end else if (update) begin
      mrfm_q <= faulty;
      ncf_q  <= ncf_d;
    end
  end

  assign mrfm = mrfm_q;
  assign ncf  = ncf_q;

endmodule
