// fault_locator: the Fault Locator Unit (FLU) of SMERTMR.
//
// Purely combinational.  From the three mismatch counts gathered in
// comparison mode it decides which replicas are faulty, following the
// published SMERTMR algorithm:
//   * all counters zero                         -> no faulty replica;
//   * counter_ij == counter_ik and counter_jk==0 -> replica i alone is faulty;
//   * counter_jk == x, counter_ik == y and
//     counter_ij == x + y (x, y nonzero)         -> replicas i and j are
//                                                  faulty, k is fault-free;
//   * anything else                             -> unrecoverable.
// The single-fault rules are tried first, then the double-fault rules; for
// the double-fault rule both x and y must be nonzero, otherwise the pattern
// is a single fault (this ordering is this design's reading of the
// algorithm's if/else-if chain).
//
// Outputs: `verdict`, the faulty mask (bit 0 = module I) and the two
// faulty-module ids that are loaded into FMR1 and FMR2 (lower id in fmr1,
// MOD_NONE where unused).
module fault_locator
  import smertmr_pkg::*;
#(
  parameter int unsigned CW = 2
) (
  input  logic [2:0][CW-1:0] cnt,      // [P12], [P13], [P23]
  output flu_verdict_e       verdict,
  output logic [2:0]         faulty,
  output mod_id_t            fmr1,
  output mod_id_t            fmr2
);

  logic [CW:0] c12, c13, c23;  // one extra bit for the sums

  always_comb begin
    c12 = {1'b0, cnt[P12]};
    c13 = {1'b0, cnt[P13]};
    c23 = {1'b0, cnt[P23]};

    verdict = FLU_UNRECOVERABLE;
    faulty  = 3'b000;

    if (c12 == '0 && c13 == '0 && c23 == '0) begin
      verdict = FLU_NO_FAULT;
    end else if (c12 == c13 && c23 == '0) begin          // module I
      verdict = FLU_LOCATED;  faulty = 3'b001;
    end else if (c12 == c23 && c13 == '0) begin          // module II
      verdict = FLU_LOCATED;  faulty = 3'b010;
    end else if (c13 == c23 && c12 == '0) begin          // module III
      verdict = FLU_LOCATED;  faulty = 3'b100;
    end else if (c13 != '0 && c23 != '0 && c12 == c13 + c23) begin
      verdict = FLU_LOCATED;  faulty = 3'b011;           // I and II, III good
    end else if (c12 != '0 && c23 != '0 && c13 == c12 + c23) begin
      verdict = FLU_LOCATED;  faulty = 3'b101;           // I and III, II good
    end else if (c12 != '0 && c13 != '0 && c23 == c12 + c13) begin
      verdict = FLU_LOCATED;  faulty = 3'b110;           // II and III, I good
    end

    fmr1 = MOD_NONE;
    fmr2 = MOD_NONE;
    for (int i = 2; i >= 0; i--) begin
      if (faulty[i]) begin
        fmr2 = fmr1;
        fmr1 = idx_to_id(i);
      end
    end
  end

endmodule
