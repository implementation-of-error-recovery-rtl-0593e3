// master_checker: master/checker (duplex) operation of SMERTMR after a
// replica has been found permanently faulty.
//
// The replica named by `disregard` is ignored.  Of the two remaining
// replicas the lower-numbered one is the master, whose output is passed to
// `out`; the other is the checker.  `mc_error` is high when master and
// checker disagree; the controller then enters the unrecoverable condition.
// The published scheme gives the mode and its error exit; the choice of master is
// this design's.  With `disregard` = MOD_NONE replica I is master and II is
// checker.  Purely combinational.
module master_checker
  import smertmr_pkg::*;
#(
  parameter int unsigned W = 3
) (
  input  logic [2:0][W-1:0] q,          // replica outputs, [0] = module I
  input  mod_id_t           disregard,  // permanently faulty replica
  output logic [W-1:0]      out,
  output logic              mc_error,
  output mod_id_t           master_id,
  output mod_id_t           checker_id
);

  logic [1:0] mi, ci;

  always_comb begin
    unique case (disregard)
      2'd1:    begin mi = 2'd1; ci = 2'd2; end  // I out: II master, III checker
      2'd2:    begin mi = 2'd0; ci = 2'd2; end  // II out: I master, III checker
      2'd3:    begin mi = 2'd0; ci = 2'd1; end  // III out: I master, II checker
      default: begin mi = 2'd0; ci = 2'd1; end
    endcase
    out      = q[mi];
    mc_error = (q[mi] != q[ci]);
    master_id  = idx_to_id(int'(mi));
    checker_id = idx_to_id(int'(ci));
  end

endmodule
