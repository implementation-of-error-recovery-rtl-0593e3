// tmr_voter: output voter of the triple-modular-redundant system.
//
// Forms the bitwise majority of the three replica outputs and raises `error`
// whenever the three outputs are not all equal.  In SMERTMR this error is one
// of the two events that start the comparison mode (the other is the
// checkpoint signal).  Purely combinational.
module tmr_voter #(
  parameter int unsigned W = 3
) (
  input  logic [2:0][W-1:0] q,      // replica outputs, [0] = module I
  output logic [W-1:0]      voted,  // bitwise majority
  output logic              error   // outputs disagree
);

  always_comb begin
    voted = (q[0] & q[1]) | (q[0] & q[2]) | (q[1] & q[2]);
    error = (q[0] != q[1]) || (q[0] != q[2]);
  end

endmodule
