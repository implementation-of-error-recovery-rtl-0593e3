// tmr_module: one replica of the circuit protected by SMERTMR, with its state
// flip-flops stitched into a scan chain.
//
// The protected function is a W-bit down counter that steps when `c_in` is
// high; its output `q` is the counter value.  SMERTMR only requires that every
// state bit of a replica sits on a scan chain; the counter stands in for the
// user's circuit.  Its width (3 bits) and the enable name follow the example
// replica signals c1[2:0]..c3[2:0] and C_in of the system's simulation; the
// down-counting function is read from those waveforms.
//
// Scan chain: when `sce` is high the register shifts by one position per
// clock, `sci` entering bit 0 and `sco` being bit W-1.  Feeding `sco` back
// into `sci` for W clocks rotates the state back to where it started, which
// is how the SMERTMR controller reads a replica's state without losing it.
//
// `fis` is a fault-injection mask (a set bit flips that state bit at the next
// clock edge, on top of whatever the register would load).  It exists for
// testing; tie it to zero in use.
//
// Timing: all state changes on the rising edge of clk; asynchronous
// active-low reset to RESET_VAL.
module tmr_module #(
  parameter int unsigned     W         = 3,
  parameter logic [W-1:0]    RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         c_in,   // count enable (functional mode)
  input  logic         sce,    // scan enable
  input  logic         sci,    // scan in
  input  logic [W-1:0] fis,    // fault injection: flip mask
  output logic [W-1:0] q,      // replica output (counter value)
  output logic         sco     // scan out
);

  logic [W-1:0] state_q, state_d;

  always_comb begin
    if (sce) begin
      state_d = (state_q << 1) | W'(sci);
    end else if (c_in) begin
      state_d = state_q - 1'b1;
    end else begin
      state_d = state_q;
    end
    state_d = state_d ^ fis;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= RESET_VAL;
    else        state_q <= state_d;
  end

  assign q   = state_q;
  assign sco = state_q[W-1];

endmodule
