// mismatch_counters: the pairwise scan-out comparators and the three mismatch
// counters counter12, counter13 and counter23 of SMERTMR.
//
// While the replicas' scan chains shift, the scan-out bits of each replica
// pair (I/II, I/III, II/III) are compared with an XOR.  In comparison mode
// (`count_up`) every mismatch increments the pair's counter, so after Lsc
// shift clocks counter_ij holds the number of state bits in which replicas i
// and j differ.  In recovery mode (`count_dn`) every mismatch decrements the
// counter; a recovery that saw the same mismatches as the comparison ends
// with all counters at zero.  This up/down scheme follows the published SMERTMR design.
//
// `clear` zeroes the counters and the `underflow` flag.  A decrement of a
// counter that is already zero cannot occur in a clean recovery; it is
// recorded in the sticky `underflow` flag instead of wrapping (this design's
// choice), so the controller treats it as a failed recovery.  Counters
// saturate at their maximum on increment, which a chain of LSC bits never
// reaches.  `all_zero` is high when every counter is zero.
//
// Timing: counters update on the rising clock edge; `clear` has priority.
module mismatch_counters
  import smertmr_pkg::*;
#(
  parameter int unsigned LSC = 3,                  // scan chain length
  parameter int unsigned CW  = $clog2(LSC + 1)     // counter width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                count_up,   // comparison mode shift
  input  logic                count_dn,   // recovery mode shift
  input  logic [2:0]          sco,        // scan outputs, [0] = module I
  output logic [2:0][CW-1:0]  cnt,        // [P12], [P13], [P23]
  output logic [2:0]          mismatch,   // XOR outputs, same order
  output logic                all_zero,
  output logic                underflow
);

  logic [2:0][CW-1:0] cnt_q;
  logic               underflow_q;

  assign mismatch[P12] = sco[0] ^ sco[1];
  assign mismatch[P13] = sco[0] ^ sco[2];
  assign mismatch[P23] = sco[1] ^ sco[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q       <= '0;
      underflow_q <= 1'b0;
    end else if (clear) begin
      cnt_q       <= '0;
      underflow_q <= 1'b0;
    end else begin
      for (int p = 0; p < 3; p++) begin
        if (mismatch[p]) begin
          if (count_up && cnt_q[p] != {CW{1'b1}}) begin
            cnt_q[p] <= cnt_q[p] + 1'b1;
          end else if (count_dn) begin
            if (cnt_q[p] == '0) underflow_q <= 1'b1;
            else                cnt_q[p]    <= cnt_q[p] - 1'b1;
          end
        end
      end
    end
  end

  assign cnt       = cnt_q;
  assign underflow = underflow_q;
  assign all_zero  = (cnt_q == '0);

  // The controller never asks for both directions at once.
  assert property (@(posedge clk) disable iff (!rst_n) !(count_up && count_dn))
    else $error("mismatch_counters: count_up and count_dn both high");

endmodule
