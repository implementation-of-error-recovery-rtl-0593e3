// scan_router: the scan-chain multiplexers, their select gates, the priority
// encoder and the scan-enable OR gate of SMERTMR.
//
// Purely combinational; it decides where each replica's scan input comes
// from and when the chains shift:
//   * sce = recovery | comparison | offline_test  (one enable for all three
//     replicas).
//   * Each replica has a 2-way multiplexer selected by (recovery & F(i)):
//     unselected, the replica's own scan-out is fed back to its scan-in, so
//     the chain rotates and its state is preserved after Lsc clocks;
//     selected, the replica takes the scan-out of the source replica.
//   * The source replica is chosen by a priority encoder from the faulty
//     mask held in the faulty modules register: the lowest-numbered
//     fault-free replica wins.
// The structure above follows the published comparison- and recovery-mode
// diagrams.  In off-line testing (scan test of the replicas) the published scheme
// only shows the enable; here each chain is then fed from an external
// scan-in, `test_si[i]`, and read out at the replica's scan-out, which is
// this design's choice.
module scan_router (
  input  logic       comparison,    // comparison mode shift
  input  logic       recovery,      // recovery mode shift
  input  logic       offline_test,  // external scan test
  input  logic [2:0] faulty,        // F(1..3), bit 0 = module I
  input  logic [2:0] sco,           // replica scan-outs
  input  logic [2:0] test_si,       // external scan-ins (off-line test)
  output logic [2:0] sci,           // replica scan-ins
  output logic       sce,           // replica scan enable
  output logic [1:0] src_idx        // index of the source replica
);

  logic src_bit;

  always_comb begin
    // Priority encoder: first fault-free module.
    if      (!faulty[0]) src_idx = 2'd0;
    else if (!faulty[1]) src_idx = 2'd1;
    else                 src_idx = 2'd2;
    src_bit = sco[src_idx];

    sce = recovery | comparison | offline_test;

    for (int i = 0; i < 3; i++) begin
      if (offline_test)              sci[i] = test_si[i];
      else if (recovery & faulty[i]) sci[i] = src_bit;
      else                           sci[i] = sco[i];
    end
  end

endmodule
