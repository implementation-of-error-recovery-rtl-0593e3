// smertmr_pkg: types and constants shared by the SMERTMR (scan-chain-based
// multiple error recovery for TMR) blocks.
//
// The controller states are the five states of the SMERTMR state diagram:
// normal operation, comparison of the replicas' internal states, recovery of
// faulty replicas, master/checker operation after a permanent fault, and the
// unrecoverable condition.  Replicas are named by a 2-bit id: 1, 2 and 3 for
// modules I, II and III, 0 for "no module"; the faulty-module registers FMR1
// and FMR2 hold such ids.  The fault locator's verdict is a small enum.
// The numeric encodings are this design's choice.
package smertmr_pkg;

  // Number of redundant replicas (triple modular redundancy).
  localparam int unsigned NMOD = 3;

  // Pair index used for the mismatch counters: counter12, counter13, counter23.
  localparam int unsigned P12 = 0;
  localparam int unsigned P13 = 1;
  localparam int unsigned P23 = 2;

  typedef enum logic [2:0] {
    ST_NORMAL        = 3'd0,
    ST_COMPARE       = 3'd1,
    ST_RECOVER       = 3'd2,
    ST_MASTERCHECK   = 3'd3,
    ST_UNRECOVERABLE = 3'd4
  } state_e;

  // Module id: 0 = none, 1 = module I, 2 = module II, 3 = module III.
  typedef logic [1:0] mod_id_t;
  localparam mod_id_t MOD_NONE = 2'd0;

  typedef enum logic [1:0] {
    FLU_NO_FAULT      = 2'd0,  // all counters zero
    FLU_LOCATED       = 2'd1,  // one or two faulty modules located
    FLU_UNRECOVERABLE = 2'd2   // counter pattern fits no rule
  } flu_verdict_e;

  // One-hot mask (bit 0 = module I) of a module id.
  function automatic logic [NMOD-1:0] id_to_mask(mod_id_t id);
    logic [NMOD-1:0] m;
    m = '0;
    if (id != MOD_NONE) m[id - 2'd1] = 1'b1;
    return m;
  endfunction

  // Id of module with index i (0-based).
  function automatic mod_id_t idx_to_id(int unsigned i);
    return mod_id_t'(i + 1);
  endfunction

endpackage
