// Shared types and constants of the speculative memory access unit.
//
// The unit predicts, for every x86 load, its data address (2-stride
// address prediction) and whether it depends on an older store
// (store-load pair dependency/forwarding prediction with a classify and a
// filter counter).  Prediction is made after dispatch, when the load enters
// the unified memory access buffer (UMAB).  This package holds the widths,
// the enumerations for the prediction policy, the send-back strategy and
// the per-load scheduling mode, and the byte-lane helper functions used by
// the UMAB for overlap checks and store-to-load forwarding.
//
// Widths follow a 32-bit x86 linear address.  The access model (1, 2 or 4
// bytes that do not cross an aligned 32-bit word) is this design's choice.
package smau_pkg;

  localparam int unsigned ADDR_W = 32;   // x86 linear address
  localparam int unsigned PC_W   = 32;   // instruction address
  localparam int unsigned DATA_W = 32;   // one aligned word
  localparam int unsigned TAG_W  = 8;    // reorder buffer tag

  // Dependency prediction policy of the store-load pair predictor.
  //   PL  : every load predicted independent (pre-load)
  //   DP  : store-load pair, every table hit predicted dependent
  //   CDP : DP refined by the 2-bit classify counter
  //   SDP : CDP with the 2-bit filter counter dropping error-prone loads
  typedef enum logic [1:0] {POL_PL = 2'd0, POL_DP = 2'd1, POL_CDP = 2'd2, POL_SDP = 2'd3} dep_policy_e;

  // Send-back of loaded data: aggressive (use at once, recover on a miss)
  // or conservative (send only after validation, no recovery).
  typedef enum logic {SB_ASB = 1'b0, SB_CSB = 1'b1} send_back_e;

  // Scheduling mode chosen for a load by the bypass logic.
  //   MODE_BYPASS  : predicted independent, may pass unsolved stores
  //   MODE_FORWARD : predicted to take its value from the paired store
  //   MODE_WAIT    : predicted dependent on the paired store, which cannot
  //                  forward; wait until that store has left the buffer
  //   MODE_CONS    : filtered out, conventional load forwarding (wait for
  //                  every older store address)
  typedef enum logic [1:0] {MODE_BYPASS = 2'd0, MODE_FORWARD = 2'd1, MODE_WAIT = 2'd2, MODE_CONS = 2'd3} ld_mode_e;

  // One-cycle event pulses of the memory access buffer, for statistics.
  typedef struct packed {
    logic spec_issue;   // a load got its value while an older store address was unknown
    logic spec_fwd;     // a load took its value from its predicted store
    logic pred_addr;    // a load read the cache at a predicted address
    logic std_fwd;      // a load forwarded from an older store with a known matching address
    logic filtered;     // a load was dispatched in conventional mode (filtered out)
    logic wait_pair;    // a load was dispatched waiting for its non-forwarding paired store
    logic addr_miss;    // validation found a wrong predicted address
    logic dep_miss;     // validation found a wrong dependence or forwarding source
    logic recover;      // a sent value was wrong: younger work squashed
    logic replay;       // a wrong value was caught before it was sent: load re-executed
    logic stale;        // a committing store made an already-read load value stale
  } umab_events_t;

  // Access size, in bytes minus one: 0 = byte, 1 = word, 3 = dword.
  typedef logic [1:0] size_t;

  // Byte lanes of the aligned 32-bit word touched by an access.
  function automatic logic [3:0] byte_mask(input logic [1:0] ofs, input size_t sz);
    logic [3:0] base;
    case (sz)
      2'd0:    base = 4'b0001;
      2'd1:    base = 4'b0011;
      default: base = 4'b1111;
    endcase
    return base << ofs;
  endfunction

  // Value a load of size sz at byte offset ofs reads from an aligned word
  // (zero extended, least significant byte first).
  function automatic logic [DATA_W-1:0] extract(input logic [DATA_W-1:0] word,
                                                input logic [1:0] ofs, input size_t sz);
    logic [DATA_W-1:0] sh;
    sh = word >> (8 * ofs);
    case (sz)
      2'd0:    return {24'd0, sh[7:0]};
      2'd1:    return {16'd0, sh[15:0]};
      default: return sh;
    endcase
  endfunction

endpackage
