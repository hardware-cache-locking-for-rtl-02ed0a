// clau_pkg: types and constants shared by the CLAU (cache locking for all
// updates) blocks.
//
// CLAU lets every non-atomic read-modify-write (RMW) lock its L1D cache line
// from the moment its load micro-op reads the line with write permission
// until its store micro-op writes it, so that invalidations and downgrades
// from other cores wait instead of squashing the RMW. Several RMWs to the same
// line can share one lock ("lock chaining") up to a cap.
//
// Sizes follow the evaluated Alderlake-like core: 48 KB 12-way L1D, 192-entry
// load queue, 114-entry store queue, 13-bit watchdog with a 5000-cycle
// threshold and a 3-bit chain-length counter (chains of up to eight RMWs).
// The 64-byte line and the 48-bit physical address are this design's choice.
package clau_pkg;

  // Physical address and line geometry (assumed: x86-style 64-byte lines).
  localparam int unsigned PADDR_W     = 48;
  localparam int unsigned LINE_OFF_W  = 6;
  localparam int unsigned LINE_ADDR_W = PADDR_W - LINE_OFF_W;

  typedef logic [PADDR_W-1:0]     paddr_t;
  typedef logic [LINE_ADDR_W-1:0] line_addr_t;

  // Default structure sizes (Table I and the memory-overhead section).
  localparam int unsigned L1D_BYTES_DEF = 48 * 1024;
  localparam int unsigned L1D_WAYS_DEF  = 12;
  localparam int unsigned LQ_ENTRIES_DEF = 192;
  localparam int unsigned SQ_ENTRIES_DEF = 114;
  localparam int unsigned CHAIN_LEN_DEF  = 8;     // RMWs per lock chain (3-bit CL)
  localparam int unsigned WD_W_DEF       = 13;    // watchdog timer bits
  localparam int unsigned WD_THRESH_DEF  = 5000;  // watchdog threshold, cycles

  // Memory micro-op codes produced by the decoder.
  //   UOP_LD    plain load             UOP_ST    plain store
  //   UOP_LDST  RMW load asking for write permission (baseline RMW)
  //   UOP_LDSTL RMW load that also locks the line
  //   UOP_STUL  RMW store that writes and unlocks the line
  typedef enum logic [2:0] {
    UOP_NONE  = 3'd0,
    UOP_LD    = 3'd1,
    UOP_ST    = 3'd2,
    UOP_LDST  = 3'd3,
    UOP_LDSTL = 3'd4,
    UOP_STUL  = 3'd5
  } uop_t;

  // L1D coherence state per line: MESI plus Locked. A Locked line always
  // holds exclusive permission; the line's dirty bit is kept apart.
  typedef enum logic [2:0] {
    ST_I = 3'd0,
    ST_S = 3'd1,
    ST_E = 3'd2,
    ST_M = 3'd3,
    ST_L = 3'd4
  } cstate_t;

  // Operation on the L1D tag/state array (one per cycle).
  typedef enum logic [2:0] {
    L1_NOP    = 3'd0,
    L1_LOCK   = 3'd1,  // ldstl: lock the line if it is held with write permission
    L1_WRITE  = 3'd2,  // store micro-op writes the line (optionally unlocking)
    L1_UNLOCK = 3'd3,  // squash / re-execution: release the lock
    L1_INV    = 3'd4,  // external invalidation
    L1_DOWN   = 3'd5,  // external downgrade (to shared)
    L1_FILL   = 3'd6   // fill from the next level
  } l1_op_t;

  function automatic line_addr_t line_of(paddr_t a);
    return a[PADDR_W-1:LINE_OFF_W];
  endfunction

  function automatic logic has_write_perm(cstate_t s);
    return (s == ST_E) || (s == ST_M) || (s == ST_L);
  endfunction

endpackage
