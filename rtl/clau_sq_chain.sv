// clau_sq_chain: store-queue extension that implements lock chaining.
//
// Each store-queue entry gets three CLAU fields beside the core's own store
// data: the cache-line address of its RMW, an unlock-responsibility flag (the
// store must release the line lock when it writes the L1D) and a saturating
// chain-length counter CL. Only the last RMW of a chain holds the
// responsibility, so at most one entry per line has it.
//
// When the load micro-op (ldstl) of a cache-locking RMW executes, the unit
// snoops all entries, older and younger, for a line-address match (offset
// bits ignored) with responsibility:
//   (a) no such entry: the paired store starts a new chain with CL = 0 and
//       the load must lock the line in the L1D (`exe_need_lock`); the store
//       takes responsibility only if the L1D granted the lock
//       (`exe_lock_granted`).
//   (b) an entry is found and its CL + 1 does not overflow: the paired store
//       takes CL + 1 and the responsibility, the found entry loses it; the
//       line is already locked, so the L1D is not touched.
//       If CL + 1 overflows, nothing changes and the RMW runs unlocked.
// `exe_lock_en` low (store-to-load forwarding with locking skipped) makes the
// RMW run unlocked without snooping.
// When a store leaves the store buffer (`wr_*`) its entry is freed and
// `wr_unlock` says whether it must release the lock. A squashed or re-executed
// RMW (`sq_*`) gives its responsibility up and reports it in `sq_unlock`, so
// the L1D can release the line. `force_clear` (watchdog) drops every
// responsibility at once.
//
// Timing: snoop results are combinational in the execute cycle; all fields
// update on the next clock edge. Entry indices are the core's own SQ indices.
// CHAIN_LEN = 8 (a 3-bit CL) is the document's best configuration; CHAIN_LEN = 1
// disables chaining. The fields, the cases (a)/(b) follow the document; the
// allocation/index interface and squash handling of a chain member are this
// design's own.
module clau_sq_chain
  import clau_pkg::*;
#(
  parameter int unsigned ENTRIES   = SQ_ENTRIES_DEF,
  parameter int unsigned CHAIN_LEN = CHAIN_LEN_DEF,   // RMWs per chain, at most
  localparam int unsigned CL_W   = (CHAIN_LEN > 1) ? $clog2(CHAIN_LEN) : 1,
  localparam int unsigned IDX_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // dispatch: a store micro-op enters the SQ
  input  logic             alloc_valid,
  input  logic [IDX_W-1:0] alloc_idx,
  // execution of the paired ldstl
  input  logic             exe_valid,
  input  logic [IDX_W-1:0] exe_idx,         // SQ index of the paired store
  input  line_addr_t       exe_line,
  input  logic             exe_lock_en,     // RMW still wants cache locking
  input  logic             exe_lock_granted,// L1D locked the line (case a)
  output logic             exe_need_lock,   // case (a): ask the L1D to lock
  output logic             exe_chained,     // case (b) without overflow
  output logic             exe_overflow,    // case (b) with overflow
  output logic [CL_W-1:0]  exe_new_cl,
  // store micro-op leaves the store buffer and writes the L1D
  input  logic             wr_valid,
  input  logic [IDX_W-1:0] wr_idx,
  output logic             wr_unlock,       // this store must unlock its line
  // local squash or re-execution of the RMW owning an entry
  input  logic             sq_valid,
  input  logic [IDX_W-1:0] sq_idx,
  input  logic             sq_keep,         // re-execution: entry stays allocated
  output logic             sq_unlock,       // release the line lock
  output line_addr_t       sq_line,
  // watchdog
  input  logic             force_clear,
  // observability
  output logic [ENTRIES-1:0] resp_vec,
  output logic [CL_W-1:0]    cl_of [ENTRIES]
);

  localparam logic [CL_W-1:0] CL_MAX = CL_W'(CHAIN_LEN - 1);

  logic [ENTRIES-1:0] valid_q, resp_q;
  line_addr_t         line_q [ENTRIES];
  logic [CL_W-1:0]    cl_q   [ENTRIES];

  // ---- snoop: line-address match with responsibility, any program order ----
  logic [ENTRIES-1:0] match;
  logic [CL_W-1:0]    match_cl;
  always_comb begin
    match_cl = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      match[i] = valid_q[i] && resp_q[i] && (line_q[i] == exe_line) &&
                 (IDX_W'(i) != exe_idx);
      if (match[i]) match_cl |= cl_q[i];  // at most one holder per line
    end
  end

  logic snoop_hit;
  assign snoop_hit     = exe_valid && exe_lock_en && (|match);
  assign exe_need_lock = exe_valid && exe_lock_en && !(|match);
  assign exe_overflow  = snoop_hit && (match_cl == CL_MAX);
  assign exe_chained   = snoop_hit && (match_cl != CL_MAX);
  assign exe_new_cl    = exe_chained ? match_cl + 1'b1 : '0;

  assign wr_unlock = wr_valid && valid_q[wr_idx] && resp_q[wr_idx];
  assign sq_unlock = sq_valid && valid_q[sq_idx] && resp_q[sq_idx];
  assign sq_line   = line_q[sq_idx];

  assign resp_vec = resp_q;
  always_comb for (int i = 0; i < ENTRIES; i++) cl_of[i] = cl_q[i];

  // ---- next state of the responsibility flags ----
  logic [ENTRIES-1:0] valid_d, resp_d;
  always_comb begin
    valid_d = valid_q;
    resp_d  = resp_q;
    if (alloc_valid) begin
      valid_d[alloc_idx] = 1'b1;
      resp_d[alloc_idx]  = 1'b0;
    end
    if (exe_valid) begin
      if (exe_chained) resp_d = resp_d & ~match;  // old chain tail hands over
      resp_d[exe_idx] = exe_chained || (exe_need_lock && exe_lock_granted);
    end
    if (wr_valid) begin
      valid_d[wr_idx] = 1'b0;
      resp_d[wr_idx]  = 1'b0;
    end
    if (sq_valid) begin
      resp_d[sq_idx] = 1'b0;
      if (!sq_keep) valid_d[sq_idx] = 1'b0;
    end
    if (force_clear) resp_d = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      resp_q  <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        line_q[i] <= '0;
        cl_q[i]   <= '0;
      end
    end else begin
      valid_q <= valid_d;
      resp_q  <= resp_d;
      if (alloc_valid) cl_q[alloc_idx] <= '0;
      if (exe_valid) begin
        line_q[exe_idx] <= exe_line;
        cl_q[exe_idx]   <= exe_new_cl;
      end
    end
  end

  // A line is never held by two chain tails at once.
  always_ff @(posedge clk) begin
    if (rst_n && exe_valid)
      assert ($countones(match) <= 1)
        else $error("clau_sq_chain: two unlock-responsible stores for one line");
  end

endmodule
